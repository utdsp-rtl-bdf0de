// tb_modulo_agen: self-checking test of the modulo (circular-buffer) address
// generator.
//
// Random buffers [start, end] and random pointers inside them, stepped by a
// random amount no larger than the buffer, in both directions. The expected
// result is worked out with wide integers: start + ((a - start +/- b) mod size).
// The generator is combinational, so results are checked after a delta.
//
// Start/end-register modulo addressing follows the document; the limit on the
// step size is this design's own.
`timescale 1ns/1ps
module tb_modulo_agen;
  localparam int W = 16;
  logic [W-1:0] a, b, start_addr, end_addr, y;
  logic dec;
  int checks = 0, failures = 0;

  modulo_agen #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) begin
      int s, e, size, aa, bb, exp;
      size = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 8) : $urandom_range(1, 4000);
      s = $urandom_range(0, 65536 - size);
      e = s + size - 1;
      aa = s + $urandom_range(0, size - 1);
      bb = $urandom_range(0, size);
      dec = $urandom_range(0, 1);
      a = W'(aa); b = W'(bb); start_addr = W'(s); end_addr = W'(e);
      exp = dec ? s + (((aa - s - bb) % size) + size) % size
                : s + (aa - s + bb) % size;
      #1;
      checks++;
      if (y !== W'(exp)) begin
        failures++;
        $display("FAIL %s a=%0h b=%0h [%0h,%0h]: got %0h expected %0h",
                 dec ? "dec" : "inc", aa, bb, s, e, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
