// tb_data_mem: self-checking test of one data-memory bank (X or Y).
//
// The bank holds 512 16-bit words built from four 256 x 8 SRAM lanes. The
// test writes random words at random addresses and checks every read against
// a reference array, so it catches a wrong lane or row mapping: a write to
// an even word must never change its odd neighbour and vice versa. Writes
// take effect at the rising edge; reads are combinational.
//
// The bank size (1 Kbyte from four 256 x 8 macros) follows the document; the
// lane mapping is this design's own.
`timescale 1ns/1ps
module tb_data_mem;
  localparam int WORDS = 512;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [8:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [WORDS];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1; addr = 9'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < WORDS; a++) begin
      addr = 9'(a); #1;
      check($sformatf("read %0d", a), rdata, model[a]);
    end
    repeat (3000) begin
      int nb;
      @(negedge clk);
      addr = 9'($urandom_range(0, WORDS - 1));
      we = $urandom_range(0, 1);
      wdata = 16'($urandom);
      if (we) model[addr] = wdata;
      @(posedge clk); #1;
      check("read back", rdata, model[addr]);
      nb = int'(addr) ^ 1;
      addr = 9'(nb); we = 0; #1;
      check("neighbour untouched", rdata, model[nb]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
