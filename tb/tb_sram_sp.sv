// tb_sram_sp: self-checking test of the single-ported SRAM macro model.
//
// Drives random writes and reads on a 256 x 32 instance (the size of the
// instruction memory and of one decoder-memory bank) and compares every read
// with a reference array kept here. Checks the timing the core relies on: a
// write is stored at the rising edge, and a read returns the addressed word
// within the same cycle (combinational read), including right after a write.
//
// The 256 x 32 size follows the document's macros; the combinational read is
// this design's own model of them.
`timescale 1ns/1ps
module tb_sram_sp;
  localparam int DEPTH = 256, WIDTH = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  bit   known [DEPTH];
  int checks = 0, failures = 0;

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; addr = 8'(a); wdata = $urandom; model[a] = wdata; known[a] = 1;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      addr = 8'(a); #1;
      check($sformatf("read %0d", a), rdata, model[a]);
    end
    // random mix
    repeat (2000) begin
      @(negedge clk);
      addr = 8'($urandom_range(0, DEPTH - 1));
      we = $urandom_range(0, 1);
      wdata = $urandom;
      #1;
      check("read before edge", rdata, model[addr]);
      if (we) model[addr] = wdata;
      @(posedge clk); #1;
      check("read after edge", rdata, model[addr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
