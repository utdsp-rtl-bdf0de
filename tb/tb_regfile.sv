// tb_regfile: self-checking test of the multi-ported register file.
//
// Uses the REG D configuration (8 read, 4 write ports, 16 x 16 bits). Every
// cycle each write port writes a random register with probability one half
// and every read port reads a random register. Expected values come from a
// reference array: reads are write-through (a register written in this
// cycle reads as the new value), the highest-numbered write port wins a
// conflict, and reset clears every register.
//
// The port counts follow the document; write-through, conflict resolution and
// reset to zero are this design's own.
`timescale 1ns/1ps
module tb_regfile;
  localparam int NR = 8, NW = 4, NREGS = 16, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NR-1:0][3:0] raddr = '0;
  logic [NR-1:0][W-1:0] rdata;
  logic [NW-1:0] we = '0;
  logic [NW-1:0][3:0] waddr = '0;
  logic [NW-1:0][W-1:0] wdata = '0;
  logic [W-1:0] model [NREGS];
  int checks = 0, failures = 0;

  regfile #(.NR(NR), .NW(NW), .NREGS(NREGS), .W(W)) dut (.*);

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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NREGS; r++) model[r] = '0;
    for (int r = 0; r < NREGS; r++) begin
      raddr[0] = 4'(r); #1;
      check("reset value", rdata[0], 0);
    end
    repeat (3000) begin
      logic [W-1:0] nxt [NREGS];
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p] = ($urandom_range(0, 1) == 1);
        waddr[p] = 4'($urandom_range(0, ($urandom_range(0, 3) == 0) ? 3 : 15));
        wdata[p] = W'($urandom);
      end
      for (int q = 0; q < NR; q++) raddr[q] = 4'($urandom_range(0, 15));
      nxt = model;
      for (int p = 0; p < NW; p++) if (we[p]) nxt[waddr[p]] = wdata[p];
      #1;
      for (int q = 0; q < NR; q++)
        check($sformatf("port %0d write-through read", q), rdata[q], nxt[raddr[q]]);
      @(posedge clk);
      model = nxt;
      #1;
      we = '0;
      #1;
      for (int q = 0; q < NR; q++)
        check($sformatf("port %0d stored", q), rdata[q], model[raddr[q]]);
    end
    @(negedge clk) rst_n = 0;
    #1;
    for (int r = 0; r < NREGS; r++) begin
      raddr[0] = 4'(r); #1;
      check("cleared by reset", rdata[0], 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
