// tb_jsr_stack: self-checking test of the subroutine / interrupt return stack.
//
// Random pushes (with a random interrupt flag) and pops against a queue kept
// here; after each edge the top address, top flag, empty and full are
// compared, and err must flag an overflow or an underflow for one cycle.
//
// The depth of eight and the interrupt flag are this design's own; the
// document gives neither.
`timescale 1ns/1ps
module tb_jsr_stack;
  localparam int DEPTH = 8, AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, push_int = 0;
  logic [AW-1:0] push_addr = '0, top_addr;
  logic top_int, empty, full, err;
  int qa [$];
  bit qi [$];
  int checks = 0, failures = 0;

  jsr_stack #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

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

  task automatic step(bit pu, bit po);
    bit exp_err;
    @(negedge clk);
    push = pu; pop = po; push_addr = AW'($urandom); push_int = $urandom_range(0, 1);
    exp_err = 0;
    if (pu) begin
      if (qa.size() == DEPTH) exp_err = 1;
      else begin qa.push_back(int'(push_addr)); qi.push_back(push_int); end
    end else if (po) begin
      if (qa.size() == 0) exp_err = 1;
      else begin void'(qa.pop_back()); void'(qi.pop_back()); end
    end
    @(posedge clk); #1;
    push = 0; pop = 0;
    check("err", err, exp_err);
    check("empty", empty, qa.size() == 0);
    check("full", full, qa.size() == DEPTH);
    if (qa.size() != 0) begin
      check("top addr", top_addr, qa[qa.size() - 1]);
      check("top int", top_int, qi[qi.size() - 1]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(0, 1);
    for (int i = 0; i < DEPTH + 1; i++) step(1, 0);
    for (int i = 0; i < DEPTH; i++) step(0, 1);
    repeat (3000) begin
      int r;
      r = $urandom_range(0, 9);
      step(r < 5, r >= 5 && r < 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
