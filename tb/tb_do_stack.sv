// tb_do_stack: self-checking test of the DO-loop stack.
//
// Random push / pop / decrement commands (push over pop over decrement, as in
// the block) on the five-entry stack, against a queue kept here. After every
// edge the top entry (begin, end, count), the depth, empty and full are
// compared, and err must rise for exactly the cycle after a push to a full
// stack or a pop from an empty one. The test also fills the stack to the
// document's nesting depth of five and checks a sixth push is refused.
//
// The nesting depth of five follows the document; the error flag and
// command priority are this design's own.
`timescale 1ns/1ps
module tb_do_stack;
  localparam int DEPTH = 5, AW = 8, CW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, dec = 0;
  logic [AW-1:0] push_begin = '0, push_end = '0;
  logic [CW-1:0] push_left = '0;
  logic [AW-1:0] top_begin, top_end;
  logic [CW-1:0] top_left;
  logic empty, full, err;
  logic [2:0] depth;
  typedef struct { int b, e, n; } ent_t;
  ent_t q [$];
  int checks = 0, failures = 0;

  do_stack #(.DEPTH(DEPTH), .AW(AW), .CW(CW)) dut (.*);

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

  task automatic step(bit pu, bit po, bit de);
    bit exp_err;
    @(negedge clk);
    push = pu; pop = po; dec = de;
    push_begin = AW'($urandom); push_end = AW'($urandom); push_left = CW'($urandom);
    exp_err = 0;
    if (pu) begin
      if (q.size() == DEPTH) exp_err = 1;
      else q.push_back('{int'(push_begin), int'(push_end), int'(push_left)});
    end else if (po) begin
      if (q.size() == 0) exp_err = 1;
      else void'(q.pop_back());
    end else if (de && q.size() != 0) begin
      q[q.size() - 1].n = (q[q.size() - 1].n - 1) & 16'hFFFF;
    end
    @(posedge clk); #1;
    push = 0; pop = 0; dec = 0;
    check("err", err, exp_err);
    check("depth", depth, q.size());
    check("empty", empty, q.size() == 0);
    check("full", full, q.size() == DEPTH);
    if (q.size() != 0) begin
      check("top begin", top_begin, q[q.size() - 1].b);
      check("top end", top_end, q[q.size() - 1].e);
      check("top left", top_left, q[q.size() - 1].n);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(0, 1, 0);                        // underflow
    for (int i = 0; i < DEPTH + 1; i++) step(1, 0, 0);   // fill, then overflow
    check("nests five deep", q.size(), 5);
    for (int i = 0; i < DEPTH; i++) step(0, 1, 0);
    repeat (3000) begin
      int r;
      r = $urandom_range(0, 9);
      step(r < 3, r >= 3 && r < 5, r >= 5 || ($urandom_range(0, 1) == 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
