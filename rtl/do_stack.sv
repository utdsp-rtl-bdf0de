// do_stack: hardware-loop stack of the PC unit.
//
// Each entry holds the first address of a loop body (begin), its last address
// (end) and the number of passes still to run after the current one (left).
// The top entry is always visible. push adds an entry, pop removes the top,
// dec decrements the top's count (the iteration counter of the current loop is
// the top entry's count field). push has priority over pop, pop over dec.
// DEPTH is five, the nesting depth the document gives. A push when full or a
// pop when empty is ignored and raises err for one cycle.
module do_stack #(
  parameter int DEPTH = 5,
  parameter int AW    = 8,
  parameter int CW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] push_begin,
  input  logic [AW-1:0] push_end,
  input  logic [CW-1:0] push_left,
  input  logic          pop,
  input  logic          dec,
  output logic [AW-1:0] top_begin,
  output logic [AW-1:0] top_end,
  output logic [CW-1:0] top_left,
  output logic          empty,
  output logic          full,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic          err
);
  typedef struct packed {
    logic [AW-1:0] b;
    logic [AW-1:0] e;
    logic [CW-1:0] n;
  } entry_t;

  entry_t stk [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] sp;

  assign empty = (sp == 0);
  assign full  = (int'(sp) == DEPTH);
  assign depth = sp;
  assign top_begin = empty ? '0 : stk[sp-1].b;
  assign top_end   = empty ? '0 : stk[sp-1].e;
  assign top_left  = empty ? '0 : stk[sp-1].n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp  <= '0;
      err <= 1'b0;
      for (int i = 0; i < DEPTH; i++) stk[i] <= '0;
    end else begin
      err <= 1'b0;
      if (push) begin
        if (full) err <= 1'b1;
        else begin
          stk[sp] <= '{b: push_begin, e: push_end, n: push_left};
          sp <= sp + 1'b1;
        end
      end else if (pop) begin
        if (empty) err <= 1'b1;
        else sp <= sp - 1'b1;
      end else if (dec && !empty) begin
        stk[sp-1].n <= stk[sp-1].n - 1'b1;
      end
    end
  end
endmodule
