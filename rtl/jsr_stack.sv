// jsr_stack: return-address stack of the PC unit.
//
// Holds the return addresses of jsr and of accepted interrupts. Each entry
// carries a flag that marks an interrupt frame, so the controller can tell
// when the service routine returns. push and pop act on the rising edge (push
// wins if both are asserted). A push when full or a pop when empty is
// ignored and raises err for one cycle. The depth (8) is this design's choice.
//
// The stack itself follows the document's PC unit; the interrupt flag is
// this design's own.
module jsr_stack #(
  parameter int DEPTH = 8,
  parameter int AW    = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  input  logic          push_int,
  input  logic          pop,
  output logic [AW-1:0] top_addr,
  output logic          top_int,
  output logic          empty,
  output logic          full,
  output logic          err
);
  logic [AW:0] stk [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] sp;
  localparam int IW = $clog2(DEPTH);   // index width; sp < DEPTH on every write

  assign empty = (sp == 0);
  assign full  = (int'(sp) == DEPTH);
  assign top_addr = empty ? '0 : stk[sp-1][AW-1:0];
  assign top_int  = empty ? 1'b0 : stk[sp-1][AW];

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
          stk[IW'(sp)] <= {push_int, push_addr};
          sp <= sp + 1'b1;
        end
      end else if (pop) begin
        if (empty) err <= 1'b1;
        else sp <= sp - 1'b1;
      end
    end
  end
endmodule
