// modulo_agen: modulo (circular-buffer) address generator of an address unit.
//
// Uses explicit start and end registers, so a buffer may have any size and
// any placement. For an increment the sum a+b wraps back by the buffer size
// (end-start+1) when it passes end; for a decrement the difference a-b wraps
// forward when it falls below start. The step b must not exceed the buffer
// size. Purely combinational; it sits in the EX stage of the address unit.
// The start/end scheme follows the document; the wrap arithmetic is this
// design's own.
module modulo_agen #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         dec,
  input  logic [W-1:0] start_addr,
  input  logic [W-1:0] end_addr,
  output logic [W-1:0] y
);
  logic [W:0] size, sum, diff;

  always_comb begin
    size = {1'b0, end_addr} - {1'b0, start_addr} + 1'b1;
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    if (!dec) begin
      y = (sum > {1'b0, end_addr}) ? W'(sum - size) : sum[W-1:0];
    end else begin
      // diff[W] set means a-b went below zero, which is below start too
      y = (diff[W] || diff[W-1:0] < start_addr) ? W'(diff + size) : diff[W-1:0];
    end
  end
endmodule
