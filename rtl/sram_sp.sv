// sram_sp: single-ported synchronous-write SRAM macro model (DEPTH x WIDTH).
//
// Stands for the single-ported SRAM macros the chip uses: a 256 x 32 macro for
// the instruction memory and for each decoder-memory bank, and 256 x 8 macros
// for the data-memory byte lanes. One address serves both the read and the
// write. A write with we=1 takes effect at the rising clock edge. The read is
// asynchronous: rdata follows addr within the same cycle, so that the pipeline
// register after the memory captures it (the memory access fits inside a pipeline
// stage, as in the document's timing). Contents are not reset; they are
// loaded through the write port before use.
module sram_sp #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 32,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
