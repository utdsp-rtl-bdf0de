// data_mem: one data-memory bank (DataMem X or Y) of 1 Kbyte.
//
// Built as in the chip from four 256 x 8 single-ported SRAM macros (byte lanes
// 0..3). The bank holds 512 16-bit words. Word address bit 0 picks the lane
// pair (lanes 1:0 for even words, lanes 3:2 for odd words) and bits 8:1 pick
// the row, so every macro row is used. Read is combinational on the address
// (issued at the start of EX, data captured at the end of EX); a write happens
// on the clock edge when we=1. The four-macro build follows the document;
// the lane-to-address mapping is this design's own.
module data_mem #(
  parameter int WORDS = 512,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata
);
  localparam int ROWS = WORDS / 2;
  logic [7:0] lane_q [4];
  logic [AW-2:0] row;
  logic          odd;

  assign row = addr[AW-1:1];
  assign odd = addr[0];

  for (genvar g = 0; g < 4; g++) begin : g_lane
    logic lane_we;
    assign lane_we = we && (odd == g[1]);
    sram_sp #(.DEPTH(ROWS), .WIDTH(8)) u_macro (
      .clk  (clk),
      .we   (lane_we),
      .addr (row),
      .wdata(g[0] ? wdata[15:8] : wdata[7:0]),
      .rdata(lane_q[g])
    );
  end

  assign rdata = odd ? {lane_q[3], lane_q[2]} : {lane_q[1], lane_q[0]};
endmodule
