// regfile: multi-ported register file (REG A or REG D).
//
// NREGS registers of W bits with NR read ports and NW write ports. The chip
// synthesised its register files from flip-flops; this model does the same.
// REG A has 6 read and 4 write ports, REG D 8 read and 4 write ports (set by
// the instance). Writes happen on the rising clock edge; if two ports write the
// same register in one cycle the higher-numbered port wins (the compiler is
// expected never to do this). Reads are combinational and write-through: a read
// of a register that is being written in the same cycle returns the new value,
// which covers the WB-to-ID distance of the bypass network. All registers
// reset to zero. Port counts follow the document; write-through and reset are
// this design's choices.
module regfile
  import utdsp_pkg::*;
#(
  parameter int NR    = 6,
  parameter int NW    = 4,
  parameter int NREGS = 16,
  parameter int W     = 16,
  localparam int AW = $clog2(NREGS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][W-1:0]  rdata,
  input  logic [NW-1:0]         we,
  input  logic [NW-1:0][AW-1:0] waddr,
  input  logic [NW-1:0][W-1:0]  wdata
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int q = 0; q < NR; q++) begin
      rdata[q] = regs[raddr[q]];
      for (int p = 0; p < NW; p++)
        if (we[p] && waddr[p] == raddr[q]) rdata[q] = wdata[p];
    end
  end
endmodule
