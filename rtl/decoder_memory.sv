// decoder_memory: second-level instruction store and operation dispatch (IF2).
//
// Holds the decoder memory: seven banks B1..B7, one per execution unit, each
// a 256 x 32 single-ported SRAM. Banks B1-B4 (MU1, MU2, AU1, AU2) form
// cluster A and B5-B7 (DU1, DU2, PCU) cluster B. The word fetched from the
// instruction memory in IF1 arrives as ir. If its MSB is 0 it is a uni-op:
// the operation goes straight to the slot named in its bits 30:28 and all
// other slots get a NOP. If its MSB is 1 it is a multi-op pointer: cluster A
// banks are read at address bits 26:15 and cluster B banks at bits 11:0, and
// bank Bn's word is issued to its unit only if Bn's mask bit is set (bits
// 30:27 for B1..B4, bits 14:12 for B5..B7); masked banks issue a NOP. The
// masks let several long instructions share one stored word.
// Output is combinational; the top registers ops into IF2/ID.
// A load port writes bank ld_bank (0 = B1) at ld_addr; while it is used the
// bank's single port serves the write. Pointer address bits above the bank
// size must be zero.
//
// From the document: seven banks in two clusters, the pointer with two
// addresses and two masks, one 256 x 32 macro per bank. This design's own: the
// mask bit order (B1/B5 as MSB), ignoring the slot field of stored words, and
// the load port.
module decoder_memory
  import utdsp_pkg::*;
#(
  parameter int BANK_DEPTH = 256,
  localparam int BAW = $clog2(BANK_DEPTH)
) (
  input  logic           clk,
  input  logic           ld_we,
  input  logic [2:0]     ld_bank,
  input  logic [BAW-1:0] ld_addr,
  input  word_t          ld_data,
  input  logic           ir_valid,
  input  word_t          ir,
  output word_t          ops [NSLOT],
  output logic [NSLOT-1:0] slot_valid,
  output logic           is_multi
);
  logic [11:0] addr_a, addr_b;
  logic [NSLOT-1:0] mask;
  word_t bank_q [NSLOT];

  assign is_multi = ir[31];
  assign addr_a = ir[26:15];
  assign addr_b = ir[11:0];
  assign mask   = {ir[12], ir[13], ir[14], ir[27], ir[28], ir[29], ir[30]};

  for (genvar s = 0; s < NSLOT; s++) begin : g_bank
    logic           we;
    logic [BAW-1:0] addr;
    assign we   = ld_we && (ld_bank == 3'(s));
    assign addr = we ? ld_addr : (s < 4 ? addr_a[BAW-1:0] : addr_b[BAW-1:0]);
    sram_sp #(.DEPTH(BANK_DEPTH), .WIDTH(32)) u_bank (
      .clk(clk), .we(we), .addr(addr), .wdata(ld_data), .rdata(bank_q[s])
    );
  end

  always_comb begin
    for (int s = 0; s < NSLOT; s++) begin
      if (!ir_valid) begin
        slot_valid[s] = 1'b0;
        ops[s]        = '0;
      end else if (is_multi) begin
        slot_valid[s] = mask[s] && op_code(bank_q[s]) != OP_NOP;
        ops[s]        = mask[s] ? bank_q[s] : '0;
      end else begin
        slot_valid[s] = (ir[30:28] == 3'(s)) && op_code(ir) != OP_NOP;
        ops[s]        = (ir[30:28] == 3'(s)) ? ir : '0;
      end
    end
  end
endmodule
