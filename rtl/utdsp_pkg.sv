// utdsp_pkg: sizes, operation encoding and shared types of the UTDSP VLIW DSP.
//
// The machine issues up to seven operations per cycle, one per execution unit:
// MU1, MU2 (memory), AU1, AU2 (address), DU1, DU2 (integer) and PCU (control).
// Decoder-memory bank Bn feeds slot n-1 of that list; banks B1-B4 form
// cluster A and B5-B7 cluster B.
//
// Instruction-memory words are 32 bits. Bit 31 tells them apart:
//   0: uni-op      [30:28] slot, [27:21] opcode, operand fields below
//   1: multi-op    [30:27] mask B1..B4 (bit 30 = B1), [26:15] cluster-A address,
//      pointer     [14:12] mask B5..B7 (bit 14 = B5), [11:0]  cluster-B address
// The pointer layout (flag, 4-bit mask, 12-bit address, 3-bit mask, 12-bit
// address) follows the document; the order of fields inside a uni-op, the
// opcode numbers and the register fields are this design's own choice.
// Operations stored in decoder-memory banks use the uni-op layout; their slot
// field is ignored because the bank decides the unit.
//
// Operand fields of an operation:
//   [20:17] i   first source (ai/di), or the destination of movi
//   [16:13] j   second source (aj/dj)
//   [12:9]  k   destination of three-operand forms, third source of madd/msub
//   [8:5]   l   destination of madd/maddf/msub/msubf
//   [15:0]  immediate of movi.a / movi.d
//   [20:8]  repeat count of rep #X and do #X
//   [7:0]   target address of jumps, branches, jsr, do (loop end) and trap code
package utdsp_pkg;

  parameter int DW      = 16;   // datapath width (16-bit fixed point)
  parameter int NREG    = 16;   // registers in REG A and in REG D
  parameter int RAW     = 4;    // register address width
  parameter int PCW     = 8;    // instruction address width (256-word instruction memory)
  parameter int NSLOT   = 7;    // operations per long instruction
  parameter int CNTW    = 16;   // loop count width
  parameter int DO_DEPTH  = 5;  // nesting depth of DO loops
  parameter int JSR_DEPTH = 8;  // subroutine / interrupt return stack depth
  parameter int NIRQ    = 3;    // user-defined interrupt vectors

  // Slot numbers (decoder-memory bank n drives slot n-1).
  parameter int SL_MU1 = 0;
  parameter int SL_MU2 = 1;
  parameter int SL_AU1 = 2;
  parameter int SL_AU2 = 3;
  parameter int SL_DU1 = 4;
  parameter int SL_DU2 = 5;
  parameter int SL_PCU = 6;

  // Interrupt vector k starts at INT_VEC_BASE + k*INT_VEC_STRIDE; each vector
  // has room for ten long instructions (fast interrupt service).
  parameter logic [PCW-1:0] INT_VEC_BASE   = 8'hC0;
  parameter int             INT_VEC_STRIDE = 16;

  typedef logic [31:0]   word_t;
  typedef logic [DW-1:0] data_t;
  typedef logic [RAW-1:0] reg_t;
  typedef logic [PCW-1:0] pc_t;

  typedef enum logic [6:0] {
    OP_NOP      = 7'd0,
    // memory (MU1, MU2)
    OP_LD       = 7'd1,   // ld.d (ai), dj : dj = M[ai]
    OP_ST       = 7'd2,   // st.d (ai), dj : M[ai] = dj
    // address (AU1, AU2)
    OP_DEC      = 7'd8,
    OP_DECMOD   = 7'd9,
    OP_DECFFT   = 7'd10,
    OP_INC      = 7'd11,
    OP_INCMOD   = 7'd12,
    OP_INCFFT   = 7'd13,
    OP_AND_A    = 7'd14,
    OP_ASL_A    = 7'd15,
    OP_ASR_A    = 7'd16,
    OP_IOR_A    = 7'd17,
    OP_LSL_A    = 7'd18,
    OP_LSR_A    = 7'd19,
    OP_XOR_A    = 7'd20,
    OP_SEQ_A    = 7'd21,
    OP_NOT_A    = 7'd22,
    OP_MOV_A    = 7'd23,
    OP_SET1     = 7'd24,
    OP_SET2     = 7'd25,
    OP_MOVI_A   = 7'd26,
    // integer (DU1, DU2)
    OP_ABS      = 7'd32,
    OP_NOT_D    = 7'd33,
    OP_MOV_D    = 7'd34,
    OP_ADD      = 7'd35,
    OP_AND_D    = 7'd36,
    OP_ASL_D    = 7'd37,
    OP_ASR_D    = 7'd38,
    OP_IOR_D    = 7'd39,
    OP_LSL_D    = 7'd40,
    OP_LSR_D    = 7'd41,
    OP_SUB      = 7'd42,
    OP_XOR_D    = 7'd43,
    OP_SEQ_D    = 7'd44,
    OP_SNE      = 7'd45,
    OP_SGT      = 7'd46,
    OP_SLT      = 7'd47,
    OP_MULTF    = 7'd48,
    OP_MULT     = 7'd49,
    OP_MOVI_D   = 7'd50,
    OP_MADD     = 7'd51,
    OP_MADDF    = 7'd52,
    OP_MSUB     = 7'd53,
    OP_MSUBF    = 7'd54,
    OP_SETACC0  = 7'd55,
    OP_SETACC1  = 7'd56,
    OP_MADD2D0  = 7'd57,
    OP_MADD2D1  = 7'd58,
    OP_MADD2F0  = 7'd59,
    OP_MADD2F1  = 7'd60,
    OP_MADD2M   = 7'd61,
    OP_MADD2FM  = 7'd62,
    // control (PCU)
    OP_MOV2D    = 7'd64,
    OP_MOV2A    = 7'd65,
    OP_REP      = 7'd66,
    OP_DO       = 7'd67,
    OP_DO_A     = 7'd68,
    OP_DO_D     = 7'd69,
    OP_BEQZ_A   = 7'd70,
    OP_BEQZ_D   = 7'd71,
    OP_BNEZ_A   = 7'd72,
    OP_BNEZ_D   = 7'd73,
    OP_JMP_A    = 7'd74,
    OP_JMP      = 7'd75,
    OP_JSR      = 7'd76,
    OP_RTS      = 7'd77,
    OP_TRAP     = 7'd78,
    OP_WAIT     = 7'd79,
    OP_HALT     = 7'd80
  } opcode_t;

  // Trap codes (DMA): 6/60 read from IO into bank X/Y, 5/50 write bank X/Y to IO.
  parameter logic [7:0] TRAP_RD_X = 8'd6;
  parameter logic [7:0] TRAP_RD_Y = 8'd60;
  parameter logic [7:0] TRAP_WR_X = 8'd5;
  parameter logic [7:0] TRAP_WR_Y = 8'd50;

  // A register-file write request (one write port).
  typedef struct packed {
    logic  en;
    reg_t  addr;
    data_t data;
  } wreq_t;

  function automatic opcode_t op_code(word_t w);
    return opcode_t'(w[27:21]);
  endfunction
  function automatic reg_t op_i(word_t w); return w[20:17]; endfunction
  function automatic reg_t op_j(word_t w); return w[16:13]; endfunction
  function automatic reg_t op_k(word_t w); return w[12:9];  endfunction
  function automatic reg_t op_l(word_t w); return w[8:5];   endfunction
  function automatic data_t op_imm(word_t w); return w[15:0]; endfunction
  function automatic logic [12:0] op_count(word_t w); return w[20:8]; endfunction
  function automatic pc_t op_target(word_t w); return w[7:0]; endfunction

  // Assemble an operation word (used by testbenches and program loaders).
  function automatic word_t mk_op(int slot, opcode_t opc, int i = 0, int j = 0,
                                  int k = 0, int l = 0);
    word_t w;
    w = '0;
    w[30:28] = 3'(slot);
    w[27:21] = opc;
    w[20:17] = 4'(i);
    w[16:13] = 4'(j);
    w[12:9]  = 4'(k);
    w[8:5]   = 4'(l);
    return w;
  endfunction
  function automatic word_t mk_imm(int slot, opcode_t opc, int dst, int imm);
    word_t w;
    w = '0;
    w[30:28] = 3'(slot);
    w[27:21] = opc;
    w[20:17] = 4'(dst);
    w[15:0]  = 16'(imm);
    return w;
  endfunction
  function automatic word_t mk_ctl(opcode_t opc, int i = 0, int count = 0,
                                   int target = 0, int j = 0);
    word_t w;
    w = '0;
    w[30:28] = 3'(SL_PCU);
    w[27:21] = opc;
    w[20:8]  = 13'(count);
    if (opc inside {OP_DO_A, OP_DO_D, OP_BEQZ_A, OP_BEQZ_D, OP_BNEZ_A,
                    OP_BNEZ_D, OP_JMP_A, OP_MOV2D, OP_MOV2A, OP_TRAP})
      w[20:17] = 4'(i);
    if (opc inside {OP_MOV2D, OP_MOV2A, OP_TRAP})
      w[16:13] = 4'(j);
    w[7:0]   = 8'(target);
    return w;
  endfunction
  // Multi-op pointer: masks are given B1..B4 and B5..B7 with B1/B5 as the MSB.
  function automatic word_t mk_ptr(logic [3:0] mask_a, int addr_a,
                                   logic [2:0] mask_b, int addr_b);
    return {1'b1, mask_a, 12'(addr_a), mask_b, 12'(addr_b)};
  endfunction

endpackage
