// pcu: program control unit (slot 7), ID stage.
//
// Decodes the control operation in the ID stage and tells the PC unit what
// to do: jumps (jmp label, jmp.a (ai)), taken conditional branches
// (beqz/bnez on an address or integer register), jsr, rts, rep #X, the three
// do forms, wait and halt. Branch conditions are evaluated here on operand
// values that the top has already bypassed, so the outcome is known at the end
// of ID (two-cycle penalty when taken; branches are predicted not taken).
// It also produces the register moves mov2d (address to integer) and mov2a
// (integer to address) as write requests, and the DMA request of trap
// (start address from ai, word count from dj, code in the target field).
// The PCU reads REG A through port rd_a (field i) and REG D through rd_d
// (field j for trap, field i otherwise); in the register files these are the
// ports it shares with MU2. Purely combinational.
//
// The control operations follow the document's instruction set; the
// register fields of trap and the port sharing with MU2 are this design's own.
module pcu
  import utdsp_pkg::*;
(
  input  logic   valid,
  input  word_t  op,
  input  data_t  a_val,        // value of REG A[rd_a]
  input  data_t  d_val,        // value of REG D[rd_d]
  output reg_t   rd_a,
  output reg_t   rd_d,
  output logic   uses_a,
  output logic   uses_d,
  output logic   jmp,          // jump or taken branch
  output logic   jsr,
  output logic   rts,
  output logic   rep,
  output logic   do_loop,
  output logic   wait_o,
  output logic   halt,
  output logic   branch,       // a conditional branch was decoded
  output pc_t    target,
  output logic [CNTW-1:0] count,
  output wreq_t  wr_a,
  output wreq_t  wr_d,
  output logic   trap,
  output logic [7:0] trap_code,
  output data_t  trap_addr,
  output data_t  trap_len,
  output logic   is_ctrl_flow  // operation redirects or holds the fetch
);
  opcode_t opc;
  assign opc  = op_code(op);
  assign rd_a = op_i(op);
  assign rd_d = (opc == OP_TRAP) ? op_j(op) : op_i(op);
  assign uses_a = valid && (opc inside {OP_MOV2D, OP_DO_A, OP_BEQZ_A, OP_BNEZ_A,
                                        OP_JMP_A, OP_TRAP});
  assign uses_d = valid && (opc inside {OP_MOV2A, OP_DO_D, OP_BEQZ_D, OP_BNEZ_D,
                                        OP_TRAP});

  always_comb begin
    jmp = 1'b0; jsr = 1'b0; rts = 1'b0; rep = 1'b0; do_loop = 1'b0;
    wait_o = 1'b0; halt = 1'b0; branch = 1'b0;
    target = op_target(op);
    count  = CNTW'(op_count(op));
    wr_a = '0; wr_d = '0;
    trap = 1'b0;
    if (valid) begin
      unique case (opc)
        OP_JMP:    jmp = 1'b1;
        OP_JMP_A:  begin jmp = 1'b1; target = a_val[PCW-1:0]; end
        OP_JSR:    jsr = 1'b1;
        OP_RTS:    rts = 1'b1;
        OP_BEQZ_A: begin branch = 1'b1; jmp = (a_val == '0); end
        OP_BNEZ_A: begin branch = 1'b1; jmp = (a_val != '0); end
        OP_BEQZ_D: begin branch = 1'b1; jmp = (d_val == '0); end
        OP_BNEZ_D: begin branch = 1'b1; jmp = (d_val != '0); end
        OP_REP:    rep = 1'b1;
        OP_DO:     do_loop = 1'b1;
        OP_DO_A:   begin do_loop = 1'b1; count = CNTW'(a_val); end
        OP_DO_D:   begin do_loop = 1'b1; count = CNTW'(d_val); end
        OP_WAIT:   wait_o = 1'b1;
        OP_HALT:   halt = 1'b1;
        OP_MOV2D:  wr_d = '{en: 1'b1, addr: op_j(op), data: a_val};
        OP_MOV2A:  wr_a = '{en: 1'b1, addr: op_j(op), data: d_val};
        OP_TRAP:   trap = 1'b1;
        default: ;
      endcase
    end
  end

  assign trap_code = op[7:0];
  assign trap_addr = a_val;
  assign trap_len  = d_val;
  assign is_ctrl_flow = valid && (opc inside {OP_JMP, OP_JMP_A, OP_JSR, OP_RTS,
      OP_BEQZ_A, OP_BNEZ_A, OP_BEQZ_D, OP_BNEZ_D, OP_REP, OP_DO, OP_DO_A,
      OP_DO_D, OP_WAIT, OP_HALT, OP_TRAP});
endmodule
