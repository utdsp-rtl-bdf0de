// int_unit: integer functional unit (DU1 or DU2), EX stage.
//
// A 16-bit ALU with a 16 x 16 multiplier, a shifter and an adder/subtractor,
// plus two accumulators Acc0 and Acc1. Operands a, b, c are the values of
// registers di, dj, dk (already bypassed). The result leaves as a write
// request (dk for two/three-operand forms, dl for madd/msub forms, the
// register in field i for movi.d); the top registers it into EX/WB.
//
// Multiplies come in two formats. Integer: the low 16 bits of the signed
// 32-bit product. 1.15 fixed point: the product is shifted left one bit (a 0
// enters at the LSB) and its upper 16 bits are kept, which is product[30:15].
// madd2m/madd2fm accumulate di*dj into Acc0 and copy di to dk in the same
// operation, which lets a block FIR keep one long instruction per tap.
// setacc0/1 load an accumulator; madd2dN/madd2fN write AccN + di*dj to dk and
// leave AccN unchanged. Accumulators are 16 bits, update on the clock edge when
// en=1 and reset to 0. Comparisons and abs treat values as signed. Shift
// amounts of 16 or more give 0 (sign for asr).
// The operations and the product formats follow the document; two accumulators
// per unit, their width, and msub as subtraction are this design's reading.
module int_unit
  import utdsp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   valid,
  input  word_t  op,
  input  data_t  a,
  input  data_t  b,
  input  data_t  c,
  output wreq_t  wr,
  output data_t  acc0,
  output data_t  acc1,
  output logic   mac_op            // a multiply-accumulate executed
);
  opcode_t opc;
  logic signed [2*DW-1:0] prod;
  data_t p_int, p_frac, p, res;
  logic  frac;

  assign opc    = op_code(op);
  assign prod   = $signed(a) * $signed(b);
  assign p_int  = prod[DW-1:0];
  assign p_frac = prod[2*DW-2:DW-1];
  assign frac   = opc inside {OP_MULTF, OP_MADDF, OP_MSUBF, OP_MADD2F0,
                              OP_MADD2F1, OP_MADD2FM};
  assign p      = frac ? p_frac : p_int;

  always_comb begin
    res = '0;
    unique case (opc)
      OP_ABS:    res = a[DW-1] ? -a : a;
      OP_NOT_D:  res = ~a;
      OP_MOV_D:  res = a;
      OP_ADD:    res = a + b;
      OP_SUB:    res = a - b;
      OP_AND_D:  res = a & b;
      OP_IOR_D:  res = a | b;
      OP_XOR_D:  res = a ^ b;
      OP_ASL_D,
      OP_LSL_D:  res = (b >= data_t'(DW)) ? '0 : a << b[3:0];
      OP_LSR_D:  res = (b >= data_t'(DW)) ? '0 : a >> b[3:0];
      OP_ASR_D:  res = (b >= data_t'(DW)) ? {DW{a[DW-1]}} : data_t'($signed(a) >>> b[3:0]);
      OP_SEQ_D:  res = data_t'(a == b);
      OP_SNE:    res = data_t'(a != b);
      OP_SGT:    res = data_t'($signed(a) > $signed(b));
      OP_SLT:    res = data_t'($signed(a) < $signed(b));
      OP_MULT,
      OP_MULTF:  res = p;
      OP_MOVI_D: res = op_imm(op);
      OP_MADD,
      OP_MADDF:  res = c + p;
      OP_MSUB,
      OP_MSUBF:  res = c - p;
      OP_MADD2D0, OP_MADD2F0: res = acc0 + p;
      OP_MADD2D1, OP_MADD2F1: res = acc1 + p;
      OP_MADD2M, OP_MADD2FM:  res = a;
      default:   res = '0;
    endcase
  end

  always_comb begin
    wr = '0;
    if (valid) begin
      unique case (opc)
        OP_ABS, OP_NOT_D, OP_MOV_D, OP_ADD, OP_SUB, OP_AND_D, OP_IOR_D,
        OP_XOR_D, OP_ASL_D, OP_LSL_D, OP_LSR_D, OP_ASR_D, OP_SEQ_D, OP_SNE,
        OP_SGT, OP_SLT, OP_MULT, OP_MULTF, OP_MADD2D0, OP_MADD2F0,
        OP_MADD2D1, OP_MADD2F1, OP_MADD2M, OP_MADD2FM:
          wr = '{en: 1'b1, addr: op_k(op), data: res};
        OP_MADD, OP_MADDF, OP_MSUB, OP_MSUBF:
          wr = '{en: 1'b1, addr: op_l(op), data: res};
        OP_MOVI_D:
          wr = '{en: 1'b1, addr: op_i(op), data: res};
        default: wr = '0;
      endcase
    end
  end

  assign mac_op = valid && (opc inside {OP_MADD, OP_MADDF, OP_MSUB, OP_MSUBF,
                  OP_MADD2D0, OP_MADD2D1, OP_MADD2F0, OP_MADD2F1,
                  OP_MADD2M, OP_MADD2FM});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc0 <= '0;
      acc1 <= '0;
    end else if (en && valid) begin
      unique case (opc)
        OP_SETACC0: acc0 <= a;
        OP_SETACC1: acc1 <= a;
        OP_MADD2M, OP_MADD2FM: acc0 <= acc0 + p;
        default: ;
      endcase
    end
  end
endmodule
