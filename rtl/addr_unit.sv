// addr_unit: address functional unit (AU1 or AU2), EX stage.
//
// Executes the addressing operations on 16-bit address-register values a (ai)
// and b (aj): add/subtract, modulo add/subtract through its modulo address
// generator, bit-reversed add/subtract, AND/OR/XOR/NOT, shifts, set-equal,
// move and move-immediate. The result goes out as a write request for ak
// (movi.a writes the register in field i). The operation and its operands are
// presented for one cycle; the write request is combinational and the top
// registers it into EX/WB.
//
// Circular buffers: buffer 1 belongs to AU1 and buffer 2 to AU2; incmod and
// decmod use the unit's own buffer. set1/set2 may be issued on either unit:
// the unit that executes it announces it on bufset_o and the owner (UNIT)
// loads its start and end registers on the clock edge when en=1. Bit-reversed
// arithmetic adds with the carry running from the MSB down (reverse, add,
// reverse) over the full 16 bits. Shift amounts of 16 or more give 0 (or the
// sign for asr). Buffer registers reset to start=0, end=0xFFFF.
// The operation list follows the document; the buffer ownership, bit-reversal
// width and shift rules are this design's reading.
module addr_unit
  import utdsp_pkg::*;
#(
  parameter int UNIT = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   valid,
  input  word_t  op,
  input  data_t  a,
  input  data_t  b,
  output wreq_t  wr,
  output logic   bufset_valid_o,
  output logic   bufset_which_o,   // 0: buffer 1, 1: buffer 2
  output data_t  bufset_start_o,
  output data_t  bufset_end_o,
  input  logic   bufset_valid_i,
  input  logic   bufset_which_i,
  input  data_t  bufset_start_i,
  input  data_t  bufset_end_i,
  output data_t  buf_start,
  output data_t  buf_end,
  output logic   wrapped           // a modulo operation wrapped around
);
  opcode_t opc;
  data_t   mod_y, res;
  logic    mod_dec;
  logic    own;

  function automatic data_t rev16(data_t x);
    data_t r;
    for (int i = 0; i < DW; i++) r[i] = x[DW-1-i];
    return r;
  endfunction

  assign opc     = op_code(op);
  assign mod_dec = (opc == OP_DECMOD);

  modulo_agen #(.W(DW)) u_mod (
    .a(a), .b(b), .dec(mod_dec),
    .start_addr(buf_start), .end_addr(buf_end), .y(mod_y)
  );

  always_comb begin
    res = '0;
    unique case (opc)
      OP_DEC:    res = a - b;
      OP_INC:    res = a + b;
      OP_DECMOD,
      OP_INCMOD: res = mod_y;
      OP_INCFFT: res = rev16(rev16(a) + rev16(b));
      OP_DECFFT: res = rev16(rev16(a) - rev16(b));
      OP_AND_A:  res = a & b;
      OP_IOR_A:  res = a | b;
      OP_XOR_A:  res = a ^ b;
      OP_ASL_A,
      OP_LSL_A:  res = (b >= data_t'(DW)) ? '0 : a << b[3:0];
      OP_LSR_A:  res = (b >= data_t'(DW)) ? '0 : a >> b[3:0];
      OP_ASR_A:  res = (b >= data_t'(DW)) ? {DW{a[DW-1]}} : data_t'($signed(a) >>> b[3:0]);
      OP_SEQ_A:  res = data_t'(a == b);
      OP_NOT_A:  res = ~a;
      OP_MOV_A:  res = a;
      OP_MOVI_A: res = op_imm(op);
      default:   res = '0;
    endcase
  end

  always_comb begin
    wr = '0;
    if (valid) begin
      unique case (opc)
        OP_DEC, OP_INC, OP_DECMOD, OP_INCMOD, OP_INCFFT, OP_DECFFT,
        OP_AND_A, OP_IOR_A, OP_XOR_A, OP_ASL_A, OP_LSL_A, OP_LSR_A,
        OP_ASR_A, OP_SEQ_A: wr = '{en: 1'b1, addr: op_k(op), data: res};
        OP_NOT_A, OP_MOV_A: wr = '{en: 1'b1, addr: op_k(op), data: res};
        OP_MOVI_A:          wr = '{en: 1'b1, addr: op_i(op), data: res};
        default:            wr = '0;
      endcase
    end
  end

  assign wrapped = valid && (opc == OP_INCMOD || opc == OP_DECMOD) &&
                   (mod_y != (mod_dec ? a - b : a + b));

  assign bufset_valid_o = valid && (opc == OP_SET1 || opc == OP_SET2);
  assign bufset_which_o = (opc == OP_SET2);
  assign bufset_start_o = a;
  assign bufset_end_o   = b;

  assign own = (UNIT == 2);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_start <= '0;
      buf_end   <= '1;
    end else if (en) begin
      if (bufset_valid_o && bufset_which_o == own) begin
        buf_start <= bufset_start_o;
        buf_end   <= bufset_end_o;
      end else if (bufset_valid_i && bufset_which_i == own) begin
        buf_start <= bufset_start_i;
        buf_end   <= bufset_end_i;
      end
    end
  end
endmodule
