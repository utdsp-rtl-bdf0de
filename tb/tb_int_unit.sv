// tb_int_unit: self-checking test of an integer functional unit (DU1 / DU2).
//
// Random operations of the integer group with random operands, including
// edge values (0, 1, -1, 0x7FFF, 0x8000). A reference model here computes
// the result and the destination register: integer multiply keeps the low 16
// bits of the signed product; 1.15 multiply keeps product bits 30:15 (shift
// left one, take the upper half); madd/msub write dl = dk +/- product;
// madd2dN/madd2fN write AccN + product; madd2m/madd2fm add the product into
// Acc0 and copy di to dk; setacc0/1 load an accumulator. The accumulators are
// compared after every clock edge, and en=0 must freeze them.
//
// The operations follow the document's integer instructions; msub as a
// subtraction, two accumulators and 16-bit accumulators are this design's own
// reading.
`timescale 1ns/1ps
module tb_int_unit;
  import utdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, valid = 0;
  word_t op = '0;
  data_t a = '0, b = '0, c = '0, acc0, acc1;
  wreq_t wr;
  logic mac_op;
  int checks = 0, failures = 0;
  int m_acc0 = 0, m_acc1 = 0;

  int_unit dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam opcode_t OPS [30] = '{OP_ABS, OP_NOT_D, OP_MOV_D, OP_ADD, OP_AND_D,
      OP_ASL_D, OP_ASR_D, OP_IOR_D, OP_LSL_D, OP_LSR_D, OP_SUB, OP_XOR_D,
      OP_SEQ_D, OP_SNE, OP_SGT, OP_SLT, OP_MULTF, OP_MULT, OP_MOVI_D, OP_MADD,
      OP_MADDF, OP_MSUB, OP_MSUBF, OP_SETACC0, OP_SETACC1, OP_MADD2D0,
      OP_MADD2D1, OP_MADD2F0, OP_MADD2F1, OP_MADD2M};

  function automatic data_t pick();
    case ($urandom_range(0, 9))
      0: return 16'h0000;
      1: return 16'h0001;
      2: return 16'hFFFF;
      3: return 16'h7FFF;
      4: return 16'h8000;
      5: return data_t'($urandom_range(0, 20));
      default: return data_t'($urandom);
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (8000) begin
      opcode_t o;
      int i, j, k, l, sa, sb, prod, p, res, dst, exp_en, imm;
      bit frac;
      @(negedge clk);
      o = ($urandom_range(0, 9) == 0) ? OP_MADD2FM : OPS[$urandom_range(0, 29)];
      i = $urandom_range(0, 15); j = $urandom_range(0, 15);
      k = $urandom_range(0, 15); l = $urandom_range(0, 15);
      imm = $urandom_range(0, 65535);
      op = (o == OP_MOVI_D) ? mk_imm(4, o, i, imm) : mk_op(4, o, i, j, k, l);
      valid = ($urandom_range(0, 7) != 0);
      en = ($urandom_range(0, 7) != 0);
      a = pick(); b = (o inside {OP_ASL_D, OP_ASR_D, OP_LSL_D, OP_LSR_D} &&
                       $urandom_range(0, 3) != 0) ? data_t'($urandom_range(0, 18)) : pick();
      c = pick();
      sa = int'($signed(a)); sb = int'($signed(b));
      prod = sa * sb;
      frac = o inside {OP_MULTF, OP_MADDF, OP_MSUBF, OP_MADD2F0, OP_MADD2F1, OP_MADD2FM};
      p = frac ? ((prod >>> 15) & 16'hFFFF) : (prod & 16'hFFFF);
      dst = k; exp_en = 1; res = 0;
      case (o)
        OP_ABS:    res = (sa < 0) ? -sa : sa;
        OP_NOT_D:  res = ~int'(a);
        OP_MOV_D:  res = a;
        OP_ADD:    res = a + b;
        OP_SUB:    res = a - b;
        OP_AND_D:  res = a & b;
        OP_IOR_D:  res = a | b;
        OP_XOR_D:  res = a ^ b;
        OP_ASL_D, OP_LSL_D: res = (b >= 16) ? 0 : int'(a) << b;
        OP_LSR_D:  res = (b >= 16) ? 0 : int'(a) >> b;
        OP_ASR_D:  res = (b >= 16) ? (sa < 0 ? -1 : 0) : sa >>> b;
        OP_SEQ_D:  res = (a == b);
        OP_SNE:    res = (a != b);
        OP_SGT:    res = (sa > sb);
        OP_SLT:    res = (sa < sb);
        OP_MULT, OP_MULTF: res = p;
        OP_MOVI_D: begin res = imm; dst = i; end
        OP_MADD, OP_MADDF: begin res = c + p; dst = l; end
        OP_MSUB, OP_MSUBF: begin res = c - p; dst = l; end
        OP_MADD2D0, OP_MADD2F0: res = m_acc0 + p;
        OP_MADD2D1, OP_MADD2F1: res = m_acc1 + p;
        OP_MADD2M, OP_MADD2FM:  res = a;
        default: exp_en = 0;          // setacc0/1
      endcase
      #1;
      check($sformatf("%s write enable", o.name()), wr.en, valid && exp_en);
      if (valid && exp_en) begin
        check($sformatf("%s destination", o.name()), wr.addr, dst);
        check($sformatf("%s result a=%0h b=%0h c=%0h", o.name(), a, b, c), wr.data, res & 16'hFFFF);
      end
      check("mac flag", mac_op, valid && (o inside {OP_MADD, OP_MADDF, OP_MSUB, OP_MSUBF,
            OP_MADD2D0, OP_MADD2D1, OP_MADD2F0, OP_MADD2F1, OP_MADD2M, OP_MADD2FM}));
      if (valid && en) begin
        if (o == OP_SETACC0) m_acc0 = a;
        if (o == OP_SETACC1) m_acc1 = a;
        if (o inside {OP_MADD2M, OP_MADD2FM}) m_acc0 = (m_acc0 + p) & 16'hFFFF;
      end
      @(posedge clk); #1;
      check("acc0", acc0, m_acc0);
      check("acc1", acc1, m_acc1);
    end
    // 1.15 spot values: 0.5 * 0.5 = 0.25, -1 * -1 saturates to 0x8000 (wraps)
    @(negedge clk);
    valid = 1; en = 1; op = mk_op(4, OP_MULTF, 1, 2, 3);
    a = 16'h4000; b = 16'h4000; #1;
    check("0.5*0.5", wr.data, 16'h2000);
    a = 16'hC000; b = 16'h4000; #1;
    check("-0.5*0.5", wr.data, 16'hE000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
