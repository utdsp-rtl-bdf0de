// tb_addr_unit: self-checking test of the two address functional units.
//
// AU1 (UNIT=1) and AU2 (UNIT=2) are wired to each other's buffer-set ports as
// in the core. Random operations with random operands run on both units.
// A reference model computes each result: add/subtract, logic, shifts,
// set-equal, move and move-immediate, bit-reversed add/subtract (reverse the
// bits, add, reverse back), and modulo add/subtract inside the unit's own
// circular buffer. set1/set2, issued on either unit, must load buffer 1 in AU1
// or buffer 2 in AU2 at the clock edge; the buffers are checked every cycle.
//
// The reference follows the document's addressing instructions; the
// bit-reverse width (16 bits) and the buffer ownership are this design's own.
`timescale 1ns/1ps
module tb_addr_unit;
  import utdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1;
  logic valid [2];
  word_t op [2];
  data_t a [2], b [2];
  wreq_t wr [2];
  logic bs_v [2], bs_w [2], wrapped [2];
  data_t bs_s [2], bs_e [2], bst [2], ben [2];
  int checks = 0, failures = 0;
  int m_start [2] = '{0, 0}, m_end [2] = '{65535, 65535};

  for (genvar u = 0; u < 2; u++) begin : g
    addr_unit #(.UNIT(u + 1)) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .valid(valid[u]), .op(op[u]),
      .a(a[u]), .b(b[u]), .wr(wr[u]),
      .bufset_valid_o(bs_v[u]), .bufset_which_o(bs_w[u]),
      .bufset_start_o(bs_s[u]), .bufset_end_o(bs_e[u]),
      .bufset_valid_i(bs_v[1-u]), .bufset_which_i(bs_w[1-u]),
      .bufset_start_i(bs_s[1-u]), .bufset_end_i(bs_e[1-u]),
      .buf_start(bst[u]), .buf_end(ben[u]), .wrapped(wrapped[u])
    );
  end

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

  function automatic int rev(int x);
    int r = 0;
    for (int i = 0; i < 16; i++) if (x[i]) r[15 - i] = 1;
    return r;
  endfunction

  localparam opcode_t OPS [19] = '{OP_DEC, OP_DECMOD, OP_DECFFT, OP_INC, OP_INCMOD,
      OP_INCFFT, OP_AND_A, OP_ASL_A, OP_ASR_A, OP_IOR_A, OP_LSL_A, OP_LSR_A,
      OP_XOR_A, OP_SEQ_A, OP_NOT_A, OP_MOV_A, OP_SET1, OP_SET2, OP_MOVI_A};

  int n_wrap = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (6000) begin
      int ns [2], ne [2];
      ns = m_start; ne = m_end;
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      for (int u = 0; u < 2; u++) begin
        opcode_t o;
        int i, j, k, imm, ua, ub, res, dst, exp_en, size;
        o = OPS[$urandom_range(0, 18)];
        if ($urandom_range(0, 2) == 0) o = (u == 0) ? OP_INCMOD : OP_DECMOD;
        // only one set per cycle
        if (u == 1 && op[0][27:21] inside {OP_SET1, OP_SET2} && o inside {OP_SET1, OP_SET2})
          o = OP_INC;
        i = $urandom_range(0, 15); j = $urandom_range(0, 15); k = $urandom_range(0, 15);
        imm = $urandom_range(0, 65535);
        op[u] = (o == OP_MOVI_A) ? mk_imm(2 + u, o, i, imm) : mk_op(2 + u, o, i, j, k);
        valid[u] = ($urandom_range(0, 7) != 0);
        size = m_end[u] - m_start[u] + 1;
        if (o inside {OP_INCMOD, OP_DECMOD}) begin
          ua = m_start[u] + $urandom_range(0, size - 1);
          ub = $urandom_range(0, size < 64 ? size : 64);
        end else if (o inside {OP_SET1, OP_SET2}) begin
          ua = $urandom_range(0, 60000);
          ub = ua + (($urandom_range(0, 1) == 1) ? $urandom_range(0, 7) : $urandom_range(0, 3000));
        end else if (o inside {OP_ASL_A, OP_ASR_A, OP_LSL_A, OP_LSR_A}) begin
          ua = $urandom_range(0, 65535); ub = $urandom_range(0, 18);
        end else begin
          ua = $urandom_range(0, 65535); ub = $urandom_range(0, 65535);
        end
        a[u] = data_t'(ua); b[u] = data_t'(ub);
        dst = k; exp_en = 1; res = 0;
        case (o)
          OP_DEC:    res = ua - ub;
          OP_INC:    res = ua + ub;
          OP_INCMOD: res = m_start[u] + (ua - m_start[u] + ub) % size;
          OP_DECMOD: res = m_start[u] + ((ua - m_start[u] - ub) % size + size) % size;
          OP_INCFFT: res = rev(rev(ua) + rev(ub));
          OP_DECFFT: res = rev(rev(ua) - rev(ub));
          OP_AND_A:  res = ua & ub;
          OP_IOR_A:  res = ua | ub;
          OP_XOR_A:  res = ua ^ ub;
          OP_ASL_A, OP_LSL_A: res = (ub >= 16) ? 0 : ua << ub;
          OP_LSR_A:  res = (ub >= 16) ? 0 : ua >> ub;
          OP_ASR_A:  res = (ub >= 16) ? (ua[15] ? -1 : 0) : int'($signed(16'(ua))) >>> ub;
          OP_SEQ_A:  res = (ua == ub);
          OP_NOT_A:  res = ~ua;
          OP_MOV_A:  res = ua;
          OP_MOVI_A: begin res = imm; dst = i; end
          default:   exp_en = 0;
        endcase
        if (valid[u] && en && o inside {OP_SET1, OP_SET2}) begin
          ns[o == OP_SET2] = ua; ne[o == OP_SET2] = ub;
        end
        #1;
        check($sformatf("AU%0d %s write enable", u + 1, o.name()), wr[u].en, valid[u] && exp_en);
        if (valid[u] && exp_en) begin
          check($sformatf("AU%0d %s destination", u + 1, o.name()), wr[u].addr, dst);
          check($sformatf("AU%0d %s a=%0h b=%0h", u + 1, o.name(), ua, ub), wr[u].data, res & 16'hFFFF);
        end
        if (wrapped[u]) n_wrap++;
      end
      @(posedge clk); #1;
      m_start = ns; m_end = ne;
      for (int u = 0; u < 2; u++) begin
        check($sformatf("AU%0d buffer start", u + 1), bst[u], m_start[u]);
        check($sformatf("AU%0d buffer end", u + 1), ben[u], m_end[u]);
      end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL no modulo wrap seen"); end
    $display("modulo wraps: %0d", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
