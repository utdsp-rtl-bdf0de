// tb_utdsp: end-to-end test of the UTDSP core at its full size.
//
// Four programs are loaded through the instruction- and decoder-memory load
// ports, run until halt, and checked through the data-bank host port and the
// register files:
//   1  uni-ops and multi-op pointers (one decoder word shared by two pointers
//      with different masks, a seven-operation long instruction), EX/WB
//      bypassing of ALU and load results, both data banks, circular-buffer
//      wrap-around (set1 issued on the other address unit) and bit-reversed
//      addressing, integer and 1.15 multiplication.
//   2  jsr/rts, taken and untaken branches, nested DO loops, rep #5/#0/#1.
//   3  a block FIR kernel: an outer DO loop around rep N of one long
//      instruction holding two loads, two address increments and two madd2m.
//   4  DMA traps into bank X and out of bank Y (the pipeline stalls), wait
//      woken by an interrupt whose vector calls a subroutine, and a fast
//      interrupt taken inside a DO loop.
// Expected values are worked out here from the programs. Cycle counts are
// checked from the EX-stage trace (the PC of each long instruction in EX):
// two lost cycles for a taken branch, jump, jsr and rts; none for a DO loop
// iteration or for entering an interrupt; rep N runs its instruction N times
// in N+1 cycles. Each mechanism is counted and one that never happens is a
// failure. No parameters are overridden.
//
// The cycle costs checked (two-cycle branch penalty, zero-overhead loops,
// free interrupt entry) follow the document; the test programs, the encoding
// they use and the rep and DMA timing are this design's own.
`timescale 1ns/1ps
module tb_utdsp;
  import utdsp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic im_we = 0, dec_we = 0, host_en = 0, host_sel_y = 0, host_we = 0;
  pc_t  im_addr = '0;
  word_t im_wdata = '0, dec_wdata = '0;
  logic [2:0] dec_bank = '0;
  logic [7:0] dec_addr = '0;
  logic [8:0] host_addr = '0;
  data_t host_wdata = '0, host_rdata;
  logic [NIRQ-1:0] irq = '0;
  logic io_in_valid = 0, io_in_ready, io_out_valid, io_out_ready = 0;
  data_t io_in_data = '0, io_out_data;
  pc_t pc;
  logic idle, halted;

  utdsp dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- EX-stage trace and mechanism counters ----------------
  int ex_t [256][$];
  int n_bypass, n_stall, n_loop, n_rep, n_int, n_ret, n_dma, n_multi, n_uni,
      n_squash, n_jsr, n_rts, n_wrap, n_idle, n_mac, n_halt, n_branch_nt, n_bufset;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (dut.run && dut.e_valid != '0) ex_t[dut.e_pc].push_back(cycle);
      if (dut.run && dut.bypass_used) n_bypass++;
      if (dut.stall) n_stall++;
      if (dut.loop_back) n_loop++;
      if (dut.run && dut.repeating) n_rep++;
      if (dut.int_ack) n_int++;
      if (dut.int_return) n_ret++;
      if (dut.u_ctrl.beat) n_dma++;
      if (dut.run && dut.f_valid && dut.f_ir[31]) n_multi++;
      if (dut.run && dut.f_valid && !dut.f_ir[31]) n_uni++;
      if (dut.run && dut.kill_if1 && dut.kill_if2) n_squash++;
      if (dut.run && dut.pcu_jsr) n_jsr++;
      if (dut.run && dut.pcu_rts) n_rts++;
      if (dut.run && dut.pcu_branch && !dut.pcu_jmp) n_branch_nt++;
      if (dut.run && (dut.au_wrapped[0] || dut.au_wrapped[1])) n_wrap++;
      if (dut.run && (dut.bs_valid[0] || dut.bs_valid[1])) n_bufset++;
      if (idle) n_idle++;
      if (dut.run && (dut.du_mac[0] || dut.du_mac[1])) n_mac++;
      if (halted) n_halt++;
      checks++;
      if (dut.stack_err) begin
        failures++;
        $display("FAIL stack error at cycle %0d", cycle);
      end
    end
  end

  // ---------------- loading and host access ----------------
  task automatic im(int a, word_t w);
    @(negedge clk);
    im_we = 1; im_addr = pc_t'(a); im_wdata = w;
    @(negedge clk);
    im_we = 0;
  endtask
  task automatic dec(int bank, int a, word_t w);   // bank 1..7
    @(negedge clk);
    dec_we = 1; dec_bank = 3'(bank - 1); dec_addr = 8'(a); dec_wdata = w;
    @(negedge clk);
    dec_we = 0;
  endtask
  task automatic clear_prog();
    @(negedge clk);
    im_we = 1; im_wdata = '0;
    for (int a = 0; a < 256; a++) begin im_addr = pc_t'(a); @(negedge clk); end
    im_we = 0;
    dec_we = 1; dec_wdata = '0;
    for (int b = 0; b < NSLOT; b++)
      for (int a = 0; a < 256; a++) begin
        dec_bank = 3'(b); dec_addr = 8'(a); @(negedge clk);
      end
    dec_we = 0;
  endtask
  task automatic host_wr(bit y, int a, data_t d);
    @(negedge clk);
    host_en = 1; host_sel_y = y; host_we = 1; host_addr = 9'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0; host_en = 0;
  endtask
  task automatic host_rd(bit y, int a, output data_t d);
    @(negedge clk);
    host_en = 1; host_sel_y = y; host_we = 0; host_addr = 9'(a);
    #1 d = host_rdata;
    @(negedge clk);
    host_en = 0;
  endtask
  task automatic check_mem(string what, bit y, int a, data_t exp);
    data_t d;
    host_rd(y, a, d);
    check(what, d, exp);
  endtask
  function automatic data_t rega(int r); return dut.u_rega.regs[r]; endfunction
  function automatic data_t regd(int r); return dut.u_regd.regs[r]; endfunction

  task automatic start();
    for (int a = 0; a < 256; a++) ex_t[a].delete();
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
  endtask
  task automatic run_to_halt(string name, int max_cycles, output int cycles);
    cycles = 0;
    while (!halted && cycles < max_cycles) begin @(posedge clk); cycles++; end
    check({name, " reaches halt"}, halted, 1);
    repeat (3) @(posedge clk);
    $display("%s: halted after %0d cycles", name, cycles);
  endtask
  task automatic stop();
    @(negedge clk);
    rst_n = 0;
  endtask

  // EX cycle of the n-th execution of the long instruction at address a.
  function automatic int ex(int a, int n = 0);
    if (n < ex_t[a].size()) return ex_t[a][n];
    return -1000;
  endfunction

  // ---------------- program 1 ----------------
  task automatic prog1();
    int cyc;
    data_t mf;
    clear_prog();
    host_wr(0, 'h21, 16'h1234);
    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 1, 'h20));
    im(1,  mk_imm(SL_AU1, OP_MOVI_A, 15, 1));
    im(2,  mk_imm(SL_DU1, OP_MOVI_D, 1, 3));
    im(3,  mk_imm(SL_DU2, OP_MOVI_D, 2, 5));
    im(4,  mk_op(SL_DU1, OP_ADD, 1, 2, 3));            // d3 = 8 (bypass d2)
    im(5,  mk_ptr(4'b1110, 0, 3'b110, 0));
    im(6,  mk_ptr(4'b0001, 0, 3'b000, 0));             // same word, B4 only
    dec(1, 0, mk_op(0, OP_ST, 1, 3));                  // X[a1] = d3
    dec(2, 0, mk_op(0, OP_ST, 1, 3));                  // Y[a1] = d3
    dec(3, 0, mk_op(0, OP_INC, 1, 15, 2));             // a2 = a1 + 1
    dec(4, 0, mk_op(0, OP_INC, 1, 1, 4));              // a4 = a1 + a1
    dec(5, 0, mk_op(0, OP_SUB, 3, 1, 4));              // d4 = d3 - d1
    dec(6, 0, mk_op(0, OP_MULT, 3, 2, 5));             // d5 = d3 * d2
    im(7,  mk_op(SL_MU1, OP_LD, 2, 6));                // d6 = X[a2]
    im(8,  mk_op(SL_DU1, OP_ADD, 6, 6, 7));            // d7 = 2*d6 (load bypass)
    im(9,  mk_op(SL_MU2, OP_LD, 1, 8));                // d8 = Y[a1]
    im(10, mk_imm(SL_AU2, OP_MOVI_A, 3, 'h40));
    im(11, mk_imm(SL_AU1, OP_MOVI_A, 5, 'h43));
    im(12, mk_op(SL_AU2, OP_SET1, 3, 5));              // buffer 1 = [40,43]
    im(13, mk_imm(SL_AU1, OP_MOVI_A, 6, 2));
    im(14, mk_imm(SL_AU1, OP_MOVI_A, 7, 'h42));
    im(15, mk_op(SL_AU1, OP_INCMOD, 7, 6, 8));         // a8 = 0x40 (wrap)
    im(16, mk_op(SL_AU1, OP_DECMOD, 8, 6, 9));         // a9 = 0x42 (wrap)
    im(17, mk_imm(SL_AU2, OP_MOVI_A, 10, 'h8000));
    im(18, mk_op(SL_AU2, OP_INCFFT, 0, 10, 11));       // a11 = 0x8000
    im(19, mk_op(SL_AU2, OP_INCFFT, 11, 10, 11));      // a11 = 0x4000
    im(20, mk_ptr(4'b1111, 1, 3'b111, 1));
    dec(1, 1, mk_op(0, OP_ST, 4, 7));                  // X[a4] = d7
    dec(2, 1, mk_op(0, OP_LD, 1, 9));                  // d9 = Y[a1]
    dec(3, 1, mk_op(0, OP_MOV_A, 9, 0, 12));           // a12 = a9
    dec(4, 1, mk_op(0, OP_DEC, 4, 15, 13));            // a13 = a4 - 1
    dec(5, 1, mk_op(0, OP_MULTF, 7, 6, 10));           // d10 = d7 * d6 (1.15)
    dec(6, 1, mk_op(0, OP_MULT, 3, 5, 11));            // d11 = d3 * d5
    dec(7, 1, mk_ctl(OP_HALT));
    start();
    run_to_halt("program 1", 500, cyc);
    check("p1 a2", rega(2), 'h21);
    check("p1 a4", rega(4), 'h40);
    check("p1 d3", regd(3), 8);
    check("p1 d4", regd(4), 5);
    check("p1 d5", regd(5), 40);
    check("p1 d6", regd(6), 'h1234);
    check("p1 d7", regd(7), 'h2468);
    check("p1 d8", regd(8), 8);
    check("p1 a8", rega(8), 'h40);
    check("p1 a9", rega(9), 'h42);
    check("p1 a11", rega(11), 'h4000);
    check("p1 d9", regd(9), 8);
    check("p1 a12", rega(12), 'h42);
    check("p1 a13", rega(13), 'h3F);
    mf = data_t'((32'sh2468 * 32'sh1234) >>> 15);
    check("p1 d10 (multf)", regd(10), mf);
    check("p1 d11", regd(11), 320);
    check("p1 buffer start", dut.au_buf_start[0], 'h40);
    check("p1 buffer end", dut.au_buf_end[0], 'h43);
    // one long instruction per cycle from the first to the halting one
    check("p1 no bubbles", ex(20) - ex(0), 20);
    stop();
    check_mem("p1 X[20]", 0, 'h20, 8);
    check_mem("p1 Y[20]", 1, 'h20, 8);
    check_mem("p1 X[40]", 0, 'h40, 'h2468);
  endtask

  // ---------------- program 2 ----------------
  task automatic prog2();
    int cyc;
    clear_prog();
    im(0,  mk_imm(SL_DU1, OP_MOVI_D, 9, 0));
    im(1,  mk_ctl(OP_JSR, 0, 0, 'h40));
    im(2,  mk_ctl(OP_BNEZ_D, 9, 0, 4));                // taken
    im(3,  mk_imm(SL_DU1, OP_MOVI_D, 10, 'h99));       // squashed
    im(4,  mk_ctl(OP_BEQZ_D, 9, 0, 6));                // not taken
    im(5,  mk_imm(SL_DU1, OP_MOVI_D, 11, 'h55));
    im(6,  mk_imm(SL_AU1, OP_MOVI_A, 11, 0));
    im(7,  mk_ctl(OP_BEQZ_A, 11, 0, 9));               // taken, a11 from EX
    im(8,  mk_imm(SL_DU1, OP_MOVI_D, 12, 'h77));       // squashed
    im(9,  mk_imm(SL_DU1, OP_MOVI_D, 13, 0));
    im(10, mk_imm(SL_DU2, OP_MOVI_D, 14, 1));
    im(11, mk_ctl(OP_DO, 0, 3, 16));
    im(12, mk_op(SL_DU1, OP_ADD, 13, 14, 13));
    im(13, mk_ctl(OP_DO, 0, 4, 15));
    im(14, mk_op(SL_DU1, OP_ADD, 13, 14, 13));
    im(15, mk_op(SL_DU2, OP_ADD, 0, 0, 15));
    im(16, mk_op(SL_DU1, OP_ADD, 13, 14, 13));
    im(17, mk_ctl(OP_REP, 0, 5));
    im(18, mk_op(SL_DU1, OP_ADD, 1, 14, 1));
    im(19, mk_ctl(OP_REP, 0, 0));
    im(20, mk_imm(SL_DU1, OP_MOVI_D, 2, 'h33));
    im(21, mk_ctl(OP_REP, 0, 1));
    im(22, mk_op(SL_DU1, OP_ADD, 3, 14, 3));
    im(23, mk_ctl(OP_JMP, 0, 0, 25));
    im(24, mk_imm(SL_DU1, OP_MOVI_D, 4, 'h66));        // skipped
    im(25, mk_ctl(OP_HALT));
    im('h40, mk_imm(SL_DU1, OP_MOVI_D, 9, 1));
    im('h41, mk_ctl(OP_RTS));
    start();
    run_to_halt("program 2", 1000, cyc);
    check("p2 d9", regd(9), 1);
    check("p2 d10 (squashed)", regd(10), 0);
    check("p2 d11", regd(11), 'h55);
    check("p2 d12 (squashed)", regd(12), 0);
    check("p2 d13 (nested loops)", regd(13), 18);
    check("p2 d1 (rep 5)", regd(1), 5);
    check("p2 d2 (rep 0)", regd(2), 0);
    check("p2 d3 (rep 1)", regd(3), 1);
    check("p2 d4 (jmp)", regd(4), 0);
    check("p2 jsr latency", ex('h40) - ex(1), 3);
    check("p2 rts latency", ex(2) - ex('h41), 3);
    check("p2 taken branch", ex(4) - ex(2), 3);
    check("p2 untaken branch", ex(5) - ex(4), 1);
    check("p2 taken branch, bypassed", ex(9) - ex(7), 3);
    check("p2 jmp", ex(25) - ex(23), 3);
    check("p2 squashed never executes", ex_t[3].size() + ex_t[8].size() + ex_t[24].size(), 0);
    check("p2 outer body runs", ex_t[12].size(), 3);
    check("p2 inner body runs", ex_t[14].size(), 12);
    // 3 x (12, 13, 4 x (14, 15), 16) = 33 instructions, no loop overhead
    check("p2 loops zero overhead", ex(17) - ex(11), 34);
    check("p2 rep 5 count", ex_t[18].size(), 5);
    check("p2 rep 5 cycles", ex(18, 4) - ex(18, 0), 5);
    check("p2 rep 0 count", ex_t[20].size(), 0);
    check("p2 rep 1 count", ex_t[22].size(), 1);
    stop();
  endtask

  // ---------------- program 3: block FIR ----------------
  localparam int FN = 8, FM = 4;
  task automatic prog3();
    int cyc;
    data_t x [FM + FN], h [FN + 1], y;
    clear_prog();
    for (int i = 0; i < FM + FN; i++) begin
      x[i] = data_t'($urandom_range(0, 200)) - 16'd100;
      host_wr(0, i, x[i]);
    end
    for (int t = 0; t <= FN; t++) begin
      h[t] = data_t'($urandom_range(0, 60)) - 16'd30;
      host_wr(1, t, h[t]);
    end
    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 11, 0));          // h base (bank Y)
    im(1,  mk_imm(SL_AU2, OP_MOVI_A, 12, 1));          // block start in x
    im(2,  mk_imm(SL_AU1, OP_MOVI_A, 13, 'h100));      // output pointer
    im(3,  mk_imm(SL_AU2, OP_MOVI_A, 14, 2));
    im(4,  mk_imm(SL_AU1, OP_MOVI_A, 15, 1));
    im(5,  mk_ctl(OP_DO, 0, FM / 2, 17));
    im(6,  mk_op(SL_AU1, OP_DEC, 12, 15, 1));          // a1 = s - 1
    im(7,  mk_op(SL_MU1, OP_LD, 1, 3));                // d3 = x[s-1]
    im(8,  mk_op(SL_MU1, OP_LD, 12, 1));               // d1 = x[s]
    im(9,  mk_op(SL_AU1, OP_INC, 12, 15, 1));          // a1 = s + 1
    im(10, mk_op(SL_MU2, OP_LD, 11, 2));               // d2 = h[0]
    im(11, mk_op(SL_AU2, OP_INC, 11, 15, 2));          // a2 = 1
    im(12, mk_ptr(4'b0000, 0, 3'b110, 2));
    dec(5, 2, mk_op(0, OP_SETACC0, 0));
    dec(6, 2, mk_op(0, OP_SETACC0, 0));
    im(13, mk_ctl(OP_REP, 0, FN));
    im(14, mk_ptr(4'b1111, 3, 3'b110, 3));
    dec(1, 3, mk_op(0, OP_LD, 1, 1));                  // d1 = X[a1]
    dec(2, 3, mk_op(0, OP_LD, 2, 2));                  // d2 = Y[a2]
    dec(3, 3, mk_op(0, OP_INC, 1, 15, 1));
    dec(4, 3, mk_op(0, OP_INC, 2, 15, 2));
    dec(5, 3, mk_op(0, OP_MADD2M, 1, 2, 3));           // acc += d1*d2, d3 = d1
    dec(6, 3, mk_op(0, OP_MADD2M, 3, 2, 15));          // acc += d3*d2
    im(15, mk_ptr(4'b0000, 0, 3'b110, 4));
    dec(5, 4, mk_op(0, OP_MADD2D0, 0, 0, 4));          // d4 = acc (DU1)
    dec(6, 4, mk_op(0, OP_MADD2D0, 0, 0, 5));          // d5 = acc (DU2)
    im(16, mk_ptr(4'b1010, 5, 3'b000, 0));
    dec(1, 5, mk_op(0, OP_ST, 13, 5));
    dec(3, 5, mk_op(0, OP_INC, 13, 15, 13));
    im(17, mk_ptr(4'b1011, 6, 3'b000, 0));
    dec(1, 6, mk_op(0, OP_ST, 13, 4));
    dec(3, 6, mk_op(0, OP_INC, 13, 15, 13));
    dec(4, 6, mk_op(0, OP_INC, 12, 14, 12));
    im(18, mk_ctl(OP_HALT));
    start();
    run_to_halt("program 3 (FIR)", 2000, cyc);
    check("p3 inner instruction count", ex_t[14].size(), FM / 2 * FN);
    for (int b = 0; b < FM / 2; b++)
      check($sformatf("p3 rep block %0d: N taps in N+1 cycles", b),
            ex(14, b * FN + FN - 1) - ex(14, b * FN), FN);
    $display("program 3: FIR N=%0d M=%0d, %0d cycles from first to last instruction",
             FN, FM, ex(18) - ex(0) + 1);
    stop();
    for (int j = 0; j < FM; j++) begin
      y = '0;
      for (int t = 0; t < FN; t++) y = y + data_t'(x[j + t] * h[t]);
      check_mem($sformatf("p3 y[%0d]", j), 0, 'h100 + j, y);
    end
  endtask

  // ---------------- program 4: DMA, wait, interrupts ----------------
  data_t io_in_q [$];
  data_t io_out_q [$];
  bit io_rand = 0;
  always @(negedge clk) begin
    if (io_rand) begin
      io_out_ready = ($urandom_range(0, 3) != 0);
      if (!io_in_valid || io_in_ready) begin
        if (io_in_q.size() != 0 && $urandom_range(0, 3) != 0) begin
          io_in_valid = 1; io_in_data = io_in_q[0];
        end else io_in_valid = 0;
      end
    end else begin
      io_in_valid = 0; io_out_ready = 0;
    end
  end
  always @(posedge clk) begin
    if (io_in_valid && io_in_ready) void'(io_in_q.pop_front());
    if (io_out_valid && io_out_ready) io_out_q.push_back(io_out_data);
  end

  task automatic prog4();
    int cyc;
    data_t in_w [4], yv [3];
    clear_prog();
    for (int k = 0; k < 4; k++) begin in_w[k] = data_t'($urandom); io_in_q.push_back(in_w[k]); end
    for (int k = 0; k < 3; k++) begin yv[k] = data_t'($urandom); host_wr(1, 'h30 + k, yv[k]); end
    io_out_q.delete();
    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 1, 'h10));
    im(1,  mk_imm(SL_DU1, OP_MOVI_D, 1, 4));
    im(2,  mk_ctl(OP_TRAP, 1, 0, TRAP_RD_X, 1));       // IO -> X[a1], d1 words
    im(3,  mk_op(SL_MU1, OP_LD, 1, 2));                // d2 = X[0x10]
    im(4,  mk_imm(SL_AU1, OP_MOVI_A, 2, 'h30));
    im(5,  mk_imm(SL_DU1, OP_MOVI_D, 3, 3));
    im(6,  mk_ctl(OP_TRAP, 2, 0, TRAP_WR_Y, 3));       // Y[a2] -> IO, d3 words
    im(7,  mk_imm(SL_DU2, OP_MOVI_D, 8, 1));
    im(8,  mk_ctl(OP_WAIT));
    im(9,  mk_imm(SL_DU1, OP_MOVI_D, 6, 'h11));
    im(10, mk_ctl(OP_DO, 0, 20, 12));
    im(11, mk_op(SL_DU1, OP_ADD, 7, 8, 7));
    im(12, mk_op(SL_DU2, OP_ADD, 9, 8, 9));
    im(13, mk_ctl(OP_HALT));
    im('h60, mk_imm(SL_DU1, OP_MOVI_D, 5, 'h42));
    im('h61, mk_ctl(OP_RTS));
    im(INT_VEC_BASE + INT_VEC_STRIDE, mk_ctl(OP_JSR, 0, 0, 'h60));
    im(INT_VEC_BASE + INT_VEC_STRIDE + 1, mk_ctl(OP_RTS));
    im(INT_VEC_BASE, mk_op(SL_DU1, OP_ADD, 10, 8, 10));
    im(INT_VEC_BASE + 1, mk_ctl(OP_RTS));
    io_rand = 1;
    start();
    fork
      begin
        int k;
        k = 0;
        while (!idle && k < 500) begin @(posedge clk); k++; end
        check("p4 core goes idle on wait", idle, 1);
        repeat (5) @(posedge clk);
        check("p4 still idle", idle, 1);
        @(negedge clk) irq[1] = 1;
        repeat (2) @(negedge clk);
        irq[1] = 0;
        k = 0;
        while (ex_t[11].size() < 5 && k < 500) begin @(posedge clk); k++; end
        @(negedge clk) irq[0] = 1;
        repeat (2) @(negedge clk);
        irq[0] = 0;
      end
      run_to_halt("program 4", 2000, cyc);
    join
    io_rand = 0;
    check("p4 d2 (load after DMA)", regd(2), in_w[0]);
    check("p4 d5 (vector 1 subroutine)", regd(5), 'h42);
    check("p4 d6", regd(6), 'h11);
    check("p4 d7", regd(7), 20);
    check("p4 d9", regd(9), 20);
    check("p4 d10 (vector 0)", regd(10), 1);
    check("p4 output words", io_out_q.size(), 3);
    for (int k = 0; k < 3 && k < io_out_q.size(); k++)
      check($sformatf("p4 out[%0d]", k), io_out_q[k], yv[k]);
    check("p4 vector 0 taken once", ex_t[INT_VEC_BASE].size(), 1);
    // the vector is fetched in place of the next instruction: no lost cycle;
    // its rts costs two: 40 loop instructions + 2 + 2 + 1
    check("p4 interrupt in loop", ex(13) - ex(10), 45);
    // vector 1: jsr costs two cycles before the routine starts
    check("p4 vector jsr", ex('h60) - ex(INT_VEC_BASE + INT_VEC_STRIDE), 3);
    stop();
    for (int k = 0; k < 4; k++) check_mem($sformatf("p4 X[%0h]", 'h10 + k), 0, 'h10 + k, in_w[k]);
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    prog1();
    prog2();
    prog3();
    prog4();
    need("uni-op words", n_uni);
    need("multi-op pointers", n_multi);
    need("EX/WB bypass", n_bypass);
    need("taken branch/jump squash", n_squash);
    need("untaken branch", n_branch_nt);
    need("jsr", n_jsr);
    need("rts", n_rts);
    need("DO loop back", n_loop);
    need("rep repeat cycles", n_rep);
    need("circular-buffer wrap", n_wrap);
    need("set1/set2 buffer load", n_bufset);
    need("multiply-accumulate", n_mac);
    need("interrupt taken", n_int);
    need("interrupt return", n_ret);
    need("DMA word moved", n_dma);
    need("DMA stall cycles", n_stall);
    need("idle (wait) cycles", n_idle);
    need("halt", n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
