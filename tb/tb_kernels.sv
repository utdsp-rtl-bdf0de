// tb_kernels: runs benchmark kernels on the full-size UTDSP core and checks
// results and cycle counts: the N x N matrix multiply (mult_4_4, mult_10_10),
// the FIR (32 taps x 1 output as one repeated multiply-accumulate, N+9
// cycles; 32 x 2 and 256 x 64 as the block FIR), the cascaded
// biquad IIR (1 section x 1 sample, 4 sections x 64 samples), the LMS
// adaptive FIR (8 taps x 1 sample, 32 taps x 64 samples), the normalized
// lattice filter (8 sections x 1 sample, 32 sections x 64 samples) and a
// 256-point complex FFT (fft_256).
//
// Matrix multiply: C = A * B with A in bank X (row-major at word 0), B in
// bank Y (row-major at word 0) and C written to bank X from word 0x100. The
// program: outer DO over rows, inner DO over columns; per element:
//     J0  a1 = row pointer, a2 = column pointer, Acc0 = 0, d1 = 0
//     rep N of one long instruction: ld X[a1] -> d1, ld Y[a2] -> d2,
//         a1 += 1, a2 += N, Acc0 += d1*d2 (madd2m; it consumes the pair
//         loaded by the instance before, so the first product is 0*d2)
//     J3  Acc0 += d1*d2 for the last pair, next column
//     d4 = Acc0; store d4 to C and advance the C pointer (inner loop end)
//   next row (outer loop end), halt.
// Every element takes N+6 cycles (J0, rep, its one-cycle bubble, N steps,
// three more instructions; the inner loop-back costs nothing), a row boundary
// two more (the outer-loop instruction and the inner do): N^3+6N^2+2N+7 in all.
//
// Block FIR: x in bank X, h in bank Y, two outputs per block. Each block loads
// the first samples, clears both accumulators, runs rep N of one long
// instruction (two loads, two increments, two madd2m: the second tap product
// uses the sample the first madd2m just moved), reads both accumulators and
// stores two outputs. N steps take N+1 cycles; the kernel takes
// M/2*(N+12)+7 cycles. 32 taps are run with 2 outputs, the smallest block.
//
// Biquad IIR: coefficients in bank X, section states in bank Y. An outer DO
// over samples and an inner DO over sections; each section is eight long
// instructions that load five coefficients and two states, compute
// w = v - a1*w1 - a2*w2 and v = b0*w + b1*w1 + b2*w2 with the two integer
// units, and store the new states. Each sample takes 8N+4 cycles; the kernel
// takes M(8N+4)+5.
//
// LMS: per sample, a filter pass (rep N of one long instruction with two loads,
// two increments and madd2m), the error e = d - y, then an update pass (a DO
// loop of five instructions per tap: load x and h, e*x, shift right by 4,
// add, store). Each sample takes 6N+9 cycles, the kernel M(6N+9)+7. Outputs
// and the final coefficients are checked.
//
// Normalized lattice: each section rotates the forward value and its stored
// state by a coefficient pair (c, k) in 1.15: f' = c*f - k*s, s' = k*f + c*s,
// in six long instructions (the two integer units do the four multf in two
// cycles). Each sample takes 6N+4 cycles, the kernel M(6N+4)+5. Outputs and
// final states are checked.
//
// FFT: radix-2 decimation in frequency, in place, real parts in bank X and
// imaginary parts in bank Y, 1.15 twiddles from a table, three nested DO loops
// (stages, groups, butterflies; group and butterfly counts from registers via
// do.a), eight long instructions per butterfly. A last pass reads the
// bit-reversed result in natural order with incfft (step N/2) and stores
// |re| + |im| of bins 0..127. Checked: all 512 result words bit for bit
// against a model of the same arithmetic, every bin within 256 LSB of a
// floating-point DFT, the 128 magnitudes, 8 cycles per butterfly and 9513
// cycles in all.
//
// Inputs are random 16-bit integers; expected outputs are computed here with
// 16-bit wrap-around and read back through the host port; the cycle structure
// is checked from the EX-stage trace. Sizes differ only in counts and strides.
//
// The kernels and their sizes are benchmarks the document evaluates (its
// compiled matrix multiply takes N(N^2+3N+1) cycles, its compiled IIR
// M(5N+3), its compiled LMS M(4N+6), its compiled lattice M(6N+3), its
// compiled FFT 4 cycles per butterfly, its hand-coded FIR M(N+6)/2+7); the programs, their encoding and their cycle counts are this
// design's own.
`timescale 1ns/1ps
module tb_kernels;
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
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // EX-stage trace: cycles at which the instruction at each address executes.
  int ex_t [256][$];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && dut.run && dut.e_valid != '0) ex_t[dut.e_pc].push_back(cycle);
    if (rst_n && dut.stack_err) begin
      failures++;
      $display("FAIL stack error at cycle %0d", cycle);
    end
  end

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

  task automatic mmul(int n);
    data_t a [100], b [100], c, got;
    int cyc, per_elem;
    string tag;
    tag = $sformatf("mult_%0d_%0d", n, n);
    for (int i = 0; i < n * n; i++) begin
      a[i] = data_t'($urandom_range(0, 40)) - 16'd20;
      b[i] = data_t'($urandom_range(0, 40)) - 16'd20;
      host_wr(0, i, a[i]);
      host_wr(1, i, b[i]);
    end
    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 10, 0));          // row pointer into A
    im(1,  mk_imm(SL_AU2, OP_MOVI_A, 11, 0));          // column pointer into B
    im(2,  mk_imm(SL_AU1, OP_MOVI_A, 13, 'h100));      // C pointer
    im(3,  mk_imm(SL_AU2, OP_MOVI_A, 14, n));          // row stride
    im(4,  mk_imm(SL_AU1, OP_MOVI_A, 15, 1));
    im(5,  mk_ctl(OP_DO, 0, n, 13));                   // rows
    im(6,  mk_ctl(OP_DO, 0, n, 12));                   // columns
    im(7,  mk_ptr(4'b0011, 0, 3'b110, 0));             // J0
    dec(3, 0, mk_op(0, OP_MOV_A, 10, 0, 1));           // a1 = a10
    dec(4, 0, mk_op(0, OP_MOV_A, 11, 0, 2));           // a2 = a11
    dec(5, 0, mk_op(0, OP_SETACC0, 0));                // Acc0 = d0 = 0
    dec(6, 0, mk_imm(0, OP_MOVI_D, 1, 0));             // d1 = 0
    im(8,  mk_ctl(OP_REP, 0, n));
    im(9,  mk_ptr(4'b1111, 1, 3'b100, 1));             // one multiply-accumulate step
    dec(1, 1, mk_op(0, OP_LD, 1, 1));                  // d1 = X[a1]
    dec(2, 1, mk_op(0, OP_LD, 2, 2));                  // d2 = Y[a2]
    dec(3, 1, mk_op(0, OP_INC, 1, 15, 1));             // a1 += 1
    dec(4, 1, mk_op(0, OP_INC, 2, 14, 2));             // a2 += n
    dec(5, 1, mk_op(0, OP_MADD2M, 1, 2, 15));          // Acc0 += d1*d2
    im(10, mk_ptr(4'b0001, 2, 3'b100, 2));             // J3
    dec(4, 2, mk_op(0, OP_INC, 11, 15, 11));           // next column
    dec(5, 2, mk_op(0, OP_MADD2M, 1, 2, 15));          // last product
    im(11, mk_op(SL_DU1, OP_MADD2D0, 0, 0, 4));        // d4 = Acc0
    im(12, mk_ptr(4'b1010, 3, 3'b000, 0));             // inner loop end
    dec(1, 3, mk_op(0, OP_ST, 13, 4));                 // C[] = d4
    dec(3, 3, mk_op(0, OP_INC, 13, 15, 13));
    im(13, mk_ptr(4'b0011, 4, 3'b000, 0));             // outer loop end
    dec(3, 4, mk_op(0, OP_INC, 10, 14, 10));           // next row of A
    dec(4, 4, mk_imm(0, OP_MOVI_A, 11, 0));            // first column of B
    im(14, mk_ctl(OP_HALT));

    for (int i = 0; i < 256; i++) ex_t[i].delete();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 50000) begin @(posedge clk); cyc++; end
    check({tag, " reaches halt"}, halted, 1);
    repeat (3) @(posedge clk);

    check({tag, " elements computed"}, ex_t[12].size(), n * n);
    check({tag, " multiply steps"}, ex_t[9].size(), n * n * n);
    per_elem = ex(7, 1) - ex(7, 0);
    check({tag, " cycles per element"}, per_elem, n + 6);
    for (int e = 1; e < n * n; e++)
      check($sformatf("%s element %0d start", tag, e), ex(7, e) - ex(7, e - 1),
            (e % n == 0) ? n + 8 : n + 6);
    check({tag, " total cycles, first to last instruction"}, ex(14) - ex(0) + 1,
          n * n * n + 6 * n * n + 2 * n + 7);
    $display("%s: %0d cycles from first to last instruction (document's compiled code: %0d)",
             tag, ex(14) - ex(0) + 1, n * (n * n + 3 * n + 1));
    @(negedge clk); rst_n = 0;

    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        c = '0;
        for (int k = 0; k < n; k++) c = c + data_t'(a[i * n + k] * b[k * n + j]);
        host_rd(0, 'h100 + i * n + j, got);
        check($sformatf("%s C[%0d][%0d]", tag, i, j), got, c);
      end
  endtask


  // Block FIR: two outputs per block, rep N of one long instruction per tap
  // pair (two loads, two pointer increments, two madd2m). x in bank X from 0,
  // h in bank Y from 0, y to bank X from obase.
  task automatic fir(int n, int m, int obase);
    data_t x [400], h [300], y, got;
    int cyc;
    string tag;
    tag = $sformatf("fir_%0d_%0d", n, m);
    for (int i = 0; i < m + n; i++) begin
      x[i] = data_t'($urandom_range(0, 200)) - 16'd100;
      host_wr(0, i, x[i]);
    end
    for (int t = 0; t <= n; t++) begin
      h[t] = data_t'($urandom_range(0, 60)) - 16'd30;
      host_wr(1, t, h[t]);
    end
    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 11, 0));          // h base (bank Y)
    im(1,  mk_imm(SL_AU2, OP_MOVI_A, 12, 1));          // block start in x
    im(2,  mk_imm(SL_AU1, OP_MOVI_A, 13, obase));      // output pointer
    im(3,  mk_imm(SL_AU2, OP_MOVI_A, 14, 2));
    im(4,  mk_imm(SL_AU1, OP_MOVI_A, 15, 1));
    im(5,  mk_ctl(OP_DO, 0, m / 2, 17));
    im(6,  mk_op(SL_AU1, OP_DEC, 12, 15, 1));          // a1 = s - 1
    im(7,  mk_op(SL_MU1, OP_LD, 1, 3));                // d3 = x[s-1]
    im(8,  mk_op(SL_MU1, OP_LD, 12, 1));               // d1 = x[s]
    im(9,  mk_op(SL_AU1, OP_INC, 12, 15, 1));          // a1 = s + 1
    im(10, mk_op(SL_MU2, OP_LD, 11, 2));               // d2 = h[0]
    im(11, mk_op(SL_AU2, OP_INC, 11, 15, 2));          // a2 = 1
    im(12, mk_ptr(4'b0000, 0, 3'b110, 5));
    dec(5, 5, mk_op(0, OP_SETACC0, 0));
    dec(6, 5, mk_op(0, OP_SETACC0, 0));
    im(13, mk_ctl(OP_REP, 0, n));
    im(14, mk_ptr(4'b1111, 6, 3'b110, 6));
    dec(1, 6, mk_op(0, OP_LD, 1, 1));                  // d1 = X[a1]
    dec(2, 6, mk_op(0, OP_LD, 2, 2));                  // d2 = Y[a2]
    dec(3, 6, mk_op(0, OP_INC, 1, 15, 1));
    dec(4, 6, mk_op(0, OP_INC, 2, 15, 2));
    dec(5, 6, mk_op(0, OP_MADD2M, 1, 2, 3));           // acc += d1*d2, d3 = d1
    dec(6, 6, mk_op(0, OP_MADD2M, 3, 2, 15));          // acc += d3*d2
    im(15, mk_ptr(4'b0000, 0, 3'b110, 7));
    dec(5, 7, mk_op(0, OP_MADD2D0, 0, 0, 4));          // d4 = acc (DU1)
    dec(6, 7, mk_op(0, OP_MADD2D0, 0, 0, 5));          // d5 = acc (DU2)
    im(16, mk_ptr(4'b1010, 8, 3'b000, 0));
    dec(1, 8, mk_op(0, OP_ST, 13, 5));
    dec(3, 8, mk_op(0, OP_INC, 13, 15, 13));
    im(17, mk_ptr(4'b1011, 9, 3'b000, 0));
    dec(1, 9, mk_op(0, OP_ST, 13, 4));
    dec(3, 9, mk_op(0, OP_INC, 13, 15, 13));
    dec(4, 9, mk_op(0, OP_INC, 12, 14, 12));
    im(18, mk_ctl(OP_HALT));

    for (int i = 0; i < 256; i++) ex_t[i].delete();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 50000) begin @(posedge clk); cyc++; end
    check({tag, " reaches halt"}, halted, 1);
    repeat (3) @(posedge clk);
    check({tag, " tap steps"}, ex_t[14].size(), m / 2 * n);
    for (int b = 0; b < m / 2; b++)
      check($sformatf("%s block %0d: N steps in N+1 cycles", tag, b),
            ex(14, b * n + n - 1) - ex(14, b * n), n);
    check({tag, " total cycles, first to last instruction"}, ex(18) - ex(0) + 1,
          m / 2 * (n + 12) + 7);
    $display("%s: %0d cycles from first to last instruction (document's hand-coded FIR: %0d)",
             tag, ex(18) - ex(0) + 1, m * (n + 6) / 2 + 7);
    @(negedge clk); rst_n = 0;
    for (int j = 0; j < m; j++) begin
      y = '0;
      for (int t = 0; t < n; t++) y = y + data_t'(x[j + t] * h[t]);
      host_rd(0, obase + j, got);
      check($sformatf("%s y[%0d]", tag, j), got, y);
    end
  endtask

  // Cascaded biquad IIR, n sections, m samples. Per section (direct form II):
  // w = v - a1*w1 - a2*w2; v = b0*w + b1*w1 + b2*w2; w2 = w1; w1 = w.
  // Coefficients {a1, a2, b0, b1, b2} per section in bank X from 0, states
  // {w1, w2} per section in bank Y from 0, samples in X from 0x100, outputs to
  // X from 0x180. Eight long instructions per section.
  task automatic iir(int n, int m);
    data_t co [20], xs [64], w1 [4], w2 [4], v, w, got;
    data_t ys [64];
    int cyc;
    string tag;
    tag = $sformatf("iir_%0d_%0d", n, m);
    for (int i = 0; i < 5 * n; i++) begin
      co[i] = data_t'($urandom_range(0, 14)) - 16'd7;
      host_wr(0, i, co[i]);
    end
    for (int i = 0; i < 2 * n; i++) host_wr(1, i, '0);
    for (int i = 0; i < m; i++) begin
      xs[i] = data_t'($urandom_range(0, 200)) - 16'd100;
      host_wr(0, 'h100 + i, xs[i]);
    end
    for (int k = 0; k < n; k++) begin w1[k] = '0; w2[k] = '0; end
    for (int i = 0; i < m; i++) begin
      v = xs[i];
      for (int k = 0; k < n; k++) begin
        w = v - data_t'(co[5*k] * w1[k]) - data_t'(co[5*k+1] * w2[k]);
        v = data_t'(co[5*k+2] * w) + data_t'(co[5*k+3] * w1[k]) + data_t'(co[5*k+4] * w2[k]);
        w2[k] = w1[k];
        w1[k] = w;
      end
      ys[i] = v;
    end
    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 3, 'h100));       // sample pointer
    im(1,  mk_imm(SL_AU2, OP_MOVI_A, 4, 'h180));       // output pointer
    im(2,  mk_imm(SL_AU1, OP_MOVI_A, 15, 1));
    im(3,  mk_ctl(OP_DO, 0, m, 15));                   // samples
    im(4,  mk_ptr(4'b1011, 10, 3'b000, 0));
    dec(1, 10, mk_op(0, OP_LD, 3, 8));                 // d8 = x
    dec(3, 10, mk_imm(0, OP_MOVI_A, 1, 0));            // a1 = coefficients
    dec(4, 10, mk_imm(0, OP_MOVI_A, 2, 0));            // a2 = states
    im(5,  mk_op(SL_AU1, OP_INC, 3, 15, 3));
    im(6,  mk_ctl(OP_DO, 0, n, 14));                   // sections
    im(7,  mk_ptr(4'b1111, 11, 3'b000, 0));            // S1
    dec(1, 11, mk_op(0, OP_LD, 1, 1));                 // d1 = a1
    dec(2, 11, mk_op(0, OP_LD, 2, 5));                 // d5 = w1
    dec(3, 11, mk_op(0, OP_INC, 1, 15, 1));
    dec(4, 11, mk_op(0, OP_INC, 2, 15, 2));
    im(8,  mk_ptr(4'b1111, 12, 3'b000, 0));            // S2
    dec(1, 12, mk_op(0, OP_LD, 1, 2));                 // d2 = a2
    dec(2, 12, mk_op(0, OP_LD, 2, 6));                 // d6 = w2
    dec(3, 12, mk_op(0, OP_INC, 1, 15, 1));
    dec(4, 12, mk_op(0, OP_DEC, 2, 15, 2));            // back to w1
    im(9,  mk_ptr(4'b1010, 13, 3'b100, 13));           // S3
    dec(1, 13, mk_op(0, OP_LD, 1, 3));                 // d3 = b0
    dec(3, 13, mk_op(0, OP_INC, 1, 15, 1));
    dec(5, 13, mk_op(0, OP_MULT, 1, 5, 9));            // d9 = a1*w1
    im(10, mk_ptr(4'b1010, 14, 3'b110, 14));           // S4
    dec(1, 14, mk_op(0, OP_LD, 1, 4));                 // d4 = b1
    dec(3, 14, mk_op(0, OP_INC, 1, 15, 1));
    dec(5, 14, mk_op(0, OP_MULT, 2, 6, 10));           // d10 = a2*w2
    dec(6, 14, mk_op(0, OP_SUB, 8, 9, 11));            // d11 = v - a1*w1
    im(11, mk_ptr(4'b1010, 15, 3'b100, 15));           // S5
    dec(1, 15, mk_op(0, OP_LD, 1, 7));                 // d7 = b2
    dec(3, 15, mk_op(0, OP_INC, 1, 15, 1));
    dec(5, 15, mk_op(0, OP_SUB, 11, 10, 12));          // d12 = w
    im(12, mk_ptr(4'b0101, 16, 3'b110, 16));           // S6
    dec(2, 16, mk_op(0, OP_ST, 2, 12));                // w1 := w
    dec(4, 16, mk_op(0, OP_INC, 2, 15, 2));
    dec(5, 16, mk_op(0, OP_MULT, 3, 12, 13));          // d13 = b0*w
    dec(6, 16, mk_op(0, OP_MULT, 4, 5, 14));           // d14 = b1*w1
    im(13, mk_ptr(4'b0101, 17, 3'b110, 17));           // S7
    dec(2, 17, mk_op(0, OP_ST, 2, 5));                 // w2 := old w1
    dec(4, 17, mk_op(0, OP_INC, 2, 15, 2));            // next section
    dec(5, 17, mk_op(0, OP_MULT, 7, 6, 15));           // d15 = b2*w2
    dec(6, 17, mk_op(0, OP_ADD, 13, 14, 13));
    im(14, mk_op(SL_DU1, OP_ADD, 13, 15, 8));          // S8: v = y (section loop end)
    im(15, mk_ptr(4'b1010, 18, 3'b000, 0));            // sample loop end
    dec(1, 18, mk_op(0, OP_ST, 4, 8));                 // y[] = v
    dec(3, 18, mk_op(0, OP_INC, 4, 15, 4));
    im(16, mk_ctl(OP_HALT));

    for (int i = 0; i < 256; i++) ex_t[i].delete();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 50000) begin @(posedge clk); cyc++; end
    check({tag, " reaches halt"}, halted, 1);
    repeat (3) @(posedge clk);
    check({tag, " section passes"}, ex_t[14].size(), n * m);
    for (int i = 1; i < m; i++)
      check($sformatf("%s sample %0d: 8N+4 cycles", tag, i), ex(4, i) - ex(4, i - 1), 8 * n + 4);
    check({tag, " total cycles, first to last instruction"}, ex(16) - ex(0) + 1,
          m * (8 * n + 4) + 5);
    $display("%s: %0d cycles from first to last instruction (document's compiled code: %0d)",
             tag, ex(16) - ex(0) + 1, m * (5 * n + 3));
    @(negedge clk); rst_n = 0;
    for (int i = 0; i < m; i++) begin
      host_rd(0, 'h180 + i, got);
      check($sformatf("%s y[%0d]", tag, i), got, ys[i]);
    end
  endtask

  // LMS adaptive FIR, n taps, m samples: y = sum h[k]*x[i+k], e = d - y,
  // h[k] += (e*x[i+k]) >>> 4. x in bank X from 0, h in bank Y from 0, the
  // desired signal d in Y from 0x100, y to X from 0x180. The filter pass is a
  // rep of one long instruction; the update pass is a five-instruction DO loop.
  task automatic lms(int n, int m);
    data_t x [100], h [32], dd [64], ys [64], y, e, t, got;
    int cyc;
    string tag;
    tag = $sformatf("lmsfir_%0d_%0d", n, m);
    for (int i = 0; i < m + n; i++) begin
      x[i] = data_t'($urandom_range(0, 200)) - 16'd100;
      host_wr(0, i, x[i]);
    end
    for (int k = 0; k < n; k++) begin
      h[k] = data_t'($urandom_range(0, 60)) - 16'd30;
      host_wr(1, k, h[k]);
    end
    for (int i = 0; i < m; i++) begin
      dd[i] = data_t'($urandom);
      host_wr(1, 'h100 + i, dd[i]);
    end
    for (int i = 0; i < m; i++) begin
      y = '0;
      for (int k = 0; k < n; k++) y = y + data_t'(h[k] * x[i + k]);
      ys[i] = y;
      e = dd[i] - y;
      for (int k = 0; k < n; k++) begin
        t = data_t'(e * x[i + k]);
        h[k] = h[k] + data_t'($signed(t) >>> 4);
      end
    end
    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 3, 0));           // sample base in x
    im(1,  mk_imm(SL_AU2, OP_MOVI_A, 4, 'h180));       // output pointer
    im(2,  mk_imm(SL_AU1, OP_MOVI_A, 5, 'h100));       // desired-signal pointer
    im(3,  mk_imm(SL_AU2, OP_MOVI_A, 15, 1));
    im(4,  mk_imm(SL_DU1, OP_MOVI_D, 10, 4));          // step size: shift by 4
    im(5,  mk_ctl(OP_DO, 0, m, 19));                   // samples
    im(6,  mk_ptr(4'b0011, 20, 3'b110, 20));
    dec(3, 20, mk_op(0, OP_MOV_A, 3, 0, 1));           // a1 = x + i
    dec(4, 20, mk_imm(0, OP_MOVI_A, 2, 0));            // a2 = h
    dec(5, 20, mk_op(0, OP_SETACC0, 0));
    dec(6, 20, mk_imm(0, OP_MOVI_D, 1, 0));
    im(7,  mk_ctl(OP_REP, 0, n));
    im(8,  mk_ptr(4'b1111, 21, 3'b100, 21));           // filter step
    dec(1, 21, mk_op(0, OP_LD, 1, 1));
    dec(2, 21, mk_op(0, OP_LD, 2, 2));
    dec(3, 21, mk_op(0, OP_INC, 1, 15, 1));
    dec(4, 21, mk_op(0, OP_INC, 2, 15, 2));
    dec(5, 21, mk_op(0, OP_MADD2M, 1, 2, 15));
    im(9,  mk_ptr(4'b0101, 22, 3'b100, 22));
    dec(2, 22, mk_op(0, OP_LD, 5, 11));                // d11 = d[i]
    dec(4, 22, mk_op(0, OP_INC, 5, 15, 5));
    dec(5, 22, mk_op(0, OP_MADD2M, 1, 2, 15));         // last product
    im(10, mk_op(SL_DU1, OP_MADD2D0, 0, 0, 4));        // d4 = y
    im(11, mk_ptr(4'b1011, 23, 3'b010, 23));
    dec(1, 23, mk_op(0, OP_ST, 4, 4));                 // y[i] = d4
    dec(3, 23, mk_op(0, OP_INC, 4, 15, 4));
    dec(4, 23, mk_imm(0, OP_MOVI_A, 2, 0));            // a2 = h
    dec(6, 23, mk_op(0, OP_SUB, 11, 4, 9));            // d9 = e = d - y
    im(12, mk_op(SL_AU1, OP_MOV_A, 3, 0, 1));          // a1 = x + i
    im(13, mk_ctl(OP_DO, 0, n, 18));                   // taps
    im(14, mk_ptr(4'b1110, 24, 3'b000, 0));
    dec(1, 24, mk_op(0, OP_LD, 1, 1));                 // d1 = x[i+k]
    dec(2, 24, mk_op(0, OP_LD, 2, 2));                 // d2 = h[k]
    dec(3, 24, mk_op(0, OP_INC, 1, 15, 1));
    im(15, mk_op(SL_DU1, OP_MULT, 1, 9, 3));           // d3 = e * x
    im(16, mk_op(SL_DU1, OP_ASR_D, 3, 10, 3));         // d3 >>>= 4
    im(17, mk_op(SL_DU1, OP_ADD, 2, 3, 2));            // d2 = h + d3
    im(18, mk_ptr(4'b0101, 25, 3'b000, 0));            // tap loop end
    dec(2, 25, mk_op(0, OP_ST, 2, 2));                 // h[k] = d2
    dec(4, 25, mk_op(0, OP_INC, 2, 15, 2));
    im(19, mk_op(SL_AU1, OP_INC, 3, 15, 3));           // sample loop end
    im(20, mk_ctl(OP_HALT));

    for (int i = 0; i < 256; i++) ex_t[i].delete();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 50000) begin @(posedge clk); cyc++; end
    check({tag, " reaches halt"}, halted, 1);
    repeat (3) @(posedge clk);
    check({tag, " filter steps"}, ex_t[8].size(), n * m);
    check({tag, " update passes"}, ex_t[18].size(), n * m);
    for (int i = 1; i < m; i++)
      check($sformatf("%s sample %0d: 6N+9 cycles", tag, i), ex(6, i) - ex(6, i - 1), 6 * n + 9);
    check({tag, " total cycles, first to last instruction"}, ex(20) - ex(0) + 1,
          m * (6 * n + 9) + 7);
    $display("%s: %0d cycles from first to last instruction (document's compiled code: %0d)",
             tag, ex(20) - ex(0) + 1, m * (4 * n + 6));
    @(negedge clk); rst_n = 0;
    for (int i = 0; i < m; i++) begin
      host_rd(0, 'h180 + i, got);
      check($sformatf("%s y[%0d]", tag, i), got, ys[i]);
    end
    for (int k = 0; k < n; k++) begin
      host_rd(1, k, got);
      check($sformatf("%s final h[%0d]", tag, k), got, h[k]);
    end
  endtask

  // Normalized lattice filter, n sections, m samples, 1.15 fixed point. Each
  // section rotates the forward value f and its stored state s by the pair
  // (c, k): f' = c*f - k*s, s' = k*f + c*s. Pairs {c, k} in bank X from 0,
  // states in bank Y from 0, samples in X from 0x100, outputs to X from 0x180.
  // Six long instructions per section.
  function automatic data_t q15(data_t a, data_t b);
    logic signed [31:0] p;
    p = $signed(a) * $signed(b);
    return p[30:15];
  endfunction
  task automatic latnrm(int n, int m);
    data_t cc [32], kk [32], st [32], xs [64], ys [64], f, b, got;
    int cyc;
    string tag;
    tag = $sformatf("latnrm_%0d_%0d", n, m);
    for (int i = 0; i < n; i++) begin
      cc[i] = data_t'($urandom_range(0, 'h8000)) - 16'h4000;
      kk[i] = data_t'($urandom_range(0, 'h8000)) - 16'h4000;
      host_wr(0, 2 * i, cc[i]);
      host_wr(0, 2 * i + 1, kk[i]);
      host_wr(1, i, '0);
      st[i] = '0;
    end
    for (int i = 0; i < m; i++) begin
      xs[i] = data_t'($urandom_range(0, 'h8000)) - 16'h4000;
      host_wr(0, 'h100 + i, xs[i]);
    end
    for (int i = 0; i < m; i++) begin
      f = xs[i];
      for (int k = 0; k < n; k++) begin
        b = q15(kk[k], f) + q15(cc[k], st[k]);
        f = q15(cc[k], f) - q15(kk[k], st[k]);
        st[k] = b;
      end
      ys[i] = f;
    end
    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 3, 'h100));       // sample pointer
    im(1,  mk_imm(SL_AU2, OP_MOVI_A, 4, 'h180));       // output pointer
    im(2,  mk_imm(SL_AU1, OP_MOVI_A, 15, 1));
    im(3,  mk_ctl(OP_DO, 0, m, 13));                   // samples
    im(4,  mk_ptr(4'b1011, 30, 3'b000, 0));
    dec(1, 30, mk_op(0, OP_LD, 3, 8));                 // d8 = f = x
    dec(3, 30, mk_imm(0, OP_MOVI_A, 1, 0));            // a1 = coefficients
    dec(4, 30, mk_imm(0, OP_MOVI_A, 2, 0));            // a2 = states
    im(5,  mk_op(SL_AU1, OP_INC, 3, 15, 3));
    im(6,  mk_ctl(OP_DO, 0, n, 12));                   // sections
    im(7,  mk_ptr(4'b1110, 31, 3'b000, 0));
    dec(1, 31, mk_op(0, OP_LD, 1, 1));                 // d1 = c
    dec(2, 31, mk_op(0, OP_LD, 2, 5));                 // d5 = s
    dec(3, 31, mk_op(0, OP_INC, 1, 15, 1));
    im(8,  mk_ptr(4'b1010, 32, 3'b000, 0));
    dec(1, 32, mk_op(0, OP_LD, 1, 2));                 // d2 = k
    dec(3, 32, mk_op(0, OP_INC, 1, 15, 1));
    im(9,  mk_ptr(4'b0000, 0, 3'b110, 33));
    dec(5, 33, mk_op(0, OP_MULTF, 1, 8, 9));           // d9 = c*f
    dec(6, 33, mk_op(0, OP_MULTF, 2, 5, 10));          // d10 = k*s
    im(10, mk_ptr(4'b0000, 0, 3'b110, 34));
    dec(5, 34, mk_op(0, OP_MULTF, 2, 8, 11));          // d11 = k*f
    dec(6, 34, mk_op(0, OP_MULTF, 1, 5, 12));          // d12 = c*s
    im(11, mk_ptr(4'b0000, 0, 3'b110, 35));
    dec(5, 35, mk_op(0, OP_SUB, 9, 10, 8));            // f = c*f - k*s
    dec(6, 35, mk_op(0, OP_ADD, 11, 12, 13));          // s' = k*f + c*s
    im(12, mk_ptr(4'b0101, 36, 3'b000, 0));            // section loop end
    dec(2, 36, mk_op(0, OP_ST, 2, 13));
    dec(4, 36, mk_op(0, OP_INC, 2, 15, 2));
    im(13, mk_ptr(4'b1010, 37, 3'b000, 0));            // sample loop end
    dec(1, 37, mk_op(0, OP_ST, 4, 8));                 // y[] = f
    dec(3, 37, mk_op(0, OP_INC, 4, 15, 4));
    im(14, mk_ctl(OP_HALT));

    for (int i = 0; i < 256; i++) ex_t[i].delete();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 50000) begin @(posedge clk); cyc++; end
    check({tag, " reaches halt"}, halted, 1);
    repeat (3) @(posedge clk);
    check({tag, " section passes"}, ex_t[12].size(), n * m);
    for (int i = 1; i < m; i++)
      check($sformatf("%s sample %0d: 6N+4 cycles", tag, i), ex(4, i) - ex(4, i - 1), 6 * n + 4);
    check({tag, " total cycles, first to last instruction"}, ex(14) - ex(0) + 1,
          m * (6 * n + 4) + 5);
    $display("%s: %0d cycles from first to last instruction (document's compiled code: %0d)",
             tag, ex(14) - ex(0) + 1, m * (6 * n + 3));
    @(negedge clk); rst_n = 0;
    for (int i = 0; i < m; i++) begin
      host_rd(0, 'h180 + i, got);
      check($sformatf("%s y[%0d]", tag, i), got, ys[i]);
    end
    for (int k = 0; k < n; k++) begin
      host_rd(1, k, got);
      check($sformatf("%s final state[%0d]", tag, k), got, st[k]);
    end
  endtask

  // 256-point complex FFT, radix-2 decimation in frequency, in place, 1.15
  // twiddles, no scaling (inputs are kept within +/-63 so nothing overflows).
  // Real parts in bank X from 0, imaginary parts in bank Y from 0, twiddles
  // W^k = cos - j sin for k < 128 in X and Y from 256. Three nested DO loops
  // (stages, groups, butterflies; the inner counts come from registers via
  // do.a), eight long instructions per butterfly. A last pass walks the
  // bit-reversed result in natural order with incfft and stores |re| + |im|
  // of bins 0..127 to X from 384.
  function automatic int rev8(int v);
    int r = 0;
    for (int b = 0; b < 8; b++) if (v[b]) r |= 1 << (7 - b);
    return r;
  endfunction
  task automatic fft256();
    localparam int NP = 256;
    data_t xre [NP], xim [NP], wr [NP/2], wi [NP/2], x0r [NP], x0i [NP], got;
    real fr, fi, ang;
    int span, step, groups, i, j, k, cyc, err, maxerr;
    data_t ar, ai, br, bi, tr, ti;
    string tag = "fft_256";
    for (int n = 0; n < NP; n++) begin
      xre[n] = data_t'($urandom_range(0, 126)) - 16'd63;
      xim[n] = data_t'($urandom_range(0, 126)) - 16'd63;
      x0r[n] = xre[n]; x0i[n] = xim[n];
      host_wr(0, n, xre[n]);
      host_wr(1, n, xim[n]);
    end
    for (int t = 0; t < NP / 2; t++) begin
      ang = 2.0 * 3.14159265358979 * t / NP;
      wr[t] = data_t'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
      wi[t] = data_t'($rtoi($floor(-32767.0 * $sin(ang) + 0.5)));
      host_wr(0, 256 + t, wr[t]);
      host_wr(1, 256 + t, wi[t]);
    end
    // bit-exact reference of the program
    span = NP / 2; step = 1; groups = 1;
    for (int st = 0; st < 8; st++) begin
      for (int g = 0; g < groups; g++)
        for (int b = 0; b < span; b++) begin
          i = g * 2 * span + b; j = i + span; k = b * step;
          ar = xre[i]; ai = xim[i]; br = xre[j]; bi = xim[j];
          xre[i] = ar + br; xim[i] = ai + bi;
          tr = ar - br; ti = ai - bi;
          xre[j] = q15(tr, wr[k]) - q15(ti, wi[k]);
          xim[j] = q15(tr, wi[k]) + q15(ti, wr[k]);
        end
      span >>= 1; step <<= 1; groups <<= 1;
    end

    im(0,  mk_imm(SL_AU1, OP_MOVI_A, 5, 128));         // butterflies per group
    im(1,  mk_imm(SL_AU2, OP_MOVI_A, 6, 1));           // twiddle step
    im(2,  mk_imm(SL_AU1, OP_MOVI_A, 7, 1));           // groups
    im(3,  mk_imm(SL_AU2, OP_MOVI_A, 9, 256));         // group stride
    im(4,  mk_imm(SL_AU1, OP_MOVI_A, 10, 256));        // twiddle base
    im(5,  mk_imm(SL_AU2, OP_MOVI_A, 15, 1));
    im(6,  mk_imm(SL_AU1, OP_MOVI_A, 11, 'h80));       // N/2: bit-reversed step
    im(7,  mk_imm(SL_AU2, OP_MOVI_A, 12, 384));        // spectrum pointer
    im(8,  mk_ctl(OP_DO, 0, 8, 23));                   // stages
    im(9,  mk_ptr(4'b0011, 48, 3'b000, 0));
    dec(3, 48, mk_imm(0, OP_MOVI_A, 8, 0));            // a8 = group start
    dec(4, 48, mk_op(0, OP_MOV_A, 10, 0, 3));          // a3 = twiddles
    im(10, mk_ctl(OP_DO_A, 7, 0, 21));                 // groups (a7)
    im(11, mk_ptr(4'b0011, 49, 3'b000, 0));
    dec(3, 49, mk_op(0, OP_MOV_A, 8, 0, 1));           // a1 = i
    dec(4, 49, mk_op(0, OP_INC, 8, 5, 2));             // a2 = i + span
    im(12, mk_ctl(OP_DO_A, 5, 0, 20));                 // butterflies (a5)
    im(13, mk_ptr(4'b1100, 40, 3'b000, 0));
    dec(1, 40, mk_op(0, OP_LD, 1, 1));                 // d1 = ar
    dec(2, 40, mk_op(0, OP_LD, 1, 2));                 // d2 = ai
    im(14, mk_ptr(4'b1100, 41, 3'b000, 0));
    dec(1, 41, mk_op(0, OP_LD, 2, 3));                 // d3 = br
    dec(2, 41, mk_op(0, OP_LD, 2, 4));                 // d4 = bi
    im(15, mk_ptr(4'b1100, 42, 3'b110, 42));
    dec(1, 42, mk_op(0, OP_LD, 3, 5));                 // d5 = wr
    dec(2, 42, mk_op(0, OP_LD, 3, 6));                 // d6 = wi
    dec(5, 42, mk_op(0, OP_ADD, 1, 3, 7));
    dec(6, 42, mk_op(0, OP_ADD, 2, 4, 8));
    im(16, mk_ptr(4'b1110, 43, 3'b110, 43));
    dec(1, 43, mk_op(0, OP_ST, 1, 7));                 // xre[i] = ar + br
    dec(2, 43, mk_op(0, OP_ST, 1, 8));                 // xim[i] = ai + bi
    dec(3, 43, mk_op(0, OP_INC, 1, 15, 1));
    dec(5, 43, mk_op(0, OP_SUB, 1, 3, 9));             // tr
    dec(6, 43, mk_op(0, OP_SUB, 2, 4, 10));            // ti
    im(17, mk_ptr(4'b0001, 44, 3'b110, 44));
    dec(4, 44, mk_op(0, OP_INC, 3, 6, 3));             // next twiddle
    dec(5, 44, mk_op(0, OP_MULTF, 9, 5, 11));          // tr*wr
    dec(6, 44, mk_op(0, OP_MULTF, 10, 6, 12));         // ti*wi
    im(18, mk_ptr(4'b0000, 0, 3'b110, 45));
    dec(5, 45, mk_op(0, OP_MULTF, 9, 6, 13));          // tr*wi
    dec(6, 45, mk_op(0, OP_MULTF, 10, 5, 15));         // ti*wr
    im(19, mk_ptr(4'b0000, 0, 3'b110, 46));
    dec(5, 46, mk_op(0, OP_SUB, 11, 12, 11));
    dec(6, 46, mk_op(0, OP_ADD, 13, 15, 13));
    im(20, mk_ptr(4'b1101, 47, 3'b000, 0));            // butterfly loop end
    dec(1, 47, mk_op(0, OP_ST, 2, 11));                // xre[j]
    dec(2, 47, mk_op(0, OP_ST, 2, 13));                // xim[j]
    dec(4, 47, mk_op(0, OP_INC, 2, 15, 2));
    im(21, mk_ptr(4'b0011, 50, 3'b000, 0));            // group loop end
    dec(3, 50, mk_op(0, OP_INC, 8, 9, 8));
    dec(4, 50, mk_op(0, OP_MOV_A, 10, 0, 3));
    im(22, mk_ptr(4'b0011, 51, 3'b000, 0));
    dec(3, 51, mk_op(0, OP_LSR_A, 5, 15, 5));          // span /= 2
    dec(4, 51, mk_op(0, OP_LSL_A, 6, 15, 6));          // step *= 2
    im(23, mk_ptr(4'b0011, 52, 3'b000, 0));            // stage loop end
    dec(3, 52, mk_op(0, OP_LSL_A, 7, 15, 7));          // groups *= 2
    dec(4, 52, mk_op(0, OP_LSR_A, 9, 15, 9));          // stride /= 2
    im(24, mk_imm(SL_AU1, OP_MOVI_A, 1, 0));
    im(25, mk_ctl(OP_DO, 0, 128, 29));                 // spectrum bins
    im(26, mk_ptr(4'b1110, 53, 3'b000, 0));
    dec(1, 53, mk_op(0, OP_LD, 1, 1));
    dec(2, 53, mk_op(0, OP_LD, 1, 2));
    dec(3, 53, mk_op(0, OP_INCFFT, 1, 11, 1));         // next bin, bit-reversed
    im(27, mk_ptr(4'b0000, 0, 3'b110, 54));
    dec(5, 54, mk_op(0, OP_ABS, 1, 0, 1));
    dec(6, 54, mk_op(0, OP_ABS, 2, 0, 2));
    im(28, mk_op(SL_DU1, OP_ADD, 1, 2, 3));
    im(29, mk_ptr(4'b1001, 55, 3'b000, 0));            // spectrum loop end
    dec(1, 55, mk_op(0, OP_ST, 12, 3));
    dec(4, 55, mk_op(0, OP_INC, 12, 15, 12));
    im(30, mk_ctl(OP_HALT));

    for (int a = 0; a < 256; a++) ex_t[a].delete();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 50000) begin @(posedge clk); cyc++; end
    check({tag, " reaches halt"}, halted, 1);
    repeat (3) @(posedge clk);
    check({tag, " butterflies"}, ex_t[13].size(), 8 * NP / 2);
    for (int b = 1; b < 128; b++)
      check($sformatf("%s stage 0 butterfly %0d: 8 cycles", tag, b), ex(13, b) - ex(13, b - 1), 8);
    check({tag, " total cycles, first to last instruction"}, ex(30) - ex(0) + 1, 9513);
    $display("%s: %0d cycles from first to last instruction, %0d for the butterflies (document's compiled code: 4 per butterfly, %0d)",
             tag, ex(30) - ex(0) + 1, ex(24) - ex(8), 4 * 1024);
    @(negedge clk); rst_n = 0;
    maxerr = 0;
    for (int n = 0; n < NP; n++) begin
      host_rd(0, n, got);
      check($sformatf("%s xre[%0d]", tag, n), got, xre[n]);
      host_rd(1, n, got);
      check($sformatf("%s xim[%0d]", tag, n), got, xim[n]);
    end
    // against a floating-point DFT: bin f sits at bit-reversed position rev8(f)
    for (int f = 0; f < NP; f++) begin
      fr = 0.0; fi = 0.0;
      for (int n = 0; n < NP; n++) begin
        ang = 2.0 * 3.14159265358979 * ((n * f) % NP) / NP;
        fr += $itor($signed(x0r[n])) * $cos(ang) + $itor($signed(x0i[n])) * $sin(ang);
        fi += $itor($signed(x0i[n])) * $cos(ang) - $itor($signed(x0r[n])) * $sin(ang);
      end
      err = $rtoi($sqrt(($itor($signed(xre[rev8(f)])) - fr) ** 2 + ($itor($signed(xim[rev8(f)])) - fi) ** 2));
      if (err > maxerr) maxerr = err;
    end
    // Each 1.15 multiply truncates (at most 1 LSB) and later stages add two
    // such errors per butterfly, so over 8 unscaled stages the error stays
    // below 2 * 255 LSB; the bins themselves reach thousands.
    check({tag, " within 256 LSB of a floating-point DFT"}, maxerr <= 256, 1);
    $display("%s: largest error against a floating-point DFT %0d LSB", tag, maxerr);
    for (int f = 0; f < NP / 2; f++) begin
      host_rd(0, 384 + f, got);
      ar = xre[rev8(f)]; ai = xim[rev8(f)];
      if ($signed(ar) < 0) ar = -ar;
      if ($signed(ai) < 0) ai = -ai;
      tr = ar + ai;
      check($sformatf("%s |X[%0d]|", tag, f), got, tr);
    end
  endtask

  // Single-output FIR (fir_32_1): y = sum h[t]*x[t] as one repeated
  // multiply-accumulate instruction, the same step as the matrix multiply.
  task automatic fir1(int n);
    data_t x [32], h [32], y, got;
    int cyc;
    string tag;
    tag = $sformatf("fir_%0d_1", n);
    y = '0;
    for (int t = 0; t < n; t++) begin
      x[t] = data_t'($urandom_range(0, 200)) - 16'd100;
      h[t] = data_t'($urandom_range(0, 60)) - 16'd30;
      host_wr(0, t, x[t]);
      host_wr(1, t, h[t]);
      y = y + data_t'(x[t] * h[t]);
    end
    im(0,  mk_ptr(4'b0011, 60, 3'b110, 60));
    dec(3, 60, mk_imm(0, OP_MOVI_A, 1, 0));            // a1 = x
    dec(4, 60, mk_imm(0, OP_MOVI_A, 2, 0));            // a2 = h
    dec(5, 60, mk_op(0, OP_SETACC0, 0));
    dec(6, 60, mk_imm(0, OP_MOVI_D, 1, 0));
    im(1,  mk_imm(SL_AU1, OP_MOVI_A, 15, 1));
    im(2,  mk_ctl(OP_REP, 0, n));
    im(3,  mk_ptr(4'b1111, 61, 3'b100, 61));
    dec(1, 61, mk_op(0, OP_LD, 1, 1));
    dec(2, 61, mk_op(0, OP_LD, 2, 2));
    dec(3, 61, mk_op(0, OP_INC, 1, 15, 1));
    dec(4, 61, mk_op(0, OP_INC, 2, 15, 2));
    dec(5, 61, mk_op(0, OP_MADD2M, 1, 2, 15));
    im(4,  mk_ptr(4'b0000, 0, 3'b100, 62));
    dec(5, 62, mk_op(0, OP_MADD2M, 1, 2, 15));         // last product
    im(5,  mk_op(SL_DU1, OP_MADD2D0, 0, 0, 4));        // d4 = y
    im(6,  mk_imm(SL_AU1, OP_MOVI_A, 13, 'h100));
    im(7,  mk_op(SL_MU1, OP_ST, 13, 4));
    im(8,  mk_ctl(OP_HALT));
    for (int a = 0; a < 256; a++) ex_t[a].delete();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 5000) begin @(posedge clk); cyc++; end
    check({tag, " reaches halt"}, halted, 1);
    repeat (3) @(posedge clk);
    check({tag, " taps"}, ex_t[3].size(), n);
    check({tag, " total cycles, first to last instruction"}, ex(8) - ex(0) + 1, n + 9);
    $display("%s: %0d cycles from first to last instruction (document's compiled code: %0d)",
             tag, ex(8) - ex(0) + 1, n + 4 + 2);
    @(negedge clk); rst_n = 0;
    host_rd(0, 'h100, got);
    check({tag, " y"}, got, y);
  endtask

  function automatic int ex(int a, int k = 0);
    if (k < ex_t[a].size()) return ex_t[a][k];
    return -100000;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    mmul(4);
    mmul(10);
    fir1(32);
    fir(32, 2, 'h100);
    fir(256, 64, 'h180);
    iir(1, 1);
    iir(4, 64);
    lms(8, 1);
    lms(32, 64);
    latnrm(8, 1);
    latnrm(32, 64);
    fft256();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
