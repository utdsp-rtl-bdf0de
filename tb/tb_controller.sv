// tb_controller: self-checking test of the controller unit (interrupts, DMA).
//
// Interrupts: random pulses on the three request lines. A reference keeps
// the pending set (set on a rising edge); whenever no routine runs, requests
// are allowed and no DMA is busy, int_req must be high and int_vec must be
// the vector of the lowest pending line (base + n * 16). The testbench
// acknowledges at random, then returns at random; int_req must stay low
// while a routine runs.
// DMA: random traps (all four codes, random address and length) with a
// random-ready IO side. Words read from IO must land in the chosen bank at
// consecutive addresses; words written to IO must come from the bank in
// order. stall must be high from the cycle after the trap until the last
// word has moved, and a transfer of L words with an always-ready IO side
// must take exactly L stall cycles.
//
// The trap codes follow the document; the handshake, interrupt priority and
// one-word-per-cycle rate are this design's own and are checked as such.
`timescale 1ns/1ps
module tb_controller;
  import utdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NIRQ-1:0] irq = '0;
  logic int_allowed = 1, int_req, int_ack = 0, int_return = 0, in_isr;
  pc_t int_vec;
  logic trap_valid = 0;
  logic [7:0] trap_code = '0;
  data_t trap_addr = '0, trap_len = '0;
  logic stall, dma_busy, dma_sel_y, dma_we;
  logic [8:0] dma_addr;
  data_t dma_wdata, dma_rdata;
  logic io_in_valid = 0, io_in_ready, io_out_valid, io_out_ready = 0;
  data_t io_in_data = '0, io_out_data;
  int checks = 0, failures = 0;

  controller #(.MAW(9)) dut (.*);

  // the two data banks
  data_t bank [2][512];
  assign dma_rdata = bank[dma_sel_y][dma_addr];
  always @(posedge clk) if (dma_busy && dma_we) bank[dma_sel_y][dma_addr] <= dma_wdata;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- interrupts ----------------
  task automatic irq_test();
    logic [NIRQ-1:0] pend, prev;
    bit isr;
    int acks = 0;
    pend = '0; prev = '0; isr = 0;
    repeat (3000) begin
      logic [NIRQ-1:0] nirq;
      int first;
      @(negedge clk);
      int_ack = 0; int_return = 0;
      nirq = ($urandom_range(0, 5) == 0) ? NIRQ'($urandom) : irq;
      irq = nirq;
      int_allowed = ($urandom_range(0, 4) != 0);
      #1;
      first = -1;
      for (int n = NIRQ - 1; n >= 0; n--) if (pend[n]) first = n;
      check("int_req", int_req, first >= 0 && !isr && int_allowed);
      if (int_req && first >= 0)
        check("int_vec", int_vec, INT_VEC_BASE + first * INT_VEC_STRIDE);
      if (int_req && $urandom_range(0, 1) == 1) begin
        int_ack = 1; acks++;
        pend[first] = 0; isr = 1;
      end else if (isr && $urandom_range(0, 7) == 0) begin
        int_return = 1; isr = 0;
      end
      // edges seen at this clock set pending after it
      for (int n = 0; n < NIRQ; n++) if (irq[n] && !prev[n]) pend[n] = 1;
      prev = irq;
      @(posedge clk); #1;
      check("in_isr", in_isr, isr);
    end
    @(negedge clk) begin int_ack = 0; int_return = 0; irq = '0; end
    check("interrupts were acknowledged", acks > 10, 1);
  endtask

  // ---------------- DMA ----------------
  task automatic dma_test(bit always_ready);
    repeat (60) begin
      logic [7:0] code;
      int addr, len, y, rd, k, st;
      data_t src [$], got [$];
      case ($urandom_range(0, 3))
        0: code = TRAP_RD_X;
        1: code = TRAP_RD_Y;
        2: code = TRAP_WR_X;
        default: code = TRAP_WR_Y;
      endcase
      y = (code == TRAP_RD_Y || code == TRAP_WR_Y);
      rd = (code == TRAP_RD_X || code == TRAP_RD_Y);
      len = $urandom_range(1, 12);
      addr = $urandom_range(0, 511 - len);
      for (int w = 0; w < 512; w++) begin bank[0][w] = data_t'($urandom); bank[1][w] = data_t'($urandom); end
      for (int w = 0; w < len; w++) src.push_back(rd ? data_t'($urandom) : bank[y][addr + w]);
      @(negedge clk);
      trap_valid = 1; trap_code = code; trap_addr = data_t'(addr); trap_len = data_t'(len);
      @(negedge clk);
      trap_valid = 0;
      check("stall after trap", stall, 1);
      k = 0; st = 0;
      while (stall && st < 200) begin
        io_in_valid = rd && k < len && (always_ready || $urandom_range(0, 2) != 0);
        io_in_data = (k < len) ? src[k] : '0;
        io_out_ready = always_ready || ($urandom_range(0, 2) != 0);
        @(posedge clk);
        st++;
        if (rd && io_in_valid && io_in_ready) k++;
        if (!rd && io_out_valid && io_out_ready) got.push_back(io_out_data);
        @(negedge clk);
      end
      io_in_valid = 0; io_out_ready = 0;
      if (always_ready) check("stall cycles = words", st, len);
      if (rd) begin
        check("words taken", k, len);
        for (int w = 0; w < len; w++)
          check($sformatf("bank %0d word %0d", y, addr + w), bank[y][addr + w], src[w]);
      end else begin
        check("words sent", got.size(), len);
        for (int w = 0; w < len && w < got.size(); w++) check("sent word", got[w], src[w]);
      end
    end
    // zero length does nothing
    @(negedge clk);
    trap_valid = 1; trap_code = TRAP_RD_X; trap_len = '0;
    @(negedge clk);
    trap_valid = 0;
    check("zero length, no stall", stall, 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    irq_test();
    dma_test(1);
    dma_test(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
