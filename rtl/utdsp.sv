// utdsp: the UTDSP core with its on-chip memories (top level).
//
// A VLIW DSP that issues up to seven operations per cycle (MU1, MU2, AU1, AU2,
// DU1, DU2, PCU) over a 16-bit fixed-point datapath, while fetching only one
// 32-bit word per cycle from its instruction memory. A word is either a
// single operation (uni-op) or a pointer into the seven-bank decoder memory
// whose two address fields and two bank masks select a long instruction
// (see decoder_memory).
//
// Pipeline, five stages:
//   IF1  PC unit drives the instruction memory (256 x 32); word -> IF1/IF2.
//   IF2  decoder memory expands the word into seven operations -> IF2/ID.
//   ID   register files are read (REG A: 16 address registers, 6 read ports;
//        REG D: 16 integer registers, 8 read ports); the PCU resolves control
//        operations and the PC unit acts on them -> ID/EX.
//   EX   AUs and DUs compute; MUs access data bank X (MU1) and Y (MU2) with
//        register-indirect addresses from the start of the stage -> EX/WB.
//   WB   results are written (4 write ports per register file).
// RAW hazards need no stalls: a result in EX/WB is forwarded to every EX
// operand that names its register (distance one), and the register files
// are write-through (distance two). The PCU's own operands, used in ID, are
// also forwarded from the results being produced in EX so branch conditions
// see the latest value.
// Register-file ports: REG A read 0 = MU1 address, 1 = MU2 address or PCU,
// 2/3 = AU1, 4/5 = AU2; write 0 = AU1, 1 = AU2, 2 = PCU (mov2a), 3 = MU1
// (kept for the document's four write ports; no operation in this instruction
// set loads an address register, so it stays unused).
// REG D read 0 = MU1 store data, 1 = MU2 store data or PCU, 2-4 = DU1 i/j/k,
// 5-7 = DU2 i/j/k; write 0 = MU1 load, 1 = MU2 load or PCU (mov2d), 2 = DU1,
// 3 = DU2. The PCU shares MU2's ports, so a long instruction must not use both.
//
// The controller unit takes DMA requests (trap) and three interrupt lines; a
// DMA transfer holds the whole pipeline (stall). Interrupts are offered only
// when no control operation is in IF1, IF2 or ID, so the pushed return address
// is final.
//
// Loading: the instruction and decoder memories are written through im_* and
// dec_* (single-ported macros; load while the core is in reset or halted). The
// data banks can be read and written through host_* while host_en is high
// (again only while the core is not running); a DMA transfer takes the bank
// before the host, the host before the memory units.
module utdsp
  import utdsp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // program loading
  input  logic           im_we,
  input  pc_t            im_addr,
  input  word_t          im_wdata,
  input  logic           dec_we,
  input  logic [2:0]     dec_bank,
  input  logic [7:0]     dec_addr,
  input  word_t          dec_wdata,
  // host access to the data banks
  input  logic           host_en,
  input  logic           host_sel_y,
  input  logic           host_we,
  input  logic [8:0]     host_addr,
  input  data_t          host_wdata,
  output data_t          host_rdata,
  // interrupts and IO
  input  logic [NIRQ-1:0] irq,
  input  logic           io_in_valid,
  input  data_t          io_in_data,
  output logic           io_in_ready,
  output logic           io_out_valid,
  output data_t          io_out_data,
  input  logic           io_out_ready,
  // status
  output pc_t            pc,
  output logic           idle,
  output logic           halted
);
  localparam int MAW = 9;

  // ------------------------------------------------------------------
  // Control signals shared across stages
  // ------------------------------------------------------------------
  logic stall, run;
  pc_t  next_pc;
  logic fetch_valid, kill_if1, kill_if2;
  logic int_req, int_ack, int_return, int_allowed;
  pc_t  int_vec;

  assign run = !stall;

  // ------------------------------------------------------------------
  // IF1: instruction memory
  // ------------------------------------------------------------------
  word_t im_rdata;
  sram_sp #(.DEPTH(256), .WIDTH(32)) u_imem (
    .clk(clk), .we(im_we), .addr(im_we ? im_addr : pc),
    .wdata(im_wdata), .rdata(im_rdata)
  );

  logic  f_valid;
  word_t f_ir;
  pc_t   f_next_pc;
  pc_t   f_pc, d_pc, e_pc;   // address of the instruction in IF2, ID, EX (trace)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_valid   <= 1'b0;
      f_ir      <= '0;
      f_next_pc <= '0;
      f_pc      <= '0;
    end else if (run) begin
      f_pc      <= pc;
      f_valid   <= fetch_valid && !kill_if1;
      f_ir      <= im_rdata;
      f_next_pc <= next_pc;
    end
  end

  // ------------------------------------------------------------------
  // IF2: decoder memory
  // ------------------------------------------------------------------
  word_t dm_ops [NSLOT];
  logic [NSLOT-1:0] dm_valid;
  logic  dm_multi;
  decoder_memory u_decmem (
    .clk(clk), .ld_we(dec_we), .ld_bank(dec_bank), .ld_addr(dec_addr),
    .ld_data(dec_wdata), .ir_valid(f_valid), .ir(f_ir),
    .ops(dm_ops), .slot_valid(dm_valid), .is_multi(dm_multi)
  );

  logic [NSLOT-1:0] d_valid;
  word_t d_ops [NSLOT];
  pc_t   d_next_pc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid   <= '0;
      d_next_pc <= '0;
      d_pc      <= '0;
      for (int s = 0; s < NSLOT; s++) d_ops[s] <= '0;
    end else if (run) begin
      d_pc      <= f_pc;
      d_valid   <= kill_if2 ? '0 : dm_valid;
      d_next_pc <= f_next_pc;
      for (int s = 0; s < NSLOT; s++) d_ops[s] <= dm_ops[s];
    end
  end

  // ------------------------------------------------------------------
  // ID: register read, PCU, PC unit
  // ------------------------------------------------------------------
  logic [5:0][RAW-1:0] ra_addr;
  logic [5:0][DW-1:0]  ra_data;
  logic [7:0][RAW-1:0] rd_addr;
  logic [7:0][DW-1:0]  rd_data;
  wreq_t w_a [4];   // EX/WB: REG A write requests
  wreq_t w_d [4];   // EX/WB: REG D write requests
  wreq_t x_a [4];   // EX results headed for REG A
  wreq_t x_d [4];   // EX results headed for REG D

  // PCU decode
  reg_t  pcu_rd_a, pcu_rd_d;
  logic  pcu_uses_a, pcu_uses_d;
  logic  pcu_jmp, pcu_jsr, pcu_rts, pcu_rep, pcu_do, pcu_wait, pcu_halt, pcu_branch;
  pc_t   pcu_target;
  logic [CNTW-1:0] pcu_count;
  wreq_t pcu_wr_a, pcu_wr_d;
  logic  pcu_trap;
  logic [7:0] pcu_trap_code;
  data_t pcu_trap_addr, pcu_trap_len;
  logic  pcu_flow;
  data_t pcu_a_val, pcu_d_val;

  always_comb begin
    ra_addr[0] = op_i(d_ops[SL_MU1]);
    ra_addr[1] = pcu_uses_a ? pcu_rd_a : op_i(d_ops[SL_MU2]);
    ra_addr[2] = op_i(d_ops[SL_AU1]);
    ra_addr[3] = op_j(d_ops[SL_AU1]);
    ra_addr[4] = op_i(d_ops[SL_AU2]);
    ra_addr[5] = op_j(d_ops[SL_AU2]);
    rd_addr[0] = op_j(d_ops[SL_MU1]);
    rd_addr[1] = pcu_uses_d ? pcu_rd_d : op_j(d_ops[SL_MU2]);
    rd_addr[2] = op_i(d_ops[SL_DU1]);
    rd_addr[3] = op_j(d_ops[SL_DU1]);
    rd_addr[4] = op_k(d_ops[SL_DU1]);
    rd_addr[5] = op_i(d_ops[SL_DU2]);
    rd_addr[6] = op_j(d_ops[SL_DU2]);
    rd_addr[7] = op_k(d_ops[SL_DU2]);
  end

  logic [3:0]          rfa_we, rfd_we;
  logic [3:0][RAW-1:0] rfa_waddr, rfd_waddr;
  logic [3:0][DW-1:0]  rfa_wdata, rfd_wdata;
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      rfa_we[p] = w_a[p].en && run;  rfa_waddr[p] = w_a[p].addr;  rfa_wdata[p] = w_a[p].data;
      rfd_we[p] = w_d[p].en && run;  rfd_waddr[p] = w_d[p].addr;  rfd_wdata[p] = w_d[p].data;
    end
  end

  regfile #(.NR(6), .NW(4), .NREGS(NREG), .W(DW)) u_rega (
    .clk(clk), .rst_n(rst_n), .raddr(ra_addr), .rdata(ra_data),
    .we(rfa_we), .waddr(rfa_waddr), .wdata(rfa_wdata)
  );
  regfile #(.NR(8), .NW(4), .NREGS(NREG), .W(DW)) u_regd (
    .clk(clk), .rst_n(rst_n), .raddr(rd_addr), .rdata(rd_data),
    .we(rfd_we), .waddr(rfd_waddr), .wdata(rfd_wdata)
  );

  // Forward a value from a set of write requests (highest port wins).
  function automatic data_t fwd(wreq_t w [4], reg_t r, data_t v);
    data_t o;
    o = v;
    for (int p = 0; p < 4; p++) if (w[p].en && w[p].addr == r) o = w[p].data;
    return o;
  endfunction
  function automatic logic hit(wreq_t w [4], reg_t r);
    logic h;
    h = 1'b0;
    for (int p = 0; p < 4; p++) if (w[p].en && w[p].addr == r) h = 1'b1;
    return h;
  endfunction

  // PCU operands in ID: register file (write-through from WB) then EX results.
  assign pcu_a_val = fwd(x_a, pcu_rd_a, ra_data[1]);
  assign pcu_d_val = fwd(x_d, pcu_rd_d, rd_data[1]);

  pcu u_pcu (
    .valid(d_valid[SL_PCU]), .op(d_ops[SL_PCU]), .a_val(pcu_a_val), .d_val(pcu_d_val),
    .rd_a(pcu_rd_a), .rd_d(pcu_rd_d), .uses_a(pcu_uses_a), .uses_d(pcu_uses_d),
    .jmp(pcu_jmp), .jsr(pcu_jsr), .rts(pcu_rts), .rep(pcu_rep), .do_loop(pcu_do),
    .wait_o(pcu_wait), .halt(pcu_halt), .branch(pcu_branch), .target(pcu_target),
    .count(pcu_count), .wr_a(pcu_wr_a), .wr_d(pcu_wr_d), .trap(pcu_trap),
    .trap_code(pcu_trap_code), .trap_addr(pcu_trap_addr), .trap_len(pcu_trap_len),
    .is_ctrl_flow(pcu_flow)
  );

  logic loop_back, repeating, stack_err;
  logic [2:0] do_depth;
  pc_unit u_pc (
    .clk(clk), .rst_n(rst_n), .stall(stall),
    .id_jmp(pcu_jmp), .id_jsr(pcu_jsr), .id_rts(pcu_rts), .id_rep(pcu_rep),
    .id_do(pcu_do), .id_wait(pcu_wait), .id_halt(pcu_halt),
    .id_target(pcu_target), .id_count(pcu_count), .id_next_pc(d_next_pc),
    .int_req(int_req), .int_vec(int_vec),
    .pc(pc), .next_pc(next_pc), .fetch_valid(fetch_valid),
    .kill_if1(kill_if1), .kill_if2(kill_if2),
    .int_ack(int_ack), .int_return(int_return), .loop_back(loop_back),
    .repeating(repeating), .idle(idle), .halted(halted),
    .do_depth(do_depth), .stack_err(stack_err)
  );

  // Interrupts wait while a control operation is in IF1, IF2 or ID.
  function automatic logic flow_op(word_t w);
    return op_code(w) inside {OP_JMP, OP_JMP_A, OP_JSR, OP_RTS, OP_BEQZ_A,
        OP_BNEZ_A, OP_BEQZ_D, OP_BNEZ_D, OP_REP, OP_DO, OP_DO_A, OP_DO_D,
        OP_WAIT, OP_HALT, OP_TRAP};
  endfunction
  logic if1_may_ctrl, if2_ctrl;
  assign if1_may_ctrl = fetch_valid &&
      (im_rdata[31] ? im_rdata[12] : (im_rdata[30:28] == 3'(SL_PCU) && flow_op(im_rdata)));
  assign if2_ctrl     = dm_valid[SL_PCU] && flow_op(dm_ops[SL_PCU]);
  assign int_allowed  = !pcu_flow && !if2_ctrl && !if1_may_ctrl && !repeating;

  // ID/EX register
  logic [NSLOT-1:0] e_valid;
  word_t e_ops [NSLOT];
  data_t e_mu_addr [2], e_mu_st [2];
  data_t e_au_a [2], e_au_b [2];
  data_t e_du_a [2], e_du_b [2], e_du_c [2];
  wreq_t e_pcu_wa, e_pcu_wd;
  logic  e_trap;
  logic [7:0] e_trap_code;
  data_t e_trap_addr, e_trap_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= '0;
      e_pc    <= '0;
      for (int s = 0; s < NSLOT; s++) e_ops[s] <= '0;
      for (int u = 0; u < 2; u++) begin
        e_mu_addr[u] <= '0; e_mu_st[u] <= '0;
        e_au_a[u] <= '0; e_au_b[u] <= '0;
        e_du_a[u] <= '0; e_du_b[u] <= '0; e_du_c[u] <= '0;
      end
      e_pcu_wa <= '0; e_pcu_wd <= '0;
      e_trap <= 1'b0; e_trap_code <= '0; e_trap_addr <= '0; e_trap_len <= '0;
    end else if (run) begin
      e_valid <= d_valid;
      e_pc    <= d_pc;
      for (int s = 0; s < NSLOT; s++) e_ops[s] <= d_ops[s];
      e_mu_addr[0] <= ra_data[0];  e_mu_st[0] <= rd_data[0];
      e_mu_addr[1] <= ra_data[1];  e_mu_st[1] <= rd_data[1];
      e_au_a[0] <= ra_data[2];  e_au_b[0] <= ra_data[3];
      e_au_a[1] <= ra_data[4];  e_au_b[1] <= ra_data[5];
      e_du_a[0] <= rd_data[2];  e_du_b[0] <= rd_data[3];  e_du_c[0] <= rd_data[4];
      e_du_a[1] <= rd_data[5];  e_du_b[1] <= rd_data[6];  e_du_c[1] <= rd_data[7];
      e_pcu_wa <= pcu_wr_a;
      e_pcu_wd <= pcu_wr_d;
      e_trap      <= pcu_trap;
      e_trap_code <= pcu_trap_code;
      e_trap_addr <= pcu_trap_addr;
      e_trap_len  <= pcu_trap_len;
    end
  end

  // ------------------------------------------------------------------
  // EX: bypassed operands and execution units
  // ------------------------------------------------------------------
  data_t x_mu_addr [2], x_mu_st [2];
  data_t x_au_a [2], x_au_b [2];
  data_t x_du_a [2], x_du_b [2], x_du_c [2];
  logic  bypass_used;

  always_comb begin
    bypass_used = 1'b0;
    for (int u = 0; u < 2; u++) begin
      word_t mo, ao, dop;
      mo  = e_ops[SL_MU1 + u];
      ao  = e_ops[SL_AU1 + u];
      dop = e_ops[SL_DU1 + u];
      x_mu_addr[u] = fwd(w_a, op_i(mo), e_mu_addr[u]);
      x_mu_st[u]   = fwd(w_d, op_j(mo), e_mu_st[u]);
      x_au_a[u]    = fwd(w_a, op_i(ao), e_au_a[u]);
      x_au_b[u]    = fwd(w_a, op_j(ao), e_au_b[u]);
      x_du_a[u]    = fwd(w_d, op_i(dop), e_du_a[u]);
      x_du_b[u]    = fwd(w_d, op_j(dop), e_du_b[u]);
      x_du_c[u]    = fwd(w_d, op_k(dop), e_du_c[u]);
      if (e_valid[SL_MU1 + u] && (hit(w_a, op_i(mo)) || hit(w_d, op_j(mo))))
        bypass_used = 1'b1;
      if (e_valid[SL_AU1 + u] && (hit(w_a, op_i(ao)) || hit(w_a, op_j(ao))))
        bypass_used = 1'b1;
      if (e_valid[SL_DU1 + u] && (hit(w_d, op_i(dop)) || hit(w_d, op_j(dop)) ||
                                  hit(w_d, op_k(dop))))
        bypass_used = 1'b1;
    end
  end

  // Data banks and their port multiplexers
  logic           dma_busy, dma_sel_y, dma_we;
  logic [MAW-1:0] dma_addr;
  data_t          dma_wdata, dma_rdata;
  logic [MAW-1:0] mu_addr [2];
  logic           mu_we [2];
  data_t          mu_wdata [2];
  data_t          bank_rdata [2];
  logic [MAW-1:0] bank_addr [2];
  logic           bank_we [2];
  data_t          bank_wdata [2];
  wreq_t          mu_wr [2];

  for (genvar u = 0; u < 2; u++) begin : g_mem
    mem_unit #(.MAW(MAW)) u_mu (
      .valid(e_valid[SL_MU1 + u]), .op(e_ops[SL_MU1 + u]),
      .addr_val(x_mu_addr[u]), .st_val(x_mu_st[u]),
      .mem_addr(mu_addr[u]), .mem_we(mu_we[u]), .mem_wdata(mu_wdata[u]),
      .mem_rdata(bank_rdata[u]), .wr(mu_wr[u])
    );

    always_comb begin
      if (dma_busy && dma_sel_y == u[0]) begin
        bank_addr[u] = dma_addr;  bank_we[u] = dma_we;  bank_wdata[u] = dma_wdata;
      end else if (host_en && host_sel_y == u[0]) begin
        bank_addr[u] = host_addr; bank_we[u] = host_we; bank_wdata[u] = host_wdata;
      end else begin
        bank_addr[u] = mu_addr[u]; bank_we[u] = mu_we[u] && run; bank_wdata[u] = mu_wdata[u];
      end
    end

    data_mem #(.WORDS(512)) u_bank (
      .clk(clk), .we(bank_we[u]), .addr(bank_addr[u]),
      .wdata(bank_wdata[u]), .rdata(bank_rdata[u])
    );
  end

  assign dma_rdata  = dma_sel_y ? bank_rdata[1] : bank_rdata[0];
  assign host_rdata = host_sel_y ? bank_rdata[1] : bank_rdata[0];

  // Address units
  wreq_t au_wr [2];
  logic  bs_valid [2], bs_which [2];
  data_t bs_start [2], bs_end [2];
  data_t au_buf_start [2], au_buf_end [2];
  logic  au_wrapped [2];
  for (genvar u = 0; u < 2; u++) begin : g_au
    addr_unit #(.UNIT(u + 1)) u_au (
      .clk(clk), .rst_n(rst_n), .en(run), .valid(e_valid[SL_AU1 + u]),
      .op(e_ops[SL_AU1 + u]), .a(x_au_a[u]), .b(x_au_b[u]), .wr(au_wr[u]),
      .bufset_valid_o(bs_valid[u]), .bufset_which_o(bs_which[u]),
      .bufset_start_o(bs_start[u]), .bufset_end_o(bs_end[u]),
      .bufset_valid_i(bs_valid[1-u]), .bufset_which_i(bs_which[1-u]),
      .bufset_start_i(bs_start[1-u]), .bufset_end_i(bs_end[1-u]),
      .buf_start(au_buf_start[u]), .buf_end(au_buf_end[u]),
      .wrapped(au_wrapped[u])
    );
  end

  // Integer units
  wreq_t du_wr [2];
  data_t du_acc0 [2], du_acc1 [2];
  logic  du_mac [2];
  for (genvar u = 0; u < 2; u++) begin : g_du
    int_unit u_du (
      .clk(clk), .rst_n(rst_n), .en(run), .valid(e_valid[SL_DU1 + u]),
      .op(e_ops[SL_DU1 + u]), .a(x_du_a[u]), .b(x_du_b[u]), .c(x_du_c[u]),
      .wr(du_wr[u]), .acc0(du_acc0[u]), .acc1(du_acc1[u]), .mac_op(du_mac[u])
    );
  end

  // EX results, by write port
  always_comb begin
    x_a[0] = au_wr[0];
    x_a[1] = au_wr[1];
    x_a[2] = e_valid[SL_PCU] ? e_pcu_wa : '0;
    x_a[3] = '0;
    x_d[0] = mu_wr[0];
    x_d[1] = mu_wr[1].en ? mu_wr[1] : (e_valid[SL_PCU] ? e_pcu_wd : '0);
    x_d[2] = du_wr[0];
    x_d[3] = du_wr[1];
  end

  // EX/WB register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 4; p++) begin w_a[p] <= '0; w_d[p] <= '0; end
    end else if (run) begin
      for (int p = 0; p < 4; p++) begin w_a[p] <= x_a[p]; w_d[p] <= x_d[p]; end
    end
  end

  // ------------------------------------------------------------------
  // Controller: DMA and interrupts
  // ------------------------------------------------------------------
  logic in_isr;
  controller #(.MAW(MAW)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .irq(irq), .int_allowed(int_allowed), .int_req(int_req), .int_vec(int_vec),
    .int_ack(int_ack), .int_return(int_return), .in_isr(in_isr),
    .trap_valid(e_trap && e_valid[SL_PCU] && run), .trap_code(e_trap_code),
    .trap_addr(e_trap_addr), .trap_len(e_trap_len),
    .stall(stall), .dma_busy(dma_busy),
    .dma_sel_y(dma_sel_y), .dma_addr(dma_addr), .dma_we(dma_we),
    .dma_wdata(dma_wdata), .dma_rdata(dma_rdata),
    .io_in_valid(io_in_valid), .io_in_data(io_in_data), .io_in_ready(io_in_ready),
    .io_out_valid(io_out_valid), .io_out_data(io_out_data), .io_out_ready(io_out_ready)
  );
endmodule
