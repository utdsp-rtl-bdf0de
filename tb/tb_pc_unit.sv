// tb_pc_unit: self-checking test of the PC unit (next-PC selection, DO-loop
// stack, repeat counter, return stack, wait/halt).
//
// The testbench plays the rest of the front end: it keeps the IF1/IF2 and
// IF2/ID pipeline registers (with the unit's kill signals), holds a small
// program of control operations, and drives the id_* inputs from the
// instruction in ID. The sequence of addresses reaching ID is compared with
// the sequence a plain sequential interpreter of the same program produces
// (nested DO loops, rep #N, jsr/rts, jmp, halt). The cycle count is checked
// too: DO loops cost nothing per iteration, a taken jmp/jsr/rts costs two
// cycles, rep #0 and rep #N (N >= 2) one cycle. Random stall cycles must
// change nothing but time. A second program checks wait: the PC holds until
// an interrupt request, the vector runs, and rts returns after the wait.
//
// The next-PC priority, loop nesting and two-cycle branch penalty follow the
// document; the rep bubble, the vector addresses and the JSR depth are this
// design's own.
`timescale 1ns/1ps
module tb_pc_unit;
  import utdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stall = 0;
  logic id_jmp, id_jsr, id_rts, id_rep, id_do, id_wait, id_halt;
  pc_t id_target, id_next_pc, pc, next_pc, int_vec = 8'h40;
  logic [CNTW-1:0] id_count;
  logic int_req = 0;
  logic fetch_valid, kill_if1, kill_if2, int_ack, int_return, loop_back,
        repeating, idle, halted, stack_err;
  logic [2:0] do_depth;
  int checks = 0, failures = 0;

  pc_unit dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum { K_NOP, K_JMP, K_JSR, K_RTS, K_REP, K_DO, K_WAIT, K_HALT } kind_t;
  typedef struct { kind_t k; int t; int n; } ins_t;
  ins_t prog [256];

  // front-end pipeline model
  logic f_v, d_v;
  pc_t f_pc, f_next, d_pc, d_next;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_v <= 0; d_v <= 0; f_pc <= '0; d_pc <= '0; f_next <= '0; d_next <= '0;
    end else if (!stall) begin
      f_v <= fetch_valid && !kill_if1; f_pc <= pc; f_next <= next_pc;
      d_v <= f_v && !kill_if2; d_pc <= f_pc; d_next <= f_next;
    end
  end
  always_comb begin
    ins_t x;
    x = prog[d_pc];
    id_jmp  = d_v && x.k == K_JMP;
    id_jsr  = d_v && x.k == K_JSR;
    id_rts  = d_v && x.k == K_RTS;
    id_rep  = d_v && x.k == K_REP;
    id_do   = d_v && x.k == K_DO;
    id_wait = d_v && x.k == K_WAIT;
    id_halt = d_v && x.k == K_HALT;
    id_target = pc_t'(x.t);
    id_count  = CNTW'(x.n);
    id_next_pc = d_next;
  end

  int trace [$];
  int id_cycles [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !stall && d_v) begin trace.push_back(int'(d_pc)); id_cycles.push_back(cyc); end
    if (rst_n) begin
      checks++;
      if (stack_err) begin failures++; $display("FAIL stack error"); end
    end
  end

  // sequential reference
  task automatic interpret(output int seq [$], output int bubbles);
    int p, rep_n;
    int lb [$], le [$], ll [$], rs [$];
    p = 0; rep_n = -1; bubbles = 0;
    seq.delete();
    while (seq.size() < 1000) begin
      ins_t x;
      x = prog[p];
      seq.push_back(p);
      if (rep_n > 1) begin rep_n--; continue; end
      rep_n = -1;
      case (x.k)
        K_HALT: return;
        K_JMP: begin p = x.t; bubbles += 2; continue; end
        K_JSR: begin rs.push_back(p + 1); p = x.t; bubbles += 2; continue; end
        K_RTS: begin p = rs.pop_back(); bubbles += 2; continue; end
        K_REP: begin
          if (x.n == 0) begin p += 2; bubbles += 1; continue; end
          rep_n = x.n;
          if (x.n >= 2) bubbles += 1;
        end
        K_DO: begin lb.push_back(p + 1); le.push_back(x.t); ll.push_back(x.n); end
        default: ;
      endcase
      if (le.size() != 0 && p == le[le.size() - 1]) begin
        ll[ll.size() - 1]--;
        if (ll[ll.size() - 1] > 0) begin p = lb[lb.size() - 1]; continue; end
        void'(lb.pop_back()); void'(le.pop_back()); void'(ll.pop_back());
      end
      p++;
    end
  endtask

  task automatic run_prog(string name, bit with_stalls);
    int exp [$];
    int bub, k;
    interpret(exp, bub);
    trace.delete(); id_cycles.delete();
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    k = 0;
    while (!halted && k < 2000) begin
      @(negedge clk);
      stall = with_stalls && ($urandom_range(0, 3) == 0);
      k++;
    end
    stall = 0;
    repeat (3) @(negedge clk);
    check({name, " trace length"}, trace.size(), exp.size());
    for (int i = 0; i < exp.size() && i < trace.size(); i++)
      check($sformatf("%s step %0d", name, i), trace[i], exp[i]);
    if (!with_stalls && trace.size() == exp.size())
      check({name, " cycles"}, id_cycles[id_cycles.size() - 1] - id_cycles[0],
            exp.size() - 1 + bub);
    $display("%s: %0d instructions, %0d lost cycles expected", name, exp.size(), bub);
  endtask

  function automatic ins_t I(kind_t k, int t = 0, int n = 0);
    ins_t x;
    x.k = k; x.t = t; x.n = n;
    return x;
  endfunction

  int seen_loop = 0, seen_rep = 0;
  always @(posedge clk) begin
    if (loop_back) seen_loop++;
    if (repeating) seen_rep++;
  end

  initial begin
    for (int a = 0; a < 256; a++) prog[a] = I(K_NOP);
    prog[1]  = I(K_DO, 8, 3);      // body 2..8
    prog[3]  = I(K_DO, 5, 2);      // body 4..5
    prog[6]  = I(K_REP, 0, 3);
    prog[9]  = I(K_JSR, 40);
    prog[10] = I(K_JMP, 12);
    prog[12] = I(K_REP, 0, 0);
    prog[14] = I(K_REP, 0, 1);
    prog[16] = I(K_DO, 18, 4);     // two-instruction body
    prog[19] = I(K_DO, 22, 1);     // single pass
    prog[23] = I(K_REP, 0, 2);
    prog[25] = I(K_DO, 28, 5);
    prog[26] = I(K_REP, 0, 3);     // rep inside a loop body
    prog[30] = I(K_HALT);
    prog[40] = I(K_JSR, 44);
    prog[41] = I(K_RTS);
    prog[45] = I(K_RTS);
    repeat (2) @(negedge clk);
    run_prog("program A", 0);
    run_prog("program A with stalls", 1);
    check("DO loops took the loop-back path", seen_loop > 0, 1);
    check("rep repeated", seen_rep > 0, 1);

    // wait and wake-up by an interrupt
    for (int a = 0; a < 256; a++) prog[a] = I(K_NOP);
    prog[2]  = I(K_WAIT);
    prog[5]  = I(K_HALT);
    prog[8'h41] = I(K_RTS);
    trace.delete();
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    begin
      int k;
      pc_t held;
      k = 0;
      while (!idle && k < 100) begin @(negedge clk); k++; end
      check("wait makes the unit idle", idle, 1);
      held = pc;
      repeat (5) @(negedge clk);
      check("PC holds while idle", pc, held);
      int_req = 1;
      #1 check("interrupt accepted while idle", int_ack, 1);
      check("vector is next", next_pc, 8'h40);
      @(negedge clk) int_req = 0;
      k = 0;
      while (!halted && k < 100) begin @(negedge clk); k++; end
      repeat (3) @(negedge clk);
      // 0, 1, wait, vector, rts, then the instruction after wait
      check("wake trace length", trace.size(), 8);
      if (trace.size() == 8) begin
        check("wake trace 0", trace[0], 0);
        check("wake trace 2", trace[2], 2);
        check("wake trace vector", trace[3], 8'h40);
        check("wake trace rts", trace[4], 8'h41);
        check("wake trace return", trace[5], 3);
        check("wake trace end", trace[7], 5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
