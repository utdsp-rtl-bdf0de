// pc_unit: instruction addressing, hardware loops, subroutines and interrupts.
//
// Holds the PC register (the address fetched in IF1), an incrementer
// (PCPlus1), the DO stack (five nested loops), the JSR stack, the repeat
// counter of rep, and the PC controller. Every cycle the controller picks
// NEXT_PC by this priority (the document's table):
//   1. jmp / taken branch / jsr in ID      -> target        (jsr pushes ID_NEXT_PC)
//   2. rts in ID                           -> top of JSR stack (pop)
//   3. rep #N in ID (N >= 2)               -> ID_NEXT_PC, the repeated op
//   4. repeat still running                -> PC (fetch the same op again)
//   5. do in ID and PC = loop end          -> ID_NEXT_PC (loop begin)
//   6. PC = top loop end, passes left > 0  -> top loop begin (count - 1)
//   7. interrupt request                   -> its vector
//   8. otherwise                           -> PCPlus1
// ID_NEXT_PC is the NEXT_PC that was chosen when the ID-stage instruction
// was in IF1, carried down the pipeline by the top: the address that follows
// it in program order, including loop-backs.
//
// Timing: a decision made while an operation is in ID affects the fetch
// in the next cycle. Jumps, jsr, rts, taken branches, wait and halt kill the
// two younger instructions (kill_if1, kill_if2): a two-cycle penalty. rep #N
// kills only the instruction in IF1 and then fetches the following operation
// N-1 more times (N fetches in all; rep #1 repeats nothing, rep #0 kills it).
// A do loop costs no cycles: its body is
// fetched back-to-back across iterations. A do pushes {begin = ID_NEXT_PC,
// end = target, left = N-1} (N-2 when the end is already being fetched); when
// PC reaches the top end with left = 0 the entry is popped.
// An interrupt is taken when int_req is high and no rule 1-5 applies: the
// return address (the NEXT_PC rule 6 or 8 would have chosen, with its
// side-effects) is pushed on the JSR stack with an interrupt mark and the PC
// goes to int_vec; int_ack pulses. rts of a marked entry pulses int_return.
// wait holds the PC on the following instruction and fetches nothing until an
// interrupt; halt holds it for good. stall freezes everything.
// Assumptions of this design: a loop body has at least two instructions,
// nested loops end at different addresses, a do is not among the last two
// instructions of an enclosing loop, and jumps out of a running loop are not
// supported (the DO stack is not unwound).
module pc_unit
  import utdsp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stall,
  input  logic          id_jmp,
  input  logic          id_jsr,
  input  logic          id_rts,
  input  logic          id_rep,
  input  logic          id_do,
  input  logic          id_wait,
  input  logic          id_halt,
  input  pc_t           id_target,
  input  logic [CNTW-1:0] id_count,
  input  pc_t           id_next_pc,
  input  logic          int_req,
  input  pc_t           int_vec,
  output pc_t           pc,
  output pc_t           next_pc,
  output logic          fetch_valid,
  output logic          kill_if1,
  output logic          kill_if2,
  output logic          int_ack,
  output logic          int_return,
  output logic          loop_back,
  output logic          repeating,
  output logic          idle,
  output logic          halted,
  output logic [2:0]    do_depth,
  output logic          stack_err
);
  pc_t  pc_plus1;
  logic [CNTW-1:0] rep_left;
  logic need_repeat;

  // DO stack controls
  logic do_push, do_pop, do_dec;
  pc_t  do_push_begin, do_push_end;
  logic [CNTW-1:0] do_push_left;
  pc_t  top_begin, top_end;
  logic [CNTW-1:0] top_left;
  logic do_empty, do_full, do_err;
  // JSR stack controls
  logic js_push, js_push_int, js_pop;
  pc_t  js_push_addr, js_top;
  logic js_top_int, js_empty, js_full, js_err;

  logic rep_load;
  logic [CNTW-1:0] rep_load_val;
  logic go_idle, go_halt, wake;
  pc_t  normal_next;
  logic normal_loop;
  logic ack_c, ret_c, loop_c;

  assign pc_plus1    = pc + 1'b1;
  assign need_repeat = (rep_left != '0);
  assign repeating   = need_repeat;

  do_stack #(.DEPTH(DO_DEPTH), .AW(PCW), .CW(CNTW)) u_do (
    .clk, .rst_n,
    .push(do_push && !stall), .push_begin(do_push_begin), .push_end(do_push_end),
    .push_left(do_push_left), .pop(do_pop && !stall), .dec(do_dec && !stall),
    .top_begin, .top_end, .top_left, .empty(do_empty), .full(do_full),
    .depth(do_depth), .err(do_err)
  );

  jsr_stack #(.DEPTH(JSR_DEPTH), .AW(PCW)) u_jsr (
    .clk, .rst_n,
    .push(js_push && !stall), .push_addr(js_push_addr), .push_int(js_push_int),
    .pop(js_pop && !stall), .top_addr(js_top), .top_int(js_top_int),
    .empty(js_empty), .full(js_full), .err(js_err)
  );

  assign stack_err = do_err || js_err;

  // Rules 6 and 8: what the fetch does when nothing in ID intervenes.
  always_comb begin
    normal_loop = !do_empty && (pc == top_end) && (top_left != '0);
    normal_next = normal_loop ? top_begin : pc_plus1;
  end

  always_comb begin
    next_pc = pc_plus1;
    kill_if1 = 1'b0; kill_if2 = 1'b0;
    do_push = 1'b0; do_pop = 1'b0; do_dec = 1'b0;
    do_push_begin = id_next_pc; do_push_end = id_target; do_push_left = '0;
    js_push = 1'b0; js_push_int = 1'b0; js_pop = 1'b0; js_push_addr = id_next_pc;
    rep_load = 1'b0; rep_load_val = '0;
    ack_c = 1'b0; ret_c = 1'b0; loop_c = 1'b0;
    go_idle = 1'b0; go_halt = 1'b0; wake = 1'b0;

    if (halted) begin
      next_pc = pc;
      kill_if1 = 1'b1;
    end else if (idle) begin
      if (int_req) begin
        next_pc = int_vec;
        js_push = 1'b1; js_push_int = 1'b1; js_push_addr = pc;
        ack_c = 1'b1; wake = 1'b1;
      end else begin
        next_pc = pc;
      end
      kill_if1 = 1'b1;
    end else if (id_jmp || id_jsr) begin
      next_pc = id_target;
      kill_if1 = 1'b1; kill_if2 = 1'b1;
      js_push = id_jsr;
    end else if (id_rts) begin
      next_pc = js_top;
      js_pop = 1'b1;
      ret_c = js_top_int;
      kill_if1 = 1'b1; kill_if2 = 1'b1;
    end else if (id_wait || id_halt) begin
      next_pc = id_next_pc;
      kill_if1 = 1'b1; kill_if2 = 1'b1;
      go_idle = id_wait; go_halt = id_halt;
    end else if (id_rep && id_count >= 2) begin
      next_pc = id_next_pc;
      kill_if1 = 1'b1;
      rep_load = 1'b1; rep_load_val = id_count - CNTW'(2);
    end else if (id_rep && id_count == '0) begin
      next_pc = pc_plus1;
      kill_if2 = 1'b1;
    end else if (need_repeat) begin
      next_pc = pc;
      rep_load = 1'b1; rep_load_val = rep_left - 1'b1;
    end else if (id_do) begin
      if (pc == id_target) begin
        if (id_count >= 2) begin
          next_pc = id_next_pc;
          do_push = 1'b1; do_push_left = id_count - CNTW'(2);
          loop_c = 1'b1;
        end else begin
          next_pc = pc_plus1;
        end
      end else begin
        next_pc = pc_plus1;
        do_push = 1'b1; do_push_left = id_count - 1'b1;
      end
    end else begin
      // rules 6-8
      if (!do_empty && pc == top_end) begin
        if (top_left != '0) begin do_dec = 1'b1; loop_c = 1'b1; end
        else do_pop = 1'b1;
      end
      if (int_req) begin
        next_pc = int_vec;
        js_push = 1'b1; js_push_int = 1'b1; js_push_addr = normal_next;
        ack_c = 1'b1;
      end else begin
        next_pc = normal_next;
      end
    end
  end

  assign fetch_valid = !idle && !halted;
  assign int_ack     = ack_c && !stall;
  assign int_return  = ret_c && !stall;
  assign loop_back   = loop_c && !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      rep_left <= '0;
      idle     <= 1'b0;
      halted   <= 1'b0;
    end else if (!stall) begin
      pc <= next_pc;
      if (rep_load) rep_left <= rep_load_val;
      if (go_idle) idle <= 1'b1;
      else if (wake) idle <= 1'b0;
      if (go_halt) halted <= 1'b1;
    end
  end
endmodule
