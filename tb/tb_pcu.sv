// tb_pcu: self-checking test of the program control unit decode (ID stage).
//
// Random control operations with random register values. Checks which
// register fields the unit reads, that jumps are unconditional and that
// beqz/bnez on an address or integer register are taken exactly when the
// register is (not) zero, the target of jmp.a comes from the register, the
// count of do.a/do.d comes from the register and of rep/do from the
// immediate, mov2a/mov2d produce the right write request, trap passes its
// code, address and length, and an invalid slot does nothing.
//
// The operation set follows the document; the operand fields of trap and
// do.a/do.d are this design's own.
`timescale 1ns/1ps
module tb_pcu;
  import utdsp_pkg::*;
  logic valid;
  word_t op;
  data_t a_val, d_val, trap_addr, trap_len;
  reg_t rd_a, rd_d;
  logic uses_a, uses_d, jmp, jsr, rts, rep, do_loop, wait_o, halt, branch, trap, is_ctrl_flow;
  pc_t target;
  logic [CNTW-1:0] count;
  wreq_t wr_a, wr_d;
  logic [7:0] trap_code;
  int checks = 0, failures = 0;

  pcu dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam opcode_t OPS [17] = '{OP_MOV2D, OP_MOV2A, OP_REP, OP_DO, OP_DO_A, OP_DO_D,
      OP_BEQZ_A, OP_BEQZ_D, OP_BNEZ_A, OP_BNEZ_D, OP_JMP_A, OP_JMP, OP_JSR, OP_RTS,
      OP_TRAP, OP_WAIT, OP_HALT};

  initial begin
    repeat (6000) begin
      opcode_t o;
      int i, j, cnt, tgt;
      bit e_jmp, z_a, z_d;
      o = OPS[$urandom_range(0, 16)];
      i = $urandom_range(0, 15); j = $urandom_range(0, 15);
      cnt = $urandom_range(0, 4095); tgt = $urandom_range(0, 255);
      op = mk_ctl(o, i, cnt, tgt, j);
      if (o inside {OP_DO_A, OP_DO_D}) cnt = op_count(op);   // i overlays the count
      valid = ($urandom_range(0, 7) != 0);
      a_val = ($urandom_range(0, 2) == 0) ? '0 : data_t'($urandom);
      d_val = ($urandom_range(0, 2) == 0) ? '0 : data_t'($urandom);
      z_a = (a_val == 0); z_d = (d_val == 0);
      e_jmp = valid && (o == OP_JMP || o == OP_JMP_A || (o == OP_BEQZ_A && z_a) ||
              (o == OP_BNEZ_A && !z_a) || (o == OP_BEQZ_D && z_d) || (o == OP_BNEZ_D && !z_d));
      #1;
      check($sformatf("%s jmp", o.name()), jmp, e_jmp);
      check("jsr", jsr, valid && o == OP_JSR);
      check("rts", rts, valid && o == OP_RTS);
      check("rep", rep, valid && o == OP_REP);
      check("do", do_loop, valid && o inside {OP_DO, OP_DO_A, OP_DO_D});
      check("wait", wait_o, valid && o == OP_WAIT);
      check("halt", halt, valid && o == OP_HALT);
      check("trap", trap, valid && o == OP_TRAP);
      check("branch", branch, valid && o inside {OP_BEQZ_A, OP_BEQZ_D, OP_BNEZ_A, OP_BNEZ_D});
      check("control flow", is_ctrl_flow, valid && !(o inside {OP_MOV2A, OP_MOV2D}));
      check("uses a", uses_a, valid && o inside {OP_MOV2D, OP_DO_A, OP_BEQZ_A, OP_BNEZ_A, OP_JMP_A, OP_TRAP});
      check("uses d", uses_d, valid && o inside {OP_MOV2A, OP_DO_D, OP_BEQZ_D, OP_BNEZ_D, OP_TRAP});
      if (valid && o inside {OP_MOV2D, OP_DO_A, OP_BEQZ_A, OP_BNEZ_A, OP_JMP_A, OP_TRAP})
        check("a register", rd_a, i);
      if (valid && o inside {OP_MOV2A, OP_DO_D, OP_BEQZ_D, OP_BNEZ_D})
        check("d register", rd_d, i);
      if (valid && o == OP_TRAP) begin
        check("trap d register", rd_d, j);
        check("trap code", trap_code, tgt);
        check("trap address", trap_addr, a_val);
        check("trap length", trap_len, d_val);
      end
      if (valid && o == OP_JMP_A) check("jmp.a target", target, a_val[7:0]);
      else if (valid && o inside {OP_JMP, OP_JSR, OP_DO, OP_DO_A, OP_DO_D} || e_jmp)
        check($sformatf("%s target", o.name()), target, tgt);
      if (valid && o inside {OP_REP, OP_DO}) check("count", count, cnt);
      if (valid && o == OP_DO_A) check("do.a count", count, a_val);
      if (valid && o == OP_DO_D) check("do.d count", count, d_val);
      check("mov2d", wr_d.en, valid && o == OP_MOV2D);
      if (valid && o == OP_MOV2D) begin check("mov2d reg", wr_d.addr, j); check("mov2d data", wr_d.data, a_val); end
      check("mov2a", wr_a.en, valid && o == OP_MOV2A);
      if (valid && o == OP_MOV2A) begin check("mov2a reg", wr_a.addr, j); check("mov2a data", wr_a.data, d_val); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
