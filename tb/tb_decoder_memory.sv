// tb_decoder_memory: self-checking test of the decoder memory (IF2).
//
// Loads random operations into all seven 256-word banks through the load
// port, keeping a copy here. Then presents random instruction words: uni-ops
// (MSB 0) must appear in the slot named by bits 30:28 and nowhere else;
// multi-op pointers (MSB 1) must issue bank Bn's word at the cluster-A
// address (B1-B4) or cluster-B address (B5-B7) exactly when Bn's mask bit is
// set, NOP elsewhere. slot_valid must mark the issued non-NOP operations, and
// nothing may issue when ir_valid is low. Two pointers with different masks
// to the same address (the document's way of sharing one stored word) are
// checked explicitly. Output is combinational, within the IF2 cycle.
//
// The bank and cluster arrangement follows the document; the mask bit order
// checked here is this design's own.
`timescale 1ns/1ps
module tb_decoder_memory;
  import utdsp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ld_we = 0, ir_valid = 0;
  logic [2:0] ld_bank = '0;
  logic [7:0] ld_addr = '0;
  word_t ld_data = '0, ir = '0;
  word_t ops [NSLOT];
  logic [NSLOT-1:0] slot_valid;
  logic is_multi;
  word_t model [NSLOT][256];
  int checks = 0, failures = 0;

  decoder_memory dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ops(word_t w, bit v);
    for (int s = 0; s < NSLOT; s++) begin
      word_t e;
      e = '0;
      if (v) begin
        if (w[31]) begin
          bit m;
          m = (s < 4) ? w[30 - s] : w[14 - (s - 4)];
          if (m) e = model[s][(s < 4) ? w[22:15] : w[7:0]];
        end else if (w[30:28] == 3'(s)) e = w;
      end
      check($sformatf("slot %0d op", s), ops[s], e);
      check($sformatf("slot %0d valid", s), slot_valid[s], e[27:21] != 0);
    end
    if (v) check("is_multi", is_multi, w[31]);
  endtask

  initial begin
    for (int b = 0; b < NSLOT; b++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        ld_we = 1; ld_bank = 3'(b); ld_addr = 8'(a);
        ld_data = ($urandom_range(0, 5) == 0) ? '0 : {1'b0, 31'($urandom)};
        model[b][a] = ld_data;
      end
    @(negedge clk) ld_we = 0;
    repeat (3000) begin
      word_t w;
      @(negedge clk);
      if ($urandom_range(0, 1) == 1)
        w = mk_ptr(4'($urandom), $urandom_range(0, 255), 3'($urandom), $urandom_range(0, 255));
      else
        w = {1'b0, 3'($urandom_range(0, 6)), 28'($urandom)};
      ir = w;
      ir_valid = ($urandom_range(0, 7) != 0);
      #1 expect_ops(w, ir_valid);
    end
    // one stored word shared by two pointers with different masks
    @(negedge clk);
    ir_valid = 1;
    ir = mk_ptr(4'b1010, 9, 3'b100, 9);
    #1 expect_ops(ir, 1);
    check("shared word, B1 issued", ops[0], model[0][9]);
    check("shared word, B2 masked", ops[1], 0);
    ir = mk_ptr(4'b0101, 9, 3'b011, 9);
    #1 expect_ops(ir, 1);
    check("shared word, B2 issued", ops[1], model[1][9]);
    check("shared word, B7 issued", ops[6], model[6][9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
