// tb_mem_unit: self-checking test of a memory functional unit (MU1 / MU2).
//
// Random operations are applied with random register values: ld.d (ai), dj
// must read the bank at the low address bits of ai and request a write of
// the data to dj; st.d (ai), dj must drive the address, the store data and
// the write enable and request no register write; any other operation, or an
// invalid slot, must do neither. The unit is combinational (EX stage).
//
// The load/store forms follow the document; ignoring address bits above the
// bank size is this design's own.
`timescale 1ns/1ps
module tb_mem_unit;
  import utdsp_pkg::*;
  logic valid;
  word_t op;
  data_t addr_val, st_val, mem_wdata, mem_rdata;
  logic [8:0] mem_addr;
  logic mem_we;
  wreq_t wr;
  int checks = 0, failures = 0;

  mem_unit #(.MAW(9)) dut (.*);

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

  initial begin
    repeat (5000) begin
      int r, i, j;
      r = $urandom_range(0, 2);
      i = $urandom_range(0, 15); j = $urandom_range(0, 15);
      op = mk_op(0, r == 0 ? OP_LD : r == 1 ? OP_ST : OP_ADD, i, j);
      valid = ($urandom_range(0, 4) != 0);
      addr_val = data_t'($urandom); st_val = data_t'($urandom); mem_rdata = data_t'($urandom);
      #1;
      check("address", mem_addr, addr_val[8:0]);
      check("write enable", mem_we, valid && r == 1);
      if (valid && r == 1) check("store data", mem_wdata, st_val);
      check("load writes", wr.en, valid && r == 0);
      if (valid && r == 0) begin
        check("load register", wr.addr, j);
        check("load data", wr.data, mem_rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
