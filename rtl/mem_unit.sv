// mem_unit: memory functional unit (MU1 on bank X, MU2 on bank Y), EX stage.
//
// Executes ld.d (ai), dj and st.d (ai), dj with register-indirect addressing
// only: the address is the value of ai as it enters EX, so the access starts at
// the beginning of EX with no address arithmetic. A load returns the bank's
// read data as a write request for dj; a store drives the bank's write enable
// and data. Loads into and stores from address registers do not exist (the
// document removed them to save register-file ports). Combinational; the top
// registers the load result into EX/WB and gates the store with the pipeline
// enable.
module mem_unit
  import utdsp_pkg::*;
#(
  parameter int MAW = 9
) (
  input  logic           valid,
  input  word_t          op,
  input  data_t          addr_val,
  input  data_t          st_val,
  output logic [MAW-1:0] mem_addr,
  output logic           mem_we,
  output data_t          mem_wdata,
  input  data_t          mem_rdata,
  output wreq_t          wr
);
  opcode_t opc;
  assign opc       = op_code(op);
  assign mem_addr  = addr_val[MAW-1:0];
  assign mem_we    = valid && (opc == OP_ST);
  assign mem_wdata = st_val;

  always_comb begin
    wr = '0;
    if (valid && opc == OP_LD) wr = '{en: 1'b1, addr: op_j(op), data: mem_rdata};
  end
endmodule
