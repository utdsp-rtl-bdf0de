// controller: DMA engine and interrupt controller (the Controller Unit).
//
// Interrupts: three request lines irq[2:0]. A rising edge on a line sets its
// pending bit. While no service routine is running, the lowest-numbered
// pending line is offered to the PC unit as int_req with its vector address
// INT_VEC_BASE + n*INT_VEC_STRIDE; when the PC unit accepts (int_ack) the
// pending bit clears and further interrupts wait until the routine returns
// (int_return). The core may hold requests back (int_allowed low) while a
// control operation is in flight.
//
// DMA: a trap operation (trap_valid, one cycle, from the EX stage) starts a
// block transfer of trap_len 16-bit words between the IO port and data bank X
// (codes 6 and 5) or Y (codes 60 and 50), beginning at word trap_addr. Code
// 6/60 reads words from io_in (valid/ready handshake) into the bank; code
// 5/50 writes bank words to io_out (valid/ready). While the transfer runs the
// controller owns the bank's port and holds the whole pipeline with stall.
// One word moves per cycle in which the IO side is ready. A zero length does
// nothing. The trap codes follow the document; the handshake, operand
// registers and stall policy are this design's own.
module controller
  import utdsp_pkg::*;
#(
  parameter int MAW = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  // interrupts
  input  logic [NIRQ-1:0] irq,
  input  logic           int_allowed,
  output logic           int_req,
  output pc_t            int_vec,
  input  logic           int_ack,
  input  logic           int_return,
  output logic           in_isr,
  // DMA request from a trap operation
  input  logic           trap_valid,
  input  logic [7:0]     trap_code,
  input  data_t          trap_addr,
  input  data_t          trap_len,
  output logic           stall,
  output logic           dma_busy,
  // data-memory port while busy
  output logic           dma_sel_y,
  output logic [MAW-1:0] dma_addr,
  output logic           dma_we,
  output data_t          dma_wdata,
  input  data_t          dma_rdata,
  // IO port
  input  logic           io_in_valid,
  input  data_t          io_in_data,
  output logic           io_in_ready,
  output logic           io_out_valid,
  output data_t          io_out_data,
  input  logic           io_out_ready
);
  typedef enum logic [1:0] {S_IDLE, S_READ_IO, S_WRITE_IO} state_t;
  state_t state;
  data_t  addr_q, left_q;
  logic   sel_y_q;
  logic [NIRQ-1:0] irq_q, pending;
  logic   beat;
  int     first;

  // ---------------- interrupts ----------------
  always_comb begin
    first = 0;
    for (int n = NIRQ - 1; n >= 0; n--) if (pending[n]) first = n;
  end
  assign int_req = (pending != '0) && !in_isr && int_allowed && !dma_busy;
  assign int_vec = INT_VEC_BASE + pc_t'(first * INT_VEC_STRIDE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q   <= '0;
      pending <= '0;
      in_isr  <= 1'b0;
    end else begin
      irq_q <= irq;
      for (int n = 0; n < NIRQ; n++) begin
        if (irq[n] && !irq_q[n]) pending[n] <= 1'b1;
        else if (int_ack && first == n) pending[n] <= 1'b0;
      end
      if (int_ack) in_isr <= 1'b1;
      else if (int_return) in_isr <= 1'b0;
    end
  end

  // ---------------- DMA ----------------
  assign dma_busy   = (state != S_IDLE);
  assign stall      = dma_busy;
  assign dma_sel_y  = sel_y_q;
  assign dma_addr   = addr_q[MAW-1:0];
  assign io_in_ready  = (state == S_READ_IO);
  assign io_out_valid = (state == S_WRITE_IO);
  assign io_out_data  = dma_rdata;
  assign dma_wdata    = io_in_data;
  assign dma_we       = (state == S_READ_IO) && io_in_valid;
  assign beat = (state == S_READ_IO && io_in_valid) ||
                (state == S_WRITE_IO && io_out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      left_q  <= '0;
      sel_y_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (trap_valid && trap_len != '0) begin
          addr_q <= trap_addr;
          left_q <= trap_len;
          unique case (trap_code)
            TRAP_RD_X: begin state <= S_READ_IO;  sel_y_q <= 1'b0; end
            TRAP_RD_Y: begin state <= S_READ_IO;  sel_y_q <= 1'b1; end
            TRAP_WR_X: begin state <= S_WRITE_IO; sel_y_q <= 1'b0; end
            TRAP_WR_Y: begin state <= S_WRITE_IO; sel_y_q <= 1'b1; end
            default: ;
          endcase
        end
        S_READ_IO, S_WRITE_IO: if (beat) begin
          addr_q <= addr_q + 1'b1;
          left_q <= left_q - 1'b1;
          if (left_q == 16'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
