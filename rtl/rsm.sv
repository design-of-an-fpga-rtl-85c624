// rsm -- Read State Machine of the T/R Module interface.
//
// The processor sets the Software Read Enable register, reads the RSM's Data
// Out register and clears the enable again. On the rising edge of the enable
// the RSM pops one 16-bit word from the Receive FIFO and presents it on
// data_out, where it stays until the next read. That much follows the
// formatter's description.
//
// Choices of this design: if the FIFO is empty the RSM waits until a word
// arrives; Read Ack reads 0 from the enable edge until the new word is on
// data_out and 1 after that, so software can poll it. With a word waiting,
// data_out and rd_ack change two cycles after the cycle in which the enable
// edge is seen (one cycle to issue the read, one for the FIFO's read latency).
// A rising edge of the enable while a read is pending is ignored.
module rsm
  import afb_pkg::*;
(
  input  logic                 clk,        // processor clock (50 MHz)
  input  logic                 rst_n,
  input  logic                 sw_rd_en,   // PF register 1
  output logic [TR_WORD_W-1:0] data_out,   // PF register 4
  output logic                 rd_ack,     // PF register 6
  // Receive FIFO read port (standard mode)
  input  logic                 fifo_empty,
  output logic                 fifo_rd_en,
  input  logic [TR_WORD_W-1:0] fifo_dout
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_CAPTURE} state_e;

  state_e state;
  logic   en_q;

  assign fifo_rd_en = (state == S_WAIT) && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      en_q     <= 1'b0;
      data_out <= '0;
      rd_ack   <= 1'b0;
    end else begin
      en_q <= sw_rd_en;
      unique case (state)
        S_IDLE: if (sw_rd_en && !en_q) begin
          rd_ack <= 1'b0;
          state  <= S_WAIT;
        end
        S_WAIT: if (!fifo_empty) state <= S_CAPTURE;
        S_CAPTURE: begin
          data_out <= fifo_dout;
          rd_ack   <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
