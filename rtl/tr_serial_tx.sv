// tr_serial_tx -- serial Transmitter of the T/R Module interface.
//
// Sends 16-bit words from the Transmit FIFO to the T/R Modules as 18-bit
// frames: a start bit (0), the 16 data bits most significant bit first, and a
// stop bit (1). The line idles high. One bit is sent per clock cycle, so at
// the 25 MHz interface clock the link carries 25 Mbit/s.
//
// Operation (follows the formatter's description): while idle the module
// watches the FIFO's empty flag; when the FIFO holds a word it pulses
// fifo_rd_en, copies the word (valid the cycle after the read, as in a
// standard-mode FIFO) into its shift register, sends the start bit, shifts the
// 16 data bits out, sends the stop bit and pulses tx_done. If another word is
// waiting it is fetched during the stop bit, so back-to-back frames take 19
// cycles each (one extra cycle for the FIFO read latency).
//
// tx changes on the rising edge of clk; the receiving side samples it on the
// falling edge, in the middle of the bit. The separate copy cycle and the
// back-to-back fetch are this design's choices.
module tr_serial_tx
  import afb_pkg::*;
(
  input  logic                 clk,        // T/R interface clock (25 MHz)
  input  logic                 rst_n,
  // Transmit FIFO read port (standard mode: dout valid one cycle after rd_en)
  input  logic                 fifo_empty,
  output logic                 fifo_rd_en,
  input  logic [TR_WORD_W-1:0] fifo_dout,
  // serial line
  output logic                 tx,
  output logic                 tx_done,    // one-cycle pulse with the stop bit
  output logic                 busy
);
  typedef enum logic [2:0] {S_IDLE, S_COPY, S_START, S_DATA, S_STOP} state_e;

  state_e               state;
  logic [TR_WORD_W-1:0] shreg;
  logic [3:0]           bitcnt;

  // A read is issued from idle, or during the stop bit for back-to-back words.
  assign fifo_rd_en = !fifo_empty && (state == S_IDLE || state == S_STOP);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      shreg   <= '0;
      bitcnt  <= '0;
      tx      <= 1'b1;
      tx_done <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          tx <= 1'b1;
          if (fifo_rd_en) state <= S_COPY;
        end
        S_COPY: begin
          shreg <= fifo_dout;
          tx    <= 1'b0;                 // start bit goes out next cycle
          state <= S_START;
        end
        S_START: begin
          tx     <= shreg[TR_WORD_W-1];  // d15 first
          shreg  <= {shreg[TR_WORD_W-2:0], 1'b0};
          bitcnt <= '0;
          state  <= S_DATA;
        end
        S_DATA: begin
          if (bitcnt == 4'(TR_WORD_W-1)) begin
            tx      <= 1'b1;             // stop bit
            tx_done <= 1'b1;
            state   <= S_STOP;
          end else begin
            tx     <= shreg[TR_WORD_W-1];
            shreg  <= {shreg[TR_WORD_W-2:0], 1'b0};
            bitcnt <= bitcnt + 4'd1;
          end
        end
        S_STOP: begin
          tx    <= 1'b1;
          state <= fifo_rd_en ? S_COPY : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
