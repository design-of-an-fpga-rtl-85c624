// wsm -- Write State Machine of the T/R Module interface.
//
// The processor writes a 32-bit word into the WSM's Data In register and then
// pulses the Software Write Enable register (1, then 0). The WSM writes the
// word into the Transmit FIFO as two 16-bit words, which the serial
// Transmitter then sends to the T/R Modules. These two steps follow the
// formatter's description.
//
// Choices of this design: the upper half-word goes first (a command word
// followed by its data word is written as one 32-bit value, command in the
// upper half); the data is captured on the rising edge of the enable, so the
// enable may drop again at once; while the FIFO is full the WSM waits; a
// rising edge of the enable while the WSM is still busy is ignored. Write Ack
// reads 0 from the rising edge of the enable until both half-words are in the
// FIFO, and 1 after that, so software can poll it before the next write.
// With a FIFO that is not full the two half-words are written on the two
// cycles after the enable edge is seen.
module wsm
  import afb_pkg::*;
(
  input  logic                 clk,        // processor clock (50 MHz)
  input  logic                 rst_n,
  input  logic                 sw_wr_en,   // PF register 2
  input  logic [31:0]          data_in,    // PF register 3
  output logic                 wr_ack,     // PF register 5
  // Transmit FIFO write port
  input  logic                 fifo_full,
  output logic                 fifo_wr_en,
  output logic [TR_WORD_W-1:0] fifo_din
);
  typedef enum logic [1:0] {S_IDLE, S_HI, S_LO} state_e;

  state_e      state;
  logic        en_q;
  logic [31:0] word;

  always_comb begin
    fifo_wr_en = 1'b0;
    fifo_din   = word[31:16];
    unique case (state)
      S_HI: begin fifo_wr_en = !fifo_full; fifo_din = word[31:16]; end
      S_LO: begin fifo_wr_en = !fifo_full; fifo_din = word[15:0];  end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      en_q   <= 1'b0;
      word   <= '0;
      wr_ack <= 1'b0;
    end else begin
      en_q <= sw_wr_en;
      unique case (state)
        S_IDLE: if (sw_wr_en && !en_q) begin
          word   <= data_in;
          wr_ack <= 1'b0;
          state  <= S_HI;
        end
        S_HI: if (!fifo_full) state <= S_LO;
        S_LO: if (!fifo_full) begin
          wr_ack <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
