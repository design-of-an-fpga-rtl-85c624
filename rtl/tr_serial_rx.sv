// tr_serial_rx -- serial Receiver of the T/R Module interface.
//
// Converts the 18-bit frames echoed by the T/R Modules (start bit 0, 16 data
// bits most significant bit first, stop bit 1) back into 16-bit words. It is
// clocked on the falling edge of the 25 MHz interface clock, which is where
// the frame format puts the sampling point, in the middle of each bit.
//
// Operation (follows the formatter's description): the module polls rx; when
// rx is low it takes that as the start bit and enters the data state, where it
// shifts one received bit per cycle into its shift register. data_out mirrors
// the shift register, so the word builds up there bit by bit and holds the
// complete word from the cycle after the last data bit until the next frame
// starts shifting. After 16 bits rx_done pulses for one cycle and the module
// spends one cycle on the stop bit before it polls for the next start bit.
// The stop bit is not checked.
module tr_serial_rx
  import afb_pkg::*;
(
  input  logic                 clk,       // T/R interface clock (25 MHz)
  input  logic                 rst_n,
  input  logic                 rx,
  output logic [TR_WORD_W-1:0] data_out,
  output logic                 rx_done    // one-cycle pulse, word complete
);
  typedef enum logic [1:0] {S_IDLE, S_DATA, S_STOP} state_e;

  state_e     state;
  logic [3:0] bitcnt;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      bitcnt   <= '0;
      data_out <= '0;
      rx_done  <= 1'b0;
    end else begin
      rx_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          bitcnt <= '0;
          if (!rx) state <= S_DATA;
        end
        S_DATA: begin
          data_out <= {data_out[TR_WORD_W-2:0], rx};
          bitcnt   <= bitcnt + 4'd1;
          if (bitcnt == 4'(TR_WORD_W-1)) begin
            rx_done <= 1'b1;
            state   <= S_STOP;
          end
        end
        S_STOP: state <= S_IDLE;   // stop bit
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
