// xcvr_tx -- Transmitter of the Transceiver interface.
//
// Before a beam position is pulsed, the processor sends 32 bits of scan
// information (beam position and polarization sequence) to the Transceiver,
// which tags its received samples with it. The interface has three lines:
// a 1 MHz clock (from clk_div), the enable v_en, and serial data tx. When the
// software enable is set, the Transmitter raises v_en, shifts the 32-bit word
// out one bit per interface clock, and drops v_en in its stop state. That
// much follows the formatter's description.
//
// Choices of this design: the module runs on the 100 MHz clock and moves on
// the divider's tick_fall enable, so tx and v_en change when the interface
// clock falls and are stable at its rising edges. The software enable comes
// from the 50 MHz domain and is synchronized here; a rising edge starts a
// transfer. Software sets the enable before it writes the data register, so
// the data word is copied only after two full interface clock periods (two
// tick_fall enables after the edge is seen), and then bit 31 goes first.
// The done flag (ack) is cleared by the enable edge and set when v_en drops;
// it stays set until the next transfer. The enable may be cleared at any
// time after it was seen; the transfer completes regardless. tx idles low.
module xcvr_tx (
  input  logic        clk,        // external clock (100 MHz)
  input  logic        rst_n,
  input  logic        tick,       // one-cycle enable, falling edge of 1 MHz clock
  input  logic        sw_en,      // PF register 19 (other clock domain)
  input  logic [31:0] data_in,    // PF register 20 (quasi-static)
  output logic        tx,
  output logic        v_en,
  output logic        ack         // PF register 21 (to be synchronized)
);
  typedef enum logic [1:0] {S_IDLE, S_ARM, S_DATA} state_e;

  state_e      state;
  logic        en_s, en_q;
  logic        arm_cnt;
  logic [4:0]  bitcnt;
  logic [31:0] shreg;

  sync_2ff #(.WIDTH(1)) u_en_sync (.clk(clk), .rst_n(rst_n), .d(sw_en), .q(en_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      en_q    <= 1'b0;
      arm_cnt <= 1'b0;
      bitcnt  <= '0;
      shreg   <= '0;
      tx      <= 1'b0;
      v_en    <= 1'b0;
      ack     <= 1'b0;
    end else begin
      en_q <= en_s;
      unique case (state)
        S_IDLE: if (en_s && !en_q) begin
          ack     <= 1'b0;
          arm_cnt <= 1'b0;
          state   <= S_ARM;
        end
        S_ARM: if (tick) begin
          arm_cnt <= 1'b1;
          if (arm_cnt) begin
            tx     <= data_in[31];
            shreg  <= {data_in[30:0], 1'b0};
            v_en   <= 1'b1;
            bitcnt <= '0;
            state  <= S_DATA;
          end
        end
        S_DATA: if (tick) begin
          if (bitcnt == 5'd31) begin
            // stop state: v_en drops, line returns to idle
            tx    <= 1'b0;
            v_en  <= 1'b0;
            ack   <= 1'b1;
            state <= S_IDLE;
          end else begin
            tx     <= shreg[31];
            shreg  <= {shreg[30:0], 1'b0};
            bitcnt <= bitcnt + 5'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
