// clk_div -- clock divider for the Transceiver interface.
//
// Derives the 1 MHz Transceiver interface clock from the 100 MHz external
// clock, as the formatter's description asks, by counting DIV input cycles
// per output period. clk_out is a registered, 50 % duty signal (high for the
// first DIV/2 counts). Besides the clock the divider gives two one-cycle
// enables in the fast domain: tick_fall in the cycle whose edge makes clk_out
// fall, and tick_rise likewise for its rising edge. The Transceiver
// Transmitter changes its data on tick_fall, so the data is stable around
// every rising edge of clk_out. Those enables, and the phase after reset
// (clk_out rises with the first edge after reset), are this design's choices.
module clk_div #(
  parameter int unsigned DIV = 100     // 100 MHz / 100 = 1 MHz
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out,
  output logic tick_rise,
  output logic tick_fall
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  assign tick_fall = (cnt == CW'(DIV/2 - 1));
  assign tick_rise = (cnt == CW'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= CW'(DIV - 1);
      clk_out <= 1'b0;
    end else begin
      cnt <= tick_rise ? '0 : cnt + 1'b1;
      if (tick_rise) clk_out <= 1'b1;
      if (tick_fall) clk_out <= 1'b0;
    end
  end

  initial begin
    assert (DIV >= 2 && DIV % 2 == 0) else $error("clk_div: DIV must be even");
  end
endmodule
