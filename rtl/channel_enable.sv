// channel_enable -- selects the left or right T/R Module echo channel.
//
// The 64 T/R Modules answer the formatter over two channels: modules 1..32 on
// the left channel and modules 33..64 on the right one. During the unicast
// (initialization) traffic the processor writes the address of the module it
// talks to and sets the Software Channel Enable; this block then enables the
// matching channel and routes that channel's serial line to the Receiver.
// Both follow the formatter's description.
//
// Choices of this design: module addresses are numbered 1..64 as in the
// description; an address outside that range, or a cleared enable, enables
// neither channel and the Receiver then sees an idle (high) line. The enable
// outputs are registered in the processor clock domain. The serial path is a
// plain multiplexer with no register, so the Receiver samples the line itself;
// the select changes only while the link is quiet.
module channel_enable (
  input  logic       clk,          // processor clock (50 MHz)
  input  logic       rst_n,
  input  logic       sw_ch_en,     // PF register 9
  input  logic [7:0] trm_addr,     // PF register 18
  output logic       ch_en_left,   // channel enable towards modules 1..32
  output logic       ch_en_right,  // channel enable towards modules 33..64
  input  logic       rx_left,      // serial echo line, left channel
  input  logic       rx_right,     // serial echo line, right channel
  output logic       rx_out        // selected line, to the Receiver
);
  localparam logic [7:0] FIRST_LEFT  = 8'd1;
  localparam logic [7:0] LAST_LEFT   = 8'd32;
  localparam logic [7:0] LAST_RIGHT  = 8'd64;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_en_left  <= 1'b0;
      ch_en_right <= 1'b0;
    end else begin
      ch_en_left  <= sw_ch_en && trm_addr >= FIRST_LEFT && trm_addr <= LAST_LEFT;
      ch_en_right <= sw_ch_en && trm_addr >  LAST_LEFT  && trm_addr <= LAST_RIGHT;
    end
  end

  always_comb begin
    if (ch_en_left)       rx_out = rx_left;
    else if (ch_en_right) rx_out = rx_right;
    else                  rx_out = 1'b1;
  end

  a_one_channel: assert property (@(posedge clk) disable iff (!rst_n)
    !(ch_en_left && ch_en_right))
    else $error("channel_enable: both channels enabled");
endmodule
