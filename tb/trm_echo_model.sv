// trm_echo_model -- behavioural model of one T/R Module channel, for tests.
//
// Not synthesizable logic of the formatter: it stands for the far end of the
// serial link, a group of T/R Modules sharing one echo channel. It decodes
// every frame on the broadcast line (sampling on the falling edge of the link
// clock: start bit 0, 16 bits MSB first, stop bit 1), records the words, and
// while its channel enable is high sends each word back on its echo line,
// driving it on the rising edge of the link clock, ECHO_GAP idle cycles
// after the received frame ends. Words received while the enable is low are
// recorded but not echoed.
module trm_echo_model #(
  parameter int unsigned ECHO_GAP = 2
) (
  input  logic clk,        // link clock from the formatter
  input  logic rx,         // broadcast line from the formatter
  input  logic ch_en,      // channel enable from the formatter
  output logic echo        // echo line back to the formatter
);
  logic [15:0] pending[$];
  int unsigned received = 0;
  int unsigned echoed   = 0;
  int unsigned frame_err = 0;

  initial echo = 1'b1;

  // receiver
  initial begin
    logic [15:0] w;
    forever begin
      @(negedge clk);
      if (rx === 1'b0) begin
        for (int i = 15; i >= 0; i--) begin @(negedge clk); w[i] = rx; end
        @(negedge clk);
        if (rx !== 1'b1) frame_err++;
        received++;
        if (ch_en) pending.push_back(w);
      end
    end
  end

  // echo transmitter
  initial begin
    logic [15:0] w;
    forever begin
      @(posedge clk);
      if (pending.size() != 0) begin
        w = pending.pop_front();
        repeat (ECHO_GAP) @(posedge clk);
        echo <= 1'b0;
        for (int i = 15; i >= 0; i--) begin @(posedge clk); echo <= w[i]; end
        @(posedge clk); echo <= 1'b1;
        echoed++;
      end
    end
  end
endmodule
