// rx_sync -- clock synchronizer between the Receiver and the Receive FIFO.
//
// The serial Receiver runs at 25 MHz and the Receive FIFO at the 50 MHz
// processor clock. This block watches the Receiver's rx_done pulse, and for
// every pulse delivers the received word to the FIFO's write port as a
// one-cycle write strobe in the 50 MHz domain.
//
// How it works (this design's choice; the description only says that a
// synchronizer watches rx_done and writes the word into the FIFO): in the
// source domain each rx_done pulse copies the word into a hold register and
// flips a toggle. The toggle crosses through two flip-flops; a third one
// detects its change and the destination side then writes the held word,
// which has been stable for at least two destination cycles. Latency is 3 to
// 4 destination cycles after the source edge that sees rx_done. A new word
// can be accepted every 3 source cycles, far more often than the 19-cycle
// frames arrive.
module rx_sync #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             src_clk,
  input  logic             src_rst_n,
  input  logic             src_pulse,
  input  logic [WIDTH-1:0] src_data,
  input  logic             dst_clk,
  input  logic             dst_rst_n,
  output logic             dst_wr_en,
  output logic [WIDTH-1:0] dst_data
);
  logic             src_toggle;
  logic [WIDTH-1:0] src_hold;
  logic [2:0]       dst_sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      src_toggle <= 1'b0;
      src_hold   <= '0;
    end else if (src_pulse) begin
      src_toggle <= ~src_toggle;
      src_hold   <= src_data;
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      dst_sync  <= '0;
      dst_wr_en <= 1'b0;
      dst_data  <= '0;
    end else begin
      dst_sync  <= {dst_sync[1:0], src_toggle};
      dst_wr_en <= dst_sync[2] ^ dst_sync[1];
      if (dst_sync[2] ^ dst_sync[1]) dst_data <= src_hold;
    end
  end
endmodule
