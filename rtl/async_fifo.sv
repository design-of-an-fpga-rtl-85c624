// async_fifo -- dual-clock FIFO (the Transmit FIFO of the T/R Module interface).
//
// Carries 16-bit words from the Write State Machine, in the 50 MHz processor
// domain, to the serial Transmitter in the 25 MHz T/R interface domain. The
// formatter uses a vendor FIFO core here; this is a plain replacement with
// the same standard-mode behaviour: a word written with wr_en while not full
// is stored; rd_en while not empty pops the oldest word, which appears on dout
// on the next rising edge of rclk.
//
// How it works: the memory is an array written on wclk and read on rclk.
// Read and write pointers carry one extra wrap bit and cross domains as Gray
// codes through two flip-flops, so full and empty are pessimistic by the
// synchronizer delay but never wrong. DEPTH must be a power of two. The
// default depth of 1024 words (one full T/R Module look-up table) is this
// design's choice; the description gives no depth.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wbin_next, rbin_next, wgray_next, rgray_next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  assign wbin_next  = wbin + {{AW{1'b0}}, (wr_en && !full)};
  assign wgray_next = bin2gray(wbin_next);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= din;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      full     <= 1'b0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= wgray_next;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      // full: next write pointer equals read pointer with the two MSBs inverted
      full     <= (wgray_next == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
    end
  end

  // ---------------- read domain ----------------
  assign rbin_next  = rbin + {{AW{1'b0}}, (rd_en && !empty)};
  assign rgray_next = bin2gray(rbin_next);

  always_ff @(posedge rclk) begin
    if (rd_en && !empty) dout <= mem[rbin[AW-1:0]];
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      empty    <= 1'b1;
    end else begin
      rbin     <= rbin_next;
      rgray    <= rgray_next;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      empty    <= (rgray_next == wgray_r2);
    end
  end

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_fifo: DEPTH must be a power of two, at least 4");
  end
endmodule
