// array_formatter -- custom logic of the phase-tilt radar Array Formatter.
//
// The formatter sits between the host's soft processor and the radar. The
// processor talks to it only through the PF register bank; behind the bank
// are three interfaces, wired here as the formatter's architecture shows:
//
//  * T/R Module interface. A 32-bit register write is split by the Write
//    State Machine into two 16-bit words, crosses into the 25 MHz domain
//    through the Transmit FIFO and leaves on trm_tx as 18-bit serial frames,
//    with trm_clk as the bit clock. Words echoed by the modules come back on
//    the left (modules 1..32) or right (33..64) line, chosen by the channel
//    enable from the module address; the Receiver rebuilds them, the clock
//    synchronizer moves them into the 50 MHz Receive FIFO, and the Read State
//    Machine hands them to the processor one at a time.
//  * Timing State Machine. From the Loop Number and four timing registers it
//    drives trig_xcvr and trig_trm: 4 pulses per pass, Loop Number passes.
//  * Transceiver interface. A 32-bit scan word goes out on xcvr_data with
//    xcvr_en, clocked by the 1 MHz xcvr_clk divided from the 100 MHz clock.
//
// Clocks (as in the formatter): clk_sys 50 MHz (register bank, state
// machines, TSM), clk_tr 25 MHz (serial link), clk_ext 100 MHz (Transceiver
// interface). trm_clk is clk_tr passed straight out: the link clock that
// travels with the serial data. The three clocks are assumed to come from one clock manager,
// which is outside this RTL, as are the processor and its bus, the
// differential I/O buffers and the memories that hold the radar data.
// rst_n is an asynchronous reset, released into each domain by a reset
// synchronizer; PF register 0 additionally holds both FIFOs in reset.
//
// The processor-side port is this design's stand-in for the vendor bus
// interface: write on the clk_sys edge where pf_wr is high, combinational
// read data.
module array_formatter
  import afb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 1024,  // depth of both FIFOs (words)
  parameter int unsigned TRIG_CYCLES = 4,     // TSM trigger step width (cycles)
  parameter int unsigned XCVR_DIV    = 100    // 100 MHz -> 1 MHz
) (
  input  logic                 clk_sys,
  input  logic                 clk_tr,
  input  logic                 clk_ext,
  input  logic                 rst_n,
  // processor register port
  input  logic                 pf_wr,
  input  logic [PF_ADDR_W-1:0] pf_addr,
  input  logic [31:0]          pf_wdata,
  output logic [31:0]          pf_rdata,
  // T/R Module link (single-ended; the differential buffers are outside)
  output logic                 trm_clk,
  output logic                 trm_tx,
  input  logic                 trm_rx_left,
  input  logic                 trm_rx_right,
  output logic                 trm_ch_en_left,
  output logic                 trm_ch_en_right,
  // triggers
  output logic                 trig_xcvr,
  output logic                 trig_trm,
  output logic [4:0]           tsm_state,
  // Transceiver interface
  output logic                 xcvr_clk,
  output logic                 xcvr_data,
  output logic                 xcvr_en
);
  // ---------------- resets ----------------
  logic sys_rst_n, tr_rst_n, ext_rst_n, sys_fifo_rst_n, tr_fifo_rst_n;
  logic fifo_reset;

  rst_sync u_rst_sys  (.clk(clk_sys), .rst_n_in(rst_n), .rst_n_out(sys_rst_n));
  rst_sync u_rst_tr   (.clk(clk_tr),  .rst_n_in(rst_n), .rst_n_out(tr_rst_n));
  rst_sync u_rst_ext  (.clk(clk_ext), .rst_n_in(rst_n), .rst_n_out(ext_rst_n));
  rst_sync u_rst_sfifo(.clk(clk_sys), .rst_n_in(rst_n && !fifo_reset), .rst_n_out(sys_fifo_rst_n));
  rst_sync u_rst_tfifo(.clk(clk_tr),  .rst_n_in(rst_n && !fifo_reset), .rst_n_out(tr_fifo_rst_n));

  // ---------------- register bank ----------------
  logic              sw_rd_en, sw_wr_en, sw_ch_en, tsm_en, xcvr_sw_en;
  logic [31:0]       wsm_data, xcvr_word;
  logic [15:0]       loop_num;
  timing_reg_t [3:0] treg;
  logic [7:0]        trm_addr;
  logic [15:0]       rsm_data;
  logic              wr_ack, rd_ack, rxf_empty, timing_ack, txf_empty_s, xcvr_ack_s;

  pf_regs u_pf (
    .clk(clk_sys), .rst_n(sys_rst_n),
    .wr(pf_wr), .addr(pf_addr), .wdata(pf_wdata), .rdata(pf_rdata),
    .fifo_reset(fifo_reset), .sw_rd_en(sw_rd_en), .sw_wr_en(sw_wr_en),
    .wsm_data(wsm_data), .loop_num(loop_num), .sw_ch_en(sw_ch_en),
    .tsm_en(tsm_en), .treg(treg), .trm_addr(trm_addr),
    .xcvr_en(xcvr_sw_en), .xcvr_data(xcvr_word),
    .rsm_data(rsm_data), .wr_ack(wr_ack), .rd_ack(rd_ack),
    .rxf_empty(rxf_empty), .timing_ack(timing_ack),
    .txf_empty(txf_empty_s), .xcvr_ack(xcvr_ack_s)
  );

  // ---------------- T/R Module interface: transmit chain ----------------
  logic                 txf_wr_en, txf_full, txf_rd_en, txf_empty;
  logic [TR_WORD_W-1:0] txf_din, txf_dout;

  wsm u_wsm (
    .clk(clk_sys), .rst_n(sys_rst_n),
    .sw_wr_en(sw_wr_en), .data_in(wsm_data), .wr_ack(wr_ack),
    .fifo_full(txf_full), .fifo_wr_en(txf_wr_en), .fifo_din(txf_din)
  );

  async_fifo #(.WIDTH(TR_WORD_W), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .wclk(clk_sys), .wrst_n(sys_fifo_rst_n), .wr_en(txf_wr_en), .din(txf_din), .full(txf_full),
    .rclk(clk_tr),  .rrst_n(tr_fifo_rst_n),  .rd_en(txf_rd_en), .dout(txf_dout), .empty(txf_empty)
  );

  tr_serial_tx u_tx (
    .clk(clk_tr), .rst_n(tr_rst_n),
    .fifo_empty(txf_empty), .fifo_rd_en(txf_rd_en), .fifo_dout(txf_dout),
    .tx(trm_tx), .tx_done(), .busy()
  );

  sync_2ff #(.WIDTH(1)) u_txf_empty_sync (
    .clk(clk_sys), .rst_n(sys_rst_n), .d(txf_empty), .q(txf_empty_s));

  assign trm_clk = clk_tr;

  // ---------------- T/R Module interface: receive chain ----------------
  logic                 rx_line, rx_done;
  logic [TR_WORD_W-1:0] rx_word, rxf_din, rxf_dout;
  logic                 rxf_wr_en, rxf_full, rxf_rd_en;

  channel_enable u_chen (
    .clk(clk_sys), .rst_n(sys_rst_n),
    .sw_ch_en(sw_ch_en), .trm_addr(trm_addr),
    .ch_en_left(trm_ch_en_left), .ch_en_right(trm_ch_en_right),
    .rx_left(trm_rx_left), .rx_right(trm_rx_right), .rx_out(rx_line)
  );

  tr_serial_rx u_rx (
    .clk(clk_tr), .rst_n(tr_rst_n), .rx(rx_line),
    .data_out(rx_word), .rx_done(rx_done)
  );

  rx_sync #(.WIDTH(TR_WORD_W)) u_rx_sync (
    .src_clk(clk_tr), .src_rst_n(tr_rst_n), .src_pulse(rx_done), .src_data(rx_word),
    .dst_clk(clk_sys), .dst_rst_n(sys_rst_n), .dst_wr_en(rxf_wr_en), .dst_data(rxf_din)
  );

  sync_fifo #(.WIDTH(TR_WORD_W), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk(clk_sys), .rst_n(sys_fifo_rst_n),
    .wr_en(rxf_wr_en), .din(rxf_din), .full(rxf_full),
    .rd_en(rxf_rd_en), .dout(rxf_dout), .empty(rxf_empty), .count()
  );

  // A word arriving at a full Receive FIFO would be lost: software must read
  // the echoes before 1024 of them pile up.
  a_rx_no_overflow: assert property (@(posedge clk_sys) disable iff (!sys_rst_n)
    !(rxf_wr_en && rxf_full))
    else $error("array_formatter: Receive FIFO overflow, echoed word lost");

  rsm u_rsm (
    .clk(clk_sys), .rst_n(sys_rst_n),
    .sw_rd_en(sw_rd_en), .data_out(rsm_data), .rd_ack(rd_ack),
    .fifo_empty(rxf_empty), .fifo_rd_en(rxf_rd_en), .fifo_dout(rxf_dout)
  );

  // ---------------- Timing State Machine ----------------
  tsm #(.TRIG_CYCLES(TRIG_CYCLES)) u_tsm (
    .clk(clk_sys), .rst_n(sys_rst_n),
    .sw_en(tsm_en), .loop_num(loop_num), .treg(treg),
    .trig_xcvr(trig_xcvr), .trig_trm(trig_trm), .timing_ack(timing_ack),
    .state_num(tsm_state), .running()
  );

  // ---------------- Transceiver interface ----------------
  logic tick_fall, xcvr_ack;

  clk_div #(.DIV(XCVR_DIV)) u_clk_div (
    .clk(clk_ext), .rst_n(ext_rst_n),
    .clk_out(xcvr_clk), .tick_rise(), .tick_fall(tick_fall)
  );

  xcvr_tx u_xcvr_tx (
    .clk(clk_ext), .rst_n(ext_rst_n), .tick(tick_fall),
    .sw_en(xcvr_sw_en), .data_in(xcvr_word),
    .tx(xcvr_data), .v_en(xcvr_en), .ack(xcvr_ack)
  );

  sync_2ff #(.WIDTH(1)) u_xcvr_ack_sync (
    .clk(clk_sys), .rst_n(sys_rst_n), .d(xcvr_ack), .q(xcvr_ack_s));
endmodule
