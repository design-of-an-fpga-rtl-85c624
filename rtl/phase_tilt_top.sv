// phase_tilt_top -- Array Formatter together with the T/R Module datapaths.
//
// One array_formatter drives NUM_TRM T/R Module datapaths (trm_core). The
// formatter's serial link and echo lines, its triggers and its Transceiver
// interface are the same as at the formatter's pins. Every T/R Module gets
// the formatter's link clock (trm_clk) as its clock and the formatter's T/R
// Module trigger (trig_trm), which steps the module's port registers through
// its sequence table: the chain the phase-tilt array uses to set the
// attenuators and phase shifters for each pulse.
//
// Between the serial link and each module's tables sits the module's own
// link-side control logic, which decodes the formatter's command words.
// That logic is not specified in enough detail to build, so the link pins
// (trm_tx, trm_rx_left/right, trm_ch_en_left/right) stay top-level ports
// and each module's table write ports are brought out as top-level ports
// (index i = module address i+1), where that decoder would drive them.
//
// trm_clk is the link clock passed straight through the formatter, so that
// output follows an input by design.
//
// Timing: see array_formatter and trm_core. The module side is reset by its
// own reset synchronizer in the link clock domain (a choice of this design).
module phase_tilt_top
  import afb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 1024,
  parameter int unsigned TRIG_CYCLES = 4,
  parameter int unsigned XCVR_DIV    = 100,
  parameter int unsigned NUM_TRM     = TRM_COUNT   // 64
) (
  input  logic                    clk_sys,       // 50 MHz
  input  logic                    clk_tr,        // 25 MHz
  input  logic                    clk_ext,       // 100 MHz
  input  logic                    rst_n,
  // processor register port
  input  logic                    pf_wr,
  input  logic [PF_ADDR_W-1:0]    pf_addr,
  input  logic [31:0]             pf_wdata,
  output logic [31:0]             pf_rdata,
  // T/R Module link, to the modules' control logic
  output logic                    trm_clk,
  output logic                    trm_tx,
  input  logic                    trm_rx_left,
  input  logic                    trm_rx_right,
  output logic                    trm_ch_en_left,
  output logic                    trm_ch_en_right,
  // triggers and Transceiver interface
  output logic                    trig_xcvr,
  output logic                    trig_trm,
  output logic [4:0]              tsm_state,
  output logic                    xcvr_clk,
  output logic                    xcvr_data,
  output logic                    xcvr_en,
  // per-module table write ports (from each module's control logic)
  input  logic      [NUM_TRM-1:0] trm_lut_we,
  input  logic      [NUM_TRM-1:0][9:0] trm_lut_addr,
  input  lut_word_t [NUM_TRM-1:0] trm_lut_wdata,
  input  logic      [NUM_TRM-1:0] trm_seq_we,
  input  logic      [NUM_TRM-1:0][2:0] trm_seq_idx,
  input  seq_entry_t [NUM_TRM-1:0] trm_seq_wdata,
  input  logic      [NUM_TRM-1:0] trm_port_we,
  input  lut_word_t [NUM_TRM-1:0] trm_port_wdata,
  input  logic      [NUM_TRM-1:0] trm_addr_load,
  input  logic      [NUM_TRM-1:0][9:0] trm_addr_value,
  // per-module outputs: port registers (attenuator, phase shifter, switches)
  output lut_word_t [NUM_TRM-1:0] trm_port_reg,
  output logic      [NUM_TRM-1:0][3:0] trm_temperature,
  output logic      [NUM_TRM-1:0][2:0] trm_seq_pos
);
  logic trm_rst_n;

  array_formatter #(
    .FIFO_DEPTH(FIFO_DEPTH), .TRIG_CYCLES(TRIG_CYCLES), .XCVR_DIV(XCVR_DIV)
  ) u_afb (
    .clk_sys, .clk_tr, .clk_ext, .rst_n,
    .pf_wr, .pf_addr, .pf_wdata, .pf_rdata,
    .trm_clk, .trm_tx, .trm_rx_left, .trm_rx_right, .trm_ch_en_left, .trm_ch_en_right,
    .trig_xcvr, .trig_trm, .tsm_state,
    .xcvr_clk, .xcvr_data, .xcvr_en
  );

  rst_sync u_rst_trm (.clk(clk_tr), .rst_n_in(rst_n), .rst_n_out(trm_rst_n));

  for (genvar i = 0; i < NUM_TRM; i++) begin : g_trm
    trm_core u_trm (
      .clk        (clk_tr),
      .rst_n      (trm_rst_n),
      .lut_we     (trm_lut_we[i]),
      .lut_addr   (trm_lut_addr[i]),
      .lut_wdata  (trm_lut_wdata[i]),
      .seq_we     (trm_seq_we[i]),
      .seq_idx    (trm_seq_idx[i]),
      .seq_wdata  (trm_seq_wdata[i]),
      .port_we    (trm_port_we[i]),
      .port_wdata (trm_port_wdata[i]),
      .addr_load  (trm_addr_load[i]),
      .addr_value (trm_addr_value[i]),
      .trigger    (trig_trm),
      .port_reg   (trm_port_reg[i]),
      .temperature(trm_temperature[i]),
      .seq_pos    (trm_seq_pos[i])
    );
  end
endmodule
