// pf_regs -- software register bank of the custom peripheral ("PF").
//
// The soft processor reaches the formatter's custom logic only through this
// bank of thirty 32-bit registers; each register is wired to one port of the
// T/R Module interface, the Timing State Machine or the Transceiver
// interface. The register numbers and what each is wired to follow the
// formatter's published register map (see afb_pkg::pf_reg_e).
//
// Registers 4, 5, 6, 7, 16, 17 and 21 are status: reads return the live
// hardware value and writes are ignored. All other registers, including the
// spare registers 22..29, are plain read/write storage whose contents drive
// the matching output port. Register 15 ("Clock 2" of the TSM) has no
// described function and is kept as storage only.
//
// Bus (this design's choice): in the formatter the processor bus and its
// interface logic come from the vendor's peripheral wizard. Here a minimal
// synchronous port stands in for it: a write takes effect on the clock edge
// where wr is high; rdata is combinational from addr. Addresses 30 and 31
// read as zero. All registers reset to zero.
module pf_regs
  import afb_pkg::*;
(
  input  logic                 clk,        // processor clock (50 MHz)
  input  logic                 rst_n,
  // register access port
  input  logic                 wr,
  input  logic [PF_ADDR_W-1:0] addr,
  input  logic [31:0]          wdata,
  output logic [31:0]          rdata,
  // control outputs
  output logic                 fifo_reset,   // reg 0 bit 0
  output logic                 sw_rd_en,     // reg 1 bit 0
  output logic                 sw_wr_en,     // reg 2 bit 0
  output logic [31:0]          wsm_data,     // reg 3
  output logic [15:0]          loop_num,     // reg 8 [15:0]
  output logic                 sw_ch_en,     // reg 9 bit 0
  output logic                 tsm_en,       // reg 10 bit 0
  output timing_reg_t [3:0]    treg,         // regs 11..14
  output logic [7:0]           trm_addr,     // reg 18 [7:0]
  output logic                 xcvr_en,      // reg 19 bit 0
  output logic [31:0]          xcvr_data,    // reg 20
  // status inputs
  input  logic [15:0]          rsm_data,     // reg 4
  input  logic                 wr_ack,       // reg 5
  input  logic                 rd_ack,       // reg 6
  input  logic                 rxf_empty,    // reg 7
  input  logic                 timing_ack,   // reg 16
  input  logic                 txf_empty,    // reg 17
  input  logic                 xcvr_ack      // reg 21
);
  logic [31:0] regs [PF_NUM_REGS];

  function automatic logic is_status(input logic [PF_ADDR_W-1:0] a);
    return a inside {PF_RSM_DATA, PF_WR_ACK, PF_RD_ACK, PF_RXF_EMPTY,
                     PF_TSM_ACK, PF_TXF_EMPTY, PF_XCVR_ACK};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PF_NUM_REGS; i++) regs[i] <= '0;
    end else if (wr && addr < PF_ADDR_W'(PF_NUM_REGS) && !is_status(addr)) begin
      regs[addr] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (addr < PF_ADDR_W'(PF_NUM_REGS)) begin
      unique case (addr)
        PF_RSM_DATA:  rdata = {16'd0, rsm_data};
        PF_WR_ACK:    rdata = {31'd0, wr_ack};
        PF_RD_ACK:    rdata = {31'd0, rd_ack};
        PF_RXF_EMPTY: rdata = {31'd0, rxf_empty};
        PF_TSM_ACK:   rdata = {31'd0, timing_ack};
        PF_TXF_EMPTY: rdata = {31'd0, txf_empty};
        PF_XCVR_ACK:  rdata = {31'd0, xcvr_ack};
        default:      rdata = regs[addr];
      endcase
    end
  end

  assign fifo_reset = regs[PF_FIFO_RESET][0];
  assign sw_rd_en   = regs[PF_RD_EN][0];
  assign sw_wr_en   = regs[PF_WR_EN][0];
  assign wsm_data   = regs[PF_WSM_DATA];
  assign loop_num   = regs[PF_LOOP_NUM][15:0];
  assign sw_ch_en   = regs[PF_CH_EN][0];
  assign tsm_en     = regs[PF_TSM_EN][0];
  assign treg[0]    = regs[PF_TREG1];
  assign treg[1]    = regs[PF_TREG2];
  assign treg[2]    = regs[PF_TREG3];
  assign treg[3]    = regs[PF_TREG4];
  assign trm_addr   = regs[PF_TRM_ADDR][7:0];
  assign xcvr_en    = regs[PF_XCVR_EN][0];
  assign xcvr_data  = regs[PF_XCVR_DATA];
endmodule
