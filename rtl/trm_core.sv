// trm_core -- datapath of the FPGA inside one T/R Module.
//
// Each of the 64 T/R Modules holds a look-up table of 1024 16-bit words, one
// per combination of module state (transmit/receive x horizontal/vertical)
// and azimuth beam position (256). A word gives the T, R, H and V switch
// bits, a 6-bit attenuator and a 6-bit phase-shifter setting. An 8-entry
// sequence table lists the states of the polarimetric pulse sequence; each
// entry's T/R bit, H/V bit and beam position address the look-up table. On
// every rising edge of the trigger from the formatter's Timing State Machine
// the port registers, which drive the attenuator, phase shifter and switches,
// take the table word addressed by the current sequence entry, and the
// sequence moves on to the next entry (8 triggers = one TSM pass of 4
// pulses, a "T" and an "R" trigger each). That much follows the formatter's
// description of the T/R Module FPGA and its bit maps.
//
// The module's link-side control logic (which decodes the formatter's
// command words) is not described in enough detail to build, so this core
// is driven through plain write ports instead: table writes (calibration
// loading), sequence table writes (broadcast), a direct port register write
// (the bypass used by "write port registers") and an address load (port
// registers from one table word, used by "write address register").
//
// Choices of this design: the table segment is {tr, ~hv}, giving the order
// TH, TV, RH, RV in which the segments are listed; the trigger is
// synchronized by two flip-flops, so the port registers change 3 clock
// cycles after its rising edge; writing sequence entry 0 restarts the
// sequence at entry 0; the temperature register takes the temperature bits
// of each sequence entry as it is applied. The table is read synchronously
// every cycle (block RAM style), so a table write to the entry in use is
// seen from the next cycle.
module trm_core
  import afb_pkg::*;
#(
  parameter int unsigned LUT_DEPTH = TRM_LUT_DEPTH,   // 1024
  parameter int unsigned SEQ_LEN   = TRM_SEQ_LEN      // 8
) (
  input  logic                         clk,          // module clock from the formatter link
  input  logic                         rst_n,
  // look-up table write (calibration data)
  input  logic                         lut_we,
  input  logic [$clog2(LUT_DEPTH)-1:0] lut_addr,
  input  lut_word_t                    lut_wdata,
  // sequence table write
  input  logic                         seq_we,
  input  logic [$clog2(SEQ_LEN)-1:0]   seq_idx,
  input  seq_entry_t                   seq_wdata,
  // direct port register write (look-up table bypassed)
  input  logic                         port_we,
  input  lut_word_t                    port_wdata,
  // port registers from one addressed table word
  input  logic                         addr_load,
  input  logic [$clog2(LUT_DEPTH)-1:0] addr_value,
  // trigger from the Timing State Machine
  input  logic                         trigger,
  // outputs
  output lut_word_t                    port_reg,     // to attenuator, phase shifter, switches
  output logic [3:0]                   temperature,
  output logic [$clog2(SEQ_LEN)-1:0]   seq_pos
);
  localparam int unsigned AW = $clog2(LUT_DEPTH);
  localparam int unsigned SW = $clog2(SEQ_LEN);

  lut_word_t  lut [LUT_DEPTH];
  seq_entry_t seq [SEQ_LEN];

  lut_word_t  lut_q;          // table word read this cycle
  logic [AW-1:0] rd_addr;
  logic [2:0] trig_s;         // synchronizer + edge detect
  logic       trig_rise;
  logic       load_pending;

  // table address of a sequence entry: segment {tr, ~hv} (TH, TV, RH, RV), then beam
  function automatic logic [AW-1:0] entry_addr(input logic tr, input logic hv, input logic [7:0] beam);
    return AW'({tr, ~hv, beam});
  endfunction

  seq_entry_t cur;   // command bits of the entry belong to the control logic
  always_comb begin
    cur     = seq[seq_pos];
    rd_addr = addr_load ? addr_value : entry_addr(cur.tr, cur.hv, cur.beam);
  end

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= lut_wdata;
    lut_q <= lut[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SEQ_LEN; i++) seq[i] <= '0;
    end else if (seq_we) begin
      seq[seq_idx] <= seq_wdata;
    end
  end

  assign trig_rise = trig_s[1] && !trig_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_s       <= '0;
      port_reg     <= '0;
      temperature  <= '0;
      seq_pos      <= '0;
      load_pending <= 1'b0;
    end else begin
      trig_s       <= {trig_s[1:0], trigger};
      load_pending <= addr_load;
      if (seq_we && seq_idx == '0) begin
        seq_pos <= '0;
      end else if (trig_rise) begin
        port_reg    <= lut_q;
        temperature <= seq[seq_pos].temperature;
        seq_pos     <= (seq_pos == SW'(SEQ_LEN - 1)) ? '0 : seq_pos + 1'b1;
      end
      if (load_pending) port_reg <= lut_q;
      if (port_we)      port_reg <= port_wdata;
    end
  end

  initial begin
    assert (LUT_DEPTH == 4 * 256) else $error("trm_core: table must hold 4 segments of 256 beams");
  end
endmodule
