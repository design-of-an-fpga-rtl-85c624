// tsm -- Timing State Machine: the trigger generator of the Array Formatter.
//
// For each azimuth beam position the processor loads a Loop Number and four
// 32-bit timing registers and then sets the TSM enable. The TSM then pulses
// the radar: one pass through its 32 states makes four pulses, one per timing
// register, and the pass is repeated Loop Number times, so a beam position
// gets 4 x Loop Number pulses. When the last pass ends the TSM raises
// timing_ack; the processor polls it and clears the enable. Those facts, the
// 32 states, and the order of the triggers inside one pulse follow the
// formatter's description and its trigger timing figure.
//
// One pulse, with T = TRIG_CYCLES:
//   state 0  LOAD    1 cycle   select this pulse's timing register
//   state 1  XCVR    T cycles  trig_xcvr = 1       (Transceiver to transmit)
//   state 2  BOTH    T cycles  trig_xcvr = 1, trig_trm = 1  ("T" trigger)
//   state 3  TTRIG   T cycles  trig_trm  = 1
//   state 4  TXWAIT  tx_time cycles (at least 1), both triggers low
//   state 5  RTRIG   T cycles  trig_trm  = 1       ("R" trigger, to receive)
//   state 6  RXWAIT  rx_time cycles (at least 1)
//   state 7  NEXT    1 cycle   next pulse, or next pass, or done
// so one pulse repetition time is tx_time + rx_time + 4*T + 2 cycles. The
// 32 states are numbered pulse*8 + sub-state on state_num. The split into
// eight sub-states, the trigger width T, the units of the timing registers
// (cycles of this clock) and the upper/lower half-word order (transmit time
// in [31:16], receive time in [15:0]) are this design's choices.
//
// Interface timing: the outputs are registered and lag the state by one cycle.
// The enable is sampled in idle; the timing registers and Loop Number are
// copied when the run starts, so software may reload them during a run.
// Clearing the enable during a run stops the TSM at once without ack. A Loop
// Number of zero produces no pulse and acknowledges at once. timing_ack stays
// set until the next run starts.
module tsm
  import afb_pkg::*;
#(
  parameter int unsigned TRIG_CYCLES = 4
) (
  input  logic              clk,         // processor clock (50 MHz)
  input  logic              rst_n,
  input  logic              sw_en,       // PF register 10
  input  logic [15:0]       loop_num,    // PF register 8
  input  timing_reg_t [3:0] treg,        // PF registers 11..14 (index 0 = reg 11)
  output logic              trig_xcvr,   // trigger to the Transceiver
  output logic              trig_trm,    // trigger to the T/R Modules
  output logic              timing_ack,  // PF register 16
  output logic [4:0]        state_num,   // current state 0..31
  output logic              running
);
  typedef enum logic [1:0] {M_IDLE, M_RUN, M_DONE} mode_e;

  mode_e             mode;
  tsm_sub_e          sub;
  logic [1:0]        pulse;
  logic [15:0]       loops_left;
  logic [15:0]       cnt;
  timing_reg_t [3:0] tr_q;

  function automatic logic [15:0] dur(input tsm_sub_e s, input timing_reg_t t);
    unique case (s)
      TS_XCVR, TS_BOTH, TS_TTRIG, TS_RTRIG: dur = 16'(TRIG_CYCLES);
      TS_TXWAIT: dur = (t.tx_time == '0) ? 16'd1 : t.tx_time;
      TS_RXWAIT: dur = (t.rx_time == '0) ? 16'd1 : t.rx_time;
      default:   dur = 16'd1;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= M_IDLE;
      sub        <= TS_LOAD;
      pulse      <= '0;
      loops_left <= '0;
      cnt        <= 16'd1;
      tr_q       <= '0;
      timing_ack <= 1'b0;
    end else begin
      unique case (mode)
        M_IDLE: if (sw_en) begin
          timing_ack <= 1'b0;
          tr_q       <= treg;
          loops_left <= loop_num;
          pulse      <= '0;
          sub        <= TS_LOAD;
          cnt        <= 16'd1;
          if (loop_num == '0) begin
            timing_ack <= 1'b1;
            mode       <= M_DONE;
          end else begin
            mode       <= M_RUN;
          end
        end
        M_RUN: begin
          if (!sw_en) begin
            mode <= M_IDLE;
          end else if (cnt > 16'd1) begin
            cnt <= cnt - 16'd1;
          end else if (sub == TS_NEXT) begin
            sub <= TS_LOAD;
            cnt <= 16'd1;
            if (pulse == 2'd3) begin
              pulse <= '0;
              if (loops_left == 16'd1) begin
                timing_ack <= 1'b1;
                mode       <= M_DONE;
              end
              loops_left <= loops_left - 16'd1;
            end else begin
              pulse <= pulse + 2'd1;
            end
          end else begin
            sub <= tsm_sub_e'(sub + 3'd1);
            cnt <= dur(tsm_sub_e'(sub + 3'd1), tr_q[pulse]);
          end
        end
        M_DONE: if (!sw_en) mode <= M_IDLE;
        default: mode <= M_IDLE;
      endcase
    end
  end

  // Registered outputs, decoded from the state.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_xcvr <= 1'b0;
      trig_trm  <= 1'b0;
      state_num <= '0;
      running   <= 1'b0;
    end else begin
      running   <= (mode == M_RUN);
      state_num <= {pulse, sub};
      trig_xcvr <= (mode == M_RUN) && (sub == TS_XCVR || sub == TS_BOTH);
      trig_trm  <= (mode == M_RUN) &&
                   (sub == TS_BOTH || sub == TS_TTRIG || sub == TS_RTRIG);
    end
  end
endmodule
