// tb_array_formatter -- end-to-end test of the Array Formatter at full size.
//
// The top is instantiated with its default parameters (1024-word FIFOs,
// trigger step 4 cycles, 100:1 Transceiver clock divider). The three clocks
// (100, 50 and 25 MHz) are generated edge-aligned, as from one clock manager.
// A task-level model of the processor software drives the register port the
// way the formatter's software does, and two trm_echo_model instances stand
// for the left (modules 1..32) and right (33..64) T/R Module channels.
//
// Operations, each checked against values computed here:
//  1. Unicast "transmit calibration data" to module 7 (left) and module 40
//     (right): command word, word count N = 1024, 1024 data words, all
//     echoed back and read out through the Read State Machine, compared word
//     for word. The frame spacing on the link is checked (19 link cycles for
//     back-to-back frames).
//  2. Unicast "read port registers" style exchange to an address outside
//     1..64: no channel is enabled and nothing comes back.
//  3. Transmit FIFO overflow pressure: 1300 words written with the echo
//     channels off; the Write State Machine must stall on a full FIFO and
//     every word must still reach the modules in order.
//  4. FIFO reset through register 0 discards queued words.
//  5. "Begin" for two beam positions: sequence table broadcast (8 entries),
//     scan word to the Transceiver interface (checked bit by bit on the
//     1 MHz interface), Loop Number and timing registers to the TSM, run,
//     wait for Timing Ack. The trigger count (4 x Loop Number) and the pulse
//     repetition time are checked.
//  6. Loop Number 0 acknowledges without a pulse.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_array_formatter;
  import afb_pkg::*;

  logic clk_ext = 1'b0, clk_sys = 1'b0, clk_tr = 1'b0, rst_n = 1'b0;
  logic pf_wr = 1'b0;
  logic [4:0] pf_addr = '0;
  logic [31:0] pf_wdata = '0, pf_rdata;
  logic trm_clk, trm_tx, trm_rx_left, trm_rx_right, trm_ch_en_left, trm_ch_en_right;
  logic trig_xcvr, trig_trm, xcvr_clk, xcvr_data, xcvr_en;
  logic [4:0] tsm_state;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_left_echo = 0, n_right_echo = 0, n_no_channel = 0, n_wsm_stall = 0, n_rsm_wait = 0;
  int n_fifo_reset = 0, n_tsm_multi_pass = 0, n_tsm_loop0 = 0, n_xcvr = 0, n_b2b_frames = 0;

  // clocks: 100 / 50 / 25 MHz from one counter
  int unsigned phase = 0;
  always #5 begin
    clk_ext = ~clk_ext;
    if (clk_ext) begin
      phase++;
      clk_sys = phase[0];
      clk_tr  = phase[1];
    end
  end

  array_formatter dut (.*);

  trm_echo_model u_left  (.clk(trm_clk), .rx(trm_tx), .ch_en(trm_ch_en_left),  .echo(trm_rx_left));
  trm_echo_model u_right (.clk(trm_clk), .rx(trm_tx), .ch_en(trm_ch_en_right), .echo(trm_rx_right));

  // ---------------- probes ----------------
  always @(posedge clk_sys) begin
    if (dut.u_wsm.state != dut.u_wsm.S_IDLE && dut.txf_full) n_wsm_stall++;
    if (dut.u_rsm.state == dut.u_rsm.S_WAIT && dut.rxf_empty) n_rsm_wait++;
    if (rst_n && dut.rxf_wr_en && dut.rxf_full) begin
      checks++; failures++; $display("FAIL: Receive FIFO overflow");
    end
  end

  // link frame spacing, measured in link clock cycles at the falling edge
  int link_cyc = 0, last_start = -100;
  logic [15:0] link_words[$];
  initial begin
    logic [15:0] w;
    forever begin
      @(negedge trm_clk); link_cyc++;
      if (rst_n && trm_tx === 1'b0) begin
        if (link_cyc - last_start == 19) n_b2b_frames++;
        if (link_cyc - last_start < 19) begin checks++; failures++; $display("FAIL: frames too close"); end
        last_start = link_cyc;
        for (int i = 15; i >= 0; i--) begin @(negedge trm_clk); link_cyc++; w[i] = trm_tx; end
        @(negedge trm_clk); link_cyc++;
        link_words.push_back(w);
      end
    end
  end

  // Transceiver interface capture: sample on rising interface clock
  logic [31:0] xcvr_shift; int xcvr_bits = 0;
  always @(posedge xcvr_clk) if (xcvr_en) begin xcvr_shift = {xcvr_shift[30:0], xcvr_data}; xcvr_bits++; end

  // trigger capture
  int n_trig_x = 0, n_trig_t = 0;
  longint last_x_rise = -1, prt_meas = -1;
  logic tx_q = 1'b0, tt_q = 1'b0;
  longint sys_cyc = 0;
  always @(posedge clk_sys) begin
    #1;
    sys_cyc++;
    if (trig_xcvr && !tx_q) begin
      n_trig_x++;
      if (last_x_rise >= 0) prt_meas = sys_cyc - last_x_rise;
      last_x_rise = sys_cyc;
    end
    if (trig_trm && !tt_q) n_trig_t++;
    tx_q = trig_xcvr; tt_q = trig_trm;
  end

  // ---------------- software model ----------------
  task automatic pf_write(input int a, input logic [31:0] d);
    @(negedge clk_sys); pf_wr = 1'b1; pf_addr = 5'(a); pf_wdata = d;
    @(negedge clk_sys); pf_wr = 1'b0;
  endtask

  task automatic pf_read(input int a, output logic [31:0] d);
    @(negedge clk_sys); pf_addr = 5'(a); #1; d = pf_rdata;
  endtask

  // write one 32-bit word to the T/R Module interface and wait for Write Ack
  task automatic trm_write(input logic [31:0] w);
    logic [31:0] ack; int n = 0;
    pf_write(PF_WSM_DATA, w);
    pf_write(PF_WR_EN, 1);
    pf_write(PF_WR_EN, 0);
    do begin pf_read(PF_WR_ACK, ack); n++; end while (ack[0] !== 1'b1 && n < 100000);
  endtask

  // read one 16-bit word through the RSM, waiting at most max_wait reads
  task automatic trm_read(output logic [15:0] w, output bit ok, input int max_wait);
    logic [31:0] ack, d; int n = 0;
    pf_write(PF_RD_EN, 1);
    do begin pf_read(PF_RD_ACK, ack); n++; end while (ack[0] !== 1'b1 && n < max_wait);
    pf_read(PF_RSM_DATA, d);
    pf_write(PF_RD_EN, 0);
    w = d[15:0]; ok = (ack[0] === 1'b1);
  endtask

  // unicast calibration transfer: command, N, N words; all echoed back
  task automatic calibrate(input int module_addr, input int n_words);
    logic [15:0] sent[$], w; bit ok; int bad = 0, left0, right0;
    left0 = u_left.echoed; right0 = u_right.echoed;
    pf_write(PF_TRM_ADDR, module_addr);
    pf_write(PF_CH_EN, 1);
    sent.push_back(16'(16'hC000 | module_addr));   // command word (test value)
    sent.push_back(16'(n_words));
    for (int i = 0; i < n_words; i++) sent.push_back(16'($urandom));
    for (int i = 0; i < sent.size(); i += 2) trm_write({sent[i], sent[i+1]});
    foreach (sent[i]) begin
      trm_read(w, ok, 2000);
      if (!ok || w !== sent[i]) bad++;
      if (!ok && i >= 8 && bad > i / 2) break;   // channel silent: give up early
    end
    pf_write(PF_CH_EN, 0);
    checks++;
    if (bad) begin failures++; $display("FAIL: module %0d: %0d of %0d echoed words wrong", module_addr, bad, sent.size()); end
    if (module_addr <= 32) n_left_echo += u_left.echoed - left0;
    else                   n_right_echo += u_right.echoed - right0;
    checks++;
    if ((module_addr <= 32 ? u_right.echoed - right0 : u_left.echoed - left0) != 0) begin
      failures++; $display("FAIL: wrong channel echoed");
    end
  endtask

  // one beam position of the "Begin" function
  task automatic begin_beam(input logic [15:0] seq[8], input logic [31:0] scan,
                            input int loops, input timing_reg_t tr[4]);
    logic [31:0] ack; int n = 0, x0, t0, prt;
    // sequence table broadcast (channel off)
    for (int i = 0; i < 8; i += 2) trm_write({seq[i], seq[i+1]});
    // scan information to the Transceiver
    xcvr_bits = 0;
    pf_write(PF_XCVR_EN, 1);
    pf_write(PF_XCVR_DATA, scan);
    pf_write(PF_XCVR_EN, 0);
    n = 0;
    do begin pf_read(PF_XCVR_ACK, ack); n++; end while (ack[0] !== 1'b1 && n < 100000);
    repeat (4) @(posedge clk_sys);
    checks++;
    if (xcvr_bits != 32 || xcvr_shift !== scan) begin
      failures++; $display("FAIL: scan word %h (%0d bits) expected %h", xcvr_shift, xcvr_bits, scan);
    end else n_xcvr++;
    // TSM
    pf_write(PF_LOOP_NUM, loops);
    pf_write(PF_TREG1, tr[0]); pf_write(PF_TREG2, tr[1]);
    pf_write(PF_TREG3, tr[2]); pf_write(PF_TREG4, tr[3]);
    x0 = n_trig_x; t0 = n_trig_t;
    pf_write(PF_TSM_EN, 1);
    n = 0;
    do begin pf_read(PF_TSM_ACK, ack); n++; end while (ack[0] !== 1'b1 && n < 1000000);
    pf_write(PF_TSM_EN, 0);
    repeat (4) @(posedge clk_sys);
    checks++;
    if (n_trig_x - x0 != 4 * loops || n_trig_t - t0 != 8 * loops) begin
      failures++; $display("FAIL: %0d/%0d triggers for loop %0d", n_trig_x - x0, n_trig_t - t0, loops);
    end
    if (loops > 1) n_tsm_multi_pass++;
    if (loops == 0) n_tsm_loop0++;
    // the last measured period is from pulse 3 to pulse 4 of the last pass
    prt = int'(tr[2].tx_time) + int'(tr[2].rx_time) + 4 * 4 + 2;
    if (loops > 0) begin
      checks++;
      if (prt_meas != prt) begin failures++; $display("FAIL: pulse repetition %0d expected %0d", prt_meas, prt); end
    end
    checks++;
    if (loops == 0 && ack[0] !== 1'b1) begin failures++; $display("FAIL: loop 0 no ack"); end
  endtask

  initial begin
    #50ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] w; bit ok; logic [31:0] d;
    logic [15:0] seq[8]; timing_reg_t tr[4];
    int base;
    repeat (5) @(posedge clk_sys);
    rst_n = 1'b1;
    repeat (5) @(posedge clk_sys);

    // 1. calibration loads, left and right channel
    calibrate(7, 1024);
    calibrate(40, 1024);
    $display("calibration done at %0t", $realtime);

    // 2. address outside 1..64: nothing comes back, the RSM waits
    pf_write(PF_TRM_ADDR, 70);
    pf_write(PF_CH_EN, 1);
    trm_write({16'hD000 | 16'd70, 16'h0000});
    trm_read(w, ok, 400);
    checks++;
    if (ok || trm_ch_en_left || trm_ch_en_right) begin failures++; $display("FAIL: answer from address 70"); end
    else n_no_channel++;
    pf_write(PF_CH_EN, 0);

    // 3. overflow pressure on the Transmit FIFO, echo off
    repeat (2000) @(posedge clk_sys);
    link_words.delete();
    begin
      logic [15:0] sent[$];
      for (int i = 0; i < 1300; i++) sent.push_back(16'($urandom));
      for (int i = 0; i < 1300; i += 2) trm_write({sent[i], sent[i+1]});
      wait (link_words.size() == 1300 || link_words.size() > 1300);
      checks++;
      if (link_words != sent) begin failures++; $display("FAIL: words lost under FIFO pressure"); end
    end
    repeat (100) @(posedge clk_sys);

    // the pending read of step 2 consumed nothing; clear the RSM by
    // resetting the FIFOs, then verify queued words are discarded
    // 4. FIFO reset: queue words towards the modules, reset, check few go out
    link_words.delete();
    for (int i = 0; i < 20; i++) trm_write($urandom);
    pf_write(PF_FIFO_RESET, 1);
    pf_write(PF_FIFO_RESET, 0);
    pf_read(PF_TXF_EMPTY, d);
    repeat (3000) @(posedge clk_sys);
    checks++;
    if (link_words.size() >= 40) begin failures++; $display("FAIL: FIFO reset discarded nothing"); end
    else n_fifo_reset++;

    // 5. two beam positions
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < 8; i++) seq[i] = {2'b01, 4'd3, i[1], i[0], 8'(b * 16 + i)};
      for (int i = 0; i < 4; i++) begin
        tr[i].tx_time = 16'($urandom_range(20, 60));
        tr[i].rx_time = 16'($urandom_range(100, 400));
      end
      base = link_words.size();
      begin_beam(seq, $urandom, 3 + b, tr);
      checks++;
      if (link_words.size() != base + 8 || link_words[base] !== seq[0] || link_words[base+7] !== seq[7]) begin
        failures++; $display("FAIL: sequence table broadcast");
      end
    end
    // 6. Loop Number 0
    begin_beam(seq, 32'h0, 0, tr);

    // mechanism coverage
    checks++; if (n_left_echo < 1026)   begin failures++; $display("FAIL: left echo %0d", n_left_echo); end
    checks++; if (n_right_echo < 1026)  begin failures++; $display("FAIL: right echo %0d", n_right_echo); end
    checks++; if (n_no_channel == 0)    begin failures++; $display("FAIL: no out-of-range address case"); end
    checks++; if (n_wsm_stall == 0)     begin failures++; $display("FAIL: WSM never stalled on a full FIFO"); end
    checks++; if (n_rsm_wait == 0)      begin failures++; $display("FAIL: RSM never waited"); end
    checks++; if (n_fifo_reset == 0)    begin failures++; $display("FAIL: no FIFO reset"); end
    checks++; if (n_tsm_multi_pass == 0) begin failures++; $display("FAIL: no multi-pass TSM run"); end
    checks++; if (n_tsm_loop0 == 0)     begin failures++; $display("FAIL: no loop-0 run"); end
    checks++; if (n_xcvr == 0)          begin failures++; $display("FAIL: no scan word"); end
    checks++; if (n_b2b_frames == 0)    begin failures++; $display("FAIL: no back-to-back frames"); end
    checks++; if (u_left.frame_err || u_right.frame_err) begin failures++; $display("FAIL: frame errors"); end
    $display("mechanisms: left_echo=%0d right_echo=%0d no_channel=%0d wsm_stall_cycles=%0d rsm_wait_cycles=%0d fifo_reset=%0d tsm_multi_pass=%0d tsm_loop0=%0d xcvr_words=%0d b2b_frames=%0d",
             n_left_echo, n_right_echo, n_no_channel, n_wsm_stall, n_rsm_wait, n_fifo_reset,
             n_tsm_multi_pass, n_tsm_loop0, n_xcvr, n_b2b_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
