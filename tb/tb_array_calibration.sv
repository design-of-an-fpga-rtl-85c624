// tb_array_calibration -- workload test: calibrating the whole array.
//
// Full size at default parameters. Loads the look-up tables of all 64 T/R
// Modules over the serial link, one module after the other, as the
// initialization phase of the radar does: for module m the software enables
// the echo channel of m, writes the command word, the word count 1024 and
// 1024 table words (1026 link words), and reads all 1026 echoes back through
// the Read State Machine, comparing each with what was sent. The link time of
// each module's load is measured from the first start bit to the last stop
// bit and must be 1026 frames at no more than 19 link clocks each, i.e. the
// Transmit FIFO must never run dry while software is ahead of the link. After
// the whole array is loaded, one beam position is run (sequence broadcast,
// scan word, Loop Number 2) and after every trigger edge the port registers
// of all 64 modules are compared with the words loaded over the link.
//
// The module side (link decoders) is played by the test, with the same test
// command convention as tb_phase_tilt_top:
//   C000|a, N, N words   calibration load of module a (table words 0..N-1)
//   B000, 8 entries      sequence table broadcast to all modules
//   0000 while idle      padding, ignored
// and the two echo channels are trm_echo_model instances.
module tb_array_calibration;
  import afb_pkg::*;
  localparam int N = TRM_COUNT;

  logic clk_ext = 1'b0, clk_sys = 1'b0, clk_tr = 1'b0, rst_n = 1'b0;
  logic pf_wr = 1'b0;
  logic [4:0] pf_addr = '0;
  logic [31:0] pf_wdata = '0, pf_rdata;
  logic trm_clk, trm_tx, trm_rx_left, trm_rx_right, trm_ch_en_left, trm_ch_en_right;
  logic trig_xcvr, trig_trm, xcvr_clk, xcvr_data, xcvr_en;
  logic [4:0] tsm_state;
  logic       [N-1:0] trm_lut_we = '0, trm_seq_we = '0, trm_port_we = '0, trm_addr_load = '0;
  logic       [N-1:0][9:0] trm_lut_addr = '0, trm_addr_value = '0;
  lut_word_t  [N-1:0] trm_lut_wdata = '0, trm_port_wdata = '0, trm_port_reg;
  logic       [N-1:0][2:0] trm_seq_idx = '0, trm_seq_pos;
  seq_entry_t [N-1:0] trm_seq_wdata = '0;
  logic       [N-1:0][3:0] trm_temperature;

  // reference model of the module side
  lut_word_t  m_lut [N][1024];
  seq_entry_t m_seq [8];
  int exp_pos = 0;

  int checks = 0, failures = 0;
  int n_link_lut = 0, n_echo_left = 0, n_echo_right = 0, n_seq_bcast = 0, n_addr_load = 0;
  int n_gapless = 0, cal_cycles = 0, link_cyc = 0, fstart = 0, cal_start = 0;
  int n_port_write = 0, n_port_checks = 0, n_triggers = 0, n_xcvr = 0, n_wrap = 0;

  int unsigned phase = 0;
  always #5 begin
    clk_ext = ~clk_ext;
    if (clk_ext) begin
      phase++;
      clk_sys = phase[0];
      clk_tr  = phase[1];
    end
  end

  phase_tilt_top dut (.*);

  trm_echo_model u_left  (.clk(trm_clk), .rx(trm_tx), .ch_en(trm_ch_en_left),  .echo(trm_rx_left));
  trm_echo_model u_right (.clk(trm_clk), .rx(trm_tx), .ch_en(trm_ch_en_right), .echo(trm_rx_right));

  function automatic logic [9:0] eaddr(seq_entry_t e);
    return {e.tr, ~e.hv, e.beam};
  endfunction

  always @(negedge trm_clk) link_cyc++;

  // ---------------- module-side decoder (test convention) ----------------
  initial begin
    logic [15:0] w;
    int st = 0, mod = 0, cnt = 0, total = 0;
    forever begin
      @(negedge trm_clk);
      if (rst_n && trm_tx === 1'b0) begin
        fstart = link_cyc;
        for (int i = 15; i >= 0; i--) begin @(negedge trm_clk); w[i] = trm_tx; end
        @(negedge trm_clk);
        // drive the write ports for one link clock cycle; back-to-back
        // frames leave exactly one idle cycle, so nothing here may wait longer
        case (st)
          0: begin
            cnt = 0;
            case (w[15:12])
              4'hC: begin mod = int'(w[6:0]) - 1; st = 1; cal_start = fstart; end
              4'hB: st = 3;
              4'hA: begin mod = int'(w[6:0]) - 1; st = 4; end
              4'h9: begin mod = int'(w[6:0]) - 1; st = 5; end
              default: ;
            endcase
          end
          1: begin total = int'(w); st = (total == 0) ? 0 : 2; end
          2: begin
            trm_lut_we[mod] = 1'b1; trm_lut_addr[mod] = 10'(cnt); trm_lut_wdata[mod] = w;
            m_lut[mod][cnt] = w; n_link_lut++;
            @(negedge trm_clk) trm_lut_we[mod] = 1'b0;
            cnt++; if (cnt == total) begin st = 0; cal_cycles = link_cyc - cal_start; end
          end
          3: begin
            for (int m = 0; m < N; m++) begin
              trm_seq_we[m] = 1'b1; trm_seq_idx[m] = 3'(cnt); trm_seq_wdata[m] = w;
            end
            m_seq[cnt] = w;
            if (cnt == 0) exp_pos = 0;
            @(negedge trm_clk) trm_seq_we = '0;
            cnt++; if (cnt == 8) begin st = 0; n_seq_bcast++; end
          end
          4: begin
            trm_addr_load[mod] = 1'b1; trm_addr_value[mod] = w[9:0];
            @(negedge trm_clk) trm_addr_load[mod] = 1'b0;
            fork
              automatic int fm = mod;
              automatic logic [9:0] fa = w[9:0];
              begin
                repeat (3) @(negedge trm_clk);
                checks++;
                if (trm_port_reg[fm] !== m_lut[fm][fa]) begin
                  failures++; $display("FAIL: module %0d address load %0d: %h expected %h", fm + 1, fa,
                                       trm_port_reg[fm], m_lut[fm][fa]);
                end else n_addr_load++;
              end
            join_none
            st = 0;
          end
          5: begin
            trm_port_we[mod] = 1'b1; trm_port_wdata[mod] = w;
            @(negedge trm_clk) trm_port_we[mod] = 1'b0;
            fork
              automatic int fm = mod;
              automatic logic [15:0] fw = w;
              begin
                repeat (2) @(negedge trm_clk);
                checks++;
                if (trm_port_reg[fm] !== lut_word_t'(fw)) begin
                  failures++; $display("FAIL: module %0d port write", fm + 1);
                end else n_port_write++;
              end
            join_none
            st = 0;
          end
          default: st = 0;
        endcase
      end
    end
  end

  // ---------------- port register checker ----------------
  initial begin
    forever begin
      seq_entry_t e; int bad;
      @(posedge trig_trm);
      n_triggers++;
      e = m_seq[exp_pos];
      exp_pos = (exp_pos + 1) % 8;
      if (exp_pos == 0) n_wrap++;
      repeat (6) @(posedge clk_tr);
      bad = 0;
      for (int m = 0; m < N; m++) begin
        if (trm_port_reg[m] !== m_lut[m][eaddr(e)] || trm_temperature[m] !== e.temperature ||
            trm_seq_pos[m] !== 3'(exp_pos)) bad++;
        else n_port_checks++;
      end
      checks++;
      if (bad) begin failures++; $display("FAIL: trigger %0d: %0d modules with wrong port registers", n_triggers, bad); end
    end
  end

  // Transceiver interface capture
  logic [31:0] xcvr_shift; int xcvr_bits = 0;
  always @(posedge xcvr_clk) if (xcvr_en) begin xcvr_shift = {xcvr_shift[30:0], xcvr_data}; xcvr_bits++; end

  // ---------------- software model ----------------
  task automatic pf_write(input int a, input logic [31:0] d);
    @(negedge clk_sys); pf_wr = 1'b1; pf_addr = 5'(a); pf_wdata = d;
    @(negedge clk_sys); pf_wr = 1'b0;
  endtask

  task automatic pf_read(input int a, output logic [31:0] d);
    @(negedge clk_sys); pf_addr = 5'(a); #1; d = pf_rdata;
  endtask

  task automatic trm_write(input logic [31:0] w);
    logic [31:0] ack; int n = 0;
    pf_write(PF_WSM_DATA, w);
    pf_write(PF_WR_EN, 1);
    pf_write(PF_WR_EN, 0);
    do begin pf_read(PF_WR_ACK, ack); n++; end while (ack[0] !== 1'b1 && n < 100000);
  endtask

  task automatic trm_read(output logic [15:0] w, output bit ok, input int max_wait);
    logic [31:0] ack, d; int n = 0;
    pf_write(PF_RD_EN, 1);
    do begin pf_read(PF_RD_ACK, ack); n++; end while (ack[0] !== 1'b1 && n < max_wait);
    pf_read(PF_RSM_DATA, d);
    pf_write(PF_RD_EN, 0);
    w = d[15:0]; ok = (ack[0] === 1'b1);
  endtask

  task automatic wait_ack(input int a);
    logic [31:0] ack; int n = 0;
    do begin pf_read(a, ack); n++; end while (ack[0] !== 1'b1 && n < 1000000);
  endtask

  // calibration over the link with echo check
  task automatic calibrate(input int module_addr);
    logic [15:0] sent[$], w; bit ok; int bad = 0, l0, r0;
    l0 = u_left.echoed; r0 = u_right.echoed;
    pf_write(PF_TRM_ADDR, module_addr);
    pf_write(PF_CH_EN, 1);
    sent.push_back(16'(16'hC000 | module_addr));
    sent.push_back(16'd1024);
    for (int i = 0; i < 1024; i++) sent.push_back(16'($urandom));
    for (int i = 0; i < sent.size(); i += 2) trm_write({sent[i], sent[i+1]});
    foreach (sent[i]) begin
      trm_read(w, ok, 2000);
      if (!ok || w !== sent[i]) bad++;
      if (!ok && i >= 8 && bad > i / 2) break;   // channel silent: give up early
    end
    pf_write(PF_CH_EN, 0);
    checks++;
    if (bad) begin failures++; $display("FAIL: module %0d: %0d echoed words wrong", module_addr, bad); end
    n_echo_left  += u_left.echoed - l0;
    n_echo_right += u_right.echoed - r0;
  endtask

  task automatic run_beam(input int b, input int loops);
    logic [15:0] words[$]; logic [31:0] scan; int t0;
    words.push_back(16'hB000);
    for (int i = 0; i < 8; i++) begin
      seq_entry_t e;
      e = seq_entry_t'($urandom);
      e.tr = i[0]; e.hv = i[1];   // all four segments appear
      words.push_back(e);
    end
    words.push_back(16'h0000);
    for (int i = 0; i < words.size(); i += 2) trm_write({words[i], words[i+1]});
    scan = $urandom;
    xcvr_bits = 0;
    pf_write(PF_XCVR_EN, 1);
    pf_write(PF_XCVR_DATA, scan);
    pf_write(PF_XCVR_EN, 0);
    wait_ack(PF_XCVR_ACK);
    repeat (4) @(posedge clk_sys);
    checks++;
    if (xcvr_bits != 32 || xcvr_shift !== scan) begin failures++; $display("FAIL: beam %0d scan word", b); end
    else n_xcvr++;
    pf_write(PF_LOOP_NUM, loops);
    for (int i = 0; i < 4; i++)
      pf_write(PF_TREG1 + i, {16'($urandom_range(20, 80)), 16'($urandom_range(60, 200))});
    t0 = n_triggers;
    pf_write(PF_TSM_EN, 1);
    wait_ack(PF_TSM_ACK);
    pf_write(PF_TSM_EN, 0);
    repeat (20) @(posedge clk_sys);
    checks++;
    if (n_triggers - t0 != 8 * loops) begin failures++; $display("FAIL: beam %0d: %0d triggers", b, n_triggers - t0); end
  endtask

  initial begin
    #400ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (5) @(posedge clk_sys);
    rst_n = 1'b1;
    repeat (5) @(posedge clk_sys);

    // whole array over the link
    for (int a = 1; a <= N; a++) begin
      int l0, r0;
      l0 = n_echo_left; r0 = n_echo_right;
      calibrate(a);
      checks++;
      if ((a <= 32) ? (n_echo_left - l0 != 1026 || n_echo_right != r0)
                    : (n_echo_right - r0 != 1026 || n_echo_left != l0)) begin
        failures++; $display("FAIL: module %0d echoed on the wrong channel", a);
      end
      checks++;
      if (cal_cycles > 1025 * 19 + 18) begin
        failures++; $display("FAIL: module %0d load took %0d link clocks", a, cal_cycles);
      end else n_gapless++;
    end
    $display("array calibrated at %0t: %0d link clocks per module (%0d ns)", $realtime,
             cal_cycles, cal_cycles * 40);

    // one beam position on the link-loaded tables
    run_beam(0, 2);

    checks++; if (n_link_lut != N * 1024) begin failures++; $display("FAIL: %0d table words over the link", n_link_lut); end
    checks++; if (n_echo_left != 32 * 1026) begin failures++; $display("FAIL: left echoes %0d", n_echo_left); end
    checks++; if (n_echo_right != 32 * 1026) begin failures++; $display("FAIL: right echoes %0d", n_echo_right); end
    checks++; if (n_gapless != N)         begin failures++; $display("FAIL: %0d gapless loads", n_gapless); end
    checks++; if (n_seq_bcast != 1)       begin failures++; $display("FAIL: %0d sequence broadcasts", n_seq_bcast); end
    checks++; if (n_triggers != 16)       begin failures++; $display("FAIL: %0d triggers", n_triggers); end
    checks++; if (n_port_checks != 16 * N) begin failures++; $display("FAIL: %0d port register matches", n_port_checks); end
    checks++; if (u_left.frame_err || u_right.frame_err) begin failures++; $display("FAIL: frame errors"); end
    $display("mechanisms: link_table_words=%0d echo_left=%0d echo_right=%0d gapless_loads=%0d seq_broadcasts=%0d triggers=%0d port_matches=%0d",
             n_link_lut, n_echo_left, n_echo_right, n_gapless, n_seq_bcast, n_triggers, n_port_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
