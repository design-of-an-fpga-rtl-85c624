// tb_tsm -- self-checking test of the Timing State Machine.
//
// TRIG_CYCLES is reduced to 2. For several runs with random timing registers
// and Loop Numbers the test builds the expected trigger waveform from the
// pulse description (per pulse: LOAD 1, XCVR T, BOTH T, TTRIG T, TXWAIT
// tx_time, RTRIG T, RXWAIT rx_time, NEXT 1 cycles) independently of the RTL,
// records (trig_xcvr, trig_trm) on every cycle while the TSM runs and compares
// them cycle by cycle; so the pulse repetition time and the 4 x Loop Number
// pulse count are checked exactly. It also checks timing_ack, that all 32
// state numbers appear, that Loop Number 0 acknowledges with no pulse, that
// clearing the enable mid-run stops the triggers without ack, and that
// zero transmit/receive times last one cycle.
module tb_tsm;
  import afb_pkg::*;
  localparam int T = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sw_en = 1'b0, trig_xcvr, trig_trm, timing_ack, running;
  logic [15:0] loop_num = '0;
  timing_reg_t [3:0] treg = '0;
  logic [4:0] state_num;
  logic [1:0] got[$], exp_w[$];
  bit seen_state[32];
  int checks = 0, failures = 0, tx_rises = 0;
  logic xq = 1'b0;

  always #10 clk = ~clk;

  tsm #(.TRIG_CYCLES(T)) dut (.clk, .rst_n, .sw_en, .loop_num, .treg, .trig_xcvr, .trig_trm,
                              .timing_ack, .state_num, .running);

  always @(posedge clk) begin
    #1;
    if (running) begin
      got.push_back({trig_xcvr, trig_trm});
      seen_state[state_num] = 1'b1;
    end
    if (trig_xcvr && !xq) tx_rises++;
    xq = trig_xcvr;
  end

  function automatic void push(int n, logic [1:0] v);
    for (int i = 0; i < n; i++) exp_w.push_back(v);
  endfunction

  function automatic void build(int loops);
    exp_w.delete();
    for (int l = 0; l < loops; l++)
      for (int p = 0; p < 4; p++) begin
        push(1, 2'b00);
        push(T, 2'b10); push(T, 2'b11); push(T, 2'b01);
        push(treg[p].tx_time == 0 ? 1 : int'(treg[p].tx_time), 2'b00);
        push(T, 2'b01);
        push(treg[p].rx_time == 0 ? 1 : int'(treg[p].rx_time), 2'b00);
        push(1, 2'b00);
      end
  endfunction

  task automatic run(int loops);
    int n = 0;
    got.delete(); tx_rises = 0;
    build(loops);
    @(posedge clk) loop_num <= 16'(loops); sw_en <= 1'b1;
    do begin @(posedge clk); #1; n++; end while (timing_ack !== 1'b1 && n < 100000);
    repeat (2) @(posedge clk);
    sw_en <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (got.size() != exp_w.size()) begin
      failures++; $display("FAIL: run length %0d expected %0d", got.size(), exp_w.size());
    end else begin
      int bad = 0;
      foreach (got[i]) if (got[i] !== exp_w[i]) bad++;
      if (bad) begin failures++; $display("FAIL: %0d cycles differ", bad); end
    end
    checks++;
    if (tx_rises != 4 * loops) begin failures++; $display("FAIL: %0d pulses for loop %0d", tx_rises, loops); end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 5; r++) begin
      for (int p = 0; p < 4; p++) begin
        treg[p].tx_time = 16'($urandom_range(1, 12));
        treg[p].rx_time = 16'($urandom_range(1, 40));
      end
      if (r == 4) begin treg[1].tx_time = 0; treg[2].rx_time = 0; end
      run($urandom_range(1, 4));
      checks++; if (timing_ack !== 1'b1) begin failures++; $display("FAIL: ack not held"); end
    end
    checks++;
    foreach (seen_state[i]) if (!seen_state[i]) begin failures++; $display("FAIL: state %0d never seen", i); break; end
    // Loop Number zero
    run(0);
    // abort by clearing the enable
    @(posedge clk) loop_num <= 16'd5; sw_en <= 1'b1;
    repeat (30) @(posedge clk);
    sw_en <= 1'b0;
    repeat (3) @(posedge clk);
    tx_rises = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (tx_rises != 0 || timing_ack !== 1'b0 || running) begin failures++; $display("FAIL: abort"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
