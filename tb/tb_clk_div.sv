// tb_clk_div -- self-checking test of the Transceiver interface clock divider.
//
// Runs the default divider (100 MHz in, DIV = 100) and measures the output:
// every period must be 100 input cycles with 50 high, and tick_rise/tick_fall
// must pulse exactly in the input cycle whose edge makes clk_out rise/fall.
module tb_clk_div;
  logic clk = 1'b0, rst_n = 1'b0, clk_out, tick_rise, tick_fall;
  int checks = 0, failures = 0, cyc = 0, last_rise = -1, high_cnt = 0, periods = 0;
  logic prev = 1'b0, prev_tr = 1'b0, prev_tf = 1'b0;

  always #5 clk = ~clk;

  clk_div dut (.clk, .rst_n, .clk_out, .tick_rise, .tick_fall);

  always @(posedge clk) if (rst_n) begin
    #1;
    cyc++;
    if (clk_out) high_cnt++;
    if (clk_out && !prev) begin
      checks++;
      if (last_rise >= 0 && !prev_tr) begin failures++; $display("FAIL: rise without tick_rise"); end
      if (last_rise >= 0) begin
        periods++;
        checks++;
        if (cyc - last_rise != 100 || high_cnt != 51) begin
          failures++; $display("FAIL: period %0d high %0d", cyc - last_rise, high_cnt - 1);
        end
      end
      last_rise = cyc; high_cnt = 1;
    end
    if (!clk_out && prev) begin
      checks++;
      if (!prev_tf) begin failures++; $display("FAIL: fall without tick_fall"); end
    end
    if (last_rise >= 0 && prev_tr && !(clk_out && !prev)) begin failures++; checks++; $display("FAIL: tick_rise without rise"); end
    if (prev_tf && !(!clk_out && prev)) begin failures++; checks++; $display("FAIL: tick_fall without fall"); end
    prev = clk_out; prev_tr = tick_rise; prev_tf = tick_fall;
  end

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (1005) @(posedge clk);
    checks++; if (periods < 9) begin failures++; $display("FAIL: %0d periods", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
