// tb_rx_sync -- self-checking test of the receive-side clock synchronizer.
//
// Source side: 25 MHz, one-cycle pulses with random 16-bit words, spaced by
// 3..20 source cycles (a received frame takes at least 18). Destination: the
// 50 MHz FIFO clock. Checks that every word is written exactly once, in
// order, with the right value, and within 5 destination cycles of the source
// edge that saw the pulse.
module tb_rx_sync;
  logic sclk = 1'b0, dclk = 1'b0, rst_n = 1'b0;
  logic src_pulse = 1'b0, dst_wr_en;
  logic [15:0] src_data = '0, dst_data;
  logic [15:0] expect_q[$];
  realtime sent_t[$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  always #20 sclk = ~sclk;
  always #10 dclk = ~dclk;

  rx_sync #(.WIDTH(16)) dut (.src_clk(sclk), .src_rst_n(rst_n), .src_pulse, .src_data,
                             .dst_clk(dclk), .dst_rst_n(rst_n), .dst_wr_en, .dst_data);

  always @(posedge dclk) if (rst_n && dst_wr_en) begin
    got++;
    checks++;
    if (expect_q.size() == 0 || dst_data !== expect_q[0]) begin
      failures++; $display("FAIL: got %h expected %h", dst_data, expect_q.size() ? expect_q[0] : 16'hx);
    end
    checks++;
    if (sent_t.size() && $realtime - sent_t[0] > 5 * 20.0) begin
      failures++; $display("FAIL: latency %0t", $realtime - sent_t[0]);
    end
    if (expect_q.size()) void'(expect_q.pop_front());
    if (sent_t.size()) void'(sent_t.pop_front());
  end

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge sclk);
    rst_n = 1'b1;
    repeat (3) @(posedge sclk);
    for (int i = 0; i < 60; i++) begin
      automatic logic [15:0] w = 16'($urandom);
      @(posedge sclk);
      src_pulse <= 1'b1; src_data <= w;
      expect_q.push_back(w);
      @(posedge sclk);
      sent_t.push_back($realtime);
      src_pulse <= 1'b0; src_data <= ~w;   // data may change after the pulse
      sent++;
      repeat ($urandom_range(1, 18)) @(posedge sclk);
    end
    repeat (10) @(posedge sclk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL: %0d writes for %0d words", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
