// tb_tr_serial_tx -- self-checking test of the T/R link serial Transmitter.
//
// A queue stands in for the Transmit FIFO (standard mode: data one cycle
// after the read). The test sends 0xA55A and a set of random words, some with
// idle time between them and some back to back, decodes the line on the
// falling clock edge exactly as a T/R Module would (start bit, 16 bits MSB
// first, stop bit) and compares the words. It also checks that tx_done pulses
// once per frame and that back-to-back frames start 19 cycles apart.
module tb_tr_serial_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fifo_empty, fifo_rd_en, tx, tx_done, busy;
  logic [15:0] fifo_dout;
  logic [15:0] q[$], expect_q[$];
  int checks = 0, failures = 0;
  int done_cnt = 0, frames = 0;
  int cyc = 0, last_start = -1, b2b_checked = 0;

  always #20 clk = ~clk;   // 25 MHz
  always @(posedge clk) cyc <= cyc + 1;

  tr_serial_tx dut (.clk, .rst_n, .fifo_empty, .fifo_rd_en, .fifo_dout, .tx, .tx_done, .busy);

  assign fifo_empty = (q.size() == 0);
  always @(posedge clk) if (fifo_rd_en && q.size() != 0) fifo_dout <= q.pop_front();
  always @(posedge clk) if (rst_n && tx_done) done_cnt++;

  // line decoder, sampling at the falling edge
  initial begin
    logic [15:0] w;
    forever begin
      @(negedge clk);
      if (rst_n && tx == 1'b0) begin
        if (last_start >= 0 && cyc - last_start == 19) b2b_checked++;
        if (last_start >= 0 && cyc - last_start < 19) begin
          failures++; $display("FAIL: frames %0d cycles apart", cyc - last_start);
        end
        last_start = cyc;
        for (int i = 15; i >= 0; i--) begin @(negedge clk); w[i] = tx; end
        @(negedge clk);
        checks++;
        if (tx !== 1'b1) begin failures++; $display("FAIL: stop bit missing"); end
        checks++; frames++;
        if (expect_q.size() == 0 || w !== expect_q[0]) begin
          failures++; $display("FAIL: got %h expected %h", w, expect_q.size() ? expect_q[0] : 16'hx);
        end
        if (expect_q.size()) void'(expect_q.pop_front());
      end
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    fifo_dout = '0;
    repeat (3) @(posedge clk);
    checks++; if (tx !== 1'b1) begin failures++; $display("FAIL: idle line not high"); end
    rst_n = 1'b1;
    @(posedge clk); q.push_back(16'hA55A); expect_q.push_back(16'hA55A);
    repeat (30) @(posedge clk);
    // back-to-back burst
    for (int i = 0; i < 6; i++) begin
      automatic logic [15:0] r = 16'($urandom);
      q.push_back(r); expect_q.push_back(r);
    end
    repeat (200) @(posedge clk);
    // spaced words
    for (int i = 0; i < 4; i++) begin
      automatic logic [15:0] r = 16'($urandom);
      q.push_back(r); expect_q.push_back(r);
      repeat (25 + i*3) @(posedge clk);
    end
    repeat (40) @(posedge clk);
    checks++; if (frames != 11) begin failures++; $display("FAIL: %0d frames", frames); end
    checks++; if (done_cnt != 11) begin failures++; $display("FAIL: %0d tx_done", done_cnt); end
    checks++; if (b2b_checked < 5) begin failures++; $display("FAIL: only %0d back-to-back gaps of 19", b2b_checked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
