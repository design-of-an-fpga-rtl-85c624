// tb_tr_serial_rx -- self-checking test of the T/R link serial Receiver.
//
// Drives frames (start 0, 16 bits MSB first, stop 1) on rx, changing the line
// on the rising edge so the Receiver samples mid-bit on the falling edge.
// Sends 0x8CC7 and random words with random idle gaps, including 18-cycle
// back-to-back frames, and checks data_out at every rx_done pulse, the number
// of pulses, and that rx_done comes right after the last data bit.
module tb_tr_serial_rx;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx = 1'b1, rx_done;
  logic [15:0] data_out;
  logic [15:0] expect_q[$];
  int checks = 0, failures = 0, dones = 0, sent = 0;
  int cyc = 0, last_bit_cyc = 0;

  always #20 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  tr_serial_rx dut (.clk, .rst_n, .rx, .data_out, .rx_done);

  always @(posedge clk) if (rst_n && rx_done) begin
    dones++;
    checks++;
    if (expect_q.size() == 0 || data_out !== expect_q[0]) begin
      failures++; $display("FAIL: data_out %h expected %h", data_out, expect_q.size() ? expect_q[0] : 16'hx);
    end
    if (expect_q.size()) void'(expect_q.pop_front());
    checks++;
    if (cyc - last_bit_cyc > 2) begin failures++; $display("FAIL: rx_done late"); end
  end

  task automatic send(input logic [15:0] w, input int gap);
    expect_q.push_back(w);
    @(posedge clk) rx <= 1'b0;
    for (int i = 15; i >= 0; i--) begin @(posedge clk) rx <= w[i]; end
    last_bit_cyc = cyc + 1;
    @(posedge clk) rx <= 1'b1;
    repeat (gap) @(posedge clk);
    sent++;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    send(16'h8CC7, 5);
    send(16'h0000, 0);
    send(16'hFFFF, 0);
    for (int i = 0; i < 20; i++) send(16'($urandom), $urandom_range(0, 4));
    repeat (10) @(posedge clk);
    checks++;
    if (dones != sent) begin failures++; $display("FAIL: %0d rx_done for %0d frames", dones, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
