// tb_rsm -- self-checking test of the Read State Machine.
//
// A queue stands in for the Receive FIFO (standard mode, data one cycle after
// the read). Software reads are modelled as on the processor: set the read
// enable, wait for Read Ack, read Data Out, clear the enable. Checks the words
// come out in order, one per enable edge, with data and ack three clock edges after
// the one where software sets the enable; that with an empty FIFO the RSM waits (no read, ack low)
// and completes when a word arrives; and that the FIFO is never read while
// empty.
module tb_rsm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sw_rd_en = 1'b0, rd_ack, fifo_empty, fifo_rd_en;
  logic [15:0] data_out, fifo_dout = '0;
  logic [15:0] q[$], exp_q[$];
  int checks = 0, failures = 0, reads = 0;

  always #10 clk = ~clk;

  rsm dut (.clk, .rst_n, .sw_rd_en, .data_out, .rd_ack, .fifo_empty, .fifo_rd_en, .fifo_dout);

  assign fifo_empty = (q.size() == 0);
  always @(posedge clk) if (rst_n && fifo_rd_en) begin
    reads++;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL: read while empty"); end
    else fifo_dout <= q.pop_front();
  end

  task automatic sw_read(output logic [15:0] d, output int lat);
    int n = 0;
    @(posedge clk) sw_rd_en <= 1'b1;
    do begin @(posedge clk); #1; n++; end while (rd_ack !== 1'b1 && n < 50);
    d = data_out; lat = n;
    sw_rd_en <= 1'b0;
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] d; int lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 10; i++) begin
      automatic logic [15:0] r = 16'($urandom);
      q.push_back(r); exp_q.push_back(r);
    end
    for (int i = 0; i < 10; i++) begin
      sw_read(d, lat);
      checks++;
      if (d !== exp_q[0]) begin failures++; $display("FAIL: got %h expected %h", d, exp_q[0]); end
      void'(exp_q.pop_front());
      checks++;
      if (lat != 3) begin failures++; $display("FAIL: latency %0d", lat); end
    end
    checks++; if (reads != 10) begin failures++; $display("FAIL: %0d FIFO reads", reads); end
    // empty FIFO: the read waits
    @(posedge clk) sw_rd_en <= 1'b1;
    repeat (15) @(posedge clk);
    checks++; if (rd_ack !== 1'b0) begin failures++; $display("FAIL: ack with empty FIFO"); end
    sw_rd_en <= 1'b0;
    q.push_back(16'h5A5A);
    repeat (4) @(posedge clk);
    checks++; if (rd_ack !== 1'b1 || data_out !== 16'h5A5A) begin failures++; $display("FAIL: waited read %h", data_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
