// tb_wsm -- self-checking test of the Write State Machine.
//
// Software writes are modelled as on the processor: set Data In, pulse the
// enable (1 then 0). A queue with a settable full flag stands in for the
// Transmit FIFO. Checks: each 32-bit word becomes two FIFO writes, upper half
// first; with room in the FIFO both writes happen on the two cycles after the
// enable edge is seen and Write Ack is then 1; Write Ack reads 0 while a word
// is pending; while the FIFO is full nothing is written and the WSM waits;
// a long-held enable writes the word only once.
module tb_wsm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sw_wr_en = 1'b0, wr_ack, fifo_full = 1'b0, fifo_wr_en;
  logic [31:0] data_in = '0;
  logic [15:0] fifo_din;
  logic [15:0] got[$];
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  wsm dut (.clk, .rst_n, .sw_wr_en, .data_in, .wr_ack, .fifo_full, .fifo_wr_en, .fifo_din);

  always @(posedge clk) if (rst_n && fifo_wr_en) begin
    checks++;
    if (fifo_full) begin failures++; $display("FAIL: write while full"); end
    got.push_back(fifo_din);
  end

  task automatic sw_write(input logic [31:0] d, input int hold);
    @(posedge clk) data_in <= d; sw_wr_en <= 1'b1;
    repeat (hold) @(posedge clk);
    sw_wr_en <= 1'b0;
  endtask

  task automatic expect_words(input logic [31:0] d);
    checks++;
    if (got.size() != 2 || got[0] !== d[31:16] || got[1] !== d[15:0]) begin
      failures++; $display("FAIL: words for %h: %p", d, got);
    end
    got.delete();
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // plain write, enable for one cycle
    sw_write(32'hCAFE_0123, 1);
    repeat (3) @(posedge clk);
    expect_words(32'hCAFE_0123);
    checks++; if (wr_ack !== 1'b1) begin failures++; $display("FAIL: no ack"); end
    // enable held for long: one word only
    sw_write(32'h1111_2222, 20);
    repeat (3) @(posedge clk);
    expect_words(32'h1111_2222);
    // FIFO full: stall
    fifo_full <= 1'b1;
    sw_write(32'hDEAD_BEEF, 1);
    repeat (10) @(posedge clk);
    checks++; if (got.size() != 0) begin failures++; $display("FAIL: wrote while full"); end
    checks++; if (wr_ack !== 1'b0) begin failures++; $display("FAIL: ack while pending"); end
    fifo_full <= 1'b0;
    @(posedge clk); fifo_full <= 1'b1;    // one free slot only
    repeat (5) @(posedge clk);
    checks++; if (got.size() != 1) begin failures++; $display("FAIL: %0d words with one free slot", got.size()); end
    fifo_full <= 1'b0;
    repeat (4) @(posedge clk);
    expect_words(32'hDEAD_BEEF);
    checks++; if (wr_ack !== 1'b1) begin failures++; $display("FAIL: no ack after stall"); end
    // random words
    for (int i = 0; i < 20; i++) begin
      automatic logic [31:0] r = $urandom;
      sw_write(r, $urandom_range(1, 3));
      begin
        int n = 0;
        do begin @(posedge clk); #1; n++; end while (wr_ack !== 1'b1 && n < 50);
      end
      expect_words(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
