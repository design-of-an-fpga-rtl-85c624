// tb_sync_fifo -- self-checking test of the single-clock Receive FIFO.
//
// DEPTH reduced to 8. Fills past full (checks the count, full and that extra
// writes are dropped), drains past empty, then runs 400 cycles of random
// simultaneous reads and writes against a queue model, checking data order,
// count, empty and full every cycle.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [15:0] din = '0, dout;
  logic [3:0] count;
  logic [15:0] model[$];
  logic rd_pending = 1'b0;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .din, .full,
                                              .rd_en, .dout, .empty, .count);

  always @(posedge clk) if (rst_n) begin
    if (rd_pending) begin
      checks++;
      if (model.size() == 0 || dout !== model[0]) begin
        failures++; $display("FAIL: dout %h expected %h", dout, model.size() ? model[0] : 16'hx);
      end
      if (model.size()) void'(model.pop_front());
    end
    checks++;
    if (count != 4'(model.size()) || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
      failures++; $display("FAIL: count %0d model %0d", count, model.size());
    end
    rd_pending <= rd_en && !empty;
    if (wr_en && !full) model.push_back(din);
  end

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH + 3; i++) begin @(posedge clk); wr_en <= 1'b1; din <= 16'($urandom); end
    @(posedge clk); wr_en <= 1'b0;
    @(posedge clk);
    checks++; if (!full) begin failures++; $display("FAIL: not full"); end
    rd_en <= 1'b1;
    repeat (DEPTH + 3) @(posedge clk);
    rd_en <= 1'b0;
    repeat (2) @(posedge clk);
    checks++; if (!empty) begin failures++; $display("FAIL: not empty"); end
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      wr_en <= $urandom_range(0, 1); rd_en <= $urandom_range(0, 1); din <= 16'($urandom);
    end
    @(posedge clk); wr_en <= 1'b0; rd_en <= 1'b0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
