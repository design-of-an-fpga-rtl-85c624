// tb_async_fifo -- self-checking test of the dual-clock Transmit FIFO.
//
// Write side 50 MHz, read side 25 MHz, DEPTH reduced to 16 so the full flag
// is reached quickly. Phase 1 fills the FIFO without reading and checks that
// exactly DEPTH words are accepted and full rises. Phase 2 drains it and
// checks order and the empty flag. Phase 3 streams 300 random words with
// random enables on both sides and compares against a queue model.
module tb_async_fifo;
  localparam int DEPTH = 16;
  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [15:0] din = '0, dout;
  logic [15:0] model[$];
  int checks = 0, failures = 0, accepted = 0, popped = 0;
  logic rd_pending = 1'b0;

  always #10 wclk = ~wclk;
  always #20 rclk = ~rclk;

  async_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.wclk, .wrst_n(rst_n), .wr_en, .din, .full,
                                               .rclk, .rrst_n(rst_n), .rd_en, .dout, .empty);

  always @(posedge wclk) if (rst_n && wr_en && !full) begin model.push_back(din); accepted++; end

  always @(posedge rclk) begin
    if (rd_pending) begin
      checks++;
      if (model.size() == 0 || dout !== model[0]) begin
        failures++; $display("FAIL: dout %h expected %h", dout, model.size() ? model[0] : 16'hx);
      end
      if (model.size()) void'(model.pop_front());
      popped++;
    end
    rd_pending <= rst_n && rd_en && !empty;
  end

  initial begin
    #400000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (4) @(posedge rclk);
    rst_n = 1'b1;
    repeat (4) @(posedge rclk);
    checks++; if (!empty || full) begin failures++; $display("FAIL: flags after reset"); end
    // phase 1: fill
    for (int i = 0; i < DEPTH + 6; i++) begin
      @(posedge wclk); wr_en <= 1'b1; din <= 16'(i * 257 + 3);
    end
    @(posedge wclk); wr_en <= 1'b0;
    repeat (6) @(posedge wclk);
    checks++; if (accepted != DEPTH) begin failures++; $display("FAIL: accepted %0d", accepted); end
    checks++; if (!full) begin failures++; $display("FAIL: full not set"); end
    // phase 2: drain
    @(posedge rclk); rd_en <= 1'b1;
    repeat (DEPTH + 4) @(posedge rclk);
    rd_en <= 1'b0;
    repeat (6) @(posedge rclk);
    checks++; if (!empty || popped != DEPTH) begin failures++; $display("FAIL: drain popped %0d", popped); end
    checks++; if (full) begin failures++; $display("FAIL: full after drain"); end
    // phase 3: random streaming
    fork
      begin
        int n = 0;
        while (n < 300) begin
          @(posedge wclk);
          if (wr_en && !full) n++;
          if (n < 300) begin wr_en <= ($urandom_range(0, 3) != 0); din <= 16'($urandom); end
          else wr_en <= 1'b0;
        end
        @(posedge wclk); wr_en <= 1'b0;
      end
      begin
        while (popped < DEPTH + 300) begin
          @(posedge rclk); rd_en <= ($urandom_range(0, 2) != 0);
        end
        rd_en <= 1'b0;
      end
    join
    repeat (4) @(posedge rclk);
    checks++; if (model.size() != 0) begin failures++; $display("FAIL: %0d words left", model.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
