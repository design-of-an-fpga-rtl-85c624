// tb_channel_enable -- self-checking test of the left/right channel enable.
//
// Walks every address 0..70 with the software enable on and off, checks the
// two enables against the rule "modules 1..32 left, 33..64 right, otherwise
// none", and checks that the Receiver sees the selected line (both channels
// carry different random patterns) or a high idle line.
module tb_channel_enable;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sw_ch_en = 1'b0, ch_en_left, ch_en_right, rx_left = 1'b1, rx_right = 1'b1, rx_out;
  logic [7:0] trm_addr = '0;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  channel_enable dut (.clk, .rst_n, .sw_ch_en, .trm_addr, .ch_en_left, .ch_en_right,
                      .rx_left, .rx_right, .rx_out);

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int en = 0; en < 2; en++) begin
      for (int a = 0; a <= 70; a++) begin
        logic el, er;
        @(posedge clk) sw_ch_en <= en[0]; trm_addr <= 8'(a);
        repeat (2) @(posedge clk);
        el = en[0] && a >= 1 && a <= 32;
        er = en[0] && a >= 33 && a <= 64;
        checks++;
        if (ch_en_left !== el || ch_en_right !== er) begin
          failures++; $display("FAIL: addr %0d en %0d -> L%0b R%0b", a, en, ch_en_left, ch_en_right);
        end
        for (int k = 0; k < 4; k++) begin
          rx_left = 1'($urandom); rx_right = 1'($urandom);
          #1;
          checks++;
          if (rx_out !== (el ? rx_left : er ? rx_right : 1'b1)) begin
            failures++; $display("FAIL: rx_out addr %0d", a);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
