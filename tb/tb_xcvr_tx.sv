// tb_xcvr_tx -- self-checking test of the Transceiver interface Transmitter.
//
// The Transmitter is driven by a clk_div with DIV reduced to 10 (10 fast
// cycles per interface clock). Software is modelled as on the processor: set
// the enable, write the 32-bit scan word a little later, clear the enable
// before the transfer ends. On every rising edge of the interface clock the
// test samples tx while v_en is high, as the Transceiver would, and checks
// the 32 bits (MSB first), that v_en stays high for exactly 32 interface
// clocks, that ack is low during the transfer and high after it, and that
// tx and v_en only change on the falling edge of the interface clock.
module tb_xcvr_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clk_if, tick_rise, tick_fall;
  logic sw_en = 1'b0, tx, v_en, ack;
  logic [31:0] data_in = '0, shift;
  int checks = 0, failures = 0, nbits = 0;
  logic tx_q = 1'b0, ven_q = 1'b0;

  always #5 clk = ~clk;

  clk_div #(.DIV(10)) u_div (.clk, .rst_n, .clk_out(clk_if), .tick_rise, .tick_fall);
  xcvr_tx dut (.clk, .rst_n, .tick(tick_fall), .sw_en, .data_in, .tx, .v_en, .ack);

  always @(posedge clk_if) if (v_en) begin shift = {shift[30:0], tx}; nbits++; end

  always @(posedge clk) if (rst_n) begin
    #1;
    if ((tx !== tx_q || v_en !== ven_q) && clk_if !== 1'b0) begin
      checks++; failures++; $display("FAIL: line changed while interface clock high");
    end
    tx_q = tx; ven_q = v_en;
  end

  task automatic transfer(input logic [31:0] w, input int data_delay);
    nbits = 0;
    @(posedge clk) sw_en <= 1'b1;
    repeat (data_delay) @(posedge clk);
    data_in <= w;
    repeat (4) @(posedge clk);
    sw_en <= 1'b0;
    repeat (6) @(posedge clk);
    checks++; if (ack !== 1'b0) begin failures++; $display("FAIL: ack during transfer"); end
    wait (v_en == 1'b1);
    wait (v_en == 1'b0);
    repeat (20) @(posedge clk);
    checks++;
    if (nbits != 32 || shift !== w) begin failures++; $display("FAIL: %0d bits %h expected %h", nbits, shift, w); end
    checks++; if (ack !== 1'b1) begin failures++; $display("FAIL: no ack"); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    checks++; if (tx !== 1'b0 || v_en !== 1'b0) begin failures++; $display("FAIL: idle lines"); end
    transfer(32'hA55A_C333, 2);
    transfer(32'h8000_0001, 8);
    for (int i = 0; i < 4; i++) transfer($urandom, $urandom_range(0, 9));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
