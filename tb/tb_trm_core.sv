// tb_trm_core -- self-checking test of the T/R Module datapath.
//
// Loads all 1024 look-up table words with random data and the 8 sequence
// entries with random states, then sends 20 trigger pulses of random width
// and spacing. After each pulse the port registers must hold the table word
// addressed by the current sequence entry (segment {tr, ~hv}, then beam),
// the temperature register must hold that entry's temperature bits, and the
// sequence position must advance and wrap after entry 7. Also checks the
// direct port register write, the address load, that writing entry 0
// restarts the sequence, that the port registers do not move without a
// trigger edge, and that reset clears the outputs. Checks are made 4 clock
// cycles after each rising trigger edge (3 cycles of synchronizer latency
// plus margin). Clock: 25 MHz, as the link clock from the formatter.
module tb_trm_core;
  import afb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lut_we = 0, seq_we = 0, port_we = 0, addr_load = 0, trigger = 0;
  logic [9:0] lut_addr = '0, addr_value = '0;
  lut_word_t lut_wdata = '0, port_wdata = '0, port_reg;
  logic [2:0] seq_idx = '0, seq_pos;
  seq_entry_t seq_wdata = '0;
  logic [3:0] temperature;
  lut_word_t  m_lut [1024];
  seq_entry_t m_seq [8];
  int checks = 0, failures = 0;
  int pos;

  always #20 clk = ~clk;

  trm_core dut (.*);

  function automatic logic [9:0] eaddr(seq_entry_t e);
    return {e.tr, ~e.hv, e.beam};
  endfunction

  task automatic check(string what, lut_word_t exp_port, logic [3:0] exp_temp, int exp_pos);
    checks++;
    if (port_reg !== exp_port || temperature !== exp_temp || seq_pos !== 3'(exp_pos)) begin
      failures++;
      $display("FAIL %s: port %h/%h temp %h/%h pos %0d/%0d", what, port_reg, exp_port,
               temperature, exp_temp, seq_pos, exp_pos);
    end
  endtask

  task automatic pulse_trigger();
    @(negedge clk) trigger = 1'b1;
    repeat ($urandom_range(4, 1)) @(negedge clk);
    trigger = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic write_seq(int i, seq_entry_t e);
    @(negedge clk) seq_we = 1'b1; seq_idx = 3'(i); seq_wdata = e; m_seq[i] = e;
    @(negedge clk) seq_we = 1'b0;
  endtask

  initial begin
    #2ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    lut_word_t last;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("after reset", '0, '0, 0);
    // load the whole table
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk) lut_we = 1'b1; lut_addr = 10'(a); lut_wdata = lut_word_t'($urandom); m_lut[a] = lut_wdata;
    end
    @(negedge clk) lut_we = 1'b0;
    for (int i = 0; i < 8; i++) write_seq(i, seq_entry_t'($urandom));
    // walk the sequence two and a half times
    pos = 0;
    for (int k = 0; k < 20; k++) begin
      pulse_trigger();
      check($sformatf("trigger %0d", k), m_lut[eaddr(m_seq[pos])], m_seq[pos].temperature, (pos + 1) % 8);
      pos = (pos + 1) % 8;
      repeat ($urandom_range(6, 0)) @(negedge clk);
    end
    // no trigger edge: nothing moves
    last = port_reg;
    repeat (20) @(negedge clk);
    check("idle", last, m_seq[(pos + 7) % 8].temperature, pos);
    // rewriting entry 0 restarts the sequence
    write_seq(0, seq_entry_t'($urandom));
    pos = 0;
    pulse_trigger();
    check("restart", m_lut[eaddr(m_seq[0])], m_seq[0].temperature, 1);
    pos = 1;
    // direct port register write
    @(negedge clk) port_we = 1'b1; port_wdata = 16'hBEEF;
    @(negedge clk) port_we = 1'b0;
    check("port write", 16'hBEEF, m_seq[0].temperature, 1);
    // address load
    for (int j = 0; j < 5; j++) begin
      @(negedge clk) addr_load = 1'b1; addr_value = 10'($urandom);
      @(negedge clk) addr_load = 1'b0;
      @(negedge clk);
      check("address load", m_lut[addr_value], m_seq[0].temperature, 1);
    end
    // table rewrite is seen by the next trigger
    @(negedge clk) lut_we = 1'b1; lut_addr = eaddr(m_seq[1]); lut_wdata = 16'h1234; m_lut[lut_addr] = 16'h1234;
    @(negedge clk) lut_we = 1'b0;
    pulse_trigger();
    check("rewritten word", 16'h1234, m_seq[1].temperature, 2);
    // reset
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    check("reset", '0, '0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
