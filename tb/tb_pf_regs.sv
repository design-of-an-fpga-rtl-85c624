// tb_pf_regs -- self-checking test of the software register bank.
//
// Writes a distinct random value into each of the 30 registers and reads all
// of them back: storage registers must return what was written, status
// registers (4, 5, 6, 7, 16, 17, 21) must return the live hardware inputs,
// which the test then changes and reads again. Checks that every control
// output shows the bits of its register as listed in the register map, that
// addresses 30 and 31 read zero, and that reset clears everything.
module tb_pf_regs;
  import afb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr = 1'b0;
  logic [4:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic fifo_reset, sw_rd_en, sw_wr_en, sw_ch_en, tsm_en, xcvr_en;
  logic [31:0] wsm_data, xcvr_data;
  logic [15:0] loop_num;
  timing_reg_t [3:0] treg;
  logic [7:0] trm_addr;
  logic [15:0] rsm_data = '0;
  logic wr_ack = 0, rd_ack = 0, rxf_empty = 0, timing_ack = 0, txf_empty = 0, xcvr_ack = 0;
  logic [31:0] shadow[30];
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  pf_regs dut (.*);

  function automatic logic [31:0] status_val(int a);
    case (a)
      4:  return {16'd0, rsm_data};
      5:  return {31'd0, wr_ack};
      6:  return {31'd0, rd_ack};
      7:  return {31'd0, rxf_empty};
      16: return {31'd0, timing_ack};
      17: return {31'd0, txf_empty};
      21: return {31'd0, xcvr_ack};
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction

  function automatic bit is_status(int a);
    return a inside {4, 5, 6, 7, 16, 17, 21};
  endfunction

  task automatic check_all();
    for (int a = 0; a < 32; a++) begin
      logic [31:0] e;
      addr = 5'(a); #1;
      e = (a >= 30) ? 32'd0 : is_status(a) ? status_val(a) : shadow[a];
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL: reg %0d read %h expected %h", a, rdata, e); end
    end
    checks++;
    if (fifo_reset !== shadow[0][0] || sw_rd_en !== shadow[1][0] || sw_wr_en !== shadow[2][0] ||
        wsm_data !== shadow[3] || loop_num !== shadow[8][15:0] || sw_ch_en !== shadow[9][0] ||
        tsm_en !== shadow[10][0] || treg[0] !== shadow[11] || treg[1] !== shadow[12] ||
        treg[2] !== shadow[13] || treg[3] !== shadow[14] || trm_addr !== shadow[18][7:0] ||
        xcvr_en !== shadow[19][0] || xcvr_data !== shadow[20]) begin
      failures++; $display("FAIL: control outputs do not match registers");
    end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int round = 0; round < 3; round++) begin
      for (int a = 0; a < 32; a++) begin
        @(negedge clk) wr = 1'b1; addr = 5'(a); wdata = $urandom;
        if (a < 30 && !is_status(a)) shadow[a] = wdata;
        @(negedge clk) wr = 1'b0;
      end
      rsm_data = 16'($urandom); {wr_ack, rd_ack, rxf_empty, timing_ack, txf_empty, xcvr_ack} = 6'($urandom);
      check_all();
    end
    rst_n = 1'b0; #1; rst_n = 1'b1;
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
