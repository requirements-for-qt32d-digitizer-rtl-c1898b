// tb_reg_file: reset values, write then read back of every configuration
// register with random data, the cfg fields each write must reach, the
// read-only status registers, and the reset command (only with the right key).
`timescale 1ns/1ps
module tb_reg_file;
  import qt32d_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0, cc_reset;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  cfg_t cfg;
  status_t status;
  int checks = 0, failures = 0;

  reg_file dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rdata=%h", what, rdata); end
  endtask

  task automatic wreg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin wr = 1; addr = a; wdata = d; end
    @(negedge clk) wr = 0;
  endtask

  task automatic rreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin rd = 1; addr = a; end
    @(negedge clk) begin rd = 0; d = rdata; end
  endtask

  logic [31:0] v, r;

  initial begin
    status = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.gate_stop == 8'd80 && cfg.gate_start == 0 && !cfg.sel_osc && !cfg.use_local &&
          !cfg.zs_en && !cfg.tp_en, "reset values");
    for (int n = 0; n < 20; n++) begin
      v = $urandom;
      wreg(REG_CLOCK, v);   rreg(REG_CLOCK, r);   check(r[0] == v[0] && cfg.sel_osc == v[0], "clock");
      wreg(REG_GATE, v);    rreg(REG_GATE, r);    check(r == {16'd0, v[15:0]} && cfg.gate_start == v[7:0] && cfg.gate_stop == v[15:8], "gate");
      wreg(REG_THR, v);     rreg(REG_THR, r);     check(r == {24'd0, v[7:0]} && cfg.thr_code == v[7:0], "threshold");
      wreg(REG_FLAVOR, v);  rreg(REG_FLAVOR, r);  check(r == {28'd0, v[3:0]} && cfg.flavor_c == v[3:0], "flavor");
      wreg(REG_L0DELAY, v); rreg(REG_L0DELAY, r); check(r == {25'd0, v[6:0]} && cfg.l0_delay == v[6:0], "l0 delay");
      wreg(REG_RUN, v);     rreg(REG_RUN, r);     check(r[1:0] == v[1:0] && cfg.use_local == v[0] && cfg.local_run == v[1], "run bits");
      wreg(REG_ZS, v);      rreg(REG_ZS, r);      check(r == {4'd0, v[27:16], 14'd0, v[1:0]} && cfg.zs_en == v[0] && cfg.send_result == v[1] && cfg.zs_thr == v[27:16], "zero suppression");
      wreg(REG_TP, v);      rreg(REG_TP, r);      check(r == {4'd0, v[27:16], 15'd0, v[0]} && cfg.tp_en == v[0] && cfg.tp_amp == v[27:16], "test pulse");
      wreg(REG_TPPERIOD, v); rreg(REG_TPPERIOD, r); check(r == {8'd0, v[23:0]} && cfg.tp_period == v[23:0], "test period");
      status.xing = $urandom; status.events = $urandom;
      status.run = v[5]; status.osc_active = v[6]; status.tac_stop = v[7];
      rreg(REG_XING, r);   check(r == status.xing, "xing status");
      rreg(REG_EVENTS, r); check(r == status.events, "events status");
      rreg(REG_STATUS, r); check(r == {29'd0, v[7], v[6], v[5]}, "status bits");
    end
    // reset command
    @(negedge clk) begin wr = 1; addr = REG_RESET; wdata = 32'h1234; end
    @(negedge clk) begin wr = 0; check(!cc_reset, "wrong key ignored"); end
    @(negedge clk) begin wr = 1; addr = REG_RESET; wdata = {16'd0, RESET_MAGIC}; end
    @(negedge clk) begin wr = 0; check(cc_reset, "reset command pulse"); end
    @(negedge clk) check(!cc_reset, "pulse one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
