// tb_xing_counter: the counter clears on run_start, advances once per tick in
// RUN mode, holds when stopped or between ticks.
`timescale 1ns/1ps
module tb_xing_counter;
  logic clk = 0, rst_n = 0, rs_tick = 0, run = 0, run_start = 0;
  logic [31:0] count;
  int checks = 0, failures = 0;
  longint exp_cnt = 0;

  xing_counter dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s count=%0d exp=%0d", what, count, exp_cnt); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) check(count == 0, "reset value");
    for (int n = 0; n < 500; n++) begin
      automatic bit t = $urandom_range(0, 2) == 0;
      automatic bit s = t && $urandom_range(0, 40) == 0;
      rs_tick = t; run_start = s;
      if (n % 97 == 50) run = !run;
      @(negedge clk);
      if (s) exp_cnt = 0;
      else if (t && run) exp_cnt++;
      check(count == 32'(exp_cnt), "count");
    end
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
