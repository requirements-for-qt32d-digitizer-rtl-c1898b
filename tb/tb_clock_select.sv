// tb_clock_select: checks that the clock switch follows the STAR clock after
// reset, moves to the oscillator and back on the select bit, reports the
// active clock, and never emits a pulse shorter than either source's half
// period while switching.
`timescale 1ns/1ps
module tb_clock_select;
  logic clk_star = 0, clk_osc = 0, rst_n = 0, sel_osc = 0;
  logic clk_out, osc_active;
  int checks = 0, failures = 0;
  realtime t_last = 0, min_w = 1e9;

  clock_select dut (.*);

  always #53 clk_star = !clk_star;   // 106 ns
  always #50 clk_osc  = !clk_osc;    // 100 ns

  always @(clk_out) begin
    if ($realtime - t_last < min_w && $realtime > 500) min_w = $realtime - t_last;
    t_last = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic follow(input bit want_osc);
    repeat (40) begin
      #7.3;
      check(clk_out == (want_osc ? clk_osc : clk_star), "clk_out follows selected clock");
    end
    check(osc_active == want_osc, "osc_active");
  endtask

  initial begin
    #300 rst_n = 1;
    #1000 follow(0);
    for (int i = 0; i < 4; i++) begin
      #(37 + 13 * i) sel_osc = 1;
      #1500 follow(1);
      #(11 * i) sel_osc = 0;
      #1500 follow(0);
    end
    check(min_w >= 49.9, "no short pulse on clk_out");
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
