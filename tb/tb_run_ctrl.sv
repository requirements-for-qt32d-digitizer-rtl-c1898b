// tb_run_ctrl: RUN follows the RCC2 line, or the local bit when use_local is
// set (forcing both RUN and STOP against the RCC2), and changes only on a
// RHIC tick; run_start marks exactly the tick on which RUN begins.
`timescale 1ns/1ps
module tb_run_ctrl;
  logic clk = 0, rst_n = 0, rs_tick = 0, rcc2_run = 0, use_local = 0, local_run = 0;
  logic run, run_start;
  int checks = 0, failures = 0, starts = 0;
  logic exp_run = 0;

  run_ctrl dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  always @(posedge clk) if (run_start) starts++;

  // one crossing: settle 6 cycles, then a tick
  task automatic crossing();
    logic want;
    repeat (6) @(negedge clk);
    check(run == exp_run, "run holds between ticks");
    want = use_local ? local_run : rcc2_run;
    rs_tick = 1;
    #1 check(run_start == (want && !exp_run), "run_start on the tick");
    @(negedge clk) rs_tick = 0;
    exp_run = want;
    check(run == exp_run, "run after tick");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    crossing();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      rcc2_run  = $urandom_range(0, 1);
      use_local = ($urandom_range(0, 3) == 0);
      local_run = $urandom_range(0, 1);
      crossing();
    end
    // the local bits override the RCC2 both ways
    rcc2_run = 1; use_local = 1; local_run = 0; crossing(); crossing();
    check(run == 0, "local STOP overrides RCC2 RUN");
    rcc2_run = 0; local_run = 1; crossing();
    check(run == 1, "local RUN overrides RCC2 STOP");
    check(starts > 10, "several run starts");
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
