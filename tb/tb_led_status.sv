// tb_led_status: colour follows the active clock; steady while stopped;
// toggles every 2**BLINK_LOG2 ticks in RUN mode (BLINK_LOG2 reduced to 3).
`timescale 1ns/1ps
module tb_led_status;
  logic clk = 0, rst_n = 0, rs_tick = 0, osc_active = 0, run = 0;
  logic led_green, led_red;
  int checks = 0, failures = 0;

  led_status #(.BLINK_LOG2(3)) dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic tick(input int n);
    repeat (n) begin
      @(negedge clk) rs_tick = 1;
      @(negedge clk) rs_tick = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    tick(20);
    check(led_green && !led_red, "green steady on STAR clock, stopped");
    osc_active = 1; #1;
    check(!led_green && led_red, "red on oscillator");
    tick(20);
    check(!led_green && led_red, "red steady while stopped");
    run = 1;
    for (int k = 1; k <= 24; k++) begin
      tick(1);
      // lit for ticks 0..7, dark 8..15, lit 16..23
      check(led_red == (((k / 8) % 2) == 0), "blink phase");
      check(!led_green, "green off on oscillator");
    end
    osc_active = 0; run = 0; @(negedge clk); @(negedge clk);
    check(led_green && !led_red, "back to steady green");
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
