// tb_gate_delay: for random START/STOP codes the gate must open start_code ns
// and close stop_code ns after each clock edge, and stay closed when STOP is
// not later than START.
`timescale 1ns/1ps
module tb_gate_delay;
  logic clk_in = 0, gate;
  logic [7:0] start_code, stop_code;
  int checks = 0, failures = 0;
  realtime t_edge, t_rise, t_fall;
  int rises;

  gate_delay dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s start=%0d stop=%0d", what, start_code, stop_code); end
  endtask

  always @(posedge gate) begin t_rise = $realtime; rises++; end
  always @(negedge gate) t_fall = $realtime;

  initial begin
    for (int i = 0; i < 60; i++) begin
      start_code = 8'($urandom_range(0, 200));
      stop_code  = (i % 10 == 9) ? start_code : 8'($urandom_range(start_code + 1, 255));
      rises = 0;
      #10 clk_in = 1; t_edge = $realtime;
      #50 clk_in = 0;
      #400;
      if (stop_code > start_code) begin
        check(rises == 1, "one gate per edge");
        check(t_rise - t_edge > start_code - 0.01 && t_rise - t_edge < start_code + 0.01, "START delay");
        check(t_fall - t_edge > stop_code - 0.01 && t_fall - t_edge < stop_code + 0.01, "STOP delay");
      end else begin
        check(rises == 0, "no gate when STOP <= START");
      end
      check(gate == 0, "gate closed at the end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
