// tb_test_pulse_gen: with period P the pulse comes on every P-th tick after
// enabling and never otherwise; disabled gives no pulses; the DAC code
// follows the amplitude register.
`timescale 1ns/1ps
module tb_test_pulse_gen;
  logic clk = 0, rst_n = 0, rs_tick = 0, en = 0;
  logic [23:0] period;
  logic [11:0] amp, dac_code;
  logic pulse;
  int checks = 0, failures = 0, pulses;

  test_pulse_gen dut (.*);

  always #2.5 clk = !clk;
  always @(posedge clk) if (pulse) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s period=%0d", what, period); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p <= 9; p++) begin
      int eff;
      period = 24'(p); amp = 12'($urandom);
      eff = (p == 0) ? 1 : p;
      en = 1;
      for (int t = 1; t <= 30; t++) begin
        @(negedge clk) rs_tick = 1;
        @(negedge clk) rs_tick = 0;
        check(pulse == (t % eff == 0), $sformatf("pulse at tick %0d", t));
        @(negedge clk) check(!pulse, "pulse one cycle");
      end
      check(dac_code == amp, "dac code");
      en = 0;
      pulses = 0;
      repeat (10) begin
        @(negedge clk) rs_tick = 1;
        @(negedge clk) rs_tick = 0;
      end
      @(negedge clk) check(pulses == 0, "no pulse while disabled");
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
