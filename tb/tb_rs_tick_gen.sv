// tb_rs_tick_gen: a RHIC clock of exactly 21 fast cycles must give one
// one-cycle tick per period, ticks exactly 21 cycles apart, 2 to 3 cycles
// after the RHIC edge.
`timescale 1ns/1ps
module tb_rs_tick_gen;
  logic clk = 0, rst_n = 0, rhic_clk = 0, rs_tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, last_edge = -1, ticks = 0;

  rs_tick_gen dut (.*);

  always #2.5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  // RHIC clock: 21 fast cycles, edges 1 ns after a fast edge
  initial forever begin
    @(posedge clk); #1 rhic_clk = 1; last_edge = cyc;
    repeat (10) @(posedge clk);
    #1 rhic_clk = 0;
    repeat (10) @(posedge clk);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n && rs_tick && cyc > 30) begin
    ticks++;
    if (last_tick >= 0) check(cyc - last_tick == 21, "tick spacing 21");
    check(cyc - last_edge >= 2 && cyc - last_edge <= 3, "tick 2-3 cycles after edge");
    last_tick = cyc;
  end

  int width = 0;
  always @(posedge clk) begin
    if (rs_tick) width++;
    else begin
      if (width != 0) check(width == 1, "tick one cycle wide");
      width = 0;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (21 * 40) @(posedge clk);
    check(ticks >= 39 && ticks <= 41, "tick count");
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
