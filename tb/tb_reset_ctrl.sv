// tb_reset_ctrl: after power-on the logic leaves reset; a ConnectCore reset
// pulse or a SYSRESET* assertion drives PROGRAM_B low for exactly 64 cycles
// after the source ends and holds the logic in reset meanwhile.
`timescale 1ns/1ps
module tb_reset_ctrl;
  logic clk = 0, por_n = 0, sysreset_n = 1, cc_reset = 0;
  logic rst_n, prog_b_n;
  int checks = 0, failures = 0;

  reset_ctrl dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask


  task automatic measure(output int lo);
    lo = 0;
    while (!prog_b_n) begin
      check(!rst_n, "logic held in reset while PROGRAM_B low");
      lo++;
      @(negedge clk);
    end
  endtask

  int lo;

  initial begin
    check(!rst_n, "reset during power-on");
    repeat (3) @(negedge clk);
    por_n = 1;
    repeat (4) @(negedge clk);
    check(rst_n && prog_b_n, "out of reset after power-on");
    // ConnectCore command
    cc_reset = 1; @(negedge clk); cc_reset = 0;
    measure(lo);
    check(lo == 64, $sformatf("PROGRAM_B low 64 cycles after command (got %0d)", lo));
    check(rst_n, "released");
    repeat (10) @(negedge clk);
    // VME SYSRESET*
    sysreset_n = 0;
    repeat (3) @(negedge clk);
    check(!prog_b_n && !rst_n, "SYSRESET pulls PROGRAM_B and reset");
    repeat (20) @(negedge clk);
    sysreset_n = 1;
    @(negedge clk); @(negedge clk);
    measure(lo);
    check(lo == 64, $sformatf("PROGRAM_B low 64 cycles after SYSRESET ends (got %0d)", lo));
    check(rst_n && prog_b_n, "released after SYSRESET");
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
