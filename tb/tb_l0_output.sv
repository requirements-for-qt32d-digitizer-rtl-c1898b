// tb_l0_output: random data every cycle; for delays 0..127 (5 ns steps) the
// output must equal the input delay+1 cycles earlier.
`timescale 1ns/1ps
module tb_l0_output;
  logic clk = 0, rst_n = 0;
  logic [31:0] din = 0, dout;
  logic [6:0] delay = 0;
  int checks = 0, failures = 0;
  logic [31:0] hist [$];

  l0_output dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s delay=%0d", what, delay); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 128; d += (d < 4 || d > 120) ? 1 : 13) begin
      delay = 7'(d);
      for (int n = 0; n < 300; n++) begin
        din = $urandom;
        hist.push_front(din);
        @(negedge clk);
        // hist[0] is the value taken at the last edge; dout shows hist[delay]
        if (n > d + 2) check(dout == hist[d], "delayed output");
        if (hist.size() > 200) void'(hist.pop_back());
      end
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
