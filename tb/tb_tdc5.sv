// tb_tdc5: crossings of 21 fast cycles. In each crossing a random set of
// channels gets a discriminator pulse first sampled at cycle k of the
// crossing (some get a second, later pulse); after the closing tick every
// TDC must read 19 - k (the interval to the tick less the 2-cycle
// synchroniser), and 0 for channels without a hit.
`timescale 1ns/1ps
module tb_tdc5;
  logic clk = 0, rst_n = 0, rs_tick = 0;
  logic [31:0] disc = '0;
  logic [31:0][4:0] tdc;
  int checks = 0, failures = 0;
  int kfirst [32];
  int hits = 0;

  tdc5 dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < 60; x++) begin
      for (int c = 0; c < 32; c++)
        kfirst[c] = (x > 0 && $urandom_range(0, 2) != 0) ? $urandom_range(1, 16) : -1;
      for (int k = 1; k <= 21; k++) begin
        @(negedge clk);
        rs_tick = (k == 21);
        for (int c = 0; c < 32; c++)
          disc[c] = kfirst[c] > 0 &&
                    ((k >= kfirst[c] && k <= kfirst[c] + 2) || (k == kfirst[c] + 5 && c % 2 == 0));
      end
      @(negedge clk);
      rs_tick = 0;
      disc = '0;
      for (int c = 0; c < 32; c++) begin
        check(tdc[c] == ((kfirst[c] > 0) ? 5'(19 - kfirst[c]) : 5'd0), $sformatf("tdc ch%0d x%0d", c, x));
        if (kfirst[c] > 0) hits++;
      end
      // the extra negedge above is cycle 1 of the next crossing
      for (int c = 0; c < 32; c++) kfirst[c] = -1;
      repeat (19) @(negedge clk);
      // one crossing without hits so every crossing above starts clean
      @(negedge clk) rs_tick = 1;
      @(negedge clk) rs_tick = 0;
    end
    check(hits > 500, "enough hits exercised");
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
