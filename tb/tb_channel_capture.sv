// tb_channel_capture: on each tick the block must pack ADC and TDC of every
// channel into the 4-byte word with its channel number, tag the words with
// the crossing two ticks back (xing-1 before the increment) and the L0 result
// with xing-2, and suppress both writes for crossings before the run start.
`timescale 1ns/1ps
module tb_channel_capture;
  import qt32d_pkg::*;
  logic clk = 0, rst_n = 0, rs_tick = 0, run = 0, run_start = 0;
  logic [31:0] xing = 0;
  logic [31:0][11:0] adc;
  logic [31:0][4:0] tdc;
  logic [31:0] l0_result;
  logic w_en, r_en;
  logic [31:0] w_xing, r_xing, result;
  chan_word_t [31:0] words;
  int checks = 0, failures = 0, wrs = 0, rrs = 0;

  channel_capture dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    for (int t = 0; t < 40; t++) begin
      logic [31:0][11:0] a;
      logic [31:0][4:0]  d;
      logic [31:0]       r;
      for (int c = 0; c < 32; c++) begin a[c] = 12'($urandom); d[c] = 5'($urandom); end
      r = $urandom;
      adc = a; tdc = d; l0_result = r;
      rs_tick = 1; run_start = (t == 0);
      @(negedge clk);
      rs_tick = 0; run_start = 0;
      check(w_en == (t >= 2), "words written from the second tick after run start");
      check(r_en == (t >= 3), "result written from the third tick after run start");
      if (w_en) begin
        wrs++;
        check(w_xing == xing - 1, "word crossing tag");
        for (int c = 0; c < 32; c++)
          check(words[c] == {10'd0, 5'(c), d[c], a[c]}, "channel word");
      end
      if (r_en) begin
        rrs++;
        check(r_xing == xing - 2, "result crossing tag");
        check(result == r, "result value");
      end
      // crossing counter as the board advances it
      xing = (t == 0) ? 0 : xing + 1;
      @(negedge clk);
      check(!w_en && !r_en, "strobes one cycle wide");
      repeat (3) @(negedge clk);
    end
    check(wrs == 38 && rrs == 37, "write counts");
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
