// tb_readout_ctrl: a memory model with random crossings feeds the block.
// Build_Event commands for random crossings, with and without zero
// suppression and the L0 result word, under random link back-pressure; every
// event is compared word by word with one assembled here from the memory
// contents and the settings. Without back-pressure an event of n words must
// take n + 3 cycles from command to last word.
`timescale 1ns/1ps
module tb_readout_ctrl;
  import qt32d_pkg::*;
  localparam int AW = 16;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  build_cmd_t cmd;
  logic [31:0] ts = 0;
  logic zs_en = 0, send_result = 0;
  logic [11:0] zs_thr = 0;
  logic mem_re;
  logic [AW-1:0] mem_raddr;
  chan_word_t [31:0] mem_words;
  logic [31:0] mem_result;
  logic o_valid, o_ready = 1, o_last;
  logic [31:0] o_data, events;
  int checks = 0, failures = 0;
  int stalls = 0, suppressed = 0;

  readout_ctrl dut (.*);

  always #2.5 clk = !clk;
  always @(posedge clk) ts <= ts + 1;

  // memory model: content is a function of the address
  function automatic chan_word_t [31:0] words_at(input logic [AW-1:0] a);
    chan_word_t [31:0] w;
    for (int c = 0; c < 32; c++) begin
      logic [31:0] h = (32'(a) * 32'h9E3779B1) ^ (c * 32'h85EBCA6B);
      w[c] = {10'd0, 5'(c), h[20:16], (h[3:0] < 4) ? h[15:4] : 12'(h[7:4])};
    end
    return w;
  endfunction

  always @(posedge clk) if (mem_re) begin
    mem_words  <= words_at(mem_raddr);
    mem_result <= 32'(mem_raddr) ^ 32'hCAFE0000;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  logic [31:0] got [$];
  logic [31:0] exp [$];

  always @(posedge clk) if (o_valid && o_ready) got.push_back(o_data);
  always @(posedge clk) if (o_valid && !o_ready) stalls++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      logic [31:0] x;
      logic [11:0] tok;
      logic [31:0] ts_cmd;
      int start_cyc, cyc;
      chan_word_t [31:0] w;
      bit zs, res, bp;
      zs  = n % 3 != 0; res = n % 2 == 0; bp = n >= 30;
      x = $urandom; tok = 12'($urandom);
      zs_en = zs; send_result = res; zs_thr = 12'($urandom_range(0, 12));
      // expected event
      w = words_at(x[AW-1:0]);
      exp.delete();
      for (int c = 0; c < 32; c++)
        if (!zs || w[c].adc > zs_thr) exp.push_back(w[c]); else suppressed++;
      if (res) exp.push_back(x[AW-1:0] ^ 32'hCAFE0000);
      exp.push_front(ts + 1);
      exp.push_front(x);
      exp.push_front({EVT_MARKER, zs, res, 2'b00, tok, 8'(exp.size() + 1)});
      got.delete();
      @(negedge clk);
      cmd_valid = 1; cmd.token = tok; cmd.xing = x;
      ts_cmd = ts;
      exp[2] = ts_cmd;
      @(negedge clk);
      cmd_valid = 0;
      cyc = 1;
      while (!(o_valid && o_ready && o_last)) begin
        o_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
        @(negedge clk);
        cyc++;
        if (cyc > 500) break;
      end
      @(negedge clk);
      o_ready = 1;
      check(got.size() == exp.size(), $sformatf("event length %0d vs %0d", got.size(), exp.size()));
      foreach (exp[i]) if (i < got.size()) check(got[i] == exp[i], $sformatf("event %0d word %0d", n, i));
      if (!bp) check(cyc == exp.size() + 2, $sformatf("event cycles %0d for %0d words", cyc, exp.size()));
      check(events == 32'(n + 1), "event counter");
    end
    check(stalls > 50, "back-pressure exercised");
    check(suppressed > 100, "zero suppression exercised");
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
