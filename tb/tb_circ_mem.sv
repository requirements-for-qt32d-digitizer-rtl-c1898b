// tb_circ_mem: full 64k-entry memory. Random crossings are written through
// both write ports, including addresses that wrap (crossing + 65536 lands on
// the same entry and replaces it); every read must return what a reference
// associative array holds, one cycle after re.
`timescale 1ns/1ps
module tb_circ_mem;
  import qt32d_pkg::*;
  localparam int AW = 16;
  logic clk = 0, we_w = 0, we_r = 0, re = 0;
  logic [AW-1:0] waddr_w, waddr_r, raddr;
  chan_word_t [31:0] wwords, rwords;
  logic [31:0] wresult, rresult;
  int checks = 0, failures = 0;
  chan_word_t [31:0] ref_w [int];
  logic [31:0] ref_r [int];
  int addrs [$];

  circ_mem dut (.*);

  always #2.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  function automatic chan_word_t [31:0] rnd_words();
    chan_word_t [31:0] w;
    for (int c = 0; c < 32; c++) w[c] = $urandom;
    return w;
  endfunction

  initial begin
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      int a;
      a = (n > 100 && n % 5 == 0) ? addrs[$urandom_range(0, addrs.size() - 1)] : $urandom_range(0, 2**AW - 1);
      addrs.push_back(a);
      // crossing a and crossing a + 2**AW share the entry
      we_w = 1; waddr_w = AW'(a + ((n % 3 == 0) ? 2**AW : 0)); wwords = rnd_words();
      we_r = 1; waddr_r = AW'(a); wresult = $urandom;
      ref_w[a] = wwords; ref_r[a] = wresult;
      @(negedge clk);
      we_w = 0; we_r = 0;
    end
    foreach (addrs[i]) begin
      re = 1; raddr = AW'(addrs[i]);
      @(negedge clk);
      re = 0;
      check(rwords == ref_w[addrs[i]], "words read back");
      check(rresult == ref_r[addrs[i]], "result read back");
      @(negedge clk);
      check(rwords == ref_w[addrs[i]], "read data held without re");
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
