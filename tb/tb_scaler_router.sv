// tb_scaler_router: random discriminator patterns and flavor settings; the P2
// bits, enables, TAC Stop and 1.2 V rail enables are compared with the
// routing rules worked out bit by bit here.
`timescale 1ns/1ps
module tb_scaler_router;
  logic [3:0]  flavor_c, vrail_en;
  logic [31:0] disc, p2_out, p2_oe, p2_in;
  logic        tac_stop;
  int checks = 0, failures = 0;

  scaler_router dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s flavor=%b disc=%h", what, flavor_c, disc); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      flavor_c = 4'($urandom);
      disc     = $urandom;
      p2_in    = $urandom;
      #1;
      for (int b = 0; b < 32; b++) begin
        automatic bit is_c    = flavor_c[b / 8];
        automatic bit exp_out = (is_c && (b % 8) >= 6) ? 1'b0 : disc[b];
        automatic bit exp_oe  = !(b == 31 && flavor_c[3]);
        check(p2_out[b] == exp_out, "p2_out bit");
        check(p2_oe[b] == exp_oe, "p2_oe bit");
      end
      check(tac_stop == (flavor_c[3] && p2_in[31]), "tac_stop");
      check(vrail_en == flavor_c, "vrail_en");
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
