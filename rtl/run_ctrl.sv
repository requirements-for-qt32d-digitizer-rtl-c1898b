// run_ctrl: puts the board into RUN mode, which synchronises the circular
// memories of all boards.
//
// Two register bits choose the source: with use_local = 0 the board follows
// the RUN/STOP line from the RCC2; with use_local = 1 it is RUN when
// local_run = 1 and STOPPED when local_run = 0, whatever the RCC2 says. The
// RCC2 line is synchronised by two flops. The chosen state is taken over only
// on a RHIC tick, so every board enters RUN on the same crossing; run_start
// is high on the tick on which RUN begins and restarts the crossing counter
// (which aligns the memory address to 0).
// The two-bit override follows the board requirements's justification of this
// register; applying changes on the RHIC tick is this design's choice.
`timescale 1ns/1ps
module run_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic rs_tick,
  input  logic rcc2_run,
  input  logic use_local,
  input  logic local_run,
  output logic run,
  output logic run_start
);

  logic [1:0] rcc2_sync;
  logic       want_run;

  always_ff @(posedge clk)
    if (!rst_n) rcc2_sync <= '0;
    else        rcc2_sync <= {rcc2_sync[0], rcc2_run};

  assign want_run  = use_local ? local_run : rcc2_sync[1];
  assign run_start = rs_tick && want_run && !run;

  always_ff @(posedge clk)
    if (!rst_n)       run <= 1'b0;
    else if (rs_tick) run <= want_run;

endmodule
