// rs_tick_gen: turns the RHIC clock (RHIC strobe, ~9.4 MHz) into a one-cycle
// tick in the fast clock domain.
//
// All FPGA logic runs on the fast clock (21 times the RHIC clock, ~200 MHz,
// from the clock multiplier). The RHIC clock is passed through a two-flop
// synchroniser and its rising edge is detected; rs_tick is high for one fast
// cycle per RHIC leading edge, 2 to 3 fast cycles after the edge.
// The per-crossing timing follows the board requirements; the synchroniser and edge
// detector are this design's.
`timescale 1ns/1ps
module rs_tick_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic rhic_clk,
  output logic rs_tick
);

  logic [2:0] sync;

  always_ff @(posedge clk)
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], rhic_clk};

  assign rs_tick = sync[1] && !sync[2];

endmodule
