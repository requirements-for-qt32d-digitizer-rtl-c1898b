// clock_select: register-selectable switch between the STAR standard RHIC
// clock and the board's local oscillator.
//
// The board must run on the STAR clock for synchronisation and on a local
// oscillator for testing, chosen by a register bit. This is a glitch-free
// clock multiplexer: each clock has an enable that is captured on its rising
// edge and applied on its falling edge, and a clock is enabled only once the
// other one's enable has dropped, so the output never carries a runt pulse.
// Switching takes about two cycles of each clock.
//
// Interface: sel_osc = 1 selects clk_osc. osc_active is 1 while the
// oscillator drives clk_out (used for the front-panel LED and the status
// register). rst_n is asynchronous and selects the STAR clock.
// The requirement (register-selectable source, indication of the active
// clock) follows the board requirements; the multiplexer structure is this design's.
`timescale 1ns/1ps
module clock_select (
  input  logic clk_star,
  input  logic clk_osc,
  input  logic rst_n,
  input  logic sel_osc,
  output logic clk_out,
  output logic osc_active
);

  logic star_q1, star_en;
  logic osc_q1, osc_en;

  always_ff @(posedge clk_star or negedge rst_n)
    if (!rst_n) star_q1 <= 1'b1;
    else        star_q1 <= !sel_osc && !osc_en;

  always_ff @(negedge clk_star or negedge rst_n)
    if (!rst_n) star_en <= 1'b1;
    else        star_en <= star_q1;

  always_ff @(posedge clk_osc or negedge rst_n)
    if (!rst_n) osc_q1 <= 1'b0;
    else        osc_q1 <= sel_osc && !star_en;

  always_ff @(negedge clk_osc or negedge rst_n)
    if (!rst_n) osc_en <= 1'b0;
    else        osc_en <= osc_q1;

  assign clk_out    = (clk_star && star_en) || (clk_osc && osc_en);
  assign osc_active = osc_en;

endmodule
