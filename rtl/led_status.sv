// led_status: drives the single two-colour front-panel LED.
//
// The LED shows which clock is active and whether the board is in RUN mode:
// green means the STAR clock, red the local oscillator; the colour is steady
// while the board is stopped and blinks while it runs. The blink half period
// is 2**BLINK_LOG2 RHIC crossings (2**20 crossings, about 0.11 s).
// Showing the active clock and RUN mode with one multi-colour LED follows
// the board requirements; the colour code and blink rate are this design's.
`timescale 1ns/1ps
module led_status #(
  parameter int unsigned BLINK_LOG2 = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rs_tick,
  input  logic osc_active,
  input  logic run,
  output logic led_green,
  output logic led_red
);

  logic [BLINK_LOG2-1:0] cnt;
  logic                  phase;

  always_ff @(posedge clk)
    if (!rst_n) begin
      cnt   <= '0;
      phase <= 1'b1;
    end else if (!run) begin
      cnt   <= '0;
      phase <= 1'b1;
    end else if (rs_tick) begin
      cnt <= cnt + 1'b1;
      if (&cnt) phase <= !phase;
    end

  assign led_green = !osc_active && phase;
  assign led_red   =  osc_active && phase;

endmodule
