// test_pulse_gen: schedules the fixed-charge test injection into the front
// ends.
//
// When enabled, pulse is high for one fast cycle on every period-th RHIC
// tick (period 0 or 1: every tick), so the injection rate is the crossing
// rate divided by period. dac_code carries the amplitude register to the
// pulser DAC. The counter restarts when the generator is disabled; the first
// pulse comes on the period-th tick after enabling.
// Register-set amplitude and rate follow the board requirements; the 24-bit period in
// crossings and the 12-bit amplitude code are this design's.
`timescale 1ns/1ps
module test_pulse_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rs_tick,
  input  logic        en,
  input  logic [23:0] period,
  input  logic [11:0] amp,
  output logic        pulse,
  output logic [11:0] dac_code
);

  logic [23:0] cnt;

  always_ff @(posedge clk)
    if (!rst_n) begin
      cnt      <= '0;
      pulse    <= 1'b0;
      dac_code <= '0;
    end else begin
      dac_code <= amp;
      pulse    <= 1'b0;
      if (!en) begin
        cnt <= '0;
      end else if (rs_tick) begin
        if (cnt + 24'd1 >= period) begin
          cnt   <= '0;
          pulse <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end

endmodule
