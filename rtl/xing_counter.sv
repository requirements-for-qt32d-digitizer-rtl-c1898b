// xing_counter: crossing counter and readout timestamp.
//
// Cleared to 0 on run_start and advanced by one on every RHIC tick while the
// board is in RUN mode, so it counts crossings since the start of the run, in
// step with the trigger system's own crossing number. Its low bits address
// the circular memory; the readout sends its value as the readout timestamp.
// It holds while the board is stopped. count changes one cycle after the tick.
// The reset at run start and the advance with the RHIC clock follow the
// board requirements; using one counter for both the memory address and the timestamp,
// and holding it while stopped, are this design's choices.
`timescale 1ns/1ps
module xing_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rs_tick,
  input  logic         run,
  input  logic         run_start,
  output logic [W-1:0] count
);

  always_ff @(posedge clk)
    if (!rst_n)               count <= '0;
    else if (run_start)       count <= '0;
    else if (run && rs_tick)  count <= count + 1'b1;

endmodule
