// gate_delay: behavioural model (not synthesizable logic) of the two
// programmable delay lines that make the integration gate of the daughter
// cards.
//
// On every leading edge of the RHIC clock the gate opens after start_code
// steps and closes after stop_code steps; a step is STEP_NS nanoseconds
// (1 ns), so each line spans 0 to 255 ns. With stop_code <= start_code no gate
// is produced. The output behaves like a set/reset flop fed by the two delay
// lines: with STOP beyond one RHIC period, the STOP of one edge also ends the
// gate opened by the next edge. The board builds this from delay-line parts
// outside the FPGA; the codes come from the gate START and STOP registers.
// The 1 ns step, the 255 ns range and the START/STOP registers follow the
// board requirements; the handling of stop_code <= start_code is this model's choice.
`timescale 1ns/1ps
module gate_delay #(
  parameter int unsigned STEP_NS = 1
) (
  input  logic       clk_in,
  input  logic [7:0] start_code,
  input  logic [7:0] stop_code,
  output logic       gate
);

  initial gate = 1'b0;

  // Each edge schedules the opening and the closing of its gate as
  // transport-delayed updates (delays in ns, the time unit of this file).
  // Synthesis ignores the delays; this file is a model of board parts.
  always @(posedge clk_in) begin
    if (stop_code > start_code) begin
      gate <= #(start_code * STEP_NS) 1'b1;
      gate <= #(stop_code * STEP_NS) 1'b0;
    end
  end

endmodule
