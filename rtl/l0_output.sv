// l0_output: output latch delay for the 32 bits sent to L0 on P3.
//
// The result of the L0 algorithm is delayed by a register-set number of fast
// clock cycles (5 ns each) so that it lines up with the other detectors at
// L0. A ring of 2**DW registers is written every cycle; the output register
// reads the entry written delay cycles earlier, so dout follows din after
// delay+1 cycles (delay = 0 gives one cycle). With DW = 7 the range is 0 to
// 635 ns, more than the 400 ns the board has from the interaction to L0.
// The 5 ns step and the register-set delay follow the board requirements; the 7-bit
// range and the ring structure are this design's.
`timescale 1ns/1ps
module l0_output #(
  parameter int unsigned W  = 32,
  parameter int unsigned DW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  din,
  input  logic [DW-1:0] delay,
  output logic [W-1:0]  dout
);

  logic [W-1:0]  ring [2**DW];
  logic [DW-1:0] wp;

  always_ff @(posedge clk) begin
    ring[wp] <= din;
    if (!rst_n) begin
      wp   <= '0;
      dout <= '0;
    end else begin
      wp   <= wp + 1'b1;
      dout <= (delay == '0) ? din : ring[wp - delay];
    end
  end

endmodule
