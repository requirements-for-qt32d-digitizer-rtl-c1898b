// scaler_router: drives the discriminator bits of the four daughter cards to
// the scaler lines on VME P2, for either flavor of daughter card.
//
// Each card brings 8 lines to the mother board; card d owns P2 bits
// 8d..8d+7. A QT8B card sends one discriminator bit per channel on all 8
// lines. A QT8C card sends its first four channel bits, their OR and a spare
// on the lower six lines, while its top two connector lines carry a 1.2 V rail
// instead (vrail_en turns the rail's switch on); the P2 bits of those lines
// are driven low. When card 3 is a QT8C, the highest P2 bit is not driven but
// read as the TAC Stop input. Combinational; flavor_c comes from the DC flavor
// register.
// The six-bit scaler path, the 1.2 V rail on the top two lines, the TAC Stop
// on the highest P2 bit and the register-selected flavor follow the board requirements;
// the bit numbering on P2 is this design's.
`timescale 1ns/1ps
module scaler_router #(
  parameter int unsigned N_DC = 4
) (
  input  logic [N_DC-1:0]   flavor_c,
  input  logic [8*N_DC-1:0] disc,
  output logic [8*N_DC-1:0] p2_out,
  output logic [8*N_DC-1:0] p2_oe,
  input  logic [8*N_DC-1:0] p2_in,
  output logic              tac_stop,
  output logic [N_DC-1:0]   vrail_en
);

  localparam int unsigned TOP = 8*N_DC - 1;

  always_comb begin
    for (int d = 0; d < N_DC; d++) begin
      for (int i = 0; i < 8; i++) begin
        p2_out[8*d+i] = (flavor_c[d] && i >= 6) ? 1'b0 : disc[8*d+i];
        p2_oe[8*d+i]  = 1'b1;
      end
    end
    if (flavor_c[N_DC-1]) p2_oe[TOP] = 1'b0;
    tac_stop = flavor_c[N_DC-1] && p2_in[TOP];
    vrail_en = flavor_c;
  end

endmodule
