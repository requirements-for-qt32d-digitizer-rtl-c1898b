// reset_ctrl: board reset from the VME crate or from the network.
//
// Either the VME SYSRESET* line (active low, asynchronous, synchronised here
// by two flops) or a reset command arriving through the ConnectCore
// configuration path (cc_reset, a one-cycle pulse) drives the FPGA's
// PROGRAM_B pin low for PROG_CYCLES cycles, which makes the FPGA reload its
// configuration from the PROM; the logic is held in reset (rst_n = 0) as
// long as a source is active or PROGRAM_B is low. por_n is the power-on
// reset and resets this block itself.
// Both reset sources and the reload from the PROM follow the board requirements; the
// pulse length and the synchroniser are this design's.
`timescale 1ns/1ps
module reset_ctrl #(
  parameter int unsigned PROG_CYCLES = 64
) (
  input  logic clk,
  input  logic por_n,
  input  logic sysreset_n,
  input  logic cc_reset,
  output logic rst_n,
  output logic prog_b_n
);

  localparam int unsigned CW = $clog2(PROG_CYCLES + 1);

  logic [1:0]    sys_sync;
  logic [CW-1:0] cnt;
  logic          por_q;

  always_ff @(posedge clk or negedge por_n)
    if (!por_n) begin
      sys_sync <= '1;
      cnt      <= '0;
      por_q    <= 1'b0;
    end else begin
      sys_sync <= {sys_sync[0], sysreset_n};
      por_q    <= 1'b1;
      if ((sys_sync[1] == 1'b0 && por_q) || cc_reset) cnt <= CW'(PROG_CYCLES);
      else if (cnt != '0)                            cnt <= cnt - 1'b1;
    end

  assign prog_b_n = (cnt == '0);
  assign rst_n    = por_q && sys_sync[1] && (cnt == '0);

endmodule
