// tdc5: 32 counting TDCs with 5 ns bins.
//
// Each channel counts fast-clock cycles (5 ns at 21 times the RHIC clock) from
// the leading edge of its discriminator signal to the next RHIC leading edge
// (rs_tick). At that tick the count is stored in tdc[c] and the counter is
// cleared for the next crossing. The counter starts at 1 on the edge cycle,
// so a stored 0 means no hit in the crossing; a hit n cycles before the tick
// stores n. Only the first edge in a crossing counts. Discriminator lines
// are asynchronous and go through a two-flop synchroniser first, which adds a
// fixed 2-cycle offset to every value.
// Timing: tdc[] changes one cycle after rs_tick and holds for one crossing.
// The counter TDC stored and cleared at each RHIC leading edge follows the
// board requirements; the first-edge rule, the zero-means-no-hit coding and the
// saturation at 31 are this design's.
`timescale 1ns/1ps
module tdc5
  import qt32d_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        rs_tick,
  input  logic [N-1:0]                disc,
  output logic [N-1:0][TDC_W-1:0]     tdc
);

  logic [N-1:0] s1, s2, s3;
  logic [N-1:0] running;
  logic [N-1:0][TDC_W-1:0] cnt;

  always_ff @(posedge clk)
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= disc; s2 <= s1; s3 <= s2;
    end

  always_ff @(posedge clk)
    if (!rst_n) begin
      running <= '0;
      cnt     <= '0;
      tdc     <= '0;
    end else begin
      for (int c = 0; c < N; c++) begin
        if (rs_tick) begin
          tdc[c]     <= running[c] ? cnt[c] : '0;
          // an edge on the tick cycle belongs to the new crossing
          running[c] <= s2[c] && !s3[c];
          cnt[c]     <= (s2[c] && !s3[c]) ? TDC_W'(1) : '0;
        end else if (running[c]) begin
          if (cnt[c] != '1) cnt[c] <= cnt[c] + 1'b1;
        end else if (s2[c] && !s3[c]) begin
          running[c] <= 1'b1;
          cnt[c]     <= TDC_W'(1);
        end
      end
    end

endmodule
