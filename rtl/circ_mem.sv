// circ_mem: circular memory holding every crossing of the last 2**AW
// crossings (64k crossings, about 7 ms at the RHIC strobe rate).
//
// Each entry holds the 32 channel words of a crossing (4 bytes each, 8 MB
// in all for 64k entries) and, in a second array, the 32-bit L0 result of the
// same crossing. The address is the crossing number modulo 2**AW, so the
// newest crossing overwrites the one 2**AW crossings older. The two arrays
// have their own write ports because the L0 result of a crossing arrives one
// RHIC period after its channel words. The read port returns both parts of
// one entry one cycle after re and holds them until the next re.
// The 64k-crossing depth, the 4-byte words and the stored L0 result follow
// the board requirements; building it as one on-chip simple dual-port array, rather
// than in the board's external memory, is this design's choice.
`timescale 1ns/1ps
module circ_mem
  import qt32d_pkg::*;
#(
  parameter int unsigned AW = 16,
  parameter int unsigned N  = N_CH
) (
  input  logic                 clk,
  input  logic                 we_w,
  input  logic [AW-1:0]        waddr_w,
  input  chan_word_t [N-1:0]   wwords,
  input  logic                 we_r,
  input  logic [AW-1:0]        waddr_r,
  input  logic [31:0]          wresult,
  input  logic                 re,
  input  logic [AW-1:0]        raddr,
  output chan_word_t [N-1:0]   rwords,
  output logic [31:0]          rresult
);

  chan_word_t [N-1:0] mem_words  [2**AW];
  logic [31:0]        mem_result [2**AW];

  always_ff @(posedge clk) begin
    if (we_w) mem_words[waddr_w]  <= wwords;
    if (we_r) mem_result[waddr_r] <= wresult;
    if (re) begin
      rwords  <= mem_words[raddr];
      rresult <= mem_result[raddr];
    end
  end

endmodule
