// channel_capture: collects the digitized values of each crossing and hands
// them to the circular memory.
//
// The digitization cycle takes two RHIC strobes: the ADC results read at the
// tick that ends crossing k+1 belong to crossing k, and at that same tick the
// TDC outputs still hold the values stored one tick earlier, also crossing k.
// On every RHIC tick in RUN mode the block packs, for each channel, the
// 4-byte word {10 spare bits, 5-bit channel address, 5-bit TDC, 12-bit ADC}
// and writes it with crossing number xing-1 (xing being the counter value
// before the tick). The 32-bit L0 result sampled at a tick is taken to belong
// to the crossing captured one tick earlier (the L0 algorithm gets one RHIC
// period) and is written with crossing number xing-2. Writes for crossings
// before the start of the run are suppressed. Outputs are registered: the
// write strobes are high for the cycle after the tick.
// The word layout (field widths) and the two-strobe digitization follow the
// board requirements; the bit order, the alignment of ADC, TDC and L0 result to a
// crossing and the one-period budget of the L0 algorithm are this design's.
`timescale 1ns/1ps
module channel_capture
  import qt32d_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          rs_tick,
  input  logic                          run,
  input  logic                          run_start,
  input  logic [XING_W-1:0]             xing,
  input  logic [N-1:0][ADC_W-1:0]       adc,
  input  logic [N-1:0][TDC_W-1:0]       tdc,
  input  logic [31:0]                   l0_result,
  output logic                          w_en,
  output logic [XING_W-1:0]             w_xing,
  output chan_word_t [N-1:0]            words,
  output logic                          r_en,
  output logic [XING_W-1:0]             r_xing,
  output logic [31:0]                   result
);

  // ticks since run start, saturating at 3
  logic [1:0] age;

  always_ff @(posedge clk)
    if (!rst_n)                              age <= '0;
    else if (run_start)                      age <= '0;
    else if (run && rs_tick && age != 2'd3)  age <= age + 1'b1;

  always_ff @(posedge clk)
    if (!rst_n) begin
      w_en   <= 1'b0;
      r_en   <= 1'b0;
      w_xing <= '0;
      r_xing <= '0;
      words  <= '0;
      result <= '0;
    end else begin
      w_en <= rs_tick && run && !run_start && age >= 2'd1;
      r_en <= rs_tick && run && !run_start && age >= 2'd2;
      if (rs_tick) begin
        w_xing <= xing - XING_W'(DIGI_LAT - 1);
        r_xing <= xing - XING_W'(DIGI_LAT);
        result <= l0_result;
        for (int c = 0; c < N; c++) begin
          words[c].spare <= '0;
          words[c].chan  <= CH_W'(c);
          words[c].tdc   <= tdc[c];
          words[c].adc   <= adc[c];
        end
      end
    end

endmodule
