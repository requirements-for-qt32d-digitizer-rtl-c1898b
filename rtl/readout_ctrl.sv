// readout_ctrl: event readout to Level 2, started by a Build_Event command.
//
// A command carries the trigger token and the crossing number of the
// triggered event. On accepting it (cmd_valid && cmd_ready, only when idle)
// the block samples the timestamp counter as the readout time, reads the
// entry crossing mod 2**AW of the circular memory and sends one event as a
// stream of 32-bit words with a valid/ready handshake, o_last on the final
// word:
//   word 0   {EVT_MARKER, flags[3:0], token[11:0], nwords[7:0]}
//            flags = {zs_en, send_result, 2'b00}; nwords counts all words
//   word 1   crossing number from the command
//   word 2   readout timestamp
//   then     channel words in channel order: all 32, or with zero
//            suppression only channels whose ADC value exceeds zs_thr
//   last     the stored L0 result of the crossing, if send_result is set
// The channel loop takes the lowest remaining channel of a keep mask each
// cycle, so an event of n words takes n + 2 cycles when the link never
// stalls. zs_en, zs_thr and send_result are sampled with the command.
// Readout by crossing number on Build_Event, the timestamp, the optional
// zero suppression and the optional L0 result follow the board requirements; the event
// format, the hit criterion (ADC above a threshold) and the handshake are
// this design's.
`timescale 1ns/1ps
module readout_ctrl
  import qt32d_pkg::*;
#(
  parameter int unsigned N  = N_CH,
  parameter int unsigned AW = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  build_cmd_t          cmd,
  input  logic [XING_W-1:0]   ts,
  input  logic                zs_en,
  input  logic [ADC_W-1:0]    zs_thr,
  input  logic                send_result,
  output logic                mem_re,
  output logic [AW-1:0]       mem_raddr,
  input  chan_word_t [N-1:0]  mem_words,
  input  logic [31:0]         mem_result,
  output logic                o_valid,
  input  logic                o_ready,
  output logic [31:0]         o_data,
  output logic                o_last,
  output logic [31:0]         events
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_HDR0, S_HDR1, S_HDR2, S_CHAN, S_RES} state_t;

  state_t             state;
  build_cmd_t         cmd_q;
  logic [XING_W-1:0]  ts_q;
  logic               zs_q, res_q;
  logic [ADC_W-1:0]   thr_q;
  logic [N-1:0]       keep;
  logic [7:0]         nwords;
  logic [$clog2(N)-1:0] cur;
  logic [N-1:0]       keep_now;
  logic [7:0]         nkeep_now;
  logic               fire;

  assign cmd_ready = (state == S_IDLE);
  assign fire      = o_valid && o_ready;

  // channels that survive zero suppression, from the memory output
  always_comb begin
    nkeep_now = '0;
    for (int c = 0; c < N; c++) begin
      keep_now[c] = !zs_q || (mem_words[c].adc > thr_q);
      nkeep_now   = nkeep_now + 8'(keep_now[c]);
    end
  end

  // lowest remaining channel
  always_comb begin
    cur = '0;
    for (int c = N - 1; c >= 0; c--)
      if (keep[c]) cur = ($clog2(N))'(c);
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      state     <= S_IDLE;
      cmd_q     <= '0;
      ts_q      <= '0;
      zs_q      <= 1'b0;
      res_q     <= 1'b0;
      thr_q     <= '0;
      keep      <= '0;
      nwords    <= '0;
      mem_re    <= 1'b0;
      mem_raddr <= '0;
      events    <= '0;
    end else begin
      mem_re <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd_q     <= cmd;
          ts_q      <= ts;
          zs_q      <= zs_en;
          res_q     <= send_result;
          thr_q     <= zs_thr;
          mem_re    <= 1'b1;
          mem_raddr <= cmd.xing[AW-1:0];
          state     <= S_READ;
        end
        S_READ: if (!mem_re) begin
          keep   <= keep_now;
          nwords <= 8'd3 + nkeep_now + 8'(res_q);
          state  <= S_HDR0;
        end
        S_HDR0: if (fire) state <= S_HDR1;
        S_HDR1: if (fire) state <= S_HDR2;
        S_HDR2: if (fire) begin
          if (keep != '0)  state <= S_CHAN;
          else if (res_q)  state <= S_RES;
          else begin
            state  <= S_IDLE;
            events <= events + 1'b1;
          end
        end
        S_CHAN: if (fire) begin
          keep[cur] <= 1'b0;
          if ((keep & ~(N'(1) << cur)) == '0) begin
            if (res_q) state <= S_RES;
            else begin
              state  <= S_IDLE;
              events <= events + 1'b1;
            end
          end
        end
        S_RES: if (fire) begin
          state  <= S_IDLE;
          events <= events + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end

  always_comb begin
    o_valid = 1'b0;
    o_data  = '0;
    o_last  = 1'b0;
    unique case (state)
      S_HDR0: begin
        o_valid = 1'b1;
        o_data  = {EVT_MARKER, zs_q, res_q, 2'b00, cmd_q.token, nwords};
      end
      S_HDR1: begin
        o_valid = 1'b1;
        o_data  = cmd_q.xing;
      end
      S_HDR2: begin
        o_valid = 1'b1;
        o_data  = ts_q;
        o_last  = (keep == '0) && !res_q;
      end
      S_CHAN: begin
        o_valid = 1'b1;
        o_data  = mem_words[cur];
        o_last  = ((keep & ~(N'(1) << cur)) == '0) && !res_q;
      end
      S_RES: begin
        o_valid = 1'b1;
        o_data  = mem_result;
        o_last  = 1'b1;
      end
      default: ;
    endcase
  end

  // the event stream must hold a word until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           o_valid && !o_ready |=> o_valid && $stable(o_data) && $stable(o_last));

endmodule
