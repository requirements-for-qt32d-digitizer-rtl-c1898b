// qt32d_top: FPGA of the QT32D digitizer mother board (32 channels on four
// QT8B or QT8C daughter cards).
//
// Every RHIC crossing (~107 ns, 21 cycles of the ~200 MHz fast clock) the
// board measures charge (12-bit ADC on the daughter cards) and arrival time
// (5-bit, 5 ns counter TDC in this FPGA) of each channel, stores both in a
// circular memory of 64k crossings addressed by crossing number, and drives
// 32 bits to the L0 trigger on P3 after a register-set delay. A Build_Event
// command from the trigger network names a token and a crossing; the board
// reads that crossing back and sends it to Level 2 with a readout timestamp,
// optionally zero-suppressed, so no VME CPU is needed for readout.
//
// Clocking: the RHIC clock is the STAR clock or the local oscillator
// (clock_select, register bit). It leaves the FPGA as rhic_clk_out to the
// clock multiplier, which returns clk_fast at 21 times its rate; all logic
// runs on clk_fast and sees the RHIC leading edge as the one-cycle rs_tick.
// The gate of the daughter cards is made from rhic_clk_out by the START and
// STOP delay lines (gate_delay, outside the FPGA on the board).
//
// Per-crossing pipeline (k = crossing number since run start):
//   tick k      crossing k begins; discriminator edges start the TDCs
//   tick k+1    TDC values of crossing k stored
//   tick k+2    ADC values of crossing k read; words of crossing k written
//               to memory and shown on chan_words for the L0 algorithm
//   tick k+3    L0 result of crossing k sampled, written to memory and sent
//               through the output latch delay to l0_out
// so with a small delay setting the L0 bits of crossing k are out within
// four crossings (400 ns) of it.
//
// Parts of the board outside this FPGA are reached through ports: the clock
// multiplier (rhic_clk_out / clk_fast), the ADCs (adc_data), the L0 algorithm
// (chan_words out, l0_result in), the fiber link to the trigger network
// (cmd_* in, ro_* out), the Ethernet configuration path (reg_* bus), the
// analog DACs (thr_code, test_dac) and the backplane (p2_*, l0_out).
// The functions follow the board requirements's requirements; the pipeline timing,
// the port protocols and the single clock domain are this design's.
// rst_n is used synchronously everywhere except in clock_select, which must
// be reset without a running clock; it is released synchronously to clk_fast.
`timescale 1ns/1ps
module qt32d_top
  import qt32d_pkg::*;
#(
  parameter int unsigned MEM_AW = 16
) (
  // clocks and resets
  input  logic                        clk_fast,
  input  logic                        por_n,
  input  logic                        clk_star,
  input  logic                        clk_osc,
  output logic                        rhic_clk_out,
  input  logic                        vme_sysreset_n,
  output logic                        prog_b_n,
  // RCC2 run/stop
  input  logic                        rcc2_run,
  // daughter cards
  input  logic [N_CH-1:0]             disc,
  input  logic [N_CH-1:0][ADC_W-1:0]  adc_data,
  output logic [N_DC-1:0]             gate,
  output logic [N_DC-1:0]             dc_vrail_en,
  output logic [7:0]                  thr_code,
  output logic                        test_pulse,
  output logic [11:0]                 test_dac,
  // L0 algorithm and P3
  output logic                        chan_valid,
  output chan_word_t [N_CH-1:0]       chan_words,
  input  logic [31:0]                 l0_result,
  output logic [31:0]                 l0_out,
  // scalers on P2
  output logic [8*N_DC-1:0]           p2_out,
  output logic [8*N_DC-1:0]           p2_oe,
  input  logic [8*N_DC-1:0]           p2_in,
  // Build_Event commands and event data
  input  logic                        cmd_valid,
  output logic                        cmd_ready,
  input  build_cmd_t                  cmd,
  output logic                        ro_valid,
  input  logic                        ro_ready,
  output logic [31:0]                 ro_data,
  output logic                        ro_last,
  // register bus
  input  logic                        reg_wr,
  input  logic                        reg_rd,
  input  logic [7:0]                  reg_addr,
  input  logic [31:0]                 reg_wdata,
  output logic [31:0]                 reg_rdata,
  // front panel
  output logic                        led_green,
  output logic                        led_red,
  output logic                        tp_gate,
  output logic                        tp_clk
);

  logic       rst_n, cc_reset;
  logic       osc_active, rs_tick, run, run_start, tac_stop, gate_i;
  cfg_t       cfg;
  status_t    status;
  logic [XING_W-1:0] xing;
  logic [N_CH-1:0][TDC_W-1:0] tdc;
  logic       w_en, r_en;
  logic [XING_W-1:0] w_xing, r_xing;
  logic [31:0] cap_result, mem_result, events;
  chan_word_t [N_CH-1:0] mem_words;
  logic        mem_re;
  logic [MEM_AW-1:0] mem_raddr;

  reset_ctrl u_reset (
    .clk(clk_fast), .por_n, .sysreset_n(vme_sysreset_n), .cc_reset,
    .rst_n, .prog_b_n
  );

  clock_select u_clksel (
    .clk_star, .clk_osc, .rst_n, .sel_osc(cfg.sel_osc),
    .clk_out(rhic_clk_out), .osc_active
  );

  rs_tick_gen u_tick (.clk(clk_fast), .rst_n, .rhic_clk(rhic_clk_out), .rs_tick);

  gate_delay u_gate (
    .clk_in(rhic_clk_out), .start_code(cfg.gate_start), .stop_code(cfg.gate_stop),
    .gate(gate_i)
  );

  assign gate     = {N_DC{gate_i}};
  assign tp_gate  = gate_i;
  assign tp_clk   = rhic_clk_out;
  assign thr_code = cfg.thr_code;

  run_ctrl u_run (
    .clk(clk_fast), .rst_n, .rs_tick, .rcc2_run,
    .use_local(cfg.use_local), .local_run(cfg.local_run), .run, .run_start
  );

  xing_counter #(.W(XING_W)) u_xing (
    .clk(clk_fast), .rst_n, .rs_tick, .run, .run_start, .count(xing)
  );

  tdc5 u_tdc (.clk(clk_fast), .rst_n, .rs_tick, .disc, .tdc);

  channel_capture u_cap (
    .clk(clk_fast), .rst_n, .rs_tick, .run, .run_start, .xing,
    .adc(adc_data), .tdc, .l0_result,
    .w_en, .w_xing, .words(chan_words), .r_en, .r_xing, .result(cap_result)
  );

  assign chan_valid = w_en;

  circ_mem #(.AW(MEM_AW)) u_mem (
    .clk(clk_fast),
    .we_w(w_en), .waddr_w(w_xing[MEM_AW-1:0]), .wwords(chan_words),
    .we_r(r_en), .waddr_r(r_xing[MEM_AW-1:0]), .wresult(cap_result),
    .re(mem_re), .raddr(mem_raddr), .rwords(mem_words), .rresult(mem_result)
  );

  l0_output #(.W(32)) u_l0 (
    .clk(clk_fast), .rst_n, .din(cap_result), .delay(cfg.l0_delay), .dout(l0_out)
  );

  readout_ctrl #(.AW(MEM_AW)) u_ro (
    .clk(clk_fast), .rst_n, .cmd_valid, .cmd_ready, .cmd, .ts(xing),
    .zs_en(cfg.zs_en), .zs_thr(cfg.zs_thr), .send_result(cfg.send_result),
    .mem_re, .mem_raddr, .mem_words, .mem_result,
    .o_valid(ro_valid), .o_ready(ro_ready), .o_data(ro_data), .o_last(ro_last),
    .events
  );

  scaler_router u_scaler (
    .flavor_c(cfg.flavor_c), .disc, .p2_out, .p2_oe, .p2_in, .tac_stop,
    .vrail_en(dc_vrail_en)
  );

  test_pulse_gen u_tp (
    .clk(clk_fast), .rst_n, .rs_tick, .en(cfg.tp_en), .period(cfg.tp_period),
    .amp(cfg.tp_amp), .pulse(test_pulse), .dac_code(test_dac)
  );

  led_status u_led (
    .clk(clk_fast), .rst_n, .rs_tick, .osc_active, .run, .led_green, .led_red
  );

  always_comb begin
    status            = '0;
    status.osc_active = osc_active;
    status.run        = run;
    status.tac_stop   = tac_stop;
    status.xing       = xing;
    status.events     = events;
  end

  reg_file u_regs (
    .clk(clk_fast), .rst_n, .wr(reg_wr), .rd(reg_rd), .addr(reg_addr),
    .wdata(reg_wdata), .rdata(reg_rdata), .cfg, .status, .cc_reset
  );

endmodule
