// tb_qt32d_top: end-to-end test of the mother-board FPGA at its full size
// (32 channels, 64k-crossing circular memory), with no parameter changed.
//
// The bench plays the parts around the FPGA: the clock multiplier (a 5 ns
// fast clock with the RHIC clocks at exactly 21 fast cycles), the daughter
// cards (ADC values and discriminator pulses that are known functions of the
// crossing), the L0 algorithm (a result word tagged with its crossing), the
// trigger network (Build_Event commands, a link that stalls at random) and
// the configuration path (register writes). It then checks, against values
// worked out here:
//   - the clock switch to the local oscillator and back, and the LED colour
//   - RUN entered from the RCC2 line and from the local register, the local
//     STOP overriding the RCC2, and the memory realigned at each run start
//   - events read back by crossing number: header, timestamp, every channel
//     word (ADC, TDC = 21 - discriminator delay, channel number), the stored
//     L0 result, with and without zero suppression, under back-pressure
//   - the circular memory wrapping after 65536 crossings
//   - L0 bits on P3 delayed by the latch-delay register and out within
//     400 ns of their crossing
//   - gate START delay on the test point, scaler routing for both
//     daughter-card flavors with the TAC Stop input, the test pulse rate
//   - reload of the FPGA by register command and by VME SYSRESET
// Each of these mechanisms is counted and must happen at least once.
`timescale 1ns/1ps
module tb_qt32d_top;
  import qt32d_pkg::*;

  logic clk_fast = 0, por_n = 0, clk_star = 0, clk_osc = 0, vme_sysreset_n = 1, rcc2_run = 0;
  logic rhic_clk_out, prog_b_n;
  logic [31:0] disc = '0;
  logic [31:0][11:0] adc_data = '0;
  logic [3:0] gate, dc_vrail_en;
  logic [7:0] thr_code;
  logic test_pulse;
  logic [11:0] test_dac;
  logic chan_valid;
  chan_word_t [31:0] chan_words;
  logic [31:0] l0_result = '0, l0_out;
  logic [31:0] p2_out, p2_oe, p2_in = '0;
  logic cmd_valid = 0, cmd_ready;
  build_cmd_t cmd = '0;
  logic ro_valid, ro_ready = 1, ro_last;
  logic [31:0] ro_data;
  logic reg_wr = 0, reg_rd = 0;
  logic [7:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic led_green, led_red, tp_gate, tp_clk;

  qt32d_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // mechanism counters
  int n_clk_switch = 0, n_run_rcc2 = 0, n_run_local = 0, n_local_stop = 0, n_events = 0,
      n_zs = 0, n_full = 0, n_result = 0, n_stall = 0, n_wrap = 0, n_l0 = 0, n_gate = 0,
      n_flavor_c = 0, n_tac = 0, n_tp = 0, n_cc_reload = 0, n_sys_reload = 0;

  // ---------------- clocks ----------------
  always #2.5 clk_fast = !clk_fast;
  longint cyc = 0;
  always @(posedge clk_fast) cyc <= cyc + 1;

  // both RHIC clock sources are 21 fast cycles long; the oscillator is
  // shifted by 10 cycles. Edges come 1 ns after a fast edge.
  initial forever begin
    @(posedge clk_fast); #1;
    clk_star = (cyc % 21) < 10;
    clk_osc  = ((cyc + 10) % 21) < 10;
  end

  // ---------------- daughter cards and L0 algorithm ----------------
  // crossing seen by the board = RHIC edge index m
  longint m = 0;
  int ph = 0;                     // fast edges since the last RHIC edge
  logic rhic_prev = 0;
  realtime edge_t [256];

  function automatic logic [31:0] mix(input longint a, input int c);
    logic [31:0] h;
    h = 32'(a) * 32'h9E3779B1 ^ (32'(c) * 32'h85EBCA6B);
    h = h ^ (h >> 15);
    return h * 32'h2C1B3C6D;
  endfunction
  function automatic logic [11:0] adc_of(input longint a, input int c);
    logic [31:0] h = mix(a, c);
    return (h[31:30] == 0) ? h[11:0] : 12'(h[5:0]);   // a quarter of the channels are large
  endfunction
  function automatic int ddelay(input longint a, input int c);  // 0: no hit, else 1..19
    logic [31:0] h = mix(a + 77, c);
    return (h[1:0] == 0) ? 1 + int'(h[20:16] % 19) : 0;
  endfunction
  function automatic logic [31:0] l0_of(input longint a);
    return {8'hA5, 24'(a)};
  endfunction

  always @(posedge rhic_clk_out) begin
    m <= m + 1;
    edge_t[(m + 1) % 256] = $realtime;
  end

  always @(posedge clk_fast) begin
    #2;
    if (rhic_clk_out && !rhic_prev) ph = 0;  // edge happened 1 ns after this fast edge
    else ph++;
    rhic_prev = rhic_clk_out;
    if (ph == 0) begin
      for (int c = 0; c < 32; c++) adc_data[c] = adc_of(m - 2, c);
      l0_result = l0_of(m - 3);
    end
    for (int c = 0; c < 32; c++) begin
      automatic int d = ddelay(m, c);
      disc[c] = (d != 0) && (ph >= d) && (ph < d + 2);
    end
  end

  // ---------------- register bus ----------------
  task automatic wreg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk_fast) begin reg_wr = 1; reg_addr = a; reg_wdata = d; end
    @(negedge clk_fast) reg_wr = 0;
  endtask
  task automatic rreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk_fast) begin reg_rd = 1; reg_addr = a; end
    @(negedge clk_fast) begin reg_rd = 0; d = reg_rdata; end
  endtask
  task automatic crossings(input int n);
    repeat (n * 21) @(negedge clk_fast);
  endtask

  // ---------------- run start alignment ----------------
  longint e0 = 0;
  always @(posedge clk_fast) if (dut.run_start) e0 = m;

  // ---------------- L0 output latency ----------------
  int l0_delay_set = 10;
  logic [31:0] l0_prev = '0;
  always @(posedge clk_fast) begin
    #0.5;
    if (l0_out != l0_prev && l0_out[31:24] == 8'hA5 && dut.run) begin
      automatic longint a = longint'(l0_out[23:0]);
      automatic realtime lat = $realtime - 0.5 - edge_t[a % 256];
      automatic realtime want = 5.0 * (67 + l0_delay_set) - 1.0;
      if (a > m - 200) begin
        check(lat > want - 0.6 && lat < want + 0.6, $sformatf("L0 latency %0t", lat));
        check(lat <= 400.0, "L0 bits within 400 ns");
        n_l0++;
      end
    end
    l0_prev = l0_out;
  end

  // ---------------- gate test point ----------------
  int gate_start_set = 12;
  realtime last_rhic;
  always @(posedge rhic_clk_out) last_rhic = $realtime;
  always @(posedge tp_gate) begin
    check($realtime - last_rhic > gate_start_set - 0.01 && $realtime - last_rhic < gate_start_set + 0.01,
          "gate opens START ns after the RHIC edge");
    check(gate == 4'hF, "gate on all four cards");
    n_gate++;
  end

  always @(posedge clk_fast) if (test_pulse) n_tp++;
  always @(posedge clk_fast) if (ro_valid && !ro_ready) n_stall++;

  // ---------------- readout ----------------
  logic [31:0] got [$];
  always @(posedge clk_fast) if (ro_valid && ro_ready) got.push_back(ro_data);

  task automatic readout(input longint k, input longint src, input bit zs, input bit res,
                         input logic [11:0] thr, input bit bp);
    logic [31:0] exp [$];
    logic [11:0] tok;
    longint now;
    int guard;
    tok = 12'($urandom);
    wreg(REG_ZS, {4'd0, thr, 14'd0, res, zs});
    // expected event; src is the crossing whose data the entry holds
    for (int c = 0; c < 32; c++) begin
      automatic logic [11:0] a = adc_of(e0 + src, c);
      automatic int d = ddelay(e0 + src, c);
      if (!zs || a > thr) exp.push_back({10'd0, 5'(c), (d != 0) ? 5'(21 - d) : 5'd0, a});
    end
    if (res) exp.push_back(l0_of(e0 + src));
    got.delete();
    @(negedge clk_fast);
    cmd_valid = 1; cmd.token = tok; cmd.xing = 32'(k);
    now = m - e0;
    @(negedge clk_fast);
    cmd_valid = 0;
    guard = 0;
    while (!(ro_valid && ro_ready && ro_last) && guard < 1000) begin
      ro_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(negedge clk_fast);
      guard++;
    end
    @(negedge clk_fast);
    ro_ready = 1;
    check(got.size() == exp.size() + 3, $sformatf("event size %0d, want %0d", got.size(), exp.size() + 3));
    if (got.size() == exp.size() + 3) begin
      check(got[0] == {EVT_MARKER, zs, res, 2'b00, tok, 8'(exp.size() + 3)}, "event header");
      check(got[1] == 32'(k), "event crossing");
      check(longint'(got[2]) >= now - 1 && longint'(got[2]) <= now + 1, "readout timestamp");
      foreach (exp[i]) check(got[i + 3] == exp[i], $sformatf("event word %0d (crossing %0d) got %h want %h", i, k, got[i + 3], exp[i]));
    end
    n_events++;
    if (zs) n_zs++; else n_full++;
    if (res) n_result++;
  endtask

  logic [31:0] r;

  initial begin
    repeat (5) @(negedge clk_fast);
    por_n = 1;
    repeat (5) @(negedge clk_fast);
    check(prog_b_n, "no reload after power-on");
    wreg(REG_GATE, {16'd0, 8'd60, 8'(gate_start_set)});
    wreg(REG_L0DELAY, 32'(l0_delay_set));
    wreg(REG_TPPERIOD, 32'd3);
    wreg(REG_TP, {4'd0, 12'h5A5, 15'd0, 1'b1});
    crossings(4);
    check(led_green && !led_red, "green LED on STAR clock");

    // clock source switch and back
    wreg(REG_CLOCK, 32'd1);
    crossings(4);
    rreg(REG_CLOCK, r);
    check(r[1:0] == 2'b11, "oscillator active");
    check(led_red && !led_green, "red LED on oscillator");
    if (r[1]) n_clk_switch++;
    wreg(REG_CLOCK, 32'd0);
    crossings(4);
    rreg(REG_CLOCK, r);
    check(r[1:0] == 2'b00, "STAR clock active again");

    // test pulse: every third crossing
    n_tp = 0;
    crossings(30);
    check(n_tp >= 9 && n_tp <= 11, $sformatf("test pulse rate (%0d in 30 crossings)", n_tp));
    check(test_dac == 12'h5A5, "test pulse amplitude");

    // scalers, QT8B then QT8C on card 3 with TAC Stop
    wreg(REG_FLAVOR, 32'h0);
    for (int n = 0; n < 50; n++) begin
      @(negedge clk_fast);
      check(p2_out == disc && p2_oe == '1 && dc_vrail_en == 4'h0, "QT8B scaler routing");
    end
    wreg(REG_FLAVOR, 32'h8);
    n_flavor_c++;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk_fast);
      p2_in[31] = n[2];
      #0.1;
      check(p2_out == (disc & 32'h3FFF_FFFF) && p2_oe == 32'h7FFF_FFFF && dc_vrail_en == 4'h8,
            "QT8C scaler routing");
      check(dut.tac_stop == n[2], "TAC Stop from P2");
      if (dut.tac_stop) n_tac++;
    end
    wreg(REG_FLAVOR, 32'h0);

    // RUN from the RCC2
    rreg(REG_STATUS, r);
    check(!r[0], "stopped before RCC2 RUN");
    rcc2_run = 1;
    crossings(3);
    rreg(REG_STATUS, r);
    check(r[0], "RUN from the RCC2");
    if (r[0]) n_run_rcc2++;
    crossings(300);

    for (int n = 0; n < 24; n++) begin
      automatic longint k = (m - e0) - 4 - $urandom_range(0, 250);
      readout(k, k, n % 3 == 1, n % 2 == 0, 12'($urandom_range(0, 40)), n >= 12);
    end

    // run past one full turn of the circular memory
    while (m - e0 < 65536 + 20) crossings(1000);
    readout(5, 65536 + 5, 0, 1, 0, 0);
    n_wrap++;
    readout((m - e0) - 5, (m - e0) - 5, 1, 1, 12'd20, 1);

    // local STOP overrides the RCC2, local RUN restarts the memory at 0
    wreg(REG_RUN, 32'b01);
    crossings(3);
    rreg(REG_STATUS, r);
    check(!r[0], "local STOP overrides RCC2 RUN");
    if (!r[0]) n_local_stop++;
    wreg(REG_RUN, 32'b11);
    crossings(3);
    rreg(REG_STATUS, r);
    check(r[0], "local RUN");
    if (r[0]) n_run_local++;
    crossings(20);
    rreg(REG_XING, r);
    check(r >= 19 && r <= 23, "crossing counter restarted at run start");
    for (int n = 0; n < 6; n++) begin
      automatic longint k = 1 + n;
      readout(k, k, n[0], 1, 12'd30, 1);
    end

    // reload by register command
    wreg(REG_RESET, {16'd0, RESET_MAGIC});
    gate_start_set = 0;     // registers return to their reset values
    l0_delay_set   = 0;
    @(negedge clk_fast);
    check(!prog_b_n, "PROGRAM_B low after reset command");
    if (!prog_b_n) n_cc_reload++;
    repeat (100) @(negedge clk_fast);
    check(prog_b_n, "PROGRAM_B released");
    rreg(REG_GATE, r);
    check(r == {16'd0, 8'd80, 8'd0}, "gate registers back to reset values");
    rreg(REG_RUN, r);
    check(r[1:0] == 2'b00, "run control back to obeying the RCC2");
    // reload by VME SYSRESET
    vme_sysreset_n = 0;
    repeat (10) @(negedge clk_fast);
    check(!prog_b_n, "PROGRAM_B low on SYSRESET");
    if (!prog_b_n) n_sys_reload++;
    vme_sysreset_n = 1;
    repeat (100) @(negedge clk_fast);
    check(prog_b_n, "PROGRAM_B released after SYSRESET");

    // every mechanism must have happened
    check(n_clk_switch > 0, "clock switch");
    check(n_run_rcc2 > 0, "run from RCC2");
    check(n_run_local > 0, "run from local register");
    check(n_local_stop > 0, "local stop override");
    check(n_full > 0, "full readout");
    check(n_zs > 0, "zero-suppressed readout");
    check(n_result > 0, "L0 result read out");
    check(n_stall > 0, "link back-pressure");
    check(n_wrap > 0, "circular memory wrap");
    check(n_l0 > 100, "L0 output");
    check(n_gate > 100, "gate");
    check(n_flavor_c > 0 && n_tac > 0, "QT8C routing and TAC Stop");
    check(n_tp > 0, "test pulse");
    check(n_cc_reload > 0, "reload by command");
    check(n_sys_reload > 0, "reload by SYSRESET");
    $display("mechanisms: clk_switch=%0d run_rcc2=%0d run_local=%0d local_stop=%0d events=%0d full=%0d zs=%0d result=%0d stalls=%0d wrap=%0d l0=%0d gate=%0d flavor_c=%0d tac=%0d tp=%0d cc_reload=%0d sys_reload=%0d",
             n_clk_switch, n_run_rcc2, n_run_local, n_local_stop, n_events, n_full, n_zs, n_result,
             n_stall, n_wrap, n_l0, n_gate, n_flavor_c, n_tac, n_tp, n_cc_reload, n_sys_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
