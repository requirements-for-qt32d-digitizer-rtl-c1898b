// qt32d_pkg: types and constants shared by the QT32D mother-board FPGA.
//
// The channel word follows the 4-byte layout of the readout (12-bit ADC,
// 5-bit TDC, 5-bit channel address, 10 spare bits); the bit order inside the
// word, the Build_Event command fields, the event header and the register map
// are choices of this design.
`timescale 1ns/1ps
package qt32d_pkg;

  localparam int unsigned N_CH   = 32;  // channels per board (4 daughter cards x 8)
  localparam int unsigned N_DC   = 4;   // daughter cards per board
  localparam int unsigned ADC_W  = 12;  // ADC resolution
  localparam int unsigned TDC_W  = 5;   // 5 ns TDC, 5 bits
  localparam int unsigned CH_W   = 5;   // channel address width
  localparam int unsigned XING_W = 32;  // crossing number / timestamp width
  localparam int unsigned TOK_W  = 12;  // trigger token width

  // Number of RHIC ticks between a crossing and the moment its ADC value is
  // ready (digitization cycle of two RHIC strobes).
  localparam int unsigned DIGI_LAT = 2;

  // Marker in the top byte of the first word of every event.
  localparam logic [7:0] EVT_MARKER = 8'hD5;

  // One channel of one crossing, 4 bytes.
  typedef struct packed {
    logic [9:0]       spare;
    logic [CH_W-1:0]  chan;
    logic [TDC_W-1:0] tdc;
    logic [ADC_W-1:0] adc;
  } chan_word_t;

  // Build_Event command as delivered by the trigger network receiver.
  typedef struct packed {
    logic [TOK_W-1:0]  token;
    logic [XING_W-1:0] xing;
  } build_cmd_t;

  // Register values seen by the logic.
  typedef struct packed {
    logic        sel_osc;      // 1: local oscillator, 0: STAR clock
    logic [7:0]  gate_start;   // gate START delay, ns
    logic [7:0]  gate_stop;    // gate STOP delay, ns
    logic [7:0]  thr_code;     // discriminator threshold DAC code
    logic [3:0]  flavor_c;     // per daughter card: 1 = QT8C, 0 = QT8B
    logic [6:0]  l0_delay;     // L0 output latch delay, 5 ns steps
    logic        use_local;    // 1: obey local_run, 0: obey RCC2
    logic        local_run;    // RUN (1) or STOP (0) in local mode
    logic        zs_en;        // zero suppression on
    logic [11:0] zs_thr;       // ADC threshold for zero suppression
    logic        send_result;  // append the stored L0 result to each event
    logic        tp_en;        // test pulse on
    logic [23:0] tp_period;    // crossings between test pulses
    logic [11:0] tp_amp;       // test pulse amplitude DAC code
  } cfg_t;

  // Read-only status.
  typedef struct packed {
    logic        osc_active;
    logic        run;
    logic        tac_stop;
    logic [31:0] xing;
    logic [31:0] events;
  } status_t;

  // Register word addresses.
  localparam logic [7:0] REG_CLOCK    = 8'h01;  // [0] sel_osc; read [1] osc_active
  localparam logic [7:0] REG_GATE     = 8'h02;  // [7:0] START, [15:8] STOP
  localparam logic [7:0] REG_THR      = 8'h03;  // [7:0] threshold code
  localparam logic [7:0] REG_FLAVOR   = 8'h04;  // [3:0] 1 = QT8C per card
  localparam logic [7:0] REG_L0DELAY  = 8'h05;  // [6:0] 5 ns steps
  localparam logic [7:0] REG_RUN      = 8'h06;  // [0] use_local, [1] local_run; read [2] run
  localparam logic [7:0] REG_ZS       = 8'h07;  // [0] zs_en, [1] send_result, [27:16] zs_thr
  localparam logic [7:0] REG_TP       = 8'h08;  // [0] tp_en, [27:16] tp_amp
  localparam logic [7:0] REG_TPPERIOD = 8'h09;  // [23:0] crossings
  localparam logic [7:0] REG_RESET    = 8'h0A;  // write 0xB007 to reload the FPGA
  localparam logic [7:0] REG_XING     = 8'h0B;  // read: crossing counter
  localparam logic [7:0] REG_EVENTS   = 8'h0C;  // read: events sent
  localparam logic [7:0] REG_STATUS   = 8'h0D;  // read: [0] run, [1] osc_active, [2] tac_stop

  localparam logic [15:0] RESET_MAGIC  = 16'hB007;

endpackage
