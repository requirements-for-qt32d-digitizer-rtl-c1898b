// reg_file: configuration and monitoring registers of the board.
//
// The registers are reached over a simple synchronous bus that stands for the
// Ethernet configuration path (front-panel Ethernet through the ConnectCore
// module): a write stores wdata at addr in the same cycle; a read returns the
// register in rdata one cycle after rd. The fields (clock source, gate START
// and STOP, discriminator threshold, daughter-card flavors, L0 output delay,
// run control, zero suppression, test pulse) are presented to the logic as
// one cfg_t struct; status_t is read back. Writing RESET_MAGIC to REG_RESET
// gives a one-cycle cc_reset pulse that reloads the FPGA. The address map is
// in qt32d_pkg. After reset: STAR clock, gate 0 to 80 ns, local STOP obeying
// the RCC2, zero suppression off, test pulse off.
// Which settings are registers follows the board requirements; the address map, bit
// positions, bus and reset values are this design's.
`timescale 1ns/1ps
module reg_file
  import qt32d_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic        rd,
  input  logic [7:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output cfg_t        cfg,
  input  status_t     status,
  output logic        cc_reset
);

  always_ff @(posedge clk)
    if (!rst_n) begin
      cfg            <= '0;
      cfg.gate_stop  <= 8'd80;
      cfg.tp_period  <= 24'd1;
      cc_reset       <= 1'b0;
    end else begin
      cc_reset <= 1'b0;
      if (wr) begin
        unique case (addr)
          REG_CLOCK:    cfg.sel_osc <= wdata[0];
          REG_GATE:     {cfg.gate_stop, cfg.gate_start} <= wdata[15:0];
          REG_THR:      cfg.thr_code <= wdata[7:0];
          REG_FLAVOR:   cfg.flavor_c <= wdata[3:0];
          REG_L0DELAY:  cfg.l0_delay <= wdata[6:0];
          REG_RUN:      {cfg.local_run, cfg.use_local} <= wdata[1:0];
          REG_ZS: begin
            cfg.zs_en       <= wdata[0];
            cfg.send_result <= wdata[1];
            cfg.zs_thr      <= wdata[27:16];
          end
          REG_TP: begin
            cfg.tp_en  <= wdata[0];
            cfg.tp_amp <= wdata[27:16];
          end
          REG_TPPERIOD: cfg.tp_period <= wdata[23:0];
          REG_RESET:    cc_reset <= (wdata[15:0] == RESET_MAGIC);
          default: ;
        endcase
      end
    end

  always_ff @(posedge clk)
    if (!rst_n) rdata <= '0;
    else if (rd) begin
      unique case (addr)
        REG_CLOCK:    rdata <= {30'd0, status.osc_active, cfg.sel_osc};
        REG_GATE:     rdata <= {16'd0, cfg.gate_stop, cfg.gate_start};
        REG_THR:      rdata <= {24'd0, cfg.thr_code};
        REG_FLAVOR:   rdata <= {28'd0, cfg.flavor_c};
        REG_L0DELAY:  rdata <= {25'd0, cfg.l0_delay};
        REG_RUN:      rdata <= {29'd0, status.run, cfg.local_run, cfg.use_local};
        REG_ZS:       rdata <= {4'd0, cfg.zs_thr, 14'd0, cfg.send_result, cfg.zs_en};
        REG_TP:       rdata <= {4'd0, cfg.tp_amp, 15'd0, cfg.tp_en};
        REG_TPPERIOD: rdata <= {8'd0, cfg.tp_period};
        REG_XING:     rdata <= status.xing;
        REG_EVENTS:   rdata <= status.events;
        REG_STATUS:   rdata <= {29'd0, status.tac_stop, status.osc_active, status.run};
        default:      rdata <= '0;
      endcase
    end

endmodule
