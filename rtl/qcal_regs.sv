// qcal_regs: configuration and telemetry register interface.
//
// A small memory-mapped register file, as the document's Sec. 2.2 and 5.4
// describe it: it programs the 3x3 singleton table (D0..D8), the target and
// limit registers and the operating modes, and exposes p_meas, e, de, Delta,
// amp and status flags for tuning and debug. The bus protocol and the
// register map (qcal_pkg::reg_addr_e) are this design's choices.
//
// Bus: a write happens on a clock edge with cfg_we high (cfg_addr, cfg_wdata).
// Reads are combinational: cfg_rdata shows the register at cfg_addr in the
// same cycle. Unmapped addresses read as zero and ignore writes.
// Side effects: writing REG_AMP_SET pulses amp_load for one cycle with
// amp_load_val; writing REG_CTRL with bit 2 set pulses cal_restart for one
// cycle (bit 2 is not stored). Configuration registers reset to the qcal_pkg
// RST_* values; after reset the loop is disabled and in autonomous mode.
module qcal_regs
  import qcal_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  fx_t               cfg_wdata,
  output fx_t               cfg_rdata,
  // configuration to the datapath
  output cfg_t              cfg,
  output logic              amp_load,
  output fx_t               amp_load_val,
  output logic              cal_restart,
  // telemetry from the datapath
  input  fx_t               t_p_meas,
  input  fx_t               t_e,
  input  fx_t               t_de,
  input  fx_t               t_delta,
  input  fx_t               t_amp,
  input  status_t           t_status,
  input  fx_t               t_metric,
  input  logic [31:0]       t_k,
  input  fx_t               t_baseline
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.enable   <= 1'b0;
      cfg.manual   <= 1'b0;
      cfg.p_target <= RST_P_TARGET;
      cfg.dmax     <= RST_DMAX;
      cfg.amp_min  <= RST_AMP_MIN;
      cfg.amp_max  <= RST_AMP_MAX;
      cfg.e_tol    <= RST_E_TOL;
      cfg.de_tol   <= RST_DE_TOL;
      cfg.eps      <= RST_EPS;
      cfg.hits     <= RST_HITS;
      cfg.t_rst    <= RST_T_RST;
      cfg.r_pers   <= RST_R_PERS;
      cfg.dtab     <= RST_DTAB;
      amp_load     <= 1'b0;
      amp_load_val <= '0;
      cal_restart  <= 1'b0;
    end else begin
      amp_load    <= 1'b0;
      cal_restart <= 1'b0;
      if (cfg_we) begin
        if (cfg_addr >= REG_D0 && cfg_addr <= ADDR_W'(REG_D0 + 8))
          cfg.dtab[cfg_addr - REG_D0] <= cfg_wdata;
        case (cfg_addr)
          REG_CTRL: begin
            cfg.enable  <= cfg_wdata[0];
            cfg.manual  <= cfg_wdata[1];
            cal_restart <= cfg_wdata[2];
          end
          REG_P_TARGET: cfg.p_target <= cfg_wdata;
          REG_DMAX:     cfg.dmax     <= cfg_wdata;
          REG_AMP_MIN:  cfg.amp_min  <= cfg_wdata;
          REG_AMP_MAX:  cfg.amp_max  <= cfg_wdata;
          REG_AMP_SET: begin
            amp_load     <= 1'b1;
            amp_load_val <= cfg_wdata;
          end
          REG_E_TOL:    cfg.e_tol    <= cfg_wdata;
          REG_DE_TOL:   cfg.de_tol   <= cfg_wdata;
          REG_EPS:      cfg.eps      <= cfg_wdata;
          REG_HITS:     cfg.hits     <= cfg_wdata[7:0];
          REG_T_RST:    cfg.t_rst    <= cfg_wdata;
          REG_R_PERS:   cfg.r_pers   <= cfg_wdata[7:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr >= REG_D0 && cfg_addr <= ADDR_W'(REG_D0 + 8))
      cfg_rdata = cfg.dtab[cfg_addr - REG_D0];
    case (cfg_addr)
      REG_CTRL:     cfg_rdata = fx_t'({cfg.manual, cfg.enable});
      REG_P_TARGET: cfg_rdata = cfg.p_target;
      REG_DMAX:     cfg_rdata = cfg.dmax;
      REG_AMP_MIN:  cfg_rdata = cfg.amp_min;
      REG_AMP_MAX:  cfg_rdata = cfg.amp_max;
      REG_AMP_SET:  cfg_rdata = t_amp;
      REG_E_TOL:    cfg_rdata = cfg.e_tol;
      REG_DE_TOL:   cfg_rdata = cfg.de_tol;
      REG_EPS:      cfg_rdata = cfg.eps;
      REG_HITS:     cfg_rdata = fx_t'(cfg.hits);
      REG_T_RST:    cfg_rdata = cfg.t_rst;
      REG_R_PERS:   cfg_rdata = fx_t'(cfg.r_pers);
      REG_P_MEAS:   cfg_rdata = t_p_meas;
      REG_E:        cfg_rdata = t_e;
      REG_DE:       cfg_rdata = t_de;
      REG_DELTA:    cfg_rdata = t_delta;
      REG_AMP:      cfg_rdata = t_amp;
      REG_STATUS:   cfg_rdata = fx_t'(t_status);
      REG_METRIC:   cfg_rdata = t_metric;
      REG_K:        cfg_rdata = fx_t'(t_k[DATA_W-1:0]);
      REG_BASELINE: cfg_rdata = t_baseline;
      default: ;
    endcase
  end

endmodule
