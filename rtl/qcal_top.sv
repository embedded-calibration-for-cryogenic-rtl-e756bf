// qcal_top: embedded closed-loop calibration controller for one channel.
//
// Wires the blocks of the document's Fig. 1 into one loop:
//   readout shots -> qcal_meas_est (p_meas) -> qcal_error_unit (e, de)
//   -> qcal_fuzzy (singleton Sugeno Delta) -> qcal_param_update (amp)
//   -> amp_out to the device,
// with qcal_supervisor scheduling each poll, qcal_monitor deciding convergence
// and drift restarts, and qcal_regs giving the configuration/telemetry bus.
// The device and its readout are outside: amp_out drives them, and they
// return one outcome per cycle on shot_valid/shot_bit while shot_req is high.
//
// Timing: every poll takes the same number of cycles when the readout
// answers every cycle: N_total + L + 44, where L is the delay from shot_req
// rising to the first shot_valid and 44 covers the estimator, error unit,
// inference (35 cycles, mostly the 33-step divider), update and scheduling.
// With the defaults and a readout with L = 2 that is 302 cycles.
//
// Ports besides the bus are telemetry for debug: the status flags, poll index
// k, poll_done (one-cycle pulse at the end of every poll) and the values of
// the last poll. N_total is this design's choice; W = 16 is the document's.
module qcal_top
  import qcal_pkg::*;
#(
  parameter int unsigned LOG2_NTOTAL = 8,   // N_total = 256 shots per poll (assumed)
  parameter int unsigned LOG2_W      = 4    // monitor window W = 16 (document)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration / telemetry bus
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  fx_t               cfg_wdata,
  output fx_t               cfg_rdata,
  // device readout
  output logic              shot_req,
  input  logic              shot_valid,
  input  logic              shot_bit,
  // actuation
  output fx_t               amp_out,
  // telemetry
  output status_t           status,
  output logic [31:0]       k,
  output logic              poll_done,
  output fx_t               p_meas,
  output fx_t               e,
  output fx_t               de,
  output fx_t               delta,
  output fx_t               metric,
  output fx_t               baseline
);

  cfg_t cfg;
  logic amp_load;
  fx_t  amp_load_val;
  logic cal_restart;

  logic est_start, est_done;
  logic err_valid, err_clear, err_done;
  logic mon_valid, mon_clear, mon_enter, mon_conv, mon_restart;
  logic conv_by_hit, conv_by_plateau;
  logic fz_start, fz_done, fz_busy;
  logic upd_apply;
  logic sup_busy, mon_mode, upd, restart_seen;

  logic [LOG2_NTOTAL:0] n1;
  fx_t                  abs_e, abs_de;
  fx_t                  step;
  logic [MU_W+3:0]      w_sum;

  qcal_regs u_regs (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .cfg, .amp_load, .amp_load_val, .cal_restart,
    .t_p_meas   (p_meas),
    .t_e        (e),
    .t_de       (de),
    .t_delta    (delta),
    .t_amp      (amp_out),
    .t_status   (status),
    .t_metric   (metric),
    .t_k        (k),
    .t_baseline (baseline)
  );

  qcal_supervisor u_sup (
    .clk, .rst_n,
    .enable      (cfg.enable),
    .manual      (cfg.manual),
    .cal_restart (cal_restart),
    .est_start, .est_done,
    .err_valid, .err_clear, .err_done,
    .mon_valid, .mon_clear, .mon_enter,
    .mon_conv    (mon_conv),
    .mon_restart (mon_restart),
    .fz_start, .fz_done,
    .upd_apply,
    .busy        (sup_busy),
    .mon_mode, .upd, .restart_seen, .poll_done, .k
  );

  qcal_meas_est #(.LOG2_NTOTAL(LOG2_NTOTAL)) u_est (
    .clk, .rst_n,
    .start (est_start),
    .shot_req, .shot_valid, .shot_bit,
    .done  (est_done),
    .n1, .p_meas
  );

  qcal_error_unit u_err (
    .clk, .rst_n,
    .clear     (err_clear),
    .in_valid  (err_valid),
    .p_meas,
    .p_target  (cfg.p_target),
    .out_valid (err_done),
    .e, .de, .abs_e, .abs_de
  );

  qcal_monitor #(.LOG2_W(LOG2_W)) u_mon (
    .clk, .rst_n,
    .clear     (mon_clear),
    .valid     (mon_valid),
    .abs_e, .abs_de,
    .mon_mode, .mon_enter,
    .e_tol     (cfg.e_tol),
    .de_tol    (cfg.de_tol),
    .eps       (cfg.eps),
    .hits      (cfg.hits),
    .t_rst     (cfg.t_rst),
    .r_pers    (cfg.r_pers),
    .metric, .baseline,
    .conv      (mon_conv),
    .conv_by_hit, .conv_by_plateau,
    .restart   (mon_restart)
  );

  qcal_fuzzy u_fz (
    .clk, .rst_n,
    .start (fz_start),
    .e, .de,
    .dtab  (cfg.dtab),
    .busy  (fz_busy),
    .done  (fz_done),
    .delta,
    .w_sum
  );

  qcal_param_update u_upd (
    .clk, .rst_n,
    .apply    (upd_apply),
    .delta,
    .load     (amp_load),
    .load_val (amp_load_val),
    .dmax     (cfg.dmax),
    .amp_min  (cfg.amp_min),
    .amp_max  (cfg.amp_max),
    .amp      (amp_out),
    .step
  );

  // CONV flag, and a sticky record of which rule gave the last convergence.
  logic conv_q, conv_hit_q, conv_plat_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conv_q      <= 1'b0;
      conv_hit_q  <= 1'b0;
      conv_plat_q <= 1'b0;
    end else if (mon_clear) begin
      conv_q      <= 1'b0;
      conv_hit_q  <= 1'b0;
      conv_plat_q <= 1'b0;
    end else if (mon_conv) begin
      conv_q      <= 1'b1;
      conv_hit_q  <= conv_by_hit;
      conv_plat_q <= conv_by_plateau;
    end else if (mon_restart) begin
      conv_q      <= 1'b0;
    end
  end

  always_comb begin
    status.conv         = conv_q;
    status.busy         = sup_busy;
    status.upd          = upd;
    status.mon          = mon_mode;
    status.conv_hit     = conv_hit_q;
    status.conv_plateau = conv_plat_q;
    status.manual       = cfg.manual;
    status.restart_seen = restart_seen;
  end

  // The inference must have finished before the next one is launched.
  a_fz_idle: assert property (@(posedge clk) disable iff (!rst_n) fz_start |-> !fz_busy);

endmodule
