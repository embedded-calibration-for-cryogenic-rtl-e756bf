// qcal_supervisor: supervisor / scheduler of the calibration loop.
//
// Runs every calibration iteration (poll k) along the same fixed path, as the
// document's Sec. 2.3 requires:
//   MEAS   start the estimator, wait for N_total shots and p_meas
//   ERR    hand p_meas to the error unit, wait for e(k), de(k)
//   EVAL   feed |e|, |de| to the monitor and start the fuzzy inference
//   WAIT   wait for Delta(k)
//   UPDATE apply the bounded update, unless in monitor mode or manual mode
// and then starts the next poll while enable is set, or else goes idle.
//
// It also holds the operating modes:
//  * update / monitor: a convergence pulse from the monitor in poll k switches
//    to monitor mode at the start of poll k+1 (the document reports monitor
//    entry one poll after convergence) and pulses mon_enter so the monitor
//    latches its baseline. A drift restart pulse switches back to update mode
//    at the start of the next poll, the same way. In monitor mode amp is
//    frozen, while measurement, inference and telemetry keep running.
//  * autonomous / manual (document: "manual versus autonomous"): in manual
//    mode the loop measures and reports but never changes amp.
// A restart command (cal_restart) clears the error history and the monitor,
// returns to update mode and resets k to 0; it takes effect at the next poll
// boundary, or at once when idle.
//
// Interface: single-cycle start/valid pulses to the blocks, and their done
// pulses back. poll_done pulses at the end of every poll, together with the
// final k of that poll. upd is high for the poll after an applied update.
module qcal_supervisor (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        manual,
  input  logic        cal_restart,
  // estimator
  output logic        est_start,
  input  logic        est_done,
  // error unit
  output logic        err_valid,
  output logic        err_clear,
  input  logic        err_done,
  // monitor
  output logic        mon_valid,
  output logic        mon_clear,
  output logic        mon_enter,
  input  logic        mon_conv,
  input  logic        mon_restart,
  // decision logic
  output logic        fz_start,
  input  logic        fz_done,
  // parameter update
  output logic        upd_apply,
  // status
  output logic        busy,
  output logic        mon_mode,
  output logic        upd,
  output logic        restart_seen,
  output logic        poll_done,
  output logic [31:0] k
);

  typedef enum logic [2:0] {
    S_IDLE, S_MEAS, S_MEAS_WAIT, S_ERR, S_ERR_WAIT, S_EVAL, S_WAIT, S_UPDATE
  } state_e;

  state_e state;
  logic   conv_pend;      // convergence seen, enter monitor mode next poll
  logic   rst_pend;       // drift restart seen, leave monitor mode next poll
  logic   cmd_pend;       // restart command waiting for a poll boundary
  logic   upd_this;       // this poll applied (or will apply) an update

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      conv_pend    <= 1'b0;
      rst_pend     <= 1'b0;
      cmd_pend     <= 1'b0;
      upd_this     <= 1'b0;
      est_start    <= 1'b0;
      err_valid    <= 1'b0;
      err_clear    <= 1'b0;
      mon_valid    <= 1'b0;
      mon_clear    <= 1'b0;
      mon_enter    <= 1'b0;
      fz_start     <= 1'b0;
      upd_apply    <= 1'b0;
      mon_mode     <= 1'b0;
      upd          <= 1'b0;
      restart_seen <= 1'b0;
      poll_done    <= 1'b0;
      k            <= '0;
    end else begin
      est_start <= 1'b0;
      err_valid <= 1'b0;
      err_clear <= 1'b0;
      mon_valid <= 1'b0;
      mon_clear <= 1'b0;
      mon_enter <= 1'b0;
      fz_start  <= 1'b0;
      upd_apply <= 1'b0;
      poll_done <= 1'b0;

      if (cal_restart) cmd_pend <= 1'b1;
      if (mon_conv)    conv_pend <= 1'b1;
      if (mon_restart) begin
        rst_pend     <= 1'b1;
        restart_seen <= 1'b1;
      end

      case (state)
        S_IDLE, S_MEAS: begin
          // poll boundary: apply pending commands and mode changes
          if (cmd_pend || cal_restart) begin
            cmd_pend     <= 1'b0;
            conv_pend    <= 1'b0;
            rst_pend     <= 1'b0;
            mon_mode     <= 1'b0;
            restart_seen <= 1'b0;
            err_clear    <= 1'b1;
            mon_clear    <= 1'b1;
            k            <= '0;
          end else if (conv_pend && !mon_mode) begin
            conv_pend <= 1'b0;
            mon_mode  <= 1'b1;
            mon_enter <= 1'b1;
          end else if (rst_pend && mon_mode) begin
            rst_pend <= 1'b0;
            mon_mode <= 1'b0;
          end
          if (state == S_MEAS) begin
            est_start <= 1'b1;
            state     <= S_MEAS_WAIT;
          end else if (enable) begin
            state <= S_MEAS;
          end
        end
        S_MEAS_WAIT: if (est_done) begin
          err_valid <= 1'b1;
          state     <= S_ERR;
        end
        S_ERR:       state <= S_ERR_WAIT;
        S_ERR_WAIT: if (err_done) begin
          mon_valid <= 1'b1;
          fz_start  <= 1'b1;
          state     <= S_EVAL;
        end
        S_EVAL:      state <= S_WAIT;
        S_WAIT: if (fz_done) begin
          upd_this  <= !mon_mode && !manual;
          upd_apply <= !mon_mode && !manual;
          state     <= S_UPDATE;
        end
        S_UPDATE: begin
          upd       <= upd_this;
          poll_done <= 1'b1;
          state     <= enable ? S_MEAS : S_IDLE;
        end
        default:     state <= S_IDLE;
      endcase

      // k advances at the end of each poll (restart command resets it above)
      if (state == S_UPDATE) k <= k + 1;
    end
  end

  assign busy = (state != S_IDLE);

  // Exactly one block is started per step of the fixed path.
  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({est_start, err_valid, mon_valid}));

endmodule
