// tb_qcal_top: end-to-end test of the calibration controller at its default
// size (256 shots per poll, 16-poll monitor window), closed around the
// behavioural device model qcal_plant_model.
//
// Scenarios, each from reset:
//  A. +0.3 drift run: program the controller over the register bus, start from
//     amp = 0, run 1300 polls; a +0.3 probability offset is injected for polls
//     800..1199 (the study's drift window).
//  B. -0.3 drift run: the same with the opposite sign.
//  C. unreachable target: p_target = 0.95, amp_max = 2.5, Delta_max = 0.125.
//     amp saturates at amp_max, steps are clipped, and the loop settles on a
//     steady residual that converges by the plateau rule.
//  D. manual mode and the restart command.
// Every poll is checked against values computed here from the telemetry:
// e = p_target - p_meas, de = e - e(k-1), the 16-poll average of |e|, and
// amp(k+1) = sat(amp(k) + clip(Delta)) in update mode or amp unchanged in
// monitor or manual mode. Register reads are compared with the ports. Also
// checked: every poll takes the same number of cycles, monitor mode starts
// one poll after convergence, amp settles near the device optimum (2.0) and
// near the shifted optimum during drift. Each mechanism (hit and plateau
// convergence, monitor entry, drift restart, step clipping, saturation,
// manual hold, restart command) is counted and must occur at least once.
module tb_qcal_top;
  import qcal_pkg::*;

  localparam int POLL_CYCLES = 302;   // 256 shots + 2 readout latency + 44 control
  localparam int DRIFT_START = 800;
  localparam int DRIFT_LEN   = 400;
  localparam int RUN_POLLS   = 1300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [ADDR_W-1:0] cfg_addr = '0;
  fx_t  cfg_wdata = '0, cfg_rdata;
  logic shot_req, shot_valid, shot_bit;
  fx_t  amp_out;
  status_t status;
  logic [31:0] k;
  logic poll_done;
  fx_t  p_meas, e, de, delta, metric, baseline;
  fx_t  drift = '0;
  int   p_now;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qcal_top dut (.*);

  qcal_plant_model #(.SEED(7)) plant (
    .clk, .rst_n, .amp(amp_out), .drift, .shot_req, .shot_valid, .shot_bit, .p_now
  );

  // ---------------- mechanism counters ----------------
  int n_conv_hit = 0, n_conv_plat = 0, n_mon_entry = 0, n_drift_restart = 0;
  int n_clip = 0, n_sat = 0, n_manual_hold = 0, n_cmd_restart = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.mon_conv && dut.conv_by_hit)     n_conv_hit++;
    if (dut.mon_conv && dut.conv_by_plateau) n_conv_plat++;
    if (dut.mon_restart)                     n_drift_restart++;
  end

  // ---------------- per-poll reference checks ----------------
  fx_t  cfg_target, cfg_dmax, cfg_min, cfg_max;
  int   win[16];
  int   wfill, wptr;
  int   prev_e, prev_amp, last_done, polls_seen;
  bit   have_prev, prev_mon;
  int   k_conv, k_mon;
  bit   manual_on;

  task automatic ref_reset();
    foreach (win[i]) win[i] = 0;
    wfill = 0; wptr = 0; have_prev = 0; prev_mon = 0;
    k_conv = -1; k_mon = -1;
  endtask

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  always @(negedge clk) if (rst_n && poll_done) begin
    int ee, dd, sum, st, na;
    fx_t r_amp, r_p, r_d, r_m, r_e, r_s;
    polls_seen++;
    // deterministic poll length
    if (last_done >= 0) begin
      checks++;
      if (int'($time / 10) - last_done != POLL_CYCLES) begin
        failures++;
        $display("FAIL poll %0d took %0d cycles", k, int'($time / 10) - last_done);
      end
    end
    last_done = int'($time / 10);
    // error unit
    ee = int'(cfg_target) - int'(p_meas);
    dd = have_prev ? ee - prev_e : 0;
    checks++;
    if (int'(e) != ee || int'(de) != dd) begin
      failures++; $display("FAIL poll %0d: e=%0d de=%0d want %0d %0d", k, e, de, ee, dd);
    end
    prev_e = ee; have_prev = 1;
    // monitor metric
    win[wptr] = iabs(ee); wptr = (wptr + 1) % 16;
    sum = 0; foreach (win[i]) sum += win[i];
    checks++;
    if (int'(metric) != (sum >>> 4)) begin
      failures++; $display("FAIL poll %0d: metric=%0d want %0d", k, metric, sum >>> 4);
    end
    // parameter update
    st = (int'(delta) > int'(cfg_dmax)) ? int'(cfg_dmax) :
         (int'(delta) < -int'(cfg_dmax)) ? -int'(cfg_dmax) : int'(delta);
    if (st != int'(delta)) n_clip += status.upd;
    na = prev_amp + st;
    if (na > int'(cfg_max)) na = int'(cfg_max);
    if (na < int'(cfg_min)) na = int'(cfg_min);
    checks++;
    if (status.upd) begin
      if (int'(amp_out) != na) begin failures++; $display("FAIL poll %0d: amp=%0d want %0d", k, amp_out, na); end
      if (na != prev_amp + st) n_sat++;
    end else begin
      if (int'(amp_out) != prev_amp) begin failures++; $display("FAIL poll %0d: amp changed without update", k); end
      if (status.manual && int'(delta) != 0) n_manual_hold++;
    end
    checks++;
    if (status.upd == (status.mon || status.manual)) begin
      failures++; $display("FAIL poll %0d: upd=%0d mon=%0d manual=%0d", k, status.upd, status.mon, status.manual);
    end
    // monitor entry one poll after convergence
    if (status.mon && !prev_mon) begin
      n_mon_entry++;
      k_mon = int'(k) - 1;          // k has already advanced past this poll
      checks++;
      if (k_mon != k_conv + 1) begin failures++; $display("FAIL monitor entry at %0d, convergence at %0d", k_mon, k_conv); end
      checks++;
      if (!status.conv) begin failures++; $display("FAIL CONV flag not set in monitor mode"); end
    end
    if (!status.mon && prev_mon) begin
      checks++;
      if (status.conv) begin failures++; $display("FAIL CONV flag still set after restart"); end
    end
    prev_mon = status.mon;
    prev_amp = int'(amp_out);
    // registers mirror the ports
    rd(REG_AMP, r_amp); rd(REG_P_MEAS, r_p); rd(REG_DELTA, r_d);
    rd(REG_METRIC, r_m); rd(REG_E, r_e); rd(REG_STATUS, r_s);
    checks++;
    if (r_amp != amp_out || r_p != p_meas || r_d != delta || r_m != metric || r_e != e ||
        r_s != fx_t'(status)) begin
      failures++; $display("FAIL poll %0d: register readback", k);
    end
  end

  // k of the poll in which convergence was declared
  always @(posedge clk) if (rst_n && dut.mon_conv) k_conv = int'(k);

  task automatic rd(input reg_addr_e a, output fx_t v);
    cfg_addr = a;
    #1;
    v = cfg_rdata;
  endtask

  // ---------------- bus and run helpers ----------------
  task automatic wr(input reg_addr_e a, input fx_t d);
    @(negedge clk);
    cfg_addr = a; cfg_wdata = d; cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    drift = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ref_reset();
    prev_amp = 0; last_done = -1; polls_seen = 0;
    cfg_target = RST_P_TARGET; cfg_dmax = RST_DMAX; cfg_min = RST_AMP_MIN; cfg_max = RST_AMP_MAX;
  endtask

  task automatic setup(input fx_t tgt, input fx_t dmax, input fx_t amax);
    wr(REG_P_TARGET, tgt);  cfg_target = tgt;
    wr(REG_DMAX, dmax);     cfg_dmax = dmax;
    wr(REG_AMP_MAX, amax);  cfg_max = amax;
    for (int i = 0; i < 9; i++) wr(reg_addr_e'(ADDR_W'(int'(REG_D0) + i)), RST_DTAB[i]);
    wr(REG_AMP_SET, '0);
    prev_amp = 0;
  endtask

  task automatic wait_polls(input int n);
    repeat (n) begin
      @(negedge clk);
      while (!poll_done) @(negedge clk);
    end
  endtask

  function automatic bit near(input fx_t v, input real want, input real tol);
    real r = real'(v) / real'(ONE);
    return (r > want - tol) && (r < want + tol);
  endfunction

  task automatic drift_run(input real dsign);
    int   kc;
    fx_t  amp_pre, amp_drift;
    int   restarts_before;
    do_reset();
    setup(RST_P_TARGET, RST_DMAX, RST_AMP_MAX);
    wr(REG_CTRL, 16'h0001);
    wait_polls(DRIFT_START);
    kc = k_conv;
    amp_pre = amp_out;
    restarts_before = n_drift_restart;
    $display("run %s0.3: converged at k=%0d, monitor from k=%0d, amp=%f, metric=%f",
             (dsign > 0) ? "+" : "-", kc, k_mon, real'(amp_out) / ONE, real'(metric) / ONE);
    checks++;
    if (!status.mon || kc < 0) begin failures++; $display("FAIL not in monitor mode before drift"); end
    checks++;
    if (!near(amp_pre, 2.0, 0.25)) begin failures++; $display("FAIL amp %f not near 2.0", real'(amp_pre) / ONE); end
    drift = to_fx(0.3 * dsign);
    wait_polls(DRIFT_LEN);
    amp_drift = amp_out;
    $display("  end of drift: amp=%f, restarts=%0d, metric=%f", real'(amp_out) / ONE,
             n_drift_restart - restarts_before, real'(metric) / ONE);
    checks++;
    if (n_drift_restart == restarts_before) begin failures++; $display("FAIL drift caused no restart"); end
    checks++;
    if (!near(amp_drift, 2.0 - dsign * 0.3 / 0.25, 0.3)) begin failures++; $display("FAIL amp did not follow drift"); end
    drift = '0;
    wait_polls(RUN_POLLS - DRIFT_START - DRIFT_LEN);
    $display("  after drift: amp=%f, mon=%0d, k=%0d", real'(amp_out) / ONE, status.mon, k);
    checks++;
    if (!near(amp_out, 2.0, 0.3)) begin failures++; $display("FAIL amp did not return near 2.0"); end
    checks++;
    if (int'(k) != RUN_POLLS) begin failures++; $display("FAIL k=%0d after %0d polls", k, RUN_POLLS); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // A and B: the drift runs
    drift_run(1.0);
    drift_run(-1.0);

    // C: unreachable target, small step limit, amp capped at 2.5
    do_reset();
    setup(to_fx(0.95), to_fx(0.125), to_fx(2.5));
    wr(REG_CTRL, 16'h0001);
    wait_polls(150);
    $display("run C: amp=%f, metric=%f, mon=%0d, plateau=%0d", real'(amp_out) / ONE,
             real'(metric) / ONE, status.mon, status.conv_plateau);
    checks++;
    if (amp_out != to_fx(2.5) || !status.mon || !status.conv_plateau) begin
      failures++; $display("FAIL run C should saturate at 2.5 and converge by plateau");
    end

    // D: manual mode holds amp, then the restart command returns to update mode
    wr(REG_CTRL, 16'h0003);
    wr(REG_AMP_SET, to_fx(1.0)); prev_amp = int'(to_fx(1.0));
    wr(REG_P_TARGET, RST_P_TARGET); cfg_target = RST_P_TARGET;
    wait_polls(30);
    checks++;
    if (amp_out != to_fx(1.0) || !status.manual) begin failures++; $display("FAIL manual mode moved amp"); end
    wr(REG_CTRL, 16'h0005);   // autonomous, enabled, restart command
    n_cmd_restart++;
    wait_polls(1);            // the command takes effect at the next poll boundary
    @(posedge clk);           // after this poll's checks
    ref_reset();
    wait_polls(100);
    $display("run D: after restart command amp=%f, mon=%0d, k=%0d", real'(amp_out) / ONE, status.mon, k);
    checks++;
    if (int'(k) != 100 || !near(amp_out, 2.0, 0.3) || status.restart_seen) begin
      failures++; $display("FAIL restart command");
    end
    wr(REG_CTRL, 16'h0000);
    repeat (400) @(negedge clk);
    checks++;
    if (status.busy) begin failures++; $display("FAIL still busy after disable"); end

    $display("mechanisms: conv_hit=%0d conv_plateau=%0d monitor_entry=%0d drift_restart=%0d clip=%0d sat=%0d manual_hold=%0d restart_cmd=%0d",
             n_conv_hit, n_conv_plat, n_mon_entry, n_drift_restart, n_clip, n_sat, n_manual_hold, n_cmd_restart);
    checks++; if (n_conv_hit == 0)      begin failures++; $display("FAIL no hit convergence"); end
    checks++; if (n_conv_plat == 0)     begin failures++; $display("FAIL no plateau convergence"); end
    checks++; if (n_mon_entry == 0)     begin failures++; $display("FAIL no monitor entry"); end
    checks++; if (n_drift_restart == 0) begin failures++; $display("FAIL no drift restart"); end
    checks++; if (n_clip == 0)          begin failures++; $display("FAIL no step clipping"); end
    checks++; if (n_sat == 0)           begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_manual_hold == 0)   begin failures++; $display("FAIL no manual hold"); end
    checks++; if (n_cmd_restart == 0)   begin failures++; $display("FAIL no restart command"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
