// tb_qcal_monitor: self-checking test of the convergence detector and drift
// monitor.
//
// The test plays the supervisor: it feeds one (|e|, |de|) pair per poll, and
// enters monitor mode (with a mon_enter pulse) one poll after each conv
// pulse and leaves it one poll after each restart pulse. A reference model
// written here keeps the last 16 |e| values and checks, every poll, the
// window average, conv and which rule fired, and restart. The stimulus has
// phases that force each rule: a decaying error that converges by hits, a
// large steady error that converges only by plateau, drift in monitor mode
// that persists (restart) and drift that does not persist (no restart), plus
// random noise. The number of each event is checked to be non-zero.
module tb_qcal_monitor;
  import qcal_pkg::*;

  localparam int W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, valid = 1'b0, mon_mode = 1'b0, mon_enter = 1'b0;
  fx_t  abs_e = '0, abs_de = '0;
  fx_t  e_tol = RST_E_TOL, de_tol = RST_DE_TOL, eps = RST_EPS, t_rst = RST_T_RST;
  logic [7:0] hits = 8'd4, r_pers = 8'd8;
  fx_t  metric, baseline;
  logic conv, conv_by_hit, conv_by_plateau, restart;
  int checks = 0, failures = 0;
  int n_hit = 0, n_plat = 0, n_restart = 0;

  always #5 clk = ~clk;
  qcal_monitor dut (.*);

  // reference model state
  int rwin[W];
  int rptr, rfill, rsum, rmetric, rbase, rhit, rplat, rdev;
  bit rwas_full;
  bit conv_pend, rst_pend;

  task automatic ref_clear();
    foreach (rwin[i]) rwin[i] = 0;
    rptr = 0; rfill = 0; rsum = 0; rmetric = 0; rbase = 0; rwas_full = 0;
    rhit = 0; rplat = 0; rdev = 0;
  endtask

  task automatic poll(input int ae, input int ade);
    int  s, m, dm;
    bit  full, h, p, d, econv, ehit, eplat, erst;
    // poll boundary: mode changes as the supervisor makes them
    @(negedge clk);
    if (conv_pend && !mon_mode) begin
      mon_mode = 1'b1; mon_enter = 1'b1;
      rbase = rmetric; rdev = 0; rhit = 0; rplat = 0;
      @(negedge clk);
      mon_enter = 1'b0;
    end else if (rst_pend && mon_mode) begin
      mon_mode = 1'b0;
    end
    conv_pend = 0; rst_pend = 0;
    // reference
    s = rsum + ae - rwin[rptr];
    m = s >>> 4;
    full = (rfill >= W - 1);
    dm = (m > rmetric) ? m - rmetric : rmetric - m;
    h = full && (m <= int'(e_tol)) && (ade <= int'(de_tol));
    p = full && rwas_full && (dm <= int'(eps));
    d = (m - rbase) >= int'(t_rst);
    econv = 0; ehit = 0; eplat = 0; erst = 0;
    if (!mon_mode) begin
      ehit  = h && (rhit + 1 >= hits);
      eplat = p && (rplat + 1 >= hits);
      econv = ehit || eplat;
      if (econv) begin rhit = 0; rplat = 0; end
      else begin rhit = h ? rhit + 1 : 0; rplat = p ? rplat + 1 : 0; end
      rdev = 0;
    end else begin
      rhit = 0; rplat = 0;
      erst = d && (rdev + 1 >= r_pers);
      rdev = erst ? 0 : (d ? rdev + 1 : 0);
    end
    rwin[rptr] = ae; rptr = (rptr + 1) % W; rfill = full ? W : rfill + 1;
    rsum = s; rmetric = m; rwas_full = full;
    // drive
    abs_e = fx_t'(ae); abs_de = fx_t'(ade); valid = 1'b1;
    @(negedge clk);
    valid = 1'b0;
    checks++;
    if (int'(metric) != m || conv != econv || restart != erst ||
        (econv && (conv_by_hit != ehit || conv_by_plateau != eplat))) begin
      failures++;
      $display("FAIL |e|=%0d: metric=%0d conv=%0d(h%0d p%0d) rst=%0d, want %0d %0d(h%0d p%0d) %0d",
               ae, metric, conv, conv_by_hit, conv_by_plateau, restart, m, econv, ehit, eplat, erst);
    end
    if (conv) begin conv_pend = 1; if (conv_by_hit) n_hit++; if (conv_by_plateau) n_plat++; end
    if (restart) begin rst_pend = 1; n_restart++; end
    @(negedge clk);
    checks++;
    if (conv || restart) begin failures++; $display("FAIL pulse longer than one cycle"); end
  endtask

  function automatic int noise(input int amp);
    return $urandom_range(2 * amp, 0) - amp;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ae, prev;
    ref_clear();
    conv_pend = 0; rst_pend = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 1. decaying error, then small noise: converges by hits
    prev = 0;
    for (int k = 0; k < 60; k++) begin
      ae = (k < 20) ? (ONE / 2) - k * (ONE / 40) : 40 + noise(30);
      poll(ae, (ae > prev) ? ae - prev : prev - ae);
      prev = ae;
    end
    // 2. monitor mode: persistent drift of |e| to 0.4 -> restart
    for (int k = 0; k < 30; k++) poll(ONE * 2 / 5 + noise(20), 60);
    // 3. restarted in update mode with a large steady error (0.45): plateau
    for (int k = 0; k < 60; k++) poll(ONE * 9 / 20 + noise(8), 300);
    // 4. monitor mode: short excursions that do not persist for R polls
    for (int k = 0; k < 80; k++) poll(((k % 12) < 3) ? ONE * 9 / 10 : ONE * 9 / 20, 100);
    // 5. random stimulus with random thresholds
    for (int k = 0; k < 600; k++) begin
      if (k % 150 == 0) begin
        hits = 8'($urandom_range(6, 0));
        r_pers = 8'($urandom_range(6, 0));
        eps = fx_t'($urandom_range(64, 0));
        t_rst = fx_t'($urandom_range(ONE / 4, 1));
      end
      poll($urandom_range(ONE, 0) >> $urandom_range(6, 0), $urandom_range(ONE / 8, 0));
    end
    // 6. clear empties the window
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    ref_clear();
    mon_mode = 1'b0; conv_pend = 0; rst_pend = 0;
    for (int k = 0; k < 30; k++) poll(ONE / 16, 0);
    $display("conv by hit %0d, by plateau %0d, restarts %0d", n_hit, n_plat, n_restart);
    checks++; if (n_hit == 0)     begin failures++; $display("FAIL no hit convergence"); end
    checks++; if (n_plat == 0)    begin failures++; $display("FAIL no plateau convergence"); end
    checks++; if (n_restart == 0) begin failures++; $display("FAIL no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
