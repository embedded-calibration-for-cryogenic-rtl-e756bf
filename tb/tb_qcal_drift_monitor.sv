// tb_qcal_drift_monitor: monitor sensitivity to injected drift with a
// conservative restart threshold, at the design's default size.
//
// Runs the study's drift experiment twice (+0.3 and -0.3): 1300 polls, drift
// injected on polls 800..1199, a +-0.02 noise term in the device model. Here
// the restart threshold T_rst is set to 0.5, above what this drift can
// produce, so the loop must stay in monitor mode with amp frozen while the
// monitor metric visibly shifts. For each run it checks:
//  * convergence, with monitor mode entered exactly one poll later;
//  * amp unchanged from monitor entry to the end of the run;
//  * no restart;
//  * the metric averaged over the drift window exceeds the pre-drift average
//    by at least half the drift, and the post-drift average is back within 0.05;
// and prints the pre/during/post averages (the study's e_pre, e_drift, e_post).
// The drift can be changed at run time: +DRIFT_START=<poll> +DRIFT_LEN=<polls>
// +DRIFT_MILLI=<magnitude in thousandths> (defaults 800, 400, 300). The
// run length stays 1300 polls, so the window must end before poll 1284.
module tb_qcal_drift_monitor;
  import qcal_pkg::*;

  int DRIFT_START = 800;
  int DRIFT_LEN   = 400;
  int DRIFT_MILLI = 300;
  localparam int RUN_POLLS = 1300;

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
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  qcal_top dut (.*);
  qcal_plant_model #(.SEED(11)) plant (
    .clk, .rst_n, .amp(amp_out), .drift, .shot_req, .shot_valid, .shot_bit, .p_now
  );

  int k_conv, n_restart;
  always @(posedge clk) if (rst_n) begin
    if (dut.mon_conv && k_conv < 0) k_conv = int'(k);
    if (dut.mon_restart) n_restart++;
  end

  task automatic wr(input reg_addr_e a, input fx_t d);
    @(negedge clk);
    cfg_addr = a; cfg_wdata = d; cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic run(input real dsign);
    real  s_pre, s_drift, s_post;
    int   n_pre, n_drift, n_post, k_mon, kk;
    fx_t  amp_frozen;
    bit   frozen;
    rst_n = 1'b0; drift = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    k_conv = -1; n_restart = 0; k_mon = -1; frozen = 0;
    s_pre = 0; s_drift = 0; s_post = 0; n_pre = 0; n_drift = 0; n_post = 0;
    wr(REG_T_RST, to_fx(0.5));
    wr(REG_AMP_SET, '0);
    wr(REG_CTRL, 16'h0001);
    for (int p = 0; p < RUN_POLLS; p++) begin
      drift = (p >= DRIFT_START && p < DRIFT_START + DRIFT_LEN) ? to_fx(real'(DRIFT_MILLI) / 1000.0 * dsign) : '0;
      @(negedge clk);
      while (!poll_done) @(negedge clk);
      kk = int'(k) - 1;              // index of the poll just finished
      if (status.mon && k_mon < 0) begin
        k_mon = kk;
        amp_frozen = amp_out;
        frozen = 1;
      end
      if (frozen && amp_out != amp_frozen) begin
        failures++; $display("FAIL poll %0d: amp moved in monitor mode", kk); frozen = 0;
      end
      // averages over the study's three intervals (pre-drift from poll 100 on)
      if (kk >= 100 && kk < DRIFT_START)                  begin s_pre += real'(metric) / ONE; n_pre++; end
      else if (kk >= DRIFT_START + 16 && kk < DRIFT_START + DRIFT_LEN) begin s_drift += real'(metric) / ONE; n_drift++; end
      else if (kk >= DRIFT_START + DRIFT_LEN + 16)        begin s_post += real'(metric) / ONE; n_post++; end
    end
    s_pre /= n_pre; s_drift /= n_drift; s_post /= n_post;
    $display("drift %s%0.3f: k_conv=%0d k_mon=%0d amp=%f metric pre=%f drift=%f post=%f restarts=%0d",
             (dsign > 0) ? "+" : "-", real'(DRIFT_MILLI) / 1000.0, k_conv, k_mon, real'(amp_out) / ONE, s_pre, s_drift, s_post, n_restart);
    checks++; if (k_conv < 0 || k_mon != k_conv + 1) begin failures++; $display("FAIL monitor entry %0d vs convergence %0d", k_mon, k_conv); end
    checks++; if (!frozen) begin failures++; $display("FAIL amp not held"); end
    checks++; if (n_restart != 0 || !status.mon) begin failures++; $display("FAIL restart with conservative threshold"); end
    checks++; if (s_drift - s_pre < 0.5 * real'(DRIFT_MILLI) / 1000.0) begin failures++; $display("FAIL metric did not shift under drift"); end
    checks++; if (s_post - s_pre > 0.05 || s_pre - s_post > 0.05) begin failures++; $display("FAIL metric did not return"); end
    wr(REG_CTRL, 16'h0000);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($value$plusargs("DRIFT_START=%d", DRIFT_START));
    void'($value$plusargs("DRIFT_LEN=%d", DRIFT_LEN));
    void'($value$plusargs("DRIFT_MILLI=%d", DRIFT_MILLI));
    run(1.0);
    run(-1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
