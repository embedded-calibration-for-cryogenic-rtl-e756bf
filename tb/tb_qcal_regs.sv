// tb_qcal_regs: self-checking test of the configuration / telemetry registers.
//
// Checks the reset values, writes random data to every configuration
// register and reads it back (and through the cfg struct), checks that the
// telemetry inputs appear at their read addresses, that writes to read-only
// and unmapped addresses change nothing, and that REG_AMP_SET and the
// restart bit of REG_CTRL give one-cycle pulses.
module tb_qcal_regs;
  import qcal_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [ADDR_W-1:0] cfg_addr = '0;
  fx_t cfg_wdata = '0, cfg_rdata;
  cfg_t cfg;
  logic amp_load, cal_restart;
  fx_t  amp_load_val;
  fx_t  t_p_meas, t_e, t_de, t_delta, t_amp, t_metric, t_baseline;
  status_t t_status;
  logic [31:0] t_k;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  qcal_regs dut (.*);

  task automatic wr(input int a, input int d);
    @(negedge clk);
    cfg_addr = ADDR_W'(a); cfg_wdata = fx_t'(d); cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic rd_check(input int a, input int want, input string what);
    cfg_addr = ADDR_W'(a);
    #1;
    checks++;
    if (cfg_rdata !== fx_t'(want)) begin
      failures++;
      $display("FAIL %s @%0h: read %0d want %0d", what, a, cfg_rdata, fx_t'(want));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [64];
    int d;
    t_p_meas = 11; t_e = -22; t_de = 33; t_delta = -44; t_amp = 555;
    t_metric = 66; t_baseline = 77; t_k = 32'h0001_0203;
    t_status = '{conv: 1'b1, restart_seen: 1'b1, manual: 1'b0, conv_plateau: 1'b1, conv_hit: 1'b0,
                 mon: 1'b1, upd: 1'b0, busy: 1'b1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset values
    rd_check(REG_CTRL, 0, "ctrl");
    rd_check(REG_E_TOL, ONE / 8, "E_tol");
    rd_check(REG_DE_TOL, ONE / 16, "DE_tol");
    rd_check(REG_P_TARGET, int'(RST_P_TARGET), "p_target");
    for (int i = 0; i < 9; i++) rd_check(REG_D0 + i, int'(RST_DTAB[i]), "D reset");
    // writable registers
    for (int a = REG_P_TARGET; a <= REG_R_PERS; a++) begin
      if (a == REG_AMP_SET) continue;
      d = $urandom_range(65535, 0);
      if (a == REG_HITS || a == REG_R_PERS) d = d & 8'hff;
      v[a] = d;
      wr(a, d);
    end
    for (int i = 0; i < 9; i++) begin v[REG_D0 + i] = $urandom_range(65535, 0); wr(REG_D0 + i, v[REG_D0 + i]); end
    // writes to read-only and unmapped addresses are ignored
    wr(REG_P_MEAS, 1234); wr(6'h19, 999); wr(6'h3f, 999);
    for (int a = REG_P_TARGET; a <= REG_R_PERS; a++)
      if (a != REG_AMP_SET) rd_check(a, v[a], "config readback");
    for (int i = 0; i < 9; i++) rd_check(REG_D0 + i, v[REG_D0 + i], "D readback");
    rd_check(6'h19, 0, "unmapped");
    checks++;
    if (cfg.p_target != fx_t'(v[REG_P_TARGET]) || cfg.dmax != fx_t'(v[REG_DMAX]) ||
        cfg.hits != 8'(v[REG_HITS]) || cfg.dtab[5] != fx_t'(v[REG_D0 + 5])) begin
      failures++; $display("FAIL cfg struct");
    end
    // telemetry
    rd_check(REG_P_MEAS, 11, "p_meas");
    rd_check(REG_E, -22, "e");
    rd_check(REG_DE, 33, "de");
    rd_check(REG_DELTA, -44, "delta");
    rd_check(REG_AMP, 555, "amp");
    rd_check(REG_METRIC, 66, "metric");
    rd_check(REG_BASELINE, 77, "baseline");
    rd_check(REG_K, 16'h0203, "k");
    rd_check(REG_STATUS, 8'b11010101, "status");
    // control and pulses
    wr(REG_CTRL, 3);
    rd_check(REG_CTRL, 3, "ctrl");
    checks++; if (!cfg.enable || !cfg.manual) begin failures++; $display("FAIL ctrl bits"); end
    @(negedge clk);
    cfg_addr = REG_CTRL; cfg_wdata = 16'h0005; cfg_we = 1'b1;
    @(negedge clk); cfg_we = 1'b0;
    checks++; if (!cal_restart || cfg.manual || !cfg.enable) begin failures++; $display("FAIL restart pulse"); end
    @(negedge clk);
    checks++; if (cal_restart) begin failures++; $display("FAIL restart pulse too long"); end
    cfg_addr = REG_AMP_SET; cfg_wdata = 16'h1800; cfg_we = 1'b1;
    @(negedge clk); cfg_we = 1'b0;
    checks++; if (!amp_load || amp_load_val != 16'h1800) begin failures++; $display("FAIL amp_load"); end
    @(negedge clk);
    checks++; if (amp_load) begin failures++; $display("FAIL amp_load too long"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
