// tb_qcal_supervisor: self-checking test of the supervisor / scheduler.
//
// Simple responders stand in for the datapath blocks: the estimator answers
// est_start after a random delay, the error unit one cycle after err_valid,
// and the inference a random number of cycles after fz_start. The monitor's
// conv and restart pulses are injected at chosen polls, one cycle after
// mon_valid. A checker follows every poll and verifies:
//  * the fixed order est_start -> err_valid -> mon_valid + fz_start ->
//    upd_apply/poll_done, each exactly once per poll;
//  * upd_apply only in update mode and autonomous mode;
//  * monitor mode begins at the start of the poll after a conv pulse, with
//    one mon_enter pulse, and ends at the start of the poll after a restart;
//  * k counts polls, a restart command resets k and the mode, and clearing
//    enable stops the loop after the current poll.
module tb_qcal_supervisor;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, manual = 1'b0, cal_restart = 1'b0;
  logic est_start, est_done;
  logic err_valid, err_clear, err_done;
  logic mon_valid, mon_clear, mon_enter, mon_conv, mon_restart;
  logic fz_start, fz_done;
  logic upd_apply;
  logic busy, mon_mode, upd, restart_seen, poll_done;
  logic [31:0] k;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  qcal_supervisor dut (.*);

  // ---------------- responders ----------------
  int est_wait = -1, fz_wait = -1;
  logic conv_next = 1'b0, rst_next = 1'b0;   // inject on this poll
  always_ff @(posedge clk) begin
    est_done    <= 1'b0;
    err_done    <= err_valid;
    fz_done     <= 1'b0;
    mon_conv    <= mon_valid && conv_next;
    mon_restart <= mon_valid && rst_next;
    if (est_start) est_wait <= $urandom_range(20, 1);
    else if (est_wait == 1) begin est_done <= 1'b1; est_wait <= -1; end
    else if (est_wait > 1) est_wait <= est_wait - 1;
    if (fz_start) fz_wait <= $urandom_range(40, 1);
    else if (fz_wait == 1) begin fz_done <= 1'b1; fz_wait <= -1; end
    else if (fz_wait > 1) fz_wait <= fz_wait - 1;
  end

  // ---------------- order checker ----------------
  int phase = 0;           // 0 before est_start, 1 after, 2 after err_valid, 3 after mon_valid
  int polls = 0, applies = 0, enters = 0;
  always @(negedge clk) if (rst_n) begin
    if (est_start) begin
      checks++; if (phase != 0) begin failures++; $display("FAIL est_start in phase %0d", phase); end
      phase = 1;
    end
    if (err_valid) begin
      checks++; if (phase != 1) begin failures++; $display("FAIL err_valid in phase %0d", phase); end
      phase = 2;
    end
    if (mon_valid || fz_start) begin
      checks++; if (phase != 2 || !(mon_valid && fz_start)) begin failures++; $display("FAIL eval in phase %0d", phase); end
      phase = 3;
    end
    if (upd_apply) begin
      applies++;
      checks++; if (phase != 3 || mon_mode || manual) begin failures++; $display("FAIL upd_apply phase %0d mon %0d man %0d", phase, mon_mode, manual); end
    end
    if (mon_enter) enters++;
    if (poll_done) begin
      checks++; if (phase != 3) begin failures++; $display("FAIL poll_done in phase %0d", phase); end
      phase = 0;
      polls++;
    end
  end

  // Wait for the end of one poll; return the mode seen during it.
  task automatic run_poll(input bit conv_in, input bit rst_in, output bit mode_seen);
    conv_next = conv_in; rst_next = rst_in;
    @(negedge clk);
    while (!est_start) @(negedge clk);
    mode_seen = mon_mode;
    while (!poll_done) @(negedge clk);
    conv_next = 1'b0; rst_next = 1'b0;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m;
    int ap;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    checks++; if (busy || k != 0) begin failures++; $display("FAIL not idle after reset"); end
    enable = 1'b1;
    // polls 0..4 in update mode, conv reported in poll 4
    for (int p = 0; p < 5; p++) begin
      run_poll(p == 4, 1'b0, m);
      checks++; if (m) begin failures++; $display("FAIL poll %0d in monitor mode", p); end
    end
    checks++; if (applies != 5) begin failures++; $display("FAIL %0d updates in 5 polls", applies); end
    checks++; if (k != 5) begin failures++; $display("FAIL k=%0d after 5 polls", k); end
    // polls 5..9: monitor mode, no updates; restart reported in poll 9
    ap = applies;
    for (int p = 5; p < 10; p++) begin
      run_poll(1'b0, p == 9, m);
      checks++; if (!m) begin failures++; $display("FAIL poll %0d not in monitor mode", p); end
    end
    checks++; if (applies != ap) begin failures++; $display("FAIL update in monitor mode"); end
    checks++; if (enters != 1) begin failures++; $display("FAIL %0d mon_enter pulses", enters); end
    checks++; if (!restart_seen) begin failures++; $display("FAIL restart_seen not set"); end
    // poll 10: back in update mode
    run_poll(1'b0, 1'b0, m);
    checks++; if (m || applies != ap + 1) begin failures++; $display("FAIL not back in update mode"); end
    // manual mode: no updates
    manual = 1'b1;
    ap = applies;
    for (int p = 0; p < 3; p++) run_poll(1'b0, 1'b0, m);
    checks++; if (applies != ap) begin failures++; $display("FAIL update in manual mode"); end
    manual = 1'b0;
    // converge again, then a restart command resets mode and k
    run_poll(1'b1, 1'b0, m);
    run_poll(1'b0, 1'b0, m);
    checks++; if (!m) begin failures++; $display("FAIL second monitor entry"); end
    @(negedge clk); cal_restart = 1'b1; @(negedge clk); cal_restart = 1'b0;
    while (!est_start) @(negedge clk);
    checks++; if (mon_mode || k != 0 || restart_seen) begin failures++; $display("FAIL restart command: mon=%0d k=%0d", mon_mode, k); end
    while (!poll_done) @(negedge clk);
    // disable: loop stops after the current poll
    run_poll(1'b0, 1'b0, m);
    enable = 1'b0;
    repeat (200) @(negedge clk);
    checks++; if (busy || phase != 0) begin failures++; $display("FAIL still busy after disable"); end
    checks++; if (k != 32'(polls - 17)) begin failures++; $display("FAIL k=%0d polls=%0d", k, polls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
