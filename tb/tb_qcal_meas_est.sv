// tb_qcal_meas_est: self-checking test of the measurement statistics
// estimator.
//
// Runs polls with random shot outcomes. The readout model here answers with
// gaps (shot_valid high on a random subset of cycles). The test counts the
// ones it sends and checks n1, p_meas = N1/N_total, that exactly N_total shots
// are taken (shot_req drops after the last one), and that done comes one
// cycle after the last shot. Also covers all-zero and all-one polls.
module tb_qcal_meas_est;
  import qcal_pkg::*;
  localparam int unsigned LOG2_NTOTAL = 8;
  localparam int NT = 1 << LOG2_NTOTAL;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, shot_valid = 1'b0, shot_bit = 1'b0;
  logic shot_req, done;
  logic [LOG2_NTOTAL:0] n1;
  fx_t p_meas;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  qcal_meas_est #(.LOG2_NTOTAL(LOG2_NTOTAL)) dut (.*);

  task automatic poll(input int pct_one, input bit gaps);
    int sent, ones, after;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sent = 0; ones = 0;
    while (shot_req) begin
      shot_valid = gaps ? ($urandom_range(3, 0) != 0) : 1'b1;
      shot_bit   = ($urandom_range(99, 0) < pct_one);
      @(posedge clk);
      if (shot_valid) begin sent++; ones += int'(shot_bit); end
      @(negedge clk);
    end
    shot_valid = 1'b0;
    after = 0;
    while (!done && after < 10) begin @(negedge clk); after++; end
    checks++;
    if (sent != NT) begin failures++; $display("FAIL took %0d shots, want %0d", sent, NT); end
    checks++;
    if (after != 1) begin failures++; $display("FAIL done %0d cycles after last shot", after); end
    checks++;
    if (int'(n1) != ones || int'(p_meas) != ones * (ONE / NT)) begin
      failures++;
      $display("FAIL n1=%0d p=%0d, want %0d %0d", n1, p_meas, ones, ones * (ONE / NT));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    poll(0, 1'b0);
    poll(100, 1'b0);
    for (int i = 0; i < 20; i++) poll($urandom_range(100, 0), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
