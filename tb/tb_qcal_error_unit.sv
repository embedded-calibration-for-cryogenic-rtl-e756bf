// tb_qcal_error_unit: self-checking test of the error computation unit.
//
// Feeds a random sequence of p_meas values in [0,1] with a fixed and then a
// changed p_target, and checks e = p_target - p_meas, de = e - e_prev (zero on
// the first sample after reset or clear), the magnitudes, and the one-cycle
// output latency.
module tb_qcal_error_unit;
  import qcal_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, in_valid = 1'b0;
  fx_t  p_meas = '0, p_target = '0;
  logic out_valid;
  fx_t  e, de, abs_e, abs_de;
  int checks = 0, failures = 0;
  int prev_e;
  bit have_prev;

  always #5 clk = ~clk;
  qcal_error_unit dut (.*);

  task automatic sample(input int p, input int tgt);
    int ee, dd;
    @(negedge clk);
    p_meas = fx_t'(p);
    p_target = fx_t'(tgt);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    ee = tgt - p;
    dd = have_prev ? ee - prev_e : 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL out_valid not one cycle after in_valid"); end
    checks++;
    if (int'(e) != ee || int'(de) != dd || int'(abs_e) != ((ee < 0) ? -ee : ee) ||
        int'(abs_de) != ((dd < 0) ? -dd : dd)) begin
      failures++;
      $display("FAIL p=%0d t=%0d: e=%0d de=%0d |e|=%0d |de|=%0d want e=%0d de=%0d", p, tgt, e, de, abs_e, abs_de, ee, dd);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid longer than one cycle"); end
    prev_e = ee;
    have_prev = 1'b1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    have_prev = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) sample($urandom_range(ONE, 0), ONE / 2);
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    have_prev = 1'b0;
    for (int i = 0; i < 100; i++) sample($urandom_range(ONE, 0), 3 * ONE / 4);
    sample(0, ONE);
    sample(ONE, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
