// tb_qcal_param_update: self-checking test of the bounded parameter update.
//
// Applies random steps Delta with random Delta_max and operating ranges and
// checks amp(k+1) = sat(amp(k) + clip(Delta, -Delta_max, Delta_max)) against a
// reference in integer arithmetic, including steps that would overflow the
// word. Also checks that amp holds without apply and that load sets amp
// (saturated) with priority over apply.
module tb_qcal_param_update;
  import qcal_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic apply = 1'b0, load = 1'b0;
  fx_t  delta = '0, load_val = '0, dmax = '0, amp_min = '0, amp_max = '0;
  fx_t  amp, step;
  int   checks = 0, failures = 0;
  int   ref_amp;

  always #5 clk = ~clk;
  qcal_param_update dut (.*);

  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_amp = 0;
    checks++; if (amp != 0) begin failures++; $display("FAIL reset value"); end
    for (int n = 0; n < 1000; n++) begin
      if (n % 100 == 0) begin
        dmax    = fx_t'($urandom_range(ONE, 1));
        amp_min = fx_t'(-int'($urandom_range(8 * ONE, 0)));
        amp_max = fx_t'($urandom_range(32767, ONE));
        if (n == 500) begin amp_min = fx_t'(-32768); amp_max = fx_t'(32767); dmax = fx_t'(32767); end
      end
      @(negedge clk);
      if (n % 37 == 0) begin
        load = 1'b1; apply = 1'b1;
        load_val = fx_t'($urandom_range(65535, 0));
        ref_amp = clip(int'(load_val), int'(amp_min), int'(amp_max));
      end else if (n % 5 == 0) begin
        apply = 1'b0;
        delta = fx_t'($urandom_range(65535, 0));
      end else begin
        apply = 1'b1;
        delta = fx_t'($urandom_range(65535, 0));
        st = clip(int'(delta), -int'(dmax), int'(dmax));
        ref_amp = clip(ref_amp + st, int'(amp_min), int'(amp_max));
      end
      @(negedge clk);
      apply = 1'b0; load = 1'b0;
      checks++;
      if (int'(amp) != ref_amp) begin
        failures++;
        $display("FAIL n=%0d amp=%0d want %0d (delta=%0d dmax=%0d range %0d..%0d)", n, amp, ref_amp, delta, dmax, amp_min, amp_max);
        ref_amp = int'(amp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
