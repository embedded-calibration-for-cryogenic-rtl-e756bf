// tb_qcal_membership: self-checking test of the triangular fuzzifier.
//
// Sweeps x over [-1.5, 1.5] (every 1/64, plus the extreme codes) and compares
// mu_N, mu_Z, mu_P with the triangle shapes computed here in integer
// arithmetic. Also checks the document's crossing points mu_N(-0.5) =
// mu_Z(-0.5) = 0.5 and mu_Z(0.5) = mu_P(0.5) = 0.5, the peaks, and that the
// three degrees add up to 1.0 everywhere.
module tb_qcal_membership;
  import qcal_pkg::*;

  fx_t x;
  mu_t mu_n, mu_z, mu_p;
  int  checks = 0, failures = 0;

  qcal_membership dut (.x, .mu_n, .mu_z, .mu_p);

  function automatic int clamp01(input int v);
    return (v < 0) ? 0 : (v > ONE) ? ONE : v;
  endfunction

  task automatic check_at(input int xv);
    int en, ez, ep;
    x = fx_t'(xv);
    #1;
    en = clamp01(-xv);
    ez = clamp01(ONE - ((xv < 0) ? -xv : xv));
    ep = clamp01(xv);
    checks++;
    if (int'(mu_n) != en || int'(mu_z) != ez || int'(mu_p) != ep) begin
      failures++;
      $display("FAIL x=%0d: got N=%0d Z=%0d P=%0d, want %0d %0d %0d", xv, mu_n, mu_z, mu_p, en, ez, ep);
    end
    checks++;
    if (int'(mu_n) + int'(mu_z) + int'(mu_p) != ONE) begin
      failures++;
      $display("FAIL x=%0d: degrees do not sum to 1.0", xv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = -3 * ONE / 2; xv <= 3 * ONE / 2; xv += ONE / 64) check_at(xv);
    check_at(-32768);
    check_at(32767);
    check_at(1);
    check_at(-1);
    // crossings named in the document
    x = to_fx(-0.5); #1;
    checks++; if (mu_n != mu_z || int'(mu_n) != ONE / 2) begin failures++; $display("FAIL crossing -0.5"); end
    x = to_fx(0.5); #1;
    checks++; if (mu_z != mu_p || int'(mu_p) != ONE / 2) begin failures++; $display("FAIL crossing +0.5"); end
    x = to_fx(0.0); #1;
    checks++; if (int'(mu_z) != ONE || mu_n != 0 || mu_p != 0) begin failures++; $display("FAIL peak Z"); end
    x = to_fx(-1.0); #1;
    checks++; if (int'(mu_n) != ONE || mu_z != 0) begin failures++; $display("FAIL peak N"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
