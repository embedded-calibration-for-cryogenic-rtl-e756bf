// tb_qcal_fuzzy: self-checking test of the singleton Sugeno decision logic.
//
// Drives random (e, de) pairs in [-1.5, 1.5] with random 9-entry singleton
// tables and compares Delta with a reference computed here: the triangle
// memberships, w_ij = mu_i(e) mu_j(de) rounded down to 12 fractional bits,
// Delta = sum(w D) / sum(w) truncated toward zero. It also checks the
// fixed latency of 35 cycles (1 + 33 divider steps + 1) and a few hand
// cases: e = de = 0 selects D4 alone, e = +1, de = -1 selects D6 alone, and
// e = 0.5, de = 0 averages D4 and D7 equally.
module tb_qcal_fuzzy;
  import qcal_pkg::*;

  localparam int LATENCY = DATA_W + MU_W + 4 + 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fx_t  e = '0, de = '0;
  fx_t [8:0] dtab;
  logic busy, done;
  fx_t  delta;
  logic [MU_W+3:0] w_sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  qcal_fuzzy dut (.*);

  function automatic int tri_mu(input int x, input int term);
    int v;
    case (term)
      0: v = -x;
      1: v = ONE - ((x < 0) ? -x : x);
      default: v = x;
    endcase
    return (v < 0) ? 0 : (v > ONE) ? ONE : v;
  endfunction

  task automatic infer(input int ev, input int dev);
    longint num, den, w, expd;
    int cyc;
    num = 0; den = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        w = (longint'(tri_mu(ev, i)) * longint'(tri_mu(dev, j))) >>> FRAC_W;
        den += w;
        num += w * longint'(dtab[3*i+j]);
      end
    expd = (den == 0) ? 0 : num / den;
    @(negedge clk);
    e = fx_t'(ev); de = fx_t'(dev);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(delta) != expd || longint'(w_sum) != den) begin
      failures++;
      $display("FAIL e=%0d de=%0d: delta=%0d wsum=%0d want %0d %0d", ev, dev, delta, w_sum, expd, den);
    end
    checks++;
    if (cyc != LATENCY) begin failures++; $display("FAIL latency %0d want %0d", cyc, LATENCY); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 9; i++) dtab[i] = fx_t'((i - 4) * 1000);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // hand cases
    infer(0, 0);
    checks++; if (delta != dtab[4]) begin failures++; $display("FAIL Z,Z should give D4"); end
    infer(ONE, -ONE);
    checks++; if (delta != dtab[6]) begin failures++; $display("FAIL P,N should give D6"); end
    infer(ONE / 2, 0);
    checks++; if (int'(delta) != (int'(dtab[4]) + int'(dtab[7])) / 2) begin failures++; $display("FAIL 0.5,0 average"); end
    for (int n = 0; n < 400; n++) begin
      if (n % 50 == 0)
        for (int i = 0; i < 9; i++) dtab[i] = fx_t'($urandom_range(2 * ONE, 0) - ONE);
      infer($urandom_range(3 * ONE, 0) - 3 * ONE / 2, $urandom_range(3 * ONE, 0) - 3 * ONE / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
