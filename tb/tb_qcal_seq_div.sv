// tb_qcal_seq_div: self-checking test of the sequential divider.
//
// Divides random signed numerators by random unsigned denominators (plus
// corner cases: zero numerator, zero denominator, denominator 1, the largest
// magnitudes) and compares with integer division truncated toward zero,
// computed here in 64-bit arithmetic. Checks that the latency is exactly
// NUM_W cycles every time, that a zero denominator gives zero, and that a
// start while busy is ignored.
module tb_qcal_seq_div;
  localparam int unsigned NUM_W = 34;
  localparam int unsigned DEN_W = 17;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic signed [NUM_W-1:0] num = '0;
  logic        [DEN_W-1:0] den = '0;
  logic busy, done;
  logic signed [NUM_W-1:0] q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qcal_seq_div #(.NUM_W(NUM_W), .DEN_W(DEN_W)) dut (.*);

  task automatic divide(input longint n, input longint d);
    longint expq;
    int     cyc;
    @(negedge clk);
    num = NUM_W'(n);
    den = DEN_W'(d);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // a second start while busy must be ignored
    num = NUM_W'(12345);
    den = DEN_W'(7);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    expq = (d == 0) ? 0 : (n / d);
    checks++;
    if (longint'(q) != expq) begin
      failures++;
      $display("FAIL %0d / %0d: got %0d want %0d", n, d, q, expq);
    end
    checks++;
    if (cyc != NUM_W) begin
      failures++;
      $display("FAIL latency %0d, want %0d", cyc, NUM_W);
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
    longint n, d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    divide(100, 7);
    divide(-100, 7);
    divide(0, 5);
    divide(12345, 0);
    divide(-8191, 1);
    divide((64'sd1 <<< (NUM_W-1)) - 1, 3);
    divide(-((64'sd1 <<< (NUM_W-1)) - 1), (1 << DEN_W) - 1);
    for (int i = 0; i < 300; i++) begin
      n = longint'({$urandom, $urandom}) >>> (64 - NUM_W + 1);
      d = longint'($urandom_range((1 << DEN_W) - 1, 0));
      if (i % 3 == 0) d = d >> 8;
      divide(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
