// qcal_seq_div: small sequential divider for the defuzzification ratio.
//
// Computes q = num / den for a signed numerator and an unsigned denominator by
// restoring long division, one quotient bit per clock, so the latency is fixed
// at NUM_W cycles after start whatever the operands are (the document asks for
// a small sequential divider and a deterministic iteration). The quotient is
// truncated toward zero and carries the numerator's sign. When den is zero
// the result is forced to zero, as the document specifies for the ratio.
//
// Interface: pulse start for one cycle with num/den valid; done pulses for one
// cycle, NUM_W clock edges after the one that took start, with q valid; q holds until the next start.
// busy is high in between. A start while busy is ignored.
module qcal_seq_div #(
  parameter int unsigned NUM_W = 34,   // numerator width (signed)
  parameter int unsigned DEN_W = 17    // denominator width (unsigned)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [NUM_W-1:0] num,
  input  logic        [DEN_W-1:0] den,
  output logic                    busy,
  output logic                    done,
  output logic signed [NUM_W-1:0] q
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] dividend;    // magnitude bits still to be shifted in
  logic [NUM_W-1:0] quot;
  logic [DEN_W-1:0] rem;         // partial remainder, always below divisor
  logic [DEN_W-1:0] divisor;
  logic             neg;
  logic             den_zero;
  logic [CNT_W-1:0] cnt;

  logic [DEN_W:0]   rem_sh;
  logic [DEN_W:0]   rem_sub;
  logic             q_bit;

  always_comb begin
    rem_sh  = {rem, dividend[NUM_W-1]};
    q_bit   = (rem_sh >= {1'b0, divisor});
    rem_sub = q_bit ? (rem_sh - {1'b0, divisor}) : rem_sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      q        <= '0;
      dividend <= '0;
      quot     <= '0;
      rem      <= '0;
      divisor  <= '0;
      neg      <= 1'b0;
      den_zero <= 1'b0;
      cnt      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        dividend <= num[NUM_W-1] ? NUM_W'(-num) : NUM_W'(num);
        neg      <= num[NUM_W-1];
        divisor  <= den;
        den_zero <= (den == '0);
        rem      <= '0;
        quot     <= '0;
        cnt      <= CNT_W'(NUM_W);
      end else if (busy) begin
        dividend <= {dividend[NUM_W-2:0], 1'b0};
        quot     <= {quot[NUM_W-2:0], q_bit};
        rem      <= rem_sub[DEN_W-1:0];
        cnt      <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (den_zero)
            q <= '0;
          else
            q <= neg ? -$signed({quot[NUM_W-2:0], q_bit}) : $signed({quot[NUM_W-2:0], q_bit});
        end
      end
    end
  end

endmodule
