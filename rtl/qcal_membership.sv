// qcal_membership: fuzzifier for one signed input x (e or de).
//
// Computes the three symmetric triangular membership degrees over [-1,1]
// used by the document's rule base:
//   mu_N(x) = clip(-x, 0, 1)      1 at x = -1, 0 at x >= 0
//   mu_Z(x) = max(0, 1 - |x|)     peak 1 at x = 0, 0 at |x| >= 1
//   mu_P(x) = clip( x, 0, 1)      0 at x <= 0, 1 at x = +1
// Adjacent terms cross at x = +-0.5 with degree 0.5, and every degree is
// clipped to [0,1] outside [-1,1], as the document specifies. Only compares and
// subtractions are used (no lookup table), as in the document.
//
// Interface: x is a qcal_pkg::fx_t (Q3.12); the degrees are unsigned with
// FRAC_W fractional bits (1.0 = 2**FRAC_W). Purely combinational.
module qcal_membership
  import qcal_pkg::*;
(
  input  fx_t x,
  output mu_t mu_n,
  output mu_t mu_z,
  output mu_t mu_p
);

  localparam fx_t FX_ONE = fx_t'(ONE);

  fx_t ax;  // |x|, saturated to 1.0 (also covers the most negative code)

  always_comb begin
    if (x >= FX_ONE || x <= -FX_ONE) ax = FX_ONE;
    else if (x < 0)                  ax = -x;
    else                             ax = x;

    mu_z = mu_t'(FX_ONE - ax);
    mu_n = (x < 0)  ? mu_t'(ax) : '0;
    mu_p = (x >= 0) ? mu_t'(ax) : '0;
  end

endmodule
