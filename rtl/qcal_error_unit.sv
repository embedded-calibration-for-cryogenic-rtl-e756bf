// qcal_error_unit: error computation unit.
//
// On each valid measurement it forms, as in the document's Sec. 3.1,
//   e(k)  = p_target - p_meas(k)
//   de(k) = e(k) - e(k-1)
// and the magnitudes |e(k)| and |de(k)| used by the convergence monitor.
// e(k-1) is kept in a register. After reset or clear there is no previous
// error, so the first de is taken as zero (this design's choice; the document
// does not say what e(-1) is).
//
// Interface: in_valid pulses with p_meas; one cycle later out_valid pulses and
// e/de/abs_e/abs_de are valid until the next in_valid. All values are
// qcal_pkg::fx_t. p_meas and p_target lie in [0,1], so e is in [-1,1] and de
// in [-2,2]; neither can overflow the Q3.12 word.
module qcal_error_unit
  import qcal_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,      // forget e(k-1)
  input  logic in_valid,
  input  fx_t  p_meas,
  input  fx_t  p_target,
  output logic out_valid,
  output fx_t  e,
  output fx_t  de,
  output fx_t  abs_e,
  output fx_t  abs_de
);

  fx_t  e_prev;
  logic have_prev;
  fx_t  e_new;
  fx_t  de_new;

  always_comb begin
    e_new  = p_target - p_meas;
    de_new = have_prev ? (e_new - e_prev) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev    <= '0;
      have_prev <= 1'b0;
      out_valid <= 1'b0;
      e         <= '0;
      de        <= '0;
      abs_e     <= '0;
      abs_de    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        have_prev <= 1'b0;
        e_prev    <= '0;
      end else if (in_valid) begin
        e         <= e_new;
        de        <= de_new;
        abs_e     <= (e_new < 0)  ? -e_new  : e_new;
        abs_de    <= (de_new < 0) ? -de_new : de_new;
        e_prev    <= e_new;
        have_prev <= 1'b1;
        out_valid <= 1'b1;
      end
    end
  end

endmodule
