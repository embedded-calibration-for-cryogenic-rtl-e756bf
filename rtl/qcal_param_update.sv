// qcal_param_update: bounded parameter update and actuation register.
//
// Holds the calibrated parameter amp that drives the device and applies the
// document's bounded update (Sec. 3.5):
//   amp(k+1) = sat(amp(k) + clip(Delta(k), -Delta_max, Delta_max))
// clip limits the step to +-dmax; sat keeps amp inside [amp_min, amp_max].
// The sum is formed one bit wider than the word, so it cannot wrap before it
// is saturated. A direct load (used for the initial value and for manual
// setting through the register interface) is saturated the same way; that
// load path is this design's choice.
//
// Interface: apply pulses for one cycle with delta valid; amp and step (the
// clipped step actually used) change on that clock edge. load has priority
// over apply. amp resets to 0.0. dmax is taken as a non-negative value.
module qcal_param_update
  import qcal_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic apply,
  input  fx_t  delta,
  input  logic load,
  input  fx_t  load_val,
  input  fx_t  dmax,
  input  fx_t  amp_min,
  input  fx_t  amp_max,
  output fx_t  amp,
  output fx_t  step
);

  fx_t                   step_c;
  logic signed [DATA_W:0] sum_c;
  fx_t                   next_c;
  fx_t                   load_c;

  function automatic fx_t sat(input logic signed [DATA_W:0] v, input fx_t lo, input fx_t hi);
    if (v < $signed({lo[DATA_W-1], lo})) return lo;
    if (v > $signed({hi[DATA_W-1], hi})) return hi;
    return fx_t'(v);
  endfunction

  always_comb begin
    if (delta > dmax)       step_c = dmax;
    else if (delta < -dmax) step_c = -dmax;
    else                    step_c = delta;
    sum_c  = $signed({amp[DATA_W-1], amp}) + $signed({step_c[DATA_W-1], step_c});
    next_c = sat(sum_c, amp_min, amp_max);
    load_c = sat($signed({load_val[DATA_W-1], load_val}), amp_min, amp_max);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      amp  <= '0;
      step <= '0;
    end else if (load) begin
      amp  <= load_c;
      step <= '0;
    end else if (apply) begin
      amp  <= next_c;
      step <= step_c;
    end
  end

endmodule
