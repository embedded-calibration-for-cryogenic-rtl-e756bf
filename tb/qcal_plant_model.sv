// qcal_plant_model: behavioural model of the quantum device and its readout,
// for simulation only (not synthesizable: it uses $urandom).
//
// Success-probability plant model of the calibration study:
//   p(k) = 1/2 + ALPHA * (amp(k) - AMP_STAR) + n(k) + drift
// clipped to [0,1]. n(k) is a uniform pseudo-random term of about +-0.02,
// drawn from a seeded source once per poll (when shot_req rises); drift is
// an extra offset the testbench sets to inject a disturbance. While shot_req
// is high the model returns one shot per cycle (shot_valid), each a logical 1
// with probability p(k). ALPHA and AMP_STAR are this model's choices (the
// study does not give them); NOISE = 0.02 follows the study.
//
// Ports: amp and drift are Q3.12 fixed-point words (qcal_pkg::fx_t).
module qcal_plant_model
  import qcal_pkg::*;
#(
  parameter real ALPHA    = 0.25,
  parameter real AMP_STAR = 2.0,
  parameter real NOISE    = 0.02,
  parameter int  SEED     = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  fx_t  amp,
  input  fx_t  drift,
  input  logic shot_req,
  output logic shot_valid,
  output logic shot_bit,
  output int   p_now        // current p(k) in units of 2**-FRAC_W, for the testbench
);

  logic req_d;
  int   seed_used;

  initial begin
    seed_used = SEED;
    void'($urandom(seed_used));
  end

  function automatic real to_real(input fx_t v);
    return real'(v) / real'(ONE);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_d      <= 1'b0;
      shot_valid <= 1'b0;
      shot_bit   <= 1'b0;
      p_now      <= ONE / 2;
    end else begin
      real n, p;
      req_d <= shot_req;
      if (shot_req && !req_d) begin
        n = NOISE * (2.0 * real'($urandom_range(1000000, 0)) / 1000000.0 - 1.0);
        p = 0.5 + ALPHA * (to_real(amp) - AMP_STAR) + n + to_real(drift);
        if (p < 0.0) p = 0.0;
        if (p > 1.0) p = 1.0;
        p_now <= $rtoi(p * real'(ONE));
      end
      shot_valid <= shot_req && req_d;
      shot_bit   <= ($urandom_range(ONE - 1, 0) < p_now);
    end
  end

endmodule
