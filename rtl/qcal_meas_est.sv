// qcal_meas_est: measurement statistics estimator.
//
// For each calibration iteration it requests N_TOTAL = 2**LOG2_NTOTAL readout
// shots, counts the logical-1 outcomes N1 and returns the estimated success
// probability p_meas = N1 / N_TOTAL, as in the document's Sec. 3.1. Making
// N_TOTAL a power of two (this design's choice; the document gives no value)
// turns the division into a shift, so p_meas is exact in the fixed-point word.
//
// Interface: start (one-cycle pulse) clears the count and raises shot_req;
// each cycle with shot_valid high consumes one outcome shot_bit. After the
// N_TOTAL-th shot, shot_req drops, and on the next cycle done pulses with
// p_meas and n1 valid; they hold until the next start. Latency is N_TOTAL
// accepted shots plus one cycle.
module qcal_meas_est
  import qcal_pkg::*;
#(
  parameter int unsigned LOG2_NTOTAL = 8     // N_total = 256 shots (assumed)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 shot_req,
  input  logic                 shot_valid,
  input  logic                 shot_bit,
  output logic                 done,
  output logic [LOG2_NTOTAL:0] n1,
  output fx_t                  p_meas
);

  localparam int unsigned CW = LOG2_NTOTAL + 1;
  localparam logic [CW-1:0] NTOT = CW'(1) << LOG2_NTOTAL;

  logic [CW-1:0] shots;     // shots taken so far
  logic [CW-1:0] ones;      // logical-1 outcomes so far
  logic          finish;    // all shots collected, result next cycle

  // N1 / 2**LOG2_NTOTAL expressed with FRAC_W fractional bits.
  function automatic fx_t ratio(input logic [CW-1:0] cnt);
    if (LOG2_NTOTAL <= FRAC_W)
      return fx_t'(cnt) <<< (FRAC_W - LOG2_NTOTAL);
    else
      return fx_t'(fx_t'(cnt) >> (LOG2_NTOTAL - FRAC_W));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shot_req <= 1'b0;
      shots    <= '0;
      ones     <= '0;
      finish   <= 1'b0;
      done     <= 1'b0;
      n1       <= '0;
      p_meas   <= '0;
    end else begin
      done   <= 1'b0;
      finish <= 1'b0;
      if (start) begin
        shot_req <= 1'b1;
        shots    <= '0;
        ones     <= '0;
      end else if (shot_req && shot_valid) begin
        shots <= shots + 1'b1;
        ones  <= ones + CW'(shot_bit);
        if (shots == NTOT - 1'b1) begin
          shot_req <= 1'b0;
          finish   <= 1'b1;
        end
      end
      if (finish) begin
        done   <= 1'b1;
        n1     <= ones;
        p_meas <= ratio(ones);
      end
    end
  end

endmodule
