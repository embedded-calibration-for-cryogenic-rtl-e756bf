// qcal_fuzzy: singleton Sugeno decision logic.
//
// Maps the error pair (e, de) to a signed amplitude step Delta, following the
// document's Sec. 3.2-3.4:
//   1. both inputs are fuzzified into N/Z/P by qcal_membership;
//   2. the nine rule weights are products w_ij = mu_i(e) * mu_j(de);
//   3. Delta = sum(w_ij * D_ij) / sum(w_ij), where D_ij is the singleton
//      consequent dtab[3*i + j] (Table 1: row i is the e term, column j the de
//      term, N = 0, Z = 1, P = 2);
//   4. the ratio is formed by the sequential divider qcal_seq_div, and a zero
//      denominator forces Delta = 0.
// Weights are rounded down to FRAC_W fractional bits before the sums. Because
// Delta is a weighted average of the table entries, it never leaves the range
// of the table and fits in the fixed-point word. Clipping to +-Delta_max is
// done later, in the parameter update stage.
//
// Interface: start (one-cycle pulse) samples e, de and the table. done pulses
// once, NUM_W + 2 cycles after start (1 cycle to register the sums, NUM_W
// divider steps, 1 cycle to register the result), with delta, w_sum valid
// until the next start. The latency does not depend on the data.
module qcal_fuzzy
  import qcal_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  fx_t       e,
  input  fx_t       de,
  input  fx_t [8:0] dtab,
  output logic      busy,
  output logic      done,
  output fx_t       delta,
  output logic [MU_W+3:0] w_sum
);

  localparam int unsigned NUM_W = DATA_W + MU_W + 4;   // 9 products of mu x D
  localparam int unsigned DEN_W = MU_W + 4;            // 9 weights

  mu_t mu_e [3];
  mu_t mu_de[3];

  qcal_membership u_mf_e  (.x(e),  .mu_n(mu_e[0]),  .mu_z(mu_e[1]),  .mu_p(mu_e[2]));
  qcal_membership u_mf_de (.x(de), .mu_n(mu_de[0]), .mu_z(mu_de[1]), .mu_p(mu_de[2]));

  // Rule weights and the two sums, combinational from the inputs.
  logic signed [NUM_W-1:0] num_c;
  logic        [DEN_W-1:0] den_c;

  always_comb begin
    logic [2*MU_W-1:0] prod;
    mu_t               w;
    num_c = '0;
    den_c = '0;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        prod  = mu_e[i] * mu_de[j];
        w     = mu_t'(prod >> FRAC_W);
        den_c = den_c + DEN_W'(w);
        num_c = num_c + $signed({{(NUM_W-MU_W){1'b0}}, w}) *
                        $signed({{(NUM_W-DATA_W){dtab[3*i+j][DATA_W-1]}}, dtab[3*i+j]});
      end
    end
  end

  logic signed [NUM_W-1:0] num_q;
  logic        [DEN_W-1:0] den_q;
  logic                    div_start;
  logic                    div_busy;
  logic                    div_done;
  logic signed [NUM_W-1:0] div_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q     <= '0;
      den_q     <= '0;
      div_start <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      delta     <= '0;
      w_sum     <= '0;
    end else begin
      div_start <= 1'b0;
      done      <= 1'b0;
      if (start && !busy) begin
        num_q     <= num_c;
        den_q     <= den_c;
        div_start <= 1'b1;
        busy      <= 1'b1;
      end else if (div_done) begin
        delta <= fx_t'(div_q);
        w_sum <= den_q;
        done  <= 1'b1;
        busy  <= 1'b0;
      end
    end
  end

  qcal_seq_div #(.NUM_W(NUM_W), .DEN_W(DEN_W)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (div_start),
    .num   (num_q),
    .den   (den_q),
    .busy  (div_busy),
    .done  (div_done),
    .q     (div_q)
  );

  // The divider must be idle whenever a new ratio is launched.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
