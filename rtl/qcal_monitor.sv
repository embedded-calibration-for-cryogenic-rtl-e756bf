// qcal_monitor: convergence detector and drift monitor.
//
// Keeps the monitor metric, the average of |e| over the last W = 2**LOG2_W
// polls (W = 16 in the document), in a circular buffer with a running sum.
// Then, per the document's Sec. 5.2:
//  * Update mode (mon_mode = 0). A convergence hit is a poll with
//    metric <= e_tol and |de| <= de_tol. A plateau poll is one where the metric
//    moved by at most eps since the previous poll. Convergence (conv pulse) is
//    declared after H consecutive hits or H consecutive plateau polls. The
//    document says convergence comes "either by an absolute residual threshold
//    or by repeated steady-plateau detection", and this module follows that
//    reading. Both counts start only once the window holds W samples (for a
//    plateau, W samples at both polls); that is this design's choice.
//  * Monitor mode (mon_mode = 1). The metric at monitor entry is latched as the
//    baseline (mon_enter pulse). A poll with metric - baseline >= t_rst counts
//    as a deviation. After R consecutive deviations, restart pulses and the
//    count starts over.
// clear empties the window and all counters (calibration restart).
//
// Interface: valid pulses once per poll with abs_e and abs_de. On the next
// edge metric, conv/conv_by_hit/conv_by_plateau and restart are updated. The
// pulses last one cycle; metric and baseline hold. Thresholds are
// qcal_pkg::fx_t, and the counts H and R are 8-bit (H = 0 or R = 0 act as 1).
module qcal_monitor
  import qcal_pkg::*;
#(
  parameter int unsigned LOG2_W = 4          // W = 16 (document)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       valid,
  input  fx_t        abs_e,
  input  fx_t        abs_de,
  input  logic       mon_mode,
  input  logic       mon_enter,
  input  fx_t        e_tol,
  input  fx_t        de_tol,
  input  fx_t        eps,
  input  logic [7:0] hits,
  input  fx_t        t_rst,
  input  logic [7:0] r_pers,
  output fx_t        metric,
  output fx_t        baseline,
  output logic       conv,
  output logic       conv_by_hit,
  output logic       conv_by_plateau,
  output logic       restart
);

  localparam int unsigned W     = 1 << LOG2_W;
  localparam int unsigned SUM_W = DATA_W + LOG2_W;

  fx_t                win [W];
  logic [LOG2_W-1:0]  ptr;
  logic [LOG2_W:0]    fill;          // samples in the window, saturates at W
  logic [SUM_W-1:0]   sum;
  logic [7:0]         hit_cnt;
  logic [7:0]         plat_cnt;
  logic [7:0]         dev_cnt;

  logic [SUM_W-1:0]   sum_c;
  fx_t                metric_c;
  logic               full_c;        // window full including this sample
  logic               was_full;      // window was full at the previous poll
  fx_t                dmetric_c;
  logic               hit_c;
  logic               plat_c;
  logic               dev_c;
  logic [7:0]         hits_min;
  logic [7:0]         r_min;

  always_comb begin
    // an empty slot holds zero, so the running sum stays exact while filling
    sum_c     = sum + SUM_W'(unsigned'(abs_e)) - SUM_W'(unsigned'(win[ptr]));
    metric_c  = fx_t'(sum_c >> LOG2_W);
    full_c    = (fill >= (LOG2_W+1)'(W - 1));
    dmetric_c = (metric_c >= metric) ? (metric_c - metric) : (metric - metric_c);
    hit_c     = full_c && (metric_c <= e_tol) && (abs_de <= de_tol);
    plat_c    = full_c && was_full && (dmetric_c <= eps);
    dev_c     = (metric_c - baseline) >= t_rst;
    hits_min  = (hits == 0)   ? 8'd1 : hits;
    r_min     = (r_pers == 0) ? 8'd1 : r_pers;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) win[i] <= '0;
      ptr             <= '0;
      fill            <= '0;
      sum             <= '0;
      was_full        <= 1'b0;
      hit_cnt         <= '0;
      plat_cnt        <= '0;
      dev_cnt         <= '0;
      metric          <= '0;
      baseline        <= '0;
      conv            <= 1'b0;
      conv_by_hit     <= 1'b0;
      conv_by_plateau <= 1'b0;
      restart         <= 1'b0;
    end else begin
      conv    <= 1'b0;
      restart <= 1'b0;
      if (clear) begin
        for (int i = 0; i < W; i++) win[i] <= '0;
        ptr      <= '0;
        fill     <= '0;
        sum      <= '0;
        was_full <= 1'b0;
        hit_cnt  <= '0;
        plat_cnt <= '0;
        dev_cnt  <= '0;
        metric   <= '0;
        baseline <= '0;
      end else begin
        if (mon_enter) begin
          baseline <= metric;
          dev_cnt  <= '0;
          hit_cnt  <= '0;
          plat_cnt <= '0;
        end
        if (valid) begin
          win[ptr] <= abs_e;
          ptr      <= ptr + 1'b1;
          if (!full_c) fill <= fill + 1'b1;
          else         fill <= (LOG2_W+1)'(W);
          sum      <= sum_c;
          metric   <= metric_c;
          was_full <= full_c;
          if (!mon_mode) begin
            dev_cnt <= '0;
            if ((hit_c && hit_cnt + 1'b1 >= hits_min) ||
                (plat_c && plat_cnt + 1'b1 >= hits_min)) begin
              conv            <= 1'b1;
              conv_by_hit     <= hit_c && (hit_cnt + 1'b1 >= hits_min);
              conv_by_plateau <= plat_c && (plat_cnt + 1'b1 >= hits_min);
              hit_cnt         <= '0;
              plat_cnt        <= '0;
            end else begin
              hit_cnt  <= hit_c  ? hit_cnt + 1'b1  : '0;
              plat_cnt <= plat_c ? plat_cnt + 1'b1 : '0;
            end
          end else begin
            hit_cnt  <= '0;
            plat_cnt <= '0;
            if (dev_c && dev_cnt + 1'b1 >= r_min) begin
              restart <= 1'b1;
              dev_cnt <= '0;
            end else begin
              dev_cnt <= dev_c ? dev_cnt + 1'b1 : '0;
            end
          end
        end
      end
    end
  end

endmodule
