// pm_estimator: PM purging support of the SPEC-T scheme, outside the ACS loop.
//
// Instead of searching the 64 path metrics for the optimum every stage, the optimal
// PM of stage n is estimated as est(n) = est(n-1) + bm_max(n): the best path can gain
// at most the largest BM of the stage, so the estimate never falls below the true
// optimum. To keep it from drifting upward, the true optimum is searched regularly
// in a pipelined 64 -> 16 -> 4 -> 1 maximum tree (three register stages, outside the
// loop), and the estimation error of the sampled stage, est - real, is subtracted
// from the running estimate when the search result comes back.
//
// Interface: est_next is combinational (est register + bm_max - correction) and is the
// estimate the ACSU uses in the stage it computes this clock (in_valid). pm/pm_valid
// and est_q are the registered stage results. A search is launched every
// COMP_PERIOD finished stages. comp_fire pulses when a correction is applied;
// real_max/err report the last one. The search tree shape, its pipelining and the
// period are this design's own choices (COMP_PERIOD >= 4, see below); the estimate-plus-compensation scheme is the
// one described for the hybrid T-algorithm decoder.
module pm_estimator
  import tcm_pkg::*;
#(
  parameter int unsigned COMP_PERIOD = 4
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,      // ACSU computes a stage this clock
  input  bm_t                    bm_max,
  output pm_t                    est_next,
  input  logic                   st_valid,      // a finished stage is in pm/pm_valid
  input  pm_t [N_STATES-1:0]     pm,
  input  logic [N_STATES-1:0]    pm_valid,
  output logic                   comp_fire,
  output pm_t                    real_max,
  output pm_t                    err
);

  typedef struct packed {
    logic ok;
    pm_t  v;
  } mx_t;

  function automatic mx_t mx2(input mx_t a, input mx_t b);
    if (b.ok && (!a.ok || pm_gt(b.v, a.v))) return b;
    return a;
  endfunction

  function automatic mx_t mx4(input mx_t a, input mx_t b, input mx_t c, input mx_t d);
    return mx2(mx2(a, b), mx2(c, d));
  endfunction

  pm_t est_q;
  pm_t est_hist;   // estimate belonging to the finished stage now in pm
  logic [$clog2(COMP_PERIOD+1)-1:0] cnt;

  // search pipeline
  mx_t  l1 [16];
  mx_t  l2 [4];
  mx_t  l3;
  pm_t  e1, e2, e3;
  logic v1, v2, v3;

  // A new sample must not be taken before the previous correction is in the
  // estimate (3 search stages + 1), or the same drift would be subtracted twice.
  if (COMP_PERIOD < 4) begin : g_bad_period
    $error("pm_estimator: COMP_PERIOD must be at least 4");
  end

  logic launch;
  assign launch = st_valid && (cnt == '0);

  always_comb begin
    pm_t corr;
    corr = (v3 && l3.ok) ? (e3 - l3.v) : '0;
    est_next = est_q + (in_valid ? PM_W'(bm_max) : '0) - corr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_q     <= '0;
      est_hist  <= '0;
      cnt       <= '0;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      e1 <= '0;   e2 <= '0;   e3 <= '0;
      l1 <= '{default: '0};
      l2 <= '{default: '0};
      l3 <= '0;
      comp_fire <= 1'b0;
      real_max  <= '0;
      err       <= '0;
    end else begin
      // v3 and e3 - l3.v are consumed through est_next this clock
      if (in_valid || v3) est_q <= est_next;
      if (in_valid) est_hist <= est_next;
      if (st_valid) cnt <= (cnt == $bits(cnt)'(COMP_PERIOD - 1)) ? '0 : cnt + 1'b1;

      // stage 1: 64 -> 16
      v1 <= launch;
      e1 <= est_hist;
      for (int g = 0; g < 16; g++)
        l1[g] <= mx4('{pm_valid[4*g],   pm[4*g]},   '{pm_valid[4*g+1], pm[4*g+1]},
                     '{pm_valid[4*g+2], pm[4*g+2]}, '{pm_valid[4*g+3], pm[4*g+3]});
      // stage 2: 16 -> 4
      v2 <= v1;
      e2 <= e1;
      for (int g = 0; g < 4; g++)
        l2[g] <= mx4(l1[4*g], l1[4*g+1], l1[4*g+2], l1[4*g+3]);
      // stage 3: 4 -> 1
      v3 <= v2;
      e3 <= e2;
      l3 <= mx4(l2[0], l2[1], l2[2], l2[3]);

      comp_fire <= v3 && l3.ok;
      if (v3 && l3.ok) begin
        real_max <= l3.v;
        err      <= e3 - l3.v;
      end
    end
  end

endmodule
