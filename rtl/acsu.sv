// acsu: add-compare-select unit with the hybrid T-algorithm, 64 states, 8 branches
// per state, one trellis stage per clock.
//
// PM_j(n) = max over the 8 branches k entering state j of PM_p(n-1) + BM_b(n), where
// p = prev_state(j,k) and b = {k, x0(p)}. A branch is added only if its predecessor
// state survived (T-algorithm on PMs) and its BM was kept (T-algorithm on BMs); a
// state none of whose branches is enabled is purged. A state that gets a value is
// then also purged when est - PM_j > t_pm, est being the estimated optimal PM of this
// stage supplied by pm_estimator (SPEC-T: no search for the best PM inside the loop).
// Metrics are maximised and compared modulo 2^PM_W. Purged states keep their old
// register contents (the clock-gating opportunity of the RE survivor memory).
//
// Safeguard, this design's own choice: if no state would survive a stage (no branch
// enabled anywhere, or every state above the PM threshold), the correct path has been
// lost; every state then restarts at PM = est so that the true state is among the
// survivors again (restart). fallback marks the subset of restarts caused by the PM
// threshold alone.
//
// Outputs are registered: pm/pm_valid are the state of the trellis after the stage,
// dec[j] the winning branch input {x3,x2,x1} and upd[j] whether state j was updated
// in that stage; out_valid marks a stage done. n_add counts the additions performed.
module acsu
  import tcm_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pm_en,        // T-algorithm on PMs on/off
  input  pm_t                      t_pm,
  input  logic                     in_valid,
  input  bm_t   [N_BM-1:0]         bm,
  input  logic  [N_BM-1:0]         bm_keep,
  input  pm_t                      est,          // estimated optimal PM of this stage
  output logic                     out_valid,
  output pm_t   [N_STATES-1:0]     pm,
  output logic  [N_STATES-1:0]     pm_valid,
  output logic  [N_STATES-1:0][2:0] dec,
  output logic  [N_STATES-1:0]     upd,
  output logic  [9:0]              n_add,
  output logic                     fallback,
  output logic                     restart
);

  // Predecessor table, packed: entry (j,k) at bits [(j*8+k)*NU +: NU].
  function automatic logic [N_STATES*N_IN*NU-1:0] build_pred();
    logic [N_STATES*N_IN*NU-1:0] t;
    for (int j = 0; j < N_STATES; j++)
      for (int k = 0; k < N_IN; k++)
        t[(j*N_IN+k)*NU +: NU] = prev_state(state_t'(j), 3'(k));
    return t;
  endfunction
  localparam logic [N_STATES*N_IN*NU-1:0] PRED = build_pred();

  pm_t                       pm_c   [N_STATES];
  logic [N_STATES-1:0]       got_c;     // state received a value
  logic [N_STATES-1:0]       keep_c;    // passes the PM threshold
  logic [2:0]                dec_c  [N_STATES];
  logic [9:0]                nadd_c;
  logic                      none_kept, none_got;

  always_comb begin
    nadd_c = '0;
    for (int j = 0; j < N_STATES; j++) begin
      got_c[j] = 1'b0;
      pm_c[j]  = '0;
      dec_c[j] = '0;
      for (int k = 0; k < N_IN; k++) begin
        state_t p;
        logic   en;
        pm_t    cand;
        p    = PRED[(j*N_IN+k)*NU +: NU];
        en   = pm_valid[p] && bm_keep[{k[2:0], p[0]}];
        cand = pm[p] + PM_W'(bm[{k[2:0], p[0]}]);
        nadd_c = nadd_c + 10'(en);
        if (en && (!got_c[j] || pm_gt(cand, pm_c[j]))) begin
          pm_c[j]  = cand;
          dec_c[j] = k[2:0];
          got_c[j] = 1'b1;
        end
      end
      begin
        pm_t diff;
        diff = est - pm_c[j];
        keep_c[j] = !pm_en || diff[PM_W-1] || (diff <= t_pm);
      end
    end
    none_got  = (got_c == '0);
    none_kept = ((got_c & keep_c) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pm        <= '{default: '0};
      pm_valid  <= '1;          // start from every state with equal metrics
      dec       <= '0;
      upd       <= '0;
      n_add     <= '0;
      fallback  <= 1'b0;
      restart   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      fallback  <= in_valid && !none_got && none_kept;
      restart   <= in_valid && none_kept;
      if (in_valid) begin
        n_add <= nadd_c;
        for (int j = 0; j < N_STATES; j++) begin
          dec[j] <= dec_c[j];
          if (none_kept) begin
            pm[j]       <= est;
            pm_valid[j] <= 1'b1;
            upd[j]      <= 1'b0;
          end else begin
            logic live;
            live = got_c[j] && keep_c[j];
            pm_valid[j] <= live;
            upd[j]      <= live;
            if (live) pm[j] <= pm_c[j];
          end
        end
      end
    end
  end

endmodule
