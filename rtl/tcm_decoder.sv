// tcm_decoder: reconfigurable 4-D 8PSK trellis-coded-modulation decoder.
//
// One 4-D symbol (four 8PSK samples, 7-bit I and Q each) enters per clock; one word of
// decoded bits leaves per clock. The chain is
//   tmu          16 branch metrics + the 12-bit path of each + the maximum BM
//   bm_purge     T-algorithm on BMs (feed-forward)
//   acsu         64-state add-compare-select with the hybrid T-algorithm: a branch is
//                added only if its BM and its predecessor state both survived
//   pm_estimator SPEC-T estimate of the optimal PM (previous estimate + maximum BM),
//                corrected from a pipelined search outside the ACS loop
//   smu_re       register-exchange survivor memory of 4-bit branch indices
//   path_delay   16 paths per stage, held until the decoded index selects one
//   demapper     point labels back to bits x11..x0
//   diff_decoder mod-8 differential decoding of x11, x8, x4
// rate selects Rm = 8/9 .. 11/12 (see tcm_pkg for which bits each mode carries).
// bm_purge_en / pm_purge_en switch the two halves of the hybrid T-algorithm, so the
// same unit also runs as a full-trellis, BM-only or PM-only decoder.
//
// Timing: with an unbroken input stream the decoded word of a symbol leaves
// SMU_DEPTH + 6 clocks after the symbol entered (TMU 3, BM purge 1, ACSU 1, survivor
// memory SMU_DEPTH, output 1). in_valid may have gaps; the pipeline then simply
// holds. out_bits is {x11..x1} after differential decoding (x0 is the code's parity
// bit); bits the rate mode does not carry are 0. The status outputs count nothing
// themselves: n_add is the number of ACS additions in the last stage, and the event
// strobes mark the safeguards and the SPEC-T corrections.
module tcm_decoder
  import tcm_pkg::*;
#(
  parameter int unsigned SMU_DEPTH   = 26,
  parameter int unsigned COMP_PERIOD = 4
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  sym_t [3:0]        in_sym,
  input  rate_e             rate,
  input  logic              bm_purge_en,
  input  logic              pm_purge_en,
  input  bm_t               t_bm,
  input  pm_t               t_pm,
  output logic              out_valid,
  output logic [10:0]       out_bits,
  output logic [9:0]        n_add,
  output logic              stage_valid,    // an ACS stage finished (n_add valid)
  output logic [N_STATES-1:0] state_alive,
  output logic              ev_bm_all_kept,
  output logic              ev_fallback,
  output logic              ev_restart,
  output logic              ev_comp,
  output pm_t               spec_real,      // last searched optimal PM
  output pm_t               spec_err        // last estimation error (estimate - real)
);

  // ---------------- TMU ----------------
  logic                 t_valid;
  bm_t   [N_BM-1:0]     t_bm_v;
  path_t [N_BM-1:0]     t_path;
  bm_t                  t_bm_max;

  tmu u_tmu (
    .clk, .rst_n,
    .in_valid  (in_valid),
    .in_sym    (in_sym),
    .rate      (rate),
    .out_valid (t_valid),
    .bm        (t_bm_v),
    .path      (t_path),
    .bm_max    (t_bm_max)
  );

  // ---------------- T-algorithm on BMs ----------------
  logic              b_valid;
  bm_t [N_BM-1:0]    b_bm;
  logic [N_BM-1:0]   b_keep;
  bm_t               b_bm_max;

  bm_purge u_bmp (
    .clk, .rst_n,
    .en        (bm_purge_en),
    .t_bm      (t_bm),
    .in_valid  (t_valid),
    .in_bm     (t_bm_v),
    .in_bm_max (t_bm_max),
    .out_valid (b_valid),
    .bm        (b_bm),
    .keep      (b_keep),
    .bm_max    (b_bm_max),
    .all_kept  (ev_bm_all_kept)
  );

  // paths travel alongside the BM purge and ACS stages
  path_t [N_BM-1:0] path_b, path_a;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      path_b <= '0;
      path_a <= '0;
    end else begin
      if (t_valid) path_b <= t_path;
      if (b_valid) path_a <= path_b;
    end
  end

  // ---------------- ACSU + SPEC-T estimator ----------------
  pm_t                      est_next;
  logic                     a_valid;
  pm_t  [N_STATES-1:0]      a_pm;
  logic [N_STATES-1:0]      a_pm_valid;
  logic [N_STATES-1:0][2:0] a_dec;
  logic [N_STATES-1:0]      a_upd;

  acsu u_acsu (
    .clk, .rst_n,
    .pm_en     (pm_purge_en),
    .t_pm      (t_pm),
    .in_valid  (b_valid),
    .bm        (b_bm),
    .bm_keep   (b_keep),
    .est       (est_next),
    .out_valid (a_valid),
    .pm        (a_pm),
    .pm_valid  (a_pm_valid),
    .dec       (a_dec),
    .upd       (a_upd),
    .n_add     (n_add),
    .fallback  (ev_fallback),
    .restart   (ev_restart)
  );

  pm_estimator #(.COMP_PERIOD(COMP_PERIOD)) u_est (
    .clk, .rst_n,
    .in_valid  (b_valid),
    .bm_max    (b_bm_max),
    .est_next  (est_next),
    .st_valid  (a_valid),
    .pm        (a_pm),
    .pm_valid  (a_pm_valid),
    .comp_fire (ev_comp),
    .real_max  (spec_real),
    .err       (spec_err)
  );

  assign stage_valid = a_valid;
  assign state_alive = a_pm_valid;

  // ---------------- survivor memory and path delay chain ----------------
  logic       s_filled;
  logic [3:0] s_idx;
  path_t      sel_path;
  logic       s_new;

  smu_re #(.DEPTH(SMU_DEPTH)) u_smu (
    .clk, .rst_n,
    .in_valid  (a_valid),
    .dec       (a_dec),
    .upd       (a_upd),
    .alive     (a_pm_valid),
    .out_valid (s_filled),
    .out_idx   (s_idx)
  );

  path_delay #(.DEPTH(SMU_DEPTH)) u_pd (
    .clk, .rst_n,
    .in_valid  (a_valid),
    .in_path   (path_a),
    .sel       (s_idx),
    .out_path  (sel_path)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_new <= 1'b0;
    else        s_new <= a_valid;
  end

  // ---------------- demapping and differential decoding ----------------
  logic [11:0] dm_x, df_x;
  logic        df_valid;

  demapper u_dmu (.path(sel_path), .x(dm_x));

  diff_decoder u_dfd (
    .clk, .rst_n,
    .in_valid  (s_new && s_filled),
    .in_x      (dm_x),
    .out_valid (df_valid),
    .out_x     (df_x)
  );

  assign out_valid = df_valid;
  assign out_bits  = df_x[11:1];   // x0 is the code's parity bit, not information

endmodule
