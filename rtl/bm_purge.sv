// bm_purge: T-algorithm on branch metrics.
//
// A branch metric is kept when it lies within the threshold t_bm of the maximum BM
// of the same symbol: keep[k] = (bm_max - bm[k] <= t_bm). Purged BMs are never added
// in the ACSU. Because bm_max comes from the TMU in parallel with the BMs (sum of
// per-dimension maxima), this is a feed-forward step outside the add-compare-select
// loop. With en = 0 every BM is kept (full-trellis or PM-only operation).
// In the rate modes where bm_max is only an upper bound the difference can exceed
// the threshold for every BM; then all BMs are kept for that symbol (this design's
// own safeguard; the flag all_kept reports it).
//
// One register stage: bm, keep, bm_max and out_valid follow the inputs by 1 clock.
module bm_purge
  import tcm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  bm_t               t_bm,
  input  logic              in_valid,
  input  bm_t [N_BM-1:0]    in_bm,
  input  bm_t               in_bm_max,
  output logic              out_valid,
  output bm_t [N_BM-1:0]    bm,
  output logic [N_BM-1:0]   keep,
  output bm_t               bm_max,
  output logic              all_kept     // safeguard fired for this symbol
);

  logic [N_BM-1:0] keep_c;
  logic            none_c;

  always_comb begin
    for (int k = 0; k < N_BM; k++) begin
      // bm_max >= bm[k] in 11/12 mode; guard the subtraction anyway
      logic [BM_W:0] diff;
      diff = {1'b0, in_bm_max} - {1'b0, in_bm[k]};
      keep_c[k] = !en || diff[BM_W] || (diff[BM_W-1:0] <= t_bm);
    end
    none_c = (keep_c == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bm        <= '0;
      keep      <= '0;
      bm_max    <= '0;
      all_kept  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      bm        <= in_bm;
      keep      <= none_c ? '1 : keep_c;
      bm_max    <= in_bm_max;
      all_kept  <= in_valid && none_c;
    end
  end

endmodule
