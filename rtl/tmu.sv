// tmu: transition metric unit with the two-step comparison (substructure sharing).
//
// Each clock it takes one 4-D symbol (four 8PSK samples Z0..Z3) and produces the 16
// branch metrics BM[x3x2x1x0] of the trellis, each with the 12-bit "path" (the four
// 8PSK point labels) of the parallel transition that won it, and the maximum BM.
//
// How it works. With the Euclidean metrics folded onto four indices per dimension
// (see euclid_metric), a candidate is a 4-tuple (i0,i1,i2,i3) of metric indices and
// its value is C0[i0]+C1[i1]+C2[i2]+C3[i3]. For BM x3x2x1x0 the candidates satisfy
//   i1-i0 = x2 (mod 2), i2-i0 = x1 (mod 2), i3 = s + 2*x3 + x0 (mod 4),
//   where s = i1 + i2 - i0 (mod 4),
// and i0 = 2*x8+x4, (i1-i0)>>1 = x6, (i2-i0)>>1 = x5 give the uncoded bits.
//   add stage 1: C0[i0]+C1[i1], 16 sums
//   add stage 2: + C2[i2], 64 sums
//   comparison step 1: for each (x2,x1) and each s, the best of the 4 partial sums
//     whose Z3 metric index will be the same (group G); 16 survivors, each shared by
//     the four BMs that differ only in x3 and x0
//   add stage 3: survivor + C3[i3], 4 per BM, 64 sums
//   comparison step 2: best of 4 per BM
// This is 144 additions and 96 comparisons per symbol. Candidates whose uncoded bits
// the rate mode does not use are excluded (valid flag in every comparison). The
// maximum BM is taken, in parallel with the BMs, as the sum of the per-dimension
// maxima of the metrics (exact for Rm = 11/12, an upper bound in the other modes
// where Z0 is restricted to the allowed i0).
//
// Pipeline: three register stages (metrics; group survivors; BMs). out_valid and
// the outputs follow in_valid by 3 clocks, one symbol per clock. Ties are resolved
// towards the lower index. The grouping, sharing and operation counts follow the
// design description; the pipeline cut points are this design's own choice.
module tmu
  import tcm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  sym_t  [3:0]          in_sym,      // Z0..Z3
  input  rate_e                rate,
  output logic                 out_valid,
  output bm_t   [N_BM-1:0]     bm,          // indexed by {x3,x2,x1,x0}
  output path_t [N_BM-1:0]     path,        // {Z3,Z2,Z1,Z0} point labels
  output bm_t                  bm_max
);

  // ---------------- stage 1: Euclidean metrics ----------------
  emet_t [3:0] met_c;
  for (genvar d = 0; d < 4; d++) begin : g_emu
    euclid_metric u_emu (.sym(in_sym[d]), .met(met_c[d]));
  end

  emet_t [3:0] met_q;
  logic        v1;
  logic [3:0]  mask1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      met_q <= '0;
      mask1 <= '0;
    end else begin
      v1    <= in_valid;
      met_q <= met_c;
      mask1 <= cand_mask(rate);
    end
  end

  // ---------------- stage 2: add stages 1-2, comparison step 1 ----------------
  typedef struct packed {
    logic        ok;
    logic [BM_W-1:0] val;
    logic [1:0]  i0;
    logic [1:0]  i1;
    logic [1:0]  i2;
  } grp_t;

  // Better of two candidates: valid wins, then strictly larger value.
  function automatic grp_t best_grp(input grp_t a, input grp_t b);
    if (b.ok && (!a.ok || b.val > a.val)) return b;
    return a;
  endfunction

  logic [BM_W-1:0] s01 [4][4];          // add stage 1
  logic [BM_W-1:0] s012[4][4][4];       // add stage 2
  grp_t            grp_c [4][4];        // [x2x1][s]
  bm_t             bmax_c;

  always_comb begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        s01[a][b] = BM_W'(met_q[0].c[a]) + BM_W'(met_q[1].c[b]);
        for (int c = 0; c < 4; c++)
          s012[a][b][c] = s01[a][b] + BM_W'(met_q[2].c[c]);
      end

    for (int x21 = 0; x21 < 4; x21++) begin
      for (int s = 0; s < 4; s++) begin
        grp_t t [4];
        int   n;
        n = 0;
        for (int i0 = 0; i0 < 4; i0++)
          for (int x6 = 0; x6 < 2; x6++)
            for (int x5 = 0; x5 < 2; x5++) begin
              logic [1:0] i1, i2, ss;
              logic [3:0] used;
              i1 = 2'(i0 + 2*x6 + (x21 >> 1));
              i2 = 2'(i0 + 2*x5 + (x21 & 1));
              ss = i1 + i2 - 2'(i0);
              used = {i0[1] != 0, i0[0] != 0, x6 != 0, x5 != 0};
              if (ss == 2'(s)) begin
                t[n].ok  = (used & ~mask1) == 4'b0000;
                t[n].val = s012[i0][i1][i2];
                t[n].i0  = 2'(i0);
                t[n].i1  = i1;
                t[n].i2  = i2;
                n++;
              end
            end
        // two serial comparison levels: 4 -> 2 -> 1
        grp_c[x21][s] = best_grp(best_grp(t[0], t[1]), best_grp(t[2], t[3]));
      end
    end
  end

  // Maximum BM: sum of per-dimension maxima (Z0 restricted to allowed i0 = 2*x8+x4).
  always_comb begin
    cmet_t mx [4];
    for (int d = 0; d < 4; d++) begin
      mx[d] = '0;
      for (int i = 0; i < 4; i++) begin
        logic allowed;
        allowed = (d != 0) || (((i >> 1) & 1) <= int'(mask1[3]) && (i & 1) <= int'(mask1[2]));
        if (allowed && met_q[d].c[i] > mx[d]) mx[d] = met_q[d].c[i];
      end
    end
    bmax_c = BM_W'(mx[0]) + BM_W'(mx[1]) + BM_W'(mx[2]) + BM_W'(mx[3]);
  end

  grp_t  grp_q [4][4];
  emet_t met3_q;
  emet_t [2:0] metn_q;  // sign bits of Z0..Z2 for the path labels
  bm_t   bmax_q;
  logic  v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2     <= 1'b0;
      grp_q  <= '{default: '0};
      met3_q <= '0;
      metn_q <= '0;
      bmax_q <= '0;
    end else begin
      v2     <= v1;
      grp_q  <= grp_c;
      met3_q <= met_q[3];
      metn_q <= met_q[2:0];
      bmax_q <= bmax_c;
    end
  end

  // ---------------- stage 3: add stage 3, comparison step 2 ----------------
  bm_t   bm_c   [N_BM];
  path_t path_c [N_BM];

  always_comb begin
    for (int idx = 0; idx < N_BM; idx++) begin
      grp_t       t [4];
      logic [1:0] i3 [4];
      grp_t       w01, w23, w;
      logic [1:0] wi3, i01, i23;
      logic [3:0] ib;
      int         x3, x0;
      logic [1:0] x21;
      ib  = 4'(idx);
      x3  = int'(ib[3]);
      x21 = ib[2:1];
      x0  = int'(ib[0]);
      for (int s = 0; s < 4; s++) begin
        i3[s]    = 2'(s + 2*x3 + x0);
        t[s]     = grp_q[x21][s];
        t[s].val = grp_q[x21][s].val + BM_W'(met3_q.c[i3[s]]);
      end
      // comparison step 2 as a 4 -> 2 -> 1 tree, keeping the winner's Z3 index
      w01 = best_grp(t[0], t[1]);
      w23 = best_grp(t[2], t[3]);
      w   = best_grp(w01, w23);
      if (t[1].ok && (!t[0].ok || t[1].val > t[0].val)) i01 = i3[1]; else i01 = i3[0];
      if (t[3].ok && (!t[2].ok || t[3].val > t[2].val)) i23 = i3[3]; else i23 = i3[2];
      if (w23.ok && (!w01.ok || w23.val > w01.val))     wi3 = i23;   else wi3 = i01;
      bm_c[idx]   = w.val;
      path_c[idx] = {met3_q.neg[wi3],      wi3,
                     metn_q[2].neg[w.i2],  w.i2,
                     metn_q[1].neg[w.i1],  w.i1,
                     metn_q[0].neg[w.i0],  w.i0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bm_max    <= '0;
      for (int k = 0; k < N_BM; k++) begin
        bm[k]   <= '0;
        path[k] <= '0;
      end
    end else begin
      out_valid <= v2;
      bm_max    <= bmax_q;
      for (int k = 0; k < N_BM; k++) begin
        bm[k]   <= bm_c[k];
        path[k] <= path_c[k];
      end
    end
  end

endmodule
