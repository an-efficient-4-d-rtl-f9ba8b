// tb_acsu: checks the hybrid-T add-compare-select unit against a reference model.
// The reference builds the trellis by forward enumeration of the encoder state
// equations and checks that every state has exactly eight distinct predecessors.
// Random stages then drive random BMs, BM survival flags, thresholds and estimates;
// every surviving PM, survival flag, decision, the number of additions and the
// restart flags must match the model, one clock after the stage.
// Stage kinds: normal, all BMs purged (restart), estimate far above (fallback
// restart), PM purge disabled.
module tb_acsu;
  import tcm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     pm_en;
  pm_t                      t_pm;
  logic                     in_valid;
  bm_t   [N_BM-1:0]         bm;
  logic  [N_BM-1:0]         bm_keep;
  pm_t                      est;
  logic                     out_valid;
  pm_t   [N_STATES-1:0]     pm;
  logic  [N_STATES-1:0]     pm_valid;
  logic  [N_STATES-1:0][2:0] dec;
  logic  [N_STATES-1:0]     upd;
  logic  [9:0]              n_add;
  logic                     fallback, restart;

  acsu dut (.*);

  int checks = 0, failures = 0;
  int n_restart = 0, n_fallback = 0, n_purged = 0;

  // reference trellis
  int pred_t [N_STATES][N_IN];

  function automatic int fwd(int s, int u);
    int n, c;
    n = 0;
    for (int k = 1; k <= NU; k++) begin
      c = (H0[k] & s[0]) ^ (H1[k] & u[0]) ^ (H2[k] & u[1]) ^ (H3[k] & u[2]);
      if (k < NU) n |= ((s >> k) & 1 ^ c) << (k - 1);
      else        n |= c << (NU - 1);
    end
    return n;
  endfunction

  function automatic bit gt(int a, int b);
    int d;
    d = (a - b) & ((1 << PM_W) - 1);
    return d != 0 && d < (1 << (PM_W - 1));
  endfunction

  int  mpm [N_STATES];
  bit  mval [N_STATES];

  function automatic void fail(string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endfunction

  initial begin
    foreach (pred_t[j, k]) pred_t[j][k] = -1;
    for (int s = 0; s < N_STATES; s++)
      for (int u = 0; u < N_IN; u++) begin
        int n;
        n = fwd(s, u);
        checks++;
        if (pred_t[n][u] != -1) fail("trellis: two predecessors with the same input");
        pred_t[n][u] = s;
      end

    pm_en = 1; t_pm = 10; in_valid = 0; bm = '0; bm_keep = '1; est = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < N_STATES; s++) begin mpm[s] = 0; mval[s] = 1; end

    for (int n = 0; n < 600; n++) begin
      int   b [N_BM];
      bit   kp [N_BM];
      int   e, tp, best, cnt, any_got, any_kept;
      bit   pe;
      int   npm [N_STATES];
      bit   got [N_STATES], kept [N_STATES];
      int   nd [N_STATES];
      int   kind;
      kind = (n % 23 == 7) ? 1 : (n % 29 == 11) ? 2 : 0;
      best = -1;
      for (int s = 0; s < N_STATES; s++)
        if (mval[s] && (best < 0 || gt(mpm[s], mpm[best]))) best = s;
      for (int k = 0; k < N_BM; k++) begin
        b[k]  = $urandom_range(360);
        kp[k] = (kind == 1) ? 0 : ($urandom_range(99) < 75);
      end
      pe = (n % 13 != 0);
      tp = $urandom_range(200);
      e  = (mpm[best] + 360 + $urandom_range(100) + ((kind == 2) ? 1000 : 0)) & ((1 << PM_W) - 1);
      for (int k = 0; k < N_BM; k++) begin bm[k] <= bm_t'(b[k]); bm_keep[k] <= kp[k]; end
      pm_en <= pe; t_pm <= pm_t'(tp); est <= pm_t'(e); in_valid <= 1;

      // model
      cnt = 0; any_got = 0; any_kept = 0;
      for (int j = 0; j < N_STATES; j++) begin
        got[j] = 0; npm[j] = 0; nd[j] = 0;
        for (int u = 0; u < N_IN; u++) begin
          int p, idx, c;
          p   = pred_t[j][u];
          idx = u * 2 + (p & 1);
          if (mval[p] && kp[idx]) begin
            cnt++;
            c = (mpm[p] + b[idx]) & ((1 << PM_W) - 1);
            if (!got[j] || gt(c, npm[j])) begin npm[j] = c; nd[j] = u; got[j] = 1; end
          end
        end
        begin
          int d;
          d = (e - npm[j]) & ((1 << PM_W) - 1);
          kept[j] = got[j] && (!pe || d >= (1 << (PM_W - 1)) || d <= tp);
        end
        if (got[j]) any_got = 1;
        if (kept[j]) any_kept = 1;
      end

      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) fail("out_valid");
      checks++;
      if (int'(n_add) != cnt) fail($sformatf("n_add %0d exp %0d", n_add, cnt));
      checks++;
      if (restart != !any_kept || fallback != (any_got && !any_kept))
        fail($sformatf("n=%0d restart %0d fallback %0d exp %0d %0d", n, restart, fallback, !any_kept, any_got && !any_kept));
      if (!any_kept) n_restart++;
      if (any_got && !any_kept) n_fallback++;
      for (int j = 0; j < N_STATES; j++) begin
        if (!any_kept) begin
          mval[j] = 1; mpm[j] = e;
        end else begin
          mval[j] = kept[j];
          if (kept[j]) mpm[j] = npm[j];
          else n_purged++;
        end
        checks++;
        if (pm_valid[j] !== mval[j] || upd[j] !== (any_kept && kept[j]) ||
            (mval[j] && int'(pm[j]) != mpm[j]) || (kept[j] && any_kept && int'(dec[j]) != nd[j]))
          fail($sformatf("n=%0d state %0d valid %0d/%0d pm %0d/%0d dec %0d/%0d", n, j,
                         pm_valid[j], mval[j], pm[j], mpm[j], dec[j], nd[j]));
      end
      if (n % 5 == 2) @(posedge clk);
    end
    checks++;
    if (n_restart == 0 || n_fallback == 0 || n_purged == 0) fail("coverage");
    $display("restarts=%0d fallbacks=%0d purged=%0d", n_restart, n_fallback, n_purged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
