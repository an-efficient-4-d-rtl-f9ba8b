// tb_pm_estimator: checks the SPEC-T estimate against a cycle-level reference.
// Every clock the estimate for the stage being computed must be the previous one plus
// the stage's maximum BM, minus the estimation error (estimate - real optimum) of a
// stage sampled every COMP_PERIOD finished stages, whose search result is due three
// clocks after the sample. Input gaps and sets with purged states are included, and
// the reported real maximum and error are checked when a correction fires.
module tb_pm_estimator;
  import tcm_pkg::*;
  localparam int P = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid;
  bm_t                 bm_max;
  pm_t                 est_next;
  logic                st_valid;
  pm_t [N_STATES-1:0]  pm;
  logic [N_STATES-1:0] pm_valid;
  logic                comp_fire;
  pm_t                 real_max, err;

  pm_estimator #(.COMP_PERIOD(P)) dut (.*);

  int checks = 0, failures = 0, n_fire = 0;
  localparam int M = 1 << PM_W;

  function automatic bit gt(int a, int b);
    int d;
    d = (a - b) & (M - 1);
    return d != 0 && d < M / 2;
  endfunction

  int est_q = 0, est_hist = 0, cnt = 0;
  int due_cyc [$], due_est [$], due_real [$];
  int cyc = 0;
  int last_real = 0, last_err = 0;
  bit fire_exp = 0;

  initial begin
    in_valid = 0; st_valid = 0; bm_max = 0; pm = '0; pm_valid = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (cyc = 0; cyc < 1500; cyc++) begin
      bit iv, sv;
      int bmx, corr, exp_next, best;
      bit any;
      sv  = in_valid;               // last clock's stage is now finished
      iv  = ($urandom_range(99) < 85);
      bmx = $urandom_range(362);
      // present the finished stage's PMs: around est_hist, some purged
      any = 0; best = 0;
      for (int j = 0; j < N_STATES; j++) begin
        int v;
        bit ok;
        v  = (est_hist - $urandom_range(60)) & (M - 1);
        ok = ($urandom_range(99) < 60);
        pm[j] = pm_t'(v);
        pm_valid[j] = ok;
        if (ok && (!any || gt(v, best))) begin best = v; any = 1; end
      end
      if (cyc % 97 == 50) pm_valid = '0;   // nothing alive: no correction
      if (pm_valid == '0) any = 0;
      st_valid = sv;
      in_valid = iv;
      bm_max   = bm_t'(bmx);
      // correction due now?
      corr = 0;
      fire_exp = 0;
      if (due_cyc.size() > 0 && due_cyc[0] == cyc) begin
        int de, dr;
        void'(due_cyc.pop_front());
        de = due_est.pop_front();
        dr = due_real.pop_front();
        if (dr >= 0) begin
          corr = (de - dr) & (M - 1);
          fire_exp = 1;
          last_real = dr;
          last_err = corr;
        end
      end
      exp_next = (est_q + (iv ? bmx : 0) - corr) & (M - 1);
      #1;
      checks++;
      if (int'(est_next) != exp_next) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d est_next %0d exp %0d", cyc, est_next, exp_next);
      end
      // launch a search?
      if (sv) begin
        if (cnt == 0) begin
          due_cyc.push_back(cyc + 3);
          due_est.push_back(est_hist);
          due_real.push_back(any ? best : -1);
        end
        cnt = (cnt == P - 1) ? 0 : cnt + 1;
      end
      if (iv || corr != 0 || fire_exp) est_q = exp_next;
      if (iv) est_hist = exp_next;
      @(posedge clk);
      #1;
      checks++;
      if (comp_fire !== fire_exp ||
          (fire_exp && (int'(real_max) != last_real || int'(err) != last_err))) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d comp_fire %0d exp %0d", cyc, comp_fire, fire_exp);
      end
      if (fire_exp) n_fire++;
    end
    checks++;
    if (n_fire < 50) begin failures++; $display("FAIL few corrections %0d", n_fire); end
    $display("corrections=%0d", n_fire);
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
