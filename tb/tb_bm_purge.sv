// tb_bm_purge: random BM sets and thresholds; every keep flag must equal
// (bm_max - bm <= t_bm) when enabled, all ones when disabled or when nothing would
// survive; data must pass through with one clock of latency.
module tb_bm_purge;
  import tcm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              en;
  bm_t               t_bm;
  logic              in_valid;
  bm_t [N_BM-1:0]    in_bm;
  bm_t               in_bm_max;
  logic              out_valid;
  bm_t [N_BM-1:0]    bm;
  logic [N_BM-1:0]   keep;
  bm_t               bm_max;
  logic              all_kept;

  bm_purge dut (.*);

  int checks = 0, failures = 0, n_partial = 0, n_safe = 0;

  initial begin
    en = 0; t_bm = 0; in_valid = 0; in_bm = '0; in_bm_max = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      logic [N_BM-1:0] exp_keep;
      bm_t  b [N_BM];
      int   mx;
      bit   e;
      bit   upper;
      mx = 0;
      for (int k = 0; k < N_BM; k++) begin
        b[k] = bm_t'($urandom_range(360));
        if (b[k] > mx) mx = b[k];
      end
      upper = (n % 5 == 4);              // bm_max only an upper bound
      e = (n % 9 != 0);
      in_bm_max <= upper ? bm_t'(mx + 40) : bm_t'(mx);
      t_bm      <= bm_t'($urandom_range(60));
      en        <= e;
      for (int k = 0; k < N_BM; k++) in_bm[k] <= b[k];
      in_valid  <= 1;
      @(posedge clk);
      for (int k = 0; k < N_BM; k++)
        exp_keep[k] = !e || (int'(in_bm_max) - int'(b[k]) <= int'(t_bm));
      if (exp_keep == '0) begin
        exp_keep = '1;
        n_safe++;
      end
      #1;
      checks++;
      if (!out_valid || keep !== exp_keep || bm_max !== in_bm_max) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d keep %h exp %h", n, keep, exp_keep);
      end
      for (int k = 0; k < N_BM; k++) begin
        checks++;
        if (bm[k] !== b[k]) failures++;
      end
      if (exp_keep != '1) n_partial++;
    end
    in_valid <= 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    checks++;
    if (n_partial == 0 || n_safe == 0) begin
      failures++;
      $display("FAIL coverage partial=%0d safe=%0d", n_partial, n_safe);
    end
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
