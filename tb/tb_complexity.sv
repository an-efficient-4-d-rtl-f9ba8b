// tb_complexity: average ACS additions per trellis stage and decoded bit errors for
// the four ACSU operating modes (full trellis, T-algorithm on PMs, on BMs, hybrid),
// Rm = 11/12, thresholds of 0.3 (10 LSB), at several noise levels. The decoder runs
// at its default sizes. Checked: the full trellis always performs 64 x 8 = 512
// additions; each purging mode performs fewer on average; the hybrid mode performs
// fewer than either single mode; and the hybrid mode's bit errors, summed over all
// noise levels, stay within 30% (plus 150 bits, about one error burst) of those of
// the T-algorithm on PMs. Errors come in bursts, so one run of 1500 symbols at a single
// noise level is too short to compare error counts point by point.
// A fifth run uses the hybrid mode with the BM threshold raised to 0.4 (13 LSB), the
// setting at which the hybrid decoder's error rate is reported to match the PM-only
// decoder's: it must keep at least as many additions as the 0.3 hybrid, still fewer
// than the PM-only mode, and meet the same bound on its summed errors.
module tb_complexity;
  import tcm_pkg::*;
  import tcm_tx_pkg::*;

  localparam int L = 26;
  localparam int NSYM = 1500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid;
  sym_t [3:0]        in_sym;
  rate_e             rate;
  logic              bm_purge_en, pm_purge_en;
  bm_t               t_bm;
  pm_t               t_pm;
  logic              out_valid;
  logic [10:0]       out_bits;
  logic [9:0]        n_add;
  logic              stage_valid;
  logic [N_STATES-1:0] state_alive;
  logic              ev_bm_all_kept, ev_fallback, ev_restart, ev_comp;
  pm_t               spec_real, spec_err;

  tcm_decoder dut (.*);

  int checks = 0, failures = 0;
  longint adds = 0, stages = 0, bit_err = 0, bits = 0;
  bit [10:0] exp_q [$];
  bit counting = 0;

  always @(posedge clk) begin
    if (rst_n && stage_valid && counting) begin
      adds += n_add;
      stages++;
    end
    if (rst_n && out_valid) begin
      bit [10:0] e;
      e = exp_q.pop_front();
      if (counting) begin
        bit_err += $countones(e ^ out_bits);
        bits += 11;
      end
    end
  end

  task automatic run(bit bme, bit pme, int tbm, int sigma, output real avg, output longint errs);
    tcm_tx tx;
    tx = new(RM_11_12);
    bm_purge_en = bme;
    pm_purge_en = pme;
    t_bm = bm_t'(tbm);
    in_valid <= 0;
    rst_n <= 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    exp_q.delete();
    adds = 0; stages = 0; bit_err = 0; bits = 0;
    @(posedge clk);
    counting = 1;
    for (int k = 0; k < NSYM + L + 8; k++) begin
      bit [10:0] info;
      bit [11:0] x;
      bit [2:0]  z [4];
      info = 11'($urandom);
      tx.encode(info, x, z);
      for (int d = 0; d < 4; d++) in_sym[d] <= modulate(z[d], sigma);
      in_valid <= 1;
      exp_q.push_back(info);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (L + 10) @(posedge clk);
    counting = 0;
    avg = real'(adds) / real'(stages);
    errs = bit_err;
  endtask

  initial begin
    int sig [4] = '{4, 5, 6, 7};
    longint tot_pm = 0, tot_hy = 0, tot_h4 = 0;
    in_valid = 0; in_sym = '0; rate = RM_11_12;
    t_bm = bm_t'(T_BM_DEFAULT);
    t_pm = pm_t'(T_PM_DEFAULT);
    foreach (sig[s]) begin
      real    a_full, a_pm, a_bm, a_hy, a_h4;
      longint e_full, e_pm, e_bm, e_hy, e_h4;
      run(0, 0, T_BM_DEFAULT, sig[s], a_full, e_full);
      run(0, 1, T_BM_DEFAULT, sig[s], a_pm,   e_pm);
      run(1, 0, T_BM_DEFAULT, sig[s], a_bm,   e_bm);
      run(1, 1, T_BM_DEFAULT, sig[s], a_hy,   e_hy);
      run(1, 1, 13,           sig[s], a_h4,   e_h4);
      $display("sigma=%0d (Es/N0 %.1f dB): additions/stage full %.1f  T-PM %.1f  T-BM %.1f  hybrid %.1f | bit errors full %0d  T-PM %0d  T-BM %0d  hybrid %0d of %0d",
               sig[s], 10.0 * $log10(1024.0 / (2.0 * sig[s] * sig[s])),
               a_full, a_pm, a_bm, a_hy, e_full, e_pm, e_bm, e_hy, NSYM * 11);
      checks++; if (a_full != 512.0) begin failures++; $display("FAIL full trellis %.1f", a_full); end
      checks++; if (!(a_pm < 512.0 && a_bm < 512.0)) begin failures++; $display("FAIL no reduction"); end
      checks++; if (!(a_hy < a_pm && a_hy < a_bm)) begin failures++; $display("FAIL hybrid not lowest"); end
      $display("  hybrid with T-bm 0.4: additions/stage %.1f, bit errors %0d", a_h4, e_h4);
      checks++; if (!(a_h4 >= a_hy && a_h4 < a_pm)) begin failures++; $display("FAIL hybrid 0.4 additions %.1f", a_h4); end
      tot_pm += e_pm; tot_hy += e_hy; tot_h4 += e_h4;
    end
    $display("bit errors summed over all noise levels: T-PM %0d  hybrid %0d  hybrid(T-bm 0.4) %0d", tot_pm, tot_hy, tot_h4);
    checks++; if (real'(tot_hy) > 1.3 * real'(tot_pm) + 150.0) begin failures++; $display("FAIL hybrid errors"); end
    checks++; if (real'(tot_h4) > 1.3 * real'(tot_pm) + 150.0) begin failures++; $display("FAIL hybrid 0.4 errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
