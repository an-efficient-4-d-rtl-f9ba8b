// tb_tcm_decoder: end-to-end test of the 4-D 8PSK TCM decoder at its default sizes.
//
// A transmitter model encodes random information words (differential encoder,
// rate-3/4 convolutional encoder, 4-D mapper, 8PSK modulator) and the decoder must
// return the same words. Phases, each starting from reset:
//   A  Rm = 11/12, hybrid T-algorithm, noiseless, unbroken stream: all words correct
//      and the latency is SMU_DEPTH + 6 clocks
//   B  Rm = 11/12, hybrid, moderate noise, gaps in in_valid: all words correct
//   C  Rm = 10/11, 9/10, 8/9 (a mode switch each), noisy: all words correct
//   D  full trellis (both purges off): all words correct, 512 additions per stage
//   E  thresholds 0 under heavy noise: forces the all-purged safeguards (output not
//      checked, the decoder must come back in phase F)
//   F  hybrid again after E without reset: words correct once the pipeline is flushed
// Every SPEC-T correction must have a non-negative estimation error.
// Mechanisms counted and required at least once: BMs purged, states purged (PM
// threshold), SPEC-T corrections, rate switches, input gaps, additions saved,
// BM safeguard or state fallback/restart.
module tb_tcm_decoder;
  import tcm_pkg::*;
  import tcm_tx_pkg::*;

  localparam int L   = 26;          // SMU_DEPTH default of the decoder
  localparam int LAT = L + 6;

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
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected words, in order, with the cycle each was sent
  bit [10:0] exp_q [$];
  int        t_q   [$];
  bit        check_out = 1;
  int        skip_out  = 0;
  int        n_ok = 0;

  // mechanism counters
  int n_bm_purged = 0, n_state_purged = 0, n_comp = 0, n_rate_sw = 0, n_gaps = 0;
  int n_safe = 0, n_saved_stages = 0, n_full512 = 0;
  int lat_checked = 0;
  bit require_512 = 0;

  always @(posedge clk) begin
    if (rst_n && stage_valid) begin
      if (n_add < 512) n_saved_stages++;
      if (require_512) begin
        checks++;
        if (n_add != 512) begin
          failures++;
          if (failures < 10) $display("FAIL full trellis n_add=%0d", n_add);
        end else n_full512++;
      end
      if (state_alive != '1) n_state_purged++;
    end
    if (rst_n && dut.b_valid && dut.b_keep != '1) n_bm_purged++;
    if (rst_n && ev_comp) begin
      // the estimate can never fall below the true optimum
      n_comp++;
      checks++;
      if (spec_err[PM_W-1]) begin
        failures++;
        $display("FAIL negative estimation error %0d", $signed(spec_err));
      end
    end
    if (rst_n && (ev_fallback || ev_restart || ev_bm_all_kept)) n_safe++;
    if (rst_n && out_valid) begin
      bit [10:0] e;
      int        t;
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL output without a symbol");
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (skip_out > 0) skip_out--;
        else if (check_out) begin
          checks++;
          if (out_bits !== e) begin
            failures++;
            if (failures < 10) $display("FAIL phase %s cyc %0d got %h exp %h", phase, cyc, out_bits, e);
          end else n_ok++;
          if (lat_checked < 3 && t >= 0) begin
            checks++;
            lat_checked++;
            if (cyc - t != LAT) begin
              failures++;
              $display("FAIL latency %0d exp %0d", cyc - t, LAT);
            end
          end
        end
      end
    end
  end

  tcm_tx tx;
  string phase = "A";

  task automatic do_reset();
    in_valid <= 0;
    rst_n <= 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    exp_q.delete();
    t_q.delete();
    @(posedge clk);
  endtask

  // send n symbols; gap_pct: chance of an idle cycle before each symbol
  task automatic send(int n, int sigma, int gap_pct, bit timed);
    for (int k = 0; k < n; k++) begin
      bit [10:0] info;
      bit [11:0] x;
      bit [2:0]  z [4];
      while ($urandom_range(99) < gap_pct) begin
        in_valid <= 0;
        n_gaps++;
        @(posedge clk);
      end
      info = 11'($urandom);
      tx.encode(info, x, z);
      for (int d = 0; d < 4; d++) in_sym[d] <= modulate(z[d], sigma);
      in_valid <= 1;
      exp_q.push_back(info);
      t_q.push_back(timed ? cyc + 1 : -1);
      @(posedge clk);
    end
    in_valid <= 0;
  endtask

  // flush: send L+8 more symbols (checked too), then wait for the queue to drain
  task automatic flush(int sigma);
    send(L + 8, sigma, 0, 0);
    repeat (LAT + 4) @(posedge clk);
    // the last L-1 symbols stay inside the survivor memory
    exp_q.delete();
    t_q.delete();
  endtask

  task automatic set_rate(rate_e r);
    if (r != rate) n_rate_sw++;
    rate = r;
    tx = new(r);
  endtask

  initial begin
    in_valid = 0;
    in_sym = '0;
    rate = RM_11_12;
    bm_purge_en = 1;
    pm_purge_en = 1;
    t_bm = bm_t'(T_BM_DEFAULT);
    t_pm = pm_t'(T_PM_DEFAULT);
    tx = new(RM_11_12);

    // A: noiseless, unbroken stream, latency
    do_reset();
    send(200, 0, 0, 1);
    flush(0);

    // B: noise and gaps
    phase = "B";
    do_reset();
    tx = new(RM_11_12);
    send(600, 3, 20, 0);
    flush(3);

    // C: the other rate modes
    phase = "C";
    set_rate(RM_10_11); do_reset(); send(300, 3, 5, 0); flush(3);
    set_rate(RM_9_10);  do_reset(); send(300, 4, 5, 0); flush(4);
    set_rate(RM_8_9);   do_reset(); send(300, 4, 5, 0); flush(4);

    // D: full trellis
    phase = "D";
    set_rate(RM_11_12); do_reset();
    bm_purge_en = 0; pm_purge_en = 0;
    require_512 = 1;
    send(200, 3, 0, 0);
    flush(3);
    require_512 = 0;
    bm_purge_en = 1; pm_purge_en = 1;

    // E: zero thresholds, heavy noise, output unchecked
    phase = "E";
    do_reset();
    tx = new(RM_11_12);
    t_bm = 0; t_pm = 0;
    check_out = 0;
    send(300, 12, 0, 0);
    // F: back to the normal thresholds without reset, low noise
    phase = "F";
    t_bm = bm_t'(T_BM_DEFAULT); t_pm = pm_t'(T_PM_DEFAULT);
    send(2 * L, 0, 0, 0);
    repeat (LAT + 2) @(posedge clk);
    check_out = 1;
    // the differential decoder needs one correct symbol before words are correct
    skip_out = 1;
    send(200, 0, 0, 0);
    flush(0);

    // mechanisms
    checks++; if (n_ok < 1500)        begin failures++; $display("FAIL only %0d words", n_ok); end
    checks++; if (lat_checked != 3)   begin failures++; $display("FAIL latency never checked"); end
    checks++; if (n_bm_purged == 0)   begin failures++; $display("FAIL no BM purged"); end
    checks++; if (n_state_purged == 0) begin failures++; $display("FAIL no state purged"); end
    checks++; if (n_comp == 0)        begin failures++; $display("FAIL no SPEC-T correction"); end
    checks++; if (n_rate_sw < 3)      begin failures++; $display("FAIL rate switches %0d", n_rate_sw); end
    checks++; if (n_gaps == 0)        begin failures++; $display("FAIL no input gaps"); end
    checks++; if (n_saved_stages == 0) begin failures++; $display("FAIL no additions saved"); end
    checks++; if (n_full512 == 0)     begin failures++; $display("FAIL full trellis not run"); end
    checks++; if (n_safe == 0)        begin failures++; $display("FAIL safeguard never fired"); end
    $display("mechanisms: words=%0d bm_purged=%0d state_purged=%0d comp=%0d rate_sw=%0d gaps=%0d saved=%0d safe=%0d",
             n_ok, n_bm_purged, n_state_purged, n_comp, n_rate_sw, n_gaps, n_saved_stages, n_safe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
