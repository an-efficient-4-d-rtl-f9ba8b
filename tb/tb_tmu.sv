// tb_tmu: checks the two-step-comparison TMU against a brute-force search.
// For random and for encoded noisy symbols in all four rate modes, every BM must
// equal the best sum of projections over all allowed parallel transitions; the path
// of each BM must demap to that BM's index, use only bits the mode allows, and score
// exactly the BM; bm_max must equal the largest BM in mode 11/12 and bound it in the
// other modes. Outputs must appear exactly 3 clocks after the input.
module tb_tmu;
  import tcm_pkg::*;
  import tcm_tx_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid;
  sym_t  [3:0]          in_sym;
  rate_e                rate;
  logic                 out_valid;
  bm_t   [N_BM-1:0]     bm;
  path_t [N_BM-1:0]     path;
  bm_t                  bm_max;

  tmu dut (.*);

  int checks = 0, failures = 0;

  typedef struct { sym_t y [4]; rate_e r; } item_t;
  item_t sent [$];

  function automatic void fail(string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endfunction

  // pipeline model: valid in -> valid out after exactly 3 clocks
  logic [2:0] vpipe;
  always @(posedge clk) begin
    if (!rst_n) vpipe <= 0;
    else begin
      vpipe <= {vpipe[1:0], in_valid};
      checks++;
      if (out_valid !== vpipe[2]) fail("out_valid timing");
      if (out_valid) check_out();
    end
  end

  task automatic check_out();
    item_t it;
    int    mx;
    it = sent.pop_front();
    mx = 0;
    for (int k = 0; k < N_BM; k++) begin
      int       r, sc;
      bit [2:0] z [4];
      bit [11:0] x;
      bit [3:0] m;
      r = ref_bm(it.y, 4'(k), it.r);
      checks++;
      if (int'(bm[k]) != r) fail($sformatf("bm[%0d]=%0d exp %0d", k, bm[k], r));
      if (r > mx) mx = r;
      z[0] = path[k][2:0]; z[1] = path[k][5:3]; z[2] = path[k][8:6]; z[3] = path[k][11:9];
      sc = 0;
      for (int d = 0; d < 4; d++) sc += proj(it.y[d], z[d]);
      // invert the mapping by search
      x = 0;
      for (int w = 0; w < 4096; w++) begin
        bit [2:0] zz [4];
        map4(12'(w), zz);
        if (zz == z) x = 12'(w);
      end
      m = cand_mask(it.r);
      checks++;
      if (x[3:0] != 4'(k) || sc != r ||
          (!m[3] && x[8]) || (!m[2] && x[4]) || (!m[1] && x[6]) || (!m[0] && x[5]))
        fail($sformatf("path[%0d]=%h x=%h score %0d exp %0d", k, path[k], x, sc, r));
    end
    checks++;
    if (it.r == RM_11_12 ? (int'(bm_max) != mx) : (int'(bm_max) < mx))
      fail($sformatf("bm_max %0d, largest BM %0d", bm_max, mx));
  endtask

  initial begin
    tcm_tx tx;
    in_valid = 0; in_sym = '0; rate = RM_11_12;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 4; r++) begin
      tx = new(rate_e'(r));
      for (int n = 0; n < 60; n++) begin
        item_t it;
        it.r = rate_e'(r);
        if (n % 2 == 0) begin
          for (int d = 0; d < 4; d++) begin
            it.y[d].i = 7'($urandom);
            it.y[d].q = 7'($urandom);
          end
        end else begin
          bit [11:0] x;
          bit [2:0]  z [4];
          bit [10:0] info;
          info = 11'($urandom);
          tx.encode(info, x, z);
          for (int d = 0; d < 4; d++) it.y[d] = modulate(z[d], 6);
        end
        sent.push_back(it);
        for (int d = 0; d < 4; d++) in_sym[d] <= it.y[d];
        rate <= it.r;
        in_valid <= 1;
        @(posedge clk);
        if (n % 7 == 3) begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (sent.size() != 0) fail("outputs missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
