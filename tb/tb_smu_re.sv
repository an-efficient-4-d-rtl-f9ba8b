// tb_smu_re: checks the register-exchange survivor memory against a list model.
// Random decisions, update flags and survivor sets are applied; each state's model
// list is its predecessor's list plus the new branch index {k, x0(pred)}, states not
// updated keep theirs. After every update the output must be the oldest entry of the
// lowest-numbered surviving state, valid from the DEPTH-th update on.
// The predecessor is found by forward search over the encoder state equations.
module tb_smu_re;
  import tcm_pkg::*;
  localparam int D = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid;
  logic [N_STATES-1:0][2:0] dec;
  logic [N_STATES-1:0]      upd;
  logic [N_STATES-1:0]      alive;
  logic                     out_valid;
  logic [3:0]               out_idx;

  smu_re #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  bit [3:0] sm [N_STATES][D];   // [state][age], age 0 newest

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

  initial begin
    in_valid = 0; dec = '0; upd = '0; alive = '1;
    foreach (sm[j, a]) sm[j][a] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 300; n++) begin
      bit [3:0] nsm [N_STATES][D];
      int sel;
      for (int j = 0; j < N_STATES; j++) begin
        dec[j]   = 3'($urandom);
        upd[j]   = ($urandom_range(99) < 80);
        alive[j] = upd[j] || ($urandom_range(99) < 10);
      end
      if (n % 17 == 3) alive[5:0] = '0;
      for (int j = 0; j < N_STATES; j++) begin
        if (upd[j]) begin
          int p;
          p = -1;
          for (int s = 0; s < N_STATES; s++) if (fwd(s, dec[j]) == j) p = s;
          nsm[j][0] = {dec[j], 1'(p & 1)};
          for (int a = 1; a < D; a++) nsm[j][a] = sm[p][a-1];
        end else nsm[j] = sm[j];
      end
      sm = nsm;
      in_valid = 1;
      @(posedge clk);
      #1;
      in_valid = 0;
      sel = 0;
      for (int j = N_STATES - 1; j >= 0; j--) if (alive[j]) sel = j;
      checks++;
      if (out_valid !== (n >= D - 1)) begin
        failures++;
        $display("FAIL n=%0d out_valid %0d", n, out_valid);
      end
      checks++;
      if (out_idx !== sm[sel][D-1]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d idx %0d exp %0d (state %0d)", n, out_idx, sm[sel][D-1], sel);
      end
      if (n % 6 == 2) begin @(posedge clk); #1; end
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
