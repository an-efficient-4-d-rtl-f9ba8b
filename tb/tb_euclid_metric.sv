// tb_euclid_metric: checks the four folded Euclidean metrics and their signs against
// the signed projections onto all eight 8PSK points: C_i must be the larger of the
// projections onto points i and i+4, and neg_i must tell which one it was.
// Every 7-bit (I,Q) pair is tried.
module tb_euclid_metric;
  import tcm_pkg::*;
  import tcm_tx_pkg::*;

  sym_t  sym;
  emet_t met;
  int checks = 0, failures = 0;

  euclid_metric dut (.sym(sym), .met(met));

  initial begin
    for (int i = -64; i < 64; i++)
      for (int q = -64; q < 64; q++) begin
        sym.i = 7'(i);
        sym.q = 7'(q);
        #1;
        for (int s = 0; s < 4; s++) begin
          int p, n, c;
          bit ng;
          p  = proj(sym, 3'(s));
          n  = proj(sym, 3'(s + 4));
          c  = (p >= n) ? p : n;
          ng = (p < 0);
          checks++;
          if (int'(met.c[s]) != c || met.neg[s] != ng) begin
            failures++;
            if (failures < 10)
              $display("FAIL I=%0d Q=%0d s=%0d got %0d/%0d exp %0d/%0d", i, q, s,
                       met.c[s], met.neg[s], c, ng);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
