// euclid_metric: simplified Euclidean metrics of one received 8PSK symbol.
//
// For a received sample (I, Q) the squared distance to point s differs from
// -(I*Is + Q*Qs) only by a term common to all points, and points s and s+4 are
// antipodal. So four projections decide the closest of every antipodal pair:
//   C0 = |I|, C1 = |(I+Q)*0.707|, C2 = |Q|, C3 = |(Q-I)*0.707|
// A larger C means a closer point. neg[i] is set when the projection is negative,
// i.e. when point i+4 rather than point i is the closer one of the pair. Only the two
// 0.707 products need a multiplier; 0.707 is the constant 181/256 here (this design's
// choice of precision), rounded to nearest.
//
// Purely combinational: sym in, met out in the same cycle.
module euclid_metric
  import tcm_pkg::*;
(
  input  sym_t  sym,
  output emet_t met
);

  logic signed [IQ_W:0] sum_iq, dif_qi;
  logic        [IQ_W:0] mag_sum, mag_dif;
  logic        [IQ_W+8:0] prod_sum, prod_dif;

  always_comb begin
    sum_iq = (IQ_W+1)'(sym.i) + (IQ_W+1)'(sym.q);
    dif_qi = (IQ_W+1)'(sym.q) - (IQ_W+1)'(sym.i);
    mag_sum = sum_iq[IQ_W] ? (IQ_W+1)'(-sum_iq) : (IQ_W+1)'(sum_iq);
    mag_dif = dif_qi[IQ_W] ? (IQ_W+1)'(-dif_qi) : (IQ_W+1)'(dif_qi);
    prod_sum = (IQ_W+9)'(mag_sum) * (IQ_W+9)'(181) + (IQ_W+9)'(128);
    prod_dif = (IQ_W+9)'(mag_dif) * (IQ_W+9)'(181) + (IQ_W+9)'(128);

    met.c[0] = sym.i[IQ_W-1] ? C_W'(-(IQ_W+1)'(sym.i)) : C_W'(sym.i);
    met.c[1] = C_W'(prod_sum >> 8);
    met.c[2] = sym.q[IQ_W-1] ? C_W'(-(IQ_W+1)'(sym.q)) : C_W'(sym.q);
    met.c[3] = C_W'(prod_dif >> 8);
    met.neg  = {dif_qi[IQ_W], sym.q[IQ_W-1], sum_iq[IQ_W], sym.i[IQ_W-1]};
  end

endmodule
