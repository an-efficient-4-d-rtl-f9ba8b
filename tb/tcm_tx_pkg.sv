// tcm_tx_pkg: transmitter model and reference helpers for the decoder testbenches.
//
// A bit-level model of the 4-D 8PSK TCM transmitter: mod-8 differential encoder on
// (x11,x8,x4), the rate-3/4 systematic feedback convolutional encoder written from
// its parity-check equation over stored past bits (deliberately not in the observer
// form the decoder uses), the 4-D mapper, and an 8PSK modulator with amplitude 32
// and optional noise. Also the signed projection of a sample onto a point, the
// reference from which branch metrics are checked by brute force.
package tcm_tx_pkg;
  import tcm_pkg::*;

  class tcm_tx;
    bit [2:0] a_prev;
    bit [NU:1] hx0, hx1, hx2, hx3;   // past bits, hxN[k] = xN(n-k)
    rate_e rate;

    function new(rate_e r);
      rate = r;
      a_prev = 0;
      hx0 = 0; hx1 = 0; hx2 = 0; hx3 = 0;
    endfunction

    // Coded bit of the current stage from the parity-check equation.
    function bit parity();
      bit p;
      p = 0;
      for (int k = 1; k <= NU; k++)
        p ^= (H0[k] & hx0[k]) ^ (H1[k] & hx1[k]) ^ (H2[k] & hx2[k]) ^ (H3[k] & hx3[k]);
      return p;
    endfunction

    // Encoder "state" in the observer-form numbering, for checks only:
    // S_m = sum over k >= m of c_k(n+m-1-k).
    function bit [NU-1:0] obs_state();
      bit [NU-1:0] s;
      for (int m = 1; m <= NU; m++) begin
        bit v;
        v = 0;
        for (int k = m; k <= NU; k++) begin
          int t;
          t = k - m + 1;   // x(n - t)
          v ^= (H0[k] & hx0[t]) ^ (H1[k] & hx1[t]) ^ (H2[k] & hx2[t]) ^ (H3[k] & hx3[t]);
        end
        s[m-1] = v;
      end
      return s;
    endfunction

    // Encode one 4-D symbol. info = {x11..x1} (11 bits; bits the rate does not carry
    // are forced to 0). Returns the 12 coded bits (after differential encoding) and the
    // four point labels; info comes back with the unused bits cleared.
    function void encode(inout bit [10:0] info, output bit [11:0] x, output bit [2:0] z [4]);
      bit [3:0] m;
      bit [2:0] u, a;
      x = {info, 1'b0};
      m = cand_mask(rate);   // {x8,x4,x6,x5}
      if (!m[0]) x[5] = 0;
      if (!m[1]) x[6] = 0;
      if (!m[2]) x[4] = 0;
      if (!m[3]) x[8] = 0;
      info = x[11:1];
      u = {x[11], x[8], x[4]};
      a = a_prev + u;
      a_prev = a;
      {x[11], x[8], x[4]} = a;
      x[0] = parity();
      hx0 = {hx0[NU-1:1], x[0]};
      hx1 = {hx1[NU-1:1], x[1]};
      hx2 = {hx2[NU-1:1], x[2]};
      hx3 = {hx3[NU-1:1], x[3]};
      map4(x, z);
    endfunction
  endclass

  function automatic void map4(input bit [11:0] x, output bit [2:0] z [4]);
    int a;
    a = 4*x[11] + 2*x[8] + x[4];
    z[0] = 3'(a);
    z[1] = 3'(a + 4*x[10] + 2*x[6] + x[2]);
    z[2] = 3'(a + 4*x[9]  + 2*x[5] + x[1]);
    z[3] = 3'(a + 4*(x[10]+x[9]+x[7]) + 2*(x[6]+x[5]+x[3]) + (x[2]+x[1]+x[0]));
  endfunction

  // Modulator: label -> (I,Q), amplitude 32, plus noise of roughly the given
  // standard deviation (sum of uniforms), saturated to 7 bits.
  function automatic sym_t modulate(input bit [2:0] z, input int sigma);
    int iv, qv;
    int tab_i [8] = '{32, 23, 0, -23, -32, -23, 0, 23};
    int tab_q [8] = '{0, 23, 32, 23, 0, -23, -32, -23};
    sym_t s;
    iv = tab_i[z] + noise(sigma);
    qv = tab_q[z] + noise(sigma);
    if (iv > 63) iv = 63;
    if (iv < -64) iv = -64;
    if (qv > 63) qv = 63;
    if (qv < -64) qv = -64;
    s.i = 7'(iv);
    s.q = 7'(qv);
    return s;
  endfunction

  function automatic int noise(input int sigma);
    int acc;
    if (sigma == 0) return 0;
    acc = 0;
    // 12 uniforms on [-0.5,0.5) in units of sigma/64
    for (int k = 0; k < 12; k++) acc += int'($urandom_range(127)) - 64;
    return (acc * sigma) / 128;
  endfunction

  // Signed projection of sample (I,Q) onto point s, with 0.707 = 181/256 rounded
  // to nearest and odd points symmetric about zero.
  function automatic int proj(input sym_t y, input bit [2:0] s);
    int i, q, v, m;
    i = int'(y.i);
    q = int'(y.q);
    case (s[1:0])
      2'd0: v = i;
      2'd2: v = q;
      2'd1: begin v = i + q; m = ((v < 0 ? -v : v) * 181 + 128) >>> 8; v = (v < 0) ? -m : m; end
      default: begin v = q - i; m = ((v < 0 ? -v : v) * 181 + 128) >>> 8; v = (v < 0) ? -m : m; end
    endcase
    return s[2] ? -v : v;
  endfunction

  // Brute-force branch metric of index {x3,x2,x1,x0}: best over all allowed values of
  // the other eight bits of the sum of the four projections.
  function automatic int ref_bm(input sym_t y [4], input bit [3:0] idx, input rate_e r);
    int best;
    bit [3:0] m;
    best = -100000;
    m = cand_mask(r);
    for (int u = 0; u < 256; u++) begin
      bit [11:0] x;
      bit [2:0]  z [4];
      int        v;
      x = 0;
      {x[11], x[10], x[9], x[8], x[7], x[6], x[5], x[4]} = 8'(u);
      x[3:0] = idx;
      if ((!m[3] && x[8]) || (!m[2] && x[4]) || (!m[1] && x[6]) || (!m[0] && x[5])) continue;
      map4(x, z);
      v = 0;
      for (int d = 0; d < 4; d++) v += proj(y[d], z[d]);
      if (v > best) best = v;
    end
    return best;
  endfunction

endpackage
