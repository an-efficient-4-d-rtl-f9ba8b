// demapper: inverse of the 4-D 8PSK mapping (DMU).
//
// The transmitter maps 12 bits x11..x0 onto four 8PSK point labels (mod 8):
//   Z0 = a
//   Z1 = a + 4*x10 + 2*x6 + x2
//   Z2 = a + 4*x9  + 2*x5 + x1
//   Z3 = a + 4*(x10+x9+x7) + 2*(x6+x5+x3) + (x2+x1+x0)
// with a = 4*x11 + 2*x8 + x4. The map is one-to-one, so the bits follow from
// differences of labels: Z0 gives x11 x8 x4, Z1-Z0 gives x10 x6 x2, Z2-Z0 gives
// x9 x5 x1, and Z3-Z0, after removing the known terms, gives x7 x3 x0.
// Combinational. Bits a rate mode does not carry come out as they were received.
module demapper
  import tcm_pkg::*;
(
  input  path_t        path,    // {Z3,Z2,Z1,Z0}
  output logic [11:0]  x        // x[11:0]
);

  always_comb begin
    psk_t z0, z1, z2, z3, d1, d2, d3, r;
    z0 = path[2:0];
    z1 = path[5:3];
    z2 = path[8:6];
    z3 = path[11:9];
    d1 = z1 - z0;
    d2 = z2 - z0;
    d3 = z3 - z0;
    x[11] = z0[2]; x[8] = z0[1]; x[4] = z0[0];
    x[10] = d1[2]; x[6] = d1[1]; x[2] = d1[0];
    x[9]  = d2[2]; x[5] = d2[1]; x[1] = d2[0];
    // d3 = 4*(x10+x9+x7) + 2*(x6+x5+x3) + (x2+x1+x0)
    x[0] = d3[0] ^ x[2] ^ x[1];
    r    = d3 - (3'(x[2]) + 3'(x[1]) + 3'(x[0]));             // 4*(..) + 2*(x6+x5+x3)
    x[3] = r[1] ^ x[6] ^ x[5];
    r    = r - 3'd2 * (3'(x[6]) + 3'(x[5]) + 3'(x[3]));      // 4*(x10+x9+x7)
    x[7] = r[2] ^ x[10] ^ x[9];
  end

endmodule
