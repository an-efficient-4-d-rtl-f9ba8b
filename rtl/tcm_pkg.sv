// tcm_pkg: widths, types and trellis helpers shared by the 4-D 8PSK TCM decoder.
//
// Word lengths. The received I/Q samples are 7-bit two's complement, as the design's
// finite-word-length study recommends. The unit amplitude of an 8PSK point is 32 LSB
// (this design's choice), so a noiseless sample is at most +-32 and the 7-bit range
// leaves 2x headroom for noise. A Euclidean metric C_i is a magnitude of at most 91
// (7 bits unsigned); a branch metric (BM) is the sum of four such metrics (9 bits);
// path metrics (PM) are 12-bit and compared modulo 2^12.
//
// Trellis. The decoder works on a 64-state rate-3/4 systematic feedback convolutional
// code: inputs x3 x2 x1, coded bit x0. The code itself is a parameter of this package
// (parity-check polynomials H0..H3, observer canonical form): the values below are this
// design's own choice and must be replaced by those of the transmitter actually used.
// State bit s[0] is the coded output x0 of the branches leaving the state.
//
// Rate modes. Rm = 8/9, 9/10, 10/11 and 11/12 differ in how many of the four
// "candidate" bits x8, x4, x6, x5 carry data; the others are sent as 0. Which bits are
// dropped is this design's choice: 10/11 drops x5, 9/10 drops x5 and x6, 8/9 drops
// x5, x6 and x4 (x8 is kept so that the mod-8 differential code stays closed).
package tcm_pkg;

  localparam int unsigned IQ_W     = 7;    // received sample width
  localparam int unsigned AMP      = 32;   // unit 8PSK amplitude in LSB
  localparam int unsigned C_W      = 7;    // Euclidean metric width
  localparam int unsigned BM_W     = 9;    // branch metric width
  localparam int unsigned PM_W     = 12;   // path metric width (modular)
  localparam int unsigned NU       = 6;    // encoder memory
  localparam int unsigned N_STATES = 64;
  localparam int unsigned N_BM     = 16;   // one BM per (x3,x2,x1,x0)
  localparam int unsigned N_IN     = 8;    // branches entering each state
  localparam int unsigned PATH_W   = 12;   // four 3-bit 8PSK point labels

  // Thresholds 0.3 (PM) and 0.3 (BM) of the unit amplitude, in LSB.
  localparam int unsigned T_PM_DEFAULT = 10;
  localparam int unsigned T_BM_DEFAULT = 10;

  // Parity-check polynomials of the code, bit k = coefficient of D^k.
  // H0 must have bits 0 and NU set; H1..H3 must have bits 0 and NU clear.
  localparam logic [NU:0] H0 = 7'o103;
  localparam logic [NU:0] H1 = 7'o024;
  localparam logic [NU:0] H2 = 7'o030;
  localparam logic [NU:0] H3 = 7'o042;

  typedef enum logic [1:0] {
    RM_8_9   = 2'd0,
    RM_9_10  = 2'd1,
    RM_10_11 = 2'd2,
    RM_11_12 = 2'd3
  } rate_e;

  typedef logic signed [IQ_W-1:0] iq_t;
  typedef logic [C_W-1:0]         cmet_t;
  typedef logic [BM_W-1:0]        bm_t;
  typedef logic [PM_W-1:0]        pm_t;
  typedef logic [NU-1:0]          state_t;
  typedef logic [2:0]             psk_t;   // 8PSK point label, phase = label*45 deg
  typedef logic [PATH_W-1:0]      path_t;  // {Z3, Z2, Z1, Z0}

  typedef struct packed {
    iq_t i;
    iq_t q;
  } sym_t;

  // Per-dimension Euclidean metrics C0..C3 and the sign of each projection
  // (sign=1: the point s+4 is the closer one of the pair s, s+4).
  typedef struct packed {
    cmet_t [3:0] c;
    logic  [3:0] neg;
  } emet_t;

  // Feedback term of one observer-form tap.
  function automatic logic tap(input int unsigned k, input logic s1, input logic [2:0] u);
    return (H0[k] & s1) ^ (H1[k] & u[0]) ^ (H2[k] & u[1]) ^ (H3[k] & u[2]);
  endfunction

  // Next encoder state for state s and input u = {x3,x2,x1}.
  function automatic state_t next_state(input state_t s, input logic [2:0] u);
    state_t n;
    for (int unsigned k = 1; k < NU; k++) n[k-1] = s[k] ^ tap(k, s[0], u);
    n[NU-1] = tap(NU, s[0], u);
    return n;
  endfunction

  // Predecessor of state n along the branch with input u.
  function automatic state_t prev_state(input state_t n, input logic [2:0] u);
    state_t p;
    p[0] = n[NU-1];
    for (int unsigned k = 1; k < NU; k++) p[k] = n[k-1] ^ tap(k, p[0], u);
    return p;
  endfunction

  // Which of x8, x4, x6, x5 may be 1 in a rate mode: {x8, x4, x6, x5}.
  function automatic logic [3:0] cand_mask(input rate_e r);
    case (r)
      RM_8_9:   return 4'b1000;
      RM_9_10:  return 4'b1100;
      RM_10_11: return 4'b1110;
      default:  return 4'b1111;
    endcase
  endfunction

  // Modular "a > b" for path metrics.
  function automatic logic pm_gt(input pm_t a, input pm_t b);
    pm_t d;
    d = a - b;
    return (d != '0) && !d[PM_W-1];
  endfunction

endpackage
