// smu_re: register-exchange survivor path memory for the 64-state trellis.
//
// Every state owns a register of DEPTH entries; an entry is the 4-bit branch index
// {x3,x2,x1,x0} of one trellis stage (the same index that selects a BM and its
// 12-bit path), not the 12-bit path itself. When the ACSU updates state j with
// winning branch k, the register of j becomes the register of its predecessor
// prev_state(j,k), shifted by one entry, with {k, x0(pred)} appended. States the
// T-algorithm purged are not updated (their registers hold, which is where clock
// gating saves power). The decoded index is the oldest entry of the lowest-numbered
// surviving state: after DEPTH stages the survivors have merged, so any surviving
// state gives the same answer (this choice of state is this design's own).
//
// Timing: one update per in_valid; out_valid rises once DEPTH stages have been
// seen, and out_idx then belongs to the stage DEPTH-1 updates before the latest.
module smu_re
  import tcm_pkg::*;
#(
  parameter int unsigned DEPTH = 26
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [N_STATES-1:0][2:0]   dec,
  input  logic [N_STATES-1:0]        upd,
  input  logic [N_STATES-1:0]        alive,      // survivor flags after this stage
  output logic                       out_valid,
  output logic [3:0]                 out_idx
);

  typedef logic [DEPTH-1:0][3:0] surv_t;   // entry 0 newest

  surv_t sreg [N_STATES];
  logic [$clog2(DEPTH+1)-1:0] fill;
  logic [N_STATES-1:0] alive_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg      <= '{default: '0};
      fill      <= '0;
      alive_q   <= '1;
    end else if (in_valid) begin
      alive_q <= alive;
      if (fill != $bits(fill)'(DEPTH)) fill <= fill + 1'b1;
      for (int j = 0; j < N_STATES; j++) begin
        if (upd[j]) begin
          state_t p;
          p = prev_state(state_t'(j), dec[j]);
          sreg[j] <= {sreg[p][DEPTH-2:0], dec[j], p[0]};
        end
      end
    end
  end

  // lowest-numbered surviving state
  always_comb begin
    state_t sel;
    sel = '0;
    for (int j = N_STATES - 1; j >= 0; j--)
      if (alive_q[j]) sel = state_t'(j);
    out_idx   = sreg[sel][DEPTH-1];
    out_valid = (fill == $bits(fill)'(DEPTH));
  end

endmodule
