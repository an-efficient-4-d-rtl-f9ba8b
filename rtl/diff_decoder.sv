// diff_decoder: differential decoder (DFD) for the 45-degree phase ambiguity.
//
// A rotation of the received 4-D symbol by k*45 degrees adds k to all four labels,
// which only changes a = 4*x11 + 2*x8 + x4. The transmitter's differential encoder
// sends a(n) = a(n-1) + u(n) mod 8 (full adders and flip-flops); this unit recovers
// u(n) = a(n) - a(n-1) mod 8 and puts it back in place of x11, x8, x4. The other bits
// pass unchanged. The previous a starts at 0 after reset, as does the encoder's.
// Timing: one register stage, out_* follow in_* by one clock.
module diff_decoder
  import tcm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [11:0]  in_x,
  output logic         out_valid,
  output logic [11:0]  out_x
);

  psk_t a_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_prev    <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        psk_t a, u;
        a      = {in_x[11], in_x[8], in_x[4]};
        u      = a - a_prev;
        a_prev <= a;
        out_x  <= in_x;
        out_x[11] <= u[2];
        out_x[8]  <= u[1];
        out_x[4]  <= u[0];
      end
    end
  end

endmodule
