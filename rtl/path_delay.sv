// path_delay: delay chain for the 12-bit paths of the 16 branch metrics.
//
// Inside the Viterbi decoder a branch is known only by its 4-bit index; the 12-bit
// path (four 8PSK point labels) of each of the 16 branches of a stage waits here
// until the survivor memory releases the decoded index of that stage, which then
// selects one of them. The chain is a circular buffer of DEPTH stages of 16 paths,
// written once per in_valid; right after a write, the oldest stage (written DEPTH
// writes ago, counting this one as the first) is presented, so with the same DEPTH
// and the same strobe as smu_re the output lines up with its out_idx.
// Interface: sel picks the path; out_path is combinational from the buffer.
module path_delay
  import tcm_pkg::*;
#(
  parameter int unsigned DEPTH = 26
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  path_t [N_BM-1:0]     in_path,
  input  logic  [3:0]          sel,
  output path_t                out_path
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  path_t [N_BM-1:0] mem [DEPTH];
  logic  [AW-1:0]   wp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
    end else if (in_valid) begin
      wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= in_path;
  end

  // the entry about to be overwritten is the oldest one
  assign out_path = mem[wp][sel];

endmodule
