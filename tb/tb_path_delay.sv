// tb_path_delay: writes random path sets and checks that, right after each write,
// the selected path of the set written DEPTH writes earlier comes out, for a random
// selector, across input gaps. Uses a small DEPTH to keep the run short.
module tb_path_delay;
  import tcm_pkg::*;
  localparam int unsigned D = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid;
  path_t [N_BM-1:0]     in_path;
  logic  [3:0]          sel;
  path_t                out_path;

  path_delay #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  path_t [N_BM-1:0] hist [$];

  initial begin
    in_valid = 0; in_path = '0; sel = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      path_t [N_BM-1:0] p;
      for (int k = 0; k < N_BM; k++) p[k] = path_t'($urandom);
      hist.push_back(p);
      in_path <= p;
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      sel = 4'($urandom);
      #1;
      if (hist.size() >= D) begin
        checks++;
        if (out_path !== hist[hist.size() - D][sel]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d got %h exp %h", n, out_path, hist[hist.size()-D][sel]);
        end
      end
      if (n % 4 == 1) @(posedge clk);
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
