// tb_diff_decoder: a random word stream is differentially encoded (mod 8 on
// x11,x8,x4) by the testbench; the decoder must return the original words one clock
// later, including across input gaps.
module tb_diff_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  logic [11:0] in_x, out_x;

  diff_decoder dut (.*);

  int checks = 0, failures = 0;
  bit [11:0] exp_q [$];

  always @(posedge clk) if (rst_n && out_valid) begin
    bit [11:0] e;
    e = exp_q.pop_front();
    checks++;
    if (out_x !== e) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", out_x, e);
    end
  end

  initial begin
    bit [2:0] a;
    a = 0;
    in_valid = 0; in_x = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      bit [11:0] w, c;
      bit [2:0]  u;
      w = 12'($urandom);
      u = {w[11], w[8], w[4]};
      a = a + u;
      c = w;
      {c[11], c[8], c[4]} = a;
      exp_q.push_back(w);
      in_x <= c;
      in_valid <= 1;
      @(posedge clk);
      if (n % 11 == 5) begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
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
