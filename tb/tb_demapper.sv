// tb_demapper: exhaustive check of the 4-D demapper against the mapping equation.
// All 4096 bit words are mapped by the reference mapper and must come back unchanged.
module tb_demapper;
  import tcm_pkg::*;
  import tcm_tx_pkg::*;

  path_t       path;
  logic [11:0] x;
  int checks = 0, failures = 0;

  demapper dut (.path(path), .x(x));

  initial begin
    for (int w = 0; w < 4096; w++) begin
      bit [2:0] z [4];
      map4(12'(w), z);
      path = {z[3], z[2], z[1], z[0]};
      #1;
      checks++;
      if (x !== 12'(w)) begin
        failures++;
        if (failures < 10) $display("FAIL w=%h got %h", w, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
