`timescale 1ns / 1ps
// tb_sample_analysis: exhaustive over all 8-bit chain patterns: transition
// count, rightmost edge position and the before-target flag against a
// straightforward reference.
module tb_sample_analysis;
  import help_pkg::*;
  logic [CHAIN_LEN-1:0] chain;
  logic [3:0] ntrans;
  logic [2:0] edge_pos;
  logic has_edge, before_target;
  int checks = 0, failures = 0;

  sample_analysis dut (.*);

  initial begin
    for (int v = 0; v < 256; v++) begin
      automatic int n = 0, e = -1;
      chain = 8'(v);
      #1;
      for (int j = 0; j < 7; j++) if (chain[j] != chain[j+1]) begin n++; e = j; end
      checks++;
      if (int'(ntrans) != n || has_edge != (e >= 0) || (e >= 0 && int'(edge_pos) != e) ||
          before_target != (e >= 0 && e < TARGET_FF)) begin
        failures++;
        $display("FAIL chain=%b", chain);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
