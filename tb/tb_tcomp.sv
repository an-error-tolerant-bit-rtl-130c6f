`timescale 1ns / 1ps
// tb_tcomp: enrollment pass stores the mean of 64 PNs with offset 0; a
// regeneration pass over shifted PNs gives offset = enrollment mean minus
// regeneration mean. Several shifts, positive and negative.
module tb_tcomp;
  import help_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, acc = 0, finish = 0;
  logic [PN_W-1:0] pn = 0, enroll_mean;
  logic signed [PN_W+1:0] offset;
  help_mode_e mode = MODE_ENROLL;
  int checks = 0, failures = 0;
  int base [64];

  tcomp dut (.*);
  always #5 clk = ~clk;

  task automatic pass(input help_mode_e m, input int shift, output int mean);
    int sum = 0;
    @(negedge clk) clear = 1; mode = m;
    @(negedge clk) clear = 0;
    for (int i = 0; i < 64; i++) begin
      pn = PN_W'(base[i] + shift);
      sum += base[i] + shift;
      acc = 1;
      @(negedge clk);
    end
    acc = 0;
    finish = 1;
    @(negedge clk) finish = 0;
    mean = sum / 64;
  endtask

  initial begin
    int em, rm;
    for (int i = 0; i < 64; i++) base[i] = 20 + $urandom % 90;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pass(MODE_ENROLL, 0, em);
    checks++; if (int'(enroll_mean) != em || offset != 0) failures++;
    foreach (base[i]) ;
    for (int s = -8; s <= 14; s += 2) begin
      pass(MODE_REGEN, s, rm);
      checks++;
      if (int'(offset) != em - rm || int'(enroll_mean) != em) begin
        failures++;
        $display("FAIL shift %0d: offset %0d expected %0d", s, offset, em - rm);
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
