`timescale 1ns / 1ps
// tb_dpnc: drives random group streams through enrollment and checks the
// generated bits and stop points against a run-counter model; then replays
// the same stream in regeneration with some decisions flipped and checks
// the majority-vote bits against a sliding-window model, for k = 3, 5, 7.
module tb_dpnc;
  import help_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, group_hi = 0, sp_in = 0;
  logic [7:0] k = 5;
  help_mode_e mode = MODE_ENROLL;
  logic bit_gen, bit_val, sp_out;
  int checks = 0, failures = 0;

  dpnc dut (.*);
  always #5 clk = ~clk;

  localparam int L = 400;
  bit g [L], sp [L], gr [L];

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int kk = 3; kk <= 7; kk += 2) begin
      automatic int lo = 0, hi = 0, nflip = 0;
      bit q [$];
      k = 8'(kk);
      for (int i = 0; i < L; i++) g[i] = ($urandom % 100) < 55;
      // enrollment
      @(negedge clk) clear = 1; mode = MODE_ENROLL;
      @(negedge clk) clear = 0;
      for (int i = 0; i < L; i++) begin
        bit eg;
        if (g[i]) begin hi++; lo = 0; end else begin lo++; hi = 0; end
        eg = (hi == kk || lo == kk);
        if (eg) begin hi = 0; lo = 0; end
        group_hi = g[i]; step = 1;
        #1;
        check(bit_gen == eg && sp_out == eg && (!eg || bit_val == g[i]), $sformatf("enroll k=%0d i=%0d", kk, i));
        sp[i] = sp_out;
        @(negedge clk);
      end
      step = 0;
      // regeneration with some flipped decisions
      q.delete();
      @(negedge clk) clear = 1; mode = MODE_REGEN;
      @(negedge clk) clear = 0;
      for (int i = 0; i < L; i++) begin
        automatic int ones = 0;
        gr[i] = g[i];
        if (($urandom % 100) < 8) begin gr[i] = ~g[i]; nflip++; end
        q.push_back(gr[i]);
        if (q.size() > kk) void'(q.pop_front());
        foreach (q[j]) ones += int'(q[j]);
        group_hi = gr[i]; sp_in = sp[i]; step = 1;
        #1;
        check(bit_gen == sp[i] && (!sp[i] || bit_val == (ones > kk / 2)), $sformatf("regen k=%0d i=%0d", kk, i));
        @(negedge clk);
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
