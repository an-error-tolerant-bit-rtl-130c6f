`timescale 1ns / 1ps
// tb_lc_lfsr_ctrl: checks the launch-vector LFSR against a reference model:
// after a seed load, each request shifts exactly 2*N_IP bits (the
// reference LFSR's MSB sequence) and gen_done follows the last bit; a zero
// seed behaves like seed 1; a reloaded seed replays the same sequence.
module tb_lc_lfsr_ctrl;
  import help_pkg::*;
  logic clk = 0, rst_n = 0, seed_load = 0, gen_req = 0;
  logic [31:0] seed = 0;
  logic scan_en, scan_bit, gen_done, busy;
  int checks = 0, failures = 0;

  lc_lfsr_ctrl dut (.*);
  always #5 clk = ~clk;

  logic [31:0] ref_l;
  task automatic run_pair(input logic [31:0] s);
    int n = 0, cyc = 0;
    ref_l = (s == 0) ? 32'd1 : s;
    @(negedge clk) seed = s; seed_load = 1;
    @(negedge clk) seed_load = 0; gen_req = 1;
    @(negedge clk) gen_req = 0;
    while (!gen_done && cyc < 2000) begin
      if (scan_en) begin
        checks++;
        if (scan_bit !== ref_l[31]) failures++;
        ref_l = {ref_l[30:0], ref_l[31] ^ ref_l[21] ^ ref_l[1] ^ ref_l[0]};
        n++;
      end
      @(negedge clk); cyc++;
    end
    checks++;
    if (n != 2 * N_IP) begin failures++; $display("FAIL: %0d bits shifted", n); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_pair(32'h1234ABCD);
    run_pair(32'h0);
    run_pair(32'hDEADBEEF);
    run_pair(32'h1234ABCD);
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
