`timescale 1ns / 1ps
// tb_random_pairing_gen: after seeding, each request must yield the two
// addresses a reference 28-bit LFSR gives after AW more steps, reduced below
// the PN count, with 'valid' AW + 1 cycles after the request.
module tb_random_pairing_gen;
  import help_pkg::*;
  localparam int AW = 13;
  logic clk = 0, rst_n = 0, seed_load = 0, next = 0;
  logic [27:0] seed = 0;
  logic [AW:0] count = 0;
  logic [AW-1:0] addr1, addr2;
  logic valid;
  int checks = 0, failures = 0;

  random_pairing_gen #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [27:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    seed = 28'h5A5A5A5; seed_load = 1;
    @(negedge clk) seed_load = 0;
    r = seed;
    for (int t = 0; t < 50; t++) begin
      automatic int lat = 0;
      count = (AW+1)'(1 + $urandom % 9000);
      next = 1;
      @(negedge clk) next = 0;
      while (!valid && lat < 100) begin @(negedge clk); lat++; end
      for (int s = 0; s < AW; s++) r = {r[26:0], r[27] ^ r[24]};
      begin
        automatic int a1 = int'(r[AW-1:0]) % int'(count);
        automatic int a2 = int'(r[27 -: AW]) % int'(count);
        checks++;
        if (int'(addr1) != a1 || int'(addr2) != a2 || lat != AW) begin
          failures++;
          $display("FAIL t=%0d got %0d %0d exp %0d %0d lat %0d", t, addr1, addr2, a1, a2, lat);
        end
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
