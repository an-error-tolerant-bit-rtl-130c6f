`timescale 1ns / 1ps
// tb_launch_rows: scans random vector pairs into the two launch rows and
// checks that the MUT inputs show V1 before the launch, V2 after it, V1 again
// after the launch is released, and that scan_out returns the first bits.
module tb_launch_rows;
  localparam int N = 256;
  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, launch = 0;
  logic scan_out, launched;
  logic [N-1:0] mut_in;
  int checks = 0, failures = 0;

  launch_rows #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [2*N-1:0] bits;
    logic [N-1:0] v1, v2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 2 * N; i++) bits[i] = 1'($urandom);
      scan_en = 1;
      for (int i = 0; i < 2 * N; i++) begin
        scan_in = bits[i];
        @(negedge clk);
      end
      scan_en = 0;
      // bit i shifted in first travels furthest: init_row[N-1-i] for i < N
      for (int i = 0; i < N; i++) begin
        v1[N-1-i] = bits[i];
        v2[N-1-i] = bits[N+i];
      end
      @(negedge clk);
      check(mut_in == v1, "V1 applied before launch");
      check(scan_out == bits[0], "scan_out is the first bit scanned in");
      launch = 1;
      @(negedge clk);
      check(mut_in == v2 && launched, "V2 applied after launch");
      launch = 0;
      @(negedge clk);
      check(mut_in == v1 && !launched, "V1 restored");
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
