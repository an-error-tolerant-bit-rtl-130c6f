`timescale 1ns / 1ps
// tb_rebel_ctrl: for random insertion points and captured rows, checks the
// one-hot IP select, the flush-delay mode vector (IP and everything right of
// it) and the extracted delay-chain segment.
module tb_rebel_ctrl;
  import help_pkg::*;
  logic [7:0] ip;
  logic [ROW_LEN-1:0] row_q, ip_sel, fd_mode;
  logic [CHAIN_LEN-1:0] chain;
  int checks = 0, failures = 0;

  rebel_ctrl dut (.*);

  initial begin
    for (int t = 0; t < 300; t++) begin
      ip = (t < 256) ? 8'(t) : 8'($urandom);
      for (int w = 0; w < ROW_LEN; w++) row_q[w] = 1'($urandom);
      #1;
      for (int j = 0; j < ROW_LEN; j++) begin
        checks++;
        if (ip_sel[j] != (j == int'(ip)) || fd_mode[j] != (j >= int'(ip))) failures++;
      end
      for (int c = 0; c < CHAIN_LEN; c++) begin
        checks++;
        if (chain[c] != row_q[int'(ip) + c]) failures++;
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
