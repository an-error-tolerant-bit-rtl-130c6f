`timescale 1ns / 1ps
// tb_rebel_row: launches a transition (or a glitch) at the insertion point
// and captures after a chosen time. Checks that the FFs left of the IP hold
// the functional MUT values, and that in the flush-delay chain stage n shows
// the new value exactly when the transition arrived at least
// (n + 1) * STAGE_DELAY before the capture edge.
module tb_rebel_row;
  import help_pkg::*;
  localparam realtime S = 0.25;
  logic capture_clk = 0;
  logic [N_IP-1:0] mut_out = '0;
  logic [ROW_LEN-1:0] ip_sel, fd_mode, row_q;
  int checks = 0, failures = 0;

  rebel_row #(.STAGE_DELAY(S)) dut (.*);

  task automatic trial(input int ip, input realtime t_cap, input bit glitch);
    realtime t0;
    ip_sel = '0; ip_sel[ip] = 1'b1;
    for (int j = 0; j < ROW_LEN; j++) fd_mode[j] = (j >= ip);
    mut_out = '0;
    for (int j = 0; j < ip; j++) mut_out[j] = 1'($urandom);
    #100;
    t0 = $realtime;
    mut_out[ip] = 1'b1;
    if (glitch) begin
      #0.5 mut_out[ip] = 1'b0;
      #0.5 mut_out[ip] = 1'b1;
      #(t_cap - 1.0);
    end else begin
      #(t_cap);
    end
    capture_clk = 1;
    #1 capture_clk = 0;
    for (int j = 0; j < ip; j++) begin
      checks++;
      if (row_q[j] != mut_out[j]) failures++;
    end
    for (int n = 0; ip + n < ROW_LEN && n < 40; n++) begin
      automatic realtime tn = t_cap - real'(n + 1) * S;   // time seen by stage n
      automatic bit expv = glitch ? ((tn >= 0.0 && tn < 0.5) || tn >= 1.0) : (tn >= 0.0);
      checks++;
      if (row_q[ip + n] != expv) begin
        failures++;
        $display("FAIL ip=%0d t=%0.2f stage %0d got %b", ip, t_cap, n, row_q[ip + n]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 40; k++)
      trial($urandom % 256, ((k % 4 == 3) ? 1.13 : 0.13) + real'($urandom % 400) / 100.0, k % 4 == 3);
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
