`timescale 1ns / 1ps
// tb_dual_pn_bin: sweeps PNs from -100 to 300 for several even moduli and
// window widths; checks Mod-PN, group and acceptance against a reference.
// Includes the worked example M = 22, win = 1: accepted {4,5,6} (low) and
// {15,16,17} (high), low group 0..10, high group 11..21.
module tb_dual_pn_bin;
  import help_pkg::*;
  logic signed [PN_W+1:0] pn;
  logic [7:0] mod_m, win, modpn;
  logic group_hi, in_window;
  int checks = 0, failures = 0;
  int ms [4] = '{22, 16, 32, 10};

  dual_pn_bin dut (.*);

  initial begin
    foreach (ms[mi]) for (int w = 0; w <= 3; w++) for (int v = -100; v <= 300; v++) begin
      automatic int m = ms[mi], r, half, c, d;
      pn = (PN_W+2)'(v);
      mod_m = 8'(m);
      win = 8'(w);
      #1;
      r = v % m; if (r < 0) r += m;
      half = m / 2;
      c = (r >= half) ? half + (half - 1) / 2 : (half - 1) / 2;
      d = (r > c) ? r - c : c - r;
      checks++;
      if (int'(modpn) != r || group_hi != (r >= half) || in_window != (d <= w)) begin
        failures++;
        $display("FAIL v=%0d m=%0d w=%0d", v, m, w);
      end
    end
    // worked example
    mod_m = 22; win = 1;
    for (int v = 0; v < 22; v++) begin
      pn = (PN_W+2)'(v); #1;
      checks++;
      if (in_window != (v inside {4, 5, 6, 15, 16, 17}) || group_hi != (v >= 11)) failures++;
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
