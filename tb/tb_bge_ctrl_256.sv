`timescale 1ns / 1ps
// tb_bge_ctrl_256: full-length bitstring workload for the BitGen Engine.
// The engine is used at its default sizes (16384-word PN memory, 256-bit
// bitstring). A stream of 16000 PNs with random low/high groups, near the
// centres of the acceptance regions for M = 22, is enrolled with k = 5 until
// all 256 bits exist (about 31 PNs per bit on average), then regenerated
// after a +6 shift with 2 % of the PNs jumping by 11 (into the other group).
// Checks the TCOMP mean and offset, every stop point, both 256-bit
// bitstrings against an independent model, and that regeneration restores
// the enrolled bits; the number of bits whose window held a jumped PN
// (a majority correction) is reported and must be non-zero.
module tb_bge_ctrl_256;
  import help_pkg::*;
  localparam int AW = $clog2(PN_DEPTH), NPN = 16000, NB = 256;
  logic clk = 0, rst_n = 0, start = 0;
  help_mode_e mode = MODE_ENROLL;
  run_params_t prm;
  logic [AW:0] pn_count = AW'(NPN);
  logic [AW-1:0] pn_raddr;
  logic [PN_W-1:0] pn_rdata;
  logic sp_we, sp_wdata, sp_rdata;
  logic [NBITS_MAX-1:0] bitstring;
  logic [8:0] nbits_made;
  logic [PN_W-1:0] enroll_mean;
  logic signed [PN_W+1:0] offset;
  logic busy, done;
  int checks = 0, failures = 0;

  logic [7:0] pnm [1 << AW];
  logic spm [1 << AW];
  bit   spref [1 << AW];

  bge_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    pn_rdata <= pnm[pn_raddr];
    sp_rdata <= spm[pn_raddr];
    if (sp_we) spm[pn_raddr] <= sp_wdata;
  end

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  function automatic int modp(input int v);
    int r = v % 22;
    return (r < 0) ? r + 22 : r;
  endfunction

  initial begin
    int cyc, sum, mean_e, off, nb, lo, hi, fixes;
    logic [NBITS_MAX-1:0] ebits, rbits;
    bit q [$];
    prm = '{seed: 1, mod_m: 22, win: 1, k: 5, thresh: 2, num_pns: NPN, nbits: 16'(NB)};
    for (int a = 0; a < NPN; a++) pnm[a] = 8'(22 * ($urandom % 5) + ((($urandom % 2) == 1) ? 16 : 5) + $urandom % 3 - 1);
    for (int a = 0; a < (1 << AW); a++) spm[a] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // model enrollment
    sum = 0; for (int a = 0; a < 64; a++) sum += pnm[a];
    mean_e = sum / 64;
    ebits = '0; nb = 0; lo = 0; hi = 0;
    for (int a = 0; a < NPN && nb < NB; a++) begin
      automatic bit g = modp(pnm[a]) >= 11;
      spref[a] = 0;
      if (g) begin hi++; lo = 0; end else begin lo++; hi = 0; end
      if (hi == 5 || lo == 5) begin ebits[nb] = g; nb++; spref[a] = 1; hi = 0; lo = 0; end
    end
    @(negedge clk) start = 1; mode = MODE_ENROLL;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 400000) begin @(negedge clk); cyc++; end
    check(enroll_mean == 8'(mean_e), "enrollment mean");
    check(bitstring == ebits && int'(nbits_made) == nb, "enrollment bitstring");
    for (int a = 0; a < NPN; a++) if (a <= int'(dut.addr)) check(spm[a] == spref[a], $sformatf("stop point %0d", a));
    // regeneration: PNs shift by +6, a few jump by 11
    for (int a = 0; a < NPN; a++) pnm[a] = pnm[a] + 6 + ((($urandom % 100) < 2) ? 11 : 0);
    sum = 0; for (int a = 0; a < 64; a++) sum += pnm[a];
    off = mean_e - sum / 64;
    rbits = '0; nb = 0; fixes = 0;
    for (int a = 0; a < NPN && nb < NB; a++) begin
      automatic int ones = 0;
      q.push_back(modp(pnm[a] + off) >= 11);
      if (q.size() > 5) void'(q.pop_front());
      if (spref[a]) begin
        foreach (q[j]) ones += int'(q[j]);
        rbits[nb] = (ones > 2);
        if (ones != 0 && ones != 5) fixes++;
        nb++;
      end
    end
    @(negedge clk) start = 1; mode = MODE_REGEN;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 400000) begin @(negedge clk); cyc++; end
    check(int'(offset) == off, "regeneration offset");
    check(bitstring == rbits, "regeneration bitstring equals model");
    check(bitstring == ebits, "regeneration bitstring equals enrollment");
    check(int'(nbits_made) == NB, "all 256 bits generated");
    check(fixes > 0, "majority correction exercised");
    $display("bits=%0d majority_fixes=%0d", nbits_made, fixes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
