`timescale 1ns / 1ps
// tb_dce_ctrl: cycle-level test of the Data Collection Engine. A model of
// the MUT + REBEL row returns, for the current path (vector pair, IP) and
// FPA setting, a thermometer-coded delay chain whose edge sits at
// TARGET_FF + FPA - P for a hidden path value P, so the sweep must stop at
// PN = P - 1. Some paths glitch (two transitions), some never switch, some
// lie outside the measurable range. Checks in enrollment: every tested path
// gets the right valid bit (measurable, stable, Mod-PN in the acceptance
// region) and valid paths store PN = P - 1 in order; in regeneration: only
// valid paths are measured and the same PN sequence is stored.
module tb_dce_ctrl;
  import help_pkg::*;
  localparam int VP_AW = 12, PN_AW = 8, NPN = 40;
  logic clk = 0, rst_n = 0, start = 0;
  help_mode_e mode = MODE_ENROLL;
  run_params_t prm;
  logic seed_load, vec_req, vec_done = 0, launch;
  logic [7:0] ip, fpa;
  logic [CHAIN_LEN-1:0] chain;
  logic vp_we, vp_wdata, vp_rdata;
  logic [VP_AW-1:0] vp_addr;
  logic pn_we;
  logic [PN_AW-1:0] pn_waddr;
  logic [PN_W-1:0] pn_wdata;
  logic [VP_AW:0] paths_tested;
  logic [PN_AW:0] pn_count;
  logic busy, done;
  int checks = 0, failures = 0;
  int vec_n = -1;

  dce_ctrl #(.NSAMP(2), .PN_AW(PN_AW), .VP_AW(VP_AW), .SETTLE(1), .CAPWAIT(0)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] h(input int a, input int b);
    logic [31:0] x = 32'(a) * 32'h9E3779B1 ^ 32'(b) * 32'h85EBCA77;
    x = x ^ (x >> 15); x = x * 32'h2C1B3C6D; x = x ^ (x >> 12);
    return x;
  endfunction
  // path kind: 0 normal, 1 glitch, 2 never switches
  function automatic int kind(input int v, input int i);
    logic [31:0] x = h(v, i);
    return (x[7:0] < 20) ? 1 : (x[7:0] < 40) ? 2 : 0;
  endfunction
  function automatic int pval(input int v, input int i);
    return int'(h(v, i) >> 8) % 140;   // 0..139: some outside 1..128
  endfunction

  int e;
  always_comb begin
    e = TARGET_FF + int'(fpa) - pval(vec_n, int'(ip));
    chain = '0;
    for (int j = 0; j < CHAIN_LEN; j++) chain[j] = (j <= e);
    if (kind(vec_n, int'(ip)) == 2) chain = '0;
    if (kind(vec_n, int'(ip)) == 1 && e >= 0 && e < CHAIN_LEN) chain = chain ^ 8'b1000_0000 ^ 8'b0100_0000;
  end

  // LC LFSR controller stand-in: counts vector pairs
  always @(posedge clk) begin
    vec_done <= 1'b0;
    if (seed_load) vec_n <= -1;
    if (vec_req) begin
      vec_n    <= vec_n + 1;
      vec_done <= 1'b1;
    end
  end

  logic vpm [1 << VP_AW];
  logic [7:0] pnm [1 << PN_AW];
  always @(posedge clk) begin
    vp_rdata <= vpm[vp_addr];
    if (vp_we) vpm[vp_addr] <= vp_wdata;
    if (pn_we) pnm[pn_waddr] <= pn_wdata;
  end

  function automatic bit in_win(input int pn);
    int r = pn % 22;
    return (r >= 4 && r <= 6) || (r >= 15 && r <= 17);
  endfunction

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int cyc, np, nvalid = 0, nglitch = 0;
    logic [7:0] epn [NPN];
    prm = '{seed: 5, mod_m: 22, win: 1, k: 5, thresh: 0, num_pns: NPN, nbits: 8};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1; mode = MODE_ENROLL;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 3000000) begin @(negedge clk); cyc++; end
    check(int'(pn_count) == NPN, "enrollment collected num_pns PNs");
    np = int'(paths_tested);
    for (int p = 0; p < np; p++) begin
      automatic int v = p / N_IP, i = p % N_IP, P = pval(v, i), k = kind(v, i);
      automatic bit exp_valid = (k == 0) && P >= 1 && P <= 128 && in_win(P - 1);
      if (k == 1) nglitch++;
      check(vpm[p] == exp_valid, $sformatf("valid bit of path %0d (P=%0d kind=%0d got %0d)", p, P, k, vpm[p]));
      if (exp_valid) begin
        if (nvalid < NPN) check(int'(pnm[nvalid]) == P - 1, $sformatf("PN of path %0d", p));
        nvalid++;
      end
    end
    check(nvalid == NPN && nglitch > 0, "valid count and glitch paths seen");
    for (int a = 0; a < NPN; a++) epn[a] = pnm[a];
    for (int a = 0; a < NPN; a++) pnm[a] = 8'hFF;
    @(negedge clk) start = 1; mode = MODE_REGEN;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 3000000) begin @(negedge clk); cyc++; end
    check(int'(pn_count) == NPN, "regeneration measured the valid paths only");
    for (int a = 0; a < NPN; a++) check(pnm[a] == epn[a], $sformatf("regenerated PN %0d", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
