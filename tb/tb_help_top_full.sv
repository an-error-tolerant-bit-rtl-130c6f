`timescale 1ns / 1ps
// tb_help_top_full: end-to-end test of the HELP engine with every parameter at its default.
//
// A MUT delay model and a launch/capture clock model stand in for the AES
// round and the clock managers. Over the UART the test loads run parameters
// (M = 22 and win = 1 as in the worked example of the method,
// k = 5), runs an
// enrollment at the nominal corner, then a regeneration at a shifted corner
// with a few per-path delay "jumps". Checks:
//  - every stored enrollment PN has a Mod-PN inside the acceptance region;
//  - the enrolled bitstring read back ('B') equals an independent DPNC model
//    run over the stored PNs, and the stop points match that model;
//  - the regenerated bitstring equals an independent model (temperature
//    offset from the first 64 PNs, majority over the k PNs before each stop
//    point) and equals the enrolled bitstring;
//  - a PN read over the link ('N') equals the PN memory contents.
// Each mechanism (FPA sweep, glitch abort, range-unstable path, window
// reject, valid-path skip in regeneration, temperature offset, majority
// correction, counter reset by a group change) is counted; one that never
// happened is a failure.
module tb_help_top_full;
  import help_pkg::*;

  localparam int unsigned CPB   = 434;
  localparam realtime     TCLK  = 20.0;
  localparam int unsigned NPN   = 400;
  localparam int unsigned NBITS = 8;
  localparam int unsigned KRUN  = 5;
  localparam int unsigned WATCHDOG_CYCLES = 60000000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic uart_rxd = 1'b1, uart_txd;
  logic capture_clk, launched;
  logic [7:0] fpa;
  logic [N_IP-1:0] mut_in, mut_out;
  logic pair_next = 1'b0, pair_valid, busy;
  logic [$clog2(PN_DEPTH)-1:0] pair_addr1, pair_addr2;
  int   shift_ps = 0;
  logic jump_en  = 1'b0;

  int checks = 0, failures = 0;
  longint unsigned cycles = 0;

  always #10 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles % 200000 == 0)
      $display("[%0d cycles] paths=%0d pn_count=%0d", cycles, dut.u_dce.path, dut.pn_count);
  end

  help_top  dut (
    .clk, .rst_n, .uart_rxd, .uart_txd, .capture_clk, .launched, .fpa, .mut_in, .mut_out,
    .pair_next, .pair_addr1, .pair_addr2, .pair_valid, .busy
  );

  mut_model #(.N(N_IP), .CHIP(7)) u_mut (.mut_in, .mut_out, .shift_ps, .watch(int'(dut.ip)), .jump_en);
  clock_gen_model u_clk (.launched, .fpa, .capture_clk);

  // ---------------- mechanism counters ----------------
  // Encodings of dce_ctrl states observed here (declaration order there).
  localparam logic [3:0] ST_VPCHK = 4'd5, ST_EVAL = 4'd9, ST_PATHEVAL = 4'd11;
  int n_sweep_steps = 0, n_glitch = 0, n_range_unstable = 0, n_window_reject = 0;
  int n_vp_skip = 0, n_majority_fix = 0, n_counter_reset = 0, n_stop_points = 0;
  int n_vecpairs = 0;

  always @(posedge clk) begin
    if (dut.u_dce.state == ST_EVAL) begin
      if (dut.u_dce.ntrans > 1) n_glitch++;
      else n_sweep_steps++;
    end
    if (dut.u_dce.state == ST_PATHEVAL && dut.u_dce.mode_q == MODE_ENROLL) begin
      if ((dut.u_dce.pn_max - dut.u_dce.pn_min) > dut.prm.thresh) n_range_unstable++;
      else if (!dut.u_dce.in_window) n_window_reject++;
    end
    if (dut.u_dce.state == ST_VPCHK && !dut.vp_rdata) n_vp_skip++;
    if (dut.vec_done) n_vecpairs++;
    if (dut.u_bge.u_dpnc.step && dut.u_bge.mode_q == MODE_ENROLL) begin
      if (dut.u_bge.u_dpnc.group_hi ? dut.u_bge.u_dpnc.cnt_lo != 0 : dut.u_bge.u_dpnc.cnt_hi != 0)
        n_counter_reset++;
      if (dut.u_bge.u_dpnc.sp_out) n_stop_points++;
    end
    if (dut.u_bge.u_dpnc.bit_gen && dut.u_bge.mode_q == MODE_REGEN &&
        dut.u_bge.u_dpnc.ones != 0 && 8'(dut.u_bge.u_dpnc.ones) != dut.prm.k)
      n_majority_fix++;
  end

  // ---------------- UART helpers ----------------
  task automatic send_byte(input logic [7:0] b);
    uart_rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rxd = 1'b1;
    repeat (2 * CPB) @(posedge clk);
  endtask

  task automatic recv_byte(output logic [7:0] b);
    @(negedge uart_txd);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = uart_txd;
    end
    repeat (CPB) @(posedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- independent models ----------------
  function automatic int modp(input int v, input int m);
    int r = v % m;
    if (r < 0) r += m;
    return r;
  endfunction

  logic [NBITS_MAX-1:0] model_enroll_bits, model_regen_bits;
  logic sp_model [PN_DEPTH];
  int   enroll_mean_model;

  task automatic model_enroll(input int npn, input int m, input int k, input int nb);
    int lo = 0, hi = 0, nbit = 0, sum = 0, len;
    model_enroll_bits = '0;
    len = (npn < 64) ? npn : 64;
    for (int a = 0; a < len; a++) sum += int'(dut.u_pn_mem.mem[a]);
    enroll_mean_model = sum / len;
    for (int a = 0; a < npn; a++) sp_model[a] = 1'b0;
    for (int a = 0; a < npn && nbit < nb; a++) begin
      int mp = modp(int'(dut.u_pn_mem.mem[a]), m);
      bit g = (mp >= m / 2);
      if (g) begin hi++; lo = 0; end else begin lo++; hi = 0; end
      if (hi == k || lo == k) begin
        model_enroll_bits[nbit] = g;
        nbit++;
        sp_model[a] = 1'b1;
        hi = 0;
        lo = 0;
      end
    end
  endtask

  task automatic model_regen(input int npn, input int m, input int k, input int nb);
    int sum = 0, len, off, nbit = 0;
    bit win [$];
    model_regen_bits = '0;
    len = (npn < 64) ? npn : 64;
    for (int a = 0; a < len; a++) sum += int'(dut.u_pn_mem.mem[a]);
    off = enroll_mean_model - sum / len;
    $display("regeneration temperature offset (model) = %0d", off);
    check(off == int'(dut.u_bge.offset), "temperature offset matches model");
    check(off != 0, "corner shift produced a non-zero temperature offset");
    for (int a = 0; a < npn && nbit < nb; a++) begin
      int mp = modp(int'(dut.u_pn_mem.mem[a]) + off, m);
      win.push_back(mp >= m / 2);
      if (win.size() > k) void'(win.pop_front());
      if (sp_model[a]) begin
        int ones = 0;
        foreach (win[j]) ones += int'(win[j]);
        model_regen_bits[nbit] = (ones > k / 2);
        nbit++;
      end
    end
  endtask

  task automatic read_bitstring(output logic [NBITS_MAX-1:0] bs);
    logic [7:0] b;
    fork send_byte(8'h42); join_none
    for (int i = 0; i < NBITS_MAX / 8; i++) begin
      recv_byte(b);
      bs[8*i +: 8] = b;
    end
  endtask

  task automatic run_and_wait(input logic [7:0] cmd);
    logic [7:0] b;
    longint unsigned t0 = cycles;
    send_byte(cmd);
    recv_byte(b);
    check(b == 8'h44, "run completion byte 'D'");
    $display("run '%c' took %0d cycles, pn_count=%0d bits=%0d", cmd, cycles - t0,
             dut.pn_count, dut.u_bge.nbits_made);
  endtask

  // ---------------- stimulus ----------------
  logic [NBITS_MAX-1:0] enroll_bs, regen_bs;
  int npn_e, npn_r;

  initial begin
    logic [7:0] b;
    logic [7:0] prm_bytes [12];
    prm_bytes = '{8'hCD, 8'hAB, 8'h34, 8'h12, 8'd22, 8'd1, 8'(KRUN), 8'd2,
                  8'(NPN), 8'(NPN >> 8), 8'(NBITS), 8'(NBITS >> 8)};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    send_byte(8'h50);
    foreach (prm_bytes[i]) send_byte(prm_bytes[i]);
    check(dut.prm.seed == 32'h1234ABCD && dut.prm.mod_m == 8'd22 && dut.prm.k == 8'(KRUN) &&
          dut.prm.num_pns == 16'(NPN) && dut.prm.nbits == 16'(NBITS), "run parameters loaded");

    // ---- enrollment at the nominal corner ----
    run_and_wait(8'h45);
    npn_e = int'(dut.pn_count);
    check(npn_e == NPN, "enrollment collected num_pns PNs");
    for (int a = 0; a < npn_e; a++) begin
      automatic int mp = modp(int'(dut.u_pn_mem.mem[a]), 22);
      check((mp >= 4 && mp <= 6) || (mp >= 15 && mp <= 17), $sformatf("PN %0d in acceptance region", a));
    end
    model_enroll(npn_e, 22, KRUN, NBITS);
    for (int a = 0; a < npn_e; a++) if (a <= int'(dut.u_bge.addr))
      check(dut.u_stop_point_mem.mem[a] == sp_model[a], $sformatf("stop point %0d", a));
    check(int'(dut.u_bge.nbits_made) == NBITS, "enrollment produced nbits bits");
    read_bitstring(enroll_bs);
    check(enroll_bs == model_enroll_bits, "enrolled bitstring equals DPNC model");
    $display("enrolled bits: %h", enroll_bs);

    // PN readback over the link
    fork begin send_byte(8'h4E); send_byte(8'd3); send_byte(8'd0); end join_none
    recv_byte(b);
    wait fork;
    check(b == dut.u_pn_mem.mem[3], "PN readback over the serial link");

    // pairing generator produces two in-range addresses
    pair_next = 1'b1; @(posedge clk); pair_next = 1'b0;
    wait (pair_valid);
    @(posedge clk);
    check(int'(pair_addr1) < npn_e && int'(pair_addr2) < npn_e, "pairing addresses below PN count");

    // ---- regeneration at a shifted corner with jumps ----
    shift_ps = 350;
    jump_en  = 1'b1;
    run_and_wait(8'h47);
    npn_r = int'(dut.pn_count);
    check(npn_r == npn_e, "regeneration measured the same number of paths");
    model_regen(npn_r, 22, KRUN, NBITS);
    read_bitstring(regen_bs);
    check(regen_bs == model_regen_bits, "regenerated bitstring equals model");
    check(regen_bs == enroll_bs, "regenerated bitstring equals enrolled bitstring");
    $display("regen   bits: %h", regen_bs);

    $display("mechanisms: sweep_steps=%0d glitch_aborts=%0d range_unstable=%0d window_rejects=%0d vp_skips=%0d counter_resets=%0d stop_points=%0d majority_fixes=%0d vector_pairs=%0d",
             n_sweep_steps, n_glitch, n_range_unstable, n_window_reject, n_vp_skip,
             n_counter_reset, n_stop_points, n_majority_fix, n_vecpairs);
    check(n_sweep_steps > 0, "FPA sweep happened");
    check(n_glitch > 0, "glitch abort happened");
    check(n_range_unstable > 0, "range-unstable path happened");
    check(n_window_reject > 0, "acceptance-window reject happened");
    check(n_vp_skip > 0, "valid-path skip in regeneration happened");
    check(n_counter_reset > 0, "DPNC counter reset happened");
    check(n_stop_points == NBITS, "one stop point per enrolled bit");
    check(n_majority_fix > 0, "majority vote outvoted a changed PN");
    check(n_vecpairs > 1, "more than one vector pair used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= WATCHDOG_CYCLES);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
