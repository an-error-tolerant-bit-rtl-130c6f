`timescale 1ns / 1ps
// tb_serial_if: drives the UART line of the serial interface: loads run
// parameters ('P'), checks the start pulses ('E', 'G'), the 'D' byte after
// run_done, the bitstring bytes ('B') and a PN read ('N') served from a
// model memory with one-cycle read latency.
module tb_serial_if;
  import help_pkg::*;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, rx = 1, run_done = 0;
  logic tx, start_enroll, start_regen, pn_rd;
  run_params_t prm;
  logic [NBITS_MAX-1:0] bitstring;
  logic [13:0] pn_raddr;
  logic [7:0] pn_rdata;
  int checks = 0, failures = 0;
  int n_enroll = 0, n_regen = 0;

  serial_if #(.CLKS_PER_BIT(CPB), .PN_AW(14)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) pn_rdata <= 8'(pn_raddr * 7 + 3);
  always @(posedge clk) begin
    if (rst_n && start_enroll) n_enroll++;
    if (rst_n && start_regen) n_regen++;
  end

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic send_byte(input logic [7:0] b);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = 1; repeat (CPB) @(posedge clk);
  endtask
  task automatic recv_byte(output logic [7:0] b);
    @(negedge tx);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
    repeat (CPB) @(posedge clk);
  endtask

  initial begin
    logic [7:0] b;
    logic [7:0] pb [12] = '{8'h78, 8'h56, 8'h34, 8'h12, 8'd22, 8'd1, 8'd5, 8'd3,
                           8'h34, 8'h02, 8'h00, 8'h01};
    for (int i = 0; i < NBITS_MAX; i++) bitstring[i] = 1'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_byte(8'h50);
    foreach (pb[i]) send_byte(pb[i]);
    repeat (2 * CPB) @(posedge clk);
    check(prm.seed == 32'h12345678 && prm.mod_m == 22 && prm.win == 1 && prm.k == 5 &&
          prm.thresh == 3 && prm.num_pns == 16'h0234 && prm.nbits == 16'h0100, "parameters");
    send_byte(8'h45);
    repeat (2 * CPB) @(posedge clk);
    check(n_enroll == 1 && n_regen == 0, "enroll start pulse");
    send_byte(8'h47);
    repeat (2 * CPB) @(posedge clk);
    check(n_enroll == 1 && n_regen == 1, "regen start pulse");
    fork
      begin @(posedge clk) run_done = 1; @(posedge clk) run_done = 0; end
      recv_byte(b);
    join
    check(b == 8'h44, "done byte");
    fork send_byte(8'h42); join_none
    for (int i = 0; i < NBITS_MAX / 8; i++) begin
      recv_byte(b);
      check(b == bitstring[8*i +: 8], $sformatf("bitstring byte %0d", i));
    end
    fork begin send_byte(8'h4E); send_byte(8'h21); send_byte(8'h03); end join_none
    recv_byte(b);
    check(b == 8'(14'h0321 * 7 + 3), "PN read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
