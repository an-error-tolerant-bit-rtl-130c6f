`timescale 1ns / 1ps
// rebel_ctrl: REBEL controller, configures the capture row for one
// insertion point (IP) and extracts the digitised delay-chain segment.
//
// For IP index 'ip' the capture-row flip-flop at 'ip' takes its functional
// input (the MUT output) and every flip-flop to its right is placed in
// flush-delay mode, so the row from the IP rightwards becomes one
// combinational delay chain: ip_sel is one-hot at the IP, fd_mode is set at
// the IP and at all positions right of it. 'chain' returns the CHAIN_LEN
// captured bits starting at the IP (chain[0] = IP flip-flop).
// The IP/flush-delay arrangement follows the description; presenting the
// configuration as parallel control vectors instead of scanned-in control
// bits, and the CHAIN_LEN window, are own choices.
// Timing: purely combinational.
module rebel_ctrl
  import help_pkg::*;
#(
  parameter int unsigned N   = N_IP,
  parameter int unsigned ROW = ROW_LEN,
  parameter int unsigned CL  = CHAIN_LEN
) (
  input  logic [$clog2(N)-1:0] ip,
  input  logic [ROW-1:0]       row_q,
  output logic [ROW-1:0]       ip_sel,
  output logic [ROW-1:0]       fd_mode,
  output logic [CL-1:0]        chain
);
  initial assert (ROW >= N + CL - 1) else $error("capture row too short for the chain window");

  always_comb begin
    for (int j = 0; j < ROW; j++) begin
      ip_sel[j]  = (j == int'(ip));
      fd_mode[j] = (j >= int'(ip));
    end
    chain = row_q[int'(ip) +: CL];
  end
endmodule
