`timescale 1ns / 1ps
// sample_analysis: combinational core of the Sample Analysis Engine.
//
// It examines the CL delay-chain bits captured in one launch/capture test.
// Neighbouring flip-flops are XORed (t[j] = chain[j] ^ chain[j+1]); ntrans
// is the number of transitions. edge_pos is the position of the transition
// found first when searching from right (far end of the chain) to left, and
// 'before_target' is set when that edge lies before the target flip-flop,
// i.e. chain[TGT] has not yet received the transition (edge_pos < TGT).
// A path is a glitch candidate when ntrans > 1; the sweep control in
// dce_ctrl uses these outputs to stop the sweep and to classify paths.
// XOR-counting and the right-to-left search follow the description; the
// target distance TGT is an own choice.
// Timing: purely combinational.
module sample_analysis
  import help_pkg::*;
#(
  parameter int unsigned CL  = CHAIN_LEN,
  parameter int unsigned TGT = TARGET_FF
) (
  input  logic [CL-1:0]         chain,
  output logic [$clog2(CL):0]   ntrans,
  output logic [$clog2(CL)-1:0] edge_pos,
  output logic                  has_edge,
  output logic                  before_target
);
  initial assert (TGT > 0 && TGT < CL) else $error("target FF outside the chain");

  logic [CL-2:0] t;

  always_comb begin
    ntrans   = '0;
    edge_pos = '0;
    has_edge = 1'b0;
    for (int j = 0; j < CL - 1; j++) begin
      t[j]   = chain[j] ^ chain[j+1];
      ntrans = ntrans + ($clog2(CL)+1)'(t[j]);
    end
    for (int j = CL - 2; j >= 0; j--) begin
      if (t[j] && !has_edge) begin
        has_edge = 1'b1;
        edge_pos = ($clog2(CL))'(j);
      end
    end
    before_target = has_edge && (int'(edge_pos) < TGT);
  end
endmodule
