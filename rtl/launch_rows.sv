`timescale 1ns / 1ps
// launch_rows: the "Final Launch Vector" and "Initial Launch Vector" rows of
// scan flip-flops that apply a two-vector challenge to the macro under test.
//
// Both rows form one serial scan chain: scan_in -> final_row[0..N-1] ->
// init_row[0..N-1] -> scan_out, shifted while scan_en is high. The MUT
// inputs mut_in show the initial vector V1 while 'launch' is low and the
// final vector V2 while it is high; raising 'launch' at a clock edge is the
// launch event whose transitions propagate through the MUT. Lowering it
// restores V1, so the same pair can be launched again for every IP and every
// FPA step without rescanning.
// Two 256-bit rows loaded by scan follow the description; holding V1 in the
// initial row and multiplexing it with V2 (instead of re-scanning V1 after
// each launch) is an own simplification of the same two-vector test.
// Timing: mut_in and 'launched' change one clock after 'launch' changes;
// 'launched' tells the clock generator when the launch edge occurred.
module launch_rows
  import help_pkg::*;
#(
  parameter int unsigned N = N_IP
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en,
  input  logic         scan_in,
  input  logic         launch,
  output logic         scan_out,
  output logic         launched,
  output logic [N-1:0] mut_in
);
  logic [N-1:0] final_row, init_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      final_row <= '0;
      init_row  <= '0;
      launched  <= 1'b0;
    end else begin
      launched <= launch & ~scan_en;
      if (scan_en) begin
        final_row <= {final_row[N-2:0], scan_in};
        init_row  <= {init_row[N-2:0], final_row[N-1]};
      end
    end
  end

  assign scan_out = init_row[N-1];
  assign mut_in   = launched ? final_row : init_row;
endmodule
