`timescale 1ns / 1ps
// tcomp: temperature compensation of PNs.
//
// During a pass over the first TCOMP_N PNs of the PN memory (acc pulses, one
// per PN) the unit sums the PNs. 'finish' then forms the mean (sum / count).
// In enrollment the mean is kept as the enrollment mean, public helper data,
// and the offset is 0. In regeneration the offset becomes enrollment mean
// minus regeneration mean; the BitGen Engine adds it to every PN before the
// modulus, shifting the PN distribution back to where it was at enrollment.
// Averaging a fixed subset of 64 tests, storing the enrollment mean and
// adding the difference follow the description; the integer (truncating)
// mean is an own choice.
// Timing: offset and enroll_mean are valid the cycle after 'finish'.
module tcomp
  import help_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   acc,
  input  logic [PN_W-1:0]        pn,
  input  logic                   finish,
  input  help_mode_e             mode,
  output logic [PN_W-1:0]        enroll_mean,
  output logic signed [PN_W+1:0] offset
);
  localparam int unsigned SW = PN_W + $clog2(TCOMP_N) + 1;

  logic [SW-1:0]   sum;
  logic [SW-1:0]   cnt;
  logic [PN_W-1:0] mean;

  assign mean = (cnt == '0) ? '0 : PN_W'(sum / cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum         <= '0;
      cnt         <= '0;
      enroll_mean <= '0;
      offset      <= '0;
    end else begin
      if (clear) begin
        sum <= '0;
        cnt <= '0;
      end else if (acc) begin
        sum <= sum + SW'(pn);
        cnt <= cnt + 1'b1;
      end
      if (finish) begin
        if (mode == MODE_ENROLL) begin
          enroll_mean <= mean;
          offset      <= '0;
        end else begin
          offset <= $signed({2'b00, enroll_mean}) - $signed({2'b00, mean});
        end
      end
    end
  end
endmodule
