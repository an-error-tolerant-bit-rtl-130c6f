`timescale 1ns / 1ps
// lc_lfsr_ctrl: launch-vector generator of the Data Collection Engine.
//
// A 32-bit Fibonacci LFSR (x^32 + x^22 + x^2 + x + 1) is loaded with the
// user's seed. On each gen_req it shifts 2*N_IP pseudo-random bits, one per
// clock, into the launch-row scan chain (scan_en high, scan_bit = LFSR MSB,
// LFSR advanced every shifted bit), then pulses gen_done. Because the order
// of all tested paths is fixed by this sequence, the same seed replays the
// same challenges during regeneration.
// The 32-bit width and the seeding follow the description; the polynomial,
// the serial scan-in and an all-zero seed being replaced by 1 are own choices.
// Timing: gen_done is asserted in the cycle after the last shifted bit.
module lc_lfsr_ctrl
  import help_pkg::*;
#(
  parameter int unsigned NBITS = 2 * N_IP
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 seed_load,
  input  logic [LC_LFSR_W-1:0] seed,
  input  logic                 gen_req,
  output logic                 scan_en,
  output logic                 scan_bit,
  output logic                 gen_done,
  output logic                 busy
);
  localparam int unsigned CW = $clog2(NBITS + 1);

  logic [LC_LFSR_W-1:0] lfsr;
  logic [CW-1:0]        cnt;
  logic                 fb;

  assign fb       = lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0];
  assign scan_en  = busy;
  assign scan_bit = lfsr[LC_LFSR_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr     <= LC_LFSR_W'(1);
      cnt      <= '0;
      busy     <= 1'b0;
      gen_done <= 1'b0;
    end else begin
      gen_done <= 1'b0;
      if (seed_load) begin
        lfsr <= (seed == '0) ? LC_LFSR_W'(1) : seed;
        busy <= 1'b0;
      end else if (busy) begin
        lfsr <= {lfsr[LC_LFSR_W-2:0], fb};
        if (cnt == CW'(NBITS - 1)) begin
          busy     <= 1'b0;
          gen_done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end else if (gen_req) begin
        busy <= 1'b1;
        cnt  <= '0;
      end
    end
  end
endmodule
