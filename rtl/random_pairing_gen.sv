`timescale 1ns / 1ps
// random_pairing_gen: random pairing of PN memory addresses for the BitGen
// Engine.
//
// A 28-bit Fibonacci LFSR (x^28 + x^25 + 1) is seeded by the user. Each
// 'next' request advances it AW steps and presents two addresses, addr1 and
// addr2, taken from its low and high bits and reduced below 'count' (the
// number of PNs stored), so that both always point at a filled location.
// The 28-bit width and the purpose (randomised pairings of PNs) follow the
// description; the polynomial, the address extraction and the reduction are
// own choices. The DPNC method itself walks the PN memory in order; this
// generator provides the pairing addresses as outputs of the engine.
// Timing: 'valid' rises AW+1 cycles after 'next' (the LFSR has then moved AW
// steps) and stays high, with addr1/addr2 stable, until the next request.
module random_pairing_gen
  import help_pkg::*;
#(
  parameter int unsigned AW = 13
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 seed_load,
  input  logic [BG_LFSR_W-1:0] seed,
  input  logic                 next,
  input  logic [AW:0]          count,
  output logic [AW-1:0]        addr1,
  output logic [AW-1:0]        addr2,
  output logic                 valid
);
  logic [BG_LFSR_W-1:0] lfsr;
  logic [$clog2(AW+1)-1:0] steps;
  logic                 running;
  logic [AW-1:0]        raw1, raw2;

  assign raw1 = lfsr[AW-1:0];
  assign raw2 = lfsr[BG_LFSR_W-1 -: AW];

  // Reduce a raw address below count (count > 0); fold once, then clamp.
  function automatic logic [AW-1:0] fold(input logic [AW-1:0] a, input logic [AW:0] n);
    logic [AW:0] t;
    t = {1'b0, a};
    if (n == '0) return '0;
    if (t >= n) t = t - n;
    if (t >= n) t = t % n;
    return t[AW-1:0];
  endfunction

  assign addr1 = fold(raw1, count);
  assign addr2 = fold(raw2, count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr    <= BG_LFSR_W'(1);
      steps   <= '0;
      running <= 1'b0;
      valid   <= 1'b0;
    end else if (seed_load) begin
      lfsr    <= (seed == '0) ? BG_LFSR_W'(1) : seed;
      running <= 1'b0;
      valid   <= 1'b0;
    end else if (running) begin
      lfsr  <= {lfsr[BG_LFSR_W-2:0], lfsr[27] ^ lfsr[24]};
      steps <= steps + 1'b1;
      if (steps == ($clog2(AW+1))'(AW - 1)) begin
        running <= 1'b0;
        valid   <= 1'b1;
      end
    end else if (next) begin
      running <= 1'b1;
      steps   <= '0;
      valid   <= 1'b0;
    end
  end
endmodule
