`timescale 1ns / 1ps
// dpnc: Dual-PN Count bit generation.
//
// One PN group decision (group_hi) is presented per 'step'.
// Enrollment: two counters track the current run of consecutive PNs from the
// same group; a step increments the counter of its group and clears the
// other. When a counter reaches k, a bit is generated (1 for the high group,
// 0 for the low group), sp_out flags the current PN memory location as a
// stop point, and both counters are cleared.
// Regeneration: the group decisions enter a sliding window of the most
// recent k decisions; at a location whose stored stop point (sp_in) is set,
// a bit is generated whose value is the majority of the window, so up to
// (k-1)/2 of the k PNs may have changed group without flipping the bit.
// The counters, stop points, sliding window and majority vote follow the
// description; K_MAX, the largest k supported, is an own choice (k odd,
// 1 <= k <= K_MAX).
// Timing: bit_gen, bit_val and sp_out are combinational in the step cycle;
// the counters and window update at the clock edge ending the step.
module dpnc
  import help_pkg::*;
#(
  parameter int unsigned K_MAX = 15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       step,
  input  help_mode_e mode,
  input  logic [7:0] k,
  input  logic       group_hi,
  input  logic       sp_in,
  output logic       bit_gen,
  output logic       bit_val,
  output logic       sp_out
);
  localparam int unsigned CW = $clog2(K_MAX + 1);

  logic [7:0]       cnt_lo, cnt_hi, cnt_lo_n, cnt_hi_n;
  logic [K_MAX-1:0] window, window_n;
  logic [CW-1:0]    ones;

  always_comb begin
    cnt_lo_n = group_hi ? 8'd0 : cnt_lo + 8'd1;
    cnt_hi_n = group_hi ? cnt_hi + 8'd1 : 8'd0;
    window_n = {window[K_MAX-2:0], group_hi};
    ones     = '0;
    for (int i = 0; i < K_MAX; i++)
      if (i < int'(k)) ones = ones + CW'(window_n[i]);

    bit_gen = 1'b0;
    bit_val = 1'b0;
    sp_out  = 1'b0;
    if (step) begin
      if (mode == MODE_ENROLL) begin
        if (cnt_hi_n == k || cnt_lo_n == k) begin
          bit_gen = 1'b1;
          bit_val = group_hi;
          sp_out  = 1'b1;
        end
      end else if (sp_in) begin
        bit_gen = 1'b1;
        bit_val = (8'(ones) > (k >> 1));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_lo <= '0;
      cnt_hi <= '0;
      window <= '0;
    end else if (clear) begin
      cnt_lo <= '0;
      cnt_hi <= '0;
      window <= '0;
    end else if (step) begin
      window <= window_n;
      if (bit_gen && mode == MODE_ENROLL) begin
        cnt_lo <= '0;
        cnt_hi <= '0;
      end else begin
        cnt_lo <= cnt_lo_n;
        cnt_hi <= cnt_hi_n;
      end
    end
  end
endmodule
