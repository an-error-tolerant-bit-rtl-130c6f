`timescale 1ns / 1ps
// dual_pn_bin: "Dual-PN" binning of one PUF number.
//
// The (temperature-compensated, possibly negative) PN is reduced modulo the
// user's modulus M, which strips the path-length component of the delay and
// leaves a Mod-PN in 0..M-1. Mod-PNs 0..M/2-1 form the low group (bit 0) and
// M/2..M-1 the high group (bit 1). During enrollment only Mod-PNs close to
// the centre of their group are accepted: |modpn - centre| <= win, with the
// low centre at (M/2-1)/2 and the high centre M/2 above it. With M = 22 and
// win = 1 this accepts {4,5,6} and {15,16,17}, so a later shift of up to
// about M/4 does not move a PN into the other group.
// The modulus, the two groups and the central acceptance regions follow the
// description; the exact centre formula and the 'win' parameterisation of
// the region width are own choices that reproduce its M = 22 example.
// Timing: purely combinational. M must be even and at least 2.
module dual_pn_bin
  import help_pkg::*;
(
  input  logic signed [PN_W+1:0] pn,
  input  logic [7:0]             mod_m,
  input  logic [7:0]             win,
  output logic [7:0]             modpn,
  output logic                   group_hi,
  output logic                   in_window
);
  logic [PN_W+1:0] mag;
  logic [7:0]      r, half, c_lo, center, delta;

  always_comb begin
    half = mod_m >> 1;
    c_lo = (half - 8'd1) >> 1;
    mag  = (pn < 0) ? -pn : pn;
    if (mod_m == '0) begin
      r = '0;
    end else if (pn < 0) begin
      r   = 8'(mag % (PN_W+2)'(mod_m));
      r   = (r == '0) ? 8'd0 : mod_m - r;
    end else begin
      r   = 8'(mag % (PN_W+2)'(mod_m));
    end
    modpn    = r;
    group_hi = (r >= half);
    center   = group_hi ? half + c_lo : c_lo;
    delta     = (r >= center) ? r - center : center - r;
    in_window = (delta <= win);
  end
endmodule
