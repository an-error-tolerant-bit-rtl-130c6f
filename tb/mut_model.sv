`timescale 1ns / 1ps
// mut_model: path-delay model of the macro under test for one "chip".
//
// Output i of the MUT is a hash of the whole input vector and i. When the
// inputs change from A to B and output i changes value, the change appears
// after a delay drawn from a hash of (A xor B, i, CHIP): 4.5 .. 13.5 ns for a
// normal path. A hashed fraction of the (transition, output) pairs is
// special: 'glitchy' paths show a short extra pulse before the final edge,
// 'noisy' paths get up to NOISY_PS of random jitter per launch; all paths
// get up to 30 ps of random jitter. 'shift_ps' models a temperature/voltage
// corner (a common delay shift) and 'jump_en' moves JUMP_PCT percent of the
// paths by 3 ns (the rare "jumps" that temperature compensation cannot
// remove). Only the real launch transition (launched = 1) carries the path
// timing; the return to the first vector uses the same delays. Only output
// 'watch' (the insertion point being measured) is timed; the others change
// at once, which keeps the event count low.
module mut_model #(
  parameter int unsigned N        = 256,
  parameter int unsigned CHIP     = 1,
  parameter int unsigned NOISY_PS = 600,
  parameter int unsigned JUMP_PCT = 4
) (
  input  logic [N-1:0] mut_in,
  output logic [N-1:0] mut_out,
  input  int           shift_ps,
  input  int           watch,
  input  logic         jump_en
);
  function automatic logic [31:0] mix(input logic [31:0] x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic logic [31:0] fold(input logic [N-1:0] v);
    logic [31:0] h = 32'h9e3779b9;
    for (int w = 0; w < N / 32; w++) h = mix(h ^ v[32*w +: 32]);
    return h;
  endfunction

  initial mut_out = '0;

  for (genvar i = 0; i < N; i++) begin : g_out
    logic [N-1:0] prev = '0;
    always @(mut_in) begin
      logic [31:0] r, m;
      logic        nv, gl, ny, jp;
      realtime     d;
      r  = mix(fold(mut_in ^ prev) ^ (i * 32'h01000193) ^ (CHIP * 32'h51ed270b));
      m  = mix(fold(mut_in) ^ i);
      nv = m[7];
      d  = 4.5 + real'(r[15:0] % 9000) / 1000.0;
      gl = (r[23:16] < 8'd10);                     // ~4 % glitchy
      ny = (r[31:24] < 8'd20);                     // ~8 % noisy
      jp = jump_en && ((r[31:16] % 100) < JUMP_PCT);
      d  = d + real'(shift_ps) / 1000.0 + real'($urandom % 30) / 1000.0;
      if (ny) d = d + real'($urandom % NOISY_PS) / 1000.0;
      if (jp) d = d + 3.0;
      if (i != watch) begin
        mut_out[i] = nv;                           // untimed: not being measured
      end else begin
        if (gl) begin
          mut_out[i] <= #(d - 1.2) nv;
          mut_out[i] <= #(d - 0.7) ~nv;
        end
        mut_out[i] <= #(d) nv;
      end
      prev = mut_in;
    end
  end
endmodule
