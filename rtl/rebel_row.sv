`timescale 1ns / 1ps
// rebel_row: behavioural model of the REBEL capture row (not synthesizable
// as a timing structure; it models the flush-delay delay chain with delays).
//
// The row has ROW scan flip-flops; the first N capture MUT outputs. A
// flip-flop in functional mode captures its MUT output. The flip-flop at the
// insertion point (ip_sel) takes its MUT output through its master latch,
// and each flip-flop in flush-delay mode to the right of it takes the master
// output of its left neighbour, so a transition at the IP ripples rightwards
// through the transparent masters with STAGE_DELAY per flip-flop. The rising
// edge of capture_clk freezes all masters into row_q, digitising how far the
// transition (and any glitch) travelled as a pattern of 1s and 0s.
// The ripple is computed, not simulated stage by stage: the model keeps the
// timestamped history of the IP signal, and at the capture edge stage n after
// the IP is given the IP value of (n + 1) * STAGE_DELAY earlier. This is the
// same result as a chain of transport delays, at a fraction of the events.
// The row length, the functional/flush-delay modes and the capture
// behaviour follow the description; the per-stage delay is an own value.
// Timing: row_q is updated at each rising edge of capture_clk.
// Tool notes: the IP value is both recorded on every change (the history)
// and sampled at the capture edge; lint reports this as a signal used both
// synchronously and asynchronously, which is the intent of the model. The
// history queue is simulation-only, so logic synthesis does not accept this
// file; on silicon the row is the modified scan flip-flop row itself.
module rebel_row
  import help_pkg::*;
#(
  parameter int unsigned N           = N_IP,
  parameter int unsigned ROW         = ROW_LEN,
  parameter realtime     STAGE_DELAY = 0.25   // ns per flush-delay stage
) (
  input  logic           capture_clk,
  input  logic [N-1:0]   mut_out,
  input  logic [ROW-1:0] ip_sel,
  input  logic [ROW-1:0] fd_mode,
  output logic [ROW-1:0] row_q
);
  // History of the signal at the insertion point: (time, value) of each
  // change, oldest first. A flush-delay stage n places after the IP shows the
  // IP value of (n + 1) * STAGE_DELAY before the capture edge.
  realtime hist_t[$];
  logic    hist_v[$];
  int      ip_idx;
  logic    ip_val;

  always_comb begin
    ip_idx = 0;
    for (int j = 0; j < ROW; j++) if (ip_sel[j]) ip_idx = j;
  end

  assign ip_val = (ip_idx < int'(N)) ? mut_out[ip_idx] : 1'b0;

  // Restart the history when the IP moves; record every change of its signal.
  always @(ip_idx) begin
    hist_t.delete();
    hist_v.delete();
    hist_t.push_back($realtime);
    hist_v.push_back(ip_val);
  end

  always @(ip_val) begin
    hist_t.push_back($realtime);
    hist_v.push_back(ip_val);
    while (hist_t.size() > 64) begin
      void'(hist_t.pop_front());
      void'(hist_v.pop_front());
    end
  end

  function automatic logic value_at(input realtime t);
    logic v = (hist_v.size() > 0) ? hist_v[0] : 1'b0;
    foreach (hist_t[i]) if (hist_t[i] <= t) v = hist_v[i];
    return v;
  endfunction

  always @(posedge capture_clk) begin
    for (int j = 0; j < ROW; j++) begin
      if (fd_mode[j] && j >= ip_idx)
        row_q[j] <= value_at($realtime - real'(j - ip_idx + 1) * STAGE_DELAY);
      else
        row_q[j] <= (j < int'(N)) ? mut_out[j] : 1'b0;
    end
  end
endmodule
