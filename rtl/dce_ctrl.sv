`timescale 1ns / 1ps
// dce_ctrl: state machine of the Data Collection Engine (DCE).
//
// Paths are tested in the order fixed by the LC LFSR: after seeding, a
// random vector pair is scanned into the launch rows and the same pair is
// used for all N insertion points (IPs), one after the other, before the
// next pair is generated. One path = (vector pair, IP).
//
// Measuring a path is a sweep of launch/capture (LC) tests. The capture
// clock phase setting (FPA) starts at FPA_MAX (longest LC interval) and is
// lowered by one per test. Each test applies V1 for SETTLE cycles, launches
// V2, waits CAPWAIT cycles for the capture and the analysis of the captured
// delay chain (sample_analysis). While the transition lies at or beyond the
// target FF the sweep continues; the first FPA at which it has been pushed
// back before the target FF is the path's PN. The sweep aborts, and the path
// is unstable, if more than one transition is seen (a glitch); a path whose
// transition is never seen, or is already before the target at FPA_MAX, or
// still beyond it at FPA 0, cannot be measured.
//
// Enrollment: each path is swept NSAMP times; the path is valid when every
// sweep succeeds, the PN range (max - min) is within the user threshold and
// the Mod-PN of the averaged PN lies in the Dual-PN acceptance region. The
// valid bit of every tested path is written to the valid-path memory (the
// public helper data) and the PN of a valid path to the next PN memory
// location. Collection stops after num_pns valid PNs (or when the
// valid-path memory is full); the number of tested paths is kept.
// Regeneration: the LFSR replays the same sequence; paths whose valid bit
// is 0 are skipped, the others are swept once (no stability test) and their
// PNs are stored in the same order, so each PN location again holds the
// same physical path.
//
// The sweep, the XOR transition test, repeated sampling with a range
// threshold, the valid-path bitstring and the replay follow the description.
// NSAMP, SETTLE, CAPWAIT, averaging the samples and applying the Dual-PN
// acceptance test here, while the valid bit is written, are own choices.
module dce_ctrl
  import help_pkg::*;
#(
  parameter int unsigned N       = N_IP,
  parameter int unsigned CL      = CHAIN_LEN,
  parameter int unsigned TGT     = TARGET_FF,
  parameter int unsigned NSAMP   = 4,
  parameter int unsigned PN_AW   = $clog2(PN_DEPTH),
  parameter int unsigned VP_AW   = $clog2(VP_DEPTH),
  parameter int unsigned SETTLE  = 5,
  parameter int unsigned CAPWAIT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  help_mode_e         mode,
  input  run_params_t        prm,
  // LC LFSR controller
  output logic               seed_load,
  output logic               vec_req,
  input  logic               vec_done,
  // launch rows
  output logic               launch,
  // REBEL controller
  output logic [$clog2(N)-1:0] ip,
  input  logic [CL-1:0]      chain,
  output logic [7:0]         fpa,
  // valid-path memory
  output logic               vp_we,
  output logic [VP_AW-1:0]   vp_addr,
  output logic               vp_wdata,
  input  logic               vp_rdata,
  // PN memory
  output logic               pn_we,
  output logic [PN_AW-1:0]   pn_waddr,
  output logic [PN_W-1:0]    pn_wdata,
  // results
  output logic [VP_AW:0]     paths_tested,
  output logic [PN_AW:0]     pn_count,
  output logic               busy,
  output logic               done
);
  initial assert (NSAMP > 0 && (NSAMP & (NSAMP - 1)) == 0) else $error("NSAMP must be a power of two");

  typedef enum logic [3:0] {
    S_IDLE, S_NEWVEC, S_WAITVEC, S_PATH, S_VPREAD, S_VPCHK, S_SWEEP,
    S_APPLY, S_LAUNCH, S_EVAL, S_SAMPLE, S_PATHEVAL, S_FAIL, S_NEXT, S_DONE
  } state_e;

  localparam int unsigned SW  = PN_W + $clog2(NSAMP) + 1;
  localparam int unsigned WCW = $clog2(SETTLE + CAPWAIT + 1);

  state_e              state;
  help_mode_e          mode_q;
  logic [VP_AW:0]      path;
  logic [VP_AW:0]      enrolled_paths;
  logic [WCW-1:0]      wait_cnt;
  logic [$clog2(NSAMP+1)-1:0] samp;
  logic                seen;
  logic [SW-1:0]       sum;
  logic [7:0]          pn_min, pn_max;
  logic [PN_W-1:0]     pn_avg;

  logic [$clog2(CL):0]   ntrans;
  logic [$clog2(CL)-1:0] edge_pos;
  logic                  has_edge, before_target;
  logic [7:0]            modpn;
  logic                  group_hi, in_window;

  sample_analysis #(.CL(CL), .TGT(TGT)) u_sae (
    .chain, .ntrans, .edge_pos, .has_edge, .before_target
  );

  assign pn_avg = PN_W'(sum >> $clog2(NSAMP));

  dual_pn_bin u_bin (
    .pn($signed({2'b00, pn_avg})), .mod_m(prm.mod_m), .win(prm.win),
    .modpn, .group_hi, .in_window
  );

  assign ip       = path[$clog2(N)-1:0];
  assign vp_addr  = path[VP_AW-1:0];
  assign pn_waddr = pn_count[PN_AW-1:0];
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      mode_q         <= MODE_ENROLL;
      path           <= '0;
      enrolled_paths <= '0;
      paths_tested   <= '0;
      pn_count       <= '0;
      wait_cnt       <= '0;
      samp           <= '0;
      seen           <= 1'b0;
      sum            <= '0;
      pn_min         <= '0;
      pn_max         <= '0;
      fpa            <= 8'(FPA_MAX);
      seed_load      <= 1'b0;
      vec_req        <= 1'b0;
      launch         <= 1'b0;
      vp_we          <= 1'b0;
      vp_wdata       <= 1'b0;
      pn_we          <= 1'b0;
      pn_wdata       <= '0;
      done           <= 1'b0;
    end else begin
      seed_load <= 1'b0;
      vec_req   <= 1'b0;
      vp_we     <= 1'b0;
      pn_we     <= 1'b0;
      done      <= 1'b0;
      // Memory writes issued in the previous cycle advance the PN pointer.
      if (pn_we) pn_count <= pn_count + 1'b1;

      unique case (state)
        S_IDLE: begin
          launch <= 1'b0;
          if (start) begin
            mode_q    <= mode;
            path      <= '0;
            pn_count  <= '0;
            seed_load <= 1'b1;
            state     <= S_NEWVEC;
          end
        end
        S_NEWVEC: begin
          vec_req <= 1'b1;
          state   <= S_WAITVEC;
        end
        S_WAITVEC: if (vec_done) state <= S_PATH;
        S_PATH: begin
          if (mode_q == MODE_ENROLL) begin
            if (pn_count == (PN_AW+1)'(prm.num_pns) || pn_count == (PN_AW+1)'(2 ** PN_AW) ||
                path == (VP_AW+1)'(2 ** VP_AW)) begin
              enrolled_paths <= path;
              state          <= S_DONE;
            end else begin
              samp  <= '0;
              sum   <= '0;
              state <= S_SWEEP;
            end
          end else begin
            if (path == enrolled_paths || pn_count == (PN_AW+1)'(2 ** PN_AW)) state <= S_DONE;
            else                                                               state <= S_VPREAD;
          end
        end
        S_VPREAD: state <= S_VPCHK;   // valid-path memory read latency
        S_VPCHK: begin
          samp  <= '0;
          sum   <= '0;
          state <= vp_rdata ? S_SWEEP : S_NEXT;
        end
        S_SWEEP: begin
          fpa      <= 8'(FPA_MAX);
          seen     <= 1'b0;
          wait_cnt <= '0;
          launch   <= 1'b0;
          state    <= S_APPLY;
        end
        S_APPLY: begin
          launch   <= 1'b0;
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == WCW'(SETTLE - 1)) begin
            wait_cnt <= '0;
            state    <= S_LAUNCH;
          end
        end
        S_LAUNCH: begin
          launch   <= 1'b1;
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == WCW'(CAPWAIT)) begin
            wait_cnt <= '0;
            state    <= S_EVAL;
          end
        end
        S_EVAL: begin
          launch <= 1'b0;
          if (ntrans > 1) begin
            state <= S_FAIL;                       // glitch: sweep halted
          end else if (seen && (before_target || ntrans == 0)) begin
            state <= S_SAMPLE;                     // edge pushed before target
          end else if (!seen && before_target) begin
            state <= S_FAIL;                       // path longer than the range
          end else if (fpa == 8'd0) begin
            state <= S_FAIL;                       // never reached the target
          end else begin
            if (has_edge) seen <= 1'b1;
            fpa   <= fpa - 8'd1;
            state <= S_APPLY;
          end
        end
        S_SAMPLE: begin
          sum  <= sum + SW'(fpa);
          samp <= samp + 1'b1;
          if (samp == '0 || fpa < pn_min) pn_min <= fpa;
          if (samp == '0 || fpa > pn_max) pn_max <= fpa;
          if (mode_q == MODE_REGEN || samp == ($clog2(NSAMP+1))'(NSAMP - 1)) state <= S_PATHEVAL;
          else                                                               state <= S_SWEEP;
        end
        S_PATHEVAL: begin
          if (mode_q == MODE_ENROLL) begin
            vp_we    <= 1'b1;
            vp_wdata <= ((pn_max - pn_min) <= prm.thresh) && in_window;
            pn_we    <= ((pn_max - pn_min) <= prm.thresh) && in_window;
            pn_wdata <= pn_avg;
          end else begin
            pn_we    <= 1'b1;
            pn_wdata <= PN_W'(sum);
          end
          state <= S_NEXT;
        end
        S_FAIL: begin
          if (mode_q == MODE_ENROLL) begin
            vp_we    <= 1'b1;
            vp_wdata <= 1'b0;
          end else begin
            pn_we    <= 1'b1;                      // keep PN locations aligned
            pn_wdata <= '0;
          end
          state <= S_NEXT;
        end
        S_NEXT: begin
          path <= path + 1'b1;
          if (ip == $clog2(N)'(N - 1)) state <= S_NEWVEC;
          else                         state <= S_PATH;
        end
        S_DONE: begin
          paths_tested <= (mode_q == MODE_ENROLL) ? path : paths_tested;
          done         <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
