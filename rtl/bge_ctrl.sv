`timescale 1ns / 1ps
// bge_ctrl: BitGen Engine (BGE) sequencer.
//
// Runs after the Data Collection Engine has filled the PN memory with
// pn_count PNs. Two passes:
//  1. Temperature compensation: the first min(TCOMP_N, pn_count) PNs are
//     read and averaged by tcomp. Enrollment stores the mean; regeneration
//     derives the offset (enrollment mean - regeneration mean).
//  2. Bit generation: the PN memory is walked forward from location 0. Each
//     PN plus the offset is binned by dual_pn_bin and the group decision is
//     stepped into dpnc. In enrollment the stop-point flag produced by dpnc
//     is written to the stop-point memory at the same location; in
//     regeneration the stored flag is read from it. Each generated bit is
//     appended to the bitstring (bit i = i-th generated bit).
// The pass stops when prm.nbits bits exist or the PNs are exhausted.
// The order of the passes, the forward search and the use of the stop-point
// memory follow the description; reading one PN every three cycles (no read
// pipelining) is an own choice.
// Interfaces: synchronous-read PN and stop-point memories (1-cycle latency).
module bge_ctrl
  import help_pkg::*;
#(
  parameter int unsigned PN_AW = $clog2(PN_DEPTH),
  parameter int unsigned NB    = NBITS_MAX,
  parameter int unsigned K_MAX = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  help_mode_e           mode,
  input  run_params_t          prm,
  input  logic [PN_AW:0]       pn_count,
  output logic [PN_AW-1:0]     pn_raddr,
  input  logic [PN_W-1:0]      pn_rdata,
  output logic                 sp_we,
  output logic                 sp_wdata,
  input  logic                 sp_rdata,
  output logic [NB-1:0]        bitstring,
  output logic [$clog2(NB):0]  nbits_made,
  output logic [PN_W-1:0]      enroll_mean,
  output logic signed [PN_W+1:0] offset,
  output logic                 busy,
  output logic                 done
);
  typedef enum logic [2:0] {
    B_IDLE, B_TC_RD, B_TC_ACC, B_TC_FIN, B_G_RD, B_G_STEP, B_DONE
  } bstate_e;

  bstate_e        state;
  help_mode_e     mode_q;
  logic [PN_AW:0] addr;
  logic [PN_AW:0] tc_len;
  logic           rd_wait;

  logic tc_clear, tc_acc, tc_finish;
  logic dp_clear, dp_step;
  logic [7:0] modpn;
  logic group_hi, in_window;
  logic bit_gen, bit_val, sp_out;
  logic [$clog2(NB):0] nbits_req;

  assign tc_len    = (pn_count < (PN_AW+1)'(TCOMP_N)) ? pn_count : (PN_AW+1)'(TCOMP_N);
  assign nbits_req = (prm.nbits > 16'(NB)) ? ($clog2(NB)+1)'(NB) : ($clog2(NB)+1)'(prm.nbits);
  assign pn_raddr  = addr[PN_AW-1:0];
  assign busy      = (state != B_IDLE);

  tcomp u_tcomp (
    .clk, .rst_n, .clear(tc_clear), .acc(tc_acc), .pn(pn_rdata), .finish(tc_finish),
    .mode(mode_q), .enroll_mean, .offset
  );

  dual_pn_bin u_bin (
    .pn($signed({2'b00, pn_rdata}) + offset), .mod_m(prm.mod_m), .win(prm.win),
    .modpn, .group_hi, .in_window
  );

  dpnc #(.K_MAX(K_MAX)) u_dpnc (
    .clk, .rst_n, .clear(dp_clear), .step(dp_step), .mode(mode_q), .k(prm.k),
    .group_hi, .sp_in(sp_rdata), .bit_gen, .bit_val, .sp_out
  );

  always_comb begin
    tc_clear  = (state == B_IDLE) && start;
    dp_clear  = (state == B_IDLE) && start;
    tc_acc    = (state == B_TC_ACC);
    tc_finish = (state == B_TC_FIN);
    dp_step   = (state == B_G_STEP);
    sp_we     = dp_step && (mode_q == MODE_ENROLL);
    sp_wdata  = sp_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= B_IDLE;
      mode_q     <= MODE_ENROLL;
      addr       <= '0;
      rd_wait    <= 1'b0;
      bitstring  <= '0;
      nbits_made <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        B_IDLE: if (start) begin
          mode_q     <= mode;
          addr       <= '0;
          bitstring  <= '0;
          nbits_made <= '0;
          rd_wait    <= 1'b0;
          state      <= (pn_count == '0) ? B_DONE : B_TC_RD;
        end
        B_TC_RD: begin                              // wait for the read data
          rd_wait <= ~rd_wait;
          if (rd_wait) state <= B_TC_ACC;
        end
        B_TC_ACC: begin
          rd_wait <= 1'b0;
          if (addr + 1'b1 == tc_len) begin
            addr  <= '0;
            state <= B_TC_FIN;
          end else begin
            addr  <= addr + 1'b1;
            state <= B_TC_RD;
          end
        end
        B_TC_FIN: state <= B_G_RD;
        B_G_RD: begin
          rd_wait <= ~rd_wait;
          if (rd_wait) state <= B_G_STEP;
        end
        B_G_STEP: begin
          rd_wait <= 1'b0;
          if (bit_gen) begin
            bitstring[nbits_made[$clog2(NB)-1:0]] <= bit_val;
            nbits_made <= nbits_made + 1'b1;
          end
          if ((bit_gen && nbits_made + 1'b1 == nbits_req) || addr + 1'b1 == pn_count) begin
            state <= B_DONE;
          end else begin
            addr  <= addr + 1'b1;
            state <= B_G_RD;
          end
        end
        B_DONE: begin
          done  <= 1'b1;
          state <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule
