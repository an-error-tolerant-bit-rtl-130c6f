`timescale 1ns / 1ps
// help_top: HELP (Hardware-Embedded/Entangled deLay PUF) engine.
//
// Wires the Data Collection Engine (DCE) and the BitGen Engine (BGE) around
// the macro under test (MUT). The MUT itself (one AES round) and the clock
// generator (clock managers producing launch and phase-shifted capture
// clocks) are outside this module:
//   mut_in      launch-row outputs driving the MUT inputs
//   mut_out     MUT outputs, captured by the REBEL row
//   launched    high from the launch edge on; the clock generator places the
//               capture edge 5 ns + fpa * 10/128 ns after its rising edge
//   fpa         fine phase adjust setting of the capture clock (0..128)
//   capture_clk capture clock from the clock generator
// A run is started over the serial interface: enrollment or regeneration
// first runs the DCE to completion (PN memory and valid-path memory filled),
// then the BGE (temperature compensation, Dual-PN binning, DPNC bit
// generation with the stop-point memory); at the end the interface sends
// 'D' and the bitstring can be read back. The valid-path memory, the
// stop-point memory and the enrollment mean are kept on chip between an
// enrollment and later regenerations.
// The random pairing generator is seeded with the low 28 bits of the run
// seed at each start and steps on pair_next; its two addresses are outputs.
// Structure and sequencing follow the design description; the parameters
// marked as own choices in help_pkg and in the sub-blocks are not from it.
module help_top
  import help_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned NSAMP        = 4,
  parameter int unsigned SETTLE       = 5,
  parameter int unsigned CAPWAIT      = 2,
  parameter int unsigned PN_DEP       = PN_DEPTH,
  parameter int unsigned VP_DEP       = VP_DEPTH,
  parameter realtime     STAGE_DELAY  = 0.25
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  uart_rxd,
  output logic                  uart_txd,
  input  logic                  capture_clk,
  output logic                  launched,
  output logic [7:0]            fpa,
  output logic [N_IP-1:0]       mut_in,
  input  logic [N_IP-1:0]       mut_out,
  input  logic                  pair_next,
  output logic [$clog2(PN_DEP)-1:0] pair_addr1,
  output logic [$clog2(PN_DEP)-1:0] pair_addr2,
  output logic                  pair_valid,
  output logic                  busy
);
  localparam int unsigned PN_AW = $clog2(PN_DEP);
  localparam int unsigned VP_AW = $clog2(VP_DEP);

  run_params_t prm;
  help_mode_e  mode_q;
  logic        start_enroll, start_regen, run_done;
  logic        dce_start, dce_busy, dce_done;
  logic        bge_start, bge_busy, bge_done;

  // LC LFSR and launch rows
  logic seed_load, vec_req, vec_done, scan_en, scan_bit, lfsr_busy, scan_out;
  logic launch;
  // REBEL
  logic [$clog2(N_IP)-1:0] ip;
  logic [ROW_LEN-1:0]      ip_sel, fd_mode, row_q;
  logic [CHAIN_LEN-1:0]    chain;
  // memories
  logic             vp_we, vp_wdata, vp_rdata;
  logic [VP_AW-1:0] vp_addr;
  logic             pn_we;
  logic [PN_AW-1:0] pn_waddr, pn_raddr, bge_raddr, ser_raddr;
  logic [PN_W-1:0]  pn_wdata, pn_rdata;
  logic             sp_we, sp_wdata, sp_rdata;
  logic             ser_pn_rd;
  logic [PN_AW:0]   pn_count;
  logic [VP_AW:0]   paths_tested;
  logic [NBITS_MAX-1:0]   bitstring;
  logic [$clog2(NBITS_MAX):0] nbits_made;
  logic [PN_W-1:0]  enroll_mean;
  logic signed [PN_W+1:0] offset;

  // ---------------- run sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= MODE_ENROLL;
      dce_start <= 1'b0;
      bge_start <= 1'b0;
      run_done  <= 1'b0;
    end else begin
      dce_start <= 1'b0;
      bge_start <= 1'b0;
      run_done  <= bge_done;
      if (!busy && (start_enroll || start_regen)) begin
        mode_q    <= start_regen ? MODE_REGEN : MODE_ENROLL;
        dce_start <= 1'b1;
      end
      if (dce_done) bge_start <= 1'b1;
    end
  end
  assign busy = dce_busy | bge_busy | dce_start | bge_start;

  // ---------------- Data Collection Engine ----------------
  lc_lfsr_ctrl u_lc_lfsr (
    .clk, .rst_n, .seed_load, .seed(prm.seed), .gen_req(vec_req),
    .scan_en, .scan_bit, .gen_done(vec_done), .busy(lfsr_busy)
  );

  launch_rows u_launch (
    .clk, .rst_n, .scan_en, .scan_in(scan_bit), .launch, .scan_out, .launched, .mut_in
  );

  rebel_ctrl u_rebel_ctrl (.ip, .row_q, .ip_sel, .fd_mode, .chain);

  rebel_row #(.STAGE_DELAY(STAGE_DELAY)) u_rebel_row (
    .capture_clk, .mut_out, .ip_sel, .fd_mode, .row_q
  );

  dce_ctrl #(
    .NSAMP(NSAMP), .PN_AW(PN_AW), .VP_AW(VP_AW), .SETTLE(SETTLE), .CAPWAIT(CAPWAIT)
  ) u_dce (
    .clk, .rst_n, .start(dce_start), .mode(mode_q), .prm,
    .seed_load, .vec_req, .vec_done, .launch, .ip, .chain, .fpa,
    .vp_we, .vp_addr, .vp_wdata, .vp_rdata,
    .pn_we, .pn_waddr, .pn_wdata, .paths_tested, .pn_count,
    .busy(dce_busy), .done(dce_done)
  );

  sdp_ram #(.WIDTH(1), .DEPTH(VP_DEP)) u_valid_path_mem (
    .clk, .we(vp_we), .waddr(vp_addr), .wdata(vp_wdata), .raddr(vp_addr), .rdata(vp_rdata)
  );

  // PN memory read address multiplexer: BGE while it runs, else serial link.
  assign pn_raddr = bge_busy ? bge_raddr : ser_raddr;

  sdp_ram #(.WIDTH(PN_W), .DEPTH(PN_DEP)) u_pn_mem (
    .clk, .we(pn_we), .waddr(pn_waddr), .wdata(pn_wdata), .raddr(pn_raddr), .rdata(pn_rdata)
  );

  // ---------------- BitGen Engine ----------------
  bge_ctrl #(.PN_AW(PN_AW)) u_bge (
    .clk, .rst_n, .start(bge_start), .mode(mode_q), .prm, .pn_count,
    .pn_raddr(bge_raddr), .pn_rdata, .sp_we, .sp_wdata, .sp_rdata,
    .bitstring, .nbits_made, .enroll_mean, .offset, .busy(bge_busy), .done(bge_done)
  );

  sdp_ram #(.WIDTH(1), .DEPTH(PN_DEP)) u_stop_point_mem (
    .clk, .we(sp_we), .waddr(bge_raddr), .wdata(sp_wdata), .raddr(bge_raddr), .rdata(sp_rdata)
  );

  random_pairing_gen #(.AW(PN_AW)) u_pairing (
    .clk, .rst_n, .seed_load(dce_start), .seed(prm.seed[BG_LFSR_W-1:0]), .next(pair_next),
    .count(pn_count), .addr1(pair_addr1), .addr2(pair_addr2), .valid(pair_valid)
  );

  // ---------------- Serial interface ----------------
  serial_if #(.CLKS_PER_BIT(CLKS_PER_BIT), .PN_AW(PN_AW)) u_serial (
    .clk, .rst_n, .rx(uart_rxd), .tx(uart_txd), .prm, .start_enroll, .start_regen,
    .run_done, .bitstring, .pn_rd(ser_pn_rd), .pn_raddr(ser_raddr), .pn_rdata
  );
endmodule
