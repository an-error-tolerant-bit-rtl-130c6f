`timescale 1ns / 1ps
// serial_if: serial (UART) interface of the HELP engine.
//
// Receives run parameters and start commands and returns results over an
// 8N1 UART. Command bytes:
//   'P' + 12 bytes  run parameters: seed (4 bytes), M, win, k, thresh,
//                   num_pns (2 bytes), nbits (2 bytes); multi-byte values
//                   least significant byte first
//   'E'             start an enrollment
//   'G'             start a regeneration
//   'B'             read the bitstring: NB/8 bytes, byte i = bits 8i+7..8i
//   'N' + 2 bytes   read one PN from the PN memory at the given address
// When a started run finishes (run_done) the interface sends 'D'.
// The existence of a serial link that starts the engine, sets run
// parameters and returns PNs and the bitstring follows the description;
// the command set, byte order and UART framing are own choices.
// Timing: start_enroll/start_regen are one-cycle pulses after the command
// byte; PN reads use the PN memory read port (1-cycle latency) via pn_rd.
module serial_if
  import help_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned NB           = NBITS_MAX,
  parameter int unsigned PN_AW        = $clog2(PN_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx,
  output logic             tx,
  output run_params_t      prm,
  output logic             start_enroll,
  output logic             start_regen,
  input  logic             run_done,
  input  logic [NB-1:0]    bitstring,
  output logic             pn_rd,
  output logic [PN_AW-1:0] pn_raddr,
  input  logic [PN_W-1:0]  pn_rdata
);
  typedef enum logic [2:0] {
    C_IDLE, C_PARAM, C_NADDR, C_NREAD, C_SENDB, C_SENDN
  } cstate_e;

  localparam int unsigned NBYTES = NB / 8;

  cstate_e     state;
  logic [7:0]  rx_data;
  logic        rx_valid;
  logic        tx_send, tx_busy;
  logic [7:0]  tx_data;
  logic [3:0]  idx;
  logic [$clog2(NBYTES+1)-1:0] bidx;
  logic [15:0] naddr;
  logic [1:0]  rdw;
  logic        done_pend;
  logic [PN_W-1:0] pn_q;
  logic [95:0] pbuf;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (.clk, .rst_n, .rx, .data(rx_data), .valid(rx_valid));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (.clk, .rst_n, .send(tx_send), .data(tx_data), .tx, .busy(tx_busy));

  assign pn_raddr = naddr[PN_AW-1:0];
  assign pn_rd    = (state == C_NREAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_IDLE;
      prm          <= '{seed: 32'h1, mod_m: 8'd22, win: 8'd1, k: 8'd5, thresh: 8'd2,
                        num_pns: 16'd1024, nbits: 16'(NB)};
      start_enroll <= 1'b0;
      start_regen  <= 1'b0;
      tx_send      <= 1'b0;
      tx_data      <= '0;
      idx          <= '0;
      bidx         <= '0;
      naddr        <= '0;
      rdw          <= '0;
      done_pend    <= 1'b0;
      pn_q         <= '0;
      pbuf         <= '0;
    end else begin
      start_enroll <= 1'b0;
      start_regen  <= 1'b0;
      tx_send      <= 1'b0;
      if (run_done) done_pend <= 1'b1;
      unique case (state)
        C_IDLE: begin
          if (done_pend && !tx_busy && !tx_send) begin
            tx_data   <= 8'h44;                  // 'D'
            tx_send   <= 1'b1;
            done_pend <= 1'b0;
          end else if (rx_valid) begin
            unique case (rx_data)
              8'h50: begin state <= C_PARAM; idx <= '0; end
              8'h45: start_enroll <= 1'b1;
              8'h47: start_regen  <= 1'b1;
              8'h42: begin state <= C_SENDB; bidx <= '0; end
              8'h4E: begin state <= C_NADDR; idx <= '0; end
              default: ;
            endcase
          end
        end
        C_PARAM: if (rx_valid) begin
          pbuf <= {rx_data, pbuf[95:8]};
          idx  <= idx + 1'b1;
          if (idx == 4'd11) begin
            prm.seed    <= pbuf[39:8];
            prm.mod_m   <= pbuf[47:40];
            prm.win     <= pbuf[55:48];
            prm.k       <= pbuf[63:56];
            prm.thresh  <= pbuf[71:64];
            prm.num_pns <= pbuf[87:72];
            prm.nbits   <= {rx_data, pbuf[95:88]};
            state       <= C_IDLE;
          end
        end
        C_NADDR: if (rx_valid) begin
          naddr <= {rx_data, naddr[15:8]};
          idx   <= idx + 1'b1;
          if (idx == 4'd1) begin
            rdw   <= '0;
            state <= C_NREAD;
          end
        end
        C_NREAD: begin
          rdw <= rdw + 1'b1;
          if (rdw == 2'd2) begin
            pn_q  <= pn_rdata;
            state <= C_SENDN;
          end
        end
        C_SENDN: if (!tx_busy && !tx_send) begin
          tx_data <= pn_q;
          tx_send <= 1'b1;
          state   <= C_IDLE;
        end
        C_SENDB: if (!tx_busy && !tx_send) begin
          if (bidx == ($clog2(NBYTES+1))'(NBYTES)) begin
            state <= C_IDLE;
          end else begin
            tx_data <= bitstring[8*bidx +: 8];
            tx_send <= 1'b1;
            bidx    <= bidx + 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
