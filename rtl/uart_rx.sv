`timescale 1ns / 1ps
// uart_rx: 8N1 UART receiver used by the serial interface.
//
// The line is synchronised by two flip-flops. A falling edge starts a frame;
// the start bit is checked at its middle, then the 8 data bits (LSB first)
// are sampled every CLKS_PER_BIT clocks, and the byte is delivered with a
// one-cycle 'valid' pulse at the middle of the stop bit (a frame whose stop
// bit is 0 is dropped). Frame format and bit rate are own choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [1:0] { R_IDLE, R_START, R_DATA, R_STOP } rstate_e;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  rstate_e     state;
  logic [1:0]  sync;
  logic [CW-1:0] cnt;
  logic [2:0]  bitn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      sync  <= 2'b11;
      cnt   <= '0;
      bitn  <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      unique case (state)
        R_IDLE: if (!sync[1]) begin
          cnt   <= '0;
          state <= R_START;
        end
        R_START: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CLKS_PER_BIT / 2)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= sync[1] ? R_IDLE : R_DATA;
          end
        end
        R_DATA: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            data <= {sync[1], data[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_STOP;
          end
        end
        R_STOP: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            valid <= sync[1];
            state <= R_IDLE;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
