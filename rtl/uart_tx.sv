`timescale 1ns / 1ps
// uart_tx: 8N1 UART transmitter used by the serial interface.
//
// A 'send' pulse while not busy loads 'data'; the line then carries a start
// bit (0), the 8 data bits LSB first and a stop bit (1), each CLKS_PER_BIT
// clocks long. 'busy' is high from the cycle after 'send' until the stop bit
// has ended. Frame format and bit rate are own choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       send,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    shreg;
  logic [3:0]    nbit;
  logic [CW-1:0] cnt;

  assign tx = busy ? shreg[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1;
      nbit  <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
    end else if (!busy) begin
      if (send) begin
        shreg <= {1'b1, data, 1'b0};
        nbit  <= '0;
        cnt   <= '0;
        busy  <= 1'b1;
      end
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt   <= '0;
        shreg <= {1'b1, shreg[9:1]};
        nbit  <= nbit + 1'b1;
        if (nbit == 4'd9) busy <= 1'b0;
      end
    end
  end
endmodule
