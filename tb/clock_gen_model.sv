`timescale 1ns / 1ps
// clock_gen_model: timing model of the launch/capture clock generator.
//
// Stands in for the clock managers. The launch event is the rising edge of
// 'launched' (a system-clock edge). The capture clock then rises
// 5 ns + fpa * (10 ns / 128) later, so FPA 0, 64 and 128 give launch/capture
// intervals of 5, 10 and 15 ns (phase 90, 180 and 270 degrees of a 50 MHz
// clock). The capture pulse is 2 ns wide. Counts the capture edges.
module clock_gen_model (
  input  logic       launched,
  input  logic [7:0] fpa,
  output logic       capture_clk
);
  int unsigned n_capture = 0;

  initial capture_clk = 1'b0;

  always @(posedge launched) begin
    automatic realtime t = 5.0 + real'(fpa) * (10.0 / 128.0);
    #(t);
    capture_clk = 1'b1;
    n_capture++;
    #2.0;
    capture_clk = 1'b0;
  end
endmodule
