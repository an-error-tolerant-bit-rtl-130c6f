`timescale 1ns / 1ps
// sdp_ram: simple dual-port block RAM (one write port, one read port).
//
// Used for the PN memory (8-bit PNs), the valid-path memory (one pass/fail
// bit per tested path) and the stop-point memory (one flag per PN memory
// location). A write with we high stores wdata at waddr; the read port
// returns the word at raddr one clock later (synchronous read, as in an FPGA
// block RAM). Contents are not reset.
// Block RAM storage follows the description; the depths are own choices.
module sdp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
