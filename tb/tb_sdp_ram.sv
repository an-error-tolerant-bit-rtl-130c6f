`timescale 1ns / 1ps
// tb_sdp_ram: random writes and reads against a reference array; the read
// data must appear one clock after the address.
module tb_sdp_ram;
  localparam int W = 8, D = 256;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] refm [D];
  bit written [D];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 8'($urandom);
      wdata = W'($urandom);
      raddr = 8'($urandom);
      @(posedge clk);
      #1;
      if (written[raddr] && !(we && waddr == raddr)) begin
        checks++;
        if (rdata != refm[raddr]) failures++;
      end
      if (we) begin refm[waddr] = wdata; written[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
