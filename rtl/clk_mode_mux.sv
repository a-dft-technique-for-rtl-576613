`timescale 1ps/1ps
// clk_mode_mux: selects the clocks that feed the chip's two clock networks.
//   nt = 0 (normal mode): clk = ipclk, tclk = 1 (every CDFF is a plain flop)
//   nt = 1 (test mode):   clk = clk2,  tclk = clk1
// The selection table is the design's; the mux is combinational and nt is
// meant to change only while the tester holds ipclk still.
module clk_mode_mux (
  input  logic nt,        // N/T mode select
  input  logic ipclk,     // input clock from the tester
  input  logic clk1,      // Td1-wide pulse, the test-mode TCLK
  input  logic clk2,      // low pulse ending Td1 + Td2 after clk1 rises, the test-mode CLK
  output logic clk,
  output logic tclk
);
  always_comb begin
    if (nt) begin
      clk  = clk2;
      tclk = clk1;
    end else begin
      clk  = ipclk;
      tclk = 1'b1;
    end
  end
endmodule
