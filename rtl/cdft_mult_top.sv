`timescale 1ps/1ps
// cdft_mult_top: the complete test vehicle: the clock generator and the
// five-stage 16x16 pipelined multiplier it clocks. A tester supplies IPCLK,
// the mode (nt), the Td1 setting (s) and the operands; it reads the product.
//   nt = 0: IPCLK runs at the rated frequency and clocks the multiplier as a
//           plain pipeline (TCLK high); products follow inputs by 5 cycles.
//   nt = 1: IPCLK may be arbitrarily slow. Each IPCLK falling edge produces a
//           TCLK pulse (R0 samples a, b; R1-R4 release data) and, Td1 + Td2
//           later, a CLK rising edge (R1-R4 and R5 capture). Every stage gets
//           exactly Td1 + Td2 = 575 + 50*s ps to evaluate, so the stage delays
//           are tested at speed, whatever the IPCLK period. A vector sampled
//           at IPCLK fall n is on product after the CLK rising edge that
//           follows IPCLK fall n + 4 (the fifth CLK rising edge counting
//           the one of cycle n).
// clk and tclk are brought out for observation. The generator's raw CLK1 and
// CLK2 outputs are left open (lint notes the empty pins): in test mode they
// are the same signals as tclk and clk. Behavioural because of the delay
// lines; the multiplier itself is synthesizable.
module cdft_mult_top
  import cdft_pkg::*;
(
  input  logic              ipclk,
  input  logic              nt,
  input  logic [3:0]        s,
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] product,
  output logic              clk,
  output logic              tclk
);
  clock_gen u_clkgen (
    .ipclk(ipclk), .nt(nt), .s(s), .clk1(), .clk2(), .clk(clk), .tclk(tclk)
  );

  mult_pipeline u_mult (
    .clk(clk), .tclk(tclk), .nt(nt), .a(a), .b(b), .product(product)
  );
endmodule
