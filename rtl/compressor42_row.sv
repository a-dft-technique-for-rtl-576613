`timescale 1ps/1ps
// compressor42_row: reduces four rows of bits to two with one 4-2 compressor
// per column. Column j takes bit j of each row and the cout of column j-1
// (0 in column 0). The sum bits form the first output row; the carry bits,
// one column to the left, form the second. Where a row has no bit in a
// column it carries a 0, so the edge compressors act as the full and half
// adders of the dot diagram. The cout of the top column is dropped: the
// result is exact modulo 2**W, and a 16x16 product never exceeds 32 bits
// (lint reports that bit, and the carry shifted out of the top, as unused).
// Combinational.
module compressor42_row #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] r0,
  input  logic [W-1:0] r1,
  input  logic [W-1:0] r2,
  input  logic [W-1:0] r3,
  output logic [W-1:0] s,      // sum row, weight as input
  output logic [W-1:0] c       // carry row, already shifted one column left
);
  logic [W-1:0] cin;
  logic [W-1:0] cout;
  logic [W-1:0] carry;

  assign cin = {cout[W-2:0], 1'b0};

  for (genvar j = 0; j < W; j++) begin : g_col
    compressor42 u_c42 (
      .a(r0[j]), .b(r1[j]), .c(r2[j]), .d(r3[j]), .cin(cin[j]),
      .sum(s[j]), .carry(carry[j]), .cout(cout[j])
    );
  end

  assign c = {carry[W-2:0], 1'b0};
endmodule
