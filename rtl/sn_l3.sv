`timescale 1ps/1ps
// sn_l3: third pipeline stage of the multiplier (SN_L3), the last level of
// the summation network: one row of 4-2 compressors reduces the 4 partial
// sums to the two operands of the carry-propagate adder. Combinational.
module sn_l3
  import cdft_pkg::*;
(
  input  row_t in_ps [4],
  output row_t op_x,               // op_x + op_y = sum of inputs mod 2**32
  output row_t op_y
);
  compressor42_row #(.W(PROD_W)) u_row (
    .r0(in_ps[0]), .r1(in_ps[1]), .r2(in_ps[2]), .r3(in_ps[3]),
    .s(op_x), .c(op_y)
  );
endmodule
