`timescale 1ps/1ps
// sn_l2: second pipeline stage of the multiplier (SN_L2), the second level
// of the 4-2 compressor summation network. The 8 partial sums of stage 1
// are taken four at a time (the two rows of groups 0 and 1, then of groups
// 2 and 3) and reduced to 4. Combinational.
module sn_l2
  import cdft_pkg::*;
(
  input  row_t in_ps  [8],
  output row_t out_ps [4]          // sum of outputs = sum of inputs mod 2**32
);
  for (genvar g = 0; g < 2; g++) begin : g_grp
    compressor42_row #(.W(PROD_W)) u_row (
      .r0(in_ps[4*g]), .r1(in_ps[4*g+1]), .r2(in_ps[4*g+2]), .r3(in_ps[4*g+3]),
      .s(out_ps[2*g]), .c(out_ps[2*g+1])
    );
  end
endmodule
