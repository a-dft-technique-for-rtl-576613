`timescale 1ps/1ps
// sn_l1: first pipeline stage of the multiplier (SN_L1). It forms the 16
// partial products and runs the first level of the summation network: each
// group of four neighbouring partial products goes through a row of 4-2
// compressors, leaving 8 partial sums. Grouping rows 4g..4g+3 follows the
// dot diagram of the design. Combinational; the stage registers are outside.
module sn_l1
  import cdft_pkg::*;
(
  input  logic [OP_W-1:0] a,       // multiplicand
  input  logic [OP_W-1:0] b,       // multiplier
  output row_t            ps [8]   // 8 partial sums, sum of them = a*b
);
  logic [PROD_W-1:0] pp [N_PP];

  pp_gen u_pp (.mcand(a), .mplier(b), .pp(pp));

  for (genvar g = 0; g < 4; g++) begin : g_grp
    compressor42_row #(.W(PROD_W)) u_row (
      .r0(pp[4*g]), .r1(pp[4*g+1]), .r2(pp[4*g+2]), .r3(pp[4*g+3]),
      .s(ps[2*g]), .c(ps[2*g+1])
    );
  end
endmodule
