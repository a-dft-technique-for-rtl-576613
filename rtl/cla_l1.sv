`timescale 1ps/1ps
// cla_l1: fourth pipeline stage (CLA_L1), the first half of the final
// carry-lookahead adder with conditional sum select. The 32-bit adder is cut
// into eight 4-bit groups. For every group this stage forms both possible
// sums, one for a group carry-in of 0 and one for 1 (a 4-bit lookahead inside
// the group), and the group generate/propagate pair (first lookahead level).
// It then runs the second lookahead level over blocks of four groups: for
// each group, the carry out of the group assuming the block's carry-in is 0,
// and the propagate from the start of the block through the group. Where the
// adder is split between the two stages is this implementation's choice.
// Combinational; R4 (a cla_mid_t) is outside.
module cla_l1
  import cdft_pkg::*;
(
  input  row_t     op_x,
  input  row_t     op_y,
  output cla_mid_t mid
);
  logic [PROD_W-1:0] g, p;
  logic [N_GRP-1:0]  grp_g, grp_p;

  always_comb begin
    g = op_x & op_y;
    p = op_x ^ op_y;
    mid = '0;
    for (int k = 0; k < N_GRP; k++) begin
      logic c0, c1, gg, pp;
      c0 = 1'b0;
      c1 = 1'b1;
      gg = 1'b0;
      pp = 1'b1;
      for (int j = 0; j < GRP_W; j++) begin
        mid.sum0[GRP_W*k+j] = p[GRP_W*k+j] ^ c0;
        mid.sum1[GRP_W*k+j] = p[GRP_W*k+j] ^ c1;
        c0 = g[GRP_W*k+j] | (p[GRP_W*k+j] & c0);
        c1 = g[GRP_W*k+j] | (p[GRP_W*k+j] & c1);
        gg = g[GRP_W*k+j] | (p[GRP_W*k+j] & gg);
        pp = pp & p[GRP_W*k+j];
      end
      grp_g[k] = gg;
      grp_p[k] = pp;
    end
    // second level: prefix over the groups of each block
    for (int k = 0; k < N_GRP; k++) begin
      if (k % BLK_GRPS == 0) begin
        mid.gpfx[k] = grp_g[k];
        mid.ppfx[k] = grp_p[k];
      end else begin
        mid.gpfx[k] = grp_g[k] | (grp_p[k] & mid.gpfx[k-1]);
        mid.ppfx[k] = grp_p[k] & mid.ppfx[k-1];
      end
    end
  end
endmodule
