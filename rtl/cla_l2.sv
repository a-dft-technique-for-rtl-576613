`timescale 1ps/1ps
// cla_l2: fifth pipeline stage (CLA_L2), the second half of the final adder.
// The third lookahead level turns the block terms of cla_l1 into the carry
// into each 16-bit block (the adder's own carry-in is 0), then into every
// 4-bit group: c_in(k) = gpfx(k-1) | ppfx(k-1) & c_block. Each group carry
// selects between the group's two precomputed sums. Combinational; R5 is
// outside.
module cla_l2
  import cdft_pkg::*;
(
  input  cla_mid_t mid,
  output row_t     sum
);
  logic [N_GRP-1:0] c_grp;                       // carry into each group
  logic [N_GRP/BLK_GRPS-1:0] c_blk;              // carry into each block

  always_comb begin
    logic cb;
    cb = 1'b0;                                   // the adder's carry-in
    for (int b = 0; b < N_GRP/BLK_GRPS; b++) begin
      c_blk[b] = cb;
      cb = mid.gpfx[BLK_GRPS*b+BLK_GRPS-1] | (mid.ppfx[BLK_GRPS*b+BLK_GRPS-1] & cb);
    end
    for (int k = 0; k < N_GRP; k++) begin
      if (k % BLK_GRPS == 0) c_grp[k] = c_blk[k / BLK_GRPS];
      else c_grp[k] = mid.gpfx[k-1] | (mid.ppfx[k-1] & c_blk[k / BLK_GRPS]);
    end
    for (int k = 0; k < N_GRP; k++) begin
      sum[GRP_W*k +: GRP_W] = c_grp[k] ? mid.sum1[GRP_W*k +: GRP_W]
                                       : mid.sum0[GRP_W*k +: GRP_W];
    end
  end
endmodule
