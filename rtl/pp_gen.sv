`timescale 1ps/1ps
// pp_gen: partial product generator of the 16x16 multiplier. No recoding is
// used: partial product i is the multiplicand when multiplier bit i is 1 and
// zero otherwise, i.e. one AND gate per dot, and it is placed i columns to
// the left. Output row i is that partial product aligned to product bit 0.
// Combinational.
module pp_gen
  import cdft_pkg::*;
#(
  parameter int unsigned W = OP_W
) (
  input  logic [W-1:0]   mcand,          // multiplicand M
  input  logic [W-1:0]   mplier,         // multiplier K
  output logic [2*W-1:0] pp [W]          // pp[i] = (K[i] ? M : 0) << i
);
  always_comb begin
    for (int i = 0; i < W; i++) begin
      pp[i] = (2*W)'(mcand & {W{mplier[i]}}) << i;
    end
  end
endmodule
