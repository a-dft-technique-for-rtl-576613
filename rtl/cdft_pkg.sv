`timescale 1ps/1ps
// cdft_pkg: sizes and timing constants shared by the controlled-delay test
// vehicle. The 16-bit operand width, the 32-bit product, 50 ps per delay
// element, the 275 ps minimum TCLK pulse width (Td1) and the fixed 300 ps
// CLK/TCLK spacing (Td2) are the design's figures; the row type and the
// adder grouping constants are this implementation's choice.
package cdft_pkg;
  localparam int unsigned OP_W      = 16;        // multiplicand / multiplier width
  localparam int unsigned PROD_W    = 32;        // product width
  localparam int unsigned N_PP      = OP_W;      // no recoding: one partial product per multiplier bit
  localparam int unsigned GRP_W     = 4;         // carry-select adder group width
  localparam int unsigned N_GRP     = PROD_W / GRP_W;

  localparam int unsigned T_ELEM_PS  = 50;       // delay of one delay element
  localparam int unsigned TD1_MIN_PS = 275;      // shortest TCLK pulse (S = 0)
  localparam int unsigned TD2_PS     = 300;      // fixed delay between the two tap outputs
  localparam int unsigned N_SEL      = 16;       // number of Td1 settings (S0-S3)

  // One row of bits in the summation network, aligned to product bit 0.
  typedef logic [PROD_W-1:0] row_t;

  // Contents of register R4, between the two carry-lookahead stages: the two
  // conditional sums of every 4-bit group and, for every group, the
  // second-level lookahead terms inside its 16-bit block (carry out of the
  // group when the block's carry-in is 0, and the propagate from the start of
  // the block through the group).
  localparam int unsigned BLK_GRPS = 4;        // groups per second-level block
  typedef struct packed {
    logic [PROD_W-1:0] sum0;                     // group sums for group carry-in 0
    logic [PROD_W-1:0] sum1;                     // group sums for group carry-in 1
    logic [N_GRP-1:0]  gpfx;                     // carry out of group k, block carry-in 0
    logic [N_GRP-1:0]  ppfx;                     // propagate from block start through group k
  } cla_mid_t;
endpackage
