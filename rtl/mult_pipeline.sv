`timescale 1ps/1ps
// mult_pipeline: the 16x16 unsigned pipelined multiplier used as the test
// vehicle, five stages deep:
//   R0 -> SN_L1 (partial products + first 4-2 level) -> R1 -> SN_L2 -> R2
//      -> SN_L3 -> R3 -> CLA_L1 -> R4 -> CLA_L2 -> R5 -> product
// R1 to R4 are controlled delay flip-flops (cdff) clocked by CLK and TCLK.
// R0 and R5 are ordinary rising-edge registers: R0 is clocked by CLK in
// normal mode and by TCLK in test mode (the mux in front of it), R5 by CLK
// in both modes.
// Normal mode (nt = 0, TCLK held high): a plain pipeline, one product per
// CLK cycle, the product of inputs sampled at a CLK edge appears after the
// fifth CLK edge from that one.
// Test mode (nt = 1): at each TCLK rising edge R0 samples a and b and R1-R4
// release their held data into the next stage; at the following CLK rising
// edge, Td1 + Td2 later, R1-R4 capture and R5 updates the product. Every
// stage therefore evaluates in the window Td1 + Td2 whatever the tester
// period is. A vector sampled by R0 at a TCLK edge appears on product at the
// fifth CLK rising edge after it.
// There is no reset: the document mentions none, and the pipeline is flushed
// by five clock cycles of valid inputs.
module mult_pipeline
  import cdft_pkg::*;
(
  input  logic              clk,
  input  logic              tclk,
  input  logic              nt,        // 0 normal mode, 1 test mode
  input  logic [OP_W-1:0]   a,         // multiplicand
  input  logic [OP_W-1:0]   b,         // multiplier
  output logic [PROD_W-1:0] product
);
  localparam int unsigned MID_W = $bits(cla_mid_t);

  logic            r0_clk;
  logic [OP_W-1:0] r0_a, r0_b;
  row_t            sn1_out [8];
  row_t            r1_q    [8];
  row_t            sn2_out [4];
  row_t            r2_q    [4];
  row_t            sn3_x, sn3_y;
  row_t            r3_x, r3_y;
  cla_mid_t        cla1_out;
  logic [MID_W-1:0] r4_q;
  row_t            cla2_out;

  // R0: regular flip-flops, clock chosen by the mode
  always_comb r0_clk = nt ? tclk : clk;

  always_ff @(posedge r0_clk) begin
    r0_a <= a;
    r0_b <= b;
  end

  sn_l1 u_sn_l1 (.a(r0_a), .b(r0_b), .ps(sn1_out));

  for (genvar i = 0; i < 8; i++) begin : g_r1
    cdff #(.W(PROD_W)) u_r1 (.clk(clk), .tclk(tclk), .d(sn1_out[i]), .q(r1_q[i]));
  end

  sn_l2 u_sn_l2 (.in_ps(r1_q), .out_ps(sn2_out));

  for (genvar i = 0; i < 4; i++) begin : g_r2
    cdff #(.W(PROD_W)) u_r2 (.clk(clk), .tclk(tclk), .d(sn2_out[i]), .q(r2_q[i]));
  end

  sn_l3 u_sn_l3 (.in_ps(r2_q), .op_x(sn3_x), .op_y(sn3_y));

  cdff #(.W(PROD_W)) u_r3x (.clk(clk), .tclk(tclk), .d(sn3_x), .q(r3_x));
  cdff #(.W(PROD_W)) u_r3y (.clk(clk), .tclk(tclk), .d(sn3_y), .q(r3_y));

  cla_l1 u_cla_l1 (.op_x(r3_x), .op_y(r3_y), .mid(cla1_out));

  cdff #(.W(MID_W)) u_r4 (.clk(clk), .tclk(tclk), .d(cla1_out), .q(r4_q));

  cla_l2 u_cla_l2 (.mid(cla_mid_t'(r4_q)), .sum(cla2_out));

  // R5: regular flip-flops on CLK in both modes
  always_ff @(posedge clk) product <= cla2_out;
endmodule
