`timescale 1ps/1ps
// delayed_mult: testbench model of the pipelined multiplier with timing.
// It is built from the same stage and register modules as mult_pipeline,
// but each stage's output reaches the next register through a transport
// delay given at run time (d_stage[k] for stage k+1: SN_L1, SN_L2, SN_L3,
// CLA_L1, CLA_L2). A stage delay stands for the stage's critical path delay
// including the register clock-to-Q and setup times, which are zero in the
// RTL. Used to run the binning and delay-fault procedures in test mode.
module delayed_mult
  import cdft_pkg::*;
(
  input  logic              clk,
  input  logic              tclk,
  input  logic              nt,
  input  int unsigned       d_stage [5],
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] product
);
  localparam int unsigned MID_W = $bits(cla_mid_t);

  logic            r0_clk;
  logic [OP_W-1:0] r0_a, r0_b;
  row_t            sn1_out [8], r1_q [8], sn2_out [4], r2_q [4];
  row_t            sn3_x, sn3_y, cla2_out;
  cla_mid_t        cla1_out;
  logic [8*PROD_W-1:0] s1_now, s1_del, r1_flat;
  logic [4*PROD_W-1:0] s2_now, s2_del, r2_flat;
  logic [2*PROD_W-1:0] s3_now, s3_del, r3_flat;
  logic [MID_W-1:0]    s4_del, r4_q;
  logic [PROD_W-1:0]   s5_del;

  always_comb r0_clk = nt ? tclk : clk;
  always_ff @(posedge r0_clk) begin
    r0_a <= a;
    r0_b <= b;
  end

  sn_l1 u_sn_l1 (.a(r0_a), .b(r0_b), .ps(sn1_out));
  always_comb for (int i = 0; i < 8; i++) s1_now[i*PROD_W +: PROD_W] = sn1_out[i];
  always @(s1_now) s1_del <= #(d_stage[0]) s1_now;
  cdff #(.W(8*PROD_W)) u_r1 (.clk(clk), .tclk(tclk), .d(s1_del), .q(r1_flat));
  always_comb for (int i = 0; i < 8; i++) r1_q[i] = r1_flat[i*PROD_W +: PROD_W];

  sn_l2 u_sn_l2 (.in_ps(r1_q), .out_ps(sn2_out));
  always_comb for (int i = 0; i < 4; i++) s2_now[i*PROD_W +: PROD_W] = sn2_out[i];
  always @(s2_now) s2_del <= #(d_stage[1]) s2_now;
  cdff #(.W(4*PROD_W)) u_r2 (.clk(clk), .tclk(tclk), .d(s2_del), .q(r2_flat));
  always_comb for (int i = 0; i < 4; i++) r2_q[i] = r2_flat[i*PROD_W +: PROD_W];

  sn_l3 u_sn_l3 (.in_ps(r2_q), .op_x(sn3_x), .op_y(sn3_y));
  assign s3_now = {sn3_y, sn3_x};
  always @(s3_now) s3_del <= #(d_stage[2]) s3_now;
  cdff #(.W(2*PROD_W)) u_r3 (.clk(clk), .tclk(tclk), .d(s3_del), .q(r3_flat));

  cla_l1 u_cla_l1 (.op_x(r3_flat[PROD_W-1:0]), .op_y(r3_flat[2*PROD_W-1:PROD_W]), .mid(cla1_out));
  always @(cla1_out) s4_del <= #(d_stage[3]) cla1_out;
  cdff #(.W(MID_W)) u_r4 (.clk(clk), .tclk(tclk), .d(s4_del), .q(r4_q));

  cla_l2 u_cla_l2 (.mid(cla_mid_t'(r4_q)), .sum(cla2_out));
  always @(cla2_out) s5_del <= #(d_stage[4]) cla2_out;
  always_ff @(posedge clk) product <= s5_del;
endmodule
