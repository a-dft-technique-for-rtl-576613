`timescale 1ps/1ps
// tb_binning: runs the performance-binning procedure on the test vehicle in
// test mode, with the on-chip clock generator. Bins i = 0..15 stand for
// Td1 + Td2 = 575 + 50*i ps (S = i); bin 16 means the device fails even at
// the largest window. The procedure starts at bin 15 and lowers the window
// while the device passes; on the first failure it places the device one
// bin above, and a device that passes at bin 0 stays in bin 0.
// One test = the critical-path vector pair of SN_L1 (initialisation
// 0002 x FFFF, held until the pipeline is settled, then activation
// 0000 x FFFF), passing if the activation product is right at the CLK edge
// at which it is due.
// Stage delays (ps, including register overheads) of the typical device are
// the published critical-path delays: SN_L1 715, SN_L2 690, SN_L3 690,
// CLA_L1 708, CLA_L2 645; it must land in bin 3 (Td1 = 425 ps) at both a
// 100 MHz and a 100 kHz tester clock. Three more devices, whose stage delays
// are chosen here (slowest stage 560, 900 and 1400 ps), must land in bins
// 0, 7 and 16.
module tb_binning;
  int checks = 0, failures = 0;
  logic ipclk, nt, clk, tclk, clk1, clk2;
  logic [3:0] s;
  logic [15:0] a, b;
  logic [31:0] product;
  int unsigned d_stage [5];
  int n_pass, n_fail;

  clock_gen u_cg (.ipclk(ipclk), .nt(nt), .s(s), .clk1(clk1), .clk2(clk2), .clk(clk), .tclk(tclk));
  delayed_mult u_dut (.clk(clk), .tclk(tclk), .nt(nt), .d_stage(d_stage), .a(a), .b(b), .product(product));

  initial begin
    #50_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one tester period; operands change in the middle of the high half
  task automatic period(longint half, logic [15:0] na, logic [15:0] nb);
    ipclk = 1'b0;
    #(half);
    ipclk = 1'b1;
    #(half / 2);
    a = na; b = nb;
    #(half - half / 2);
  endtask

  // apply the vector pair with the current S; 1 = correct product on time
  task automatic apply_test(longint half, output bit pass);
    logic [31:0] got;
    a = 16'h0002; b = 16'hFFFF;
    for (int n = 0; n < 8; n++) period(half, 16'h0002, 16'hFFFF);
    // a, b now hold the initialisation vector; switch to the activation one
    a = 16'h0000;
    period(half, 16'h0000, 16'hFFFF);             // activation sampled here (n)
    for (int n = 1; n < 4; n++) period(half, 16'h0000, 16'hFFFF);
    ipclk = 1'b0;                                 // IPCLK fall n + 4
    #(575 + 50*int'(s) + 10);                     // after CLK edge of cycle n + 4
    got = product;
    #(half - (575 + 50*int'(s) + 10));
    ipclk = 1'b1;
    #(half);
    pass = (got == 32'h0000_0000);
    if (pass) n_pass++; else n_fail++;
  endtask

  task automatic bin_device(longint half, output int bin);
    int i;
    bit pass;
    i = 15;
    forever begin
      s = 4'(i);
      apply_test(half, pass);
      if (!pass) begin
        bin = i + 1;
        break;
      end
      if (i == 0) begin
        bin = 0;
        break;
      end
      i--;
    end
  endtask

  task automatic expect_bin(string name, int unsigned d1, int unsigned d2, int unsigned d3,
                            int unsigned d4, int unsigned d5, longint half, int want);
    int got;
    d_stage = '{d1, d2, d3, d4, d5};
    bin_device(half, got);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: bin %0d, expected %0d", name, got, want);
    end else
      $display("%s (SN_L1 %0d ps, IPCLK half period %0d ps): bin %0d",
               name, d1, half, got);
  endtask

  initial begin
    ipclk = 1'b1; nt = 1'b1; s = 4'd15; a = '0; b = 16'hFFFF;
    d_stage = '{715, 690, 690, 708, 645};
    #5000 ipclk = 1'b0;                           // warm-up of the delay lines
    #5000 ipclk = 1'b1;
    #5000;
    expect_bin("typical",         715, 690, 690, 708, 645, 5_000,     3);
    expect_bin("typical",         715, 690, 690, 708, 645, 5_000_000, 3);
    expect_bin("fast device",     560, 540, 540, 555, 505, 5_000,     0);
    expect_bin("slow device",     900, 870, 870, 890, 810, 5_000,     7);
    expect_bin("failing device", 1400, 1350, 1350, 1385, 1260, 5_000, 16);
    checks++;
    if (n_pass == 0 || n_fail == 0) begin
      failures++;
      $display("FAIL both outcomes of a test must occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
