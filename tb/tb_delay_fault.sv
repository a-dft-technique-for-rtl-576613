`timescale 1ps/1ps
// tb_delay_fault: runs the delay-fault procedure on the test vehicle in test
// mode with Td1 = 425 ps (S = 3, the typical device's bin), using the
// on-chip clock generator, at a 100 MHz and at a 100 kHz tester clock.
// For each of eight target paths (two per tested stage) the stage holding
// the path gets the path's delay, the other stages keep their critical-path
// delays (715, 690, 690, 708, 645 ps), and an extra delay fault is added in
// 50 ps steps until the activation vector's product is wrong at the CLK edge
// at which it is due. The fault size that is first detected must be the
// published one for that path, and must not depend on the tester clock.
// Path (stage, delay ps, initialisation A, activation A; B = FFFF):
//   1 SN_L1 715 0002 0000 -> 50     2 SN_L1 670 000C 0008 -> 100
//   3 SN_L2 690 0001 0000 -> 50     4 SN_L2 665 0070 0040 -> 100
//   5 CLA_L1 708 0000 FFFF -> 50    6 CLA_L1 460 FFFF 0000 -> 300
//   7 CLA_L2 645 0000 FFF0 -> 100   8 CLA_L2 450 FFF0 0000 -> 300
// The fault is modelled on the whole output of the stage, so any bit that
// the activation vector changes carries it.
module tb_delay_fault;
  int checks = 0, failures = 0;
  logic ipclk, nt, clk, tclk, clk1, clk2;
  logic [3:0] s;
  logic [15:0] a, b;
  logic [31:0] product;
  int unsigned d_stage [5];
  int n_detect, n_undetected_steps;

  localparam int unsigned NOMINAL [5] = '{715, 690, 690, 708, 645};
  localparam int          STAGE   [8] = '{0, 0, 1, 1, 3, 3, 4, 4};
  localparam int unsigned PDELAY  [8] = '{715, 670, 690, 665, 708, 460, 645, 450};
  localparam logic [15:0] INIT_A  [8] = '{16'h0002, 16'h000C, 16'h0001, 16'h0070,
                                          16'h0000, 16'hFFFF, 16'h0000, 16'hFFF0};
  localparam logic [15:0] ACT_A   [8] = '{16'h0000, 16'h0008, 16'h0000, 16'h0040,
                                          16'hFFFF, 16'h0000, 16'hFFF0, 16'h0000};
  localparam int unsigned FAULT   [8] = '{50, 100, 50, 100, 50, 300, 100, 300};

  clock_gen u_cg (.ipclk(ipclk), .nt(nt), .s(s), .clk1(clk1), .clk2(clk2), .clk(clk), .tclk(tclk));
  delayed_mult u_dut (.clk(clk), .tclk(tclk), .nt(nt), .d_stage(d_stage), .a(a), .b(b), .product(product));

  initial begin
    #50_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic period(longint half, logic [15:0] na);
    ipclk = 1'b0;
    #(half);
    ipclk = 1'b1;
    #(half / 2);
    a = na;
    #(half - half / 2);
  endtask

  // initialisation vector until settled, then the activation vector;
  // returns the product seen right after the CLK edge at which it is due
  task automatic run_pair(longint half, logic [15:0] ia, logic [15:0] aa,
                          output logic [31:0] got);
    a = ia;
    for (int n = 0; n < 8; n++) period(half, ia);
    a = aa;
    for (int n = 0; n < 4; n++) period(half, aa);  // activation sampled at the first
    ipclk = 1'b0;
    #(575 + 50*3 + 10);
    got = product;
    #(half - (575 + 50*3 + 10));
    ipclk = 1'b1;
    #(half);
  endtask

  initial begin
    longint half [2] = '{5_000, 5_000_000};
    ipclk = 1'b1; nt = 1'b1; s = 4'd3; a = '0; b = 16'hFFFF;
    d_stage = NOMINAL;
    #5000 ipclk = 1'b0;                            // warm-up of the delay lines
    #5000 ipclk = 1'b1;
    #5000;
    for (int f = 0; f < 2; f++) begin
      for (int p = 0; p < 8; p++) begin
        logic [31:0] got, want;
        int unsigned fault;
        want = 32'(ACT_A[p]) * 32'hFFFF;
        // fault-free run first: must pass
        d_stage = NOMINAL;
        d_stage[STAGE[p]] = PDELAY[p];
        run_pair(half[f], INIT_A[p], ACT_A[p], got);
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL path %0d fault-free product %h, expected %h", p + 1, got, want);
        end
        fault = 0;
        do begin
          fault += 50;
          d_stage[STAGE[p]] = PDELAY[p] + fault;
          run_pair(half[f], INIT_A[p], ACT_A[p], got);
          if (got == want) n_undetected_steps++;
        end while (got == want && fault < 1000);
        n_detect++;
        checks++;
        if (fault != FAULT[p]) begin
          failures++;
          $display("FAIL path %0d: detected at %0d ps, expected %0d ps", p + 1, fault, FAULT[p]);
        end else
          $display("path %0d (IPCLK half period %0d ps): %0d ps fault detected, product %h instead of %h",
                   p + 1, half[f], fault, got, want);
      end
    end
    checks++;
    if (n_detect != 16 || n_undetected_steps == 0) begin
      failures++;
      $display("FAIL detections %0d, undetected steps %0d", n_detect, n_undetected_steps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
