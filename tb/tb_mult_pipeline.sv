`timescale 1ps/1ps
// tb_mult_pipeline: the five-stage multiplier with ideal clocks from the
// testbench.
// Normal mode: TCLK high, CLK at 1.4 GHz (714 ps), a new random vector every
// cycle; the product of the vector sampled at CLK edge n must appear right
// after edge n + 5 (five-cycle latency, one product per cycle).
// Test mode: clock waveforms of the clock generator (TCLK pulse Td1 wide,
// CLK low from 300 ps to Td1 + 300 ps) at a 10 ns and a 1 us period; the
// vector sampled at TCLK pulse n must appear right after the CLK rising edge
// of cycle n + 4, and not one cycle earlier. The fault-free products of the
// published delay-fault vectors are checked as part of the test-mode stream.
module tb_mult_pipeline;
  int checks = 0, failures = 0;
  logic clk, tclk, nt;
  logic [15:0] a, b;
  logic [31:0] product;
  logic [31:0] expq [$];

  mult_pipeline dut (.*);

  localparam logic [15:0] VA [16] = '{16'h0002, 16'h0000, 16'h000C, 16'h0008,
                                      16'h0001, 16'h0000, 16'h0070, 16'h0040,
                                      16'h0000, 16'hFFFF, 16'hFFFF, 16'h0000,
                                      16'h0000, 16'hFFF0, 16'hFFF0, 16'h0000};
  localparam logic [31:0] VP [16] = '{32'h0001_FFFE, 32'h0000_0000, 32'h000B_FFF4, 32'h0007_FFF8,
                                      32'h0000_FFFF, 32'h0000_0000, 32'h006F_FF90, 32'h003F_FFC0,
                                      32'h0000_0000, 32'hFFFE_0001, 32'hFFFE_0001, 32'h0000_0000,
                                      32'h0000_0000, 32'hFFEF_0010, 32'hFFEF_0010, 32'h0000_0000};

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] e, string what);
    checks++;
    if (product !== e) begin
      failures++;
      $display("FAIL %s at %0t: product=%h expected %h", what, $time, product, e);
    end
  endtask

  // one test-mode tester period: TCLK pulse at 0, CLK low 300 .. td1+300
  task automatic test_cycle(int td1, longint period);
    tclk = 1'b1;
    if (td1 < 300) begin
      #(td1) tclk = 1'b0;
      #(300 - td1) clk = 1'b0;
      #(td1) clk = 1'b1;
    end else begin
      #300 clk = 1'b0;
      #(td1 - 300) tclk = 1'b0;
      #300 clk = 1'b1;
    end
    #(period - td1 - 300);
  endtask

  initial begin
    logic [31:0] prev;
    nt = 1'b0; tclk = 1'b1; clk = 1'b0;
    a = '0; b = '0;
    // ---------------- normal mode ----------------
    for (int n = 0; n < 205; n++) begin
      #357 clk = 1'b1;                 // edge n: R0 samples a, b
      expq.push_back(32'(a) * 32'(b));
      #1;
      if (n >= 5) chk(expq[n-5], "normal mode");
      a = 16'($urandom); b = 16'($urandom);
      #356 clk = 1'b0;
    end
    // ---------------- test mode ----------------
    for (int f = 0; f < 2; f++) begin
      longint period = (f == 0) ? 10_000 : 1_000_000;
      #1000 nt = 1'b1; tclk = 1'b0; clk = 1'b1;
      #1000;
      expq.delete();
      for (int n = 0; n < 40; n++) begin
        if (n < 16) begin a = VA[n]; b = 16'hFFFF; end
        else begin a = 16'($urandom); b = 16'($urandom); end
        expq.push_back(32'(a) * 32'(b));
        if (n < 16) begin
          checks++;
          if (expq[n] != VP[n]) begin failures++; $display("FAIL vector table %0d", n); end
        end
        prev = product;
        fork
          test_cycle(425, period);
          begin
            #800;                       // just after this cycle's CLK edge
            if (n >= 4) chk(expq[n-4], "test mode product");
            if (n >= 5 && expq[n-4] != expq[n-5]) begin
              // product must not have been there before this CLK edge
              checks++;
              if (prev === expq[n-4]) begin failures++; $display("FAIL early product n=%0d", n); end
            end
          end
        join
      end
      nt = 1'b0; tclk = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
