`timescale 1ps/1ps
// tb_cdft_mult_top: end-to-end test of the whole test vehicle (clock
// generator + pipelined multiplier) at its default parameters, driven the
// way a tester would drive it.
//  1. normal mode at the rated 1.4 GHz (714 ps IPCLK): random operands every
//     cycle, product after 5 cycles;
//  2. switch to test mode; run random vectors with Td1 = 425 ps (S = 3) at
//     100 MHz, with Td1 = 275 ps (S = 0) and 1025 ps (S = 15) at 100 kHz:
//     the vector sampled at IPCLK fall n must be on the product after the CLK
//     edge of cycle n + 4, and in every cycle the window from the TCLK rising
//     edge to the CLK rising edge must be Td1 + Td2 = 575 + 50*S ps whatever
//     the IPCLK period;
//  3. switch back to normal mode and run again.
// Every mechanism (normal-mode operation, test-mode operation at a fast and
// a slow tester clock, several Td1 settings, both mode switches) is counted
// and must have happened.
module tb_cdft_mult_top;
  int checks = 0, failures = 0;
  logic ipclk, nt;
  logic [3:0] s;
  logic [15:0] a, b;
  logic [31:0] product;
  logic clk, tclk;
  logic [31:0] expq [$];
  realtime t_tr, t_cr;
  int n_normal_ops, n_test_fast_ops, n_test_slow_ops, n_to_test, n_to_normal;
  bit  s_seen [16];

  cdft_mult_top dut (.*);

  always @(posedge tclk) t_tr = $realtime;
  always @(posedge clk) t_cr = $realtime;

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_normal(int n_vec);
    expq.delete();
    for (int n = 0; n < n_vec; n++) begin
      #357 ipclk = 1'b1;                  // CLK edge n: R0 samples
      expq.push_back(32'(a) * 32'(b));
      #1;
      if (n >= 5) begin
        chk(product == expq[n-5], "normal-mode product");
        n_normal_ops++;
      end
      #356 ipclk = 1'b0;
      a = 16'($urandom); b = 16'($urandom);
    end
  endtask

  task automatic run_test(int sel, longint half, int n_vec, bit slow);
    s = 4'(sel);
    s_seen[sel] = 1'b1;
    expq.delete();
    for (int n = 0; n < n_vec; n++) begin
      ipclk = 1'b0;                       // TCLK pulse n: R0 samples
      expq.push_back(32'(a) * 32'(b));
      #(575 + 50*sel + 20);               // just after this cycle's CLK edge
      chk(t_cr - t_tr == real'(575 + 50*sel), "evaluation window Td1+Td2");
      if (n >= 4) begin
        chk(product == expq[n-4], "test-mode product");
        if (slow) n_test_slow_ops++; else n_test_fast_ops++;
      end
      #(half - (575 + 50*sel + 20)) ipclk = 1'b1;
      a = 16'($urandom); b = 16'($urandom);
      #(half);
    end
  endtask

  initial begin
    ipclk = 1'b1; nt = 1'b0; s = 4'd0; a = '0; b = '0;
    // warm-up: one slow IPCLK period settles the delay lines
    #5000 ipclk = 1'b0;
    #5000 ipclk = 1'b1;
    #5000 ipclk = 1'b0;
    run_normal(100);
    // ---- switch to test mode while IPCLK is high ----
    #357 ipclk = 1'b1;
    #5000 nt = 1'b1; n_to_test++;
    #5000;
    run_test(3, 5_000, 30, 1'b0);         // 100 MHz
    run_test(0, 5_000_000, 12, 1'b1);     // 100 kHz
    run_test(15, 5_000_000, 12, 1'b1);    // 100 kHz
    // ---- back to normal mode ----
    #5000 nt = 1'b0; n_to_normal++;
    #5000 ipclk = 1'b0;
    run_normal(60);
    $display("normal ops %0d, test ops fast %0d slow %0d, switches %0d/%0d",
             n_normal_ops, n_test_fast_ops, n_test_slow_ops, n_to_test, n_to_normal);
    chk(n_normal_ops > 0, "normal mode exercised");
    chk(n_test_fast_ops > 0, "test mode at 100 MHz exercised");
    chk(n_test_slow_ops > 0, "test mode at 100 kHz exercised");
    chk(n_to_test > 0 && n_to_normal > 0, "mode switches exercised");
    chk(s_seen[0] && s_seen[3] && s_seen[15], "several Td1 settings exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
