`timescale 1ps/1ps
// tb_cdff: checks the controlled delay flip-flop in both modes.
// Normal mode (TCLK high): Q takes D at each CLK rising edge and holds it.
// Test mode (clock waveforms as the clock generator makes them, Td1 = 425 ps,
// Td2 = 300 ps, period 20 ns): Q must not move at the CLK rising edge that
// captures D, must show that captured value at the next TCLK rising edge,
// and must ignore D changes made after the capturing edge.
module tb_cdff;
  int checks = 0, failures = 0;
  logic clk, tclk;
  logic [7:0] d, q;

  cdff #(.W(8)) dut (.clk(clk), .tclk(tclk), .d(d), .q(q));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(logic [7:0] v, string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s at %0t: q=%h expected %h", what, $time, q, v);
    end
  endtask

  initial begin
    logic [7:0] v, prev;
    // ---------------- normal mode ----------------
    tclk = 1'b1;
    clk = 1'b0;
    d = 8'h00;
    #500;
    for (int i = 0; i < 50; i++) begin
      v = 8'($urandom);
      d = v;
      #400 clk = 1'b1;          // rising edge captures v
      #10 expect_q(v, "normal after edge");
      d = ~v;                   // change while CLK high: must not pass
      #480 expect_q(v, "normal hold");
      clk = 1'b0;
      #110;
    end
    // ---------------- test mode ----------------
    // state: clk low; bring to the test-mode idle level (CLK high, TCLK low)
    tclk = 1'b0;
    prev = 8'h5A;
    d = prev;
    #1000 clk = 1'b1;          // captured, released by the first TCLK pulse
    #1000;
    for (int i = 0; i < 50; i++) begin
      // TCLK rising edge: releases what the last CLK edge captured
      tclk = 1'b1;
      #10 expect_q(prev, "test release at TCLK");
      #290 clk = 1'b0;          // Td2 after TCLK rise
      #125 tclk = 1'b0;         // Td1 = 425 ps
      v = 8'($urandom);
      #100 d = v;               // data arrives inside the Td1 + Td2 window
      #200 clk = 1'b1;          // Td1 + Td2 = 725 ps: capture
      #5 expect_q(prev, "test no change at CLK");
      #100 d = ~v;              // late change: must be ignored
      #19170;                   // rest of the 20 ns tester period
      expect_q(prev, "test hold until TCLK");
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
