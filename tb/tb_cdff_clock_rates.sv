`timescale 1ps/1ps
// tb_cdff_clock_rates: CDFFs clocked by the on-chip clock generator in test
// mode at Td1 = 275 ps (S = 0, window Td1 + Td2 = 575 ps), at tester clocks
// of 100 MHz, 10 MHz, 1 MHz and 100 kHz.
// The circuit is the basic model of the scheme: CDFF u_ff1 -> combinational
// block (a transport delay t_comb and an XOR with A5) -> CDFF u_ff2.
// In each IPCLK period the testbench gives u_ff1 a new value just after
// TCLK rises; u_ff1 captures it at the CLK rise Td1 + Td2 later and releases
// it at the next TCLK rise. Checked in every period, at every rate:
//   - u_ff1's Q changes at the TCLK rising edge (1 ps before: old value,
//     1 ps after: new value);
//   - its CLK-to-Q delay, from the capturing CLK rise to that TCLK rise,
//     equals the IPCLK period minus 575 ps, so a longer tester period only
//     lengthens this delay;
//   - with t_comb = 525 ps the block's result reaches u_ff2 in time
//     (u_ff2 holds f(value of two periods back)), with t_comb = 625 ps it
//     does not (u_ff2 holds f(value of three periods back)): the window
//     left to the block is 575 ps at all four rates.
module tb_cdff_clock_rates;
  int checks = 0, failures = 0;
  logic ipclk, nt, clk1, clk2, clk, tclk;
  logic [3:0] s;
  logic [7:0] din, q1, d2, q2;
  int unsigned t_comb;
  realtime t_cr, t_tr;
  int n_late, n_in_time;

  clock_gen u_cg (.ipclk(ipclk), .nt(nt), .s(s), .clk1(clk1), .clk2(clk2), .clk(clk), .tclk(tclk));
  cdff #(.W(8)) u_ff1 (.clk(clk), .tclk(tclk), .d(din), .q(q1));
  cdff #(.W(8)) u_ff2 (.clk(clk), .tclk(tclk), .d(d2), .q(q2));

  // the combinational block between the two flip-flops
  always @(q1) d2 <= #(t_comb) q1 ^ 8'hA5;

  always @(posedge clk) t_cr = $realtime;
  always @(posedge tclk) t_tr = $realtime;

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what, longint half);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (IPCLK half period %0d ps, t_comb %0d ps) at %0t", what, half, t_comb, $time);
    end
  endtask

  initial begin
    longint      half [4] = '{5_000, 50_000, 500_000, 5_000_000};
    int unsigned comb [2] = '{525, 625};
    logic [7:0]  v [$];
    realtime     t_cr_prev;
    ipclk = 1'b1;
    nt = 1'b1;
    s = 4'd0;
    din = 8'h00;
    t_comb = 525;
    // warm-up: the delay lines settle once one full IPCLK period has passed
    #5000 ipclk = 1'b0;
    #5000 ipclk = 1'b1;
    #20_000;
    for (int f = 0; f < 4; f++) begin
      for (int c = 0; c < 2; c++) begin
        t_comb = comb[c];
        v.delete();
        for (int k = 0; k < 6; k++) begin
          #(half[f] - 1);
          if (k >= 2) chk(q1 == v[k-2], "Q1 before TCLK rise holds the old value", half[f]);
          t_cr_prev = t_cr;
          #1 ipclk = 1'b0;                      // TCLK rises at once
          #1;
          if (k >= 1) begin
            chk(q1 == v[k-1], "Q1 updated at TCLK rise", half[f]);
            chk(t_tr - t_cr_prev == real'(2 * half[f] - 575), "CLK-to-Q delay = period - (Td1 + Td2)", half[f]);
          end
          if (k >= 3) begin
            if (t_comb < 575) begin
              chk(q2 == (v[k-2] ^ 8'hA5), "block result captured in the window", half[f]);
              if (q2 == (v[k-2] ^ 8'hA5)) n_in_time++;
            end else begin
              chk(q2 == (v[k-3] ^ 8'hA5), "late block result not captured", half[f]);
              if (q2 == (v[k-3] ^ 8'hA5)) n_late++;
            end
          end
          din = 8'(37 * (k + 8 * c + 16 * f) + 1);  // differs from the last one
          v.push_back(din);
          #(half[f] - 1) ipclk = 1'b1;
        end
      end
    end
    chk(n_in_time == 12 && n_late == 12, "both window outcomes seen at every rate", 0);
    $display("in time %0d, late %0d", n_in_time, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
