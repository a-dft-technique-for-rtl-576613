`timescale 1ps/1ps
// tb_clock_gen: test mode, all 16 Td1 settings, at a 10 ns and a 10 us IPCLK
// period (100 MHz and 100 kHz): after each IPCLK falling edge TCLK must rise
// at once, stay high Td1 = 275 + 50*S ps, and CLK must fall 300 ps after the
// edge and rise Td1 + Td2 after it; exactly one TCLK pulse per period.
// Normal mode: CLK must equal IPCLK and TCLK stay high.
module tb_clock_gen;
  int checks = 0, failures = 0;
  logic ipclk, nt;
  logic [3:0] s;
  logic clk1, clk2, clk, tclk;
  realtime t_fall, t_tr, t_tf, t_cf, t_cr;
  int n_tclk;

  clock_gen dut (.*);

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge ipclk) t_fall = $realtime;
  always @(posedge tclk) begin t_tr = $realtime; n_tclk++; end
  always @(negedge tclk) t_tf = $realtime;
  always @(negedge clk) t_cf = $realtime;
  always @(posedge clk) t_cr = $realtime;

  task automatic chk(bit ok, string what, int i);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s s=%0d at %0t", what, i, $time);
    end
  endtask

  initial begin
    longint half [2] = '{5_000, 5_000_000};
    ipclk = 1'b1;
    nt = 1'b1;
    s = 4'd0;
    // warm-up: the delay lines settle once one full IPCLK period has passed
    #5000 ipclk = 1'b0;
    #5000 ipclk = 1'b1;
    #20_000;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 16; i++) begin
        s = 4'(i);
        #(half[f]);
        n_tclk = 0;
        for (int c = 0; c < 3; c++) begin
          ipclk = 1'b0;
          #(half[f]);
          chk(t_tr == t_fall, "TCLK rise at IPCLK fall", i);
          chk(t_tf - t_tr == real'(275 + 50*i), "TCLK width Td1", i);
          chk(t_cf - t_fall == 300.0, "CLK fall at Td2", i);
          chk(t_cr - t_tr == real'(575 + 50*i), "CLK rise at Td1+Td2", i);
          chk(clk == 1'b1 && tclk == 1'b0, "idle levels", i);
          ipclk = 1'b1;
          #(half[f]);
          chk(clk == 1'b1 && tclk == 1'b0, "no pulse on IPCLK rise", i);
        end
        chk(n_tclk == 3, "one TCLK pulse per period", i);
      end
    end
    // normal mode: CLK follows IPCLK at the rated 1.4 GHz, TCLK high
    nt = 1'b0;
    for (int c = 0; c < 40; c++) begin
      #357 ipclk = ~ipclk;
      #1;
      chk(clk == ipclk && tclk == 1'b1, "normal mode", 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
