`timescale 1ps/1ps
// tb_prog_delay_line: for all 16 settings of S, after an IPCLK falling edge
// D_IPCLK must rise Td1 = 275 + 50*S ps later and DD_IPCLK Td1 + 300 ps
// later; both must be low while IPCLK has been high for long.
module tb_prog_delay_line;
  int checks = 0, failures = 0;
  logic ipclk;
  logic [3:0] s;
  logic d_ipclk, dd_ipclk;
  realtime t_fall, t_d, t_dd;

  prog_delay_line dut (.ipclk(ipclk), .s(s), .d_ipclk(d_ipclk), .dd_ipclk(dd_ipclk));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge ipclk) t_fall = $realtime;
  always @(posedge d_ipclk) t_d = $realtime;
  always @(posedge dd_ipclk) t_dd = $realtime;

  initial begin
    ipclk = 1'b1;
    s = 4'd0;
    // warm-up: the chain settles once one full IPCLK period has passed through it
    #3000 ipclk = 1'b0;
    #3000 ipclk = 1'b1;
    #3000;
    for (int i = 0; i < 16; i++) begin
      s = 4'(i);
      #3000;
      checks += 2;
      if (d_ipclk !== 1'b0 || dd_ipclk !== 1'b0) begin
        failures++;
        $display("FAIL idle level s=%0d", i);
      end
      ipclk = 1'b0;
      #3000;
      if (t_d - t_fall != real'(275 + 50*i)) begin
        failures++;
        $display("FAIL Td1 s=%0d: %0t", i, t_d - t_fall);
      end
      checks++;
      if (t_dd - t_fall != real'(575 + 50*i)) begin
        failures++;
        $display("FAIL Td1+Td2 s=%0d: %0t", i, t_dd - t_fall);
      end
      ipclk = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
