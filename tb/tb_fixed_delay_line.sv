`timescale 1ps/1ps
// tb_fixed_delay_line: DB_IPCLK must copy IPCLK delayed by Td2 = 300 ps.
module tb_fixed_delay_line;
  int checks = 0, failures = 0;
  logic ipclk, db_ipclk;
  realtime t_in, t_out;

  fixed_delay_line dut (.ipclk(ipclk), .db_ipclk(db_ipclk));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge ipclk or negedge ipclk) t_in = $realtime;
  always @(posedge db_ipclk or negedge db_ipclk) t_out = $realtime;

  initial begin
    ipclk = 1'b1;
    // warm-up: the chain settles once one full IPCLK period has passed
    #2000 ipclk = 1'b0;
    #2000 ipclk = 1'b1;
    #2000;
    for (int i = 0; i < 20; i++) begin
      ipclk = ~ipclk;
      #1000;
      checks += 2;
      if (db_ipclk !== ipclk) begin failures++; $display("FAIL level %0d", i); end
      if (t_out - t_in != 300.0) begin
        failures++;
        $display("FAIL delay %0d: %0t", i, t_out - t_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
