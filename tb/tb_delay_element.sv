`timescale 1ps/1ps
// tb_delay_element: the output must follow each input edge after 50 ps,
// and not before.
module tb_delay_element;
  int checks = 0, failures = 0;
  logic a, y;

  delay_element dut (.a(a), .y(y));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    #1000;
    for (int i = 0; i < 20; i++) begin
      logic v;
      v = ~a;
      a = v;
      #49;
      checks++;
      if (y === v) begin failures++; $display("FAIL early edge %0d", i); end
      #2;
      checks++;
      if (y !== v) begin failures++; $display("FAIL late edge %0d", i); end
      #449;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
