`timescale 1ps/1ps
// tb_clk_mode_mux: exhaustive check of the mode table: normal mode gives
// CLK = IPCLK and TCLK = 1, test mode gives CLK = CLK2 and TCLK = CLK1.
module tb_clk_mode_mux;
  int checks = 0, failures = 0;
  logic nt, ipclk, clk1, clk2, clk, tclk;

  clk_mode_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {nt, ipclk, clk1, clk2} = 4'(v);
      #10;
      checks += 2;
      if (clk != (nt ? clk2 : ipclk)) begin failures++; $display("FAIL clk v=%0d", v); end
      if (tclk != (nt ? clk1 : 1'b1)) begin failures++; $display("FAIL tclk v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
