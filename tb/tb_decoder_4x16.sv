`timescale 1ps/1ps
// tb_decoder_4x16: all 16 codes must give exactly the matching select line.
module tb_decoder_4x16;
  int checks = 0, failures = 0;
  logic [3:0] s;
  logic [15:0] sel;

  decoder_4x16 dut (.s(s), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      s = 4'(i);
      #10;
      checks++;
      if (sel != 16'(1 << i)) begin
        failures++;
        $display("FAIL s=%0d sel=%b", i, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
