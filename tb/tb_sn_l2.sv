`timescale 1ps/1ps
// tb_sn_l2: random 8-row inputs (and all-ones rows); the 4 output rows of
// the second compressor level must add up to the same value mod 2**32.
module tb_sn_l2;
  int checks = 0, failures = 0;
  logic [31:0] in_ps [8];
  logic [31:0] out_ps [4];

  sn_l2 dut (.in_ps(in_ps), .out_ps(out_ps));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [31:0] s_in, s_out;
      for (int i = 0; i < 8; i++) in_ps[i] = (t == 0) ? 32'hFFFF_FFFF : $urandom;
      #10;
      s_in = '0; s_out = '0;
      for (int i = 0; i < 8; i++) s_in += in_ps[i];
      for (int i = 0; i < 4; i++) s_out += out_ps[i];
      checks++;
      if (s_in != s_out) begin
        failures++;
        $display("FAIL t=%0d in=%h out=%h", t, s_in, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
