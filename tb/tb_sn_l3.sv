`timescale 1ps/1ps
// tb_sn_l3: random 4-row inputs (and all-ones rows); the two operands of
// the last compressor level must add up to the same value mod 2**32.
module tb_sn_l3;
  int checks = 0, failures = 0;
  logic [31:0] in_ps [4];
  logic [31:0] op_x, op_y;

  sn_l3 dut (.in_ps(in_ps), .op_x(op_x), .op_y(op_y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [31:0] s_in;
      for (int i = 0; i < 4; i++) in_ps[i] = (t == 0) ? 32'hFFFF_FFFF : $urandom;
      #10;
      s_in = in_ps[0] + in_ps[1] + in_ps[2] + in_ps[3];
      checks++;
      if (s_in != op_x + op_y) begin
        failures++;
        $display("FAIL t=%0d in=%h out=%h", t, s_in, op_x + op_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
