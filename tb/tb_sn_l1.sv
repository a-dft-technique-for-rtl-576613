`timescale 1ps/1ps
// tb_sn_l1: the 8 partial sums of the first stage must add up (mod 2**32)
// to a * b. Uses the operand pairs of the published delay-fault vectors and
// random ones.
module tb_sn_l1;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic [31:0] ps [8];
  logic [15:0] va [10] = '{16'h0002, 16'h0000, 16'h000C, 16'h0008, 16'h0001,
                           16'h0070, 16'h0040, 16'hFFFF, 16'hFFF0, 16'h0000};

  sn_l1 dut (.a(a), .b(b), .ps(ps));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [31:0] acc;
      if (t < 10) begin a = va[t]; b = 16'hFFFF; end
      else begin a = 16'($urandom); b = 16'($urandom); end
      #10;
      acc = '0;
      for (int i = 0; i < 8; i++) acc += ps[i];
      checks++;
      if (acc != 32'(a) * 32'(b)) begin
        failures++;
        $display("FAIL a=%h b=%h got %h", a, b, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
