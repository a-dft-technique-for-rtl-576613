`timescale 1ps/1ps
// tb_compressor42: exhaustive check of the 4-2 compressor over all 32 input
// combinations: the weighted output sum equals the input count, and cout is
// the same for cin = 0 and cin = 1 (no carry ripple along a row).
module tb_compressor42;
  int checks = 0, failures = 0;
  logic a, b, c, d, cin, sum, carry, cout;
  logic cout_ref [16];

  compressor42 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int n;
      {cin, d, c, b, a} = 5'(v);
      #10;
      n = int'(a) + int'(b) + int'(c) + int'(d) + int'(cin);
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != n) begin
        failures++;
        $display("FAIL count v=%0d sum=%b carry=%b cout=%b", v, sum, carry, cout);
      end
      if (v < 16) cout_ref[v] = cout;
      else begin
        checks++;
        if (cout !== cout_ref[v-16]) begin
          failures++;
          $display("FAIL cout depends on cin at v=%0d", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
