`timescale 1ps/1ps
// tb_tap_mux16: for every select line and random tap patterns, d_out must be
// tap i and dd_out tap i + 6.
module tb_tap_mux16;
  int checks = 0, failures = 0;
  logic [21:0] taps;
  logic [15:0] sel;
  logic d_out, dd_out;

  tap_mux16 dut (.taps(taps), .sel(sel), .d_out(d_out), .dd_out(dd_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 16; i++) begin
        taps = 22'($urandom);
        if (t == 0) taps = 22'(1 << i);
        if (t == 1) taps = 22'(1 << (i + 6));
        sel = 16'(1 << i);
        #10;
        checks += 2;
        if (d_out != taps[i]) begin failures++; $display("FAIL d i=%0d", i); end
        if (dd_out != taps[i+6]) begin failures++; $display("FAIL dd i=%0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
