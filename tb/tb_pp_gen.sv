`timescale 1ps/1ps
// tb_pp_gen: random operands; every partial product row must be the
// multiplicand shifted by its index when that multiplier bit is 1 and zero
// otherwise, and the rows must add up to the product.
module tb_pp_gen;
  int checks = 0, failures = 0;
  logic [15:0] mcand, mplier;
  logic [31:0] pp [16];

  pp_gen dut (.mcand(mcand), .mplier(mplier), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint unsigned acc;
      mcand  = (t == 0) ? 16'hFFFF : 16'($urandom);
      mplier = (t == 0) ? 16'hFFFF : 16'($urandom);
      #10;
      acc = 0;
      for (int i = 0; i < 16; i++) begin
        longint unsigned expect_row;
        expect_row = mplier[i] ? (longint'(mcand) * (longint'(1) << i)) : 0;
        checks++;
        if (longint'(pp[i]) != expect_row) begin
          failures++;
          $display("FAIL row %0d m=%h k=%h got %h", i, mcand, mplier, pp[i]);
        end
        acc += longint'(pp[i]);
      end
      checks++;
      if (acc != longint'(mcand) * longint'(mplier)) begin
        failures++;
        $display("FAIL sum m=%h k=%h", mcand, mplier);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
