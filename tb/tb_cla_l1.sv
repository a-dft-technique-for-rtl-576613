`timescale 1ps/1ps
// tb_cla_l1: checks every field of the first adder stage against values
// worked out with plain integer additions: each group's two conditional
// sums, and for each group the carry out of its 16-bit block prefix (block
// carry-in 0) and the all-propagate flag of that prefix.
module tb_cla_l1;
  import cdft_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] op_x, op_y;
  cla_mid_t mid;

  cla_l1 dut (.op_x(op_x), .op_y(op_y), .mid(mid));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      case (t)
        0: begin op_x = 32'hFFFF_FFFF; op_y = 32'h0000_0001; end
        1: begin op_x = 32'h0000_FFFF; op_y = 32'h0000_0001; end
        2: begin op_x = 32'hFFFF_0000; op_y = 32'h0001_0000; end
        default: begin op_x = $urandom; op_y = $urandom; end
      endcase
      #10;
      for (int k = 0; k < 8; k++) begin
        int unsigned xs, ys, blk0, w;
        logic [3:0] s0, s1;
        logic gexp, pexp;
        xs = (op_x >> (4*k)) & 32'hF;
        ys = (op_y >> (4*k)) & 32'hF;
        s0 = 4'(xs + ys);
        s1 = 4'(xs + ys + 1);
        blk0 = (k / 4) * 16;                 // block start bit
        w = 4*k + 4 - blk0;                  // prefix width in bits
        gexp = (((longint'(op_x) >> blk0) & ((64'd1 << w) - 1)) +
                ((longint'(op_y) >> blk0) & ((64'd1 << w) - 1))) >> w != 0;
        pexp = (((op_x ^ op_y) >> blk0) & 32'((64'd1 << w) - 1)) == 32'((64'd1 << w) - 1);
        checks += 4;
        if (mid.sum0[4*k +: 4] != s0) begin failures++; $display("FAIL sum0 k=%0d", k); end
        if (mid.sum1[4*k +: 4] != s1) begin failures++; $display("FAIL sum1 k=%0d", k); end
        if (mid.gpfx[k] != gexp) begin failures++; $display("FAIL gpfx k=%0d x=%h y=%h", k, op_x, op_y); end
        if (mid.ppfx[k] != pexp) begin failures++; $display("FAIL ppfx k=%0d x=%h y=%h", k, op_x, op_y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
