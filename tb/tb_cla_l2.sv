`timescale 1ps/1ps
// tb_cla_l2: drives the second adder stage with the register contents that
// the first stage would produce, and checks the selected sum against x + y.
// Includes long carry chains (all-propagate groups and blocks).
module tb_cla_l2;
  import cdft_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] op_x, op_y, sum;
  cla_mid_t mid;

  // Reference model of the register contents, written independently with
  // integer additions.
  function automatic cla_mid_t ref_mid(logic [31:0] x, logic [31:0] y);
    cla_mid_t m;
    for (int k = 0; k < 8; k++) begin
      int unsigned blk0, w;
      m.sum0[4*k +: 4] = 4'(((x >> (4*k)) & 15) + ((y >> (4*k)) & 15));
      m.sum1[4*k +: 4] = 4'(((x >> (4*k)) & 15) + ((y >> (4*k)) & 15) + 1);
      blk0 = (k / 4) * 16;
      w = 4*k + 4 - blk0;
      m.gpfx[k] = (((longint'(x) >> blk0) & ((64'd1 << w) - 1)) +
                   ((longint'(y) >> blk0) & ((64'd1 << w) - 1))) >> w != 0;
      m.ppfx[k] = (((x ^ y) >> blk0) & 32'((64'd1 << w) - 1)) == 32'((64'd1 << w) - 1);
    end
    return m;
  endfunction

  cla_l2 dut (.mid(mid), .sum(sum));

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
        2: begin op_x = 32'h0FFF_FFFF; op_y = 32'h0000_0001; end
        3: begin op_x = 32'h00FF_F000; op_y = 32'h0000_1000; end
        default: begin op_x = $urandom; op_y = $urandom; end
      endcase
      mid = ref_mid(op_x, op_y);
      #10;
      checks++;
      if (sum != op_x + op_y) begin
        failures++;
        $display("FAIL x=%h y=%h got %h", op_x, op_y, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
