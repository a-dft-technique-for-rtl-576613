`timescale 1ps/1ps
// decoder_4x16: decodes the delay selection inputs S0-S3 into the 16 one-hot
// select lines of the tap multiplexer. Code i (S0 is the least significant
// bit) selects tap i, which gives Td1 = 275 ps + i * 50 ps. Combinational;
// not timing critical, since S is static during a test.
module decoder_4x16 (
  input  logic [3:0]  s,
  output logic [15:0] sel
);
  always_comb begin
    sel = '0;
    sel[s] = 1'b1;
  end
endmodule
