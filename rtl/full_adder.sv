`timescale 1ps/1ps
// full_adder: one-bit full adder, the building cell of the 4-2 compressor.
// sum = a ^ b ^ c, carry = majority(a, b, c). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end
endmodule
