`timescale 1ps/1ps
// compressor42: 4-2 compressor made of two full adders, as the summation
// network of the multiplier uses it. The first adder adds a, b and c; its
// carry leaves the cell as cout (weight 2) and its sum goes, with d and the
// carry-in from the next lower column, into the second adder, which gives
// sum (weight 1) and carry (weight 2). cout never depends on cin, so carries
// do not ripple along a row of compressors. Combinational:
//   a + b + c + d + cin = sum + 2 * (carry + cout).
module compressor42 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(a),  .b(b), .c(c),   .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1), .b(d), .c(cin), .sum(sum), .carry(carry));
endmodule
