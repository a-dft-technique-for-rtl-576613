`timescale 1ps/1ps
// tap_mux16: the 16:1 multiplexer of the programmable delay line. One set of
// one-hot select lines picks two taps of the delay chain at once: tap i for
// the Td1 output and tap i + SHIFT for the Td1 + Td2 output, SHIFT elements
// (Td2 = 300 ps = 6 elements of 50 ps) further down the chain. So a single
// decoder sets both outputs and their spacing stays Td2 for every setting.
// The taps input holds N_SEL + SHIFT chain outputs. Combinational (an AND-OR
// mux); in silicon its delay is part of the compensated offset.
module tap_mux16 #(
  parameter int unsigned N_SEL = 16,
  parameter int unsigned SHIFT = 6
) (
  input  logic [N_SEL+SHIFT-1:0] taps,
  input  logic [N_SEL-1:0]       sel,     // one-hot
  output logic                   d_out,   // tap at Td1
  output logic                   dd_out   // tap at Td1 + Td2
);
  always_comb begin
    d_out  = 1'b0;
    dd_out = 1'b0;
    for (int i = 0; i < N_SEL; i++) begin
      d_out  = d_out  | (sel[i] & taps[i]);
      dd_out = dd_out | (sel[i] & taps[i+SHIFT]);
    end
  end
endmodule
