`timescale 1ps/1ps
// delay_element: behavioural model of one delay element of the clock
// generator's delay lines. In silicon it is two current-starved inverters in
// series (a non-inverting cell) whose delay is set by the analog bias
// voltages Vp and Vn; it is sized for 50 ps on a falling input, the edge
// that sets the timing of CLK1 and CLK2. This model is not synthesizable
// logic: it is a transport delay of T_PS for both edges. The bias inputs are
// not modelled; the delay parameter stands for the biased cell. Using the
// same delay for the rising edge, which does not affect the clock timing,
// is this model's choice.
module delay_element #(
  parameter int unsigned T_PS = 50
) (
  input  logic a,
  output logic y
);
  always @(a) y <= #(T_PS) a;
endmodule
