`timescale 1ps/1ps
// fixed_delay_line: behavioural model of the fixed-delay line of the clock
// generator. IPCLK passes through N_ELEM = 6 delay elements of 50 ps and a
// buffer, giving DB_IPCLK, a non-inverted copy of IPCLK delayed by
// Td2 = 300 ps. The buffer's delay (part of the common offset Delta) is zero
// in this model.
module fixed_delay_line #(
  parameter int unsigned N_ELEM = 6
) (
  input  logic ipclk,
  output logic db_ipclk
);
  logic [N_ELEM-1:0] chain;

  delay_chain #(.N(N_ELEM)) u_chain (.a(ipclk), .taps(chain));

  assign db_ipclk = chain[N_ELEM-1];
endmodule
