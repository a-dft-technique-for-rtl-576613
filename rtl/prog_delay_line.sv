`timescale 1ps/1ps
// prog_delay_line: behavioural model of the programmable delay line of the
// clock generator. IPCLK goes through an input buffer of T_BUF_PS and a chain
// of N_ELEM delay elements of 50 ps. Taps FIRST_TAP .. N_ELEM of the chain
// feed the 16:1 multiplexer; the 4x16 decoder of S selects tap i for the Td1
// output and tap i + 6 for the Td1 + Td2 output. Both outputs are inverted:
//   d_ipclk  rises Td1       = 275 + 50*S ps after an ipclk falling edge
//   dd_ipclk rises Td1 + Td2 = 575 + 50*S ps after an ipclk falling edge
// (Td1 from 275 to 1025 ps, Td1 + Td2 up to 1325 ps). With the 6 elements
// of the fixed line this uses the design's 32 delay elements. The delays of
// the multiplexer and inverters (the common offset the design calls Delta)
// are zero here; the 25 ps input buffer, which makes the first tap 275 ps,
// is this model's reading of how the buffers trim the minimum delay.
// The decoder and multiplexer are synthesizable; the chain is not. The first
// four elements only add delay and are not tapped, so lint reports their
// outputs as unused.
module prog_delay_line
  import cdft_pkg::*;
#(
  parameter int unsigned T_BUF_PS  = 25,
  parameter int unsigned N_ELEM    = 26,
  parameter int unsigned FIRST_TAP = 5     // element whose output gives Td1 = 275 ps
) (
  input  logic       ipclk,
  input  logic [3:0] s,             // delay selection S0-S3 (s[0] = S0)
  output logic       d_ipclk,       // inverted, delayed by Td1
  output logic       dd_ipclk       // inverted, delayed by Td1 + Td2
);
  localparam int unsigned SHIFT  = TD2_PS / T_ELEM_PS;   // 6
  localparam int unsigned N_TAPS = N_SEL + SHIFT;        // 22

  logic              buf_in;
  logic [N_ELEM-1:0] chain;
  logic [N_TAPS-1:0] taps;
  logic [15:0]       sel;
  logic              d_tap, dd_tap;

  always @(ipclk) buf_in <= #(T_BUF_PS) ipclk;

  delay_chain #(.N(N_ELEM)) u_chain (.a(buf_in), .taps(chain));

  assign taps = chain[FIRST_TAP-1 +: N_TAPS];

  decoder_4x16 u_dec (.s(s), .sel(sel));

  tap_mux16 #(.N_SEL(N_SEL), .SHIFT(SHIFT)) u_mux (
    .taps(taps), .sel(sel), .d_out(d_tap), .dd_out(dd_tap)
  );

  always_comb begin
    d_ipclk  = ~d_tap;
    dd_ipclk = ~dd_tap;
  end
endmodule
