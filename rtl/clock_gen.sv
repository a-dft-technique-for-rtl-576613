`timescale 1ps/1ps
// clock_gen: on-chip generation of CLK and TCLK from the tester clock IPCLK
// (behavioural, because the delay lines are). In test mode IPCLK is a slow
// clock of any period with 50% duty cycle; only its falling edge matters:
//   CLK1 = NOR(B_IPCLK, D_IPCLK)  -> high for Td1 after each IPCLK fall
//   CLK2 = OR(DB_IPCLK, DD_IPCLK) -> low from Td2 to Td1 + Td2 after it
// where B_IPCLK is IPCLK buffered, D_IPCLK and DD_IPCLK come from the
// programmable line (Td1 = 275 + 50*S ps, Td1 + Td2) and DB_IPCLK from the
// fixed 300 ps line. CLK1 becomes TCLK and CLK2 becomes CLK, so each TCLK
// rising edge is followed by a CLK rising edge exactly Td1 + Td2 later, and
// the tester period only changes the time from that CLK edge to the next
// TCLK edge. In normal mode (nt = 0) CLK is IPCLK and TCLK is held high.
// The gates and the mode mux are the design's; all gate and buffer delays
// are zero in this model. The IPCLK half period must exceed Td1 + Td2.
module clock_gen (
  input  logic       ipclk,
  input  logic       nt,        // N/T: 0 normal, 1 test
  input  logic [3:0] s,         // Td1 selection S0-S3
  output logic       clk1,
  output logic       clk2,
  output logic       clk,
  output logic       tclk
);
  logic b_ipclk, d_ipclk, dd_ipclk, db_ipclk;

  assign b_ipclk = ipclk;

  prog_delay_line u_pdl (.ipclk(ipclk), .s(s), .d_ipclk(d_ipclk), .dd_ipclk(dd_ipclk));

  fixed_delay_line u_fdl (.ipclk(ipclk), .db_ipclk(db_ipclk));

  always_comb begin
    clk1 = ~(b_ipclk | d_ipclk);
    clk2 = db_ipclk | dd_ipclk;
  end

  clk_mode_mux u_mux (
    .nt(nt), .ipclk(ipclk), .clk1(clk1), .clk2(clk2), .clk(clk), .tclk(tclk)
  );
endmodule
