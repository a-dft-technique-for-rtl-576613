`timescale 1ps/1ps
// cdff: controlled delay flip-flop (CDFF), W bits wide. It is a master-slave
// flip-flop whose master-to-slave transfer is gated by a second clock, TCLK.
//   * master: holds the value D had at the last rising edge of CLK (in the
//     cell, a latch transparent while CLK is low; written here as the
//     equivalent edge-triggered register);
//   * slave: a latch transparent only while CLK and TCLK are both high.
// Normal mode keeps TCLK high, and the cell is an ordinary rising-edge
// flip-flop on CLK. In test mode TCLK is a short pulse that rises while CLK
// is high: D is captured at the CLK rising edge, but Q shows it only at the
// next TCLK rising edge. The extra CLK-to-Q delay (the offset between the
// CLK edge and the TCLK edge) absorbs the slow tester period, while the
// window from TCLK rising to CLK rising, Td1 + Td2, is what the logic after
// Q gets to evaluate.
// The master/slave structure and the role of TCLK follow the design; the
// exact gating (slave open on CLK & TCLK) is read from its operation.
// Writing the master as a register keeps a zero-delay simulation free of
// races: at a CLK edge in normal mode the slave changes only after every
// register clocked by that edge (R5 of the multiplier) has sampled, as the
// cell's clock-to-Q delay ensures in silicon. The slave latch is intended,
// so the latch warnings of lint and synthesis on this module stand.
module cdff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         tclk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] master;

  always_ff @(posedge clk) master <= d;

  always_latch begin
    if (clk && tclk) q = master;
  end
endmodule
