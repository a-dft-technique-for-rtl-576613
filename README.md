# Testing a 1.4 GHz pipeline with a tester of any speed

A pipeline that runs at 1.4 GHz normally has to be delay-tested at 1.4 GHz.
Each stage gets exactly one clock period to settle, and a stage that is late by
50 ps must make the test fail. That needs a tester whose clock is fast and
placed to within tens of picoseconds. This design removes that need. Every
pipeline register between stages is a **controlled delay flip-flop (CDFF)**.
A CDFF takes its data in on one clock and lets it out on a second one.
Each stage therefore gets a fixed evaluation window that is set on the chip,
not by the tester. In test mode the only input the tester supplies is a slow,
50%-duty clock, **IPCLK**. A small on-chip circuit turns each falling edge of
IPCLK into a pair of clocks:

* a **TCLK** pulse that *launches* data into every stage;
* a **CLK** rising edge, exactly `Td1 + Td2` later, that *captures* every
  stage's result.

The launch-to-capture window is made from on-chip delay lines, so it does not
depend on the IPCLK period. It can be set between 575 ps and 1325 ps in 50 ps
steps. The tester's period only changes how long the data waits in each CDFF
before the next launch. That period can be 10 ns or 10 µs and the test still
measures the same thing.

The RTL here contains:

* the clock generator;
* the CDFF;
* the 16×16 five-stage pipelined multiplier used to demonstrate the technique;
* a top module joining them;
* testbenches that run the two procedures the scheme exists for:
  performance binning and delay-fault detection.

```
          +------------------------- clock_gen ---------------------------+
 IPCLK -->| prog_delay_line (Td1, Td1+Td2)   fixed_delay_line (Td2)       |
 N/T  --->|   CLK1 = NOR(IPCLK, D_IPCLK)     CLK2 = OR(DB_IPCLK, DD_IPCLK)|
 S[3:0]-->|                clk_mode_mux: N/T=0 -> CLK=IPCLK, TCLK=1       |
          |                              N/T=1 -> CLK=CLK2,  TCLK=CLK1    |
          +----------------------------------|---------|------------------+
                                            CLK      TCLK
          +------------------------- mult_pipeline ---|---------|---------+
 A,B ---->| R0 -> SN_L1 -> R1 -> SN_L2 -> R2 -> SN_L3 -> R3 -> CLA_L1 ->   |
          |      R4 -> CLA_L2 -> R5 ---------------------------------------|--> PRODUCT
          |  R0: flip-flop on TCLK (test) / CLK (normal); R1-R4: CDFFs;     |
          |  R5: flip-flop on CLK                                          |
          +----------------------------------------------------------------+
```

## The controlled delay flip-flop (`cdff`)

A CDFF is a master-slave flip-flop whose slave is gated by two clocks:

* the master captures D on the **rising edge of CLK**;
* the slave is transparent only while **CLK and TCLK are both high**.

How the cell behaves depends on TCLK:

* **Normal mode.** TCLK is tied high, so the slave opens whenever CLK is high.
  The cell is an ordinary rising-edge flip-flop.
* **Test mode.** CLK rises while TCLK is low, so the captured value stays in
  the master. It reaches Q only when TCLK next rises, at which point CLK is
  high again.

In test mode the clock-to-Q delay of the flip-flop is therefore the time from
CLK rising to the next TCLK rising. This delay, `t_offset`, is the slack into
which a slow tester's long period disappears:

```
  tester period = Td1 + Td2 + t_offset
  Td1 + Td2     = t_prop + t_comb + t_setup   (window the stage gets)
```

If the tester clock is slowed down, only `t_offset` grows. The window for the
logic, `t_comb`, stays the same.

In `rtl/cdff.sv` the master is written as an `always_ff` on `posedge clk` and
the slave as an `always_latch` on `clk && tclk`. A latch-based master would
behave the same. The register form was chosen because it keeps a zero-delay
simulation free of races between the CDFF and the ordinary flip-flops R0 and
R5, which switch at the same edges. The cell's own setup time and propagation
delay are not modelled. In silicon these set lower limits on the clock timing,
which the delay-line settings respect:

* Td1 must be at least the setup time, 53 ps;
* Td2 must be at least the worst-case propagation delay, 122 ps.

## Making CLK and TCLK from one slow clock (`clock_gen`)

This is the part to understand first. Everything in the circuit happens
relative to a **falling** edge of IPCLK. Call that edge t = 0; then:

| time after IPCLK falls | event |
|---|---|
| 0 | B_IPCLK (buffered IPCLK) falls; CLK1 = NOR(B_IPCLK, D_IPCLK) rises → **TCLK rises** (launch) |
| Td2 = 300 ps | DB_IPCLK (fixed line) falls; DD_IPCLK is still low, so CLK2 = OR(…) falls → **CLK falls** |
| Td1 = 275 + 50·S ps | D_IPCLK (programmable tap, inverted) rises → CLK1 falls → **TCLK falls** |
| Td1 + Td2 | DD_IPCLK (tap 6 elements further, inverted) rises → **CLK rises** (capture) |
| half period | IPCLK rises; D_IPCLK and DD_IPCLK fall back Td1 and Td1+Td2 later; CLK1 stays low because B_IPCLK is high, and CLK2 stays high because DB_IPCLK is high |

Three consequences:

* **TCLK is a pulse of width Td1.** It starts when IPCLK falls.
* **CLK is a low pulse from Td2 to Td1 + Td2.** Its rising edge is the
  capture edge.
* **Launch to capture is always Td1 + Td2.** This holds whatever the IPCLK
  period is, provided the half period is longer than Td1 + Td2 (1325 ps at
  most).

Because only the falling edge of IPCLK matters, the delay elements in the
original circuit are sized for their falling-input delay only.

**Programmable line (`prog_delay_line`).**

* A 25 ps input buffer feeds a chain of 26 elements of 50 ps each.
* The outputs of elements 5 to 26 are taps at 275, 325, …, 1325 ps.
* A 4-to-16 decoder (`decoder_4x16`) drives one set of select lines into a
  dual 16:1 multiplexer (`tap_mux16`).
* The multiplexer picks tap S for D_IPCLK and tap S+6 for DD_IPCLK. The
  second tap is always 300 ps later, so one decoder serves both outputs.
* Both outputs are inverted.

**Fixed line (`fixed_delay_line`).** Six elements give DB_IPCLK, which is
IPCLK delayed by 300 ps and not inverted.

**The selection input `S`.**

* `S` (S0 is the LSB) sets Td1 = 275 + 50·S ps, so Td1 runs from 275 to
  1025 ps.
* The window Td1 + Td2 runs from 575 to 1325 ps.
* Setting S = i puts the device in bin i.

**Mode multiplexer (`clk_mode_mux`).**

* N/T = 0 (normal mode): CLK = IPCLK and TCLK = 1.
* N/T = 1 (test mode): CLK = CLK2 and TCLK = CLK1.

Switch modes only while IPCLK is high, when CLK2 is high as well. Otherwise
CLK can glitch.

The delay elements are current-starved double inverters with analog bias
voltages. Here they are a behavioural transport delay
(`delay_element`, `always @(a) y <= #(T_PS) a;`). That is why `clock_gen`,
the delay lines and the top are behavioural models and not synthesizable
logic. The decoder, the multiplexer, the gates and the mode multiplexer are
plain logic. All gate and buffer delays are zero.

## The test vehicle: a five-stage 16×16 multiplier (`mult_pipeline`)

The multiplier is unsigned, uses no operand encoding, and is cut into five
stages of similar delay. In the original design the critical paths are 715,
690, 690, 708 and 645 ps, so 715 ps sets the 1.4 GHz rating.

| stage | module | work |
|---|---|---|
| SN_L1 | `sn_l1` (uses `pp_gen`) | 16 partial products (A AND B[i], shifted by i); first level of 4-2 compressors, 16 rows → 8 |
| SN_L2 | `sn_l2` | second 4-2 level, 8 rows → 4 |
| SN_L3 | `sn_l3` | third 4-2 level, 4 rows → 2 operands |
| CLA_L1 | `cla_l1` | per 4-bit group: sum with carry-in 0 and with carry-in 1, group generate/propagate, and lookahead over 16-bit blocks |
| CLA_L2 | `cla_l2` | lookahead across the two blocks, group carries, and selection of each group's sum by its carry |

**The 4-2 compressor (`compressor42`).** It is two full adders in series:

* the first adds A, B and C; its carry is **Cout**, which goes to the next
  column;
* the second adds the first sum, D and **Cin**, where Cin is the Cout from
  the column below; it gives **Sum** and **Carry**.

Cout does not depend on Cin, so a row of compressors settles in constant time
with no carry ripple. `compressor42_row` wires a row of them across 32
columns.

**The adder.** It is a carry-select lookahead adder with 4-bit groups and
three lookahead levels:

* bit → group;
* group → 16-bit block;
* block → 32 bits.

The levels are split over the two CLA stages.

**Registers.**

| register | type | clock |
|---|---|---|
| R0 | ordinary flip-flop | TCLK in test mode, CLK in normal mode (mux on N/T) |
| R1–R4 | CDFFs | CLK and TCLK |
| R5 | ordinary flip-flop | CLK in both modes |

R0 and R5 can be ordinary flip-flops because of where they sit. R0 launches
into SN_L1 on the same TCLK edge that the CDFFs use. R5 captures from CLA_L2
on the same CLK edge that the CDFFs capture on. R4 is stored as a packed
struct (`cdft_pkg::cla_mid_t`) of the two conditional sums and the block
lookahead signals.

**Latency.**

* Normal mode: one product per CLK cycle, with five cycles of latency.
* Test mode: every tester period moves each vector one stage. A vector that
  R0 samples at the TCLK edge of tester period n appears on `product` at the
  CLK capture edge of period n+4. Counting that period's own capture edge,
  this is the fifth CLK rising edge after the launch.

In test mode, each stage's logic is timed against the Td1 + Td2 window in
every tester period. The five stages are simply tested on successive tester
periods.

## Using the test mode

**Performance binning (`tb/tb_binning.sv`).**

1. Apply vectors that exercise the slowest stage, starting at the widest
   window (S = 15).
2. Narrow the window one step at a time until the product is wrong.
3. The device goes in the bin of the last setting at which it passed, from 0
   to 15. A device that fails even at S = 15 goes in bin 16.

A device whose slowest path takes 715 ps passes at 725 ps, so it lands in
bin 3 (Td1 = 425 ps). The result is the same with a 100 MHz and a 100 kHz
tester clock.

**Delay-fault detection (`tb/tb_delay_fault.sv`).**

1. Fix S = 3.
2. For each target path, apply two vectors: an initialising vector, then an
   activating one.
3. Check the activating vector's product at the CLK edge where it is due.
4. Add delay to the path in 50 ps steps until that check fails.

The smallest detected fault is the first step that pushes the path past the
725 ps window. That is 50 ps for a 715 ps path and 300 ps for a 450 ps path.
Both testbenches model timing with `tb/delayed_mult.sv`. It is the same
pipeline with a transport delay, set at run time, on each stage's output.

## How far the RTL follows the original design

These parts follow it: the scheme, the gate equations and the mode table of
the clock generator, the 50 ps / 300 ps / 275–1025 ps numbers, the register
clocking, the stage split, the 4-2 compressor wiring, the adder style, and the
two test procedures with their published bins and detected fault sizes.

These are choices or simplifications made here:

* **Delays.** All delays are ideal.
  * Each delay element has one symmetric delay of 50 ps. The real element is
    specified only for falling inputs.
  * There is no bias-voltage input and no process, temperature or voltage
    spread. The real line deviates by up to about ±16%, and its Td2 measures
    298 ps.
  * The offset the buffers cancel (multiplexer and inverter delay) is zero.
    The 25 ps needed to reach 275 ps is an input buffer of the programmable
    line.
  * The chain length (26 elements, taps from the fifth) and the position of
    that buffer were worked out from the element count and the delay range.
    They are not a given layout.
* **CDFF.** It is modelled at register level, with the slave enabled by
  CLK AND TCLK. Its transistor-level control logic, setup time and
  clock-to-Q delay are not modelled.
* **Summation network.**
  * Every row is a full 32-bit vector, with a 4-2 compressor in every column
    and zeros where there is no bit.
  * The original trims each row to its bit extent, with full/half adders at
    the edges and a small adder on the low bits. The results are identical;
    only the gate count differs.
  * The final adder is a full 32 bits wide.
* **Adder split.** How the lookahead levels are divided between CLA_L1 and
  CLA_L2 is a choice made here.
* **No reset.** The pipeline holds random data until five clocks of valid
  input have passed through it.
* **Test models, not silicon.**
  * Path delays and injected faults are delays on a whole stage output. They
    are not gate-level paths.
  * The stage delays for fast and slow process corners in `tb_binning` are
    assumed values.
  * The testbenches check arithmetically correct products for every vector.
* **Not built.** The CLK and TCLK distribution trees, which should be
  matched replicas, and the bias-voltage generator. The clocks are ideal nets
  here.

## Simulating

All files have `` `timescale 1ps/1ps ``. The delay lines need `--timing`. The
package must come first, and `-y` lets verilator find the other modules.

```
verilator --binary --timing -y rtl -y tb rtl/cdft_pkg.sv tb/tb_cdft_mult_top.sv \
          --top-module tb_cdft_mult_top
./obj_dir/Vtb_cdft_mult_top
```

Replace the testbench name to run any other testbench. Each prints
`TB_RESULT checks=N failures=M` at the end, and each has a watchdog.

* **`tb_cdft_mult_top`** runs the top at its default parameters:
  * normal mode at a 714 ps clock;
  * a switch to test mode;
  * test mode at S = 3 with a 100 MHz tester clock;
  * test mode at S = 0 and S = 15 with a 100 kHz tester clock;
  * a switch back to normal mode.
  
  It counts each of these and fails if any of them never happened.
* **`tb_binning` and `tb_delay_fault`** run the two procedures above.
* **`tb_cdff_clock_rates`** puts a delayed logic block between two CDFFs.
  The CDFFs are clocked by the generator with Td1 = 275 ps, at 100 MHz,
  10 MHz, 1 MHz and 100 kHz. At every rate it checks three things:
  * the CLK-to-Q delay equals the period minus 575 ps;
  * a 525 ps block is captured in time;
  * a 625 ps block is not.
* **`tb_clock_gen`** measures TCLK width, CLK timing and the launch-to-capture
  window. It does this for all 16 settings of S, with 100 MHz and 100 kHz
  tester clocks.
* **Block testbenches.** The remaining `tb_<module>` files each check one
  module against independently computed values.

Verilator reports a latch on `cdff`. That latch is intended, because it is the
slave.

## Files

| file | contents |
|---|---|
| `rtl/cdft_pkg.sv` | widths, timing constants, row and R4 struct types |
| `rtl/cdft_mult_top.sv` | top: clock generator + multiplier; ports `ipclk, nt, s, a, b, product, clk, tclk` |
| `rtl/clock_gen.sv`, `clk_mode_mux.sv` | CLK1/CLK2 gates, mode selection |
| `rtl/prog_delay_line.sv`, `fixed_delay_line.sv`, `delay_chain.sv`, `delay_element.sv` | delay lines (behavioural) |
| `rtl/decoder_4x16.sv`, `tap_mux16.sv` | tap selection |
| `rtl/mult_pipeline.sv`, `cdff.sv` | pipeline and its registers |
| `rtl/pp_gen.sv`, `sn_l1.sv`, `sn_l2.sv`, `sn_l3.sv`, `compressor42.sv`, `compressor42_row.sv`, `full_adder.sv` | partial products and summation network |
| `rtl/cla_l1.sv`, `cla_l2.sv` | two-stage carry-select lookahead adder |
| `tb/tb_*.sv` | testbenches; `tb/delayed_mult.sv` is the timed pipeline model they share |
