# One circuit for FM0 and Manchester line coding

Short-range vehicle links (DSRC: toll collection, car-to-car warnings) send
their downlink in FM0 or Manchester code. The two codes have the same goal.
Each one gives the line signal a level change inside every bit period, so the
signal has no dc component and the receiver can recover the clock. Built the
obvious way, a dual-mode encoder is two circuits behind a selector: an XOR
gate for Manchester, and a two-flip-flop state machine for FM0. Whichever
code is selected, the other circuit sits idle.

This RTL implements the SOLS approach (similarity-oriented logic
simplification). It rearranges the FM0 logic until it has the same shape as
the Manchester logic, so that one set of gates produces both codes. The
result is four small parts and one flip-flop, and every part is in use in
both modes:

```
 A leg:  (mode ? X : B(t-1)) --> NOT ----------------.
                                                     MUX-1 (select = CLK:
                                                     high -> A, low -> B) --> code_out
 B leg:  (mode ? 0 : B(t-1)) --> XOR with X --+------'
                                              |
                                              '--> DFFB (rising CLK edge) --> B(t-1)
```

## The two codes

Each bit X occupies one CLK period. The period is split into a former half
(CLK high), called A, and a later half (CLK low), called B.

**Manchester:** `code = X XOR CLK`. So A = NOT X and B = X. A 0 bit is sent
as high-then-low and a 1 bit as low-then-high.

**FM0** follows three rules:

1. A 0 bit has a level change between A and B.
2. A 1 bit has no change between A and B.
3. There is always a level change at the start of every bit.

Rule 3 gives `A(t) = NOT B(t-1)`. Rules 1 and 2 then give
`B(t) = X XOR B(t-1)`. So FM0 needs to remember only one bit: the level of
the last later half.

After reset this design holds B(t-1) = 1. A 0 bit sent first therefore codes
as low-then-high (`01`), and a following 1 bit codes as `00`.

## How the sharing works

**Area-compact retiming.** A plain FM0 state machine stores both A and B in
two flip-flops. But the next state depends only on B(t-1), so one flip-flop
(DFFB) is enough. MUX-1 is a 2:1 mux whose select is CLK itself. It passes
the A leg while CLK is high and the B leg while CLK is low. Its output is the
line code. DFFB is a positive-edge flip-flop placed after MUX-1. At each
rising edge it stores the value MUX-1 carried in the later half that just
ended, which is B(t).

**Balance logic-operation sharing.** The two legs are shared as follows:

- *A leg* (`sols_a_logic`). FM0 needs NOT B(t-1) and Manchester needs NOT X.
  Both are one inversion, so there is one inverter. A mux in front of it
  chooses its operand: B(t-1) for FM0, X for Manchester.
- *B leg* (`sols_b_logic`). FM0 needs X XOR B(t-1) and Manchester needs X.
  X can be written as X XOR 0, so there is one XOR. A mux in front of it
  chooses its second operand: B(t-1) for FM0, constant 0 for Manchester.

In Manchester mode the two legs give NOT X and X. MUX-1 then produces
X XOR CLK, with no logic used only by Manchester. In that mode DFFB keeps
loading X. This does not affect the Manchester output. It means that FM0,
when selected again, continues from the level the line was last at.

Synthesised generically, the whole encoder is 7 word-level cells, one of
them a flip-flop.

## Interface and timing

`sols_encoder` (top) has these ports:

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1 | bit clock. It is also the select of MUX-1: high = former half |
| `rst_n`    | in  | 1 | asynchronous active-low reset. Sets DFFB to 1 |
| `mode`     | in  | 1 | `sols_pkg::code_mode_e`: `MODE_FM0` = 0, `MODE_MANCHESTER` = 1 |
| `x`        | in  | 1 | data bit. Change it just after a rising edge and hold it for the whole period |
| `code_out` | out | 1 | line code. Combinational, and toggles at up to twice the bit rate |

- **Throughput and latency.** The encoder codes one bit per CLK cycle. The
  code word for X appears in the same period that X is presented, so latency
  is zero.
- **Changing mode.** `mode` may change at a rising edge. The next bit is then
  coded in the new mode.
- **Using the output.** `code_out` depends on the level of CLK. A consumer
  must therefore use it as a signal at the half-bit rate, for example by
  sampling it with a clock at twice the bit rate or by driving a modulator
  with it directly.

## Where this RTL departs from, or adds to, the published architecture

- **DFFB input.** DFFB's D input comes from the B leg, not from the output
  of MUX-1. At the rising edge the two carry the same value, because CLK was
  low and MUX-1 was passing the B leg. Taking the input from the output of a
  mux that CLK itself selects would make a zero-delay race in simulation.
  Tapping the leg avoids it.
- **Glitches in silicon.** The circuit still uses CLK as data, which is
  inherent to this architecture. In silicon, `code_out` can glitch around
  the rising edge, while MUX-1 switches and DFFB updates at the same time.
  Treat it as a timing-critical path and constrain it.
- **Choices not fixed by the source:** the polarity of `mode`, the reset
  (asynchronous, active low, B(t-1) = 1) and the name `rst_n`. The reset
  value makes the first 0 bit after reset code as `01`, which matches the
  published FM0 example. The five ports match the five bonded I/Os in the
  published synthesis summary.
- **Not included:**
  - The conventional two-circuit encoder, which serves only as a baseline
    for comparison.
  - The rest of the DSRC transceiver: microprocessor, RF front end,
    receive-side baseband and decoder, modulation, error correction.
    These are named in the source only at system level and are not designed
    there.
- **Unchecked figures.** The published area, power and maximum frequency
  (2 GHz Manchester and 900 MHz FM0 in 0.18 um CMOS) belong to a specific
  transistor-level realisation. Nothing in this RTL checks them.

## Can it carry the DSRC rates?

The DSRC standards run at 500 kb/s, 4 Mb/s and 27 Mb/s. The encoder needs a
CLK equal to the bit rate, so 27 MHz at most. It stores no data. These rates
are far below the published maximum speeds of the encoder.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`.

- `tb_sols_a_logic`, `tb_sols_b_logic` apply all 8 input combinations.
  Each output is compared with the value derived from the coding rules.
- `tb_sols_encoder` tests the complete encoder. The encoder has no
  parameters, so this test also runs it at full size.
  - **Directed cases:** the published FM0 example (`0,1` after reset gives
    `01 00`) and the Manchester example (`0,1,1,0,1` gives
    `10 01 01 10 01`).
  - **Random run:** 4000 bits, with random mode switches and occasional
    mid-stream resets.
  - **Per bit:** both half-bits are compared against a rule-based reference.
    Each word is decoded back to X. The test checks that every Manchester
    word has a mid-bit change.
  - **Whole run:** the FM0 running disparity must stay within ±2, which
    shows dc balance. Exactly one clock cycle must pass per bit.
  - **Coverage:** the test counts FM0 mid-bit changes, FM0 holds, Manchester
    bits, switches in both directions and resets. Any of these that never
    occurs counts as a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/sols_pkg.sv rtl/sols_a_logic.sv rtl/sols_b_logic.sv rtl/sols_encoder.sv \
  tb/tb_sols_encoder.sv --top-module tb_sols_encoder -o sim
./obj_dir/sim
```

For the leg testbenches, replace the testbench file and the top-module name.

## Files

- `rtl/sols_pkg.sv`: the mode type.
- `rtl/sols_a_logic.sv`: A leg (operand mux and shared inverter).
- `rtl/sols_b_logic.sv`: B leg (operand mux and shared XOR).
- `rtl/sols_encoder.sv`: top. Contains MUX-1 and DFFB and wires in the two
  legs.
- `tb/tb_*.sv`: the testbenches described above.
