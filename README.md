# 5-bit maximum-length XNOR LFSR, built structurally

A linear feedback shift register (LFSR) is a shift register whose input bit
is a linear function of its own state. This one has five D flip-flops in a
chain and a single XNOR gate. On every rising clock edge each bit moves one
stage up, from stage 0 (LSB) to stage 4 (MSB). Stage 0 loads the XNOR of
stages 1 and 4. That tap pair gives a maximum-length sequence: the register
visits all 2^5 - 1 = 31 states except `5'b11111` before it repeats. All five
stage outputs are available in parallel. Applications include pseudo-random
patterns, scramblers and test stimulus.

The RTL follows the structural style the design is built around. The flip-flop
and the gate are leaf modules, and the top only instantiates and wires them:

```
            +---------------- XNOR(q[1], q[4]) <------+----------+
            |                                         |          |
            v                                         |          |
  clk ->  [FF0] --q[0]--> [FF1] --q[1]--> [FF2] --q[2]--> [FF3] --q[3]--> [FF4] --q[4]
 reset -> (all five stages)                  (q[1] and q[4] feed the XNOR)
```

## Files

| file | module | role |
|---|---|---|
| `rtl/lfsr_pkg.sv` | `lfsr_pkg` | width (5), taps (1, 4) and period (31) |
| `rtl/lfsr_dff.sv` | `lfsr_dff` | positive-edge D flip-flop with asynchronous clear |
| `rtl/lfsr_xnor2.sv` | `lfsr_xnor2` | two-input XNOR, ports `a`, `b`, `c` |
| `rtl/lfsr5.sv` | `lfsr5` | top: five flip-flops and the feedback gate |
| `tb/tb_lfsr_dff.sv`, `tb/tb_lfsr_xnor2.sv`, `tb/tb_lfsr5.sv` | | self-checking testbenches |

## Interface and timing of `lfsr5`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | common clock; all stages update on its rising edge |
| `reset` | in | 1 | active high, asynchronous; clears all stages to 0 |
| `q` | out | `WIDTH` | parallel state, `q[0]` = stage 0 (LSB) ... `q[4]` = stage 4 (MSB) |

Parameters: `WIDTH` = 5, `TAP_A` = 1, `TAP_B` = 4. They are there so other
tap pairs can be tried. Only the defaults are the design described here, and
only some tap pairs give a maximal sequence.

`q` takes a new state on every rising edge after reset is released, so the
period is 31 clocks.

## Why no seed is needed, and the lock-up state

With XOR feedback the all-zeros word is the lock-up state: XOR of two zeros
is zero, so the register stays at zero forever and has to be seeded away from
it. With XNOR feedback the roles swap. All ones maps onto itself
(XNOR(1,1) = 1) and is the only state outside the 31-state cycle. All zeros is
an ordinary member of the cycle. A plain clear to zero is therefore a valid
start, and the register needs no seed value. An assertion in `lfsr5` flags
the all-ones word if it ever appears. That can only happen if the register is
disturbed, for instance by a tap change or an upset.

## The state cycle, and how to read other published tables

The 31-state cycle from reset, as `q[4:0]` in hex:

```
00 01 03 06 0C 19 12 05 0B 16 0D 1B 17 0F 1E 1D 1A 15 0A 14 08 11 02 04 09 13 07 0E 1C 18 10 (00 ...)
```

The exact order depends on the bit labelling. Tables of this LFSR are
sometimes printed with the bits in a different order, or with the
transitions listed in reverse. One such table lists the cycle as

```
06 0E 1C 19 13 05 08 10 03 04 0A 14 0B 16 0F 1E 1D 1B 17 0D 1A 15 09 12 07 0C 18 11 01 00 02 (06 ...)
```

That table matches this circuit exactly, all 31 transitions, if each hex
word is read as `{q[1], q[2], q[3], q[4], q[0]}` and the list is walked
backwards. Read forwards, the same table is also what a different circuit
produces: taps 2 and 4, with the word read as `{q[3], q[2], q[1], q[0], q[4]}`.

Read directly as `q[4:0]`, it does not match shift-register behaviour at all:
`06 -> 0E` is not a one-place shift. This RTL keeps the taps at 1 and 4 and
the plain `q[4:0]` order. The full-size testbench checks every step of that
table under the first reading.

## Choices made in this implementation

* **Reset:** asynchronous, active high, clearing to 0. The design has one
  reset line to every flip-flop and resets once before clocking. Its polarity,
  timing and value were chosen here.
* **Clock:** a single clock, rising edge, as the design specifies.
* **Taps and width as parameters:** the design fixes them at 5, 1 and 4. They
  are parameterised here, with those defaults.
* **Lock-up assertion:** added here. Synthesis ignores it.

## Cost

After synthesis the top has 5 flip-flops and one XNOR: an XOR and an
inverter, that is one 2-input function. On a LUT-based FPGA that means five
registers and a single LUT. The critical path is one flip-flop clock-to-out,
one gate and one setup time.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a
watchdog that ends the run with a failure if it hangs.

* `tb_lfsr_xnor2`: checks all four input combinations, and then random ones,
  against a written-out truth table.
* `tb_lfsr_dff`: checks that `q` follows `d` at the rising edge, that it holds
  between edges, and that reset clears `q` immediately and holds it clear
  across edges.
* `tb_lfsr5` runs the top at its default parameters through three full
  periods, a reset in the middle of a run and a restart. It checks:
  * every state against a reference model written in the testbench;
  * 31 distinct states per period;
  * the start state returns after exactly 31 clocks, never earlier;
  * `5'b11111` never appears;
  * the published transition table holds, as described above.

  It also counts the mechanisms it exercised (resets, feedback of 0 and of 1,
  cycle wraps) and fails if any count is zero.

To simulate with Verilator, run from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lfsr_pkg.sv tb/tb_lfsr5.sv --top-module tb_lfsr5 -o sim
./obj_dir/sim
```

Use `tb_lfsr_dff` or `tb_lfsr_xnor2` in place of `tb_lfsr5` for the leaf
modules.
