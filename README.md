# Pulsed-latch 16-bit shift register

A shift register normally uses one flip-flop per bit. A latch is smaller and
takes less clock power than a flip-flop, but a chain of latches that all open
at the same moment is not a shift register: data would run straight through
while they are open. This design makes latches work anyway. Each latch is
opened by a short pulse, and the pulses are staggered in time. The latch
nearest the output opens first and the latch at the input opens last, so each
latch copies its neighbour's value before that neighbour is overwritten.

Giving every bit its own pulse would need as many pulses as bits. Instead, the
16 bits are split into four **sub shift registers** of four bits. All four share
the same five pulses. Each sub register has one extra **temporary latch**, so
the register holds 20 latches in total.

## Organisation

```
            CP1    CP2    CP3    CP4     T
             |      |      |      |      |
 in ──► [Q1] ─► [Q2] ─► [Q3] ─► [Q4] ─► [T1] ──┐        sub register 1
        ┌──────────────────────────────────────┘
        └► [Q5] ─► [Q6] ─► [Q7] ─► [Q8] ─► [T2] ──┐     sub register 2
           ...                                     ...  sub registers 3, 4
                                              [T4] ──► bit leaving the register
```

Data latch *k* of every sub register (`Q1`, `Q5`, `Q9`, `Q13` for *k* = 1) is
written by pulse `CPk`. All temporary latches are written by pulse `T`. The
shared **delayed clock pulse generator** fires the pulses on every rising clock
edge, in this order:

```
clk    ┐___________
T      ┌┐
CP4      ┌┐
CP3        ┌┐
CP2          ┌┐
CP1            ┌┐
```

- **`T` first.** Each temporary latch copies the last bit of its sub register
  (`T1 ← Q4`) while that bit still holds last clock's value.
- **`CP4` to `CP1` next.** The data latches shift right, back to front
  (`Q4 ← Q3`, …, `Q1 ← in`).
- **The link between sub registers.** The first latch of the next sub register
  (`Q5`) is also written by `CP1`. By then `Q4` has already been overwritten,
  so `Q5` reads `T1`, which still holds the old `Q4`.

That is why one set of five pulses serves a register of any length. A longer
register just chains more sub registers. Making a sub register wider
instead costs one more pulse per extra bit.

After rising edge *n*, seen from outside:

- `q[1]` is the input sampled at edge *n*.
- `q[j]` is the input sampled at edge *n − j + 1*.
- `tmp[m]` is the bit that `q[4m]` held before edge *n*.
- So `tmp[4]` (`T4`) outputs the input of edge *n − 16*.

The register shifts one place per clock and has no enable and no reset. Its
contents are unknown until 20 bits have been shifted in.

## The pulse generator

Each of the five stages (`clock_pulse_circuit`) works like this:

- Its incoming clock goes through a delay element and an inverter.
- An AND gate combines the incoming clock with that delayed, inverted copy.
  The result is a pulse that starts at the rising edge and lasts about one
  delay.
- A buffer drives that pulse to a column of latches.
- A second inverter restores the polarity of the delayed clock and passes it
  on to the next stage.

The system clock enters the stage that produces `T`. The following stages
produce `CP4`, `CP3`, `CP2` and `CP1`.

In the model, with `DELAY_PS` for the delay element and `INV_PS` per inverter:

| quantity                              | value                             | default |
|---------------------------------------|-----------------------------------|---------|
| pulse width                           | `DELAY_PS + INV_PS`               | 110 ps  |
| stage-to-stage spacing                | `DELAY_PS + 2*INV_PS`             | 120 ps  |
| gap between neighbouring pulses       | `INV_PS`                          | 10 ps   |
| `CP1` closes after the clock edge     | `4*(DELAY_PS+2*INV_PS) + DELAY_PS + INV_PS` | 590 ps |

The pulses never overlap because each pulse is one inverter delay shorter than
the spacing between stages. The clock's high and low phases must each be
longer than one pulse width. The serial input `in` must be stable while `CP1`
is high; the testbenches change it 800 ps after the edge of a 1 ns clock.

The delay values are placeholders. The circuit this models is a
transistor-level design whose delay element has no specified value. Change
`DELAY_PS` and `INV_PS` to model another process. Every pulse scales with
them, so the order of the pulses and the gaps between them are kept.

## The pulse latch

`pulse_latch` models a cell made of two cross-coupled inverters. Two NMOS pass
transistors, switched by the pulse, write the cell: one from `d` and one from
`d_b`. Data therefore travel between latches as a complementary pair
(`q`/`q_b` → `d`/`d_b`). An inverter at the register input makes the `d_b`
rail for the first latch.

- While the pulse is high, the stored bit follows `d`.
- While the pulse is low, the bit is held.
- If `d` equals `d_b`, the model keeps its bit. The real cell has no defined
  behaviour for this case; it never happens inside the register.

The latch is inferred deliberately (`always_latch`). Synthesis reports one
latch bit per cell, which is the intended circuit.

## What is modelled and what is not

- **Synthesizable logic:** the latch array (`pulse_latch`,
  `sub_shift_register`).
- **Behavioural models:** `clock_pulse_circuit` and `delayed_clock_pulse_gen`.
  - The pulse width comes from an analog delay element, so these modules use
    `#` delays. They need an event-driven simulator with timing support.
  - Synthesis reduces them to nothing, so the top `shift_register_16` has no
    synthesizable clock path.
  - In silicon, the generator is a hand-placed delay chain.
- **Rising edge only.** The register is described elsewhere as using a "dual
  edge" latch. However, the pulse circuit described above fires on rising
  edges only, and nothing specifies how a falling edge would be used. This
  model shifts once per rising edge.
- **Not modelled:** supply voltage (0.3 V), process (35 nm) and power figures
  (about 40.5 µW for the 16-bit register). These are analog results with no
  logic counterpart.
- **Delay elements.** One reading of the generator has four delays for five
  pulse circuits. This model gives every stage its own delay element. The
  fifth stage's delayed clock output is left unused.

## Parameters

Defined in `shift_reg_pkg` and overridable on the modules:

| parameter   | default | meaning                                      |
|-------------|---------|----------------------------------------------|
| `SUB_WIDTH` | 4       | data latches per sub register; pulses = `SUB_WIDTH + 1` |
| `NUM_SUB`   | 4       | number of sub registers; bits = `SUB_WIDTH * NUM_SUB` |
| `DELAY_PS`  | 100     | delay element of one pulse stage (ps)        |
| `INV_PS`    | 10      | one inverter delay (ps)                      |

When you raise `SUB_WIDTH`, make the clock period longer than
`(SUB_WIDTH+1)*(DELAY_PS+2*INV_PS)` plus some margin for the input change.
The module keeps the name `shift_register_16` at every size.

## Files

| file | contents |
|------|----------|
| `rtl/shift_reg_pkg.sv` | sizes and delay constants |
| `rtl/pulse_latch.sv` | differential pulse latch |
| `rtl/sub_shift_register.sv` | `SUB_WIDTH` data latches plus the temporary latch |
| `rtl/clock_pulse_circuit.sv` | one generator stage (behavioural) |
| `rtl/delayed_clock_pulse_gen.sv` | chain of `SUB_WIDTH + 1` stages (behavioural) |
| `rtl/shift_register_16.sv` | top: generator, input inverter, `NUM_SUB` sub registers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_shift_register_n` (40-bit build: 5 × 8) |

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_pulse_latch` checks three things: the latch is transparent while the
  pulse is high, holds while it is low, and ignores a non-complementary pair.
- `tb_clock_pulse_circuit` checks the pulse width, that exactly one pulse
  comes per rising edge, and the lag of `clk_out`.
- `tb_delayed_clock_pulse_gen` checks the start time and width of every pulse,
  the order T, CP4…CP1, and that no two pulses are ever high together.
- `tb_sub_shift_register` generates the pulses itself and compares the
  sub register against a reference model.
- `tb_shift_register_16` runs the default 16-bit register for 400 random
  clocks. Against a reference shift register it checks:
  - `q` and `tmp` after every clock;
  - that the bit leaving `T4` is the input of 16 clocks earlier;
  - the pulse order and non-overlap.

  It also counts the temporary-latch hand-offs: clocks in which a sub
  register's last bit changed, so the next sub register could only get the
  right bit through the temporary latch. If any of these events never
  happens, the test fails.
- `tb_shift_register_n` runs the same test on a 40-bit build with a 2 ns clock.

To run a testbench with Verilator 5 (timing support is needed for the
behavioural generator):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/shift_reg_pkg.sv tb/tb_shift_register_16.sv --top-module tb_shift_register_16
./obj_dir/Vtb_shift_register_16
```

Lint a module on its own with
`verilator --lint-only -Wall rtl/shift_reg_pkg.sv rtl/<module>.sv -Irtl`.
The remaining lint warnings are two kinds of unused item:

- unused package constants;
- unused outputs: the last generator stage's delayed clock and the
  complement of `T4`.
