# Pulsed-latch universal shift register

A universal shift register (USR) holds a word and, on command, keeps it, shifts
it one place right or left with a serial bit coming in at the free end, or loads
a new word in parallel. It is the usual bridge between serial and parallel data.
The usual design puts an edge-triggered flip-flop behind a 4-to-1 multiplexer in
every bit.

This design stores each bit in a level-sensitive D latch instead. A flip-flop is
two latches in master-slave form, so a latch register needs about half the
storage logic and has a shorter path from data to output. The catch is that a
latch is transparent for as long as its enable is high. If every latch of a shift
register opened at once, a bit would race through several stages in one
operation. The design avoids that with **pulsed clocks**: every latch has its own
enable pulse, the pulses are short (low duty cycle), and no two are ever high at
the same time. The order of the pulses then decides what each latch sees when it
captures.

The register here is 16 bits wide, built from four 4-bit slices, and comes with
the pulse generator that drives it.

## Operations

`mode` is the two-bit select S1 S0 (`usr_pkg::usr_mode_t`):

| S1 S0 | name         | bit *i* stores                                  |
|-------|--------------|-------------------------------------------------|
| 00    | `MODE_HOLD`  | its own value (memory)                          |
| 01    | `MODE_RIGHT` | bit *i*+1; the MSB takes the serial input `rs_in` |
| 10    | `MODE_LEFT`  | bit *i*−1; bit 0 takes the serial input `ls_in`   |
| 11    | `MODE_LOAD`  | `par_in[i]`                                     |

"Right" means towards bit 0. RS enters at the MSB and LS enters at bit 0.

## Why the pulse order matters

During a shift, latch *i* copies a neighbour. It must capture while that
neighbour still holds the old value, so it has to fire before the neighbour does:

* **Right shift.** Bit *i* reads bit *i*+1, so the pulses must run from bit 0
  up to the MSB.
* **Left shift.** Bit *i* reads bit *i*−1, so the pulses must run from the MSB
  down to bit 0.
* **Hold and load.** No bit reads a neighbour, so any order works.

The generator therefore has a `reverse` input. The top drives it with
`mode == MODE_LEFT`.

The same rule sets how the 16-bit register is clocked. Suppose the four 4-bit
slices shared one set of four pulses, so bit *k* of every slice opened at the
same moment. Then the top bit of one slice and the bottom bit of the next slice
would each need to fire before the other, which is impossible. A shift across a
slice boundary would then skip or repeat a bit. So this design gives each of the
16 latches its own pulse. The slices are still separate 4-bit registers, joined
only through their serial inputs:

* the LS input of slice *k* is the top bit of slice *k*−1;
* the RS input of slice *k* is the bottom bit of slice *k*+1.

While its pulse is high, a latch is transparent through its multiplexer to a
neighbour that is closed. Its input is therefore stable, and it closes on the
right value.

## Pulse generator and timing

`pulse_gen` builds the pulses from a fast reference clock `clk`. A slot counter
walks through `PHASES` slots. Each slot is `GAP_CYCLES` cycles with every pulse
low, then `PULSE_CYCLES` cycles with one pulse high. The pulse outputs come
straight from flip-flops, so they are free of glitches and never overlap. An
assertion checks that no two are ever high together.

One pass through all the slots is a **sweep**, and one sweep carries out one
register operation. With the defaults (16 phases, 1-cycle pulse, 1-cycle gap):

```
clk cycle : 0    1    2    3    4   ...  30   31 | 0 ...
window    : 1    0    0    0    0        0    0  | 1
pulse     : -    p0   -    p1   -   ...  -    p15| -      (right shift / hold / load)
pulse     : -    p15  -    p14  -   ...  -    p0 | -      (left shift)
```

`load_window` is high in the gap that opens each sweep. At that point the
previous operation is complete and every latch is closed.

**Protocol.**

1. Change `mode`, `par_in`, `ls_in` and `rs_in` only while `load_window` is
   high, and hold them until the next window.
2. `reverse` is sampled on the last clock edge of the window.
3. `q` settles one bit per pulse during the sweep. It holds the complete result
   from the next window onward.

An operation takes `WIDTH*(GAP_CYCLES+PULSE_CYCLES)` reference cycles: 32 for
the 16-bit default, 8 for a 4-bit register. To make the pulses narrower than a
reference cycle, raise the reference clock.

## Module hierarchy

```
hs_usr_top                  pulse generator + 16-bit register
├── pulse_gen               PHASES = 16 non-overlapping pulses, direction-aware
└── usr16_latch             SLICES = 4 slices of SLICE_WIDTH = 4 bits
    └── usr4_latch (x4)     WIDTH = 4
        ├── usr_mux4 (x4)   S1 S0 selection per bit
        └── d_latch  (x4)   level-sensitive storage bit
usr_pkg                     usr_mode_t encoding
```

`usr4_latch` on its own is the 4-bit register: four multiplexers and four
latches, one pulse each.

### `hs_usr_top` ports

| port          | dir | width | meaning                                                   |
|---------------|-----|-------|-----------------------------------------------------------|
| `clk`         | in  | 1     | reference clock of the pulse generator                    |
| `rst_n`       | in  | 1     | asynchronous active-low reset of the pulse generator      |
| `mode`        | in  | 2     | S1 S0, see the table above                                |
| `par_in`      | in  | 16    | parallel data                                             |
| `ls_in`       | in  | 1     | serial input at bit 0 (left shift)                        |
| `rs_in`       | in  | 1     | serial input at the MSB (right shift)                     |
| `q`           | out | 16    | stored word; `q[0]` and `q[15]` are the serial outputs    |
| `pulse`       | out | 16    | latch enables, for observation                            |
| `load_window` | out | 1     | inputs may change in this cycle                           |

Parameters:

* `SLICES` (default 4) and `SLICE_WIDTH` (default 4) set the width, which is
  their product.
* `PULSE_CYCLES` and `GAP_CYCLES` (both default 1) set the pulse width and the
  gap before each pulse, in reference cycles.

## What follows the original design and what does not

These parts follow the original design:

* the latch-plus-multiplexer bit;
* the S1 S0 operation table;
* LS at bit 0 and RS at the MSB;
* the 4-bit register with one pulse per latch;
* the 16-bit register built from four 4-bit registers;
* the requirement for non-overlapping, low-duty-cycle pulses.

These are this implementation's own:

* **Pulses per latch.** The 16-bit register gets 16 separate pulses instead of
  the same four pulses repeated for every slice. The reason is given above.
* **Pulse order.** The order depends on the direction of the shift.
* **Generator circuit.** The pulse generator's circuit, its reset and the
  load-window handshake are new.
* **Latch model.** `d_latch` is a behavioural `always_latch`, not a gate
  netlist.

Limits to keep in mind:

* **No latch reset.** The latches have no reset. Load the register before
  using it. Only the pulse generator resets.
* **Stable inputs.** Inputs must stay stable for a whole sweep. Nothing in the
  register enforces this.
* **Not a timing claim.** The design's case rests on latch delay and area in a
  real device. That is a timing and area claim, and RTL simulation does not
  test it. In a real chip, the pulse width and the gaps must meet the latches'
  setup and hold times, and this has to be checked with static timing analysis
  on the target.
* **No baseline.** The conventional flip-flop register that the latch version
  is compared against is not included.

Lint reports two things, both expected:

* every `d_latch` is a latch;
* a combinational loop runs from each latch through its own hold input. The
  loop is closed only while that latch's pulse is high, and it then just keeps
  the stored value.

## Testbenches

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench          | what it checks |
|--------------------|----------------|
| `d_latch_tb`       | `q` follows `d` while enabled and holds while closed, with `d` moving |
| `usr_mux4_tb`      | all selects with all input combinations |
| `pulse_gen_tb`     | 16- and 4-phase generators, including stretched pulses and gaps, against a cycle model: pulse position, order, direction taken only in the window |
| `usr4_latch_tb`    | 4-bit register with bench-driven pulses: every bit after every pulse, the whole word after each sweep, and no change while all latches are closed |
| `usr16_latch_tb`   | the same for 16 bits, including shifts across slice boundaries |
| `hs_usr_top_tb`    | the default top end to end, described below |
| `usr_workloads_tb` | the same end-to-end checks (through `hs_usr_bench`) on a 4-bit register, the 16-bit register, and the 16-bit register with 2-cycle pulses and 3-cycle gaps |

`hs_usr_top_tb` runs the following sequence on the top at its default size:

* a parallel load;
* serial-in/parallel-out through RS;
* parallel-in/serial-out through the MSB;
* 300 random operations.

It checks:

* the sweep length (32 cycles);
* that pulses never overlap;
* that each bit is pulsed once per sweep, in the right order;
* every result word.

It counts each operation and each sweep direction, and fails if one never
occurs.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module hs_usr_top_tb \
    -y rtl -y tb +libext+.sv rtl/usr_pkg.sv tb/hs_usr_top_tb.sv
./obj_dir/Vhs_usr_top_tb
```

Replace the testbench name to run the others. `usr_pkg.sv` is listed first
because the other files import it. `-Wno-fatal` lets the two expected lint
warnings described above through.
