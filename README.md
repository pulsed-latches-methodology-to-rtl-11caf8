# Pulsed-latch shift register with non-overlapping delayed pulses

A long serial-in, parallel-out shift register normally takes one flip-flop
per bit, and a flip-flop is two latches (master and slave). A pulsed latch
stores a bit in one latch, opened for a short pulse after each clock edge.
It needs about half the area and clock power of a flip-flop. A shift register
cannot simply chain pulsed latches on one common pulse, though. While the
pulse is high, every latch is transparent at once, so a new bit can run
through several latches in a single pulse.

This design keeps pulsed latches and removes the race without a delay
element between latches:

* The register is cut into groups (**sub shift registers**) of `SUB_BITS` = 4
  data latches. Each group ends in one extra **temporary latch** `T`.
* One shared **delayed pulsed clock generator** turns each rising clock edge
  into `SUB_BITS+1` = 5 narrow pulses that never overlap.
* Latch position *k* of every group shares pulse `CLK_pulse<k>`. All `T`
  latches share `CLK_pulse<T>`. So there are five pulse lines whatever the
  register length is.
* The pulses fire **backwards**: `<T>`, `<4>`, `<3>`, `<2>`, `<1>`. Each latch is
  written only after the latch downstream of it has already copied its old
  value. No latch reads a neighbour that is open.

The default register has 256 bits: 64 groups and 320 latches. A
flip-flop version would need 256 flip-flops, which is 512 latches.

## One shift cycle

Take group 1 (`IN → Q1 → Q2 → Q3 → Q4 → T1`) and group 2
(`T1 → Q5 → … → Q8 → T2`). After a rising `clk` edge:

| order | pulse          | latches written        | they copy                                  |
|-------|----------------|------------------------|--------------------------------------------|
| 1     | `CLK_pulse<T>` | T1, T2, …, TM          | Q4, Q8, …: the last bit of their own group |
| 2     | `CLK_pulse<4>` | Q4, Q8, …              | Q3, Q7, …                                  |
| 3     | `CLK_pulse<3>` | Q3, Q7, …              | Q2, Q6, …                                  |
| 4     | `CLK_pulse<2>` | Q2, Q6, …              | Q1, Q5, …                                  |
| 5     | `CLK_pulse<1>` | Q1, Q5, …              | `IN`, T1, T2, …                            |

In step 5, Q5 reads T1. T1 has held the old Q4 since step 1, even though Q4
has since been overwritten. After the five pulses every data bit has moved
exactly one place: `Q<k>` holds what `Q<k-1>` held, and `Q<1>` holds `IN`.
The temporary latches only carry data across group boundaries. Nothing
reads them as data outputs, except the last one, which is brought out as
`shift_out`.

With 4-bit groups the cost is 5 latches per 4 bits. Larger groups spend
fewer latches on `T`, but they need more pulses per cycle. The whole pulse
sequence must fit into one clock period.

## The delayed pulsed clock generator

`pulsed_clock_gen` is a chain of five `clock_pulse_circuit` stages. Each
stage works like this:

```
clk_in ──┬──[delay]──[inv]──┬──[inv]──► clk_out  (to the next stage)
         │                  │ clk_dly_n
         └──────[AND]───────┘
               │
            [buffer] ──► pulse
```

* `pulse = clk_in AND NOT delayed(clk_in)`. It is high for one
  delay-plus-inverter time after each rising edge of `clk_in`. A falling
  edge produces nothing.
* `clk_out` is `clk_in` delayed by the delay element and two inverters.
  The next stage therefore starts its pulse one inverter delay after this
  stage's pulse ends. That gap is what keeps the pulses apart.
* Stage 0 is driven by `clk` and drives `CLK_pulse<T>`. Stage *j* drives
  `CLK_pulse<SUB_BITS+1-j>`, so the last stage drives `CLK_pulse<1>`.

The gate delays are parameters in picoseconds. No delay values are given for
this generator. The defaults (`plsr_pkg`) are this implementation's
choice for a 90 nm-class process:

| parameter | default | meaning                |
|-----------|---------|------------------------|
| `T_DELAY` | 50 ps   | delay element          |
| `T_INV`   | 10 ps   | each inverter          |
| `T_AND`   | 10 ps   | pulse AND gate         |
| `T_BUF`   | 10 ps   | clock buffer           |

These defaults give the following timing:

* Each pulse is `T_DELAY+T_INV` = 60 ps wide.
* Pulse *j* of the sequence (*j* = 0 for `<T>`) starts
  `j*(T_DELAY+2*T_INV) + T_AND + T_BUF` = `20 + 70j` ps after the edge.
* The gap between pulses is 10 ps.
* The last pulse, `<1>`, starts at 300 ps and ends at 360 ps.

**This block is a behavioural model.** Its whole function comes from
gate delays, written as delayed continuous assignments. A synthesis tool
drops the delays. The pulse then becomes `clk & ~clk`, which is 0, and
everything behind it is optimised away. That is why a synthesis run of
`pulsed_latch_shift_register` reports no cells. In silicon this generator
is a hand-placed cell with real delay elements. The latch array
(`sub_shift_register`, `ssaspl_latch`) synthesizes to plain latches: 5 per
group.

## The latch cell

`ssaspl_latch` models a static differential sense-amplifier shared pulsed
latch (SSASPL), a very small pulsed latch. At transistor level it has:

* a cross-coupled inverter pair holding `Q` and `Qb`;
* two nMOS data transistors, gated by `D` and `Db`, that pull `Qb` or `Q`
  low;
* one nMOS foot transistor, switched by the pulse.

The model is its logic-level equivalent. The latch is transparent while
`pulse` is high and holds while it is low. It has differential inputs and
outputs, and the latches are chained `Q→D`, `Qb→Db`. The register input
`in` gets its complement from an inverter.

The model chooses what happens if `d` equals `d_b` during a pulse: it keeps
the stored bit, and an assertion reports it. The cell has no reset.

## Modules

| module | role |
|---|---|
| `plsr_pkg` | default size (256 bits, 4-bit groups) and gate delays; helper functions for pulse width and stage skew |
| `ssaspl_latch` | one pulsed latch |
| `clock_pulse_circuit` | one generator stage (behavioural, delay-based) |
| `pulsed_clock_gen` | `SUB_BITS+1` stages; outputs `clk_pulse_t` and `clk_pulse[SUB_BITS:1]` |
| `sub_shift_register` | `SUB_BITS` data latches and one temporary latch |
| `pulsed_latch_shift_register` | top: one generator and `WIDTH/SUB_BITS` groups |

Ports of the top `pulsed_latch_shift_register`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; the register shifts once per rising edge |
| `in` | in | 1 | serial data in |
| `q` | out | `WIDTH` | `q[k]` is `Q<k>` for k = 1..`WIDTH`; `q[1]` is the newest bit |
| `shift_out` | out | 1 | the last group's temporary latch: the bit that left `Q<WIDTH>` in the last cycle |

Parameters: `WIDTH` (256), `SUB_BITS` (4), `T_DELAY`, `T_INV`, `T_AND`,
`T_BUF`. `WIDTH` must be a multiple of `SUB_BITS`; elaboration stops with
an error otherwise.

## Timing rules for users

* **Latency.** A bit applied before a rising edge is in `q[1]` after that
  edge's pulse sequence. It is in `q[k]` after *k* edges, and on
  `shift_out` after `WIDTH+1` edges.
* **Input window.** `in` is sampled during `CLK_pulse<1>`, the *last*
  pulse, not at the clock edge. With the default delays that is 300–360 ps
  after the edge. `in` must be stable over that window. The testbenches
  change it on the falling edge.
* **Output settling.** Outputs are valid once the pulse sequence is over:
  `T_AND+T_BUF+SUB_BITS*(T_DELAY+2*T_INV)+T_DELAY+T_INV` = 360 ps after
  the edge with the defaults. The outputs are latch outputs, so each one
  changes during its own pulse.
* **Clock.** The period must be longer than the pulse sequence. `clk` must
  stay high at least `T_DELAY+T_INV`. The testbenches use a 1000 ps period
  with 50 % duty.
* **Reset.** There is none, as in the latch cell. Contents are undefined
  until `WIDTH` bits have been shifted in.

## Simulation

Everything simulates with Verilator 5 in timing mode, which the delays of
the generator require. The package must come first, and `-y rtl` finds the
rest. For example, the end-to-end test:

```
verilator --binary --timing --assert -y rtl rtl/plsr_pkg.sv \
    tb/pulsed_latch_shift_register_tb.sv --top-module pulsed_latch_shift_register_tb
obj_dir/Vpulsed_latch_shift_register_tb
```

Each testbench ends by printing `TB_RESULT checks=N failures=F`. Each has a
watchdog that fails the run if it hangs.

| testbench | what it checks |
|---|---|
| `ssaspl_latch_tb` | transparency during the pulse (including data changing mid-pulse), hold outside it, `q_b = ~q`; random sequences |
| `clock_pulse_circuit_tb` | exact pulse start, width and `clk_out` delay computed from the gate delays; no pulse on falling edges |
| `pulsed_clock_gen_tb` | firing order `<T>,<4>,<3>,<2>,<1>`; start time and width of each; no two lines high in the same picosecond; one pulse per line per cycle |
| `sub_shift_register_tb` | one group driven by testbench-made pulses, against a software shift register. Firing the pulses in the wrong order (`<1>` first) then shows the race: a single bit fills the whole group in one cycle |
| `pulsed_latch_shift_register_tb` | the full 256-bit register at default parameters for 788 cycles of random data. Checks every `Q<k>` each cycle, the one-cycle latency to `Q<1>` and the `WIDTH+1`-cycle latency to `shift_out`. Also counts that each pulse line fired every cycle, that pulses never overlapped, that every temporary latch handed bits on, and that `shift_out` produced both values |
| `pulsed_latch_shift_register_cfg_tb` | a 12-bit register in 3-bit groups (four pulse lines). `in` changes 100 ps after each edge, before `CLK_pulse<1>`, and the test checks that the new value is the one captured in that cycle |

The full-size run takes under a second.

## Relation to the published design

The following follow the published design:

* 4-bit sub shift registers, each with one temporary latch;
* five non-overlapping pulses in reverse order;
* the pulse-stage structure (delay, two inverters, AND gate, clock buffer)
  and the sharing of the pulse lines by all groups;
* the SSASPL latch;
* the 256-bit size of the evaluated implementation.

The following are this implementation's own choices:

* all gate delays, and the 1 GHz test clock;
* the differential chaining of the latches and the inverter on `in`;
* what the latch does when `d == d_b`;
* the `shift_out` port;
* the absence of a reset.

The published FPGA version of the register also shows `addr[2:0]`, `en`,
`load` and `rst` inputs. Their behaviour is not specified, so they are not
implemented. Only the register itself is.
