# Optimized midpoint core for fault-tolerant clock synchronization

A group of N clocks, up to F of which may be faulty in any way, keeps itself
in step by periodic resynchronization (the Welch–Lynch scheme). In every
round each clock timestamps the synchronization signal of every other clock
against its own local counter, throws away the F earliest and the F latest
readings, and moves to the midpoint of the range that remains.

Because signals are timestamped as they arrive, they arrive already sorted,
and only two readings survive the trimming: the one at which the (F+1)-th
signal arrives and the one at which the (N−F)-th arrives. The circuit here
therefore needs only two event inputs, **F1** and **NF**, plus a running
count **RD**, and is independent of N and F. Counting the arrivals and
raising F1 and NF belongs to the network interface, which is not part of
this RTL.

The interesting part is how the midpoint is formed. The obvious circuit
freezes two registers at the two events and computes
`(θF1 + θNF) / 2` with an adder and a shifter. The circuit used here gets
the same value with **one register, one incrementer and one flip-flop**.

## The one-register midpoint (`midpoint_opt`)

Let `a` be the RD value captured when F1 rises and `b = a + d` the one
captured when NF rises. Then

    floor((a + b) / 2) = a + floor(d / 2)

and since RD advances by exactly one per cycle, `d` is the number of cycles
between the two events. So it is enough to freeze a register at `a` and add
one on every second cycle until NF arrives. Three equations do that:

    HOLD <= F1 & ~HOLD               HOLD starts false     (hold_cin)
    CIN   = HOLD & ~NF                                     (hold_cin)
    OPT  <= F1 ? OPT + CIN : RD      OPT starts at INIT    (opt_reg)

While F1 is low, OPT follows RD. Once F1 is high, OPT stops following RD;
HOLD toggles 0,1,0,1,… and each 1 adds one to OPT until NF is high. Over
the `d` cycles from F1 to NF, HOLD is high `floor(d/2)` times, which gives
the formula above.

Example, with F1 first high in cycle 10 and NF first high in cycle 15. RD
is 100 in cycle 9 and 105 in cycle 14:

| cycle            | 9   | 10  | 11  | 12  | 13  | 14  | 15  | 16  |
|------------------|-----|-----|-----|-----|-----|-----|-----|-----|
| F1 / NF          | 0/0 | 1/0 | 1/0 | 1/0 | 1/0 | 1/0 | 1/1 | 1/1 |
| HOLD             | 0   | 0   | 1   | 0   | 1   | 0   | 1   | 0   |
| CIN              | 0   | 0   | 1   | 0   | 1   | 0   | 0   | 0   |
| OPT (after edge) | 100 | 100 | 101 | 101 | 102 | 102 | 102 | 102 |

The result is `floor((100 + 105)/2) = 102`.

### Input rules

OPT equals the two-register result **in every cycle**, not only at the end,
but only if its inputs keep to these rules. A round reset R separates
rounds. In this core, R is the clear of LC.

1. F1 is low in the first cycle after reset, and in the cycle after R.
2. Between two R cycles, F1 and NF never fall once they have risen, and NF
   is never high without F1. NF may rise in the same cycle as F1.
3. RD increases by exactly one every cycle, except in the cycle after R,
   where it may take any value.
4. RD does not wrap past 2^WIDTH between the F1 and NF events. This rule
   exists only because the registers have a finite width.

Nothing in the RTL enforces these rules. Assertions flag a violation of
rule 2's NF-implies-F1 in `midpoint_opt`, and violations of rules 1–3 in
`clock_sync_opt`. The testbenches check rule 4 by choice of stimulus. Once
NF is high, the output stays valid until F1 falls. During that time it is
frozen, because CIN is zero.

### Timing

Everything is synchronous to `clk`, with an active-low synchronous `rst_n`.
The θ values are the RD values of the cycle **before** F1 (or NF) is first
sampled high. `cfn` holds the midpoint from the clock edge that first
samples NF high. It stays valid until the edge that samples F1 low, when
OPT reloads from RD.

## The core (`clock_sync_opt`)

The midpoint circuit sits in a small datapath:

    LC  (lc_counter)  counts cycles; lc_clr clears it (this is R)
    RD  = LC − Q      combinational; Q is an input offset
    CFN (midpoint_opt) from F1, NF and RD
    ADJ (adj_reg)     captures CFN when adj_load is high

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `lc_clr`   | in  | 1     | clear LC at the next edge (round reset R) |
| `q`        | in  | WIDTH | offset subtracted from LC. Change it only in the cycle after a clear |
| `f1`, `nf` | in  | 1     | (F+1)-th and (N−F)-th arrival events |
| `adj_load` | in  | 1     | load ADJ with CFN at the next edge |
| `lc`, `rd` | out | WIDTH | local clock and reading |
| `cfn`      | out | WIDTH | midpoint |
| `adj`      | out | WIDTH | captured adjustment |

Parameters: `WIDTH` (default 16) and `INIT` (default 0), the value OPT
holds after reset.

### What is not here

In the full circuit, a mode signal (STATUS) drives the multiplexers in front
of LC, RD, ADJ and an output stage. A further stage compares LC against a
constant R combined with ADJ to time the next round. Only the names of these
parts are known. Their encodings, states and comparisons are not, so they
are left out:

- The two mode decisions the datapath needs are inputs: `lc_clr` and
  `adj_load`.
- LC and ADJ are outputs, where the comparison stage would connect.
- The multiplexers in front of LC, RD and ADJ have only the inputs whose
  meaning is known: increment and clear for LC, the difference for RD, and
  load or hold for ADJ.

## Departures and choices

- **Widths and reset.** The reference design uses unbounded integers and
  gives no widths. The registers are 16 bits by default and wrap, which is
  why rule 4 exists. The reset values also have no source: 0 for LC and
  ADJ, `INIT` for OPT, false for HOLD.
- **Q.** Q is a free input; where it comes from is not known. RD is
  computed combinationally as `LC + (~Q + 1)`.
- **Reference circuit.** The two-register circuit that this one replaces is
  not in `rtl/`. It is `tb/theta_midpoint_ref.sv`, the testbenches' golden
  model.
- **Lint.** Verilator reports `hold` in `midpoint_opt` as unused. The signal
  is the HOLD state bit of `hold_cin`; only CIN is needed outside it.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

- `hold_cin_tb`, `opt_reg_tb`, `lc_counter_tb`, `adj_reg_tb` compare each
  module every cycle with a model in the testbench. They drive random
  inputs, and `opt_reg_tb` and `lc_counter_tb` use 8-bit widths so that
  the registers wrap.
- `midpoint_opt_tb` runs 400 random rounds that obey the input rules. They
  include simultaneous F1/NF, odd and even spans, and rounds cut short
  before NF. Every cycle it compares the output with the two-register
  reference. After NF it also compares with `floor((a+b)/2)`, computed
  from the stimulus schedule.
- `clock_sync_opt_tb` runs the whole core at its default parameters: 300
  rounds with a new Q each round and ADJ loaded at the end of each completed
  round. Every cycle it checks LC, RD = LC − Q, CFN against the reference
  and the midpoint, and ADJ. It also counts clears, F1 and NF events,
  simultaneous events, odd and even spans, increments of the held value,
  aborted rounds and ADJ loads. It fails if any of these never happened.

To run one with Verilator, for example the full core:

    verilator --binary --timing --assert -y rtl -y tb \
        tb/clock_sync_opt_tb.sv --top-module clock_sync_opt_tb
    ./obj_dir/Vclock_sync_opt_tb

The same pattern works for any other testbench. `midpoint_opt_tb` and
`clock_sync_opt_tb` also need `tb/theta_midpoint_ref.sv`, which `-y tb`
finds.

## Files

| file | contents |
|------|----------|
| `rtl/hold_cin.sv` | HOLD toggle and CIN gate |
| `rtl/opt_reg.sv` | OPT register: follow RD, then accumulate CIN |
| `rtl/midpoint_opt.sv` | the one-register midpoint circuit |
| `rtl/lc_counter.sv` | local clock LC |
| `rtl/adj_reg.sv` | ADJ register |
| `rtl/clock_sync_opt.sv` | top: LC, RD, midpoint, ADJ |
| `tb/theta_midpoint_ref.sv` | two-register reference circuit (testbench only) |
| `tb/*_tb.sv` | testbenches |
