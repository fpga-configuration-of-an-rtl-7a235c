# Alloyed-correlated branch predictor

A dynamic branch direction predictor for a classic five-stage, 32-bit MIPS
pipeline. It combines two two-level schemes:

* an **alloyed** predictor, whose table index mixes global history bits with
  branch address bits, and
* a **correlated** predictor, whose table entries hold several counters, one
  of which is picked by the most recent branch outcomes.

The aim is to catch nested branches whose outcome depends on the outcome of the
branches just before them, while still giving every static branch its own
counters. The predictor is small (4096 two-bit counters and a 7-bit history)
and written to be read and modified in a computer-architecture course.

## How a prediction is made

```
                 GHR (7 bits, bit 0 = newest outcome)
             +----------------+----------+
             |   GHR[6:2]     | GHR[1:0] |---------------+
             +----------------+----------+               |
                     |                                   | set select
   PC[6:2] ----------+---> selt[9:0] = {GHR[6:2], PC[6:2]}|
                                 |                       v
                     +-----------v-----------------------------+
                     |  PHT: 1024 entries x 4 sets x 2-bit ctr |--> counter --> MSB = predictF
                     +-----------------------------------------+
```

1. **Fetch (combinational).** The 10-bit index `selt` is the upper five history
   bits followed by PC bits 6..2. It picks one of 1024 table entries. The two
   newest history bits then pick one of the entry's four counters. The
   counter's MSB is the prediction: 1 = taken.
2. **Decode (one cycle later).** The counter value, the index and the set
   select travel with the instruction into the decode stage. There the
   processor knows the real direction (`pcsrcD`). For a conditional branch
   the counter moves one step towards it and is written back to the same
   place, and the outcome is shifted into the history register.

So three bits of history and five bits of address choose *which* entry
(alloyed), and the last two outcomes choose *which counter in it*
(correlated).

## The parts

| File | Part | What it holds |
|---|---|---|
| `rtl/acbp_pkg.sv` | shared constants | sizes, the counter state type `ctr_t`, reset value 2'b11 |
| `rtl/acbp_ghr.sv` | global history register | 7-bit shift register of real outcomes |
| `rtl/acbp_pht.sv` | pattern history table | 1024 x 4 x 2-bit counters, async read, sync write |
| `rtl/acbp_sat_counter.sv` | saturating counter FSM | the decode-stage counter register and its next-state logic |
| `rtl/acbp_predictor.sv` | top | index and set selection, decode-stage registers, update, misprediction flag |

### The counter as a Mealy machine

There is one counter *circuit*, not 4096 of them. Its state register is the
fetch/decode pipeline register that receives the counter read in fetch
(`predictD`). Its next-state logic computes `predfsmop` from `predictD` and
`pcsrcD`: +1 on taken, -1 on not taken, held at 2'b11 and 2'b00. Because the
output depends on the input `pcsrcD` as well as on the state, it is a Mealy
machine. `predfsmop` is what is written back into the table. The counter
states are strongly not-taken (00), weakly not-taken (01), weakly taken (10)
and strongly taken (11). Every counter starts at 11, so an unseen branch is
predicted taken.

### Why the index travels with the instruction

The history register changes whenever a branch leaves decode. If the
instruction just ahead of a branch is itself a branch, the history seen by
the second branch in fetch differs from the history one cycle later. The
design therefore registers the fetch-time index and set select and writes the
update there. The counter that made the prediction is the one that learns.

## Interface of the top, `acbp_predictor`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (all counters to 11, history to 0) |
| `pcF` | in | 32 | address being fetched |
| `predictF` | out | 1 | prediction for `pcF`, same cycle |
| `stallD` | in | 1 | decode stage holds; nothing is updated |
| `flushD` | in | 1 | decode-stage registers are cleared at the edge |
| `branchD` | in | 1 | instruction in decode is a conditional branch |
| `pcsrcD` | in | 1 | its real direction |
| `predictD` | out | 1 | direction predicted for the instruction in decode |
| `mispredictD` | out | 1 | `branchD & ~stallD & (predictD != pcsrcD)` |
| `ghr` | out | 7 | history, for observation |

Timing: `predictF` is combinational from `pcF` and the register state.
Updates happen at the clock edge that ends the decode cycle. A misprediction
costs the host pipeline one squashed instruction: it raises `flushD` in the
cycle `mispredictD` is high and fetches the other path.

Parameters of the top: `PC_W` (32), `GHR_W` (7), `SET_W` (2), `PC_IDX_W`
(5), `PC_LSB` (2). The table has `2**(GHR_W-SET_W+PC_IDX_W)` entries of
`2**SET_W` counters. The counter width is fixed at two bits.

## What is specified and what is chosen here

Taken from the published design: the 7-bit history of real outcomes; the
1024-entry, four-set table of two-bit counters initialised to 11; the index
`{GHR[6:2], PC[6:2]}`; set selection by `GHR[1:0]`; prediction by the counter
MSB in fetch; update with `pcsrcD` in decode; the counter as a Mealy FSM with
a D-flip-flop state register.

Chosen in this implementation, where the published design says nothing:

* The order of the two halves of the index (history high, address low) and
  the numbering of the sets (`GHR[1:0] = s` selects set `s`).
* The history shifts left, with the newest outcome in bit 0. It resets to 0.
* Table initialisation is a one-cycle synchronous reset of every counter.
  On an FPGA the same effect can be had with an initial value instead.
* The processor-side handshake: `branchD` qualifies updates, `stallD` holds
  the decode-stage registers, and `flushD` clears them (counter to 11).
* The decode-stage copy of index and set select (see above), and the
  `mispredictD` output.
* No bypass: a fetch that reads the counter being written in the same cycle
  sees the old value.
* No branch target buffer. Where a predicted-taken branch fetches from is the
  host processor's business.

The host MIPS processor itself is not part of this RTL.

## Verification

Each testbench checks its block against values it works out on its own, and
prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb/tb_acbp_sat_counter.sv` | all 8 state/outcome pairs; one-cycle load; hold, flush, reset |
| `tb/tb_acbp_ghr.sv` | 2000 random updates against an integer model |
| `tb/tb_acbp_pht.sv` | all 4096 counters read 11 after reset; 6000 random writes; same-cycle read returns old data |
| `tb/tb_acbp_predictor.sv` | full-size top against a reference model for 30 000 cycles with random stalls, flushes and correlated outcomes. Every mechanism must occur: both predictions, mispredictions, saturation at 11 and at 00, stalled branches, flushes, back-to-back branches |
| `tb/tb_acbp_selsort.sv` | the branch stream of a selection sort of 100 integers, played through the top |

The selection-sort testbench runs a MIPS-style sort loop with three
conditional branches on three inputs: already sorted, uniform on 0..999, and
roughly normal (the sum of twelve uniform values). The next instruction is
fetched along the predicted path; a misprediction squashes it. The same
reference model checks every prediction. The testbench also checks the cycle
count, instructions + mispredictions + 4. Results at the default size:

| Input | Instructions | Branches | Mispredictions | Accuracy | CPI |
|---|---|---|---|---|---|
| sorted | 40593 | 9999 | 100 | 99.00 % | 1.003 |
| uniform | 40915 | 9999 | 455 | 95.45 % | 1.011 |
| normal | 40916 | 9999 | 442 | 95.58 % | 1.011 |

These CPI values count only the misprediction penalty. Load-use and
branch-operand stalls of the real pipeline are not modelled, so they are
lower than a full processor would show. Already-sorted input is the easiest
case, as the published results also find.

### Running

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_acbp_predictor \
    -y rtl -y tb +libext+.sv rtl/acbp_pkg.sv tb/tb_acbp_predictor.sv
./obj_dir/Vtb_acbp_predictor
```

Replace the top module and file for the other testbenches. Every testbench
finishes in well under a second.

## Changing it

* History length and table size: set `GHR_W`, `SET_W` and `PC_IDX_W` on
  `acbp_predictor`. The index is `GHR_W - SET_W + PC_IDX_W` bits and
  the table grows as its power of two.
* Instruction alignment: `PC_LSB` (2 for 32-bit MIPS words).
* Counter initial value: `CTR_INIT` in `acbp_pkg`.
* The testbenches use the package constants, so they follow the package
  defaults. Change those, not only the top's parameters, if you resize the
  design and want the testbenches to match.
