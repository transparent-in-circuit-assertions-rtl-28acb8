# Latency-oblivious in-circuit assertions for FPGAs

An assertion checks that a design behaves as intended: a program counter stays
inside valid memory, a cipher's output looks random, a floating-point pipeline
never produces NaN. In simulation these checks are free. In a placed-and-routed
FPGA design they are not, because adding them usually means a full recompile,
and a full recompile can move the critical path.

The key idea is that most assertions are **latency-oblivious**. Nobody needs to
know in the same cycle that an assertion failed, only that it failed. So every
signal an assertion watches can be carried through any number of pipeline
registers, and the assertion logic itself can be pipelined as deeply as needed.
With enough registers, no inserted path is long enough to limit the clock. The
added logic can then be built only from flip-flops, LUTs and wires the user
circuit left unused, after that circuit has been placed and routed:

1. Compile the user circuit as usual.
2. Pick an under-used region of the device to host the assertion logic.
3. Carry the watched signals to that region over several hops. Each hop ends
   in a spare flip-flop that is closer to the region's anchor point.
4. Compile the assertion circuit using the spare resources only.
5. Merge the two netlists.
6. Route the last connections.

This repository holds the RTL of the inserted hardware: the pipelined links,
the operator blocks that assertions are built from, the assertion circuits of
four benchmark experiments, and a semi-transparent *exception* unit that can
overwrite a monitored signal. The placement and routing flow (step 3 uses
min-cost network flow over the device's routing graph) is CAD software and is
not part of this RTL. The same goes for the user circuits being monitored: a
LEON3 SoC, an AES encoder/decoder benchmark and a FloPoCo filter bank.

## Building blocks

| File | Role |
|---|---|
| `rtl/ica_pkg.sv` | shared constants (range bounds) and a byte popcount |
| `rtl/pipe_link.sv` | pipeline-and-route link: `STAGES` registers in series, plus a valid flag |
| `rtl/al_delay.sv` | `delay<N>(e)`: also used as the balancing registers between paths |
| `rtl/al_counter.sv` | `counter(FROM, TO)`: wraps from TO back to FROM and flags FROM |
| `rtl/al_accum.sv` | `accum(e1, e2)`: running sum of e1 that restarts when e2 holds |
| `rtl/al_popcnt32.sv` | 2-stage population count of a 32-bit word |
| `rtl/al_pri8.sv` | 8-input priority encoder |
| `rtl/inrange_assert.sv` | `L <= C <= H`, 3 stages |
| `rtl/monobit_assert.sv` | monobit randomness test on 128-bit words, 8 stages |
| `rtl/pattern_assert.sv` | 4-bit pattern-count test on 128-bit words, 8 stages |
| `rtl/flopoco_pri_assert.sv` | locates the first of 144 inf/NaN flags, 3 stages |
| `rtl/exception_unit.sv` | assertion with a catch handler that replaces a signal |
| `rtl/ica_top.sv` | all of the above, wired as in the four experiments |

The assertion language maps each operator to one hardware block. An assertion
compiles into a tree of such blocks. One rule keeps the tree correct: every
input must take the same number of cycles to reach the output, so values
sampled in the same cycle are compared with each other. Shorter paths get
`al_delay` registers. The circuits here follow that rule by construction. All
lanes of an adder tree have the same depth, and the catch value in the
exception unit is delayed by exactly the assertion's latency.

## The links and the valid flag

`pipe_link` stands for the routed chain of spare flip-flops that brings the
watched signals to the assertion region. It has no logic of its own: its
only effect is `STAGES` cycles of latency, the same for every bit. The data
flops have no reset, like spare flip-flops taken over after the fact. A one-bit
valid flag travels alongside the data and is reset. Each assertion uses it to
ignore pipeline contents from before reset, so that garbage cannot raise a
false alarm. The valid flag is this design's addition. In `ica_top` every link's
input valid is tied high, because the monitored circuits run freely.

Link depths in `ica_top` (one register per routing hop) are 2 for the program
counters, 5 for both AES experiments and 3 for the filter flags.

## The monobit test

This is the most detailed circuit. A secure cipher's output should look like
uniform random bits, so over a long stream the counts of ones and zeros must
stay close. The test takes one 128-bit word per cycle and sums its ones over
256 words (32,768 bits). It then checks that the total lies within
16384 ± 466, the band for a significance level of p < 0.01.

```
 stage 1   input register (128 bits)
 stage 2   four popcounts: ones per byte                  al_popcnt32
 stage 3   four popcounts: ones per 32-bit word (0..32)   al_popcnt32
 stage 4   adder tree row (4 x 6 bits)
 stage 5   pair sums (2 x 7 bits)
 stage 6   word total (8 bits, 0..128)
 stage 7   15-bit accumulator                             al_accum, cleared by
 stage 8   verdict register, A < sum < B, enabled at      al_counter (0..255)
           the end of each window
```

The window counter advances once per valid word. When it is at 0, the
accumulator loads the current word's total instead of adding it, so the window
that just ended is complete and no word is lost. At that same edge the verdict
register takes the range check of the finished sum. `window_done` pulses when
this happens. The first wrap after reset has no finished window behind it and
is skipped. With an unbroken stream, the verdict for a window appears 8 cycles
after the window's last word is presented.

Two width details:

* A drawing of this pipeline gives the adder rows as 5, 6 and 7 bits. Those
  widths cannot hold 32, 64 and 128, so this RTL uses 6, 7 and 8 bits.
* The accumulator keeps its 15 bits. The only sum that does not fit is an
  all-ones window (32768). That sum wraps to 0 and still fails the check, and
  the testbench verifies this case.

The bounds are stored as A = 15917 and B = 16851. The comparison is strict, so
sums from 15918 to 16850 pass.

`ica_top` has three monobit tests, one per encoder of the 3-pair AES benchmark.
`led` is the AND of their verdicts, so the LED stays lit while all three pass.

## The pattern-counter test

This is a stronger variant of the monobit test. Each word is cut into 32
nibbles, and the circuit counts how often each of the 16 nibble values occurs.
Stage 2 decodes every nibble to one-hot. Stages 3-6 form an adder tree for each
pattern (per 4, 8, 16 and then 32 nibbles). Stage 7 holds 16 accumulators of 14
bits, and stage 8 the verdict. The whole window passes only if all 16 counts
are within range.

The window (256 words) and the band are this design's choices. The band is
512 ± 56, which is about 2.58 standard deviations of a binomial with n = 8192
and p = 1/16. With the strict compare, bounds 455 and 569 are stored. The
latency is 8 stages, as for the monobit test. `ica_top` has four of these
circuits, for two 128-bit buses from each of two encoders.

## Locating inf/NaN in a filter bank

`flopoco_pri_assert` does more than raise one alarm bit: it reports which of
144 flags fired, so the failing tap can be found. The encoding is 0 for no flag
and k+1 when flag k is the lowest-numbered raised flag, which fits 8 bits. The
circuit has three stages:

1. input register
2. 18 eight-input priority encoders (`al_pri8`)
3. choice of the first group with a hit

Giving the lowest index the highest priority is this design's choice.

## Range check on program counters

`inrange_assert` checks `L <= C <= H` in three stages: register, two
comparators, AND. `ica_top` instantiates one per core for eight 30-bit word
addresses (PC[31:2]). Each core has its own `pc_ok`, and `pc_fail` is a sticky
OR of all failures. The default window is 0x4000_0000 to 0x5FFF_FFFF, 512 MB of
DDR3 at the usual LEON3 base address. That window is this design's choice;
change `PC_LO`/`PC_HI` in `ica_pkg` to match your memory map.

## Exceptions: semi-transparent correction

`exception_unit` adds a catch handler to an assertion: when the assertion
fails, a monitored signal SRC is replaced by a handler value. The example is a
program counter that leaves valid memory and is forced to a trap address.

```
 SRC ──┬──────────────────────────────────────────────┐
       │                                              0│
       └─► link in (2) ─► inrange_assert (3) ─┐       MUX ─► SRC'
 trap ───► link in (2) ─► al_delay (3) ───────┴─► link out (2) ─►1 / select
```

The handler value is delayed exactly as much as the assertion, so the verdict
and the value that goes with it return together. The multiplexer is the only
logic added to the path from SRC to its readers. The delay is the price: the
replacement reaches SRC' 7 cycles (2 + 3 + 2) after the bad value appeared,
and in between the bad value passes unchanged. This is acceptable where the
consumer tolerates a few cycles, such as a pipelined processor that has not yet
committed the wrong instruction. The link depths and the 30-bit width (the
word address, as in the range check) are this design's choices.

## Top level and timing

`ica_top` places the five circuits side by side. They watch different user
circuits, and each has its own ports:

| Experiment | Inputs | Outputs | Latency from input |
|---|---|---|---|
| program counters | `pc[8][30]` | `pc_ok`, `pc_fail` | 5 cycles |
| monobit | `mono_in[3][128]` | `led`, `mono_done`, `mono_fail` | 13 cycles after a window's last word |
| pattern count | `pat_in[4][128]` | `pat_ok`, `pat_done`, `pat_fail` | 13 cycles after a window's last word |
| inf/NaN locator | `fp_flags[144]` | `fp_valid`, `fp_code` | 6 cycles |
| exception | `exc_src`, `exc_trap` | `exc_src_out`, `exc_taken` | 7 cycles |

Reset is synchronous and active low (`rst_n`). There is a single clock: the
assertion circuits run in the clock domain of the signals they watch.

## How far to trust it, and where it departs

These parts follow the source description closely:

* the 8-stage monobit structure
* the 256-word window and the 16384 ± 466 band
* the 15-bit accumulator
* the AND of three verdicts driving an LED
* the `L <= C <= H` range check
* the exception multiplexer (input 0 SRC, input 1 exception value)
* link depths and assertion latencies: 2/3, 5/8, 5/8 and 3/3
* 144 flags encoded into 8 bits

These parts are this design's own choices:

* the valid flag on links
* reset values, and the sticky alarm flags
* the adder widths (corrected as above)
* the pattern test's window and band
* the priority order and coding of the locator
* the DDR3 address window
* the stage split inside each circuit where only the total latency was known
* the exception unit's width and link depths

A listing in the source suggests a different shape for the inf/NaN assertion:
3-bit encoders over 24 × 8 taps and two flag bits per tap. This RTL follows
the stated 144 inputs and 8-bit output instead.

Not included:

* an assertion built from a chain of AES decoders (it needs an AES core)
* the user circuits themselves
* the placement and routing tool

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ica_pkg.sv tb/tb_ica_top.sv --top-module tb_ica_top
./obj_dir/Vtb_ica_top
```

`tb_ica_top` runs the whole design at its default sizes. It streams five
256-word windows into every input and computes every expected verdict
itself. It also counts each mechanism: range failures, passing and failing
monobit and pattern windows, located flags and exceptions taken. A mechanism
that never happens counts as a failure. The block testbenches cover
boundaries: values exactly at L and H, flags at positions 0 and 143, an
all-ones monobit window, and windows with gaps in the valid stream.
