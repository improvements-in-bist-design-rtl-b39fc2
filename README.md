# Low-transition test pattern generator for built-in self-test

During self-test a circuit often burns far more power than in normal
operation, because pseudo-random test patterns toggle about half of the
circuit's inputs on every clock. This design generates test patterns in which
consecutive patterns usually differ in **exactly one bit**, yet still walk
through every input combination. It does so by XOR-ing a slowly changing
*seed* with a fast-running Gray code:

    x = seed XOR gray(counter)

The Gray code changes one bit per clock, so while the seed is held every step
is a one-bit step. The seed changes only once every 2^M patterns. It comes
from a small seed generator: a shift register whose outputs pass through
Q/Qbar multiplexers, each selected by the neighbouring flip-flop.

Around the pattern generator sits a conventional BIST wrapper: a test
controller, an input isolation multiplexer in front of the circuit under test
(CUT), and an output response analyser (ORA) that compacts the CUT's
responses into a signature and compares it with a golden value.

With the default 4-bit configuration, one full pass is 240 patterns. It makes
256 pattern-bit transitions in total, about 1.07 per pattern. Uncorrelated
random 4-bit patterns would average 2.

## Block diagram

```
                bist_start                       bist_done
                    |                                ^
             +------v------------------------------+ |
             |          test_controller            |-+
             +--+---------+----------+-------------+
           init,tpg_en  test_mode   init,ora_en
                |         |              |
          +-----v----+  +-v-----------+  |    +-----------+
          |  lp_tpg  |-x->| input_    |--cut_in-> CUT     |  (outside bist_top)
          +----------+  | isolation   |  |    | (external)|
               sys_in ->+-------------+  |    +-----+-----+
                                         v          | cut_out
                                    +---------+<----+
                       golden_sig ->|   ora   |--> pass, signature
                                    +---------+
```

Inside `lp_tpg`:

```
   clk --> mbit_counter --k--> gray_gen (clocked) --g--+
                    |                                   XOR --> x
                    +--> zero_nor --zero(en)--> seed_gen --f--+
```

## The pattern generator (`lp_tpg`)

Four parts share one clock:

* `mbit_counter` is an M-bit up counter, `k`.
* `gray_gen` registers the reflected Gray code of `k`, `g = k ^ (k >> 1)`.
* `zero_nor` is a NOR of the counter bits. It is 1 only when `k` is all zero.
* `seed_gen` takes one step only on a clock edge where the NOR output is 1.
  It therefore holds each seed for 2^M clocks.

The output is `x = f ^ g`, where `f` is the seed.

**Alignment.** The counter resets to 1, not 0, and the Gray register resets to
0. The Gray register shows the code of the *previous* counter value. The seed
steps on the same edge that loads `g = gray(0)`. Together these make every
seed start with Gray code 0 and last exactly 2^M patterns:

    pattern p:  x_p = seed(s_(p div 2^M)) XOR gray(p mod 2^M)

Here `s_j` is the j-th state of the seed register, with `s_0 = SEED_INIT`.
Since `gray(0..2^M-1)` is a permutation of all M-bit values, **each block of
2^M patterns applies every input vector of an M-input CUT exactly once**. The
seed only changes the order in which they are applied. Inside a block every
step is one bit. At a block boundary the step is `seed_old ^ seed_new ^
gray(2^M-1)`. With the defaults that is 1 or 3 bits.

In the source design the seed generator's clock is gated by the NOR output.
Here the NOR output is a clock enable instead, so the whole TPG has one
ungated clock. The function is the same.

## The seed generator (`seed_gen`)

N D flip-flops `q[0..N-1]` form a shift register. Each seed bit comes from a
2:1 multiplexer. The multiplexer passes Q or Qbar of its own flip-flop, and
its select is the adjacent flip-flop's output:

    seed[i] = q[(i+1) mod N] ? ~q[i] : q[i]        (= q[i] XOR q[i+1])

The last multiplexer takes its select from the first stage (wrap-around).
The first stage is fed by a two-input XOR of stages 3 and 4. That is the
primitive polynomial x^4 + x^3 + 1, so the register visits all 15 non-zero
states. With `SEED_INIT = 0001` the default sequence is:

| step | state q[3:0] | seed f[3:0] |   | step | state | seed |
|---:|---|---|---|---:|---|---|
| 0 | 0001 | 1001 | | 8  | 0101 | 1111 |
| 1 | 0010 | 0011 | | 9  | 1011 | 0110 |
| 2 | 0100 | 0110 | | 10 | 0111 | 1100 |
| 3 | 1001 | 0101 | | 11 | 1111 | 0000 |
| 4 | 0011 | 1010 | | 12 | 1110 | 1001 |
| 5 | 0110 | 0101 | | 13 | 1100 | 1010 |
| 6 | 1101 | 0011 | | 14 | 1000 | 1100 |
| 7 | 1010 | 1111 | |    |      |      |

Because each seed bit is the XOR of two neighbours around a ring, every seed
has even parity. Only 8 distinct seed values occur. This does not reduce
coverage, since each seed block already applies all 16 vectors. It does limit
how many different orders are available.

## BIST sequence (`test_controller`, `input_isolation`, `ora`, `bist_top`)

| state | cycles | test_mode | what happens |
|---|---|---|---|
| IDLE | until `bist_start` | 0 | CUT sees `sys_in` |
| INIT | 1 | 1 | TPG restarts at pattern 0; signature cleared |
| RUN  | `NUM_PATTERNS` | 1 | one pattern per clock to the CUT; response compacted at the edge that ends the pattern |
| DONE | until `bist_start` | 0 | `bist_done = 1`; `pass = (signature == golden_sig)` |

`bist_done` rises `NUM_PATTERNS + 2` clocks after the edge that samples
`bist_start`. A new `bist_start` in DONE starts another run.

The ORA is a 4-bit MISR (multiple-input signature register) with polynomial
x^4 + x + 1:
`sig <= {sig[2:0],0} ^ (sig[3] ? 4'b0011 : 0) ^ cut_out`.
The golden signature is an input. The integrator computes it by simulating
the fault-free CUT over the same pattern sequence. `bist_top_tb` shows how.

The CUT is not part of this RTL. `bist_top` drives `cut_in` and reads
`cut_out`, and the CUT's response must settle within one clock.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bist_top`, `lp_tpg` | `M` | 4 | TPG width = CUT inputs = seed register stages |
| `bist_top` | `OUT_W` | 4 | CUT outputs = MISR width |
| `bist_top` | `NUM_PATTERNS` | (2^M − 1)·2^M = 240 | patterns per run (one full TPG pass) |
| `bist_top`, `lp_tpg`, `seed_gen` | `FB_TAPS` | 4'b1100 | seed register feedback taps (XOR of selected stages) |
| `bist_top`, `lp_tpg`, `seed_gen` | `SEED_INIT` | 4'b0001 | reset / restart state of the seed register (non-zero) |
| `bist_top`, `ora` | `MISR_POLY` / `POLY` | 4'b0011 | MISR feedback polynomial |

If you change `M`, also give `FB_TAPS` for a primitive polynomial of that
degree. Otherwise the seed period, and the default `NUM_PATTERNS`, will not
match. Likewise, give a matching `MISR_POLY` when you change `OUT_W`.

## What follows the source design and what is this design's choice

Taken from the source design:

* the BIST partition into TPG, input isolation, test controller and ORA, with
  BIST start/done and pass/fail;
* the TPG made of a counter, a Gray code generator, a NOR on the counter and
  an output XOR, with the seed stepping when the counter is all zero;
* the seed generator's Q/Qbar multiplexers selected by the adjacent
  flip-flop;
* four seed stages.

This design's own choices, where the source is silent or unclear:

* the feedback of the seed register. The source shows a two-input feedback
  gate without a legible type, and also says that an XOR gate was removed.
  A two-input XOR was chosen because a register without feedback logic would
  only rotate its start value.
* which neighbour is "adjacent", here the next stage with wrap-around;
* a clock enable instead of a gated clock;
* the counter reset value of 1 and the registered Gray code, which give the
  alignment described above;
* the counter width equal to the seed width;
* the controller's states, its run length and its restart rule;
* the MISR compaction, its polynomial, and the golden signature as a port;
* all reset values.

Not built:

* the bit-swapping LFSR that the source compares against;
* the dual-threshold-voltage variant. That is a transistor-level technique
  with no logic function.
* any CUT.

The source reports power figures from a transistor-level flow. RTL cannot
reproduce them. `tpg_activity_tb` counts transitions as a proxy.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `seed_gen_tb` | state and seed against a bit-level model; period 15 through all non-zero states; random advance/init |
| `mbit_counter_tb`, `gray_gen_tb`, `zero_nor_tb` | counting and wrap, clear, enable; Gray code and one-bit steps; exhaustive NOR |
| `lp_tpg_tb` | every pattern against `x_p` above; one seed step per 16 patterns; one-bit steps; 240-pattern period; random en/init |
| `input_isolation_tb`, `test_controller_tb`, `ora_tb` | mode multiplexer; cycle-exact state sequence and restart; MISR against a bit-level model, comparator |
| `bist_top_tb` | end to end at default parameters with `tb/cut_model.sv`: normal mode, every applied pattern, latency `NUM_PATTERNS + 2`, signature, pass on a good CUT, fail on a stuck-at fault and on a wrong golden value, restart from DONE |
| `tpg_activity_tb` | switching activity over one pass: 225 one-bit steps, 15 seed changes costing 31 bits, 256 transitions, all 16 vectors per seed block |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv \
    tb/bist_top_tb.sv --top-module bist_top_tb -o sim
./obj_dir/sim
```

Substitute any other testbench name. Verilator finds the modules it needs in
`rtl/` and `tb/` by file name. Every testbench, including the full-size
`bist_top_tb`, finishes in well under a second.
