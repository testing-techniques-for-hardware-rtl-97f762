# Interleaved arbiter PUF

A physically unclonable function (PUF) answers a challenge with a response
that depends on the random manufacturing variation of one particular chip.
The classic delay-based PUF is the *arbiter PUF*: a rising edge races down two
nominally equal paths, the challenge bits reorder the path segments, and an
arbiter at the end reports which edge arrived first. A single arbiter row is
weak. Its response is a sign of a sum of delays, so a few thousand
challenge/response pairs are enough to model it by linear programming. How
often its response changes also depends strongly on *where* in the challenge
a bit is flipped: a flip next to the arbiter almost always changes the
answer, and a flip at the launch end almost never does.

The **interleaved PUF** in this repository hides the rows behind each other:

* There are **R+1 rows** (R even; R = 4 by default, so five rows), all driven
  by the same N-bit challenge (N = 64).
* **Every second row sees the challenge reversed.** A bit that sits next to
  the arbiter in one row sits at the launch end of the next. A flip at any
  position is therefore "strong" for some rows and "weak" for others.
* A **leave-one-out XOR network** turns the R+1 arbiter bits into R response
  bits. Response j is the XOR of all arbiter bits except row j's. Every
  response mixes R rows, and two different arbiter patterns always give the
  same output, so an attacker cannot tell which row values produced a
  response.

An optional **XOR input network** can be switched in front of the rows. It
makes each challenge bit control the position of exactly one switch, which
removes the position dependence of single-bit flips in a plain row.

The rows are analog delay lines, so they are written as **behavioural timing
models** that use simulation time. The challenge network, the reversal wiring
and the output XORs are ordinary synthesizable logic.

## How one row works

```
 launch ──┬─► [sw 0] ─► [sw 1] ─► ... ─► [sw N-1] ─► top[N] ──► a ┐
          └─► [sw 0] ─► [sw 1] ─► ... ─► [sw N-1] ─► bot[N] ──► b ┴ arbiter ─► resp
              ch[0]     ch[1]            ch[N-1]
```

Each switch (`puf_switch`) has two inputs and two outputs. With its challenge
bit at 0 it is straight: top to top, bottom to bottom. With the bit at 1 it is
crossed: top to bottom, bottom to top. Each of the four routes has its own
delay (`d_tt`, `d_bb`, `d_tb`, `d_bt`, in ps). An edge entering a switch
leaves it after the delay of the route selected at that moment. The delays
are drawn once, at time zero, and model one manufactured chip.

The arbiter (`puf_arbiter`) sees the top path on input `a` and the bottom path
on `b`. It outputs 1 if `a` rises first. It is modelled as a flip-flop with
`a` as data and `b` as clock. With `dt = t(b) - t(a)`:

| condition          | output                              |
|--------------------|-------------------------------------|
| `dt > ST_PS`       | 1                                   |
| `dt < -HT_PS`      | 0                                   |
| otherwise          | metastable: 0 or 1, equally likely  |

`ST_PS = HT_PS = 0` is an ideal arbiter. That is the default. The output
changes `TCQ_PS` (10 ps) after the later edge. The arbiter then ignores its
inputs until both are low again. The model counts its decisions and its
metastable decisions in the variables `decisions` and `metastable`.

### Why the bit position matters, and what the XOR network does

Whether switch i's delay difference ends up added to or subtracted from the
total at the arbiter depends on the parity of the challenge bits from switch
i to the end of the row. Flipping the bit next to the arbiter flips the sign
of almost every term, so the response nearly always changes. Flipping the
first bit flips one term.

`challenge_xform` computes

```
d[i]   = c[i] ^ c[i+1]    for i < N-1
d[N-1] = c[N-1]
```

so that `d[i] ^ d[i+1] ^ ... ^ d[N-1] = c[i]`. Each user bit `c[i]` then sets
the final position of switch i on its own, and a single-bit flip moves one
term whatever its position.

## Manufacturing variation model (`puf_pkg`)

* Element delays are Gaussian with a mean of 500 ps and a standard deviation
  of 4 ps (figures for a 65 nm process). The Gaussian is approximated by the
  sum of twelve uniform numbers minus six.
* A row is one chip. It is selected by an integer `SEED`; the element with
  index `e = 4*stage + route` takes its random numbers from a 32-bit xorshift
  generator seeded with a hash of `(SEED, e)`. The same seed always gives the
  same chip, in any simulator.
* `RHO` adds spatial correlation. Delays along the row form a first-order
  autoregressive sequence, so two elements k positions apart have correlation
  `RHO^k`: an exponential correlogram with `RHO = exp(-alpha)`. Strong
  correlation shrinks the delay difference at the arbiter. With a non-ideal
  arbiter, more responses then become metastable.
* `OUTLIER_STAGE` / `OUTLIER_PS` in `puf_row` add a large extra delay to the
  straight top route of one switch. This models a faulty switch.
* In the top, row r of chip `CHIP_SEED` uses seed `CHIP_SEED*1000 + r`.

## Interface and timing

`interleaved_puf` has no clock. One evaluation goes like this:

1. Set `challenge` and `xform_en`, with `launch` low. Keep both stable until
   step 3 has finished.
2. Raise `launch`. `arb` and `resp` settle after the slower path, about
   N x 0.5 ns plus 10 ps (32 ns at N = 64). The testbenches wait 40 ns.
3. Lower `launch`. Wait about as long again so that the falling edge clears
   every row. Then the next challenge may be applied.

The switch model sends an edge only along the route that is selected when the
edge arrives. A challenge that changes while an edge is in flight is
therefore not modelled.

| parameter (top) | default | meaning                                        |
|-----------------|---------|------------------------------------------------|
| `N`             | 64      | challenge bits, switches per row               |
| `R`             | 4       | responses; R+1 rows; must be even              |
| `CHIP_SEED`     | 1       | which chip                                     |
| `MEAN_PS`       | 500.0   | nominal element delay                          |
| `SD_PS`         | 4.0     | element delay spread                           |
| `RHO`           | 0.0     | neighbour correlation of element delays        |
| `ST_PS`,`HT_PS` | 0.0     | arbiter setup/hold times (30/10 is a typical non-ideal case) |

| port        | dir | width | meaning                                         |
|-------------|-----|-------|-------------------------------------------------|
| `launch`    | in  | 1     | rising edge starts the race in all rows         |
| `xform_en`  | in  | 1     | 1: challenge goes through `challenge_xform`     |
| `challenge` | in  | N     | challenge; bit 0 is at the launch end of even rows |
| `arb`       | out | R+1   | arbiter bit of every row (a plain parallel PUF) |
| `resp`      | out | R     | interleaved responses                           |

## Files

| file                     | kind            | content                                        |
|--------------------------|-----------------|------------------------------------------------|
| `rtl/puf_pkg.sv`         | package         | constants, delay-variation functions           |
| `rtl/challenge_xform.sv` | RTL             | XOR input network                              |
| `rtl/xor_combiner.sv`    | RTL             | leave-one-out output XORs                      |
| `rtl/puf_switch.sv`      | timing model    | 2x2 switch with four delays                    |
| `rtl/puf_arbiter.sv`     | timing model    | arbiter with setup/hold and metastability      |
| `rtl/puf_row.sv`         | timing model    | N switches and an arbiter                      |
| `rtl/interleaved_puf.sv` | top             | rows, reversal, input network, output network  |
| `tb/tb_*.sv`             | testbenches     | one per module, plus the two below             |

The timing models contain delays and real numbers. They simulate but do not
synthesize. In silicon, the rows would be a hand-placed, matched layout. The
two XOR networks and the challenge multiplexer are the only parts a synthesis
tool would build.

## Simulating

Verilator 5 with timing support is needed:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_interleaved_puf \
    -y rtl -y tb rtl/puf_pkg.sv tb/tb_interleaved_puf.sv
./obj_dir/Vtb_interleaved_puf
```

Replace the testbench name to run another one. Every testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops on its own. A watchdog ends it
if it hangs.

| testbench                 | what it checks                                               | run time |
|---------------------------|--------------------------------------------------------------|----------|
| `tb_challenge_xform`      | output equations and the suffix-parity property, 2000+ vectors | < 1 s  |
| `tb_xor_combiner`         | all 32 inputs of R=4, random R=8, one-input sensitivity       | < 1 s    |
| `tb_puf_arbiter`          | decision rule, 10 ps output delay, re-arming, 30/10 ps window, balanced metastable outcomes | < 1 s |
| `tb_puf_switch`           | each route's delay; delay statistics over 256 elements; outlier | < 1 s  |
| `tb_puf_row`              | 303 challenges on five rows against a path-walking reference: response, timing, outlier, correlation, metastable count | ~7 s |
| `tb_interleaved_puf`      | end to end with 30/10 ps arbiters: every row bit, every response, input network on and off, reversal, metastability | ~7 s |
| `tb_interleaved_puf_full` | default parameters, single-bit-flip experiment (below)       | ~3 min   |
| `tb_puf_mixing`           | R = 2 and R = 8 side by side: flips at the challenge ends, Hamming distances 1, 32, 64 | ~1.5 min |

The row, end-to-end and full-size testbenches predict every arbiter bit
independently of the models. They read the delays each switch drew, walk the challenge's path through them, and
compare the sign of the arrival difference with the arbiter's output.

### The single-bit-flip experiment

`tb_interleaved_puf_full` runs the design at its default size. It applies 50
random base challenges, and for each one the 64 challenges that differ from it
in one bit, once without and once with the XOR input network. That is 6500
evaluations, each checked. It reports how often row 0's bit and `resp[0]`
change for each flipped position. A typical run gives:

| flipped bit       | row 0, no XOR network | row 0, XOR network | interleaved `resp[0]` |
|-------------------|-----------------------|--------------------|-----------------------|
| first 8 (launch end) | 0.08               | 0.04               | 0.3 – 0.45            |
| last 8 (arbiter end) | 0.84               | 0.06               | 0.2 – 0.5             |

A single row is highly predictable: the change probability rises steadily
from the launch end to the arbiter. The input network flattens it to a few
percent at every position. The interleaved response stays between those
extremes, and its spread over the positions is less than half a single row's.
The test fails if any of these trends is missing, or if a response bit is 1
for less than 20 % or more than 80 % of the challenges.

## Design choices and departures

These points are not fixed by the structure itself. They are choices made
here and can be changed:

* **Reversal.** Odd rows (1, 3, …) get bit `N-1-i` where even rows get bit i.
* **Leave-one-out order.** Response j omits row j. Row R is in every response.
* **Input network in the interleaved PUF.** The interleaved structure feeds
  the challenge to the rows directly. The XOR network is available through
  `xform_en`, a run-time select added here.
* **Arbiter.** The top path is the data input, the bottom path the clock. The
  10 ps output delay and the re-arm-when-both-low rule are this model's.
* **Delays.** Only the four route delays per switch are modelled. There are
  no separate wire segments. The delay on the select input is zero.
* **Random numbers.** An Irwin-Hall approximation of the Gaussian and an
  xorshift generator, seeded per element, were chosen for repeatability.
* **Spatial correlation** is one-dimensional along the row, over the element
  index.
* **No clocked wrapper.** Nothing synchronises `launch` or captures `resp` in
  a register; a system using the PUF would add that around it.

Not included: the feed-forward arbiter PUF, which feeds an intermediate
arbiter's decision into a later switch. It is the older structure this design
improves on. Also not included: the off-line statistics and the
model-building (linear programming) attacks used to judge PUFs, since they are
software run on collected challenge/response pairs.
