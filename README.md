# Ring-oscillator PUF with location-aware oscillator placement

A physically unclonable function (PUF) turns manufacturing variation into a
device-specific bit string. The chip stores no secret: it regenerates the
string whenever it is needed, for example to authenticate a sensor node. This
design is a ring-oscillator PUF for an FPGA. It holds 200 identical ring
oscillators and compares their frequencies in 100 disjoint pairs. Each
comparison gives one bit: 1 if the first oscillator of the pair is faster,
0 otherwise. The result is a 100-bit response.

The logic is simple. The hard part is **where the oscillators are placed**.
On the target FPGA family (a 7-series part, as on a Zynq 7000), "identical"
rings are not identical:

* A slice at an odd x coordinate (Slice(1)) runs about 28 MHz faster than a
  slice at an even x coordinate (Slice(0)). These are two *frequency
  domains*, at about 610 and 580 MHz.
* Frequency falls by about 12 MHz from one corner of the used area to the
  other.
* The leftmost 14 columns run a few MHz faster.

A pair that straddles one of these effects gives the same bit on every chip.
Such a bit is predictable and useless. The placement strategy decides which
locations are compared, so it decides how random the response is. This RTL
has the placement as a parameter. It also includes a simulation model of the
oscillators that carries these location effects, so the effect of each
strategy can be seen in simulation.

## How a response is produced

```
             enable[199:0]                 sel_a           sel_b
 controller ---------------> ro_array      |               |
   ^  |                       | ro_out     v               v
   |  |                       +-------> MUX A ---> counter A --+
   |  |                       +-------> MUX B ---> counter B --+--> count_a > count_b
   |  +-- cnt_clr (both counters)                               |
   +------------------------------------------------------------+ cmp_gt
```

Bit k compares oscillator 2k (through MUX A) with oscillator 2k+1 (through
MUX B). No oscillator is used in two pairs. For each bit, `puf_controller`
steps through four states:

| state   | cycles          | what happens |
|---------|-----------------|--------------|
| CLEAR   | 1               | selects are set to 2k and 2k+1; both counters are held at zero; every ring is stopped |
| RUN     | `GATE_CYCLES`   | only the two selected rings are enabled; each counter counts the rising edges of its ring |
| SETTLE  | `SETTLE_CYCLES` | the rings are stopped again; the counts stop changing |
| CAPTURE | 1               | `response[k] <= count_a > count_b`; `bit_valid` is high and `bit_index = k` |

Each counter is clocked by its ring oscillator, not by the system clock. It
is therefore cleared asynchronously, and only while its ring is stopped. The
clear acts on the rising edge of `cnt_clr`. Reset holds `cnt_clr` low and
`start` raises it, so the first window starts from zero whatever state the
flip-flops power up in. The
controller reads the counts only after SETTLE, when neither ring has run for
several cycles, so no synchronizer is needed. `ro_run` and `cnt_clr` come
straight from flip-flops. This keeps glitches off the ring enables and off
the asynchronous clear.

Timing at the defaults (`GATE_CYCLES = 4096`, `SETTLE_CYCLES = 4`, 100 MHz
clock):

* one bit takes 4102 cycles;
* `done` pulses 100 × 4102 + 1 = 410,201 cycles (about 4.1 ms) after the
  clock edge that samples `start`;
* a 610 MHz ring gives about 25,000 counts in the 41 µs window. That fits the
  16-bit counters, which saturate instead of wrapping. One count is about
  0.024 MHz, far finer than the few-MHz spread between oscillators.

Equal counts give 0. The whole response is valid when `done` pulses. The raw
counts of every pair can be logged from `count_a`/`count_b` while
`bit_valid` is high. Use them for enrolment or to characterise a board.

## Placement strategies

`ro_puf_top` has a `STRATEGY` parameter. It places oscillator *i* of the PUF
at a location on a 40-row × 100-column grid of slices. The location index is
`100*y + x`, from 0 at the lower left to 3999 at the upper right. Pair k is
always oscillators 2k and 2k+1, so the strategy alone decides which locations
are compared.

| `STRATEGY`                 | locations of oscillators 0, 1, 2, … | consequence |
|----------------------------|------------------------------------|-------------|
| `STRAT_FIRST`              | 0, 1, 2, … 199                     | every pair is a Slice(0) ring against its Slice(1) neighbour, so the bit is almost always 0 |
| `STRAT_RANDOM`             | a fixed scrambled subset of 0…3999 | about half of the pairs cross domains (predictable); the other half are far apart |
| `STRAT_RANDOM_SAME_DOMAIN` | a fixed scrambled subset of odd locations | all pairs are Slice(1), but distant pairs still see the gradient |
| `STRAT_FIRST_SAME_DOMAIN`  | 1, 3, 5, … 399 (**default**)       | Slice(1) neighbours: same domain, little gradient, so the bit is decided by random variation |

The two "random" placements are meant to be random draws. Here a fixed
scrambling permutation (`ropuf_pkg::permute`) stands in for the draw, so every
build places the same oscillators. A fifth strategy selects, after measuring
a sample of boards, the locations whose frequency is closest to the mean.
It scores about as well as the default, but it needs measured data, so it is
not provided. Any such location list could replace `ro_location()`.

On a real FPGA, placement is a matter of constraints, not RTL. Each ring must
be locked to its slice (AND gate in LUT A, inverters in LUTs B, C and D) with
the same routing in every slice of a type. In simulation, `STRATEGY` selects
the frequencies that the oscillator model assigns.

### What the model gives for each strategy

`tb_ro_puf_strategies` builds three simulated chips per strategy and compares
their responses. The average inter-chip Hamming distance should be near 50 %
for a good PUF. With the model below it comes out as:

| strategy                   | simulated (3 chips) | published (40 boards) |
|----------------------------|---------------------|-----------------------|
| `STRAT_FIRST`              | 0 %                 | 2.2 %                 |
| `STRAT_RANDOM`             | 16 %                | 18.5 %                |
| `STRAT_RANDOM_SAME_DOMAIN` | 27 %                | 36.1 %                |
| `STRAT_FIRST_SAME_DOMAIN`  | 54 %                | 47.8 %                |

The model reproduces the ordering and the rough size of the effect. With only
three chips (three pairs of responses), the simulated figures vary by several
percent from seed to seed.

## The oscillator model

`ro_cell` and `ro_array` are behavioural models for simulation only. Each
ring is an AND gate followed by three inverters, and it oscillates while its
enable is high. Its period is 8 stage delays: two trips round a four-stage
ring. Once the enable falls, the ring settles with its output high.
`ro_cell` produces this timing from a single process instead of four gates.
With hundreds of rings, that keeps simulation fast.

`ropuf_pkg::ro_freq_mhz(seed, location)` sets each ring's frequency:

```
f = (odd x ? 612 : 584) MHz           two frequency domains
    - 12 MHz * location / 4000        gradient across the grid
    + (x < 14 ? 4 : 0) MHz            left-edge effect
    + 3 MHz * g(seed, location)       chip-specific variation
```

Here `g` is a zero-mean, unit-variance, roughly Gaussian number. It is built
from four uniform values drawn from an integer hash of (seed, location). The
first three terms are systematic: every chip has them, and they are what
make a poor placement predictable. The last term is the chip's fingerprint.
`DEVICE_SEED` picks which simulated chip is built.

The model has no jitter, and no temperature or voltage dependence. A given
simulated chip therefore always returns the same response. A real one flips
a percent or two of its bits between readings. The two smaller systematic
effects seen on the real part are also left out (M- versus L-type LUTs, and
left- versus right-hand CLBs). So are the strongly fast or slow outliers
caused by unconstrained routing.

## Interface of `ro_puf_top`

| port        | dir | width     | meaning |
|-------------|-----|-----------|---------|
| `clk`       | in  | 1         | system clock (the testbenches use 100 MHz) |
| `rst_n`     | in  | 1         | synchronous, active-low reset |
| `start`     | in  | 1         | start one response; ignored while `busy` |
| `response`  | out | N_RO/2    | bit k = (oscillator 2k faster than 2k+1); valid at `done` |
| `busy`      | out | 1         | a response is in progress |
| `done`      | out | 1         | one-cycle pulse when the response is complete |
| `bit_valid` | out | 1         | high in the cycle where a pair's bit is taken |
| `bit_index` | out | 7         | index k of that pair |
| `count_a`   | out | CNT_W     | edge count of oscillator 2k in the window |
| `count_b`   | out | CNT_W     | edge count of oscillator 2k+1 in the window |

| parameter       | default                   | origin |
|-----------------|---------------------------|--------|
| `N_RO`          | 200                       | size of the published PUF |
| `STRATEGY`      | `STRAT_FIRST_SAME_DOMAIN` | the placement recommended for this PUF |
| `DEVICE_SEED`   | 1                         | simulation only: which chip the model represents |
| `GATE_CYCLES`   | 4096                      | own choice |
| `SETTLE_CYCLES` | 4                         | own choice |
| `CNT_W`         | 16                        | own choice, sized for `GATE_CYCLES` at 100 MHz |

## Files

| file | contents |
|------|----------|
| `rtl/ropuf_pkg.sv`       | grid constants, strategy enum, `ro_location()`, frequency model |
| `rtl/ro_cell.sv`         | one ring oscillator (behavioural) |
| `rtl/ro_array.sv`        | the bank of `N_RO` rings placed by `STRATEGY` (behavioural) |
| `rtl/ro_mux.sv`          | N-to-1 multiplexer (MUX A and MUX B) |
| `rtl/freq_counter.sv`    | ring-clocked saturating edge counter with asynchronous clear |
| `rtl/freq_comparator.sv` | `count_a > count_b` |
| `rtl/puf_controller.sv`  | pair sequencing, gate window, response register |
| `rtl/ro_puf_top.sv`      | the complete PUF |
| `tb/tb_*.sv`             | one self-checking testbench per module, plus the ones below |

Testbenches beyond the per-module ones:

* `tb_ro_puf_top`: end to end with a 256-cycle window. Runs two chips, one
  placed `STRAT_FIRST_SAME_DOMAIN` and one placed `STRAT_FIRST`. Checks every
  count against the model, every bit, the latency, and that two runs give the
  same response. Also checks that 1s, 0s, same-domain pairs and cross-domain
  pairs all occur.
* `tb_ro_puf_full`: one complete response at the default parameters, checked
  pair by pair.
* `tb_ro_puf_strategies`: the uniqueness comparison described above.

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.

## Simulating

All files use `timeunit 1ps; timeprecision 1fs;`. The ring frequencies need
femtosecond resolution to differ by fractions of a percent. Example with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ropuf_pkg.sv tb/tb_ro_puf_top.sv --top-module tb_ro_puf_top -o sim
./obj_dir/sim
```

Approximate run times: `tb_ro_puf_top` about 10 s; `tb_ro_puf_full` about
1 minute. `tb_ro_puf_strategies` takes a few minutes, most of it compiling,
because every ring with its own delay becomes its own specialised module. A
shorter `GATE_CYCLES` speeds up simulation in proportion, at the cost of
count resolution. Below about 64 cycles, counts of close rings start to tie.

## Synthesis notes

Everything except `ro_cell` and `ro_array` is ordinary synchronous RTL. For an
FPGA build, replace `ro_array` with hand-placed rings: each an AND in LUT A
and inverters in LUTs B, C and D of one slice, with keep/dont-touch
attributes, location constraints taken from `ro_location()`, and the same
routing in every slice of a type. Lint tools report two points about
`ro_puf_top`, and both are intended:

* `cnt_clr` is both a flip-flop output and an asynchronous clear. It is the
  counters' reset, generated in the system clock domain.
* The ring itself would be a combinational loop.
