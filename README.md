# Exact OR-based multiply-accumulate on unary bit-streams

In unary stochastic computing a number is a bit-stream: a value v/n is a
period of n bits holding v ones followed by n-v zeros, repeated. Multiplying
two such numbers needs only an AND gate, provided the two streams have coprime
periods: with x on period n and y on period k = n-1, every pairing of bit
positions occurs exactly once in n*k cycles, so the AND output holds exactly
x*y ones. Adding products is the hard part. An OR gate gives a non-scaled sum
only if no two inputs are ever 1 in the same cycle; a MUX gives a sum scaled
by 1/N.

This RTL implements a MAC, z = sum x_i*y_i, that adds N products with a
single OR gate and no loss. Each product gets its own relative delay. The
delays are chosen so that, while every input holds at most v ones per period,
the ones of different products never coincide. The OR output then carries
exactly sum(x_i*y_i) ones. It is the technique published as "High-Accuracy
Multiply-Accumulate (MAC) Technique for Unary Stochastic Computing" (Schober,
Najafi, TaheriNejad). The RTL includes all three of its implementations and a
ones counter that turns the output back into binary.

## Why delays make OR addition exact

Take x with v ones per period n and y with v ones per period k = n-1. Their
AND product, over its n*k cycles, has the following shape:

* In period x of the n-stream (bits n*x .. n*x+n-1), ones can only appear in
  the first v bits. The last n-v bits of every period are always 0.
* Ones appear only in the first v periods and the last v-1 periods of the
  product, where the two streams are still (or again) nearly aligned. The
  stretch from bit n*v to bit n*(n-v) is all zeros.

Two kinds of delay fit other products into these zeros:

* **Minor delay**, a step of v cycles. A product shifted by p*v puts its
  v-bit bursts into the n-v zero bits of each period. This gives
  N_minor + 1 = floor((n-v)/v) + 1 positions.
* **Major delay**, a step of v*n cycles. A group shifted by q*v*n moves into
  the long all-zero middle stretch. This gives N_major + 1 = floor((n-2v)/v) + 1
  positions.

Product i uses q = i / (N_minor+1) and p = i mod (N_minor+1), so its delay is

    D_i = q*v*n + p*v

That allows N = (N_major+1)*(N_minor+1) = floor((n-v)/v)*floor(n/v) products.
Turned around for a given N, the largest v is

    v = floor( n / (ceil(pronic_root(N)) + 1) ),   pronic_root(N) = (sqrt(4N+1)-1)/2

`ceil(pronic_root(N))` is the smallest x with x*(x+1) >= N. Inputs up to v/k
are summed exactly. Some examples:

| n  | N (products) | v  | exact up to | delays                    | cycles n*k + D_max |
|----|--------------|----|-------------|---------------------------|--------------------|
| 16 | 6            | 5  | 0.33        | 0 5 10 80 85 90           | 330                |
| 32 | 2            | 16 | 0.52        | 0 16                      | 1008               |
| 32 | 3            | 10 | 0.32        | 0 10 20                   | 1012               |
| 32 | 6 (default)  | 10 | 0.32        | 0 10 20 320 330 340       | 1332               |
| 32 | 12           | 8  | 0.26        | 0 8 16 24 256 ... 536     | 1528               |

If N is not pronic (2, 6, 12, 20, 30, ...), the first N delays are used.

The output stream is n*k + D_max bits long, where D_max is the delay of the
last product. The result is its number of ones, read in units of 1/(n*k). It
can exceed n*k, meaning a value above 1.

### Inputs above the exact range

If an input has v+c ones, some extra ones land where other products may also
have ones, and the OR loses them. The count is then never above sum(x_i*y_i).
The loss is at most

    ((3/2)*c*(c+1) + c*(v-1)) * L  ones

where L is the number of products with an input above v. One case is checked
exactly: n = 16 with 6 products, all twelve inputs at 6 instead of 5. That
case gives 207 ones of 240 (0.8625), where exact addition would give 216
(0.9).

## Three ways to make the delays

All three produce the same output bit-stream, cycle for cycle, and the same
count. The testbenches check this.

**`unary_mac_or`: delayed generation.** Every input has its own generator, a
counter and a comparator (`unary_sng`). The pair for product i is enabled
only in cycles [D_i, D_i + n*k) of the operation. A disabled generator
outputs 0 and holds its count. There are N AND gates, one N-input OR gate and
a ones counter. Its registers are the 2N small counters, so it is the
cheapest unit when there are many inputs.

**`unary_mac_or_reg`: delay registers.** One counter of period n and one of
period k are shared. Each input is compared with the counter of its period.
All products start together, and product i then passes through a D_i-stage
shift register (`delay_line`) before the OR gate. The comparators are forced
to 0 after n*k cycles, so only zeros follow into the registers. The number of
register bits is the sum of all D_i (1,020 at the default size). This is
cheap only when all delays are minor, which means up to 6 inputs.

**`unary_mac_or_seq`: sequential.** This is a <- a + b*c with one generator
pair and an accumulator. The accumulator is a recirculating shift register of
L = n*k + D_max bits, so accumulator slot s is visited at operation times
s, s+L, s+2L, and so on. Product i gets round i, which is L cycles long. In
that round its generators run only in slots [D_i, D_i + n*k), so the product
lands at relative delay D_i, exactly as in the parallel units. In the other
slots of the round the generators are stalled. Each cycle the bit that leaves
the accumulator is OR-ed with the product bit and written back:

* In round 0 the returning bits are ignored, which clears the accumulator.
* In the last round the written-back bits are final. They form the output
  stream `z`.

The unit asks for its factors by index: `sel` = i, and `b`/`c` must show
x_i/y_i. An operation takes N*L cycles: 2016, 7992 and 18336 for 2, 6 and 12
products at n = 32. That is about 2x, 7.8x and 17.9x a 1024-cycle pass.

`usc_mac_top` instantiates all three on the same x/y. It brings out each
unit's stream, done pulse and count, and selects the sequential unit's
factors with its `sel`.

## Interface and timing

All three units use one handshake. Reset is synchronous and active high.

* `start` is taken in a cycle where the unit is not busy. It clears the
  counters. A `start` while busy is ignored.
* `busy` is high for T = n*k + D_max cycles in the parallel units and N*T in
  the sequential unit.
* `z` is the output stream. `z_valid` marks its T bits: every busy cycle in
  the parallel units, and the last round in the sequential unit.
* `done` is a one-cycle pulse after the last busy cycle. It is seen T+1 clock
  edges after the edge that took `start`.
* `result` holds the ones count from `done` until the next start.
* Factors are numbers of ones per period. `x_i` runs 0..n on period n and
  `y_i` runs 0..n-1 on period k. Each is XW = clog2(n+1) bits wide, packed as
  `[N_SUM-1:0][XW-1:0]`.
* Inputs are not latched. They must stay stable while they are being
  generated, and assertions check this. In `usc_mac_top` that means until the
  sequential unit's `done`.

Parameters, shared by every unit:

| parameter  | default | meaning |
|------------|---------|---------|
| `N_PERIOD` | 32      | n, the period of the x streams; k = n-1 for y (5-bit precision) |
| `N_SUM`    | 6       | number of products N (12 MAC inputs) |
| `V`        | `v_max(N_PERIOD, N_SUM)` = 10 | ones per period up to which the sum is exact; sets the delays |
| `XW`       | 6       | factor width |
| `CW`       | 11      | width of the ones count (holds n*k + D_max) |

`usc_pkg` holds the arithmetic used at elaboration: `v_max`, `n_major`,
`n_minor`, `delay_of`, `d_max`, `total_cycles`. `delay_schedule` is the same
delay formula as run-time logic, because the sequential unit needs the delay
of the product it is working on. `V` can be set lower than `v_max`, but it
must satisfy N_SUM <= (N_major+1)*(N_minor+1) and 2V <= n. Initial
assertions check both.

## Files

| file | contents |
|------|----------|
| `rtl/usc_pkg.sv` | delay-schedule arithmetic for sizing and constant delays |
| `rtl/delay_schedule.sv` | product index to delay q*v*n + p*v (combinational) |
| `rtl/unary_sng.sv` | unary generator: counter plus comparator, ones first, 0 when disabled |
| `rtl/prob_estimator.sv` | ones counter (stream to binary) |
| `rtl/delay_line.sv` | DEPTH-stage bit shift register |
| `rtl/unary_mac_or.sv` | parallel MAC, delayed generation |
| `rtl/unary_mac_or_reg.sv` | parallel MAC, delay registers |
| `rtl/unary_mac_or_seq.sv` | sequential MAC, recirculating accumulator |
| `rtl/usc_mac_top.sv` | the three MACs side by side |
| `tb/tb_usc_ref.sv` | reference model: v, the delays by nested loops, every output bit |
| `tb/tb_mac_harness.sv` | drives one MAC and checks stream, count and latency |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_usc_mac_top` (end to end at the defaults), `tb_mac_sizes` (n = 16/32/64/128 with 2 to 30 products) and `tb_grayscale` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/usc_pkg.sv tb/tb_usc_ref.sv tb/tb_usc_mac_top.sv --top-module tb_usc_mac_top
    ./obj_dir/Vtb_usc_mac_top

To change the size, override `N_PERIOD` and `N_SUM` on the unit. `V`, the
delays and all widths follow. For example, `usc_mac_top #(.N_PERIOD(32),
.N_SUM(3), .CW(13))` is the gray-scale configuration: three products, 1012
cycles per pixel.

What the testbenches establish:

* Against an independent model, every output bit and every count match. This
  holds at n = 3, 16, 32, 64 and 128, for 2, 3, 6, 12, 20 and 30 products.
* Inside the exact range, the count equals sum(x_i*y_i).
* Outside it, the loss stays within the bound above.
* Latencies are n*k + D_max and N*(n*k + D_max).
* The three implementations agree bit for bit.
* Two worked cases give the expected counts:
  * n = 3, k = 2, with x1 = 2/3, y1 = 1, x2 = 1/3, y2 = 1/2, and product 2
    delayed by 1. The output is 1101100, which is 4 ones where exact addition
    gives 5.
  * The n = 16 case with inputs at 6, described above.

The gray-scale test runs on a generated image, weights round(w*31) = 9, 18
and 4, and 5-bit colour components. It prints the mean absolute error against
exact 5-bit arithmetic. The weight 18 is above v = 10, so that product is not
exact.

## Choices made here, and limits

These points are this design's own. The published description leaves them
open or states them differently:

* **Handshake and encoding.**
  * The start/busy/done handshake, with its exact cycle timing, is this
    design's.
  * Unlatched inputs are this design's choice.
  * Factors are counts of ones, and the count n (all ones) is allowed.
  * x goes on period n and y on period k.
* **Schedule arithmetic.** The exact-range formula uses the pronic root
  rounded up. That is the rounding that gives v = 10 and the 1012-cycle
  gray-scale latency for three products. Rounding down would give v = 16
  there and no major delays.
* **Register-delay MAC.** It shares one counter pair. The published
  description also mentions "2N counters" in the same passage, but only the
  shared pair matches comparing "the values of the two counters" with every
  factor.
* **Sequential MAC.**
  * The stall before product i+1 is D_max + D_(i+1) - D_i cycles, not a
    constant D_max. A constant stall would give every product the same slot
    in the accumulator.
  * The total time, N*(n*k + D_max), matches the published run times.
  * Clearing the accumulator in round 0 and emitting the result in the last
    round are this design's choices.
* **Not included.**
  * Binary-to-stream front ends other than the counter-and-comparator
    generator.
  * The Sobol-sequence, MUX and toggle-flip-flop MACs that the technique is
    compared against.
  * Any rescaling of the count.
* **Counter width.** The count is in units of 1/(n*k). Over a long enough
  stream it can exceed n*k, and `CW` is sized for n*k + D_max.
* **Accuracy.** Exactness holds only up to v ones per input. Above that the
  error grows roughly with the square of the excess.
