# Tent-map pseudo-random number generator

This generator produces pseudo-random 32-bit words by iterating the tent map, a chaotic
one-dimensional map. The map is simple enough to need only one multiplier:

    x' = mu * x          if x < 1/2
    x' = mu * (1 - x)    if x >= 1/2

The state `x` lies in [0,1). The control parameter `mu` lies in [0,2]. For mu below 1 the
map contracts to 0. Above 1 it is chaotic. As mu approaches 2, the values it visits spread
over almost the whole unit interval. The hardware computes one iteration per clock. Each
new state is also the output word.

## Number formats

| quantity | width | format | example |
|---|---|---|---|
| state / output `x`, `seed` | 32 (`WIDTH`) | unsigned, all 32 bits fraction: value = x / 2^32 | `AAAABBBB` ≈ 0.6667 |
| `mu` | 8 (`MU_WIDTH`) | unsigned, 1 integer bit + 7 fraction bits (`MU_FRAC`) | `C0` = 1.5, `B0` = 1.375 |

These formats make the two non-linear parts of the map cheap:

* **The branch condition `x >= 1/2` is just the MSB of `x`.**
* **`1 - x` is `2^32 - x`,** which is the 32-bit two's complement of `x`. When the MSB is
  set, the result is at most 2^31, so it always fits.

mu can reach at most 255/128 = 1.9921875. mu = 2 exactly cannot be represented.

## Datapath

Both branches of the map are a product with mu. So the design first chooses the value to
multiply ("folds" x), and then multiplies once:

```
 seed ─┐
       ├─[origin select]── x_n ──[fold: MSB ? 2^32-x : x]── y ──[× mu, keep fraction]──[output reg]──┬── x
 x ────┘      ▲                                                                           │          │
              └──────────────────────────── valid ────────────────────────────────────────┘          │
       └───────────────────────────────────── feedback ─────────────────────────────────────────────┘
```

| module | role |
|---|---|
| `tent_origin_select` | Passes the seed until the output register holds a value, then the register's own value. It is a 2:1 mux whose select is the register's `valid` flag. |
| `tent_fold` | Outputs `x` or `2^WIDTH - x`, chosen by the MSB of `x`. |
| `tent_mul_reg` | Multiplies by mu, truncates back to a `WIDTH`-bit fraction, and holds the output register and the `valid` flag. |
| `tent_prng` | Top level: wires the three stages into the loop shown above. |
| `tent_pkg` | Default widths: 32, 8 and 7. |

### Which product bits are kept

This is the least obvious part of the design. The product `y * mu` is 40 bits wide and has
32 + 7 = 39 fraction bits. To get a 32-bit fraction again, the design drops the **7** low
bits and keeps bits `[38:7]`. Bit 39 is always zero, because `y <= 2^31` and
`mu < 2^8`. An assertion in `tent_mul_reg` checks this. The dropped bits are simply cut off
(truncation, no rounding).

A description that says "drop the 8 low bits and keep the top 32" sounds equivalent but is
not. It would read mu as a 0.8 number, so `C0` would mean 0.75 instead of 1.5. The reference
sequence below only comes out with the 7-bit slice.

## Timing and interface (`tent_prng`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low reset |
| `en` | in | 1 | advance the map by one iteration at this clock edge |
| `seed` | in | `WIDTH` | initial value, used only by the first enabled edge after reset |
| `mu` | in | `MU_WIDTH` | control parameter, sampled at every enabled edge |
| `x` | out | `WIDTH` | current state: the random output |
| `valid` | out | 1 | `x` holds a computed value |

* After reset, `x` reads 0 and `valid` is low. Logic downstream therefore never sees an
  undefined word.
* The first clock edge with `en` high stores `f(seed)`. Each later enabled edge stores `f(x)`.
  That gives one new word per clock, with a latency of one cycle.
* If `en` is low, the register holds its value.
* Changing `seed` after the first value has no effect. To restart from a new seed, assert
  reset.
* There is no pipelining. The critical path is a 32-bit negate, a mux and a 32×8
  multiplier.

## Reference sequence

With seed `AAAABBBB` and mu = `C0` (1.5), the first nine outputs are:

| n | x_n |
|---|---|
| 1 | 7FFFE667 |
| 2 | BFFFD99A |
| 3 | 60003999 |
| 4 | 90005665 |
| 5 | A7FF7E68 |
| 6 | 8400C264 |
| 7 | B9FEDC6A |
| 8 | 6901B561 |
| 9 | 9D829011 |

For example, step 1 is computed as follows:

* `AAAABBBB` has its MSB set, so the fold gives `2^32 - AAAABBBB = 55554445`.
* Multiplying by mu: `55554445 × C0 >> 7 = 7FFFE667`.

A reduced 4-bit version (`WIDTH = 4`) with seed 6 and mu = `B0` (1.375) runs 6 → 8 → 11 →
6 → … with period three.

## Where the design departs from, or adds to, the described generator

The described generator fixes the map, the three-stage split (origin select, fold with MSB
selector, multiply plus output register), the 32-bit state, the 8-bit mu, mu = 1.5 encoded
as `C0`, and the output reading 0 before the first result. The following are this design's
own choices:

* **Product slice.** A 32×8-bit product is sometimes described as dropping its eight low
  bits. The RTL keeps bits `[38:7]` instead, because only that slice reproduces the reference
  sequence above.
* **Added control.** The `en` input, the `valid` output and the asynchronous active-low
  reset are additions. The described generator names only the seed and mu as inputs.
* **Restart.** Reloading a new seed without a reset is not provided.
* **4-bit variant.** It uses the same 8-bit mu format. The mu width for a 4-bit system was
  not specified.
* **Parameters.** `WIDTH`, `MU_WIDTH` and `MU_FRAC` are parameters. Their defaults are the
  described 32, 8 and 7. Wider states and mu formats with another integer/fraction split
  work as long as `MU_WIDTH - MU_FRAC` is 1. If mu has more than one integer bit, the map
  can leave [0,1), and the assertion in `tent_mul_reg` fires.

## Verification

Every testbench is self-checking. Each ends with a `TB_RESULT checks=N failures=M` line and
has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_tent_origin_select` | the mux on fixed and random inputs |
| `tb_tent_fold` | fold against 64-bit integer arithmetic: corners 0, 0x7FFFFFFF, 0x80000000, 0xFFFFFFFF, plus random values from both halves |
| `tb_tent_mul_reg` | reset value, hold with `en` low, random products against `floor(y*mu/128)`, the largest product, asynchronous reset |
| `tb_tent_prng` | full size, default parameters (details below) |
| `tb_tent_prng_4bit` | the 4-bit variant against the period-three sequence worked out by hand |
| `tb_tent_prng_mu_sweep` | a bifurcation-style sweep (details below) |

`tb_tent_prng` checks:

* zero before the first value
* the nine reference words, one per clock
* that `seed` is ignored once running
* 40 random seed/mu runs of 200 cycles against an integer model of the map, with `en`
  dropped at random
* that each mechanism happened at least once: seed selected, feedback selected, fold
  branch, pass branch, hold, and zero output before valid

`tb_tent_prng_mu_sweep` checks:

* for mu < 1, the state settles at 0
* for 1 < mu < 2, after 4000 steps the next 2000 outputs stay inside the tent map's
  attractor `[mu(1 - mu/2), mu/2]`
* that this band widens strictly as mu grows

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tent_pkg.sv tb/tb_tent_prng.sv \
          --top-module tb_tent_prng -o sim && ./obj_dir/sim
```

Replace the testbench name to run the others. Every testbench finishes in well under a
second.

## Limits

* The generator is a chaotic map on a finite state. In fixed point every orbit is
  eventually periodic, and some seeds fall into short cycles. The seed 0 and mu < 1 both
  lock at 0, and mu = 1 with a seed above 1/2 locks at `2^32 - seed`. The words are not
  suitable for cryptography without further processing.
* No statistical tests of randomness are included. The sweep testbench checks only the
  map's range behaviour.
