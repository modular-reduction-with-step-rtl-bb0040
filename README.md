# Step-by-step modular reduction, several bits of A per step

This design computes `R = A mod P` for a 2N-bit number `A` and an N-bit modulus
`P`, the reduction step that follows every multiplication in RSA-style and
prime-field arithmetic. It never divides the whole 2N-bit number. It works
through `A` from the top, a few bits at a time, and keeps only an N-bit partial
remainder:

```
R0  = upper N bits of A                      (already below P, see "Operating range")
A_i = 2^K * R_(i-1) + (next K bits of A)     i = 1 .. N/K
R_i = A_i mod P                              (A_i < 2^K * P, so R_i = A_i - q*P, q < 2^K)
R   = R_(N/K)
```

Each step uses a *partial remainder former* (PRF). It compares `A_i` with the
multiples `P, 2P, ..., (2^K-1)P` in parallel, picks the right quotient digit
`q`, and subtracts `qP` with one adder. The subtraction adds the one's complement
of `qP` with a carry-in of 1. The formers are chained without registers, so the
result settles after `N/K` former delays.

The main configuration reads **K = 2 bits per step**, with three multiples and
two comparators per former. Setting `K = 3` gives a variant that reads three
bits per step. It uses seven multiples and five comparators per former, and has
a third fewer formers, so its delay is two thirds of the K = 2 device.

## Worked example (defaults N = 6, K = 2)

`A = 1437 = 010110 01 11 01b`, `P = 35`:

| step | A_i                 | range        | R_i |
|------|---------------------|--------------|-----|
| R0   | upper half `010110` |              | 22  |
| 1    | 4·22 + 01b = 89     | 2P ≤ 89 < 3P | 19  |
| 2    | 4·19 + 11b = 79     | 2P ≤ 79 < 3P | 9   |
| 3    | 4·9 + 01b = 37      | P ≤ 37 < 2P  | 2   |

`1437 mod 35 = 2`. The device sets `ready` three clock edges after `start`.
With `K = 3` the same numbers give `A_1 = 8·22 + 011b = 179 → 4` and
`A_2 = 8·4 + 101b = 37 → 2`, and `ready` follows after two edges.

## Block structure

```
            start ──┬──────────────┬───────────────┐
 p_in ─► multiples_former          │               │
         (P latched; jP, ~jP)      │         delay_element ─► ready
            │ mult, mult_n (to every former)       (N/K edges)
 a_in ─► rg_a (A latched)          │
            │ upper N bits = R0    │ K-bit groups of A, MSB first
            ▼                      ▼
          prf ─R1─► prf ─R2─► ... ─► prf ─► r_out = R_(N/K)
           1          2               N/K      (r_partial = R_1..R_(N/K))
```

| file | block |
|------|-------|
| `rtl/modred.sv` | top: register/former wiring, chain of `N/K` formers, `prf2` or `prf3` chosen by `K` |
| `rtl/multiples_former.sv` | latches `P` on `start`; forms `jP` and `~jP`, `j = 1..2^K-1`, `N+K` bits wide |
| `rtl/rg_a.sv` | latches the 2N-bit `A` on `start` |
| `rtl/prf2.sv` | two-bit former |
| `rtl/prf3.sv` | three-bit former |
| `rtl/delay_element.sv` | counts `N/K` clock edges after `start` and raises `ready` |

## The two-bit former (`prf2`)

`A_i` is below `4P`, so the quotient digit is 0 to 3. This needs the thresholds
P, 2P and 3P, but only two comparators are used, one after the other:

* **CC-1** compares `A_i` with `2P`.
* **CC-2** is shared. Its reference is `P` when `A_i < 2P`, and `3P` when
  `A_i ≥ 2P`. AND/OR gating driven by CC-1 selects the reference.

The two comparator outputs then pick what the adder adds to `A_i`:

| CC-1       | CC-2       | added to A_i | carry-in | R_i         |
|------------|------------|--------------|----------|-------------|
| A_i < 2P   | A_i < P    | 0            | 0        | A_i         |
| A_i < 2P   | A_i ≥ P    | ~P           | 1        | A_i − P     |
| A_i ≥ 2P   | A_i < 3P   | ~2P          | 1        | A_i − 2P    |
| A_i ≥ 2P   | A_i ≥ 3P   | ~3P          | 1        | A_i − 3P    |

Internally the former is written as gating. AND blocks gate each complemented
multiple onto an OR bus. The carry-in is 0 only when `A_i < P`, and a gate
passes `A_i` to the adder. The internal signal names follow that gate-level
description (`cc1_out1`, `and6`, `or3`, ...). The adder is `N+2` bits wide, but
only the low N bits are kept, because the difference is always below `P`.

The former's delay is two comparators in series, then one adder.

## The three-bit former (`prf3`)

Here `A_i < 8P` and `q` is 0 to 7. There are five comparators in two levels, so
the depth matches `prf2`:

* level 1, in parallel: `A_i ≥ 2P`, `A_i ≥ 4P`, `A_i ≥ 6P`;
* level 2, in parallel: one comparator against `P` or `5P`, and one against
  `3P` or `7P`. The 4P result selects each reference.

Then `q = {≥4P, (≥4P ? ≥6P : ≥2P), (that bit ? hi comparator : lo comparator)}`.
The adder adds `~(qP)`, with a carry-in of 1 when `q ≠ 0`. The five-comparator
count and the parallel operation come from the method. How the comparisons are
split into these two levels is this implementation's own arrangement.

## Timing and handshake

* `start` is sampled on a rising clock edge. On that edge `P` and `A` are
  latched, and `ready` drops.
* The former chain is combinational from the two registers to `r_out`. The
  design allows **one clock period per former**: `ready` rises `N/K` edges
  after the edge that sampled `start` (3 for the defaults), and stays high until
  the next `start`. To meet timing, the clock period must cover one former delay
  (plus the multiples adder for the first former). If it does not, set it from
  the whole chain and treat `ready` as a cycle count only.
* `p_in` and `a_in` may change at any time after the loading edge.
* A new `start` while an operation is still counting restarts it.
* `r_partial[i]` shows every partial remainder, which is useful for debugging.
  `r_partial[N/K]` is the result.
* `rst_n` is an asynchronous, active-low reset. It clears `P`, `A` and the
  counter, so `ready` is low until the first `start`.

The ready flag, the per-former clock budget and the reset are choices of this
design. The method itself fixes only the total delay, `N/K` former delays.

## Operating range

`R0` is taken directly from the upper half of `A`, without reducing it. This is
correct only when that upper half is below `P`, that is, when `A < P · 2^N`. A
product of two residues mod `P` always meets this, because `A < P² < P·2^N`.
Each former also relies on `R_(i-1) < P`, so that `A_i < 2^K·P`. `P` must be
nonzero. Two concurrent assertions in `modred` check these conditions at
`start`. Outside this range the output is not `A mod P`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 6 | width of `P` and of the result. `A` has `2N` bits. Must be a multiple of `K`. |
| `K` | 2 | bits of `A` per step: 2 (`prf2`) or 3 (`prf3`) |

The default `N = 6` matches the worked example. The RTL is generic in `N`. A
cryptographic width such as 256 or 2048 only lengthens the chain: `N/K` formers,
each with `N+K`-bit comparators and an adder.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=… failures=…`:

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_modred.sv` | defaults (N=6, K=2), no parameter overrides. It runs the worked example (partials 19, 9, 2; ready after 3 edges), then **every** `P = 1..63` with **every** `A < P·64` (129,025 reductions). Each reduction checks `r_out`, each partial remainder and the ready latency. It includes restarts before ready, and requires every former to have subtracted 0, P, 2P and 3P. |
| `tb/tb_modred_k3.sv` | the same exhaustive run with `K = 3` (latency 2, all quotient digits 0..7 in both formers) |
| `tb/tb_prf2.sv`, `tb/tb_prf3.sv` | formers alone, every `P < 64` and every `A_i < 4P` or `< 8P` |
| `tb/tb_multiples_former.sv` | every `P`, both `K`; checks the multiples, the complements, holding and reset |
| `tb/tb_rg_a.sv` | load on `start`, hold otherwise, reset |
| `tb/tb_delay_element.sv` | latency for `DEPTH` 3 and 2, restart while counting, reset |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_modred.sv --top-module tb_modred -Mdir obj
./obj/Vtb_modred
```

All the testbenches pass, and each runs in well under a second. Every former
and every top-level configuration has been exhaustively simulated at N = 6.
Larger `N` have been linted and elaborated but not simulated.

## Departures and open points

* The gate structure of `prf2` follows the method's functional description. One
  case is taken from its arithmetic rather than its wording: when `A_i ≥ 3P`,
  the adder gets `~3P`.
* The clocked `ready` and the one-clock-per-former budget are this design's own
  interpretation of the delay element. The design does not register each
  partial remainder in a separate clock cycle.
* `multiples_former` builds `jP` as a running sum of `P`. Its adders lie on the
  path from the `P` register to the first former, which adds delay to the first
  clock period.
* The `prf3` comparator arrangement is one plausible five-comparator,
  two-level arrangement (see above).
