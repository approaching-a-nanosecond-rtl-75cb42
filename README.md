# A 32-bit adder in three gate levels

This is RTL for a 32-bit binary adder built to finish an addition in three
gate delays from any input to any output. The original circuit was a bipolar
ECL chip that added in about 2.1 ns. The model reproduces that adder's logic
structure gate group by gate group. It combines three known ideas:

- **Ling's pseudo-generate.** Each 4-bit slice does not compute its group
  generate G. It sends a signal H with G = P3·H, where P3 = A3 + B3. H needs
  only one gate delay; G would need two.
- **One-level carry lookahead.** A single level of AND gates, wire-ORed,
  turns the slices' H, P3 and group propagates into the carry into every
  slice. The network forms each G = P3·H inside the same gate.
- **Conditional-sum output.** Inside a slice, each sum bit is a wire-OR of
  four AND terms. Two terms fix the bit without looking at the slice carry.
  The other two pick between the two candidate sums with that carry. So the
  carry is one gate away from the sum.

The result is three levels: slice to lookahead, lookahead to slice carry,
slice carry to sum. The gates have at most 5 inputs, and at most 8 outputs
share one wire-OR node.

## Signal polarity

Operands and the sum are **negative logic**: the ports carry `na = ~A`,
`nb = ~B` and `ns = ~S`. All carries are **positive logic**. If you
complement every operand and sum bit of an adder but leave the carry alone,
you still have an adder. So `~ns == A + B + cin` (mod 2^32) on the true
values. Inside the design:

| signal | polarity | meaning |
|---|---|---|
| `H` | positive | Ling pseudo-generate of a slice |
| `NP3` | negative | `~(A3 + B3)` of a slice |
| `NPA`, `NPB` | negative | two copies of `~(P3 P2 P1 P0)`, with `P_i = A_i ^ B_i` |
| `npp[m]` | negative | propagate across slices 2m+1 and 2m+2 |
| `c[k]` | positive | carry into slice k |

The special AND gate exists because of this mix. It takes one positive
signal (H or a carry) on a non-inverting input and up to four negative
propagates on inverting inputs.

## The 4-bit slice (`slice4`)

Each slice sends four signals to the lookahead network. All are one gate
delay from the operands.

**H.** It is defined as

    H = G3 + G2 + P2 G1 + P2 P1 G0,   G_i = A_i B_i,   P_i = A_i + B_i

G3 equals P3·G3 when P3 is the OR, so the group generate
`G = G3 + P3 G2 + P3 P2 G1 + P3 P2 P1 G0` factors into P3·H. Expanded into
operand bits, H has eight product terms:

    A3B3 + A2B2 + A2A1B1 + B2A1B1 + A2A1A0B0 + A2B1A0B0 + B2A1A0B0 + B2B1A0B0

Each term is one NOR gate (`ecl_nor`) over the complemented operand bits,
with at most four inputs. The eight outputs are wire-ORed.

**NP3** is `na3 & nb3`, which is `~(A3 + B3)`.

**NPA and NPB** are each a wire-OR of one copy of the four bit propagates
`~(A_i ^ B_i)`. Those copies come from the four `bit_pg` gates.

**Sum.** For bit k > 0, let E = A_k ^ B_k. Let G and P be the generate and
exclusive-OR propagate of bits k-1..0 inside the slice. Let c be the slice
carry. Then

    ~S_k = ~E ~G ~P  +  ~E ~G ~c  +  E G  +  E P c

- The first and third terms settle the bit without c.
- The second and fourth terms select the bit with c.
- The fourth term is a `special_and` with c on its non-inverting input.
- Bit 0 is simply `~S_0 = ~E_0 ^ c`.

## The lookahead network (`lookahead`)

The carry into slice k is the ripple recurrence `c[k+1] = P3^k H^k + P^k c[k]`
expanded into one sum of products. For the top slice:

    c7 = P3^6 H^6 + P^6 P3^5 H^5 + P^65 P3^4 H^4 + P^65 P^4 P3^3 H^3
       + P^65 P^43 P3^2 H^2 + P^65 P^43 P^2 P3^1 H^1
       + P^65 P^43 P^21 P3^0 H^0 + P^65 P^43 P^21 P^0 cin

The adder pairs slices (1,2), (3,4) and (5,6). For each pair it wire-ORs one
copy (NPA) of the two slices' negative propagates into a pair propagate.
This happens in `adder32`, between the slices and the network. A run of
propagates in a term uses the pair signal wherever the whole pair falls
inside the run. This keeps every term at four inverting inputs plus H or
`cin`, so the widest gate has five inputs. The other copy (NPB) goes in as
the single-slice propagate.

- `c[k]` has k+1 terms: 8 AND gates for `c[7]`, down to 2 for `c[1]`.
- `c[0]` is `cin` through a buffer.
- The top slice's H, NP3, NPA and NPB are not used by the network.

The network's code finds the pairs with two small constant functions
(`n_prop`, `term_inputs`). It then places one `special_and` per term, sized
to that term.

## Gate models

| module | function |
|---|---|
| `ecl_nor` | N-input NOR. The outputs of several gates tied together form a wire-OR, modelled as an OR in the parent. |
| `special_and` | `y_and = a & ~b[0] & ... & ~b[N_INV-1]`, `y_nand = ~y_and`, with 1 to 4 inverting inputs. The circuit also comes in a faster-`a` variant. It computes the same function, so one model covers both. |
| `bit_pg` | From `na`, `nb` it produces `ng = ~(A B)` and three copies `np0..np2 = ~(A ^ B)`. It also passes out `nb_shift`, a copy of `nb` (the level-shifted B input of the circuit). |

The gates model logic only. Delays, emitter-follower drive currents, signal
levels and the pads and supply network of the chip are not modelled.

## Top level (`adder32`)

| port | dir | width | meaning |
|---|---|---|---|
| `na` | in | 32 | ~A |
| `nb` | in | 32 | ~B |
| `cin` | in | 1 | carry in, positive logic |
| `ns` | out | 32 | ~S, where S is the low 32 bits of A + B + cin |
| `msb_la` | out | `slice_la_t` | H, NP3, NPA, NPB of slice 7 |
| `c_msb` | out | 1 | carry into slice 7 |

The design is purely combinational, with no clock and no reset. Shared
constants (`SLICE_W = 4`, `N_SLICES = 8`, `WIDTH = 32`) and the
slice-to-lookahead struct `slice_la_t` are in `adder_pkg`.

**Carry out.** The lookahead network makes carries only into slices 0 to 7,
so the adder produces no carry out of bit 31. The top slice's lookahead
signals and its carry in are brought out as ports instead. A carry out costs
one more gate outside:

    cout = (~msb_la.np3 & msb_la.h) | (~msb_la.npb & c_msb)

## What is this model's own choice

These points follow the structure above but are not fixed by it:

- **Sum terms.** The internal G and P of bits k-1..0 inside a slice are
  written as equations, not as individual gates. The terms for sum bits 2
  and 1 are the bit-3 equation applied to fewer bits.
- **Propagate copies.** Which `bit_pg` copy feeds NPA, NPB or the sum logic
  is arbitrary, since the copies are identical. `nb_shift` is left
  unconnected inside the slice.
- **`lookahead` parameter.** `N_SLICES` must be even. Above 8 slices some
  terms need more than four inverting inputs. The network is still logically
  correct, but `special_and` then reports an out-of-range `N_INV`. Wider
  words (for example 64 bits) would need a different lookahead structure.
- **Ports.** `msb_la` and `c_msb` are ports of this model.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it does |
|---|---|
| `ecl_nor_tb`, `special_and_tb`, `bit_pg_tb` | exhaustive truth tables |
| `slice4_tb` | All 512 operand/carry cases. Checks the sum, H (against `A3B3 \| carry out of bits 2..0`), NP3, both propagate copies, and the identity G = P3·H. |
| `lookahead_tb` | 200,000 random and directed input sets, checked against the ripple recurrence. |
| `adder32_tb` | The full 32-bit adder at its default size, against `A + B + cin`. Checks the sum, the carry into slice 7 and the carry out formed from `msb_la`. Uses directed long-carry cases and 300,000 random ones (a quarter of them built to give long carry chains). |

`adder32_tb` also counts each mechanism of the design and fails if any never
occurs:

- a carry rippling from `cin` through all eight slices
- a carry crossing a pair propagate
- a carry generated by a lower slice
- a sum bit selected by its slice carry
- a sum bit settled inside its slice
- a carry out

No test measures timing, because the model has no delays.

To run one testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

    verilator --binary --timing -Irtl -Itb --top-module adder32_tb \
        rtl/adder_pkg.sv tb/adder32_tb.sv
    ./obj_dir/Vadder32_tb

Use the same command for the other testbenches, with their module names.
Each finishes in under a second.
