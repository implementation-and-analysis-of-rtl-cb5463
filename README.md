# Hybrid and latch-based parallel adders

This is a set of four adders that speed up a sum by rearranging where the
carries go. Each one mixes two classic techniques:

| adder | operands | idea | module |
|---|---|---|---|
| CSA + carry-skip hybrid | three, `WIDTH` bits | carry-save row, then a carry-skip second stage | `csa_cska_hybrid` |
| CSA + carry-increment hybrid | three, `WIDTH` bits | carry-save row, then 4-bit slices joined by increment chains | `csa_cia_hybrid` |
| Latch-based carry-select adder | two, 16 bits, with carry in | square-root carry select, but each slice has **one** ripple adder, time-shared through D-latches | `csla_dlatch` |
| Carry-select adder with a modified square-root sequence | two, 16 bits | the same slices, with single-bit cells at both ends, so only three select muxes | `csla_sqrt_mod` |

`hybrid_adders_top` puts all four side by side. The adders are
alternatives to one another, not stages of one datapath, so each one has its
own ports. The design follows the adders proposed by D. Chattopadhyay,
A. Tapadar and S. Sarkar in "Implementation and Analysis of Hybridization in
Modified Parallel Adder Circuits". That paper compares these adders on
delay, power and area. This RTL rebuilds their logic. The section
"Departures from the published circuits" lists every place where the RTL
differs from the published drawings.

## Three-operand adders: carry-save first, then one carry chain

Both hybrids start with a **carry-save row** (`csa_row`). It has one full
adder per bit, and each full adder adds `a[i]`, `b[i]` and `c[i]` on its own.
Nothing propagates between bits. The row outputs two vectors:

* `s[i]`, the saved sum, with weight 2^i;
* `cy[i]`, the saved carry, with weight 2^(i+1).

Together they satisfy `a + b + c = s + 2*cy`. This reduces three operands to
two in one full-adder delay. The second stage then adds `s` and `cy` shifted
up by one place. So two bits meet at each position p: `s[p]` and `cy[p-1]`.
The exceptions are the ends:

* position 0 holds only `s[0]`, so `sum[0] = s[0]` with no logic;
* position 1 holds two bits and no carry yet, so a **half adder** is enough;
* position `WIDTH` holds the second stage's carry out and `cy[WIDTH-1]`.
  A final half adder adds these two into `sum[WIDTH+1:WIDTH]`. The result is
  therefore `WIDTH+2` bits wide, which is what three `WIDTH`-bit operands
  need.

The two hybrids differ only in how the second stage moves its carry.

### `csa_cska_hybrid`: carry-skip second stage

```
 bit:      W-1 ..      8 | 7  6  5  4 | 3  2 | 1  | 0
 stage 2:  skip block ... | skip block | skip | HA | s[0]
                 <-- carry ---------- <------ <---
```

The carry of the bit-1 half adder enters a chain of carry-skip blocks
(`skip_group`). There is one block per 4-bit slice. The lowest slice's block
holds only bits 2 and 3, because bits 0 and 1 are already done. Every block
is a ripple adder that computes its bits' propagate signals
`p = x xor y`. It ANDs all of them into `skip`. When `skip` is 1, the block's
carry out equals its carry in, so the carry goes straight to the next block
and does not ripple through the slice:
`co = ripple_co | (skip & ci)`. (An OR is used here in place of a 2:1 mux.
The two forms are equal, because the ripple carry already equals `ci`
whenever `skip` is 1.) The `skip` output shows, per slice, when the bypass is
active.

### `csa_cia_hybrid`: carry-increment second stage

```
 slice k (4 bits):  HA + 3 FA ripple with carry 0  ->  r, g
                    4 half adders: r + carry-from-slice-(k-1)  ->  sum bits, i
                    carry out of slice k = g | i
```

All slices add their own bits at the same time, with carry in 0. Each slice
yields a partial sum `r` and a carry `g`. Then the carry out of the slice
below passes through a chain of half adders (`carry_incrementer`) that adds
it to `r`. The slice's carry out is `g | i`. An OR is enough here:
`r + 1` never exceeds `2^5 - 1`, so `g` and `i` are never both 1. Slice 0 has
no increment chain; its sum is final. The only carry path across slices is
therefore the chain of incrementers, made of half adders and not full adders.
`gco[k]` shows the carry that slice k hands up. An assertion in the RTL checks in
simulation that `g` and `i` are never both 1.

Both hybrids take `WIDTH` as a multiple of 4 (default 8). Their testbenches
also run them at 16, 32 and 64 bits.

## Latch-based carry-select adders: one ripple adder per slice

A plain carry-select slice has two ripple adders. One assumes carry in 0,
the other carry in 1, and a mux picks between them when the real carry
arrives. `latch_select_group` keeps only one ripple adder and uses it twice
in each enable cycle. The **enable `en` is the adder's carry in**:

```
 en      ‾‾|__________________|‾‾|__________________|
            ^ latches close     ^ next addition
 en = 1 :  RCA computes a+b+1, the WIDTH+1 D-latches follow it (short phase)
 en = 0 :  latches hold a+b+1; RCA now computes a+b+0;
           mux: lower carry = 1 -> latched result, 0 -> live RCA result
           {co, s} valid here, once the lower slice's carry has settled
```

Rules for using it:

* Hold the operands (and `cin`) steady through one en-high phase and the
  en-low phase that follows. The result is valid during that en-low phase.
  That makes one addition per enable cycle. The high phase only has to be
  long enough for the ripple adder and the latches, so it can be much
  shorter than the low phase. The testbenches use a 2:6 ratio.
* While `en` is 1, both mux inputs are the carry-in-1 result, so the output
  is meaningless then.
* Nothing is reset. Every en-high phase writes the latches before they are
  read.
* This is level-sensitive logic. At the falling edge of `en`, the latch must
  close before the ripple adder's output starts to change (a hold
  constraint: the adder's delay must be longer than the latch's hold time).
  A static timing setup for this design has to treat `en` as a clock on the
  latches and as data on the adders' carry inputs.

`csla_dlatch` (16 bits, with `cin`) cuts the word square-root style:

| bits | cell | select carry in | carry out |
|---|---|---|---|
| [1:0] | plain 2-bit RCA with `cin` | – | c1 |
| [3:2] | latch-select slice, 2 bits, 3 latches | c1 | c3 |
| [6:4] | latch-select slice, 3 bits, 4 latches | c3 | c6 |
| [10:7] | latch-select slice, 4 bits, 5 latches | c6 | c10 |
| [15:11] | latch-select slice, 5 bits, 6 latches | c10 | cout |

`csla_sqrt_mod` (16 bits, no carry in) shortens the sequence. Single-bit
cells at both ends do the work of the outer slices, so it needs only three
muxes:

| bits | cell | select carry in | carry out |
|---|---|---|---|
| 0 | half adder | – | c1 |
| 1 | full adder | – | C2 |
| [4:2] | latch-select slice, 3 bits | C2 | C4 |
| [8:5] | latch-select slice, 4 bits | C4 | C8 |
| [13:9] | latch-select slice, 5 bits | C8 | C13 |
| 14 | full adder | – | C14 |
| 15 | full adder | – | cout |

## Module hierarchy

```
hybrid_adders_top
├── csa_cska_hybrid ── csa_row, half_adder, skip_group ── rca ── full_adder
├── csa_cia_hybrid  ── csa_row, half_adder, rca, carry_incrementer ── half_adder
├── csla_dlatch     ── rca, latch_select_group ── rca
└── csla_sqrt_mod   ── half_adder, full_adder, latch_select_group
```

| module | parameters (default) | notes |
|---|---|---|
| `half_adder`, `full_adder` | – | single-bit cells |
| `rca` | `WIDTH` (4) | ripple chain of full adders |
| `csa_row` | `WIDTH` (8) | carry-save row |
| `skip_group` | `WIDTH` (4) | ripple block plus skip logic, `skip` output |
| `carry_incrementer` | `WIDTH` (4) | half-adder chain: `s = a + inc` |
| `csa_cska_hybrid`, `csa_cia_hybrid` | `WIDTH` (8), `GROUP` (4) | `WIDTH` must be a multiple of `GROUP`, and `GROUP` at least 3 |
| `latch_select_group` | `WIDTH` (2) | `en` is the ripple adder's carry in and the latch enable |
| `csla_dlatch`, `csla_sqrt_mod` | – | fixed 16-bit slice layouts |
| `hybrid_adders_top` | `HYB_WIDTH` (8) | sets the width of both hybrids |

All modules are synthesizable. The only storage is the D-latches of the
carry-select slices: 18 latch bits in `csla_dlatch` and 15 in
`csla_sqrt_mod`.

## Simulating

Each module has a self-checking testbench `tb/<module>_tb.sv`. It ends by
printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -y rtl -y tb tb/hybrid_adders_top_tb.sv \
          --top-module hybrid_adders_top_tb -o sim
./obj_dir/sim
```

Swap in another `*_tb` to test one block. The testbenches are:

* **Cells** (`half_adder_tb`, `full_adder_tb`, `rca_tb`,
  `carry_incrementer_tb`, `skip_group_tb`): exhaustive at their default
  widths, with random checks at a wider instance. `rca_tb` also checks the
  example 1100 + 1001 = 1 0101. `skip_group_tb` requires the bypass to
  occur.
* **`csa_row_tb`**: checks every saved-sum bit against parity, every
  saved-carry bit against majority, and the total `s + 2*cy`.
* **`csa_cska_hybrid_tb` and `csa_cia_hybrid_tb`**: run the adders at
  8, 16, 32 and 64 bits, using the helper checkers `cska_check` and
  `cia_check`. They apply corner patterns (all zeros, all ones,
  alternating bits) and random triples. They compare every sum with
  integer addition, and every `skip` or slice carry with a value recomputed
  from the operands. They fail if a bypass, an increment chain or the top
  result bit is never exercised.
* **`latch_select_group_tb`, `csla_dlatch_tb`, `csla_sqrt_mod_tb`**: drive
  `en` as a clock and check each sum at the end of its en-low phase. They
  check that the latch holds while `en` is 0. They count enable cycles
  against additions (exactly one each), and require every select carry to
  pick both the latched and the live result. The vector
  a = b = 1001101010111010, cin = 0 must give
  sum = 0011010101110100, cout = 1.
* **`hybrid_adders_top_tb`**: runs the whole set at its default
  parameters. It gives every adder new operands in each of 4000 enable
  cycles. It counts carry-skip bypasses, increment-chain activations,
  results that use the top bit, and both mux paths of both carry-select
  adders, and fails if any of these never happens.

## Departures from the published circuits

* **The hybrids' second stage adds every saved carry at its own weight.**
  The published 8-bit drawings of both hybrids put a half adder at bit 4.
  They merge the saved carry of bit 3 with the lower slice's carry. The
  CSA + carry-increment drawing merges them with a gate, and merges the
  saved carry of bit 7 into the final carry the same way. These pairs have
  the same weight and can both be 1. Read literally, the drawing adds
  15 + 15 + 15 to 29. In this RTL:
  * each higher slice of the carry-skip hybrid starts with a full adder
    inside its skip block;
  * each slice of the carry-increment hybrid adds its own saved carry in its
    ripple row (half adder at the slice's low bit), and gets the lower
    slice's carry only through its increment chain;
  * a final half adder produces two top result bits instead of one carry
    out.

  Apart from this, the structure (carry-save row, half adder at bit 1, one
  skip block or one increment chain per 4-bit slice) is as published.
* **Result width.** The hybrids return `WIDTH+2` bits. The drawings show
  `S0..S7` and at most one carry out.
* **No carry input** on the hybrids or on `csla_sqrt_mod`. The drawings
  show none. The published simulation of the modified-sequence adder lists
  a `cin` signal, but it holds it at 0, and bit 0 is a half adder.
* **Latch count.** Each latch-select slice of n bits has n+1 latches, as
  drawn, because the slice's carry is stored too. The prose speaks of n
  latches.
* **Skip logic** uses the OR form in place of a mux. The two are logically
  the same.
* **Carry-select widths.** The paper also reports 8-, 32- and 64-bit
  versions of the latch-based carry-select adder, but gives no slice layout
  for them. Only the 16-bit layouts are built. The hybrids cover all four
  published widths through `WIDTH`.
* **Not modelled.** The paper's delay, power and area figures come from its
  own synthesis flow. RTL cannot reproduce them, and they are not checked
  here. The plain RCA, carry-save, carry-skip, carry-increment and
  BEC-based carry-select adders that the paper describes as background
  appear only where the proposed adders use them as parts.

## How far to trust it

Every module passes lint with all warnings enabled, without waivers. It
also elaborates in a second, independent front end. Every module's
testbench passes. Each testbench was also shown to fail against a
deliberately broken copy of its module (for example a bypass not gated by
the carry in, a dropped increment carry, or a wrong select carry). The
latch-based adders are checked in a zero-delay simulation. That confirms
their logic and their enable protocol, but not the hold-time margin at the
falling edge of `en`, which depends on the implementation.
