# 8x8 multiplier with Brent-Kung carry select adders

This is a combinational 8-bit x 8-bit unsigned multiplier. It splits each operand into two
4-bit halves, forms the four 4x4 partial products in parallel, and sums them with three 8-bit
carry select adders. Each carry select adder is built from 4-bit Brent-Kung parallel prefix
adders instead of ripple carry adders. The idea is to shorten the path through the adder tree.
The upper half of every adder is computed for both possible carries at once, and each of
those 4-bit additions itself takes a logarithmic number of levels.

The design follows a published proposal for this multiplier ("A Novel Implementation of High
Speed Multiplier Using Brent Kung Carry Select Adder"). Where that description is incomplete or
inconsistent, the choices made here are listed under
[Where this RTL departs from the original description](#where-this-rtl-departs-from-the-original-description).

## How the product is assembled

Write `a = aH*16 + aL` and `b = bH*16 + bL`. Then

```
a*b = HH*256 + (HL + LH)*16 + LL      HH = aH*bH, HL = aH*bL, LH = aL*bH, LL = aL*bL
```

Each of the four products is 8 bits wide and comes from its own 4x4 sub-multiplier. The three
adders line them up like this (bit positions are product bits):

```
 adder 1:            HL + LH                -> m[7:0] (weight 16), carry ca1 (weight 4096)
 adder 2:  m[7:0] + {0000, LL[7:4]}         -> s2[7:0] (weight 16), carry ca2 (weight 4096)
 adder 3:  HH + {000, ca, s2[7:4]}          -> product[15:8], carry ca3
           ca = ca1 | ca2

 product = { adder3 sum, s2[3:0], LL[3:0] }
```

- `LL[3:0]` is already final and becomes product bits 3..0 without passing through an adder.
- `s2[3:0]` gives product bits 7..4.
- The upper nibble of adder 2, together with the carry `ca`, is carried into adder 3 as a
  5-bit quantity aligned to product bit 8.

Both carries, `ca1` and `ca2`, have weight 2^12, so both must reach adder 3. They never occur
together, so a single OR adds them exactly:

- If `ca1 = 1`, then `HL + LH >= 256`, so `m = HL + LH - 256 <= 450 - 256 = 194`.
- Adding `LL[7:4] <= 14` to that cannot reach 256, so `ca2 = 0`.

The general bound for N-bit operands is in the header of `rtl/bk_csla_mult.sv`. An immediate
assertion in that module checks the exclusion in simulation. About 0.8 % of all operand pairs
(524 of 65536, e.g. `0x2F * 0xFB`) produce `ca2 = 1`.

`ca3` is the carry out of the last adder. A correct 16-bit product never produces it, so it is
always 0. It is kept as an output for compatibility with the original interface.

## Carry select adder (`bk_csla`)

An 8-bit carry select adder contains three 4-bit Brent-Kung adders, one 2:1 multiplexer, one OR
and one AND:

- **Low half.** `a[3:0] + b[3:0] + cin` gives `sum[3:0]` and the carry `C4`.
- **High half.** `a[7:4] + b[7:4]` is computed twice, in parallel: with carry-in 0, giving
  `C8,0`, and with carry-in 1, giving `C8,1`.
- **Select.** `C4` chooses which precomputed high half becomes `sum[7:4]`.
- **Carry out.** `C8 = C8,1 & (C4 | C8,0)`. This equals the usual `C8,0 | (C4 & C8,1)`,
  because a half that carries out with carry-in 0 also carries out with carry-in 1.

In the multiplier, every adder's `cin` is tied to 0.

## Brent-Kung adder (`bk_adder`, `bk_prefix_cell`)

Each bit first gets a propagate/generate pair, `P = a ^ b` and `G = a & b`, bundled as
`bk_pkg::pg_t`. The prefix operator (`bk_prefix_cell`) joins an upper span `i` and the adjacent
lower span `j`:

```
P = Pi & Pj
G = Gi | (Pi & Gj)
```

For 4 bits the network has four cells on three levels:

| level | cells                          |
|-------|--------------------------------|
| 1     | (1:0) and (3:2)                |
| 2     | (3:0) = (3:2) o (1:0)          |
| 3     | (2:0) = (2) o (1:0)            |

The carry-in is not part of the prefix tree. It enters in the post-processing step:

```
carry into bit i+1 = G(i:0) | (P(i:0) & cin)
S(i)               = P(i) ^ carry into bit i
```

The network therefore does not depend on the carry, and the carry-in-0 and carry-in-1 adders of
the carry select adder are identical except for one input.

The module generates the Brent-Kung pattern for any `WIDTH`. The up-sweep joins spans at
distances 1, 2, 4, ... The down-sweep then fills in each missing prefix with one more cell.
The testbench exercises widths 4, 8 and 16.

## 4x4 sub-multiplier (`array_mult`)

This is a plain unsigned array multiplier:

- Row `k` is `a & {N{b[k]}}`.
- A row of N ripple full adders adds it to the running sum, shifted right by one.
- The bit shifted out at each row is one product bit.
- The last running sum, with its carry, gives the upper N product bits.

The original description only names this block, so its insides are a choice of this
implementation. Replacing it with any other correct N x N multiplier is safe.

## Unit count

| unit                                | count | in RTL                                         |
|-------------------------------------|-------|------------------------------------------------|
| 4x4 multiplier                      | 4     | `array_mult` x4                                |
| 4-bit Brent-Kung adder              | 9     | `bk_adder` x3 per `bk_csla`                    |
| 2:1 multiplexer (4 bits)            | 3     | one per `bk_csla`                              |
| OR / AND for the carry out          | 3 / 3 | one of each per `bk_csla`                      |
| OR combining `ca1`, `ca2`           | 1     | `bk_csla_mult` (not in the original count)     |

## Where this RTL departs from the original description

- **The `ca2` carry is added into the last adder.** The original block diagram shows `ca2`
  only as an unused output. Dropping it gives a wrong product for 524 operand pairs, so it is
  ORed with `ca1`.
- **Third sub-multiplier operands.** The original diagram labels the third sub-multiplier's
  inputs with the same halves as the first, `aH` and `bH`. The product needs `aL x bH` there,
  and that is what is built.
- **Carry-in placement.** The original 4-bit Brent-Kung figure ties the carry-in to 0. Here the
  carry-in enters in the post-processing step, because the carry select adder needs a
  carry-in-1 copy.
- **Assumed details.** The following were not specified and are choices of this
  implementation:
  - operands are unsigned;
  - adder carry-ins in the multiplier are tied to 0;
  - there are no registers, clock or reset.
- **Timing and area not reproduced.** The original evaluation gives a delay of 45.4 ns and a
  count of 5332 transistors for an FPGA-tool implementation. This RTL has not been timed or
  sized against those figures.
- **Baseline adders not included.** The original work also compares against carry select
  adders built from ripple carry adders and from binary-to-excess-1 converters. Those baselines
  are not part of this design and are not included.

## Parameters

| module         | parameter | default | constraint                                              |
|----------------|-----------|---------|---------------------------------------------------------|
| `bk_csla_mult` | `N`       | 8       | even and at least 8; halves of N/2 bits                 |
| `bk_csla`      | `WIDTH`   | 8       | even                                                    |
| `bk_adder`     | `WIDTH`   | 4       | any width of 1 or more                                  |
| `array_mult`   | `N`       | 4       | 2 or more                                               |

The defaults are the sizes of the original design. The other sizes are generalisations and
have been simulated only where the testbenches say so.

## Files

The design files are in `rtl/`:

| file                 | content                           |
|----------------------|-----------------------------------|
| `bk_pkg.sv`          | `pg_t` type, tree-depth function  |
| `bk_prefix_cell.sv`  | prefix operator                   |
| `bk_adder.sv`        | Brent-Kung adder                  |
| `bk_csla.sv`         | carry select adder                |
| `array_mult.sv`      | sub-multiplier                    |
| `bk_csla_mult.sv`    | top: the 8x8 multiplier           |

Self-checking testbenches are in `tb/`. Each prints `TB_RESULT checks=<n> failures=<n>`.

| testbench           | what it checks                                                           |
|---------------------|--------------------------------------------------------------------------|
| `tb_bk_prefix_cell` | all 16 input combinations                                                |
| `tb_bk_adder`       | 4-bit exhaustive (with both carry-ins); 8- and 16-bit random            |
| `tb_bk_csla`        | all 2^17 operand and carry-in combinations                               |
| `tb_array_mult`     | 4x4 exhaustive; 6x6 random                                               |
| `tb_bk_csla_mult`   | the top at its default size, all 65536 operand pairs                     |

`tb_bk_csla_mult` also checks the example `8 x 8 = 64` and `ca3 = 0`. It counts how often
`ca1` and `ca2` fire and how often each adder's multiplexer selects its carry-in-1 half. It
compares each of these internal carries with a value predicted from the operand halves, and it
fails if any of these events never happens.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bk_pkg.sv tb/tb_bk_csla_mult.sv \
          -y rtl --top-module tb_bk_csla_mult -o sim
./obj_dir/sim
```

To run a different testbench, replace the testbench name in both places. Each run takes well
under a second. To lint the synthesizable part on its own:

```
verilator --lint-only -Wall -Irtl rtl/bk_pkg.sv rtl/bk_csla_mult.sv -y rtl
```
