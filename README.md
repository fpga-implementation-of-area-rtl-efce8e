# 32-bit square-root carry-select adder with first addition logic

A ripple-carry adder is small but slow: the carry has to pass through every
bit. A carry-select adder breaks the word into groups and adds each group
twice at once, once assuming its carry in is 0 and once assuming it is 1. When
the real carry arrives from the group below, a multiplexer picks the right
result. The carry then crosses a whole group through one multiplexer instead of
a chain of full adders.

This design keeps the speed of that scheme but drops the second adder in every
group. Each group adds its operands once, for carry in 0. A small block of
**first addition logic** (FAL) then works out from that sum what the group
would have produced with carry in 1, which is the same result plus one. The
group widths grow from the least significant end (2-2-3-4-6-7-8 bits), which
makes it a *square-root* (variable-sized) carry-select adder. A wider group
has more time to finish its own addition before its select carry arrives.

The adder is purely combinational: `a + b + cin` appears on `{cout, s}` after
the propagation delay. There is no clock and no reset.

## Group layout

| group | bits   | width | built from                                   | select carry          |
|-------|--------|-------|----------------------------------------------|-----------------------|
| 1     | 1:0    | 2     | `rca`: 2 full adders, carry in = `cin`       | none (`cin` is known) |
| 2     | 3:2    | 2     | `fal_group`                                  | carry of group 1      |
| 3     | 6:4    | 3     | `fal_group`                                  | carry of group 2      |
| 4     | 10:7   | 4     | `fal_group`                                  | carry of group 3      |
| 5     | 16:11  | 6     | `fal_group`                                  | carry of group 4      |
| 6     | 23:17  | 7     | `fal_group`                                  | carry of group 5      |
| 7     | 31:24  | 8     | `fal_group`                                  | carry of group 6      |

Group 1 gets the real carry in at the start, so it needs no select and is a
plain ripple adder. Group 7's carry out is `cout`.

## First addition logic

Adding one to a binary number flips its lowest bit. It also flips every higher
bit whose lower bits are all ones, and leaves the rest alone. `fal` builds
exactly this:

```
and_bit[0]   = 1
and_bit[i+1] = and_bit[i] & sum0[i]          // all of sum0[i:0] are ones
sum1[i]      = and_bit[i] ? ~sum0[i] : sum0[i]
cout1        = and_bit[W] ? ~cout0 : cout0
```

- **LSB.** `sum1[0]` is always the complement of `sum0[0]`. `sum0[0]` is the
  sum output of the group's least significant half adder. For a one-bit group,
  (carry,sum) = 00, 01, 10 becomes 01, 10, 11.
- **Higher bits.** A chain of two-input AND gates detects "all lower sum bits
  are one". At each bit, the chain output drives a 2:1 multiplexer that
  chooses between the bit and its inverse.
- **Carry.** The carry-in-1 result carries out when the carry-in-0 result
  does, or when every sum bit is one. Both cannot hold at once: two W-bit
  numbers add up to at most 2^(W+1)-2, never to 2^(W+1)-1. So toggling `cout0`
  when all sum bits are one equals `cout0 | &sum0`. The RTL uses the toggle,
  which has the same bit-or-complement form as the sum bits.

The FAL's delay is its AND chain, W gates long. This runs after the group's
ripple adder, in parallel with the lower groups.

## One carry-select group (`fal_group`)

```
 a[W-1:0] b[W-1:0]
      |     |
  rca_cin0 (HA at bit 0, then W-1 full adders)  --> {cout0, sum0}
      |                                               |
      +----------------> fal -----> {cout1, sum1}     |
                                          |           |
                          mux2 (W+1 bits, sel = carry from group below)
                                          |
                                     {cout, sum}
```

The group's own adder assumes carry in 0. Its least significant cell is
therefore a half adder, not a full adder.

## Timing

With the default split, the slowest path is one of these two:

- through group 1 (two full adders), then one (W+1)-bit multiplexer per
  group from group 2 to group 7;
- inside a wide group: a half adder, W-1 full adders, the W-gate AND chain
  and the output multiplexer.

The growing group widths are meant to balance the two. No timing is modelled.
Reported FPGA delays and gate counts depend on the device and gate model and
are not reproduced here.

## Modules

All modules are in `rtl/`, one per file:

| module          | role                                                              |
|-----------------|-------------------------------------------------------------------|
| `sqrt_csla_fal` | top: group 1 and the chain of `fal_group`s                        |
| `fal_group`     | one carry-select group: `rca_cin0` + `fal` + `mux2`               |
| `fal`           | first addition logic (carry-in-0 result to carry-in-1 result)     |
| `rca_cin0`      | ripple adder with carry in fixed at 0 (HA + FAs)                  |
| `rca`           | ripple adder with a carry in (group 1)                            |
| `full_adder`    | one-bit full adder                                                |
| `half_adder`    | one-bit half adder                                                |
| `mux2`          | WIDTH-bit 2:1 multiplexer; `sel = 1` selects `d1`                 |

Top-level ports: `a[WIDTH-1:0]`, `b[WIDTH-1:0]`, `cin` in; `s[WIDTH-1:0]`,
`cout` out.

### Parameters of `sqrt_csla_fal`

| parameter     | default                         | meaning                                      |
|---------------|---------------------------------|----------------------------------------------|
| `NUM_GROUPS`  | 7                               | number of groups                             |
| `GROUP_SIZES` | `{8'd8,8'd7,8'd6,8'd4,8'd3,8'd2,8'd2}` | packed list of group widths; element 0 (written last) is group 1 |
| `WIDTH`       | 32                              | word width; must equal the sum of the widths |

To build another word size, change all three together. If the widths do not
add up to `WIDTH`, elaboration stops with an error. For example, an 8-bit
adder with groups of 2, 2 and 4 bits:

```systemverilog
sqrt_csla_fal #(.NUM_GROUPS(3), .GROUP_SIZES({8'd4, 8'd2, 8'd2}), .WIDTH(8))
  u_add8 (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
```

## What follows the original design and what is this implementation's own

These come from the original design:

- the seven groups and their widths;
- the plain ripple adder for group 1;
- a carry-in-0 ripple adder per group, with a half adder at the LSB;
- the FAL rules (complement the LSB, an AND chain that chooses bit or
  complement, carry on all ones);
- the multiplexer select taken from the lower group's carry.

Choices made here:

- **Carry of the FAL** written as a toggle of `cout0`, equivalent to
  `cout0 | &sum0` as shown above.
- **Independent groups.** Every group's adder and AND chain start at that
  group's own LSB. One gate-level drawing of the original can be read as
  carrying the AND chain, and the ripple carry, on from group 2 into group 3.
  That reading is not followed, because it contradicts the independent
  carry-select groups the design is built on.
- **Parameterized group widths.** The original fixes the split only for
  32 bits. The 2-2-4 split used for 8 bits is this implementation's choice.
- **Gate mapping left to synthesis.** Full adders, multiplexers and XORs are
  written as plain logic. They are not mapped onto AND-OR-inverter gates, so
  synthesized area and delay will differ from any gate-count estimate.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
outputs with integer arithmetic and prints
`TB_RESULT checks=N failures=M`:

- `tb_half_adder`, `tb_full_adder`: exhaustive.
- `tb_mux2`: the 1-bit mux exhaustively, the 6-bit mux with random data.
- `tb_rca`, `tb_rca_cin0`: exhaustive at 1/2 and 5/6 bits.
- `tb_fal`: every reachable `{cout0, sum0}` at 1, 2 and 8 bits.
- `tb_fal_group`: exhaustive at 2 and 8 bits. It also counts the all-ones
  carry case.
- `tb_sqrt_csla_fal`: the 32-bit adder at its default parameters, with:
  - directed vectors, including f321eedc + 2213fcbd (cin 0 and 1),
    ffffffff + 2213fcbd + 1, ffffffff + 00001101 + 1, and a carry rippling
    from `cin` to `cout`;
  - 200,000 vectors in which each group's slice is random, all-propagate,
    all-generate or all-kill.

  For every group it counts carry-in-0 selections, carry-in-1 selections and
  carries produced by the FAL all-ones rule. It fails if any of these never
  happens.
- `tb_sqrt_csla_fal_8bit`: the 8-bit configuration, exhaustive (2^17 cases,
  including ad + ef + 1 = 1_9d).

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_sqrt_csla_fal.sv \
          --top-module tb_sqrt_csla_fal
./obj_dir/Vtb_sqrt_csla_fal
```

Every testbench finishes in well under a second.
