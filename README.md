# Reconfigurable 64-bit CVNS adder

A 64-bit adder for media processing. It can work as one 64-bit adder, two
32-bit adders, four 16-bit adders or eight 8-bit adders. Two mode bits pick
the configuration.

Carries are not passed bit by bit. The adder uses the **continuous valued
number system** (CVNS). In CVNS a number is a set of real-valued digits, and
each digit already carries the information of all the less significant bits.
A CVNS digit can be built by summing weighted currents, so the "carry" into a
bit is found by comparing an analog sum with a threshold. Nothing has to
ripple. Full CVNS needs far too much analog resolution for a 64-bit word, so the
bits are taken in **groups of four** (PSI = 4). Only a 4-bit-resolution analog
sum is needed per group. Each group passes a single *truncation signal* to the
group above it.

This RTL is a synthesizable digital model of that scheme. Wherever the
original circuit forms an analog sum and compares it with a threshold, this
code forms the same sum as an integer and compares it with the same threshold,
scaled to integers. The structure is kept: the groups, the three truncation
signals per slice, the slice look-ahead terms and the mode controls. The
current-mode circuits themselves are not modelled.

## Number-system background

For a radix-2 CVNS slice of 16 bits, digit j is

    ((x))_j = sum_{i=0..j} x_i * 2^(i-j)        (0 <= j <= 15)

Its integer part is bit x_j. Its fraction is the part of the value made up by
the lower bits. When two numbers are added digit by digit, the integer part
of `((z))_(j-1) / 2` is exactly the carry into bit j, so

    z_j = x_j XOR y_j XOR xy_j,   xy_j = 1  iff  ((z))_(j-1) >= 2

In the original CVNS form, a modulo-2 reduction and an A/D conversion come
after the sum. The XOR replaces both of them.

## Truncated addition: the 4-bit group

A digit of the full form would need a 14-bit-accurate analog sum. Truncated
addition limits each sum to one group of 4 bit pairs. Everything below the
group is folded into one binary input, the group's truncation signal Tr.

`cvns_group_detect` reduces a group to two flags. Let D be the group's digit,
sum (x_i + y_i)·2^(i-3) for i = 0..3, which lies in [0, 3.75]:

| flag | condition | integer form | meaning |
|------|-----------|--------------|---------|
| gt   | D >= 2     | x+y >= 16 | the group produces a carry by itself |
| rt   | D >= 1.875 | x+y >= 15 | the group passes an incoming carry on |

`cvns_group_sum` forms the sum bits of a group. For bit j, the digit is made of
the group bits below j plus Tr. Bit j's local carry is that digit compared
with 2^j, and the sum bit is an XOR.

## The 16-bit slice

`cvns_adder16` holds four groups (bits 0-3, 4-7, 8-11, 12-15; called groups
1-4 below). Only three truncation signals cross between groups:

    Tr4  = gt1 + rt1·cin
    Tr8  = ctrl8 ? in8 : gt2 + rt2·gt1 + rt2·rt1·cin
    Tr12 = gt3 + rt3·Tr8

Tr8 is the switch point of byte mode. With ctrl8 set, the upper byte takes its
own carry input, in8, and the slice becomes two independent 8-bit adders.

Towards the rest of the adder, the slice gives out one truncation pair of its
own:

    slice.gt = gt4 + rt4·gt3 + rt4·rt3·gt2 + rt4·rt3·rt2·gt1
    slice.rt = rt4·rt3·rt2·rt1

It also gives out the carry out of each byte: `cout[0] = gt2 + rt2·Tr4` and
`cout[1] = gt4 + rt4·Tr12`.

Note that slice.rt is the product of the group rt flags. It can be 0 while
gt is 1, for example for 0x8000 + 0x8000. This does no harm, because only
`gt + rt·c` is ever used.

## Joining slices: the lane modes

`cvns_mode_ctrl` decodes the mode bits:

| part1 | part2 | lanes | ctrl8 | ctrl32 | ctrl64 |
|-------|-------|-------|-------|--------|--------|
| 0 | 0 | 8 × 8 bit  | 1 | 0 | 0 |
| 0 | 1 | 4 × 16 bit | 0 | 0 | 0 |
| 1 | 0 | 2 × 32 bit | 0 | 1 | 0 |
| 1 | 1 | 1 × 64 bit | 0 | 1 | 1 |

`cvns_carry_link` uses the four slice pairs to form the carry into slices
1-3. Each carry is a two-level look-ahead term, so no carry ripples through a
slice:

    cin16 = ctrl32 ? gt0 + rt0·in0                 : in16
    cin32 = ctrl64 ? gt1 + rt1·gt0 + rt1·rt0·in0   : in32
    cin48 = ctrl32 ? gt2 + rt2·(ctrl64 ? <cin32 term> : in32) : in48

## Interface of `cvns_adder64`

| port | dir | width | |
|------|-----|-------|---|
| x, y | in | 64 | operands |
| part1, part2 | in | 1 | mode (table above) |
| cin | in | 8 | cin[b] is the carry into byte b. Only the lowest byte of each lane uses it. |
| z | out | 64 | sum |
| cout | out | 8 | cout[b] is the carry out of bit 8b+7. A lane's carry out is cout of its top byte. |

The adder is purely combinational. It has no clock, no reset and no latency.
Register it outside if a pipelined adder is needed.

## Files

| file | content |
|------|---------|
| `rtl/cvns_pkg.sv` | constants (PSI=4, SLICE_W=16, N_SLICES=4, WIDTH=64), `mode_e`, `ctrl_t`, `trunc_t` |
| `rtl/cvns_mode_ctrl.sv` | mode decoder |
| `rtl/cvns_group_detect.sv` | group gt/rt detector |
| `rtl/cvns_group_sum.sv` | group output stage |
| `rtl/cvns_adder16.sv` | 16-bit slice |
| `rtl/cvns_carry_link.sv` | slice-to-slice look-ahead |
| `rtl/cvns_adder64.sv` | top |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

The equations inside the slice and the link are written out for PSI = 4, four
groups and four slices. `PSI` is a parameter of the two group modules, but
the slice-level equations do not change with it.

## Where this model departs from, or reads into, the original description

- **Analog front end.** The original uses current-mode D/A converters, current
  summation and comparators. No circuit for them is given. Here they are
  replaced by the integer sum and the two integer thresholds. The behaviour at
  the logic level is the same. Speed, power and area are not.
- **Polarity of ctrl8 and ctrl32.** The printed Boolean forms, ctrl8 =
  part1 ∨ part2 and ctrl32 = part2' ∨ part1, contradict the mode table and the
  way the carry equations use these signals. The table and the carry
  equations were followed: ctrl8 = ¬(part1 ∨ part2) and ctrl32 = part1.
- **Group weights.** The gt/rt thresholds of 2 and 1.875 only make sense if
  the top bit of a group has weight 1. Those weights are used here.
- **Carry inputs and outputs.** The design names per-byte carry inputs (in_0,
  in_8, …, in_56) and says the carry out "is generated in the same style".
  Collecting them into 8-bit `cin`/`cout` vectors, with one carry out per
  byte, is this model's choice.
- **Byte mode** is built as in the mode table. Some summaries of the adder
  mention only the 64-, 32- and 16-bit modes.
- **Not built:** the ripple-carry adder that the design was compared with, and
  the original CVNS form with explicit modulo-2 reduction. Neither is part of
  the proposed adder.
- **Synthesis results** (about 4000 µm², picowatt-level power) depend on the
  cell library and were not reproduced.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `cvns_group_detect_tb` tests all 256 operand pairs against real-valued
  thresholds. `cvns_group_sum_tb` tests all 512 cases against x+y+tr.
- `cvns_mode_ctrl_tb` tests the four modes.
- `cvns_carry_link_tb` tests every slice-pair and carry-input combination in
  the three valid control settings, against a rippled reference.
- `cvns_adder16_tb` runs directed corners plus 20 000 random vectors in both
  16-bit and byte configurations.
- `cvns_adder64_tb` is the end-to-end test. It uses the default configuration
  and runs about 61 000 vectors over all four modes. Every sum bit and byte
  carry is compared with a bit-serial ripple reference that restarts at each
  lane boundary, and each lane is also compared with integer addition. It
  counts, and requires, each of the following at least once: each mode; group
  generate; pure group propagate; a byte cut that blocks a real carry; a carry
  across a slice boundary; a carry across bit 32; and a full 64-bit propagate
  chain.

Run any of them with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/cvns_pkg.sv \
        tb/cvns_adder64_tb.sv --top-module cvns_adder64_tb -o sim
    ./obj_dir/sim

Every testbench finishes in well under a second.
