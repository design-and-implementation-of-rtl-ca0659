# N-digit binary-to-decimal converter for seven-segment displays

A binary value, for example from ten slide switches or from another circuit's output, has to
be shown as a decimal number on a row of seven-segment displays. This design does that with
pure combinational logic. There is no clock, no counter and no double-dabble shift register.
The number goes through a chain of identical **digit stages**. Each stage splits its input into
"tens" and "units", shows the units on its own display and passes the tens on to the next stage.
With the defaults (10 input bits, 4 displays) every value from 0 to 1023 is shown, leading zeros
included: 511 reads `0511`.

## The digit stage

Stage *i* receives `sw / 10^i` and is built from three blocks.

| block | module | does |
|---|---|---|
| compare | `compare` | finds which decade `[0,9]`, `[10,19]`, `[20,29]`, ... its input `b` lies in, and outputs that decade index `c = b / 10` |
| convert | `convert` | outputs `y = x - 10*c`, which is the digit `x mod 10` |
| seg7_display | `seg7_display` | lights that digit on one display |

The chain is the main idea of the design. The decade index `c` of stage *i* is both the
correction that convert subtracts and the input of stage *i+1*. For an input of 15, stage 0 finds
decade 1, shows 15 - 10 = 5 and hands 1 to stage 1. Stage 1 finds decade 0 and shows 1.

```
 sw ──┬──► compare ──c0──┬───────────────► compare ──c1──┬── ...
      │                  │   (zero-extended)│            │
      └──► convert ◄─────┘                  └──► convert ◄┘
              │ digit 0                            │ digit 1
         seg7_display ──► hex[0]              seg7_display ──► hex[1]
```

### Widths

- Every stage is `N_BITS` wide.
- A decade index has `N_BITS-3` bits. That is always enough: `(2^n - 1)/10 < 2^n/8`.
- Each later stage gets the previous decade index zero-extended back to `N_BITS` bits.
- convert's output stays `N_BITS` wide even though it only carries 0..9. The decoder takes the
  full width and blanks any value above 9. Inside the converter that blank can never happen.

### How the blocks are realised

- **compare** tests its input against the decade bounds 10, 20, 30, ... with one constant
  comparator per bound. The highest bound reached gives the index. At `N_BITS = 10` that is 127
  comparators per stage. This is the largest part of the design, and yosys reports about 2900
  word-level cells for the whole default converter.
- **convert** computes `10*z` as `8z + 2z` and subtracts it. The original specification selects
  `x - 10q` by a loop over every possible `q`. The two give the same function.
- The ripple goes through `N_DIGITS` compare/convert pairs in series. The delay from `sw` to the
  top digit grows with the number of digits, not with the input width alone.

## Display encoding

`hex[i]` drives display HEXi, and `hex[0]` is the units digit. The outputs are **active low**
(0 = segment lit), for common-anode LED displays. Bit *k* drives segment *k*:

```
     0
   5   1
     6
   4   2
     3
```

The patterns are in `rtl/b2d_pkg.sv`. For example, 5 is `7'b0010010`, which lights segments 0,
2, 3, 5 and 6. A 6 lights its top bar and a 9 its bottom bar. Any value above 9 gives
`7'b1111111`, a dark display.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `convert_b_to_d` | `N_BITS` | 10 | input width (ten switches SW0..SW9 on the reference board) |
| `convert_b_to_d` | `N_DIGITS` | 4 | number of displays |
| `compare`, `convert` | `N_BITS` | 10 | stage width, 4..28 for compare |
| `seg7_display` | `IN_BITS` | 10 | decoder input width |

To show every input value, `N_DIGITS` must be at least the number of decimal digits of
`2^N_BITS - 1`. With fewer digits the displays show `sw mod 10^N_DIGITS`. The part that is
not shown is the last stage's decade index, which is left unconnected. At the defaults that
index is always 0. At the defaults the top has 10 + 4×7 = 38 port bits, which is the pin count
of the reference FPGA build.

## Files

`rtl/`:

- `b2d_pkg.sv`: the radix, the width rule and the segment patterns
- `compare.sv`, `convert.sv`, `seg7_display.sv`: the three stage blocks
- `convert_b_to_d.sv`: the top, which generates `N_DIGITS` stages

`tb/` holds one self-checking testbench per module, plus two more files:

- `tb_seg_ref_pkg.sv`: an independent segment reference. It builds each digit from its list
  of lit segments and decodes drive words back to digits.
- `tb_convert_b_to_d_general.sv`: exhaustive tests at 5 bits/2 digits, 14 bits/5 digits and
  10 bits/2 digits (the truncating case).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/b2d_pkg.sv tb/tb_seg_ref_pkg.sv tb/tb_convert_b_to_d.sv \
    --top-module tb_convert_b_to_d
./obj_dir/Vtb_convert_b_to_d
```

What the top-level testbench covers:

- It runs the default converter over all 1024 inputs and decodes every display.
- It checks the board readings `0511` and `1023`.
- It counts how often each mechanism happens: a decade index passed into stages 1, 2 and 3, a
  leading zero shown, the largest input, and every digit each display can show. It fails if
  any of them never happens.

The block testbenches are also exhaustive over 10-bit inputs. They also check the 5-bit truth
table rows that the design was specified with. All of them finish in well under a second.

## What is specified and what was chosen here

These parts follow the original specification:

- the three-block stage and its chaining
- the `n-3` bit decade index
- the subtract-ten-times-the-index digit rule
- the segment patterns, the blanking and the active-low drive
- the defaults of 10 bits and 4 displays

These are this implementation's own choices:

- the comparator-bank form of compare
- the shift-and-add form of convert
- the shared package and the typed segment word
- the packed `hex` output array in place of separate `hex0..hex3` ports
- the range checks on the parameters

In one place the original connection listing and the block descriptions disagree about the
width of the digit between convert and the decoder. The descriptions (`n` bits) are followed.

Not included:

- the FPGA board itself: its switches and LED displays
- the 4-bit comparator-and-multiplexer exercise that the design grew out of
- leading-zero blanking, which was never part of the design
