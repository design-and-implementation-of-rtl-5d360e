# Vedic multiplier with Ling parallel prefix adders

This is an unsigned NxN multiplier built by the Urdhva Tiryagbhyam ("vertically
and crosswise") rule of Vedic arithmetic. It comes in 2x2, 4x4, 8x8, 16x16 and
32x32 sizes. The rule treats each operand as a two-digit number, with digits of
half the operand width. It forms the four digit products at once and then adds
them with carries. In hardware, an NxN multiplier is four (N/2)x(N/2)
multipliers working in parallel plus a small summation stage. The summation
stage has two parallel prefix adders in Ling's form, a half adder and a final
adder. Smaller multipliers are built the same way, down to a 2x2 block of four
AND gates and two half adders.

Next to the multiplier sits a per-pixel image unit. It does three things:

- RGB-to-gray conversion, with its channel weights multiplied in 8x8 Vedic
  multipliers;
- threshold segmentation;
- colour inversion.

The top level `vedic_top` registers the results of both datapaths.

## The vertically-and-crosswise split

Write a = aH·2^h + aL and b = bH·2^h + bL, with h = N/2. Then

    a·b = aL·bL  +  (aL·bH + aH·bL)·2^h  +  aH·bH·2^N
        =   p    +       (q + r)·2^h     +    s·2^N

p is the right "vertical" product, q and r are the "crosswise" pair, and s is
the left "vertical" product. Each is an N-bit result of a half-width
multiplier. `vm4x4`, `vm8x8`, `vm16x16` and `vm32x32` each instantiate four
multipliers of the next smaller size on the half-width operand slices. They
pass the four products to `vm_combine`. `vm4x4` uses `vm2x2`, which applies the
same rule to single bits:

    z0 = a0·b0
    a1·b0 + a0·b1       -> half adder -> z1, carry
    a1·b1 + carry       -> half adder -> z2, z3

A 32x32 multiplication is therefore 256 parallel 2x2 blocks under four levels
of summation stages, 1 + 4 + 16 + 64 = 85 `vm_combine` instances in all.

## The summation stage (`vm_combine`)

This is the part that takes some reading. The stage does not add p, q, r and s
in one multi-operand tree. It adds them in a fixed order that keeps every adder
N bits wide:

| step | operation | result |
|---|---|---|
| 1 | `z[h-1:0] = p[h-1:0]` | low quarter of the product, no addition |
| 2 | PPA #1: `t = q + r` | `t[N-1:0]`, carry `t[N]` |
| 3 | PPA #2: `v = t[N-1:0] + {h zeros, p[N-1:h]}` | `v[N-1:0]`, carry `v[N]` |
| 4 | `z[N-1:h] = v[h-1:0]` | second quarter |
| 5 | half adder: `{y, x} = t[N] + v[N]` | two-bit carry count |
| 6 | final adder: `{c, z[2N-1:N]} = s + {zeros, y, x, v[N-1:h]}` | upper half |

Bit weights explain the operand of step 6. `v[N-1:h]` has weight 2^N, which is
bit 0 of the upper half. Both dropped carries, t[N] and v[N], have weight
2^(N+h), which is bit h of the upper half. The half adder adds the two carries.
Its sum x goes to bit h and its carry y to bit h+1. The rest of the operand is
zero: 6 bits for N = 16, 14 bits for N = 32.

Two outputs are structurally present but constant for real sub-products:

- **y is always 0.** If t[N] = 1, then t[N-1:0] = q + r − 2^N ≤ 2^N − 2^(h+2) + 2.
  Adding p[N-1:h] ≤ 2^h − 2 cannot reach 2^N, so v[N] = 0. The two carries never
  both occur.
- **c is always 0**, because an NxN product fits in 2N bits.

Both are kept because the architecture has them. `c` is a port of every
multiplier. `vedic_top` asserts that the 32x32 multiplier's c stays 0.
`vm_combine` on its own does add arbitrary 16-bit p, q, r and s correctly into
{c, z}. Its testbench uses that case to exercise y and c.

## The Ling parallel prefix adder (`ppa`)

`ppa #(W)` adds two W-bit numbers with no carry-in. It has three stages:

1. **Pre-processing**, per bit: p_i = a_i ⊕ b_i, g_i = a_i·b_i, and the
   OR-propagate t_i = a_i + b_i.
2. **Carry generation.** The adder computes Ling's pseudo carry instead of the
   real carry:
   h_i = g_i + g_{i-1} + t_{i-1}g_{i-2} + … = g_i + t_{i-1}·h_{i-1}.
   This is a first-order recurrence over the pairs (g_i, t_{i-1}). A
   Kogge-Stone tree solves it in ⌈log2 W⌉ levels with the usual operator
   (G, P)∘(G', P') = (G + P·G', P·P'). The real carry out of bit i is
   c_i = t_i·h_i.
3. **Post-processing**: s_i = p_i ⊕ c_{i-1}, and cout = c_{W-1}.

The pseudo carry saves a gate at the head of each carry term compared with the
real carry. That is the reason for Ling's form.

The real carry must be recovered with the OR-propagate t_i. With the XOR
propagate p_i instead, the product p_i·h_i misses the carry that bit i
generates itself, because g_i = 1 forces p_i = 0. An adder built that way gets
most sums wrong.

The adders of a stage are N bits wide: 16 in the 16x16 multiplier and 32 in the
32x32 one. The final adder of each stage is the same `ppa`.

## Image applications

All pixels are 24-bit `rgb_t` (8 bits per channel, see `vedic_pkg`).

- **Gray scale (`rgb2gray`).** gray = 0.21 R + 0.72 G + 0.07 B. The weights are
  8-bit fractions of 256: 54, 184 and 18. They sum to exactly 256, so white
  stays 255. Three `vm8x8` multiply the channels by the weights. Three 16-bit
  `ppa` add the products and a rounding constant of 128, and bits [15:8] of the
  sum are the gray value. Compared with exact real-valued luminosity, a test
  image comes out at 58 dB PSNR.
- **Segmentation (`threshold_seg`).** A pixel is foreground when its gray value
  is at or above a run-time 8-bit threshold. Foreground pixels pass unchanged
  and background pixels become black.
- **Inversion (`color_invert`).** Each channel becomes 255 − c.
- **`pixel_unit`** computes all three and selects one with `pix_mode`
  (0 gray, 1 segment, 2 invert; 3 behaves as gray). The gray value and the
  foreground flag are always output as well.

Image watermarking is not included. The method it would use to embed one image
in another is not specified, so there is nothing definite to implement.

## Top level and timing (`vedic_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst, enable | in | 1 | clock; synchronous active-high reset; register load enable |
| data1, data2 | in | 32 | multiplier operands (unsigned) |
| product | out | 64 | data1 × data2 |
| pix_valid_in | in | 1 | carried through to pix_valid_out |
| pix_in | in | rgb_t | pixel |
| pix_mode | in | pix_mode_e | operation |
| threshold | in | 8 | segmentation threshold |
| pix_valid_out, pix_out, pix_fg, pix_gray | out | 1/24/1/8 | registered pixel results |

Everything between the inputs and the output registers is combinational. On a
rising edge:

- `rst` clears every output;
- otherwise, if `enable` is high, the outputs load the results for the inputs
  present at that edge;
- otherwise the outputs hold.

Latency is one cycle, and one multiplication and one pixel can start every
cycle. The output registers are one choice of clocking. The multipliers
themselves have no clock. Published timing for the combinational multipliers on
a Spartan-3E FPGA is 3.2 ns (8x8), 3.6 ns (16x16) and 8.3 ns (32x32). This RTL
has not been synthesised for any FPGA.

## What follows the published design and what does not

Taken from the published design:

- the 2x2 base block;
- building each size from four multipliers of half the width;
- the summation order and padding of `vm_combine`;
- the half adder on the two PPA carries;
- the three-stage Ling adder;
- the luminosity weights;
- the segmentation and inversion rules.

Choices made for this RTL:

- recovering the Ling carry with the OR-propagate, as explained above;
- the Kogge-Stone tree, since no prefix topology is specified;
- the final adder being a PPA (drawn only as an adder);
- the stage PPAs being N bits wide for the 32x32 stage as well;
- unsigned operands;
- 8-bit fixed-point gray weights with rounding;
- "at or above" as the foreground test, with a run-time threshold and black
  background;
- the mode-select pixel unit;
- the output registers with their reset and enable behaviour.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
values computed in the testbench, not read from the design, and prints
`TB_RESULT checks=N failures=M`.

- `tb_vm2x2`, `tb_vm4x4`, `tb_vm8x8`: every operand pair.
- `tb_vm16x16`, `tb_vm32x32`: corner and 20 000 random pairs. They also include
  directed operands that make the top stage's second PPA carry out.
- `tb_vm8x8`, `tb_vm16x16`, `tb_vm32x32` also check the published examples,
  internal sub-products and sums included:
  - 22 × 86 = 1892 (p 36, q 30, r 6, s 5, t 36, v 38)
  - 1618 × 2437 = 3 943 066 (p 10906, q 738, r 798, s 54, t 1536, v 1578)
  - 4 547 209 × 9 773 379 = 44 441 596 949 211 (p 214790875, q 3758525,
    r 587535, s 10281, t 4346060, v 4349337)
- `tb_ppa`: 16-bit random and corner cases; 8-bit and 5-bit adders checked
  exhaustively.
- `tb_vm_combine`: arbitrary sub-products. It requires both PPA carries and
  both half-adder outputs to occur.
- `tb_rgb2gray`, `tb_threshold_seg`, `tb_color_invert`, `tb_pixel_unit`:
  against the formulas.
- `tb_vedic_top`: end-to-end at the default configuration. A clocked reference
  model runs 6000 cycles with random enable drops, resets, all pixel modes and
  32-bit operands. It counts each mechanism and fails if one never happened:
  reset, hold, carries of both top-stage PPAs, half-adder sum, each mode, and
  foreground and background.
- `tb_image_apps`: streams a generated 64x64 image through `vedic_top` in each
  mode. It checks every pixel and the rate of one result per clock, and reports
  the gray PSNR.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/vedic_pkg.sv tb/tb_vedic_top.sv \
        --top-module tb_vedic_top -Mdir obj_top
    ./obj_top/Vtb_vedic_top

Any other testbench works the same way: put `vedic_pkg.sv` first and name the
testbench file and module. Verilator finds the other modules in `rtl/` by file
name. Building `tb_vedic_top` takes a minute or two, because the 32x32
multiplier flattens to about ten thousand cells. The simulations themselves
take under a second each.

The stage adders take their width from `vm_combine`'s `N`; `ppa` on its own
works at any width of 2 or more. To change the gray
weights, override `rgb2gray`'s `COEF_R/G/B`, keeping their sum at 256 so that
white maps to 255. Larger multipliers (64x64) follow the same pattern: four
`vm32x32` and `vm_combine #(.N(64))`.
