# Radix-4 signed-digit 32 × 32-bit multiplier

This is a 32 × 32-bit two's complement multiplier. Inside, it works in the
radix-4 **signed-digit (SD)** number system. Each digit takes one of seven
values, −3 … 3. That redundancy lets two numbers be added with a carry that
moves one digit position and no further, so an adder's delay does not depend
on the word length. The multiplier Y is recoded into eight radix-16 digits, so
X·Y becomes eight partial products. A binary tree of SD adders reduces them in
**three adder levels**. The SD result is then converted back to a 64-bit
two's complement product.

The architecture follows a multiple-valued MOS current-mode multiplier chip
published by Kawahito, Kameyama, Higuchi and Yamada (IEEE J. Solid-State
Circuits, vol. 23, no. 1, 1988). On that chip every SD digit is a
bidirectional current. Its sign is the direction of flow, and digits are added
by joining wires. In this RTL each current level becomes a small two's
complement integer (`sd_digit_t`, 4 bits, one unit current = 1). A wired sum
becomes an integer addition, and a threshold detector becomes a comparison.
The arithmetic, digit by digit, is the published one. Registers, clocking and
a few details the publication leaves open are this design's own choices. They
are listed under [Departures and own choices](#departures-and-own-choices).

## Data path

```
 x_in ─► X reg ───────────────────────────┐
 y_in ─► Y reg ─► ME gates ─► recoder ─► 8 × PPG ─► SD adder tree ─► 32 × decoder ─► SD→binary ─► P reg ─► selector ─► p_out
                    ▲      (Q_j→U_j,V_j)  (18 digits  (4+2+1 adders,   (p+, p−)     (64-bit CLA    (64 b)   (32 b)
 me ───────────────►┘                      + inc)      3 levels)                   subtractor)
```

Everything from the Y register to the P register is combinational. The path
crosses one partial-product generator, three SDFA levels, two inverted
quantizers, one decoder and the converter. That matches the published delay
sum t_m = t_p + 3t_s + 2t_q + t_d + t_c.

## Recoding the multiplier (`recoder`)

Y is cut into N/4 = 8 groups of five bits. Neighbouring groups share one bit,
and y₋₁ = 0:

    Q_j = y(4j−1) + y(4j) + 2·y(4j+1) + 4·y(4j+2) − 8·y(4j+3),   Q_j ∈ −8…8,
    Y   = Σ Q_j · 16^j

This is Booth recoding extended from radix 4 to radix 16. One multiple of X
with |Q| ≤ 8 cannot be formed by a single shift. So each Q_j is split as
Q_j = U_j + V_j, with U_j ∈ {−2,−1,0,1,2} and V_j ∈ {−8,−4,0,4,8}:

| Q | −8 | −7 | −6 | −5 | −4 | −3 | −2 | −1 | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| U | 0 | 1 | 2 | −1 | 0 | 1 | −2 | −1 | 0 | 1 | 2 | −1 | 0 | 1 | −2 | −1 | 0 |
| V | −8 | −8 | −8 | −4 | −4 | −4 | 0 | 0 | 0 | 0 | 0 | 4 | 4 | 4 | 8 | 8 | 8 |

Both U_j·X and V_j·X are then a shift (by 0/1 or by 2/3 bits), possibly
complemented. The recoder sends the generator of each group a `pp_ctrl_t`
holding `zero`, `neg` and `shift` for U and for V.

## Partial products (`ppg`, `b2sd_converter`)

This is the least obvious part of the design.

**Two forms of X.** Even groups (j = 2k) use the ordinary two's complement
value of X. Odd groups (j = 2k+1) use an algebraically equal form built from
the complemented bits:

    even:  X = −x₃₁·2³¹ + Σ x_i·2^i
    odd:   X = x̄₃₁·2³¹ − Σ x̄_i·2^i − 1

With the first form, every selected bit of an even partial product counts
+1. With the second, every bit of an odd partial product counts −1. Even
partial products therefore have digits in {−1…3} and odd ones in {−3…1}. In
the first adder level, each even product is added to the odd one that
overlaps it. Their digit sum stays within −4…4, which leaves room for the
increment signals.

**Data selectors and increments.** A negative multiple is formed by
complementing the shifted bits. The "+1" of the negation is not added. It
leaves the generator as an increment signal:

| group | multiple | selected bits | top bit (weight −/+ 2^N or 2^(N+2)) | increment |
|---|---|---|---|---|
| even | > 0 | x shifted, count +1 | x₃₁, counts −1 | 0 |
| even | < 0 | x̄ shifted, count +1 | x̄₃₁, counts −1 | +1 |
| odd  | > 0 | x̄ shifted, count −1 | x̄₃₁, counts +1 | −1 |
| odd  | < 0 | x shifted, count −1 | x₃₁, counts +1 | 0 |

Bits shifted in below bit 0 are 0 before the complement. The two increments
(`d` from U, `e` from V) are summed into `inc` ∈ {0,1,2} for even groups and
{−2,−1,0} for odd ones. The adder tree adds `inc` at digit 0 of its group.

**Binary to SD.** Each digit i gathers four selected bits:
z = 2b(2i+1) + b(2i) + 2a(2i+1) + a(2i), with z ∈ 0…6 (even) or −6…0 (odd).
It is split as 4c + w = z, with c = 1 for z ≥ 3 (even) or c = −1 for z ≤ −3
(odd), and the digit is p_i = w_i + c_(i−1). The top digit gathers the
weight-2^N … 2^(N+2) bits and can reach ±4. This design splits it once more,
with the SDFA rule, into a digit in −2…2 and an extra digit in −1…1. A partial
product therefore has N/2 + 2 = 18 digits.

## The SD adder tree (`adder_tree`, `psda`, `sdfa`, `inv_quantizer`)

A parallel SD adder (`psda`) works on each digit position independently:

    z_i = x_i + y_i (+ inc_i)         linear sum, −6…6
    4c_i + w_i = z_i                  SDFA: c = +1 if z ≥ 2, −1 if z ≤ −2, else 0
    s_i = w_i + c_(i−1)               s_i ∈ −3…3

The SDFA (`sdfa`) delivers w inverted (−w), as the current-mode cell does.
The inverted quantizer (`inv_quantizer`) restores it: it limits the input to
−2…2 and negates it. An assertion in `sdfa` flags any linear sum outside
−6…6.

Both cells are built from the current-mode primitives, modelled on integer
levels:

| primitive | module | what it does |
|---|---|---|
| threshold detector TD(T, M) | `threshold_detector` | outputs M units when the one-way input is at least T |
| bidirectional current input circuit | `bdci` | splits a signed level into its positive and negative parts |
| current mirror | `current_mirror` | copies a one-way level, scaled by GAIN, optionally with its direction reversed |

- **SDFA.** A `bdci` splits z. TD(2,1) on each side gives c⁺ and c⁻, and
  c = c⁺ − c⁻. ×4 mirrors and a wired sum form −w = 4c − z.
- **Inverted quantizer.** A `bdci` splits the input. On each side, TD(1,1)
  plus TD(2,1) re-create a level of 0, 1 or 2, and the difference is taken
  with the sign reversed.

The tree (`adder_tree`) places partial product j at digit 2j, since
16^j = 4^(2j). Level 1 adds the pairs P₂ₖ + P₂ₖ₊₁, and the increments of both
groups enter there. Level 2 adds neighbouring level-1 sums, and level 3 adds
the two level-2 sums. That makes log₂(N/4) levels in general. Every adder is N
digits wide, with operands at their absolute positions; digits that only see
zeros are constants. Digits at position N and above would only carry
multiples of 4^N = 2^(2N), which vanish in a 2N-bit result, so they are
dropped.

The last level has no quantizers (`INV_OUT = 1`). It outputs the negated
digits −s_i = (−w_i) + (−c_(i−1)), and the decoders are built to take them
that way.

## Back to binary (`sd_decoder`, `sd2bin`)

Each product digit p is split into p⁺ = max(p,0) and p⁻ = max(−p,0), two bits
each. As on the chip, a bidirectional current input circuit (`bdci`) does the
split. P⁺ and P⁻ are then ordinary binary numbers, and the product is
P⁺ − P⁻. `sd2bin` forms P⁺ + ~P⁻ + 1 with a carry-lookahead adder over radix-4
digits:

- each digit produces generate (digit sum ≥ 4) and propagate (digit sum = 3);
- a Kogge–Stone prefix network (5 levels for 32 digits) forms every digit's
  carry.

## Registers and the ME protocol (`operand_regs`, `me_control`, `product_reg`, `product_selector`)

All registers use one clock `clk` and a synchronous, active-low `rst_n`.

- `ld` loads `x_in` and `y_in` into the X and Y registers.
- `me` (multiplication enable) frames one multiplication. It is sampled into
  `me_q`.
- While `me_q` is 0, AND gates hold the recoder input at 0, so the whole array
  outputs 0.
- The P register loads at the first clock edge that samples `me` low after it
  was high.
- `psel` selects the low (0) or high (1) 32 bits of P for `p_out`.

Shortest sequence, one clock edge per row:

| edge | inputs sampled | effect |
|---|---|---|
| 1 | `ld` = 1 | X and Y registers loaded |
| 2 | `me` = 1 | `me_q` = 1, the array starts on the new operands |
| 3 | `me` = 0 | `p_load` was high: the product is in P; `me_q` = 0 |

If `me` stays high longer, P is loaded at the first edge that samples it low.
The ME pulse width is the time the combinational array gets; one clock is the
minimum.

## Files

| file | content |
|---|---|
| `rtl/sd_pkg.sv` | digit and current-level types, selector-control struct |
| `rtl/sd_multiplier32.sv` | top level, parameter `N` (default 32) |
| `rtl/operand_regs.sv`, `rtl/me_control.sv`, `rtl/product_reg.sv`, `rtl/product_selector.sv` | registers, ME gating and P-load strobe, output selection |
| `rtl/recoder.sv` | Q_j and U_j/V_j controls |
| `rtl/ppg.sv`, `rtl/b2sd_converter.sv` | partial-product generator and its binary-to-SD converter |
| `rtl/adder_tree.sv`, `rtl/psda.sv`, `rtl/sdfa.sv`, `rtl/inv_quantizer.sv` | SD adder tree |
| `rtl/threshold_detector.sv`, `rtl/bdci.sv`, `rtl/current_mirror.sv` | current-mode primitives on integer levels |
| `rtl/sd_decoder.sv`, `rtl/sd2bin.sv` | digit decoder, SD-to-binary converter |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_sd_multiplier_sizes.sv`, `tb/mul_size_check.sv` | the multiplier at N = 8, 16 and 64 |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sd_multiplier32 \
  -y rtl -y tb +libext+.sv -Irtl rtl/sd_pkg.sv tb/tb_sd_multiplier32.sv
./obj_dir/Vtb_sd_multiplier32
```

Use the same command for any other `tb_*` module. The testbenches contain no
X/Z-dependent checks, and every register they read is reset.

What is verified:

- `tb_sd_multiplier32` uses the default 32-bit configuration:
  - 100 corner-operand pairs, including 00000100h × 80000000h and −5 × 42;
  - 3000 random multiplications with ME pulses of 1–3 clocks;
  - the exact clock edge at which P changes.
- It also counts the mechanisms of the design. Each one must occur:
  - the array output gated to 0 while ME is low;
  - P holding when operands are loaded without an ME pulse;
  - every recoded digit from −8 to 8;
  - increments of both signs;
  - a nonzero split top digit;
  - both selector halves.
- `tb_sd_multiplier_sizes` covers other word lengths:
  - all 65536 operand pairs at N = 8, which has one adder level;
  - random operands at N = 16 and N = 64, which have 2 and 4 levels.
- The block testbenches check their modules against models written
  independently of the RTL:
  - SDFA, quantizer, decoder and the current-mode primitives exhaustively;
  - recoder over all group patterns;
  - PPG for every Q with random and extreme X;
  - adder and tree with random digits at the range limits, checking both the
    value and the digit ranges.

## Changing the design

`N` must be a multiple of 8, and N/4 must be a power of two (8, 16, 32, 64,
…). `adder_tree` stops elaboration otherwise. The product is 2N bits, and
`p_out` is N bits wide. Nothing in the data path is pipelined. To pipeline
it, the natural cut points are after the partial-product generators and
between adder levels: every level's output is a plain array of digits.

## Departures and own choices

- **Currents as integers.** Threshold detectors, bidirectional current input
  circuits and current mirrors are modelled only by their transfer functions
  on integer levels. Current sources are implicit in the output level M of a
  threshold detector. Wired summation is written as `+`. Noise margins,
  unit-current tolerances and the measured figures (59 ns multiply time, about
  23 600 transistors, 0.5 W) have no counterpart here.
- **Inside the SDFA and the quantizer.** The published circuits are drawn
  from the same primitives, but the exact arrangement here is this design's
  choice.
- **Top digit of a partial product.** It is split into two digits, 18 instead
  of 17 per partial product. Without the split, one first-level SDFA input can
  reach −7, outside the −6…6 range the SDFA is specified for. With it, all
  SDFA inputs stay within −6…6, and the final product's top digit stays in
  {−1,0,1}.
- **Odd-group selector and top-digit sum.** The selector rules for odd groups
  follow from the odd form of X above. The top-digit sum adds the selected
  top bits with their signed weights (+4, +2, +1 and +1, with signs as in the
  table above). The tests check both against Q·X for every Q in −8…8.
- **Last adder level without quantizers.** This is inferred from the published
  delay sum, which counts three SDFAs but only two quantizers. The decoders
  therefore take negated digits.
- **Lookahead structure.** The SD-to-binary converter's lookahead is only
  described as a radix-4 carry-lookahead adder. The Kogge–Stone network here
  is this design's choice.
- **Registers, ME timing and product selector.** The clocking of X, Y and P,
  the synchronous sampling of ME, the AND-gate form of the control gates and
  the half-word product selector are this design's reading of blocks that are
  only named.
