# A 16-tap FIR filter on radix-4 Booth multipliers

A finite impulse response filter spends nearly all of its hardware on its
multipliers. This design builds a 16-tap direct-form FIR filter whose tap
multipliers are radix-4 ("modified") Booth multipliers. Each of these
multipliers recodes the multiplier operand into digits from {-2, -1, 0, +1, +2}.
An n-bit multiplier then needs only n/2 partial products, not n. Everything is
built from small, fully specified pieces:

- one-bit full adders;
- four-bit ripple adders made of them;
- 12-bit adders made of three four-bit adders;
- an 8-to-3 encoder and a 3-to-8 decoder, which together form the Booth digit
  encoder.

A sequential radix-2 Booth multiplier is included alongside as a separate unit.
It carries out the classic add/subtract-and-shift Booth flowchart.

The RTL follows the paper "Digital Filter Design: Novel Multiplier Realization".
The paper gives the adders, the encoder and decoder equations, the radix-2
flowchart and two worked examples in detail. It does not give the internal
wiring of its Booth multiplier or of its filter. Those parts are this design's
own construction, and each departure is listed below.

## Structure

```
fir_booth_top
├── fir_filter                    16 taps, one sample per clock
│   ├── booth_multiplier  x16     6 x 6 bit signed, combinational
│   │   ├── twos_complement_gen   -a, one bit wider
│   │   ├── booth_encoder   x3    triplet -> {neg, two, one}
│   │   │   ├── decoder3x8
│   │   │   └── encoder8x3
│   │   ├── partial_product_gen x3
│   │   └── adder12         x2    (three adder4 -> four full_adder each)
│   └── adder12 (NIBBLES=4) x15   16-bit accumulation chain
└── booth_r2_multiplier           5 x 5 bit signed, sequential
```

`booth_pkg` holds the Booth digit type `booth_digit_t` that the encoder and
the partial product generator share.

## The Booth digit encoder

This is the least conventional part of the design. Multiplier bit `b[-1]` is
defined as 0. For each digit `i`, the triplet `{b[2i+1], b[2i], b[2i-1]}` has
the value `-2*b[2i+1] + b[2i] + b[2i-1]`. The paper names encoder, decoder and
adder as the elements of its Booth multiplier, so the recoding is built from
exactly those parts:

1. `decoder3x8` turns the triplet into one of eight lines.
2. Lines that mean the same digit are ORed together.
3. Each resulting line drives the input of `encoder8x3` whose index equals that
   digit's 3-bit code.

| triplet  | digit | code {neg,two,one} | encoder input |
|----------|-------|--------------------|---------------|
| 000, 111 | 0     | 000                | 0             |
| 001, 010 | +1    | 001                | 1             |
| 011      | +2    | 010                | 2             |
| 100      | -2    | 110                | 6             |
| 101, 110 | -1    | 101                | 5             |

Encoder input 0 takes part in none of the encoder's equations, so the code for
digit 0 is 000. The encoder's output is therefore the digit code itself. The
table is the standard radix-4 Booth table. The decoder/encoder wiring and the
code assignment are choices made in this design.

## The radix-4 multiplier (`booth_multiplier`)

- `twos_complement_gen` forms `-a` once, on `WIDTH+1` bits, so that
  `-(-2^(WIDTH-1))` can be represented.
- For each digit, `partial_product_gen` selects 0, `a`, `-a`, `2a` or `-2a` as
  a `WIDTH+2`-bit signed row.
- Row `i` is sign-extended to `2*WIDTH` bits, shifted left by `2i`, and added
  to a running sum. The adds are done by `adder12` instances in a linear chain.

At the default `WIDTH = 6` there are three rows and two adds. Each add is
exactly the 12-bit adder made of three four-bit adders. This width comes from
the paper's worked example: -11 × 27 = -297. The multiplier 27 = 011011 recodes
to the digits +2, -1, -1 (most significant first), and the product is
111011010111.

`WIDTH` must be even, so that `2*WIDTH` is a whole number of four-bit slices.
The product is exact. The multiplier is purely combinational and has no
pipelining.

The paper's multiplier diagram labels the final adder "carry look-ahead".
Its text, however, builds the multiplier's adder from four-bit ripple adders.
This design follows the text.

## The filter (`fir_filter`)

The filter computes `y[n] = Σ_{k=0}^{15} h[k]·x[n-k]`.

- **Delay line.** The current sample plus 15 sample registers.
- **Multipliers.** One `booth_multiplier` per tap, computing
  `coef[k] × x[n-k]`. The coefficient is the multiplicand and the sample is
  the Booth-recoded multiplier.
- **Accumulation.** A chain of 15 adders, each four four-bit slices wide.
  The result has `2*DW + log2(TAPS)` = 16 bits, so it cannot overflow.

Timing and interface:

- When `in_valid` is high at a rising edge, `x_in` is taken as `x[n]` and the
  delay line shifts. On the same edge, `y_out` is loaded with `y[n]` and
  `out_valid` goes high for one cycle.
- The filter accepts one sample per clock, with one clock of latency.
- When `in_valid` is low, the delay line and `y_out` hold their values.
- `rst_n` is an asynchronous, active-low reset. It clears the delay line and
  the output.
- The coefficients `coef[0..15]` are an input the user holds steady. A
  linear-phase filter uses symmetric coefficients, but any set works.
- `digits` brings out every tap's Booth digits, for observation only.

The paper fixes the tap count (16). It does not give the data width. `DW = 6`
is chosen to match the multiplier example, so every tap multiplier contains the
12-bit adder.

## The radix-2 multiplier (`booth_r2_multiplier`)

This unit follows the Booth flowchart.

- **Start.** `start` is accepted only when `busy` is low. It clears A and Q-1,
  loads M with the multiplicand and Q with the multiplier, and sets the
  counter to `WIDTH`.
- **Each clock cycle.** The pair `{Q0, Q-1}` selects the operation: `10`
  gives A−M, `01` gives A+M, and `00` or `11` leave A unchanged. Then
  `{A, Q, Q-1}` is shifted right arithmetically and the counter is
  decremented.
- **End.** `done` pulses one cycle after the last step, that is `WIDTH+1`
  edges after the edge that took `start`. `product = {A, Q}` stays valid until
  the next start. A `start` asserted while `busy` is ignored.

A has one guard bit more than the operands, so that subtracting the most
negative multiplicand cannot overflow. `WIDTH = 5` comes from the paper's
example: 13 × (-6) = -78, with 5-bit sign-extended operands. The handshake and
the one-step-per-clock schedule are choices made in this design.

This unit does not feed the filter. A multi-cycle multiplier cannot serve a
filter that takes one sample per clock. In `fir_booth_top` it shares only the
clock and reset, and all of its ports are brought out with an `r2_` prefix.

## The adders, encoder and decoder

- `full_adder`: `sum = a^b^cin`, `cout = a&b | (a^b)&cin`.
- `adder4`: four full adders with the carry rippling from bit 0 to bit 3. It
  also has an `overflow` output for signed results (carry into bit 3 XOR carry
  out). The paper shows a signal of that name in its adder simulation but does
  not give its equation.
- `adder12`: `NIBBLES` four-bit adders in a carry chain. The default is 3,
  giving 12 bits. The filter's accumulator uses 4.
- `encoder8x3`: each output bit is the OR of the four inputs whose index has
  that bit set. Input 0 drives nothing, so lint reports it as unused. That is
  expected.
- `decoder3x8`: output `k` is high exactly when `x == k`. `x[2]` is the most
  significant bit.

The paper's encoder waveform lists its input vector in the opposite bit order
to its equations. This RTL follows the equations: input `k` gives code `k`.

## Departures and open points

- The paper gives no block diagram for either the filter or the Booth
  multiplier. Their structure here is the simplest one that matches the text:
  direct form, a linear adder chain, and a combinational multiplier.
- Chosen widths: `DW = 6` for filter data and coefficients, accumulator 16
  bits, `WIDTH = 5` for the radix-2 unit. None of these is given for the
  filter.
- The adder is a ripple-carry adder, not the carry look-ahead adder shown in
  one of the paper's diagrams (see above).
- The paper's power and area comparison against a filter with conventional
  multipliers is not reproduced. That baseline is not included.
- No pipelining. At 16 taps the critical path runs through a Booth multiplier
  and a 15-adder ripple chain. This is acceptable for simulation and small
  FPGAs, but it is the first thing to change for speed.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_full_adder`, `tb_adder4`, `tb_decoder3x8`, `tb_booth_encoder` | all input combinations |
| `tb_encoder8x3` | all 256 inputs against the OR of the indices of the high inputs |
| `tb_adder12` | carry-chain corner cases and 5000 random operand sets |
| `tb_twos_complement_gen` | all 6-bit values, random 9-bit values |
| `tb_partial_product_gen` | all 6-bit multiplicands × all five digits |
| `tb_booth_multiplier` | all 6×6 and all 8×8 operand pairs; the -11 × 27 example and its digits |
| `tb_booth_r2_multiplier` | all 5×5 operand pairs, including 13 × -6; latency, busy, start ignored while busy |
| `tb_fir_filter` | impulse response; random coefficients and data with idle cycles, against a convolution; one-clock latency |
| `tb_fir_booth_top` | the whole design at its default sizes (see below) |

`tb_fir_booth_top` runs the whole design at its default sizes. It filters with
a symmetric coefficient set, then with random sets, and finally at full scale
(every coefficient and sample at -32). Meanwhile it streams random products
through the radix-2 unit. It checks every output. It also counts each
mechanism, and fails if any never occurs:

- each of the five Booth digits;
- filter idle cycles;
- full-scale accumulation;
- radix-2 add, subtract and no-op steps;
- a start while busy.

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/booth_pkg.sv tb/tb_fir_booth_top.sv --top-module tb_fir_booth_top
./obj_dir/Vtb_fir_booth_top
```

The other testbenches run the same way with their own top module. Every
testbench runs in well under a second.
