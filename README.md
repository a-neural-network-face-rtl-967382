# Reduced-precision floating-point neural-network face detector

This is a hardware face detector. It takes a 20×20 grey-scale image window
and decides "face" or "non-face" with a small trained neural network: a
fully connected two-layer perceptron with 400 inputs, 300 hidden nodes and
one output. The values and weights are floating point, but not 32-bit IEEE
single precision. The default format is a 16-bit one (1 sign, 6 exponent,
9 fraction bits). That halves the weight memory (120,300 weights) and the
adder, and keeps enough precision for classification. Field widths are
parameters, so the same RTL builds 12- to 32-bit variants for comparing
accuracy against cost.

The network is trained offline, for example with back-propagation in
software. The hardware only evaluates it. Weights and the image are loaded
into on-chip RAM. A controller then streams them through one shared
floating-point multiply-accumulate unit (MAC), one activation unit and one
comparator.

The architecture, the number formats, the network size, the activation
polynomial and the frame steps follow Yongsoon Lee's 2007 MSc thesis, *A
Neural Network Face Detector Design Using Bit-Width Reduced FPU in FPGA*
(University of Saskatchewan). That thesis implemented the detector in VHDL
on a Spartan-3 FPGA. This RTL is a new SystemVerilog implementation. Where
the thesis gives only what a unit does, the internals here are this
design's own. Each point is listed under
[Departures and open points](#departures-and-open-points).

## The computation

For an input window X (400 values) the detector computes:

```
net_j = sum_{i=0}^{399} W1[j][i] * X[i]        j = 0..299
O_j   = 0.75 * net_j
net_k = sum_{j=0}^{299} W2[j] * O_j
O_k   = 0.75 * net_k
face  = sign(O_k - threshold) == 0
```

There are no bias terms. The network was trained with a tanh activation.
In hardware, tanh is replaced by its first-order estimate f(x) = 0.75·x.
This estimate is adequate because a trained network keeps its values
roughly within ±1, where the line follows tanh closely. The comparison is
a floating-point subtraction whose sign bit is the answer. An exact tie
gives +0, which counts as a face. The threshold is an input, so the
security/convenience trade-off (false accepts against false rejects) can
be set at run time. Training targets are +0.9 for a face and −0.9 for a
non-face, so useful thresholds lie roughly between 0.1 and 1.

## Number format

| name  | sign/exp/frac | bias | largest finite          | unit in last place |
|-------|---------------|------|-------------------------|--------------------|
| FPU32 | 1/8/23        | 127  | (2−2⁻²³)·2¹²⁷           | 2⁻²³               |
| FPU24 | 1/6/17        | 31   | (2−2⁻¹⁷)·2³¹            | 2⁻¹⁷               |
| FPU20 | 1/6/13        | 31   | (2−2⁻¹³)·2³¹            | 2⁻¹³               |
| **FPU16** (default) | 1/6/9 | 31 | (2−2⁻⁹)·2³¹     | 2⁻⁹                |
| FPU12 | 1/6/5         | 31   | (2−2⁻⁵)·2³¹             | 2⁻⁵                |

The layout is the IEEE 754 one: value = (−1)^s · 1.f · 2^(e−bias), and the
bias is 2^(EXP_W−1)−1. To keep the hardware simple:

- **Exponent 0 means zero.** The fraction is ignored and there are no
  denormals. Results below the smallest normal number flush to a signed
  zero.
- **Exponent all ones means infinity.** Overflow saturates to the
  all-ones pattern (exponent and fraction all ones) with the result's sign.
  Any infinity operand gives that pattern. There is no separate NaN.
- **Rounding is truncation (round toward zero).** Every result is the exact
  result with its bits below the last fraction bit dropped. The error is
  therefore always toward zero and less than one unit in the last place.
  This keeps error analysis simple: the worst-case relative error of one
  operation is 2^−FRAC_W.

## The floating-point adder (`fp_add`)

The adder takes new operands every clock and returns the sum five clocks
later:

| stage | name       | work |
|-------|------------|------|
| S1    | data fetch | register the operands |
| S2    | pre-norm   | compare magnitudes (exponent and fraction as one unsigned number), swap so that x is the larger, shift the smaller significand right by the exponent difference |
| S3    | add        | add or subtract the significands (subtract when the signs differ) |
| S4    | post-norm  | leading-one detector, left shift by the leading-zero count (or keep the carry), new exponent = e_x + 1 − lz |
| S5    | round/norm | drop the bits below the fraction (truncation), saturate or flush, pack |

The subtle part is making truncation exact. Alignment carries three extra
bits below the fraction: guard, round and sticky. The sticky bit is the OR
of everything shifted past it. It stands in for "something non-zero was
lost", so a subtraction borrows correctly. With those three bits the packed
result always equals the exact sum truncated toward zero. The testbench
checks this bit for bit against arbitrary-precision integer arithmetic. It
covers exponent gaps larger than the significand, exact cancellation to
zero (+0), near-cancellation with large left shifts, overflow and flush to
zero.

Leading-one *prediction* and a split close/far-path adder make this unit
faster at the cost of area. Neither is implemented here. The
leading-one-detect structure was chosen for its small area.

## The multiplier (`fp_mul`) and activation (`fp_act`)

The multiplier has two stages. Stage 1 forms the exact
(FRAC_W+1)×(FRAC_W+1)-bit significand product (on an FPGA this maps onto
the hard multiplier blocks) and the exponent sum e_a + e_b − bias. Stage 2
normalises the product, which lies in [1, 4), then truncates and packs.
Zero wins over a finite operand, and infinity wins over zero.

`fp_act` is an `fp_mul` with the constant 0.75, encoded as 1.1b × 2⁻¹. It
has the same two-clock latency.

## The multiply-accumulate unit (`fp_mac`)

The MAC computes `acc ← acc + a·b` with a valid/ready handshake on (a, b),
a `clear` input and a `busy` flag. Accumulation is strictly sequential, in
the order the terms arrive. Its result is therefore bit-identical to a
software loop that uses the same rounding, which makes debugging against a
software model straightforward.

Each addition needs the previous sum, so the five-clock adder sets the pace
at **one term per five clocks**. The multiplier is not on that critical
loop: the next pair is multiplied while the current sum is in the adder,
and its product waits in a one-entry product register. When the adder
delivers a sum in the same clock that a product is waiting, the sum goes
straight back into the adder (the *bypass*) without first passing through
the accumulator register. Without the bypass each term would cost one more
clock.

Timing of a back-to-back stream of n terms: the accumulator is final 5n+3
clocks after the clock in which `clear` is asserted. `in_ready` is low
while a pair is being multiplied or waiting, so a producer that keeps
`in_valid` high sees the unit stall it for four of every five clocks.

## One frame: stages Zero to Six

`nn_face_detector` is the top. Its controller walks through seven stages,
visible on the `stage` output:

| stage | what happens | clocks (defaults) |
|-------|--------------|-------------------|
| Zero  | idle. Weights and image may be loaded. A high `start` begins a frame | – |
| One   | for j = 0..299: stream W1[j][i], X[i] for i = 0..399 through the MAC, store net_j in the hidden buffer | 300 · (5·400 + 6) |
| Two   | for each j: read net_j, compute 0.75·net_j, write O_j back in place | 4 · 300 |
| Three | stream W2[j], O_j through the MAC | 5·300 + 6 |
| Four  | O_k = 0.75·net_k, shown on `y_out` | 3 |
| Five  | O_k − threshold in the comparator adder | 6 |
| Six   | `done` pulses for one clock on entry. `face_dec` shows the decision while `start` stays high. Dropping `start` returns to Zero | – |

A frame takes **5·(N_IN·N_HID + N_HID) + 10·N_HID + 17 clocks**. That is
counted from the edge that samples `start` to the edge that raises `done`,
both included. With the defaults it is 604,517 clocks. Virtually all of it
is layer 1: 120,000 terms at five clocks each.

The pins are `clk`, `rst` (synchronous, active high), `start`, `done` and
`face_dec`, plus:

- `threshold`: the decision threshold.
- `y_out`: the network output.
- `stage`: the current stage.
- Two load ports, `wt_we/wt_addr/wt_wdata` and `img_we/img_addr/img_wdata`.
  They only write while the stage is Zero.

## Memories (`nn_ram`)

Three instances of a one-write, one-synchronous-read RAM:

- **Weight memory**, N_IN·N_HID + N_HID = 120,300 words. Word j·400 + i
  holds W1[j][i], and word 120,000 + j holds W2[j]. A frame reads it in
  strictly increasing address order, so one counter addresses it for the
  whole frame. At 16 bits that is 1,924,800 bits. This fits in a
  Spartan-3 XC3S4000's 1,728 kbit of block RAM plus 432 kbit of
  distributed RAM. At 32 bits (3,849,600 bits) it would not fit.
- **Image buffer**, 400 words, X[i] at word i.
- **Hidden buffer**, 300 words, which holds net_j and then O_j.

Read data appears one clock after the address. A simultaneous write to the
same address returns the old word. Contents are not reset.

## How precision shows up at the output

`nn_precision_sweep_tb` feeds one set of real-valued weights (uniform in
±0.1) and one image (uniform in ±1) to seven builds of the full-size
network. It compares each output with a double-precision evaluation of the
same network:

| format | output error | one unit in last place |
|--------|--------------|------------------------|
| FPU32  | 2.9e-6       | 1.2e-7                 |
| FPU24  | 1.9e-4       | 7.6e-6                 |
| FPU20  | 2.6e-3       | 1.2e-4                 |
| FPU18  | 1.0e-2       | 4.9e-4                 |
| FPU16  | 4.0e-2       | 2.0e-3                 |
| FPU14  | 0.10         | 7.8e-3                 |
| FPU12  | 0.16         | 3.1e-2                 |

Down to about 16 bits the error roughly doubles per fraction bit removed.
Truncation errors all point toward zero, so they add up over the 120,000
products of layer 1 instead of cancelling. Below about 14 bits the output
has lost most of its information. For a decision threshold near 0.5 to 0.7
on outputs trained toward ±0.9, 16 bits is the narrowest practical width.
The detection-rate test below shows what that costs.

What matters in the end is the decision. `nn_detection_rate_tb` builds a
labelled two-class set: windows that carry a hidden template with strength
a, faces with a in [0.2, 1.6] and non-faces in [−1.4, 0.6], plus noise. The
weights respond to that template, so outputs sit near ±0.9 with overlap.
The testbench runs every window through six builds and counts correct
decisions at thresholds 0.1 to 1.0. The average absolute change in
detection rate against double precision came out as:

| format | average change |
|--------|----------------|
| FPU32, FPU24, FPU20, FPU18 | 0 |
| FPU16 | 5.0 points |
| FPU12 | 30 points (exactly half the windows right at every threshold) |

18 bits or more kept every decision the same as double precision. Every
FPU16 rate is at or below the double-precision one. Truncation pulls O_k
toward zero, so a face just above a threshold can fall below it. The
thesis reports the same pattern on its face set: no change for FPU32 and
FPU24, small changes for FPU20 and FPU18, and about 6 points for FPU16.

## Departures and open points

- **Not fully IEEE 754.** The 32-bit build uses the single-precision layout
  but not the standard's behaviour: rounding is truncation only, and there
  are no denormals and no NaN.
- **Frame length.** The thesis design needed 423,163 clocks per frame,
  about 3.5 clocks per multiply-accumulate. It does not say how its MAC was
  scheduled. This design's sequential, bit-reproducible accumulation takes
  five clocks per term, giving 604,517 clocks. That is 7.5 ms at 80 MHz
  instead of the thesis's 5.3 ms, or about 133 instead of 190 frames per
  second. Interleaving several partial sums in the adder pipeline would
  bring this near one clock per term. It would also change the summation
  order and therefore the rounding.
- **Adder internals.** The thesis modified an existing processor FPU adder
  whose internals it does not give. Only the five stage names and the
  truncation rounding are taken from it. The guard/round/sticky handling is
  this design's own.
- **Special values.** Zero, infinity, overflow and underflow handling is
  this design's choice, within the encodings listed above.
- **Separate units.** The activation unit and the comparator have their own
  multiplier and adder instead of reusing the MAC's. This costs one extra
  multiplier and one extra adder and keeps the controller simple.
- **Interfaces.** The load ports, the hidden buffer, the handshake and the
  `start`/`done` sequencing are this design's own. The thesis shows only
  the pins `CLK`, `RST`, `START`, `DONE` and `FACE_DEC` and the order of
  the stages.
- **Training is not included.** Weights must come from a software model
  that uses the same structure: no biases and f(x) = 0.75·x.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. Expected values come from
`tb/fp_ref_pkg.sv`. This is an independent reference model that does
floating-point arithmetic with 512-bit integers: it forms the exact sum or
product, then truncates, flushes and saturates as described above.

```
# unit test of the adder (both 16- and 32-bit formats)
verilator --binary --timing --assert -Irtl -Itb rtl/nn_pkg.sv tb/fp_ref_pkg.sv \
    rtl/fp_add.sv tb/fp_add_tb.sv --top-module fp_add_tb
./obj_dir/Vfp_add_tb

# whole detector at full size (400/300/1, two frames, about 1.3 million clocks)
verilator --binary --timing --assert -Irtl -Itb rtl/nn_pkg.sv tb/fp_ref_pkg.sv \
    rtl/fp_mul.sv rtl/fp_add.sv rtl/fp_mac.sv rtl/fp_act.sv rtl/face_decision.sv \
    rtl/nn_ram.sv rtl/nn_face_detector.sv tb/nn_face_detector_full_tb.sv \
    --top-module nn_face_detector_full_tb
./obj_dir/Vnn_face_detector_full_tb
```

| testbench | what it shows |
|-----------|---------------|
| `fp_add_tb` | 20,000 random sums in FPU16 and FPU32, each bit-exact and five clocks late. Includes cancellation, wide gaps, zeros, overflow, infinity, and a worked carry-out example |
| `fp_mul_tb` | 20,000 random products in FPU16 and FPU32, bit-exact, two clocks |
| `fp_mac_tb` | 300 dot products of 1–40 terms, with and without gaps, and one of 400 terms. Checks sums and the 5n+3 timing. Stalls and bypasses occur |
| `fp_act_tb` | 0.75·x bit-exact, and within one unit in the last place of the real product |
| `face_decision_tb` | decisions for ties and for values one unit above and below the threshold |
| `nn_ram_tb` | random write/read against a shadow copy, read-during-write, full-size weight memory |
| `nn_face_detector_tb` | 16/8/1 network, nine frames. Threshold below, equal to and above the output. Checks every hidden value, the output, `done`, `face_dec` and the frame length. Counts stage entries, stalls, bypasses, face and non-face results |
| `nn_face_detector_full_tb` | the same at full default size (400/300/1), two frames |
| `nn_detection_rate_tb` | full-size detector at FPU32, 24, 20, 18, 16 and 12 on 20 generated face/non-face windows. Every frame is bit-exact and applies a different threshold. Prints detection rate against threshold 0.1–1.0 per width |
| `nn_precision_sweep_tb` | full-size detector built at seven widths, FPU32 to FPU12, each bit-exact against the reference at its width. Reports the output error against double precision |

The full-size frame simulates in about a second with Verilator. The
detection-rate bench runs 120 full-size frames and takes about a minute. Weights and
images are random. Trained face weights and the face database are not part
of this repository.

## Changing it

- **Number format:** set `EXP_W` and `FRAC_W` on `nn_face_detector` (or on
  any unit). For example `EXP_W=8, FRAC_W=23` gives the 32-bit format and
  `EXP_W=6, FRAC_W=13` gives FPU20. Worst-case error grows by about 2× per
  fraction bit removed. Below about 14 bits in total, the output of a
  300-node network is dominated by rounding error.
- **Network size:** set `N_IN` and `N_HID`. The weight memory, the address
  widths and the frame length follow.
- **Decision threshold:** this is a run-time input, in the same format.
