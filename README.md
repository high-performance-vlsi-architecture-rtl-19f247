# Distributed-arithmetic complex FIR filter with serial tap folding and 4-2 adder trees

This is a 60-tap FIR filter with complex coefficients and complex input. It
uses no multipliers. It is built on **distributed arithmetic** (DA): a sample
is processed one bit position at a time. In bit cycle *k*, small logic blocks
take bit *k* of every tap word, add up the coefficients those bits select,
and an accumulator adds these partial sums with weights 2^-k. A sample
therefore takes B clock cycles (the input word length), whatever the number
of taps. So latency and sample rate depend on the word length, not on the
filter order.

Two further ideas keep the hardware small at high order:

* **Linear-phase folding with serial adders and subtractors.** The real parts
  of the coefficients are symmetric (a_R(i) = a_R(N+1-i)). The imaginary parts
  are antisymmetric (a_I(i) = -a_I(N+1-i)). So each pair of taps (i, N+1-i)
  shares one coefficient. A one-bit serial full adder (SFA) or subtractor
  (SFS) combines the two tap words bit by bit before the coefficient logic
  sees them. The carry or borrow goes into a flip-flop and joins the next
  higher bit. This halves the number of bit lines into the coefficient logic
  and halves the adders after it.
* **4-2 adder trees.** The partial sums go through a tree of carry-save 4-2
  adders instead of a tree of carry look-ahead adders (CLAs). A tree level
  turns four words into two. It needs half as many adders as a CLA tree and
  the same number of levels, and no carry has to ripple within a level.

## What is computed

For N taps, inputs v(t-i+1) = v_R + j v_I and coefficients a = a_R + j a_I,
folding the tap pairs gives, for i = 1..N/2 with v' = v(N+1-i):

    y_R =  sum a_R(i) (v_R(i) + v_R'(i))     Real Unit 1       (SFA, real input)
         - sum a_I(i) (v_I(i) - v_I'(i))     Real Unit 2       (SFS, imaginary input)
    y_I =  sum a_I(i) (v_R(i) - v_R'(i))     Imaginary Unit 1  (SFS, real input)
         + sum a_R(i) (v_I(i) + v_I'(i))     Imaginary Unit 2  (SFA, imaginary input)

This is exactly y = sum over all N taps of a(i)·v(i) for a linear-phase
coefficient set. Only the first half of each coefficient array is stored.

Each folded value u = v + v' or d = v - v' is a B-bit two's-complement word,
available one bit per cycle with the LSB first. For it never to overflow,
**every input must satisfy -0.5 <= x < 0.5**, so its top two bits must be
equal. Inputs outside that range give wrong results without any warning.

With Phi(k) the coefficient sum selected by bit k (k = 0 is the sign bit):

    y = -Phi(0) + sum_{k=1}^{B-1} 2^-k Phi(k)

## Data flow

```
x_re ─► input_unit (60 × 16-bit circulating SRs) ─┐ bits_re[60]
x_im ─► input_unit                               ─┤ bits_im[60]
                                                   ▼
          30 × {sfa re, sfs re, sfs im, sfa im} on tap pairs (i, 61-i)
                                                   ▼
   Real Unit 1 (a_R) · Real Unit 2 (-a_I) · Imag Unit 1 (a_I) · Imag Unit 2 (a_R)
   each: 6 optimum function circuits (ofc) of 5 lines -> 6 partial sums
                                                   ▼
   addition_unit (real: 12 words, imaginary: 12 words)
     4-2 level 1 (12->6) ─reg─ level 2 (6->4) ─reg─ level 3 (4->2) ─reg─
     CLA (2->1) ─reg─ shift accumulator (CLA + 1-bit right-shift feedback) ─ latch
```

* `da_controller` sequences the bit cycles: `bit_first` marks the LSB slice
  and `bit_sign` marks the sign-bit slice.
* `input_unit` is the tap delay line. Each shift register rotates right once
  per bit cycle, so its bit 0 shows bit k of its word in cycle k. At a
  sample boundary each register hands its word, back in place after B
  rotations, to the next register.
* `sfa` / `sfs` hold their carry or borrow in a flip-flop. That flip-flop is
  cleared by the load pulse before each new word.
* `ofc` ("optimum function circuit") is logic that replaces a DA lookup ROM.
  For its M address lines it returns the sum of the coefficients whose line
  is 1. The RTL builds the 2^M-entry truth table from the coefficient
  parameters at elaboration and indexes it. Logic synthesis then minimises
  it into gates. The published design's trick of merging identical rows and
  columns of the table is the kind of reduction synthesis performs. It is
  not written out by hand.
* `addition_unit` holds the 4-2 tree, one CLA and the `shift_accumulator`.
  The valid, first and sign flags travel in step with the data through the
  pipeline.

## Bit-serial timing (the part to read carefully)

* A sample is accepted in the cycle where `x_valid & x_ready`. `x_ready` is
  high when the filter is idle, and also in the last (sign-bit) cycle of the
  sample in progress. With `x_valid` held high, the filter therefore takes
  one sample every B = 16 cycles with no gap.
* In the 16 cycles after acceptance, the bit lines carry bits 0..15 of all
  tap words. The SFA/SFS outputs are combinational from these bits, and so
  are the function circuit outputs.
* Each slice then passes three 4-2 levels and the CLA, with one register
  after each: 4 cycles. It reaches the accumulator, which does
  `acc <= (first ? 0 : acc >>> 1) + (sign ? -Phi : Phi)`.
  The subtraction uses the same CLA, with Phi inverted and a carry-in of 1.
* The bit that each shift drops off `acc` is collected in a 15-bit register.
  So after the sign slice, `{acc, dropped bits}` is the **exact** result.
  It is latched into `y_*_full`, and `y_valid` pulses for one cycle.
* **Latency: B + 5 = 21 cycles** from the acceptance cycle to the `y_valid`
  cycle. At the 42.4 MHz bit clock needed for a 2.65 MHz sample rate, this
  is 495 ns, about 1.31 sample periods.

## Interface (`cfir_da_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bit clock; synchronous active-low reset of the controller, pipeline flags and accumulators |
| `x_valid` / `x_ready` | in / out | 1 | sample handshake, see timing |
| `x_re`, `x_im` | in | B | Q1.(B-1) two's complement, must lie in [-0.5, 0.5) |
| `y_valid` | out | 1 | one-cycle pulse per sample |
| `y_re_full`, `y_im_full` | out | PW+B = 39 | exact result, in units of 2^-((CW-1)+(B-1)) |
| `y_re`, `y_im` | out | B | result truncated to Q1.(B-1); wraps if \|y\| >= 1 |

The tap registers are not reset. The first N outputs after reset include
whatever the registers held, until N samples have passed through. Feed N
zero samples first if a clean start matters.

## Parameters

| parameter | default | notes |
|---|---|---|
| `N_TAPS` | 60 | even; at most 128 (`cfir_pkg::HALF_MAX` × 2) |
| `B` | 16 | input word length = cycles per sample |
| `CW` | 16 | coefficient word length; fixed by `cfir_pkg::coef_t` |
| `OFC_IN` | 5 | address lines per function circuit (30 lines → 6 circuits per unit) |
| `COEF_RE`, `COEF_IM` | example set | first N/2 coefficients, Q1.15 |

The internal word width is PW = CW + clog2(N) + 1 = 23 bits. It is wide
enough for any coefficient set.

The default coefficients are an example set of the required form. It is a
Hamming-windowed sinc low-pass with cutoff 0.135 cycles/sample, shifted up by
0.135 cycles/sample so that it is complex, and scaled by 1/2. It is *not* the
Remez-designed filter of the published evaluation (passband edge 0.12,
stopband edge 0.15), whose coefficients were not published. To use your own
filter, pass any symmetric/antisymmetric set as `COEF_RE` / `COEF_IM`.

## What follows the published architecture, and what is chosen here

Taken from the published architecture:
* the input unit of circulating shift registers;
* the SFA/SFS folding of tap pairs, and the scaling rule for the inputs;
* the four units, and which SFA/SFS group feeds each;
* logic function circuits in place of ROMs, with the function split into
  slices;
* the 4-2 adder made of two cascaded full adders;
* the 4-2 adder tree, followed by a CLA and an accumulating CLA with 1-bit
  shift feedback and an output latch;
* 60 taps.

Chosen here, because the architecture leaves them open:
* the word lengths B = 16 and CW = 16;
* the slice width of 5 lines (the optimum number of slices for 60 taps was
  not given);
* the coefficient values;
* the valid/ready handshake, the reset and the controller;
* where the pipeline registers sit;
* the group size of 4 in the CLA;
* keeping the exact full-width result next to the truncated B-bit output.

Departures and limits:
* The published design distinguishes a fast-carry "Type 1" and a smaller
  "Type 2" full adder inside its 4-2 adder. Both have the same logic
  function, and one `full_adder` module is used for both. The
  speed-versus-gate-count difference is a netlist matter that this RTL does
  not model.
* The published block diagrams draw the partial sums as B bits wide. Here
  they are carried at PW = 23 bits, so that no coefficient set can overflow
  them. Only the final output is cut to B bits.
* The published evaluation reports power, area and gate counts in a 0.8 µm
  standard-cell process. None of that is reproduced here.
* The real/imaginary split of the published block diagram is followed, but
  the CLA pair drawn there is replaced by the 4-2 tree + CLA, as described
  for the proposed structure.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_cfir_da_top` runs the full default configuration. It streams 600
  samples: back to back, with idle gaps, and with `x_valid` held while the
  filter is busy. It includes the extreme inputs -0.5 and 0.5-2^-15. It
  compares every output with a direct-form complex reference over all 60
  taps, exactly, and checks the truncated outputs, the 21-cycle latency and
  the 16-cycle sample interval. It also confirms that serial carries,
  borrows, negative inputs, streaming and stalls all occurred.
* `tb_cfir_impulse` feeds the default filter a real impulse and then an
  imaginary one. It checks that each of the 60 output pairs equals 0.25·a(n)
  or 0.25j·a(n). This confirms tap by tap that the folding and the units'
  coefficients (including the -a_I term of the real part) are right.
* The unit benches check:
  * the full adder and 4-2 cell exhaustively;
  * the word 4-2 adder and the CLA on random and corner operands;
  * the SFA and SFS against word-level add and subtract;
  * the function circuits and units against coefficient sums, including a
    partial last slice and negation;
  * the delay line bit by bit;
  * the controller against a reference sequencer;
  * the accumulator and addition unit against the weighted-sum formula,
    with their latencies.

## Simulating

All sources are in `rtl/`. The package `cfir_pkg.sv` must come first:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cfir_pkg.sv \
          tb/tb_cfir_da_top.sv --top-module tb_cfir_da_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other bench. The full-size top-level
run takes well under a second.
