# Efficient polyphase decimator with cost-optimized coefficients

A decimator lowers a signal's sample rate by a factor M: it low-pass filters
the input (to stop aliasing) and then keeps one sample in M. Done literally,
the FIR filter computes M outputs and M-1 of them are thrown away. This
design avoids that waste. The filter is split into M polyphase branches, and
the downsampling is moved in front of the branches. Each branch is a short
FIR running at the output rate, and every multiply-add that is done
contributes to an output.

A second idea sits inside the multipliers. The coefficients are constants, so
each product is built from shifts and adds, one adder per 1 bit of the
coefficient word. The number of 1 bits in the coefficient set is therefore
the cost of the filter, in adders and in switching activity. The default
coefficient set has been chosen to lower that count. It costs 179 nonzero
bits, where the plain quantized set costs 192. The price is about 2 dB of
stopband attenuation (see the frequency-response section).

The default configuration is "Filter 1":

| quantity | value |
|---|---|
| decimation factor M | 3 |
| filter length N | 21 taps, linear phase (symmetric) |
| passband / stopband edge | 0.1428 pi / 0.3334 pi rad/sample |
| passband ripple / stopband attenuation | 1 dB / -58 dB |
| taps per branch L = N/M | 7 |
| coefficient words | 16 bit two's complement, value times 2^15 |
| input | 16 bit signed, one sample per clock at most |
| output | 37 bit signed, full precision, one per 3 input samples |

## How the polyphase split works

The prototype filter is H(z) = sum_j h[j] z^-j. Grouping the taps by their
index modulo M gives

    H(z) = E_0(z^M) + z^-1 E_1(z^M) + ... + z^-(M-1) E_(M-1)(z^M)
    E_k(z) = h[k] + h[k+M] z^-1 + h[k+2M] z^-2 + ...

so branch k sees the input delayed by k samples. Because each E_k is a
function of z^M, the downsampler can be moved through it (the noble
identity). Branch k then gets the low-rate sequence u_k[m] = x[mM-k] and
filters it with the plain coefficients of E_k. The decimated output is the
sum of the branch outputs:

    y[m] = sum_j h[j] x[mM - j] = sum_k sum_i h[iM+k] u_k[m-i]

For Filter 1 the three branches are

    E_0: h[0] h[3] h[6] h[9]  h[12] h[15] h[18]
    E_1: h[1] h[4] h[7] h[10] h[13] h[16] h[19]
    E_2: h[2] h[5] h[8] h[11] h[14] h[17] h[20]

## Block structure

    in_valid/in_data
          |
    polyphase_commutator    delays z^-1..z^-(M-1), then /M on every branch
          | frame[0..M-1], frame_valid (once per M samples)
    polyphase_subfilter x M E_k in direct form, L taps, low rate
          |   each product from pot_const_mult (shift-and-add, no multiplier)
    branch_sum              adds the M branch outputs
          |
    out_valid/out_data

* `polyphase_commutator` keeps the last M-1 input samples in a shift register
  and counts the input phase. The sample whose index is a multiple of M
  releases a frame, `frame[k] = x[n-k]`. The first sample after reset is
  x[0], and the samples before it count as zero.
* `polyphase_subfilter` holds L-1 past branch samples. On each frame it
  registers `sum_i COEF[i] * u[m-i]`. If N is not a multiple of M, missing
  taps are zero.
* `pot_const_mult` adds `x << i` for every 1 bit i of the coefficient word
  and subtracts `x << 15` for the sign bit. Bits that are 0 make no logic.
* `branch_sum` adds the branch outputs with sign extension and registers the
  sum.
* `polydec_pkg` holds the two Filter 1 coefficient sets (`H1_OPT`, the
  default, and `H1_QUANT`), a helper that extracts one polyphase branch, and
  `coef_cost()`, which counts the 1 bits of a word.

## Coefficients and their cost

Each coefficient is stored as round(h * 2^15), a 16-bit two's-complement
word. The filter's DC gain is sum(h) = 32804, about 2^15, so the 37-bit
output is the filtered input scaled by about 2^15. To get back to the input
scale, take `out_data >>> 15`.

Only five coefficient values change between the two sets. Each changes by a
few LSBs (the centre tap by 14) to a word with fewer 1 bits. Words are
listed as the unsigned value of the 16-bit pattern.

| tap (and mirror) | quantized word | cost | optimized word | cost |
|---|---|---|---|---|
| 2, 18  | 64901 | 10 | 64900 | 9  |
| 3, 17  | 64685 | 11 | 64684 | 10 |
| 4, 16  | 64791 | 11 | 64792 | 9  |
| 5, 15  | 65461 | 13 | 65460 | 12 |
| 10     | 6958  | 8  | 6944  | 5  |

The other taps are 65415 (taps 0 and 20, cost 12), 65197 (1 and 19, 12),
1248 (6 and 14, 4), 3066 (7 and 13, 9), 4968 (8 and 12, 6) and 6416
(9 and 11, 4). Totals: 192 quantized, 179 optimized. The optimization that
picks these values is a design-time search. It starts from the quantized
values, tries nearby integers with fewer 1 bits, and keeps one only if the
passband and stopband limits still hold on a dense frequency grid. Its
result enters the RTL only as these constants.

For negative taps, the published decimal values correspond to the word
plus one LSB (for example -120/2^15 for the word 65415, whose two's-complement
value is -121). This RTL uses the words, because the costs above are counted
on them.

## Frequency response of the coefficient sets

The Filter 1 specification asks for 1 dB passband ripple up to 0.1428 pi and
-58 dB in the stopband from 0.3334 pi. The two coefficient sets, as stored,
give the following response. It was computed from the words and confirmed by
driving tones through this RTL (`tb_frequency_response`).

| set | passband gain, 0 .. 0.1428 pi | worst stopband |
|---|---|---|
| optimized (default) | -0.69 .. +0.64 dB | -54.6 dB at 0.474 pi |
| quantized | -0.68 .. +0.64 dB | -56.8 dB |

The saving of 13 nonzero bits costs about 2 dB of stopband attenuation.
Neither set reaches -58 dB. The search that picked the optimized set allowed
a 3 dB relaxation of the stopband target, which gives about -55 dB, and the
optimized set falls just short of that too. The published words are used
unchanged. A user who needs the full attenuation should supply another set
through `COEF`.

## Interface and timing

Top module `efficient_polyphase_decimator`:

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock; at most one input sample per cycle |
| rst_n | in | 1 | synchronous, active low; clears all history |
| in_valid | in | 1 | in_data is a new sample |
| in_data | in | DATA_W = 16 | signed sample |
| out_valid | out | 1 | one-cycle pulse per decimated output |
| out_data | out | OUT_W = 37 | signed output, full precision |

There is no back-pressure: the decimator always accepts. in_valid may stay
low for any number of cycles between samples. For every accepted sample with
index n = 0 mod M, out_valid is high in the third clock cycle after the
cycle in which the sample was presented. That sample passes one register
stage each in the commutator, the sub-filters and the output adder, so
out_valid rises on the second clock edge after the edge that accepted it. `out_data` holds its value until the next
pulse. At full input rate, the filter does N = 21 multiply-adds per output,
which is 7 per clock.

Parameters: `M`, `N_TAPS`, `DATA_W`, and `COEF` (N_TAPS words of 16 bits,
element j multiplying x[n-j]). The branch length, the branch width and the
output width are derived from them. Another filter is set by overriding all
four parameters together. The testbenches do this for M = 4, N = 28.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=... failures=...`
line.

| testbench | what it checks |
|---|---|
| tb_pot_const_mult | 8 constant words, including the extremes, against a 64-bit product |
| tb_polyphase_commutator | frame contents and timing with random gaps and a reset |
| tb_polyphase_subfilter | a non-symmetric 7-tap branch against a reference convolution |
| tb_branch_sum | sum and hold behaviour, extreme values included |
| tb_efficient_polyphase_decimator | the default configuration end to end (below) |
| tb_filter_workloads | Filter 1 with the quantized set; a 4-branch, 28-tap configuration |
| tb_frequency_response | gain at 10 tone frequencies against the response computed from the coefficients |

`tb_efficient_polyphase_decimator` runs with all parameters at their
defaults. It:

* checks the costs of the two sets (192 and 179);
* recovers all 21 coefficients from impulses at the three input phases;
* checks the DC gain;
* runs about 9000 random cycles, with full-scale samples, idle cycles,
  full-rate bursts and a reset while outputs are in flight.

Every output is compared in value and in arrival cycle against the direct
convolution. The testbench counts each of these events and fails if one
never happened.

To simulate with Verilator, for example:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/polydec_pkg.sv tb/tb_efficient_polyphase_decimator.sv \
        --top-module tb_efficient_polyphase_decimator
    ./obj_dir/Vtb_efficient_polyphase_decimator

## Departures and limits

* Input width, the valid handshake, reset behaviour, the output width, the
  pipeline registers and the downsampler phase (x[0] releases y[0]) are
  choices made here. The filter description does not fix them.
* Coefficients are scaled by 2^15, the scaling used in the coefficient
  table. The filter description also calls the format "16.14". The stored
  bit patterns are the same either way; only the binary point of the output
  would move by one place.
* Filter 2 (M = 4, N = 28, passband edge 0.1071 pi, stopband edge 0.25 pi,
  stopband -56.25 dB) has no published coefficients. The RTL supports its
  structure through parameters. The testbench uses stand-in coefficients,
  which check the 4-branch arrangement but not the frequency response.
* The two structures this design is compared with are not included: the
  direct FIR followed by a downsampler, and the polyphase form with the
  downsampler after the branches.
* The results of the FPGA reference implementation cannot be reproduced
  from RTL alone: maximum clock, power and logic utilization on a Spartan-6.
  For Filter 1 these were 111.8 MHz, 183 mW with optimized coefficients,
  and 1754 flip-flops / 7282 LUTs, from a block-diagram tool flow.
* Products are formed by plain binary shift-and-add, matching the cost that
  is optimized. A synthesis tool may still map them to hardware multipliers,
  or recode them.
