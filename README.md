# QPSK modem built from Vedic multipliers and carry look-ahead adders

This is a small QPSK modem for FPGA-based software-defined radio. Its carrier
mixing uses no general-purpose multipliers or ripple-carry adders: every
carrier product comes from a Vedic multiplier. A Vedic multiplier builds an NxN product
from four (N/2)x(N/2) products, all formed at the same time, and then adds
them. The modulator's sum, the sign corrections and the final word merge come from
carry look-ahead adders (CLAs). Only the demodulator's filter and decision
stages use ordinary constant-coefficient arithmetic. Two transmitters are
included:

* **Method 1**: a modulator with a matching coherent demodulator. A 16-bit data
  word is split into its even and odd bits. The two 8-bit words weight a
  cosine and a sine carrier, and the two products are added. The demodulator
  multiplies again by the carriers, low-pass filters, decides each 8-bit word,
  and interleaves the two words back into the 16-bit word.
* **Method 2**: a modulator with no multipliers at all. The word is cut into
  eight 2-bit symbols. Each symbol drives a 4-to-1 multiplexer that picks one
  of four copies of the carrier, at 0, 90, 180 and 270 degrees. The output is
  eight carrier samples side by side.

`modem_top` connects the method-1 modulator straight to the method-1
demodulator, so a word sent in comes back out. It places the method-2
modulator beside them with its own ports.

## Signal flow and number formats

```
            +-------------- method 1 ------------------------------------------+
data_in --> even_odd_split --> even (8b) --x cos --+                            |
  16b                      \-> odd  (8b) --x sin --+-- CLA16 --> qpsk (17b signed)
            |                 (carrier_mixer: vm_8 + sign)                      |
            |   qpsk --x cos (vm_16) --> fir_lpf --> decision --> even --+       |
            |        \-x sin (vm_16) --> fir_lpf --> decision --> odd  --+ CLA16 --> data_out
            +---------------------------------------------------------------+
            +-------------- method 2 ---------------------------------------+
a (16b) --> symbol_split --> s0..s7 (2b) --> 8 x mux4 {0,90,180,270 deg} --> q (64b)
            +---------------------------------------------------------------+
```

* **Carrier.** Each period has 16 samples, 22.5 degrees apart. Sample k is
  `round(127*sin(2*pi*k/16))`, an 8-bit signed value: 0, 49, 90, 117, 127,
  117, ... (`modem_pkg::sine_sample`). The cosine and the other phases read
  the same table 4, 8 or 12 steps ahead (`carrier_lut`, `PHASE_OFFSET`).
* **Data words.** Both are unsigned 8-bit. `even = {d14, d12, ..., d0}` and
  `odd = {d15, d13, ..., d1}`. For example, 1011110101011110 gives
  even = 01111110 and odd = 11100011.
* **Modulated sample.** `qpsk = even*cos(k) + odd*sin(k)`, a 17-bit signed
  value. It is exact: the magnitude is at most 2*255*127.
* **Method-2 bytes.** Byte k of `q` (`q[8k+7:8k]`) is the carrier sample
  selected by symbol k = `a[2k+1:2k]`:
  00 selects 0 degrees, 01 selects 90, 10 selects 180 and 11 selects 270.

## Vedic multiplier

`vm_2` follows the "vertically and crosswise" rule for 2-bit operands:

* `a0b0` gives bit 0.
* A half adder adds the crosswise products `a1b0 + a0b1`. Its sum is bit 1.
* A second half adder adds that carry to `a1b1`. Its sum and carry are bits 2
  and 3.

`vm_4`, `vm_8` and `vm_16` are each four copies of the next smaller multiplier
plus `vedic_combine`. With `a = {ah, al}` and `b = {bh, bl}`, `vedic_combine`
uses three N-bit CLAs:

1. `m = ah*bl + al*bh`, with carry `ca1`.
2. `n = m + (al*bl >> N/2)`, with carry `ca2`.
3. `hi = ah*bh + {ca1 | ca2, n[N-1:N/2]}`.

The product is `{hi, n[N/2-1:0], al*bl[N/2-1:0]}`.

The OR of `ca1` and `ca2` matters. Adder 2 can carry, for example in 15 x 11
at 4 bits. A 4- or 8-bit combine that drops `ca2` gives wrong products. This
design uses the OR at every size. `ca1` and `ca2` are never both 1, and adder 3
never carries out. The multipliers are purely combinational. `carrier_mixer`
puts a register after each one.

The Vedic multipliers are unsigned, but the carrier is signed.
`carrier_mixer` multiplies magnitudes and negates the product when exactly one
operand is negative. The negation is `~p + 1`, done by a CLA with carry-in 1.
The modulator uses `vm_8` for its 8-bit words. The demodulator uses `vm_16`,
because the magnitude of a received sample needs 16 bits.

## Carry look-ahead adder

`cla_adder` forms `P = A ^ B` and `G = A & B` for each bit. It writes every
carry in flat two-level look-ahead form:

`C(i+1) = G(i) | P(i)G(i-1) | ... | P(i)..P(0)Cin`

The sum is `P ^ C`. The adder is combinational and its `WIDTH` is a parameter.
This design uses widths 4, 8, 16 and 24.

## How the demodulator recovers a word

This part is the least obvious, and most of it is this design's own choice.

1. **Symbols.** The modulator holds each word for `SYM_PERIODS` whole carrier
   periods. The default is 4 periods, or 64 samples. The first sample of a
   symbol carries a `first` marker. The demodulator restarts its own cosine and
   sine generators on that marker, so its carriers are coherent with the
   transmitter.
2. **Mixing.** Multiplying `qpsk` by `cos(k)` gives
   `even*cos^2 + odd*sin*cos`. Over one full carrier period, the integer
   carrier table makes this exact:
   * the `sin*cos` terms sum to exactly zero;
   * `cos^2` sums to exactly `SUM_SQ = 129018` (`carrier_sq_sum()`).

   The sine branch works the same way for `odd`.
3. **Filtering.** `fir_lpf` is a direct-form FIR filter. It has 41 taps with a
   Hamming window (the default) or 47 taps with a rectangular window. The taps
   are symmetric windowed-sinc low-pass values, quantised to Q1.15. The output
   keeps full precision: 24 input bits + 16 + 6 = 46 bits.
4. **Decision.** The filter is linear. Once its window holds only the current
   symbol, the sum of its output over one carrier period is exactly
   `word * SUM_SQ * sum(taps)`. `decision_device` sums the last carrier period
   of each symbol. It divides by that gain with a reciprocal multiply
   (`RECIP = round(2^48 / gain)`), rounds to the nearest word and limits the
   result to 0..255. For the filter to settle inside a symbol,
   `SYM_PERIODS*16 - 16 >= taps - 1` must hold. An elaboration-time
   assertion checks this, so `SYM_PERIODS = 4` is the smallest legal setting.
5. **Merging.** The even word is spread onto bits 0, 2, ..., 14 and the odd
   word onto bits 1, 3, ..., 15. A 16-bit CLA adds the two. The spread words
   share no bit positions, so the addition never carries and simply
   interleaves them.

A small additive disturbance, ±20 on each sample, still decodes correctly, as
the demodulator test shows. This is not a receiver for a real channel. It has
no carrier or timing recovery and relies on the shared first-sample marker.

Note that the filter's taps sum to about 0.84, not 1. The decision gain is
computed from the quantised taps actually used, so this costs nothing.

## Interfaces and timing

All blocks use one clock with a synchronous active-high reset. Reset clears
every register, including the filter delay lines.

| block | latency | handshake |
|---|---|---|
| `qpsk_mod_m1` | sample 2 clocks after its enabled clock | `en` produces one sample per clock; `data_take` = word taken now; `valid`, `first` travel with `qpsk` |
| `qpsk_demod_m1` | word 4 clocks after the symbol's last sample | `in_valid`, `in_first` in; `out_valid` out |
| `modem_top` method 1 | 6 clocks from the last sample produced to the recovered word | `en` low stalls the whole chain (gaps in `valid`) |
| `qpsk_mod_m2` | `q` loads at the edge after the word is taken | `en` advances the carriers and takes `a`; `valid` marks an updated `q` |
| `fir_lpf` | 1 clock | shifts only on `x_valid` |
| `decision_device` | 1 clock after `dump` | sums on `acc_en`; `dump` marks the period's last sample |

Method 1 produces one sample per enabled clock. One 16-bit word therefore
takes `SYM_PERIODS*16` clocks. Method 2 takes a new 16-bit word every enabled
clock.

## Where this design departs from, or adds to, its source description

Taken from the source description:

* the block structure of both modulators and of the demodulator;
* the CLA equations;
* the 2x2 Vedic rule and the 4/8/16-bit compositions, including the bit
  ranges of every partial product;
* the even/odd and 2-bit splits;
* the look-up-table carriers (16 samples per period, amplitude 127, four
  phases for method 2);
* both filter coefficient sets.

Choices made here:

* **Signed arithmetic.** Unsigned Vedic multipliers are used with a signed
  carrier by multiplying magnitudes and correcting the sign. The modulator
  output is 17 bits instead of 16, so the sum cannot overflow.
* **The `ca2` carry.** It is ORed into the last adder at 4 and 8 bits as
  well as at 16. Without it some products are wrong.
* **Registers.** Multipliers are combinational, with a register after each
  one. The splitters and the method-2 output are registered.
* **Symbol length.** A symbol is 4 carrier periods long, and the receiver is
  coherent, synchronised by a marker from the transmitter.
* **Decision rule.** The period sum and nearest-word rule are this design's.
  So is the way the final adder interleaves the two words.
* **Filter details.** Coefficients are Q1.15 with a full-precision sum, and
  the parallel constant multipliers use `*`. The filter is the one block whose
  products do not come from Vedic multipliers.
* **Rectangular taps.** The rectangular set is 47 taps. Its end taps are
  0.008, which looks large next to its neighbours but is kept.
* **Symbol-to-phase mapping for method 2.** 00 selects 0 degrees, 01 selects
  90, 10 selects 180 and 11 selects 270.

Not included:

* the conventional multiplier-and-adder modulator, which serves only as a
  point of comparison;
* the board's digital-to-analog converter. `m1_qpsk` and `m2_q` are the ports
  that would drive it.
* a demodulator for method 2, which the source does not describe.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares outputs
with values computed independently, for example with `$sin`/`$cos`, the `*`
operator or a convolution model. Each ends with a `TB_RESULT` line and has a
watchdog.

* **Multipliers and adder.** `vm_2`, `vm_4` and `vm_8` are tested
  exhaustively. `vm_16` gets corner cases, including the adder-2 carry case,
  plus 50k random pairs. The CLA is tested exhaustively at 4 bits and on 20k
  random 16-bit cases.
* **Carriers, filter and decision.**
  * Carriers: sine and cosine, stalls and `sync`.
  * Filter: impulse response against the decimal taps, a random convolution
    with gaps, and the length and symmetry of the rectangular filter.
  * Decision device: it is tested with its own gain and with rounding and
    clamping cases.
* **Modulators and demodulator.**
  * Method-1 modulator: every sample, the 2-clock latency, the markers and
    stalls.
  * Demodulator: 155 words, including 0000, FFFF and BD5E, with gaps and
    noise. The 4-clock latency is checked.
  * Method-2 modulator: every byte, all four symbol values, and the word
    -25489.
* **`tb_modem_top`.** This test runs the whole modem at its default
  parameters. It sends 200 words through modulator and demodulator with
  random stalls and checks every sample and every recovered word. It runs
  method 2 with stalls at the same time. It fails if stalls, negative samples
  or any of the four symbol values never occurred.
* **`tb_modem_rect`.** This test runs the same loop with the rectangular-window
  filter.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/modem_pkg.sv tb/tb_modem_top.sv --top-module tb_modem_top
./obj_dir/Vtb_modem_top
```

Replace `tb_modem_top` with any other testbench name. Each test finishes in
well under a second. The sources use only synthesizable SystemVerilog-2017 in
`rtl/`. Shared constants, the carrier table and the filter coefficients (with
the constant functions that quantise them) are in `rtl/modem_pkg.sv`.

## Changing the design

* **Filter window:** `modem_top #(.WINDOW(modem_pkg::WIN_RECT))`. The decision
  gain follows automatically.
* **Filter coefficients:** edit `hamming_half` / `rect_half` in `modem_pkg`.
  Only half of each symmetric set is stored. Everything derived from them is
  recomputed at elaboration.
* **Symbol length:** `SYM_PERIODS` must be a power of two and long enough for
  the filter, as explained above.
