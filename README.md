# Low-complexity filters for a 20 Gbps single-carrier modem

This is the filter and demodulation datapath of a wideband point-to-point modem. The modem carries 16QAM at
1.875 Gsymbol/s on each of four complex channels, with DACs and ADCs running at 2.5 Gsample/s. Cost is kept
down by folding several jobs into the two filters of each channel:

* The **transmitter filter** does the 1.875 → 2.5 Gsps rate conversion and the root-raised-cosine pulse
  shaping. It can also *pre-equalize* the ripple of the analog IF chain. It has no multipliers: every
  coefficient-times-symbol product is precomputed and stored in small LUT memories, which are addressed by
  the symbols.
* The **receiver filter** does the 2.5 → 1.875 Gsps rate conversion, the channel equalization and the I/Q
  imbalance compensation, all in one bank of widely-linear polyphase filters. A narrowing adder tree sums
  the products.

Everything runs on one 312.5 MHz clock. Each clock, a channel takes in **6 symbols** and puts out **8 DAC
samples**. In the other direction it takes in **8 ADC samples** and puts out **6 symbols**. Two FPGAs
with two channels each make up the 20 Gbps baseband.

## Rate conversion with three filters

The sample rate is 4/3 of the symbol rate. Symbol `k = 3m + p` therefore starts 4m samples, plus a fraction
of a sample, into the stream. That fraction takes only three values (0, 1/3, 2/3 of a sample), set by
`p`. Each direction uses a bank of three polyphase filters, one per `p`. The integer and fractional offsets
of filter `p` are folded into its coefficients.

Transmit (32-tap filters `h_p`, `a(s)` = constellation point of symbol index `s`):

    y[n] = sum_k h_{k mod 3}[n - 4*floor(k/3)] * a(s_k),   0 <= n - 4*floor(k/3) < 32

Receive (54-tap filters, window of filter `p` ends at sample `4m + p`):

    z[3m+p] = sum_{j=0}^{53} (ar_p[j] + j*ai_p[j]) * xr[4m+p-j] + (br_p[j] + j*bi_p[j]) * xi[4m+p-j]

Lanes within a clock beat `c`:

| direction | lane | meaning |
|---|---|---|
| Tx in  | `sym_in[i]`, i = 0..5  | symbol `6c + i` |
| Tx out | `samp_*[q]`, q = 0..7  | sample `8c + q` |
| Rx in  | `samp_in[i]`, i = 0..7 | sample `8c + i` |
| Rx out | `sym_*[l]`, l = 0..5   | symbol `6c + l`, phase `l mod 3`, `m = 2c + l/3` |

## Transmitter filter (`tx_filter`)

A 32-tap filter spans 32 × 3/4 = 24 symbols, so every output sample is a sum of 24 terms, 8 from each of
the three filters. Take output sample `n = 4M + r`. Term `t = p + 3d` (d = 0..7) is symbol
`k = 3(M - d) + p` weighted by tap `r + 4d` of filter `p`.

Each of the 8 output lanes is a `tx_sample_gen`, with 24 `tx_lut_mem`s of 16 complex 12-bit words each.
The symbol index is the read address. The 24 words read are added by a full-precision 3-input adder tree
(24 → 8 → 3 → 1), so a DAC sample is 18 bits for I and 18 bits for Q. Lanes `q` and `q + 4` share the
same `r`, so they hold the same contents.

**Coefficient contents.** The host works out the products after channel sounding and writes them into the
block memory `tx_coef_bram` (1536 × 24 bits = 36 Kbit):

    word[(r*24 + t)*16 + s] = { re, im } of  h_p[r + 4d] * a(s),   t = p + 3d
    a(s) = A(s[3:2]) + j*A(s[1:0]),   A(00) = -3, A(01) = -1, A(11) = +1, A(10) = +3

Both parts are rounded by the host to 12-bit signed values. Because the constellation lives in these words,
the 16QAM mapping and any pre-equalization (complex taps) cost no logic. Changing the constellation or the
pulse is a re-upload. A one-clock `load_start` pulse copies the whole block memory into the LUTs of all
8 lanes, one word per clock. `load_busy` stays high for 1537 clocks, and output samples are not valid
during that time.

Latency is 5 clocks from an input beat to its output beat: symbol register, LUT output register, and
3 tree levels. The symbol history only advances on `in_valid`.

## Receiver filter (`rx_filter`, `rx_poly_filter`, `add_tree3`)

Each polyphase filter has one part for the real input and one for the imaginary input, each with complex
weights. The two parts together form a widely-linear filter, which can invert a channel *and* an I/Q
imbalance. For each tap, the two products that feed one output part are added as they are formed (as a
cascaded DSP pair would do). This gives 54 data words each for the real and the imaginary output. A
symbol costs 216 multiplications, and 6 symbols per clock need 1296 multipliers.

**Product scaling.** The 21-bit sum of two products is shifted right by `PSHIFT` (8), rounding toward
minus infinity, and saturated to 13 bits.

**Narrowing addition tree.** The tree has four levels, one per clock: 54 → 18 → 6 → 2 → 1. The first
three levels use 3-input adders; the last adds two words. The word entering the four levels is 13, 12,
11 and 10 bits wide. Between levels, each exact sum is halved (its LSB is dropped, rounding toward minus
infinity) and saturated to one bit less than the inputs of the level that made it. The last sum is kept
exact, so a symbol part is 12 bits. The overall gain from data word to output is therefore 1/8. Saturation
only matters when many large taps line up.

**Coefficients.** They are written one tap at a time (`coef_we`, `coef_phase`, `coef_tap`,
`coef_data = {ar, ai, br, bi}`, 12 bits each) and take effect on the next clock. After reset they are all
zero.

Latency is 5 clocks: the product register and 4 tree levels.

## Demodulation (`qam16_demapper`)

Each axis is sliced against 0 and ±`thr`, where `thr` = 2A for received levels ±A and ±3A. The result is
Gray-coded: 00, 01, 11, 10 from the most negative level to the most positive. This gives back the same
4-bit symbol index the transmitter uses. Latency is 1 clock.

## System wrappers (`modem_fpga`, `modem_top`)

`modem_fpga` holds two channels. Each channel is a `tx_filter`, an `rx_filter` and a `qam16_demapper`, and
the channels share their valid strobes. `modem_top` holds two FPGAs. All data ports are packed arrays
indexed `[fpga][channel][lane]`. The configuration ports are per FPGA and carry a channel number.

The ports stand where the unbuilt parts of the modem connect:

* `tx_sym` would come from the LDPC encoder.
* `rx_sym` would go to the LDPC decoder.
* `dac_samp` and `adc_samp` connect to the converter interfaces.
* `rxc_*` and `rx_thr` would be driven by channel estimation and gain control.
* `txc_*` are written by the control host.

## What is not here

The design does not include these parts of the modem:

* the 20 GbE optical Ethernet interface;
* LDPC encoding and decoding;
* receiver synchronization;
* channel and I/Q-mismatch estimation, including computing the Rx coefficients;
* the DAC/ADC interfaces and the converters;
* the IF up/down-converter and its pilot tone.

No algorithm or structure is available for any of them. The receiver therefore assumes that the incoming
sample stream is already aligned, so that beat boundaries fall on sample indices that are multiples of 8.

## Design choices and departures

These points are this design's own. The source describes the architecture but leaves them open:

* ADC width (8 bits), Rx coefficient width (12), `PSHIFT`, and the 18-bit full-precision Tx output.
* How the adder tree narrows: dropping one LSB plus saturating at each level. A reading that keeps only the
  MSBs of each sum (3 bits dropped per level) also fits the stated 13/12/11/10-bit widths, but it loses too
  much precision.
* The Rx window alignment (window of filter `p` ends at `4m + p`).
* LUT words holding products rather than bare coefficients. This follows from the Tx filter using no
  multipliers.
* The block memory layout. It fills one 36 Kbit block memory. The source gives the coefficient set as
  "around 24 Kbit" in 24 groups of about 1 Kbit; here each group is 1.5 Kbit, because every term has a
  word for each of the 4 sample phases.
* Hard-decision demapping with an external threshold. The decoder would more likely want soft values.
* All handshakes (a plain `valid` per beat, no back-pressure), the configuration ports, and reset
  behaviour.

## Simulating

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. The
expected values come from reference models in `tb/modem_ref_pkg.sv`: the defining sums, evaluated with
integers. For example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tx_filter_tb \
      rtl/modem_pkg.sv tb/modem_ref_pkg.sv rtl/add_tree3.sv rtl/tx_lut_mem.sv \
      rtl/tx_coef_bram.sv rtl/tx_sample_gen.sv rtl/tx_filter.sv tb/tx_filter_tb.sv
    ./obj_dir/Vtx_filter_tb

The testbenches:

* **`add_tree3_tb`** runs both tree forms, including saturating inputs.
* **`rx_poly_filter_tb`** and **`rx_filter_tb`** check each symbol against the widely-linear polyphase
  sum. `rx_filter_tb` also checks the 8-in / 6-out lane mapping and the behaviour with gaps in
  `in_valid`.
* **`tx_filter_tb`** checks each sample against the direct rate-converting convolution, for two uploaded
  coefficient sets. It also checks the 1537-clock download.
* **`modem_top_tb`** is an end-to-end loopback of all four channels at the default sizes. The Tx pulse is
  pre-rotated by +90°. The channel model in the testbench rotates by −90°, leaks a quarter of I into Q
  and adds noise. The Rx taps undo the leak. Every symbol must come back unchanged, one beat later. The
  testbench also counts LUT downloads, valid gaps, and the symbols that would have been wrong without the
  pre-rotation or without the I/Q compensation. It fails if any of these counts is zero.
* **`modem_fpga_tb`** does the same loopback for one FPGA.
* **`preeq_link_tb`** is the pre-equalization workload. It connects a transmitter filter bank, a channel
  with a complex echo (0.35j, two samples late) and a receiver filter bank with matched filters. The
  pulses are root-raised cosines with roll-off 0.25: 32 taps on transmit and 54 taps on receive. It
  sends random 16QAM once with plain pulses and once with pulses convolved with a truncated inverse of
  the echo. It measures the EVM (error vector magnitude) and the symbol errors of each run: 35.3% and
  181 of 648 symbols wrong without pre-equalization, 6.9% and no errors with it. This testbench raises
  the receiver's `PSHIFT` to 6, so that the signal uses more of the 13-bit data words.

The loopback in `modem_top_tb` uses a short pulse and single-tap receive filters, so that every symbol can be
checked exactly. The realistic pulses are exercised by `preeq_link_tb`. No noise-versus-BER curve is
simulated, because the LDPC code is not part of this RTL.
Building `modem_top_tb` takes about a minute and a half; the simulation itself runs in under a second.

## Size

The receive filters need 1296 real multiplications per channel, which is 2592 for a two-channel FPGA. The
reference FPGA implementation reports 1344 DSP multipliers for the receive filters of one FPGA. Matching
that count would take two products per DSP slice, which this RTL does not do. It leaves the mapping of
products to DSP slices to synthesis. The transmit side of a channel uses no multipliers. It has
8 × 24 LUT memories of 16 × 24 bits each (73.7 Kbit of LUT RAM), one 36 Kbit block memory, and
16 adder trees of 12 three-input adders each (one tree for I and one for Q in each lane).
