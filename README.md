# QPSK-OFDM link with a 3-path Rayleigh fading channel, in SystemVerilog

This is a complete OFDM transmitter, channel and receiver on a single 100 MHz
clock. It uses the LTE 5 MHz "extended cyclic prefix" numerology: 512
subcarriers, a 128-sample cyclic prefix (one quarter of the symbol) and
12.5 Msample/s. Random bits go in at 20 Mbit/s and are QPSK-mapped onto all
512 subcarriers. The transmitter builds OFDM symbols with an inverse FFT and
passes them through a three-path Rayleigh fading channel. It then shifts them
to a 25 MHz intermediate frequency, where white Gaussian noise of adjustable
strength is added. The receiver brings the signal back to baseband and
demodulates it with an FFT. It then removes the channel by dividing every
subcarrier by the channel's frequency response. Finally it drops the cyclic
prefix, decides the QPSK symbols and outputs the bits again at 20 Mbit/s.

The whole link fits in one chip, so the receiver shares the transmitter's
clock and frame timing. It is also given the fading channel's path gains
("known channel state"), so there is no synchronisation or channel estimation.
The point of the design is to measure bit error rate against Eb/N0 in
hardware, over a channel whose delay spread is covered by the cyclic prefix.

The structure follows a Xilinx System Generator design of this system. That
design is described block by block: QPSK ROMs, zero padding, the FFT v7.1 core
as IFFT and FFT, a DDS carrier, fading noise generators, CORDIC dividers,
puncturing, and a demapping ROM. Every block here is written out as plain RTL,
including the FFT and the divider. Where this RTL departs from the original,
the section "Departures from the reference design" lists it.

## Signal chain and rates

| stage | module | rate | format |
|---|---|---|---|
| information bits | `ofdm_top` ports | 20 Mbit/s (1 per 5 clocks) | 1 bit |
| QPSK mapping | `qpsk_mod` | 10 Msym/s | I, Q in {+1, -1}, 2 bits |
| zero padding | `zero_pad` | 12.5 Msps (1 per 8 clocks) | 128 zero slots + 512 symbols |
| inverse FFT + prefix | `ofdm_mod` (`fft_sdf`) | 12.5 Msps | 18-bit Q6.12 complex |
| 3-path fading | `fading_channel` (3 x `fading_path`) | 12.5 Msps | Q6.12 complex |
| I/Q modulator, 25 MHz IF | `iq_upconv`, `dds_carrier` | 100 Msps | Q6.12 real |
| AWGN | `awgn_channel` (`wgn_gen`) | 100 Msps | Q6.12 real |
| I/Q demodulator, down-sample by 8 | `iq_downconv`, `dds_carrier` | 12.5 Msps | Q6.12 complex |
| FFT (prefix copy kept) | `ofdm_demod` (`fft_sdf`) | 12.5 Msps | Q6.12 complex, saturated |
| channel division Y/H | `phase_noise_cancel` (`fft_sdf`, `complex_div`, `cordic_div`, `cmul`) | 12.5 Msps | 20-bit Q6.14 complex |
| hard decision, prefix removal | `puncture` | 10 Msps | +/-1 |
| demapping, serialising | `qpsk_demod` | 20 Mbit/s | 1 bit |

The frame is the unit of everything. One OFDM symbol is 640 sample slots of 8
clocks each, i.e. 5120 clocks. That is 128 prefix samples followed by 512 data
samples, and it carries 512 QPSK symbols = 1024 bits. A bit reaches `bit_out`
about 6 frames (30,771 clocks from the first bit in to the first bit out)
after it entered. The link never stalls
and has no back-pressure. `ofdm_timing` produces the three strobes (bit,
symbol, sample slot) and the clock phase within a slot (`slot_cnt`, 0..7). All
blocks are clock-enabled by these strobes.

### Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 100 MHz clock, synchronous active-high reset |
| `bit_en` | out | 1 | `bit_in` is taken in this cycle (every 5th clock) |
| `bit_in` | in | 1 | information bit |
| `es_no` | in | 16 | noise amplitude, signed Q4.12; 0 = noiseless |
| `bit_out`, `bit_out_valid` | out | 1 | recovered bit and its strobe (every 5th clock once running) |
| `if_out` | out | 18 | transmitted IF signal (after fading, before noise), Q6.12 |
| `rx_if` | out | 18 | received IF signal (after noise), Q6.12 |

`es_no` multiplies a unit-variance Gaussian sample, so it is the standard
deviation of the added noise (Q6.12 units, 1.0 = 4096). A transmitted
baseband sample has E|x|^2 = 2/512, i.e. an r.m.s. value of 1/32 * sqrt(2)
(about 181 LSB) per component, and the IF signal carries one component per
clock at that level. Each receive branch takes one IF sample per slot, and
the 512-point FFT then gives every QPSK symbol (|X|^2 = 2) a noise variance
of 1024 * es_no^2. Hence

    Eb/N0 = 1 / (1024 * es_no^2),   es_no (Q4.12 integer) = 128 / sqrt(Eb/N0)

so 0 dB is `es_no` = 128, 10 dB is 40 and 20 dB is 13. The 16-bit input
makes the steps coarse above about 25 dB.

## Fixed-point formats

`ofdm_pkg` holds the shared types and helpers. It defines `sample_t`, an 18-bit
signed Q6.12 value. It also defines `cstream_t`, a packed struct
`{v, sof, re, im}` that carries a complex sample together with its "valid" and
"frame start" flags. Carrying the flags with the data is what keeps frames
aligned through blocks of different latencies. The package also has
`round_conv`, which rounds half to even (convergent rounding), and `sat`,
which saturates.

- QPSK symbols: +/-1 in 2 bits, unnormalised. Their power is 2, and nothing
  downstream needs it normalised.
- IFFT input: the symbols are multiplied by 0.5 and given 8 bits (Q2.6). This
  is the smallest input the original FFT core accepts.
- IFFT output: the transform is unscaled. With full word growth that is
  8 + 9 + 1 = 18 bits. It is then multiplied by 1/256, i.e. divided by
  N = 512 overall, and rounded to Q6.12. A time sample then has an r.m.s.
  magnitude of 1/16.
- Carrier: 16 bits, Q2.14. Gaussian noise: 16 bits, Q5.11, sigma = 1.0.
- Receiver FFT: 18-bit input. The unscaled output is 28 bits and is saturated
  back to 18. A received subcarrier is about +/-4096 times the channel gain,
  so it sits well inside the range.
- Divider output: 20 bits with 14 fraction bits (Q6.14). A recovered symbol
  is about +/-16384.

## The FFT engine (`fft_sdf`)

Three FFTs are used: the transmitter's inverse FFT, the receiver's forward
FFT, and the forward FFT that turns the channel impulse response into H(f).
All three are instances of `fft_sdf`. It is a 512-point radix-2
decimation-in-frequency pipeline of the single-path delay-feedback (SDF)
kind, with natural-order output and cyclic-prefix insertion.

**Butterfly stages.** Stage s (s = 0..8) has a memory of D = 256 / 2^s
complex words and a counter of 2D loaded samples. During the first half of a
block it stores the incoming samples. While doing so, it sends out the
differences it kept from the previous half, multiplied by the twiddle
W^(k * 2^s), where k is the position within the half. During the second half
it sends out a + x at once and stores a - x in the same memory word. Each
stage emits one sample per sample loaded, and the pipeline moves only when a
sample is loaded. A frame is therefore flushed out by the first samples of
the next frame. The link always streams frames back to back, so this costs
nothing. A single isolated frame, however, would stay in the pipe.

**Word growth and rounding.** The transform is computed unscaled. The input
is sign-extended at once to IW + 9 + 1 bits, the growth of a 512-point
transform. After that, no stage can overflow, and adds and subtracts are
exact. Only the twiddle products are rounded, to even, after the 16-bit
twiddle (14 fraction bits) multiply. Twiddles are evaluated with `$cos` and
`$sin` in a constant function at elaboration, so no table file exists. The
direction is chosen per frame with `fwd_inv`, which only flips the sign of
the sine. The inverse transform has no 1/N; the wrapper applies it.

**Reordering and prefix.** The stages deliver bin k at position
bit-reverse(k). A two-bank reorder memory writes each sample at its
bit-reversed address. When a bank is complete, it is read out on the next
`out_slot` strobes: first entries N - cp_len .. N-1 (the cyclic prefix), then
entries 0 .. N-1. With cp_len = 128, that is 640 outputs for 512 inputs. This
is why the transmitter needs zero padding. It loads the IFFT only in the 512
data slots of each 640-slot frame. The 128 empty slots give the output side
time to emit the prefix. `out_sof` marks the first prefix sample, and `done`
marks the last sample of the frame.

At the receiver, the same block runs as a forward FFT with cp_len = 128. Its
output frame is again 640 samples long: a copy of bins 384..511 followed by
bins 0..511. This keeps the receiver at 12.5 Msps up to the puncturing stage,
which throws the first 128 away.

## Transmitter

`qpsk_mod` collects two bits, first bit as the address MSB, and reads two
four-word ROMs:

| bits (first, second) | 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| I | +1 | -1 | +1 | -1 |
| Q | +1 | +1 | -1 | -1 |

This is a Gray mapping. The receiver's ROM `[0, 2, 1, 3]`, addressed by
{sign I, sign Q}, is its exact inverse.

`zero_pad` writes 512 symbols into one bank of a two-bank memory. It replays
a full bank at the slot rate (12.5 Msps) as 128 zero slots followed by the
512 symbols, and flags which slots carry data. Zeros come first because the
original concatenates the zero word on the high side and serialises the
result most significant word first. Writing 512 symbols at 10 Msps
takes 4096 clocks. Replaying 640 slots takes 5120 clocks. Double buffering
absorbs the rate difference.

`ofdm_mod` scales the symbols to 0.5 and runs the inverse FFT with a
128-sample prefix. It divides the result by 256 with convergent rounding and
outputs `cstream_t` samples, with `sof` on the first prefix sample.

`dds_carrier` is a 16-bit phase accumulator that advances by -1/4 turn per
clock, with sine and cosine lookup tables. At 100 MHz it gives the 25 MHz
sequences sine = 0, -1, 0, 1 and cosine = 1, 0, -1, 0. `iq_upconv` computes
I*cos + Q*sin. It has 3-clock multipliers whose products are truncated to
Q6.12, and an 18-bit adder that wraps. The baseband sample is held for the 8
clocks of its slot. Each slot therefore carries I twice and Q twice, with
alternating signs.

## Channel

**Fading (`fading_channel`).** Three `fading_path` taps with delays of 0, 1
and 2 sample slots are summed. Their amplitude factors, 0.7116, 0.5543 and
0.4317, come from an exponential power-delay profile. Their powers are
0.5065, 0.3072 and 0.1863, which sum to 1. Each path owns a
`fading_noise_gen`: two independent `wgn_gen` generators, each scaled by
1/sqrt(2), which give a unit-power complex Gaussian sample every clock. At
each frame start the path latches one such sample times its factor as its
complex gain. The gain then stays constant for the whole 640-sample symbol,
so the channel is block-fading with one independent Rayleigh draw per OFDM
symbol. Each delayed baseband sample goes through a `cmul` (3-clock complex
multiplier). The three products are added in a registered 18-bit adder. The
six gain words are brought out as `ch_re[3]` / `ch_im[3]` for the receiver.

Because the taps sit at 0..2 samples and the prefix is 128 samples, the
linear convolution becomes a circular one over the 512-sample FFT window. On
each subcarrier the channel is then a single complex factor
H(k) = g0 + g1 e^(-j2πk/512) + g2 e^(-j4πk/512).

**Noise (`wgn_gen`, `awgn_channel`).** `wgn_gen` adds twelve independent
11-bit uniform numbers taken from twelve xorshift32 generators and removes
the mean. By the central limit theorem the sum is close to Gaussian. Its
standard deviation is exactly 2^11, i.e. 1.0 in Q5.11, and it is bounded at
+/-6 sigma. Each instance has its own seed. The twelve sub-generator seeds
are formed from the instance seed by integer multiplication and addition, not
by XOR with a constant. xorshift is linear over GF(2), so XOR-derived seeds
would make sub-generator k of every instance share a common XOR term for all
time. The instances would then be dependent, with their magnitudes
correlated at about 0.56. In the fading channel this produces far more deep
fades than Rayleigh fading has. `tb_wgn_gen` checks that two instances are
uncorrelated in value and in magnitude. `awgn_channel` multiplies the
noise by `es_no` (3 clocks, 18-bit rounded and saturated product) and adds it
to the IF sample (2 clocks).

## Receiver timing

The receiver gets no timing from the received signal. Everything is derived
from the transmitter's frame-start flag and fixed, known latencies, so these
constants matter:

- The channel's output register feeds the up-converter, which adds 4 clocks.
  The AWGN adder adds 2 more, and the down-converter's multipliers 3 more:
  9 clocks in total.
- A baseband sample is presented to the up-converter from slot phase 6 for 8
  clocks. At slot phase 1 the cosine is +1 and the sine 0. At slot phase 2
  the sine is -1 and the cosine 0. 9 clocks later, at receiver phases 2 and 3
  (`RX_TAKE_I`, `RX_TAKE_Q`), the down-converter's cosine and sine products
  are exactly I and Q. The receive carrier runs 2 clocks behind (`CAR_DLY`)
  so that its phase matches at those instants. No low-pass filter is needed,
  because at those two phases the other branch's carrier is zero.
- The frame start is delayed by 14 clocks (`RX_SYNC_DLY`) so that it lands on
  the down-converter's first complete sample of each frame. This delayed flag
  starts `ofdm_demod`'s slot count and `phase_noise_cancel`'s h(t) generator.

If any latency in the chain changes, these three constants must change with
it. The end-to-end testbench catches a one-slot error at once.

## Cancelling the channel (`phase_noise_cancel`, `complex_div`, `cordic_div`)

The receiver computes X(k) = Y(k) / H(k) on every subcarrier. Y comes from
`ofdm_demod`. H is obtained the same way as Y: a 640-slot impulse response
h(t) is built, and a second `fft_sdf` transforms it. h(t) is zero everywhere
except the first three slots after the prefix, which hold the three path
gains latched at the receiver's frame start. It is loaded into its FFT in the
same slots in which `ofdm_demod` loads the received data. Both FFTs are
therefore in lock-step, and H(k) leaves its FFT in exactly the clock in which
Y(k) leaves the demodulator. No alignment delays are needed.

`complex_div` forms the quotient without a complex divider:

    X = Y * conj(H) / |H|^2

- `cmul` (with `conj_b = 1`) gives Y*conj(H) at full 37-bit precision.
- Two multipliers and an adder give |H|^2. Both paths take 6 clocks.
- Two `cordic_div` instances divide the real and imaginary parts by |H|^2.

`cordic_div` is a fully unrolled linear-vectoring CORDIC. Linear vectoring
drives y toward zero by adding or subtracting shifted copies of x, and
collects the shifts as the quotient. Each of the 19 stages compares the sign
of the residue and adds or subtracts x * 2^j, for j from 18 down to 0. At the
same time it adds or subtracts 2^j from the quotient. The dividend is first
scaled by 2^14, so that all shifts are exact. Every stage has a register, so
a new division starts every clock. The quotient has 20 bits with 14 fraction
bits, is within one LSB of the exact value, and saturates outside +/-32.
Latency is 20 clocks for the divider and 26 for `complex_div`. The divisor
must be positive, which |H|^2 always is.

A recovered symbol is about +/-16384 (+/-1.0). On subcarriers in a deep fade,
where |H| is close to 0, the noise is divided by a small number. This is the
expected behaviour of zero-forcing equalisation, and it sets the Rayleigh BER
curve.

## Puncturing and demapping

`puncture` keeps only the sign of each equalised sample. The sign addresses a
two-word ROM [+1, -1]. The block counts slots from the frame start and drops
the first 128 of each 640-slot frame, which is the prefix copy of bins
384..511. The remaining 512 decisions are written into one bank of a two-bank
memory. A full bank is replayed one per symbol strobe, lowering the rate from
12.5 to 10 Msps. `qpsk_demod` takes the sign bits {I, Q}, reads
`[0, 2, 1, 3]` and shifts the 2-bit result out MSB first on the bit strobes.
An assertion checks that a new symbol never arrives before both bits of the
previous one have left.

## Departures from the reference design

- **FFT core.** The original uses a vendor FFT core in pipelined streaming
  mode. `fft_sdf` is a radix-2 SDF pipeline with the same configuration:
  512 points, natural order, unscaled, convergent rounding, prefix
  insertion. It does not have the vendor core's START/edone handshake,
  scaling schedule or block-floating-point options. It needs frames back to
  back.
- **Multiplexer structures.** The original builds zero padding and
  puncturing from very wide serial-to-parallel converters (1280-bit words),
  and h(t) from two time-division multiplexers. Here these are double-banked
  memories and slot counters, with the same outputs.
- **Noise generator.** The original noise generator uses Box-Muller combined
  with the central limit theorem. `wgn_gen` uses the central limit theorem
  alone, with 12 uniform numbers, and its tails stop at 6 sigma. This matters
  only for error rates below about 1e-9.
- **Unspecified values chosen here:**
  - path delays of 0, 1 and 2 samples
  - the receiver delays and sampling phases (derived above)
  - the fraction positions of all fixed-point formats
  - adder latencies not given by the original (1 clock in the up-converter,
    2 in the AWGN adder)
  - the QPSK ROM contents (any Gray mapping that the `[0,2,1,3]` demapper
    inverts)
- **Complex divider details.** The original forms conj(H) with a bitwise
  inverter on the imaginary part, which gives -x-1. `cmul` negates exactly.
  The original also delays H by 143 clocks to line it up with Y. Here the two
  FFTs run in lock-step, so no such delay exists. The CORDIC latency is 20
  clocks instead of the vendor core's 35.
- **Single clock.** The original model runs each block at its own sample
  rate. Here there is one 100 MHz clock with enables.
- **Host blocks.** The Bernoulli source, the BER counter and the JTAG
  co-simulation gateways are host-side parts of the original set-up and are
  not included. The top has plain bit ports, and the testbench plays the
  host.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). It
prints `TB_RESULT checks=N failures=M` and has a watchdog. What each one
compares against:

- **Reference models.** `tb_fft_sdf` checks forward and inverse transforms,
  prefix and frame timing against a floating-point DFT. `tb_ofdm_mod` and
  `tb_ofdm_demod` compare every output sample with a floating-point
  IDFT/DFT, to within 6 and 24 LSB.
- **Bit exactness.** `tb_cordic_div` and `tb_complex_div` compare against
  exact rational results. `tb_awgn_channel` checks every noise sample bit for
  bit against a second generator, as well as the noise statistics.
- **Statistics.** The noise and fading generators are checked for mean,
  variance and independence.
- **Cancellation.** `tb_phase_noise_cancel` sends random QPSK frames through
  a three-path circular channel with new random gains each frame. It checks
  that every subcarrier comes back as the sent symbol times 2^14.

`tb_ofdm_top` runs the whole link at its real size and parameters:

| phase | bits | noise (`es_no`) | requirement | result |
|---|---|---|---|---|
| 1 | 6144 | none | every bit correct, one bit every 5 clocks | 0 errors, no gaps |
| 2 | 3072 | 0.01 (about 10 dB Eb/N0) | some errors, fewer than 25 % | 1.9 % errors |
| 3 | 3072 | 0.5 | at least 30 % errors | 46 % errors |

Phase 2 covers only three channel draws, so its rate need not match the 2.3 %
Rayleigh average; `tb_ofdm_ber` below measures that properly. The testbench also prints the latency from the first bit in to the
first bit out, which is 30,771 clocks.
The testbench also counts how often each mechanism of the link acts, and
fails if any never does:

- cyclic prefixes sent
- zero-padding gap slots
- fading-gain changes
- receiver frame syncs
- punctured slots
- divisions
- noise samples added

It simulates about 155,000 clocks, which takes under a second with Verilator
after a build of about 10 seconds.

`tb_ofdm_ber` measures the bit error rate against Eb/N0 at 0, 5, 10 and
15 dB, with 400 frames (409,600 bits) per point. The fading changes only once
per frame, so a point samples only about 400 independent fades. Each point also restarts the
channel generators, so all four points see the same fades. The testbench
therefore also computes the BER expected for the fades actually drawn. For
each received frame it takes the receiver's path gains and forms |H(k)|^2 on
all 512 subcarriers. It then averages Q(sqrt(2 Eb/N0 |H(k)|^2)) over them.

| Eb/N0 | measured BER | expected for the drawn fades | Rayleigh average |
|---|---|---|---|
| 0 dB | 0.150 | 0.151 | 0.146 |
| 5 dB | 0.0668 | 0.0674 | 0.0642 |
| 10.1 dB | 0.0241 | 0.0245 | 0.0228 |
| 14.9 dB | 0.0086 | 0.0087 | 0.0079 |

The measured values agree with the conditional expectation to within 1.5 %.
This shows that the fixed-point link adds no loss of its own at these
levels. The measured values are 2 % to 9 % above the Rayleigh average. The
404 channel draws have a mean |H|^2 of 0.96 rather than 1, which accounts for
most of that. The test requires agreement within 10 % with the conditional
value and within 25 % with the Rayleigh average. It takes about 40 seconds.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
        rtl/ofdm_pkg.sv tb/tb_ofdm_top.sv --top-module tb_ofdm_top -Mdir obj
    ./obj/Vtb_ofdm_top

The package file must be named first. The other modules are found in `rtl/`
by name.

## Size

Coarse Yosys synthesis of the top with default parameters gives about 3,600
cells and 6,500 flip-flop bits (a vendor mapping would give LUT and DSP
counts; the reference implementation on a Virtex-5 used about 24,000
flip-flops, 67 block RAMs and 83 DSP48E slices, with vendor cores). Memories stay as memory cells, about 437 kbit
in total. Most of that memory is in the three 512-point FFTs, which each have
stage memories and a two-bank reorder memory, and in the two-bank buffers of
`zero_pad` and `puncture`.

## Changing the design

- `NFFT`, `CP_LEN` and the slot and bit dividers are in `ofdm_pkg` and
  `ofdm_timing`. `fft_sdf` takes any power of two through `LOG2N`. If you
  change the frame length, update `zero_pad`'s `NDATA`/`NZERO` to match.
- Path factors and seeds are parameters of `fading_channel`. `FACTOR` is
  Q1.16.
- The fixed receiver constants in `ofdm_top` (`RX_TAKE_I`, `RX_TAKE_Q`,
  `RX_SYNC_DLY`, `CAR_DLY`) must be re-derived, as described above, whenever
  a latency between the channel output and the receiver FFT changes.
