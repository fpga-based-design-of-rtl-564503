# Pulsed-OFDM baseband in SystemVerilog

This repository holds synthesizable SystemVerilog for the digital baseband of a
Pulsed-OFDM transceiver, after "FPGA-Based Design of a Pulsed-OFDM System". Each
block has a self-checking testbench, and an end-to-end testbench runs the whole
transmitter and receiver over a multipath channel model.

## What Pulsed-OFDM is

Pulsed-OFDM is a variant of multi-band OFDM for ultra-wideband radio.

- The transmitter builds an ordinary 32-tone OFDM symbol with an IFFT.
- It then inserts three zeros after every time sample (upsampling by K = 4). Each
  symbol is then 128 samples long and consists of short pulses.
- The spectrum of the pulsed signal holds K = 4 copies of the OFDM spectrum.

At the receiver, the 128 samples of a symbol split into four polyphase branches:
r[4n], r[4n+1], r[4n+2] and r[4n+3]. The transmitted signal is zero except at
every fourth sample, so each branch holds one 32-point OFDM symbol. That symbol
has passed through a different polyphase component of the multipath channel's
impulse response, and so through a different frequency response. A 32-point FFT
per branch and a maximal ratio combiner turn this into multipath diversity. In
Pulsed-OFDM this diversity gain is what the extra bandwidth buys.

## Block chain

```
TX: bits -> conv_encoder -> p2s -> interleaver_deinterleaver(opmode 0)
        -> qpsk_mapper -> tx_input_buffer -> mrmdc442_fft -> tx_output_buffer
        -> conjugation -> upsampler -> tx_out (to DAC)

RX: rx_in (from ADC) -> rx_input_buffer -> mrmdc442_fft -> rx_output_buffer
        -> mrc_combiner (with channel estimates h) -> qpsk_demapper
        -> interleaver_deinterleaver(opmode 1) -> viterbi_decoder -> bits
```

`pulsed_ofdm_top` instantiates both chains. Its ports are plain signals:

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, one per upsampled sample; asynchronous active-low reset |
| tx_vin, tx_din | in | 1 | data bit and its valid strobe |
| tx_out_re/im, tx_vout | out | 20 | upsampled I/Q samples for the DAC |
| rx_vin, rx_in_re/im | in | 6 | received I/Q samples from the ADCs |
| h_re/h_im | in | 4 x 8 | channel estimate of each branch, 6 fractional bits |
| rx_dout, rx_vout | out | 1 | decoded bit and its valid strobe |

### Clocking and throughput

There is a single clock, and one clock equals one sample of the upsampled stream.

- An OFDM symbol therefore takes 128 clocks.
- It carries 32 QPSK symbols, which is 64 coded bits or 32 data bits.
- The transmitter must be fed at most one data bit per 4 clocks on average.
- The input buffers hold two frames (ping-pong), so short bursts are absorbed.

Every block uses a valid strobe. The multi-lane blocks (FFT and buffers) move one
group of four samples per `ce` pulse, and `ce` comes every 4 clocks.

## The blocks

**conv_encoder** is a rate 1/2 convolutional code with constraint length 7 and
generators 133 and 171 (octal). The source only says "rate 1/2"; the generators
are this design's choice. **p2s** sends each coded pair as two serial bits. At
rate 1/2 nothing is punctured.

**rect_interleaver / interleaver_deinterleaver.** Two block interleavers run one
after the other:

- The inter-interleaver spreads 150 bits over the three sub-bands (NA = 50, NB = 3).
- The inner interleaver spreads 50 bits over the tones of one symbol (NA = 5, NB = 10).

Bits are written in arrival order into one bank of a two-bank RAM. They are read
back as out[i] = in[i/NA + NB*(i mod NA)]. Only the block sizes come from the
source; this rule (the usual multi-band OFDM one) is this design's choice.

De-interleaving reads with the inverse order, in[(j mod NB)*NA + j/NB]. Only the
read-address generator changes between the two modes. The combined block uses
`opmode` multiplexers:

- `opmode` = 0: inter-interleave, then inner-interleave.
- `opmode` = 1: de-inner, then de-inter.

Once a bank is full, it is read out at one bit per READ_STRIDE = 2 clocks. When
the next bank fills in time, reading continues into it without a gap, so reading
never falls behind writing.

**qpsk_mapper** maps straight to the *conjugate* of QPSK, so that the FFT after it
computes an IFFT once its output is conjugated. Its structure:

- A serial-to-parallel register forms a 2-bit address.
- The address selects one of four ROM words: 1101, 1111, 0101, 0111.
- The upper two bits of the word are the real part and the lower two the
  imaginary part, each a 2-bit two's-complement value of +1 or -1.
- An output register is cleared whenever the delayed valid is low.

**tx_input_buffer.**

- It stores the 32 symbols of a frame in four 8-deep RAMs per part (real and
  imaginary), with two banks.
- Symbol n goes to lane n/8 at address n mod 8.
- Reading address m gives the group x[m], x[m+8], x[m+16], x[m+24], which is what
  the FFT expects.
- A free-running counter (2 bits of clock within the group, 3 bits of group)
  makes `ce` every 4 clocks.
- A frame starts only when the group count is 0 and a bank is full.
- `vout1` marks a valid group and `vout2` the first group of a frame.

**mrmdc442_fft** is the core: a 32-point pipelined multi-path delay commutator
FFT with radices 4, 4 and 2. Four samples enter and four results leave per `ce`.
The decomposition is n = 8 n1 + 2 n2 + n3 and k = k1 + 4 k2 + 16 k3, decimation
in frequency:

1. Stage 1 is a radix-4 butterfly across the four lanes (over n1). It is followed
   by the twiddle W32^(m k1), where m is the group index.
2. A delay commutator regroups the data. Lane a is delayed 2a groups; a rotating
   switch then sends input lane (rot - b) mod 4 to output lane b; lane b is then
   delayed 6 - 2b groups. After this, the four n2 values of one (n3, k1) pair sit
   on the four lanes.
3. Stage 2 is a radix-4 butterfly (over n2) with twiddle W32^(4 n3 k2).
4. Stage 3 is a radix-2 butterfly between two consecutive groups of the same lane
   (over n3). The first result goes out at once; the second is held for one `ce`.

Results come out in digit-reversed order: lane l of output group g is tone
g/2 + 4 l + 16 (g mod 2). The first result group of a frame appears one clock
after the tenth `ce`, counting the `ce` that took the frame's first group.
Frames must start a multiple of 8 `ce` pulses apart while data are in flight. The
input buffers guarantee this by starting frames only on 8-group boundaries of
their free-running counter.

Twiddles are computed when the design is elaborated. They come from a 9-entry
quarter-wave cosine table, rounded to the coefficient format. The data are not
scaled. Each twiddle product is rounded back to DFRAC fractional bits.

| instance | input | coefficients | data fraction | output |
|---|---|---|---|---|
| transmitter | 2 bits (Fix_2_0) | Fix_12_10 | 11 bits | 19 bits |
| receiver | 6 bits | Fix_13_11 | 8 bits | 20 bits |

The coefficient formats are the ones given in the source. The 19-bit and 20-bit
result widths and the 6-bit receiver input are worked out from the buffer RAM
sizes the source reports: 2432 = 4 x 32 x 19, 10240 = 16 x 32 x 20 and
3072 = 16 x 32 x 6.

**tx_output_buffer.**

- It writes the four lanes of each result group one per clock, through a 4:1
  multiplexer, at their digit-reversed tone addresses. This uses two 32-deep
  banks per part.
- It reads tones 0..31 in order and holds each sample for 4 clocks.
- Reading continues into the next bank without a gap.

**conjugation** negates the imaginary part; this completes the IFFT. It is
combinational and one bit wider, so negation cannot overflow.

**upsampler** passes a sample on the first clock of each 4-clock period and zero
on the other three. Its outputs are registered, giving one clock of delay.

**rx_input_buffer** writes the 128 samples of a symbol so that branch p = n mod 4
sits in its own frame:

- Lane (n/4)/8 at address 8 p + (n/4) mod 8.
- Two banks, four 32-deep RAMs per part.

It then reads the four branches one after another as four FFT frames. `ch` gives
the branch, and one FFT serves all four branches.

**rx_output_buffer** collects the four branch FFTs of a symbol at their
digit-reversed addresses. Its 8-bit counter is {bank, branch, group, lane}. It
outputs tone by tone, with all four branches at once, every 4 clocks.

**mrc_combiner** applies maximal ratio combining per tone:

  Z = sum_p conj(h_p) Y_p / sum_p |h_p|^2

The numerator and power sums are formed in one registered stage. Two pipelined
**cordic_divider** units (linear-mode CORDIC, QW - 1 = 19 iterations, one per
stage) divide the real and imaginary parts. Latency is 20 clocks. The channel
estimates are inputs; estimating them is not part of this design.

**qpsk_demapper** decides bit = 1 for a positive value and sends the real bit
first.

**viterbi_decoder** is a hard-decision decoder with 64 states:

- Add-compare-select uses 8-bit path metrics, compared modulo 256.
- Survivors are kept by register exchange to a depth of 36.
- The output is taken from the best state, so each decoded bit leaves 35 pairs
  after its code pair arrived.

## Design choices beyond the source

- **Not built:**
  - Cyclic prefix and guard interval insertion and removal; no format is given.
    The receiver counts 128-sample symbols from reset.
  - Channel estimation.
  - The DAC, ADC, analog front end, mixers and sub-band hopping.
  - The equal-gain combiner. It is an alternative to maximal ratio combining:
    cheaper, weaker.
  - The parallel-channel receiver FFT arrangement. The sequential one is built.
- **Control counter:** the transmitter input buffer's control counter is 5 bits
  (clock in group plus group). The source describes a 6-bit counter; its exact
  use is not given.
- **vout1 / vout2:** these are read as "valid" and "first of frame/block". The
  output buffers give a single sample-valid instead.
- **Mapper timing:** the mapper presents a symbol for one clock, three clocks
  after its second bit.
- **One interleaver per direction:** the top uses two interleaver-deinterleaver
  instances, one per direction, so that transmit and receive can run together.
  The combined block is still a single module with an `opmode` input.
- **Reset:** all registers use an asynchronous active-low reset. The source
  mentions a reset only for the mapper's output register.
- **Hard decisions in the receiver:** the source's receiver de-interleavers
  have four times the memory of the transmitter interleavers (1200 and 400 bits
  against 300 and 100). That hints at 4-bit soft values per coded bit. Its
  de-mapper is described only as comparators, so this design passes one hard bit
  per coded bit and decodes with Hamming-distance branch metrics. A soft-decision
  version would widen the de-interleaver data path and the decoder's branch
  metrics.
- **Survivor memory:** the source's decoder uses block RAMs, which suggests
  traceback. This design uses register exchange, which needs no RAM but more
  flip-flops (about 2800).
- **FFT delays in registers:** the source's FFT also uses a few block RAMs
  (672 bits at the transmitter). Here every FFT delay is a register.

## Verification

Each block has a testbench `tb/tb_<block>.sv`. Every testbench:

- ends by printing `TB_RESULT checks=N failures=M`;
- has a watchdog;
- uses `$urandom` stimulus.

The FFT test compares against a floating-point DFT. The interleaver tests check
the permutation and its inverse. The Viterbi test flips one coded bit in every
40 and checks the output delay. The buffer tests check tone and lane ordering,
the one-group-per-4-clocks pacing and gap-free streaming between frames.

`tb_pulsed_ofdm_top` runs the top at its default parameters:

- It sends 3000 random bits through the transmitter.
- The channel model is a 4-tap channel (1, 0.5, -0.75, 0.25), then an ADC model
  that halves, adds noise and saturates to 6 bits.
- It passes the exact branch channel responses to the receiver as h.
- It checks every decoded bit.

It also counts each mechanism and fails if one never happens: zero insertion,
interleaver and de-interleaver blocks, transmitter frames, each receiver branch,
bank swaps, divisions, and coded-bit errors corrected by the decoder. The noise
is set so that about a hundred coded bits arrive wrong and all are corrected.

`tb_fft_rx_resolution` measures the FFT at receiver wordlengths with Fix_13_11
coefficients. The inputs are 40 random frames of full-range 6-bit samples, and
the reference is a double-precision DFT. It requires every frame's error, RMS
relative to its RMS output, to be below 2^-9 (9 bits of resolution). The worst
frame reaches about 12.5 bits. With 7-bit coefficients the same test drops to
about 6 bits and fails.

Plain Verilator runs a block test, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pofdm_pkg.sv \
    tb/tb_mrmdc442_fft.sv --top-module tb_mrmdc442_fft
./obj_dir/Vtb_mrmdc442_fft
```
