# Multirate digital systems: a transparent channelizer, an S-PPM optical link and two gate-level examples

This repository holds synthesizable SystemVerilog for the digital hardware used as case studies by an
early (pre-synthesis) power-estimation method for multirate systems. The method counts registers,
multipliers, adders, rounding blocks, clock lines and signal lines from a block's parameters. This RTL
gives those blocks a working form that can be simulated and synthesized. There are four independent
designs:

1. **DTP chain.** A Digital Transparent Processor for a satellite payload. It takes a real IF signal
   sampled at Fs = 4 f0, splits it into J frequency channels, passes the channels through a switch
   interface, recombines them and rebuilds the real IF signal. It is the largest of the four, and most
   of what follows is about it.
2. **S-PPM link.** The digital coder and decoder of a synchronized pulse-position modulation for
   optical biotelemetry. A 40 MHz master clock sends one 3-bit symbol per period, which is 120 Mb/s.
3. **NAND full adder.** A 13-gate full adder used to show weighted node toggle counting.
4. **SFG FIR.** The two-tap FIR filter y(n) = a0 x(n-1) + a1 x(n-2) used as a signal-flow-graph example.

`mrds_top` puts the four designs side by side. Each design brings out its own ports, and they share
nothing but `clk`/`rst_n`.

## The DTP chain

```
adc_data (Fs, real, 13 b)
  -> if2a                    fs/4 down-mix + half-band filter + decimation by 2  -> analytic, Fs/2
  -> analysis_channelizer    vcpf_analysis -> dprb(half rotate) -> fft -> dprb(bit reverse)
  -> sw_out_*                J channel words per block, channel 0 first (switch interface)
  <- sw_in_*                 same format, coming back from the switch
  -> synthesis_channelizer   fft(inverse) -> dprb(bit reverse) -> vcpf_synthesis
  -> a2if                    interpolation by 2 + fs/4 up-mix, real part            -> dac_data (Fs)
```

The on-board switch is left out. Its two sides are the `sw_out_*` and `sw_in_*` ports of `dtp_top`.
A loopback (`sw_in = sw_out`) gives an identity path with unit gain. A tone comes back at the DAC
about 66 dB above the residual.

### Rates and handshakes

There is one clock. Every stage moves data with a `valid` strobe and has no back-pressure.
- **ADC to IF2A:** at most one sample per clock. The rate is set by `adc_valid`.
- **IF2A output:** one complex sample every two ADC samples.
- **Analysis channelizer:** for every D = J/2 analytic samples it emits one block of J channel words.
  The words of a block come out back to back. `sw_out_first` marks channel 0 and `sw_out_ch` numbers
  the channels.
- **Synthesis channelizer:** accepts one block of J words and returns D analytic samples, one every
  two clocks.
- **A2IF:** turns each analytic sample into two real samples on consecutive clocks.

With the ADC running at one sample per clock, every stage keeps up. Each buffer stage has an `overrun`
flag, which rises if a block starts before the previous one was consumed. `sat` is the OR of every
saturation flag in the chain.

### Fixed-point arithmetic: the SRB

Every width reduction uses `srb` (saturation and rounding block) with parameters `(n_i, n_H, n_L, b)`.
It rounds off `n_L` LSBs, half up when `b = 1`, and saturates away `n_H` MSBs, leaving
n_i - n_H - n_L bits. `ovf` reports the saturation. The filters use two SRB levels:
- **After each multiplier:** an n_si x n_h product loses 1 MSB and n_h - n_m - 1 LSBs, keeping
  n_si + n_m bits.
- **After the adder tree:** the sum goes down to n_so bits. The tree's growth bits are *saturated*,
  so a filter keeps the scale of its input. Coefficients are stored with 1.0 = 2^(n_h-1).

### Half-band filters (`if2a`, `a2if`, `hb_branch`)

Mixing by fs/4 multiplies the input by 1, -j, -1, j. The even input samples therefore feed only the
real part and the odd samples only the imaginary part, each with a sign that alternates every pair.
A half-band filter has every other coefficient zero except the centre tap. After decimation by 2,
the real part is just a delayed copy of the even samples (a FIFO). Only the imaginary part goes
through an N-tap filter (`hb_branch`). The branch has these stages:
- a status register of N samples
- N constant multipliers and their SRBs
- a register level
- a pipelined adder tree (`adder_tree`, one register every `UBL` adder levels)
- the output SRB

Latency is 2 + ceil(levels/UBL) clocks.

```
if2a:  re[m] = s_e[m - (N/2 - 1)]          s_e[m] = (-1)^m  x[2m]
       im[m] = sum_i c_i s_o[m - i]         s_o[m] = -(-1)^m x[2m+1]
a2if:  x[2m]   =  (-1)^m re[m - N/2]
       x[2m+1] = -(-1)^m sum_i c_i im[m - i]
```

The two FIFO lengths differ by one on purpose. When decimating, the centre of the N-tap branch
lines up with even sample m - (N/2 - 1). When interpolating, the new odd sample falls between u[m-N/2]
and u[m-N/2+1]. The coefficients are the odd taps of a Hann-windowed half-band low-pass, computed
at elaboration time (`c_i`, i = 0..N-1, centred between taps N/2-1 and N/2), and scaled by 2.

### Analysis channelizer: the part that needs care

This is an oversampled (2x) polyphase filter bank. There are J channels, but a new block is produced
every D = J/2 input samples rather than every J, so adjacent channels overlap without aliasing gaps.
The prototype low-pass h has TAPS x J coefficients: a Hann-windowed sinc with cut-off pi/J.

**`vcpf_analysis`** (variable-coefficient polyphase filter) computes, after each block of D inputs
ending at sample x[bD + D - 1]:

    v_p[b] = sum_{k=0}^{TAPS-1} h[p + kJ] * x[bD + D - 1 - p - kJ],   p = 0 .. J-1

There is one multiplier per tap k. Its coefficient changes every clock, which is why the filter is
called variable-coefficient. Each tap reads its coefficient from its own `buffered_rom` of J words,
addressed by p, with one clock of latency for the registered address. The status register is
TAPS x J + D samples long. The extra D samples let the next block arrive while the current block is
being computed; `off` counts how far it has moved. The J outputs are issued in the order
p = 0, J-1, J-2, ..., 1, so a forward FFT then places a tone at +2 pi c / J in channel c.

**Half rotation.** The bank decimates by D = J/2, not J. The polyphase outputs of block b
therefore carry a phase of exp(j pi c b) in channel c, which flips the sign of odd channels on odd
blocks. The input `dprb` removes it by reading odd blocks circularly shifted by J/2
(`ORDER_HALF_ROTATE`).

**`dprb`** (dual-port RAM buffer) has two banks of J words. One bank is written in arrival order
while the other is read in a permuted order: bit reversal, or the half rotation above. A bank is
read once its last word is written. The output is registered.

**`fft`** is a radix-2 decimation-in-frequency FFT with single-path delay feedback. It is a cascade
of log2 J `fft_stage`s, each built from:
- a FIFO of J/2^(s+1) words
- a butterfly
- a twiddle `buffered_rom`
- a complex multiplier, with its product rounded back to W bits

Every butterfly halves, so the FFT computes the DFT divided by J. Twiddles are scaled by 2^(NW-1)-1,
so that 1.0 fits in NW bits. The FFT drops the J-1 words of its initial lag, so its output starts on
a block boundary. The output is in bit-reversed order; the second `dprb` restores channel order.

The 13-bit polyphase outputs are MSB-aligned into the NF = 20-bit FFT word.

### Synthesis channelizer

This is the mirror image of the analysis side: an inverse FFT (the same stages with conjugate
twiddles), a bit-reversing `dprb`, and `vcpf_synthesis`. The synthesis network keeps the last
2 x TAPS blocks, which is 2J words per tap, and forms D samples per block:

    y[bD + i] = sum_{r=0}^{2 TAPS - 1} g[i + rD] * u_(b-r)[(i + rD + D par(b-r)) mod J],  i = 0..D-1

`par(b)` is 1 for odd blocks. It applies the same J/2 rotation as on the analysis side; without it,
odd channels cancel at the output. The network gets a gain of 2^GSH = J/2, the gain that
interpolation by J/2 needs, so that analysis followed by synthesis has unit gain.

### DTP parameters (defaults)

| module | parameter | default | meaning |
|---|---|---|---|
| if2a | NSI / NSO / NH / NM / N | 13 / 11 / 15 / 3 / 100 | input, output, coefficient, extra product bits; branch taps |
| vcpf_analysis | NSI / NSO / NH / NM / TAPS / J | 13 / 13 / 15 / 3 / 23 / 8 | |
| fft | W / NW / J | 20 / 17 / 8 | data word, twiddle word, points |
| vcpf_synthesis | NSI / NSO / TAPS / J | 20 / 13 / 23 / 8 | |
| a2if | NSI / NSO / N | 13 / 13 / 100 | |
| all trees | UBL | 2 | adder levels per register level |

`dtp_top` runs IF2A at 13 -> 13 bits, so that its output can feed the 13-bit channelizer directly.
All sizes are parameters. The evaluated configurations (16 to 1024 channels, 150 to 400 taps, other
word sizes) are reached by overriding them. Lengths must be powers of two where an FFT or a channel
index is involved.

## The S-PPM optical link

A symbol s of 3 bits is sent in one period T = 25 ns of the 40 MHz master clock `CLOCK_M`:
- A **sync pulse** is sent at the clock edge in every period. The receiver can recover the clock
  from it.
- A **data pulse** is sent at s T/8 when s > 0. Symbol 0 sends only the sync pulse.

With uniformly distributed symbols the average is 1 + 7/8 = 1.875 pulses per symbol.

**Transmitter (`sppm_tx`).** It contains:
- `pll_tx`: four copies of the clock delayed by T/8, 2T/8, 3T/8 and 4T/8.
- `sppm_coder`: a symbol buffer loaded on the clock edge while `en` is high, and LUT1. LUT1 is high
  while the 4-bit phase word {phi1..phi4} equals the code of the buffered symbol's slot.
- Two self-resetting flip-flops (`pulse_ff`): FF1 is triggered by the clock and FF2 by LUT1. Each
  turns a rising edge into a 500 ps pulse.
- An OR of the two pulse trains, which gives the transmitted pulse train.

In slot s (time s T/8 .. (s+1) T/8), phase k is high when k <= s < k + 4. The phase words in slots
0..7 are therefore `0000, 1000, 1100, 1110, 1111, 0111, 0011, 0001` (phi1 written first). Each slot
has a distinct word, so one sample of the four phases identifies the slot.

**Receiver (`sppm_decoder`).** Every received pulse clocks four flip-flops that sample the recovered
phases. The sync pulse samples `0000`; a data pulse later in the period overwrites that with the
word of its slot. On the next recovered-clock edge the word moves to the data buffer. LUT2 turns it
back into the symbol, and the output buffer holds the result. A symbol therefore appears two periods
after it was sent. A word that is not a slot code sets `code_err`.

Clock recovery, the receive delay, the laser driver and the photodiode front end are analog. They are
not part of the RTL: the recovered clock and phases are inputs of the decoder. `pll_tx` and `pulse_ff`
are behavioural timing models with `#` delays. They simulate the right pulse timing, and synthesis
keeps their logic but ignores the delays.

**Departure.** The overview of the coding puts "011" at 2T/8, while the implementation chapter's
example puts "010" at 2T/8, which is slot = symbol value. This design uses slot = symbol value.

## Gate-level examples

**`fa_nand`** is a full adder of 13 gates: two-input NANDs and inverters. The gate outputs d1..d13
are brought out. d12 is the sum and d13 the carry. The worst-case input transition (1,1,1) ->
(1,0,0) toggles nodes with a weighted count of 11 (d5 has fan-out 3), or 10 without the two outputs.

**`sfg_fir`** is y(n) = a0 x(n-1) + a1 x(n-2) with N = 8-bit data and A = 8-bit coefficients. It
has two registers, two multipliers whose products are kept on N+A-1 bits, and one adder of N+A bits.
The product (-128) x (-128) does not fit in N+A-1 bits and wraps. This follows the example's sizing.

## Where this design departs from, or adds to, the original description

- **Output SRB of the filters.** The hardware-complexity table gives the branch's final SRB as
  (n_si+n_m+n_ACC, 0, n_si+n_m+n_ACC-n_so): the tree growth bits are rounded off. That leaves the
  filtered branch 2^n_ACC below the FIFO branch. This design keeps the same word sizes but saturates
  the n_ACC growth bits (n_H = n_ACC, n_L = n_si+n_m-n_so).
- **Not given, so chosen here:**
  - the half-band and prototype coefficients (windowed sinc)
  - the polyphase output order
  - the synthesis rotation and gain
  - the FFT architecture (SDF radix-2) and its twiddle scaling
  - all handshakes and latencies
  - UBL = 2
  - the 13-bit IF2A output inside `dtp_top`
  - the FIR coefficient width A = 8
- **S-PPM:** the slot ordering noted above. The number of bits per symbol is fixed at 3; the 2- to
  6-bit variants are not built.

## Simulating

Every testbench in `tb/` is self-checking. Each prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_mrds_top \
    rtl/dtp_pkg.sv rtl/sppm_pkg.sv tb/tb_mrds_top.sv
./obj_dir/Vtb_mrds_top
```

Pass the matching `tb/tb_<block>.sv` and `--top-module` to test a single block.

`tb_mrds_top` runs the whole top at its default sizes, in about 15 s of simulation. It counts each
mechanism and fails if any count is zero:
- a tone in an even and in an odd channel, passed through the chain
- a channel blanked in the switch
- SRB saturation
- no buffer overrun
- every S-PPM slot value, with no code error
- all full-adder inputs and the W = 11 transition
- FIR coefficient changes

What the other testbenches check:
- **Bit-exact against an integer model:** `tb_if2a`, `tb_a2if`, `tb_vcpf_analysis`,
  `tb_vcpf_synthesis` and `tb_srb`.
- **Against a floating-point DFT:** `tb_fft`, forward and inverse, within 10 LSB.
- **Channel selectivity:** `tb_analysis_channelizer`, which requires more than 30 dB rejection two
  channels away.
- **Gain and purity:** `tb_synthesis_channelizer` and `tb_dtp_top`.
- **Pulse timing:** the S-PPM testbenches, to the picosecond.

Shared reference functions live in `tb/dtp_tb_util.svh`.
