# Direct-sequence CDMA link with programmable Gold codes

This is a single-link direct-sequence spread-spectrum (DS-SS) CDMA transmitter
and receiver. Each information bit is spread over one full period of a
127-chip Gold code and sent as an all-digital BPSK waveform. The receiver
demodulates the waveform into small soft chip values, slides a 128-word
matched filter over them, and reports a bit each time the correlation
magnitude crosses a constant threshold. The sign of the peak gives the bit.

A 14-bit user key seeds the two 7-bit LFSRs that make the Gold code. Two
links with different keys can share the same band. A receiver holding the
wrong key sees only low cross-correlation and reports nothing. The test
bench checks this case.

Everything is synchronous to one master clock, written in SystemVerilog
(IEEE 1800-2017) and synthesizable. No vendor primitives are used.

## How one bit travels

```
 user_data ─► data sampler ─► spreader (XNOR) ─► BPSK modulator ─► out_ss_signal (6-bit samples)
                   ▲               ▲                   ▲  (DDFS carrier: phase acc + cos LUT)
                   │          Gold code gen ◄── user_key
           clock distributor (sample / chip strobes)
                                                         │
      ┌──────────────────────────────────────────────────┘
      ▼
 BPSK demodulator: LO (DDFS) × sample ─► accumulate over a chip ─► scale to -7..+7
      ▼
 serial-to-parallel (latest 128 soft chips) ─► matched filter (× ±1 code) ─► threshold detector
                                                    ▲                          ├─► flag_detect
                                     receiver PN generator (same key)          └─► rx_out_bit
```

With the defaults, one chip lasts 16 samples and one sample lasts one clock.
One bit is therefore 127 × 16 = 2032 clocks.

## The Gold code

`gold_code_gen` holds two 7-stage Fibonacci LFSRs. Stage 1 takes the feedback
and stage 7 is the output.

| LFSR | feedback taps (stages) | polynomial              | seed      |
|------|------------------------|-------------------------|-----------|
| g1   | 3, 7                   | x^7 + x^3 + 1           | key[13:7] |
| g2   | 1, 2, 3, 7             | x^7 + x^3 + x^2 + x + 1 | key[6:0]  |

The chip is the XOR of the two stage-7 outputs. Bit 6 of each key half goes
into stage 1. Both halves must be non-zero, or that LFSR sticks at zero.

The two polynomials form a preferred pair. So every key gives a code of
period 127, and any two codes of the family have a periodic
cross-correlation of only −17, −1 or +15. The g2 tap set is a
reconstruction: only its taps at stages 1, 2 and 7 are certain. Stage 3 was
chosen because it completes the standard preferred pair. The testbench
checks the three-valued property.

A key load (`rst_pn`, or reset) restarts both LFSRs at chip 0. The generator
raises `sos` (start of sequence) while chip 0 is on the output. Each bit
starts at chip 0, so `sos` also marks the bit boundaries on the transmit
side.

## Carrier and modulation

The carrier comes from a direct digital frequency synthesizer (`ddfs`). A
6-bit phase accumulator addresses a 64-entry cosine table (`cos_lut`), so
each phase step is 5.625°. The table holds round(31·cos(2π·a/64)). It stores
only the first quarter wave (17 values) and gets the other quadrants by
mirroring and negating. The DDFS output is registered, one clock behind the
address.

With `PHASE_INC = 4` one carrier cycle is 16 samples, which is exactly one
chip. The DDFS restarts at phase 0 on every chip start. Every chip therefore
begins at the same carrier phase, and the receiver's local oscillator can
stay coherent just by restarting on the same mark.

The spreader passes the code chip for a 1 bit and inverts it for a 0 bit. The
BPSK modulator sends +cos for chip 1 and −cos for chip 0. So a 1 bit goes out
as the code itself and a 0 bit as its negative. The output sample reaches
`out_ss_signal` two sample periods after its chip and phase were presented.

## Soft demodulation: why the receiver keeps -7..+7

A spread signal carries little energy per chip. If each chip were decided
hard, many chips would be lost in noise. Instead, the demodulator gives every
chip a 4-bit soft value, and the decision waits until 127 of them have been
combined in the correlator.

For each sample, the received value is multiplied by the local-oscillator
cosine. The product is 12 bits, carried as 15. The products are summed over
the chip. The sum of the previous chip is dumped when the first sample of
the next chip arrives (integrate-and-dump).

For a clean chip the sum is ±Σ cos² = ±7798. The scaling device shifts the
magnitude right by 10 bits, saturates it at 7 and restores the sign, so a
clean chip gives exactly ±7. Noise moves individual chips toward 0 or flips
them. The correlator averages this out.

If you change `SAMPLES_PER_CHIP` or `PHASE_INC`, re-derive `SCALE_SHIFT` so
that a clean chip still lands near 7. It is about
log2(SAMPLES_PER_CHIP · 31² / 2 / 7). The accumulator (20 bits) has room for
up to 64 samples per chip.

## Matched filter and detection

`serial_to_parallel` keeps the latest 128 soft chips: `window[0]` is the
newest, `window[127]` the oldest. `rx_pn_generator` runs its own Gold
generator with the same key for 127 clocks after a key load. It latches the
whole code as a 127-bit vector (bit k = chip k) and then raises `pn_ready`.
Detection is blocked during those 129 clocks.

On every new soft chip, `matched_filter` computes

    corr = Σ_{k=0..126} (pn[k] ? +1 : −1) · window[126 − k]

in one clock. The newest word is matched with the last chip of the code.
The window is one word longer than the code, and its oldest word is not
used.

When the window holds exactly one complete bit, corr = ±127 · 7 = ±889. At
every other alignment the code meets parts of two bits, each possibly
inverted. With random data these off-peak values stayed within about ±250 in
simulation.

`threshold_detector` uses a constant `THRESHOLD` of 400. Above it,
`flag_detect` goes high for one chip period, `rx_out_bit` takes the sign,
and `bit_strobe` pulses for one clock. No bit clock is recovered: the peak
itself says where each bit ended.

End to end, a bit appears on `rx_out_bit` 2041 clocks after `sos` rose for
it (one code period plus 9 pipeline clocks). The top-level testbench checks
this figure for every bit.

## Timing and synchronisation

The clock distributor makes no derived clocks. It makes one-cycle enables
from the master clock:

- `sample_en`: one per carrier sample, every `SAMPLE_DIV` clocks. It is tied
  high at the default of 1.
- `chip_start`: the first sample of a chip.
- `chip_adv`: the last sample of a chip. The code generator steps on it, so
  the new chip is ready at the next `chip_start`.

The receiver does not recover carrier phase or chip timing. In
`cdma_system`, the transmitter passes `out_chip_start` to the receiver. This
is its chip-start mark, delayed through the modulator pipeline so that it
lines up with `out_ss_signal`. It stands for a receiver that shares the
transmitter's clock and control, as on one FPGA. Using the receiver with a
real, independently clocked channel would need carrier recovery and chip
synchronisation in front of it. Neither is part of this design.

## Parameters (top level, `cdma_system`)

| parameter          | default | meaning |
|--------------------|---------|---------|
| `SAMPLE_DIV`       | 1       | master clocks per carrier sample |
| `SAMPLES_PER_CHIP` | 16      | carrier samples per chip |
| `PHASE_INC`        | 4       | DDFS phase step (carrier = f_sample · PHASE_INC / 64) |
| `SCALE_SHIFT`      | 10      | right shift of the chip sum before saturating to ±7 |
| `THRESHOLD`        | 400     | detection threshold on \|corr\| |

These constants live in `cdma_pkg`: `PN_LEN` = 127, `WIN_LEN` = 128, 14-bit
key, 6-bit samples, 15-bit products, 4-bit soft chips and a 16-bit
correlator output. The code length is tied to the 7-bit LFSRs, so `PN_LEN`
is not a free parameter.

## Top-level ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | master clock; synchronous active-high reset (also loads the key) |
| `rst_pn` | in | 1 | reload `user_key` into both code generators; restarts the code |
| `user_key` | in | 14 | g1 seed in [13:7], g2 seed in [6:0] |
| `user_data` | in | 1 | information bit, sampled on the chip step that starts chip 0 |
| `out_ss_signal` | out | 6 | transmitted BPSK samples, signed |
| `sample_en`, `chip_en` | out | 1 | sample and chip-step strobes |
| `pn_seq`, `sos`, `chip_signal`, `data_bit`, `data_clk` | out | 1 | transmitter internals: chip, start of sequence, spread chip, bit being sent, bit clock |
| `soft_chip` / `soft_valid` | out | 4 / 1 | demodulated chip −7..+7 and its strobe |
| `correlator_out` / `corr_valid` | out | 16 / 1 | matched-filter output and its strobe |
| `flag_detect`, `rx_out_bit`, `bit_strobe` | out | 1 | bit found, its value, one-clock pulse per bit |

## Module hierarchy

```
cdma_system
├── cdma_transmitter
│   ├── clock_distributor
│   ├── gold_code_gen
│   ├── data_sampler
│   ├── signal_spreader
│   └── bpsk_modulator ── ddfs ── cos_lut
└── cdma_receiver
    ├── bpsk_demodulator
    │   ├── ddfs ── cos_lut        (local oscillator)
    │   ├── multiplier
    │   ├── accumulator
    │   └── scaling_device
    ├── serial_to_parallel
    ├── rx_pn_generator ── gold_code_gen
    ├── matched_filter
    └── threshold_detector
```

`cdma_pkg` holds the shared constants and types. Each module's opening
comment gives its timing in detail.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. From the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/cdma_pkg.sv tb/tb_cdma_system.sv --top-module tb_cdma_system
./obj_dir/Vtb_cdma_system
```

Substitute any other testbench name. All of them run in well under a second
of simulation time.

What the testbenches establish:

- `tb_cdma_system` runs the whole link at the default sizes for 61 random
  bits under two keys. It reloads the key mid-bit, which loses that bit as
  expected. It checks every received bit, the ±889 peak and the 2041-clock
  latency. It also counts that 1s, 0s, threshold rejections, `sos` marks and
  the key reload all occurred.
- `tb_cdma_system_div` runs the same test with one sample every 2 clocks
  and 8 samples per chip. The latency is then 2046 clocks: the five stages
  clocked by the sample strobe take two clocks each.
- `tb_cdma_receiver` plays the transmitter with added noise (±16 on a
  ±31 signal). It listens with the right key, which must find every bit,
  and with another Gold-family key, which must find none.
- The block testbenches compare against models written independently in the
  testbench: the LFSR recurrences, real-valued cosine, exact integer chip
  sums, and so on.

## Where this design makes its own choices

The block structure and the main numbers are fixed by the specification this
RTL implements:

- two 7-bit LFSRs and a 127-chip Gold code;
- a 14-bit key;
- a LUT-based DDFS with 5.625° phase steps and 6-bit samples;
- a 15-bit product;
- soft chips of −7..+7;
- a 128-word window;
- a constant threshold.

The following are this implementation's own choices:

- **Timing:** the sample and chip rates (16 samples per chip, 16 samples per
  carrier cycle), the enable-strobe clocking, and all pipeline latencies.
- **Code details:** the fourth g2 tap (stage 3, see above), the key bit
  order, and one information bit per code period.
- **Scaling and threshold:** the shift-and-saturate scaling and the
  threshold value of 400.
- **Window alignment:** the 128th window word is unused because the code has
  127 chips.
- **Receiver timing:** taken from the transmitter rather than recovered.
- **Correlator width:** 16 bits.

Not included:

- Combining several users' signals into one channel. Only one link is
  built. More links would need more transmitter/receiver pairs and an adder,
  whose scaling has not been defined.
- Carrier or timing recovery.
- The on-chip logic analyser cores used to observe an FPGA build.
