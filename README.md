# Pass-band software-radio transceiver: one antenna chain in SystemVerilog

This design is the digital signal path of a TDD radio for a UMTS-like
DS-CDMA air interface: 3.84 Mchip/s, spreading gain 4, 8 or 16, QPSK or BPSK, two
synchronous users per slot and a 5 MHz channel. It covers one antenna. The
transmitter turns data symbols into D/A codes, and the receiver turns A/D
samples into symbol decisions.

Both sides rest on one idea. The sample rate is tied to the intermediate
frequency by

    fs = f_IF / (l ± 1/4)        (l a positive integer)

so f_IF appears at fs/4 after sampling. Moving a signal to or from fs/4 is
multiplication by j^n. That is a cycle through the real part, the negated
imaginary part, the negated real part and the imaginary part, so no
multiplier is needed. The converters run at a rate set by the signal
bandwidth, not by the IF. The receiver never goes back to base-band: it
estimates the channel, builds the matched filter and detects the symbols
directly on the real pass-band samples.

With 4 samples per chip, fs = 15.36 MHz. The default D/A oversampling of 8
gives f_d = 122.88 MHz, which is the single clock of the design.

## Signal path

```
 host writes ──► config registers (sdr_top)
                   │ training, data, codes, sf, taps, 1/alpha, mode
                   ▼
 tdd_slot_timer ─► fs_tick / chip_tick / Tx-Rx slots
                   │
 TX  burst_builder ─► pulse_shaper ─► if_upconverter ─► da_comp_filter ─► dac_out
     (chips, all    (RRC, 4 samples   (Re{j^±n x[n]})   (×8, ternary taps)  (f_d)
      users summed)   per chip)

 RX  adc_in ─► rx_frontend:
               rx_sample_buffer ─► channel_estimator ─► mf_synth ─► matched_filter ─► carrier_sync ─► decisions
               (burst memory)      (band-limited LS      (f = s*g)   (v at symbol       (decision-
                                    in the DFT domain)                instants only)     directed PLL)
        └────► nb_decimator (mode 2: (-j)^n mix, boxcar low-pass, decimate)

 host_valid / host_data ◄── mode multiplexer (modes 1-4)
```

## Transmitter

**Burst.** Each user sends a training part and then a data part in the same
slot. The training is a common QPSK base sequence `a` of M = 456 chips.
User u sends it cyclically shifted by u·Q chips, where Q = 57 is the channel
window per user. It is preceded by a P = 56-chip cyclic prefix, so the
receiver's M-chip window sees a circular convolution. Then come 976 data
chips, a[k] = b[⌊k/N⌋]·s[k mod N], with s the user's ±1 code. The data
symbols b are QPSK, or with CTRL bit 9 set BPSK: bit 0 of the written
symbol goes on both rails, b = ±(1+j). Putting BPSK on the diagonal lets it
use the QPSK path unchanged. The
transmitter adds the chips of both users. This makes it a two-user source
for testing the receiver through a loop-back.

**Pulse shaping** (`pulse_shaper`). This is a polyphase interpolator with 4
samples per chip. It uses a root-raised-cosine pulse, roll-off 0.22, 33 taps
over 8 chips. The taps are constants in `sr_pkg`, scaled so the peak is 4096:

    h[i] = round(4096 · rrc((i-16)/4) / rrc(0))

**fs/4 up-conversion** (`if_upconverter`). This computes x'[n] = Re{j^(±n) x[n]}.
The sign is the one in fs = f_IF/(l ± 1/4), selected by CTRL bit 5.

**D/A compensation filter** (`da_comp_filter`). x' is up-sampled by L_DA = 8
and filtered by an 8-tap FIR whose taps are 0, +1 or −1. Since the
up-sampled signal has only one non-zero sample in every 8, each output code
is just h[n mod 8]·x'[⌊n/8⌋]: zero, x' or −x'. The taps come from a host
register. Choosing them, by searching all 3^8 patterns for the best response
at the IF against the D/A's sinc roll-off, is done off-line.

## Receiver

This is the hardest part to follow. All of it works on the real A/D samples
r[n], whose useful replica sits at fs/4.

**Capture** (`rx_sample_buffer`). The burst memory is written from the first
sample of the receive slot. It holds (P + M + D)·4 + Q·4 = 6180 samples: the
whole burst plus the channel tail. If the '−' IF sign is used, the wanted
replica is at 3fs/4, which is a mirrored spectrum. Setting CTRL bit 8 then
stores odd samples negated, r[n]·(−1)^n. That moves the replica to fs/4, so
everything after it is the same for both signs.

**Channel estimation** (`channel_estimator`). Let w be the L = 4M = 1824
samples of the training window, which starts after the prefix. All users'
channels, placed one after the other, form g. Because all users send
cyclic shifts of one sequence, w is the circular convolution of the
sequence (at 4 samples per chip) with g, plus noise. The least-squares
estimate is then a division in the DFT domain:

    G_k = W_k / (alpha_k · L),    g = IDFT{G}

Here alpha_k is the DFT of the training sequence. The signal occupies only
fs/4 ± 2.5 MHz, so only bins 159..753 are computed and the others are taken
as zero. This does three things at once:
- it is a low-pass filter on the estimate;
- it drops the mirror replica, so the result is the complex (analytic)
  pass-band response j^n·g_env[n] of each user;
- it cuts the work to 595 of the 1824 bins.

Only the outputs that lie in a user's window are computed: U·4Q = 456 taps.
The transforms are evaluated directly, without an FFT, on NPAR = 32 parallel
lanes. Each lane has a CORDIC that turns an angle index (k·n mod L) into the
twiddle e^(∓j2πkn/L), and a complex multiply-accumulator. In the DFT pass
every sample read from the burst memory feeds all lanes, and each lane
accumulates a different bin. Each group of 32 results is then multiplied by
1/alpha and stored, one per clock. The IDFT pass works the same way: every
stored G_k feeds all lanes, each lane builds a different output tap, and the
taps leave one per clock. 1/(alpha_k·L) depends only on the training sequence. The host
computes it and writes it as 24-bit fixed point with scale 2^30. Fixed-point
steps:
- the DFT result is shifted right by 14;
- the product with 1/alpha is shifted right by 16;
- the IDFT result is shifted right by 28 and saturated to 16 bits.

The cycle count is exactly ⌈NB/NPAR⌉·(L+1+NPAR) + ⌈U·4Q/NPAR⌉·(NB+2+NPAR),
with NB = 595. At the defaults that is 44,718 clocks.

**Matched-filter synthesis** (`mf_synth`). For the selected user this
computes f[n] = Σ_i s_i·g[n − 4i], the code spread to sample spacing and
convolved with the estimated channel. That is 4(N−1) + 4Q taps, at most
288.

**Matched filter at symbol instants** (`matched_filter`). The filter is
evaluated only where a symbol estimate is needed:
v[k] = Σ_m r[k+m]·f*[m], at k = (P+M)·4 + j·4N. NSP = 4 symbols are
computed together. Each sample of their common window is read once, and
lane p applies filter tap t − p·4N to it. Each lane therefore has its own
read port into the filter memory. The estimate f already
carries the fs/4 carrier, and the symbol spacing 4N is a multiple of 4. So
the (−j)^k demodulation that would be needed at those instants is always 1,
and v at those instants is the symbol estimate itself. There is no
down-conversion anywhere in the receiver.

**Carrier synchronisation** (`carrier_sync`). This is a first-order
decision-directed loop at symbol rate. Each symbol is:
1. rotated back by the phase estimate φ;
2. decided as QPSK, or for BPSK by the sign of Re y + Im y, which gives two
   equal bits;
3. used to update φ by 1/8 of the angle of y·conj(decision).

Both rotations use the CORDIC. The loop starts from zero for each user's
data field. On a phase that ramps by Δ per symbol it settles at a lag of
8Δ.

**Sequencing and real time** (`rx_frontend`). The steps run in order:
capture, then estimation, then for user 0 and then user 1: synthesis,
matched filter and carrier loop. A receive slot starts every slot pair of
2·2560·4·8 = 163,840 clocks. The burst must be finished before then. Counted
from the start of capture, a burst takes:
- 118,899 clocks at spreading gain 16;
- 120,393 clocks at gain 8;
- 131,829 clocks at gain 4.

So every receive slot is decoded at all three gains. The capture itself
takes 49,440 of these clocks, the estimator 44,718, and the rest is
synthesis and matched filtering. Two parameters trade area against this
time:
- NPAR, the estimator's lane count. With one lane the estimator alone takes
  1.36 million clocks.
- NSP, the number of symbols the matched filter works on at once. Default 4.

## Operating modes and host interface

CTRL[2:0] selects what leaves on `host_valid`/`host_data`:

| mode | meaning | host word |
|---|---|---|
| 1 | pre-detection: symbol-rate matched-filter outputs of both users, with decisions | two words per symbol: `{4'h1, user[3:0], symbol[7:0], 14'b0, bits[1:0]}` with bits = {im<0, re<0}, then on the next clock `{im[15:0], re[15:0]}` of the phase-corrected output y >>> 2, saturated |
| 2 | narrowband: (−j)^n mix, boxcar low-pass over `dec` samples, one output per `dec` | `{im[19:4], re[19:4]}` |
| 3 | record one burst, then read it out in order | sign-extended 12-bit sample |
| 4 | raw stream of every A/D sample of the receive slot | sign-extended 12-bit sample |

Configuration is written word by word on `cfg_we`/`cfg_addr`/`cfg_wdata`:

| address | content |
|---|---|
| 0x0000 CTRL | [2:0] mode, [4:3] sf (0: 4, 1: 8, 2: 16), [5] IF sign '−', [6] tx enable, [7] rx enable, [8] rx spectrum inversion, [9] BPSK data |
| 0x0001 | D/A taps, 2 bits each (00 = 0, 01 = +1, 11 = −1) |
| 0x0010 + u | code of user u, bit i = chip i, 1 means −1 |
| 0x0020 | mode-2 decimation factor (1..255) |
| 0x1000 + i | training chip i: [0] real part negative, [1] imaginary part negative |
| 0x2000 + k − 159 | {im[23:0] in bits 55:32, re[23:0] in bits 23:0} of 2^30/(alpha_k·L) |
| 0x4000 + 256u + j | data symbol j of user u (same 2-bit coding) |

In mode 1 up to four decisions can arrive on consecutive clocks. They wait
in an 8-entry queue, so the last words can leave a few clocks after
`rx_busy` falls.

Timing: `enable` starts the slot timer. The first slot is a transmit slot,
and slots then alternate. `fs_tick` marks the cycles in which `adc_in` is
sampled and a new x' enters the D/A filter. The host words arrive with
gaps. In mode 4 there is one every 8 clocks.

## What follows the platform and what is chosen here

From the platform:
- the fs/4 IF relation and sign-alternation up-conversion;
- the single-nonzero-term ternary D/A filter;
- 4 samples per chip;
- the DS-CDMA chip rule;
- cyclic-shift training with the band-limited pass-band least-squares
  estimator;
- f = s * g matched-filter synthesis, and detection by sampling the
  pass-band MF output at 4N-sample spacing;
- decision-directed carrier recovery;
- BPSK and QPSK data (the BPSK mapping is chosen here);
- TDD with one transmit slot then one receive slot, two users, spreading 16
  in the reference set-up;
- the four acquisition operating modes.

Chosen here:
- the burst layout and lengths (UMTS/TDD burst type 1 numbers: 456-chip
  training, 56-chip prefix, 976 data chips, 2560-chip slot);
- the RRC pulse;
- L_DA = 8;
- all word widths and scalings;
- direct transforms on 32 parallel lanes with CORDIC twiddles, and 4
  matched-filter lanes;
- the first-order carrier loop with gain 1/8;
- the register map and host stream formats;
- the boxcar filter of mode 2;
- the 8192-sample burst memory;
- the spectrum-inversion bit for the '−' IF sign.

Not included:
- the analog radio, converters and clock generation;
- the PCI bus and the DSP and host computers;
- the off-line simulation use of the DSPs, which has no hardware function;
- recording a whole second in mode 3: the memory holds one burst (6180
  samples), and long records use mode 4;
- the platform's 384 kbps per user, which needs a code and slot allocation
  beyond one code per user per slot pair.

Only one antenna chain is built. A multi-antenna platform would instantiate
`sdr_top` per antenna.

## Files

- `rtl/sr_pkg.sv`: constants, types, pulse taps and register map.
- `rtl/sdr_top.sv`: registers, wiring and the host stream multiplexer.
- Transmitter: `tdd_slot_timer`, `burst_builder`, `pulse_shaper`,
  `if_upconverter`, `da_comp_filter`.
- Receiver: `rx_frontend`, `rx_sample_buffer`, `channel_estimator`,
  `mf_synth`, `matched_filter`, `carrier_sync`, `cordic`, `nb_decimator`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=… failures=…` and has a watchdog.
- `tb/tb_sdr_top.sv`: the end-to-end test at the default sizes.
  - The transmitter is looped back to the receiver through a two-path
    channel (2x'[n−3] + x'[n−8])/32.
  - Runs: spreading 16 with the '+' IF sign; 8 with the '−' sign and
    inversion; 4; BPSK at 8; then modes 3, 4 and 2.
  - It checks every D/A code against the ternary taps and every decision
    against the data sent.
  - At every gain it also decodes the next burst, which must start exactly
    one slot pair later.
  - It counts each mechanism (sign choice, negative and zero taps,
    slot switches, estimations, phase corrections, modes) and fails if one
    never happened.
- `tb/tb_rx_frontend.sv`: the receiver at reduced size (M = 32, Q = 12),
  driven by a burst generated inside the testbench without the transmitter
  RTL.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_sdr_top rtl/sr_pkg.sv tb/tb_sdr_top.sv
./obj_dir/Vtb_sdr_top
```

Any other testbench works the same way with its name. The full-size
end-to-end run simulates a few million clocks and takes seconds.

## Changing it

- Burst sizes, users, band edges, slot length, D/A factor and memory depth
  are parameters of `sdr_top`, with defaults in `sr_pkg`.
- Keep M ≥ U·Q, and keep the memory larger than (P+M+D)·4 + 4Q samples.
- Recompute the band edges for a new L as round(L·(1/4 ∓ 2.5/15.36)).
- 1/alpha must be rewritten whenever the training sequence changes. The
  testbenches show the computation in real arithmetic.
