# Closed-loop precoded forward link for a multi-beam satellite

In a multi-beam satellite that reuses one frequency band in every beam, each
user terminal hears its own beam plus leakage from the neighbouring beams. The
six received signals are `y = H x + n`, where `H` is a 6×6 complex channel
matrix. If the gateway knows `H`, it can pre-distort the six beam signals with
a precoding matrix `W`, so that `H W` is close to the identity and each
terminal sees only its own stream. The zero-forcing choice is
`W = H^H (H H^H)^-1`.

This RTL models the whole loop in one clock domain, in three parts:

* **Gateway.** Six DVB-S2X-style superframe generators, a block precoder, and
  per stream a pulse shaper and an up-converter.
* **Satellite and channel emulator.** Per stream a down-converter, the IMUX
  filter, a TWTA non-linearity and the OMUX filter. Then the 6×6 channel
  matrix `H`, per-stream AWGN, and another up-converter.
* **Six user terminals.** Each has a down-converter, a matched filter,
  superframe sync, symbol timing, and a CSI estimator. The CSI estimator
  measures that terminal's row of `H`. After symbol timing, a phase tracker
  and a soft demapper turn the payload into per-bit LLRs.

The host closes the loop. It reads the estimated rows, computes `W`, and
writes `W` back. The host software and the feedback link are not in the RTL.
The testbench `tb_pc_top` plays the host.

```
 bits ─► superframe_gen ×6 ─► precoder (W) ─► pulse_shaper ×6 ─► duc ×6
                                                                   │
      ┌────────────────────────────────────────────────────────────┘
      ▼
   ddc ×6 ─► IMUX fir ─► twta ─► OMUX fir ─► mimo_channel (H) ─► awgn ×6 ─► duc ×6
                                                                              │
      ┌───────────────────────────────────────────────────────────────────────┘
      ▼
   ddc ×6 ─► matched fir ─► frame_sync ─► symbol_timing ─┬─► csi_estimator ─► CSI rows
                                                          └─► phase_recovery ─► soft_demod ─► LLRs
                                                                   └──► tagged symbols
```

## Superframe layout and the precoding mask

Every stream carries the same field layout, in lockstep. Lengths are in
symbols and are parameters in `pc_pkg`:

| field | length | content |
|---|---|---|
| SOSF | 256 | start-of-superframe: Walsh-Hadamard row `wh_idx`, optionally scrambled |
| SFFI | 32 | 4-bit format indicator, each bit repeated 8×, BPSK |
| then 4 frames, each: | | |
| PLH | 32 | 8-bit MODCOD, each bit repeated 4×, BPSK |
| P2 | 32 | pilot field |
| 4 × (payload, P) | 512 + 32 | QPSK payload, then a P pilot field |

This gives 9248 symbols per superframe, or 36 992 clocks at 4 samples per
symbol.

The pilots in P and P2 are Walsh-Hadamard row `wh_idx mod 32`. This makes the
pilots of the six streams mutually orthogonal, so a terminal can separate the
beams. When `scr_pilots` is set, the pilot chips are multiplied by a common
x^7+x^6+1 sequence. That sequence restarts at every field, so orthogonality is
kept.

This layout is a simplification of the real DVB-S2X format 2/3 superframe. It
keeps the field names and the configuration knobs: MODCOD, SFFI, WH index and
the scramble flags. It does not keep the standard's field lengths or coding.

Each symbol carries a segment tag (`seg_t`: SOSF, SFFI, PLH, P2, P, PAYLOAD)
through the precoder and into the receiver. Two 6-bit masks, indexed by
segment, decide what happens in each field:

* `prec_mask`: precode this field or send it unprecoded. The normal setting
  is `6'b101110`, which precodes SFFI, PLH, P2 and payload. SOSF and P stay
  unprecoded: terminals must detect SOSF without `W`, and P is used to
  measure the raw `H`.
* `slp_mask`: request symbol-level precoding in this field.

## Precoder semantics

* **Per-stream rank.**
  * 0: no precoding.
  * 1: ZF/MMSE, meaning whatever `W` the host loaded.
  * 2: reserved, treated as 0.
  * 3: symbol-level precoding "if possible, otherwise ZF/MMSE".
* **Rank 3 (SLP).** No symbol-level algorithm is built. Rank 3 always uses
  `W`. `slp_fallback` goes high in every slot where rank 3 meets a field with
  `slp_mask` set.
* **Stream participation.** A stream takes part in a slot when its rank is 1
  or 3 and `prec_mask` selects the field. A precoded output is
  `Σ_j W[i][j] s_j` over the participating streams only. Other streams pass
  through unchanged, and `out_precoded` shows which outputs were precoded.
* **Loading `W`.** `W` is written entry by entry into a shadow copy. A commit
  is held pending until the next SOSF symbol. From that symbol on, every slot
  uses the new matrix, so one superframe never mixes two matrices. The SOSF
  slot itself is unprecoded. `w_applied` pulses when the switch happens. The
  channel matrix `H` in `mimo_channel` is double-buffered the same way, but
  its commit takes effect on the next clock.

## Receiver: sync, timing and CSI

**`frame_sync`** correlates the oversampled matched-filter output with the
terminal's own SOSF sequence. Correlation taps are spaced 4 samples apart.
The metric is `|c/L|²`.

* It tracks the largest metric above `threshold`.
* It declares sync `WIN_SYM` symbols after the peak, once no larger value has
  appeared.
* It then ignores one SOSF length, so Walsh-Hadamard sidelobes do not
  re-trigger it.

The sync pulse marks both the superframe position and the sampling phase.

**`symbol_timing`** takes one sample out of every 4 at that phase and
counts the superframe position. The count starts at the SFFI field, symbol
`WIN_SYM-1`. Each symbol is tagged with its segment and index. Timing is
re-acquired at every SOSF and is not tracked in between. The single-clock
model has no clock offset to track.

**`csi_estimator`** correlates every P field with the six streams' pilots.
This gives the terminal's row of `H`, which the host feeds back. It does the
same on P2. P2 is precoded, so that result is the row of `H·W`, a direct
check of the precoder. Output entries use the Q14 format, with scaling
`SH = 1 + log2(SYM_A) + log2(L) − CFRAC`.

**`phase_recovery`** removes residual carrier phase from the symbols.

* A CORDIC rotates each symbol by `-theta`.
* On QPSK payload symbols, the detector `e = sgn(I)·Q − sgn(Q)·I` updates
  `theta` by `(e << 17) >>> mu_shift`. `theta` is a 32-bit phase word. Pilots
  and BPSK header fields are rotated but do not update the loop.
* The estimate is cleared at every superframe sync.
* It runs on the symbol branch only. The CSI estimator takes the symbols
  before this stage. If the terminal corrected the carrier phase first, the
  CSI it reports would be rotated, and the gateway's zero forcing would be
  computed from a wrong `H`.

**`soft_demod`** produces the QPSK payload LLRs, bit 0 from I and bit 1 from
Q. Each LLR is `(y · scale) >>> 16`, clipped to 8 bits, so `llr_scale` must
hold `2¹⁶·2A/σ²` in LLR units. Hard bits come out alongside. There is no
LDPC decoder behind it.

## Channel emulator blocks

* **`fir_filter`**: a direct-form FIR with host-loaded real taps on a complex
  stream. Default is 32 taps. It is used three times: IMUX filter, OMUX
  filter, and the terminal's matched filter.
* **`twta`**: a 64-entry table of complex gains, indexed by input power
  `I²+Q²`. It models the amplifier's AM/AM and AM/PM together. The host loads
  the curve.
* **`mimo_channel`**: `y = H x`, with `H` double-buffered.
* **`awgn`**: two xorshift64 generators, one for I and one for Q. Each noise
  sample is the sum of four 16-bit uniforms, so σ = `amp/√3`.
* **`duc` / `ddc`**:
  * Both use a 32-bit NCO and a pipelined 14-iteration CORDIC rotator with
    16 clocks of latency.
  * The DDC adds an integrate-and-dump decimator by `2**dec_log2`.
  * In `pc_top` the decimation must stay 0. Every stage there runs at one
    sample per clock.

## Fixed-point formats

| quantity | format |
|---|---|
| samples and symbols | 16-bit signed I and Q, packed `{re, im}` in `cplx_t` |
| symbol amplitude | ±`SYM_A` = ±2048 per component |
| `W`, `H`, CSI, TWTA gains | Q14 complex (16384 = 1.0); TWTA gains use Q13 |
| filter taps | 16-bit, Q14 |
| products | 48-bit, rounded and saturated back to 16 bits by `pc_pkg::sat` |

## Host register map (`pc_top`)

One write per clock, on `cfg_we`, `cfg_addr[15:0]` and `cfg_wdata[31:0]`.
Complex data is packed `{re[31:16], im[15:0]}`.

| address | meaning |
|---|---|
| `0x0000 + 8*row + col` | `W` entry |
| `0x0100` | commit `W` (applied at next SOSF) |
| `0x0200 + 8*row + col` | `H` entry |
| `0x0300` | commit `H` |
| `0x1000 + 64*bank + k` | pulse-shaper tap `k` of roll-off bank `bank` (0..3) |
| `0x2000 + k` / `0x2100 + k` / `0x2200 + k` | IMUX / OMUX / matched-filter tap |
| `0x3000 + a` | TWTA table entry |

After reset:

* filters hold a unit impulse;
* `W` and `H` hold the identity;
* the TWTA table holds unity gain.

## Latencies

| stage | clocks |
|---|---|
| superframe_gen | 1 |
| precoder | 1 |
| pulse_shaper | 1 (after the symbol) |
| duc, ddc | 16 (+ decimation) |
| fir_filter | 1 |
| twta | 2 |
| mimo_channel | 1 |
| awgn | 1 |
| frame_sync passthrough | 1 |
| phase_recovery | 16 |
| soft_demod | 1 |

## What is this design's own

The overall chain, the precoding mask and ranks, the stream configuration,
the six-stream size, the 4× oversampling and the four raised-cosine roll-offs
(0.2, 0.15, 0.1, 0.05) follow the original test-bed. The following are
choices made here:

* **Frame format.** The simplified superframe layout, the orthogonal WH
  pilots in P and P2, and the scrambler polynomial.
* **SLP.** Rank 3 falls back to `W` in every case.
* **Stream configuration.** MODCOD, SFFI, WH index and rank are set per
  stream. The pilot and SOSF scramble flags are shared by all streams, and a
  stream's index is its position: stream `i` feeds terminal `i`.
* **Loading.** When a new `W` takes effect, double-buffered `H`, and the
  register map.
* **Host-loaded content.** Filter taps and the TWTA curve are loaded, not
  fixed. Standard IMUX/OMUX/TWTA curves are not built in.
* **Algorithms.** The sync detector, data-aided symbol timing, the AWGN
  method, the CIC decimator, and all bit widths.
* **Connections.** RF front ends, DAC/ADC, FIFO links between FPGAs, the
  reference clock and the Ethernet feedback are replaced by direct digital
  connections.

Not built:

* the terminal's frequency acquisition: all NCOs share one clock, so there
  is no offset for it to find;
* LDPC coding;
* the DVB-S2X frame details;
* support for more than 8 streams in the register map.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. With Verilator 5:

```
verilator --binary --timing rtl/pc_pkg.sv rtl/*.sv tb/tb_precoder.sv --top-module tb_precoder
./obj_dir/Vtb_precoder
```

`tb_pc_top` runs the whole chain at the default parameters. That is about
185 000 clocks, roughly two minutes. It acts as the host:

1. Loads raised-cosine taps for all four roll-offs, IMUX/OMUX delays, a
   compressing TWTA curve (gain `1/(1+(r/46000)²)` with phase up to 0.3 rad), and a random `H` with 0.15–0.3 cross-beam
   coupling.
2. In superframe 0, compares each terminal's P-pilot CSI with `H`.
3. Inverts the estimate (Gauss-Jordan) and commits `W`.
4. In superframe 2, checks that the P2 estimate of `H·W` is near the
   identity, that every terminal decodes its payload without bit errors
   (symbols and LLR hard bits), and that each phase loop sits near zero.
5. Switches roll-off for superframe 3.

It also counts every mechanism at least once:

* superframe syncs;
* the deferred `W` switch;
* precoded and bypassed slots;
* SLP fallbacks;
* payload underflow;
* TWTA compression;
* `H` commits;
* phase-loop updates;
* clipped LLRs.

To change the beam count, set `N` on `pc_top`. The register map allows up to
8.
