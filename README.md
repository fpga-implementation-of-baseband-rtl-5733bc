# Baseband OFDM transmitter and receiver with an 8-point FFT/IFFT

This is a small orthogonal frequency-division multiplexing (OFDM) link in
synthesizable SystemVerilog. It has eight subcarriers. The transmitter puts
one QPSK symbol (2 bits) on each subcarrier and turns the eight symbols into
eight time-domain samples with an 8-point inverse FFT. The receiver takes
eight samples, runs the forward 8-point FFT and recovers the bits by sign.
Both chains sit on the same device. A loopback input either connects them
back to back or lets the receiver listen to an external sample stream.

The main aim is a small circuit. One FFT/IFFT engine holds an 8-entry register
file and one radix-2 butterfly. A small controller reuses that butterfly
twelve times per transform, and the engine has no multiplier and no divider.
The structure of the link follows a published FPGA design: mapping,
serial-to-parallel, 8-point IFFT and FFT, parallel-to-serial, and a control
unit that sequences the transform. Everything inside the blocks (widths,
modulation, handshakes, scheduling) is this implementation's own choice; the
section *Where this RTL makes its own choices* lists those choices.

## Signal path

```
           transmitter (ofdm_tx)
 tx_bits ─► qpsk_mapper ─► serial_to_parallel ─► fft8 (INVERSE=1) ─► parallel_to_serial ─► tx_out
  2 bit       1 symbol         8 symbols            8 samples            1 sample
                                                                             │
                                                          loopback=1 ────────┤
                                                          loopback=0: rx_in ─┤
           receiver (ofdm_rx)                                                ▼
 rx_bits ◄─ qpsk_demapper ◄─ parallel_to_serial ◄─ fft8 (INVERSE=0) ◄─ serial_to_parallel
```

Symbol `k` of an OFDM symbol (k = 0..7, in arrival order) goes on subcarrier
`k`. Time-domain samples leave in time order n = 0..7. The receiver treats the
first sample after reset as the start of an OFDM symbol, and every eighth
sample after that. The link has no cyclic prefix, pilots, synchronisation or
equalisation. Over an ideal or mildly noisy channel, the receiver returns the
transmitted symbols exactly.

## Number format

All samples are `ofdm_pkg::cplx_t`, a packed struct of two 16-bit
two's-complement words `{re, im}` (`re` in bits 31:16). A frame, `frame_t`,
is a packed array of eight of them. Element 0 is the first sample on the
serial side, which is also index 0 of the transform.

| quantity | value |
|---|---|
| QPSK point | (±4096, ±4096); bit 0 = 1 makes I negative, bit 1 = 1 makes Q negative (Gray) |
| transmitter IFFT | scaled by 1/8, so each sample's parts are at most 4096·√2 ≈ 5793 |
| receiver FFT | unscaled, so a back-to-back link returns ±4096 per part |
| headroom | the FFT does not saturate for input parts up to about 2^15/(8·√2) ≈ 2896 per sample; larger inputs saturate, and the decided bits usually survive |

## The FFT/IFFT engine (`fft8`, `fft8_ctrl`, `fft8_bfly`)

This is the core of the design. It is also the least obvious part.

### In-place radix-2 decimation in time

The engine computes

- `INVERSE = 0`: X[k] = Σ x[n]·e^(−j2πnk/8)
- `INVERSE = 1`: x[n] = (1/8)·Σ X[k]·e^(+j2πnk/8)

It uses three radix-2 stages, each of four butterflies, all in place in an
8-entry register file `regs`:

1. **Load**: `regs[bitrev(n)] <= in_frame[n]`. For 3 bits, bit reversal maps
   0..7 to 0,4,2,6,1,5,3,7.
2. **Twelve butterfly cycles**: each cycle reads two entries, combines them and
   writes both back. Stage `s` has span `h = 2^s`. Butterfly `k` (0..3) of
   that stage works on entries `i = (k>>s)·2h + (k mod h)` and `i+h`, with
   twiddle `W8^t`, where `t = (k mod h)·4/h`:

   | stage | pairs (i, i+h) and twiddle t |
   |---|---|
   | 0 | (0,1) t0 · (2,3) t0 · (4,5) t0 · (6,7) t0 |
   | 1 | (0,2) t0 · (1,3) t2 · (4,6) t0 · (5,7) t2 |
   | 2 | (0,4) t0 · (1,5) t1 · (2,6) t2 · (3,7) t3 |

3. **Result**: after stage 2, `regs` holds the transform in natural order. It
   is shown directly on `out_frame`.

### Twiddles without multipliers

The butterfly computes `x = a + W·b` and `y = a − W·b`. An 8-point transform
needs only four twiddle factors:

| t | forward W | inverse W* | hardware |
|---|---|---|---|
| 0 | 1 | 1 | none |
| 1 | (1−j)/√2 | (1+j)/√2 | (b.re ± b.im) times 1/√2 |
| 2 | −j | +j | swap the parts and negate one |
| 3 | (−1−j)/√2 | (−1+j)/√2 | (b.re ± b.im) times 1/√2, negated |

The only real product is a multiply by 1/√2. It is the constant 46341/65536,
made of seven shifted copies of the operand
(2^15 + 2^13 + 2^12 + 2^10 + 2^8 + 2^2 + 2^0) and rounded to the nearest
integer. Its relative error is about 1e-6. The inverse transform halves both
butterfly outputs in every stage, adding one and shifting right. Over the
three stages this gives the 1/8 of the IDFT without a divider. All butterfly
outputs saturate to 16 bits instead of wrapping.

Measured against a double-precision DFT, results stay within ±4 LSB (the
testbenches' tolerance).

### Controller and timing

`fft8_ctrl` has three states: IDLE, RUN and DONE.

- IDLE: `in_ready` is high. A frame offered with `in_valid` pulses `load`.
- RUN: `run` is high for 12 cycles, while `stage`/`bfly` count (0,0) … (2,3).
- DONE: `out_valid` stays high and `out_frame` stays stable until `out_ready`.

A frame is accepted in cycle 0 and the result is valid in cycle 13. The
engine holds one frame at a time. In the OFDM chains, a new frame enters one
cycle after the previous result leaves. Each chain therefore handles **one
OFDM symbol (8 samples) every 14 cycles** when nothing else stalls.
`tb_ofdm_tx` checks that period. The serial side of each chain runs at 8/14 of
the clock rate, and back-pressure (valid/ready) holds the input while the
engine is busy.

## Converters, mapper and demapper

- **`serial_to_parallel`** fills a frame buffer one sample per transfer. When
  the eighth sample is in, it raises `out_valid` on the next cycle and drops
  `in_ready` until the frame is taken.
- **`parallel_to_serial`** captures a frame and sends element 0 first. It
  accepts the next frame in the same cycle that the last sample leaves, so
  the output has no gaps when frames are always waiting.
- **`qpsk_mapper`** / **`qpsk_demapper`** each have one valid/ready register
  stage, one symbol per cycle. The demapper decides by sign:
  `bits = {Q < 0, I < 0}`.

Both converters are parameterised by length `N` and element type `T`
(`parameter type`).

## Top level (`ofdm_top`)

The top has four valid/ready streams: `tx_bits` in, `tx_out` out, `rx_in` in
and `rx_bits` out. It also has `loopback`.

- `loopback = 1`: the receiver consumes the transmitter's samples.
  `tx_out`/`tx_out_valid` still show them, `tx_out_ready` is ignored and
  `rx_in_ready` is 0.
- `loopback = 0`: the transmitter drives only `tx_out`, and the receiver
  takes `rx_in`.

Change `loopback` only while both chains are empty. Otherwise the receiver
loses the OFDM symbol boundary, because it has no synchronisation.

All registers use a synchronous, active-low reset `rst_n`. Reset clears
valid flags, counters and the controller state; data registers are not reset.

## Where this RTL makes its own choices

The original design specifies only the list of blocks and their roles: an
8-point FFT and IFFT, mapping, serial/parallel conversion, control signals,
and both ends on one FPGA. The following are this implementation's own
choices:

- QPSK with Gray mapping and amplitude 4096. The original only says "mapping".
- The receiver's hard-decision demapper.
- 16-bit parts, saturation, and the rounding used.
- The single-butterfly, 13-cycle schedule. It reflects the original's concern
  with gate count and its use of control signals to sequence the computation.
- The 1/√2 constant and its precision.
- Valid/ready handshakes and the single-frame buffers.
- The loopback switch.
- Reset style.

The host-side test program and the FPGA board used with the original design
are not part of this RTL. The testbenches play the host's role by computing
the reference transforms themselves.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. The reference models are in `tb/ofdm_ref_pkg.sv`: QPSK points and a
double-precision 8-point inverse DFT.

| testbench | what it checks |
|---|---|
| `tb_fft8_bfly` | all twiddles, both directions, scaling and saturation against real arithmetic |
| `tb_fft8_ctrl` | load pulse, the 12-step (stage, butterfly) sequence, hold until `out_ready` |
| `tb_fft8` | FFT and IFFT against a direct DFT (impulses, random frames, one saturating frame), 13-cycle latency, output held while stalled |
| `tb_qpsk_mapper`, `tb_qpsk_demapper` | every point or decision, order, latency, nothing lost under random stalls |
| `tb_serial_to_parallel`, `tb_parallel_to_serial` | element order, input stall while full, gap-free hand-over, timing |
| `tb_ofdm_tx` | every sample against the 1/8-scaled IDFT; 14-cycle symbol period |
| `tb_ofdm_rx` | decisions over a noisy (±300 LSB) channel, including symbols at 8× amplitude that saturate the FFT |
| `tb_ofdm_top` | end to end at the default sizes: loopback, external channel with noise, loopback again; counts input back-pressure, output stalls on both streams and mode switches, and fails if any never happens |

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/ofdm_pkg.sv tb/ofdm_ref_pkg.sv tb/tb_ofdm_top.sv --top-module tb_ofdm_top
./obj_dir/Vtb_ofdm_top
```

For another testbench, replace `tb_ofdm_top` in both places. Each one runs in
seconds.

## Changing the design

- **Sample width**: change `DW` in `ofdm_pkg`. The butterfly's internal
  widths follow from it. Scale `QPSK_AMP` to match. In a back-to-back link
  the largest value inside the receiver FFT is a partial sum of four samples,
  at most 4·QPSK_AMP·√2 in magnitude, which must stay below 2^(DW−1).
- **Transform size**: the engine is specific to 8 points. The addressing in
  `fft8` and the twiddle table in `fft8_bfly` assume N = 8. The converters
  and the package constants are already generic.
- **Throughput**: a second register file (ping-pong) in `fft8` would let a
  new frame load while a result waits, bringing the period down to 13 cycles.
  Four butterflies per cycle would bring it down to 3 cycles.
