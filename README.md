# 16APSK 120 Mbit/s point-to-point link: baseband RTL

This is the digital baseband of a fixed-rate microwave link. It carries
120 Mbit/s as 30 Msymbol/s of 16APSK, 4 bits per symbol, in about 45 MHz
of spectrum. The design does without the machinery of satellite standards
that a fixed-rate link does not need: variable coding and modulation,
frequency-aided acquisition, long pilot structures. What is left is small:

- a short frame (17 µs) whose payload is shared among six sources by
  strict priority, so that the most urgent source never waits behind the
  others;
- a 4+12 APSK constellation, which copes well with a nonlinear power
  amplifier. The amplifier runs backed off by a few dB rather than being
  linearised;
- a receiver with Gardner timing recovery, a feedback AGC and a carrier loop
  that looks only at the four inner-ring points;
- a frame synchroniser that also resolves the carrier loop's 90-degree
  ambiguity from the pilot.

The receiver's timing interpolator runs at 120 MS/s. That is only possible
because its datapath is pipelined so that every path through it carries the
same delay. Most of this document is about that and the other receive loops.

The RTL is synthesizable SystemVerilog-2017. Several parts are outside it:

- the RF transceiver (converters, zero-IF mixer, the receive matched
  filter);
- the amplifiers;
- the transmit pulse shaping;
- the Reed-Solomon codec.

Where these connect to the digital design, their signals are ports of the
top module, `apsk16_link_top`.

## Frame

One frame is 256 bytes, or 512 symbols:

| bytes | field | notes |
|---|---|---|
| 4 | pilot | `1ACFFC1D`, 8 symbols, used for frame and phase synchronisation |
| 1 | frame counter | increments per frame, wraps at 256 |
| 219 | data domain | 6-byte block length table, then 213 payload bytes |
| 32 | RS parity | computed by an external RS encoder over counter + data domain |

The RS message is therefore 220 bytes: the counter and the data domain. The
pilot word is the CCSDS attached sync marker. The link design fixes only the
pilot's length, not its pattern.

## Inner-frame multiplexing (`inner_frame_mux`, `inner_frame_demux`)

Six sources feed the link, in descending priority:

1. fibre channel
2. UART
3. audio
4. built-in test (BITE)
5. Ethernet 1
6. Ethernet 2

Idle fill comes last. At the start of each frame the multiplexer reads how
many bytes each source buffer holds. Going down the priority list, it then
grants each source `min(held, payload left)` bytes. It writes the six grants
as the block length table, one byte per source, followed by the granted bytes
of each source in order. Whatever is left is filled with `0x55`.

The result is that a busy top-priority source can take the entire 213-byte
payload, and a lower source only gets what is left over. A top-priority
packet waits at most one frame (17 µs) for the next frame to start. It then
goes out in as many frames as its length needs, whatever the other sources
are doing. The table is one byte per source because the
grant never exceeds 213.

The demultiplexer reverses this on decoded frames. It also reports:

- gaps in the frame counter;
- tables whose sum is larger than the payload (`len_error`), in which case
  the frame is dropped.

Each source has a 512-byte FWFT buffer (`byte_fifo`) at the top level. It
raises `overflow` if a byte is written while the buffer is full.

## Constellation and mapping (`apsk_pkg`, `apsk16_mapper`)

The constellation follows the DVB-S2 4+12 layout:

- four inner points at 45° + k·90°;
- twelve outer points at 15° + k·30°;
- ring ratio 2.73, which is the value that minimises the error rate for this
  layout.

Points are 12-bit I/Q values, with the outer radius at 1400 LSB. The labels
are this design's own:

- labels 0–11 are the outer ring, counter-clockwise from 15°;
- labels 12–15 are the inner ring, counter-clockwise from 45°.

With these labels, a quarter turn adds 3 (mod 12) to an outer label and 1
(mod 4) to an inner one. The frame synchroniser uses that to undo a rotation
(`rot_label`). The mapper sends the high nibble of each byte first, one
symbol per `tx_sym_en` strobe.

## Receive chain

```
ADC 60 MS/s ─► halfband_upsampler ─► gardner_sync ─► dagc ─► cpr_loop ─► frame_sync ─► RS decoder ─► inner_frame_demux
 (2 samp/sym)     (4 samp/sym,           (1/sym)                  ▲  │       (bytes)      (external)
                   120 MS/s)                             sincos_lut ─┘  └ inner-ring PED, PI filter
```

The whole design runs on one clock, which is 120 MHz in the link. Rate
strobes (`adc_valid`, `tx_sym_en`, and the `*_valid` signals between
blocks) mark the samples and symbols.

### Upsampling (`halfband_upsampler`)

The converter delivers 2 samples per symbol. Timing recovery wants 4, so
the stream is interpolated by two with a half-band filter:

```
[3 0 -25 0 150 256 150 0 -25 0 3] / 256
```

In polyphase form:

- the even outputs are the 6-tap odd-coefficient branch;
- the odd outputs are the input delayed by the centre tap.

An input accepted at cycle t produces outputs at t+1 and t+2.

### Timing recovery (`gardner_sync`)

This is a classic interpolating Gardner loop at 4 samples per symbol.

- **NCO.** A modulo-1 counter `eta` (`NCO_W = 24` bits) decreases by a
  step `W` each sample. `W` is nominally 1/2, so the counter underflows twice per
  symbol. The underflows alternate between symbol strobes and mid-symbol
  strobes. The fractional interval `mu = eta/W` is approximated as `2·eta`.
- **Interpolation.** Two `farrow_interp` instances, one for I and one for Q,
  compute the strobed samples.
- **Error detector.** At each symbol strobe,
  `e = mid · (previous − current)`, summed over I and Q.
- **Loop filter.** A PI filter with a 48-bit integrator, proportional shift
  `KP_SH = 13` and integral shift `KI_SH = 22`. It corrects `W`, clamped to
  ±1/8. The gains are given in units of the top 16 bits of `W`. The 8 extra
  bits make one step 0.12 ppm of the symbol rate.

The NCO strobe is delayed to match the interpolator's 8-cycle latency. That
way the strobe arrives together with the sample it belongs to.

#### The pipelined insert filter (`farrow_interp`)

The interpolator is the piecewise-parabolic Farrow filter with α = ½:

```
a = ½(X[k] − X[k−1] − X[k−2] + X[k−3])
b = ½(−X[k] + 3X[k−1] − X[k−2] − X[k−3])
Y = (a·u + b)·u + X[k−2]
```

Written directly, this is a chain of four adders, a multiplier, an adder, a
second multiplier and a final adder. At 120 MS/s that path is far too long:
such a direct form reaches only about 38 MHz in a Kintex-7 class device.

The fix is *multi-path pipelining*. Draw the filter as a graph in which
every adder and multiplier is a node, and put one register after each node.
Every edge into a node must then carry the same total delay from the input.
Where a path skips nodes, for example X[k−2] going straight to the final
adder, it gets one extra register for each node it skips. The output is then
exactly Y delayed by the longest path, which here is 8 cycles. This is
acceptable in a feedback loop as long as the NCO strobe is delayed by the
same amount.

The smallest case shows the rule. Take `Y = A·X[k] + B·X[k−1] + C·X[k−2]`,
which ends in one three-input adder. Split that adder in two and register
every node:

- the three products are registered (Z1, Z2, Z3);
- `Z1 + Z2` is registered as Z4;
- the C path skips that adder, so it gets one extra register, Z5;
- `Z4 + Z5` is registered as Z6.

Z6 is exactly `Y[k−3]`. This example is included as
`pipeline_example_fir3`. It sits beside the link in the top module, on its
own `ex_*` ports, with arbitrary default coefficients of 3, −2 and 5.

Splitting one node forces registers onto the neighbouring paths that reach
the same later node. That set of paths is the node's *influence domain*.
Register the whole influence domain at once, and the alignment is kept
without redoing the whole graph.

In this filter:

- the ±½ products come out of a single −½·X stage, then a tap line with
  delays of 1, 2, 1, 1 and 1;
- X is delayed by 3 and then by 6 more for the final adder;
- `u` is delayed by 4 for the first multiplier and 2 more for the second.

The wiring, one adder per stage:

| stage | node | inputs |
|---|---|---|
| 1 | `m3` | −X[k] (kept doubled: −X instead of −½X) |
| 2 | `add2`, `add8` | `d1 − m3`, `m3 − d1` |
| 3 | `add3`, `add6` | `d2 + add2`, `add8 + 2·X` (delay 3) |
| 4 | `add9`, `add4` | `add3 − d5`, `d4 + add6` |
| 5 | `mult1`, `add5` | `add9 · u` (delay 4), `d6 + add4` |
| 6 | `add7` | `mult1 + add5` |
| 7 | `mult2` | `add7 · u` (delay 6) |
| 8 | `add1` | `mult2 + 2·X` (delay 9), halved on output |

In this table, `d1`, `d2`, `d4`, `d5` and `d6` are the taps of the −X delay
line. The −½ scaling is kept as −1, which avoids a rounding error, and the
sum is halved once at the end. The longest register-to-register path is then
a single 20-bit adder, or a 20×12 multiplier followed by truncation.
`tb_farrow_interp` checks the output against the equation above, sample for
sample, including the 8-cycle latency. `en` freezes the whole pipeline.

### Gain control (`dagc`)

This is a feedback AGC at symbol rate, with a 4.12 gain:

```
gain += (E_REF − |y|²) >> MU_SH
```

`E_REF = 821588` is the mean energy of the constellation when its outer
radius is 1024. After the AGC, the two rings are therefore at 375 and 1024
LSB, which is what the carrier loop's ring threshold and the frame
synchroniser's slicer expect.

### Carrier phase recovery (`cpr_loop`, `sincos_lut`)

This is a decision-directed loop that uses only the inner ring.

- **Derotation.** Each symbol is multiplied by `exp(−jθ)`. The sine and
  cosine come from a quarter-wave table (`sincos_lut`) with 1024 phase steps
  per turn and 15-bit values. The table is computed at elaboration from a
  Taylor series, so no data file is needed.
- **Constellation selection.** Only symbols with `|z|² < 490000` (radius
  below 700) are used. These are the four inner points, which form a plain
  QPSK.
- **Phase detector.** The detector is the imaginary part of the symbol times
  the conjugate of its sign decision: `e = y·sgn(x) − x·sgn(y)`. The
  detector is silent for outer-ring symbols. This avoids the 12-point
  decision, which is less reliable.
- **Loop filter.** A PI filter (`KP_SH`, `KI_SH`) drives a 32-bit phase
  accumulator. `freq` is the integral branch, in phase units per symbol.

The detector is π/2-periodic, so the loop locks at one of four phases. The
carrier loop does not resolve this ambiguity; the frame synchroniser does.

### Frame synchronisation (`frame_sync`)

The synchroniser slices each symbol to a label. It tests the last 8 labels
against the 8 pilot labels under each of the four quarter-turn rotations.

- **Search.** A full match under rotation r gives lock and sets
  `rotation = r`.
- **Locked.** After lock, the synchroniser:
  - rotates every label back by r;
  - packs the labels into bytes, high nibble first;
  - sends out the 252 bytes after the pilot, with `sof` on the counter byte
    and the byte index in `idx`.
- **Pilot check.** It checks the pilot at the expected position in every
  frame.
  - If the pilot matches under a different rotation, the rotation is updated
    without losing lock. This covers a carrier loop that has slipped by a
    quarter turn.
  - `MISS_MAX` consecutive misses drop the lock and return to search.

## Outside the RTL

- **Reed-Solomon encoder and decoder.**
  - The framer sends the 220 message bytes on `rs_msg_*` and expects the 32
    parity bytes on `rs_par_*`.
  - The receiver hands the 252 coded bytes on `rx_code_*` and takes the
    decoded 220 message bytes back on `rs_dec_*`.
- **Transmit SRRC filtering, DAC, ADC, mixers and receive matched
  filtering.** These belong to the RF transceiver. `tx_sym` is the symbol
  stream at one sample per symbol. `adc_s` is the matched-filtered
  60 MS/s stream.
- **The Ethernet debug path.** It sends intermediate signals to a PC. The
  top brings these signals out as `dbg_*` ports:
  - transmit framing and labels;
  - the timing and phase detector outputs;
  - the carrier phase;
  - the phase-corrected symbols.

## Top-level interface (`apsk16_link_top`)

The top has one clock, `clk`, which is 120 MHz in the link, and an
asynchronous active-low reset, `rst_n`. Its ports come in groups.

Transmit side:

- `src_wr_en[6]`, `src_wr_data[6]` and `src_overflow[6]`: byte write ports
  of the six sources, index 0 = fibre channel … 5 = Ethernet 2.
- `rs_msg_*` and `rs_par_*`: to and from the RS encoder.
  - A parity byte is taken whenever `rs_par_valid && rs_par_ready`.
- `tx_sym_en`: one pulse per symbol, i.e. every fourth cycle at
  30 Msym/s.
  - Each pulse produces `tx_sym` (12-bit I/Q) with `tx_sym_valid`.
  - `tx_underrun` flags a strobe that found no byte ready. It never happens
    when the RS encoder delivers parity on demand.

Receive side:

- `adc_s` with `adc_valid`: 12-bit I/Q at 60 MS/s, every second cycle.
- `rx_code_*`: coded bytes 0..251 after each pilot. `rx_code_sof` marks the
  counter byte, and `rx_code_idx` gives the position in the frame.
- `rs_dec_*`: the 220 decoded message bytes, with `rs_dec_sof` on the
  counter.
- `rx_data`, `rx_valid` and `rx_src`: the source bytes.
- Status:
  - lock and rotation;
  - lock and pilot-miss counts;
  - AGC gain;
  - carrier frequency word;
  - timing step;
  - length error;
  - counter gaps;
  - frames received.
- `dbg_*`: intermediate signals.

Pipelining example:

- `ex_en`, `ex_x` and `ex_y`: the example filter.

Parameter:

- `FIFO_DEPTH`: source buffer depth, 512.

The numbers that define the link live in `apsk_pkg`:

- the frame field sizes;
- the pilot;
- the constellation table;
- the idle byte.

## Where this design departs from the link design, or fills gaps

- **Carrier loop bandwidth.** The link design uses a loop of about 5 kHz,
  chosen for its lock time with a 60 kHz frequency offset. This loop has no
  frequency aid, and in simulation it does not pull in 60 kHz at that
  bandwidth. The defaults `KP_SH = 14, KI_SH = 6` therefore give a loop of
  tens of kHz. It acquires 60 kHz within about 70 frames and tracks it with
  a worst phase error of about 2.4°. `KP_SH = 11, KI_SH = 1` is close to
  5 kHz for a receiver with a smaller offset.
- **Inner-ring gain factor.** The detector sees only part of the symbols,
  so the loop gain must be scaled for that. The link design scales by 1/3.
  This design works out its gains with the actual share of inner points, one
  symbol in four. The final values were then confirmed in simulation.
- **NCO resolution.** The link design quotes a symbol-rate error of 180 Hz
  at 30 Msym/s, which is 6 ppm. The 24-bit NCO resolves 0.12 ppm, so such
  an error is held by a fixed step, not by dithering.
- **Own choices** (the link design leaves these open):
  - half-band taps;
  - pilot pattern;
  - symbol labelling;
  - sample widths;
  - AGC law and constant;
  - PED ring threshold;
  - lock and loss rules;
  - idle byte;
  - one byte per source in the length table;
  - all handshakes.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. A watchdog stops any run that hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/apsk_pkg.sv tb/tb_apsk16_link_top.sv --top-module tb_apsk16_link_top
./obj_dir/Vtb_apsk16_link_top
```

Replace the name for the other testbenches. There is one per block:

- `tb_farrow_interp`
- `tb_halfband_upsampler`
- `tb_gardner_sync`
- `tb_dagc`
- `tb_cpr_loop`
- `tb_frame_sync`
- `tb_apsk16_mapper`
- `tb_tx_framer`
- `tb_inner_frame_mux`
- `tb_inner_frame_demux`
- `tb_pipeline_example_fir3`

`tb_apsk16_link_top` runs the complete link at its default parameters. It
takes a few seconds and covers 220 frames, through a channel with:

- a raised-cosine pulse, roll-off 0.43;
- a 0.37-symbol timing offset;
- a 50 ppm clock error;
- a 60 kHz carrier offset;
- a gain of 0.6;
- noise;
- a quarter-turn phase jump in frame 160.

It checks that:

- every coded byte and every source byte arrives intact after acquisition;
- each mechanism happened at least once: lock, rotation correction, a full
  grant to the top source, idle fill, and mixed frames;
- the pipelining example beside the link matches its equation, three
  enabled cycles late.

The RS codec is replaced in this testbench by a fixed parity pattern and a
pass-through decoder.

`tb_link_ser` measures the symbol error rate of the same link, with random
payload and white Gaussian noise, at Es/N0 = 21, 20, 19 and 18 dB. The same
noise is also given to an ideal receiver: a nearest-point slicer with perfect
timing, phase and gain. The table shows a typical run:

| Es/N0 | link SER | ideal SER |
|---|---|---|
| 21 dB | 0 | 3.3e-5 |
| 20 dB | 3.0e-4 | 3.3e-4 |
| 19 dB | 1.0e-3 | 1.1e-3 |
| 18 dB | 3.3e-3 | 3.8e-3 |

The loss is therefore well below 1 dB. The testbench requires the link's
errors to stay below the ideal receiver's at 1 dB less Es/N0. The noise is
white at the 60 MS/s samples, and the receiver's interpolators reshape it
slightly. The comparison is therefore a close estimate, not an exact one.
