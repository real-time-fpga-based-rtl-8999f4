# Real-time SiPM pulse emulator: a three-exponential shaper with 0.8 ns hit timing

A silicon photomultiplier (SiPM) answers each detected photon with a pulse
that rises in about a nanosecond and decays over tens to hundreds of
nanoseconds. Many photons arrive close together, so their pulses pile up. This
RTL rebuilds that analog waveform in real time, to drive a 16-bit, 2.5 GS/s
DAC. The result can stand in for a real detector in front of a preamplifier,
shaper or ADC.

The design splits the work in two:

* **Software decides *what* happens and *when*.** Software (a physics
  simulation on the on-chip processor or on a remote host) produces a list of
  photon hits. It quantizes each hit's time to 0.8 ns and sends only the
  non-empty time bins. Each bin travels as a pair `(dt, amplitude)`, where
  `dt` is the time since the previous bin.
* **The logic decides *how the detector responds*.** It places every hit on
  a 0.8 ns grid and superposes a three-exponential pulse for each one. The
  logic runs at only 156.25 MHz but still produces 16 output samples per
  clock.

No waveform is stored anywhere. The pulse shape has four parameters, and
software can change them at run time without re-synthesis.

## The pulse model

For a hit of amplitude `A` at time 0 the output is `A·H(t)` with

    H(t) = (1 − Sf)·exp(−t/τff) + Sf·exp(−t/τfs) − exp(−t/τr),   t ≥ 0

* `τr` is the rise time constant, typically around 1 ns.
* `τff` and `τfs` are the fast and slow decays, from a few ns up to hundreds
  of ns.
* `Sf` is the share of the slow component.

The rise term starts equal to the sum of the two decays, so `H(0) = 0`. It
dies out quickly and leaves the decay. When `τr ≪ τff` this is practically
the usual product form `(1 − e^{−t/τr})·[α e^{−t/τff} + (1−α) e^{−t/τfs}]`.
The sum form is used because each exponential is a one-pole IIR filter, so
the pulse becomes three independent filter banks whose outputs are added.

For every exponential the design uses `M = exp(−0.8 ns / τ)`, which is the
decay over one 0.8 ns sub-phase.

## Three time scales

| level     | period | per fabric cycle | role |
|-----------|--------|------------------|------|
| cycle     | 6.4 ns | 1                | clock of all logic (156.25 MHz) |
| sub-phase | 0.8 ns | 8                | hit-time resolution, filter sample grid |
| DAC       | 0.4 ns | 16               | output samples, by 2× linear interpolation |

Once per clock the scheduler delivers a *trigger frame*: an 8-bit vector
saying which sub-phases hold a hit, plus the 8 amplitudes. Several photons in
the same 0.8 ns bin simply add.

## Data path

```
 processor (AXI side) ──┐
                        ├─ event_source_mux ─ event_fifo ─ subphase_scheduler
 network (10 GbE/UDP) ──┘                                          │ 8 triggers + 8 amplitudes / clock
                                                                   ▼
 shaper_core:  trigger_interface ─┬─ preconv(M_r)  ─ iir_lookahead(M^8_r, M^16_r)  ─┐
                                  ├─ preconv(M_ff) ─ iir_lookahead(M^8_ff,M^16_ff) ─┼─ weighted_combiner ─ sat_lerp ─ delay ─▶ 16 × 16-bit DAC codes / clock
                                  └─ preconv(M_fs) ─ iir_lookahead(M^8_fs,M^16_fs) ─┘
 coeff_gen: M_r, M_ff, M_fs, Sf ─▶ powers M^1..M^8, M^16 per bank, latched as one set
```

`sipm_emulator_top` wires all of this together for one output channel.

## Sub-phase precision from a cycle-rate filter

This is the part of the design that takes the most explaining.

Each exponential should run as a filter at the 0.8 ns sub-phase rate:

    y(m) = M·y(m−1) + x(m)        m = sub-phase index

Eight such steps per clock would chain eight multiply-adds in one 6.4 ns
cycle. Instead, each bank holds **eight lanes**, and lane `k` only ever
computes the samples `m = 8n + k`. Unrolling the recursion eight steps gives
one update per lane per clock:

    y_k(n) = M^8 · y_k(n−1) + v_k(n)
    v_k(n) = Σ_{d=0..7} M^d · x(8n + k − d)

`v_k` is what a lane must add for the hits that fell in the last eight
sub-phases before its own sample. This **pre-convolution** (`preconv`) is a
length-8 FIR over the sub-phase stream with kernel `1, M, M², …, M⁷`. A hit at
sub-phase `j` reaches lanes `j..7` of its own cycle with weights `1..M^{7−j}`.
It reaches lanes `0..j−1` of the next cycle with the remaining weights. That
is why `preconv` keeps the previous frame. The `d = 0` tap is exactly 1 and
needs no multiplier, so each lane uses 7 multipliers, which makes 56 per bank.

A hit therefore enters the output at its exact sub-phase, with the exact
decay. Compared with a filter truly running at 1.25 GS/s, nothing is lost.
The only approximation is upstream: the hit time is rounded to 0.8 ns.

## Closing the recursion: look-ahead form

Even the per-lane recursion `y(n) = P·y(n−1) + v(n)`, with `P = M^8`, is a
problem. A multiply and an add must finish inside one clock, with no room
for the multiplier's pipeline register. `iir_lookahead` applies the recursion
twice:

    y(n) = P²·y(n−2) + P·v(n−1) + v(n)

This has the same impulse response and the same pole, but the feedback now
spans two clocks:

* The feed-forward part `w(n) = v(n) + P·v(n−1)` is computed outside the loop.
* Inside the loop, `P²·y` is registered (the multiplier output register),
  and on the next clock it is added to `w`.

`P²` is not computed in the loop. `coeff_gen` computes it beforehand and
latches it.

## Number formats

| quantity | format | notes |
|----------|--------|-------|
| `dt` | 16 bit unsigned, 0.8 ns units | up to 52 µs between bins |
| amplitude | 16 bit unsigned | the output units: a lone hit of amplitude `A` peaks at `A·max H` |
| coefficients `M^d` | 27 bit unsigned Q0.27 | products truncated back to 27 bits |
| pre-convolution output | 27 bit, 8 fraction bits | each product truncated |
| IIR state | 32 bit unsigned, 8 fraction bits | saturates at its maximum |
| `Sf` | 16 bit Q0.16 | `1 − Sf` formed as `2^16 − Sf` |
| DAC code | 16 bit unsigned | rounded, clamped to 0 … 65535; 0 is the baseline |

The 8 fraction bits keep truncation in the feedback from biasing the decay.
The remaining error against an exact floating-point model is within ±2 codes.

## Event stream and scheduling

`subphase_scheduler` turns the `(dt, amplitude)` list into trigger frames.

* **Time base.** A `start` pulse restarts the output-cycle counter at 0. It
  also sets the running event time to `LEAD` cycles ahead (default 24). An
  event's absolute time is the previous event's time plus `dt`. Bits above
  the lowest three give the cycle, and the lowest three give the sub-phase.
* **Frame ring.** Events are written into a ring of `LOOKAHEAD` frames
  (default 32), indexed by cycle. The scheduler accepts one event per clock.
  Every clock, the frame of the current cycle is sent out and its slot is
  cleared.
* **Pile-up.** A second event on an occupied sub-phase is added to it, with
  saturation at 16 bits. `pileup_cnt` counts these events.
* **Hold-off.** An event 32 or more cycles in the future waits, with
  `in_ready` low, until its slot comes into range.
* **Late events.** An event whose cycle has already been sent out means the
  source fell behind real time. It is dropped and counted in `late_cnt`; its
  `dt` still advances the time line.

The scheduler takes one bin per clock, but a burst can fill up to eight bins
per clock. Bursts are absorbed by running ahead of the output: up to 31 cycles
ahead, with a 24-cycle head start after `start`. A 20-photon event sent as 20
single hits is therefore placed without loss. The sustained rate is limited
to one non-empty bin per 6.4 ns, that is 156 M bins/s. The software must keep
the FIFO ahead of real time.

## Programming the shape

Write `cfg_m` (three Q0.27 values in the order rise, fast, slow; see
`sipm_pkg::bank_e`) and `cfg_sf`, then pulse `cfg_load`.

`coeff_gen` computes `M^2 … M^8` and then `M^16` with one multiplier per bank,
one power per clock. After 9 clocks it switches the complete set and `Sf`
over in a single clock and pulses `coef_updated`. The filters never run with
a mix of old and new coefficients. After reset it does the same with
whatever is on the ports.

The example shape `τr = 1 ns, τff = 50 ns, τfs = 100 ns, Sf = 0.2`:

| parameter | value | code |
|-----------|-------|------|
| `M_r`  = e^(−0.8/1)   | 0.449329 | `27'h39839C8` |
| `M_ff` = e^(−0.8/50)  | 0.984127 | `27'h7DF7E24` |
| `M_fs` = e^(−0.8/100) | 0.992032 | `27'h7EFAE6D` |
| `Sf` | 0.2 | `16'd13107` |

With other time constants and slow fractions the same logic produces other
three-time-constant detector pulses. For example, pulse-shape discrimination
between gamma and neutron pulses of organic scintillators only changes these
four parameters.

## Top-level interface (`sipm_emulator_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | 156.25 MHz fabric clock, asynchronous active-low reset |
| `src_sel` | in | 1 | event source: 0 processor, 1 network; change only while idle |
| `ps_valid/ps_ready/ps_data` | in/out/in | 1/1/32 | processor event stream, `event_t {dt[15:0], amp[15:0]}` |
| `net_valid/net_ready/net_data` | in/out/in | 1/1/32 | network event stream |
| `start`, `stop` | in | 1 | pulses: anchor the time base and run; stop and clear |
| `cfg_load`, `cfg_m`, `cfg_sf` | in | 1, 3×27, 16 | shape parameters |
| `dac` | out | 16×16 | DAC codes for this clock, `dac[0]` earliest, 0.4 ns apart |
| `running`, `coef_busy`, `coef_updated`, `clipped` | out | 1 | status |
| `fifo_level` | out | 11 | words in the event FIFO |
| `late_cnt`, `pileup_cnt` | out | 32 | dropped late events, summed pile-up hits |

Parameters: `FIFO_DEPTH` (1024), `LOOKAHEAD` (32), `LEAD` (24), `LATENCY` (13).

`dac[2k+1]` is sub-phase `k`, and `dac[2k]` is the mean of sub-phase `k−1`
and `k` (for `k = 0`, lane 7 of the previous clock). Interpolation therefore
needs no look-ahead.

## Latency and throughput

* **Throughput.** `shaper_core` accepts a frame every clock (initiation
  interval 1) and produces 16 samples every clock, which is 2.5 GS/s at
  156.25 MHz.
* **Latency.** From trigger frame to DAC samples the latency is 13 clocks
  (83.2 ns). The stages take 9: trigger register 1, pre-convolution 2,
  IIR 2, combiner 2, saturation and interpolation 2. An output delay line
  makes up the rest. Set `LATENCY` (at least 9) to change it.
* **From `start`.** A frame for output cycle `c` leaves the scheduler at
  clock `c + 1` after `start` and reaches `dac` 13 clocks later.

## Multipliers

| use | count |
|-----|-------|
| pre-convolution: 3 banks × 8 lanes × 7 taps | 168 |
| look-ahead IIR: 3 × 8 × 2 (`P·v`, `P²·y`) | 48 |
| combiner: 8 lanes × 2 (`(1−Sf)·y_ff`, `Sf·y_fs`) | 16 |
| coefficient generator: one 27×27 per bank | 3 |

The reference implementation of this architecture reports 235 DSP48E2
slices, about 65 for the IIRs and 170 for the pre-convolution, so the counts
are comparable. The IIR state here is 32 bits wide, which does not fit one
27×18 DSP multiply per product. Narrow it if DSP count matters more than
precision.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference model `tb/sipm_ref_pkg.sv`
runs each exponential sequentially at the 0.8 ns rate in floating point. It
uses no pre-convolution and no look-ahead, so it checks the restructured
filter against its definition.

| testbench | what it checks |
|-----------|----------------|
| `tb_shaper_core` | every DAC sample within ±2 codes of the reference, delayed by exactly 13 clocks; single hits, bursts, random hits, clipping, junk on untriggered lanes, two shapes |
| `tb_preconv`, `tb_iir_lookahead`, `tb_weighted_combiner`, `tb_sat_lerp`, `tb_trigger_interface` | each stage against its own formula and latency |
| `tb_coeff_gen` | bit-exact powers, atomic switch-over, 9-clock update |
| `tb_event_fifo`, `tb_event_source_mux` | ordering, full/empty, handshake routing |
| `tb_subphase_scheduler` | every frame, `in_ready`, late drops and pile-up counts against an independent time line |
| `tb_sipm_emulator_top` | the whole chain at default sizes (3000 output clocks): both event ports, FIFO full, scheduler hold-off, pile-up, coefficient reload, clipping, late drop |
| `tb_workload_scintillation` | a 20-photon event and three overlapping events (20, 15, 25 photons at 10, 80, 200 ns), binned like the upstream software, against the ideal unbinned pulse sum |

Assertions in the RTL check these invariants during every
simulation:

* the event FIFO never holds more than its depth;
* the two event sources never both see `ready`;
* the scheduler never writes the frame slot that it is reading out.

Inside the top, the two internal event streams (selected source to FIFO, and
FIFO to scheduler) run through `event_stream_if`. This interface groups
`valid`, `ready` and `data` and asserts the handshake rules: a waiting word is
neither withdrawn nor changed before `ready`. The checks pause for one clock
when `src_sel` changes.

In `tb_workload_scintillation` the peak and area agree with the ideal curve
within 0.5 % and 0.1 %. Off the rising edges, samples differ by at most about
0.8 % of the peak. That is the expected effect of rounding hit times down to
0.8 ns.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/sipm_pkg.sv tb/sipm_ref_pkg.sv tb/tb_sipm_emulator_top.sv \
        --top-module tb_sipm_emulator_top -o sim
    ./obj_dir/sim

Every testbench finishes in well under a second of wall time.

## Departures from the reference architecture and open points

* **One output channel.** The hardware carries two DACs. This RTL drives one
  channel; a second channel is a second instance of the data path.
* **Left outside.** The processor, the 10 GbE transceiver with its UDP
  receiver, and the LTC2000 DACs with their serial interface are not part of
  this RTL. Their event streams and the 16 samples per clock are plain ports.
* **Coefficients from one value.** Software writes one `M` per exponential,
  and the hardware derives the powers. In the reference architecture the
  powers are "pre-loaded"; who computes them is not specified.
* **Own choices.** All widths, the handshakes, the reset behaviour, the
  scheduler's ring and head start, the handling of late events, the static
  source select, the midpoint placement of interpolated samples and the
  unsigned DAC code were chosen here.
* **Padded latency.** The 13-clock latency is reached by padding a 9-clock
  pipeline.
* **Timing not checked.** Timing closure at 156.25 MHz has not been checked
  on an FPGA. The look-ahead structure is there, but the wide additions in
  `preconv` and the 32-bit IIR state may need retiming or narrower data.

## Files

`rtl/`: `sipm_pkg` (types, widths), `event_stream_if` (stream bundle and its
handshake checks), `sipm_emulator_top`, `event_source_mux`,
`event_fifo`, `subphase_scheduler`, `coeff_gen`, `shaper_core`,
`trigger_interface`, `preconv`, `iir_lookahead`, `weighted_combiner`,
`sat_lerp`. `tb/`: one `tb_<module>` per module, `tb_workload_scintillation`,
and the reference model `sipm_ref_pkg`.
