# Noise-shaping PWM and jitter-free gate path for a class-D half-bridge

A digitally controlled class-D amplifier for precision motion systems has to produce an
output whose noise from DC to about 10 kHz is more than 100 dB below the signal. Two
things stand in the way, and this RTL deals with both:

* **Amplitude resolution.** A counter-based PWM at ~100 kHz switching frequency and a
  100 MHz counter clock has only 512 duty-cycle steps (9 bits). On its own that
  leaves about 66 dB of signal-to-noise ratio from DC to 10 kHz. The
  modulator therefore puts a *noise shaper* in front of the PWM: a feedback loop that
  rounds a 26-bit reference down to 9 bits and pushes the rounding error out of the
  0..10 kHz band, to frequencies where the mechanics and the output filter do not care.
* **Timing jitter.** Every gate-signal edge that moves by a few hundred picoseconds
  adds broadband noise. Most of that jitter comes from the digital signal isolator
  between the controller and the gate driver. On the isolated side, a D flip-flop
  clocked by a separately isolated low-jitter clock re-times the gate signal, so the
  edges keep the clock's jitter rather than the isolator's. A blanking signal freezes
  the flip-flop while the bridge output slews, because the isolator may put out garbage
  during fast common-mode transients.

The design follows the architecture of M. Mauerer, A. Tüysüz and J. W. Kolar, "Gate
Signal Jitter Elimination and Noise Shaping Modulation for High-SNR Class-D Power
Amplifiers" (ETH Zürich). It is built in the configuration that paper evaluates in
hardware: an 11th-order noise-coupled shaper with a 26-bit input and a 9-bit output,
a PWM frequency of 100 MHz / 1024 = 97.66 kHz, and one reference sample per PWM
period, so there is no interpolator. The paper publishes neither loop-filter
coefficients nor cycle-level timing. Those, and everything else marked below as a
design choice, are this implementation's own.

## Signal path

```
            control clock clk (100 MHz, phase-shifted)                 | isolated side, per driver
                                                                       |
ref_i --> ncs_noise_shaper --> +256 --> pwm_modulator --> gate_sequencer --G--> [isolator] --g_iso_i--+
 26 b      (1 sample /period)   9 b      (1024 clk/period)   dead time |                                 v
   ^                                          |               + BLK  --BLK-> [isolator]->[RC+diode]-ce_i-> resync_ff --> g_ff_o --> driver IC
   +------------- ref_req_o <-- period strobe +                        |                                 ^
                                                                       |          clk --> [clock isolator] --clk_iso_i
```

`classd_modulator_top` holds everything digital: the shaper, the PWM, the sequencer
and both drivers' re-synchronisation flip-flops. The isolators, the RC filter, the
clock isolator, the driver ICs and the transistors are analogue or bought parts. They
connect through the top's `g_o`/`blk_o` outputs and its `g_iso_i`, `ce_i` and
`clk_iso_i` inputs. In every two-bit port, bit 1 is the high-side transistor and bit 0
the low-side one.

| File | Module | Role |
|---|---|---|
| `rtl/classd_pkg.sv` | package | widths, loop-filter coefficients, sequencing constants, gate state type |
| `rtl/ncs_noise_shaper.sv` | `ncs_noise_shaper` | 26-bit to 9-bit noise-coupled shaper |
| `rtl/fir_filter.sv` | `fir_filter` | strictly causal FIR, used as H_FWD and H_BWD |
| `rtl/pwm_modulator.sv` | `pwm_modulator` | double-sided counter PWM, 2·512 cycles per period |
| `rtl/gate_sequencer.sv` | `gate_sequencer` | complementary gates with dead time, BLK generation |
| `rtl/resync_ff.sv` | `resync_ff` | isolated-side D flip-flop with clock enable |
| `rtl/classd_modulator_top.sv` | `classd_modulator_top` | the whole digital path |

## The noise-coupled noise shaper

This is the least obvious part. Each PWM period, on the sample strobe, the shaper
computes:

```
v  = x + ( H_FWD(x - yA) + H_BWD(vs - yA) ) >> 24     x: 26-bit reference sample
vs = saturate(v) to 26 bits
q  = vs >> 17                                         floor: the 17 low bits are dropped
yA = q << 17                                          q rescaled to the input range
```

`q` is the 9-bit output. `H_FWD` and `H_BWD` are 11-tap FIR filters over past
samples only (z^-1 .. z^-11). If saturation does not occur, solving the loop gives

```
y = x + NTF(z) · (yA - vs),     NTF = (1 - H_BWD) / (1 + H_FWD),     STF = 1
```

So the signal passes unchanged, and the truncation error is filtered by the NTF. H_BWD
sets the NTF's zeros and H_FWD its poles, so any NTF whose numerator and denominator
both start with 1 can be written straight into the two coefficient sets.

**Coefficients (design choice).** The NTF in `classd_pkg` has one zero at DC and five
conjugate zero pairs at 2.66, 5.13, 7.25, 8.84 and 9.78 kHz. They are placed to minimise
the integrated noise gain over 0..10 kHz at 97.66 kHz sampling. The 11 poles are those
of a Butterworth high-pass, scaled so that the NTF gain above the band is 20 (26 dB).
The coefficients are signed 36-bit numbers with 24 fractional bits, and the largest
needs 34 bits. The closed-form rule for each coefficient is in the package header. A
bit-true model and the end-to-end testbench both give about 122–127 dB in-band SNR at
the shaper output for a 170 Hz sine at modulation index 0.85, with no saturation. The
paper reports 138 dB for its own optimised coefficients, which it does not publish.
A more aggressive NTF gives more suppression but saturates sooner. With an
out-of-band gain of 56, the loop started to clip at a modulation index of 0.9.

**Stability and saturation.** With a 9-bit quantiser and these coefficients, the loop
ran without clipping for sines up to 0.9 of full scale. Larger inputs make `Sat` clip
the quantiser input, and `sat_o` reports each clipped sample. The output word stays in
range, but the in-band noise is no longer shaped while the loop clips.

**Timing.** The whole path from the FIR delay lines through 22 multipliers to `q` is
combinational. It is used as a multicycle path, because its inputs change only once
every 1024 clock cycles. A timing constraint of 1024 cycles (or a serial MAC in its
place) is needed for synthesis at 100 MHz.

## PWM and its timing relation to the shaper

The counter runs 0, 1 … 511, 511 … 1, 0, which is 1024 cycles per period. Each end
value is held for two cycles, so the output (high while `count < CMP`) is high for exactly
2·CMP cycles, centred on the period boundary. CMP is the shaper output plus 256: a
shaper output of 0 gives 50 % duty. `period_o`/`ref_req_o` is high in the last cycle of
each period. On that edge the PWM loads its new CMP, the shaper takes `ref_i` and
registers a new output. The CMP loaded on a strobe is therefore the output computed on
the previous strobe: a sample reaches the bridge one PWM period after it is taken.

## Gate sequencing: dead time and blanking

`gate_sequencer` has three states: low side on, both off, high side on. A state must be
held for `DEAD_CYC` = 5 cycles (50 ns) before the next change. This gives the dead time
and also the shortest on-time. A PWM pulse shorter than that cannot reach the gates and
is absorbed. This happens near full modulation, where CMP is 0..2 or 509..511.

After every gate change, `BLK` goes low for `BLK_CYC` = 2 cycles, starting `BLK_DLY` = 1
cycle later. The order of events on the isolated side is the point of the scheme:

1. G changes at a control-clock edge, and the isolator delivers it with jitter.
2. The next isolated-clock edge latches it into the flip-flop, with the clock's jitter only.
3. BLK was sent one cycle after G, so it arrives after the latch edge. It pulls CE low
   at once through the bypass diode.
4. Only then does the driver IC change the gate voltage, because its 5..30 ns
   propagation delay buys the margin. The bridge output slews while CE is low, so
   whatever the isolators put out meanwhile is ignored.
5. BLK returns high. CE follows only after the RC delay, so short high spikes on the
   BLK isolator output never re-enable the flip-flop early.

Both drivers get the same BLK, because the output transient can follow either
transistor's switching. The lock-out time must cover the BLK delay, the BLK pulse, the
isolator delay and the RC recovery time. The RTL checks the digital part at elaboration
(`DEAD_CYC > BLK_DLY + BLK_CYC`); the analogue part is the board's responsibility.

The control clock must lead the isolated clock in phase, so that the isolator output
settles inside the flip-flop's sampling window. In the testbench the isolated clock
lags by 5 ns and the isolator takes 8 ± 0.6 ns. That leaves more than 6 ns of setup
time and 8 ns of hold time.

## Re-synchronisation flip-flop

`resync_ff` is a plain D flip-flop with an enable, clocked by `clk_iso_i`. It has no
reset, like the discrete part it stands for. Its output is defined from the first
enabled clock edge on. On a board, the clock enable would be an AND gate in front of
the clock pin. Here it is written as a synchronous enable. The two behave the same
when CE changes while the clock is low. If CE rises while the clock is high, the AND
gate makes an extra clock edge and the synchronous enable does not.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `REF_W` | 26 | top, shaper | reference width m |
| `OUT_W` / `RES_W` | 9 | top, shaper, PWM | shaper output width n and PWM resolution; f_PWM = f_clk / 2^(n+1) |
| `ORDER` | 11 | shaper | taps per FIR, i.e. shaper order |
| `COEF_W`, `COEF_FRAC` | 36, 24 | shaper | coefficient format |
| `FWD_COEF`, `BWD_COEF` | package | shaper | NTF poles and zeros |
| `DEAD_CYC` | 5 | top, sequencer | dead time / minimum state time, cycles |
| `BLK_DLY`, `BLK_CYC` | 1, 2 | top, sequencer | BLK delay after a gate change and BLK length, cycles |

Changing `OUT_W` changes the PWM frequency. Changing `ORDER` needs a new coefficient
set. To design one, take the desired NTF = N(z)/D(z) with N and D monic, and set
`BWD_COEF[i-1] = round(-n_i · 2^24)` and `FWD_COEF[i-1] = round(d_i · 2^24)`. Then
simulate it for stability at the largest input you intend to use.

## Simulation

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.
With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/classd_pkg.sv rtl/*.sv \
    tb/tb_signal_isolator.sv tb/tb_ce_filter.sv tb/tb_classd_modulator_top.sv \
    --top-module tb_classd_modulator_top -o sim && obj_dir/sim
```

Replace the top module and testbench file to run the unit testbenches
(`tb_ncs_noise_shaper`, `tb_fir_filter`, `tb_pwm_modulator`, `tb_gate_sequencer`,
`tb_resync_ff`). Each finishes in well under a second. The end-to-end testbench runs in
about 5 s.

`tb_classd_modulator_top` uses every default parameter. It feeds four periods of a
170 Hz, 0.85-amplitude sine (2300 PWM periods), then a level just inside negative full
scale, then a disable and re-enable. Around the design it models:

* four isolator channels with a delay of 8 ns ± 0.6 ns, random per edge;
* two RC/diode CE filters with 8 ns recovery;
* the isolated clock, 5 ns behind the control clock;
* driver ICs with 15 ns delay;
* a 6 ns bridge transient after every gate-voltage change, during which all isolator
  outputs toggle every 0.7 ns.

It checks the following:

* one sample per 1024 cycles;
* 2·CMP high cycles in every period;
* in-band SNR of the shaper output above 110 dB (127 dB measured with a
  Blackman-Harris window);
* in-band SNR of the PWM waveform itself above 105 dB (119 dB measured), computed from
  the exact Fourier transform of the measured rectangular pulses, with harmonics 2..5
  left out of the noise;
* THD (2nd to 5th harmonic) of that waveform below −100 dB (−114 dB measured);
* mean tracking error below 1/8 LSB;
* no shoot-through, and at least 5 cycles of dead time;
* CE low at every gate-voltage change;
* every flip-flop edge exactly 15 ns after its G edge, while the isolator delay varies
  by 1.2 ns;
* no flip-flop edge without a G edge.

It also requires each mechanism to have happened at least once: blanking, glitch
rejection, saturation, an absorbed short pulse and disable.

The unit testbenches compare the shaper bit for bit with an independent integer model
(sine, random and overdriven input), the FIR with a software sum, the PWM period by
period, the sequencer against its timing rules, and the flip-flop against randomly
timed, glitching inputs.

Two further testbenches run the design on the cases that motivate it, at default
parameters:

* `tb_classd_jitter_workload` measures gate-path jitter. It applies a zero reference,
  which gives an exact 50 % square wave at both gates. It gives the isolated clock
  9 ps RMS of random jitter and has no bridge transients. It measures each edge's
  deviation from its nominal time:
  * isolator output: about 340 ps RMS;
  * flip-flop output: 9.0 ps RMS, the clock's own jitter.

  It reports the SNR limit that each jitter value sets,
  SNR = 20·log10(m / (4·√2·T_rms) · √(T_PWM / f_BW)) with m = 1 and f_BW = 10 kHz.
  That gives about 84 dB before the flip-flop and 116 dB after it. It fails unless the
  flip-flop output is at least ten times cleaner than the isolator output.
* `tb_ncs_fig13_workload` feeds the shaper alone with an arbitrary, slowly varying
  12-bit signal placed in the upper bits of the reference. Single 9-bit outputs
  (rescaled by 8) miss the input by about 33 12-bit LSB RMS. Averaged over 256
  samples, the error stays below 0.3 LSB. This is unity signal transfer, with the
  quantisation error moved to high frequencies.

## How far to trust it

* What the tests prove: the loop equations, the PWM arithmetic, the sequencing rules
  and the re-timing all behave as described above. The testbenches can fail: each one
  was run against a deliberately broken copy of its module, and each caught the fault.
* What the paper describes and this RTL follows: the noise-coupled structure (FIR
  filters, saturation, shift quantiser, shift rescale), the NTF formula, order 11,
  26 → 9 bits, the up/down counter PWM, the flip-flop with clock enable on the isolated
  clock, and a shared BLK that is applied after the gate change and cleared before the
  next one.
* Design choices, not from the paper: the NTF coefficients and their fixed-point
  format; the signs at the loop's error node, chosen to give the stated NTF; the
  up/down counter holding each end value for two cycles; the CMP load instant and the
  one-period latency; the +256 offset; the three-state dead-time machine and its cycle
  counts (5 / 1 / 2); the absorption of short pulses; asynchronous resets on the
  control side.
* Not verified here: timing closure at 100 MHz; the real analogue parts (the models
  above are idealised); the SNR of the bridge output, which also depends on dead time
  and load current. The paper reports about 98 dB (simulated) and 97 dB (measured)
  there, against 138 dB at its shaper output. The ideal PWM waveform checked here
  (119 dB SNR, −114 dB THD) contains neither dead time nor bridge effects.
* The PWM frequency is 97.66 kHz, tied to the 100 MHz clock. A 100 kHz PWM would need
  a different clock or a non-power-of-two counter range.
