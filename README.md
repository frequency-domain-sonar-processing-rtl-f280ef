# Frequency-domain sonar beamformer: the phase-shift/accumulate engine

A frequency-domain beamformer steers a sensor array by shifting phases in the
Fourier domain. It runs in three stages:

1. An N-point FFT of every sensor channel.
2. For every beam, each sensor's spectrum is multiplied bin by bin by a complex
   weight. The products are then summed over the sensors.
3. An inverse FFT of each beam's summed spectrum gives the beam's time signal.

With thousands of beams, stage 2 is nearly all of the arithmetic. This RTL is
the FPGA engine for stage 2. The FFTs and IFFTs are done on DSP processors
outside it.

For beam `b`, sensor `s` and frequency bin `f`, stage 2 computes

    response_b[f] = sum over s of  w[b][s][f] * X[s][f]

Each term is one **CPAC**: a complex phase shift followed by an accumulate. The
design rests on two ideas:

* **The CPAC is done in polar form.** `X` arrives as a magnitude and a phase,
  and the weight `w = exp(j*phi)` only rotates it. So the phase shift is one
  addition to the phase. A pipelined CORDIC then converts the result to
  rectangular form, and two adders accumulate it. That is three adders and one
  CORDIC. A rectangular complex multiply-accumulate needs four multipliers and
  four adders, and a 16-bit CORDIC costs about as much area as a single 16x16
  multiplier.
* **Weights are generated, not stored.** A steering weight is
  `exp(j * omega_f * dt[b][s])`. For one beam and one sensor the delay `dt` is
  the same in every bin. So the weight phase is formed on chip as
  `f * dt[b][s]`, with `f` counted locally. The weight memory shrinks from one
  word per (beam, sensor, bin) to one word per (beam, sensor). That is 256
  times smaller for a 256-point FFT. The extra multiplier costs no throughput,
  because it sits inside the pipeline.

Each processing element (PE) does one CPAC per clock. One FPGA holds two PEs,
which form two different beams from the same broadcast data. At 40 MHz that is
80 million CPACs per second per chip.

## Data stream and framing

All PEs of a chip receive the same sample stream. The stream is a `polar_t`:
a 16-bit unsigned magnitude and a 16-bit phase. It arrives in sensor-major
order: bins `0..BINS-1` of sensor 0, then those of sensor 1, and so on up to
sensor `SENSORS-1`. One such **block** forms one beam in every PE.

* `in_valid` marks a sample. Idle clocks may appear anywhere, and the
  pipeline simply carries bubbles.
* `in_sof` marks the first sample of a block. It is optional. The position
  counters wrap on their own, so back-to-back blocks need no marker. An
  `in_sof` that arrives in the middle of a block restarts the count at
  (sensor 0, bin 0) and pulses `resync`. Sensor 0 of the new block overwrites
  each bin's sum, so the partial block leaves no trace. The exception is a
  block abandoned during its last sensor's pass: the bins it had already
  finished have been output.
* `beam_in[p]` is sampled with the first sample of each block. Each PE holds
  it for the whole block. The value must be below `BEAMS`, which an assertion
  checks.

**Phases are binary angles.** The full 16-bit range is one turn, so `16'h4000`
is pi/2. Every phase sum wraps modulo 2*pi with no logic. The delay `dt` uses
the same units: it is the phase step per frequency bin. The weight phase is
therefore the low 16 bits of `f * dt`.

## Inside a PE

```
 broadcast (mag, phase) ──► [A reg] ──────────► [delay x2] ─► phase_adder ─► cordic_p2r ─► complex_accumulator ─► result_f
                              │                               ▲  (+omega)      (17 clk)       (per-bin memory)
 pe_control ── f, first, last ┘        f ─► phase_mult ───────┘
      │                                      ▲ (f*dt, 2 clk)
      └── mem_addr ──► delay RAM ── dt ──────┘ (1 clk)
```

| stage | module | work | clocks |
|---|---|---|---|
| control | `pe_control` | count (s, f); drive `mem_addr = beam*SENSORS + s` | 0 (combinational) |
| wait for RAM | `pipe_delay` | hold the sample while the RAM answers | 1 |
| weight phase | `phase_mult` | `omega = (f * dt) mod 2^16` | 2 |
| phase shift | `phase_adder` | `phase + omega`, magnitude passed along | 1 |
| polar to rectangular | `cordic_p2r` | `(K*mag*cos, K*mag*sin)` | 17 |
| accumulate | `complex_accumulator` | per-bin complex sum over sensors | 1 |

A result leaves **22 clocks** after the last sensor's sample for its bin. At
the chip boundary it is 23 clocks, because `beamform_fpga` registers the
broadcast input once. Side-band fields (valid, `f`, first-sensor and
last-sensor flags) travel with each sample through `pipe_delay` chains and
through the CORDIC's tag path. This keeps every stage aligned however the
idle clocks fall.

### The CORDIC

`cordic_p2r` works in rotation mode. It starts from the vector `(mag, 0)` and
drives the residual angle to zero.

* **Quadrant fold.** CORDIC converges only for angles within about ±99°. If
  the phase lies in [pi/2, 3pi/2), which is true when its top two bits differ,
  the start vector is negated and pi is subtracted from the phase (the top bit
  is flipped). The remaining angle then lies in [-pi/2, pi/2).
* **Micro-rotations.** Stage `i` rotates by ±atan(2^-i) using shifts and adds.
  There are 16 stages, one register each. The angle table is
  `round(atan(2^-i) * 2^20 / (2*pi))` on a 20-bit residual angle. The x/y path
  carries 3 guard fraction bits, which are rounded off at the output.
* **Gain.** The CORDIC gain `K = prod sqrt(1 + 2^-2i)`, about 1.6468, is *not*
  removed. It scales every term of every beam by the same constant, so it can
  be folded into the IFFT scaling. This is why the outputs are 18 bits signed
  (`RECT_W = MAG_W + 2`). Compared with the exact `K*mag*cos/sin`, the error is
  at most about 5 LSB at full-scale magnitude.

### The accumulator

The bins of one sensor arrive in a row, so each bin's running sum must be kept
for a whole sensor pass. `complex_accumulator` keeps `BINS` complex sums, of
`ACC_W = 18 + log2(SENSORS)` bits each, in a memory that it reads and writes in
the same clock.

* A sample of sensor 0 overwrites its bin's entry, so no clearing pass is
  needed between blocks.
* Samples of the middle sensors are added to the entry.
* A sample of the last sensor adds its value and sends the sum out as
  `result_f` without writing it back.

During the last sensor's pass, results therefore come out at one bin per
clock, in bin order.

## The chip (`beamform_fpga`, top)

The top holds `NUM_PE` PEs behind one registered broadcast bus. Each PE has its
own delay-RAM port: `mem_rd`, `mem_addr` (20 bits) and `mem_dt` (16 bits). The
RAM must return the data **one clock after** the read, as a synchronous SRAM
does. The RAM itself is not part of the RTL. At 10,000 beams x 64 sensors x 16
bits it holds about 10 Mbit, which is external-memory territory. Its data
comes in through the ports. The outputs are per PE: `out_valid`, `out_f`,
`out_re` and `out_im` (24 bits signed), plus `resync`. The ports are unpacked
arrays indexed by PE.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_PE` | 2 | two PEs per FPGA, from the original design |
| `BINS` | 256 | 256-point FFT, from the original design |
| `SENSORS` | 64 | this design's choice; the original does not fix it |
| `BEAMS` | 10000 | the original's example beam count; sets the address width |
| `MAG_W`, `PHASE_W` | 16, 16 | 32-bit FFT output, from the original design |
| `DT_W` | 16 | this design's choice |
| `CORDIC_STAGES` | 16 | 16-bit CORDIC, from the original design |
| `MUL_STAGES` | 2 | this design's choice |
| `GUARD` (CORDIC) | 3 | this design's choice |

`SENSORS` and `BINS` may be any values of 2 or more. `BINS` must fit in 16
bits.

## Where this RTL departs from, or adds to, the original

The block structure follows the original PE: control, multiplier, phase
adder, CORDIC and complex accumulator. So do its data widths, FFT length,
CORDIC size and two PEs per chip. The original gives little more than the
block diagram, so this design chose the rest:

* the binary-angle phase format and the units of `dt`;
* the sensor-major stream order, taken from the original's loop order;
* the framing signals `in_valid`, `in_sof` and `resync`, and the beam-selection
  input;
* the address layout `beam*SENSORS + s` and the one-clock RAM timing;
* every pipeline depth, and the CORDIC's quadrant fold, guard bits and
  uncorrected gain;
* the accumulator's memory organisation and its "first sensor overwrites"
  rule;
* the synchronous active-high reset. It clears only valid flags and counters;
  datapath registers are not reset.

The original design ran at 40 MHz on Xilinx XC4000XL-series parts. This RTL is
written generically and has not been timed on any device. The original also
compares the engine with DSP software implementations; those baselines are not
part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it shows |
|---|---|
| `phase_mult_tb` | `omega = f*dt mod 2^16` for random and extreme operands; latency 2 |
| `phase_adder_tb` | wrapping phase sum, magnitude kept, latency 1 |
| `cordic_p2r_tb` | float reference `K*mag*(cos, sin)` within 6 LSB; all quadrants; latency 17; tag and valid alignment |
| `complex_accumulator_tb` | exact sums over several blocks with random idle clocks and full-scale values; stale memory contents are ignored |
| `pe_control_tb` | bin, flags and address for every sample; beam taken only at block start; block starts with and without `in_sof`; mid-block resync |
| `beamform_pe_tb` | a PE and the RAM model against a floating-point beamformer; latency 22; results on consecutive clocks |
| `beamform_fpga_tb` | the top at its **default** size (2 PEs, 256 bins, 64 sensors, 10,000 beams) |

`beamform_fpga_tb` runs four blocks: an abandoned block with a resync, a block
started by counter wrap, a back-to-back block and blocks with idle clocks. One
block uses beams 0 and 9999. The test checks all 768 results per PE against the
floating-point reference and checks the 23-clock latency. It also requires
that both PEs deliver in the same clock (two CPACs per clock) and that phase
sums wrap.

`tb/dt_ram_model.sv` is a behavioural delay RAM for the testbenches. Its
contents are a formula of the address, `(addr*40503 + seed*7919 + 12345) mod
2^16`, so no data files are needed.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sonar_pkg.sv tb/beamform_fpga_tb.sv --top-module beamform_fpga_tb
./obj_dir/Vbeamform_fpga_tb
```

Change the testbench name to run another. The full-size test takes well under
a second.
