# Decimation filter for a second-order sigma-delta audio ADC

A sigma-delta modulator turns an audio signal into a 1-bit stream. The stream is
oversampled 128 times: 6.25 MHz for a 48.8 kHz output. The modulator pushes its
quantisation noise to high frequencies. What remains is digital: remove that noise and
bring the rate down to the audio sample rate. This RTL does that in three stages on a
single 50 MHz clock:

```
pulseIN (1 bit, 6.25 MHz)
  -> zero pad to 16 bits
  -> CIC, 2 sections, /32        -> 195.3125 kHz
  -> FIR, 9 taps, polyphase /2   ->  97.65625 kHz
  -> FIR, 19 taps, polyphase /2  ->  48.828125 kHz, 16-bit words
  -> 256-word capture buffer -> serial transmitter (8N1, 115200 baud) -> tx
```

The first stage has no multipliers. It does most of the rate reduction. The two FIR
stages each halve the rate and do the real low-pass filtering. In the FIR stages, each
tap is a small "atom": a coefficient register, a multiplier, an adder and a four-state
controller. The atoms are chained so that all of them multiply in the same clock, and
the partial sum then ripples through them one addition per clock.

The capture buffer and serial transmitter turn the filter into a stand-alone
demonstrator. They store 256 consecutive output words and then send them to a PC.

## Rates, strobes and the data handshake

Everything runs on `clk` (50 MHz). No stage has a clock of its own. Stages pass data
with a one-clock strobe plus a data word that stays valid until the next strobe:

| point            | strobe                    | period (clocks) | rate          |
|------------------|---------------------------|-----------------|---------------|
| modulator bit    | `reqNewData`              | 8               | 6.25 MHz      |
| CIC output       | CIC `isNewSample`         | 256             | 195.3125 kHz  |
| FIR stage 2 out  | stage 2 `isNewSample`     | 512             | 97.65625 kHz  |
| core output      | `isNewSample`             | 1024            | 48.828125 kHz |

The CIC takes `pulseIN` at the clock edge that ends a cycle in which `reqNewData` is
high. A bit source stepped by `reqNewData` keeps pace with the filter. In the hardware
demonstrator that source is a signal generator playing back a recorded modulator
stream. `pulseIN` is treated as synchronous to `clk`. There is no synchroniser: add
one if the bit comes from a free-running source.

Each stage's `isNewSample` is the next stage's `enable`. A consumer may read the data
one clock after the strobe, because the data is held until the next strobe. The FIR
decimation front end relies on this.

Reset (`rst`) is synchronous and active high. It must last at least one clock. After
reset the FIR stages need two clocks to load their coefficients (see below). The CIC's
first output strobe comes much later than that, so the chain starts up by itself.

## CIC stage

The transfer function is H(z) = ((1 - z^-32) / (1 - z^-1))^2. This is a 63-tap
triangular window with weights 1, 2, ..., 32, ..., 2, 1 and DC gain 32^2 = 1024. In
hardware it is built as two integrators at the input rate, a held sample, and two combs
at the output rate. All of it uses 16-bit wrap-around arithmetic. The integrators
overflow all the time, and that is correct: the combs undo the wrap, and the result
needs only 11 bits.

- A 3-bit counter makes the integrator enable once every 8 clocks. The second
  integrator's enable is the first one's delayed by one clock, so it adds the
  already-updated first sum.
- A 5-bit counter of second-integrator updates makes the comb enable once per 32
  inputs. In that clock the integrator output is passed to the combs and latched. The
  second comb is enabled one clock after the first.
- The CIC output is unsigned, 0 to 1024. An all-ones input stream settles at exactly
  1024.

## FIR stages: polyphase split and atom chain

This is the least obvious part of the design.

### Polyphase split

A decimate-by-2 FIR needs only every second output,
y[m] = sum_j h[j] x[2m - j]. The sum splits into an even branch and an odd branch:

- even branch: x[2m], x[2m-2], ... times h[0], h[2], ...
- odd branch: x[2m-1], x[2m-3], ... times h[1], h[3], ...

`fir_decim_sys` produces both branch inputs at the output rate. A register
(`prevData`) captures each input one clock after its enable, so at any enable it holds
the previous sample. Two downsample-by-2 units, one fed with the input and one with
`prevData`, pass every second enable. The first enable after reset is passed. Each
unit has a toggle flip-flop, and its strobe is `enable AND NOT toggle`. On each passed
enable the split delivers x[2m] and x[2m-1] together, with one strobe.

The branch lengths are:

| stage | taps | even branch | odd branch |
|-------|------|-------------|------------|
| 2     | 9    | 5           | 4          |
| 3     | 19   | 10          | 9          |

### Delay lines that also deliver the coefficients

Each branch has a tap delay line (`fir_coef_fifo`) with one register per atom.
`taps[0]` holds the newest sample. Reset does not clear these registers. It loads them
with the branch's coefficients, h[0], h[2], ... in the even line. In the first clock
after reset every atom copies its coefficient from the tap it also reads samples
from. In the second clock the first atom raises `clrFIFO`, and both lines are cleared.
From then on the lines are plain shift registers. They shift on the split's strobe.

### Atom state machine (`fir_atom`)

```
LOAD_COEF --> CLEAR_FIFO --> DO_MULT --enable_mult--> ADDITION --enable_add--+
                               ^                                             |
                               +---------------------------------------------+
```

- In `DO_MULT`, `enable_mult` registers sample x coefficient (signed, 16 x 16 to 32
  bits) and pulses `mult_ready`.
- In `ADDITION`, `enable_add` registers `adder_input` + product into `adder_out` and
  pulses `add_ready`.

An assertion flags an `enable_mult` that arrives while an addition is still pending.

### Schedule of one output (stage 2; stage 3 is the same with 19 atoms)

```
clock 0    split strobe: both delay lines shift in x[2m], x[2m-1]
clock 1    enable_mult to all 9 atoms (the strobe delayed one clock)
clock 2    atom 0 (odd branch, first tap): 0 + product          [its own mult_ready]
clock 3    atom 1 adds its product to atom 0's sum              [atom 0's add_ready]
...
clock 10   atom 8 (even branch, last tap) adds the last product
clock 11   isNewSample = atom 8's add_ready, dataOUT valid
```

The chain starts with a constant 0 at the first atom of the odd branch. It runs
through the odd branch and then the even branch. The last atom's sum is truncated to
bits [30:15] for `dataOUT`: the coefficients are Q1.15, and the truncation rounds
toward minus infinity. Latency from the enabling input to `isNewSample` is
NUM_TAPS + 2 clocks: 11 for stage 2 and 21 for stage 3. Inputs must arrive no more
often than every NUM_TAPS + 3 clocks. In this chain they arrive every 256 or 512
clocks.

## Coefficients

Both FIR coefficient sets are this design's own. They live in `rtl/sdadc_pkg.sv`.
Each is a Parks-McClellan equiripple low-pass with a 20 kHz passband edge and a
stopband weight 10 times the passband weight. Each set is rounded to Q1.15, and then
the centre tap is adjusted so that the set sums to exactly 32768. The whole chain
therefore has DC gain exactly 1024.

| stage | taps | sampling rate | stopband from | passband ripple | stopband level |
|-------|------|---------------|---------------|-----------------|----------------|
| 2     | 9    | 195.3125 kHz  | 83 kHz        | about 0.11 dB   | about -43 dB   |
| 3     | 19   | 97.65625 kHz  | 32 kHz        | about 0.33 dB   | about -33 dB   |

The original specification asked for about 0.1 dB of passband attenuation, and for
100 dB (stage 2) and 90 dB (stage 3) of stopband attenuation. Those stopband figures
cannot be reached with these lengths and band edges. Treat these sets as placeholders
with the right length and symmetry. To use your own filters, change the two
`localparam` arrays, and keep `stage_coefs` in `tb/sdadc_ref_pkg.sv` in step with
them. The RTL takes any length through `NUM_TAPS`.

Signals that use the full 16-bit range can overflow the 32-bit sum only if
32768 x sum|h| exceeds 2^31. For the sets above the largest case is 32768 x 60,000,
about 1.97e9, which still fits. The CIC only ever delivers values from 0 to 1024.

## Output resolution and measured SNR

The chain keeps the CIC's scale: full scale at the core output is 1024. A full-scale
input therefore uses only about 11 of the 16 output bits.

The truncation to one output LSB sets the noise floor. Take a sine of 0.25 full scale,
which is 256 LSB in amplitude: it cannot get more than about 56 dB in-band SNR
(10 log10((256^2 / 2) / (1/12))).

`tb_snr_1khz` measures the SNR with a coherent 1 kHz tone, a 1024-point DFT and noise
integrated up to 20 kHz. It gets 55 dB from the bit-exact RTL. The same coefficients in
floating point give about 76 dB, so the filters are not the limit.

For more resolution, take the output bits lower in the atom sum. In
`fir_decimator.sv` that means changing `COEF_FRAC_BITS +: WORD_LEN`, for example by
giving stage 3 a gain of 16 to 32. Check the 16-bit output range when you do.

## Capture buffer and serial output

The filter delivers a word every 20.5 us. A byte on a 115200-baud line takes 87 us. So
`data_buffer` does not stream. It alternates between two phases:

1. **Fill.** The next 256 output strobes are written to a 256 x 16 synchronous RAM.
2. **Empty.** Each word is read back and sent as two bytes, low byte first. The buffer
   pulses `send` and waits for the transmitter's `done` before the next byte. Output
   words produced during this phase, about 44 ms, are dropped.

After the last byte the buffer fills again. A PC therefore receives blocks of 256
consecutive samples, 512 bytes per block. Consecutive blocks are separated by the gap
of the send time. The byte order, the drop policy and the baud rate
(`CLKS_PER_BIT` = 434 at 50 MHz) are choices of this implementation.

## Modules

| file                   | content |
|------------------------|---------|
| `sdadc_pkg.sv`         | word widths, types, both coefficient sets |
| `cic_integrator.sv`    | enabled accumulator section |
| `cic_comb.sv`          | enabled differentiator section, M = 1 |
| `cic.sv`               | CIC decimator with rate counters, `reqNewData` |
| `fir_downsampler.sv`   | downsample-by-2 with toggle |
| `fir_decim_sys.sv`     | polyphase split into x[2m] and x[2m-1] |
| `fir_coef_fifo.sv`     | branch delay line, preloaded with coefficients |
| `fir_atom.sv`          | multiply/add atom with its state machine |
| `fir_decimator.sv`     | polyphase FIR decimator by 2; defaults are stage 2 |
| `filter_core.sv`       | CIC -> FIR stage 2 -> FIR stage 3 |
| `data_buffer.sv`       | 256-word fill/empty buffer, byte output |
| `uart_tx.sv`           | 8N1 transmitter |
| `filter4sigmaDelta.sv` | top: core + buffer + transmitter |

Top-level ports: `clk`, `rst`, `pulseIN`, `tx`, `isNewSample` and `cic_reqNewData`.

## Simulating

Every testbench in `tb/` is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. `tb/sdadc_ref_pkg.sv` holds the reference models,
which work from the filter equations (direct-form convolution) and not from the
hardware schedule. `tb/noise_shaper_model.sv` is a behavioural, discrete-time model of
the second-order modulator loop, Y = z^-1 U + (1 - z^-1)^2 E. It uses `real`
arithmetic and is for simulation only.

With Verilator 5, for example the full system:

```
verilator --binary --timing --timescale 1ns/1ps -j 4 -y rtl -y tb \
    rtl/sdadc_pkg.sv tb/sdadc_ref_pkg.sv tb/tb_filter4sigmaDelta.sv \
    --top-module tb_filter4sigmaDelta
obj_dir/Vtb_filter4sigmaDelta
```

Replace the testbench name for the other tests:

| testbench              | what it checks |
|------------------------|----------------|
| `tb_cic_integrator`    | integrator section |
| `tb_cic_comb`          | comb section |
| `tb_cic`               | every CIC output against the 63-tap triangular filter; 8- and 256-clock periods |
| `tb_fir_downsampler`   | downsample-by-2 unit |
| `tb_fir_decim_sys`     | polyphase split |
| `tb_fir_coef_fifo`     | delay line, including preload and clear |
| `tb_fir_atom`          | atom, including coefficient loading and strobe timing |
| `tb_fir_stage2`, `tb_fir_stage3` | every output against the convolution; impulse response; latency NUM_TAPS + 2 |
| `tb_filter_core`       | a 1 kHz sine through the modulator model, then all ones; bit-exact against the reference chain; 1024-clock output period |
| `tb_data_buffer`       | 16-word buffer, three rounds, drops |
| `tb_uart_tx`           | frames, bit order, `done`, sends while busy |
| `tb_snr_1khz`          | in-band SNR and passband gain of the core for a coherent 1 kHz tone |
| `tb_filter4sigmaDelta` | whole system at its default parameters, 1 kHz then 2 kHz input, two full capture-and-send rounds decoded from `tx` |

The system test runs about 5 M clocks, which takes a few seconds.

## How far to trust it, and where it departs from the original

Verified in simulation:

- Every stage is bit-exact against an independent model of its equation.
- The whole system is bit-exact end to end: output words decoded from the serial line
  match the reference chain.
- Rates, latencies, coefficient loading, buffer drops and refill all behave as
  described above.

Not verified:

- The spectral performance beyond the single-tone SNR test.
- Any timing or resources on an FPGA.

Following the original design:

- the stage structure and decimation factors (32 x 2 x 2), the 2 CIC sections, the
  filter lengths of 9 and 19, and the 16-bit word length;
- the 16 x 16 to 32-bit atoms with one common multiply enable and a rippling addition
  chain;
- the split of each FIR into two branch delay lines that preload the coefficients and
  are cleared after loading;
- the downsampler built from a toggle and AND/NOT gates;
- the 256 x 16 buffer and the top-level port names.

Own choices where the original gives no detail:

- the coefficient values and the truncation point;
- reset style;
- the exact strobe timing inside the CIC;
- the state transitions of the atom and of the buffer;
- byte order, drop policy, serial frame and baud rate;
- no input synchroniser.

Simplifications:

- The CIC integrator and comb are written as single-register sections. The original
  schematics show extra input and output registers around them, which do not change
  the arithmetic.
- The first atom of each chain adds to a constant 0. It therefore uses one adder that
  the original cost count leaves out.

Not included:

- The analog modulator (op-amp integrators, comparator, flip-flop, input level
  shifter), which has no logic to synthesise; the testbench model stands in for it.
- The board that carries the generator signal to the FPGA pin.
- A serial receiver.
- The long direct-form reference filter, which was only used during design.
