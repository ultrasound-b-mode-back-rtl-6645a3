# Ultrasound B-mode back end signal processor

A B-mode ultrasound image is a map of echo strength. The beamformer delivers, for
each scan line, a stream of radio-frequency (RF) samples that oscillate at the
transducer frequency; the brightness of a pixel is the *envelope* of that
oscillation, squeezed logarithmically into 8 grey levels so that weak tissue echoes
stay visible next to strong reflectors. This RTL does that for one frame held in
on-chip memory:

```
 load port ──► input memory ──► envelope detector ──► envelope memory ──► log compression ──► output memory ──► display port
  (16 bit)     (16 b x 58760)   Hilbert FIR (67 taps)  (16 b x 58760)     ln via hyperbolic   (8 b x 58760)
                                I²+Q², square root                        CORDIC, log10, grey
                      ▲                   ▲                    ▲                   ▲
                      └───────────────────┴──── controller FSM ┴───────────────────┘
```

The default frame is 104 scan lines (a -35° to +35° sector) of 565 samples, 58760
samples in all, as produced from a 2.5 MHz phased-array probe sampled at 40 MHz.
Scan conversion to a raster image is not part of this design: the output memory
holds the compressed image in scan-line order, for a display unit to read.

## Number formats

| signal | format | notes |
|---|---|---|
| RF sample, I, Q | signed 1.15, 16 bit | |
| filter coefficients | signed 1.15 | |
| filter products / sum | 2.30, held in 38 bits | Q = sum >>> 15, saturated to 1.15 |
| I² + Q² | unsigned 2.30, 32 bit | at most 2.0 |
| envelope | unsigned 1.15, 16 bit | floor(sqrt(I²+Q²)); can reach √2 |
| CORDIC x, y | signed 2.16 (2 integer bits incl. sign) | |
| CORDIC angle | signed 3.16 (3 integer bits incl. sign) | |
| grey level | unsigned 8 bit | |

## Envelope detection

The envelope of a real signal x is |x + j·H{x}|, where H is the Hilbert transform
(a 90° phase shift at every frequency). `hilbert_fir` approximates H with a 67-tap
FIR filter windowed by a Hamming window:

    h[m] = 2/(π·m) · (0.54 − 0.46·cos(2π·(m+33)/66))   for odd m, −33 ≤ m ≤ 33
    h[m] = 0                                           for even m

rounded to 1.15 (the 17 values for m = 1, 3, …, 33 are in `bmode_pkg::HILB_COEF`).
The response is odd, h[−m] = −h[m], so the filter is folded: 17 pre-subtractions
x[n−33−m] − x[n−33+m] feed 17 multipliers, and an adder tree sums the products.
Q is that sum brought back from 2.30 to 1.15 by an arithmetic right shift of 15; I
is the centre tap, the input delayed by the filter's 33-sample group delay, so I and
Q describe the same instant. The sum of the absolute coefficients is about 2.55, so
a full-scale, step-like input can drive Q past ±1.0; Q then saturates.

`iq_mag_sq` squares I and Q and adds them; `cordic_sqrt` takes the square root with
a 16-stage pipelined digit-by-digit (non-restoring) square root, which returns
exactly floor(√S). A square root of a 2.30 number is a 1.15 number, so no further
scaling is needed.

### Per-line filtering and the group delay

Each scan line is filtered on its own. The controller marks the first sample of a
line with `in_first`, which clears the filter's delay line, and after the 565th
sample it feeds 33 zeros. The detector thus yields 565 + 33 outputs per line; the
first 33 (the filter filling up) are discarded and the rest are written in order, so
envelope sample k of a line is aligned with RF sample k, and echoes never leak from
one line into the next. The cost is 33 extra clocks per line.

## Log compression

`log_compress` maps the envelope m (unsigned 1.15, so m = 1.0 is 32768) to

    g = clamp(round(255 + (255·20/DR_DB) · log10(m)), 0, 255),   g = 0 for m = 0

with DR_DB = 60 by default: 0 dB (m = 1.0) and above is white, −60 dB and below is
black. The logarithm is computed as

    ln(m)    = 2 · atanh((m − 1)/(m + 1))
    log10(m) = ln(m) · log10(e)

The atanh comes from `cordic_atanh`, a hyperbolic CORDIC in vectoring mode that is
given x = m + 1 and y = m − 1 directly, so no divider is needed; the factor 2 is a
left shift by one, and log10(e) is one constant multiplication.

A hyperbolic CORDIC only converges for |y/x| below about 0.8, which would limit m to
roughly 0.11 … 9. The envelope spans many decades, so the unit first normalises it:
a leading-zero count gives m = f·2^e with f in [0.5, 1), the CORDIC works on f
(|y/x| ≤ 1/3), and e·ln 2 is added afterwards. The CORDIC runs 16 iterations with
iterations 4 and 13 repeated (18 stages) and carries four extra fraction bits
internally; its angle is within 2 LSB (2^−16) of the exact value, and the grey level
within one level of the exact formula.

## Controller

`bmode_controller` runs a frame in two passes, each a streaming state followed by a
state that waits for the unit's last valid output:

| state | what happens | leaves when |
|---|---|---|
| IDLE | nothing; the input memory may be loaded | `start` |
| ENV_RUN | input memory → envelope detector, line by line, 598 clocks per line | last flush sample fed |
| ENV_WAIT | pipeline drains | last envelope sample written |
| LOG_RUN | envelope memory → log compression, one sample per clock | last address read |
| LOG_WAIT | pipeline drains | output memory write address reaches its last value |
| DONE | `done` high for one clock | next clock, back to IDLE |

`busy` is high outside IDLE; while it is high, `start` and writes on the load port
are ignored.

## Timing

Every unit accepts one sample per clock. Latencies, from `in_valid` to `out_valid`:
`hilbert_fir` 4, `iq_mag_sq` 2, `cordic_sqrt` 16 (so `envelope_detector` 22),
`cordic_atanh` 18, `log_compress` 22. All memories have one clock of read latency.
A default frame takes 104·598 + 58760 + 47 = 120999 clocks from `start` to `done`
(0.87 ms at 138 MHz, a clock the original FPGA implementation of this architecture
reached on a Virtex-6; this RTL has not been timed).

## Top-level interface (`bmode_backend_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| load_we, load_addr, load_data | in | 1, 16, 16 | write one RF sample (address = line·565 + sample) |
| start | in | 1 | process the loaded frame |
| busy, done | out | 1 | frame in progress; one-clock pulse at the end |
| disp_addr → disp_data | in → out | 16 → 8 | read a grey level, one clock later |

Parameters: `SAMPLES` (565), `LINES` (104), `DR_DB` (60); `TOTAL` and `ADDR_W` follow.

## Where this RTL departs from, or fills in, the architecture it implements

* The filter, square root and atanh were vendor IP cores in the original; here they
  are plain RTL (folded FIR, digit-by-digit square root, unrolled CORDIC).
* The impulse-response formula is the textbook windowed Hilbert transformer; the
  coefficient rounding to 1.15 is this design's.
* Saturation of Q, the per-line clearing and zero flush of the filter, the
  normalisation before the CORDIC, the grey-level mapping and the 60 dB dynamic
  range are this design's choices.
* The controller's state list is this design's own; the architecture only asks
  that each state wait for its valid signal before handing over to the next.
* The input memory is loaded through a port instead of from an initialisation file,
  and the output memory's read port is brought out for a display unit, which, like
  scan conversion, is not included.
* Arithmetic units: 17 (FIR) + 2 (squares) + 2 (log10(e) and grey gain) = 21
  multipliers, the same count as the DSP blocks of the original implementation. The
  three memories hold 58760 × (16 + 16 + 8) bits.

## Files

| file | contents |
|---|---|
| `rtl/bmode_pkg.sv` | formats, frame size, filter coefficients, controller states |
| `rtl/sdp_ram.sv` | simple dual-port RAM (all three memories) |
| `rtl/hilbert_fir.sv` | 67-tap folded Hilbert FIR, I and Q outputs |
| `rtl/iq_mag_sq.sv` | I² + Q² |
| `rtl/cordic_sqrt.sv` | pipelined square root |
| `rtl/envelope_detector.sv` | FIR → squares → square root |
| `rtl/cordic_atanh.sv` | hyperbolic CORDIC, atanh(y/x) |
| `rtl/log_compress.sv` | normalise, ln, log10, grey level |
| `rtl/bmode_controller.sv` | two-pass frame sequencer |
| `rtl/bmode_backend_top.sv` | top level |
| `tb/bmode_ref_pkg.sv` | reference model and synthetic phantom for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops; each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/bmode_pkg.sv tb/bmode_ref_pkg.sv rtl/*.sv tb/tb_bmode_backend_top.sv \
    --top-module tb_bmode_backend_top -Mdir obj
./obj/Vtb_bmode_backend_top
```

(`rtl/bmode_pkg.sv` must come first; listing it twice is harmless.) The other
testbenches build the same way with their own module and the RTL they use.

`tb_bmode_backend_top` runs one full-size frame (104 × 565) of a synthetic phantom
— speckle from random scatterers convolved with a 2.5 MHz Hann-windowed pulse at
40 MHz sampling, an anechoic cyst, a clipping point target and depth attenuation —
through the load port, the processor and the display port. It checks every envelope
sample bit-exactly against the reference model, every grey level to within one level,
the frame length in clocks, and that each mechanism happened: per-line filter
restart (104), zero flush and dropped outputs (3432 each), both wait states, black
and white clamping, and a load and a start that arrive while busy. It takes well
under a second of simulation time.

The unit testbenches check, besides values, the exact latency of every output:
random and corner-case operands, gaps in `in_valid`, Q saturation in the filter, the
CORDIC's accuracy over |y/x| ≤ 0.6, and the grey mapping over the whole 16-bit
envelope range.
