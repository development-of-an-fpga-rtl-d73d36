# Eight-channel ACFM processor

Rail inspection with ACFM (alternating current field measurement) probes runs
a 50 kHz carrier into the rail and samples the returned field. For every
probe and every scan position a short clip of samples reduces to one number,
the ACFM value. A crack shows up as a dip in that number along the rail. This
RTL computes the value for eight probes in parallel on one FPGA clock domain:

    A = sum_{n=1..N} a[n] * ( P*sin(R[n-1]) + Q*cos(R[n-1]) )

    P = 4*cos(beta)/(N*pi),   Q = 4*sin(beta)/(N*pi),   R[k] = k * 2*pi*Fc/Fs

Here a[n] are the N samples of a clip, beta is a phase offset in degrees, Fc
is the carrier frequency and Fs the sampling rate.

A DSP sends the clips over SPI. The FPGA returns the eight 16-bit results to a
PC over two RS-232 links.

The main idea is that the expensive half of the formula is computed only
once. Everything inside the brackets depends only on the frame header (N,
beta, Fc, Fs) and the sample index, not on the samples. All eight probes share
one header. So path 1, the *master path*, does the division, the sines and
the cosines. It hands the bracket value for each sample position, called
**PQ_phase(n)**, to the other seven paths. Those *slave paths* only keep the
values in a FIFO and do one multiply and one add per sample.

## Data flow

```
 SCLK/SSEL/MOSI/Address[2:0]
        |
   spi_slave ---- 16-bit word + data_rdy, path_en[7:0] (one-hot) ----+
        |                                                            |
   master_path (path 1)                                     slave_path x7 (paths 2..8)
     input_manip_primary: header, theta = Fc/Fs                input_manip_secondary
     npi_calc:     1/(N*pi)                                    algorithm_secondary
     pq_module:    P, Q                                          pq_phase_fifo (128)
     algorithm_primary: PQ_phase(n), a[n]*PQ_phase(n)  --PQ_phase-->  a[n]*PQ_phase(n)
     recursive_adder                                           recursive_adder
        |                                                            |
        +------------------- sync_buffer (waits for all 8) ----------+
                                   |
                  sci_tx (paths 1-4) -> TxD_Com1     sci_tx (paths 5-8) -> TxD_Com2
```

`multi_acfm_model` is the top. `sim_data_gen` is not part of it: it is the
SPI master used in simulation in place of the DSP.

## The frame and the order of frames

A frame is 6 header words followed by N sample words, all 16 bits:

| word | content |
|------|---------|
| 0 | N, the number of samples |
| 1 | beta, in whole degrees |
| 2, 3 | Fc, low word then high word, in Hz |
| 4, 5 | Fs, low word then high word, in Hz |
| 6 .. N+5 | the samples a[1..N], unsigned |

The SPI address lines choose the path. The address is latched when SSEL goes
low. The matching `path_en` bit stays high until SSEL rises, so each frame
must be sent within one SSEL-low period. Words are sent MSB first, and MOSI is
sampled on the falling edge of SCLK. SCLK, SSEL and MOSI are synchronised with
two flip-flops each, so SCLK must stay well below a quarter of the system
clock. The reference rate is 6.25 MHz against 100 MHz.

The sharing of PQ_phase puts three rules on the sender:

1. In every round the master frame (address 0) comes first. The master pushes
   one PQ_phase value per sample into all seven slave FIFOs. Each slave pops
   one value per sample of its own frame.
2. All eight frames of a round carry the same N, beta, Fc and Fs. A slave
   reads only N from its header.
3. N must not exceed the FIFO depth (`FIFO_DEPTH`, 128). Each slave must
   receive its frame before the next master frame. Otherwise its FIFO holds
   the values of two rounds.

The FIFO flags come out of each slave path (`pq_empty`, `pq_full`) for
monitoring. The top does not use them.

## Timing inside a path

The hardest part is how samples and their control pulses stay aligned.
Nothing in a path waits on a handshake. Each datapath is a fixed-latency
pipeline that accepts a new sample on any clock. A one-bit "ready" pulse runs
beside the data through a chain of flip-flops of the same length
(`algo_cycle_count`). When the pulse leaves the chain, the product at the end
of the pipeline is valid. A counter would need to hold a count per sample in
flight; the pulse chain does not.

All latencies are in 100 MHz clocks, counted from the `data_rdy` of a sample
word:

| step | master | slave |
|------|--------|-------|
| input data manipulation (sample split from header, start delay) | 7 | 7 |
| algorithm: CORDIC 24, P*sin and Q*cos 2, add 1, then An*PQ_phase 2 | 29 | — |
| algorithm: FIFO read 1, align 1, multiply 2, output register 1 | — | 5 |
| per-sample product ready | 36 | 12 |
| frame result (`txd_start`) after the last sample word | 40 | 16 |

In the master, `algorithm_primary` has a phase accumulator that adds theta
after each sample and is cleared at the end of the header. So the CORDIC sees
R[0], R[1] and so on. The sample itself is delayed by 27 clocks (a conversion
register and a 26-stage `delay_line`) so that it meets its PQ_phase at the
last multiplier. PQ_phase leaves the master 34 clocks after the sample word
arrived. The same slave sample position arrives a whole frame later, so the
FIFO only has to bridge that gap.

Header work runs in the gaps between words:

- `npi_calc` starts two clocks after word 0 and is done 67 clocks later.
- The theta divider starts after word 5 and takes 66 clocks.
- `pq_module` then needs 27 more clocks.
- The first sample arrives one SPI word (256 clocks) after word 5.

With words 256 clocks apart, every pipeline is almost always idle. The
pipelining is about not having to reason about overlap, not about speed.

## Number formats

Angles are unsigned 32-bit fractions of a turn (2^32 = 2*pi). So theta is
`Fc * 2^32 / Fs`, and the running phase wraps at no cost.

| quantity | format |
|----------|--------|
| sin, cos (`cordic_sincos`) | signed 2.30 |
| 1/(N*pi) | unsigned 0.32, saturated to all ones for N = 0 |
| P, Q, PQ_phase | signed 3.32 (35 bits) |
| per-sample product | signed 21.32 (53 bits) |
| accumulator | 61 bits; never overflows, since \|PQ_phase\| <= 4/(N*pi) bounds \|A\| by 65535*4/pi = 83443 |
| result | the accumulator rounded half up to an integer and saturated to signed 16 bits (32767 / -32768) |

`fxp_mult` is the one generic registered multiplier (inputs registered,
product shifted and truncated). `udiv_seq` is a restoring divider, one
quotient bit per clock. It is used for theta and, with a 64-bit numerator,
for 1/(N*pi) = 2^62 / (N * pi * 2^30).

## Results and the serial links

`sync_buffer` keeps one flag per path, set by that path's result pulse. It
copies the result into a register when the pulse comes. When all eight flags
are set, it pulses `sci_start` once and clears the flags. A second pulse from
a path that has already reported changes nothing. So a glitch on one ready
line cannot send a half-filled package.

Each `sci_tx` then sends its four results, each as upper byte then lower
byte. Bytes are framed 8N1 with the line idle high, at
`BIT_CYCLES = round(CLK_HZ/BAUD)`, which is 217 clocks for 460800 baud.
The baud error is 0.01 %. With `SEND_TRAILER = 1`, the top's default, each
package is closed by the bytes 0x00 and 0xA5. This is the ten-byte format
the PC display program expects: it recognises the end of a package by 0xA5.
With 0 only the eight data bytes are sent. `sci_tx` on its own defaults to
0. A package takes 217 µs per link. A round of SPI traffic takes about
0.94 ms, so the links are idle long before the next results.

## How this RTL differs from the original implementation

The original was built with vendor IP cores in VHDL. This RTL follows its
structure, signal flow and latencies, with these differences:

- **Trigonometry.** The original feeds a vendor CORDIC core with 16-bit angles
  in radians (3 integer, 13 fraction bits). Here the CORDIC is its own: 22
  iterations with a quadrant fold, 24 clocks, angles as turn fractions. The
  phase R[n-1] grows past 2*pi within a frame, which a 3.13 radian input
  cannot hold without a reduction step; a turn fraction simply wraps. The error is about 2^-21.
- **Division.** The original converts to floating point, divides with a
  floating-point core and converts back. Here both divisions are fixed-point,
  with the restoring divider.
- **Accuracy.** For the four test clips (N = 40, beta = 260°, Fc = 50 kHz,
  Fs = 2 MHz) the exact sums are 968.04, 968.45, 967.57 and 954.25. This RTL
  returns 968, 968, 968 and 954. The original hardware reported 970 and 956;
  it attributed the gap to its 16-bit trigonometric input.
- **Master delay line.** The original delays the sample by 24 clocks. Here it
  is 27, because PQ_phase is ready 27 clocks after the sample enters (24
  CORDIC + 2 multiply + 1 add). The 29-clock algorithm latency is the same.
- **Slave latency.** The original description says both four and five
  clocks. Its register diagram and simulation show five (ShifReg0..4), and
  five is used here.
- **Result rounding** (round half up, saturation) is this design's choice.
  Only the 16-bit result is specified.
- **`sync_buffer`** registers each path's result when it arrives. In the
  original the data pass straight through and only the start signal is
  synchronised. Registering keeps the values stable for the whole
  transmission.
- **SPI details not specified** by the original are this design's choice: the
  SCLK idle level, the address latching at SSEL fall, and the synchronisers.
  So are the SPI master in `sim_data_gen` (its half-bit gap between words and
  its 64-clock gap between frames) and the synchronous active-high `rst`.
- **Not built:** the DSP board that samples the probes and runs the SPI
  master, the probes, the PC display software, and the board's oscillator.
  `sim_data_gen` stands in for the DSP in simulation.

## Files

| module | role |
|--------|------|
| `acfm_pkg` | widths, fixed-point typedefs, header word indices |
| `multi_acfm_model` | top: SPI slave, 1 master + 7 slave paths, sync buffer, 2 SCIs |
| `spi_slave` | SPI receiver, 16-bit words, path enables from the address |
| `master_path`, `slave_path` | one processing chain each |
| `input_manip_primary` / `_secondary` | split header and samples, start pulses; primary also computes theta |
| `an_manipulation` | word counter and header/sample separation (state machine) |
| `algo_start_control` | 7-clock start pulse per sample word |
| `npi_calc`, `pq_module` | 1/(N*pi); P and Q |
| `algorithm_primary`, `algorithm_secondary` | per-sample datapaths |
| `cordic_sincos`, `fxp_mult`, `udiv_seq`, `delay_line`, `algo_cycle_count`, `pq_phase_fifo` | building blocks |
| `recursive_adder` | sum over a frame, rounding, saturation |
| `sync_buffer`, `sci_tx` | result collection and RS-232 output |
| `sim_data_gen` | simulation SPI master (DSP stand-in) |

Parameters of the top: `CLK_HZ` (100 MHz), `BAUD` (460800), `FIFO_DEPTH`
(128) and `SEND_TRAILER` (1). A generic synthesis of the top gives about
2900 cells, 4400 flip-flop bits and 39 kbit of memory. The memory is mostly
the seven 128 x 35 PQ_phase FIFOs and the delay lines.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog. The
reference clips and a floating-point model of the formula are in
`tb/tb_frames_pkg.sv`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style -y rtl -y tb \
    rtl/acfm_pkg.sv tb/tb_frames_pkg.sv tb/tb_multi_acfm_model.sv \
    --top-module tb_multi_acfm_model -o sim
obj_dir/sim
```

Replace the last file and the top name for any other testbench.

`tb_multi_acfm_model` runs the top at its default parameters. `sim_data_gen`
sends three rounds of eight frames. UART receivers in the testbench decode
both TxD lines and check each 10-byte package:

- **Round 1:** clip 1 to the master and clip 2 to the slaves. All eight
  results must be 968.
- **Round 2:** a mix of all four clips. Results are 954 or 968.
- **Round 3:** a new header (Fc = 0, beta = 90°) with constant samples. Two
  paths saturate at 32767.

The testbench also counts the mechanisms the design relies on and fails any
that never happened:

- every path enable
- PQ_phase writes and slave reads
- a slave FIFO holding data while other frames pass
- the sync buffer waiting on partial results
- a stray ready pulse, forced once on a path that has already reported; it
  must not start the links
- both SCIs sending at once
- header changes
- saturation

It simulates about 3 ms of operation (300 000 clocks) in a few seconds.

Unit testbenches check the latencies cycle by cycle. Examples:
CORDIC 24, master algorithm 29, slave algorithm 5, start delay 7, divider 64,
1/(N*pi) 67, and the 217-clock UART bit.
