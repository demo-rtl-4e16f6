# 3D ultrasound delay-and-sum beamformer with approximate delays and trimmed apodization

This is a receive beamformer for volumetric (3D) ultrasound with a 32 x 32 matrix
probe (1024 elements). It is built to fit on a single FPGA. Each output voxel is
the sum of 1024 echo samples. The sample of element *e* is the one recorded at the
two-way travel time from the transmit origin to the voxel and back to *e*.

Two ideas keep the cost down:

* **Approximate delays.** A 1024-element probe at one voxel per clock would need
  1024 square roots per clock. Instead, the design computes **one** exact square
  root per voxel: the *reference delay*. Every element's delay is then the
  reference plus two steering coefficients, one for its row and one for its
  column. That is two additions per delay and no multipliers.
* **Trimmed apodization.** The approximation is poor for some elements, mostly
  close to the probe and at wide angles. The design discards those elements
  instead of weighting them. A keep-mask of 1024 bits is chosen per voxel from a
  33 KB mask memory: 264 zones x 1024 bits.

The pipeline takes one voxel per clock. At 125 MHz that is 125 M voxels/s, or 50
volumes per second for a 2.5 M-voxel volume.

## Datapath

```
 voxel request ──► delay_generator ──────────────────► echo_buffer ──► row_adder x NROW ──► voxel_adder ──► voxel
 (sq, c2_idx,       sqrt_pipe: ref = floor(sqrt(sq))     NROW x NCOL/2     sum of kept          sum of the
  c1_idx,           delay_steer x NROW:                  echo_bram,        samples of a row     NROW row sums
  apod_idx)          delay[i][j] = ref + C2_i + C1_i[j]  read at delay[i][j]
                                            apod_idx ──► apod_mem ──► keep mask ─┘
 AXI4-Lite ──► bf_axi_lite ──► writes to echo_bram / C2 / C1 / apod_mem
```

| module | role |
|---|---|
| `beamformer` | top: pipeline control, write decode, stall rules |
| `delay_generator` | one square-root unit feeding NROW `delay_steer` units |
| `sqrt_pipe` | pipelined integer square root: 16 stages, one result per clock |
| `delay_steer` | reference register, C2 memory, C1 table, two adder stages giving NCOL delays |
| `echo_buffer` | the array of `echo_bram`, plus a range check on every delay |
| `echo_bram` | one dual-port memory shared by two neighbouring channels |
| `apod_mem` | 264 x 1024-bit keep masks |
| `row_adder` | sums the kept samples of one row of elements |
| `voxel_adder` | sums the NROW row sums |
| `bf_axi_lite` | AXI4-Lite slave for loading the memories and reading status |
| `bf_pkg` | widths, address-map regions, response codes |

### Pipeline timing

A request accepted at clock edge *t* produces its voxel on `vox_valid` at edge
*t + 22*:

| cycles | stage |
|---|---|
| 1-16 | `sqrt_pipe`: one root bit per stage; the request's indices travel as a tag |
| 17 | `delay_steer`: reference register; C2 and C1 memories read |
| 18 | first adder: ref + C2 |
| 19 | second adder: + C1[j], giving NROW x NCOL delays |
| 20 | echo BRAM read and range flags; apodization mask read |
| 21 | row adders |
| 22 | voxel adder |

There is one global enable. When `vox_valid` is high and `vox_ready` is low,
every stage holds and `req_ready` drops. No voxel is ever lost or reordered.

## How the delays are formed

For voxel S and element (i, j) in row i, column j:

    delay[i][j] = floor(sqrt(sq)) + C2_i[c2_idx] + C1_i[c1_idx][j]     (in samples)

* `sq` is the squared reference distance of the voxel, in samples², and
  travels with the request. The host, or a scan sequencer in front of the
  beamformer, computes it from the voxel position.
* `C2_i` is the coefficient for row i, held in a 4096-entry memory inside
  DelaySteer unit i.
* `C1_i[..][j]` are the NCOL column coefficients, held in a 64-entry x NCOL table
  in the same unit.
* The indices pick the coefficient set for the voxel's steering direction. In
  a far-field approximation the offsets depend on the direction and the
  element position, not on the depth.

All NROW units get the same reference delay. Each unit has its own coefficient
memories, so any row/column split of the offsets can be loaded. The hardware
does not fix the geometry: the host computes the reference distances and the
coefficient tables. All values are integers, in units of one sample (31.25 ns
at 32 MHz). Samples are not interpolated.

Some delays fall outside the stored echo window (delay < 0 or ≥ `ECHO_DEPTH`).
Those elements are dropped from the sum, just as the apodization drops elements.

## Echo memory: two channels per BRAM

Each `echo_bram` holds 2 x `ECHO_DEPTH` samples. Channel 2k uses the lower half
and channel 2k+1 the upper half. Each channel reads through its own port of the
dual-port memory, so all 1024 channels read in the same cycle from 512 memories.
A write stores two consecutive samples of one channel, the even one through
port A and the odd one through port B. Writes therefore occupy both ports. This
is why writes and beamforming never overlap (see below).

## Apodization

`apod_mem` holds `APOD_DEPTH` masks of NROW x NCOL bits. Bit `row*NCOL + col` = 1
keeps that element. Each request names its zone in `req_apod_idx`. The masks and
the assignment of voxels to zones come from the host, for example an
expanding aperture or a tighter trimmed one. An index past `APOD_DEPTH` reads an
all-zero mask. Weights are binary. A smooth window such as Hanning would need
multipliers in the row adders and is not built.

## Host interface

### Voxel stream

| port | width | meaning |
|---|---|---|
| `req_valid` / `req_ready` | 1 | request handshake; hold the payload until accepted |
| `req_sq` | 32 | squared reference distance (samples²) |
| `req_c2_idx` | log2 `C2_DEPTH` | C2 coefficient set |
| `req_c1_idx` | log2 `C1_DEPTH` | C1 coefficient set |
| `req_apod_idx` | log2 `APOD_DEPTH` | apodization zone |
| `vox_valid` / `vox_ready` | 1 | voxel handshake |
| `vox_data` | 27 (signed) | sum of the kept 16-bit samples |

### AXI4-Lite address map

The address is a byte address of `ADDR_W` bits (24 by default). Bits
`[ADDR_W-1:ADDR_W-3]` select the region, bits `[ADDR_W-4:2]` give the word
offset, and the fields below are packed from bit 0 of the offset upward.
Write strobes are ignored: only whole words are written.

| region | code | word offset fields (low to high) | data |
|---|---|---|---|
| control | 0 | word 0 ID `0x3D5BF001`, 1 status {write_pending, busy}, 2 voxel count | read only; writes answer SLVERR |
| apodization | 1 | word (log2 of NCH/32 bits), zone | 32 mask bits, bit b = element 32·word + b |
| C2 | 2 | index (log2 `C2_DEPTH`), row | signed 16-bit coefficient |
| C1 | 3 | column (log2 NCOL), index (log2 `C1_DEPTH`), row | signed 16-bit coefficient |
| echo | 4 | sample pair (log2 `ECHO_DEPTH` - 1), channel = row·NCOL + col | {sample 2p+1, sample 2p}, signed 16-bit each |

Only the control region can be read. Reads elsewhere, and writes to regions 0,
5, 6 and 7, answer SLVERR.

### Writes and beamforming

A memory write does not disturb voxels in flight:

1. Once the write address arrives, `req_ready` drops.
2. The write waits until the pipeline is empty.
3. The write is performed and answered on B.
4. Requests resume.

Voxels accepted before the write use the old contents. Voxels accepted after it
use the new contents. Writing a whole echo frame (512 K words for 32 x 32 x 1024
samples) therefore pauses beamforming. Double-buffering the echo memory is not
part of this design.

## Parameters

| parameter | default | note |
|---|---|---|
| `NROW`, `NCOL` | 32, 32 | probe elements; `NCOL` must be even |
| `ECHO_DEPTH` | 1024 | samples per channel, a power of two |
| `C2_DEPTH`, `C1_DEPTH` | 4096, 64 | coefficient sets, powers of two |
| `APOD_DEPTH` | 264 | apodization zones (264 x 1024 bits = 33 KB) |
| `ADDR_W` | 24 | AXI address width; elaboration stops with an error if the map does not fit |

For an 80 x 80 probe, set `NROW = NCOL = 80` and `ADDR_W = 27`. This
configuration has passed the end-to-end test with a 64-sample echo window. To
rerun it, copy `beamformer_tb.sv` and set `NROW = NCOL = 80`, `ADDR_W = 27` and
`WATCHDOG = 2000000`. The Verilator build is slow: about 7 minutes with `-j 8`.
The simulation then takes about 2 minutes.

## What follows the original design and what is chosen here

These points come from the published design:

* the 32 x 32 probe
* one square root per voxel followed by two additions per delay, organised as
  32 DelaySteer units, each with a reference register, a BRAM for C2 and a LUT
  for 32 C1 values
* echo BRAMs indexed by the delays, each shared by two channels
* 32 row adders and a final adder
* the 33 KB apodization memory
* the AXI attachment
* 125 MHz and one voxel per clock, which gives 50 volumes/s at 2.5 M voxels

These points are this implementation's own choices:

* the square root: a digit-by-digit pipeline, not the vendor CORDIC core the
  original used
* all widths: 16-bit samples and coefficients, 32-bit sqrt operand, 18-bit
  signed delays
* the echo depth and coefficient memory depths
* the voxel request format and the squared-distance input
* broadcasting one reference delay to all rows
* the binary keep-mask form of the apodization and its zone indexing
* dropping delays outside the echo window
* the AXI4-Lite address map, the write/beamform interlock and the output
  back-pressure
* a synchronous, active-low reset. It clears only valid bits and AXI state;
  memories and data registers start undefined and must be loaded before use.

The original design's trimmed-apodization equations and its exact delay geometry
are not reproduced. In this RTL they are data the host loads.

Not included: the rest of the original FPGA system is vendor IP and host
software. That covers the soft processor, Ethernet, DDR4 controller, timer,
UART, interconnect, clocking and reset, and the scan conversion done on a PC.
Here the beamformer's AXI slave port and its voxel stream are the top-level
ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
values it computes independently, and each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `sqrt_pipe_tb` | floor(sqrt) on random, exact-square, square-minus-one and extreme operands; 16-cycle latency; back-to-back rate; enable gaps |
| `delay_steer_tb` | ref + C2 + C1[j] for all 32 columns, 3-cycle latency, random enables |
| `delay_generator_tb` | 4x4 unit: every delay, apodization index, 19-cycle latency, bursts |
| `echo_bram_tb` | both ports read their own channel's samples after pair writes |
| `echo_buffer_tb` | 4x4 channels: samples and in-range flags for delays inside and outside the window |
| `apod_mem_tb` | mask write/read, out-of-range index and write |
| `row_adder_tb`, `voxel_adder_tb` | sums with full-scale values, keep masks, valid and reset |
| `bf_axi_lite_tb` | AW/W orderings, write bus contents, interlock with a busy core, SLVERR cases, register reads |
| `beamformer_tb` | end to end at 4x4 (see below) |
| `beamformer_full_tb` | end to end at the default sizes |

The end-to-end tests (`beamformer_tb_body.svh`) work as follows:

1. Load every echo sample, several coefficient sets and four apodization zones
   over AXI.
2. Stream voxels.
3. Compare each voxel with a software delay-and-sum.

They check that the latency is exactly 22 cycles and that a burst comes out at
one voxel per clock. They also require each of these to happen at least once:

* apodization discards
* delays outside the echo window
* output back-pressure
* requests held back by an AXI coefficient write issued mid-stream; the voxels
  after the write must use the new coefficients

At default sizes the run loads all 1 M samples, which is about 1.6 M clock
cycles. It takes about 20 s of simulation after a build of about a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb -Itb \
    rtl/bf_pkg.sv tb/bf_tb_pkg.sv tb/beamformer_tb.sv --top-module beamformer_tb
./obj_dir/Vbeamformer_tb +verilator+rand+reset+2
```

Replace `beamformer_tb` with any other testbench name. `+verilator+rand+reset+2`
starts undriven state at random values. The testbenches do not depend on initial
memory contents.

### Limits of the checks

The reference model in the testbenches uses the same delay formula as the RTL.
The tests show that the hardware computes that formula exactly. They do not
show how close the formula comes to true acoustic travel times, which depends
on the coefficients the host loads. No image-quality check is included.
