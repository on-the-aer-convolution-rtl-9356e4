# Spike-based convolution processors for FPGA (AER)

In a spiking vision system an image is not sent as frames. A pixel of grey level
G is sent as a stream of about P·G events. Each event is the pixel's address on an
Address-Event-Representation (AER) bus. A convolution can then be done one event at
a time. When pixel (i,j) spikes, the kernel K is *projected* onto the neighbourhood
of (i,j) in the output:

    Y(i+a, j+b) += K(a,b)      for all a, b in -N/2 .. N/2

After all the spikes of an image have arrived, Y holds the convolution of the image
with K. No frame is buffered, and the result can be read at any time.

This repository holds SystemVerilog for two FPGA processors built on that idea. They
are independent designs and sit side by side in the top module `aer_conv_top`:

| | RAM-integrator processor | Probabilistic mapper |
|---|---|---|
| module | `conv_ram_processor` | `prob_mapper_unit` |
| where the sum is formed | in a 64x64 matrix of 8-bit integrators in block RAM | downstream: the processor only sends weighted, signed events |
| kernel | up to 11x11, signed 8-bit weights | 9 mapped events per input address (3x3), each with a repetition R and a probability P |
| output | Poisson-like spikes drawn at random from the matrix | signed spikes; a receiver adds the positive ones and subtracts the negative ones |
| clock in the reference set-up | 50 MHz (Spartan-3 400) | 100 MHz (Spartan-II, external 2 Mbit SRAM) |

## 1. RAM-integrator processor (`conv_ram_processor`)

```
 AER in ──► aer_rx ──► conv_engine ──► cell_updater ══ port A ══╗
 (REQ/ACK)              ▲     │            ▲                  cell_ram (64x64x8)
                        │  kernel_ram      │                    ║ port B
 SPI ──► spi_slave ──► config_ctrl ──► forget_ctrl          poisson_gen ──► aer_tx ──► AER out
```

The design has four parts that run in parallel: event processing, forgetting, output
generation and configuration.

### Event processing: kernel copy with clipping
`aer_rx` takes an event (a 12-bit address `{i[5:0], j[5:0]}`, where i is the row)
over a four-phase REQ/ACK handshake. `conv_engine` then walks the N x N kernel row by
row. For each element it asks `cell_updater` to add K(r,c) to cell
(i + r − N/2, j + c − N/2). The updater takes two cycles per element, as the
single-adder design requires. In the first cycle it reads the cell. In the second it
adds the weight, limits the result to 0..255 and writes it back. The cells are
unsigned, so a negative weight can only pull a cell down to 0. The processor
produces no signed output.

Kernel positions that fall outside the 64x64 image still use their two cycles but
write nothing, so every spike costs the same time. The kernel weight for the next
element is read one element ahead from the single-port `kernel_ram`. Because of that
read-ahead, the updater runs at one element every two cycles with no gaps.

**Cost per spike: 2·N² + 1 clock cycles** (N = 11: 243 cycles, 4.86 µs at 50 MHz).
That is about 24.9 million kernel-element operations per second for 11x11. The
published measurements (24.6 MOPS for 11x11, 20.5 for 3x3) work out to about
2·N² + 4 cycles per spike, counting the bus handshake. Here the handshake of the
next spike overlaps the current one.

### Sharing the integrator RAM
The matrix is one dual-port RAM (`cell_ram`):

* **Port A** belongs to `cell_updater`. The updater serves two requesters: the
  kernel-copy engine and the forgetting controller. When both ask in the same cycle,
  **forgetting wins** and the engine stalls. Heavy input traffic therefore cannot
  starve the forgetting, which is what stops cells from saturating.
* **Port B** is read-only and belongs to the output generator, so output never slows
  down the updates.

### Forgetting
With strong kernels or heavy traffic, cells quickly reach 255 and stop tracking the
input. `forget_ctrl` counts clock cycles up to a programmable *forgetting period*.
Each time the count expires, it sweeps all 4096 cells and subtracts a programmable
*forgetting quantity* from each one (results stop at 0). A sweep uses port A for at
least 8192 cycles. The period counter is held during a sweep, so sweeps start
`period` cycles after the previous sweep ends. A period or quantity of 0 turns
forgetting off.

After reset the same controller makes one sweep that subtracts the largest amount,
which clears the matrix. Block RAM has no reset, and this sweep stands in for one.
Spikes that arrive during the sweep wait.

### Poisson-like output
`poisson_gen` takes 20 fresh bits from an LFSR for every draw: a 12-bit cell
address and an 8-bit threshold. It reads that cell through port B. If the value is
**above** the threshold, it emits the address through `aer_tx`. A cell holding Y
therefore fires with probability Y/256 on each draw, independently of every other
cell and of the past. The output is a random spike train per address with a rate
proportional to Y, and a cell at 0 never fires. A draw takes two cycles, and a hit
waits for the output bus.

### Configuration over SPI
`spi_slave` receives 32-bit frames in SPI mode 0, most significant bit first.
`sclk` must run below a quarter of the system clock. `config_ctrl` decodes each
frame as `{opcode[7:0], payload[23:0]}`:

| opcode | meaning | payload |
|---|---|---|
| `0x01` | kernel weight | `[14:8]` index r·11 + c (r, c from the kernel's top-left corner), `[7:0]` signed weight |
| `0x02` | kernel side N | `[3:0]`, odd, 1..11 (default 11) |
| `0x03` | forgetting period | `[23:0]` clock cycles, 0 = off (default 0) |
| `0x04` | forgetting quantity | `[7:0]` (default 0) |

Frames with an unknown opcode, an index above 120 or an even or too-large N are
ignored. A kernel write takes the kernel RAM for one cycle, and the engine waits
for that cycle. The RAM's read output is not disturbed by a write, so a weight the
engine has already fetched stays valid. Weights can therefore be changed while
spikes are being processed.

The kernel RAM powers up with unknown contents. Write all N² weights for the chosen
N before sending spikes.

### Status outputs
`st_stall`, `st_sat_hi`, `st_sat_lo`, `st_skip`, `st_sweep`, `st_kconflict` and
`st_bad_frame` each pulse for one cycle when their event happens. `st_clearing` is
high during the clearing sweep after reset. In `aer_conv_top` these signals are
packed into `conv_status[7:0]` = {clearing, bad_frame, kconflict, sweep, skip,
sat_lo, sat_hi, stall}.

## 2. Probabilistic multi-event mapper (`prob_mapper_unit`)

This processor does no arithmetic. Every input spike is replaced by a list of output
spikes, one per kernel element, each sent to the neighbour the element points at. A
weight K is turned into a repetition factor and a probability:

    R = ceil(K),  P = K / R        (K = 1.2  ->  R = 2, P = 0.6)

The entry is sent R times, and each copy goes out with probability P. On average
that is R·P = K copies, so the number of spikes an output address receives tends to
the convolution sum. Negative weights become events with the sign bit set. A later
stage must count positive events up and negative ones down for each address.

### Mapping table
The table lives in an external asynchronous SRAM. Input address `a` owns
`MAP_SLOTS` = 9 consecutive 32-bit words, starting at `a·9`. That is 36,864 words,
or 1.18 Mbit, which fits a 2 Mbit part. One word (`aer_conv_pkg::map_entry_t`):

| bits | field |
|---|---|
| 31:27 | unused |
| 26 | `valid`: the word holds an entry |
| 25 | `last`: the last entry of this address |
| 24:21 | `rep`: R, 0..15 |
| 20:13 | `prob`: a copy is sent when an 8-bit random number ≤ `prob`, i.e. with probability (prob+1)/256. 255 = always |
| 12:0 | output event `{sign, i[5:0], j[5:0]}` |

To code a weight K > 0, take R = ceil(K) and prob = round(256·K/R) − 1. A
weight of exactly 0 is coded by leaving the entry out.

### Sequencing and timing
`prob_mapper` reads the words of the input address in order. It stops after a word
marked `last`, at an invalid word, or after 9 words. For each repetition it draws a
fresh byte from an LFSR (`lfsr`, 32 bits, taps 32/22/2/1, 8 bits per draw) and
compares it with `prob`. A word is read by holding the SRAM address for
`SRAM_WAIT` + 1 cycles; the default of 2 gives 30 ns at 100 MHz. With an
always-ready output, one input spike costs

    1 + Σ over words (SRAM_WAIT + 1 + R + copies sent)   cycles

For a one-to-one mapping that is 6 cycles (60 ns). The published board took 120 ns
for one-to-one and (60 + 60·M) ns for M mapped events, with 20 ns saved per event
not sent. This implementation is faster per event than those figures. Its
per-event saving for an unsent copy is 10 ns, not 20 ns.

## 3. AER links (`aer_rx`, `aer_tx`)
Both processors use the same four-phase handshake:

1. The sender puts the address on the data lines and raises REQ.
2. The receiver takes the address and raises ACK.
3. The sender drops REQ.
4. The receiver drops ACK.

Both signals are active high. The incoming REQ (in `aer_rx`) and ACK (in `aer_tx`)
pass two-flop synchronizers. `aer_rx` raises ACK only after the core has taken the
event, so a busy core holds the sender off. `aer_tx` drives the address one cycle
before raising REQ and keeps it until ACK has been seen. One outgoing event costs
2·SYNC + 4 = 8 cycles plus the receiver's delays.

## 4. Module map

| file | role |
|---|---|
| `rtl/aer_conv_pkg.sv` | shared sizes, configuration opcodes, mapping-word struct |
| `rtl/aer_conv_top.sv` | both processors side by side, own clocks and resets |
| `rtl/conv_ram_processor.sv` | RAM-integrator processor |
| `rtl/conv_engine.sv`, `rtl/cell_updater.sv`, `rtl/cell_ram.sv`, `rtl/kernel_ram.sv` | kernel copy, saturating read-modify-write, integrator and kernel RAMs |
| `rtl/forget_ctrl.sv`, `rtl/poisson_gen.sv` | forgetting, random output generator |
| `rtl/spi_slave.sv`, `rtl/config_ctrl.sv` | configuration link and registers |
| `rtl/prob_mapper_unit.sv`, `rtl/prob_mapper.sv` | mapper processor and its FSM |
| `rtl/lfsr.sv` | pseudo-random source (both processors) |
| `rtl/aer_rx.sv`, `rtl/aer_tx.sv` | AER receiver and emitter |
| `tb/sram_model.sv` | behavioural asynchronous SRAM, simulation only |

All sizes are parameters, and their defaults are the published configuration: 64x64
cells, 8-bit cells and weights, an 11x11 kernel, and 9 mapping slots.

## 5. Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl rtl/aer_conv_pkg.sv tb/sram_model.sv tb/tb_aer_conv_top.sv \
  --top-module tb_aer_conv_top -o sim --Mdir obj && ./obj/sim
```

Replace the testbench name to run another one. `tb_aer_conv_top` runs both
processors at full size, with default parameters, in about a second:

* It configures the RAM-integrator processor over SPI with the 3x3 vertical-edge
  kernel (−10 0 10 in every row), then with a random 11x11 kernel. It sends images
  as spikes and compares all 4096 cells with a reference model after each phase.
  It also runs forgetting under traffic and rewrites kernel weights under traffic.
* It loads the mapper with the kernel [2 0; 0 −0.5] and checks the positive counts
  exactly and the negative count statistically.
* It counts every mechanism and fails if any never happens: stall behind
  forgetting, clipping at 255 and at 0, out-of-image kernel positions, sweeps,
  kernel-port conflicts, refused frames, the clearing sweep, repetitions, dropped
  draws, negative events, and output back-pressure.

`tb_conv_ram_processor` checks the 2·N²+1 cycle cost of back-to-back 11x11 spikes.
`tb_prob_mapper` checks the mapper's cycle formula. It also checks that the example
kernel K1 = [0.1 0.05; 0.75 0.1], coded as R = 1 and P = K, yields those fractions
of copies within a few percent.

Two further testbenches run the evaluation examples on whole 64x64 images, at
default sizes, in under a minute each:

* `tb_workload_ram_conv` measures the cycles per spike for kernel sides 3, 5, 7, 9
  and 11, and prints the equivalent MOPS at 50 MHz. It then sends a bitmap (a ring
  with a stem) and its negative through the vertical-edge kernel. After each image
  it compares the whole matrix with the clipped convolution, and it collects
  512K output spikes into a histogram that must correlate with the matrix
  (r > 0.9; about 0.9996 is seen). The two images must give opposite edge
  responses. A forgetting sweep empties the matrix between them.
* `tb_workload_mapper` fills the mapping table for all 4096 addresses. With K1 it
  checks the total traffic and the correlation of the output histogram with the
  convolution (about 0.98). With the edge kernel K2 = [1 0; 0 −1] it checks that
  up/down counters per address end at exactly the convolution.

## 6. How far to trust it, and where it departs from the original

These parts follow the published design:

* the two architectures and their block structure;
* the sizes (64x64, 8-bit cells, 11x11 kernel, weights in −127..127, 3x3 mapper
  kernels);
* clipping of cells to 0..255;
* the two-cycle read / add-write per kernel element with one adder;
* forgetting by a programmable period and quantity;
* a random generator reading the matrix for Poisson-like output;
* SPI configuration of kernel, size, period and quantity;
* mapping entries carrying repetition, probability and event, decided by comparing
  an LFSR number with the probability.

These are this design's own choices, because the original does not specify them:

* handshake polarity and synchronizers;
* the SPI frame format and opcodes;
* the kernel RAM layout (index r·11 + c);
* the RAM-port arbitration, with forgetting first;
* the reading of forgetting as a whole-matrix sweep per period, and the clearing
  sweep after reset;
* the draw-and-compare output generator;
* the 32-bit mapping word, with `valid`/`last` flags, fixed slots per address and
  the (prob+1)/256 probability code;
* per-repetition probability draws;
* the LFSR polynomial;
* the mapper's SRAM wait states, which give different per-event times from the
  published ones (section 2).

Not included:

* the USB microcontroller and the PC software that drive the SPI link;
* the SRAM chip itself, for which only a simulation model is provided;
* the receiver stage with an up/down counter per address that completes the
  mapper's convolution (its behaviour is modelled in the testbenches);
* the faster variant with one adder per kernel row, which was only simulated in the
  original work (about 3·N + 4 cycles per spike);
* the analog 31x31 convolution chip used for comparison.

Everything has been checked in simulation and by lint/elaboration in two
SystemVerilog front ends. Nothing has been run on an FPGA.
