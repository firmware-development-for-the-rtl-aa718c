# DTHistogram: HBM-backed histograms of 24 detector links

A DAQ readout board receives data on 24 input links. To see what is flowing through
them, a monitor fills histograms of 32-bit observables (sizes, latencies, counters) as the data
passes, and the control processor reads them out whenever it wants. Block RAM is too small to
hold 256 histograms of up to 4096 64-bit counters, so the counters live in one spare
pseudo channel of the FPGA's HBM. The logic keeps only the histogram *configurations* on chip.
For every sample it computes a bin index, then does a read-modify-write of that bin's counter
over AXI.

This repository holds SystemVerilog RTL for that monitor, with self-checking testbenches for
every block and for the whole design. It is an implementation of the design described in the
thesis *Firmware development for the CMS DAQ readout cards*. Where that description is
silent or self-contradictory, the choices made here are listed under
[Departures and own choices](#departures-and-own-choices).

## How a histogram is stored

A histogram is defined by three numbers:

| field | bits | meaning |
|---|---|---|
| ME (min edge) | 32 | lower edge of bin 0 |
| BW (bin width) | 32 | width of every regular bin |
| BN (bins number) | 12 | number of regular bins, 1..4094 |

Bin `i` covers `[ME + i*BW, ME + (i+1)*BW)`. Two extra bins follow the regular ones:
- **underflow** at index `BN`, for samples below ME;
- **overflow** at index `BN+1`, for samples at or above the *max edge* `ME + BW*BN`.

The max edge is computed in 32 bits.

The HBM is addressed in 256-bit words (32 bytes). Each histogram owns a fixed slot of
**1025 words**, whatever its BN:

```
word  h*1025 + 0          configuration: ME in bits 31:0, BW in 63:32, BN in 75:64
word  h*1025 + 1 + b/4    counter of bin b in bits 64*(b%4) +: 64
byte address = 32 * word
```

There are 256 histograms, so the whole area is 256 × 1025 × 32 B = 8.2 MB, a small
part of a 256 MB pseudo channel. The histogram index is 8 bits: `{unit[4:0], sub[2:0]}`. Each
of the 24 input lines can therefore feed up to 8 histograms, chosen per sample by a 3-bit
sub-index.

## From a sample to a counter

```
 24 lines (usr_clk)                         axi_clk
 data, sub ──► unit FIFO[u] ──┐
              35 x 512, drops │ round robin   aggregator FIFO   binning      memory
              when full       ├─ one unit ───► 40 x 512, with ──► engine ─OP─► engine ─AXI─┐
                    ...       │  per clock     unit index u     (HE)         (HME)        │
 data, sub ──► unit FIFO[23] ─┘                                                           ▼
                                                          user interface ─► HBM access ─► AXI
                                                          (usr_clk)         (HACE)      sharer ─► HBM
```

1. **Unit FIFOs** (`dth_async_fifo`):
   - Each line writes `{data, sub}` into its own dual-clock FIFO.
   - The lines have no flow control. A sample that arrives while its FIFO is full is
     dropped, and this is the only place where data is lost.
2. **Round robin** (`dth_hist_wrapper`):
   - In the AXI clock, a counter visits one unit per clock, 0 to 23 and back.
   - If that unit's FIFO has data and the aggregator FIFO has room, one entry moves
     across, tagged with the unit number. Otherwise that unit misses its turn.
3. **Aggregator FIFO** (`dth_sync_fifo`) holds `{data, unit, sub}`. When the binning
   engine is ready, one entry is handed over with a one-clock `data_valid`.
4. **Binning engine** (`dth_histogram`):
   - It reads the histogram's cached configuration from `dth_config_ram` (one clock).
   - It compares the sample with ME and the max edge.
   - If the sample is in range, it divides `(data - ME) / BW` with the 12-bit sequential
     divider `dth_divider`.
   - It then asks the memory engine to increment that bin.
5. **Memory engine** (`dth_hist_memory`) turns that request into AXI transactions. It reads
   the word, adds one to the 64-bit lane, writes the word back, and waits for the write
   response.

### The OP protocol between the two engines

The binning engine knows nothing about memory; it only issues operations. A request is
`op_valid` / `op_ready` with `op_code` and `op_data`, held stable until it is taken. A
configuration read is answered by a one-clock `op_rvalid` with `op_rdata`. Nothing
acknowledges that response.

| op_code | operation | op_data |
|---|---|---|
| `001` | read one 32-bit block of the configuration word | `[23:16]` histogram, `[2:0]` block |
| `010` | increment one bin | `[23:16]` histogram, `[11:0]` bin |
| `111` | clear bins 0..n | `[23:16]` histogram, `[11:0]` n (bins − 1) |

A clear covers `(n >> 2) + 1` words starting at word 1. It is written as INCR bursts of at
most 16 beats, the AXI3 limit.

### Timing of one sample

- The divider produces one quotient bit per clock, MSB first. `res_valid` comes 13 clocks
  after `enable`: one clock to capture the operands, then 12 bits. A zero numerator is
  answered after one clock.
- An in-range sample costs the binning engine 13 clocks more than an underflow or overflow
  sample (the original reports about 14).
- With the behavioural HBM model used in the tests (8-clock read latency, about one stall
  in four), the full-size test measures **18.0 clocks** on average between two samples.
  It counts from one rising edge of the engine's `ready` to the next, with the
  aggregator FIFO more than 400 entries full.
- Roughly 10 of those clocks are logic. The rest is HBM latency, so on real HBM the figure
  grows by its read latency. The original design reports about 62 clocks (248 ns at
  250 MHz), which would be about 355 samples per 88 µs.

## Initialization and the two histogram resets

After reset, the binning engine walks through all 256 histograms. For each one it:
1. reads configuration blocks 0, 1 and 2 (ME, BW, BN);
2. **sanitizes** them:
   - BW = 0 becomes 1;
   - BN = 0 becomes 1;
   - BN = 4095 becomes 4094;

   The values stored in HBM are left as they are.
3. computes the max edge;
4. stores the four values in the configuration RAM;
5. clears the BN+2 bins in use.

`init_done` rises once the last clear has been handed to the memory engine. The clear
itself finishes a few dozen clocks later.

There are two ways to restart histograms without a full reset:

- **All histograms (toggle reset)**:
  - While held, the binning engine is in reset. When released, it re-runs the whole
    initialization.
  - The memory engine and the AXI port keep running, so no transaction is cut.
- **One histogram**:
  - A one-clock request with an index is queued.
  - Between two samples, the engine re-reads, re-sanitizes and re-clears that histogram
    only.

The usual sequence is to write new configuration words through the software port, then
apply one of these resets.

## Software access (user interface)

The processor reaches the design through a register-style interface in `usr_clk`:
- A write is `usr_wren` with one bit set in the 256-bit one-hot `usr_func_wr` naming the
  function, and 64-bit `usr_data_wr`.
- A read is `usr_rden` with one bit set in `usr_func_rd`. It is answered later by
  `usr_data_rd` with a one-clock `usr_rd_val`.

| function | access | meaning |
|---|---|---|
| `0xA0` HBM read | write | `[32:0]` byte address (32-byte aligned), `[38:33]` n−1, n = 1..64 |
| `0xA0` | read ×n | the n 64-bit words from that address, low 64 bits of each HBM word first |
| `0xA1` HBM write | write ×5 | byte address, then the four 64-bit quarters of the word, low first |
| `0xA2` histogram control | write | bit 0 = 1: reset the histogram in `[23:16]`. bit 0 = 0: hold all histograms in reset while bit 1 = 1 |
| `0xA2` | read | status: bit 0 initialization done, bit 1 toggle reset held |

### How an HBM read crosses the two clocks (`dth_hbm_access`)

The read path has to get a start signal from `usr_clk` to `axi_clk` without a handshake:
1. A read command latches the address and length. It then holds the 256-bit read FIFO in
   reset for three user clocks, so those registers are stable before anyone looks at them.
2. On the AXI side, the FIFO's write side leaving reset is seen as a rising edge. That
   edge is the start signal: one INCR burst of `ceil(n/4)` beats is issued into the FIFO.
3. On the user side, each read request is answered when the FIFO holds data, one 64-bit
   quarter at a time.
4. A request that arrives before the data waits. A new command discards whatever was left.

### Writes

Writes go through a 64-bit dual-clock FIFO. After every fifth entry, the AXI side issues a
single-beat write with all strobes set.

## Sharing the HBM port (`dth_axi_interconnect`)

The memory engine (manager 0) and the software port (manager 1) share one AXI port. Reads
(AR/R) and writes (AW/W/B) have separate arbiters, so one manager can read while the other
writes.
- An idle side looks first at the manager that did not have the previous grant, so
  priority alternates.
- From the next clock, the owner is wired straight through. The other manager keeps its
  valid high and waits.
- A read grant ends with the handshake of the last R beat, a write grant with the B
  handshake.

Each manager issues one transaction at a time, which the sharer relies on.

## Clocks, resets and crossings

| domain | frequency (tests) | contents |
|---|---|---|
| `usr_clk` | 100 MHz | user interface, the 24 input lines, unit FIFO write sides |
| `axi_clk` | 250 MHz | everything else |

- `usr_rst_n` is stretched so that the internal reset ends 5 `usr_clk` cycles after it is
  released.
- Each block synchronizes that reset into `axi_clk` with two flip-flops: asynchronous
  assertion, synchronous release.
- The single-histogram request crosses as a toggle through three flip-flops. Its index
  register is stable long before that.
- The toggle reset and the `init_done` status cross through two flip-flops each.
- The FIFOs use Gray-coded pointers. Their `full` flag is conservative, so a unit FIFO may
  refuse a sample a few clocks before it is truly full.

## How big it is

At the default parameters the on-chip storage is 642,048 bits:

| store | size | bits |
|---|---|---|
| 24 unit FIFOs | 512 x 35 | 430,080 |
| aggregator FIFO | 512 x 40 | 20,480 |
| configuration RAM | 256 x 108 | 27,648 |
| software read FIFO | 512 x 256 | 131,072 |
| software write FIFO | 512 x 64 | 32,768 |

That is about 17 block RAMs of 36 Kb before packing losses. The register count is about
3,200 flip-flops. An FPGA implementation of the original, including the HBM and link IP
around it, reported 32.5 block RAMs and about 8,100 flip-flops, so this RTL should stay
within that budget. The FIFOs are much deeper than the traffic needs; 512 matches the
smallest depth of a built-in FPGA FIFO at these widths. The depths are parameters of
`dth_hist_wrapper` and `dth_hbm_access`; the top level keeps the defaults.

## Departures and own choices

These points are not fixed by the original description, or it contradicts itself on them.
- **Sanitizing defaults**: the values listed under initialization are this design's
  choice; only "a default" is specified.
- **OP field positions**: some passages give different positions for the same fields.
  This design uses the histogram index in `[23:16]` everywhere (8 bits, 256 histograms),
  the block number in `[2:0]`, and the bin or bin count in `[11:0]`.
- **Function numbers**: `0xA0` is given. `0xA1`, `0xA2`, the status word and the
  quarter order are this design's.
- **Start of the histogram area** is HBM word 0.
- **Incoming data clock**: the top level has no separate data clock, so the lines are
  sampled in `usr_clk`.
- **Implementation choices**:
  - The FIFOs are written out as RTL with their own dual-clock logic, not vendor FIFO
    cores.
  - The 256-to-64-bit read FIFO is a 256-bit FIFO with a lane counter.
- **Memory engine**: one transaction at a time, whole-word read-modify-write. A sample
  therefore costs at least one HBM read round trip.

## Not included

- The HBM itself.
- The chip-to-chip link to the processor.
- The test wrapper that holds them.
- The processor-side software library.

These are vendor IP or software. The top level (`dth_top`) brings out the AXI port and the
user-interface signals instead. For simulation, `tb/hbm_model.sv` stands in for one HBM
pseudo channel:
- sparse 256-bit memory;
- independent read and write channels;
- configurable read latency;
- random stalls.

## Files

| file | block |
|---|---|
| `rtl/dth_pkg.sv` | sizes, configuration struct, OP codes, AXI request/response structs, address function |
| `rtl/dth_top.sv` | top: reset stretch, histogram-control function, status read, wiring |
| `rtl/dth_hist_wrapper.sv` | unit FIFOs, round robin, aggregator FIFO, both engines |
| `rtl/dth_histogram.sv` | binning engine |
| `rtl/dth_hist_memory.sv` | memory engine |
| `rtl/dth_divider.sv` | 32-by-32-bit divider with 12-bit quotient |
| `rtl/dth_config_ram.sv` | configuration cache (108 × 256) |
| `rtl/dth_async_fifo.sv`, `rtl/dth_sync_fifo.sv` | dual-clock and single-clock FIFOs |
| `rtl/dth_hbm_access.sv` | software HBM read/write |
| `rtl/dth_axi_interconnect.sv` | two-manager AXI sharer |
| `rtl/dth_reset_sync.sv` | reset synchronizer |

Each file opens with a comment on what it does, its interface and its timing.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dth_pkg.sv tb/tb_dth_top.sv --top-module tb_dth_top && ./obj_dir/Vtb_dth_top
```

Replace `tb_dth_top` with any other testbench. The full-size run takes about 15 s to build
and run.

| testbench | what it establishes |
|---|---|
| `tb_dth_top` | **Full size, default parameters.** Every step goes through the ports: the first initialization, configuring all 256 histograms over the user interface, the toggle reset, traffic with counters read back while the data path writes, overload of all 24 lines, and a single-histogram reset. It counts underflow, overflow and in-range samples, drops, aggregator-full clocks, AXI contention, both resets, sanitized configurations, and user-interface accesses, and fails if any of them never happened. It compares every bin of every histogram with its own count and fails if the processing interval is not below the original 62 clocks. |
| `tb_dth_hist_wrapper` | 24 lines with 16-deep FIFOs: light traffic, flood (drops, full aggregator), single reset, `hist_rstn`, all bins compared |
| `tb_dth_histogram` | binning, all bin kinds, sanitizing, initialization order, single reset, the 13-clock division cost |
| `tb_dth_hist_memory` | configuration reads, erase extent and burst count, increments with a 64-bit carry |
| `tb_dth_hbm_access` | writes, reads of every length 1..64, waiting reads, command restart |
| `tb_dth_axi_interconnect` | two managers writing and reading back concurrently, contention, alternation |
| `tb_dth_divider`, `tb_dth_async_fifo`, `tb_dth_sync_fifo`, `tb_dth_config_ram` | the building blocks against reference models |

Some testbenches reach into the design hierarchically to count events (FIFO full flags,
engine handshakes). They expect the instance names used in the RTL.
