# PCIe test benches for a fully parallel FFT

This RTL puts a hardware block under test, a fully parallel FFT, behind a
PCIe link to a host PC. The host streams input frames to the FPGA,
the FFT transforms one frame per clock, and the results stream back to host
memory. The aim is to measure how fast data can move between host and FPGA
with a real datapath in the loop. It also checks that nothing is lost or
corrupted on the way.

It follows the two test benches of S. Portela's 2022 master's thesis
*Implementation of a PCIe Interface to Transfer Data at High Speed Between a
Host and an Advanced FPGA*. Both are built here and sit side by side in one
top module, `pcie_fft_bench_top`:

* **XDMA path.** This is a PCIe Gen3 x16 DMA bridge with 512-bit
  host-to-card (H2C) and card-to-host (C2H) AXI4-Stream ports. A 16-point
  FFT sits between two dual-clock FIFOs. A verifier counts transmitted
  and lost words and can be read over AXI4-Lite.
* **Wupper path.** This uses two PCIe Gen4 x8 endpoints (bifurcation),
  each run by its own Wupper-style DMA core. The two 512-bit streams are
  joined into one 1024-bit frame for a 32-point FFT: the real parts travel
  through endpoint 0 and the imaginary parts through endpoint 1. This is
  the harder half, and most of this README is about it.

The vendor parts are not RTL and are not included: the XDMA IP, the PCIe
hard blocks, transceivers and clocking. Their user-side streams are ports of
the top. The testbenches play the part of the DMA bridge and of the PCIe
endpoints.

```
 XDMA path (one clock domain each side of the FIFOs)
   H2C 512b --> [async FIFO] --> [fpfft16_top  LAT 13] --> [async FIFO] --> C2H 512b
                                       valid/ready
                                           |
                                   [count_verifier] <-- AXI4-Lite (lost / packets / transmitted)

 Wupper path
   endpoint 0: cq/cc/rq/rc --> [wupper_core] <--> fromHost FIFO --(real 512b)----+
                                             <--> toHost FIFO  <--(real 512b)-+ |
                                                                              | v
                                                              [fpfft32_top LAT 19] 1024b
                                                                              | ^
   endpoint 1: cq/cc/rq/rc --> [wupper_core] <--> toHost FIFO  <--(imag 512b)-+ |
                                             <--> fromHost FIFO --(imag 512b)---+
   endpoint 0 register map <--> [register_map_sync] <--> sync_clk user logic
```

## The FFT and its handshake

`fft_parallel` is an N-point, N-input radix-2 decimation-in-frequency FFT.
It has one registered butterfly column per stage, so it accepts a new
frame every clock and never stalls. Details:

* **Samples.** 16-bit two's complement. Every stage halves its results, so
  the output is DFT/N and cannot overflow. Rounding is to nearest, with
  saturation.
* **Twiddles.** Q1.15 constants, worked out while the design is elaborated
  as round(32767·cos(2πk/N)) and round(−32767·sin(2πk/N)). A twiddle of 1
  costs no multiplier.
* **Latency.** Extra output registers bring the latency to the original's
  13 cycles (N = 16) and 19 cycles (N = 32).

The original core came from elsewhere and is only given by what it does.
This core does the same job but is not bit-identical to it. In particular,
the peak heights of the original's sine test are not reproduced, but the
bins where the energy appears are.

`fpfft16_top` and `fpfft32_top` adapt the core to the stream:

* **Bus layout.** The low half of the bus holds the real parts and the
  high half the imaginary parts. Sample i is at bits `[16i+15:16i]` of
  its half.
* **ready_in** is a constant 1.
* **valid_out** is `valid_in` pushed through a LAT-stage shift register
  (`valid_pipeline`). A frame presented with `valid_in` in cycle 0 comes
  out with `valid_out` in cycle LAT.
* **ready_out** is an input that the FFT ignores. The FFT cannot stop, so
  when the output FIFO is full the frame leaving the FFT is lost. This loss
  is what the verifier (XDMA path) and `lost_frames` (Wupper path) count.
* **rst** is active low, as in the original.

## XDMA path: `xdma_fft_system`

The H2C stream enters `axis_async_fifo` (512 deep, Gray-coded pointers,
first-word fall-through), which carries it into the FFT clock. The FFT's
valid output writes the C2H FIFO, which carries it back to the XDMA clock.
H2C sees back-pressure only when the input FIFO is full. That happens when
the FFT clock is slower than the XDMA clock for long enough.

`count_verifier` watches the FFT's `valid_out` and the output FIFO's ready
signal. Its AXI4-Lite registers (32-bit, byte offsets):

| offset | access | meaning |
|---|---|---|
| 0x0 | write only (reads 0) | bit 0 START(1)/STOP(0); bit 1 = 1 clears the counters |
| 0x4 | read only | lost: cycles with valid high and ready low |
| 0x8 | read only | packets: rising edges of valid, one per burst of words |
| 0xC | read only | transmitted: cycles with valid and ready high |

The counters count only while START is set, and they saturate.

Each clock domain has a `reset_sync` (asserts at once, releases three
edges later) fed by both reset inputs.

## Wupper path: `wupper_fft_system`

### Joining two endpoints into one FFT frame

Each endpoint has its own PCIe clock, DMA core, fromHost FIFO
(PCIe → FFT clock) and toHost FIFO (FFT clock → PCIe). The FFT needs both
halves of a frame at once, so the two paths are tied together at the FIFOs:

```
valid_in  = !fromHost_empty[0] & !fromHost_empty[1]    both FIFOs popped together
ready_out = !toHost_prog_full[0] & !toHost_prog_full[1]
toHost FIFO i is written with half i of the FFT output whenever valid_out is high
```

A frame is formed only when both endpoints have delivered their half. If
one host stream runs ahead, its FIFO fills, and its core stops issuing
reads (see FromHost below). The two halves of a frame are
therefore always the same frame number on both sides. A test must give both
endpoints the same number of frames.

`ready_out` drops at the programmable-full level (448 of 512). The FFT keeps
producing for as long as input is available, so a frame is lost only when a
toHost FIFO is completely full. `lost_frames` counts such frames.

### The DMA core of one endpoint: `wupper_core`

`wupper_core` is `dma_control` plus `dma_read_write`. It talks to the PCIe
block on four AXI4-Stream buses of 512 bits:

| stream | direction | carries |
|---|---|---|
| cq | in | host reads/writes of the endpoint's registers |
| cc | out | completions for those reads |
| rq | out | the DMA's own memory writes (ToHost) and reads (FromHost) |
| rc | in | the host's completions for the DMA reads |

**Stream format.** Each packet is one TLP. Header DW0 is in bits 31:0, and
the payload, if any, starts in the DW right after the 3- or 4-DW header and
may run over several beats. `tlast` marks the last beat. Header fields use
the standard PCIe layout:

* **DW0:** Fmt/Type in bits 31:24 (MRd 0x00/0x20, MWr 0x40/0x60,
  Cpl 0x0A, CplD 0x4A), Length in bits 9:0.
* **DW1 of a request:** requester ID, tag, last/first byte enables.
* **Address:** a 64-bit address with a zero upper half uses the 3-DW
  form.

### Registers and descriptors: `dma_control`

The host reaches the register map with single-DW memory reads and writes on
cq. Each read gets a completion with data on cc. For example:

```
write  40000001 0000000f fdaff040 f0e1f2c3     (offset 0x040 := f0e1f2c3)
read   00000001 00000c0f fdaff040              (requester 0x0000, tag 0x0c)
reply  4a000001 01000004 00000c40 f0e1f2c3     (completer 0x0100, 4 bytes, lower address 0x40)
```

Reads longer than one DW, and other requests that need an answer, are
completed with status Unsupported Request. Writes need all four byte
enables set.

| offset | register |
|---|---|
| 0x000 + 0x20·d | start address, low / high (0x004) |
| 0x008 + 0x20·d | end address, low / high (0x00C) |
| 0x010 + 0x20·d | bits 10:0 TLP length in DW (multiple of 16, up to 1024), bit 12 circular |
| 0x040 | control word for the user logic (read/write) |
| 0x044 | monitor word from the user logic (read only) |
| 0x100 | enable, bit d (writing 1 loads the pointer with the start address) |
| 0x104 | done, bit d (read only) |
| 0x110 + 8·d | current pointer, low / high (read only) |
| 0x120 + 4·d | number of wraps (read only) |

Descriptor 0 is ToHost and descriptor 1 is FromHost. The pointer moves
forward by one TLP each time `dma_read_write` reports a finished TLP. When
the next TLP would run past the end address, one of two things happens:

* A **circular** descriptor returns to its start and counts a wrap.
* Any other descriptor clears its enable bit and sets its done bit.

The buffer should be a whole number of TLPs long.

### Building and stripping TLPs: `dma_read_write`

**ToHost.** When descriptor 0 is active and the toHost FIFO has data, a
memory-write header goes out at the current pointer, followed by Length/16
FIFO words. The payload sits right behind the 3- or 4-DW header, so it
does not line up with the 512-bit beats. A carry register holds the top
DWs of each word for the next beat. A TLP of L words therefore takes L + 1
beats. If the FIFO runs dry in the middle of a TLP, the stream pauses.

**FromHost.** When descriptor 1 is active and the fromHost FIFO is below
prog_full, a one-beat memory-read request goes out. The completion returns
on rc with a 3-DW header. The header is checked: it must be a completion
with data, with successful status and the expected tag. A completion that
fails the check is dropped and the read is issued again. The payload is
realigned into whole words and pushed into the FIFO.

Only one read is outstanding at a time, so completions arrive in order.
When both processes have work, they take turns on rq.

### Register map synchronisation

`register_map_sync` carries the control word (offset 0x040) into the user
clock `sync_clk`, and the user's monitor word back for offset 0x044. It
uses one toggle-handshake crossing (`cdc_word`) per direction, so a word is
never seen half-written. Only endpoint 0's register map is connected.

## Clocks and resets

All clocks are inputs of the top:

* XDMA path: `xdma_axi_aclk`, `xdma_fft_clk`.
* Wupper path: `wup_pcie_clk[0..1]`, `wup_fifo_clk`, `wup_sync_clk`.

They may be unrelated, because every crossing goes through a dual-clock
FIFO or a handshake. Resets are active low. Each domain releases its reset
through its own synchroniser.

The FFT is meant to run at no more than 250 MHz. At 512 bits that is
128 Gbit/s, just above what a Gen3 x16 link carries.

## How this differs from the original design

* **FFT core.** Written here, with per-stage scaling to DFT/N. The
  original core's internal word format, and so its output amplitudes, is
  not known.
* **No sort memory.** The original read engine reorders completions in a
  sort memory. This one keeps a single read outstanding instead, which is
  simpler but limits FromHost throughput to one TLP per host round trip.
  Completions split into several TLPs are not supported.
* **Register map clock.** The original runs the register map from a
  25 MHz clock derived from the PCIe clock. Here it runs on the PCIe clock
  itself.
* **Interrupts.** There is no interrupt controller. The host polls the
  done register instead.
* **Verifier control register.** It is write-only. The original's text
  also calls it a readable register; the write-only reading was chosen.
* **Completion lower address.** This follows the field definition, so the
  example reply above has 0x00000c40 in DW2 where the original's example
  lists 0x00000c00.
* **Invented details.** Register offsets, FIFO depths (512) and thresholds
  (480, and 448 on the Wupper path), `lost_frames`, and the stream packing
  are this design's choices.

## Size and speed

Synthesis of the full top (both paths, default parameters) gives about
20,700 flip-flop bits, 1.58 Mbit of FIFO memory and 160 multiply cells, with
no latches.

**XDMA path.** It moves 512 bits per clock each way, which is 128 Gbit/s at
250 MHz. `tb_xdma_transfer_sizes` sends single transfers of 64 B to 4 MiB
at 250 MHz. It times each one from the first H2C word to the last C2H word:

| transfer | 512 B | 1 KiB | 4 KiB | 16 KiB | 64 KiB | 4 MiB |
|---|---|---|---|---|---|---|
| Gbit/s | 39.4 | 60.2 | 99.9 | 119.6 | 125.8 | 127.96 |

Small transfers are dominated by the fixed latency through the two FIFOs
and the FFT. The original hardware measured at most about 57.6 Gbit/s, so
the limit there was outside this datapath.

**Wupper path.** ToHost can move up to 2 × 512 bits × 250 MHz =
256 Gbit/s raw. Each TLP costs one extra beat, so 1 kB TLPs (16 words in
17 beats) give 241 Gbit/s. FromHost keeps one read in flight, so its rate
depends on how fast the host answers.

`tb_wupper_block_reads` streams 1 to 10,000 blocks of 1 kB through both
endpoints and the FFT, against a host model that answers reads within a few
cycles. With 1 kB TLPs it sustains about 149 Gbit/s of results over both
endpoints. A real host answers far more slowly. The original measured about
80 Gbit/s for the same operation.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/pcie_fft_pkg.sv tb/tb_pcie_fft_bench_top.sv --top-module tb_pcie_fft_bench_top
./obj_dir/Vtb_pcie_fft_bench_top
```

`tb/pcie_host_model.sv` is a behavioural host for one endpoint:

* It has a sparse DW-addressed memory.
* Its `reg_write` and `reg_read` tasks drive cq and check cc.
* It stores memory writes from rq and answers reads with completions on
  rc.
* It counts 3-DW and 4-DW headers and malformed packets.

`tb_pcie_fft_bench_top` runs the whole design at its default parameters,
in about 20 s of simulation:

* **XDMA.** 400 frames go through with random stalls on both sides. Each
  result is checked against a floating-point DFT. Then C2H stops while
  H2C keeps sending, until the input FIFO pushes back. The frames missing
  from C2H must equal the verifier's lost count.
* **Wupper.** Each endpoint reads a 32-frame source buffer in circular mode
  and writes 96 result frames. Endpoint 1's buffer is above 4 GiB, so
  4-DW headers are used. Results must be the FFT of source frame f mod 32.
  The hosts then let the circular reads run on, so the toHost FIFOs
  overflow and frames are lost.
* **Mechanisms.** It counts each one and fails if any never happened:
  H2C back-pressure, XDMA loss, verifier packets, 3-/4-DW writes, reads,
  circular wraps, one-sided FIFO waits, prog_full hold, Wupper loss and
  register reads.

Other testbenches:

* `tb_fft_parallel`: both sizes against a floating-point DFT.
* `tb_fpfft16_top`, `tb_fpfft32_top`: the sine tests and the exact
  latency.
* `tb_dma_control`: the register accesses and the completion example
  above.
* `tb_xdma_fft_system`: also runs the 16 delta inputs.
* `tb_xdma_transfer_sizes`: the transfer-size sweep above.
* `tb_wupper_block_reads`: the block-count sweep above.
