# A 2-D filterbank built from one reconfigurable 1-D filter

A separable 2-D FIR filter can be applied as two 1-D passes: filter every
row of the frame, store the result, then filter every column of the stored
frame. This design uses that to run a whole bank of separable 2-D filters
on hardware big enough for only **one** 1-D filter. The filter sits in a
slot that is rewritten between passes: row filter of filter A, column
filter of A, row filter of B, column filter of B, and so on. After the
last filter of the bank the slot is loaded with the first row filter again,
ready for the next frame.

The architecture is that of the dynamic-partial-reconfiguration filterbank
described by D. Llamocca and M. Pattichis in "Real-time Dynamically
Reconfigurable 2-D Filterbanks". There the slot is a partial
reconfiguration region of an FPGA, rewritten through the device's
configuration port with partial bitstreams, and a processor runs the
sequence in software. Neither a partial bitstream nor the configuration
port can be written as RTL. So in this RTL:

* the slot is a distributed-arithmetic FIR filter (`da_fir`) whose
  coefficient tables are ordinary registers, and "reconfiguring" it means
  writing those tables from a small bitstream image held in memory;
* the processor's routine is a hardware sequencer (`fb_sequencer`).

Everything else follows the original structure: a 1D filter core made of
a control unit and the slot, attached by two Fast Simplex Link (FSL)
channels, with frames, intermediate results and bitstream images in one
external memory.

## Structure

```
            +----------------------- filterbank_top ----------------------------+
 memory <-->| fb_sequencer --fsl_fifo--> filter_core_1d --fsl_fifo--> fb_sequencer|
 port       |      |                      | filter_ctrl (control unit)        |
            |      +-- config words ----->| prr_loader  (slot rewrite)        |
            |                             | da_fir      (the slot: 1-D filter)|
            +-------------------------------------------------------------------+
```

| module | role |
|---|---|
| `filterbank_top` | wires the parts; brings out the memory port, job controls and status |
| `fb_sequencer` | runs the passes and the reloads, owns the memory port |
| `fsl_fifo` | one FSL channel: 32-bit words plus a control bit, `full`/`exists` flags |
| `filter_core_1d` | the 1D filter core: `filter_ctrl` + `prr_loader` + `da_fir` |
| `filter_ctrl` | moves words from the input link through the filter to the output link |
| `prr_loader` | parses a bitstream image and writes it into the slot |
| `da_fir` | 16-tap FIR filter in distributed arithmetic, one sample per clock |
| `fb_pkg` | sizes, sync word, header layout, command codes |

## One frame, step by step

For each filter k = 0 .. nfilt-1 the sequencer:

1. **Row pass.** Reads the input frame row by row and streams it into the
   core. Each input word holds one 8-bit pixel in its low byte; only those 8
   bits are sent (the row filter takes 8-bit pixels). Results (16-bit
   signed) are written row-major to the intermediate frame.
2. **Load the column filter** of filter k.
3. **Column pass.** Reads the intermediate frame one column at a time:
   one word from each row, so the address steps by `cols`. Results go to
   output frame k, row-major.
4. **Load the row filter** of filter k+1. After the last filter it loads
   the row filter of filter 0, pulses `frame_done` and waits for `start`.
   A frame that starts with that filter already loaded skips its first
   load.

Before every row and every column the sequencer sends a `CMD_CLEAR`
word. This zeroes the filter's delay line, so every line is filtered as
if it were preceded by zeros: `y[n] = sum_k h[k] x[n-k]`, with one output
per input. Results are aligned with the inputs and the first 15 outputs of
a line see the zero history. A load starts only when every result of the
previous pass is in memory, so the slot is never rewritten while it holds
samples. Assertions in `filter_ctrl` and `filterbank_top` check this.

### Memory layout

All addresses are 32-bit word addresses. Every pixel, result or bitstream
word takes one memory word.

| region | base | contents |
|---|---|---|
| input frame | `in_base` | `rows*cols` pixels, 8 bits in bits 7:0 |
| intermediate | `tmp_base` | `rows*cols` 16-bit results, sign-extended |
| outputs | `out_base` | `nfilt` frames of `rows*cols`, frame k at `out_base + k*rows*cols` |
| images | `bs_base` | `2*nfilt` images of 66 words: row 0, column 0, row 1, column 1, ... |

### Memory port

The memory port has one request per cycle: `mem_req`, `mem_we`,
`mem_addr` and `mem_wdata`. A request is taken in a cycle where `mem_gnt`
is high, so the memory can stall for as long as it likes. Read data comes
back in order on `mem_rvalid`/`mem_rdata`, one or more cycles later. The
sequencer keeps at most one read outstanding. It issues a read only while
the input link has room for its data (`m_almost_full`), so the link cannot
overflow. Writing a result back has priority over the next read.

## The filter slot: distributed arithmetic (`da_fir`)

This is the least obvious part. The filter computes `y = sum_k h[k] x_k`
over 16 taps, with 16-bit two's-complement samples `x_k` and 16-bit
coefficients, and it uses no multipliers. Write each sample by its bits:

```
x_k = -x_k[15]*2^15 + sum_{b=0..14} x_k[b]*2^b
y   = sum_b w_b * S_b,   w_b = 2^b (b < 15),  w_15 = -2^15
S_b = sum_k h[k] * x_k[b]
```

`S_b` depends only on one bit of each sample. The taps are split into 4
groups of 4. For group g, the four bits `x_{4g+j}[b]` (j = 0..3) form a
4-bit address into a 16-entry table. Entry e of that table holds the sum of
the coefficients `h[4g+j]` whose bit j of e is set. So `S_b` is the sum of
4 table reads. The filter reads all 16 bit positions at once: 64 table
reads per clock, all from the same 4 tables. It weights the 16 partial
sums by `w_b` and adds them in a 4-level pipelined binary tree. The result
is exact: 36 bits hold every possible sum.

The coefficients live only in the table contents (64 entries of 18 bits).
So a new filter, or a filter with fewer taps (zero coefficients), is just
a new set of entries. That is what makes the slot "reconfigurable" here.
The output width is set per image by an arithmetic right shift, `out_shift`
(0..31). The shifted value is saturated to 16 bits, and `out_sat` flags
the saturated results. Rows use 8-bit unsigned pixels, which are
zero-extended into the same 16-bit datapath. This is exact, so one slot
size serves both the row filter and the larger column filter.

**Timing.** The whole pipeline moves when `adv` is high. A sample taken
on one advance comes out `LATENCY = $clog2(IN_W)+3` advances later (7 for
16-bit samples). The stages are: delay line, table sums, four tree levels,
then shift/saturate. With nothing blocking it, the core takes one sample
and gives one result per clock.

## Reconfiguration: bitstream images (`prr_loader`)

An image is a stream of 32-bit words:

| word | contents |
|---|---|
| 0 | sync word `0xAA995566`; any word before it is ignored |
| 1 | header: `[31:16]` filter tag, `[4:0]` output shift |
| 2 .. 65 | table entry `e` of group `g` at word `2 + 16*g + e`, signed, low 18 bits |

While an image is being written, `slot_busy` is high and `slot_ready` is
low. The control unit then moves nothing. After the last entry, `done`
pulses and the tag appears on `filter_id`. The loader takes one word per
clock, which at 100 MHz is 400 MB/s. The sequencer delivers one word per
memory read, so in practice the loader runs at the memory's read rate.
The formula for the entries is above. The testbenches compute images from
random coefficients with that formula (`tb_fb_util_pkg::image_word`).

## The core's link protocol (`filter_ctrl`, `fsl_fifo`)

Input link words:
* control bit 0: a sample, in the low 16 bits (the upper bits are
  ignored);
* control bit 1: a command, `CMD_CLEAR` (0) zeroes the delay line and
  `CMD_NOP` (1) does nothing.

Output link words are results, sign-extended to 32 bits. The control bit
is set if the result saturated. The control unit stalls the whole filter
pipeline only when a finished result cannot be written because the output
link is full (`stalled`), or while the slot is not ready. `idle` means no
sample is inside the pipeline.

## Throughput and the frame timers

The sequencer has two timers. At each `frame_done`, `frame_cycles` holds
the clocks the frame took from `start` to `frame_done`. `cfg_cycles` holds
how many of those clocks went into loading images. Their difference is
the filtering time without the reconfiguration overhead.

The numbers below use the memory model in `tb/`. Its reads return 2 to 4
clocks after their grant. It stalls 5% of requests at random, plus a
24-clock refresh-like stall every 400 clocks. With that model one pixel
costs about 3.6 clocks per pass. Most of this is read latency, since only
one read is outstanding. Each row shows a bank of four 2-D filters (8
passes, 8 image loads):

| frame | `frame_cycles` | `cfg_cycles` | banks/s at 100 MHz |
|---|---|---|---|
| 320x240 | 2 240 136 | 1 878 | 44.6 |
| 425x355 | 4 393 949 | 1 701 | 22.8 |
| 640x480 | 8 939 461 | 1 656 | 11.2 |
| 1024x768 | 22 880 522 | 1 794 | 4.4 |
| 1600x1200 | 55 839 870 | 1 725 | 1.8 |

A single 2-D filter takes about a quarter of these times (2 passes). These
figures measure this RTL against that memory model, not an FPGA system.
Here an image is 66 words, so reloading the slot costs well under 0.1% of
a frame. With real partial bitstreams of about 124 KB, the configuration
rate dominates at small frame sizes.

## Departures from the original system

* **No processor, bus or memory controller.** The sequencing runs in
  `fb_sequencer`, and the memory is external behind a simple
  request/grant port. The processor, PLB bus, DDR memory and its
  controller, configuration-port controller, CompactFlash reader and
  Ethernet MAC of the original platform are not part of the RTL.
* **Reconfiguration is a table write.** The original swaps the whole
  circuit in a partial reconfiguration region. That can also change its
  structure, its input/output widths and its number of taps. Here the
  datapath is fixed at the largest case (16 taps, 16-bit samples and
  coefficients, 16-bit results). Fewer taps are zero coefficients, and a
  narrower output is a different shift.
* **Image format** (sync word, header, 64 entries) is this design's own.
* **Memory packing.** The original stores 8-bit input pixels and 16-bit
  intermediate pixels packed in memory. Here every value takes a 32-bit
  word.
* **Choices with no counterpart in the original:** the distributed-
  arithmetic table size and the bit-parallel form; the 7-clock pipeline;
  shift-and-saturate output scaling; zero history at each line start
  (`CMD_CLEAR`); FSL depth 16; the memory handshake; one output frame per
  filter; asynchronous active-low reset.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NTAPS` | 16 | `da_fir`, `filter_core_1d` | coefficients per 1-D filter |
| `COEF_W` | 16 | same | coefficient width |
| `IN_W` | 16 | same | sample width (column filter input; row pixels are 8-bit) |
| `OUT_W` | 16 | same | result width |
| `LUT_IN` | 4 | same | taps per distributed-arithmetic table |
| `ADDR_W` | 25 | `filterbank_top`, `fb_sequencer` | word address width (128 MB of 32-bit words) |
| `DIM_W` | 11 | same | rows/cols up to 2047 |
| `NF_W` | 4 | same | up to 15 filters per bank |
| `FSL_DEPTH` | 16 | `filterbank_top` | words per FSL channel |

If you change `NTAPS` or `LUT_IN`, the image length changes
(`2 + ceil(NTAPS/LUT_IN) * 2^LUT_IN` words, `fb_pkg::lut_words`).

## Simulating

Every testbench checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fb_pkg.sv tb/tb_fb_util_pkg.sv tb/tb_filterbank_top.sv \
    --top-module tb_filterbank_top -o sim
./obj_dir/sim
```

Replace the testbench name as needed:

| testbench | what it runs |
|---|---|
| `tb_da_fir` | random filters and samples against a reference convolution; stalls, clears, saturation; latency of exactly 7 advances |
| `tb_fsl_fifo` | random traffic against a queue model; full/almost-full/exists flags |
| `tb_prr_loader` | noise words, images with gaps, addresses, shift, status |
| `tb_filter_ctrl` | control unit with a real filter; commands, back-pressure, unready slot |
| `tb_filter_core_1d` | core loaded by images: row filter, column filter, row filter; 7-clock latency |
| `tb_fb_sequencer` | sequencer against a stand-in core that encodes position and filter tag; pixel order, image order, clears |
| `tb_filterbank_top` | whole design, 9x6 frames, 3 filters, 2 frames, 2-word links, memory stalls; checks every output pixel, the frame timers, and that every mechanism occurred |
| `tb_filterbank_full` | default sizes: 320x240, four filters, all 307200 output pixels checked |
| `tb_fb_workloads` | all five frame sizes from 320x240 to 1600x1200, four filters each (about 80 s) |

`tb/tb_mem_model.sv` is the behavioural memory used by the system
testbenches. `tb/tb_fb_util_pkg.sv` holds the reference model: image
words, convolution, and saturation.
