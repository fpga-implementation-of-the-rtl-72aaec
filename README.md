# Dynamic Huffman encoder for 8-bit image frames

A static Huffman coder is only as good as the statistics its code table was
built for. This design re-derives the code table for every frame: it counts
the symbol histogram of each frame, builds a Huffman tree from it, and then
encodes the very frame it measured with a table made for it. The work is split
between dedicated hardware and a processor:

* hardware does what costs time per pixel or per comparison — counting the
  histogram (one pixel per clock), sorting (one compare-and-move per clock)
  and encoding (one pixel per clock);
* a processor, outside this RTL, runs the cheap but irregular part: it drives
  the sorter while building the tree, turns the tree into code lengths and
  codes, and writes the table.

The target is 512 x 512 pixel frames at 25 frames per second. Input words are
8 bits, codes at most 12 bits, and coded data leaves as 16-bit words.

## Three frames in flight

Frames sit in an external SRAM. Time is divided into slots. In each slot the
three stages work on three different frames:

| stage | slot t works on | done by |
|---|---|---|
| histogram | frame t | `opb_hist`, fed by a DMA engine |
| sort, tree, code table | frame t-1 | processor + `opb_sort` + `bram_2` |
| encoding | frame t-2 | `opb_huff`, fed by a second DMA engine |

The processor's program for one slot is:

1. write the code table of frame t-2 into `opb_huff`, set the output address,
   start the encoding DMA;
2. read the 256 histogram counters of frame t-1, tag each with its symbol;
3. clear the histogram and start the histogram DMA on frame t;
4. sort the tagged counts with `opb_sort`, build the Huffman tree, derive the
   code table of frame t-1;
5. wait for both DMA streams, flush the encoder and the output writer.

At the full frame size a slot takes about 265 000 clock cycles in simulation
(both streams move one pixel per clock in parallel; the table is built during
the same slot). So 25 frames/s needs a clock of at least 6.7 MHz.

## Code table format and the 12-bit limit

Each of the 256 table entries is one 16-bit word: the code, right aligned, in
bits 11:0 and its length in bits 15:12. A 256 x 16 block RAM holds the whole
table. Length 0 means the symbol is unused and emits nothing; lengths 13–15
are not valid and are treated as 12.

Limiting codes to 12 bits costs little. A symbol that would need more than
m = 12 bits has a probability below about 2^-(m-1), so even in the worst case
the extra bits spent on such symbols stay below roughly 2^-(m-n) bits per input
word: about 0.06 bits for n = 8, m = 12. Shorter maximum codes also keep the
table (which a receiver needs) small. Rare symbols can instead be sent as an
escape prefix of m-n = 4 bits followed by the raw 8 bits. Such an entry is
just an ordinary 12-bit table entry, so the hardware needs nothing special for
it. How lengths are limited is up to the software. The test program clips
lengths at 12 and then lengthens the longest codes that are still shorter than
12 bits until the Kraft sum is at most 1 again. It then assigns canonical codes.
The end-to-end testbenches print the cost of this limit for every frame and
check that it stays below 0.066 bits per word. On the full-size frames it is
0 to 0.003 bits per word.

## Histogram at one pixel per clock (`opb_hist`)

A block RAM read takes a full cycle, so a read-increment-write counter
normally needs two cycles per pixel. Here the two ports of a dual-port block
RAM overlap the steps:

* port 0 reads the counter addressed by the incoming pixel;
* one cycle later port 1 writes that count plus one, at the same address,
  taken from a register that delays the pixel by one cycle.

If a pixel value repeats in the next cycle, its counter is read in the same
cycle the previous increment is written, and the read would return the old
value. In that case a forwarding path uses the value being written instead.
Runs of equal pixels are common in images, so this path is exercised heavily.
Port 1 also has an address multiplexer. The processor uses it to clear all
256 counters (256 cycles) and to read the result. The input stream is held
off while either is in progress.

Counters are 16 bits wide, one 256 x 16 block RAM, and saturate at 65535. A
512 x 512 frame has 262 144 pixels. A value that appears more than 65 535
times is therefore under-counted. The code stays valid but is no longer
exactly optimal for that frame.

## Finding the two smallest weights (`opb_sort`, `bram_2`)

Building a Huffman tree repeatedly takes the two smallest weights and adds
their sum back. The design keeps all weights in one table in `bram_2`, sorted
in descending order, so the two smallest are always the last two entries.
Each table element is a 32-bit word with the weight in bits 31:9 and the node
number in bits 8:0. The sorter compares whole words, so it sorts by weight.

`opb_sort` performs one insertion-sort step per command. The processor writes
the table's base address and element count once, then writes an element.
The sorter then:

1. reads the last element (port A);
2. each cycle, compares the element just read with the new one: if it is
   smaller it is written one place up (port B), and the element before it is
   read at the same time; otherwise the new element is written into the gap.

One compare and one move therefore happen per clock. Inserting an element
that is larger than j of the stored ones takes j + 2 cycles. The count
register then increases by one. An element equal to a stored one goes after it.

The processor uses this twice. First it inserts all non-zero histogram counts
into an empty table (the preliminary sort). Then it repeats the tree step
until one node is left:

* read the last two entries;
* lower the count by two;
* insert their sum under a new node number.

Node numbers 0–255 are the symbols and 256 upwards are internal nodes. The
code length of a symbol is its depth in the tree, which can be computed
without recursion from the recorded parent numbers. While the sorter works it
owns both ports of `bram_2`. Processor accesses to `bram_2` wait until it is
idle.

## Encoding and output packing (`opb_huff`, `huff_packer`, `opb2opb_huff_out`)

Each pixel addresses the code table (port B of its block RAM). One cycle later
the length and code reach `huff_packer`. The packer keeps the pending bits
left aligned in a 32-bit accumulator:

* a new code is shifted right by the number of pending bits and OR-ed in;
* whenever 16 or more bits are pending, the top 16 leave as one output word.

At most 15 + 12 = 27 bits are ever pending, so the packer accepts a code every
cycle unless its output is stalled. The bit stream is MSB first. A flush
command sends the last partial word, padded with zeros. The encoder also
counts the pixels it has encoded and the code bits it has produced, which
tells a receiver where the valid data ends.

`opb2opb_huff_out` pairs the 16-bit words into 32-bit words, first word in
the upper half, so the stream stays MSB first in memory. It queues them in a
16-word FIFO and writes them to consecutive SRAM addresses. The FIFO lets the
encoder keep running in the cycles in which the SRAM serves the DMA engines.

## Moving data: DMA, width conversion, SRAM, buses

* `opb_dma` (two instances) reads a programmed range of 32-bit words. It
  issues one read per cycle as long as its 4-word buffer has room for every
  read in flight.
* `opb2opb_dma` splits each word into four pixels, most significant byte
  first, at one pixel per clock.
* `opb_sram` shares the SRAM among the two DMA engines and the output writer.
  It grants one access per clock, round-robin. The external SRAM is assumed
  synchronous, with read data one cycle after the address.
* `opb2opb_mb` decouples the processor from the peripheral bus. Writes are
  posted into an 8-entry FIFO and acknowledged at once. A read waits until
  all earlier writes have reached their slaves.
* `opb_bus` decodes the peripheral register bus into 512-word regions.

All register transfers use one simple protocol, `reg_req_t`/`reg_rsp_t` in
`dhe_pkg`. The master holds `sel`, `we`, `addr` (12-bit word address) and
`wdata` until the slave raises `ack` for exactly one cycle, and read data is
valid with `ack`. Data paths are valid/ready streams. SRAM clients use
`mem_req_t`/`mem_rsp_t`: a request is taken in the cycle `gnt` is high, and
read data returns one cycle later with `rvalid`.

### Register map (word addresses)

| region (addr 11:9) | block | registers (addr 8:0) |
|---|---|---|
| 0 | `opb_huff` | 0x000–0x0FF code table entry of symbol (R/W); 0x100 W bit0 flush, R bit0 flushing; 0x101 pixels encoded (W clears); 0x102 code bits produced (W clears) |
| 1 | `opb_hist` | 0x000–0x0FF counter (R); 0x100 W bit0 clear, R bit0 clearing; 0x101 pixels counted since clear |
| 2 | `opb_sort` | 0 element to insert (W, starts); 1 base; 2 element count; 3 R bit0 busy; 4 R cycles of the last insertion |
| 3 | `bram_2` | 0x000–0x0FF sort table words (R/W, waits while sorting) |
| 4 | histogram DMA | 0 source word address; 1 length in words; 2 W bit0 start, R bit0 busy; 3 words left to read |
| 5 | encoder DMA | as region 4 |
| 6 | output writer | 0 destination word address (W also clears 1); 1 words written; 2 W bit0 flush, R bit0 busy |
| 7 | — | acknowledged, reads 0 |

## What is not in the RTL

* The processor, its local-memory controllers and program memory. The
  top-level ports `cpu_req`/`cpu_rsp` are where its bus connects. The tree
  construction and table calculation are software. `tb/dhe_env_model.sv`
  contains a complete model of that program, and it is the reference for
  writing the real one.
* The parallel-port (EPP) link to a PC, which in the original system only
  loaded test frames and fetched results. Here frames are assumed to be in the
  SRAM already.
* The SRAM itself. It is modelled in `tb/dhe_env_model.sv`.
* The bus-to-block-RAM controllers of the original system. `bram_2`'s
  processor port does their job.

## Departures and own choices

The block structure, the data widths (8-bit input, 12-bit code, 4-bit length,
16-bit output words, 32-bit SRAM words) and these mechanisms follow the
original design:

* the table held in a block RAM;
* the two-port, delayed-address histogram;
* the sorter that inserts one element per command with one compare-and-move
  per clock;
* the three-frame pipeline;
* the FIFO on the output path.

The following are choices of this implementation:

* the register transfer protocol and all register maps, used instead of
  signal-level On-chip Peripheral Bus transfers;
* counter forwarding and saturation in the histogram;
* the descending table order, the element format and the tie rule of the
  sorter;
* the bit and byte orders (MSB first), zero padding and the flush commands;
* the FIFO and buffer depths;
* round-robin SRAM arbitration and the synchronous SRAM timing;
* posted writes in the processor bridge. The bridge does no width conversion,
  because both of its sides are 32 bits here.
* the histogram's data source. It reads the stored frame back from the SRAM
  through its own DMA engine once the frame is stored. The alternative,
  counting pixels while the frame is being captured, would need a tap on the
  capture path, which is outside this design.
* one table for the sorter. Its "input" and "output" tables are the same
  region of `bram_2`, read through one port and written through the other,
  so the sort is done in place.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/dhe_pkg.sv tb/tb_dyn_huff_top.sv --top-module tb_dyn_huff_top -o sim
./obj_dir/sim
```

Replace `tb_dyn_huff_top` with any other testbench name to run that one.
`-Wno-fatal` keeps Verilator's width warnings about the testbenches'
bookkeeping arithmetic from stopping the build.

* `tb_dyn_huff_top` runs the whole system on three 72 000-pixel frames.
  `tb_dyn_huff_full` does the same on three 512 x 512 frames, with all
  parameters at their defaults. The frames are:
  * a smooth random walk, which gives long runs;
  * one dominant value, which saturates a counter;
  * a skewed random source.

  Both system tests check every histogram counter against a count made by
  the testbench. They check that the tree built with the hardware sorter has
  the same total cost as an independent software Huffman construction, and
  they compare every coded bit in the SRAM with the expected stream. They
  also count how often these mechanisms occurred, and fail if any never did:
  * counter forwarding;
  * counter saturation;
  * sort moves;
  * SRAM contention;
  * coded words waiting in the output FIFO;
  * table reloads;
  * overlapping DMA streams.
* Rates are checked where the design promises them:
  * one pixel per clock in the histogram, the encoder and the byte converter;
  * one code per clock in the packer;
  * one word per clock in the DMA engine;
  * j + 2 cycles per sorter insertion.
* Both system tests finish in seconds. The full-size test reports about
  265 000 cycles per time slot. Its frames compress to 7.97, 1.24 and 7.40
  bits per pixel.

## Files

`rtl/dhe_pkg.sv` holds the shared constants and types. There is one module
per file:

* `dyn_huff_top` is the top level;
* `opb_huff`, `huff_packer`, `opb_hist`, `opb_sort`, `bram2_sys`, `dp_bram`,
  `opb_dma`, `opb2opb_dma`, `opb2opb_huff_out`, `opb_sram`, `opb_bus`,
  `opb2opb_mb` and `sync_fifo` are the blocks.

`tb/` holds one testbench per block, the two system tests and
`dhe_env_model`, the processor-and-SRAM model they share.
