# Run-time rewireable functional blocks for a Zynq position-and-acquisition box

Continuous ("fly") scanning on an X-ray beamline needs the motion encoders and the
detectors to be synchronised in hardware: a detector must be triggered the moment a
motor passes a position, and the positions at that moment must be recorded. This RTL
is the programmable-logic half of such a box, in the style of the PandABlocks framework
used on the PandABox (a Zynq-7030 system-on-module on a carrier board with encoder
cards, TTL and LVDS I/O).

The central idea is that **nothing is wired at build time**. Every function is a
*functional block* (a LUT, a pulse generator, a sequencer, an encoder input, a TTL
output, ...). Every block output is given a fixed place on one of two shared buses,
and every block input is a multiplexer that can pick *any* place on those buses. The
multiplexer selects are ordinary registers, so the processor rewires the system—say,
"encoder 1 position into sequencer 1, sequencer output A to LVDS output 1 and to the
capture trigger"—with a few register writes and no FPGA rebuild.

## The three buses

| bus | size | carries | written by | read by |
|---|---|---|---|---|
| bit bus | 128 lines | single-bit signals (triggers, gates, levels) | every block's bit outputs | `bit_mux` on each bit input |
| position bus | 32 words × 32 bits | positions and other numbers | encoder inputs | `pos_mux` on each position input |
| CSR bus | 128 KB address space | register reads and writes | `csr_axi_slave` (from the processor) | one `fb_regs` per block type |

Both data buses are registered once per clock in `panda_top`. Bit line 0 is the
constant ZERO and line 1 the constant ONE, so an input can be tied off (for instance
"ENABLE = ONE") by writing 0 or 1 to its select register. Position word 0 is ZERO.

### Line allocation (default sizes)

| bit lines | signal |
|---|---|
| 0, 1 | ZERO, ONE |
| 2–7 | TTL inputs 1–6 |
| 8–9 | LVDS inputs 1–2 |
| 10–25 | encoder inputs 1–4, four lines each: A, B, Z, CONN |
| 26–33 | LUT 1–8 OUT |
| 34–37 | SRGATE 1–4 OUT |
| 38–45 | DIV 1–4, two lines each: OUTD, OUTN |
| 46–49 | PULSE 1–4 OUT |
| 50–63 | SEQ 1–2, seven lines each: ACTIVE, OUTA … OUTF |
| 64 | PCAP ACTIVE |

Position words: 0 ZERO, 1–4 encoder inputs 1–4. The allocation is computed from the
instance-count parameters of `panda_top` (`*_BIT` localparams), so it shifts if the
counts change; an elaboration error reports a bus that is over-allocated.

## The register space

The 128 KB CSR window is split exactly as the framework does it:

```
byte address  [16:12] page      32 pages of 4 KB, one per block type
              [11:8]  instance  16 instances of that block type
              [7:2]   register  64 registers of 32 bits
```

`csr_axi_slave` is an AXI4-Lite slave (one access at a time, full-word writes, WSTRB
ignored, always OKAY). It turns each access into a one-clock request struct
(`panda_pkg::csr_req_t`) seen by every control module. Each `fb_regs` instance
answers only its own page. Its read data is registered and is zero unless it was
addressed, so the top simply ORs all pages' read data. A write also gives a one-clock
strobe for the register written; blocks use the strobe as a command (ARM, load a
table word, load an encoder position).

Timing of one AXI access: a write is acknowledged on B two clocks after AW/W are
accepted. A read returns data on R three clocks after AR is accepted.

### Register map

Page numbers are this design's allocation (`panda_pkg::PAGE_*`). "sel" registers
hold a bit-bus line (7 bits used) or a position-bus word (5 bits used). RO registers
are read-only status.

| page | block | registers |
|---|---|---|
| 0 | REG | 0–3 bit bus bits 32k…32k+31 (RO); 4–35 position words 0–31 (RO) |
| 2 | TTLOUT ×10 | 0 VAL sel |
| 4 | LVDSOUT ×2 | 0 VAL sel |
| 5 | INENC ×4 | 0 SETP (write loads the position); 1 ERRORS (RO) |
| 6 | OUTENC ×4 | 0 ENABLE sel; 1 VAL sel; 2 QPERIOD; 3 COUNT (RO) |
| 7 | LUT ×8 | 0–4 INPA–INPE sel; 5 FUNC |
| 8 | SRGATE ×4 | 0 SET sel; 1 RST sel |
| 9 | DIV ×4 | 0 ENABLE sel; 1 INP sel; 2 DIVISOR; 3 COUNT (RO) |
| 10 | PULSE ×4 | 0 ENABLE sel; 1 TRIG sel; 2 DELAY; 3 WIDTH; 4 DROPPED (RO) |
| 11 | SEQ ×2 | 0 ENABLE sel; 1–3 BITA–BITC sel; 4–6 POSA–POSC sel; 7 TABLE_REPEATS; 8 TABLE_START; 9 TABLE_DATA; 10 TABLE_LINES (RO); 11 LINE (RO); 12 LINE_REPEAT (RO) |
| 12 | PCAP ×1 | 0 ENABLE sel; 1 GATE sel; 2 TRIG sel; 3 ARM; 4 DISARM; 5 POS_MASK; 6 BIT_MASK; 7 STATUS (RO: bit0 armed, bit1 active, bit2 overflow); 8 CAPTURED (RO); 9 DMA_ADDR; 10 DMA_WORDS; 11 DMA_START; 12 DMA_WRITTEN (RO); 13 DMA_STATUS (RO: bit0 buffer full, bit1 error) |

TTL and LVDS inputs have no registers; their pages (1, 3) are left free.

## Latency through the fabric

There is one clock domain. Every mux registers its output and both buses are
registered, so one hop between blocks costs two clocks plus the block's own latency.
Worked example, checked by the top-level testbench: a TTL input through a LUT to a TTL
output takes 7 clocks (synchroniser 2, bus 1, input mux 1, LUT 1, bus 1, output mux 1).
When two signals must line up, as a trigger and the data it captures do, route them
through the same number of hops.

## The blocks

**Input and output blocks.** `sync_in` is the TTL/LVDS input block: a two-flip-flop
synchroniser per pin. A TTL or LVDS output is just a `bit_mux` whose registered
output drives the pin.

**Encoder input (`inenc`).** Synchronises A, B, Z and the card's CONN line, decodes
A/B at four counts per cycle (A leading B counts up) and keeps a 32-bit position for
the position bus. A step where both lines change at once is illegal: it is counted in
ERRORS and does not move the position. Writing SETP loads the position. The position
moves three clocks after the pin edge. Only incremental quadrature is built; the
absolute protocols that the encoder cards also support (SSI, BiSS-C) are not, and
neither are the CLK input and DATA output that those protocols would use.

**Encoder output (`outenc`).** Keeps its own count and, while enabled, steps it
towards the selected position once every QPERIOD clocks. It outputs the count's two
low bits in Gray code on A/B, in the same sense as `inenc`. Looping an `outenc` back
into an `inenc` therefore reproduces the position.

**LUT.** Five bit inputs form an index (A is the most significant bit) into the 32-bit
FUNC register. For example, FUNC = `0xFF000000` is A AND B, and `0xFFFF0000` is A.

**SRGATE.** A rising edge on SET sets the output and a rising edge on RST clears it.
Reset wins if both edges arrive together.

**DIV.** Counts rising edges of INP while enabled. Every DIVISOR-th pulse goes whole
to OUTD and the others to OUTN. COUNT is the number of edges since the last OUTD
pulse. Disabling the block clears the count.

**PULSE.** If clock edge E samples a trigger edge, OUT is high after edges
E+DELAY … E+DELAY+WIDTH−1. One pulse is handled at a time. Trigger edges that arrive
while a pulse is pending or running are dropped and counted in DROPPED.

### Sequencer (`seq`)

The sequencer turns a list of compare points into detector triggers. It plays a table
of *frames*. Each frame waits for a trigger condition, then drives the six outputs
OUTA–OUTF with OUT1 for TIME1 clocks, then with OUT2 for TIME2 clocks. A frame is played
REPEATS times before the next frame starts. The whole table is played TABLE_REPEATS
times (0 means forever).

A frame is four 32-bit words, pushed in order by writing TABLE_DATA. Write
TABLE_START first to empty the table.

| word | bits | field |
|---|---|---|
| 0 | 31:16 | REPEATS (0 acts as 1) |
| 0 | 15:12 | TRIGGER |
| 0 | 11:6 | OUT2 (bit 6 = OUTA) |
| 0 | 5:0 | OUT1 (bit 0 = OUTA) |
| 1 | 31:0 | POSITION, signed |
| 2 | 31:0 | TIME1 in clocks (0 acts as 1) |
| 3 | 31:0 | TIME2 in clocks (0 acts as 1) |

TRIGGER codes (`panda_pkg::seq_trig_e`): 0 immediate; 1/2 BITA = 0/1; 3/4 BITB = 0/1;
5/6 BITC = 0/1; 7/8 POSA ≥ / ≤ POSITION; 9/10 the same for POSB; 11/12 for POSC.

A rising edge of ENABLE starts the table at frame 0 and raises ACTIVE. Loading a frame
takes two clocks. Once the condition holds, OUT1 appears on the next clock. OUT2 stays
on the outputs while the next frame loads and waits for its condition. At the end of
the table, or when ENABLE falls, ACTIVE and the outputs drop to zero. LINE and
LINE_REPEAT show progress. The table holds `TABLE_DEPTH` frames (1024 by default) of
128 bits each, in one memory with a registered read port.

### Position capture (`pcap`)

PCAP delivers data to the processor. The sequence is:

1. Write ARM.
2. A rising edge of ENABLE starts an acquisition: ACTIVE goes high and a timestamp
   counter restarts.
3. Each rising edge of TRIG while GATE is high captures a snapshot of both buses on
   that same clock.
4. The snapshot is written to a FIFO as a sample:
   - the timestamp (clocks since ENABLE rose);
   - each position word whose bit is set in POS_MASK, word 0 first;
   - each 32-bit slice of the bit bus whose bit is set in BIT_MASK.

The FIFO (1024 words by default) drains through a valid/ready stream into the DMA
engine, described below.

Writing out one sample takes 37 clocks whatever the masks, one per possible word. If
a trigger arrives before the previous sample is written out, or the FIFO is full, the
acquisition stops with OVERFLOW set. The fastest trigger rate is therefore one per 37
clocks. The acquisition also ends when ENABLE falls or DISARM is written.

### Capture DMA (`pcap_dma`)

The DMA engine moves the capture stream into a buffer in processor memory through
an AXI write master, which is the `m_*` ports of the top.

- **Setup.** Write DMA_ADDR (a byte address aligned to 64 bytes) and DMA_WORDS (the
  buffer size). Then write DMA_START, before ARM.
- **Bursts.** Words are gathered 16 at a time and each group is written as one INCR
  burst of 32-bit beats, so no burst crosses a 4 KB boundary.
- **Flush.** When the acquisition ends (PCAP ACTIVE falls), the partial group left
  over is written as a shorter burst once the capture FIFO is empty.
- **Buffer full.** When the buffer is full the engine stops accepting words and sets
  bit 0 of DMA_STATUS. The capture FIFO then fills, and PCAP reports OVERFLOW.
- **Status.** DMA_WRITTEN counts the words acknowledged by memory. An error response
  sets bit 1 of DMA_STATUS.

The engine handles one burst at a time: gather the words, send the address, send
the beats, wait for the response.

## Example: a snake scan

Two encoders give the X and Y positions of a raster scan. The detector must fire at
X = 100 and X = 200 on the forward leg, and at X = 150 on the way back. Register
writes (page, instance, register = value):

```
SEQ1   (11,0,4)=1  (11,0,5)=2                 POSA = encoder 1, POSB = encoder 2
SEQ1   (11,0,7)=1  (11,0,8)=0                 one pass; empty the table
SEQ1   (11,0,9) <= 3 frames: POSA>=100, POSA>=200, POSA<=150, each OUT1=OUTA for 5 clocks
LVDSOUT1 (4,0,0)=51                           VAL = SEQ1 OUTA
PCAP   (12,0,1)=51 (12,0,2)=51                GATE = TRIG = SEQ1 OUTA
PCAP   (12,0,9)=base (12,0,10)=size (12,0,11)=1   DMA buffer; start the DMA
PCAP   (12,0,5)=0x6 (12,0,6)=0x2 (12,0,3)=1   capture encoders 1, 2 and bits 63:32; ARM
PCAP   (12,0,0)=1                             ENABLE = ONE
SEQ1   (11,0,0)=1                             ENABLE = ONE: start
```

`tb/tb_panda_top.sv` runs exactly this at the default sizes, with a memory model on
the DMA port. Writing DISARM ends the acquisition. The DMA then flushes the 12 words
(3 samples × 4 words) as one burst. The testbench checks that the samples hold
encoder-1 positions within one count of 100, 200 and 150, the matching encoder-2 row,
and OUTA high in the captured bits.

## What follows the framework and what is this design's own

These follow the framework as published:

- the block architecture: shared bit, position and CSR buses, a mux on every input,
  and an AXI slave from the processor;
- the bus sizes (128 lines; 32 × 32 bits);
- the CSR map (32 pages × 16 instances × 64 registers of 32 bits);
- the front-panel counts (6 TTL in, 10 TTL out, 2 LVDS in, 2 LVDS out, 4 encoders);
- the list of soft blocks (5-input LUT, set/reset gate, divider, pulse generator,
  sequencer);
- the port names of the encoder, sequencer and capture blocks;
- capture of both buses and their transfer to processor memory by DMA.

These are this design's own choices:

- each block's insides, register layout and timing;
- the page numbers and the line allocation;
- the soft-block instance counts;
- the sequencer frame format and trigger codes;
- the capture sample format, masks, FIFO and overflow rule;
- the DMA engine's burst size, linear buffer and flush rule;
- the registered buses and muxes;
- the bus read-back page;
- the AXI4-Lite protocol subset;
- synchronous active-low reset.

Not built:

- absolute encoder protocols (SSI, BiSS-C);
- the SPI link to the auxiliary I/O FPGA on the carrier;
- the multi-gigabit SFP links and FMC application blocks;
- the block-generation tooling. Here one parameterised `fb_regs` plays the role of the
  generated per-block control module, and `panda_top` is written by hand.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/panda_pkg.sv tb/tb_panda_top.sv --top-module tb_panda_top
./obj_dir/Vtb_panda_top
```

Replace `tb_panda_top` with any other testbench in `tb/`: `tb_seq`, `tb_pcap`,
`tb_pcap_dma`, `tb_csr_axi_slave`, `tb_fb_regs`, `tb_inenc`, `tb_outenc`, `tb_lut`, `tb_srgate`,
`tb_div`, `tb_pulse`, `tb_bit_mux`, `tb_pos_mux`, `tb_sync_in`. The package must come
first; `-y rtl` finds the modules by file name. All testbenches reset every register
that is read, so they pass with random initial values (`+verilator+rand+reset+2`).
`tb_panda_top` uses the top at its default sizes and finishes in well under a second.

To change the configuration, override the `N_*` counts, `SEQ_DEPTH` or
`PCAP_FIFO_DEPTH`/`PCAP_DMA_BURST` on `panda_top`. The line allocation follows the counts. A new block
type needs:

- a core module;
- an `fb_regs` instance on a free page;
- `bit_mux`/`pos_mux` instances for its inputs;
- lines in the bus assembly at the end of `panda_top`.

## Files

- `rtl/panda_pkg.sv`: bus sizes, CSR map, request struct, page numbers and sequencer
  trigger codes.
- `rtl/panda_top.sv`: the top.
- `rtl/csr_axi_slave.sv`, `rtl/fb_regs.sv`: the register path.
- `rtl/bit_mux.sv`, `rtl/pos_mux.sv`: the input multiplexers.
- `rtl/sync_in.sv`, `rtl/inenc.sv`, `rtl/outenc.sv`: I/O blocks.
- `rtl/lut.sv`, `rtl/srgate.sv`, `rtl/div.sv`, `rtl/pulse.sv`, `rtl/seq.sv`: soft blocks.
- `rtl/pcap.sv`, `rtl/sync_fifo.sv`, `rtl/pcap_dma.sv`: capture and its DMA.
- `tb/tb_*.sv`: one self-checking testbench per module, plus `tb_panda_top`.
