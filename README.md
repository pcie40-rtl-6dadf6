# PCIe40 DMA streams: FPGA-to-host data acquisition over PCIe

## Design idea

The PCIe40 board sends detector data from its FPGA to a host computer over PCIe.
It has two Gen3 x8 interfaces, about 56 Gbit/s each.

The firmware offers one building block for this: the **DMA stream**. User logic
pushes a stream of 32-byte words into it. The data then appears in a large
circular buffer in host memory. Software reads the buffer using two offsets:

- the **write offset**, which the stream advances to say "data is valid up to
  here";
- the **read offset**, which software hands back to say "I am done up to here".

Everything in between is hidden inside the stream. That includes cutting the
data into PCIe memory-write packets (TLPs), translating buffer offsets to
physical addresses, and flow control against the free space in the host
buffer.

A stream can also understand what it carries:

- In **packet mode** it keeps the stream parseable when backpressure damages
  it. Cut packets are repaired and lost packets are replaced.
- In **block mode** it also rewrites the data into a denser form, the
  multiple-fragment packet (**MFP**). Fragments are packed on 16-byte instead of
  32-byte boundaries. The per-fragment event ID, type and size move into one
  header per block of fragments, and that header is built in the FPGA.

The header and the data are written by two separate DMA engines ("descriptor
groups") into the same host buffer at the same time. Keeping the write offset
correct across the two is the central problem of this design. It has its own
section below.

All streams of one PCIe interface sit in a **DMA controller**. Which streams
exist depends on the firmware **flavor**. The top level, `pcie40_top`, holds one
controller per interface.

## Block map

```
 in[k][s] port, or tdet_fragment_builder for stream 0 (tdet_sel)
      |  frag_t beats: 256-bit data, sop, eop, EVID, TYPE, SIZE
      v
 dma_stream_daq ----------------------------------------------------------+
 |  truncation_comp   (packet mode)                                        |
 |  throttle_comp     (packet and block mode)                              |
 |     |--- byte / packet mode --------------------------+                 |
 |     `--- block mode: dma_stream_mfp                   |                 |
 |            frag_realign (16-byte units)  --> data ----+--> dma_writer   |
 |            mfp_meta     (MFP header)     --> header ----> dma_writer   |
 |                                               (MAIN group)  (META group)|
 |          addr_map (virtual memory map, one port per group)              |
 |          tx_arbiter (MAIN / META TLPs)                                  |
 +-------------------------------------------------------------------------+
      |  TLP beats
 dma_controller: the flavor's streams + tx_arbiter  ->  one TX port per interface
 pcie40_top: NIF = 2 controllers
```

Each file in `rtl/` holds one module or package. `pcie40_pkg` holds the shared
types:

- `frag_t`: one input beat;
- `wr_word_t`: a word with its linear buffer address;
- `tlp_t`: one TLP beat;
- the mode and flavor enumerations;
- the MFP header length function.

## Stream operating modes

The `mode` input selects the mode. It should only change while the stream is
idle.

- **Byte mode.** Words are written to the buffer in order. sop, eop and the
  other side-band fields are ignored. The write offset follows the words
  written.
- **Packet mode.** Each packet runs from a sop beat to an eop beat. The sop
  beat carries a 64-bit EVID (event ID), an 8-bit TYPE and a 16-bit SIZE in
  bytes. A packet takes ceil(SIZE/32) words. Two corrections apply, described
  next.
- **Block mode.** Packets are collected into MFPs, using throttle
  compensation, realignment and metadata packing.

### Truncation compensation (packet mode)

Upstream logic that meets backpressure may cut a packet short. It may end the
packet early with eop, or start the next packet before this one ended. A host
parser that walks the buffer by SIZE would then lose its place.

`truncation_comp` forces every packet to be exactly ceil(SIZE/32) words long:

- a packet that is too short is padded with zero words;
- words beyond SIZE are dropped, and eop is moved to the last allowed word;
- stray words outside a packet are dropped.

It adds no latency: it is combinational, plus one cycle per pad word.

### Throttle compensation (packet and block mode)

When backpressure makes upstream logic drop whole packets, their EVIDs are
missing from the sequence. `throttle_comp` inserts one **empty packet** for
each missing EVID. An empty packet is a single word, `{EVID, 192 zero bits}`,
with SIZE 0 and TYPE 0. The host then always sees EVID(t+1) = EVID(t) + 1.

Two cases are treated as a resynchronisation instead, and counted:

- a hole larger than `MAX_GAP` (4096);
- an EVID that goes backwards.

The first packet after reset only sets the expected EVID.

### Fragment realignment (block mode)

`frag_realign` cuts each fragment into 16-byte units, taking the low half of
each 32-byte word first. A new fragment starts on the next unit boundary.

A 154-byte fragment therefore takes 160 bytes instead of 192. Block mode does
not use truncation compensation, so this block also fits each fragment to
ceil(SIZE/16) units itself.

### Metadata packing: the MFP (block mode)

An MFP holds `pack_n` consecutive fragments (1..NMAX, default maximum 8192).
It starts with a header. All header fields are little-endian:

| bytes | field | content |
|-------|-------|---------|
| 0-1 | magic | 0xCE, 0x40 |
| 2-3 | NFRAGS | number of fragments |
| 4-7 | PSIZE | bytes of the whole MFP, header included |
| 8-15 | EVID | EVID of the first fragment |
| 16-17 | SRCID | source ID (configuration input) |
| 18 | ALIGN | 4: fragments aligned to 2^4 = 16 bytes |
| 19 | FVERSION | data format version (configuration input) |
| 20.. | FTYPE[n] | 1 byte per fragment, padded to a multiple of 4 bytes |
| .. | FSIZE[n] | 2 bytes per fragment |
| .. | padding | to a multiple of 16 bytes |

- The header is H = roundup16(20 + roundup4(N) + 2N) bytes long.
- The realigned fragments follow the header.
- The MFP is padded so that PSIZE is a multiple of 32 bytes. The next MFP
  therefore starts on a word boundary.
- A reader finds fragment k in constant time: it sums the rounded FSIZE
  entries.

`mfp_meta` holds the FTYPE/FSIZE tables for two blocks (double-buffered), so
the next block can fill one bank while the other is serialised. It outputs the
header one 32-byte word at a time, building one 4-byte word of it per clock
cycle.

## Two descriptor groups, one buffer

In block mode two DMA engines write into the MAIN buffer:

- the **MAIN** descriptor group writes the realigned fragment data;
- the **META** descriptor group writes the headers. META owns no host memory
  of its own.

Because the header size depends only on `pack_n`, `dma_stream_mfp` knows
where each block's data starts before the header exists:

1. A block begins at byte offset B. MAIN writes the data from B + H onward.
   The first data word carries a jump flag, so the writer does not merge it
   with anything earlier.
2. When the block closes, the header is serialised and META writes it at B.
   A block closes only after `pack_n` fragments. A partly filled block waits
   for more input; there is no idle close.
3. If H is an odd number of 16-byte units, the block's first data unit shares
   a word with the end of the header. That unit is held back and sent by META
   inside the last header word. MAIN and META therefore never write the same
   word.

The two groups finish at different times. So `dma_stream_mfp` keeps a small
queue of closed blocks, each recording where it ends in MAIN words and in META
words. The write offset (`wr_off`) moves to the end of a block only when both
groups' counts of words actually sent have passed that block's record. The
host therefore never sees a block whose header or data is still in flight.

The free-space check against the read offset is made by MAIN only. MAIN also
reserves the header area, so it covers both groups.

## TLPs, descriptors and the virtual memory map

`dma_writer` is one descriptor group. It has:

- an FPGA buffer (`fpga_buffer`: 1024 words = 32 KiB for MAIN, 128 words =
  4 KiB for ODIN) that stores each word together with its linear word address;
- a TLP cutter;
- a flow-control check.

Rules for cutting TLPs:

- A TLP carries 1 to 8 words (at most 256 bytes of payload).
- It never crosses a 256-byte boundary of the linear buffer.
- It only holds words at consecutive addresses. The writer looks ahead in its
  buffer to check this.
- A partly filled TLP is sent once the buffer has been idle for
  `FLUSH_TIMEOUT` cycles.
- Before a TLP is sent, the writer checks that writing it keeps at least
  32 bytes free ahead of the read offset. If not, it waits for software.

The host buffer is built from physically separate 4 MiB blocks (the largest a
kernel allocation gives). `addr_map` is a table, written by software, giving
each block's physical base address. It turns linear offsets into physical
addresses. The writer translates once per 8 KiB descriptor and reuses the
result for every TLP inside it. Host blocks must therefore be at least 8 KiB;
elaboration stops with an error otherwise. Rewriting the table forces a fresh
lookup.

`tx_arbiter` merges TLPs round robin. It holds the grant from a TLP's sop beat
to its eop beat. It is used twice:

- inside a stream, for MAIN and META;
- in the controller, across streams.

## DMA controller and flavors

`dma_controller` builds the streams of its `FLAVOR` for one PCIe interface:

| flavor | streams per interface | host buffer |
|--------|-----------------------|-------------|
| TELL40 (default) | 1 MAIN | 4 GiB |
| MINIDAQ | MAIN + ODIN | 4 GiB + 1 GiB |
| ODIN | ODIN0..ODIN4 | 1 GiB each |
| NONE | none | - |

- The port arrays always have 5 stream slots, so every flavor has the same
  port list. Unused slots read zero. Synthesis of the default flavor therefore
  reports many constant outputs.
- The META group and the MFP logic are attached to stream 0.
- `map_sel`/`map_idx`/`map_base` program one stream's address map.

`pcie40_top` holds `NIF` = 2 controllers, each with a TDET fragment builder
in front of stream 0. Its ports are indexed `[interface][stream]`. Each
interface has one TLP output, which would feed a PCIe hard IP.

## Example front end: the TDET fragment builder

`tdet_fragment_builder` is user logic that sits in front of a stream.
`pcie40_top` holds one per interface. Setting `tdet_sel[k]` makes it the
source of stream 0 instead of the `in[k][0]` port. For each bunch crossing it:

1. takes one frame from each of 12 fibers (12-bit BXID plus 100 payload bits),
   using a small FIFO per fiber;
2. waits until all fibers show the same BXID, dropping frames that are behind;
3. concatenates the 1200 bits behind a 32-bit header;
4. sends the fragment in one of two layouts.

The two layouts:

- **Packet layout.** The EVID is added at the top of word 0, for 162 bytes in
  6 words. This is the layout the packet mode and throttle compensation
  expect.
- **Block layout.** There is no EVID, for 154 bytes in 5 words.

If the next crossing is ready before the current fragment has gone out, the
current one gives way:

- if some of its words were already accepted, it is cut, and truncation
  compensation later pads it;
- otherwise it is dropped, and throttle compensation later fills its EVID.

## Parameters (defaults)

| parameter | default | meaning |
|-----------|---------|---------|
| MAIN_DEPTH / ODIN_DEPTH | 1024 / 128 words | FPGA buffer, 32 KiB / 4 KiB |
| MAIN_HOST_LOG2 / ODIN_HOST_LOG2 | 32 / 30 | host buffer, 4 GiB / 1 GiB |
| BLOCK_LOG2 | 22 | host memory block, 4 MiB |
| NMAX | 8192 | largest packing factor (2^13) |
| NIF | 2 | PCIe interfaces |
| MAX_GAP | 4096 | largest EVID hole that is filled (own choice) |
| FLUSH_TIMEOUT | 64 cycles | partial-TLP flush (own choice) |
| META_DEPTH | 64 words | META group buffer (own choice) |

Interface timing:

- Every block uses valid/ready handshakes on one clock, with an active-low
  asynchronous reset.
- A stream moves at most one 32-byte word per cycle. 56 Gbit/s therefore
  needs a clock of about 220 MHz.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- uses `$urandom` stimulus with random stalls.

`tb/host_consumer.sv` is a behavioural host:

- it accepts TLPs into a sparse memory, with the host blocks at scattered
  physical addresses;
- it parses the buffer up to `wr_off`, as raw words, packets or MFPs;
- it compares the contents against what the test sent;
- it returns `rd_off` after a delay.

The larger testbenches:

- **`tb_pcie40_top`** runs both interfaces with reduced sizes. One is in
  packet mode with cut and lost packets, the other in block mode with
  wrap-around of the host buffer. A last phase switches both interfaces'
  stream 0 to their TDET builders, in packet and in block layout. The test fails if any mechanism was never exercised.
- **`tb_dma_controller`** and **`tb_dma_controller_odin`** run one
  controller in the MINIDAQ flavor (MAIN and ODIN) and in the ODIN flavor
  (five streams, stream 0 in block mode). Each checks every stream's buffer
  and the sharing of the TX port.
- **`tb_pcie40_full`** runs the top at its default sizes. Interface 0 sends
  1000 packets of 192 bytes, with one lost and one cut packet. Interface 1
  sends MFPs of 3564 fragments of 154 bytes.

To run one testbench with verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/pcie40_pkg.sv tb/tb_host_pkg.sv tb/tb_pcie40_full.sv --top-module tb_pcie40_full
./obj_dir/Vtb_pcie40_full +verilator+rand+reset+2
```

## Differences from the described firmware, and own choices

- **One clock domain.** The described firmware crosses clock domains between
  the streams and the PCIe core. Here everything runs on one clock. Only the
  synchronisation between the two descriptor groups is modelled.
- **No hard IP, BARs or driver.** The PCIe hard IP, the control-system BARs,
  the RBAR, the reverse-direction stream and the host driver are not built.
  TLP beats leave at the top, and the offsets and the address-map table are
  plain ports.
- **Word input.** Inputs are 32-byte words, not arbitrary bytes. Byte mode
  writes whole words.
- **Undescribed details are my own choices.** These include:
  - the empty-packet format and the resynchronisation rule;
  - where the magic and padding sit in the MFP header;
  - PSIZE being rounded to 32 bytes;
  - carrying the first data unit in the last header word;
  - the block-commit queue;
  - the flush timeout;
  - the 32-byte space margin;
  - the per-descriptor translation;
  - the TDET header content and alignment rule.
- **Byte order of block-layout fragments.** Fragments in the block layout
  follow the little-endian byte order of the MFP. Packet-layout fragments
  keep EVID in bits 255:192 of word 0, as in the described fragment picture.
- **Unit shares a word.** A 16-byte unit can share a 32-byte word with
  another fragment only in block mode.
- **Lint warnings.** The remaining lint warnings are package constants that a
  given module does not use, and unused bits of wide counters and indices.
