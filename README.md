# An SSD on a DDR memory port

This is synthesizable SystemVerilog for a solid-state disk that plugs into a PC's
**DDR DRAM channel** instead of a SATA link. It also contains the **DMA engine in the
North Bridge DRAM controller** that moves data between main memory and that SSD. The
architecture follows the letter "Solid-State Disk with Double Data Rate DRAM Interface
for High-Performance PCs" (IEICE Trans. Inf. & Syst., 2009). The RTL, its interfaces and
every choice the letter leaves open belong to this implementation.

In a conventional PC an SSD hangs off the South Bridge. Every transfer crosses both
bridges and is capped by the link: 300 MB/s for SATA2, against 6400 MB/s for a
DDR2-800 x64 channel. Putting the SSD on a memory channel removes the South Bridge from
the path and gives the SSD DRAM-class bandwidth. Two things stand in the way:

1. **A DRAM answers a read after a fixed CAS latency. An SSD cannot.** A read that hits
   the SSD's cache buffer can be answered at once. A read that misses must first fetch
   a page from NAND flash, which takes thousands of cycles. The fix is to let the
   **data strobe DQS carry the timing**. After RD the SSD leaves DQS undriven until the
   burst is really available. Only then does it drive the DQS preamble and toggle DQS
   with the data. The host does not count cycles from RD; it waits for the strobe.
2. **Transfers must be cut into DRAM bursts instead of disk sectors.** The DMA divides
   each region's byte count by the burst size (burst length x 8 bytes), just as a SATA
   DMA divides by the sector size.

## Block structure

```
            CPU (testbench)                         main memory (model)
                |  DMA command / done                     ^  req/gnt/rvalid
                v                                         |
   +----------------------- nb_ssd_dma ------------------------------+
   |  PRD fetch, size -> bursts, A/B/C/D/E sequencing, read-ahead    |
   |  dqs_drive (write data)            dqs_capture (read data)      |
   +-------|-------------------------------^-------------------------+
           | cmd/addr, DQ+DQS (host->SSD)  | DQ+DQS (SSD->host), irq
   +-------v-------------------------------|--------- ssd_controller -+
   |  ssd_ddr_if: ACT/RD/WR decode, dqs_capture (writes),            |
   |              dqs_drive (reads, started only when data exist)    |
   |        | burst requests                                         |
   |  ssd_cache: direct-mapped page buffer (ssd_cache_mem),          |
   |             fill on miss, program on completed page             |
   |        | page read / program                                    |
   |  nand_flash_if: 4 channels, page striping  ---> NAND flash (4x) |
   |  ssd_sram (processor working memory)       <--- processor port  |
   +-----------------------------------------------------------------+
```

`ddr_ssd_system` is the top. It contains `nb_ssd_dma` and `ssd_controller`, connected by
the internal DDR bus. Main memory, the CPU, the NAND devices and the SSD's processor are
outside the top, and their signals are its ports.

## The DDR bus and the DQS handshake

This is the core of the design and the part that departs from a normal DRAM.

**Beat-rate model.** The bus is modelled at beat rate. One `clk` cycle is one half
period of the DDR clock, so one `clk` cycle carries one data beat, and DQS changes level
every cycle while data move. At DDR2-800, `clk` corresponds to 800 MHz. The real
double-rate pads and DQS delay lines are analog and are not part of this RTL. DQ and DQS
are split into one wire set per direction, each strobe with an output enable (`dqs_oe`),
instead of bidirectional pins.

**Addressing.** The SSD is addressed like a DRAM device:

| DDR field | SSD meaning |
|---|---|
| `ACT` + row address | SSD page number (2 KB page) |
| `RD`/`WR` + column address | first 64-bit beat of the burst in that page |
| burst | `BL` = 4 beats = 32 bytes |

Commands use the JEDEC `{RAS#, CAS#, WE#}` encoding (`ssd_pkg::ddr_cmd_e`). An SSD
byte address splits into row = `addr[26:11]`, column = `addr[10:3]`.

**Burst on the wire** (`dqs_drive`, used on both sides):

```
cycle     s   s+1  s+2  s+3  s+4  s+5  s+6  s+7
dqs_oe    0    1    1    1    1    1    1    1    0
dqs       -    0    0    1    0    1    0    0    -
dq        -    -    -   D0   D1   D2   D3    -    -
              |preamble|<----- 4 beats ----->|post
```

`start` is taken in cycle s-1. Beat i goes out with DQS = 1 for even i and 0 for odd i,
so every beat starts with a DQS edge. The receiver (`dqs_capture`) takes one beat on
every change of DQS while `dqs_oe` is high, treating the undriven strobe as low. Its
`valid` pulses one cycle after the last beat.

**Read.** The host sends `ACT` (only when the page changes), then `RD`. The SSD passes
the burst request to its cache buffer and keeps DQS undriven.

- On a cache hit the burst comes back after about 6 cycles.
- On a miss the whole page is first read from flash. That is the flash array time plus
  2048 byte transfers on the channel.

Either way, `dqs_drive` starts when the data arrive, and the first beat appears
`PREAMBLE + 1` = 3 cycles after the cache buffer returns the burst. The host's
`dqs_capture` simply waits. Nothing in the protocol depends on how long that takes.

**Write.** This is ordinary DDR. After `WR` the host drives the preamble and the burst
with its own DQS, starting the next cycle. The SSD captures it and writes it into the
cache buffer.

**One burst at a time.** The host keeps at most one RD or WR outstanding. An assertion
in `ssd_ddr_if` checks this.

**irq.** `irq` rises when the SSD has programmed a page into flash. It falls with the
host's next `ACT`, `RD` or `WR`.

## The DMA (`nb_ssd_dma`)

The CPU gives one command:

- the direction (`cmd_dir`);
- the SSD byte address;
- the main-memory address of a Physical Region Descriptor (PRD) table.

Each PRD entry is one 64-bit word:

| bits | field |
|---|---|
| 31:0 | memory base address of the region |
| 47:32 | byte count; 0 means 64 KB |
| 63 | end of table |

This is the layout used by IDE bus-master DMA. The number of bursts in a region is
`bytes / (BL*8)`, computed by `ssd_pkg::bursts_of`.

The DMA works burst by burst. It reports on `op` which sub-operation is under way:

| op | meaning |
|---|---|
| A | command taken from the CPU |
| B | PRD entry fetched from main memory |
| C | SSD internal transfer (cache buffer or flash) |
| D | transfer over the DDR interface |
| E | main-memory access |

- **Read (SSD to memory), A C D B E ...** `RD` goes to the SSD and the DMA waits
  through C until the SSD's strobe starts, then captures the burst (D). If the
  current region is used up, it fetches the next PRD entry (B). Then it writes the
  4 words to memory (E). The SSD start address is known from the command, so the
  data can be requested before the memory destination is known.
- **Reads are pipelined.** A small issue state machine sends `ACT`/`RD` on its own.
  As soon as a burst has been moved out of the capture register, the `RD` for the
  next burst goes out. The SSD then looks up and sends that burst while the previous
  one is written to memory. There is never more than one burst in flight at the SSD,
  and the capture register is never overwritten before it is read (assertion
  `a_cap_free`). The issue side knows a next burst exists if the PRD entries read so
  far have bursts left, or if the last entry read is not the end of the table.
- **Write (memory to SSD), A B E D C ...** The DMA fetches a PRD entry if needed (B),
  reads 4 words from memory (E) and sends `WR` plus the burst (D). After the last
  burst of each SSD page it waits for the SSD's `irq` (C). This makes writes strictly
  sequential: the next page leaves memory only after the previous one is in flash.
  That is how the design guards against losing data written to a bad block.

`done` pulses after the region marked end-of-table.

The memory port holds `mem_req` until `mem_gnt`. Read data return later with
`mem_rvalid`, and one read is outstanding at a time.

## Inside the SSD

**Cache buffer (`ssd_cache`, `ssd_cache_mem`)**
- Direct mapped, one 2 KB page per line, 32 lines (64 KB). A 64 KB transfer therefore
  fits entirely.
- A read miss takes the line over, reads the whole page from flash into it, then serves
  the burst.
- Writes assume whole pages. The line is taken over without a fetch, and each burst is
  written into it. When the page's last burst arrives, the page is programmed into
  flash and `prog_done` is raised.
- The buffer is write-through, so it never holds dirty data and eviction is free.
- `cache_hit` and `cache_miss` pulse once per read burst.
- The letter's SSD keeps this buffer in an external DRAM chip. Here it is an on-chip
  array with one port, which is enough because requests are served one at a time.

**NAND flash interface (`nand_flash_if`)**
- Pages are striped over 4 channels: channel = page mod 4, flash row = page / 4.
- Each channel is a byte-wide synchronous bus (`ssd_pkg::nand_out_t` / `nand_in_t`)
  with active-high `cle`, `ale`, `we` and `re`, plus `rb` (ready/busy). The flash
  returns a byte one cycle after `re`.
- Page read: `00h`, 2 column bytes, 3 row bytes, `30h`, wait for `rb`, then 2048
  `re` strobes. Bytes are packed lowest first into 64-bit words.
- Page program: `80h`, 5 address bytes, 2048 data bytes fetched word by word from the
  buffer, `10h`, wait for `rb`.
- One page operation runs at a time. Several dies per channel ("ways") are not modelled.

**SRAM (`ssd_sram`)**
- 16 K x 32-bit working memory with byte enables for the SSD's processor.
- The processor and its flash translation firmware are not part of this RTL, so the
  SRAM's port is a port of the top.
- Without that firmware the SSD maps host pages one to one onto flash pages. There is
  no wear levelling and no bad-block remapping.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `DQ_W` | 64 | x64 DDR channel |
| `BL` | 4 | burst length 4 (8 is the other DDR option) |
| `PAGE_BYTES` | 2048 | this implementation |
| `CACHE_LINES` | 32 | this implementation (64 KB, one full transfer) |
| `CHANNELS` | 4 | this implementation |
| `ROW_W`, `ADDR_W` | 16 | this implementation (65536 pages = 128 MB addressable) |
| `PREAMBLE` | 2 | this implementation (one DDR clock) |
| `SRAM_WORDS` | 16384 | this implementation |

`BL`, `DQ_W`, `PAGE_BYTES` and the channel count should be powers of two.

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`.
Compile the two packages first and let verilator find the other modules by name:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ssd_pkg.sv tb/ssd_tb_pkg.sv -y rtl -y tb +libext+.sv \
  tb/tb_ddr_ssd_system.sv --top-module tb_ddr_ssd_system -Mdir obj
obj/Vtb_ddr_ssd_system
```

Use the same command with another testbench for the other blocks:

| testbench | what it checks |
|---|---|
| `tb_dqs_drive`, `tb_dqs_capture` | burst waveform cycle by cycle; reception after random preambles and with noise on an undriven strobe |
| `tb_ssd_ddr_if` | read strobe withheld for 0-300 cycles, then exact preamble and beat timing; write capture; irq |
| `tb_ssd_cache` | hit and miss data and latency, eviction, whole-page write and program |
| `tb_nand_flash_if` | page reads and programs on four flash models, channel striping |
| `tb_ssd_controller` | the whole SSD from its DDR pins |
| `tb_nb_ssd_dma` | multi-region PRD tables, sub-operation order, a 64 KB region (count 0), irq waits |
| `tb_ssd_cache_mem`, `tb_ssd_sram` | memories against reference copies |
| `tb_ddr_ssd_system` | end to end, all parameters at their defaults (below) |
| `tb_ddr_ssd_system_mix` | 120 random reads and writes of 1-4 pages (52% writes), every word checked against a reference copy of the SSD, including pages written, evicted and read back from flash |
| `tb_ddr_ssd_system_bl8` | end to end with burst length 8: burst counts are byte count / 64, data of reads, writes and read-back |

The end-to-end test uses the two behavioural models in `tb/`:

- `nand_flash_model`: unwritten flash holds a pattern computed from page and offset.
- `main_memory_model`: random grant delay.

The test runs these transfers, each a 64 KB DMA:

1. a cold read, where every page misses;
2. the same read again, where every burst hits;
3. a write, page by page with irq waits;
4. a read-back through two PRD regions;
5. a read that evicts a written page, then a reread of that page from flash.

It checks every word and counts each mechanism: hits, misses, late DQS, PRD fetches,
row activations, irq waits, evictions, and read bursts requested while the previous
burst was still going to memory. It fails if any mechanism never happened. The
flash timings in the model are shortened (array read 1000 cycles, program 4000 cycles).
The whole run takes a few seconds. It printed:

| transfer (64 KB) | cycles |
|---|---|
| read, all miss | ~135,000 |
| read, all hit | ~37,000 |
| write | ~266,000 |

## How far to trust it, and where it departs

- **Built as described:**
  - the DQS-gated read with any latency;
  - burst-based size conversion;
  - the A-C-D-B-E and A-B-E-D-C orders;
  - strictly sequential writes and pipelined reads;
  - a cache buffer whose hits and misses change only the strobe timing.
- **Choices the letter leaves open:** every item in the Parameters table except `DQ_W`
  and `BL`, and all of the following:
  - the beat-rate bus model, the command encoding and the addressing;
  - the PRD layout and the memory port;
  - the cache organisation and policy;
  - the NAND command set.

  Each module's opening comment says which parts of it are which.
- **Not built:**
  - the SSD's processor and firmware;
  - flash ways;
  - bad-block handling;
  - the DDR pads;
  - the main-memory side of the DRAM controller.
- **Throughput.** A cache-hit read moves about 1.8 bytes per cycle, about 1.4 GB/s at
  800 MHz. The letter reports about 3.2 GB/s used on a 6.4 GB/s channel.
  - *Cause:* only one burst is in flight at the SSD. Each burst still costs the `RD`,
    the buffer lookup, the preamble, 4 beats and the postamble, and the next `RD`
    waits until the burst has been captured.
  - *Fix:* allowing several outstanding bursts (a queue of `RD`s in `ssd_ddr_if`)
    would close most of the gap. The protocol would stay the
    same.
- **Writes must cover whole SSD pages.** A partial-page write is taken into the buffer
  but never programmed and leaves the line partly stale.
