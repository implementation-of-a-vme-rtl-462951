# VME64 to IBUS bridge

This core connects a VME64 backplane to IBUS, a small synchronous burst bus
inside a board. The bridge is both master and slave on each side:

- A VME master can reach IBUS memory through an A32 window.
- An IBUS master can reach VME boards through a 16-Mbyte window.
- A DMA engine moves blocks in either direction.
- Interrupts cross in both directions.
- When the board sits in slot 1, the bridge also acts as VME system controller.

The central difficulty is that the two buses do not match:

| | VME | IBUS |
|---|---|---|
| Timing | asynchronous handshakes | synchronous |
| Data widths | bytes, half words, words, 64-bit beats | whole 32-bit words only |
| Transfer shape | single cycles and blocks | bursts of 16 words |

The bridge bridges that gap with one 16-word buffer. It uses the buffer as a FIFO for streaming and as a cache line for reads.

Everything is in `rtl/`. The top module is `vme_ibus_bridge`. The testbenches are in `tb/`.

## IBUS

IBUS has 32 multiplexed address/data lines and four control lines:

| Line | Meaning |
|---|---|
| `FRAME` | the master holds the bus |
| `RNW` | read, not write |
| `ACK` | the slave is ready for a burst |
| `VALID` | the word on AD is valid |

A transfer has four phases:

1. **Addressing** takes at least 4 cycles.
   - Cycle 0: the master drives FRAME and the word address.
   - Cycle 1: the slave decodes the address.
   - Cycle 2: the slave raises ACK.
   - Cycle 3: the bus turns round.
2. **Data.** Each cycle in which the sender (master on writes, slave on reads) drives VALID carries one word. A burst is 16 words.
3. **Handshake.** After the 16th word the slave drops ACK and raises it again when it can take or give another burst. This takes at least 2 cycles, so the peak rate is 16/18 ≈ 89 % of one word per cycle.
4. **Release.** The master drops FRAME and leaves at least 2 idle cycles.

Slave ranges are circular: a transfer that runs past the end of a slave's range continues at its start. A bus controller (`ibus_arbiter`) gives the bus to one master at a time, using a request/grant pair per master.

- Requester 0 is the bridge's own master.
- Requester 1 is one outside master.

The cycle counts above are fixed by the bus definition. The mapping onto four named lines and the request/grant wires are this design's own choices.

`ibus_master` and `ibus_slave` implement the two ends. The IBUS master gives up when no ACK comes within `ACK_TIMEOUT` (32) cycles and reports an error.

## Clocking

The VME state machines run at twice the IBUS rate, so that VME strobe delays can be set in half IBUS periods. The bridge has one clock, `clk`, at the fast rate. IBUS-facing logic advances only on edges where `ibus_ce` is high, which is every second edge, aligned with the IBUS clock.

A board can instead supply two edge-aligned clocks. The single-clock form was chosen here because the whole design then shares one clock domain. Seen from IBUS, the cycle counts are the same.

The VME inputs are asynchronous. AS*, DS*, DTACK*, BERR*, IACKIN*, the bus grants and the IRQ lines each pass a two-flop synchroniser.

## Data paths and the shared buffer

Several clients use the buffer and masters:

| Client | Direction | What it does |
|---|---|---|
| `v2i_engine` | VME → IBUS | accesses by VME masters in the A32 window |
| `i2v_ctrl` | IBUS → VME | accesses by IBUS masters in the VME window |
| `dma_ctrl` | either | block moves started from a register |
| `irq_manager` (handler part) | VME → IBUS | IACK cycles to fetch VME status/ID words |

They share one `bridge_fifo` (16 × 32 bits, with a second random-access read port), one `ibus_master` and one `vme_master`. The top lends this set to one client at a time, in priority order: interrupt handler, V2I, I2V, DMA. A client raises `need`, works while it holds `own`, and keeps the set until it drops `need`.

### VME to IBUS (`v2i_engine`)

- **Posted writes.** Full 32-bit writes are acknowledged on the VME bus at once and pushed into the FIFO. The FIFO goes out as one IBUS burst in any of these cases:
  - it holds 16 words;
  - the next write is not at the next address;
  - an access of another kind arrives;
  - the VME cycle ends.

  An IBUS error on a posted write can only be reported afterwards. It sets STATUS bit 0.
- **Reads.** A read loads a cache line into the FIFO and answers from the random-access port.
  - In a block transfer the line is the 16 aligned words around the address.
  - A single read loads just that word.

  Later reads inside the line do not touch IBUS. The line is dropped at the end of the VME cycle and on any write.
- **Narrow writes.** A write of fewer than 4 bytes is read-merge-write. The bridge reads the IBUS word, replaces the written bytes and writes the word back before it raises DTACK*. D8, D16 and unaligned transfers need this because IBUS only moves whole words.

### IBUS to VME (`i2v_ctrl`, `addr_xlate_i2v`)

The IBUS window is 4 Mwords (16 Mbytes). Its base is set by I2VWIN[31:22]. IBUS address bits 21:18 pick one of 16 capability entries. Each entry describes one VME slave of 1 Mbyte:

| Bits | Field |
|---|---|
| [31:20] | VME address bits 31:20 |
| [19:14] | address modifier |
| [13:12] | widest data width (D8/D16/D32/D64) |
| [11] | slave accepts BLT |
| [10] | slave accepts MBLT |

The VME byte address is `{vbase, ibus_word[17:0], 2'b00}`.

- **Writes** are collected in the FIFO and sent as one VME cycle per IBUS burst. The cycle type depends on the entry:
  - MBLT if the entry allows it and the word count is even;
  - otherwise BLT if the entry allows it;
  - otherwise single cycles at the entry's width.
- **Reads** are fetched ahead: the VME master reads up to 16 words into the FIFO and the IBUS slave streams them out. When the IBUS master drops FRAME, the read-ahead stops at the next word boundary and the surplus is discarded.

IBUS has no error line. If the VME side ends a read with BERR*, the bridge completes the IBUS burst with all-ones words and sets STATUS bit 1.

The VME master (`vme_master`) issues these cycles:

- A16, A24 and A32 addresses;
- D8, D16 and D32 single cycles;
- BLT and MBLT blocks;
- IACK cycles.

It re-sends the address when a BLT crosses a 256-byte boundary and when an MBLT crosses a 2-kbyte boundary. It does not issue unaligned or read-modify-write cycles.

The VME slave (`vme_slave`) answers all of these:

- D8(EO), D8(O), D16 and D32 singles;
- their BLT forms;
- MBLT;
- unaligned transfers;
- RMW.

### DMA (`dma_ctrl`)

DMA_VADDR, DMA_IADDR and DMA_LEN give the VME byte address, the IBUS word address and the length in words. DMA_CTRL holds the direction, AM, data width and block mode, and its bit 0 starts the transfer. The engine moves 16-word chunks through the FIFO and sets STATUS bit 2 when done. Translation rules are those of the normal paths: the AM and width are taken as given, and IBUS addresses are word addresses.

### Who waits for whom

Only one client owns the masters at a time, and this creates one possible deadlock. Suppose a VME access holds the set through `v2i_engine` and waits for the IBUS grant. At the same moment, an outside IBUS master holds IBUS and addresses the VME window. The bridge's IBUS slave withholds ACK until `i2v_ctrl` can own the set, so neither side moves. The outside master must therefore give up when no ACK arrives, release the bus and retry later. The bridge's own `ibus_master` does exactly this, after `ACK_TIMEOUT` cycles. Once the outside master has released IBUS, the VME access completes. Mid-transfer there is no such wait, because `i2v_ctrl` keeps the set until the IBUS transfer ends.

## Interrupts (`irq_manager`)

- **IBUS → VME.** Two IBUS request lines, A and B, can be active at once.
  - Each maps to one of the seven VME levels (IRQ_CFG[2:0] and [6:4]).
  - Each is enabled by IRQ_CFG[8] or [9].
  - A rising request pulls its IRQ* line low.
  - The bridge answers the matching IACK cycle with its status/ID byte (IRQ_ID[7:0] or [15:8], D8(O)) and releases the line. Requests for other levels pass on down IACKOUT*.
- **VME → IBUS.** VME levels enabled in the handler mask (IRQ_CFG[23:17] for levels 1..7) are served highest first.
  - The VME master runs an IACK cycle.
  - The byte and level are stored in IACK_STAT, and STATUS bit 3 is set. Bit 3 drives `ibus_irq_o`.
  - The next level is served after software clears bit 3.

## Register map

The register area is 1 kbyte (256 words) and writable with byte enables from VME. Words 0..31 are flip-flops. Words 32..255 are general RAM.

| Word | Name | Contents |
|---|---|---|
| 0 | ID | 5642_0001h, read only |
| 1 | CTRL | bit 0 VME slave enable (reset 1); bit 2 writes pulse SYSRESET* (slot 1 only) |
| 2 | STATUS | bit 0 IBUS error, 1 VME bus error, 2 DMA done, 3 VME interrupt captured; write 1 to clear |
| 3 | VWIN | [31:24] VME A32 window (16 Mbytes); [23:10] A24 register window |
| 4 | IWIN | [31:22] IBUS word base onto which the A32 window maps |
| 5 | I2VWIN | [31:22] IBUS window mapped onto VME; [13:0] IBUS address bits 31:18 of the register region |
| 6 | TIMING | [3:0] address-to-strobe delay, [7:4] idle time; in fast-clock cycles |
| 8–11 | DMA | VADDR, IADDR, LEN, CTRL ([0] start/busy, [1] direction, [7:2] AM, [9:8] width, [10] block) |
| 12 | IRQ_CFG | levels, enables and handler mask (see above) |
| 13 | IRQ_ID | status/ID bytes for requests A and B |
| 14 | IACK_STAT | {level[10:8], status/ID[7:0]} of the last served VME interrupt |
| 16–31 | CAP0..15 | capability entries |

At reset, the address switches (`hw_addr`) set the windows:

- `hw_addr[15:8]` gives the A32 window.
- `hw_addr[7:0]` gives A24 bits 23:16.

The registers can be reached three ways:

- from VME in A24 space;
- from VME through CR/CSR space (AM 2Fh);
- from IBUS in their own 256-kword region.

A32 space is reserved for the IBUS window.

CR/CSR space (`crcsr`) uses the page of `hw_slot` (slot × 512 kbytes). It implements the mandatory VME64 configuration ROM fields:

- checksum and ROM length;
- access widths and space specification;
- the "CR" signature;
- manufacturer, board and revision IDs;
- the CSR base-address register, with bit-set and bit-clear registers.

The manufacturer ID (0) is a placeholder. The user CSR area maps onto the register file.

## Slot-1 functions (`vme_utilities`)

The slot-1 functions work only with the `sysctrl` input high, which stands for a jumper:

- a four-level priority bus arbiter;
- SYSRESET* for 200 ms after power-up or on a CTRL write (12,800,000 cycles at 64 MHz);
- the start of the IACK daisy chain.

On every board, the bus requester uses BR3* and passes on grants that it does not want.

## Departures and choices

These points are this design's own or differ from a literal reading of the bus description:

- Single clock with a clock enable instead of two clock inputs (see Clocking).
- The register layout, reset values, STATUS bits and ID values are this design's own. It uses 14 configuration words and 16 capability entries (120 bytes) of the 1-kbyte area.
- The VME master ends a strobe on its own after `DTACK_TIMEOUT` (1024) fast cycles without DTACK* or BERR*. It then reports a bus error, so a missing board cannot hang the bridge.
- All-ones fill words for IBUS reads that meet BERR*.
- The IBUS bus controller does not take the bus back from a master at a burst boundary. A master keeps the bus until its transfer ends, however many bursts that takes, even when the other master is requesting. The bus rules would allow the controller to end an unlimited run of bursts when another master asks for the bus.
- The bridge's configuration words (words 0..31) are flip-flops, because the datapath reads them all the time. Only the free area is a RAM array. An FPGA build that is short of area could move the seldom-read words, such as the DMA and interrupt settings, into RAM.
- IBUS initialisation lines are not modelled. The only IBUS interrupt lines are the two request inputs and one interrupt output.
- The flush rules of the write buffer, the 16-word read-ahead and the 16-word DMA chunks.
- Outside parts are not modelled in `rtl/`:
  - the bus transceivers;
  - the clock generator;
  - the address switches, which are the `hw_addr`/`hw_slot` inputs.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M` and stops. For example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -yrtl -ytb \
    rtl/vmebr_pkg.sv tb/tb_vme_ibus_bridge.sv --top-module tb_vme_ibus_bridge
./obj_dir/Vtb_vme_ibus_bridge
```

`tb_vme_ibus_bridge` runs the whole bridge at its default parameters. It uses these stand-ins:

- an outside IBUS master and an IBUS memory;
- a VME master made of tasks;
- `tb/vme_mem_model.sv`, a VME memory that can also raise interrupts.

It exercises every path:

- posted and narrow writes;
- line reads and block reads;
- MBLT in both directions;
- register access over A24, CR/CSR and IBUS;
- DMA both ways;
- both interrupt directions;
- bus errors on both sides;
- bus arbitration and SYSRESET*.

It counts each mechanism and fails if one never happened.

At the end it writes and reads back blocks of these lengths through the VME slave:

- BLT: 8, 64 and 256 bytes;
- MBLT: 32, 256 and 1024 bytes.

It prints the mean rate of each block, counted from the address phase to the end of the cycle. At a 100 MHz bridge clock this is about 20-25 Mbyte/s for BLT and 33-37 Mbyte/s for MBLT. The test master's own strobe delays (40 ns set-up before each strobe, plus release waits) dominate these figures, so they show the bridge's overhead, not a backplane limit.

The unit testbenches check the blocks against independently computed values. These include the IBUS cycle counts: 4-cycle addressing, 16-word bursts and 2-cycle handshakes.
