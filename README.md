# Layered access engine for parallel compact flash banks

A bus monitor that records hours of traffic has to write a continuous data
stream of several megabytes per second into non-volatile memory. Compact
flash cards suit the environment because they have no moving parts. But a
single card delivers only about 4 MB/s in practice. Driving its ATA
register protocol in software also takes nearly all of an embedded
processor's time, because every 16-bit word is a separate bus access and
every sector needs status polling.

This engine moves that work into hardware. It is built like a
communication stack, with each layer taking over one more part of the job
from the processor:

| layer | module | what it takes off the host |
|---|---|---|
| physical | `phy_ip` (one per bank) | the timing of a single register access on the card's bus |
| data link | `ata_dll` (one per bank) | a whole ATA packet: command setting, then per sector a data access and a status poll until the sector is released |
| transport | `ctrl_regs`, `ctrl_fsm`, `nvm_mmu` (one instance) | splitting one host stream over all banks, buffering two sectors per bank, and keeping a shared "super block" |

A `bypass_mux` sits between the data link layer and the physical layer of
each bank. It lets the host reach a card's registers directly, for
example to initialise it.

The host sees one memory that is `NUM_BANKS` times larger and faster than
one card. It is only asked for data when a sector can be moved. With two
banks the stream rate doubles, and the host can run two sectors ahead on
every bank before it must be served again.

```
 host bus ──► ctrl_regs ──► ctrl_fsm ──────────────┐ packets
     │  data port │                                ▼
     │            └──► nvm_mmu: queue 0 ◄──► ata_dll 0 ──► bypass_mux 0 ──► phy_ip 0 ──► card 0
     │                  cyclic   queue 1 ◄──► ata_dll 1 ──► bypass_mux 1 ──► phy_ip 1 ──► card 1
     │                  mux      super block + lock                ▲
     └───────────── direct register access ────────────────────────┘
```

`nvm_transport` is the top. `nvm_pkg` holds the shared widths, the ATA
register numbers, the host register map and the struct types.

## How a stream is spread over the banks

This is the central mechanism and the part that is easiest to get wrong
when changing the design.

**Mapping.** Stream sector *n* (counting from 0) belongs to bank
*n* mod `NUM_BANKS` and is stored there at LBA `start + n / NUM_BANKS`.
All banks use the same start LBA. With two banks and start 100:

- sectors 0, 2, 4, … go to bank 0 at LBAs 100, 101, 102, …
- sectors 1, 3, 5, … go to bank 1 at LBAs 100, 101, 102, …

A stream of *c* sectors gives bank *b* exactly
`(c + NUM_BANKS − 1 − b) / NUM_BANKS` sectors.

**Data side (`nvm_mmu`).** Each bank has a first-word-fall-through queue
of `FIFO_SECTORS × SECTOR_WORDS` words (2 × 256 × 16 bits). A multiplexer
points at the "current" queue. Every host data word goes into, or comes
out of, the current queue. After `SECTOR_WORDS` words the multiplexer
steps to the next bank and wraps after the last one.

- On a write stream the host's sectors are dealt out to the banks.
- On a read stream the host collects sectors in the same order. The
  sectors read in parallel therefore come back in stream order without
  any reordering logic.

A start command empties all queues and returns the multiplexer to bank 0
in the same clock, so no host word can be lost or left over.

**Command side (`ctrl_fsm`).** When the stream starts, the control state
machine computes each bank's share of sectors and a next-LBA pointer per
bank. Whenever a bank's data link layer is idle, it hands it the next
packet of `min(remaining, PACKET)` sectors, where `PACKET` defaults to 32.
Each packet is one ATA command, so the banks run their packets
independently and in parallel. The queues decouple them from the host:

- A data link layer writing to its card simply waits (valid/ready) until
  its queue holds the next word.
- A data link layer reading from its card waits until its queue has room.

The stream is done, with a `done` pulse and the STATUS.done flag, when
every bank has finished its last packet.

**Flow control towards the host.** A data-port access waits, with
`host_ready` low, while the current queue is full (write) or empty (read).
`sector_ready` is high when the rest of the current sector can be moved
without any wait. With interrupts enabled, `irq` is high while a stream
runs and `sector_ready` holds, or when the stream is done, or when an
error is flagged. A host that waits for `irq` before each sector of 256
words never stalls inside a sector.

**Single-bank mode.** CONFIG bit 1, sampled when a stream starts, sends
the whole stream to bank 0 at consecutive LBAs and keeps the multiplexer
on bank 0. This allows the one-card and two-card set-ups to be compared
on the same hardware. In simulation a 40-sector write takes 46,702 clocks
over two banks and 83,034 clocks on one bank.

**Bypassed banks.** A bank switched to the host path (CONFIG bits 15:8)
receives no packets. A stream that includes it waits until it is
switched back, and then continues. Use bypass only while no stream is
running, or together with single-bank mode for bank 1.

## One ATA packet on a bank (`ata_dll`)

The data link layer turns a packet (direction, 28-bit LBA, 1–256 sectors)
into a sequence of single register accesses on its physical layer.

1. **Command setting.** It writes LBA bits 7:0, 15:8 and 23:16, then the
   device/head register (`0xE0 | LBA[27:24]`, LBA mode), then the sector
   count, then the command: `0x30` to write sectors, `0x20` to read.
2. **Per sector.** It polls STATUS until BSY is clear and DRQ is set. It
   then moves 256 words through the data register, which is the data
   access. It then polls STATUS again until BSY clears, which is the
   sector release.
3. **End of packet.** Once the card is no longer busy after the last
   sector, it pulses `done_o`. It also pulses `err_o` if STATUS.ERR was
   seen or a bus access timed out. An error ends the packet at the next
   status poll.

`sector_done_o` pulses once per sector. The transport layer counts these
pulses in the SECTORS register.

## The bank bus (`phy_ip`)

Each bank has a simple strobe/acknowledge bus in the style of an
IndustryPack logic interface. Its signals are select, read/write, a 4-bit
register address, and write data with an output enable. The bidirectional
data lines are split into `ip_dout`/`ip_doe`/`ip_din`, so the design stays
two-state; a pad or the board joins them.

One access runs as follows:

1. The request is seen.
2. Address, direction and data are driven for `PHY_SETUP` clocks with
   select high.
3. Select goes low until the card pulls `ip_ack_n` low. Read data is
   taken in that clock.
4. Select is released, and the layer waits for `ip_ack_n` to return high.
5. The internal response `ack` pulses for one clock.

If no acknowledge arrives within `PHY_TIMEOUT` clocks, the access ends
with `err` set. The request must stay stable until it is acknowledged. A
simulation assertion checks this.

## Super block and lock

A recorder needs a small block of file-system information on the media:
where valid data starts and ends, and what it contains. Losing it loses
everything, so it is stored on every card at different times.

The MMU holds one sector (256 words) of super block. Only one party may
own it at a time: the host, or one bank. This is controlled by a lock
(`superblock_lock`).

- **Host updates.** The host acquires the lock (write 1 to LOCK), writes
  words through the window at 0x100–0x1FF, and releases it (write 0). A
  host write without the lock is ignored and flagged. An acquire while a
  bank holds the lock is refused and flagged.
- **Save** (CMD bit 2). A save job is queued for every bank not in bypass.
  Between two stream packets, each such bank asks for the lock. When the
  bank owns the lock, it writes the super block as a one-sector packet at
  `SB_LBA`, with its data path switched from its queue to the super block.
  It then frees the lock. The copies are therefore written one bank after
  another, interleaved with the running stream.
- **Periodic save.** With SB_PERIOD set to *N* (not 0), a save is started
  by itself every *N* stream sectors. The sectors are counted over all
  banks from the stream start. A save that is requested while the
  previous one is still queued for a bank is merged with it.
- **Load** (CMD bit 3, with the bank number in bits 11:8). The same
  mechanism reads the sector at `SB_LBA` of that bank into the block.
- **Arbitration.** When the lock is free, waiting banks win over the host,
  and waiting banks take turns.

## Host interface

The host bus is a word-addressed valid/ready bus with 32-bit data. A
register access completes in the clock it is presented. Data-port and
direct accesses can take wait states.

| address | name | access | contents |
|---|---|---|---|
| 0x000 | CMD | w | b0 start write stream, b1 start read stream, b2 save super block, b3 load super block from bank b11:8, b4 clear error flags |
| 0x001 | CONFIG | rw | b0 interrupt enable, b1 single-bank streams, b15:8 banks switched to the host path |
| 0x002 | STATUS | r | b0 stream busy, b1 sector ready, b2 done, b3 error, b4 super block job pending, b5 lock refused, b6 direct access refused, b7 direction, b15:8 data link layers busy, b17:16 lock owner (0 free, 1 host, 2 bank), b23:20 lock bank, b27:24 current bank, b31:28 banks on the host path |
| 0x003 | LBA | rw | start LBA of the next stream (28 bits) |
| 0x004 | COUNT | rw | sectors in the next stream (32 bits) |
| 0x005 | PACKET | rw | sectors per ATA packet, 1–256 (reset 32; 0 acts as 1) |
| 0x006 | SB_LBA | rw | LBA of the super block on every card |
| 0x007 | LOCK | rw | write b0 = 1 acquire, 0 release; read b0 host owns the lock |
| 0x008 | DATA | rw | stream data, low 16 bits |
| 0x009 | ERRBANK | r | bank of the last data link error |
| 0x00A | SECTORS | r | stream sectors completed by the banks since the start |
| 0x00B | LEVEL | r | queue fill in words: bank 0 in b15:0, bank 1 in b31:16 |
| 0x00C | SB_PERIOD | rw | if not 0, save the super block by itself every SB_PERIOD stream sectors |
| 0x100+i | SB[i] | rw | super block word i |
| 0x200+16·b+r | bank b, ATA register r | rw | direct access; the bank must be on the host path |

A write stream, step by step:

1. Write LBA and COUNT.
2. Write CMD = 1.
3. Write COUNT × 256 words to DATA, sector by sector. Waiting for `irq`
   (or STATUS.sector_ready) before each sector avoids any stall.
4. Poll STATUS until done is set and the super-block-job bit is clear.

A read stream is the same with CMD = 2 and reads from DATA. STATUS flags
done, error, lock refused and direct access refused are sticky until
CMD bit 4.

## Parameters

Defaults reproduce the two-card reference set-up.

| parameter (top) | default | meaning |
|---|---|---|
| `NUM_BANKS` | 2 | memory banks, each with its own data link and physical layer |
| `SECTOR_WORDS` | 256 | 16-bit words per sector (512-byte ATA sector) |
| `FIFO_SECTORS` | 2 | queue depth per bank, in sectors |
| `SB_WORDS` | 256 | super block size in words |
| `PACKET_DEFAULT` | 32 | reset value of PACKET |
| `PHY_SETUP` | 1 | set-up clocks before select (at least 1) |
| `PHY_TIMEOUT` | 1023 | clocks to wait for an acknowledge |

At the defaults, synthesis gives 20,480 bits of memory: 2 × 512 × 16 for
the queues and 256 × 16 for the super block. There are about 740
flip-flops.

Notes on changing the parameters:

- The register map has room for up to 8 banks in CONFIG and 16 in the
  direct-access page. LEVEL and the 4-bit status fields are laid out for
  2 banks.
- `SECTOR_WORDS` must stay a power of two.

## What comes from the architecture and what was chosen here

Taken from the architecture this design implements:

- the three layers and their tasks
- one data link layer, bypass multiplexer and physical layer per bank
- the cyclic sector-wise distribution by an MMU with one queue per bank
- two sectors of queue per bank
- 32-sector ATA packets
- command setting, data access and sector release with status polling
- a super block shared under a lock and saved to several banks at
  different times
- direct host access to the banks for initialisation
- two banks
- 16-bit words, 256 to a sector

Chosen here, because the architecture leaves it open:

- **The host bus and the whole register map.** The reference platform
  uses an AMBA bus; here it is a plain valid/ready bus.
- **The mapping of stream sectors to LBAs** (same start LBA on every bank).
- **The order within command setting.** The architecture names base
  address, access type, then length. Here the sector count is written
  before the command byte, because in ATA the command write starts the
  card.
- **The bank bus.** This is a generic strobe/acknowledge cycle with a
  time-out, not a full IndustryPack implementation.
- **The super block size of one sector.** This matches the reference
  implementation's total of 20,480 memory bits exactly.
- **The lock arbitration order and the scheduling of save/load jobs**
  between packets. "Periodically" is made concrete as a save every
  SB_PERIOD stream sectors, or whenever the host asks.
- **The interrupt rule.**
- **Single-bank mode.**
- **The data link layer has no private sector buffer.** It streams
  straight from and to its MMU queue, which serves as its buffer.
- **Reset.** It is asynchronous and active low everywhere.
- **Error handling.** The data link layer reports an error and stops the
  packet; the stream still runs to its end. The host reads ERRBANK and
  decides what to do. There is no retry.

Outside the design: the host processor, and the cards and their
contents. Several streams open at once and file-system logic beyond
storing the super block are not provided. After a data link error, the
rest of that bank's packet stays in its queue until the next start
command flushes it.

## Simulation

Each module has a self-checking testbench in `tb/`. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/cf_bank_model.sv`
is a behavioural compact flash card. It has ATA task-file registers,
sparse sector storage, configurable acknowledge and busy times, error
injection and access statistics.

| testbench | what it covers |
|---|---|
| `tb_sector_fifo` | random push/pop/flush against a reference queue, full/empty/level |
| `tb_phy_ip` | read and write cycles, set-up timing, time-out |
| `tb_ata_dll` | packets of several sizes in both directions against the card model with random stalls, register sequence, error end |
| `tb_bypass_mux` | switch-over only between accesses, responses reach only the owner |
| `tb_superblock_lock` | ownership, refusals, round robin, writes ignored without the lock |
| `tb_nvm_mmu` | sector-wise distribution and re-sorting, sector_ready, super block routing |
| `tb_ctrl_fsm` | packets per bank for several stream sizes, super block save/load under the lock, bypass, single-bank mode, errors |
| `tb_ctrl_regs` | every register, sticky flags, interrupt, data port and direct access |
| `tb_nvm_transport` | whole engine at default size with two card models |
| `tb_nvm_timing` | whole engine with card models at reference ATA timing: access, sector and packet times, single against dual bank rate |

The end-to-end test `tb_nvm_transport` runs the following:

1. bypass access
2. super block written under the lock
3. a 196-sector (100 KB) write stream with a save in the middle; it takes
   230,477 clocks with the card model's short delays
4. placement of every sector on the cards
5. read-back
6. lock refusal
7. super block reload
8. error report
9. single-bank against dual-bank timing
10. a periodic super block save reaching both cards

It counts each mechanism and fails if one never happened.

`tb_nvm_timing` checks speed rather than function. It slows the card
models down to the ATA timing of the reference cards and reads the clock
count as 55 MHz. Those timings are about 0.59 µs from one data-register
access to the next, and 4 µs of busy time after each sector. The test then
measures:

| quantity | measured | reference |
|---|---|---|
| data-register access period | 0.58 µs | 0.59 µs |
| sector access | 153 µs | 154 µs |
| 32-sector packet | 4,901 µs | 4,900 µs |

So the engine adds almost nothing to what the cards need. The resulting
rates are 3.34 MB/s on one bank and 6.69 MB/s on two. The measured rates
of the reference system, 3.6–3.9 MB/s and 7.1–7.8 MB/s, are somewhat
higher than these card timings give (16 KB per 4.9 ms). Either way, the
card limits the rate, and two banks double it.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/nvm_pkg.sv tb/tb_nvm_transport.sv --top-module tb_nvm_transport
./obj_dir/Vtb_nvm_transport
```

Replace the testbench name to run the others. The end-to-end test
finishes in a few seconds.
