# Readout Unit: a buffer-based subevent builder for four front-end links

The Readout Unit sits between four front-end data links and one node of a readout network. Each
link delivers, for every triggered event, one or more small blocks of 32-bit words, tagged with
an event number. The links are not synchronised: blocks of the same event arrive at different
times on different links, and a link may send several blocks for one event. The Readout Unit
gathers, for each event, every block from every link and sends them out as one framed
*subevent*. It does this through one shared memory, not through per-link queues. Blocks are
written to the memory in arrival order. A directory records where each block lies and which
event it belongs to. An output engine then searches the directory by event number. Because of
this, the arrival spread between links costs only buffer space.

The nominal load is four links, each sending 1 kByte per event at a 40 kHz trigger rate. That
is 160 MByte/s in total. The design runs on one 50 MHz clock. It holds this load with a
1 MByte buffer (see *Throughput* below).

```
 link 0..3 (32-bit words + control flag)
   │                      ┌──────────────── bypass (one link, unchanged) ─────────────┐
   ▼                                                                                  │
 link_fifo ×4 ──64-bit──► sem ──write──► seb (1 MByte, dual port) ──read──► ebi ──► slink_out_mux ──► S-Link transmitter
 (pack, Xoff)            (round-robin,    data region  │ directory         (event     │
                          directory)      (circular)   │ (circular)         building) └─► out_packer ──► 64-bit PCI
                                                                              ▲
                                          network reads (64-bit) ──► seb_access_arb
                                        processor reads (32-bit) ──►  (memory-like access)

 control processor ◄──► ru_regs (mode, flush, counters, status)
```

## Word formats

Every input block has two header words and one trailer. The S-Link control flag marks the
first header word and the trailer.

| word | flag | bits |
|---|---|---|
| header 0 | 1 | `[31:12]` event number (20 bits), `[11:4]` free for the source, `[3:0]` S-Link bits |
| header 1 | 0 | passed through untouched |
| data | 0 | opaque, never interpreted |
| trailer | 1 | `[31:20]` block size in 32-bit words, framing included; `[19:8]` error status; `[7:4]` 0; `[3:0]` S-Link bits |

Event numbers are compared modulo 2^20, so they may wrap around. Each link must deliver its
events in increasing order. A link may send several blocks for one event, one after another.

A subevent has the same framing, which is why it is called *recursive*:

1. Header words 0 and 1 of the first stored block of the event.
2. The data words of every block of the event, in directory order. Each block's own header and
   trailer are removed.
3. An error block, present only when the ORed status is nonzero. It has one word per block:
   `{link[31:30], status[29:18], size[17:6], 6'b0}`.
4. A new trailer. Its size is the subevent's own word count, including its framing and the
   error block; it saturates at 4095. Its status is the OR of the block statuses.

A consumer can therefore treat a subevent like an input block.

## Input stage: `link_fifo`

Each link has a FIFO of 512 64-bit entries.

- **Packing.** A packing register pairs the words of a block: the even word goes in the low
  half, the odd word in the high half. A block with an odd number of words ends with a half
  entry. Every entry carries `first`, `last` and `hi_valid` flags.
- **Dropped words.** Data words outside a block are dropped and counted. So are words written
  while the FIFO is full.
- **Xoff.** `link_xoff` rises 8 entries before the FIFO is full. The link must stop within that
  margin.
- **Read side.** The FIFO is show-ahead. It counts the whole blocks it holds.

## Merger and directory: `sem`, `seb`

The merger scans the four FIFOs round-robin.

- **Whole blocks only.** A FIFO is served only when it holds a whole block, so a slow link
  never holds the shared bus. One exception: a FIFO that has raised Xoff is also served. This
  lets a block longer than the FIFO pass through.
- **Copy.** The merger copies the block, one 64-bit entry per cycle (400 MByte/s at 50 MHz),
  into the buffer's data region.
- **Directory entry.** It then writes one directory entry:

  ```
  [62:43] event  [42:41] link  [40:29] status  [28:17] length (32-bit words)  [16:0] address
  ```

  If the trailer's size field does not match the words received, the merger sets status
  bit 11.

The buffer `seb` is one 131072 × 64-bit memory (1 MByte). Its top 4096 words are the
directory; the rest is data. Both regions are circular. The output engine returns space by
advancing `data_tail` and `dir_tail` in order, so no garbage collection is needed.

The merger never overwrites:

- It waits when no data word is free.
- It starts no block without a free directory slot.
- It raises a common Xoff to all links below 16384 free data words or 64 free directory slots.
- It releases that Xoff only above 32768 free words and 128 free slots.

## Event building: `ebi`

This is the part that needs the most care.

**Which event is next.** The oldest directory entry not yet used names the next event E.

**When E is complete.** The merger's directory writes tell the engine, for each link, the last
event number that link has stored. E is complete once every enabled link has stored a block of
an event *after* E: each link delivers in order, so no further block of E can still arrive. The
`flush` control bit forces the engine to build E anyway, with whatever is stored.

**Building E.** The engine walks the directory from E's first entry. Each directory read takes
two cycles.

1. Scan 1 adds up the payload size and ORs the status of all blocks of E. It stops at the first
   entry by which every enabled link has shown a later event, or at the directory head. That
   stopping entry bounds all later scans. So the work per event depends on how far the links
   drift apart, not on how full the buffer is.
2. The header is read from E's first block and sent.
3. Scan 2 streams the data words of each matching block at one 32-bit word per cycle. It reads
   a 64-bit word ahead, so the stream has no gaps.
4. Scan 3 sends the error block, if the status is nonzero.
5. The trailer is sent.
6. Scan 4 marks the blocks of E as consumed in a bitmap.

**Freeing space.** When idle, the engine advances the tails over consumed entries, strictly in
directory order. A consumed entry stored after one that is still waiting keeps its space until
the tail reaches it.

**Readout protocols:**

- **Full readout** (`phased` = 0): every event goes out as one subevent and is then released.
- **Phased readout** (`phased` = 1):
  1. A first subevent carries only the blocks of the links in the level-2 mask (register bits
     `[19:16]`).
  2. The event then stays in the buffer until a decision arrives on `dec_valid`/`dec_accept`.
     `dec_ready` shows when the engine is waiting for one.
  3. On accept, a second subevent with the other links' blocks follows. On reject nothing
     more is sent. In both cases the event is then released.

  Decisions are taken in event order.

**Memory-like access.** While the engine waits for a complete event or for a decision, a
`host_req` with a 64-bit word address reads any buffer word. `host_ack` pulses with the word on
`host_data`. This lets a remote node read the directory or single blocks directly.

The port has two users, shared by `seb_access_arb`:

- **Network side.** The PCI target (`host_*`) addresses 64-bit words.
- **Control processor.** The processor's 32-bit memory bus (`mcu_*`) addresses 32-bit words.
  Address bit 0 selects the high half. The whole buffer thus appears in the processor's memory
  space.

Both users hold `req` and the address until `ack`. When both wait, the one not served last
goes first.

## Output: `slink_out_mux`, `out_packer`

- **PCI path.** Subevents normally go to the PCI side. `out_packer` turns the 32-bit stream
  into 64-bit beats:
  - The earlier word goes in the low half.
  - Every subevent starts a new beat, flagged `sop`.
  - The last beat of an odd-length subevent has `hi_valid` = 0.

  A lone low word is always taken. One word per cycle therefore passes as long as the bus takes
  a beat every second cycle.
- **S-Link path.** With `to_slink` set, subevents go to the S-Link transmitter instead, with
  the control flag on header word 0 and the trailer. The transmitter's link-full flag stalls
  the stream.
- **Bypass.** With `bypass` set, the words of one input link are also copied unchanged, one
  cycle late, to the S-Link transmitter. The transmitter's link-full flag is returned as that
  link's Xoff. Subevents then go to PCI.

## Control and status: `ru_regs`

The control processor uses a simple bus: `reg_addr`, `reg_wdata`, `reg_we`, `reg_re`. Read data
appear one cycle after `reg_re`.

| addr | contents |
|---|---|
| 0 | control (read/write): `[0]` phased, `[1]` subevents to S-Link, `[2]` bypass, `[5:4]` bypass link, `[8]` flush, `[15:12]` link enable, `[19:16]` level-2 links. Reset value `0x0000F000` |
| 1 | `[0]` buffer Xoff, `[4:1]` link Xoff, `[8:5]` FIFO full |
| 2 | data words in use |
| 3 | directory entries in use |
| 4 | blocks stored |
| 5 | subevents sent |
| 6 | events accepted |
| 7 | events rejected |
| 8 | events flushed incomplete |
| 9 | dropped words of links 1 and 0 (16 bits each) |
| 10 | dropped words of links 3 and 2 (16 bits each) |
| 11 | PCI beats |
| 12 | `[27:16]` directory head, `[11:0]` directory tail |

Disabled links take no part in the completion rule, and their FIFOs are not read.

## Throughput

| | needed | built |
|---|---|---|
| per link | 40 MByte/s (0.2 words/cycle) | 1 word/cycle into the FIFO |
| merger | 160 MByte/s | 64 bits/cycle = 400 MByte/s |
| event building | 160 MByte/s | 32 bits/cycle = 200 MByte/s, plus 2 cycles per directory entry per scan |
| PCI | 160 MByte/s of a 264 MByte/s bus (64 bit, 33 MHz) | fed at up to 200 MByte/s |

`tb_ru_rate` runs the nominal load at the default sizes:

- 300 events, four 1000-byte blocks each, at one event per 1250 cycles.
- Each link sends one word every 5 cycles, with a random start delay per link.
- The PCI side takes two beats in three cycles.

Result:

- 158.6 MByte/s of subevent words leave the unit. This equals what enters, less the
  removed block framing.
- Xoff is never raised.
- At most 10 directory entries and about 1300 buffer words are in use.

## Departures and limits

- **One output engine.** The original board splits the output over two FPGAs acting as tandem
  PCI masters, to get more PCI bandwidth. How they share the work is not specified. Here one
  engine does it all, at up to 200 MByte/s.
- **Packing.** The input stage uses one 64-bit FIFO behind a packing register, instead of two
  interleaved 32-bit FIFOs.
- **Own choices.** The following are this design's choices:
  - FIFO depth;
  - Xoff thresholds;
  - field widths of the words;
  - directory format;
  - error-block layout;
  - completion rule;
  - decision interface;
  - register map.
- **Accepted events in phased readout.** The remainder of an accepted event is *pushed* as a
  second subevent. A network that prefers to *pull* it can do so with memory-like reads
  instead, but the event is released only by a decision.
- **Xoff is global.** A link that stops sending never lets later events complete. If the links
  drift apart by more than the buffer holds, the engine waits for ever. Setting `flush`
  recovers: it builds the oldest event from what is stored and counts it in status word 8. A
  block of that event arriving later is built as a separate subevent.
- **Saturation.** Sizes saturate at 4095 words, both per block and per subevent (16 kByte).
- **Not built.** The following are outside this RTL and are reached through the top-level
  ports:
  - the S-Link receiver and transmitter cards;
  - the PCI master/target core;
  - the network interface card;
  - the control processor and its 8-bit configuration bus;
  - the optional timing receiver;
  - the configuration memory.

## Files

| file | contents |
|---|---|
| `rtl/ru_pkg.sv` | word formats, directory entry, helper functions |
| `rtl/link_fifo.sv`, `rtl/sem.sv`, `rtl/seb.sv`, `rtl/ebi.sv`, `rtl/seb_access_arb.sv`, `rtl/out_packer.sv`, `rtl/slink_out_mux.sv`, `rtl/ru_regs.sv` | the blocks above |
| `rtl/ru_top.sv` | the whole unit; parameters `SEB_WORDS`, `DIR_WORDS` (power of 2), `FIFO_DEPTH`, `XOFF_FREE`, `XON_FREE`, `XOFF_DIR` |
| `tb/tb_<block>.sv` | one self-checking testbench per block, at reduced sizes |
| `tb/tb_ru_top.sv` | end-to-end test at the default sizes (below) |
| `tb/tb_ru_rate.sv` | nominal-load throughput test at the default sizes |

`tb_ru_top` drives randomised blocks on all four links and rebuilds every expected subevent
independently. Every payload word encodes its block and position. The test runs through these
phases:

- full readout under PCI back-pressure;
- a stopped PCI side until the buffer raises Xoff;
- subevents to an S-Link transmitter that is randomly full;
- bypass of one link to that transmitter;
- phased readout with accepts and rejects;
- memory-like reads, by the network side and the processor at once;
- register reads;
- flush.

It counts each mechanism, and counts a failure for any that never happened.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/ru_pkg.sv tb/tb_ru_top.sv --top-module tb_ru_top
./obj_dir/Vtb_ru_top
```

Replace `tb_ru_top` with any other testbench name. The end-to-end test takes a few seconds.
Testbenches sample outputs on the falling clock edge and drive inputs just after the rising
edge.
