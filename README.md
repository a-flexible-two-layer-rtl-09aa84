# Two-layer external memory manager for an H.264/AVC decoder

An H.264 HD decoder spends most of its external memory bandwidth in three
places:

- motion compensation fetches reference blocks that motion vectors scatter over the frame;
- the de-blocking filter writes back the reconstructed blocks;
- the de-interlacer reads decoded fields.

All three go to mobile DDR SDRAM. Every row activation and precharge there costs
several clocks. This memory manager splits the problem into two layers:

- **Layer 1, the address translation machine (ATM).** It knows about pictures.
  It turns a block request (position, motion vector, size, frame/field,
  luma/chroma) into a list of DRAM bursts. It uses a memory map that keeps
  neighbouring picture tiles in different banks, and puts luma and chroma in
  different DRAMs.
- **Layer 0, the external memory interface (EMI).** It knows only about DRAM.
  It takes burst accesses and issues SDRAM commands. It keeps the device
  timing, and it decides per access whether to close the row again
  (auto-precharge). That decision uses a *hit bit* that tells whether the next
  queued command goes to the same row.

The decoder is pipelined in 8x8 stages. Around the two layers sit a data-bus
schedule, which serves the three masters in a fixed order within each stage,
and a double-buffered synchronization buffer. The decoder reads one stage's
data from that buffer while the next stage's data arrive.

The target configuration:

- four 32-bit Mobile-DDR SDRAMs at 162 MHz;
- burst length 2, CAS latency 3;
- tRCD = tRP = 3 and tRAS = 7 clocks;
- 32-word data FIFOs;
- the "dynamic 1" auto-precharge method.

Stage budget: an HD stream at 1920x1088 and 30 frames/s gives the memory
system 165 clocks per 8x8 stage.

```
 DB  (writes) --\
 DEI (reads)  ---> bus_sched --> atm --> steering --+--> emi 0 --> DRAM 0  (luma, pixel rows 0,1 mod 4)
 MC  (reads)  --/                                   +--> emi 1 --> DRAM 1  (luma, pixel rows 2,3 mod 4)
 DB write data -------------------------------------+--> emi 2 --> DRAM 2  (chroma)
                                                    +--> emi 3 --> DRAM 3  (chroma)
 emi 0..3 read data --> return-order FIFO --> sync_buffer (2 x 512 x 32) --> decoder
```

All RTL is in `rtl/`, one module or package per file, and every file opens with
a comment giving its interface and timing. The top is `mem_subsystem`.

## The EMI: layer 0 (`emi.sv` and its parts)

One EMI drives one SDRAM. Its parts:

| Module | Role |
|---|---|
| `emi_cmd_fifo` | Command FIFO. Each entry is read/write, bank, row and column. |
| `emi_wdata_fifo` | Write-data FIFO: n bits in, 2n bits out per clock for DDR. |
| `emi_rdata_fifo` | Read-data FIFO: 2n bits in, n bits out. |
| `emi_mode_control` | Per-bank idle/active state and open-row registers. Classifies an address as row hit, row miss or bank miss. |
| `emi_timing_checker` | Per-bank and per-device down-counters. They hold the FSM until each timing rule is met. |
| `emi_fsm` | Initialization, access, refresh and power down, with a schedule block. |

### Hit bits and the auto-precharge decision

The command FIFO compares each pushed command with the one pushed just before
it. If that earlier command is still queued, its entry learns three things:

- that a successor exists;
- whether the successor uses the same bank;
- whether it uses the same row (the hit bit).

When a READ or WRITE goes out, `apc_method` selects how the A10 auto-precharge
bit is set:

| method | auto-precharge when |
|---|---|
| row-close | always |
| row-open | never |
| dynamic 1 | the next command is a row miss, or is not known yet |
| dynamic 2 | the next command is not a row hit |

Dynamic 1 keeps the row open when the next command is a row hit or goes to an
idle bank. Dynamic 2 keeps it open only for a row hit. Both close the row when
nothing follows, because the next master is likely to be somewhere else.
`tb_emi_fsm` checks A10 for every method against every kind of successor.

### FSM, stalls and the schedule block

The sequence after reset is:

1. `T_POWERUP` clocks of NOP (200 us).
2. Precharge all banks.
3. Two auto refreshes.
4. The mode register (burst length, sequential burst, CAS latency).
5. The mobile extended mode register (PASR, TCSR, drive strength).

After that, the head command is handled by its classification:

- a bank miss issues ACT;
- a row miss issues PRE;
- a row hit issues READ or WRITE.

Each command goes as soon as the timing checker allows it. The FSM puts exactly
one command per clock on registered pins, NOP when nothing may go.

Two stalls keep the data FIFOs safe:

- **Read stall.** A READ waits while the read-data FIFO could not take its
  burst, counting the data of READs still in flight.
- **Write stall.** A WRITE waits until its whole burst is in the write-data
  FIFO. Words already promised to earlier WRITEs do not count.

The schedule block uses clocks in which the head command can issue nothing. In
such a clock it issues the ACT or PRE of the *second* queued command, if that
command goes to another bank. READ and WRITE stay in queue order, so data order
never changes.

Refresh and power down:

- Every `T_REFI` clocks the FSM closes all banks and issues one auto refresh.
  2528 clocks covers 4096 rows in 64 ms.
- After `PD_IDLE` idle clocks with an empty queue it drops CKE.
- A new command or a due refresh wakes the device one clock later.

### Latency

These are the read latencies of an idle EMI, from the clock after the command
is accepted to the first data word. `tb_emi` checks them.

| case | latency (clocks) | default |
|---|---|---|
| row hit | CL + 2 | 5 |
| bank miss | tRCD + CL + 2 | 8 |
| row miss | tRP + tRCD + CL + 2 | 11 |

The two extra clocks are the output pin register and the capture register.

A write of four bursts into an idle bank takes 8 clocks from ACT to the last
data beat when its data are already queued: ACT, two NOPs, four WRITEs on
consecutive clocks, and one more clock of data. `tb_emi` checks this.

### DRAM side

The EMI brings out:

- registered CKE, CS#, RAS#, CAS#, WE#, BA and A;
- a data path of `2*DQ_W` bits per clock with an output enable.

The first word is in the low half. The DDR pad cells that move the two halves
on the two clock edges are not part of this RTL.

## The ATM: layer 1 (`atm.sv`)

### Control registers

The control registers are written at slice level:

| address | register |
|---|---|
| 0 | picture width |
| 1 | picture height |
| 2 | POC_1, the frame store read by MC and DEI |
| 3 | POC_2, the frame store written by DB |

### The region a block request covers

- **Luma read, fractional motion vector.** The region grows by 5 pixels in
  that direction for the six-tap filter, so a 4x4 block needs 9x9 pixels and
  an 8x8 block needs 13x13.
- **Chroma read, fractional vector.** The region grows by one sample.
- **Field requests.** These read every other picture row.
- **Clipping.** The region is clipped to the picture, so vectors may point
  outside it.

### Memory map

The picture is cut into 64x64-byte tiles. One tile fills one DRAM row across a
DRAM pair. The pair alternates every two pixel rows, which gives 32 rows x 64
bytes = 512 words per DRAM row.

```
bank   = {tile_y[0], tile_x[0]}            neighbouring tiles never share a bank
row    = frame_store * rows_per_frame + (tile_y >> 1) * ceil(width / 128) + (tile_x >> 1)
dram   = {chroma, y[1]}                    DRAM 0/1 luma, 2/3 chroma
column = {y[5:2], y[0], x[5:3], 0}         one burst = 8 bytes = 2 x 32 bits
```

Chroma is stored with Cb and Cr interleaved byte by byte at half height.

A block that crosses a tile edge therefore meets a bank miss, not a row miss,
so the schedule block can hide the activation. Luma and chroma are in
different DRAMs, so their accesses overlap.

### Output

The ATM issues one burst per clock, row by row, and marks the last one.

An HD frame store takes 135 luma rows per bank. A 256 Mb device has 4096 rows,
so it holds 30 frame stores; the decoder needs 17.

## Bus schedule (`bus_sched.sv`)

Each 8x8 stage starts with `stage_start`. The bus is then granted to the
masters in this order:

1. de-blocking (DB);
2. de-interlacer (DEI);
3. motion-compensation data fetch (MC).

A master holds the bus for as many block requests as it needs. It releases the
bus with `m_last` on its final request, or at once with `m_none` if it has
nothing to do in this stage. `stage_done` is raised after MC.

Requests pass to the ATM combinationally, in the clock they are granted. A
request from DB is a write; the other masters read.

## Top: steering, return order and the synchronization buffer (`mem_subsystem.sv`)

Each ATM burst goes to the EMI of its DRAM.

- **Reads.** The target DRAM index is pushed into a return-order FIFO
  (`ORD_DEPTH` 64). The return logic takes BL words from the EMI named at its
  head. Data therefore leave in request order although the four EMIs run
  independently. The words are written into the fill half of `sync_buffer`.
- **Writes.** The command is pushed together with the first word of the DB
  write stream (`wd_*`), and the remaining words follow. If the stream is
  slow, the EMI's write stall holds the WRITE until the burst is complete.

`sync_buffer` has two SRAMs of 512 x 32 bits. `sb_swap` exchanges them at the
stage boundary:

- the decoder reads the previous stage with a one-clock read latency;
- the next stage fills the other SRAM;
- `fill_count` tells how much has arrived;
- a write past the end is dropped and raises `sb_overflow`.

512 words holds the worst case of one stage. That is 280 words with this memory map; a count that assumes three bursts per chroma row gives 300.

The top brings out every DRAM pin bundle as arrays of four. It also brings out
per-EMI event strobes for the mechanisms: both stalls, schedule-block commands,
refreshes, power down and the access status.

## Parameters

All parameter defaults are the target configuration.

| Parameter | Default | Meaning |
|---|---|---|
| `DQ_W` | 32 | Data width. |
| `BL` | 2 | Burst length. |
| `CL` | 3 | CAS latency. |
| `FIFO_DEPTH` | 32 | Data FIFO depth, in words. |
| `T_RCD`, `T_RP`, `T_RAS` | 3, 3, 7 | Given with the device. |
| `T_RC`, `T_RRD`, `T_WR` | 10, 2, 2 | Converted to clocks at 6.17 ns. |
| `T_WTR`, `T_MRD` | 1, 2 | Converted to clocks at 6.17 ns. |
| `T_RFC` | 12 | 72 ns. |
| `T_DQSS` | 1 | Rounded to one clock. |
| `T_POWERUP` | 32400 | Power-up wait in clocks. |
| `T_REFI` | 2528 | Refresh interval in clocks. |
| `PD_IDLE` | 64 | Idle clocks before power down. |
| `ROW_W`, `COL_W` | 12, 9 | 256 Mb x32 device: 4096 rows, 512 columns. |

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | Reference and checks |
|---|---|
| `tb_emi_cmd_fifo` | Queue model including the hit, same-bank and known bits. |
| `tb_emi_wdata_fifo`, `tb_emi_rdata_fifo` | Width conversion and ordering under random traffic. |
| `tb_emi_mode_control` | Bank-state model and the three classifications. |
| `tb_emi_timing_checker` | Per-rule model of the earliest legal clock for every command pair, checked every clock. |
| `tb_emi_fsm` | Command trace of a full EMI: init order and spacing, A10 per method and successor, schedule block, refresh interval, power-down entry and wake-up. |
| `tb_emi` | Latencies above, random traffic under all four methods with data compared, both stalls, no protocol error in the DRAM model. |
| `tb_emi_cfg` | The same tests as `tb_emi`, on a single-data-rate x16 EMI with burst length 4 and CAS latency 2. This shows that the data-rate, width and burst options work. |
| `tb_emi_workload` | The EMI at its defaults under 20,000 random commands and 20,000 video-like commands (runs of 64 bursts along a row). Reports the status mix and run time, and checks data, hit rates and throughput. |
| `tb_atm` | Integer-arithmetic model of region, clipping and address map; one burst per clock. |
| `tb_bus_sched` | Grant order, `m_none`, `m_last`, back-pressure. |
| `tb_sync_buffer` | Swap, fill count, read latency, overflow. |
| `tb_mem_subsystem` | End to end with four DRAM models (below), with shortened power-up, refresh and power-down times. |
| `tb_mem_subsystem_full` | The same test on the top with every parameter at its default. |

`mddr_model.sv` is a behavioural Mobile-DDR model for the testbenches. It keeps
bank state, stores data sparsely, and reports protocol and timing violations.

The end-to-end test has four phases:

1. It writes a 256x128 picture.
2. It runs 60 decoder stages. In each one DB writes a block, DEI reads field
   blocks (and sometimes has nothing to do), and MC reads two luma blocks and
   one chroma block with random motion vectors.
3. It runs four worst-case stages. MC reads a bi-predicted block at
   quarter-pel, and DEI reads a 16x9 luma and an 8x5 chroma field block, all
   off the burst grid. That is 280 words per stage.
4. It reads the written frame store back.

All read data are compared with a model of the picture. Whole-pel stages must
finish within 165 clocks. Every stage must finish within its read-word count
plus 70 clocks. The test fails if any mechanism never occurred:
either stall, schedule block, refresh, power down, the access statuses,
`m_none`, or the buffer swap.

To run a testbench with plain verilator, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
          rtl/emi_pkg.sv rtl/mem_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
          tb/mddr_model.sv tb/tb_mem_subsystem.sv --top-module tb_mem_subsystem
./obj_dir/Vtb_mem_subsystem
```

The packages must come first. `-Wno-fatal` lets width warnings of the DRAM
model through. The short end-to-end run takes well under a minute. The
full-size one has a 32400-clock power-up and runs longer.

The end-to-end testbenches include `tb_mem_subsystem_decl.svh` and
`tb_mem_subsystem_body.svh`, and the two EMI testbenches include
`tb_emi_body.svh`, so `tb/` must be on the include path.

## Where this design departs from the original description, and open points

- **Stage time for the worst case.** The return path carries one 32-bit word
  per clock into the synchronization buffer. A nominal stage fits in 165
  clocks: the longest measured whole-pel stage took 161. The worst case does
  not fit: two 13x13 luma regions of a B block plus their chroma and the DEI
  field blocks are 280 words, so they take at least 280 clocks. The
  end-to-end test runs four such stages and measures 324 to 343 clocks. The original
  analysis reaches 151 clocks (MC 84 + DB 40 + DEI 27) by letting the luma and
  chroma DRAM pairs deliver in parallel. A wider or dual-port buffer path would
  be needed for that.
- **Random versus video streams.** The same comparison was made originally on
  the EMI alone:

  | stream | row hits | time for 20,000 commands |
  |---|---|---|
  | random, original | 0.3 % | about 1.0 ms |
  | random, this EMI | 31 % | 0.69 ms (111,918 clocks) |
  | video, original | 98.6 % | 46 us |
  | video, this EMI | 98.5 % | 0.29 ms (46,648 clocks) |

  This EMI takes a command's status when the command reaches the head of the
  queue. By then the schedule block has often opened a random command's row,
  so it counts as a hit. The video stream moves 40,000 words over a system port
  of one word per clock. The original 46 us is under one clock per
  command, so it must measure something else.
- **Which pair holds a frame.** A later per-frame command count puts the luma of
  successive frames alternately on DRAM 0/1 and 2/3. That does not match the
  luma/chroma split used here, which follows the description of the memory
  map.
- **Interlaced one- or two-DRAM mapping.** The variant for one or two DRAMs, with
  luma and chroma tiles interleaved in one device, is not built. Only the
  four-DRAM map is built.
- **Dynamic 1 and dynamic 2.** The configuration text calls method 2 the right
  one for video, but then selects method 1, and the configuration table also
  marks method 1. Method 1 is the default, and both are selectable at run time.
- **Refresh period.** The device table gives the refresh period as "64" with a
  unit that cannot be right for a refresh period. 64 ms for 4096 rows is used.
- **DEI block size.** The worst-case estimate has the de-interlacer read a
  16x9 luma field block, and the worst-case stages of the test use that size.
  The regular stages use 16x8. The ATM accepts any height up to 16.
- **Choices not taken from the description.** These include the command-FIFO
  depth, the power-down idle threshold, the hit-bit extension (a separate
  same-bank bit), the write-stream interface, the return-order FIFO and the
  synchronization-buffer size. Each is stated in the opening comment of its
  file.
- **Not included.** The DRAM devices, the DDR pad cells, the AHB-style system
  bus and the decoder modules themselves are not part of this RTL. The
  decoder modules are the bus masters, which the testbench drives.
