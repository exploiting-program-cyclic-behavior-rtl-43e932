# Row buffer sharing for a DDR2 SDRAM

A DDR2 SDRAM keeps one open row per bank in that bank's row buffer. If a request goes to an
open row, the memory only needs a column access. If it goes to another row of the same bank,
the memory must first write the open row back (precharge, tRP) and then open the new one
(activate, tRCD). Embedded programs tend to run in phases. During a phase most requests go to
one bank, and the other banks, with their row buffers, sit idle.

**Row buffer sharing (RBS)** separates the row buffers from the banks. The four buffers of a
four-bank part become a pool. A crossbar connects the pool to the banks, and any buffer can
hold a row of any bank. While one bank is busy it can keep up to four rows open, so a run of
accesses to a few rows of that bank turns from row conflicts into row hits. The memory
controller decides where each row goes. It keeps a directory of the buffers and chooses
victims with one rule: reuse an unmodified buffer if possible, because it can be dropped
without a write-back.

This repository holds synthesizable SystemVerilog for the controller, the crossbar, the
buffers and the device's command path. It also holds a behavioural model of the DRAM cell
arrays, and self-checking testbenches for every block.

## Structure

```
rbs_memory_system            top: request port -> controller -> SDRAM
├── rbs_controller           command engine (state machine), read tags, statistics
│   ├── rbs_sched_queue      request queue, open-row-first selection
│   ├── rbs_buffer_table     directory: bank/row/dirty/recency per buffer, hit, victim
│   └── rbs_timing           DDR2 timing counters, refresh timer
└── rbs_sdram                the memory device
    ├── dram_bank_array x4   cell arrays (behavioural model)
    ├── rbs_crossbar         banks <-> buffers, one register stage each way
    └── row_buffer x4        shared row buffers
rbs_pkg                      geometry, timing, command and statistics types
```

The processor that issues the requests is not part of this design. Its port is the top's
request port.

## The extended command set

The controller and the device talk through `rbs_pkg::ddr_cmd_t`. It holds the usual DDR2
fields plus a **buffer index**. The buffer index is the one real change to the DDR2
interface: once buffers are no longer tied to banks, each command has to say which buffer it
means.

| command | fields used | effect in the device |
|---|---|---|
| `ACT` | bank, row, buf_id | copies the row from the bank's array into the buffer. The array is read at edge t, the crossbar registers the row at t+1, and the buffer loads it at t+2. |
| `READ` | buf_id, col | reads one burst from the buffer. `rdata_valid` rises CL cycles after the cycle that carried the command. |
| `WRITE` | buf_id, col, wdata | writes one burst into the buffer at the sampling edge. |
| `PRE` | buf_id (controller also sets bank) | writes the buffer back, through the crossbar, into the bank and row it came from. The device keeps the bank and row of each buffer itself. |
| `REF` | – | auto refresh. The behavioural arrays do not leak, so the device does nothing. The controller still keeps the refresh spacing. |

A burst is BL × DQ = 16 bits. It moves as one word per command. The two transfers per clock
on the real pins are not modelled.

**Clean buffers are never written back.** Only a modified buffer costs a `PRE`. An unmodified
buffer is simply reloaded by the next `ACT`, and the array is trusted to have restored its own
copy of the row. Because of this the array stays busy for tRAS + tRP after every activation.
Without this rule, preferring unmodified victims would save nothing.

## Controller: how a request is served

Requests are one burst each. They use a valid/ready handshake, the address
`{row[13:0], bank[1:0], burst[8:0]}` and a 4-bit tag. Read data comes back with the tag of
its request.

### Request queue (`rbs_sched_queue`)

Requests wait in an 8-entry queue, kept in arrival order. When the command engine is free,
the queue offers it:

- the **oldest request whose row is already open** in one of the buffers, so a hit does not
  wait behind an activation;
- the **oldest request**, if none hits, or if that request has already been passed over 16
  times (this stops misses from starving).

Two requests to the same address share their bank and row, so both hit or both miss, and the
older one is always found first. Their order therefore needs no extra check. Reads to
different addresses can finish out of order, and the tag tells them apart.

### Command engine

The engine serves one request at a time:

1. **S_IDLE** takes the request the queue offers. If the refresh interval has run out, it
   goes to S_REF instead and takes nothing.
2. **S_LOOK** searches the directory for (bank, row).
   - Hit: go to S_COL.
   - Miss: take the victim the directory offers. If the victim is modified, go to S_PRE;
     otherwise go to S_ACT.
3. **S_PRE / S_ACT / S_COL** each wait until `rbs_timing` reports that the bank, the buffer
   and the data bus are ready. Then they issue their command and update the directory.

**Hit overlap.** While the engine waits on the timing of a miss (in S_PRE, S_ACT, or S_COL
before tRCD has passed), the queue's offered request can go ahead if it hits a *different*
buffer. Its READ or WRITE is issued straight from the queue in any cycle where the engine
itself issues nothing and that buffer and the data bus are ready. A miss that must write
back a victim therefore often looks like `PRE, READ (other request), ACT, READ`. Only hits
overlap this way. A second miss never starts its PRE or ACT early.

The engine puts the tag of each READ into a short FIFO. The device returns read data in READ
order, so the FIFO's head is the tag of the data that is arriving.

### Choosing a victim (`rbs_buffer_table`)

The directory picks the victim in this order:

1. an empty buffer, lowest index first;
2. otherwise the least recently used *unmodified* buffer;
3. otherwise, when every buffer is modified, the least recently used modified buffer. That
   buffer is written back with `PRE` before it is reloaded.

Recency is a rank per buffer: 0 is the most recent and NBUFS-1 the least. A use moves the
used buffer to rank 0 and moves every buffer that ranked ahead of it back by one.

This policy has a consequence that is easy to miss. Modified buffers stay open until *all*
buffers are modified. A mix of one clean buffer and three dirty ones therefore recycles the
clean buffer on every miss. `tb_rbs_full` and `tb_rbs_controller` show this on purpose.

### Timing (`rbs_timing`)

At the defaults the clock is 5 ns, and each value is rounded up to whole clocks. With shared
buffers, each constraint has to be tied to a resource. Here is how this design ties them:

| constraint | applies to | cycles |
|---|---|---|
| ACT → READ/WRITE | that buffer: tRCD + crossbar | 3 + 1 |
| ACT → ACT on the same bank | that bank: tRAS + tRP | 8 + 3 |
| ACT → PRE of that buffer | that buffer: tRAS | 8 |
| PRE → ACT on the bank written back | that bank: tRP + crossbar | 3 + 1 |
| PRE → reloading that buffer | that buffer: tRP | 3 |
| column → column (read → write too) | data bus: tCCD | 2 |
| WRITE → READ | data bus: BL/2 + tWTR | 2 + 2 |
| REF → any ACT | all banks: tRFC | 21 |
| REF → REF | refresh interval | 14000 |

A counter loaded with N at edge t lets the dependent command be sampled at edge t+N.
The part's timing list has no separate read-to-write figure, so a WRITE after a READ also
waits only tCCD. A real DDR2 bus needs a turnaround gap there. Raise the read-to-write
spacing in `rbs_timing` if the device model is replaced by a real part.

### Latencies at the defaults

These numbers count from the request handshake to read data, on an idle controller:

| case | cycles |
|---|---|
| hit | 6 (queue 1, engine 1, decode 1, CL 3) |
| miss into an empty or clean buffer, bank ready | 10 |
| miss with a dirty victim | at least 13 |

## Parameters

Every module takes its defaults from `rbs_pkg`.

| parameter | default | origin |
|---|---|---|
| NBANKS, NBUFS | 4, 4 | the RBS scheme: four banks share their four buffers |
| QDEPTH, MAX_BYPASS, TAG_W | 8, 16, 4 | this design's choice (queue depth matches an 8-entry load/store queue) |
| T_RCD, T_RP, T_RAS, T_CCD, T_WTR | 15, 15, 40, 10, 10 ns | DDR2-400 part MT47H128M4B6-5E |
| T_REFI | 70 µs | as given for that part in the RBS evaluation |
| T_XBAR | 1 cycle | the RBS crossbar |
| ROWS, COLS, DQ | 16384, 2048, 4 | 512 Mb x4 DDR2 organisation (this design's reading of the part) |
| BL, CL | 4, 3 | this design's choice for the -5E speed grade |
| T_RFC | 105 ns | this design's choice (512 Mb refresh cycle time) |

One point in the table is this design's reading. The only refresh figure available for the
part is 70 µs "between refreshes", and it is used as the refresh interval. The data sheet's
7.8 µs is *not* used. Change `TREFI_NS` in `rbs_pkg` if you need it.

## Departures and simplifications

- **Interleaving is limited to hits.** Column commands of hits fill the gaps of a miss.
  Two misses never overlap, even to different banks: the PRE/ACT of the next miss waits until
  the current request has issued its column command.
- **Write data travels with the WRITE command.** There is no write latency.
- **Refresh keeps the buffers open.** The buffers are outside the arrays.
- **The crossbar has two sets of multiplexers.** One set (one multiplexer per buffer) loads
  buffers; a second set (one per bank) writes buffers back. Both paths are registered.
- **The cell arrays are behavioural.** `dram_bank_array` is a plain memory with a whole-row
  read and a whole-row write. It does not model sensing, restore, or the need for refresh.
- **No DDR2 pin interface.** There is no DDR2 PHY, DQS, ODT or mode-register logic.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dram_bank_array` | row restore and activation read, one-cycle read latency, read-before-write on the same edge |
| `tb_row_buffer` | random loads, burst writes and reads against a model row |
| `tb_rbs_crossbar` | random selections on both paths, data and strobes one cycle later |
| `tb_rbs_sched_queue` | every offered request against a reference queue with random directory contents and engine stalls; reordering, the bypass limit and a full queue all occur |
| `tb_rbs_buffer_table` | hits and victim choice against a reference that keeps recency as an ordered list; all three victim cases occur |
| `tb_rbs_timing` | every spacing in the timing table above, and the refresh interval |
| `tb_rbs_sdram` | device alone: data, exact CL, write-back to the right bank and row, several buffers holding one bank |
| `tb_rbs_controller` | exact command sequence per request (hit / clean miss / dirty miss), data, command spacing, read tags, a 6-cycle hit, four open rows of one bank, refresh, and a hit overlapped with a write-back miss (`PRE READ ACT READ`) |
| `tb_rbs_memory_system` | end to end at 16 rows × 32 columns per bank, with back-to-back phased traffic where ~95 % of requests go to one bank per phase. It checks every read by tag and counts hits, activations, write-backs, shared-bank activations, refreshes that hold a request, reads delayed by write-to-read, requests served ahead of older ones, and hits overlapped with a miss. It fails if any of these never occurs. |
| `tb_rbs_reuse_workload` | reads cycling over k rows of one bank (reusability distance k−1): exact miss count per k, and the same four rows spread over four banks |
| `tb_rbs_full` | the top at full default size (64 MB of arrays): writes, read-back, four open rows of one bank, and the first refresh at cycle 14000 |

On the phased traffic in `tb_rbs_memory_system`, the row hit rate is about 83 % with
reordering. The 6000 requests take 24872 cycles. 617 hits are overlapped with a miss. With
the overlap lane removed and everything else equal, the same traffic takes 26574 cycles.

`tb_rbs_reuse_workload` reads 60 times in turn from k rows of bank 2 (16 rows × 32 columns
per bank, one read at a time). Each read waits for its answer plus 12 cycles:

| rows in the cycle | row misses | mean read latency (cycles) |
|---|---|---|
| 1, 2, 3, 4 (bank 2) | 1, 2, 3, 4 | 6.0, 6.1, 6.2, 6.2 |
| 5 (bank 2) | 60 | 10.0 |
| 4, one per bank | 4 | 6.2 |

With one buffer per bank, every cycle of two or more rows in a bank would miss on each access.
Four shared buffers keep a reuse cycle of up to four rows open, which is the gain the scheme
aims for. The testbench only reads. Rows that were written stay open until every buffer is
modified, and they would take buffers out of the cycle.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rbs_pkg.sv tb/tb_rbs_memory_system.sv \
          --top-module tb_rbs_memory_system -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Swap in any other testbench the same way; `-Irtl` lets Verilator find each module in
`rtl/<name>.sv`. `tb_rbs_full` takes about 15 s of wall time.
