# Page Hit Aware Write Buffer (PHA-WB) for FB-DIMM DRAM

In open-page DRAM every access to a row that is not the open row of its bank
costs a precharge and an activate. Much of the DRAM's power goes into those
activates. Only reads hold up the processor, so writes can wait. The Page Hit
Aware Write Buffer uses this. It sits in the advanced memory buffer (AMB) of a
fully buffered DIMM, between the command decoder and the DDR I/O port:

- Reads pass through at once and are never reordered.
- A write to a row that is already open goes straight to the DRAM.
- A write to a closed row is parked in the buffer.
- A parked write is sent to the DRAM right after some other operation opens
  its row, so it becomes a page hit instead of a page miss.

The memory controller does not see the buffer. When it reads a line that is
still parked, the parked data replaces the outdated DRAM data on its way back.
Fewer activates mean less DRAM power and a cooler DIMM. Searching the buffer
adds no cycle to a read. The only wait a read can see is behind writes that
are being drained into a row that has just been opened.

This repository holds synthesizable SystemVerilog for the buffer and its
control. It also has self-checking testbenches, a behavioural DDR2 model and
a traffic generator.

## How an operation is handled

Operations are 64-byte lines: read, write or refresh. One operation per cycle
may enter the **operation queue**, which feeds the DDR I/O port in order.
Whatever enters the queue has two side effects:

1. Its row is written into the **Activated Rows Table**, which has one entry
   per bank. A refresh clears the whole table instead. The table therefore
   shows the open rows as they will be when the queue reaches the DRAM.
2. Its address is broadcast to the **CAM** of the Write Buffer. Every
   buffered write in the same row of the same bank (a *row match*) is marked
   *pending*.

Pending writes take priority. While any are pending, one leaves the buffer
for the queue each cycle, and no new operation is taken. This keeps each of
them directly behind the operation that opened its row, so none can be
pushed out by another row of the same bank first. Without pending writes, the
decoded operation is handled like this:

| operation | condition | action |
|---|---|---|
| read | — | Enters the queue. A Read FIFO slot is allocated. If a buffered write holds the same line (an *address match*), its data goes into the slot. The buffered write is then drained as a row match. |
| refresh | — | Enters the queue and closes every row in the table. |
| write | row open | Enters the queue (*direct*). A buffered write to the same line is now stale and is dropped. |
| write | row closed, same line buffered | Overwrites that entry (*coalesce*). |
| write | row closed, free entry | Goes into the lowest free entry (*buffer*). |
| write | row closed, buffer full | A pseudo-random entry is *evicted* into the queue, and the new write takes its place. The evicted write opens its row, so any other buffered writes to that row follow it. |

Two invariants follow, and the end-to-end test checks them:

- Every write that reaches the DRAM as a page miss is an evicted one. Direct
  and drained writes are always page hits.
- Every line is held in the buffer at most once. A read therefore has at most
  one address match.

## Read data replacement

The DRAM takes much longer to return data than the CAM takes to search. The
search is done when the read enters the queue. If a buffered write holds the
line, its 64 bytes are copied into the read's slot in the **Read FIFO**, and
the slot is flagged as replaced. The buffered entry may leave the buffer on
the next cycles, because the slot already holds the copy.

DRAM read data comes back in issue order and fills the oldest waiting slot.
In a replaced slot that data is dropped. A slot leaves the FIFO only after its
DRAM data has arrived. A replaced read therefore comes back in exactly the
cycle a normal read would: order and timing stay unchanged.

A read enters the queue only when the Read FIFO has a free slot. This is why
the DRAM side needs no backpressure.

## Address map

The address map is that of a 1 GB module. It is built from 512 Mb ×8 DDR2
devices with 4 banks, 16384 rows and 256 columns of 4 bytes each, and runs
with a burst length of 8:

| bits | meaning |
|---|---|
| 1:0 | byte within a column |
| 4:2 | column within a burst (32 bytes per bank) |
| 5 | bank within a bank pair (one burst on a pair moves 64 bytes) |
| 10:6 | 64-byte section of a row |
| 15:11 | bank pair (32 pairs of the module's 64 banks) |
| 29:16 | row (16384) |

Bits 5:0 lie inside a 64-byte line, and both banks of a pair always open the
same row. The buffer therefore treats the 32 bank pairs as its independent
banks. The CAM stores bits 29:6. A row match compares bits 29:11; an address
match compares all of bits 29:6.

## Blocks and files

| file | block |
|---|---|
| `rtl/pha_wb_pkg.sv` | Address map constants, `op_e` opcodes, `line_addr_t` and `cmd_t` structs, `same_row()`. |
| `rtl/pha_wb.sv` | **Top.** Buffer control: drain priority, the decision table above, the pending set, and wiring. |
| `rtl/cmd_decoder.sv` | Splits the address into fields. One register stage. Drops the reserved opcode 3. |
| `rtl/activated_rows_table.sv` | Open row per bank pair, with a valid bit. Lookup, update, clear-all. |
| `rtl/wb_cam.sv` | Write Buffer tags. Address match (port A), row match (broadcast port B), free-entry search, tag read. |
| `rtl/wb_data_array.sv` | Write Buffer data, 64 bytes per entry. One write port and two asynchronous read ports. |
| `rtl/victim_select.sv` | 16-bit LFSR (x^16+x^15+x^13+x^4+1) modulo the entry count. Picks the eviction victim. |
| `rtl/op_queue.sv` | In-order queue to the DDR I/O port. |
| `rtl/read_fifo.sv` | Read return FIFO with replacement. |

### Top-level interface (`pha_wb`)

| group | signals | notes |
|---|---|---|
| request | `req_valid/ready`, `req_op[1:0]`, `req_addr[29:0]`, `req_wdata[511:0]` | 0 read, 1 write, 2 refresh, 3 reserved (dropped, `ev_bad_cmd`) |
| response | `rsp_valid/ready`, `rsp_data` | one per read, in request order |
| to DRAM | `dram_cmd_valid/ready`, `dram_cmd_op`, `dram_cmd_addr`, `dram_cmd_wdata` | in the order the DRAM must execute them |
| from DRAM | `dram_rd_valid`, `dram_rd_data` | in issue order, no backpressure |
| monitor | `ev_direct`, `ev_buffer`, `ev_coalesce`, `ev_evict`, `ev_drain`, `ev_forward`, `ev_bad_cmd`, `wb_count` | one-cycle event pulses and current occupancy |

The DDR I/O port behind `dram_cmd_*` must run the rows open-page and in queue
order: it opens the row an operation needs and otherwise leaves rows open. It
is not part of this RTL. Neither are the FB-DIMM serial link, the memory
controller and the DRAM devices.

Timing: an operation accepted on clock edge *t* is decoded and enters the
operation queue on edge *t+1*, provided nothing is pending and there is room.
It is offered on `dram_cmd_*` from edge *t+2* on. Reads take this path whether
or not they are replaced. The buffer sustains one operation per cycle, except
while pending writes drain. Reset is asynchronous and active low. It empties
the buffer, the queues and the table.

### Parameters of `pha_wb`

| parameter | default | meaning |
|---|---|---|
| `WB_ENTRIES` | 64 | Buffer entries. 16 and 32 are the smaller configurations. 64 entries hold 4 kB. |
| `DATA_W` | 512 | Bits per line (64 bytes). |
| `OPQ_DEPTH` | 8 | Operation queue depth (own choice). |
| `RDQ_DEPTH` | 16 | Read FIFO slots, which also bounds the reads in flight (own choice). |

The address map constants live in `pha_wb_pkg`. At the defaults, synthesis
gives about 780 flip-flop bits outside memories and 47 kbit of memory
(32 kbit of it is the buffer data).

## Design choices beyond the base scheme

The base scheme sets the structure: command decoder, Activated Rows Table,
CAM plus data array, operation queue and Read FIFO. It also sets the three
cases in which a buffered write goes to the DRAM (row match, address match
with a read, random eviction when full). Everything below is specific to this
implementation:

- **Drain before new input.** Row-matched writes are sent "after the current
  operation". Here that means right after it, ahead of any new operation. A
  read arriving during a drain waits one cycle per drained write at the queue
  entrance. The alternative would let a later operation close the row first
  and turn the drain back into page misses.
- **Coalescing and stale-entry removal.** The base scheme does not say what
  happens when a new write meets a buffered write to the same line. Here a
  write to a closed row overwrites that entry. A write to an open row drops
  it, because otherwise the older data would be drained later over newer
  data.
- **Random victim.** Evicting the oldest entry is the obvious alternative,
  but it needs age tracking across all entries. A random victim costs only an
  LFSR, and at 64 entries it changes the page hit rate by about 1.4 % on
  average.
- **64-byte operations.** Writes are 64 bytes (write-through L2). A 128-byte
  L2 line fill is expected as two 64-byte reads.
- **Row field.** The row is taken as bits 29:16, which matches 16384 rows per
  bank and leaves bits 15:11 to the bank pairs.
- **Refresh** is an operation in the queue that closes all rows in the table.
  Explicit PRECHARGE and ACTIVATE are left to the DDR I/O port.
- Handshakes, queue depths, one queue entry per cycle, asynchronous reads of
  the data array, the opcode encoding and reset behaviour are all own choices.

## Verification

Every block has a self-checking testbench in `tb/` that compares against a
reference model written in the testbench. Each ends with a line
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_pha_wb` | End to end, **at the full default size**, against the DDR2 model `tb/ddr2_dram_model.sv`. Scoreboard on all read data. A read reaches the DRAM port 2 cycles after acceptance, replaced or not. A write to a closed row is buffered and one to the open row is not. A buffered write drains once a read opens its row. DRAM write misses equal evictions. Every mechanism occurs: direct, buffered, coalesced, evicted, drained, replaced read, refresh, reserved opcode, input stall, response backpressure, full buffer. |
| `tb_pha_wb_sizes` | Streaming copy-loop traffic (4 cores, reads and writes on conflicting rows of one bank pair) through 16-, 32- and 64-entry buffers. Data must be correct, and the DRAM page hit rate must beat the same request stream without the buffer. Typical result: 61.8 / 65.9 / 66.6 % with the buffer against 26.5 / 31.5 / 24.9 % without (each size sees its own random interleaving of the cores). |
| `tb_cmd_decoder`, `tb_activated_rows_table`, `tb_wb_cam`, `tb_wb_data_array`, `tb_victim_select`, `tb_op_queue`, `tb_read_fifo` | Unit tests with random stimulus. The LFSR test checks the full period of 65535. The Read FIFO test checks that a replaced read does not come out early. |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pha_wb_pkg.sv tb/tb_pha_wb.sv --top-module tb_pha_wb -o sim
./obj_dir/sim
```

Replace `tb_pha_wb` with any other testbench name. Every run finishes in well
under a second. The RTL also has assertions that stop a simulation run with
`--assert`:

- no input is taken while drains are pending;
- at most one entry matches a line;
- the queue never overflows;
- the DRAM never returns data for a read that was not issued.

### Limits of what is shown

- The traffic is synthetic. Page hit rates from real benchmark traces, and
  the DRAM power and temperature they imply, are not reproduced.
- The DRAM model has no timing beyond a fixed read latency. The ordering and
  open-row rules of a real DDR I/O port are assumed, as stated above.
- The buffer data is a register array. A real implementation would use an
  SRAM macro, and a CAM built for this, to reach the low power overhead the
  scheme relies on.
