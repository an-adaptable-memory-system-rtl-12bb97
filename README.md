# Reconfigurable-row DRAM: overlapping accesses to different rows of one bank

A conventional DRAM bank has one open row. When several processor cores miss
in their caches at the same time, their addresses usually fall in different
rows of the same bank. The bank then has to serve them one at a time, each
with a full precharge, row activation and column access.

The reconfigurable-row DRAM (RRDRAM) cuts every physical row into **row
segments**. Here that is 16 segments of 64 columns in a 1024 x 1024 array.
Each segment has its own **row latch**, so segment 0 can have part of row 896
open while segment 1 has part of row 82. Together, the open segments form one
*logical* row, assembled from pieces of several physical rows in the order the
processors asked for them. This is the "adaptable row".

Each segment sequences its own access. Address decoding is split into latched
stages. Together these let the device run accesses to different rows as a
pipeline:

- a new access starts every two clock cycles;
- each access delivers its data six cycles after its row address;
- each segment precharges on its own, right after it delivers its data,
  while other segments are still working.

For N misses spread over different segments, the cost is one access latency
plus N data transfers, not N full random accesses.

This repository holds synthesizable SystemVerilog for the device, for a
memory controller that feeds it, and a system top that joins the two.
Self-checking testbenches come with it.

## Structure

```
rr_system                       top: controller + device
├── rr_mem_ctrl                 request port -> multiplexed RAS/CAS bus, id return
└── rrdram                      the device
    ├── rr_addr_latch           row address latch, column address latch (+ write data)
    ├── rr_row_decoder          row address -> 1 of 1024 ROW lines
    ├── rr_col_decoder          column -> 1 of 1024 column lines, segment -> 1 of 16 RlClk
    ├── rr_row_seg_latch        16 x 1024 flip-flops: word lines of each segment (RLS0..RLS15)
    ├── rr_col_dec_latch        1024 flip-flops: active column of every access in flight
    ├── rr_seg_ctrl   x16       per-segment access sequencer
    └── rr_dram_segment x16     1024 x 64 cells, sense amplifiers, write driver
rr_pkg                          sizes, default waits, latency formulas
```

## The row segment latches and the adaptable row

The row decoder drives 1024 ROW lines, and these run past the latches of all
16 segments. Segment *s*'s latch has one flip-flop per row. When the segment
decoder raises `RlClk[s]`, that latch stores the ROW lines, so exactly one of
its flip-flops holds a 1. The flip-flop's output is the word line of that row,
*inside segment s only*. The other 15 latches keep whatever rows they hold.

That is the whole trick. The cost is 16 x 1024 flip-flops in place of one
shared word-line driver per row.

The column side works the same way. The **column decoder latch** has one
flip-flop per column. In each access's latch cycle, that access's decoded
column is ORed in, and a feedback path keeps the columns of earlier accesses.
At any moment it holds at most one active column per segment. Each segment
takes its 64-bit slice of it as its column enables.

In the original circuit, RlClk is a separate clock for each segment's
flip-flops. Here the design has a single clock, so RlClk is a load enable
sampled at the clock edge. The behaviour at cycle level is the same.

## One access, cycle by cycle

Cycles are counted from the cycle in which `ras_n` is low. The defaults are
T_RD = T_CAC = T_PR = 1.

| cycle | bus                    | what happens                                                                 |
|-------|------------------------|------------------------------------------------------------------------------|
| 0     | row address, `ras_n`=0 | row address latch stores the row (LR)                                        |
| 1     | column, `cas_n`=0      | column address latch stores column, `we_n` and `din` (LC)                    |
| 2     | next access's row      | row and column decoded; `RlClk[seg]` loads the segment's row latch and ORs the column into the column decoder latch (LS). The segment's write driver stores the write flag and data. |
| 3     |                        | word line on, row sensed into the segment's sense amplifiers (wait T_rd)     |
| 4     |                        | column enable: the datum moves from the sense amplifier to the read latch, or is written to the sense amplifier and the cell (encl) |
| 5     |                        | wait T_cac; at its end the output latch takes the datum                      |
| 6     |                        | `dout_valid`=1, `dout` holds the datum; the segment precharges (pre)         |
| 7     |                        | segment idle: row latch, its column bits and sense amplifiers cleared        |

In general:

- read latency = 4 + T_RD + T_CAC cycles;
- the segment is busy from cycle 3 to cycle 3 + T_RD + T_CAC + T_PR − 1.

The next access may put its row on the bus in cycle 2. Its own LS step is
then in cycle 4, in another segment. The row address latch and the segment
row latches load at the same clock edge. That is what lets the bus carry the
next row while the previous row is still being latched into its segment.

### The one rule: do not reuse a busy segment

A segment holds one row, so a second access to the same segment must wait
until the first has precharged. In RAS cycles, two accesses to one segment
must be at least

    SEG_GAP = 2 + T_RD + T_CAC + T_PR      (5 cycles by default)

apart. Accesses to different segments only need the two-cycle bus spacing,
whatever rows they address.

The device does not queue or reject a violating access. `rr_seg_ctrl` raises
`conflict` (brought out as `seg_conflict`) and an assertion fires. Preventing
this is the controller's job.

## Memory controller

`rr_mem_ctrl` accepts one request per cycle on a valid/ready port. A request
is {20-bit address, write flag, write data, 7-bit id}. The address is
{row[9:0], column[9:0]}, and column[9:6] is the segment.

For each request:

1. In the accept cycle, the controller drives the row onto the bus with
   `ras_n` low.
2. In the next cycle, it drives the column with `cas_n`, `we_n` and the write
   data.
3. It then accepts the next request.

It never waits for data, so with a steady supply of requests it starts an
access every two cycles.

A per-segment countdown blocks a request whose segment was started fewer than
SEG_GAP cycles ago. While it waits, `stall_seg` is high and the bus is idle.
Requests are served strictly in order. The request's id enters a delay line
in the CAS cycle and comes out with the read data, `READ_LAT` cycles after
the RAS cycle. An assertion checks that the device's `dout_valid` lines up
with that delay line.

## Interfaces

`rr_system` (top):

| port                | dir | width | meaning                                                  |
|---------------------|-----|-------|----------------------------------------------------------|
| `clk`, `rst_n`      | in  | 1     | clock; asynchronous active-low reset                     |
| `req_valid/ready`   |     | 1     | request handshake, transfer when both high               |
| `req_we`            | in  | 1     | 1 = write                                                 |
| `req_addr`          | in  | 20    | {row, column}                                            |
| `req_wdata`         | in  | 8     | write data                                               |
| `req_id`            | in  | 7     | requester tag, returned with read data                   |
| `rsp_valid/data/id` | out | 1/8/7 | read data, 6 cycles after the request was accepted        |
| `issue`             | out | 1     | an access starts this cycle                              |
| `stall_seg`         | out | 1     | the waiting request's segment is still busy              |
| `seg_busy`          | out | 16    | segments holding an access                               |
| `seg_conflict`      | out | 1     | protocol error inside the device (never with the controller) |

`rrdram` (device) has a conventional multiplexed DRAM bus: `ras_n`, `cas_n`,
`we_n`, `addr[9:0]`, `din[7:0]`, `dout[7:0]`, `dout_valid`.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `ROWS`    | 1024    | array size of the design |
| `COLS`    | 1024    | array size of the design |
| `NSEG`    | 16      | 16 segments of 64 columns, as in the design |
| `DATA_W`  | 8       | this implementation's choice: width of one column access |
| `T_RD`, `T_CAC`, `T_PR` | 1, 1, 1 | cycles; read from the reference timing chart (one wait slot each) |
| `ID_W`    | 7       | this implementation's choice (up to 128 requesters) |

All modules take their defaults from `rr_pkg`. Each wait must be at least one
cycle.

At the defaults, the device synthesizes to about 26k flip-flops and 8 Mbit of
memory. The flip-flops break down as follows:

- 16 x 1024 in the row segment latches;
- 1024 in the column decoder latch;
- 16 x 512 in the sense amplifiers;
- the rest in sequencers and latches.

## Where this implementation departs from, or adds to, the reference design

- **Data width.** The reference design counts columns of single cells. Here
  each column carries 8 bits, as if eight bit planes shared the decoders and
  latches.
- **Writes.** The reference design describes the pipelined read. Writes here
  follow conventional DRAM practice: the write flag and data are sampled with
  CAS, and the write goes through the sense amplifier to the cell at column
  enable. A write produces no data slot.
- **One datum per access.** The performance argument talks about transferring
  a cache block per miss. No burst is built: each access moves one column.
- **Precharge clears state.** At the end of precharge, the segment's row
  latch, its bits in the column decoder latch and its sense amplifiers are
  cleared. The reference design says each segment precharges on its own after
  delivering data; how the latches are released is this design's choice.
- **Segment conflicts** are handled by the controller holding the request.
  The reference design does not discuss two misses to one segment.
- **Analogue parts.** Cell charge, bit-line sensing and restore, and refresh
  are not modelled. The cell array is a plain memory, and the sense
  amplifiers are a 512-bit register per segment.
- **Not included:** the processors and caches, banks, refresh, and any timing
  other than the one-cycle waits of the timing chart. The waits are
  parameters.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench              | what it establishes |
|------------------------|---------------------|
| `tb_rr_addr_latch`     | random RAS/CAS/idle traffic against a latch model |
| `tb_rr_row_decoder`    | all 1024 rows, enable on and off |
| `tb_rr_col_decoder`    | all 1024 columns; RlClk = column / 64 |
| `tb_rr_row_seg_latch`  | random loads and clears of all 16 x 1024 word lines |
| `tb_rr_col_dec_latch`  | OR-feedback holding several columns; per-segment clear |
| `tb_rr_dram_segment`   | writes then reads across activations, full size |
| `tb_rr_seg_ctrl`       | exact strobe cycles for (1,1,1) and (3,2,2) waits |
| `tb_rrdram`            | the four-row example (data at +6, +8, +10, +12 cycles); 3000 random reads and writes with exact 6-cycle latency |
| `tb_rr_mem_ctrl`       | bus protocol, two-cycle issue, segment gap of exactly 5 when waiting, id return |
| `tb_rr_system`         | end to end at full size: 8 requesters, 6000 accesses, latency, data, ids; counts two-cycle starts, different rows open at once, segment waits |
| `tb_rr_scalability`    | Np = 10..100 simultaneous misses (see below) |

`tb_rr_scalability` replays the performance model's scenario: Np cores, one
miss each, all arriving together.

- When the misses hit Np different rows spread over the segments, all the
  data is back after exactly 6 + 2(Np − 1) cycles. That is the
  "Ta + Np·Tf" behaviour.
- With random addresses, it reports how many cycles segment conflicts add.

It also prints the analytical scalability (Np·Ts/Tm) for single-open-row DRAM
and for RRDRAM. It uses 0.15 ns per instruction, 10^9 instructions, a 0.0006
miss rate, Ta = 30 ns and Tf = 12.8 ns. For example, at Np = 100 that gives
6.5 and 18.8.

To run a testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal rtl/rr_pkg.sv tb/tb_rr_system.sv \
    -y rtl --top-module tb_rr_system --Mdir obj_sys -o sim
./obj_sys/sim
```

The same command works for any other testbench name. Each testbench runs in
well under a second of simulation time. Building the full-size system takes
about ten seconds.
