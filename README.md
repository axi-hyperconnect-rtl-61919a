# HyperConnect: a predictable AXI interconnect for FPGA accelerators

Accelerators in the programmable logic of an FPGA SoC all reach DRAM through a
small number of AXI ports into the processing system. A conventional
interconnect merges them with round-robin arbitration. That arbitration is
unfair when the accelerators use different burst lengths, and it gives no way
to stop one accelerator from flooding the bus. This matters when accelerators
of different criticality share the chip under a hypervisor.

This repository is a SystemVerilog implementation of the AXI HyperConnect
architecture. It is an N-to-1 AXI4 interconnect that gives every accelerator
port four properties:

* **a fixed, short latency**: 4 cycles on an address channel and 2 cycles on a
  data or response channel, with nothing contending;
* **fair arbitration**: every request is cut into bursts of one *nominal*
  length before arbitration, and the outstanding transactions of each port are
  capped;
* **bandwidth reservation**: each port has a budget of transactions it may
  issue in each reservation period, and all budgets are recharged together;
* **decoupling**: any port can be cut off from memory at run time.

A hypervisor sets all of these at run time through an AXI4-Lite register
interface.

## Structure

```
 accelerator 0 ─► eFIFO (slave) ─► transaction supervisor ─┐
 accelerator 1 ─► eFIFO (slave) ─► transaction supervisor ─┤
     ...                                                   ├─► EXBAR ─► eFIFO (master) ─► memory port
 accelerator N-1 ► eFIFO (slave) ─► transaction supervisor ─┘
                                            ▲
 control (AXI4-Lite) ─► hc_ctrl_if ─► hc_central_unit (period pulse, soft reset)
```

| file | role |
|---|---|
| `rtl/hc_pkg.sv` | AXI channel structs, encodings, widths, response merge |
| `rtl/hc_fifo.sv` | one-cycle circular-buffer FIFO, ready whenever not full |
| `rtl/hc_efifo.sv` | five FIFOs (AR, AW, W, R, B) forming a buffered AXI port; slave variant can decouple |
| `rtl/hc_ts_read.sv`, `rtl/hc_ts_write.sv` | read and write management: split, limit, merge |
| `rtl/hc_ts.sv` | transaction supervisor of one port: both halves plus the reservation budget |
| `rtl/hc_rr_arbiter.sv` | round-robin arbiter, one grant per port per round |
| `rtl/hc_exbar.sv` | crossbar: AR/AW arbitration, routing buffers, R/W/B steering |
| `rtl/hc_central_unit.sv` | reservation period counter and datapath reset |
| `rtl/hc_ctrl_if.sv` | AXI4-Lite register file |
| `rtl/hyperconnect.sv` | top level |

### Latency budget

Only the address channels carry a register per stage. Data and responses pass
through the supervisors and the crossbar combinationally and are registered
only in the two eFIFOs.

| channel | slave eFIFO | supervisor | EXBAR | master eFIFO | total |
|---|---|---|---|---|---|
| AR, AW | 1 | 1 | 1 | 1 | **4** |
| R, W, B | 1 | 0 | 0 | 1 | **2** |

These are the latencies of the published design, and the end-to-end testbench
measures exactly these values. A read therefore costs 6 cycles of interconnect
latency. A write costs 8: 4 on AW, 2 on W and 2 on B.

## Transaction supervisor

This is where the interconnect's predictability comes from. Each port has one.
Its read and write halves are independent, and both halves draw on one
reservation budget.

**Burst equalisation.** Suppose a request of `B` beats arrives and the nominal
length is `NOM` (the NOMINAL register, default 16). The request then leaves the
supervisor as `ceil(B/NOM)` pieces of `NOM` beats, with the last piece shorter.
For INCR bursts the address advances by `NOM << size` from one piece to the
next. FIXED bursts keep their address. A WRAP burst or a request of at most
`NOM` beats passes unchanged. The original request is held in one register,
which is the supervisor's one cycle of AR/AW latency. A new request is taken
in the same cycle the previous request's last piece leaves, so splitting adds
no bubbles. Measured with the workload testbench, 4 MB of 16-word bursts
streams at one beat per cycle in both directions at once.

**Merging reads.** Each issued piece pushes `{original ID, final piece?}` into
a small queue. On the way back, R beats get the original ID from the head of
the queue. RLAST is hidden on every piece except the final one, so the
accelerator sees one burst of the length it asked for. The entry leaves the
queue on the RLAST of its piece.

**Splitting write data and merging responses.** A second queue holds the beat
count of every issued write piece. W beats are let through only once their
piece's address has left. WLAST is regenerated at each piece boundary, and the
accelerator's own WLAST is ignored. A third queue holds `{ID, final?}` for
every piece. B responses of non-final pieces are consumed inside the
supervisor. The final piece's response is passed on carrying the worst code of
all the pieces (`DECERR > SLVERR > EXOKAY > OKAY`). This is this design's
choice: an error in any piece is reported, instead of being lost.

**Outstanding limit.** A piece is issued only while fewer than MAXOUT pieces
of that direction are in flight. MAXOUT is a register, and the parameter
`MAX_OUT` (default 8) is its hardware ceiling. The limit is counted in pieces,
after splitting, so a port with long bursts cannot hold more of the memory
pipeline than a port with short ones.

**Reservation budget.** While reservation is enabled (CTRL bit 0), every
issued piece costs one unit of the port's budget. A port with an empty budget
waits until the next recharge, and the `budget_stall` output shows this. The
recharge pulse from the central unit reloads every port's budget from its
BUDGET register at the same moment. Unused budget is not carried over. If a
read and a write are both ready and only one unit is left, the read takes it.
A piece therefore moves at most `NOM` beats, and a port moves at most
`BUDGET × NOM` beats per period. With reservation disabled, budgets are not
consulted.

## Crossbar (EXBAR) and routing

AR and AW each have a round-robin arbiter that grants one transaction per port
per round. The grant goes into an output register, which is the crossbar's one
cycle of latency. A new grant can be made in every cycle in which that register
is empty or being emptied.

At each grant the winning port number is pushed into a routing buffer, which
is a circular FIFO. There are three: one for R, one for W and one for B. The
memory side must answer in order, so the head of each buffer always names the
owner of the current R burst, W burst or B response. The crossbar steers those
channels combinationally from that head entry. An entry is released on RLAST,
on WLAST, or on the B handshake respectively. A grant waits if the buffer it
needs is full. Write data are routed in AW grant order, one whole burst at a
time.

**Ordering requirement:** this interconnect does not support out-of-order
completion. The memory port must return reads and write responses in the order
of the addresses. Memory controllers of current FPGA SoCs do this, but a
slave that reorders by ID will corrupt the routing.

## eFIFO and decoupling

Every port, and the master side, is an eFIFO made of five independent FIFOs,
one per AXI channel. Each FIFO is a circular buffer whose `ready` depends only
on its own fill level. It is always ready unless full, so no combinational
path runs through the interconnect from one side's ready to the other. Each
FIFO adds one cycle.

If DECOUPLE bit `i` is set, slave eFIFO `i` drives all of its handshakes
toward the accelerator low, and its payload outputs to zero. Responses that
still arrive for that port are taken and dropped, so a cut-off port cannot
block the shared R and B channels for the others. Requests already queued
toward memory still complete.

A port can be cut off in the middle of a write burst whose address has
already gone out. The accelerator then cannot send the rest of the data, and
the crossbar would wait for that burst's WLAST forever, stalling every port's
writes. To prevent this, the port's write supervisor supplies each missing
beat itself. These filler beats have all byte strobes low, so memory is not
changed, and the burst ends normally. The end-to-end testbench checks this
case: a port sends a write address, withholds the data and is decoupled, and
the other port's writes must still get through.

Clearing the bit reconnects the port. Do this only once the accelerator has
been reset or has finished its bursts: beats it sends afterwards for a burst
that was already filled would be taken as the data of its next write.

## Central unit

The central unit counts clock cycles while reservation is enabled. It pulses
`recharge` in the cycle after reservation is switched on, then every PERIOD
cycles. A PERIOD of 0 is treated as 1. Writing 1 to CTRL bit 1 resets the
whole datapath for one cycle: the eFIFOs, supervisors and crossbar. The
registers keep their values.

## Register map (AXI4-Lite, 32-bit registers)

| offset | name | reset | meaning |
|---|---|---|---|
| 0x00 | CTRL | 0 | bit 0: reservation enable; bit 1: write 1 for a datapath soft reset (reads 0) |
| 0x04 | PERIOD | 1024 | reservation period in clock cycles |
| 0x08 | NOMINAL | 16 | nominal burst length in beats, 1–256 (0 means 256) |
| 0x0C | MAXOUT | MAX_OUT | outstanding pieces per port and direction, clamped to 1..MAX_OUT |
| 0x10 | DECOUPLE | 0 | bit i: port i cut off |
| 0x14 | INFO | – | read only: [7:0] N, [15:8] MAX_OUT |
| 0x40 + 4·i | BUDGET[i] | 0 | transactions (pieces) port i may issue per period |

A write is accepted when AWVALID and WVALID are both high and no write
response is pending. BVALID (OKAY) follows one cycle later. Byte strobes are
not supported: every write replaces the whole register. A read returns data
one cycle after ARVALID. Offsets that are not mapped read 0.

To reserve X% of the bus to port 0 and the rest to port 1, choose a period
`T` and a total budget `S` with `S × NOM ≤ T`, so that the budgets fit within
the period. Then give the ports `X·S/100` and `(100−X)·S/100`. The workload
testbench uses `T = 400` and `S = 20`.

## Top-level interface

`hyperconnect` has these parameters:
* `N` (ports, default 2);
* `FIFO_DEPTH` (eFIFO depth, default 4);
* `MAX_OUT` (outstanding-limit ceiling, default 8);
* `ROUTE_DEPTH` (routing buffer entries, default 16);
* `CTL_AW` (control address width, default 8).

Its ports are:
* **Accelerator ports:** `s_ar/s_aw/s_w/s_r/s_b` are unpacked arrays of the
  channel structs from `hc_pkg`. The `valid`/`ready` signals are `N`-bit
  vectors.
* **Memory port:** the `m_*` signals.
* **Control port:** `ctl_*`, an AXI4-Lite slave.
* **Status outputs:** `budget_stall[N]`, `budget_left[N]` and `recharge`.

Data are 32 bits wide, matching a 16-word burst of 64 bytes. Addresses are 32
bits and IDs 4 bits.

Only the AXI fields the interconnect needs are carried:
* addresses: `id`, `addr`, `len`, `size`, `burst`;
* write data: `data`, `strb`, `last`;
* responses: `id`, `data`, `resp`, `last`.

There is no `cache`, `prot`, `qos`, `lock` or `user`. An 8-bit `len` covers
both AXI3 and AXI4 bursts. The AXI3 write-data ID is not carried, so an AXI3
master must send its write data in address order, as AXI4 requires anyway.

Reset is synchronous and active low (`rst_n`). All logic uses a single clock.

## Where this implementation makes its own choices

The published architecture fixes these:
* the block structure;
* the per-stage latencies;
* round-robin arbitration with one transaction per grant;
* circular routing buffers;
* splitting, merging and the outstanding limit;
* per-port budgets with one common, synchronous period;
* per-port decoupling through a register.

This implementation chose the following:
* FIFO, queue and routing depths;
* the register map and reset values;
* AXI4-Lite as the control bus;
* piece-granular budget accounting shared by reads and writes;
* the read-first tie rule on the last budget unit;
* no carry-over of unused budget;
* the recharge when reservation is enabled;
* worst-code merging of write responses;
* passing WRAP bursts whole;
* dropping responses for a decoupled port;
* completing a decoupled port's cut-off write bursts with zero-strobe beats;
* the soft reset.

## Verification

Each block has a self-checking testbench. Every testbench prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_hc_fifo` | random pushes and pops against a reference queue: order, occupancy, ready = not full, one-cycle latency, one word per cycle |
| `tb_hc_efifo` | all five channels in order with back-pressure; decoupling blocks handshakes and drops responses |
| `tb_hc_ts_read` | random lengths, burst types and nominal sizes against a reference splitter; merged data, IDs and RLAST; outstanding cap; budget gating |
| `tb_hc_ts_write` | the same for writes, plus WLAST regeneration, response merging with injected errors, and filler beats for a burst cut off by decoupling |
| `tb_hc_ts` | transactions per period equal the budget, stall flag, recharge, read-first tie rule, no limit without reservation |
| `tb_hc_exbar` | three ports, four routing entries: round-robin fairness, one cycle on AR, R/B reach only their issuer, W in AW grant order, in-flight bound |
| `tb_hc_central_unit` | recharge timing, period changes, period 0, soft reset |
| `tb_hc_ctrl_if` | every register, reset values, clamping, unmapped offsets |
| `tb_hyperconnect` | end to end at default parameters (see below) |
| `tb_hc_workloads` | the evaluation traffic at default parameters (see below) |
| `tb_hc_stress` | three ports, random back-pressure everywhere, random lengths 1–256, nominal size, limit and budgets changed between rounds (and the nominal size once under traffic); every beat checked against per-port tagged data |

`tb/ha_model.sv` and `tb/mem_slave_model.sv` are behavioural models used by
these testbenches:
* `ha_model` is an accelerator that issues queued reads and writes and checks
  every returned beat.
* `mem_slave_model` is an in-order memory with configurable latency, optional
  random stalls and an address range that answers with SLVERR.

`tb_hyperconnect` runs two accelerators through these phases:
1. register read-back;
2. the latencies (AR 4, R 2, AW 4, W 2, B 2, measured);
3. split and merge with data read back;
4. an error in one piece of a split write;
5. outstanding limit 2;
6. round-robin under contention;
7. 90/10 and 10/90 reservations, checking that no port exceeds its budget in
   any period;
8. decoupling;
9. soft reset;
10. a port decoupled after sending a write address but no data, checking
    that the other port's writes still complete.

It counts every mechanism and fails if any of them never happened.

`tb_hc_workloads` reproduces the evaluation scenarios.

*Transfers:* one port reads while the other writes. Every word is checked.

| transfer | read (cycles) | write (cycles) |
|---|---|---|
| one word | 11 | 9 |
| one 16-word burst | 26 | 24 |
| 16 KB | 4106 | 4104 |
| 128 KB | 32778 | 32776 |
| 4 MB | 1048586 | 1048584 |

*Bandwidth shares:* both ports read and write without pause. Shares are in
data beats per port.

| configuration | port 0 | port 1 |
|---|---|---|
| isolation (port 0 alone) | 16000 beats in 8000 cycles | – |
| no reservation | 50 % | 50 % |
| 90-10 | 90 % | 10 % |
| 70-30 | 70 % | 30 % |
| 50-50 | 50 % | 50 % |
| 30-70 | 30 % | 70 % |
| 10-90 | 10 % | 90 % |

At 90-10, port 0 moves the same number of beats with port 1 flooding as it
does alone.

*Unequal burst lengths:* with reservation off, port 0 reads in 256-beat
bursts and port 1 in 16-beat bursts.

| nominal burst | port 0 | port 1 |
|---|---|---|
| 16 (equalisation on) | 50 % | 50 % |
| 256 (equalisation off) | 94 % | 6 % |

With a nominal burst of 256 nothing is split, so plain round-robin hands the
long-burst port 256 of every 272 beats.

## Simulating

Use Verilator 5 and run from the repository root.

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_hyperconnect \
    -y rtl -y tb +libext+.sv -Irtl rtl/hc_pkg.sv tb/tb_hyperconnect.sv -o sim
./obj_dir/sim
```

Replace `tb_hyperconnect` with any testbench name. `tb_hc_workloads` and
`tb_hc_stress` take about ten seconds each and the others a second or less. The RTL contains
concurrent assertions for:
* FIFO occupancy;
* the budget never being overdrawn;
* responses arriving only for routed transactions.

`--assert` turns them on.

To change the number of ports, override `N` on `hyperconnect`. The crossbar
needs `N ≥ 2`, and the BUDGET registers extend to `0x40 + 4·(N−1)`, so
`CTL_AW` must be wide enough to reach them. Raising `MAX_OUT` or
`ROUTE_DEPTH` lets more transactions be in flight. This helps when the memory
latency is long compared with `MAX_OUT × NOM` beats.

Synthesised as generic logic, the two-port default is about 970 cells and 714
flip-flops, plus 2.5 kbit of small FIFO arrays. It uses no multipliers and no
block RAM.
