# Shared multi-buffer ATM switch with separate multicast queues

An 8x8 ATM cell switch in synthesizable SystemVerilog. Cells are stored in eight
shared buffer memories (SBMs) that are accessed in parallel, so memory speed
does not limit the port count. The cost of parallel SBMs is head-of-line (HOL)
blocking: when the next cells of several output ports sit in the same SBM, only
one of them can be read at a time. Two ideas deal with it:

* **Three read cycles per cell slot.** Every SBM is read up to three times per
  slot, so up to three output ports whose head cells share an SBM are all
  served in the same slot. The port with the longest queue goes first.
* **Multicast cells ride in the idle SBMs of the third cycle.** Multicast cells
  do not sit in the output queues. Each multicast connection (MCI) has its own
  queue, with a separate read pointer for each destination port. Multicast
  cells are read only in the third read cycle, and only from SBMs that no
  unicast read uses in that cycle. Multicast traffic therefore never adds HOL
  blocking to unicast traffic. It fills output slots that would otherwise stay
  empty.

A multicast cell is stored once in the SBMs, whatever its number of
destinations. Its space is freed after its last destination has read it.

## Chip set

The switch is organised as a chip set:

```
          in_byte[p][7:0]                               out_byte[p][7:0]
               |  bit b of every port                         ^
               v                                              |
   +-----------------------------+   x8 (bit slices 0..7)     |
   | switch_chip                 |----------------------------+
   |  sp_conv x8  -> sbm_router -> sbm_sram x8 (+ idle_queue x8)
   |  sbm_write_priority, sbm_read_priority, outq_ctrl          |
   +-----------------------------+
      |  queue I/O (chip 0)          |  multicast pointer interface
      v                              v
   ext_queue_mem x8 (output queues)  mcptr_chip: mc_dest_reg, mc_pointers,
   ext_queue_mem x4 (multicast q.)   mc_qlen_calc, output_read_priority
```

* **Bit slicing.** Chip *b* carries bit *b* of every byte of every port. One
  chip therefore holds a 53-bit slice of each cell, stored as four 16-bit SBM
  words. An SBM is 8 kbit (512 x 16 bits), which gives 128 cells per SBM,
  8 x 128 = 1,024 cells for the switch, and 128 cells per port on average.
* **Lock-step control.** All eight switch chips see the same routing tags and
  the same queue contents, so they take identical decisions and store every
  cell at the same SBM address. Only chip 0 drives the external queue memories
  and the multicast-pointer chip. The other chips produce the same values on
  outputs that are left unconnected.
* **External queues.** Each output port has an output queue and each MCI has a
  multicast queue. They live in separate memories (`ext_queue_mem`). Each entry
  is `{SBM number, cell address}` (3 + 7 bits). The queue pointers live in the
  chips: `outq_ctrl` in the switch chip and `mc_pointers` in the
  multicast-pointer chip.

## The cell slot

A slot lasts 53 clocks, one byte of a cell per clock. At 20 MHz a port carries
160 Mbit/s, enough for an STM-1 link (155.52 Mbit/s). `slot_sync` marks clock
t = 0. A cell arrives during one slot and is stored in the next. Every slot follows
the same fixed schedule. Queue memories and SBMs are separate, so the chip
uses them at the same time: it reads the queues while it writes the SBMs, and
writes the queues while it reads the SBMs.

| t | action |
|---|---|
| 0 | cells that arrived in the previous slot move to the pending buffers; new tags are latched |
| 1 | **write priority**: every pending cell gets an SBM and a free address from that SBM's idle queue, or is refused |
| 2..5 | the four words of each cell are written into its SBM (all SBMs in parallel) |
| 2 | at the same time: head entry and length of every output queue are read; the per-port MCI choice of the multicast-pointer chip is latched |
| 3..10 | one port per clock: the chosen multicast-queue entry is read |
| 11 | the three-read schedule is computed and latched |
| 12..23 | three SBM read cycles of four words each |
| 12..19 | at the same time, one input per clock: `{SBM, address}` of each cell stored at t = 2..5 is appended to its output queue (unicast) or MCI queue (multicast) |
| 24 | each port picks the cell to send; queue pointers advance; `ev_valid` |
| 25..32 | one port per clock: freed addresses go back to their idle queues |

A cell stored in a slot is queued at the end of that slot, so it can be
scheduled from the next slot on. The chosen cell leaves during the slot after
it was read. With nothing in its way, a cell's first byte leaves three slots
(159 clocks) after its first byte entered. The last 20 clocks of a slot are
spare. With the accesses overlapped, a slot needs only 33 clocks.

## The three-read scheduler (`sbm_read_priority`)

This is the core of the design. Per output port it receives two candidates:

* the head of the port's unicast queue: its SBM and the queue length;
* the multicast cell that `output_read_priority` chose for the port: its SBM
  and the MCI's weighted queue length.

The scheduler then works in three steps.

1. **Unicast, cycles 1 to 3.** Ports are ranked by unicast queue length,
   longest first. Suppose *k* head cells share one SBM. The one of rank
   *i* among them (counting from 0) is read in cycle *i*. The fourth and later
   ones wait for the next slot, and the event report counts them as
   `hol_wait`. The rank of a port is the number of ports that beat it. The
   cycle of a port is the number of higher-ranked ports with a head cell in the
   same SBM. Both are computed combinationally with no iteration over cycles.
2. **Multicast, cycle 3 only.** An SBM that serves a unicast cell in the third
   cycle is closed to multicast; a candidate that wanted it is counted as
   `mc_blocked`. Among the multicast candidates of an open SBM, the one with
   the longest weighted queue is read.
3. **Output contention.** A port may receive both a unicast and a multicast
   cell. The one with the longer queue length is sent. A tie goes to the
   unicast cell. The losing cell stays at the head of its queue and competes
   again in the next slot.

Ranking uses one building block throughout, `qlen_ranker`:

* a matrix of magnitude comparators (candidate *j* beats *i* if its key is
  larger, or equal with a lower index);
* an adder tree that counts each candidate's defeats, which is its rank;
* a decoder that turns ranks into one-hot "1st, 2nd, ..." vectors.

The same block ranks SBMs by free space for the write priority. It also picks
the longest MCI for each port.

An example with four ports and four SBMs:

* The unicast heads of ports 0, 1 and 3 sit in SBM 1, and the head of port 2
  sits in SBM 3.
* The priority order is port 2, port 0, port 1, port 3.
* The result: cycle 1 reads SBM 3 for port 2 and SBM 1 for port 0. Cycle 2
  reads SBM 1 for port 1. Cycle 3 reads SBM 1 for port 3.
* The best multicast candidate (port 1, in SBM 1) is denied, because SBM 1 is
  busy with unicast in cycle 3.
* The multicast cells for ports 0 and 2 are read from SBMs 2 and 3.

`tb_sbm_read_priority` runs this exact case before its random tests.

## Multicast connections (`mcptr_chip`)

* `mc_dest_reg`: one 8-bit destination mask per MCI, written by the host
  (`dest_we`, `dest_mci`, `dest_ports`). Writing a mask also empties that MCI's
  queue, because all its read pointers are set to its write pointer.
* `mc_pointers`: a write pointer per MCI and a read pointer per MCI and output
  port. A port that sends a multicast cell advances only its own pointer. The
  cell's SBM space is freed when the read is the last one still owed, which
  means every other destination has already moved past the cell
  (`release_addr`). If two ports were to read the same cell in one cycle, the
  higher-numbered one frees it.
* `mc_qlen_calc`: the queue length of MCI *m* for port *o* is
  `wp[m] - rp[m][o]`. It is shifted left by the external weight `mc_weight[m]`
  (0..3). An MCI qualifies for a port only if the port is one of its
  destinations and the queue is not empty.
* `output_read_priority`: one ranker per port picks the qualified MCI with the
  longest weighted queue. That cell becomes the port's multicast candidate.

## Buffer management

* `idle_queue`: one per SBM. It hands out free cell addresses and takes freed
  ones back, and it counts vacant cell spaces. After reset, addresses that
  were never used come from a counter. Only returned addresses go through the
  FIFO memory, so no initialisation pass is needed.
* `sbm_write_priority`: ranks SBMs by vacant space, emptiest first. The *k*-th
  input with a cell gets the SBM of rank *k*, so each SBM takes at most one
  cell per slot.
* A cell is refused (`ev.drop`) in either of two cases:
  * no SBM has room for it;
  * its queue has fewer than 8 free entries, so that a whole slot of arrivals
    always fits.

  Output queues hold 1,024 entries, the whole buffer, so in practice only
  multicast queues (256 entries) refuse cells.

## Top-level interface (`atm_switch`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (20 MHz nominal), asynchronous active-low reset |
| `slot_sync` | out | 1 | first clock of each 53-clock slot |
| `in_byte[p]` | in | 8 per port | byte *t* of the arriving cell on clock *t* of the slot |
| `in_tag[p]` | in | `tag_t` | `{valid, mc, dest}`, sampled on the `slot_sync` clock; `dest` is the output port, or the MCI (low 2 bits) when `mc` = 1 |
| `out_byte[p]` | out | 8 per port | departing cell, byte *t* on clock *t* |
| `out_valid[p]` | out | 1 per port | a cell leaves on the port in this slot |
| `dest_we`, `dest_mci`, `dest_ports` | in | 1, 2, 8 | write an MCI's destination mask |
| `mc_weight[m]` | in | 2 per MCI | queue-length weight (left shift) |
| `ev`, `ev_valid` | out | `events_t`, 1 | per-slot report, one bit per port: `drop`, `uc_sent`, `mc_sent`, `hol_wait`, `uc_late`, `mc_blocked`, `contention`, `mc_release` |

The cell carries no routing header of its own. The tag stands for the result
of a header lookup done in front of the switch.

Sizes are in `rtl/atm_pkg.sv`:

| name | value |
|---|---|
| `NPORT` | 8 |
| `NSBM` | 8 |
| `CELLS` | 128 |
| `WORD_W` | 16 |
| `CELL_BYTES` | 53 |
| `NMCI` | 4 |
| `OQ_DEPTH` | 1024 |
| `MQ_DEPTH` | 256 |
| `NREAD` | 3 |

`NMCI` must not exceed `NPORT`, because the MCI travels in the 3-bit `dest`
field. A slot must be at least 33 clocks long, which an assertion checks.

## Files

`rtl/`:

| file | content |
|---|---|
| `atm_pkg.sv` | sizes, `qentry_t`, `tag_t`, `events_t` |
| `atm_switch.sv` | top: 8 switch chips, multicast-pointer chip, queue memories |
| `switch_chip.sv` | one bit slice with the slot schedule above |
| `mcptr_chip.sv` | multicast-pointer chip |
| `qlen_ranker.sv` | comparator matrix, win counter, rank decoder |
| `sbm_read_priority.sv` | three-read scheduler |
| `sbm_write_priority.sv` | SBM allocation |
| `sbm_router.sv` | input crossbar and the two output crossbars |
| `sp_conv.sv` | serial-to-parallel converter: 1 bit per clock into 16-bit words |
| `sbm_sram.sv` | 512 x 16 SBM |
| `idle_queue.sv` | free-address FIFO and counter |
| `ext_queue_mem.sv` | queue memory |
| `outq_ctrl.sv` | output-queue pointers and lengths |
| `mc_pointers.sv` | multicast pointers and release |
| `mc_dest_reg.sv` | destination masks |
| `mc_qlen_calc.sv` | weighted lengths |
| `output_read_priority.sv` | per-port MCI choice |

The memories are plain arrays with a clocked write and an asynchronous read.
They stand for the asynchronous SRAMs of the original chips and map to
memory cells in synthesis.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus these
two:

* `tb_atm_switch` is the end-to-end test at full size. Every departing cell
  must be the head of the right unicast or (MCI, port) FIFO of a reference
  model, with an exact payload. It checks the 3-slot latency and drains the
  switch to empty. It also requires every reported mechanism to occur:
  HOL waits, late reads, multicast denials, contention won by multicast,
  releases, refusals, and weighting.
* `tb_throughput` measures throughput and average queue length under random
  traffic.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5 from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
          rtl/atm_pkg.sv tb/tb_atm_switch.sv --top-module tb_atm_switch -o sim
./obj_dir/sim
```

Replace `tb_atm_switch` with any other testbench name. The full-size
end-to-end test and the throughput test each finish in a few seconds.

Measured with `tb_throughput` (8x8, every MCI with 4 destinations, uniform
random traffic, 1,000 measured slots):

| input load | multicast share | offered copies / port / slot | throughput | avg unicast queue | avg multicast queue | SBMs free of unicast in cycle 3 |
|---|---|---|---|---|---|---|
| 0.5 | 1 % | 0.517 | 0.518 | 0.70 | 0.12 | 100 % |
| 0.8 | 1 % | 0.825 | 0.824 | 2.18 | 1.09 | 98.2 % |
| 1.0 | 1 % | 1.026 | 0.982 | 15.8 | 17.5 | 93.7 % |
| 1.0 | 0.1 % | 1.005 | 0.978 | 19.2 | 3.0 | 93.9 % |

At full load the throughput is close to the 98.9 % reported for the original
architecture. The testbench requires at least 95 %. The last column is the
spare SBM capacity that multicast cells live on. It matches the "at least
93 %" expected for an 8x8 switch.

## How far to trust it, and where it departs from the original

The following follow the original design:

* three read cycles per slot;
* unicast priority by output-queue length;
* multicast reads only in the third cycle, on SBMs left idle by unicast;
* the longer queue winning an output;
* separate multicast queues, with read pointers per MCI and port, and
  weighted queue lengths;
* per-port MCI selection by longest queue;
* SBM write priority by vacant space;
* idle queues per SBM;
* 8 ports, 8 SBMs of 8 kbit with 16-bit words, 1,024 cells, 20 MHz.

The following are this design's own choices:

* **Slot schedule.** The original gives the order of the overlapped queue and
  SBM accesses but no clock counts. The clock-by-clock schedule is new (see
  "The cell slot").
* **Bit slicing.** Each chip takes one bit of each port byte. The original
  describes a converter from the 8-bit input to 16-bit SBM words. Here it
  assembles the chip's 1-bit slice into 16-bit words, which is consistent with
  the stated 8-kbit SBMs holding 1,024 cells across eight chips.
* **Memory ports.** SBMs and queue memories have separate write and read data
  ports, not one common bidirectional bus.
* **Routing tag.** The tag format and its timing are new.
* **Sizes.** There are 4 MCIs, output queues of 1,024 entries and multicast
  queues of 256 entries.
* **Weighting.** The weight is a left shift. The same weighted length is used
  for the MCI choice, for multicast read priority and for output contention.
* **Ties.** Ties go to the lower index, and to unicast at an output.
* **Release and refusal.** A multicast cell is freed on the last destination's
  read. A cell is refused when no SBM has room or its queue has fewer than one
  slot's worth of free entries.
* **Losing cells.** A cell that loses output contention is simply read again
  in a later slot.
* **Idle queue start-up.** A counter replaces loading every address at reset.

Not modelled: the physical chips (0.6 µm layout, pads, the asynchronous SRAM
macros themselves), the host interface beyond a register write, and the
line-side framing (SDH/STM-1 overhead, cell delineation). The earlier
cell-copy and address-copy multicast schemes, which the architecture improves
on, are not included.

Every module has a fault-injection check: a testbench run against a
deliberately broken copy of the module fails. In `sbm_read_priority`, the
multicast flags of the per-SBM view `rd_mc` are constant zero for the first
two read cycles by construction, since multicast is read only in the third.
