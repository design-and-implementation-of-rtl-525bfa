# A fault tolerant ATM switch built from 2x2 FTSEs

This is synthesizable SystemVerilog for a self-routing ATM cell switch that
keeps working when parts of it fail. Redundancy comes at two levels:

* **Inside each switching element.** The 2x2 *Fault Tolerant Switching Element*
  (FTSE) has a spare input controller and two spare output controllers. Every
  inlet/outlet pair of the element is joined by four internal paths.
* **Across the network.** The switch is a Baseline multistage network with one
  extra stage placed in front. That stage gives every inlet/outlet pair of the
  switch two disjoint paths: a *normal* path and an *alternate* path. A
  backward fault signal (BFS) runs from the elements back to the inlets and
  tells them when to use the alternate path.

The same FTSEs also resolve output contention. The higher-priority cell takes
the output controller, and the lower-priority cell takes the spare output
controller or waits in two shared FIFO buffers. The switch also copies
broadcast and multicast cells inside the network.

The default build is the 4x4 switch: three stages of two FTSEs. The port
count `N` is a parameter and can be any power of two from 2 to 1024. The 16x16
examples below were simulated.

## The cell inside the switch

A cell moves through the switch as one packed word, `atm_pkg::cell_t`, of 518
bits. Every link moves one whole cell per clock.

| field     | bits | meaning |
|-----------|------|---------|
| `valid`   | 1    | the link carries a cell this cycle |
| `prio`    | 1    | 1 = high priority; decides contention |
| `bcast`   | 1    | broadcast bit |
| `mcast`   | 1    | multicast bit |
| `mcnt`    | 3    | number of multicast destination addresses (0..7) |
| `maddr`   | 7 x 11 | multicast destination addresses, `maddr[0]` first |
| `tag`     | 11   | unicast routing tag |
| `payload` | 424  | the 53-byte ATM cell (5-byte header + 48 bytes) |

Tags and addresses are n+1 bits wide for an N x N switch, where n = log2 N.
They sit LSB-aligned in the 11-bit fields. The user supplies the n-bit outlet
number. The inlet's `tag_interface` then writes the leading *path bit* (bit
n): 0 selects the normal path and 1 the alternate path. For multicast it
writes the same bit into every address.

## Network: a Baseline network with an extra first stage

There are NS = n+1 stages of N/2 FTSEs. Stage `s` switches on tag bit
`NS-1-s`, so the path bit goes first and the outlet number follows, most
significant bit first. A 0 sends the cell to the upper port and a 1 to the
lower port.

Number the links of a stage by `2 x FTSE row + port`. Output link `j` of stage
`s` feeds input link `next_link(s, j, n)` of stage `s+1`. That function
(`atm_pkg`) is an unshuffle, a rotate right by one bit:

* after stage 0 (the extra stage) and after stage 1, across all n bits of the
  link number;
* after stage `s > 1`, only across the low `n-(s-1)` bits, that is inside
  blocks of `N >> (s-1)` links, as in the Baseline network.

Example, 16x16, inlet 6 to outlet 10 (`1010`):

| path      | tag     | input link at stages 0..4 |
|-----------|---------|---------------------------|
| normal    | `01010` | 6, 3, 9, 8, 10 |
| alternate | `11010` | 6, 11, 13, 10, 11 |

The two paths share the first and last FTSE and use different FTSEs in
stages 1 to 3.

The normal path always leaves stage 0 by the upper port. On fault-free
traffic the upper links of stage 0 therefore carry the traffic of two inlets
each. Uniform traffic above about 50 % load per inlet overloads them, so
losses appear below that load once the buffers are short.

## Inside the FTSE

```
 in[0] ─► IC_1 ─(demux)─┐                          ┌─► OC_1 ──────┐
          │             ├─► spare IC ─┐            ├─► spare OC_1 ┴─► MUX_1 ─► out[0]
 in[1] ─► IC_2 ─(demux)─┘             │            │
          │                        selector ─► routing logic ─► OC_2 ──────┐
          └──────────────────────────►  3x2     (2 shared FIFOs) └─► spare OC_2 ┴─► MUX_2 ─► out[1]
                          BFS_CTRL ◄── status of all seven controllers, BFS from next stage
```

| unit | module | what it does |
|------|--------|--------------|
| IC_1, IC_2 | `ftse_ic` | Registers the arriving cell. While the IC is faulty, its demultiplexer (assumed reliable) steers arriving cells to the spare IC instead. |
| spare IC | `ftse_spare_ic` | Takes the cells of a faulty IC, up to two per cycle, and passes one per cycle. It holds a one-cell buffer. If both ICs fail, the higher-priority cell goes on first. |
| selector | `ftse_selector` | 3-to-2: the upper line gets IC_1 (or the spare IC if IC_1 is faulty) and the lower line gets IC_2 (or the spare IC). |
| routing logic | `ftse_routing_logic` | Switches cells to the output controllers and owns the shared buffers (next section). |
| shared buffers | `ftse_shared_buffer` | Two FIFOs, upper and lower, that together form one ordered queue. |
| OC, spare OC | `ftse_oc` | Holds one cell until the MUX takes it. |
| MUX_1, MUX_2 | `ftse_mux` | Sends one cell per cycle, taking the OC's cell first and the spare OC's cell only when the OC is empty. |
| BFS_CTRL | `ftse_bfs_ctrl` | Computes the two backward fault signals. |

Each of the seven controllers has a fault input (`ftse_fault_t`: `ic[1:0]`,
`sic`, `oc[1:0]`, `soc[1:0]`). A faulty controller passes no cells. Its status
goes to BFS_CTRL, to the selector and to the routing logic.

## The routing logic, cycle by cycle

This is the part of the design that needs the most care. In each clock cycle
`ftse_routing_logic` does the following:

1. **Oldest first.** It forms the sequence *buffered cells (oldest first),
   then the upper-line arrival, then the lower-line arrival*. It serves the
   first two cells of that sequence. If the buffers hold cells, the arriving
   cells are therefore stored behind them rather than overtaking them. Cycles
   with no arrivals still drain the buffers.
2. **Ports wanted.** A unicast cell wants the port named by its tag bit. A
   broadcast cell wants both ports in every stage except stage 0, where it
   follows its path bit. A multicast cell wants every port that one of its
   addresses selects. Each copy keeps only the addresses behind its own port,
   so the address list shrinks as the cell fans out.
3. **One requester.** A port wanted by one served cell is given through its OC,
   or through the spare OC if the OC is faulty.
4. **Contention.** If both served cells want the same port, the higher
   priority wins; on equal priority the older cell wins. The winner takes the
   OC and the loser takes the spare OC. If only one of the two can be used
   (a fault, or the spare OC still holds a cell the MUX has not sent), the
   loser goes into the shared buffers.
5. **Dead port.** If both the OC and the spare OC of a port are faulty, cells
   for that port are dropped and counted. BFS_CTRL reports this state
   upstream so that new cells avoid it.
6. **Leftovers.** Whatever is still unserved is written into the shared
   buffers: losers first, then arrivals that were not served. A buffered entry
   carries its remaining port mask (`rl_entry_t.want`), so a cell that got one
   of its two ports waits only for the other.

The **shared buffers** keep cell order across the two FIFOs:

* Writing fills the upper buffer first. When the buffer being written is full,
  writing moves to the other buffer, but only if that buffer is empty, and
  then stays there until it is full in turn.
* Reading starts with the upper buffer and empties the current buffer before
  moving to the other.
* A cell that finds the write buffer full while the other buffer still holds
  cells is lost.

Each FIFO holds `DEPTH` cells (default 4). The buffers accept up to four
writes and two reads per cycle.

## Faults and the backward fault signal

`ftse_bfs_ctrl` raises:

```
BFS_u = bfs_u_in | (IC_1 & spare IC faulty) | (OC_1 & spare OC_1 faulty)
BFS_l = bfs_l_in | (IC_2 & spare IC faulty) | (OC_2 & spare OC_2 faulty)
```

`bfs_u_in` and `bfs_l_in` come from the next stage, one per output port. Each
is the signal that the next FTSE raises for the inlet that port feeds. The
last stage receives 0. At the inlets, `tag_interface` uses the `BFS_u` of its
first-stage FTSE as the path bit. `BFS_u` is the upper half, which carries
the normal path. `force_alt_i` forces the alternate path.

What this covers, and what it does not:

* **Single controller faults.** These never need the alternate path: the
  spare IC or the spare OC carries the traffic and no cell is lost once the
  fault is present.
* **A dead upper half in a middle stage.** Examples are IC_1 plus the spare IC,
  or OC_1 plus spare OC_1. The BFS chain then reaches the inlets whose normal
  path enters that half through upper-port links, and those inlets switch to
  the alternate path.
* **Limits of the signal.** Each FTSE forwards its upper signal and its lower
  signal separately. A fault seen through a lower-port link is not reported
  to inlets whose normal path only reaches it that way, and their cells for
  the dead port are dropped.
* **Cells in flight.** When a controller fails, the cells it holds are lost
  and counted: cells in an IC or the spare IC, and cells for a port that
  becomes unreachable.

`lost_o` counts every lost cell since reset.

## Timing

* **Per stage.** A cell takes two clock cycles per stage: one in the IC (or
  spare IC) register and one in the OC register. The MUX is combinational
  and feeds the next stage's IC register.
* **Whole switch.** A cell presented at `in_cell_i` before clock edge *t*
  appears at `out_cell_o` right after edge *t + 2(n+1) - 1*. That is 6 cycles
  for 4x4 and 10 for 16x16.
* **Extra delay.** Cells that wait in a spare OC, the spare IC's buffer or the
  shared buffers take longer.
* **Throughput.** Each link carries at most one 424-bit cell per clock.
  The stages are pipelined, so an inlet can present a new cell every
  clock. A count that admits one cell per inlet only after the previous
  one has crossed all n+1 stages gives 424 / (2(n+1) clocks) bits per
  clock. That is a lower bound; this RTL reaches (n+1) times more when
  there is no contention.
* **Flow control.** There is none between stages. Cells that cannot be held
  are lost.

## Choices made in this implementation

The published FTSE design fixes the units, how they connect, the network
topology, the tag format and the routing and BFS rules. It leaves the
following open, and this RTL settles them as stated:

* **Cell-parallel datapath.** A bit-serial implementation with
  parallel-to-serial output controllers and several clocks is possible. The
  serial link format is not specified, so links here carry whole cells.
* **Sizes.**
  * buffer depth: `DEPTH` = 4 per FIFO;
  * multicast list: up to 7 addresses with a 3-bit count. A 4x4 switch would
    need only 3 addresses and a 2-bit count, but 7 lets a 16x16 multicast to
    5 outlets fit;
  * tag and address fields: 11 bits.
* **Priority bit.** An explicit priority bit in the internal header.
* **Spare IC rules.** Equal priority is served oldest first, and a third
  simultaneous cell is dropped.
* **Service rate.** Two cells are served per cycle by the routing logic. A
  busy spare OC counts as unavailable.
* **Ports and resets.**
  * reset: synchronous, active-low `rst_n`;
  * fault injection: through ports;
  * observation outputs: `ev_*`, `lost_o`, `buf_cells_o`;
  * `force_alt_i`.
* **Not modelled.**
  * the parts of the inlet interface beyond the path bit (header
    translation, HEC);
  * any fault-detection circuitry. Faults are inputs;
  * faults on the links between two FTSEs.

## Files

| file | contents |
|------|----------|
| `rtl/atm_pkg.sv` | cell and fault types, port-selection and multicast-pruning functions, link permutation |
| `rtl/atm_switch.sv` | top: N x N network, parameters `N` (default 4) and `DEPTH` (default 4) |
| `rtl/ftse.sv` | the 2x2 FTSE, parameters `NS`, `STAGE`, `DEPTH` |
| `rtl/ftse_*.sv`, `rtl/tag_interface.sv` | the units listed above |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_atm_switch.sv` | end-to-end test of the default 4x4 switch |
| `tb/tb_atm_switch_16.sv` | 16x16 routing, broadcast and multicast examples |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. A
watchdog counts a failure if a test hangs. Example with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
          rtl/atm_pkg.sv tb/tb_atm_switch.sv --top-module tb_atm_switch -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_*.sv` the same way. `rtl/atm_pkg.sv` must come first
on the command line.

* **`tb_atm_switch`** (4x4) covers:
  * the 6-cycle latency;
  * fault-free random traffic and the same traffic on the forced alternate
    path;
  * single IC/OC faults carried by the spares;
  * a dead IC_1 plus spare IC in stage 1, where the BFS reroutes inlets 0
    and 1;
  * broadcast and multicast;
  * a hot spot that fills both shared buffers and loses cells.

  It also counts that contention, buffering, lower-buffer use, replication,
  spare IC, spare OC, BFS and the alternate path each occurred.
* **`tb_atm_switch_16`** follows one cell stage by stage along both paths in
  the table above. It also checks a broadcast from inlet 8 to all 16 outlets,
  a multicast from inlet 8 to outlets 4, 6, 9, 14 and 15, and random traffic.

## Changing the design

* **Switch size.** Set `N` on `atm_switch`. Sizes above 1024 need a wider
  `ADDR_W` in `atm_pkg`.
* **Buffer size.** Set `DEPTH`.
* **Multicast fan-out.** Raise `MAX_DEST` and `CNT_W` in `atm_pkg`.
* **Cell format.** The payload width is `PAYLOAD_W` (424 bits). Shrinking it
  speeds up simulation but changes the cell format.
