# A 64-port gigabit ATM switch with dynamic routing, time-based resequencing and recycling multicast

This is synthesizable SystemVerilog for a scalable cell switch in the style of the
Washington University Gigabit Switch. It has three main ideas:

* **Dynamic routing through a Benes network.** The first stage of a
  three-stage network of 8-port shared-buffer switch elements (SEs) spreads cells
  round-robin over its outputs, whatever their destination. Only the later
  stages route on the destination port's octal digits. Internal links are
  therefore never loaded more heavily than external ones.
* **Time-based resequencing.** Dynamic routing lets cells of one connection
  overtake each other. Every cell is stamped when it enters an input port
  processor (IPP). The output port processor (OPP) holds each cell until it is
  T cell times old, then releases cells oldest first.
* **Binary copying plus recycling for multicast.** A connection can be copied
  in two inside the network. Copies can go back through a port's recycling path
  (OPP to the IPP of the same port) for another table lookup and another
  two-way copy. A fan-out of f therefore takes log2 f passes, and adding or
  dropping a leaf changes only one or two table entries.

The switch is configured in band. Control cells from a remote processor travel
through the switch to the IPP or OPP they address. They read or write VXT
entries, registers and counters there, and come back as replies.

## Structure

```
 link rx[p] ──► wugs_ipp[p] ──► ┌──────────── wugs_network ────────────┐ ──► wugs_opp[q] ──► link tx[q]
                   ▲            │ stage 0: distribute (8 x wugs_se)    │        │
                   │            │ stage 1: route on port[5:3]          │        │
                   │            │ stage 2: route on port[2:0]          │        │
                   │            └──────────────────────────────────────┘        │
                   └────────────────── recycling path (same port) ◄─────────────┘
```

| file | block |
|---|---|
| `rtl/wugs_pkg.sv` | Cell, header, VXT entry and control payload types; register map; HEC function |
| `rtl/wugs_switch.sv` | Top: 64 IPPs, the network, 64 OPPs, recycling paths, whole-switch reset |
| `rtl/wugs_network.sv` | Three-stage Benes network of 24 SEs, with grants flowing back |
| `rtl/wugs_se.sv` | Switch element: 40-cell shared buffer, grant flow control, OXBAR (output crossbar), copying |
| `rtl/wugs_ipp.sv` | Input port processor: HEC check, VXT, stamping, receive buffer (RCB), control execution |
| `rtl/wugs_vxt.sv` | 1024-entry virtual path / virtual circuit table with cell counters |
| `rtl/wugs_timestamp.sv` | Time counter and transitional stamps |
| `rtl/wugs_opp.sv` | Output port processor: store, resequencer, transmit buffer (XMB), recycling output, control execution |
| `rtl/wugs_reseq.sv` | Resequencer (80 entries) |
| `rtl/wugs_xmb.sv` | Transmit buffer: two service classes, early/partial packet discard |
| `rtl/wugs_cell_store.sv` | Common cell store with free-slot bitmap (64 cells in the IPP, 256 in the OPP) |
| `rtl/wugs_ptr_fifo.sv` | Pointer FIFO used for the RCB and the OPP queues |

## Timing model

One clock cycle is one cell time, and a whole cell moves as one wide word
(`cell_t`, about 514 bits with its 48-byte payload). A real port processor moves a
cell over 16 clocks of a 32-bit bus. This model keeps the cell-level behaviour
(queueing, grants, ordering, discard) and drops the word-level framing. The link
side of each port is a cell interface: `rx_valid/rx_cell` delivers one ATM cell
(NNI header with HEC, plus payload) per cycle and cannot be stalled. The output
link takes a cell in a cycle where it raises `tx_ready`, which is how a link
slower than the switch is modelled.

Time stamps count half cell times (16 bits, wrapping). Every port processor keeps
its own counter. All counters start together at reset, so they agree.

## The internal cell

`cell_t` carries the fields of the switch's internal header:

* busy/idle (BI) and routing control (RC);
* two addresses (ADR1/ADR2) and the time stamp (TS);
* the source port (STG);
* two outgoing VPI/VCI values (VXI1/VXI2) and two block discard indices (BDI1/BDI2);
* the data/control bit (D), recycling bits (CYC1/2), continuous-stream bits (CS1/2) and bypass-resequencer (BR);
* upstream discard (UD), payload type (PT) and cell loss priority (CLP).

The widths and the RC encoding are choices of this design:

| RC | meaning | how the SEs treat it |
|---|---|---|
| `RC_UNICAST` | ADR1 is the destination port | distributed at stage 0, routed on its digits after that |
| `RC_PATH` | ADR1 holds one octal digit per stage | follows the digits, stage 0 included (path testing) |
| `RC_BCOPY` | copy to ports ADR1 and ADR2 | copied at the first stage where the two ports' digits differ; each copy then becomes unicast, and the second copy's VXI2/BDI2/CYC2/CS2 move into slot 1 |
| `RC_RANGE` | copy to every port in ADR1..ADR2 | at each routing stage, copied to every output whose sub-tree meets the range, with the range cut to that sub-tree |

## Switch element (`wugs_se`)

This is the hardest part to follow, and the one most of the network's behaviour
depends on.

* **Shared buffer.** There are 40 slots. A slot holds a cell, an 8-bit *mask* of
  the outputs that still owe it a copy, and an age counter. An arriving
  multicast cell uses one slot. The slot frees itself when its last copy leaves.
* **Grant flow control.** `grant_o[i]` lets upstream input *i* deliver a cell
  in the same cycle. It depends only on registered state. With at least 8 free
  slots, every input is granted. With fewer free slots, exactly that many inputs
  are granted. Their start point rotates by that number each cycle, so every
  input gets a turn while the buffer is nearly full. A granted cell therefore
  always finds a slot (an assertion checks this).
* **Distribution (stage 0).** Accepted cells are assigned to outputs
  round-robin, in input order, from a pointer that persists across cycles.
* **OXBAR.** Each output whose downstream grant is high takes the slot that has
  waited longest among the slots whose mask includes that output. Priority thus
  grows with waiting time, and each output's cells leave in arrival order. A slot
  can serve several outputs in the same cycle.
* Latency is at least one cycle per SE.

`wugs_network` wires output *j* of SE *i* to input *i* of SE *j* in the next
stage. Output *e* of last-stage SE *d* is port 8·d+e.

## Input port processor (`wugs_ipp`)

* **Link cells.** The HEC (CRC-8 with polynomial x^8+x^2+x+1, then XOR 0x55) is
  checked. Cells with a bad HEC are counted and dropped.
* **VXT lookup.** Entries below the adjustable bound (reset value 256, at most
  256) form the virtual path table, indexed by VPI. A VP entry with VPT=0
  switches the path: only the VPI is translated. A VP entry with VPT=1
  terminates the path, and the VCI then selects entry bound+VCI in the shared
  virtual circuit table.
* **Entry flags.** SC sets CLP. RCO entries accept only recycled cells. CC
  counts cells per entry.
* **Dropped cells.** A cell whose lookup misses is counted and dropped.
* **Recycled cells.**
  * Cells from the OPP of the same port are looked up again with their outgoing
    VPI/VCI, and they keep their original source port (STG). Upstream discard
    needs STG.
  * Recycled cells wait while a link cell is arriving, because the link cannot
    be held back.
* **Receive buffer.** Cells are written once into a 64-cell store. The RCB
  queue holds pointers. A link cell is dropped and counted when the queue holds
  `rcb_thr` cells or more.
* **Stamping.** Every cell entering the network gets a stamp, recycled cells
  included.

### Transitional time stamping (`wugs_timestamp`)

When a route changes, cells on the new route could overtake cells still in
flight on the old one. After a VXT write at time τ, with the feature enabled,
stamps are inflated as follows:

    stamp = τ + T + (now − τ)/2      while now − τ < 2T

The first cells after the change look T cell times younger than they are. The
stamp advances half a cell time per cell time, so stamps stay distinct, and after
2T cell times they meet real time again. The inflation is per IPP: any VXT
write at that port starts it.

## Output port processor (`wugs_opp`)

* **Arrival.** Cells enter a 256-cell store when it has a free slot; its
  `net_grant` goes to the last SE. A data cell with UD set whose STG is this port
  is dropped. This stops a shared many-to-many tree from echoing a sender's own
  cells back to it.
* **Resequencer** (`wugs_reseq`, 80 entries).
  * A cell becomes eligible when now − TS ≥ T, where T is a register with reset
    value 39.
  * The oldest eligible cell leaves, one per cycle. Ages are compared as signed
    values, because transitional stamps can lie in the future.
  * When all 80 entries are in use, the oldest cell leaves early, and this is
    counted.
  * BR cells and control cells get a stamp exactly T old on arrival, so they
    skip the wait.
* **Dispatch.** A released cell goes to one of two places:
  * to the recycling queue, if CYC1 is set or it is a control cell;
  * otherwise to the XMB.
* **XMB** (`wugs_xmb`).
  * There are two pointer queues. CS=1 cells (CBR/VBR) are sent before CS=0
    cells (ABR/UBR).
  * Tail drop applies at `thr` cells.
  * For CS=0 connections with a non-zero BDI, packet discard follows AAL5
    framing (the last cell has PT=001):
    * **EPD with hysteresis:** the buffer becomes *congested* at `epd_hi` cells
      and stops being congested at `epd_lo` cells. A packet whose first cell
      arrives while the buffer is congested is dropped whole.
    * **PPD:** once a cell of a packet has been dropped for overflow, the rest of
      that packet is dropped too.
* **Link output.** The ATM header is rebuilt from VXI1, PT and CLP with a new HEC.

The reset values 192/128 for the EPD marks are this design's choice.

## In-band control

The control path involves three ports:

* **entry port** – the port whose link receives the control cell;
* **target port** – the port whose IPP or OPP executes the operation;
* **return port** – the port whose link sends the reply.

1. Control cells enter on VPI 0 / VCI 32 (this design's choice) at the entry
   port. The IPP's `ctl_en` register must be set. The payload is a
   `ctl_payload_t` with these fields: opcode, unit (IPP/OPP), target port,
   return port and return VPI/VCI, address, and 128-bit data.
2. The entry IPP turns the cell into an internal control cell (D=0) addressed to
   the target port.
3. At the target OPP, an operation for the OPP is executed on arrival. Every
   control cell is then recycled to the target IPP.
4. The target IPP executes an operation meant for it. It then turns the cell
   into a data cell addressed to the return port and connection, with the result
   in the payload.

Operations: `RD_REG`, `WR_REG`, `RD_VXT`, `WR_VXT`, `RD_CNT` (a VXT entry's cell
counter) and `RESET`. `RESET` is acted on at the entry IPP and resets the whole
switch one cycle later. The register maps are in `wugs_pkg`:
* IPP: link enable, RCB threshold, VXT bound, transitional T and enable, control
  enable, and counters of cells, HEC errors, RCB overflows and unknown
  connections.
* OPP: age threshold, XMB threshold, EPD marks, and counters of cells sent,
  forced releases, XMB overflows, EPD/PPD drops and upstream discards.

Writing a counter's address clears it.

## Sizes

| parameter | default | origin |
|---|---|---|
| ports | 64 (3 stages of 8-port SEs) | network of the smallest odd stage count, 8^(k+1) ports with k=1 |
| SE buffer | 40 cells | as specified for the SE chip set |
| IPP cell store / RCB | 64 cells | as specified |
| VXT | 1024 entries, VP part ≤ 256 | as specified |
| OPP cell store | 256 cells | as specified |
| resequencer | 80 entries | as specified |
| age threshold T | 39 cell times | mean + 10 standard deviations of the delay when each stage has a delay mean and variance of 3 cell times: 3·3 + 10·√9 |

The package fixes the port count, the field widths and the 48-byte payload. The
module parameters set the buffer sizes.

## Not included

* Transmission interfaces (optics, line coding, clock recovery) and the framer
  that adapts the port processors to 16- or 32-bit interfaces. The switch's
  ports are at the cell level.
* Skew compensation between the SE chips. The RTL is one clock domain.
* Three-hop path-test control cells. Path routing (`RC_PATH`) is there, but no
  control operation chains several hops.
* The planned next generation: a 64-cell SE buffer, four priority classes in the
  SEs with grant codes, and per-bit skew compensation.
* Power-of-two network sizes (modified middle stage).
* Reliable-multicast acknowledgement suppression.

## Simulating

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/wugs_pkg.sv tb/tb_wugs_se.sv --top-module tb_wugs_se
./obj_dir/Vtb_wugs_se
```

`tb_wugs_switch` runs the whole 64-port switch at its default size, with this
sequence:

1. It configures all IPPs through control cells sent on link 0.
2. It runs unicast traffic on every port and checks delivery, headers and
   per-connection order. A VXT rewrite in mid-traffic triggers transitional
   stamping.
3. It checks a two-level multicast tree through a recycling port, a range copy,
   a shared tree with upstream discard, packet flows into a slow link (EPD),
   and a hot spot that forces grant rotation.
4. It checks counters read back in band and a reset by control cell.
5. It counts each mechanism and fails if one never happened.

The packet flows offer about two-thirds of a cell per cycle to a link that
drains a quarter, so early packet discard works continuously without filling
the OPP store. At higher overload the OPP store fills and withdraws its grant.
The back-pressure then spreads through the shared SE buffers until unrelated
inputs overflow their 64-cell stores. That is the congestion between the last
stage and the OPP that a shared-buffer network shows under bursty overload.
The lossless checks of this test assume it does not happen.

The C++ build of this testbench is large: several minutes, which the build flag
`-O0` (for example `-MAKEFLAGS OPT_FAST=-O0`) shortens. The simulation itself
takes seconds.
