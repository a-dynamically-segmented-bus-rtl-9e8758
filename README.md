# DS-Bus: a dynamically segmented bus

A single shared bus lets only one pair of processors talk at a time. That
limits a bus-based multiprocessor to a few dozen processing elements (PEs).
The dynamically segmented bus (DS-Bus) keeps the short, direct path of a bus
but cuts it into pieces. Each PE owns one bus segment. The segments form a
ring, and a switch sits between each pair of neighbouring segments. Every
bus cycle, an arbiter picks requests whose stretches of bus do not overlap.
It then closes exactly the switches inside those stretches, so each granted
stretch becomes a private bus for one transfer. Traffic between nearby PEs
then runs in parallel: on a 64-PE ring, a dozen transfers can share one bus
cycle.

This SystemVerilog implements one DS-Bus with its distributed arbiter,
following the DS-Bus architecture of Xu and Ida ("A Dynamically Segmented
Bus Architecture"). The defaults describe a 64-PE bus. The PEs themselves are
outside the design, and so is the multi-bus machine built from several
DS-Buses (see *Not included*).

## Ring, segments, switches and sections

* There are N segments, numbered 0..N-1. PE *i* can drive and listen only on
  segment *i*.
* Switch *i* joins segment *i* and segment *(i+1) mod N*. Switch N-1 closes
  the ring.
* A request names a **section** by two positions, **Left** and **Right**.
  The section starts at Left and runs counter-clockwise, meaning by
  increasing index, up to Right. It may wrap past N-1 to 0. If Right is
  Left-1, the section is the whole ring.
* To give a PE section Left..Right, the switches Left .. Right-1 are closed.
  The switches at both ends stay open, which isolates the section from its
  neighbours.

Two requests conflict when their sections share a segment. Requests that do
not conflict can all be served in the same bus cycle.

## Operations

The request format is `{op, Left, Right, data-ID, data}`:

| op | code | initiator's place | who takes the message |
|----|------|-------------------|-----------------------|
| Write | 1 | one end of the section | the PE at the other end gets data and data-ID |
| Read | 2 | one end of the section | the PE at the other end gets the data-ID. Its answer goes back to the initiator in the same cycle. |
| Broadcast | 3 | anywhere in the section | every other PE in the section |

So a Write from PE 6 to PE 11 asks for Left = 6, Right = 11. A Write from
PE 11 to PE 6 asks for Left = 6, Right = 11 as well, and the initiator is the
Right end. A PE knows it is at an end of a section when the switch on one of
its sides is open.

Besides the operation, data-ID and data, the message lines carry the
initiator's ring position (`src`). This lets the PE at the far end tell that
it is the receiver. Read answers use a second set of data lines, so the
target can answer in the same cycle.

## The arbiter

The arbiter is the hard part of the design. It is distributed: there is one
**arbiter module** per PE (`dsb_arb_module`) and one **control unit**
(`dsb_arb_control`). They are joined by a shared pair of **L/R fields**,
which are a wired-OR of the module outputs.

### Resolution rule

The arbiter keeps a single **granted bus section** [LB, RB]. This is the
stretch of ring, from LB counter-clockwise to RB, that covers everything
granted so far in this phase. The rest of the ring, from RB+1 to LB-1, is the
**free arc**.

1. The scan starts at position *s*. Starting from *s* and going
   counter-clockwise, the first PE with a request is granted. Its Left and
   Right become LB and RB.
2. The granted module puts its L and R on the fields. Every module that still
   has a request checks whether its section lies wholly inside the free arc
   (comparator C1). If so, it raises its **M** signal.
3. Among the M signals, the first one met from *s* is granted. Its Right
   becomes the new RB; LB stays. Step 2 repeats.
4. The phase ends in the first cycle in which no module raises M.

Because the granted section only grows at its right end, any gap between the
old RB and a new grant's Left is lost for that phase. The arbiter is a greedy
scan, not an optimal packing. The traffic results below show how close it
comes to the analytic model anyway.

While a module's L and R are on the fields, every module also checks whether
its own switch lies inside that section: R > ID >= L on the ring (comparator
C2). If so, it sets its **S** bit. At the end of the phase, the S bits are
the switch setting for the transfer, and the **G** bits say who was granted.

Fairness comes from the start position. *s* is a counter that advances by
one each phase, starting from `ROT_OFFSET`, so every PE in turn has highest
priority. A request can be deferred, but never forever.

### Registers and datapath

Each module has these registers:

* C: a request is pending.
* L and R: the requested section.
* LB: the left boundary of the granted bus section.
* ID: the module's ring position.
* G: granted.
* S: switch setting.

All ring comparisons use modulo-N distances, so sections may wrap. The
control unit contains:

* the rotation counter;
* the `dsb_rot_priority` logic: a barrel shifter, a priority encoder, a
  decoder and a reverse barrel shifter. It turns the C vector (first grant)
  or the M vector (later grants) into a one-hot G;
* the `latch_lb` strobe. In the first resolve cycle this strobe captures LB
  from the fields. In that same cycle, C1 compares against the field value
  directly.

### Timing of one resolution phase

```
cycle      0        1         2          3        ...   M+1        M+2
control    IDLE     FIRST     RESOLVE    RESOLVE        RESOLVE    DONE
           start    G<-C      fields=#1  fields=#2      fields=#M  G,S valid
                              M->G #2    M->G #3        no M
```

For M grants, the phase takes M+2 cycles after the start cycle. The first
grant costs two cycles, and each further grant costs one. The resolution time
grows linearly with the number of grants, as the architecture intends. A
phase with no requests takes 2 cycles.

## Bus cycle and pipelining (`dsb_top`)

The transfer of one phase overlaps with the arbitration of the next one:

```
            ... RESOLVE  DONE      IDLE/start   FIRST   RESOLVE ...
arbiter                  pop       samples the
                         granted   new buffer
                         heads     heads
transfer                           switches = S,
                                   granted PEs
                                   transfer
```

* In the DONE cycle, the granted requests leave their buffers. They are
  copied into the transfer stage, together with the switch setting.
* In the next cycle (`xfer`), the switches are closed and every granted
  transfer happens. In that same cycle, the arbiter samples the new buffer
  heads and starts again.
* A bus cycle with M grants therefore lasts M+3 clocks. The bus-cycle length
  thus changes from cycle to cycle.

A request that is not granted stays at the head of its buffer and competes
again in the next phase.

## Request buffers and the PE interface

Each PE has a `BUF_DEPTH`-entry FIFO (`dsb_req_fifo`) that holds its
requests. When requests arrive faster than the bus accepts them, the buffer
fills and `req_ready` drops: the PE is held off. The buffer's head is a
register, so a request pushed in cycle *t* can be sampled by an arbitration
that starts in cycle *t+1* or later.

Ports of `dsb_top`. All per-PE ports are packed arrays indexed by ring
position.

| port | dir | meaning |
|------|-----|---------|
| `req_valid`, `req_ready` | in/out | request handshake |
| `req_op`, `req_l`, `req_r`, `req_id`, `req_data` | in | the request |
| `cpl_valid`, `cpl_data` | out | the PE's own request was transferred this cycle; `cpl_data` holds the Read answer |
| `rx_valid`, `rx_op`, `rx_src`, `rx_id`, `rx_data` | out | a Write or Broadcast delivered to this PE |
| `rd_req`, `rd_id` | out | this PE is the target of a Read, and this is the word asked for |
| `rd_data` | in | the answer, combinationally in the same cycle |
| `buf_count` | out | buffer occupancy |
| `phase_done`, `phase_grant`, `phase_n_grants`, `rot_start` | out | result of each arbitration phase |
| `xfer`, `xfer_sw` | out | transfer cycle and the switch setting in use |

Reset (`rst_n`) is synchronous and active low.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `N` | 64 | PEs per bus, as in the architecture's evaluation and large-system example (its introductory figure shows 8) |
| `DATA_W` | 16 | own choice, suited to 16-bit PEs |
| `ID_W` | 8 | own choice |
| `BUF_DEPTH` | 4 | own choice |
| `ROT_OFFSET` | 0 | the constant C of the rotation policy, typically 0 |

## How it performs

`tb/tb_dsb_traffic.sv` drives the 64-PE bus with uniform random load. Every
PE issues a Broadcast over 5 segments centred on itself (L = 4). It does so
with probability 1/c per bus cycle, so c is the mean request interval. The
table compares the measurements with the architecture's analytic estimates:
accept rate Ps = 1 - L/c, bandwidth N/c, and capacity 1/(1+L), which means
c = 5.

| c | accept rate (measured / model) | grants per bus cycle (measured / N/c) | mean wait, bus cycles |
|---|---|---|---|
| 20 | 0.79 / 0.80 | 3.17 / 3.20 | 1.3 |
| 12 | 0.63 / 0.67 | 5.32 / 5.33 | 1.7 |
| 8 | 0.44 / 0.50 | 7.99 / 8.00 | 2.9 |
| 6 | 0.28 / 0.33 | 10.65 / 10.67 | 8.6 |
| 5 | 0.20 / 0.20 | 11.97 / 12.8 | 75 (saturated) |

The wait includes one bus cycle that no request can avoid: a request issued
during a phase is sampled at the next one. Below capacity, the bus carries
the full offered load. At the capacity point it saturates, and queues grow.

Two structured workloads also run on the default bus:

* **Tree summation of 64 numbers** (`tb_dsb_sum`). Numbering the PEs from
  1, in step *s* PE 2^(s-1)(2k-1) sends its partial sum to PE 2^s k. The sections of one step
  never overlap, and every step finishes in a single bus cycle: 91 clocks
  for all 6 steps.
* **Jacobi exchange on a banded system** (`tb_dsb_jacobi`). Each PE
  broadcasts x(i) to the 10 neighbours on each side (21-segment sections).
  One full exchange takes 21-26 bus cycles, well inside the ~120 bus cycles
  of computation between exchanges.

## Design choices beyond the published architecture

The architecture fixes the ring of segments and switches, the three
operations, the arbitration rules (rotating start, priority among the
matches, granted section growing at its right end) and the register-level
arbiter. Where it is silent, this design chooses as follows.

* **Wrap-around and modular comparisons.** The ring is treated as a true
  loop. All Left/Right/boundary comparisons are modulo N, so sections may
  wrap.
* **Free-arc test.** The matching rule is read as "the request lies
  entirely between the right boundary and the left boundary, going
  counter-clockwise".
* **Priority order.** The priority logic rotates by the same counter as the
  scan start.
* **Timing.** There is a separate DONE cycle, the transfer takes one clock,
  and arbitration is pipelined with transfer. A bus cycle is M+3 clocks.
* **Message format.** The bus carries the initiator position `src`, and
  Read answers have their own return lines. The target must answer
  combinationally.
* **Buses as wired-OR.** The L/R fields and every bus line are modelled as
  a wired-OR, and an idle driver presents zero. The operation code 0 means
  idle.
* **Widths and depths.** See *Parameters*.

The design checks some rules with assertions: one G per cycle, one driver
on the L/R fields, no pop from an empty buffer, and the initiator's place in
its section.

## Not included

* The PEs (microprocessors with co-processors): the testbenches model them.
* The communication processors, front-end processor and common bus of the
  large multi-bus machine (66 DS-Buses, 3904 PEs). How a communication
  processor forwards messages between buses is not specified, so that
  machine cannot be built from this bus alone.
* The sequential (non-pipelined) and asynchronous arbiter variants and the
  other selection policies (fixed or random start, random choice,
  maximum-utility or maximum-response packing).

## Files

| file | contents |
|------|----------|
| `rtl/dsb_pkg.sv` | operation codes |
| `rtl/dsb_top.sv` | one DS-Bus: buffers, arbiter, transfer stage, PE ports, segmented bus |
| `rtl/dsb_arbiter.sv` | N arbiter modules and the control unit on the L/R fields |
| `rtl/dsb_arb_module.sv` | per-PE arbiter module (C, L, R, LB, ID, G, S; C1, C2) |
| `rtl/dsb_arb_control.sv` | control unit: rotation counter, phase sequencing |
| `rtl/dsb_rot_priority.sv` | barrel shifter, priority encoder, decoder, reverse shifter |
| `rtl/dsb_seg_bus.sv` | segments and switches: section-wide wired-OR |
| `rtl/dsb_req_fifo.sv` | request buffer |
| `rtl/dsb_pe_port.sv` | per-PE transfer logic (drive, receive, read service) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the workload benches |
| `tb/dsb_ref_pkg.sv` | reference model of the resolution algorithm |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each
has a watchdog. For example, the end-to-end bench at the default 64 PEs:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dsb_top \
  -y rtl -y tb +libext+.sv rtl/dsb_pkg.sv tb/tb_dsb_top.sv -o sim
./obj_dir/sim
```

Use `tb_dsb_traffic`, `tb_dsb_sum` or `tb_dsb_jacobi` for the workloads, or
`tb_dsb_<module>` for a single module. The arbiter bench also replays two
small examples by hand: requests for segments 2..7 and 6..8 conflict, so
only one is granted, while 1..3, 6..11 and 12..14 are all granted together.

`tb_dsb_top` runs 12,000 clocks of mixed traffic in about a second. Its
scoreboard compares each phase's grants with `dsb_ref_pkg`, given the buffer
heads that were sampled. It checks the bus-cycle length, and checks every
delivery, read answer and completion in the transfer cycle. It also fails if
any of these never occurred: concurrent grants, deferred requests, full
buffers, wrapping sections, whole-ring broadcasts, each operation, empty
phases, or any of the 64 rotation starts.

The module benches run at smaller N (8 or 16), which the parameters allow.
All benches pass under Verilator 5. All RTL also lints cleanly in Verilator and
elaborates in Yosys with the slang front end, with no latches and no
combinational loops.
