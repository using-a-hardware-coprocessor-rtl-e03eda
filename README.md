# PSCoP — a planning scheduler coprocessor for fieldbus arbiters

On a centrally arbitrated fieldbus (WorldFIP, or CAN run with the FTT-CAN
protocol) one node, the arbiter, decides which periodic message goes on the bus
in each time slot. Bus time is cut into fixed *elementary cycles* (ECs). A
*planning scheduler* does not pick messages one by one: it builds the complete
schedule for a fixed window of ECs ahead (a *plan*) while the arbiter CPU
dispatches the previous plan. When the plan is built in software on a small
microcontroller, this takes long enough that plans must be long, and the system
then reacts slowly to changes in the message set.

This RTL moves the plan construction into a small hardware coprocessor placed
beside the arbiter's CPU. The CPU writes, for each message, its period, initial
phase and transmission time, then issues RUN. The coprocessor fills a 16-EC plan
in a few hundred clocks and flags the end. The CPU then reads the plan, one byte
per EC. Each bit of a byte stands for one message slot and means "transmit this
message in this EC".

```
          chain_en                                            chain_ret
   SPB ───────────▶ MPT0 ──▶ MPT1 ──▶ ... ──▶ MPT7 ─────────────────┐
    ▲ │ ec_tick, ack   │        │              │                    │
    │ └────────────────┴────────┴──────────────┘                    │
    │◀──────── bus_id (slot number of the MPT holding the chain) ───┘
    │
    ├── C registers, EC length
    ▼ EC bytes
   SPM (2 × 16 bytes) ──▶ CCU ◀──▶ host CPU (register port)
                           └──▶ P/Ph/C/EC-length writes, RUN, RESTART
```

## Message model

- There are 8 message slots. Slot 0 has the highest priority and slot 7 the
  lowest. Priority comes only from the slot a message is loaded into. Priorities
  are static, and there is no separate deadline: it equals the period.
- **P**: the period, in ECs. **Ph**: the initial phase, in ECs. A message is
  released in ECs Ph, Ph+P, Ph+2P, … counted from the last RESTART. Setting
  P = 0 marks the slot as unused.
- **C**: the transmission time. **ECLEN**: the usable time of one EC, in the
  same unit as C. The unit is up to the user, for example microseconds or bit
  times.
- All parameters are 8 bits wide.

## How a plan is built

The design has four kinds of blocks. Each is one file in `rtl/`.

**Message's Production Timer (`pscop_mpt`, one per slot).** Each MPT holds P and
Ph and an EC down-counter. RESTART loads the counter with Ph. At every EC tick
from the plan builder, a counter at zero raises the MPT's request and reloads
with P−1; otherwise it counts down. A request that has not been served stays
pending into the following ECs. If the message is released again while still
pending, it stays a single request.

**Daisy chain.** Requests are arbitrated by a chain that runs from the plan
builder through MPT0, MPT1, … MPT7 and back to the plan builder. Each cell passes
`chain_out = chain_in & !req`. So the lowest-numbered requesting slot is the
only one that sees its chain input high (`sel`). Only that MPT puts its slot
number on the shared bus `bus_id` (a wired OR; all others drive zero), and only
it reacts to `ack`. The returning chain signal is high exactly when no request
is pending. The chain is a combinational path through all eight cells, so the
plan builder spends one clock sampling it before each decision.

**Schedule Plan Builder (`pscop_spb`).** The builder holds the 8 C registers
and the EC length. For each of the 16 ECs of a plan it does the following:

1. Pulses `ec_tick`, so every MPT updates its timer, and loads
   *remaining = ECLEN*.
2. Samples the chain: is a request pending, and from which slot?
3. Decides on the winner:
   - If its C ≤ remaining, the transaction is **accepted**: `ack` clears the
     request, the slot's bit is set in the EC byte, C is subtracted, and step 2
     repeats.
   - If C does not fit, the transaction is **rejected** and the EC is closed.
     Lower-priority requests are not tried, even if they would fit, and the
     rejected request waits for the next EC.
   - If no request is pending, the EC is closed.
4. Writes the EC byte into the plan memory.

After the 16th EC it commits the memory bank and signals the end of the plan.

A worked example: ECLEN = 100, and slots 0, 1 and 2 all pending with C = 40,
50, 30. Slot 0 is accepted (60 left). Slot 1 is accepted (10 left). Slot 2 is
rejected, so the EC byte is `0000_0011` and slot 2 is served first in the next
EC.

**Schedule Plan Memory (`pscop_spm`).** Two banks of 16 bytes form a queue of
two plans. The builder writes one bank while the CPU reads the other, which is
how the build of plan i+1 overlaps the dispatch of plan i. A bank is freed when
all 16 of its bytes have been read. A RUN issued while both banks hold unread
plans stays pending until a bank is freed.

**Configuration Control Unit (`pscop_ccu`).** This is the CPU's register port.
It decodes parameter writes into the MPTs and the builder and holds the control
and status bits. It also pops plan bytes from the memory.

## Host interface

The port is synchronous. With `cpu_wr` high, `cpu_addr` and `cpu_wdata` are
written at the rising clock edge. With `cpu_rd` high, the register appears on
`cpu_rdata` after that edge. Addresses are 6 bits (see `rtl/pscop_pkg.sv`):

| address        | register | access | contents |
|----------------|----------|--------|----------|
| 4·s + 0        | P[s]     | R/W | period of slot s (0 = unused) |
| 4·s + 1        | Ph[s]    | R/W | initial phase of slot s |
| 4·s + 2        | C[s]     | R/W | transmission time of slot s |
| 4·s + 3        | —        | R   | reads 0 |
| 0x20           | CTRL     | W   | bit0 RUN, bit1 RESTART |
| 0x21           | STATUS   | R   | bit0 busy, bit1 run pending, bit2 plan readable, bit3 both banks full, bit4 plan done (cleared by this read), bits 6:5 plans stored |
| 0x22           | ECLEN    | R/W | usable time of one EC |
| 0x23           | PLAN     | R   | next EC byte of the oldest stored plan (pops it) |

A typical sequence:

1. Write P, Ph and C for each slot, then write ECLEN.
2. Write CTRL = 0x03 (RESTART + RUN). RESTART reloads the phase counters and
   empties the plan memory.
3. Wait for `plan_done` (or STATUS bit 4). Read STATUS to clear the flag.
4. Read PLAN 16 times.
5. Write CTRL = 0x01 for each following plan. The timers carry on from where
   the last plan ended, so consecutive plans form one continuous schedule.

Parameter writes, ECLEN writes and RESTART are ignored while a run is pending or
a plan is being built. Parameters cannot be changed while the scheduler runs.

## Timing

An EC with *a* accepted transactions takes 4 + 2a clocks:

- 1 clock for the tick;
- 2 clocks per accepted transaction (sample the chain, then decide);
- 2 clocks for the final sample and decision (empty chain or rejection);
- 1 clock for the memory write.

From the clock edge that takes a RUN write to the rising edge of `plan_done`,
a plan takes Σ(4 + 2a) + 2 clocks.

The reference prototype ran at 12 MHz. Its published measurements used message
sets in which every message has Ph = 0 and P = 1 and all of them fit into every
EC. For those sets, this design's plan times are:

| messages | clocks | at 12 MHz | prototype measurement |
|---------:|-------:|----------:|----------------------:|
| 0 | 66  | 5.5 µs  | 8 µs  |
| 1 | 98  | 8.2 µs  | 16 µs |
| 2 | 130 | 10.8 µs | 22 µs |
| 4 | 194 | 16.2 µs | 36 µs |
| 8 | 322 | 26.8 µs | 63 µs |

The time is linear in the number of accepted transactions, as in the prototype.
The clock counts are this design's own, because the prototype's internal
sequencing is not published. Even the 8-message worst case is shorter than one
CAN 2.0A frame at 1 Mbit/s (53–130 µs). So a plan could be rebuilt every EC
rather than once per plan.

## What follows the reference design and what is chosen here

These points follow the reference design:

- the block split into MPT, SPB, SPM and CCU;
- 8 slots, 8-bit parameters and 16-EC plans;
- one bit per slot per EC byte;
- slot-ordered static priority through a daisy chain that runs from the
  builder through MPT0…MPT7 and back;
- the accept/reject rule: C is checked against the remaining EC time, and the
  EC closes at the first rejection;
- one extra clock spent on the chain;
- the overlap of plan building and plan dispatch;
- no changes to parameters while the scheduler runs.

These are this design's own choices:

- the register map, control bits and status bits;
- the single-clock host port (the prototype sat on an 8051 bus);
- P = 0 marking an unused slot;
- the counter reload rule;
- rejected or unserved requests staying pending;
- two banks in the plan memory, and RESTART flushing it;
- the order of bits in an EC byte (bit i = slot i);
- the SPB state sequence and thus the exact clock counts;
- the asynchronous active-low reset `rst_n`;
- the observation outputs `ev_accept`, `ev_reject`, `ev_ec_tick` and
  `ec_index` on the top.

Not included: the host microcontroller, its RAM, the CAN controller and
transceiver, and the dispatcher. The dispatcher is software on the host that
sends each planned message to the bus.

Limits: the design has 8 slots. A larger message set needs a wider EC word and
register map. Priorities are static, set by slot. Between plans, new C and
ECLEN values apply to the next plan, a new P at the slot's next counter reload,
and a new Ph only after a RESTART, which also starts the schedule afresh.

## Files

| file | contents |
|------|----------|
| `rtl/pscop_pkg.sv` | sizes, register map, builder states |
| `rtl/pscop_mpt.sv` | message timer and daisy-chain cell |
| `rtl/pscop_spb.sv` | plan builder, C and EC-length registers |
| `rtl/pscop_spm.sv` | two-bank plan memory |
| `rtl/pscop_ccu.sv` | host register port |
| `rtl/pscop_top.sv` | the coprocessor |
| `tb/tb_pscop_<block>.sv` | self-checking test of each block |
| `tb/tb_pscop_top.sv` | end-to-end test at full size against a reference model |
| `tb/tb_pscop_table1.sv` | plan time for the 0…8-message worst-case sets |

The top has no parameters. The block modules take `N_MSG`, `PW` and `N_EC`
parameters, which default to the package values.

## Simulation

Every testbench checks its results and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pscop_pkg.sv \
          tb/tb_pscop_top.sv --top-module tb_pscop_top -o sim
./obj_dir/sim
```

Replace `tb_pscop_top` with any other testbench name.

`tb_pscop_top` builds plans for the following cases, each compared byte for
byte and clock for clock with a procedural model of the scheduler:

- a hand-made 8-message set over four consecutive plans;
- a set that fills both memory banks, so that a third RUN has to wait;
- an overloaded set with ECs closed by rejection;
- twelve random sets.

It also counts how often each mechanism occurred and fails if one never did.
The mechanisms are accepts, rejections, chain contention, carried-over
requests, empty ECs, waits for a free bank, refused writes and restarts.
The top also carries assertions: at most one MPT holds the chain, and an `ack`
is only given while one does.
