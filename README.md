# LOTTERYBUS: lottery-arbitrated shared bus for systems-on-chip

A shared on-chip bus has to settle two things for its masters: how the
bandwidth is shared out, and how long a master waits for the bus. The usual
arbiters handle one of these well and the other badly. Static priority gives
a high-priority master low latency, but under load it starves the
low-priority ones. Time-division (TDMA) reserves bandwidth, but a burst that
arrives just after its slot has passed waits a whole wheel revolution.

LOTTERYBUS arbitrates with a lottery. Each master holds a number of
**tickets**. Whenever the bus is free for a new owner, the arbiter (the
*lottery manager*) draws one ticket at random from those held by the masters
that are requesting, and the holder of that ticket gets the bus. Master *i*
therefore wins with probability

    P(i) = r_i * t_i / sum_j (r_j * t_j)        r_i = 1 if master i requests

Over many draws each busy master gets a share of the bus that follows its
tickets. A master with tickets is never starved: each draw it has a fixed,
nonzero chance, so it wins within n draws with probability
1 - (1 - t/T)^n. For the smallest holding on a saturated 1:2:3:4 bus (6 of
64 after scaling) that is 0.63 within 10 draws; the measured figure is 0.65.
Because a draw happens at every handover rather than on a
fixed schedule, a master with many tickets usually wins within one or two
tenures of raising its request.

This repository holds synthesizable SystemVerilog for:

- the two lottery managers: one for **static** tickets (fixed at design
  time) and one for **dynamic** tickets (supplied at run time);
- a shared bus built around them, with a maximum transfer size and with the
  draw for the next owner overlapped with the current owner's transfer;
- the cell-forwarding unit of a 4-port output-queued **ATM switch** that uses
  this bus;
- a top level, `lotterybus_soc`, that places the ATM switch beside a
  4-master / 4-slave bus using the dynamic manager;
- self-checking testbenches for every module.

## Module map

| Module | What it is |
|---|---|
| `lottery_pkg` | Shared widths and the bus request/response structs |
| `lfsr_rng` | 16-bit Galois LFSR, the random number source |
| `ticket_lut` | Static ticket ranges: scaled partial sums and a mask for each request map (constant ROM) |
| `grant_compare` | Parallel `rnd < partial sum` comparators and a priority selector |
| `lottery_mgr_static` | LFSR + `ticket_lut` + `grant_compare`, with a registered grant |
| `ticket_adder_tree` | Request AND tickets, then a parallel-prefix adder tree (all partial sums and the total T) |
| `modulo_unit` | Combinational `R mod T` |
| `lottery_mgr_dynamic` | LFSR + adder tree + modulo + `grant_compare`, with a registered grant |
| `lottery_bus` | The shared bus: owner, tenure counter, pipelined draw, slave decode, read return |
| `shared_mem` | 1024 x 32 bus slave (the test-bed slaves) |
| `dp_shared_mem` | Dual-ported cell payload memory of the ATM switch |
| `addr_queue` | 16-deep FIFO of cell addresses, one per output port |
| `atm_cell_scheduler` | Takes incoming cells, writes payloads, queues each cell's address on its output port |
| `atm_port` | Output port: dequeue, bus read of the cell, forward to the link, free the slot |
| `atm_switch` | Scheduler + 4 queues + 4 ports + static lottery bus + payload memory |
| `lotterybus_soc` | Top: `atm_switch` beside a dynamic-ticket `lottery_bus` with four `shared_mem` slaves |

Master *i* in the usual numbering (C1..C4, request lines r1..r4) is index *i-1* here:
`req[0]` is r1 and `gnt[0]` is gnt[1]. Ticket vectors are packed with t1 in
the low bits, so `{4'd4, 4'd3, 4'd2, 4'd1}` means t1 = 1, t2 = 2, t3 = 3,
t4 = 4.

## The lottery in hardware

Both managers do the same three steps in one combinational path:

1. find the ticket ranges of the requesting masters;
2. produce a random number in `[0, T)`, where T is the number of tickets in play;
3. compare and select the winner.

The result is loaded into a grant register when `draw` is high. The grant
(`gnt`, `gnt_idx`, `gnt_valid`) is therefore visible the cycle after the
draw, and it holds until the next draw.

### Ranges as partial sums

The ranges are kept as running sums: `psum[i] = r1*t1 + ... + r(i+1)*t(i+1)`.
A number `x` belongs to master *i* when `psum[i-1] <= x < psum[i]`. A master
that is not requesting adds nothing, so its partial sum equals the previous
one and its range is empty.

`grant_compare` tests `x < psum[i]` for all masters in parallel. It then
keeps only the lowest-numbered comparator that fired (a priority
selector). That master's range is the one holding `x`. For example, take tickets 1, 2, 3, 4
with masters 1, 3 and 4 requesting:

- the partial sums are 1, 1, 4, 8;
- x = 5 fires only comparator 4, so master 4 wins;
- x = 0 fires all four comparators, and master 1 wins.

### Static tickets: a table per request map, scaled to a power of two

With fixed tickets, the partial sums depend only on the request map (16
maps for 4 masters). `ticket_lut` therefore stores them in a table and
needs no adders. The random number has to be uniform over `[0, S)`, where S
is the number of tickets in play. That is cheap only when S is a power of
two: the LFSR output is then simply masked. So each map's partial sums are
rescaled to a total of a power of two, keeping the ratios close:

    K       = ceil(log2 S) + EXTRA
    psum'_i = round(psum_i * 2^K / S)        psum'_last = 2^K exactly
    mask    = 2^K - 1

`EXTRA` (default 2) sets how closely the scaled ratios follow the real
ones. A larger EXTRA means wider comparators but smaller error. With
EXTRA = 2 each partial sum is off by at most half a step of 1/2^K, so a
single master's share is off by at most 1/(4S) of the bus. Some examples:

| Tickets | S | 2^K | Scaled partial sums | Scaled shares |
|---|---|---|---|---|
| 1 : 2 : 4 | 7 | 32 | 5, 14, 32 | 5 : 9 : 18 |
| 1 : 2 : 3 : 4 | 10 | 64 | 6, 19, 38, 64 | 6 : 13 : 19 : 26 |
| 1 : 1 : 4 : 6 (ATM switch) | 12 | 64 | 5, 11, 32, 64 | 5 : 6 : 21 : 32 |
| masters 1, 3, 4 of 1 : 2 : 3 : 4 | 8 | 32 | 4, 4, 16, 32 | 4 : 0 : 12 : 16 |

The table is computed at elaboration from the `TICKETS` parameter by
constant functions (`lut_entry`, `scale_bits`), so changing the tickets needs
no hand-made table. The mask output plays the role of a fifth table: it cuts
the 16-bit LFSR value down to K bits for the current map.

### Dynamic tickets: adder tree and modulo

When tickets arrive as inputs (`tickets`, 4 bits per master), the ranges
must be computed on every draw:

- `ticket_adder_tree` ANDs each request with its ticket count.
- A Kogge-Stone prefix network then produces all partial sums in
  log2(N) adder levels. The last sum is T.
- T is now arbitrary (0..60), so masking is not enough. `modulo_unit`
  reduces the 16-bit LFSR value to `R mod T` with a restoring remainder
  circuit: one compare-and-subtract stage per bit of R, 16 stages in all.
  This is the longest path of the design.
- The bias of `R mod T` is at most T/2^16, below 0.1 % for T <= 60.
- T = 0 gives remainder 0 and no grant.

The compare and select step is the same `grant_compare` as in the static
manager.

### Random numbers

`lfsr_rng` is a 16-bit maximal-length Galois LFSR (taps `0xB400`, period
65535). It steps every cycle, and a draw uses whatever state it holds then,
so the spacing between draws adds to the mixing. Each bus gets its own seed (`SEED` parameter), so
two buses in the same system do not draw in lockstep.

## The bus

### Tenures and the length field

A master drives the `lb_mreq_t` struct `{req, we, addr, wdata, len}` and
receives `lb_mrsp_t` `{gnt, rvalid, rdata}`. Moving one word per cycle, the
handshake runs as follows:

- The master raises `req` with its current word and holds it until `gnt`.
  `gnt` means the word was taken in that cycle. The master then presents its
  next word, or drops `req`.
- `len` is the number of words the master can move back to back, counting
  the current one. If another message is already waiting behind the current
  one, its words count too.
- A read's data returns with `rvalid` one cycle after the read word was
  taken.
- Slaves see `s_req` `{sel, we, addr, wdata}`. They return read data one
  cycle after `sel`. The top `log2(N_S)` address bits choose the slave.

A **tenure** is the run of cycles during which one master owns the bus. It
ends at the first of these:

- the master's last ready word (`len == 1`);
- the master dropping `req`;
- `MAX_XFER` words (default 8). This is the maximum transfer size that
  stops one master with a lot of data from holding the bus.

A master with a long message keeps `req` up and enters the next lottery
like everyone else.

### Drawing the next owner during the last word

The lottery is not run in a gap between tenures. `draw` is high in the last
cycle of a tenure, or whenever the bus has no owner. Because the grant is
registered, the new owner drives the bus in the very next cycle:

    cycle      n-1        n (last word of A)      n+1          n+2
    bus        A word     A word                  B word 1     B word 2
    draw       0          1                       0            0
    gnt reg    A          A                       B            B

The cost is that the draw in cycle *n* cannot see whether A will still be
requesting in cycle *n+1*. This is what `len` is for:

- A master whose `len` is 1 in the draw cycle is about to go quiet, so it
  is left out of that draw.
- A master that is only at the `MAX_XFER` limit still has words, so it
  stays in.

Without this rule a finishing master could win a tenure it has nothing to
send in, which would waste a cycle and skew the shares. A request raised on
an idle bus is drawn in the cycle it is first seen, and its first word is
taken the next cycle. The testbench checks this one-cycle latency.

For the bandwidth shares to follow the tickets, the masters must keep their
requests up. A master that leaves an idle cycle between messages, or that
shows only the current message in `len`, drops out of some draws. Under
load it then gets less than its share. The ATM ports therefore report the
next queued cell in `len` (see below).

## ATM switch cell forwarding

The example system is the forwarding unit of an output-queued ATM switch
with 4 output ports:

    cell stream ──> atm_cell_scheduler ──(payload words)──> dp_shared_mem port A
                          │                                        │ port B
                    (cell address)                                 │
                          v                                        │
                 addr_queue x4 ──> atm_port x4 ──> lottery_bus ────┘
                                        │         (static tickets 1:1:4:6)
                                        v
                                  output links (link_rdy / out_*)

- **Cells.** A cell is 12 words of 32 bits, a 48-byte payload. It arrives
  on `in_*` with a valid/ready handshake: `in_sop` marks word 0 and
  `in_port` names the output port.
- **Scheduler.**
  - It takes the lowest free slot from a 64-bit free map. Each slot is 16
    words of the 1024-word payload memory.
  - It writes the words through the memory's private port A.
  - After the last word, it pushes the slot address onto the port's queue.
  - A new cell is refused (`in_ready` low) while no slot is free or that
    port's queue is full. `free_slots` reports the free count.
- **Ports.**
  - A port polls its queue. When the queue is not empty and `link_rdy` is
    high, the port pops the head (the dequeue) and requests the bus.
  - It reads the cell's 12 words from port B of the memory over as many
    tenures as it takes: with `MAX_XFER` = 8 a cell needs at least two.
  - It forwards each returned word to its link (`out_valid`, `out_sop`,
    `out_eop`, `out_data`).
  - After the last word it releases the slot to the scheduler.
- **Back-to-back cells.** A port dequeues its next cell in the cycle its
  current cell's last word is granted. While a next cell is queued, `len`
  includes it. A port with a backlog therefore never drops out of a draw
  at a cell boundary.
- **Tickets.** Ports 1-4 hold 1 : 1 : 4 : 6, scaled to 5 : 6 : 21 : 32 of
  64. Port 4 is the latency-critical port with the most tickets. Ports 1-3
  share what is left in about 1 : 1 : 4.

With all four queues kept full, the measured bus shares in the end-to-end
test are about 0.10, 0.10, 0.33 and 0.47, against targets of 0.08, 0.09,
0.33 and 0.50. The test accepts ±0.05, since a few thousand tenures still
carry sampling noise.

`tb_atm_table1` runs the quality-of-service load of the original
evaluation, with these settings:

- Port 4 offers light, latency-critical traffic: one cell every 120
  cycles, 10 % of the bus.
- Ports 1-3 stay backlogged.

Ports 1-3 should then split the remaining 90 % as 5 : 6 : 21. The table
below compares the measured bus shares with the published lottery results.

| Port | Measured | Expected from the tickets | Published |
|---|---|---|---|
| 1 | 14.5 % | 14.1 % | 14.30 % |
| 2 | 17.1 % | 16.9 % | 17.00 % |
| 3 | 58.4 % | 59.1 % | 59.03 % |
| 4 | 10.0 % | 10.0 % (offered) | 9.67 % |

Port 4's latency is about 2.9 cycles per word, from queueing to the last
word on the link. The published figure is 1.4. Most of port 4's wait is
other ports' tenures:

- It first waits for the current tenure, 8 words, to end.
- It then wins each draw only with probability 32/64.
- A 12-word cell needs two draws.

Raising `MAX_XFER` to 12, so that a cell fits in one tenure, does not help:
the measured latency is then 3.1, because the competing tenures grow by the
same amount. The link rates and traffic behind the published figure are not
known, so this figure is not a like-for-like comparison.

## Top level

`lotterybus_soc` has no parameters. It contains two independent systems
that share only the clock and the reset:

- `atm_*`: the ATM switch above.
- `dyn_*`: a 4-master / 4-slave `lottery_bus` using the dynamic manager.
  - The masters' request/response structs and ticket inputs are ports, for
    an external traffic source to drive.
  - Each slave is a 1024-word `shared_mem`, selected by address bits
    [11:10] (the top address bits).

Both buses expose `*_bus_owner`, `*_bus_owner_valid`, `*_bus_xfer` and
`*_bus_tenure_end` for observation.

## Departures and choices to know about

- **Ticket table.** It is a constant ROM computed from a parameter. The
  original lottery manager held its tables in a register file, which could
  be rewritten. Here changing static tickets means re-elaborating.
- **Scaling rule.** The rounding rule with EXTRA = 2 is this design's own.
  It reproduces the published 1:2:4 → 5:9:18 example exactly, but other
  scaling rules are equally valid.
- **Pipelining.** The registers sit after the grant and nowhere else. The
  published implementation also pipelined the comparators and the random
  number generator for speed. Here the draw is one combinational path
  (LUT or adder tree, modulo, comparators, selector). The modulo path is
  the critical one of the dynamic manager.
- **Length field.** The `len` field, the rule that leaves a finishing
  master out of the draw, and counting the next message in `len` are all
  this design's own ways of making the overlapped draw work.
- **Sizes.** These are all choices: 16-bit addresses, 32-bit data,
  `MAX_XFER` = 8, a 16-bit LFSR, 12-word cells, 64 slots and 16-deep queues.
  The 4-bit ticket field, four masters, four slaves, four ATM ports and the
  ticket ratios 1:2:3:4 (test-bed) and 1:1:4:6 (ATM) are the architecture's
  own numbers.
- **Output links.** They are modelled only by `link_rdy`. A link takes one
  word per cycle once a cell has started. The original switch's link rates
  (15, 15, 60 and 10 Mbps) and its traffic are not reproduced, so the
  latency figures reported for it cannot be compared directly.
- **Not included.**
  - The traffic generators of the test-bed. They are stimulus, so the
    testbenches play their role.
  - The static-priority and TDMA buses that LOTTERYBUS is compared against.
  - Anything process-specific. The published controller's area and its
    3.2 ns arbitration time refer to a 0.35 µm cell library.
- **Reset.** It is synchronous and active low. Memories are not reset.

## Verification

Every module has a testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and includes a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_lfsr_rng` | Against a bit-level reference model; period exactly 65535; hold when `en` is low |
| `tb_ticket_lut` | Every request map against an independent scaling calculation; 1:2:4 → 5:9:18 |
| `tb_grant_compare` | Random partial sums against a range search; the 5 → master 4 and 0 → master 1 examples |
| `tb_lottery_mgr_static` | Grant only on draw, one-hot, only to requesters; win shares within 1.5 points of 6:13:19:26 / 64 |
| `tb_ticket_adder_tree` | All request maps and random tickets against summed references |
| `tb_modulo_unit` | Random and corner R, T against `%` |
| `tb_lottery_mgr_dynamic` | Winner's range holds the drawn ticket; a zero-ticket master never wins; shares for 1:2:3:4 and then 4:3:2:1 within 1.5 points |
| `tb_lottery_bus` | Self-checking write/read masters; 1-cycle grant on an idle bus; bandwidth ordered like the tickets; tenures capped at 8; long messages split |
| `tb_shared_mem`, `tb_dp_shared_mem`, `tb_addr_queue` | Against array/queue models |
| `tb_atm_cell_scheduler`, `tb_atm_port` | Slot use, queue pushes, bus reads and link output against cell models; link stalls |
| `tb_atm_switch` | Cells in against cells out, word by word, all slots returned; when backlogged, shares within 4 points of 5:6:21:32 / 64, port 4 fastest per word, bus over 95 % busy |
| `tb_bus_shares` | Saturated static and dynamic buses: bandwidth shares within 1.5 points of the tickets (1:2:3:4, then 4:3:2:1 on the dynamic bus); every tenure 8 words; no idle cycle at handovers; the starvation bound 1-(1-t/T)^n for master 1 |
| `tb_atm_table1` | The ATM switch under the quality-of-service load described above: shares, port 4 latency, cell integrity |
| `tb_lotterybus_soc` | Whole top at default sizes (see below) |

`tb_lotterybus_soc` runs both systems at their default sizes. It drives the
ATM switch with cells, and the dynamic bus with self-checking masters
(`tb_bus_master`, `tb_atm_traffic`). Along the way it changes the dynamic
tickets from 1:2:3:4 to 4:3:2:1 and checks that the bandwidth order flips.
It also counts each mechanism and fails if any never happened:

- handovers without an idle cycle;
- tenures cut at `MAX_XFER` on both buses;
- ticket changes;
- stalled output links;
- the scheduler refusing input because the memory is full.

Assertions in the RTL guard these rules:

- a grant is one-hot, and a draw grants a master exactly when one is requesting;
- a tenure never exceeds `MAX_XFER`;
- a granted master presents a nonzero `len`;
- a port only receives read data for a cell it is fetching.

## Simulating

Everything runs on Verilator 5 (two-state, `--timing` for the testbench
delays). For example, the top-level test:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/lottery_pkg.sv tb/tb_lotterybus_soc.sv --top-module tb_lotterybus_soc
    ./obj_dir/Vtb_lotterybus_soc

Replace `tb_lotterybus_soc` with any other testbench name to run that one.
Each finishes in seconds. To change the design:

- Tickets: set `TICKETS` on `lottery_bus` / `atm_switch` (static), or drive
  `dyn_tickets` (dynamic).
- Transfer limit: set `MAX_XFER`.
- Scaling precision: set `EXTRA`.

The widths shared by all modules are in `lottery_pkg`.
