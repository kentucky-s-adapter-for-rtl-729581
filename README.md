# KAPERS: an aggregate-function network adapter in SystemVerilog

KAPERS (Kentucky's Adapter for Parallel Execution and Rapid Synchronization)
joins a small cluster of PCs through their parallel ports. It does more than
carry messages between them. The adapter computes on what the nodes send. It
gives them:

- a hardware barrier that also returns the OR of a nybble from every node;
- a shared nybble-wide memory. Each access is an atomic read-modify-write:
  exchange, OR, XOR, add with carry, or minimum. It always returns the old
  value.

Reductions, scans, broadcasts, votes and scheduling operations are built on
these two primitives. The port carries only one nybble per write, so large
objects (up to 64-bit integers and floats) are handled one nybble at a time:

- Each PE keeps a carry or "decided" bit, so a multi-nybble Add or Min works
  across nybbles.
- Lock registers make a multi-nybble access look atomic. A PE walking up
  through an object can never overtake another PE that is ahead of it.

This RTL is a 4-port version of the design. It has a 256-nybble memory built
from flip-flops and a 50 MHz clock, which matches the original FPGA build (an
Altera Cyclone EP1C3).

## The port protocol

Each PE writes one byte per port operation and reads five status bits:

| bits  | PE -> adapter                      | adapter -> PE                  |
|-------|------------------------------------|--------------------------------|
| 7     | strobe: toggled on every command   |                                |
| 6..4  | opcode                             |                                |
| 3..0  | data nybble (SetFunc: lock, func)  | O3..O0 result nybble           |
| O4    |                                    | ready: toggles per result      |

The strobe and the data go out in the same port write. The PE needs no
separate handshake write, so a command with a reply costs two port
operations: one write and one polled read. The adapter must therefore cope
with strobe and data lines that settle at different times (see
`inp_detect`). It drives the result first and toggles O4 two clocks (40 ns)
later.

| opcode | name      | action in the adapter (after the reply)                                                  | reply |
|--------|-----------|-------------------------------------------------------------------------------------------|-------|
| 000    | BarOr     | unlock all, carry=0, off=0; wait until every PE is at the barrier                         | OR of all PEs' nybbles |
| 010    | SetFunc   | unlock all, carry=0, off=0; func = d[2:0], locking = d[3]                                 | none  |
| 100    | AddrFirst | unlock all, carry=0, off=0; address nybble 0 = d                                          | none  |
| 101    | AddrNext  | next higher address nybble = d                                                            | none  |
| 110    | MemNext   | [lock addr+off]; Func(mem[addr+off], d); [lock addr+off+1, release addr+off]; off++     | old nybble |
| 111    | MemLast   | [lock addr+off]; Func(mem[addr+off], d); release; carry=0; off=0                        | old nybble |

Opcodes 001 and 011 are reserved and ignored. The memory functions are:

| func | name | effect (m = memory nybble, d = PE nybble, c = the PE's carry) |
|------|------|----------------------------------------------------------------|
| 000  | Xchg | m = d |
| 001  | Or   | m = m \| d |
| 010  | Xor  | m = m ^ d |
| 011  | Add  | {c, m} = m + d + c (send the low nybble first) |
| 100  | Min  | if c == 0: m = min(m, d); c = (m != d) (send the high nybble first) |

### Modal encoding

The PE sends no opcode with its data. The function, the lock flag, the base
address and the position inside the current object are all modes held in the
PE's processing unit.

- `AddrFirst` replaces only the lowest address nybble. The higher nybbles keep
  their values, so moving to a nearby address costs one write.
- `MemNext` walks through an object without changing the base address. It uses
  a separate offset (`mem_off`).
- Address setting and memory sequencing can be interleaved without disturbing
  each other. A PE can set an address and then access it in the function mode
  it set earlier.

## Locks: atomic multi-nybble objects

This is the part that needs the most care. Each PE has one lock register
{valid, address}, and every processing unit can read all of them. A
`SetFunc` with bit 3 set makes the following memory accesses locking. A
locking access then works like this:

1. **Acquire.** Before accessing nybble `addr+off`, the unit waits while any
   *other* lock register holds that address. Waiting turns the PE's LED red.
   Unlocked functions ignore locks.
2. **Access.** The access and the lock acquisition happen in the same clock.
   That clock is granted by the arbiter, so two units can never take the same
   lock in the same clock. The old value goes back to the PE at once; the
   reply does not wait for the next lock.
3. **Hand over.** After a `MemNext`, the unit moves its lock from `addr+off`
   to `addr+off+1`, waiting if that nybble is held. It keeps the current
   nybble locked while it waits. One register per PE is enough because the
   move is a single update.
4. **Release.** `MemLast` releases the lock. So do `BarOr`, `SetFunc` and
   `AddrFirst` ("unlock all").

Every PE walks an object from its low address upwards. As a result, PEs that
start on the same object line up in the order they first reached it and stay
in that order. The end-to-end test checks two consequences:

- Four PEs do a locked 16-bit Add at the same time. The old values they get
  back form a chain: each old value plus that PE's addend equals another PE's
  old value.
- Four PEs each write a 32-bit value, nybble by nybble, without waiting for
  replies. The object always ends up as exactly one PE's whole value.

**Deadlock rule (a choice of this design).** A unit may be waiting for the
lock on the next nybble while the next buffered command is not `MemNext` or
`MemLast`. In that case it gives up the lock and goes on. That command would
release all locks anyway, and waiting could deadlock against a PE that is
waiting at a barrier.

**Min across nybbles.** The Min carry rule above is implemented exactly as
specified. The carry becomes 1 only when the stored value is already smaller
than the PE's nybble. A PE whose nybble is *smaller* therefore keeps
comparing on the lower nybbles instead of overwriting them. For arbitrary
values, the result is only guaranteed when the PEs reach the object in
decreasing order of value. Host software should be written with this in
mind. The test uses values for which every arrival order gives the minimum.

## Datapath

For each PE port:

```
pe_in[i] -> inp_detect -> nxt_seq -> cmd_fifo -> processing_unit -> pe_output -> pe_out[i]
                                                   |  ^   lock registers (all PEs)
                                                   v  |
                              mem_arbiter -> alu_memory (one, shared)
                              barrier_or  (one, shared)
```

- **`inp_detect`** passes the port byte on only after it has been the same on
  consecutive clocks. This follows a four-state machine: sample, then two
  equal samples, then stable. After a clean change the new value appears on
  the 5th clock edge. A strobe that arrives one or two clocks before its data
  never gets through.
- **`nxt_seq`** turns a change of D7 into a one-clock command strobe carrying
  D6..D0. The first level seen after reset is not a command.
- **`cmd_fifo`** is 8 entries deep. It lets a PE keep writing while its unit
  is stuck behind a lock. If a push is dropped because the FIFO is full, the
  `fifo_overflow` output shows it.
- **`processing_unit`** decodes the commands and holds all the modes described
  above. It takes one command per clock when idle. A memory command finishes
  in the clock its grant arrives.
- **`mem_arbiter`** gives the single memory port to one unit per clock. The
  default (`TOKEN_RING=0`) is a round-robin counter: unit *n* may use the
  memory only in the clocks whose count is *n*. With `TOKEN_RING=1` the grant
  goes to the next unit that is requesting. Lock hand-over steps also need a
  grant, but they do not write the memory.
- **`alu_memory`** is a register array with the ALU in its port. It reads,
  computes and writes in one clock, and returns the old value and the new
  carry in that same clock. The carry itself lives in each PE's unit.
- **`barrier_or`** releases all waiting units on the same clock, once every
  port is waiting. It returns the OR of their nybbles. Every port always takes
  part in the barrier.
- **`pe_output`** drives the result nybble, then toggles O4 `READY_DELAY`
  clocks later.

Latency without contention, from a port write to the O4 toggle, is at most 15
clocks (0.3 µs at 50 MHz). This is well inside the roughly 1 µs a PC needs
for one port operation.

## Parameters (`kapers_top`)

| parameter     | default | meaning |
|---------------|---------|---------|
| `NPE`         | 4       | PE ports |
| `MEM_SIZE`    | 256     | memory nybbles |
| `ADDR_NYB`    | 2       | address nybbles held (address width 4*ADDR_NYB); further `AddrNext`s are ignored |
| `FIFO_DEPTH`  | 8       | command FIFO entries per port |
| `STABLE`      | 3       | states after the sampling state in the input filter |
| `READY_DELAY` | 2       | clocks from result data to the O4 toggle |
| `TOKEN_RING`  | 0       | 0: round-robin counter, 1: token ring |

Ports: `clk`, synchronous active-low `rst_n`, `pe_in[NPE]` (8 bits each),
`pe_out[NPE]` (5 bits each), the LED outputs `led_r[NPE]` and `led_g[NPE]`,
and `fifo_overflow[NPE]`.

The LED is dark until the PE's first command. It is red while the PE waits
at the barrier or for a lock, and green otherwise.

## Where this RTL departs from or adds to the original design

- A reset input is added. Reset clears the memory, FIFOs, modes and locks.
- The original keeps one offset for both address setting and object
  sequencing. Here the two are separate, which is what the host software
  relies on when it interleaves them. `AddrFirst`, `SetFunc` and `BarOr`
  still clear the object offset.
- Only two address nybbles are kept. The protocol itself allows addresses of
  any length.
- The original's output path is a second FIFO paced by a divide-by-5 counter.
  Here it is replaced by the simpler "data, then ready two clocks later"
  stage.
- The PE-number indicator lines of the original connector are not used.
- The original holds each PE's lock in a separate 9-bit register beside its
  processing unit. Here the same 9 bits {valid, 8-bit address} live inside
  `processing_unit`.
- The original forms the barrier inside each processing unit, from the
  other ports' FIFO heads. Here it is one shared `barrier_or` block fed by a
  request and a nybble from each unit.
- The deadlock rule for pending locks and the full-FIFO behaviour (drop the
  push and flag it) are this design's own choices.
- The original FPGA could also be built with block RAM (about 13K nybbles).
  Only the flip-flop memory is modelled here.
- Not modelled at all: the host PCs, level shifters, regulators, the
  configuration flash and the rest of the board.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
          rtl/kapers_pkg.sv rtl/[!k]*.sv rtl/kapers_top.sv \
          tb/tb_kapers_top.sv --top-module tb_kapers_top -Mdir obj && obj/Vtb_kapers_top
```

The package is listed first so it is compiled before its users. Without
`-Wno-fatal`, Verilator stops on the width and timescale lint warnings of the
testbenches. For a block testbench, swap in `tb/tb_<block>.sv` and its top
module name.

`tb_kapers_top` runs the whole adapter at its default parameters. Four
behavioural hosts run an SPMD program for 20 rounds with random data:

- BarOr;
- OR, XOR and Add reductions;
- a locked atomic Add;
- Count, Votecount, Vote and First;
- broadcast and put/get;
- a locked multi-nybble Min;
- a prefix scan ordered through a reference nybble;
- the locked put sent without replies.

The hosts also skew the strobe against the data on a quarter of their port
writes.

The testbench counts each of these mechanisms and fails if any never
happened:

- input-filter rejections;
- short address updates;
- barriers;
- lock waits and lock hand-overs;
- FIFO backlog;
- memory contention;
- add carries and Min decisions;
- all three LED states.

It also checks that no FIFO ever overflows and that unlocked replies arrive
within 50 clocks. `tb_kapers_top_token` repeats the test with the token-ring
arbiter.

`tb_kapers_workloads` runs the same library operations at their largest
object size, 64 bits (16 nybbles), for 20 rounds at default parameters:

- OR, XOR and Add reductions;
- a locked atomic Add;
- broadcast;
- a put/get area of 4 x 16 nybbles;
- Votecount with 32-bit counters;
- an ordered 64-bit scan.

These objects reach address 0xF0, so every access sets both address nybbles.
All three end-to-end testbenches take well under a second.

The FIFO depth of 8 covers a locked sequence of up to 8 nybbles (32 bits) sent
without waiting for replies. A longer unacknowledged sequence to a contended
object can overflow it. 64-bit locked operations should wait for each reply,
as the library's do.

## Files

- `rtl/kapers_pkg.sv`: opcode and function enums, the command struct, and
  the ALU function.
- `rtl/kapers_top.sv`: the top level. `inp_detect.sv`, `nxt_seq.sv`,
  `cmd_fifo.sv`, `processing_unit.sv`, `pe_output.sv`, `barrier_or.sv`,
  `mem_arbiter.sv` and `alu_memory.sv` are its blocks.
- `tb/tb_<block>.sv`: one testbench per block. `tb/kapers_hostlib.svh` models the
  host side of the port protocol. `tb/kapers_host.svh` holds the SPMD
  program shared by `tb_kapers_top` and `tb_kapers_top_token`.
