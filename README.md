# Summing a linked list, and what rescheduling register transfers buys

A small processor walks a linked list of 8-bit two's-complement integers in
memory and adds them up. The interesting part is not the sum but the way the
hardware is derived and then improved: the algorithm is written as a sequence
of register transfers (`SUM <- SUM + Memory[NEXT+1]; NEXT <- Memory[NEXT];`),
a datapath and a controller are read off that sequence, and then the
transfers are moved between cycles and onto shared units until every cycle
holds either one memory access or one addition, never both in series. The
clock period the delay model allows drops from about 31 ns to 13 ns at the
same two cycles per list element, for one extra register and a few muxes.

This repository holds synthesizable SystemVerilog for every step of that
progression, plus three smaller examples of the same method:

| design | module | idea | cycles for an n-node list |
|---|---|---|---|
| Architecture #1 | `list_proc1` | direct implementation of the transfer sequence | 2n+1 |
| Architecture #2 | `list_proc2` | NUMA register holds the next value address | 2n+1 |
| Architecture #3 | `list_proc3` | one adder shared by the sum and the +1 | 2n+1 |
| Architecture #4 | `list_proc4` | X register; loads and adds of three nodes overlap | 2n+2 |
| aligned nodes | `list_proc_al` | nodes on even addresses: the +1 becomes a wired address bit | 2n+1 |
| aligned, 16-bit memory | `list_proc_wide` | one read fetches a whole node | n+2 |
| R0/R1/ACC sequence | `rt_acc` | datapath steered by a 3-step transfer sequence | - |
| A/B/C sequence | `rt_abc` | datapath and FSM both derived from 4 transfers | - |
| modulo-scheduled adder | `sum4_ms` | E=(A+B)+(C+D) with a 3-cycle repeating section | 3(n+1) |

`rtl_examples_top` places all of them side by side.

## The list problem

The list starts at address 0 of a 256-byte memory with an 8-bit address and
an 8-bit data port. A node at byte address p holds the address of the next
node at p and its value at p+1. A pointer of 0 ends the list, and there is
at least one node. Nodes need not be aligned, except in the two "aligned"
designs.

Every list processor has the same interface:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `start` | in | 1 | go back to the head of the list and start summing |
| `mem_a` | out | 8 | memory address |
| `mem_d` | in | 8 | memory data, read asynchronously (valid in the same cycle) |
| `done` | out | 1 | the sum is ready; held until the next `start` |
| `r` | out | 15 | the sum, two's complement |

The memory is single ported, so only one access is possible per cycle. The
memory, `list_mem`, reads asynchronously and has a synchronous write through
the same address port, which lets a host load a list. The processors never
write.

**No reset.** The registers have no reset input. `start=1` is the reset:
one cycle of it sends any state, including an illegal one, to the start
state. Hold `start` high for at least one edge. The cycle counts above are
measured from the first clock edge after `start` falls to the edge after
which `done` is 1.

**Sum width.** `r` and SUM are 15 bits (`SUM_W`). A 256-byte memory holds at
most 128 nodes, and 128 values in [-128, 127] sum to a number in
[-16384, 16256]. That range is exactly 15-bit signed, so the sum never
overflows. Values are sign-extended into the adder.

## From transfers to hardware: Architectures #1 to #3

Architecture #1 implements the loop literally. NEXT points at the current
node, and SUM accumulates. One adder forms NEXT+1 for the value address, and
a second adder forms SUM + data. The controller `lp_ctrl` is a one-hot FSM
with four states:

| state | transfers | control |
|---|---|---|
| START | NEXT <- 0, SUM <- 0 | LD_SUM, LD_NEXT, SUM_SEL=0, NEXT_SEL=0 |
| COMPUTE_SUM | SUM <- SUM + Memory[NEXT+1] | A_SEL=1, LD_SUM, SUM_SEL=1 |
| GET_NEXT | NEXT <- Memory[NEXT] | A_SEL=0, LD_NEXT, NEXT_SEL=1 |
| DONE | - | done=1 |

The transitions are:

* START to COMPUTE_SUM when start=0.
* COMPUTE_SUM to GET_NEXT.
* GET_NEXT back to COMPUTE_SUM, or to DONE when the pointer just read is 0.
* Any state to START when start=1.

The zero test sits on the NEXT mux output, not on the register, so the loop
ends in the same cycle that reads the 0 pointer.

The slow cycle is COMPUTE_SUM. It runs the 8-bit +1, then the memory read,
then the 15-bit add, all in series. Using the library delays (mux 1 ns,
memory 10 ns, n-bit adder 2·log2(n)+2 ns, register 0.5 + 0.5 ns), that path
is about 31 ns.

**Architecture #2** adds a register NUMA, the address of the next value to
add. NUMA is loaded together with NEXT in GET_NEXT, with Memory[NEXT]+1. The +1
then sits in the otherwise idle GET_NEXT cycle, and COMPUTE_SUM shrinks to
address mux, memory and 15-bit add. The delay model puts that path at about
23 ns, with GET_NEXT close behind at about 21 ns. The controller does not
change.

**Architecture #3** notices that Architecture #2 adds only once per cycle.
It merges the two adders into one. One adder input is always the memory
data. The other comes from a new mux, ADD_SEL: SUM in COMPUTE_SUM, the
constant 1 in GET_NEXT. NUMA takes the low 8 bits of the result. The
performance does not change and one 8-bit adder disappears. `lp_ctrl` drives
ADD_SEL; Architectures #1 and #2 leave that output unused.

## Architecture #4: overlapping three list nodes

The remaining critical path is memory then adder in one cycle. Architecture
#4 breaks it with a register X for the fetched value, and uses a two-cycle
loop body in which no transfer depends on another one in the same cycle:

```
1.  X    <- Memory[NUMA],  NUMA <- NEXT + 1;
2.  NEXT <- Memory[NEXT],  SUM  <- SUM + X;
```

The loop body was found by modulo scheduling. One node needs two memory
operations (read its pointer, read its value) and two additions (NUMA, SUM),
and there is one memory port and one adder. So at best a node finishes every
2 cycles. One node's chain has four steps, each depending on the one before:

* next: NEXT <- Memory[NEXT]
* numa: NUMA <- NEXT+1
* x: X <- Memory[NUMA]
* sum: SUM <- SUM+X

The schedule wraps that chain around a 2-cycle section:

```
cycle   1        2        3        4        5        6        7
memory  next1    -        next2    x1       next3    x2       next4 ...
adder   -        numa1    -        numa2    sum1     numa3    sum2  ...
```

In steady state, while the value of node i is being added, NUMA already
holds the value address of node i+1. In the same cycle the memory reads the
pointer field of node i+1, which gives the address of node i+2. NUMA and X
act as pipeline registers.

The table above starts from empty registers. This implementation starts
from the initial values NUMA=1, X=0 and SUM=0 instead, so the idle adder
cycle at the start disappears. After start it runs FIRST (read address 0),
then the value of node 1, the pointer of node 2, the value of node 2, and so
on. The final section only fetches the last value and adds it. Each cycle's delay is now one mux, the memory or the
adder, and one more mux. The delay model gives about 13 ns, against 31 ns for
Architecture #1.

The single adder gets two input muxes:

* ADD_SEL1: SUM, or the constant 1.
* ADD_SEL2: X (sign-extended), or NEXT.

NEXT+1 therefore goes through the 15-bit adder. NUMA keeps the low 8 bits.

The controller (`list_proc4` holds it) adds a start-up and a wind-down around
the loop:

| state | transfers | next state |
|---|---|---|
| INIT | SUM <- 0, X <- 0, NEXT <- 0, NUMA <- 1 | FIRST (held while start=1) |
| FIRST | NEXT <- Memory[0] (pointer of node 1) | FETCH_X |
| FETCH_X | loop step 1 | ADD_SUM, or LAST_SUM if NEXT == 0 |
| ADD_SUM | loop step 2 | FETCH_X |
| LAST_SUM | SUM <- SUM + X | DONE |
| DONE | done=1 | DONE until start |

Before each FETCH_X the registers hold the following:

* SUM holds the values of nodes 1..i.
* NUMA holds the value address of node i+1.
* NEXT holds the pointer stored in node i+1.

If that pointer is 0, node i+1 is the last node. FETCH_X still fetches its
value, and LAST_SUM adds it without reading another pointer. NEXT_ZERO is
decoded from the NEXT register, not from the memory data, so it is not on a
memory path.

## Aligned nodes

If every node starts at an even address, the value address is the node
address with its low bit set. NUMA and its addition disappear, and the
controller drives the low address bit itself. In `list_proc_al` that bit is 0
for the pointer and 1 for the value. Its loop is GET_X (X <- value), then
GET_NEXT (NEXT <- pointer, SUM <- SUM + X). That is still two cycles per node,
with the read and the add in different cycles.

A memory with 16-bit words can return a whole node in one read. In
`list_proc_wide`, {NEXT, X} <- Memory[NEXT] and SUM <- SUM + X happen in one
cycle, which halves the cycle count. The memory word at word address w holds
the node at byte 2w. The pointer is in the upper byte and the value in the
lower byte. The design uses `list_mem` with 16-bit data and a 7-bit address.

## The other examples

**`rt_acc`** is a datapath with registers R0, R1 and ACC, an adder and four
muxes S0-S3. A 3-state sequencer drives the muxes. It repeats
`ACC <- ACC+R0, R1 <- R0;  ACC <- ACC+R1, R0 <- R1;  R0 <- ACC;`.

* S0 and S1 choose between the bus and holding the register.
* S2 chooses R0 or R1 for the adder.
* S3 chooses between the adder operand and ACC for the bus.

ACC has no enable, so it loads ACC + (S2 operand) on every edge. The third
step therefore also adds R0 to ACC. The registers are not loadable: they
start from whatever they hold, and `rst` only resets the sequencer.

**`rt_abc`** builds its datapath from the sequence
`A <- IN; B <- IN; C <- A+B; B <- C;`.

* IN fans out to A and B.
* B has a mux choosing IN or C.
* C loads A+B on every edge.

The controller has one state per step and drives the enables of A and B and
the B mux select. The sequence repeats.

**`sum4_ms`** computes E[i] = (A[i]+B[i]) + (C[i]+D[i]) for i = 0..n-1. It
uses one adder and a dual-port memory (`dp_mem`, two asynchronous read ports,
port 2 also writes). Each iteration needs three memory slots (two double
loads and a store) and three additions, so the repeating section is 3 cycles
long:

| cycle of section s | port 1 | port 2 | adder |
|---|---|---|---|
| 0 | load A[s] | load B[s] | E <- T+U (iteration s-1) |
| 1 | load C[s] | load D[s] | T <- A+B |
| 2 | - | store E[s-1] | U <- C+D |

Section 0 omits the work of iteration -1. A last section n does only that
work. So n iterations take 3(n+1) cycles, with `busy` high throughout.

Array X starts at `base_x`, and element i is at `base_x + i` (modulo 256).
Sums wrap at 8 bits. While idle, a host reads and writes the memory through
port 2 (`host_*`). `start` is accepted only when the unit is idle.

## Top level

`rtl_examples_top` (parameters DW=8, AW=8, SUM_W=15) brings out each design's
ports; the designs share only `clk`.

* `lp_*[k]`: for k = 0..3, Architectures #1-#4. For k = 4, the aligned
  byte-memory design. Each has its own `list_mem`. While `lp_host_we[k]` is
  high, `lp_host_a[k]` replaces the processor address, so the host can write
  a list.
* `wide_*`: the 16-bit-memory design and its memory.
* `acc_*`, `abc_*`: `rt_acc` and `rt_abc`.
* `ms_*`: `sum4_ms`. The order of `ms_base` is A, B, C, D, E.
* `rst`: synchronous reset for `rt_acc`, `rt_abc` and `sum4_ms`.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. Run
it with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lp_pkg.sv \
    tb/tb_rtl_examples_top.sv --top-module tb_rtl_examples_top
obj_dir/Vtb_rtl_examples_top +verilator+rand+reset+2
```

`-Irtl` lets Verilator find the modules by file name. `+verilator+rand+reset+2`
starts every uninitialised register at a random value, which exercises the
reset-by-`start` behaviour. `tb_rtl_examples_top` runs the whole top at its
default parameters and takes a few seconds.

## How far it is checked

What the testbenches check:

* **List processors.** The result is compared with a sum computed in the
  testbench from the same memory image. Lists sit at random addresses over
  random bytes (unaligned, except for the aligned designs). The cases cover
  a single node, random lengths, and 128 nodes of -128 and of +127 (both ends
  of the 15-bit range). A `start` in the middle of a run must restart the
  processor. The exact cycle count from the table above is checked, and
  `done` and `r` must stay put after the end.
* **Architecture #4 schedule.** `tb_list_proc4_schedule` checks it cycle by
  cycle on four-node lists. The memory address must alternate between value
  reads and pointer reads in the order of the schedule table above, and SUM
  must change only in the addition cycles.
* **`lp_ctrl`.** Compared cycle by cycle with a reference state machine under
  random `start` and `NEXT_ZERO` inputs.
* **`sum4_ms`.** Every memory word is checked after each run. The E words
  must be right and no other word may change. The run length of 3(n+1)
  cycles is checked.
* **`rt_acc` and `rt_abc`.** Compared every cycle with their transfer
  sequences.
* **Top.** The end-to-end testbench does all of the above at the top level,
  with every design running at once. It counts each mechanism: restart,
  one-node list, full 128-node list, every sequencer step, and overlapped
  modulo-scheduled iterations. A count of zero is a failure.

What the testbenches do not check:

* The clock periods quoted above. They come from the library delay model,
  not from any timing analysis of this RTL.
* Gate-level equivalence with any particular controller implementation.

## Choices this RTL makes where the source is silent or inconsistent

* **SUM and R are 15 bits.** The lecture's I/O drawing labels R with 8 bits,
  but its timing analysis uses a 15-bit add. The wider SUM is the one that
  cannot overflow.
* **DONE holds until the next `start`.** The state diagram gives DONE no exit
  other than `start`. A gate-level sketch of the one-hot controller lets DONE
  last one cycle only. The gate-level sketch also inverts the START flip-flop
  output into the COMPUTE_SUM term. In both places the state diagram was
  followed.
* **Architecture #4's controller is new.** So are the aligned-node
  controllers. The sources give only the loop body, the initial values
  (X=0, NUMA=1, SUM=0, NEXT=Memory[0]) and "two states to start, two to
  finish".
* **The host write ports on the memories, and the ADD_SEL encoding, are
  additions.**
* **The example datapaths have no given width.** The repetition of the
  `rt_acc`/`rt_abc` sequences, their sequencer resets, and the array layout
  and the widths of `sum4_ms` are also choices made here.
* **`rt_acc` keeps ACC without an enable, as drawn.** The third step
  therefore changes ACC as a side effect.
* **Not built: the resource-utilization chart example.** It is a generic
  fetch/bus/register-file/ALU chart, and it defines no machine.
