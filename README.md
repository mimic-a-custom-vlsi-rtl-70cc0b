# MIMIC: a statically scheduled multiply-add mesh for sound synthesis

MIMIC is a parallel machine for real-time musical sound synthesis. Its model
is a network of simple primitives: multiply-adds, unit delays, long delay
lines, table lookups and wave tables. Strings, resonators and whole
instruments are built from these. Such a network has no data-dependent control flow.
All the work for one audio sample is therefore known in advance. A compiler can
place every operation on a node, every word on a link, and every step on a
clock cycle of the sample period.

The hardware follows from that. Each node is a small chip with:

- four register banks;
- one 32-bit multiply-add unit;
- an external DRAM for delay lines and tables;
- six bit-serial links to its neighbours in a 3-D mesh.

A node has no branches, no interrupts and no packet headers. Its program runs
once per sample period, and its network switch replays a routing schedule
loaded in advance. With a 20 MHz clock and a 50 kHz sample rate, a period is
400 clocks. So a node does up to 400 multiply-adds and 36 DRAM table operations
per sample. The default machine is a 3 x 3 x 3 cube of 27 nodes.

This repository gives synthesizable SystemVerilog for the node and the mesh,
with a self-checking testbench for every unit.

## The machine

`mimic_system` instantiates `NX x NY x NZ` nodes (default 3 x 3 x 3).

- The node at (x, y, z) has number `x + NX*(y + NY*z)`. The node answers to this
  number in host messages.
- Ports are numbered by direction: 0 = -x, 1 = +x, 2 = -y, 3 = +y, 4 = -z, 5 = +z.
- Output port `p` of a node drives input port `p^1` of the neighbour in that
  direction.
- Links on the faces of the mesh come in on `ext_in` and go out on `ext_out`.
  The host's serial lines attach there. A board can also close the mesh into
  a torus through them.
- `ext_out` also shows every inner link.
- Each node's DRAM is outside the chip: all DRAM pins are brought out as arrays
  indexed by node number.

All nodes share one clock and one reset. This matters: every node counts the
same 400-clock period from reset. The routing schedules of neighbouring nodes
therefore agree on which clock a word crosses a link.

## Inside a node

`mimic_node` joins five units with two 32-bit buses:

```
   net_in[5:0] --> net_unit --rx words--> IBUS --> ar_unit (4 banks, madd)
   net_out[5:0] <-- net_unit <--tx words-- OBUS <--'     |
                         |                               v
                   host bits                      table_unit <--> DRAM pins
                         v
                     host_if --> ctrl_store, route table, descriptors,
                                 DRAM writes, staged coefficients
```

- **ctrl_store** holds the program, up to 512 instructions. It keeps the
  period counter `cycle` and issues instructions from address 0 at each
  period start, up to one marked `last`.
- **ar_unit** has the four 256-word banks (`mem_bank`) and the multiply-add
  (`madd_unit`). It also moves one word per instruction from the IBUS into a
  bank, and one word from a bank onto the OBUS.
- **net_unit** holds the six links, the route table, six transmit registers and
  six receive registers.
- **table_unit** holds 64 descriptors. It runs delay-line, lookup and
  wave-table operations on the DRAM.
- **host_if** decodes host messages from the serial stream that the network
  unit hands it.

## The sample period and the schedule

Everything a node does is a function of `cycle`, which counts 0..period-1.

- At `cycle = 0` the sequencer restarts the program.
- Each clock, `cycle` selects one route-table entry. That entry says what every
  output link sends, which receive registers shift, and which input feeds the
  host interface.
- If the program has not reached `last` when the period wraps, `ev_overrun`
  pulses and the program restarts anyway. A correct schedule never lets this
  happen.

The period (default 400) and the run bit are set by a host message. Both take
effect at the next wrap, so nodes that receive the message in the same period
stay in step.

A word sent from node A to its neighbour B works like this:

1. An instruction in A reads the word from a bank onto the OBUS with
   `ob_dst = OB_NET`. This loads A's transmit register for that port.
2. A's route table selects `out_sel = 7` (local) for that port for 32
   consecutive clocks. The word leaves MSB first.
3. B's route table sets `rx_en` for the facing input on the same 32 clocks,
   shifted by one clock for the output register.
4. A later instruction in B moves the receive register into a bank with
   `ib_src = IB_NET`.

A word crossing an intermediate node uses `out_sel = 1..6` there. This repeats
an input with a delay of one clock.

Nothing checks a schedule. A wrong route table delivers wrong words silently.
This is the design's premise: the compiler is trusted.

### Instruction word (79 bits, `mimic_pkg::instr_t`)

| bits  | field      | meaning |
|-------|------------|---------|
| 78    | `last`     | last instruction of the period |
| 77    | `madd_en`  | perform `d = a + b*c` |
| 76:67 | `a`        | operand: `{bank[1:0], addr[7:0]}` |
| 66:57 | `b`        | operand |
| 56:47 | `c`        | operand |
| 46:37 | `d`        | result destination |
| 36:35 | `ib_src`   | IBUS source: none, network receive register, table result |
| 34:32 | `ib_port`  | receive register used by `IB_NET` |
| 31:22 | `ib_dst`   | bank word written from the IBUS |
| 21:20 | `ob_dst`   | OBUS sink: none, network transmit register, table operand |
| 19:17 | `ob_port`  | transmit register loaded by `OB_NET` |
| 16:7  | `ob_src`   | bank word read onto the OBUS |
| 6     | `tbl_go`   | start a table-unit operation |
| 5:0   | `tbl_desc` | descriptor of that operation |

An instruction with `ob_dst = OB_TABLE` and `tbl_go` gives the table operation
its operand x from a bank. `ib_src = IB_TABLE` stores the result of the last
finished table operation.

## The AR unit: banks, conflicts and forwarding

The banks are single-ported: one access per bank per clock. One instruction can
touch up to six words: three reads for a, b and c, one OBUS read, one IBUS
write, and the write-back of its result. Bank assignment is the compiler's job.
With a good assignment the unit issues one instruction per clock.

The pipeline has three stages:

- **RD** makes the instruction's bank accesses. A bank grants in the order a, b,
  c, OBUS read, IBUS write, and the write-back of the instruction two ahead
  always comes first. Accesses that land in a busy bank wait for the next
  clock. An instruction with a conflict therefore spends one extra clock in RD
  per collision (`ev_conflict`). The sequencer is held meanwhile.
- **EX** computes the multiply-add and drives the OBUS. It also starts a table
  operation if `tbl_go` is set.
- **WB** writes the result.

A read of the word that the instruction in EX will write is taken from the
result register instead of the bank (`ev_forward`). A chain of dependent
multiply-adds, as in a filter, therefore runs at one per clock.

The OBUS word passes through a selector on the bank outputs. If `ob_src` names
one of the instruction's own operands a, b or c, the OBUS takes that read and
needs no bank access of its own. Any other `ob_src` is a fourth read and
competes for a bank like the others.

A multiply-add alone uses all four bank ports: three reads, plus the
write-back of an earlier instruction. An IBUS write therefore always costs one
extra clock in a fully packed stream. Schedule it so that its bank differs
from the write-back bank of the previous instruction; it then costs exactly
one clock.

Two rules are left to the scheduler, like bank placement:

- A bank write from the IBUS to a word that one of the two preceding
  multiply-adds writes is overwritten by that later write-back.
- Table operations are interlocked:
  - An instruction with `tbl_go` leaves RD only when the table unit will take
    the start in the next clock.
  - An instruction with `ib_src = IB_TABLE` waits until the result of the most
    recently started operation is in the result register. It then stores that
    result.

One instruction can store the previous result and start the next operation.
This keeps the table unit busy back to back.

### Arithmetic

Words are two's-complement Q1.31 fractions in [-1, 1). `madd_unit` computes
`y = a + ((b*c) >> 31)`:

- the full 64-bit product is truncated toward minus infinity;
- the sum saturates to 0x7FFFFFFF or 0x80000000 (`sat` flags this).

## The network unit

A route-table entry is 27 bits (`mimic_pkg::route_t`):

- `out_sel[p]`, 3 bits for each of the 6 outputs, in bits 26:9:
  - 0 = send 0;
  - 1..6 = repeat input `out_sel-1`;
  - 7 = send the transmit register.
- `rx_en[5:0]`: shift that input into its receive register.
- `host_tap`: 0 = none, 1..6 = input `host_tap-1` feeds the host interface.

The table has 512 entries, indexed by `cycle`. All outputs are registered, so
a pass-through costs exactly one bit time.

Before the host starts the program (`running` low), a fixed boot route applies
instead of the table. Input 0 feeds the host interface and is repeated on
output 1. One host line on the -x face of an x row therefore reaches every node
of that row while nothing is loaded yet.

## Host messages

A host message is a start bit (1), then a 32-bit header and a 32-bit data word,
both MSB first. The header is `{node[7:0], cmd[3:0], addr[19:0]}`. Node 0xFF is
broadcast. The serial stream may pause between bits: only tapped clocks count.

| cmd | name          | addr                      | data |
|-----|---------------|---------------------------|------|
| 1   | `HC_CS_WR`    | `{index, chunk[1:0]}`     | 32 bits of instruction `index`; chunk 0 = bits 31:0 |
| 2   | `HC_RT_WR`    | route-table index         | route entry in bits 26:0 |
| 3   | `HC_COEF`     | `{bank[1:0], addr[7:0]}`  | coefficient; staged only |
| 4   | `HC_ACTIVATE` | -                         | releases all staged coefficients |
| 5   | `HC_DESC_WR`  | `{desc[5:0], field[1:0]}` | field 0 base, 1 length, 2 pointer, 3 `{mode[5:4], size[3:0]}` |
| 6   | `HC_DRAM_WR`  | sample address            | sample |
| 7   | `HC_CTRL`     | -                         | `{run[16], period[15:0]}` |

While the machine runs, host messages share the links with the data. The route
tables must set aside tap slots along a chain of links that data does not use.
Every node of the chain must tap the host's bits on the right clocks, shifted
by one clock per hop.

### Coefficient double buffering

A parameter change often touches many coefficients, and a sample computed with
half of them updated can click. The host interface therefore only stages
`HC_COEF` writes, in a 16-entry buffer. One `HC_ACTIVATE` word releases all
writes staged before it.

Released writes go into the banks only while the AR unit is idle. That is after
the period's program has finished and before the next one starts. One sample
therefore sees either all of an update or none of it.

A write that finds the buffer full is dropped and pulses `ev_overflow`. So is a
DRAM write that arrives while the previous one still waits.

## The table unit and its DRAM

The DRAM is 256K x 4 bits, which holds 32K samples of 32 bits. The sample
address is 15 bits:

- row = `sample[14:6]`;
- column = `{sample[5:0], nibble[2:0]}`.

One operation takes 11 clocks:

1. one clock with RAS low and the row address;
2. eight page-mode clocks with CAS low, one nibble each, least significant
   nibble first;
3. two precharge clocks.

A delay-line operation reads and writes each nibble in the same clock
(read-modify-write). It costs no more than a read.

The result is complete after the eighth nibble clock and goes into `y` then,
during the precharge clocks. A new operation is taken in the last precharge
clock. So operations follow each other every 11 clocks, and 36 fit in a
400-clock period.

The unit tells the AR unit two things:

- `ready_next`: a start given in the next clock will be taken;
- `y_valid`: `y` holds the latest started operation's result.

A descriptor holds `base`, `len`, `ptr`, `mode` and `size`:

| mode        | result | side effect |
|-------------|--------|-------------|
| `TM_DELAY`  | `line[base+ptr]`, the sample written `len` operations ago | writes x there; `ptr = (ptr+1) mod len` |
| `TM_LOOKUP` | `table[base + index]` | none; `index` is the top `size` bits of x read as offset binary, so x = -1.0 gives entry 0 |
| `TM_WAVE`   | `table[base+ptr]` | `ptr = (ptr+1) mod len` |

When the node is idle, the unit also performs the host's DRAM writes.

DRAM refresh is not implemented. A delay line that cycles its rows faster than
the refresh interval refreshes itself, but a rarely used table would not.

## What is fixed and what is chosen

These come from the design's description:

- the unit structure;
- the IBUS/OBUS arrangement;
- four 256-word banks;
- a 32 x 32-bit fixed-point multiply-add at 20 MHz;
- a 400-clock period at 50 kHz;
- six bit-serial links per node with a one-bit-time pass-through;
- headerless one-word packets on compiled routes;
- host daisy chains on unused links;
- double-buffered coefficients with a single activation word;
- a 256K x 4 DRAM giving 32K samples, 11 clocks per operation and 36
  operations per period;
- the 27-node low-end machine.

These are this design's own choices:

- every encoding (instruction, route entry, host message, descriptor);
- the Q1.31 format with floor and saturation;
- the three-stage AR pipeline with its forwarding;
- the store depths (512 instructions, 512 route entries, 64 descriptors,
  16 staged coefficients);
- the boot route;
- MSB-first links;
- the DRAM timing inside the 11 clocks, and the early result that lets
  operations follow each other;
- the shared OBUS read;
- the port numbering of the mesh.

Departures and omissions:

- The mesh has no wrap-around links; a torus must be closed outside through
  `ext_in`/`ext_out`.
- The node number is a `node_id` input, not a pin of the 36-pin package.
- The DRAM data pins are split into `dq_out`, `dq_oe` and `dq_in`.
- There is no DRAM refresh.
- Staged coefficients live in a separate buffer, not in spare bank words.
- The banks are single-ported. An IBUS write competes with the multiply-add
  for a bank port, so a period cannot hold 400 multiply-adds and its I/O
  at once.
- The compiler, the host workstation, the DRAM chip and the pads are not part
  of this RTL. A behavioural DRAM (`tb/dram_model.sv`) stands in for the chip
  in the testbenches.

## Capacity at the default parameters

| load | needed | built |
|------|--------|-------|
| multiply-adds per node per sample, alone | 400 | 400 clocks, one issue per clock without conflicts; 512-instruction store |
| the whole per-node load at once: 400 multiply-adds, 30 table operations, 10 words in and 10 out, 1 host update | 400 + about 40 IBUS writes = 440 bank-slot clocks | does not fit; 350 multiply-adds with all the rest end by clock 389 (`tb_node_load`) |
| table operations per node per sample | 30 | 36 (11 clocks each); 64 descriptors |
| packets per node per sample | 10 | 6 links x 400 / 32 = 75 word slots |
| on-chip words | 1K | 4 x 256 |
| samples of delay-line storage | 32K | 32K |
| grand piano, about 10,000 multiply-adds | 25 nodes | 27 |
| 30-instrument ensemble, 4,800 multiply-adds | 12 nodes | 27 |
| random traffic on a 27-node torus: 595 words per sample, 62% of link clocks busy | about 1,255 word-hops | 2,025 word-hops of raw link capacity; whether a given pattern can be scheduled depends on the routing tool and on the torus links closed outside the mesh, and there is no routing buffer |

At one multiply-add per clock and 20 MHz, the 27-node default gives about
540 million multiply-adds per second.  Networks of 64 or 125 nodes (or an
orchestra-sized board of about 100) need `NX = NY = NZ = 4` or `5`. The RTL is
parameterised for this, and `tb_mesh_sizes` simulates both sizes.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `mimic_pkg.sv` | shared constants, instruction, route, descriptor and message types |
| `mimic_system.sv` | top: the mesh of nodes |
| `mimic_node.sv` | one chip |
| `ar_unit.sv` | banks, conflict handling, pipeline, forwarding, bus moves |
| `mem_bank.sv` | 256 x 32 single-port bank |
| `madd_unit.sv` | saturating multiply-add |
| `ctrl_store.sv` | program store and sequencer |
| `net_unit.sv` | links, route table, transmit and receive registers |
| `host_if.sv` | message decoder and coefficient staging |
| `table_unit.sv` | descriptors and DRAM sequencer |

`tb/`:

| file | contents |
|------|----------|
| `tb_<unit>.sv` | one self-checking testbench per unit |
| `tb_node_load.sv` | one node under a full period's load |
| `tb_mesh_sizes.sv` | 64- and 125-node meshes: boot chain delay and a word across a whole row |
| `mimic_tb_pkg.sv` | instruction builders, a reference multiply-add, host-message builder |
| `dram_model.sv` | behavioural 256K x 4 page-mode DRAM |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/mimic_pkg.sv tb/mimic_tb_pkg.sv tb/tb_mimic_system.sv \
    --top-module tb_mimic_system
./obj_dir/Vtb_mimic_system
```

Replace the testbench name to run any other testbench. The testbenches reset
everything they read, so they do not depend on initial values.

`tb_mimic_system` runs the full 27-node machine at its default parameters:

- A host line on node 0's -x link boots the first x row, loads programs,
  route tables, descriptors and DRAM contents, and starts the machine.
- Node 0 runs a two-pole resonator driven by a wave table, followed by a
  five-sample DRAM delay line and a table lookup. Its schedule includes bank
  conflicts and forwarded operands. It sends one word every period to node 1.
- Node 1 scales the word it received and sends the result in the next period
  towards node 2. Node 2 passes it on from input 0 to output 1.
- The testbench checks every transmitted word against a software model,
  period by period.
- While the machine runs, the host sends coefficient updates over a reserved
  tap window. Sample values change only after the activation word. One burst
  overflows the staging buffer on purpose.
- The testbench counts bank conflicts, forwards, table waits, table
  operations, pass-through bits, transmit bits, activations, overflows and the
  boot-to-run switch. It fails if any of them never happened, or if a period
  overran.

`tb_mimic_node` does the same on a single node.

`tb_node_load` loads one node at its default sizes with a full period's work:

- 350 multiply-adds, scheduled without bank conflicts;
- 30 back-to-back delay-line operations;
- 10 words received and 10 sent;
- one coefficient update with its activation word, every period.

Every sent word is checked against a model that executes the program in
program order. So are the per-period counts of multiply-adds, table operations
and transmit loads. The testbench also checks that no period overruns, and it
prints how late in the period the program ends.

`tb_mesh_sizes` builds the mesh as 4 x 4 x 4 = 64 and 5 x 5 x 5 = 125 nodes, side
by side, and checks three things on the first x row of each:

- During boot, the host's bits leave the row's +x face exactly K clocks after
  entering node 0 in a row of K nodes, one clock per node.
- While running, a word computed in node 0 crosses the pass-through nodes. It
  arrives in the last node's receive register and at the +x face intact,
  every period.
- A broadcast reaches only the nodes on the boot chain.

The unit testbenches compare against independent models and check the
documented cycle counts. They check the 11-clock table operation, one
instruction per clock without conflicts, and the one-clock pass-through delay.
