# OLLAF: a reconfigurable fabric that preempts a task in one clock cycle

OLLAF is a fine-grained, dynamically reconfigurable fabric. It has LUTs and
flip-flops like an FPGA, but it was designed around the needs of a real-time
operating system. The cost it attacks is preemption. On a conventional FPGA,
swapping one hardware task for another means reading back the old task's
state and loading a new bitstream. That takes hundreds to millions of cycles,
growing with the size of the task. OLLAF makes the swap itself take one clock
cycle, whatever the size of the task. It does this with three ideas:

1. **Every memory point has two planes.** Each flip-flop, and each
   configuration bit, is built from two flip-flops. One is in the *run plane*
   and serves the running task. The other is in a hidden *scan plane*, which
   forms a shift register (a scanpath). The next task's configuration and
   state are shifted into the hidden plane while the current task keeps
   running. One select signal then exchanges the two planes.
2. **The fabric is cut into identical columns.** A task occupies a whole
   number of columns, and every column offers the same resources. A task can
   therefore be placed in, or moved to, any free group of columns without
   changing its configuration data. Placement becomes a one-dimensional
   problem, close to memory allocation.
3. **The OS support hardware is built in, next to each column.** Each column
   has a Context Management Unit (CMU) and a Hardware Configuration Manager
   (HCM). Each also has small local memories that cache the contexts and
   configurations of the tasks expected next. A hardware supervisor (a
   microprocessor running the real-time kernel) fills these caches over a
   dedicated control bus from a central repository.

Here a *context* is the state of a task: the values of its flip-flops. A
*configuration* is what the task is: the LUT contents and the routing.

This repository holds synthesizable SystemVerilog for the fabric: logic
elements, columns, managers, local memories, control bus, communication
medium and central repository. It also holds self-checking testbenches. The
supervisor processor and its kernel are not included. Its two ports are
brought out of the top, and the testbenches play its part.

## Structure

```
ollaf_top
├── ctrl_bus            supervisor -> columns, multi-column swap register
├── column_tile  x N_COL
│   ├── logic_column    the reconfigurable column
│   │   ├── cfg_plane        dual configuration plane (CFG_W dual_plane_ff)
│   │   ├── col_interconnect multiplexor routing
│   │   └── logic_element x N_LE   (LUT4 + dual_plane_ff)
│   ├── hcm             configuration manager
│   ├── lcm (configs)   local configuration memory, 10 slots
│   ├── cmu             context manager
│   └── lcm (contexts)  local context memory, 10 slots + version tags
├── comm_medium         application communication medium (channels)
└── ccr                 central context/configuration repository
```

`ollaf_pkg` holds the control-bus request and response structs, the target
map, and the manager command and status words. It is shared by all modules.

## The dual plane memory point (`dual_plane_ff`)

Two flip-flops, FF1 and FF2, share one memory point. A select input,
`csrs`, assigns their roles:

| `csrs` | run plane (captures `d`, drives `q`) | scan plane (shifts `cs_in`, drives `cs_out`) |
|--------|--------------------------------------|----------------------------------------------|
| 0      | FF1                                  | FF2                                          |
| 1      | FF2                                  | FF1                                          |

Changing `csrs` exchanges a whole running state for a state that was loaded
behind it. Nothing is copied. Both planes run on the single fabric clock,
with separate enables (`run_en`, `scan_en`). The task reset `rst` clears only
the run plane. The system clear `clr` clears both planes.

The same cell is used twice:

* In each **logic element**, the LUT drives `d`. The scanpath through the
  column's elements is the *context scanpath*: one bit per element.
* In the **configuration plane** (`cfg_plane`), the run side never captures.
  A configuration does not change while its task runs. The scan side forms
  the *configuration scanpath*.

Each column has two plane selects, one for context and one for
configuration. The two can be swapped together (a preemption) or separately.
Swapping only the context reruns the same configuration from a different
state, for example a checkpoint or a second instance of the same task.

### Swap timing

A swap request (`ctx_swap` or `cfg_swap` on `logic_column`) toggles the
plane select at the next rising edge. In that same cycle, no run-plane
flip-flop captures. The outgoing task's last state is therefore frozen into
what becomes the hidden plane, and the incoming task starts on the following
edge from exactly the state that was restored. The switch costs one cycle,
during which neither task advances. The testbenches check this cycle count.

## Logic element and column configuration

A logic element (`logic_element`) is a 4-input LUT and a dual-plane
flip-flop:

* `lx = lut[{D,C,B,A}]`, with A as the least significant input.
* The flip-flop captures `lx` when `run_en`, and either the routed `ce` or
  the always-enabled configuration bit, is high. Its output is `qx`.

All routing uses multiplexors (`col_interconnect`). Multiplexors need
log2(choices) configuration bits each, where pass-transistor switches need
one bit per choice. Every LUT input, every clock enable, and every bit of the
column's port on the communication medium picks one of these sources:

| select value                    | source                                     |
|---------------------------------|--------------------------------------------|
| 0 … N_LE-1                      | `lx` of element *i* (only from lower-numbered elements, see below) |
| N_LE … 2·N_LE-1                 | `qx` of element *i*-N_LE                   |
| 2·N_LE … 2·N_LE+COMM_W-1        | communication input bit                    |
| 2·N_LE+COMM_W                   | constant 1                                 |
| larger                          | constant 0                                 |

Element *k* may only take `lx` of elements 0…*k*-1. Choosing any other `lx`
gives 0. LUTs can still be chained within one clock cycle. But no
configuration can close a combinational loop, not even the random contents
of a plane at power-up. Lint tools that analyse whole vectors still report a
loop from `lx` to `abcd`. The bit-level masking breaks it.

Configuration word of one column: bit *k* sits in configuration point *k*.
With SEL_W = ceil(log2(2·N_LE + COMM_W + 1)):

| bits (element *i*, base *b* = *i*·(17 + 5·SEL_W)) | meaning                 |
|------------------------------------|-------------------------------------------|
| *b* … *b*+15                       | LUT contents                              |
| *b*+16                             | flip-flop always enabled                  |
| *b*+17 + *j*·SEL_W                 | select of input *j* (0–3: A–D, 4: CE)     |
| after the last element             | COMM_W data selects, then the strobe select |

At the default size (32 elements, COMM_W = 4), SEL_W is 7. A configuration
is then 1699 bits and a context 32 bits. Routing stays inside a column.
Columns exchange data only through the communication medium, which keeps
every column identical and every task relocatable.

## Context and configuration hierarchy

| level                      | holds                        | transfer to the level above        |
|----------------------------|------------------------------|------------------------------------|
| hidden planes              | 1 context + 1 configuration (plus the active ones) | swap: 1 cycle |
| local memories (`lcm`)     | 10 contexts, 10 configurations per column | CMU/HCM: 1 bit per cycle, hidden behind the running task |
| central repository (`ccr`) | 128 entries of 54 words, with version tags | supervisor, over the control bus |

**CMU** (`cmu`). It accepts two commands:

* `MOP_RESTORE slot, ver`: shifts a local slot into the hidden context plane.
  The command is refused, and `error` is set, unless the slot's tag is valid
  and equal to `ver`. It takes N_LE+1 cycles: one cycle of memory latency,
  then one shift per bit.
* `MOP_SAVE slot, ver`: shifts the hidden plane out into the slot and tags
  the slot with `ver`. It takes N_LE cycles.

The save feeds the outgoing bits back into the scanpath. The hidden plane
therefore still holds the saved task, and swapping back resumes it without a
restore.

**HCM** (`hcm`). It is the CMU without saving or versions. `MOP_RESTORE`
loads a configuration in CFG_W+1 cycles: 1700 at the default size. This is
the latency between deciding to preempt and being able to swap. It depends
only on the column height, not on the task or the number of columns.

**Versions.** More than one copy of a context can exist: in several local
memories and in the central repository. Only one of them is current. The
supervisor keeps a version number per task. It increments the number on
every save and passes it with the save command, and the CMU writes it into
the slot's tag. A restore names the version it expects, so a stale copy
cannot be restored by mistake. The supervisor should copy a saved context to
the repository soon after the save, together with its version.

**Local memory** (`lcm`). Storage is 32-bit words, with slot *s* starting at
word *s*·ceil(SLOT_BITS/32). It has two ports:

* Port A belongs to the manager. It reads or writes one bit per cycle, with
  read data one cycle later.
* Port B belongs to the control bus. It reads or writes whole words.

If both ports write the same word in one cycle, port A's bit wins.

## A preemption, step by step

Task T1 runs in column 0. The supervisor preempts it for T2:

1. If T2 is not cached yet, copy its configuration and context from the
   repository into the column's local memories: `TGT_CFGMEM`, `TGT_CTXMEM`
   and `TGT_TAG`.
2. Write an HCM and a CMU restore command. For about 1700 cycles, T2 is
   shifted into the hidden planes while T1 keeps running at full speed.
3. When both managers are idle, write `COL_SWAP` = 3, or use `TGT_SWAP` for a
   task that spans several columns. T1 is frozen for that one cycle, and T2
   runs from the next one.
4. Write a CMU save command with T1's new version. T1's context, now in the
   hidden plane, goes to a local slot in 32 cycles while T2 runs.
5. Copy the saved context and its version to the central repository.

## Control bus

There is one master, the supervisor, and one request per cycle
(`ollaf_pkg::cb_req_t`: valid, we, column, target, 16-bit word address,
32-bit data). Writes take effect at the clock edge. Read data returns with
`rvalid` on the next cycle. There are no wait states.

| target       | address | write                                   | read                              |
|--------------|---------|-----------------------------------------|-----------------------------------|
| `TGT_CMU`    | –       | command `{ver[31:24], slot[23:16], op[1:0]}` | `{done_count[31:16], error[1], busy[0]}` |
| `TGT_HCM`    | –       | command (op must be restore)            | same status format                |
| `TGT_CTXMEM` | word    | local context memory word               | word                              |
| `TGT_CFGMEM` | word    | local configuration memory word         | word                              |
| `TGT_TAG`    | slot    | `{valid[8], version[7:0]}`              | same                              |
| `TGT_COL`    | 0       | bit 0: run                              | `{cfg plane[2], ctx plane[1], run[0]}` |
|              | 1       | any: one-cycle task reset of the run plane |                                |
|              | 2       | bit 0: swap context, bit 1: swap configuration |                            |
| `TGT_COMM`   | 0x000+ch | channel value                          | channel value                     |
|              | 0x100+col | binding `{tx_en[16], tx_ch[15:8], rx_ch[7:0]}` | binding                  |
| `TGT_SWAP`   | –       | column mask in bits N_COL-1…0, bit 30 swaps contexts, bit 31 swaps configurations, all masked columns in the same cycle | 0 |

For `TGT_COMM` and `TGT_SWAP`, the column field is ignored. The managers
refuse a command that arrives while they are busy. `column_tile` asserts that
a plane is never swapped while its hidden side is being shifted; the
supervisor must wait for both managers to go idle.

## Communication medium

Tasks do not wire to each other. Each column has one port on the medium: it
sends COMM_W data bits plus a strobe, and receives COMM_W bits, all routed
through its interconnect. The medium holds one exchange register (channel)
per column. The supervisor binds each column to a transmit channel and a
receive channel, so a task's communication follows it to any column, and
data stays there while a task is swapped out.

* A column with transmit enabled and its strobe high writes its channel at
  the clock edge.
* If several columns write the same channel in one cycle, the lowest-numbered
  column wins.
* A value crosses from one column's flip-flops to another's in two cycles.

## Parameters

| parameter   | default | origin                                             |
|-------------|---------|----------------------------------------------------|
| LUT inputs  | 4       | OLLAF logic element                                 |
| `LCM_SLOTS` | 10      | OLLAF: about ten contexts per local memory          |
| `CCR_SLOTS` | 128     | OLLAF: more than a hundred; 128 chosen             |
| `N_COL`     | 8       | this implementation's choice                       |
| `N_LE`      | 32      | this implementation's choice (column height)       |
| `COMM_W`    | 4       | this implementation's choice                       |
| version tag | 8 bits  | this implementation's choice (`ollaf_pkg::VER_W`)  |

At the defaults the fabric holds 256 flip-flops, so it is a demonstrator
rather than a product-size core. A 713-flip-flop task would need 23 columns
of 32 elements. Growing `N_COL` costs area linearly and changes no timing.
Growing `N_LE` lengthens the hidden restore latency.

## What follows OLLAF, and what is this implementation's own

These parts follow the published OLLAF architecture:

* columns, each with its own HCM, CMU and local memories, on a control bus;
* the 4-input LUT element with an enabled, resettable flip-flop and its LX
  and QX outputs;
* multiplexor routing;
* the two-flip-flop dual plane point;
* separate context and configuration paths;
* ten-entry local memories and a central repository;
* version tags written by the CMU on save;
* the one-cycle swap;
* a communication medium with one port per column.

Everything the architecture leaves open was decided here:

* the column height and count, and the routing sources;
* the feed-forward rule for `lx`;
* one clock for both planes, and synchronous resets;
* one configuration bit shifted per cycle;
* the hardware version check on restore, and the non-destructive save;
* the bus protocol and register map, and the multi-column swap register;
* the channel-and-binding form of the communication medium;
* all memory organisations.

The clock-select multiplexor of the original logic element is not modelled.
The whole fabric runs on one clock. Direct I/O bound to the medium is not
provided; the supervisor can read and write channels instead. Nothing
synthesizable is provided for the supervisor processor or its kernel, or for
the system-level communication unit that links the fabric to other
processors.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle-count watchdog.
`tb/ollaf_tb_pkg.sv` builds column configurations (a 4-bit up or down
counter, and a task that registers its communication input). This lets the
tests run real tasks through the fabric.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ollaf_top \
    -Irtl -Itb rtl/ollaf_pkg.sv tb/ollaf_tb_pkg.sv rtl/*.sv tb/tb_ollaf_top.sv
./obj_dir/Vtb_ollaf_top
```

`tb_ollaf_top` runs the full default-size fabric end to end. It:

* loads three tasks through the central repository;
* refuses a stale-version restore;
* runs a counter in column 0;
* swaps a two-column task into columns 1 and 2 in one cycle, with data
  flowing through the medium;
* preempts the counter with a second counter restored behind it, checking
  every cycle of the transfer that the first keeps counting;
* saves and versions the preempted context, and stores it in the repository;
* resumes the first counter exactly where it stopped;
* performs a context-only swap and a task reset.

It counts each of these mechanisms and fails if one never happened.

`tb_whole_preempt` preempts the whole default fabric at once. Each of the 8
columns runs its own counter, and a second counter is restored behind every
one of them in parallel. A single global swap then exchanges all 256
flip-flops and all 8 configurations. The testbench counts, cycle by cycle,
the cycles in which each column made no progress. That overhead must be
exactly one cycle, as for a single column. It then saves every preempted
context in parallel and checks each one. Building
it takes a few minutes; the simulation itself takes well under a second. The
smaller testbenches build and run in seconds, with reduced sizes set through
parameters.

Lint notes: `verilator -Wall` reports a circular-logic warning (UNOPTFLAT) on
`col_interconnect`. The loop exists only at the vector level and cannot form
at the bit level (see above). Unused-bit warnings come from the reserved
fields of the command words.
