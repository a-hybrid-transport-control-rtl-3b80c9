# synZEN: a hybrid transport/control operation triggered processor core

synZEN is a scalable processor core for FPGAs built around a transport
interconnection network, in the style of a transport triggered architecture
(TTA). Data words move over a set of multiplexer-based buses between
*synZEN units*. Each unit wraps a function unit in a standard interface. Unlike
a pure TTA, a unit is not started by the arrival of data. Every unit receives
its own small **control operation** each cycle. That operation says where each
of its two operands comes from, what the function unit does, and which of its
registers to read and write. Two ideas keep the network small:

* every unit carries a **16-entry result register file**, so results stay
  where they were made and the register files together form a distributed
  memory;
* **data transfer modes** let an operand come from the unit itself
  (accumulator), from a neighbouring unit over a private link, or stay where it
  is (hold). None of these uses a bus. A multiply-accumulate `A = A + B*C` then
  needs two bus transports per element instead of four.

The core is in the *split* organisation. Transport operations drive only the
data network. Control operations go straight from the instruction register to
their unit over a separate control path.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It passes the
Verilator 5 lint and elaborates with the slang front end of Yosys.

## One instruction

One instruction holds everything that starts in one cycle:

* one **transport operation (TO)** per bus;
* one **control operation (CO)** per unit.

### Transport operation

The buses are sparse. Bus `b` is connected to only `SRC_PER_BUS` sources and
`DST_PER_BUS` destinations, so a TO carries addresses local to its bus:

```
TO = { valid , dst[DST_AW-1:0] , src[SRC_AW-1:0] }      source in the low bits
```

With the defaults (4 sources and 8 destinations per bus) this is a 2-bit source
field, a 3-bit destination field and a valid bit: 6 bits. The field widths come
from `$clog2` of the per-bus counts. A local address beyond the bus' connection
count does nothing.

Global numbering in `synzen_core`:

| index | sources                                      | destinations                      |
|-------|----------------------------------------------|-----------------------------------|
| `u`   | read port of unit `u` (`0..NUNIT-1`)         |                                   |
| `NUNIT` | `ext_data_i`, data from the environment    |                                   |
| `2u`  |                                              | left input of unit `u`            |
| `2u+1`|                                              | right input of unit `u`           |

Connection pattern (`synzen_pkg::bus_src`, `bus_dst`):

```
local source j of bus b       -> global source      (b + j)             mod NSRC
local destination j of bus b  -> global destination (b*DST_PER_BUS + j) mod NDST
```

At the default sizes every source reaches every destination over some bus. The
`synzen_icn_tb` testbench checks this. A bus connection that the pattern does
not contain costs no hardware: the multiplexers are built only from the pattern.

Several buses may read the same source in one cycle (multicast). Two buses must
not write the same destination. If they do, the lowest-numbered bus wins and
`conflict_o` is raised. This is only a diagnostic, because resolving such
conflicts is the program's job.

### Control operation (16 bits, `synzen_pkg::ctrl_op_t`)

| bits    | field     | meaning                                             |
|---------|-----------|-----------------------------------------------------|
| [1:0]   | `mode_l`  | transfer mode of the left input register            |
| [3:2]   | `mode_r`  | transfer mode of the right input register           |
| [7:4]   | `wr_addr` | result register file entry written by the result   |
| [11:8]  | `rd_addr` | entry driven onto the network (the read port)       |
| [15:12] | `op`      | function unit opcode                                |

Transfer modes (`xfer_mode_e`):

| code | mode | the input register loads                                        |
|------|------|-----------------------------------------------------------------|
| 0    | NET  | the word a TO delivers; with no TO to this input it keeps its value |
| 1    | ACC  | entry 14 (`Re`, "acc") of the unit's own register file          |
| 2    | LNK  | entry 15 (`Rf`, "lnk") of the unit linked to this one           |
| 3    | HLD  | its current content (a constant operand)                        |

Only one input may be in HLD. An assertion in `synzen_unit_if` enforces this.
In any mode other than NET, a TO that addresses the input is ignored.

Opcodes (`opcode_e`): 0 NOP, 1 ADD, 2 SUB, 3 MUL (low word), 4 AND, 5 OR,
6 XOR, 7 SHL, 8 SHR (logical), 9 PASSA, 10 PASSB. Codes 11 to 15 behave as NOP.
A NOP writes nothing, but the read port still works. This lets other units fetch
data from an idle unit's register file.

An all-zero instruction (no valid TO; every CO set to NOP, NET/NET) changes no
state. The instruction register executes it while `instr_valid_i` is low.

## Pipeline and timing

This is the part to get right when writing programs. The datapath has two
register stages: the input registers of every function unit, and its result
register file. There is **no interlock and no bypass**. The program must
respect the latency itself, with delay slots (empty instructions or unrelated
work).

```
edge t      instr_valid_i/to_i/co_i captured by the instruction register
cycle t+1   instruction executes, stage 1:
              - each unit drives entry co.rd_addr on its read port (combinational)
              - TOs carry those words over the buses
              - input registers load per mode (NET/ACC/LNK/HLD);
                ACC and LNK see Re/Rf as they are in this cycle
              - opcode and write address are registered
cycle t+2   stage 2: function unit computes on the input registers,
            result written to wr_addr at the end of the cycle
cycle t+3   the result can be read by the instruction executing now
```

So an instruction that reads a result must execute at least **two cycles
after** the instruction that delivered its operands. Back to back, the second
instruction sees the old value. For example, an accumulator loop
`Re <- Re + x` issues one ADD every second cycle. In the multiply-accumulate
chain of the test, unit 0 multiplies into `Rf`. Two instructions later, unit 1
takes that product over the link (LNK) and its own `Re` (ACC), and adds them
into `Re`.

The read address takes effect in the CO's own cycle, and the write address two
cycles later. Hence `R0, R0.MUL` reads the old `R0` now and writes the new one
later.

## Blocks

| module | role |
|--------|------|
| `synzen_pkg` | CO struct, transfer-mode and opcode enums, register file constants, connection-pattern functions |
| `synzen_core` | top level: instruction register, network, `NUNIT` units, link ring, external data source |
| `synzen_ir` | instruction register: TOs to the buses, COs peer to peer to the units; empty instruction when not valid |
| `synzen_icn` | transport network: one source multiplexer per bus, one destination multiplexer per unit input |
| `synzen_unit` | one synZEN unit = `synzen_unit_if` + `synzen_fu_alu` |
| `synzen_unit_if` | unit interface: transfer-mode selection into the input registers, control decode and pipelining, register file |
| `synzen_rf` | 16 x `DATA_W` result register file: one write port, one read port, permanent taps of entries 14 and 15 |
| `synzen_fu_alu` | combinational dyadic function unit |

**Links.** Links are fixed when the core is built. Unit `u`'s LNK input is
`Rf` of unit `(u-1) mod NUNIT`, a ring, so each unit can be chained behind its
lower neighbour. Linked units behave like one unit with more operands. In the
multiply-accumulate example, the multiplier and adder together act as a
three-operand unit.

**Register files.** Entries 14 and 15 are ordinary registers that also have
taps of their own. Writing `Re` makes the value available to the unit's own ACC
mode. Writing `Rf` publishes it to the next unit's LNK mode. Both can also be
read over the network like any other entry.

## Parameters of `synzen_core`

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W` | 32 | data word width |
| `NUNIT` | 8 | number of synZEN units |
| `NBUS` | 16 | number of buses, i.e. transports per cycle |
| `SRC_PER_BUS` | 4 | sources connected to each bus |
| `DST_PER_BUS` | 8 | destinations connected to each bus |

The defaults are one of the evaluated network sizes: 8 units, 16 buses, and 8
destinations and 4 sources per bus. The other evaluated sizes are 8/16 with
4/2 or 11/6 per bus, and 12/24 with 6/3, 8/4 or 12/6 per bus. All of them
elaborate from the same RTL by changing these parameters, and all are
simulated (see below). At the defaults the core synthesizes to about 1350
word-level cells, 768 flip-flop bits and 8 x 512 register file bits.

## Ports of `synzen_core`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset clears all state |
| `instr_valid_i` | in | 1 | `to_i`/`co_i` hold the next instruction |
| `to_i` | in | `NBUS` x `TO_W` | next transport operations |
| `co_i` | in | `NUNIT` x `ctrl_op_t` | next control operations |
| `ext_data_i` | in | `DATA_W` | network source `NUNIT`; sampled in the execute cycle of the instruction that routes it |
| `unit_out_o` | out | `NUNIT` x `DATA_W` | read port of each unit in the current cycle |
| `conflict_o` | out | 1 | two transports addressed one destination |

Results leave the core through `unit_out_o`: give a unit a CO whose `rd_addr`
names the entry you want to read.

## What is and is not here

The network, the units with their interface, transfer modes and register file,
the control operation format, the transport operation format, and the
two-stage pipeline follow the architecture. The following are this design's own
choices, made where the architecture leaves the point open:

* 32-bit data and the ALU operation set with its codes. Only multiply and
  add/accumulate units appear in the examples.
* The codes of the four transfer modes.
* The valid bit in each TO. Every code of the source and destination fields is
  a real address, so an idle bus needs a separate encoding.
* The regular bus connection pattern, the lowest-bus-wins rule and the conflict
  flag.
* The link ring `u-1 -> u`.
* A NET input that no transport addresses keeps its value.
* Synchronous reset of all state.
* All units carry the same ALU. An instance tailored to one program would mix
  units of different function.
* `ext_data_i`. The architecture lists load/store units as possible units, but
  they are not specified, so the core takes data from the environment through
  one extra network source instead.

Not included:

* **Branch units, load/store units and stand-alone register-file units.** They
  are named as possible units, but their behaviour is not specified.
* **A program memory and sequencer.** The next instruction is a core input.
* **A MOVE-immediate operation.** It is mentioned as something the split
  organisation makes possible, but is not specified.
* **The unified network organisation.** It mixes control and transport on one
  network and is only the comparison point.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `synzen_fu_alu_tb` | every opcode against a reference, random and corner operands |
| `synzen_rf_tb` | reset contents; 3000 random write/read cycles; read-during-write returns the old value; acc/lnk taps |
| `synzen_icn_tb` | reachability of the pattern; every single transport of every bus; 3000 random sets of parallel transports with multicast and collisions |
| `synzen_ir_tb` | capture, empty instruction when not valid, reset |
| `synzen_unit_if_tb` | 4000 random COs against a cycle model: all four modes, pipelined opcode/write address, read port, lnk output |
| `synzen_unit_tb` | directed: two-cycle result latency, accumulator loop with hold, link multiply into `Rf`, NOP keeps state, operand order (SUB) with the left input held |
| `synzen_core_tb` | the whole core at default size against a cycle-accurate model. Runs a Fibonacci program (multicast of one register to two units, NET-HLD copy, checks F(21) = 10946 and that a result is not visible one instruction early), a 12-element multiply-accumulate using LNK and ACC (checked against a sum computed in the testbench), and 3000 random instructions with bubbles. Fails unless NET transports, ACC, LNK, HLD, multicast, reads from NOP units, bubbles and bus conflicts all occurred. |
| `synzen_table1_tb` | the core at all six evaluated network sizes, random programs against the same model (`synzen_core_rand_check`) |

Run one with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/synzen_pkg.sv tb/synzen_core_tb.sv --top-module synzen_core_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Every test finishes in well under
a second of simulation time.

Limits of the evidence: the tests compare the RTL with a model written from the
same reading of the architecture. They show that the RTL does what is described
above. They cannot show that a choice listed under "own choices" matches an
original implementation. No timing or area closure on an FPGA was attempted.
