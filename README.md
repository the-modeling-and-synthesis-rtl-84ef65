# Bus-style data paths: primitives, canonical bus models and three machines

A processor's data part can be built as a set of registers and operators that
share a few buses. On each bus, only one source may drive at a time, but any
number of sinks can latch the value in the same clock. Adding buses is what
buys parallelism: a one-bus machine moves one value per clock, and a machine
with a dedicated bus for each ALU input can fetch both operands at once. This
RTL expresses that idea in four parts:

1. **Primitives.** The general bus, multiplexing bus, multiplexer, register
   and ALU that every bus-style data path is made of.
2. **Canonical bus models.** The one-bus, two-bus (Model I and Model II),
   three-bus and four-bus arrangements around a single central ALU. They are
   parameterised by the number of registers.
3. **Two concrete data paths.** These are what a bus-allocation procedure
   produces from the register-transfer behaviour of two real machines:
   - the HP 2116, with three buses;
   - the PDP-11/40, with two buses and two join-node multiplexers.
4. **A real one-bus machine.** The PDP-11/10 data paths, shown as an instance
   of the canonical one-bus model.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). All data paths
default to 16 bits.

## The bus discipline

A bus-style data path runs one control word per clock. The control word opens
some *gating elements*:

- **Source gates** put a register onto a bus. At most one may be open per bus.
- **Sink gates** (load enables, multiplexer selects) let registers take the bus
  value.

The transfer source → bus → sink completes at the next rising edge. In the same
clock, the ALU can combine whatever its input paths carry and its result can be
stored. So a transfer such as "A op T → A, T" is one clock: the ALU result
goes onto a bus and two sinks open together.

Physical buses use tri-state drivers. Here a bus is an AND-OR network:

- A closed gate contributes zeros, so an idle bus reads `0`.
- Two open source gates produce the OR of both drivers. This is reported as
  `conflict`, and every data path asserts (SVA) that it never happens. The
  PDP-11/40 and HP 2116 data paths also assert that no sink reads an undriven
  bus.

With this model the design works in two-state simulation and synthesizes
without tri-states. If you target real tri-state buses, replace the AND-OR in
`general_bus` and `multiplexing_bus`.

## Primitives

| module | what it is |
|---|---|
| `general_bus` | NSRC gated sources and NSINK gated sinks on one bus. Outputs: the bus value, gated sink data, `active` and `conflict`. |
| `multiplexing_bus` | Several gated inputs and one gated output (a bus that feeds a single sink). |
| `mux_prim` | N-input multiplexer with a binary address and a gate. This is the element inserted at a *join node*, an input that the allocation feeds from two buses. |
| `bus_reg` | Register with load enable and synchronous active-low reset. |
| `alu` | ADD, SUB, AND, OR, XOR, BIC (A & ~B), PASS_A, PASS_B, with carry and two's-complement overflow. |
| `b_aux` | PDP-11/40 B.AUX unit: a 4-bit constant, the sign-extended low byte of B, B byte-swapped, or the high byte of B. |
| `cond_codes` | {N, Z, V, C} from an ALU result. |
| `spm` | PDP-11/40 scratchpad: 16 × 16 bits, one address, combinational read, write at the clock edge. |
| `bus_pkg` | Enums for the ALU and B.AUX operations, and the control-word structs `pdp_ctrl_t` and `hp_ctrl_t`. |

There is no module for a wired-broadcast tree (one output fanned out to several
inputs) or for a plain point-to-point connection. In RTL both are just wires.

## Canonical bus models

Every model has the same set of elements around one ALU:

- **NR general or special registers**, indices `0 .. NR-1`.
- **Two working registers in front of the ALU**: X0 at index `NR` and X1 at
  index `NR+1`.
- **One ALU output register**, OUT, at index `NR+2`.

Every register has a multiplexer in front of it and a broadcast tree behind it.
Two more multiplexers feed the ALU inputs: index `NR+3` for the left input and
`NR+4` for the right. That gives NR+5 multiplexers and NR+4 broadcast trees;
the extra tree is the ALU output.

The models differ only in which buses each element drives and reads:

| model | buses | attachment | operands → result |
|---|---|---|---|
| `one_bus_model` (N) | common bus | every register reads and drives it | 3 clocks |
| `two_bus_model_1` (N1, N2) | bus 0, bus 1 | N1 group and X0 on bus 0; N2 group and X1 on bus 1; OUT reads and drives both | 2 clocks |
| `two_bus_model_2` (N) | common bus, OBUS | X0 and X1 on the common bus; OUT reads the common bus and drives OBUS; the N registers use both buses | 3 clocks |
| `three_bus_model` (N1, N2) | common bus, IBUS1, IBUS2 | X0 only on IBUS1 and X1 only on IBUS2; the N1 group uses IBUS1 and the common bus, the N2 group IBUS2 and the common bus; OUT uses the common bus | 2 clocks |
| `four_bus_model` (N1, N2, N3) | common bus, IBUS1, IBUS2, OBUS | as three-bus, plus an N3 group on OBUS and the common bus; OUT reads the common bus and drives OBUS | 2 clocks |

The last column is the *input data set-up time* plus the operation: the clocks
from "operands sit in two general registers" to "result sits in OUT". When both
working registers share a bus, the two operands need two clocks to get there.
When each has its own bus, they need one. The testbenches check these counts.

The core also lets an ALU input read a bus directly: set its `BUS_IN` row,
multiplexer `NR+3` or `NR+4`. That operand then skips its working register.
With both inputs on their own buses, operands in registers become a result in
OUT in one clock. The five wrappers keep the working registers, as the model
drawings show them.

All five are thin wrappers around `bus_model_core`. Each wrapper computes two
bit matrices from its group sizes and passes them to the core:

- `GATE_OUT[r][b]`: register r has a gating element onto bus b.
- `BUS_IN[m][b]`: bus b is an input of multiplexer m.

To get another bus arrangement, write another wrapper.

### Control ports of a model

| port | meaning |
|---|---|
| `gate[b][r]` | Open register r's gate onto bus b. The gate only has an effect if `GATE_OUT` says it exists. |
| `sel[m]` | Input of multiplexer m: `0..NBUS-1` selects a bus, `NBUS+t` selects broadcast tree t (tree `NR+3` is the ALU), and `NBUS+NR+4` selects `ext_in`. |
| `ld[r]` | Load register r from its multiplexer. |
| `alu_op` | Operation applied to the two ALU input multiplexers. |
| `ext_in` | External word offered to every register multiplexer. It is how data enters a model (memory, I/O). |
| `bad_sel` | Set when a loading register, or an ALU input being used, selects an input that this model does not connect. |

### Fixed and floating connections

Three connections are fixed:

- X0 → the ALU left input.
- X1 → the ALU right input.
- ALU → OUT.

Further point-to-point "floating" connections (bypasses, feedback) are added
with the `FLOAT[tree][mux]` parameter; there are none by default. Two rules are
enforced whatever FLOAT says:

- A register never feeds its own multiplexer.
- The ALU output never feeds the ALU inputs.

## The PDP-11/10 data path (`pdp1110_datapath`)

The PDP-11/10 is a one-bus machine. Its single bus is the output of the
DMUX, which chooses either the ALU result or the data arriving from the
UNIBUS. That one value goes out to the UNIBUS and is broadcast to every
register.

| path | sources | sinks |
|---|---|---|
| DMUX output (the bus) | ALU, UNIBUS data in | BA (18 bits), IR, PS, SPM, B, UNIBUS out |
| AMUX | SPM, PS (8 bits, zero-extended), A.AUX | ALU left input |
| BMUX | B, B.AUX | ALU right input |
| PS MUX (4 bits) | bus bits 3:0, condition codes | PS[3:0] |

There are no working registers in front of the ALU and no result register.
The AMUX and BMUX take the operands straight from SPM, PS and B. So a whole
microstep such as `SPM[r] + B → SPM[r]` passes through AMUX, ALU, DMUX, the bus
and the SPM write in one clock.

The machine reads its operands directly, but every result must pass through
the one bus, which carries one value per clock. Apart from the condition
codes going into PS, at most one new value reaches the registers per clock.
Several registers can still take that value together.

A.AUX is a 4-bit constant from the control word (`aaux_const`). PS is 8 bits
wide, and its low four bits work as in the PDP-11/40: `ld_ps` loads the bus
into PS, and `ld_cc` routes the condition codes into PS[3:0].

## The HP 2116 data path (`hp2116_datapath`)

The bus allocation starts from a *transfer matrix*. It lists every
register-to-register transfer the microprogram performs. Each transfer is
tagged with the groups of transfers it must run concurrently with. Transfers
that never need to overlap on the same source or sink are packed onto one bus,
and as few buses as possible are used. For the HP 2116 that gives:

| bus | sources | sinks |
|---|---|---|
| Bus 1, general bus | A, B, M, T, ALU | A, B, M, P, T |
| Bus 2, multiplexing bus | A, B, P | ALU left input |
| Bus 3, one gate | T | ALU right input |

P is only ever a sink on Bus 1. The characteristic microinstruction
"A op T → A, T" uses all three buses in one clock:

- A on Bus 2;
- T on Bus 3;
- the result on Bus 1, with the A and T receivers both open.

A memory port (`mem_rdata`, selected into M by `m_from_mem`) is added so that
data can enter the machine. The transfer matrix covers only the registers.

## The PDP-11/40 data path (`pdp1140_datapath`)

| path | sources | sinks |
|---|---|---|
| BUS 1 | UNIBUS data in, SPM, D | display register, IR, PS, SPM, B |
| BUS 2 | SPM, PS | ALU left input, BA MUX |
| BMUX | B, B.AUX | ALU right input |
| ALU output | ALU | D, BA MUX, condition codes → PS MUX |
| BA MUX | BUS 2, ALU | BA (18-bit bus address) |
| PS MUX (4 bits) | BUS 1 bits 3:0, condition codes | PS[3:0] |

BA MUX and PS MUX are the *join-node refinement*. In the raw allocation:

- BA was fed by two different buses.
- PS was fed by BUS 1 and by the condition-code path.

An input with two buses is resolved by putting a multiplexer in front of it.

The PS MUX is only as wide as the condition codes. PS[15:4] load from BUS 1
(`ld_ps`), and PS[3:0] load from the PS MUX (`ld_ps` or `ld_cc`, with `ld_cc`
selecting the condition codes). With both enables set, one microinstruction
stores a BUS 1 word and the new condition codes into PS. The microprogram needs
this: one of its groups moves D to PS and the condition codes to PS together.
D and PS are also driven out to the UNIBUS (`unibus_d_out`, `unibus_ps_out`).

The control word `pdp_ctrl_t` has one bit per gating element, plus:

- the load enables;
- the selects of BMUX, BA MUX and PS MUX;
- the ALU and B.AUX operations;
- a 4-bit constant;
- the SPM address, which is used for both read and write.

Typical single-clock microcycles:

- `SPM → BUS 2 → ALU (+ B) → D` together with `SPM → BUS 1 → B`. One source is
  on two buses.
- `D → BUS 1 → SPM` together with `PS → BUS 2 → ALU → BA` and condition codes
  → PS.
- `D → BUS 1 → PS[15:4]` and `condition codes → PS[3:0]` together with
  `PS → BUS 2 → ALU (+ B.AUX) → D`.
- `UNIBUS → BUS 1 → IR, B, display` as one broadcast.

Each of the 18 groups of transfers that the microprogram performs together
needs at most one source on each bus, so every group runs in one clock.

The real machine has a UNIBUS and a microprogram controller. Neither is part of
this RTL: the UNIBUS data lines and the control word are ports.

## The top level (`bus_systems_top`)

The eight machines sit side by side and share only `clk` and `rst_n`:

- two synthesized data paths;
- the PDP-11/10 data path;
- five canonical models, at N = 4 or N1 = N2 (= N3) = 2.

Their ports carry the prefixes:

| prefix | machine |
|---|---|
| `pdp_` | PDP-11/40 |
| `hp_` | HP 2116 |
| `p10_` | PDP-11/10 |
| `m1_` | one-bus model |
| `m2a_` | two-bus Model I |
| `m2b_` | two-bus Model II |
| `m3_` | three-bus model |
| `m4_` | four-bus model |

They do not interact.

## What follows the source design and what does not

**Taken from the source design:**

- the primitives and the one-source/many-sinks rule;
- the element counts and bus attachment of the canonical models;
- the bus assignment of every transfer in the HP 2116 and PDP-11/40 examples;
- the two join-node multiplexers;
- the 16-bit paths, the 18-bit bus address and the 4-bit condition-code path
  of the PDP-11/40;
- the transfer groups that the PDP-11/40 microprogram performs together;
- the PDP-11/10 structure (DMUX, AMUX, BMUX, PS MUX and the registers on the
  bus), with its 8-bit PS path and 18-bit bus address.

**Choices made here, where the source is silent:**

- the ALU operation set, with no multiplier;
- the B.AUX operations and constants;
- A.AUX of the PDP-11/10 as a 4-bit constant;
- the N Z V C meaning and PS[3:0] position of the condition codes;
- a 16-word SPM with one address;
- zero extension of 16-bit values to the 18-bit bus address;
- synchronous active-low reset, with the SPM not reset;
- AND-OR buses instead of tri-states;
- the control-word layouts;
- default register counts of the canonical models;
- the `ext_in` and `mem_rdata` inputs;
- 16-bit HP 2116 paths (the source says only n bits).

**Details of the canonical-model drawings that were open to reading:**

- In Model I, the output register reads and drives both buses.
- In Model II, the general registers use both buses.
- In the three-bus model, the working registers sit on their IBUS only.

A different reading means a one-line change in the wrapper's attachment
function.

**Not built:**

- the controllers;
- the UNIBUS;
- unary operators (complementer, shifter) as separate square blocks in the
  canonical models;
- a demultiplexer primitive, because no model uses one;
- the allocation procedure itself, which is software.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench:

- ends with a line `TB_RESULT checks=N failures=M`;
- has a cycle-count watchdog.

What the testbenches cover:

- **Primitives.** Random stimulus against reference expressions.
- **`tb_pdp1140_datapath` and `tb_hp2116_datapath`.** A directed prologue
  (loading, the characteristic microcycles, one-clock timing), then 3000 random
  legal control words compared every clock with a reference model written in
  the testbench. They count parallel bus use, broadcasts, both inputs of each
  join-node multiplexer, condition codes into PS and B.AUX use, and fail if any
  never occurs.
- **`tb_pdp1110_datapath`.** A directed prologue, then 3000 random control
  words compared with a reference model every clock. It counts broadcasts,
  each DMUX and AMUX input, B.AUX use and the split PS load.
- **`tb_pdp1140_transfer_matrix` and `tb_hp2116_transfer_matrix`.** These
  replay the transfer matrices that the two data paths were allocated from.
  Each transfer runs on its own, then each concurrency group runs as one
  control word. That is 18 groups for the PDP-11/40 and 5 for the HP 2116, each
  repeated with random data. The tests check that a group's control word uses
  at most one source per bus. They also check that the group takes one clock
  and that every register matches the reference model.
- **Model testbenches (`tb_one_bus_model` etc.).** Each states its own table of
  bus attachment, taken from the model's drawing. Each checks:
  - random legal transfers against a reference;
  - the operand-to-result clock count from the table above;
  - that unconnected selections raise `bad_sel`.
- **`tb_bus_systems_top`.** Runs one complete operation on every machine of the
  top level at default sizes. It checks the results, the per-model clock
  counts and the mechanism counters.

- **`tb_alu_input_configs`.** Builds five arrangements of buses and working
  registers in front of the ALU from the model core:
  - (a) one bus with a register in front of each input;
  - (b) one bus with one input straight from the bus;
  - (c) two buses with a register on each;
  - (d) two buses with one input straight from its bus;
  - (e) each input straight from its own bus.

  It checks that the operands in general registers become a stored result in
  3, 2, 2, 2 and 1 clocks respectively.
- **`tb_bus_model_float`.** Builds the one-bus model with floating
  connections: register 0 and register 1 wired straight to the ALU inputs, and
  the ALU output wired to register 2. It checks that `R0 op R1 → R2` then takes
  one clock instead of three, with the bus free for another transfer in the
  same clock. It also checks that the two forbidden connections are ignored
  (a register into its own multiplexer, the ALU output into an ALU input).

### Running a test with Verilator

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pdp1140_datapath \
    -y rtl -y tb rtl/bus_pkg.sv tb/tb_pdp1140_datapath.sv
./obj_dir/Vtb_pdp1140_datapath
```

Replace the testbench name to run any other test. Lint a module with:

```
verilator --lint-only -Wall -y rtl rtl/bus_pkg.sv rtl/bus_systems_top.sv
```

The remaining lint warnings are about unused ALU flags in the HP 2116 data path
and the canonical models, and about unconnected status outputs of bus
instances. They are intentional.
