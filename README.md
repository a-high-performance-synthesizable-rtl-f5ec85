# Reconfigurable FSM fabric

A synthesizable core that a system-on-chip can embed wherever it needs a
controller that can be changed after fabrication: between a bus and an
accelerator, between two accelerators, or inside one. Rather than adopt an
FPGA's even grid of lookup tables and switch boxes, the fabric is shaped
around what a finite state machine is:

- a **sequential section** holds the state and changes it on the clock;
- a **logic section** is purely combinational and forms the outputs.

Each section is a row of identical blocks. Routing between them is done with
plain multiplexers. Inside a block most connections are fixed wires, because
switch boxes are what make FPGAs large. The fabric is "unbalanced" in two
ways. Its product-term blocks are not all the same size. Its routing is
flexible only where it has to be.

The architecture comes from the paper *A High Performance Synthesizable
Unsymmetrical Reconfigurable Fabric For Heterogeneous Finite State Machines*
(Liu, Arslan, Khawam, Lindsay). That paper gives the block structure and the
sizes. The configuration encodings, several widths and the configuration
port are this implementation's own; they are listed under
[Departures and choices](#departures-and-choices).

## Top level

```
            +------------------------------------------+
            |                  in[7:0]                 |
            v                                          v
  +----------------+   +-------------+   +----------------+   +-----------+   +----------------+
  | input routing  |-->| sequential  |-->| middle routing |-->|  logic    |-->| output routing |--> out[7:0]
  | source         |   | blocks x8   |   | source         |   | blocks x8 |   | source         |
  +----------------+   +-------------+   +----------------+   +-----------+   +----------------+
            ^                 | state[15:0]       ^                                  ^
            +-----------------+-------------------+----------------------------------+
```

| Size | Value | Meaning |
|---|---|---|
| `N_IN` | 8 | FSM inputs |
| `N_SEQ` | 8 | sequential blocks; 2^8 states in logic mode, a 2^16-state circle as a counter |
| `N_LB` | 8 | logic blocks, one per FSM output |
| `N_OUT` | 8 | FSM outputs |
| `SEQ_W` | 2 | state bits per sequential block |
| `LB_IN` | 8 | inputs of a logic block (and of a sequential block's logic module) |

These are constants in `fsm_pkg`, not module parameters. The packed
configuration structs are built from them.

The routing sources select from signal pools:

- **Input and middle routing sources.** 24 sources: `in[7:0]` at indices 0-7,
  then the 16 state bits. Bit *b* of sequential block *k* is at index
  8 + 2k + b. Each of the 8 sequential blocks and each of the 8 logic blocks
  picks its 8 inputs from this pool.
- **Output routing source.** 24 sources: the 8 logic block outputs at indices
  0-7, then the same 16 state bits at 8-23. An output can therefore be a
  Mealy or Moore function formed by a logic block, or a raw state bit.

`out` is combinational from `in` and the state. The state changes on the
rising edge of `clk`. `rst_n` is synchronous and active low. It loads every
sequential block's configured initial state.

## The base unit and product-term blocks

All logic is built from one cell, `logic_unit`, a two-input unit with a 4-bit
function code:

| code | function | code | function |
|---|---|---|---|
| 0 | 0 | 5 | not B |
| 1 | 1 | 6 | A + B |
| 2 | A | 7 | not (A + B) |
| 3 | not A | 8 | A . B |
| 4 | B | 9 | not (A . B) |

XOR and XNOR are deliberately not available. Codes 10-15 give 0.

A **product term-based block** (PTB) of shape (i, p, o) has i inputs,
p product terms and o outputs. It has two parts:

- **AND sub-module (`ptb_and_plane`).** For each term there is one *literal
  unit* per input. Both pins of a literal unit take that input, and its code
  is A (true input), not A (inverted input) or 1 (input not used). A tree of
  i-1 base units, normally set to AND, combines the literals.
- **OR sub-module (`ptb_or_plane`).** For each output there is one *select
  unit* per term, set to A (use the term) or 0 (skip it). A tree of p-1 base
  units, normally set to OR, combines them.

The tree nodes are ordinary base units, so a tree can also be set to OR,
NAND and so on. The fabric uses two shapes:

- PTB1 = (8,4,2): 74 base units, 296 configuration bits.
- PTB2 = (2,1,1): 4 base units, 16 bits. A PTB2 acts as any of the ten
  functions of its two inputs: literals A, A, then the node set to that
  function, then select A.

**PTB configuration layout.** Bits are counted from 0 in 4-bit units.

- AND sub-module: term t starts at unit t(2i-1). Its i literal units come
  first, then its i-1 tree nodes.
- OR sub-module: it starts at unit p(2i-1). Output o starts o(2p-1) units
  after that. Its p select units come first, then its p-1 tree nodes.
- Tree node j (`bu_tree`) combines tree entries 2j and 2j+1. Entries 0..N-1
  are the leaves, and node j writes entry N+j.

## Logic block: the 4-2-1 triangle

```
 lb_in[7:0] --> [switch box] --> PTB1 0 --\
            --> [switch box] --> PTB1 1 ---+--> PTB2 --\
            --> [switch box] --> PTB1 2 --\            +--> PTB2 --> y
            --> [switch box] --> PTB1 3 ---+--> PTB2 --/
```

Each level has half as many PTBs as the level before it. A level's outputs go
only to the next level.

- **First level: a multiplexer switch box (`l1_sel`).** Each of the 32 PTB1
  inputs chooses any of the block's 8 inputs. This is the only level with
  real flexibility.
- **Second level: fixed pairs.** PTB2 *j* takes one output of PTB1 2j and one
  of PTB1 2j+1. One configuration bit per PTB1 (`l2_sel`) says which of its
  two outputs goes on.
- **Third level: fixed wiring.** The last PTB2 takes both second-level
  outputs.

With all three PTB2s set to OR, a logic block computes a **sum of up to 16
product terms** of its 8 inputs: four PTB1s with four terms each. With other
PTB2 settings it can, for example, AND two 8-term sums together.

A logic block takes 1332 configuration bits (`lb_cfg_t`).

## Sequential block: flip-flop or counter

Each sequential block contains a complete logic block as its logic module,
a 2-bit adder/subtractor (`addsub`) and a 2-bit state register. The block
has two modes:

- **`SEQ_LOGIC`.** The logic module is followed by a D flip-flop: on each
  clock edge `q[0]` takes the logic module's output and `q[1]` stays 0. With
  binary state encoding, one block holds one state bit. This mode takes any
  FSM up to 256 states.
- **`SEQ_COUNT`.** On each clock edge the register adds the step to itself,
  or subtracts it if `down` is set.
  - Without `cascade`, the step is the logic module's output, which acts as
    the condition for moving to the next state.
  - With `cascade`, the step is the carry (or borrow) of the block below.

  Eight blocks chained this way walk a closed circle of 2^16 states in
  either direction. Block 0's carry input is tied to 1. A cascaded block 0
  therefore steps on every clock. The carry chain cannot close into a
  combinational ring.

The counter mode exists because most large FSMs decompose into a few small
sub-machines, and each of them is a closed circle of states. An adder is far
cheaper than the logic needed to step through such a circle.
The adder/subtractor is a ripple chain:

- `c[0] = step`
- `y[i] = a[i] ^ c[i]`
- `c[i+1] = (a[i] ^ down) & c[i]`

Each block's configuration (`seq_cfg_t`) is its logic module, `mode`, `down`,
`cascade` and a 2-bit `init`, the value loaded at reset.

## Configuration

Every configuration bit of the fabric lives in one register. The `cfg_chain`
module loads it serially.

1. Build a `fabric_cfg_t` value (22,032 bits). Its fields are, from the most
   significant: `seq_rs`, `seq`, `mid_rs`, `lb`, `out_rs`.
2. Hold `rst_n` low. Drive `cfg_shift_en` high for 22,032 clocks and present
   the word on `cfg_sdi`, most significant bit first.
3. Drop `cfg_shift_en` and release `rst_n`.

Other points:

- `cfg_sdo` is the register's top bit, so several fabrics can be chained.
- The configuration register is not reset.
- Shifting while the FSM runs changes its behaviour bit by bit as the word
  moves in.

### Mapping an FSM

The end-to-end testbench shows one complete flow (`tb/fsm_tb_pkg.sv`,
`tb/reconfig_fsm_tb.sv`):

1. Encode the states in binary with the reset state as 0. Give state bit *b*
   to sequential block *b* in `SEQ_LOGIC` mode.
2. Order the variables: inputs first, then state bits. Set every routing
   select so that logic-module input *v* is that variable. Input *x* is pool
   index *x*; state bit *b* is pool index 8 + 2b.
3. For each next-state bit and each output, write the function as a list of
   at most 16 cubes. A cube is a (care mask, value) pair. `lb_from_sop`
   turns the list into a logic block configuration:
   - the PTB1s take four cubes each, on output 0;
   - the switch boxes are identity;
   - `l2_sel` is 0;
   - the PTB2s are set to OR.
4. Route output *o* to logic block *o* (`out_rs[o] = o`). Route it to
   `8 + 2k + b` to output a state bit directly.

For a counter circle, set `mode = SEQ_COUNT`. Give the lowest block a logic
module that forms the step condition and set `cascade` on the blocks above
it.

## Capacity

Sizes of the six benchmark FSMs (inputs, outputs, states, product terms)
against one fabric:

| FSM | I | O | S | P | fits? |
|---|---|---|---|---|---|
| lion | 2 | 1 | 4 | 11 | yes: 2 state bits, 4 logic inputs, at most 11 terms per function |
| dk27 | 1 | 2 | 7 | 14 | yes: 3 state bits, 4 logic inputs, at most 14 terms |
| dk512 | 1 | 3 | 15 | 30 | inputs and state fit (5 of 8 logic inputs); yes if no function needs more than 16 terms |
| s27 | 4 | 1 | 6 | 34 | same condition (7 of 8 inputs) |
| tav | 4 | 4 | 4 | 49 | same condition (6 of 8 inputs) |
| bbara | 4 | 2 | 10 | 60 | same condition (8 of 8 inputs) |

The tight limit is 16 product terms per function. That is four PTB1s of four
terms each, when the second and third levels only OR their inputs together.
Setting the last PTB2 to NOR instead of OR gives the complement of a sum. So
a function also fits when its off-set takes at most 16 cubes. A function
that needs more on both sides does not fit one logic block.

## Departures and choices

These follow the architecture:

- the two sections;
- 8 inputs, 8 sequential blocks and 8 logic blocks;
- the feedback of state into both routing sources;
- the 4-2-1 triangle with PTB1 = (8,4,2) and PTB2 = (2,1,1);
- a multiplexer switch box in the first level and mostly fixed wiring after
  it;
- PTBs made of AND and OR sub-modules of two-input base units and the ten
  base-unit functions;
- an adder/subtractor with a direction bit next to a logic module + D
  flip-flop in each sequential block;
- 256 states in logic mode and 2^16 in a closed circle.

These are this implementation's own choices:

- **Base unit.** The 4-bit function codes. How literals and trees are laid
  out inside a PTB.
- **Logic block inputs.** 8 per logic block. The first-level switch box is
  fully populated; which redundant paths the original removes to save area
  is not known.
- **Second-level connection.** One select bit per PTB1 choosing which of its
  two outputs goes on.
- **Sequential block.** 2-bit state per block, which makes eight blocks give
  16 bits. Logic module output as the count condition. The cascade chain
  with carry 1 into block 0. Synchronous, active-low reset to a configured
  value.
- **Routing pools.** Including the state bits in the output routing pool.
  The `state` output port.
- **Configuration port.** A serial configuration chain.

Not built:

- The surrounding system (processor, memory, bus, other reconfigurable
  arrays). It is context only.
- The FPGA used for comparison.
- An FSM decomposition or mapping tool, beyond the simple minterm mapper in
  the testbench package.

## Files

| File | Contents |
|---|---|
| `rtl/fsm_pkg.sv` | sizes, `bu_func_t`, configuration structs, layout functions |
| `rtl/logic_unit.sv` | two-input base unit |
| `rtl/bu_tree.sv` | tree of base units (helper) |
| `rtl/ptb_and_plane.sv`, `rtl/ptb_or_plane.sv`, `rtl/ptb.sv` | product term-based block |
| `rtl/routing_source.sv` | multiplexer routing (routing sources and first-level switch box) |
| `rtl/logic_block.sv` | 4-2-1 PTB triangle |
| `rtl/addsub.sv` | adder/subtractor |
| `rtl/sequential_block.sv` | sequential block |
| `rtl/cfg_chain.sv` | configuration register |
| `rtl/reconfig_fsm.sv` | top level |
| `tb/fsm_tb_pkg.sv` | configuration builders (cube lists to PTB/logic block settings) |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/fsm_workloads_tb.sv` | full-size fabric running machines of the six benchmark sizes |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Any
of them runs with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fsm_pkg.sv tb/fsm_tb_pkg.sv tb/reconfig_fsm_tb.sv \
    --top-module reconfig_fsm_tb -Mdir obj_top
./obj_top/Vreconfig_fsm_tb
```

Replace `reconfig_fsm_tb` with `logic_block_tb`, `ptb_tb` and so on for the
block tests.

`reconfig_fsm_tb` runs the whole fabric at full size, configured only
through the serial port. It runs three kinds of workload:

- **Random Mealy machines in logic mode.** Three sizes: 2 in/1 out/4
  states, 1 in/2 out/7 states and 1 in/3 out/15 states. They are mapped as
  minterm sums. A five-variable function with more than 16 minterms is
  built from its complement, with the last PTB2 set to NOR. Outputs are
  checked every cycle before the clock edge; the state is checked after it.
- **The 16-bit counter circle.** Up and down across the wrap point, with a
  random step condition, then 65,536 steps that must return to the start.
  The low state byte is routed straight to the outputs.
- **Two communicating sub-machines.** This is the shape a decomposed FSM
  takes. A 4-state counter circle steps only when `in[0]` is 1 and the
  other machine is in state 1. The other machine is a 2-state machine in
  logic mode whose next state depends on the counter's state. A Mealy
  output, a Moore output (from the two states only) and a raw state bit are
  driven side by side.

It counts each mechanism and fails if one never occurs:

- configuration loads;
- logic-mode state changes;
- Mealy outputs;
- Moore outputs;
- state-as-output;
- counting up and counting down;
- holding when the step condition is 0;
- carries between blocks;
- wrap-around;
- links between sub-machines;
- complement (NOR) mapping.

It takes about 20 s to build and 15 s to run.

`fsm_workloads_tb` runs one machine of exactly each benchmark size:

| Benchmark | I | O | S | P |
|---|---|---|---|---|
| lion | 2 | 1 | 4 | 11 |
| dk27 | 1 | 2 | 7 | 14 |
| dk512 | 1 | 3 | 15 | 30 |
| s27 | 4 | 1 | 6 | 34 |
| tav | 4 | 4 | 4 | 49 |
| bbara | 4 | 2 | 10 | 60 |

How each machine is built and checked:

- It is drawn at random in the benchmark row format. Each of the P rows is
  an input cube, a present state, a next state and outputs.
- Every function takes one cube per row that sets it. Columns are drawn
  with at most 16 rows set, the fabric's per-function limit.
- The machine runs for 3000 cycles against its row table.
- The testbench reports how many rows were exercised.

The block testbenches compare against models written independently in the
testbench:

- truth tables for the base unit;
- direct cube evaluation for the PTBs and the logic block, including
  permuted switch boxes, `l2_sel` and an AND-configured last PTB2;
- integer arithmetic for the adder/subtractor and the counter modes.

How far to trust it:

- Every module passes Verilator lint and Yosys/slang elaboration.
- Every block test has been shown to fail on a deliberately broken copy of
  its module.
- The real benchmark machines have not been run. Their row tables are not
  included here, and their larger members need a logic minimiser to fit 16
  terms per function. The same-sized random machines above do run.
- Area and power have not been measured on this RTL.
