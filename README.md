# One-gate processor

Any combinational logic function can be built from enough two-input gates.
This design does it with **one** physical gate. A netlist is evaluated one gate
at a time: the values on its wires are kept in a small memory, and a program in
an instruction memory says, for each step, which two stored values to combine,
with which Boolean function, and where to put the result. Loading a different
program makes the same hardware compute a different function. It is a complete
stored-program processor reduced to its minimum: a program counter, an
instruction memory, a data memory of one-bit slots, and a multiplexer that
acts as a programmable gate.

Three small circuits from the same material sit beside it in the top level:
the example netlist as ordinary gates, an edge-triggered flip-flop made of two
multiplexers, and a programmable gate whose truth table is stored in
flip-flops.

## Datapath

```
            +--------+     +-----------+  instr   +---------+
  run ----->|  PC +1 |---->| instr mem |--------->| decoder |
            +--------+  pc | 16 x 15   |          +---------+
                           +-----------+            |  |  |  control
                 in[7:0] ---> input mux (In0) --+   |  |  |
                                                |   v  v  v
          +----------------+ rd0 (In0)  +------+|  +--------+
          | data memory    |----------->| prog ||  | write  |--> data memory (Out)
          | 8 x 1 bit      | rd1 (In1)  | gate |+->| select |
          | 2 read, 1 write|----------->|  fn  |-->|        |
          +----------------+            +------+   +--------+
                                            |
                                            +--> output register[Out] (WRITE)
```

Each clock cycle with `run` high executes one instruction:

1. The instruction at `pc` is read (asynchronous read).
2. Its two operand slots are read from the data memory (asynchronous reads).
3. The programmable gate applies the instruction's truth table to them.
4. At the rising edge the result is stored: into a data slot (READ, GATE) or
   an output register (WRITE). PC advances by one at the same edge.

Because the store happens at the edge, the next instruction already sees the
result; there is no pipeline, so there are no hazards and no bypass. After the
last instruction word PC wraps to 0 and the program runs again, so the
outputs are refreshed every 16 cycles with whatever is on the inputs.

## Instruction format

15 bits, most significant field first:

| bits    | field  | meaning |
|---------|--------|---------|
| [14:13] | type   | `00` READ, `01` GATE, `11` WRITE, `10` no-op |
| [12:9]  | fn     | truth table of the gate |
| [8:6]   | In0    | first source slot; for READ, the input number |
| [5:3]   | In1    | second source slot |
| [2:0]   | Out    | destination slot; for WRITE, the output register |

| type  | effect |
|-------|--------|
| READ  | `slot[Out] = in[In0]` |
| GATE  | `slot[Out] = fn(slot[In0], slot[In1])` |
| WRITE | `out[Out] = fn(slot[In0], slot[In1])`, normally with fn = SEL0, which copies `slot[In0]` |
| `10`  | nothing is written; PC still advances |

Named functions (package `mp_pkg`): NONE `0000`, AND `0001`, XOR `0110`,
OR `0111`, SEL0 `0101`. Example: `GATE AND 0 1 -> 2` is
`01 0001 000 001 010`; `GATE OR 3 4 -> 3` is `010111011100011`.
`mp_pkg::mk_instr(type, fn, in0, in1, out)` assembles a word.

## The programmable gate and its bit order

`prog_gate` is a tree of three 2:1 multiplexers. The four truth-table bits are
the data inputs; the two operands are the select lines. The first level
selects with the first operand `a` (In0), the second level with `b` (In1).

The truth table is read with bit 3 first:

| bit | output for (b, a) |
|-----|-------------------|
| 3   | (0, 0) |
| 2   | (0, 1) |
| 1   | (1, 0) |
| 0   | (1, 1) |

So `fn = 0001` is AND, `0111` is OR, `0110` is XOR, `1110` is NAND and `1000`
is NOR. The published codes for AND, OR and XOR are symmetric and would fit
either operand order. SEL0 = `0101` is not symmetric, and it fixes the order:
with this assignment it outputs the first operand. That is why WRITE copies
`slot[In0]`.

## Example program

The reference function is the carry and sum of a full adder,
`o1 = a&b | b&c | a&c` and `o2 = a ^ b ^ c`. Slots 0-6 hold a, b, c, t1, t2,
o1 and o2:

```
 0 READ  NONE 0 0 -> 0     a  = in[0]
 1 READ  NONE 1 0 -> 1     b  = in[1]
 2 READ  NONE 2 0 -> 2     c  = in[2]
 3 GATE  AND  0 1 -> 3     t1 = a & b
 4 GATE  AND  1 2 -> 4     t2 = b & c
 5 GATE  OR   3 4 -> 3     t1 = t1 | t2
 6 GATE  AND  0 2 -> 4     t2 = a & c
 7 GATE  OR   3 4 -> 5     o1 = t1 | t2
 8 GATE  XOR  0 1 -> 3     t1 = a ^ b
 9 GATE  XOR  3 2 -> 6     o2 = t1 ^ c
10 WRITE SEL0 6 0 -> 1     out[1] = o2
11 WRITE SEL0 5 0 -> 0     out[0] = o1
12-15 no-op
```

Starting at PC 0, `out[1]` is loaded at the 11th rising edge and `out[0]` at
the 12th. Seven gates cost seven cycles, plus three cycles to read the inputs
and two to write the outputs. Any netlist whose live values fit in 8 slots and
whose program fits in 16 words can be run the same way.

## Modules

| module | role |
|--------|------|
| `mp_pkg` | instruction struct, type enum, function codes, `mk_instr` |
| `one_gate_processor` | the processor, built from the modules below |
| `pc_counter` | PC: 0 on reset, +1 per executed instruction, wraps |
| `instr_mem` | 16 x 15 instruction memory, asynchronous read, synchronous load port |
| `instr_decoder` | fields and write enables per type |
| `data_mem` | 8 x 1 data memory, two asynchronous reads, one synchronous write |
| `prog_gate` | multiplexer-tree programmable gate |
| `input_mux` | multiplexer tree that selects one of the 8 inputs |
| `output_regs` | 8 output registers, one loaded per WRITE |
| `mux2` | the 2:1 multiplexer every tree above is made of |
| `preclass1_logic` | the example function as seven ordinary gates |
| `mux_flip_flop` | D flip-flop made of two multiplexer latches |
| `config_gate` | `prog_gate` with its truth table held in four flip-flops |
| `minimal_processor_top` | all of the above side by side |

### Multiplexer flip-flop

Each stage of `mux_flip_flop` is a 2:1 multiplexer whose output is fed back to
its `i1` input. With select 0 the stage passes `i0`; with select 1 it holds its
output, which makes it a latch. The master stage gets D and is selected by
CLK. The slave stage gets the master's output and is selected by the inverted
CLK. Q therefore takes D at the rising edge. Both stages are written as
`always_latch`, so synthesis reports two latch bits. Those latches are
intended.

## Top level: `minimal_processor_top`

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (PC = 0, outputs and stored truth table cleared) |
| `run` | in | 1 | execute one instruction per cycle; when low, PC and all state hold |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 4, 15 | load an instruction word; only while `run` is low, which an assertion checks |
| `in` | in | 8 | processor inputs |
| `out` | out | 8 | processor output registers |
| `pc`, `instr` | out | 4, 15 | current PC and instruction |
| `ref_o1`, `ref_o2` | out | 1 | gate-level majority and parity of `in[2:0]`, for comparison |
| `ff_d`, `ff_q` | in/out | 1 | multiplexer flip-flop, clocked by `clk` |
| `cg_we`, `cg_fn`, `cg_a`, `cg_b`, `cg_table`, `cg_y` | | | configurable gate: load a truth table, apply operands, read the output |

To use the processor: hold `run` low, write the program with `prog_we`, pulse
`rst_n` to restart at PC 0, then raise `run`. The data memory is not reset, so
a program must write a slot before it reads it.

Parameter: `IMEM_DEPTH` (default 16) sets the instruction-memory depth and
the PC width. The 8 slots and the 3-bit fields are fixed in `mp_pkg`
(`SLOT_AW`).

## Choices made in this implementation

The source material gives the instruction fields, the codes, the 8-slot data
memory, the single gate, the input multiplexer, the output registers and the
+1 program counter. The following were chosen here:

- One instruction per cycle, with asynchronous reads and stores at the edge.
- Type code `10` is a no-op.
- WRITE passes `slot[In0]` through the gate using SEL0.
- Instruction memory of 16 words. PC wraps, so the program repeats.
- 8 inputs and 8 outputs, the range of a 3-bit field.
- The `run` input and the program-loading port.
- Asynchronous active-low reset of PC and outputs. The data memory has no
  reset.
- The truth-table bit order described above.
- The load port and reset value of `config_gate`.
- How the processor, the reference netlist, the flip-flop and the
  configurable gate are connected in the top. They are separate pieces, placed
  side by side. The reference netlist shares the processor's inputs 0-2.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_one_gate_processor` runs the example program for all eight values of
  a, b, c. It checks the cycle in which each output register is loaded, that
  a stopped processor holds its state, and a second program (NAND, NOR, copy).
- `tb_minimal_processor_top` runs the full design at its default size:
  - 32 passes of the example program, compared with the gate netlist and
    with a + b + c;
  - 20 random programs, compared with a behavioural model of the
    instruction set;
  - the flip-flop at every clock edge;
  - 30 random truth tables in the configurable gate.

  It also counts program loads, each instruction type, PC wraps, stopped
  cycles, reprogramming, flip-flop captures and gate reconfigurations. It
  fails if any of them never happens.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/mp_pkg.sv tb/tb_minimal_processor_top.sv --top-module tb_minimal_processor_top
./obj_dir/Vtb_minimal_processor_top
```

All testbenches finish in well under a second.
