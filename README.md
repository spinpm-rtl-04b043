# SpinPM: spintronic processing-in-memory for DNA pattern matching

SpinPM stores the data to be searched in a spintronic (SHE-MTJ) memory array and
computes on it where it sits. Any cell of the array can serve as an input or as
the output of a logic gate. One gate operation runs in **every column of the
array at once**. If each column holds a DNA reference fragment and a pattern, one
short sequence of gate operations gives every column a similarity score: the
number of bases of the pattern that match the fragment. Many arrays run the same
sequence in lock-step.

This repository holds synthesizable SystemVerilog for the coprocessor:

- the array (as a behavioural model of its digital behaviour)
- the multi-array substrate
- the controller that sequences micro-instructions, with its instruction store
  and its gate look-up table
- the result buffer

It also holds self-checking testbenches. The end-to-end testbenches run DNA
pre-alignment on the design and check every score.

## Computing with the array: preset, V_gate, threshold

This part matters most for understanding the design.

A SpinPM gate works like this. The output cell is first **preset** to a known
value. A voltage V_gate is then applied across the input cells and the output
cell. The current through the output cell depends on the values (resistances)
of the inputs. If the current is above the critical switching current, the
output flips away from its preset value. Otherwise it keeps the preset.

The RTL models this as a **threshold gate**:

    out = (number of inputs at 1) <= thr ? ~preset : out_before

Here `thr` stands for the V_gate level. The function of a gate is therefore
set by two things: the preset value and `thr`. Both are kept in the look-up
table `spinpm_gate_lut`. Changing one table entry reprograms every gate that
names it. NOR becomes NAND just by raising `thr` from 0 to 1. After reset the
table holds these entries:

| id | gate | preset | thr | inputs |
|----|------|--------|-----|--------|
| 0 | NOR | 0 | 0 | 2 |
| 1 | NAND | 0 | 1 | 2 |
| 2 | OR (also OR3) | 1 | 0 | 2 or 3 |
| 3 | AND | 1 | 1 | 2 |
| 4 | MAJ3 | 1 | 1 | 3 |
| 5 | inverted MAJ3 | 0 | 1 | 3 |
| 6 | NOT | 0 | 0 | 1 |
| 7 | COPY | 1 | 0 | 1 |
| 8 | AND3 | 1 | 2 | 3 |
| 9 | NAND3 | 0 | 2 | 3 |

Entries 10 to 15 are invalid until the host writes them. A gate that names an
invalid entry raises an exception.

The output really does depend on its old value. A gate whose output cell was
not preset correctly gives a wrong answer, just as the device would. XOR is not
a threshold function, so programs build it from three gates:
`AND(OR(a,b), NAND(a,b))`.

Within a column, a computational operation uses only the rows it names. All
columns do the same thing. The output row of a gate is therefore a whole row
of the array.

## Presets and their cost

Presets are the main overhead of this kind of computing. The design offers
three ways to do them:

- **Standard write, per gate.** Unless its `no_preset` bit is set, a gate
  micro-instruction makes the controller first write the table's preset value
  into the whole output row. This takes T_WRITE cycles. Then the gate fires,
  which takes T_GATE cycles.
- **`OP_PRESET`.** This does the same standard one-row write as an explicit
  instruction.
- **`OP_GANG`, gang preset.** This sets a whole range of rows to one value in
  a single operation (T_GANG cycles). A program can give every gate its own
  output cell in a scratch area and gang-preset that area before the gates
  run. The gates are then issued with `no_preset`. The work done is the same,
  but the preset latency is hidden.

The end-to-end testbench runs the same DNA program both ways. It checks that
the results are equal. On its small configuration, the gang-preset schedule
takes about 1,750 cycles, against about 2,400 for the per-gate schedule. The exact counts vary by a few cycles from run to run, because the host drains the result buffer at a random rate.

The array model records a gang preset as a tag on each row: the row is preset
to value v. A later write or gate output on that row clears the tag. From the
ports this looks the same as rewriting every cell, and the cell storage stays
a memory with a single write port.

## Micro-instructions and the controller (`spinpm_smc`)

A micro-instruction (`spinpm_pkg::instr_t`, 66 bits) has these fields:

| field | meaning |
|-------|---------|
| `op` | NOP, PRESET, GANG, GATE, READ or HALT |
| `func` | look-up table entry (gates) |
| `nin` | number of gate inputs, 1 to 3 |
| `no_preset` | skip the output preset of a gate |
| `val` | value for PRESET and GANG |
| `all_arrays` | run on every array (gang execution) |
| `arr` | target array when `all_arrays` is 0 |
| `out` | output row, or the row that is written or read; last row of GANG |
| `in0`, `in1`, `in2` | input rows; `in0` is the first row of GANG |

The field widths are fixed: 11-bit rows, 9-bit array index, 4-bit table index.

The controller runs each instruction in three steps:

1. Fetch: one cycle, reading the instruction store.
2. Decode: one cycle. For a gate, this includes the table lookup.
3. Issue: the instruction then owns the substrate for its cycle budget.

The cycle count of one instruction is:

    2 + T_NOP (1)              NOP
    2 + T_WRITE                PRESET
    2 + T_GANG                 GANG
    2 + [T_WRITE] + T_GATE     GATE (T_WRITE unless no_preset)
    2 + T_READ + stalls        READ
    2, then done               HALT

A READ pushes the row into the result buffer. If the buffer is full, the READ
waits before it issues. These waits are the stalls above.

The following are exceptions: an undefined opcode, an invalid table entry,
`nin` = 0, or a row or array out of range. On an exception the controller
stops, raises `exc`, and reports the address of the instruction in `exc_pc`.

The budgets are parameters: T_WRITE = 2, T_GANG = 2, T_GATE = 3,
T_READ = 2. They stand for the array operation time plus peripheral overhead.
They are placeholders, not device numbers. Set them from the technology you
target.

## Substrate and host interface (`spinpm_top`)

`spinpm_substrate` holds N_ARRAYS copies of `spinpm_array`. Commands with
`all_arrays` set run on all of them in the same cycle. Other commands go to
array `arr` only. Read data comes from the array that was read.

The host works through plain ports:

- `ic_*`: load micro-instructions.
- `lut_*`: rewrite a table entry.
- `mem_*`: memory mode. The arrays behave as an ordinary memory: write a row,
  or read a row one cycle later. This port is served only while the
  controller is idle (`mem_ready`), and requests made while it is busy are
  ignored. Reference and pattern data reach the arrays this way.
- `start`/`start_pc`, then wait for `done` or `exc`.
- `res_*`: pop the rows the program read out.
- `ev_*`: one-cycle event pulses for performance counting: preset, gang
  preset, gate, read, stall.

## Default size

| parameter | value | basis |
|-----------|-------|-------|
| ROWS | 2048 | a column holds about 2K cells |
| COLS | 512 | subarrays are limited to 512 x 512 for reliable operation; a 2048-row column is taken as four 512-row subarrays stacked |
| N_ARRAYS | 300 | array count of the evaluated configuration |
| IC_DEPTH | 4096 | this design's choice: one 100-base alignment on 300 arrays needs 3,971 instructions |
| LUT_SIZE, RES_DEPTH | 16, 8 | this design's choice |

What fits at these sizes:

- **100-base patterns: fit.** One alignment uses 1,968 of the 2,048 rows per
  column: reference 200, pattern 200, gate outputs 1,568. The full-size
  testbench runs exactly this on all 153,600 columns, with every score
  correct.
- **A pool of millions of patterns** is handled in passes of 153,600 columns.
  The host reloads data between passes. `tb/tb_spinpm_pool.sv` runs a small
  pool both ways:
  - *naive*: one pattern copied into every column, one pass per pattern; the
    best-scoring column must be the pattern's origin
  - *directed*: each pattern only in the column that holds its origin, so the
    whole pool takes one pass

  Five patterns took about 2,800 cycles naive and about 560 cycles directed.
- **200- and 300-base patterns do not fit** with the included code generator,
  which never reuses a scratch row. Such patterns need roughly 3,950 and
  5,950 rows. A generator that re-presets and reuses scratch rows would need
  far fewer.

## The DNA pre-alignment program

The testbench package `tb/spinpm_codegen_pkg.sv` plays the role of the
software stack: it turns the algorithm into micro-instructions. Each base is
coded in 2 bits. In every column the rows are laid out as follows:

- rows 0 to 2(L+S)-1: reference fragment of L+S bases
- the next 2L rows: the pattern
- the rest: scratch. Outputs with preset 0 are allocated upward from the
  bottom of the scratch area; outputs with preset 1 are allocated downward
  from the last row. Each group is therefore one range that a single gang
  preset can cover.

For each alignment the program does four things, in every column of every
array at once:

1. For each base, XOR the two bit pairs (3 gates each).
2. NOR the two XOR results into the match bit of that base (1 = equal).
3. Add up the match bits with a reduction tree of adders:
   - half adder = XOR + AND
   - full adder: carry = MAJ3(a,b,c), sum = MAJ3(OR3(a,b,c), inverted MAJ3(a,b,c), AND3(a,b,c))
4. READ the score rows of every array.

The final result is the similarity score of every column.

## How far to trust it, and where it departs

- The array is a **behavioural model of the digital behaviour**. The real block
  is analog: switching currents, V_gate levels and the limits on interconnect
  distance are abstracted into the threshold rule above. Decoders, sense
  amplifiers and voltage drivers are not modelled separately. Every array
  operation takes one clock; the controller's budget stands in for the real
  time.
- The gate set, the instruction format, the cycle budgets, the result buffer,
  the exception rules and the memory-mode port are this design's choices. The
  structure around them follows the source design: instruction store →
  table-driven decode → preset → gate, gang execution over arrays, gang
  preset, programmable configuration.
- The pattern scheduler is not included. It decides which columns a pattern
  goes to, either ideally or through a hash-based filter. Placement is left to
  the host.
- There is no WRITE micro-instruction. Data is written through the memory port
  while the controller is idle.
- Every block is checked against a model written independently in its
  testbench. Each testbench was also shown to fail on a deliberately broken
  copy of its block.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `spinpm_pkg.sv` | instruction, command and table types; default gate set |
| `spinpm_array.sv` | one array |
| `spinpm_substrate.sv` | the set of arrays |
| `spinpm_gate_lut.sv` | gate look-up table |
| `spinpm_icache.sv` | instruction store |
| `spinpm_result_fifo.sv` | result buffer |
| `spinpm_smc.sv` | controller |
| `spinpm_top.sv` | coprocessor top |

`tb/`:

- `tb_<block>.sv`: one testbench per block.
- `tb_spinpm_top.sv`: end to end at reduced size (3 arrays of 256 x 16). It
  exercises both preset schedules, stalls, a refused host access,
  reconfiguration and an exception.
- `tb_spinpm_top_full.sv`: one full-size run at the default parameters.
- `tb_spinpm_pool.sv`: a pattern pool with naive and directed placement.
- `spinpm_codegen_pkg.sv`: the program generator used by the end-to-end
  testbenches.

## Simulating

Any testbench builds with plain Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_spinpm_top \
      rtl/spinpm_pkg.sv tb/spinpm_codegen_pkg.sv rtl/spinpm_array.sv \
      rtl/spinpm_substrate.sv rtl/spinpm_gate_lut.sv rtl/spinpm_icache.sv \
      rtl/spinpm_result_fifo.sv rtl/spinpm_smc.sv rtl/spinpm_top.sv \
      tb/tb_spinpm_top.sv
    ./obj_dir/Vtb_spinpm_top

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

How long the testbenches take:

- `tb_spinpm_top`: a few seconds.
- `tb_spinpm_top_full`: about 30 seconds to build and about 35 seconds to run.
  It models 300 arrays of 1 Mbit each.

Synthesizing the full-size top is a large job: 300 x 2048 x 512 cells.
