// spinpm_pkg: types and constants shared by the SpinPM processing-in-memory
// coprocessor.
//
// SpinPM is a spintronic memory array whose cells can also act as the inputs
// and output of a logic gate: with the output cell preset, a voltage V_gate
// applied between the bit-select lines of the input and output cells drives a
// current through the output cell that depends on the resistance (logic value)
// of the inputs. If that current exceeds the critical switching current, the
// output flips away from its preset value. In this RTL a gate is therefore a
// threshold gate: the output switches when the number of inputs holding logic 1
// is at most the level selected by V_gate. The preset value and the V_gate
// level per operation are kept in a programmable look-up table, so changing
// the table entry changes the function (NOR becomes NAND, and so on).
//
// Micro-instructions name a type of operation and the rows that form its
// inputs and output; computational ones run on all columns of the addressed
// arrays at once. Field widths are fixed here so that an instruction word has
// one format whatever size of array is built; modules check that their ROWS,
// N_ARRAYS and LUT size fit these fields.
package spinpm_pkg;

  // Field widths of the micro-instruction format (this design's choice).
  localparam int unsigned ROW_FW  = 11;  // up to 2048 rows per column
  localparam int unsigned ARR_FW  = 9;   // up to 512 arrays
  localparam int unsigned FUNC_FW = 4;   // 16 look-up table entries
  localparam int unsigned THR_FW  = 2;   // V_gate level: 0..3 inputs at 1

  typedef logic [ROW_FW-1:0]  row_t;
  typedef logic [ARR_FW-1:0]  arr_t;
  typedef logic [FUNC_FW-1:0] func_t;
  typedef logic [THR_FW-1:0]  thr_t;

  // Micro-instruction opcodes.
  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,  // spend the issue slot, touch nothing
    OP_PRESET = 4'd1,  // standard write: every column of row `out` := val
    OP_GANG   = 4'd2,  // gang preset: rows in0..out (inclusive) := val at once
    OP_GATE   = 4'd3,  // logic gate: out := func(in0[, in1[, in2]]), all columns
    OP_READ   = 4'd4,  // read row `out` of array `arr` into the result buffer
    OP_HALT   = 4'd15  // end of program
  } opcode_e;

  // One micro-instruction.
  typedef struct packed {
    opcode_e     op;
    func_t       func;        // look-up table entry (OP_GATE)
    logic [1:0]  nin;         // number of gate inputs, 1..3 (OP_GATE)
    logic        no_preset;   // OP_GATE: output already preset by a gang preset
    logic        val;         // preset value (OP_PRESET, OP_GANG)
    logic        all_arrays;  // gang execution on every array of the substrate
    arr_t        arr;         // target array when all_arrays is 0
    row_t        out;         // output / written / read row; last row of OP_GANG
    row_t        in0;         // first input row; first row of OP_GANG
    row_t        in1;
    row_t        in2;
  } instr_t;

  // Look-up table entry: the preset value of the output cell and the V_gate
  // level. The gate drives the output to ~preset when at most `thr` inputs
  // are at logic 1.
  typedef struct packed {
    logic valid;
    logic preset;
    thr_t thr;
  } lut_entry_t;

  // Default table contents (function identifiers used by programs).
  localparam func_t F_NOR  = 4'd0;  // preset 0, switch when 0 inputs at 1
  localparam func_t F_NAND = 4'd1;  // preset 0, switch when <=1 inputs at 1 (2 inputs)
  localparam func_t F_OR   = 4'd2;  // preset 1, switch to 0 when 0 inputs at 1
  localparam func_t F_AND  = 4'd3;  // preset 1, switch to 0 when <=1 inputs at 1 (2 inputs)
  localparam func_t F_MAJ3 = 4'd4;  // preset 1, switch to 0 when <=1 of 3 inputs at 1
  localparam func_t F_MIN3 = 4'd5;  // inverted majority: preset 0, switch when <=1 of 3
  localparam func_t F_INV  = 4'd6;  // preset 0, switch when the input is 0
  localparam func_t F_COPY = 4'd7;  // preset 1, switch to 0 when the input is 0
  localparam func_t F_AND3 = 4'd8;  // preset 1, switch to 0 when <=2 of 3 inputs at 1
  localparam func_t F_NAND3 = 4'd9; // preset 0, switch when <=2 of 3 inputs at 1

  function automatic lut_entry_t default_lut(input func_t f);
    lut_entry_t e;
    e.valid = 1'b1;
    case (f)
      F_NOR:   begin e.preset = 1'b0; e.thr = 2'd0; end
      F_NAND:  begin e.preset = 1'b0; e.thr = 2'd1; end
      F_OR:    begin e.preset = 1'b1; e.thr = 2'd0; end
      F_AND:   begin e.preset = 1'b1; e.thr = 2'd1; end
      F_MAJ3:  begin e.preset = 1'b1; e.thr = 2'd1; end
      F_MIN3:  begin e.preset = 1'b0; e.thr = 2'd1; end
      F_INV:   begin e.preset = 1'b0; e.thr = 2'd0; end
      F_COPY:  begin e.preset = 1'b1; e.thr = 2'd0; end
      F_AND3:  begin e.preset = 1'b1; e.thr = 2'd2; end
      F_NAND3: begin e.preset = 1'b0; e.thr = 2'd2; end
      default: begin e.valid = 1'b0; e.preset = 1'b0; e.thr = 2'd0; end
    endcase
    return e;
  endfunction

  // Command from the controller (or the host port) to the array substrate.
  typedef enum logic [2:0] {
    AC_NOP   = 3'd0,
    AC_WRITE = 3'd1,  // row `row` := wdata (standard write, one row)
    AC_GANG  = 3'd2,  // rows lo..row := {val}, all at once
    AC_GATE  = 3'd3,  // row `row` := gate(in0, in1, in2), column parallel
    AC_READ  = 3'd4   // rdata := row `row` (valid the next cycle)
  } acmd_e;

  typedef struct packed {
    acmd_e       kind;
    logic        all_arrays;
    arr_t        arr;
    row_t        row;     // output / written / read row, last row of a gang preset
    row_t        lo;      // first row of a gang preset
    row_t        in0;
    row_t        in1;
    row_t        in2;
    logic [1:0]  nin;
    thr_t        thr;     // V_gate level
    logic        target;  // value the output switches to (~preset); gang value
  } acmd_t;

endpackage
