// spinpm_array: behavioural model of one SpinPM array of SHE-MTJ cells.
//
// The real array is a spintronic macro (two-transistor SHE-MTJ cells, row and
// column decoders, sense amplifiers, bit-select-line voltage drivers); this
// model reproduces its digital behaviour and is written so that it also
// synthesizes. By default the array is a plain memory: one row is written or
// read at a time. In compute mode every column evaluates the same gate at
// once: the cells of rows in0..in2 are the inputs, the cell of row `row` is the
// output. The output cell keeps the value it held (its preset) unless the
// number of inputs at logic 1 is at most the V_gate level `thr`, in which case
// it switches to `target`. A gate whose output was not preset correctly
// therefore gives a wrong result, as in the device. A gang preset sets a whole
// range of rows to one value in a single operation.
//
// The gang preset is recorded in a per-row tag (row preset to value v) rather
// than by rewriting every cell; a later write or gate output on the row clears
// the tag. Seen from the ports this is the same as writing every cell, and it
// keeps the cell storage a memory with one write port.
//
// Timing: every command takes effect at the clock edge that samples it;
// AC_READ data appears on rdata in the next cycle (registered sense
// amplifier output). Cell contents are not reset (the cells are non-volatile);
// gang-preset tags are cleared by reset.
//
// From the document: column-parallel gates with a preset output whose
// function is set by the preset value and V_gate, standard one-row writes,
// gang preset, 2K cells per column and 512 columns. This design's choice:
// the threshold abstraction of the analog switching and the one-cycle
// operations (the controller allots the real operation time).
module spinpm_array
  import spinpm_pkg::*;
#(
  parameter int unsigned ROWS = 2048,
  parameter int unsigned COLS = 512
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,      // this array is addressed by cmd
  input  acmd_t           cmd,
  input  logic [COLS-1:0] wdata,   // AC_WRITE data
  output logic [COLS-1:0] rdata
);

  localparam int unsigned RW = $clog2(ROWS);

  initial begin
    assert (ROWS <= (1 << ROW_FW)) else $fatal(1, "ROWS does not fit the row field");
  end

  logic [COLS-1:0] cells [ROWS];
  logic [ROWS-1:0] gp_tag;   // row holds a gang-preset value
  logic [ROWS-1:0] gp_val;

  function automatic logic [RW-1:0] ridx(input row_t r);
    return r[RW-1:0];
  endfunction

  // Current content of a row, gang preset included.
  logic [COLS-1:0] row_in0, row_in1, row_in2, row_out;
  always_comb begin
    row_in0 = gp_tag[ridx(cmd.in0)] ? {COLS{gp_val[ridx(cmd.in0)]}} : cells[ridx(cmd.in0)];
    row_in1 = gp_tag[ridx(cmd.in1)] ? {COLS{gp_val[ridx(cmd.in1)]}} : cells[ridx(cmd.in1)];
    row_in2 = gp_tag[ridx(cmd.in2)] ? {COLS{gp_val[ridx(cmd.in2)]}} : cells[ridx(cmd.in2)];
    row_out = gp_tag[ridx(cmd.row)] ? {COLS{gp_val[ridx(cmd.row)]}} : cells[ridx(cmd.row)];
  end

  // Column-parallel threshold gate. With a, b, c the input bits of a column
  // (unused inputs read as 0), the output switches when the count of ones
  // is at most thr: thr 0 -> none set, 1 -> no two set, 2 -> not all three.
  logic [COLS-1:0] in_a, in_b, in_c, le0, le1, le2, sw, gate_res;
  always_comb begin
    in_a = row_in0;
    in_b = (cmd.nin >= 2'd2) ? row_in1 : '0;
    in_c = (cmd.nin == 2'd3) ? row_in2 : '0;
    le0  = ~(in_a | in_b | in_c);
    le1  = ~((in_a & in_b) | (in_a & in_c) | (in_b & in_c));
    le2  = ~(in_a & in_b & in_c);
    case (cmd.thr)
      2'd0:    sw = le0;
      2'd1:    sw = le1;
      2'd2:    sw = le2;
      default: sw = '1;
    endcase
    gate_res = (sw & {COLS{cmd.target}}) | (~sw & row_out);
  end

  logic            do_wr;
  logic [COLS-1:0] wr_row;
  always_comb begin
    do_wr  = en && (cmd.kind == AC_WRITE || cmd.kind == AC_GATE);
    wr_row = (cmd.kind == AC_WRITE) ? wdata : gate_res;
  end

  always_ff @(posedge clk) begin
    if (do_wr) cells[ridx(cmd.row)] <= wr_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gp_tag <= '0;
      gp_val <= '0;
    end else if (en) begin
      if (cmd.kind == AC_GANG) begin
        for (int r = 0; r < ROWS; r++) begin
          if (RW'(r) >= ridx(cmd.lo) && RW'(r) <= ridx(cmd.row)) begin
            gp_tag[r] <= 1'b1;
            gp_val[r] <= cmd.target;
          end
        end
      end else if (do_wr) begin
        gp_tag[ridx(cmd.row)] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en && cmd.kind == AC_READ) rdata <= row_out;
  end

endmodule
