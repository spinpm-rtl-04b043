// spinpm_gate_lut: the look-up table that turns a gate micro-instruction into
// array settings, kept in architecturally visible configuration registers.
//
// Each entry holds, for one bit-level operation, the value the output cell is
// preset to and the V_gate level applied between the input and output
// bit-select lines (here: the largest number of inputs at logic 1 for which the
// output still switches). Rewriting an entry reprograms the function of every
// gate that names it, which is how the array is reconfigured. After reset the
// table holds the default gate set of spinpm_pkg::default_lut (NOR, NAND, OR,
// AND, MAJ3, inverted MAJ3, NOT, COPY, AND3, NAND3); the other entries are
// invalid and a gate that names one raises an exception in the controller.
//
// Interface: one host write port (wr_en, wr_idx, wr_entry), one combinational
// read port for the controller (rd_idx -> rd_entry). A write is visible from
// the next cycle.
//
// From the document: a table of voltage level and preset value per operation,
// held in programmable configuration registers. This design's choice: the
// number of entries, the encoding and the default contents.
module spinpm_gate_lut
  import spinpm_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  func_t      wr_idx,
  input  lut_entry_t wr_entry,
  input  func_t      rd_idx,
  output lut_entry_t rd_entry
);

  initial begin
    assert (ENTRIES <= (1 << FUNC_FW)) else $fatal(1, "ENTRIES does not fit the function field");
  end

  lut_entry_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= default_lut(func_t'(i));
    end else if (wr_en && 32'(wr_idx) < ENTRIES) begin
      tbl[wr_idx] <= wr_entry;
    end
  end

  always_comb begin
    if (32'(rd_idx) < ENTRIES) rd_entry = tbl[rd_idx];
    else                       rd_entry = '0;
  end

endmodule
