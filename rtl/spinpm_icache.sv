// spinpm_icache: micro-instruction store of the SpinPM memory controller.
//
// Micro-instructions produced by code generation are loaded here by the host
// and stay until the controller issues them. The store is a simple
// single-port-write, single-port-read memory: the host writes one instruction
// per cycle (wr_en, wr_addr, wr_data); the controller presents a fetch
// address and receives the instruction one cycle later (rd_en, rd_addr ->
// rd_data). Contents are not reset; the controller only fetches what the host
// has loaded.
//
// From the document: the controller has an instruction cache in which
// micro-instructions wait for issue. This design's choice: it is a loaded
// program memory (no tags or refill), its depth and its one-cycle read.
module spinpm_icache
  import spinpm_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  instr_t                   wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output instr_t                   rd_data
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
