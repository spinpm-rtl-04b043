// spinpm_substrate: all SpinPM arrays that take part in a computation.
//
// A command carries an all_arrays flag: computational commands (gates, gang
// presets, output presets) normally set it and then run in lock-step on every
// array ("gang execution"); a command with the flag clear goes to array `arr`
// only, which is how single-array reads and writes are done. Read data of the
// addressed array is returned one cycle after an AC_READ, like the arrays
// themselves; the substrate remembers which array was read to select it.
//
// From the document: several arrays deployed in parallel and gang execution
// of computational instructions on all of them. This design's choice: the
// flag/index addressing and the registered read-data select.
module spinpm_substrate
  import spinpm_pkg::*;
#(
  parameter int unsigned N_ARRAYS = 300,
  parameter int unsigned ROWS     = 2048,
  parameter int unsigned COLS     = 512
) (
  input  logic            clk,
  input  logic            rst_n,
  input  acmd_t           cmd,
  input  logic [COLS-1:0] wdata,
  output logic [COLS-1:0] rdata
);

  localparam int unsigned AW = (N_ARRAYS > 1) ? $clog2(N_ARRAYS) : 1;

  initial begin
    assert (N_ARRAYS <= (1 << ARR_FW)) else $fatal(1, "N_ARRAYS does not fit the array field");
  end

  logic [COLS-1:0] arr_rdata [N_ARRAYS];
  logic [AW-1:0]   rd_sel;

  for (genvar i = 0; i < N_ARRAYS; i++) begin : g_arr
    logic en;
    assign en = (cmd.kind != AC_NOP) && (cmd.all_arrays || (cmd.arr == arr_t'(i)));
    spinpm_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .cmd   (cmd),
      .wdata (wdata),
      .rdata (arr_rdata[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_sel <= '0;
    else if (cmd.kind == AC_READ) rd_sel <= cmd.arr[AW-1:0];
  end

  assign rdata = (32'(rd_sel) < N_ARRAYS) ? arr_rdata[rd_sel] : '0;

endmodule
