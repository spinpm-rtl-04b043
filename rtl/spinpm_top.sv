// spinpm_top: SpinPM processing-in-memory coprocessor for pattern matching.
//
// The coprocessor is a substrate of N_ARRAYS SpinPM arrays (ROWS x COLS
// cells each) driven by the SpinPM memory controller (SMC). The host does not
// ship data to be processed; it loads a program of micro-instructions that
// name rows of the arrays, starts it, and collects the rows the program reads
// out. Through the memory port the arrays act as a plain memory, which is how
// the host writes reference fragments and patterns and can read any row; the
// port is served only while the controller is idle (mem_ready), because the
// controller owns the arrays while it computes.
//
// Host interface (all synchronous to clk, active-low asynchronous reset):
//   ic_*   write one micro-instruction into the instruction cache
//   lut_*  rewrite one entry of the gate look-up table (reconfiguration)
//   mem_*  memory-mode access: mem_req with mem_we writes mem_wdata into row
//          mem_row of array mem_arr; without mem_we it reads, and mem_rdata
//          is valid when mem_rvalid is high (the next cycle). Requests made
//          while mem_ready is low are ignored.
//   start/start_pc, busy, done (one-cycle pulse at HALT), exc/exc_pc
//   res_*  rows read by the program, oldest first; res_pop takes the head
//   ev_*   one-cycle event pulses from the controller for performance counting
//
// Arrangement and sizes follow the document where it gives them (column
// height of 2K cells, 512 columns, gang execution over all arrays, 300
// arrays in its evaluation); the host port and the result buffer are this
// design's choices.
module spinpm_top
  import spinpm_pkg::*;
#(
  parameter int unsigned N_ARRAYS  = 300,
  parameter int unsigned ROWS      = 2048,
  parameter int unsigned COLS      = 512,
  parameter int unsigned IC_DEPTH  = 4096,
  parameter int unsigned LUT_SIZE  = 16,
  parameter int unsigned RES_DEPTH = 8,
  parameter int unsigned T_WRITE   = 2,
  parameter int unsigned T_GANG    = 2,
  parameter int unsigned T_GATE    = 3,
  parameter int unsigned T_READ    = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // instruction cache load
  input  logic                        ic_we,
  input  logic [$clog2(IC_DEPTH)-1:0] ic_addr,
  input  instr_t                      ic_wdata,
  // look-up table programming
  input  logic                        lut_we,
  input  func_t                       lut_idx,
  input  lut_entry_t                  lut_wdata,
  // memory-mode access
  input  logic                        mem_req,
  input  logic                        mem_we,
  input  arr_t                        mem_arr,
  input  row_t                        mem_row,
  input  logic [COLS-1:0]             mem_wdata,
  output logic                        mem_ready,
  output logic [COLS-1:0]             mem_rdata,
  output logic                        mem_rvalid,
  // control
  input  logic                        start,
  input  logic [$clog2(IC_DEPTH)-1:0] start_pc,
  output logic                        busy,
  output logic                        done,
  output logic                        exc,
  output logic [$clog2(IC_DEPTH)-1:0] exc_pc,
  // results
  output logic                        res_valid,
  output logic [COLS-1:0]             res_data,
  input  logic                        res_pop,
  // events
  output logic                        ev_preset,
  output logic                        ev_gang,
  output logic                        ev_gate,
  output logic                        ev_read,
  output logic                        ev_stall
);

  localparam int unsigned PCW = $clog2(IC_DEPTH);

  // Instruction cache.
  logic           ic_rd_en;
  logic [PCW-1:0] ic_rd_addr;
  instr_t         ic_rd_data;

  spinpm_icache #(.DEPTH(IC_DEPTH)) u_icache (
    .clk     (clk),
    .wr_en   (ic_we),
    .wr_addr (ic_addr),
    .wr_data (ic_wdata),
    .rd_en   (ic_rd_en),
    .rd_addr (ic_rd_addr),
    .rd_data (ic_rd_data)
  );

  // Gate look-up table.
  func_t      smc_lut_idx;
  lut_entry_t smc_lut_entry;

  spinpm_gate_lut #(.ENTRIES(LUT_SIZE)) u_lut (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (lut_we),
    .wr_idx   (lut_idx),
    .wr_entry (lut_wdata),
    .rd_idx   (smc_lut_idx),
    .rd_entry (smc_lut_entry)
  );

  // Controller.
  acmd_t           smc_cmd;
  logic [COLS-1:0] smc_wdata;
  logic [COLS-1:0] sub_rdata;
  logic            res_push, res_full;
  logic [COLS-1:0] res_push_data;

  spinpm_smc #(
    .ROWS(ROWS), .COLS(COLS), .N_ARRAYS(N_ARRAYS), .IC_DEPTH(IC_DEPTH),
    .T_WRITE(T_WRITE), .T_GANG(T_GANG), .T_GATE(T_GATE), .T_READ(T_READ)
  ) u_smc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .start_pc   (start_pc),
    .busy       (busy),
    .done       (done),
    .exc        (exc),
    .exc_pc     (exc_pc),
    .ic_rd_en   (ic_rd_en),
    .ic_rd_addr (ic_rd_addr),
    .ic_rd_data (ic_rd_data),
    .lut_idx    (smc_lut_idx),
    .lut_entry  (smc_lut_entry),
    .acmd       (smc_cmd),
    .awdata     (smc_wdata),
    .ardata     (sub_rdata),
    .res_push   (res_push),
    .res_data   (res_push_data),
    .res_full   (res_full),
    .ev_preset  (ev_preset),
    .ev_gang    (ev_gang),
    .ev_gate    (ev_gate),
    .ev_read    (ev_read),
    .ev_stall   (ev_stall)
  );

  // Memory-mode access from the host while the controller is idle.
  acmd_t           sub_cmd;
  logic [COLS-1:0] sub_wdata;
  logic            host_rd_q;

  assign mem_ready = !busy;

  always_comb begin
    sub_cmd   = smc_cmd;
    sub_wdata = smc_wdata;
    if (!busy && mem_req) begin
      sub_cmd            = '0;
      sub_cmd.kind       = mem_we ? AC_WRITE : AC_READ;
      sub_cmd.all_arrays = 1'b0;
      sub_cmd.arr        = mem_arr;
      sub_cmd.row        = mem_row;
      sub_wdata          = mem_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rd_q <= 1'b0;
    else        host_rd_q <= !busy && mem_req && !mem_we;
  end

  assign mem_rvalid = host_rd_q;
  assign mem_rdata  = sub_rdata;

  spinpm_substrate #(.N_ARRAYS(N_ARRAYS), .ROWS(ROWS), .COLS(COLS)) u_substrate (
    .clk   (clk),
    .rst_n (rst_n),
    .cmd   (sub_cmd),
    .wdata (sub_wdata),
    .rdata (sub_rdata)
  );

  // Result buffer.
  spinpm_result_fifo #(.WIDTH(COLS), .DEPTH(RES_DEPTH)) u_res (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (res_push),
    .push_data (res_push_data),
    .full      (res_full),
    .pop       (res_pop),
    .valid     (res_valid),
    .head      (res_data)
  );

endmodule
