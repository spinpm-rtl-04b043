// spinpm_result_fifo: buffer between the controller and the host for rows
// read out of the arrays (the pattern-matching results).
//
// A synchronous first-in first-out queue. The controller pushes a row when a
// READ micro-instruction completes and stalls while the queue is full; the
// host takes rows from the head (pop when valid). Push and pop may happen in
// the same cycle. Head data is valid while `valid` is high.
//
// From the document: the controller handles the communication with the host
// and results are collected by reads. This design's choice: a queue of DEPTH
// rows with full/valid flow control.
module spinpm_result_fifo #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  output logic             full,
  input  logic             pop,
  output logic             valid,
  output logic [WIDTH-1:0] head
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic [PW:0]      count;

  logic do_push, do_pop;
  assign full    = (count == (PW+1)'(DEPTH));
  assign valid   = (count != '0);
  assign do_push = push && !full;
  assign do_pop  = pop && valid;
  assign head    = mem[rp];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  // A push into a full queue is a protocol error of the writer.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("push into a full result buffer");

endmodule
