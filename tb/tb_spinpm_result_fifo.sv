// tb_spinpm_result_fifo: self-checking test of the result buffer.
//
// Pushes and pops at random rates (honouring `full` as the controller does)
// and compares every popped row with a queue model; checks the full and
// valid flags every cycle against the model's occupancy.
module tb_spinpm_result_fifo;
  localparam int unsigned WIDTH = 24;
  localparam int unsigned DEPTH = 5;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             push = 1'b0;
  logic [WIDTH-1:0] push_data = '0;
  logic             full;
  logic             pop = 1'b0;
  logic             valid;
  logic [WIDTH-1:0] head;

  int checks = 0, failures = 0;
  int fulls = 0;
  logic [WIDTH-1:0] q [$];

  spinpm_result_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      bias = (i / 500) % 2;  // phases that fill up and phases that drain
      @(negedge clk);
      checks++;
      if (full !== (q.size() == DEPTH) || valid !== (q.size() != 0)) begin
        failures++; $display("flags wrong: full %b valid %b size %0d", full, valid, q.size());
      end
      if (full) fulls++;
      if (valid) begin
        checks++;
        if (head !== q[0]) begin failures++; $display("head %h expected %h", head, q[0]); end
      end
      push = !full && ($urandom_range(0, 9) < (bias ? 8 : 3));
      pop  = ($urandom_range(0, 9) < (bias ? 3 : 8));
      push_data = WIDTH'($urandom);
      @(posedge clk);
      if (pop && q.size() != 0) void'(q.pop_front());
      if (push) q.push_back(push_data);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("buffer never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
