// tb_spinpm_array: self-checking test of one SpinPM array.
//
// Drives random row writes, gang presets over random row ranges and
// column-parallel gates with random inputs, V_gate level and switching
// direction, and reads rows back. A shadow copy of the cells kept in the
// testbench computes every expected value with its own count-and-compare
// rule. It also checks the one-cycle read latency and runs the four-column
// OR/MAJ3 example (three ORs feeding one MAJ3, outputs preset one row at a time).
module tb_spinpm_array;
  import spinpm_pkg::*;

  localparam int unsigned ROWS = 64;
  localparam int unsigned COLS = 16;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            en;
  acmd_t           cmd;
  logic [COLS-1:0] wdata, rdata;

  int checks = 0, failures = 0;
  logic [COLS-1:0] shadow [ROWS];

  spinpm_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    cmd = '0; cmd.kind = AC_NOP; en = 1'b0; wdata = '0;
  endtask

  task automatic do_write(int r, logic [COLS-1:0] d);
    @(negedge clk); idle(); en = 1'b1; cmd.kind = AC_WRITE; cmd.row = row_t'(r); wdata = d;
    shadow[r] = d;
    @(negedge clk); idle();
  endtask

  task automatic do_gang(int lo, int hi, logic v);
    @(negedge clk); idle(); en = 1'b1; cmd.kind = AC_GANG; cmd.lo = row_t'(lo); cmd.row = row_t'(hi);
    cmd.target = v;
    for (int r = lo; r <= hi; r++) shadow[r] = {COLS{v}};
    @(negedge clk); idle();
  endtask

  task automatic do_gate(int o, int a, int b, int c, int n, int thr, logic tgt);
    logic [COLS-1:0] res;
    @(negedge clk); idle(); en = 1'b1; cmd.kind = AC_GATE; cmd.row = row_t'(o);
    cmd.in0 = row_t'(a); cmd.in1 = row_t'(b); cmd.in2 = row_t'(c); cmd.nin = 2'(n);
    cmd.thr = thr_t'(thr); cmd.target = tgt;
    for (int col = 0; col < COLS; col++) begin
      int k;
      k = int'(shadow[a][col]);
      if (n > 1) k += int'(shadow[b][col]);
      if (n > 2) k += int'(shadow[c][col]);
      res[col] = (k <= thr) ? tgt : shadow[o][col];
    end
    shadow[o] = res;
    @(negedge clk); idle();
  endtask

  task automatic check_read(int r);
    @(negedge clk); idle(); en = 1'b1; cmd.kind = AC_READ; cmd.row = row_t'(r);
    @(negedge clk); idle();
    checks++;
    if (rdata !== shadow[r]) begin
      failures++;
      $display("row %0d: got %h expected %h", r, rdata, shadow[r]);
    end
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) do_write(r, COLS'($urandom));
    for (int r = 0; r < ROWS; r++) check_read(r);

    // A disabled array ignores commands.
    @(negedge clk); idle(); cmd.kind = AC_WRITE; cmd.row = 3; wdata = ~shadow[3];
    @(negedge clk); idle();
    check_read(3);

    // Example: four columns, two 3-bit datasets; OR bit by bit, then MAJ3.
    do_write(0, 16'b0000_0000_0000_0101);  // dataset A bit 0 per column
    do_write(1, 16'b0000_0000_0000_0011);
    do_write(2, 16'b0000_0000_0000_0110);
    do_write(3, 16'b0000_0000_0000_1000);  // dataset B bit 0
    do_write(4, 16'b0000_0000_0000_0000);
    do_write(5, 16'b0000_0000_0000_0001);
    for (int r = 6; r <= 9; r++) do_write(r, '1);       // preset OR / MAJ3 outputs to 1
    do_gate(6, 0, 3, 0, 2, 0, 1'b0);                     // OR
    do_gate(7, 1, 4, 0, 2, 0, 1'b0);
    do_gate(8, 2, 5, 0, 2, 0, 1'b0);
    do_gate(9, 6, 7, 8, 3, 1, 1'b0);                     // MAJ3
    check_read(9);
    checks++;
    // OR results per column: col0 1,1,1  col1 0,1,1  col2 1,1,1  col3 1,0,0
    if (shadow[9][3:0] !== 4'b0111) begin
      failures++; $display("OR/MAJ3 example: %b", shadow[9][3:0]);
    end

    for (int i = 0; i < 600; i++) begin
      int kind, o, a, b, c, lo, hi;
      kind = int'($urandom_range(0, 9));
      o = int'($urandom_range(0, ROWS-1));
      a = int'($urandom_range(0, ROWS-1));
      b = int'($urandom_range(0, ROWS-1));
      c = int'($urandom_range(0, ROWS-1));
      if (kind < 2) do_write(o, COLS'($urandom));
      else if (kind < 3) begin
        lo = int'($urandom_range(0, ROWS-1));
        hi = int'($urandom_range(lo, ROWS-1));
        do_gang(lo, hi, 1'($urandom));
      end else if (kind < 7) do_gate(o, a, b, c, int'($urandom_range(1, 3)),
                                     int'($urandom_range(0, 3)), 1'($urandom));
      else check_read(o);
    end
    for (int r = 0; r < ROWS; r++) check_read(r);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
