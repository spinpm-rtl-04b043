// tb_spinpm_substrate: self-checking test of the array substrate.
//
// Three small arrays. Writes go to one array each; gang presets and gates go
// either to all arrays at once (gang execution) or to one; reads return the
// addressed array's row one cycle later. A per-array shadow of the cells in
// the testbench gives every expected read value.
module tb_spinpm_substrate;
  import spinpm_pkg::*;

  localparam int unsigned N    = 3;
  localparam int unsigned ROWS = 32;
  localparam int unsigned COLS = 8;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  acmd_t           cmd;
  logic [COLS-1:0] wdata, rdata;

  int checks = 0, failures = 0;
  int gang_ops = 0;
  logic [COLS-1:0] shadow [N][ROWS];

  spinpm_substrate #(.N_ARRAYS(N), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    cmd = '0; cmd.kind = AC_NOP; wdata = '0;
  endtask

  function automatic logic hit(int a, logic all, int sel);
    return all || (a == sel);
  endfunction

  task automatic do_write(int a, int r, logic [COLS-1:0] d);
    @(negedge clk); idle(); cmd.kind = AC_WRITE; cmd.arr = arr_t'(a); cmd.row = row_t'(r); wdata = d;
    shadow[a][r] = d;
  endtask

  task automatic do_gang(logic all, int a, int lo, int hi, logic v);
    @(negedge clk); idle(); cmd.kind = AC_GANG; cmd.all_arrays = all; cmd.arr = arr_t'(a);
    cmd.lo = row_t'(lo); cmd.row = row_t'(hi); cmd.target = v;
    for (int k = 0; k < N; k++) if (hit(k, all, a)) for (int r = lo; r <= hi; r++) shadow[k][r] = {COLS{v}};
  endtask

  task automatic do_gate(logic all, int a, int o, int x, int y, int z, int n, int thr, logic tgt);
    @(negedge clk); idle(); cmd.kind = AC_GATE; cmd.all_arrays = all; cmd.arr = arr_t'(a);
    cmd.row = row_t'(o); cmd.in0 = row_t'(x); cmd.in1 = row_t'(y); cmd.in2 = row_t'(z);
    cmd.nin = 2'(n); cmd.thr = thr_t'(thr); cmd.target = tgt;
    for (int k = 0; k < N; k++) if (hit(k, all, a)) begin
      logic [COLS-1:0] res;
      for (int c = 0; c < COLS; c++) begin
        int cnt;
        cnt = int'(shadow[k][x][c]) + ((n > 1) ? int'(shadow[k][y][c]) : 0) + ((n > 2) ? int'(shadow[k][z][c]) : 0);
        res[c] = (cnt <= thr) ? tgt : shadow[k][o][c];
      end
      shadow[k][o] = res;
    end
  endtask

  task automatic check_read(int a, int r);
    @(negedge clk); idle(); cmd.kind = AC_READ; cmd.arr = arr_t'(a); cmd.row = row_t'(r);
    @(negedge clk); idle();
    checks++;
    if (rdata !== shadow[a][r]) begin
      failures++; $display("array %0d row %0d: got %h expected %h", a, r, rdata, shadow[a][r]);
    end
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N; a++) for (int r = 0; r < ROWS; r++) do_write(a, r, COLS'($urandom));
    for (int a = 0; a < N; a++) for (int r = 0; r < ROWS; r++) check_read(a, r);
    for (int i = 0; i < 800; i++) begin
      int kind, a, lo, hi;
      logic all;
      kind = int'($urandom_range(0, 9));
      a = int'($urandom_range(0, N-1));
      all = ($urandom_range(0, 3) != 0);
      if (kind < 2) do_write(a, int'($urandom_range(0, ROWS-1)), COLS'($urandom));
      else if (kind < 3) begin
        lo = int'($urandom_range(0, ROWS-1)); hi = int'($urandom_range(lo, ROWS-1));
        do_gang(all, a, lo, hi, 1'($urandom));
        if (all) gang_ops++;
      end else if (kind < 7) begin
        do_gate(all, a, int'($urandom_range(0, ROWS-1)), int'($urandom_range(0, ROWS-1)),
                int'($urandom_range(0, ROWS-1)), int'($urandom_range(0, ROWS-1)),
                int'($urandom_range(1, 3)), int'($urandom_range(0, 3)), 1'($urandom));
        if (all) gang_ops++;
      end else check_read(a, int'($urandom_range(0, ROWS-1)));
    end
    for (int a = 0; a < N; a++) for (int r = 0; r < ROWS; r++) check_read(a, r);
    checks++;
    if (gang_ops == 0) begin failures++; $display("no gang operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
