// tb_spinpm_smc: self-checking test of the SpinPM memory controller.
//
// The testbench plays the instruction cache (a one-cycle-latency memory), the
// look-up table (its own copy of the default gate set) and the substrate (read
// data is a known function of array and row). It runs a random legal
// program and checks every array command: its kind, rows, V_gate level,
// switching target, preset data, and the cycle in which it is issued, which
// follows from the per-operation cycle budgets (fetch 1 + decode 1 + budget;
// a gate without no_preset first spends T_WRITE cycles on a preset). It
// checks the cycle of the `done` pulse, the rows pushed to the result buffer,
// that reads stall while the buffer is full, and that an illegal opcode and
// an invalid table entry raise an exception at the right address.
module tb_spinpm_smc;
  import spinpm_pkg::*;

  localparam int unsigned ROWS = 64, COLS = 8, NARR = 4, DEPTH = 256;
  localparam int unsigned TW = 2, TG = 3, TGA = 4, TR = 3;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [AW-1:0] start_pc = '0;
  logic busy, done, exc;
  logic [AW-1:0] exc_pc;
  logic ic_rd_en;
  logic [AW-1:0] ic_rd_addr;
  instr_t ic_rd_data;
  func_t lut_idx;
  lut_entry_t lut_entry;
  acmd_t acmd;
  logic [COLS-1:0] awdata, ardata;
  logic res_push, res_full = 1'b0;
  logic [COLS-1:0] res_data;
  logic ev_preset, ev_gang, ev_gate, ev_read, ev_stall;

  spinpm_smc #(.ROWS(ROWS), .COLS(COLS), .N_ARRAYS(NARR), .IC_DEPTH(DEPTH),
               .T_WRITE(TW), .T_GANG(TG), .T_GATE(TGA), .T_READ(TR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int stalls = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Instruction cache and substrate stand-ins.
  instr_t prog [DEPTH];
  always_ff @(posedge clk) if (ic_rd_en) ic_rd_data <= prog[ic_rd_addr];

  function automatic logic [COLS-1:0] rd_fn(int a, int r);
    return COLS'(a * 37 + r * 11 + 5);
  endfunction
  logic [COLS-1:0] ard_q;
  always_ff @(posedge clk) if (acmd.kind == AC_READ) ard_q <= rd_fn(int'(acmd.arr), int'(acmd.row));
  assign ardata = ard_q;

  // Independent table: preset value and V_gate level of the default set.
  function automatic lut_entry_t tb_lut(int f);
    case (f)
      0: return '{1'b1, 1'b0, 2'd0};
      1: return '{1'b1, 1'b0, 2'd1};
      2: return '{1'b1, 1'b1, 2'd0};
      3: return '{1'b1, 1'b1, 2'd1};
      4: return '{1'b1, 1'b1, 2'd1};
      5: return '{1'b1, 1'b0, 2'd1};
      default: return '{1'b0, 1'b0, 2'd0};
    endcase
  endfunction
  assign lut_entry = tb_lut(int'(lut_idx));

  typedef struct { int t; acmd_e kind; int row; int lo; int in0; logic all; int arr; int thr; logic tgt; logic [COLS-1:0] wd; } exp_t;
  exp_t exp_q [$];
  logic [COLS-1:0] res_q [$];
  int done_at = -1;
  // A real buffer only fills between reads: the stand-in changes res_full
  // only while no read is in flight.
  logic inflight = 1'b0;
  always @(posedge clk) begin
    if (ev_read) inflight <= 1'b1;
    else if (res_push) inflight <= 1'b0;
  end
  logic check_timing = 1'b1;

  always @(negedge clk) begin
    if (res_push) begin
      checks++;
      if (res_q.size() == 0 || res_data !== res_q[0]) begin failures++; $display("unexpected result row %h", res_data); end
      else void'(res_q.pop_front());
    end
    if (ev_stall) stalls++;
    if (done) done_at = cyc;
    if (acmd.kind != AC_NOP) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected command %s", acmd.kind.name()); end
      else begin
        e = exp_q.pop_front();
        if (acmd.kind !== e.kind || int'(acmd.row) != e.row || acmd.all_arrays !== e.all ||
            (!e.all && int'(acmd.arr) != e.arr) ||
            (check_timing && cyc != e.t) ||
            (e.kind == AC_GANG && (int'(acmd.lo) != e.lo || acmd.target !== e.tgt)) ||
            (e.kind == AC_WRITE && awdata !== e.wd) ||
            (e.kind == AC_GATE && (int'(acmd.in0) != e.in0 || int'(acmd.thr) != e.thr || acmd.target !== e.tgt))) begin
          failures++;
          $display("cmd mismatch at %0d: got %s row %0d (expected %s row %0d at %0d)",
                   cyc, acmd.kind.name(), acmd.row, e.kind.name(), e.row, e.t);
        end
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build a random legal program of n instructions at address 0 and the
  // expected command trace assuming start is sampled at edge t0.
  function automatic int build(int n, int t0);
    int s = 0;
    exp_q.delete(); res_q.delete();
    for (int i = 0; i < n; i++) begin
      instr_t ins;
      exp_t e;
      int k;
      ins = '0;
      k = int'($urandom_range(0, 9));
      ins.all_arrays = (k != 9);
      ins.arr = arr_t'($urandom_range(0, NARR-1));
      ins.out = row_t'($urandom_range(0, ROWS-1));
      ins.in0 = row_t'($urandom_range(0, int'(ins.out)));
      ins.in1 = row_t'($urandom_range(0, ROWS-1));
      ins.in2 = row_t'($urandom_range(0, ROWS-1));
      ins.val = 1'($urandom);
      ins.func = func_t'($urandom_range(0, 5));
      ins.nin = 2'($urandom_range(1, 3));
      ins.no_preset = 1'($urandom);
      e = '{t: t0 + s + 2, kind: AC_NOP, row: int'(ins.out), lo: int'(ins.in0), in0: int'(ins.in0),
            all: ins.all_arrays, arr: int'(ins.arr), thr: 0, tgt: 1'b0, wd: '0};
      if (k < 5) begin
        ins.op = OP_GATE;
        if (!ins.no_preset) begin
          e.kind = AC_WRITE; e.wd = {COLS{tb_lut(int'(ins.func)).preset}};
          exp_q.push_back(e);
          e.t += TW; s += TW;
        end
        e.kind = AC_GATE; e.thr = int'(tb_lut(int'(ins.func)).thr); e.tgt = ~tb_lut(int'(ins.func)).preset;
        exp_q.push_back(e); s += 2 + TGA;
      end else if (k < 6) begin
        ins.op = OP_PRESET; e.kind = AC_WRITE; e.wd = {COLS{ins.val}}; exp_q.push_back(e); s += 2 + TW;
      end else if (k < 7) begin
        ins.op = OP_GANG; e.kind = AC_GANG; e.tgt = ins.val; exp_q.push_back(e); s += 2 + TG;
      end else if (k < 8) begin
        ins.op = OP_NOP; s += 3;
      end else begin
        ins.op = OP_READ; ins.all_arrays = 1'b0; e.all = 1'b0; e.kind = AC_READ;
        exp_q.push_back(e); s += 2 + TR;
        res_q.push_back(rd_fn(int'(ins.arr), int'(ins.out)));
      end
      prog[i] = ins;
    end
    prog[n] = '0; prog[n].op = OP_HALT;
    return t0 + s + 2;
  endfunction

  task automatic run(int n, logic stall_mode);
    int exp_done, t_start;
    @(negedge clk);
    exp_done = build(n, cyc + 1);
    check_timing = !stall_mode;
    start = 1'b1; start_pc = '0;
    @(negedge clk); start = 1'b0;
    t_start = cyc;
    stalls = 0;
    done_at = -1;
    while (done_at < 0) begin
      @(negedge clk);
      if (stall_mode && !inflight) res_full = ($urandom_range(0, 2) != 0);
    end
    res_full = 1'b0;
    checks++;
    if (done_at != exp_done + stalls) begin
      failures++; $display("done at %0d expected %0d (+%0d stalls)", done_at, exp_done, stalls);
    end
    checks++;
    if (exp_q.size() != 0 || res_q.size() != 0) begin failures++; $display("commands or results missing"); end
    if (stall_mode) begin
      checks++;
      if (stalls == 0) begin failures++; $display("no stall happened"); end
    end
    checks++;
    if (exc) begin failures++; $display("unexpected exception"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(120, 1'b0);
    run(120, 1'b1);

    // Exception: illegal opcode at address 3.
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin prog[i] = '0; prog[i].op = OP_NOP; end
    prog[3] = '0; prog[3].op = opcode_e'(4'd9);
    start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (30) @(negedge clk);
    checks++;
    if (!exc || exc_pc != AW'(3) || busy) begin failures++; $display("illegal opcode not trapped"); end

    // Exception: gate naming an invalid table entry at address 1.
    prog[1] = '0; prog[1].op = OP_GATE; prog[1].func = 4'd12; prog[1].nin = 2'd2;
    start = 1'b1; @(negedge clk); start = 1'b0;
    checks++;
    if (exc) begin failures++; $display("exception not cleared by start"); end
    repeat (30) @(negedge clk);
    checks++;
    if (!exc || exc_pc != AW'(1)) begin failures++; $display("invalid entry not trapped"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
