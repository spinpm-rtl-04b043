// tb_spinpm_top_full: one complete DNA pre-alignment run on the coprocessor at
// its full default size (300 arrays of 2048 rows x 512 columns, 100-base
// patterns), with the gang-preset schedule.
//
// The host writes a 100-base reference fragment and a 100-base pattern (a
// mutated copy of the fragment) into every one of the 153,600 columns through
// the memory port, loads the program made by spinpm_codegen_pkg, runs it and
// reads the 7-bit similarity score of every column out of the result buffer.
// Every score is compared with a count of equal bases made by the
// testbench, and the run time with the cycle budgets of the program.
module tb_spinpm_top_full;
  import spinpm_pkg::*;
  import spinpm_codegen_pkg::*;

  // Default sizes of spinpm_top (the top is instantiated without overrides).
  localparam int unsigned N_ARRAYS = 300;
  localparam int unsigned ROWS     = 2048;
  localparam int unsigned COLS     = 512;
  localparam int unsigned IC_DEPTH = 4096;
  localparam int unsigned T_WRITE = 2, T_GANG = 2, T_GATE = 3, T_READ = 2;
  localparam int unsigned L = 100; // pattern length in bases
  localparam int unsigned S = 0;   // one alignment per column
  localparam int unsigned PCW = $clog2(IC_DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic ic_we = 1'b0; logic [PCW-1:0] ic_addr = '0; instr_t ic_wdata = '0;
  logic lut_we = 1'b0; func_t lut_idx = '0; lut_entry_t lut_wdata = '0;
  logic mem_req = 1'b0, mem_we = 1'b0; arr_t mem_arr = '0; row_t mem_row = '0;
  logic [COLS-1:0] mem_wdata = '0, mem_rdata;
  logic mem_ready, mem_rvalid;
  logic start = 1'b0; logic [PCW-1:0] start_pc = '0;
  logic busy, done, exc; logic [PCW-1:0] exc_pc;
  logic res_valid, res_pop = 1'b0; logic [COLS-1:0] res_data;
  logic ev_preset, ev_gang, ev_gate, ev_read, ev_stall;

  spinpm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_preset = 0, n_gang = 0, n_gate = 0, n_read = 0, n_stall = 0;
  int n_refused = 0;
  always @(posedge clk) begin
    if (ev_preset) n_preset++;
    if (ev_gang)   n_gang++;
    if (ev_gate)   n_gate++;
    if (ev_read)   n_read++;
    if (ev_stall)  n_stall++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- host side
  task automatic mem_write(int a, int r, logic [COLS-1:0] d);
    @(negedge clk);
    mem_req = 1'b1; mem_we = 1'b1; mem_arr = arr_t'(a); mem_row = row_t'(r); mem_wdata = d;
    @(negedge clk);
    mem_req = 1'b0; mem_we = 1'b0;
  endtask

  task automatic mem_read(int a, int r, output logic [COLS-1:0] d);
    @(negedge clk);
    mem_req = 1'b1; mem_we = 1'b0; mem_arr = arr_t'(a); mem_row = row_t'(r);
    @(negedge clk);
    mem_req = 1'b0;
    if (!mem_rvalid) begin failures++; $display("read data not valid"); end
    d = mem_rdata;
  endtask

  task automatic load(input instr_t p[$]);
    foreach (p[i]) begin
      @(negedge clk);
      ic_we = 1'b1; ic_addr = PCW'(i); ic_wdata = p[i];
    end
    @(negedge clk);
    ic_we = 1'b0;
  endtask

  // Start the loaded program, pop results (slowly, so the buffer fills),
  // try a memory write while busy; return the rows and the cycles to done.
  task automatic run(output logic [COLS-1:0] rows_out[$], output longint took, output int stalls);
    longint t0;
    int st0;
    rows_out.delete();
    @(negedge clk);
    start = 1'b1;
    st0 = n_stall;
    t0 = cyc + 1;
    @(negedge clk);
    start = 1'b0;
    // A host write while the controller owns the arrays must be refused.
    mem_req = 1'b1; mem_we = 1'b1; mem_arr = '0; mem_row = '0; mem_wdata = '1;
    if (!mem_ready) n_refused++;
    @(negedge clk);
    mem_req = 1'b0; mem_we = 1'b0;
    took = -1;
    while (busy || res_valid) begin
      res_pop = res_valid;
      if (res_pop) rows_out.push_back(res_data);
      if (done) took = cyc - t0;
      @(negedge clk);
    end
    if (done) took = cyc - t0;
    res_pop = 1'b0;
    stalls = n_stall - st0;
  endtask

  // ------------------------------------------------------------- test data
  byte ref_base [N_ARRAYS][COLS][L+S];
  byte pat_base [N_ARRAYS][COLS][L];

  function automatic int expected_score(int a, int c, int loc);
    int n = 0;
    for (int j = 0; j < int'(L); j++) if (ref_base[a][c][loc + j] == pat_base[a][c][j]) n++;
    return n;
  endfunction

  task automatic write_data(pm_codegen cg);
    for (int a = 0; a < int'(N_ARRAYS); a++) begin
      for (int c = 0; c < int'(COLS); c++) begin
        int off = int'($urandom_range(0, S));
        for (int j = 0; j < int'(L + S); j++) ref_base[a][c][j] = byte'($urandom_range(0, 3));
        for (int j = 0; j < int'(L); j++)
          pat_base[a][c][j] = ($urandom_range(0, 3) == 0) ? byte'($urandom_range(0, 3))
                                                         : ref_base[a][c][off + j];
      end
      for (int j = 0; j < int'(L + S); j++)
        for (int b = 0; b < 2; b++) begin
          logic [COLS-1:0] d;
          for (int c = 0; c < int'(COLS); c++) d[c] = 1'(ref_base[a][c][j] >> b);
          mem_write(a, cg.ref_row(j, b), d);
        end
      for (int j = 0; j < int'(L); j++)
        for (int b = 0; b < 2; b++) begin
          logic [COLS-1:0] d;
          for (int c = 0; c < int'(COLS); c++) d[c] = 1'(pat_base[a][c][j] >> b);
          mem_write(a, cg.pat_row(j, b), d);
        end
    end
  endtask

  task automatic check_scores(pm_codegen cg, logic [COLS-1:0] rows_in[$], string tag);
    int k = 0;
    checks++;
    if (rows_in.size() != int'((S + 1) * N_ARRAYS) * cg.score_width) begin
      failures++; $display("%s: %0d result rows", tag, rows_in.size()); return;
    end
    for (int loc = 0; loc <= int'(S); loc++)
      for (int a = 0; a < int'(N_ARRAYS); a++) begin
        int got [COLS];
        for (int c = 0; c < int'(COLS); c++) got[c] = 0;
        for (int b = 0; b < cg.score_width; b++) begin
          for (int c = 0; c < int'(COLS); c++) got[c] += int'(rows_in[k][c]) << b;
          k++;
        end
        for (int c = 0; c < int'(COLS); c++) begin
          checks++;
          if (got[c] != expected_score(a, c, loc)) begin
            failures++;
            $display("%s: array %0d column %0d location %0d score %0d expected %0d",
                     tag, a, c, loc, got[c], expected_score(a, c, loc));
          end
        end
      end
  endtask

  // ------------------------------------------------------------- main
  initial begin
    pm_codegen cg;
    logic [COLS-1:0] rows_q[$];
    longint t_run;
    int stalls;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    cg = new(ROWS, N_ARRAYS, L, S, 1'b1, T_WRITE, T_GANG, T_GATE, T_READ);
    cg.build();
    $display("program: %0d instructions, %0d rows used, score width %0d",
             cg.prog.size(), cg.max_row_used, cg.score_width);
    checks++;
    if (cg.prog.size() > IC_DEPTH || cg.max_row_used > ROWS) begin
      failures++; $display("program does not fit");
    end

    write_data(cg);
    load(cg.prog);
    run(rows_q, t_run, stalls);
    check_scores(cg, rows_q, "full size");
    checks++;
    if (t_run != cg.cycles + stalls) begin
      failures++; $display("%0d cycles, expected %0d + %0d stalls", t_run, cg.cycles, stalls);
    end
    $display("cycles: %0d; gang presets %0d, gates %0d, reads %0d, standard presets %0d",
             t_run, n_gang, n_gate, n_read, n_preset);
    checks++;
    if (n_gang == 0 || n_gate == 0 || n_read == 0) begin failures++; $display("a mechanism never happened"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
