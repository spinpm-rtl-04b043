// tb_spinpm_top: end-to-end test of the SpinPM coprocessor on DNA sequence
// pre-alignment, at reduced size (3 arrays of 256 rows x 16 columns).
//
// Every column of every array gets its own reference fragment of L+S bases
// and a pattern of L bases (a copy of part of the fragment with random
// mutations), written through the memory port. The program from
// spinpm_codegen_pkg computes, in every column at once, the similarity score
// (number of equal bases) of the pattern at each of the S+1 alignments and
// reads the scores out. The testbench counts equal bases itself and checks
// every score, the exact cycle count (the per-operation budgets plus the
// cycles stalled on a full result buffer), and that the gang-preset schedule
// is faster than presetting every gate output separately.
//
// It also reprograms the gate look-up table and checks that the same gate
// micro-instruction then computes another function, checks that an illegal
// instruction raises an exception, and that memory-port requests are refused
// while a program runs. Each mechanism (standard preset, gang preset, gate
// without preset, read, stall, refused host access, reconfiguration,
// exception) is counted and must happen at least once.
module tb_spinpm_top;
  import spinpm_pkg::*;
  import spinpm_codegen_pkg::*;

  localparam int unsigned N_ARRAYS = 3;
  localparam int unsigned ROWS     = 256;
  localparam int unsigned COLS     = 16;
  localparam int unsigned IC_DEPTH = 1024;
  localparam int unsigned RES_DEPTH = 4;
  localparam int unsigned T_WRITE = 2, T_GANG = 2, T_GATE = 3, T_READ = 2;
  localparam int unsigned L = 8;   // pattern length in bases
  localparam int unsigned S = 2;   // extra reference bases: S+1 alignments
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

  spinpm_top #(
    .N_ARRAYS(N_ARRAYS), .ROWS(ROWS), .COLS(COLS), .IC_DEPTH(IC_DEPTH), .RES_DEPTH(RES_DEPTH),
    .T_WRITE(T_WRITE), .T_GANG(T_GANG), .T_GATE(T_GATE), .T_READ(T_READ)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_preset = 0, n_gang = 0, n_gate = 0, n_read = 0, n_stall = 0;
  int n_gate_nopre = 0, n_refused = 0, n_reconf = 0, n_exc = 0;
  always @(posedge clk) begin
    if (ev_preset) n_preset++;
    if (ev_gang)   n_gang++;
    if (ev_gate)   n_gate++;
    if (ev_read)   n_read++;
    if (ev_stall)  n_stall++;
  end

  initial begin
    repeat (400000) @(posedge clk);
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
      res_pop = res_valid && ($urandom_range(0, 7) == 0);
      if (res_pop) rows_out.push_back(res_data);
      if (done) took = cyc - t0;
      @(negedge clk);
    end
    if (done) took = cyc - t0;
    res_pop = 1'b0;
    stalls = n_stall - st0;
  endtask

  // ------------------------------------------------------------- test data
  int ref_base [N_ARRAYS][COLS][L+S];
  int pat_base [N_ARRAYS][COLS][L];

  function automatic int expected_score(int a, int c, int loc);
    int n = 0;
    for (int j = 0; j < int'(L); j++) if (ref_base[a][c][loc + j] == pat_base[a][c][j]) n++;
    return n;
  endfunction

  task automatic write_data(pm_codegen cg);
    for (int a = 0; a < int'(N_ARRAYS); a++) begin
      for (int c = 0; c < int'(COLS); c++) begin
        int off = int'($urandom_range(0, S));
        for (int j = 0; j < int'(L + S); j++) ref_base[a][c][j] = int'($urandom_range(0, 3));
        for (int j = 0; j < int'(L); j++)
          pat_base[a][c][j] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 3))
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
    pm_codegen cg_naive, cg_opt;
    logic [COLS-1:0] rows_q[$];
    logic [COLS-1:0] d, r0;
    longint t_naive, t_opt;
    int stalls;
    instr_t p[$];
    instr_t g;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    cg_naive = new(ROWS, N_ARRAYS, L, S, 1'b0, T_WRITE, T_GANG, T_GATE, T_READ);
    cg_opt   = new(ROWS, N_ARRAYS, L, S, 1'b1, T_WRITE, T_GANG, T_GATE, T_READ);
    cg_naive.build();
    cg_opt.build();
    $display("program: %0d instructions, %0d rows used, score width %0d",
             cg_naive.prog.size(), cg_naive.max_row_used, cg_naive.score_width);

    write_data(cg_naive);
    // Memory mode: the data reads back.
    for (int a = 0; a < int'(N_ARRAYS); a++) begin
      mem_read(a, cg_naive.pat_row(0, 0), d);
      for (int c = 0; c < int'(COLS); c++) r0[c] = 1'(pat_base[a][c][0]);
      checks++;
      if (d !== r0) begin failures++; $display("memory-mode read of array %0d wrong", a); end
    end

    // Naive schedule: every output preset by a standard write.
    load(cg_naive.prog);
    run(rows_q, t_naive, stalls);
    check_scores(cg_naive, rows_q, "naive");
    checks++;
    if (t_naive != cg_naive.cycles + stalls) begin
      failures++; $display("naive: %0d cycles, expected %0d + %0d stalls", t_naive, cg_naive.cycles, stalls);
    end

    // The refused write must not have reached row 0 of array 0.
    mem_read(0, 0, d);
    for (int c = 0; c < int'(COLS); c++) r0[c] = 1'(ref_base[0][c][0]);
    checks++;
    if (d !== r0) begin failures++; $display("host write while busy was not refused"); end

    // Optimized schedule: gang presets, gates without preset.
    load(cg_opt.prog);
    begin
      int g0 = n_gate;
      int p0 = n_preset;
      run(rows_q, t_opt, stalls);
      n_gate_nopre = (n_gate - g0) - (n_preset - p0);
    end
    check_scores(cg_opt, rows_q, "optimized");
    checks++;
    if (t_opt != cg_opt.cycles + stalls) begin
      failures++; $display("optimized: %0d cycles, expected %0d + %0d stalls", t_opt, cg_opt.cycles, stalls);
    end
    checks++;
    if (t_opt >= t_naive) begin failures++; $display("gang presets did not save time"); end
    $display("cycles: naive %0d, optimized %0d", t_naive, t_opt);

    // Reconfiguration: entry 12 first as NAND, then as NOR (only V_gate changes).
    for (int k = 0; k < 2; k++) begin
      logic [COLS-1:0] a0, b0, exp;
      @(negedge clk);
      lut_we = 1'b1; lut_idx = 4'd12; lut_wdata = '{valid: 1'b1, preset: 1'b0, thr: (k == 0) ? 2'd1 : 2'd0};
      @(negedge clk);
      lut_we = 1'b0;
      n_reconf++;
      p.delete();
      g = '0; g.op = OP_GATE; g.func = 4'd12; g.nin = 2'd2; g.all_arrays = 1'b1;
      g.out = row_t'(ROWS - 1); g.in0 = row_t'(cg_naive.ref_row(0, 0)); g.in1 = row_t'(cg_naive.pat_row(0, 0));
      p.push_back(g);
      g = '0; g.op = OP_READ; g.arr = arr_t'(N_ARRAYS - 1); g.out = row_t'(ROWS - 1); p.push_back(g);
      g = '0; g.op = OP_HALT; p.push_back(g);
      load(p);
      run(rows_q, t_opt, stalls);
      mem_read(N_ARRAYS - 1, cg_naive.ref_row(0, 0), a0);
      mem_read(N_ARRAYS - 1, cg_naive.pat_row(0, 0), b0);
      exp = (k == 0) ? ~(a0 & b0) : ~(a0 | b0);
      checks++;
      if (rows_q.size() != 1 || rows_q[0] !== exp) begin
        failures++; $display("reconfigured gate %0d wrong", k);
      end
    end

    // Exception: illegal opcode at address 1.
    p.delete();
    g = '0; g.op = OP_NOP; p.push_back(g);
    g = '0; g.op = opcode_e'(4'd7); p.push_back(g);
    g = '0; g.op = OP_HALT; p.push_back(g);
    load(p);
    run(rows_q, t_opt, stalls);
    checks++;
    if (exc && exc_pc == PCW'(1)) n_exc++;
    else begin failures++; $display("illegal instruction not trapped"); end

    $display("mechanisms: standard presets %0d, gang presets %0d, gates %0d (without preset %0d), reads %0d, stalls %0d, refused host accesses %0d, reconfigurations %0d, exceptions %0d",
             n_preset, n_gang, n_gate, n_gate_nopre, n_read, n_stall, n_refused, n_reconf, n_exc);
    if (n_preset == 0 || n_gang == 0 || n_gate == 0 || n_gate_nopre == 0 || n_read == 0 ||
        n_stall == 0 || n_refused == 0 || n_reconf == 0 || n_exc == 0) begin
      failures++; $display("a mechanism never happened");
    end
    checks++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
