// tb_spinpm_pool: a pool of patterns matched against a reference with the two
// pattern placements the SpinPM evaluation compares, on a small coprocessor
// (2 arrays of 256 rows x 16 columns, 8-base patterns).
//
// The reference is cut into consecutive 8-base fragments, one per column.
// Each pattern of the pool is a mutated copy of one fragment.
//   naive     one pattern at a time is copied into every column of every
//             array; one pass per pattern. The column with the highest
//             score must be the pattern's fragment of origin.
//   directed  every pattern goes only to the column holding its fragment of
//             origin (the placement an ideal scheduler would choose), so the
//             whole pool runs in one pass.
// Both use the same program (gang-preset schedule), generated once. Every
// score is checked against a count of equal bases, and the directed
// placement must finish the pool in fewer cycles than the naive one.
module tb_spinpm_pool;
  import spinpm_pkg::*;
  import spinpm_codegen_pkg::*;

  localparam int unsigned N_ARRAYS = 2;
  localparam int unsigned ROWS     = 256;
  localparam int unsigned COLS     = 16;
  localparam int unsigned IC_DEPTH = 1024;
  localparam int unsigned RES_DEPTH = 4;
  localparam int unsigned T_WRITE = 2, T_GANG = 2, T_GATE = 3, T_READ = 2;
  localparam int unsigned L = 8;
  localparam int unsigned S = 0;
  localparam int unsigned P = 5;   // patterns in the pool
  localparam int unsigned NCOL = N_ARRAYS * COLS;
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
  int n_refused = 0;
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

  // ------------------------------------------------------------- data
  int refseq [NCOL][L];       // fragment of each column (array-major)
  int pool   [P][L];
  int origin [P];

  function automatic int score_of(int col, int p);
    int n = 0;
    for (int j = 0; j < int'(L); j++) if (refseq[col][j] == pool[p][j]) n++;
    return n;
  endfunction

  task automatic write_ref(pm_codegen cg);
    for (int a = 0; a < int'(N_ARRAYS); a++)
      for (int j = 0; j < int'(L); j++)
        for (int b = 0; b < 2; b++) begin
          logic [COLS-1:0] d;
          for (int c = 0; c < int'(COLS); c++) d[c] = 1'(refseq[a * COLS + c][j] >> b);
          mem_write(a, cg.ref_row(j, b), d);
        end
  endtask

  // pat_of[col] = pattern index placed in that column.
  task automatic write_patterns(pm_codegen cg, int pat_of[NCOL]);
    for (int a = 0; a < int'(N_ARRAYS); a++)
      for (int j = 0; j < int'(L); j++)
        for (int b = 0; b < 2; b++) begin
          logic [COLS-1:0] d;
          for (int c = 0; c < int'(COLS); c++) d[c] = 1'(pool[pat_of[a * COLS + c]][j] >> b);
          mem_write(a, cg.pat_row(j, b), d);
        end
  endtask

  // Scores of every column from the rows of one pass.
  task automatic scores(pm_codegen cg, logic [COLS-1:0] rows_in[$], output int sc[NCOL]);
    int k = 0;
    for (int col = 0; col < int'(NCOL); col++) sc[col] = 0;
    checks++;
    if (rows_in.size() != int'(N_ARRAYS) * cg.score_width) begin
      failures++; $display("%0d result rows", rows_in.size()); return;
    end
    for (int a = 0; a < int'(N_ARRAYS); a++)
      for (int b = 0; b < cg.score_width; b++) begin
        for (int c = 0; c < int'(COLS); c++) sc[a * COLS + c] += int'(rows_in[k][c]) << b;
        k++;
      end
  endtask

  initial begin
    pm_codegen cg;
    logic [COLS-1:0] rows_q[$];
    longint took, t_naive = 0, t_directed = 0;
    int stalls, passes_naive = 0, passes_directed = 0;
    int pat_of [NCOL];
    int sc [NCOL];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cg = new(ROWS, N_ARRAYS, L, S, 1'b1, T_WRITE, T_GANG, T_GATE, T_READ);
    cg.build();
    load(cg.prog);

    for (int col = 0; col < int'(NCOL); col++)
      for (int j = 0; j < int'(L); j++) refseq[col][j] = int'($urandom_range(0, 3));
    for (int p = 0; p < int'(P); p++) begin
      origin[p] = (p * 7 + 3) % int'(NCOL);   // distinct columns
      for (int j = 0; j < int'(L); j++) pool[p][j] = refseq[origin[p]][j];
      pool[p][int'($urandom_range(0, L - 1))] = int'($urandom_range(0, 3));  // one mutation at most
    end
    write_ref(cg);

    // Naive placement: one pattern everywhere, one pass per pattern.
    for (int p = 0; p < int'(P); p++) begin
      int best = 0;
      for (int col = 0; col < int'(NCOL); col++) pat_of[col] = p;
      write_patterns(cg, pat_of);
      run(rows_q, took, stalls);
      t_naive += took;
      passes_naive++;
      scores(cg, rows_q, sc);
      for (int col = 0; col < int'(NCOL); col++) begin
        checks++;
        if (sc[col] != score_of(col, p)) begin
          failures++; $display("naive: pattern %0d column %0d score %0d expected %0d", p, col, sc[col], score_of(col, p));
        end
        if (sc[col] > sc[best]) best = col;
      end
      checks++;
      if (sc[best] != sc[origin[p]] || sc[origin[p]] < int'(L) - 1) begin
        failures++; $display("naive: pattern %0d best column %0d, origin %0d", p, best, origin[p]);
      end
    end

    // Directed placement: each pattern only at its origin, the pool in one pass.
    for (int col = 0; col < int'(NCOL); col++) pat_of[col] = 0;
    for (int p = 0; p < int'(P); p++) pat_of[origin[p]] = p;
    write_patterns(cg, pat_of);
    run(rows_q, took, stalls);
    t_directed += took;
    passes_directed++;
    scores(cg, rows_q, sc);
    for (int p = 0; p < int'(P); p++) begin
      checks++;
      if (sc[origin[p]] != score_of(origin[p], p)) begin
        failures++; $display("directed: pattern %0d score %0d expected %0d", p, sc[origin[p]], score_of(origin[p], p));
      end
    end
    checks++;
    if (!(t_directed < t_naive)) begin failures++; $display("directed placement not faster"); end
    $display("pool of %0d patterns: naive %0d passes %0d cycles, directed %0d pass %0d cycles",
             P, passes_naive, t_naive, passes_directed, t_directed);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
