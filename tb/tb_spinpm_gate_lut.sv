// tb_spinpm_gate_lut: self-checking test of the gate look-up table.
//
// After reset every entry must hold the default gate set; the testbench
// checks each one against the truth table the entry should produce when
// evaluated as a threshold gate (output = ~preset when at most thr inputs are
// 1, else preset) for the number of inputs of that gate. It then
// reprograms entries (NOR into NAND by changing only V_gate, plus random
// contents), checks the write takes effect the next cycle and that an
// out-of-range index reads as invalid.
module tb_spinpm_gate_lut;
  import spinpm_pkg::*;

  localparam int unsigned ENTRIES = 16;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       wr_en = 1'b0;
  func_t      wr_idx = '0;
  lut_entry_t wr_entry = '0;
  func_t      rd_idx = '0;
  lut_entry_t rd_entry;

  int checks = 0, failures = 0;
  lut_entry_t model [ENTRIES];

  spinpm_gate_lut #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic eval(lut_entry_t e, int n, logic [2:0] in);
    int k = 0;
    for (int i = 0; i < n; i++) k += int'(in[i]);
    return (k <= int'(e.thr)) ? ~e.preset : e.preset;
  endfunction

  // Expected gate function of the default entries.
  function automatic logic ref_fn(int f, logic [2:0] in, output int n);
    logic a = in[0], b = in[1], c = in[2];
    case (f)
      0: begin n = 2; return ~(a | b); end
      1: begin n = 2; return ~(a & b); end
      2: begin n = 2; return a | b; end
      3: begin n = 2; return a & b; end
      4: begin n = 3; return (a & b) | (a & c) | (b & c); end
      5: begin n = 3; return ~((a & b) | (a & c) | (b & c)); end
      6: begin n = 1; return ~a; end
      7: begin n = 1; return a; end
      8: begin n = 3; return a & b & c; end
      9: begin n = 3; return ~(a & b & c); end
      default: begin n = 0; return 1'b0; end
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < ENTRIES; f++) begin
      rd_idx = func_t'(f);
      #1;
      checks++;
      if (f <= 9) begin
        if (!rd_entry.valid) begin failures++; $display("entry %0d invalid", f); end
        for (int v = 0; v < 8; v++) begin
          int n; logic exp;
          exp = ref_fn(f, 3'(v), n);
          if (v < (1 << n)) begin
            checks++;
            if (eval(rd_entry, n, 3'(v)) !== exp) begin
              failures++; $display("entry %0d inputs %b wrong", f, 3'(v));
            end
          end
        end
      end else if (rd_entry.valid) begin
        failures++; $display("entry %0d should be invalid", f);
      end
      model[f] = rd_entry;
    end

    // Reconfigure NOR (entry 0) into NAND by raising only V_gate.
    @(negedge clk); wr_en = 1'b1; wr_idx = F_NOR; wr_entry = '{valid: 1'b1, preset: 1'b0, thr: 2'd1};
    rd_idx = F_NOR; #1;
    checks++;
    if (rd_entry.thr !== 2'd0) begin failures++; $display("write visible too early"); end
    @(negedge clk); wr_en = 1'b0; model[0] = '{valid: 1'b1, preset: 1'b0, thr: 2'd1};
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (eval(rd_entry, 2, 3'(v)) !== ~(v[0] & v[1])) begin failures++; $display("reconfigured NAND wrong"); end
    end

    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_en = 1'($urandom); wr_idx = func_t'($urandom); wr_entry = lut_entry_t'($urandom);
      rd_idx = func_t'($urandom);
      #1;
      checks++;
      if (rd_entry !== model[rd_idx]) begin failures++; $display("entry %0d mismatch", rd_idx); end
      @(posedge clk);
      if (wr_en) model[wr_idx] = wr_entry;
    end
    @(negedge clk); wr_en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
