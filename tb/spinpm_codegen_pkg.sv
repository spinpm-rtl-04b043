// spinpm_codegen_pkg: code generation for DNA sequence pre-alignment on
// SpinPM, used by the end-to-end testbenches.
//
// It plays the role of the software stack: it turns the pattern-matching
// steps into micro-instructions and computes the expected results by itself.
//
// Data layout in every column of every array (one bit per row, rows counted
// from 0):
//   reference fragment  rows 0 .. 2*(L+S)-1   character j in rows 2j, 2j+1
//   pattern             rows 2*(L+S) .. 2*(L+S)+2L-1
//   scratch             the rest; gate outputs with preset 0 are allocated
//                       upward from the bottom of the scratch area, outputs
//                       with preset 1 downward from the last row.
// Each DNA base is coded in two bits. For each of the S+1 alignments
// (locations) of the pattern against the fragment the program
//   1. XORs the two bit pairs of every character (OR, NAND, AND gates),
//   2. NORs the two XOR results into the match-string bit of that character
//      (1 = characters equal),
//   3. adds up the match string with a reduction tree of adders built from
//      threshold gates (half adder: XOR and AND; full adder: carry = MAJ3,
//      sum = MAJ3(OR3, inverted MAJ3, AND3)), giving the similarity score,
//   4. reads the score rows of every array into the result buffer.
// Scratch is reused from one location to the next. Two preset schedules:
//   naive      every gate has its output preset by a standard write just
//              before it fires (the controller does this)
//   optimized  before a location's gates run, two gang presets set the whole
//              preset-0 and preset-1 scratch ranges, and the gates are marked
//              no_preset; same gates, fewer cycles.
package spinpm_codegen_pkg;
  import spinpm_pkg::*;

  class pm_codegen;
    int unsigned rows, n_arrays, L, S;
    bit          opt;
    int unsigned t_write, t_gang, t_gate, t_read;
    instr_t      prog[$];
    int          score_rows[$];     // rows of the score bits, LSB first (last location)
    int          score_width;
    int unsigned max_row_used;
    longint      cycles;            // expected cycles from start to done, without stalls
    int unsigned n_reads;

    // Gates of the location being built, before the presets are placed.
    instr_t      body[$];
    int unsigned p0, p1, scr0;

    function new(int unsigned rows, int unsigned n_arrays, int unsigned L, int unsigned S, bit opt,
                 int unsigned t_write, int unsigned t_gang, int unsigned t_gate, int unsigned t_read);
      this.rows = rows; this.n_arrays = n_arrays; this.L = L; this.S = S; this.opt = opt;
      this.t_write = t_write; this.t_gang = t_gang; this.t_gate = t_gate; this.t_read = t_read;
      scr0 = 2 * (L + S) + 2 * L;
      max_row_used = 0;
      cycles = 0;
      n_reads = 0;
    endfunction

    function int ref_row(int ch, int b); return 2 * ch + b; endfunction
    function int pat_row(int ch, int b); return 2 * (L + S) + 2 * ch + b; endfunction

    function void emit(instr_t i);
      prog.push_back(i);
      cycles += 2;
      case (i.op)
        OP_GATE:   cycles += (i.no_preset ? 0 : t_write) + t_gate;
        OP_PRESET: cycles += t_write;
        OP_GANG:   cycles += t_gang;
        OP_READ:   begin cycles += t_read; n_reads++; end
        default:   cycles += 1;
      endcase
    endfunction

    // One gate; returns its output row.
    function int gate(func_t f, int n, int a, int b = 0, int c = 0);
      instr_t i;
      int o;
      lut_entry_t e = default_lut(f);
      if (e.preset) begin o = int'(p1); p1--; end
      else begin o = int'(p0); p0++; end
      if (p0 > p1 + 1) $fatal(1, "scratch area exhausted");
      i = '0;
      i.op = OP_GATE; i.func = f; i.nin = 2'(n); i.no_preset = opt; i.all_arrays = 1'b1;
      i.out = row_t'(o); i.in0 = row_t'(a); i.in1 = row_t'(b); i.in2 = row_t'(c);
      body.push_back(i);
      return o;
    endfunction

    function int xor2(int a, int b);
      int t1 = gate(F_OR, 2, a, b);
      int t2 = gate(F_NAND, 2, a, b);
      return gate(F_AND, 2, t1, t2);
    endfunction

    // a + b, operands as row lists LSB first.
    function void add(int a[$], int b[$], ref int s[$]);
      int carry = -1;
      int w = (a.size() > b.size()) ? a.size() : b.size();
      s.delete();
      for (int k = 0; k < w; k++) begin
        int x[$];
        if (k < a.size()) x.push_back(a[k]);
        if (k < b.size()) x.push_back(b[k]);
        if (carry >= 0) x.push_back(carry);
        if (x.size() == 1) begin s.push_back(x[0]); carry = -1; end
        else if (x.size() == 2) begin
          s.push_back(xor2(x[0], x[1]));
          carry = gate(F_AND, 2, x[0], x[1]);
        end else begin
          int co = gate(F_MAJ3, 3, x[0], x[1], x[2]);
          int cb = gate(F_MIN3, 3, x[0], x[1], x[2]);
          int o3 = gate(F_OR, 3, x[0], x[1], x[2]);
          int a3 = gate(F_AND3, 3, x[0], x[1], x[2]);
          s.push_back(gate(F_MAJ3, 3, o3, cb, a3));
          carry = co;
        end
      end
      if (carry >= 0) s.push_back(carry);
    endfunction

    // Generate the whole program: every location, reads of every array.
    function void build();
      prog.delete();
      for (int loc = 0; loc <= int'(S); loc++) begin
        int nums[$][$];
        instr_t g;
        body.delete();
        p0 = scr0; p1 = rows - 1;
        for (int j = 0; j < int'(L); j++) begin
          int x0 = xor2(ref_row(loc + j, 0), pat_row(j, 0));
          int x1 = xor2(ref_row(loc + j, 1), pat_row(j, 1));
          int q[$];
          q.push_back(gate(F_NOR, 2, x0, x1));
          nums.push_back(q);
        end
        while (nums.size() > 1) begin
          int nxt[$][$];
          for (int k = 0; k + 1 < nums.size(); k += 2) begin
            int s[$];
            add(nums[k], nums[k + 1], s);
            nxt.push_back(s);
          end
          if (nums.size() % 2 == 1) nxt.push_back(nums[nums.size() - 1]);
          nums = nxt;
        end
        score_rows = nums[0];
        score_width = score_rows.size();
        max_row_used = (scr0 + (rows - 1 - p1) + (p0 - scr0) > max_row_used) ?
                       scr0 + (rows - 1 - p1) + (p0 - scr0) : max_row_used;
        if (opt) begin
          if (p0 > scr0) begin
            g = '0; g.op = OP_GANG; g.all_arrays = 1'b1; g.val = 1'b0;
            g.in0 = row_t'(scr0); g.out = row_t'(p0 - 1); emit(g);
          end
          if (p1 < rows - 1) begin
            g = '0; g.op = OP_GANG; g.all_arrays = 1'b1; g.val = 1'b1;
            g.in0 = row_t'(p1 + 1); g.out = row_t'(rows - 1); emit(g);
          end
        end
        foreach (body[k]) emit(body[k]);
        for (int a = 0; a < int'(n_arrays); a++)
          for (int b = 0; b < score_width; b++) begin
            g = '0; g.op = OP_READ; g.arr = arr_t'(a); g.out = row_t'(score_rows[b]); emit(g);
          end
      end
      begin
        instr_t h;
        h = '0; h.op = OP_HALT;
        prog.push_back(h);
        cycles += 2;
      end
    endfunction
  endclass

endpackage
