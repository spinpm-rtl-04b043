// spinpm_smc: SpinPM memory controller.
//
// Runs a program of micro-instructions held in the instruction cache against
// the array substrate. Each instruction is fetched (1 cycle, the cache read),
// decoded (1 cycle, including the look-up table access for gates) and then
// issued; the controller gives each operation a fixed budget of cycles that
// stands for the array operation time plus peripheral overhead, and fetches
// the next instruction only when that budget has elapsed.
//
//   OP_GATE    look up the preset value and V_gate level of `func`. Unless
//              no_preset is set, first preset the output row with a standard
//              write (T_WRITE cycles), then fire the gate (T_GATE cycles).
//              no_preset is for outputs preset ahead of time by a gang
//              preset, which hides the preset latency.
//   OP_PRESET  standard write of `val` into every column of row `out` (T_WRITE).
//   OP_GANG    gang preset of rows in0..out to `val` (T_GANG).
//   OP_READ    read row `out` of array `arr` and push it into the result
//              buffer (T_READ, at least 2). While the buffer is full the
//              controller stalls before issuing the read.
//   OP_NOP     one cycle (T_NOP).  OP_HALT: stop, pulse `done`.
//
// Cycles per instruction = 2 + budget(s), plus stall cycles. An undefined
// opcode, a gate naming an invalid table entry or with nin = 0, a row beyond
// ROWS or an array beyond N_ARRAYS is an exception: the controller stops,
// raises `exc` (held until the next start) and reports the instruction address
// in exc_pc. Event pulses (ev_*) report each preset, gang preset, gate, read
// and stall cycle for performance counting.
//
// From the document: the instruction cache, the per-operation cycle budget,
// decode through a look-up table that yields the preset and the gate voltage,
// preset before the gate, no table access for reads and writes, exceptions
// that stop sequencing. This design's choice: the budgets' values, the
// no_preset flag, the result buffer stall and the exception conditions.
module spinpm_smc
  import spinpm_pkg::*;
#(
  parameter int unsigned ROWS     = 2048,
  parameter int unsigned COLS     = 512,
  parameter int unsigned N_ARRAYS = 300,
  parameter int unsigned IC_DEPTH = 4096,
  parameter int unsigned T_WRITE  = 2,
  parameter int unsigned T_GANG   = 2,
  parameter int unsigned T_GATE   = 3,
  parameter int unsigned T_READ   = 2,
  parameter int unsigned T_NOP    = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // control
  input  logic                        start,
  input  logic [$clog2(IC_DEPTH)-1:0] start_pc,
  output logic                        busy,
  output logic                        done,
  output logic                        exc,
  output logic [$clog2(IC_DEPTH)-1:0] exc_pc,
  // instruction cache read port
  output logic                        ic_rd_en,
  output logic [$clog2(IC_DEPTH)-1:0] ic_rd_addr,
  input  instr_t                      ic_rd_data,
  // look-up table read port
  output func_t                       lut_idx,
  input  lut_entry_t                  lut_entry,
  // substrate
  output acmd_t                       acmd,
  output logic [COLS-1:0]             awdata,
  input  logic [COLS-1:0]             ardata,
  // result buffer
  output logic                        res_push,
  output logic [COLS-1:0]             res_data,
  input  logic                        res_full,
  // event pulses
  output logic                        ev_preset,
  output logic                        ev_gang,
  output logic                        ev_gate,
  output logic                        ev_read,
  output logic                        ev_stall
);

  localparam int unsigned PCW = $clog2(IC_DEPTH);

  initial begin
    assert (T_WRITE >= 1 && T_GANG >= 1 && T_GATE >= 1 && T_NOP >= 1)
      else $fatal(1, "cycle budgets must be at least 1");
    assert (T_READ >= 2) else $fatal(1, "T_READ must cover the array read latency");
  end

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_DECODE, S_PRESET, S_ISSUE, S_WAIT
  } state_e;

  state_e          state;
  logic [PCW-1:0]  pc;
  instr_t          ir;
  lut_entry_t      le;
  logic            in_preset;  // the running phase is the preset of a gate
  logic [15:0]     cnt;

  function automatic logic row_ok(input row_t r);
    return 32'(r) < ROWS;
  endfunction

  // Decode-time legality check.
  logic legal;
  always_comb begin
    legal = 1'b1;
    case (ic_rd_data.op)
      OP_NOP, OP_HALT: ;
      OP_PRESET: legal = row_ok(ic_rd_data.out);
      OP_GANG:   legal = row_ok(ic_rd_data.out) && row_ok(ic_rd_data.in0) &&
                         (ic_rd_data.in0 <= ic_rd_data.out);
      OP_GATE:   legal = lut_entry.valid && (ic_rd_data.nin != 2'd0) &&
                         row_ok(ic_rd_data.out) && row_ok(ic_rd_data.in0) &&
                         (ic_rd_data.nin < 2'd2 || row_ok(ic_rd_data.in1)) &&
                         (ic_rd_data.nin < 2'd3 || row_ok(ic_rd_data.in2));
      OP_READ:   legal = row_ok(ic_rd_data.out) && !ic_rd_data.all_arrays;
      default:   legal = 1'b0;
    endcase
    if (!ic_rd_data.all_arrays && 32'(ic_rd_data.arr) >= N_ARRAYS) legal = 1'b0;
  end

  assign lut_idx    = ic_rd_data.func;
  assign ic_rd_en   = (state == S_FETCH);
  assign ic_rd_addr = pc;
  assign busy       = (state != S_IDLE);

  // Budget of the phase being issued.
  function automatic logic [15:0] budget(input logic preset_phase, input opcode_e op);
    if (preset_phase) return 16'(T_WRITE);
    case (op)
      OP_PRESET: return 16'(T_WRITE);
      OP_GANG:   return 16'(T_GANG);
      OP_GATE:   return 16'(T_GATE);
      OP_READ:   return 16'(T_READ);
      default:   return 16'(T_NOP);
    endcase
  endfunction

  logic issue_cycle;   // S_PRESET or S_ISSUE actually issuing this cycle
  logic stall;
  assign stall       = (state == S_ISSUE) && (ir.op == OP_READ) && res_full;
  assign issue_cycle = (state == S_PRESET) || ((state == S_ISSUE) && !stall);

  // Command to the substrate, driven in the issue cycle only.
  always_comb begin
    acmd            = '0;
    acmd.kind       = AC_NOP;
    acmd.all_arrays = ir.all_arrays;
    acmd.arr        = ir.arr;
    acmd.row        = ir.out;
    acmd.lo         = ir.in0;
    acmd.in0        = ir.in0;
    acmd.in1        = ir.in1;
    acmd.in2        = ir.in2;
    acmd.nin        = ir.nin;
    acmd.thr        = le.thr;
    acmd.target     = ~le.preset;
    awdata          = {COLS{le.preset}};
    if (state == S_PRESET) begin
      acmd.kind = AC_WRITE;
    end else if (state == S_ISSUE && !stall) begin
      case (ir.op)
        OP_PRESET: begin acmd.kind = AC_WRITE; awdata = {COLS{ir.val}}; end
        OP_GANG:   begin acmd.kind = AC_GANG;  acmd.target = ir.val;    end
        OP_GATE:   acmd.kind = AC_GATE;
        OP_READ:   acmd.kind = AC_READ;
        default:   acmd.kind = AC_NOP;
      endcase
    end
  end

  // End of a phase: either in its issue cycle (budget 1) or at the last wait.
  logic phase_end;
  always_comb begin
    phase_end = 1'b0;
    if (issue_cycle && budget(state == S_PRESET, ir.op) == 16'd1) phase_end = 1'b1;
    if (state == S_WAIT && cnt == '0) phase_end = 1'b1;
  end

  assign res_push = phase_end && !in_preset && (state == S_WAIT) && (ir.op == OP_READ);
  assign res_data = ardata;

  assign ev_preset = (state == S_PRESET) || (state == S_ISSUE && ir.op == OP_PRESET);
  assign ev_gang   = (state == S_ISSUE) && (ir.op == OP_GANG);
  assign ev_gate   = (state == S_ISSUE) && (ir.op == OP_GATE);
  assign ev_read   = (state == S_ISSUE) && (ir.op == OP_READ) && !stall;
  assign ev_stall  = stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pc        <= '0;
      ir        <= '0;
      le        <= '0;
      in_preset <= 1'b0;
      cnt       <= '0;
      done      <= 1'b0;
      exc       <= 1'b0;
      exc_pc    <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            pc    <= start_pc;
            exc   <= 1'b0;
            state <= S_FETCH;
          end
        end
        S_FETCH: state <= S_DECODE;
        S_DECODE: begin
          ir <= ic_rd_data;
          le <= lut_entry;
          if (!legal) begin
            exc    <= 1'b1;
            exc_pc <= pc;
            state  <= S_IDLE;
          end else if (ic_rd_data.op == OP_HALT) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (ic_rd_data.op == OP_GATE && !ic_rd_data.no_preset) begin
            in_preset <= 1'b1;
            state     <= S_PRESET;
          end else begin
            in_preset <= 1'b0;
            state     <= S_ISSUE;
          end
        end
        S_PRESET, S_ISSUE: begin
          if (issue_cycle) begin
            if (!phase_end) begin
              cnt   <= budget(state == S_PRESET, ir.op) - 16'd2;
              state <= S_WAIT;
            end
          end
        end
        S_WAIT: begin
          if (cnt != '0) cnt <= cnt - 16'd1;
        end
        default: state <= S_IDLE;
      endcase
      // Completion of a phase.
      if (phase_end) begin
        if (in_preset) begin
          in_preset <= 1'b0;
          state     <= S_ISSUE;
        end else begin
          pc    <= pc + 1'b1;
          state <= S_FETCH;
        end
      end
    end
  end

  // The controller never pushes into a full buffer: reads stall before issue.
  assert property (@(posedge clk) disable iff (!rst_n) res_push |-> !res_full)
    else $error("result pushed while the buffer is full");

endmodule
