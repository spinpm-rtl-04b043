// tb_spinpm_icache: self-checking test of the micro-instruction store.
//
// Loads random micro-instructions at random addresses, fetches them back and
// checks each against a copy kept in the testbench, including the one-cycle
// read latency, simultaneous load and fetch, and that the output holds while
// no fetch is requested.
module tb_spinpm_icache;
  import spinpm_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  instr_t        wr_data = '0;
  logic          rd_en = 1'b0;
  logic [AW-1:0] rd_addr = '0;
  instr_t        rd_data;

  int checks = 0, failures = 0;
  instr_t model [DEPTH];

  spinpm_icache #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t rand_instr();
    return instr_t'({$urandom, $urandom, $urandom});
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1'b1; wr_addr = AW'(a); wr_data = rand_instr(); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 1'b0;
    for (int i = 0; i < 300; i++) begin
      int a, w;
      a = int'($urandom_range(0, DEPTH-1));
      w = int'($urandom_range(0, DEPTH-1));
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'(a);
      wr_en = 1'($urandom); wr_addr = AW'(w); wr_data = rand_instr();
      @(negedge clk);
      checks++;
      if (rd_data !== model[a]) begin failures++; $display("addr %0d mismatch", a); end
      if (wr_en) model[w] = wr_data;
      // Without a fetch the output holds.
      rd_en = 1'b0; wr_en = 1'b0;
      @(negedge clk);
      checks++;
      if (rd_data !== model[a] && !(wr_en == 1'b1 && w == a)) begin
        if (w != a) begin failures++; $display("output did not hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
