// tb_data_mem_cell: self-checking test of the data memory unit at its default
// depth. Stores several random blocks at random base addresses (one of them
// wrapping past the last address), with random gaps on the input, then loads
// them back with random gaps on the output and compares with a model memory.
// Checks the len+1 cycle count of a store and a load with the stream always
// ready and that len = 0 or a foreign op-code ends at once.
module tb_data_mem_cell;
  import dspa_pkg::*;
  localparam int unsigned DEPTH = 1024;
  logic clk = 0, rst_n = 0;
  logic start, out_valid, out_ready, done;
  opcode_e op;
  logic [LEN_W-1:0] len;
  logic [ADDR_W-1:0] base;
  logic  in_valid [N_IN];
  word_t in_data  [N_IN];
  logic  in_ready [N_IN];
  word_t out_data;
  int checks = 0, failures = 0;
  word_t model [DEPTH];
  bit    known [DEPTH];

  data_mem_cell #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic op_run(input opcode_e o, input int b, input int n, input int gaps);
    int k, t0, cyc;
    @(negedge clk);
    start = 1; op = o; base = ADDR_W'(b); len = LEN_W'(n);
    t0 = $time;
    @(negedge clk);
    start = 0;
    k = 0;
    while (!done) begin
      in_valid[0] = (o == OP_STORE) && k < n && (gaps == 0 || $urandom_range(0, 1) != 0);
      in_data[0]  = $urandom;
      out_ready   = (gaps == 0 || $urandom_range(0, 1) != 0);
      @(posedge clk);
      if (o == OP_STORE && in_valid[0] && in_ready[0]) begin
        model[(b + k) % DEPTH] = in_data[0];
        known[(b + k) % DEPTH] = 1;
        k++;
      end
      if (o == OP_LOAD && out_valid && out_ready) begin
        if (known[(b + k) % DEPTH]) check(out_data == model[(b + k) % DEPTH], "load data");
        k++;
      end
      @(negedge clk);
    end
    in_valid[0] = 0;
    cyc = ($time - t0) / 10;
    check(k == n, "word count");
    if (gaps == 0) check(cyc == n + 1, "cycle count");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; op = OP_STORE; len = '0; base = '0; out_ready = 0;
    for (int p = 0; p < N_IN; p++) begin in_valid[p] = 0; in_data[p] = '0; end
    for (int i = 0; i < DEPTH; i++) known[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    op_run(OP_STORE, 0, 128, 0);
    op_run(OP_STORE, 500, 200, 1);
    op_run(OP_STORE, DEPTH - 10, 30, 1);
    op_run(OP_LOAD, 0, 128, 0);
    op_run(OP_LOAD, 500, 200, 1);
    op_run(OP_LOAD, DEPTH - 10, 30, 1);
    op_run(OP_STORE, 64, 32, 0);   // overwrite part of the first block
    op_run(OP_LOAD, 60, 40, 1);
    @(negedge clk);
    start = 1; op = OP_LOAD; len = '0;
    @(negedge clk);
    start = 0;
    check(done && !out_valid, "zero length ends at once");
    @(negedge clk);
    start = 1; op = OP_ADD; len = 12'd3;
    @(negedge clk);
    start = 0;
    check(done && !out_valid && !in_ready[0], "foreign op-code ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
