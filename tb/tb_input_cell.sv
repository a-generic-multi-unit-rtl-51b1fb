// tb_input_cell: self-checking test of the input unit. A queue model offers
// numbered samples with random gaps; the output side is ready at random.
// Checks that exactly len words pass, in order, that nothing passes between
// operations, the len+1 cycle count when both sides are always ready, and
// that a foreign op-code ends at once.
module tb_input_cell;
  import dspa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, out_valid, out_ready, done, ext_valid, ext_ready;
  opcode_e op;
  logic [LEN_W-1:0] len;
  logic [ADDR_W-1:0] base;
  logic  in_valid [N_IN];
  word_t in_data  [N_IN];
  logic  in_ready [N_IN];
  word_t out_data, ext_data;
  int checks = 0, failures = 0;
  int next_in = 0, next_out = 0;

  input_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_in(input int n, input int gaps);
    int k, t0, cyc;
    @(negedge clk);
    start = 1; op = OP_INPUT; len = LEN_W'(n);
    t0 = $time;
    @(negedge clk);
    start = 0;
    k = 0;
    while (!done) begin
      ext_valid = (gaps == 0 || $urandom_range(0, 2) != 0);
      ext_data  = 32'(next_in);
      out_ready = (gaps == 0 || $urandom_range(0, 2) != 0);
      @(posedge clk);
      if (ext_valid && ext_ready) begin
        check(out_valid && out_ready, "queue read only with a transfer");
        next_in++;
      end
      if (out_valid && out_ready) begin
        check(out_data == 32'(next_out), "sample order");
        next_out++;
        k++;
      end
      @(negedge clk);
    end
    ext_valid = 0;
    cyc = ($time - t0) / 10;
    check(k == n, "word count");
    if (gaps == 0) check(cyc == n + 1, "cycle count");
    // idle: nothing taken
    ext_valid = 1; out_ready = 1;
    #1 check(!ext_ready && !out_valid, "idle between operations");
    ext_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; op = OP_INPUT; len = '0; base = '0; out_ready = 0; ext_valid = 0; ext_data = '0;
    for (int p = 0; p < N_IN; p++) begin in_valid[p] = 0; in_data[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_in(10, 0);
    run_in(64, 1);
    run_in(1, 0);
    @(negedge clk);
    start = 1; op = OP_STORE; len = 12'd3;
    @(negedge clk);
    start = 0;
    check(done && !out_valid, "foreign op-code ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
