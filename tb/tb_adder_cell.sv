// tb_adder_cell: self-checking test of the adder operator. Random vectors,
// including values that saturate, are added and compared with a model of the
// component-wise saturating complex sum. Checks the order of the three
// phases (input 1 is not taken before input 0 is complete, no output before
// both are), the 3*len+1 cycle count with all streams ready, a run with
// random gaps, the longest vector (MAXLEN) and that a foreign op-code or an
// oversize length ends at once.
module tb_adder_cell;
  import dspa_pkg::*;
  localparam int unsigned MAXLEN = 64;
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
  word_t a [MAXLEN], b [MAXLEN];

  adder_cell #(.MAXLEN(MAXLEN)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [15:0] sat(input int v);
    if (v > 32767) return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction

  function automatic word_t model_sum(input word_t x, input word_t y);
    return {sat(int'(signed'(x[31:16])) + int'(signed'(y[31:16]))),
            sat(int'(signed'(x[15:0])) + int'(signed'(y[15:0])))};
  endfunction

  task automatic run_add(input int n, input int gaps);
    int ka, kb, got, t0, cyc;
    for (int i = 0; i < n; i++) begin
      a[i] = $urandom; b[i] = $urandom;
    end
    @(negedge clk);
    start = 1; op = OP_ADD; len = LEN_W'(n);
    t0 = $time;
    @(negedge clk);
    start = 0;
    ka = 0; kb = 0; got = 0;
    while (!done) begin
      in_valid[0] = (ka < n) && (gaps == 0 || $urandom_range(0, 2) != 0);
      in_data[0]  = (ka < n) ? a[ka] : '0;
      in_valid[1] = (kb < n) && (gaps == 0 || $urandom_range(0, 2) != 0);
      in_data[1]  = (kb < n) ? b[kb] : '0;
      out_ready   = (gaps == 0 || $urandom_range(0, 2) != 0);
      @(posedge clk);
      if (in_ready[1]) check(ka == n, "input 1 only after input 0");
      if (out_valid) check(kb == n, "output only after both inputs");
      if (in_valid[0] && in_ready[0]) ka++;
      if (in_valid[1] && in_ready[1]) kb++;
      if (out_valid && out_ready) begin
        check(out_data == model_sum(a[got], b[got]), "sum");
        got++;
      end
      @(negedge clk);
    end
    in_valid[0] = 0; in_valid[1] = 0;
    cyc = ($time - t0) / 10;
    check(got == n && ka == n && kb == n, "word counts");
    if (gaps == 0) check(cyc == 3 * n + 1, "cycle count");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; op = OP_ADD; len = '0; base = '0; out_ready = 0;
    for (int p = 0; p < N_IN; p++) begin in_valid[p] = 0; in_data[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_add(5, 0);
    run_add(MAXLEN, 0);
    run_add(17, 1);
    run_add(1, 0);
    @(negedge clk);
    start = 1; op = OP_FFT; len = 12'd4;
    @(negedge clk);
    start = 0;
    check(done && !in_ready[0], "foreign op-code ends at once");
    @(negedge clk);
    start = 1; op = OP_ADD; len = 12'(MAXLEN + 1);
    @(negedge clk);
    start = 0;
    check(done && !in_ready[0], "oversize length ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
