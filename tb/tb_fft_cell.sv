// tb_fft_cell: self-checking test of the FFT operator at its default size.
// Random complex inputs (parts in -400..400, so the unscaled forward result
// fits 16 bits) are transformed and compared with a double-precision DFT
// computed here; the result is then sent back through the inverse transform
// and compared with the inverse DFT of what was fed. Checks the cycle count
// of an operation with every stream ready (NFFT + (NFFT/2)*log2(NFFT) + NFFT
// + 1 from the start pulse to done), an operation with random gaps on the input and
// output streams, and that an unrelated op-code ends at once.
module tb_fft_cell;
  import dspa_pkg::*;
  localparam int unsigned NFFT = 64;
  localparam int unsigned LG = $clog2(NFFT);
  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 24;
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
  word_t xin [NFFT], yout [NFFT];
  int max_err = 0;

  fft_cell #(.NFFT(NFFT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int s16(input logic [15:0] v);
    return int'(signed'(v));
  endfunction

  // run one operation; gaps>0 inserts random idle cycles on both streams
  task automatic run_op(input opcode_e o, input int gaps, output int cycles);
    int t0, k, got;
    @(negedge clk);
    start = 1; op = o;
    t0 = $time;
    @(negedge clk);
    start = 0;
    k = 0; got = 0;
    while (!done) begin
      in_valid[0] = (k < NFFT) && (gaps == 0 || $urandom_range(0, 2) != 0);
      in_data[0]  = (k < NFFT) ? xin[k] : '0;
      out_ready   = (gaps == 0 || $urandom_range(0, 2) != 0);
      @(posedge clk);
      if (in_valid[0] && in_ready[0]) k++;
      if (out_valid && out_ready) begin yout[got] = out_data; got++; end
      @(negedge clk);
    end
    in_valid[0] = 0;
    cycles = ($time - t0) / 10;
    check(k == NFFT && got == NFFT, "word counts");
  endtask

  // compare yout with the DFT of xin (sign -1 forward, +1 inverse scaled)
  task automatic compare(input bit inverse);
    for (int m = 0; m < NFFT; m++) begin
      real re, im, a;
      int er, ei;
      re = 0.0; im = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        a = (inverse ? 2.0 : -2.0) * PI * n * m / NFFT;
        re += s16(xin[n][31:16]) * $cos(a) - s16(xin[n][15:0]) * $sin(a);
        im += s16(xin[n][31:16]) * $sin(a) + s16(xin[n][15:0]) * $cos(a);
      end
      if (inverse) begin re = re / NFFT; im = im / NFFT; end
      er = s16(yout[m][31:16]) - $rtoi(re);
      ei = s16(yout[m][15:0]) - $rtoi(im);
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      check(er <= TOL && ei <= TOL, inverse ? "inverse bin" : "forward bin");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 0; op = OP_FFT; len = '0; base = '0; out_ready = 0;
    for (int p = 0; p < N_IN; p++) begin in_valid[p] = 0; in_data[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      for (int n = 0; n < NFFT; n++)
        xin[n] = {16'($urandom_range(0, 800) - 400), 16'($urandom_range(0, 800) - 400)};
      if (trial == 0) for (int n = 0; n < NFFT; n++) xin[n] = (n == 3) ? {16'd256, 16'd0} : '0;
      run_op(OP_FFT, trial == 2, cyc);
      if (trial < 2) check(cyc == NFFT + NFFT/2*LG + NFFT + 1, "forward cycle count");
      $display("forward transform: %0d cycles", cyc);
      compare(1'b0);
      xin = yout;
      run_op(OP_IFFT, trial == 2, cyc);
      if (trial < 2) check(cyc == NFFT + NFFT/2*LG + NFFT + 1, "inverse cycle count");
      compare(1'b1);
    end
    $display("largest error %0d LSB", max_err);
    // other op-code: done right away, nothing read
    @(negedge clk);
    start = 1; op = OP_LOAD;
    @(negedge clk);
    start = 0;
    check(done && !in_ready[0] && !out_valid, "foreign op-code ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
