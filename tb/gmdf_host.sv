// gmdf_host: testbench model of everything around gmdf_arch: the clock and
// reset, the program loader, the input data queue writer and the DSP unit
// (index 2), which here plays the software nodes of one GMDF-alpha style
// iteration and checks what the hardware units return.
//
// One iteration (NFFT = 64 words per block):
//   1 DSP -> Hr    coefficient block H           (Hr STORE)
//   2 queue -> In -> FFT   input block x         (In INPUT, FFT forward)
//   3 FFT -> DSP   X = FFT(x), non blocking      (checked against a DFT)
//   4 DSP -> FFT   X back, FFT^-1 -> DSP         (checked against x)
//   5 DSP -> FFT   error block e, FFT -> Add in0
//     Hr -> Add in1 (LOAD H), Add -> Hr (STORE H + FFT(e))
//   6 Hr -> DSP    updated H                     (checked against H + DFT(e))
//   7 DSP -> Hi -> DSP  a block through the second memory (checked exactly)
// The programs are the same for both networks: every instruction names the
// bus and also the destination input; each network uses its own field. The
// run does ITER iterations, so every unit's global loop wraps. At the end it
// checks the counts of instruction ends, loop wraps, words per bus (bus
// network), no conflict and no overflow, and counts how often each mechanism
// happened: each op-code, blocking waits, non blocking words, loop wraps and,
// on the bus network, words on each of the two buses. On the FIFO crossbar,
// steps 1 and 2 run at the same time (asynchronous transfers through
// buffering crosspoints), which the two-bus schedule must keep apart. With
// MIXED set (top built with both networks) the transfer of step 1 is the
// one asynchronous edge: the DSP and Hr name bus BUS_ASYNC for it, it goes
// through a FIFO crosspoint, and steps 1 and 2 overlap again while every
// other word uses the buses. At the end one schedule error is made on
// purpose, and the overflow flag (FIFO crossbar) or the conflict flag (buses)
// must report it. A mechanism that never happened is a failure.
// Prints the TB_RESULT line.
module gmdf_host
  import dspa_pkg::*;
#(
  parameter bit          NET_FIFO = 1'b0,
  parameter bit          MIXED    = 1'b0,
  parameter int unsigned NFFT     = 64,
  parameter int unsigned ITER     = 2
) (
  output logic             clk,
  output logic             rst_n,
  output logic             run,
  output logic             prog_we,
  output logic [SEL_W-1:0] prog_unit,
  output logic [3:0]       prog_addr,
  output instr_t           prog_instr,
  output logic [3:0]       seg_last [6],
  output logic             in_valid,
  output word_t            in_data,
  input  logic             in_ready,
  output logic             dsp_tx_valid,
  output logic [SEL_W-1:0] dsp_tx_bus,
  output logic [SEL_W-1:0] dsp_tx_dst,
  output word_t            dsp_tx_data,
  input  logic             dsp_tx_ready,
  output logic             dsp_rx_ready [N_IN],
  output logic [SEL_W-1:0] dsp_rx_bus   [N_IN],
  output logic [SEL_W-1:0] dsp_rx_src   [N_IN],
  input  logic             dsp_rx_valid [N_IN],
  input  word_t            dsp_rx_data  [N_IN],
  input  logic [5:0]       unit_end,
  input  logic [5:0]       loop_wrap,
  input  logic [5:0]       unit_stall,
  input  logic [1:0]       bus_conflict,
  input  logic [31:0]      bus_xfers [2],
  input  logic             xbar_overflow,
  input  logic             in_overflow
);
  localparam real PI  = 3.14159265358979323846;
  localparam int  TOL = 24;
  localparam int  N   = NFFT;
  // unit indices and input numbers
  // bus of the step 1 transfer: a FIFO crosspoint in the mixed network
  localparam logic [3:0] B_H = MIXED ? BUS_ASYNC : 4'd0;
  localparam logic [3:0] U_IN = 0, U_FFT = 1, U_DSP = 2, U_ADD = 3, U_HR = 4, U_HI = 5;

  int checks = 0, failures = 0;
  int overlap_cycles = 0;   // DSP and input queue moving words in one cycle
  int ends [6], wraps [6], stall_cycles = 0, nb_words = 0;
  int n_fft = 0, n_ifft = 0, n_add = 0, n_store = 0, n_load = 0, n_input = 0;

  word_t x [NFFT], hx [NFFT], e [NFFT], h [NFFT], w [NFFT], got [NFFT];

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int u = 0; u < 6; u++) begin
        if (unit_end[u]) ends[u]++;
        if (loop_wrap[u]) wraps[u]++;
      end
      if (unit_stall != 0) stall_cycles++;
      if (dsp_tx_valid && dsp_tx_ready && in_valid && in_ready) overlap_cycles++;
    end
  end

  function automatic int s16(input logic [15:0] v);
    return int'(signed'(v));
  endfunction

  function automatic word_t cplx(input int re, input int im);
    return {16'(re), 16'(im)};
  endfunction

  function automatic in_port_t ip(input logic [3:0] bus, input logic [3:0] src);
    return '{en: 1'b1, prot: PROT_BLOCK, bus: bus, src: src};
  endfunction

  function automatic out_port_t op_(input logic [3:0] bus, input logic [3:0] unit, input prot_e p);
    return '{en: 1'b1, prot: p, bus: bus, dst: SEL_W'(unit * N_IN)};
  endfunction

  function automatic instr_t mk(input opcode_e o, input int base_a);
    instr_t i;
    i = '0; i.op = o; i.len = LEN_W'(N); i.base = ADDR_W'(base_a);
    return i;
  endfunction

  task automatic put(input logic [3:0] unit, input int a, input instr_t i);
    @(negedge clk);
    prog_we = 1; prog_unit = unit; prog_addr = 4'(a); prog_instr = i;
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic load_programs();
    instr_t i;
    // In: one input block to the FFT
    i = mk(OP_INPUT, 0); i.out = op_(0, U_FFT, PROT_BLOCK);                 put(U_IN, 0, i);
    // FFT: forward (non blocking result to the DSP), inverse, forward to Add
    i = mk(OP_FFT, 0);  i.in[0] = ip(0, U_IN);  i.out = op_(0, U_DSP, PROT_NONBLOCK); put(U_FFT, 0, i);
    i = mk(OP_IFFT, 0); i.in[0] = ip(0, U_DSP); i.out = op_(0, U_DSP, PROT_BLOCK);    put(U_FFT, 1, i);
    i = mk(OP_FFT, 0);  i.in[0] = ip(0, U_DSP); i.out = op_(1, U_ADD, PROT_BLOCK);    put(U_FFT, 2, i);
    // Add: FFT result + Hr block, back to Hr
    i = mk(OP_ADD, 0); i.in[0] = ip(1, U_FFT); i.in[1] = ip(0, U_HR);
    i.out = op_(1, U_HR, PROT_BLOCK);                                        put(U_ADD, 0, i);
    // Hr: take H, feed the adder (its input 1), take the sum, show it to the DSP (input 1)
    i = mk(OP_STORE, 0); i.in[0] = ip(B_H, U_DSP);                           put(U_HR, 0, i);
    i = mk(OP_LOAD, 0);  i.out = op_(0, U_ADD, PROT_BLOCK); i.out.dst += 1;  put(U_HR, 1, i);
    i = mk(OP_STORE, 0); i.in[0] = ip(1, U_ADD);                             put(U_HR, 2, i);
    i = mk(OP_LOAD, 0);  i.out = op_(0, U_DSP, PROT_BLOCK); i.out.dst += 1;  put(U_HR, 3, i);
    // Hi: a block from the DSP and back to its input 1
    i = mk(OP_STORE, 100); i.in[0] = ip(1, U_DSP);                           put(U_HI, 0, i);
    i = mk(OP_LOAD, 100);  i.out = op_(1, U_DSP, PROT_BLOCK); i.out.dst += 1; put(U_HI, 1, i);
    seg_last = '{4'd0, 4'd2, 4'd0, 4'd0, 4'd3, 4'd1};
  endtask

  // DSP sends a block, blocking: it offers a word only when the crosspoint
  // can take it
  task automatic dsp_send(input logic [3:0] bus, input logic [3:0] dst, input word_t blk [NFFT]);
    int k;
    k = 0;
    while (k < N) begin
      @(negedge clk);
      dsp_tx_bus = bus; dsp_tx_dst = dst; dsp_tx_data = blk[k];
      dsp_tx_valid = 0;
      #1;
      dsp_tx_valid = dsp_tx_ready;
      @(posedge clk);
      if (dsp_tx_valid && dsp_tx_ready) k++;
    end
    @(negedge clk);
    dsp_tx_valid = 0;
  endtask

  // DSP receives a block on input p, always ready
  task automatic dsp_recv(input int p, input logic [3:0] bus, input logic [3:0] src, input bit nb);
    int k;
    k = 0;
    @(negedge clk);
    dsp_rx_bus[p] = bus; dsp_rx_src[p] = src; dsp_rx_ready[p] = 1;
    while (k < N) begin
      @(posedge clk);
      if (dsp_rx_valid[p]) begin
        got[k] = dsp_rx_data[p];
        k++;
        if (nb) nb_words++;
      end
    end
    @(negedge clk);
    dsp_rx_ready[p] = 0;
  endtask

  // DSP offers n words non blocking, whether or not anyone takes them
  task automatic dsp_burst(input logic [3:0] bus, input logic [3:0] dst, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      dsp_tx_bus = bus; dsp_tx_dst = dst; dsp_tx_data = word_t'(k); dsp_tx_valid = 1;
    end
    @(negedge clk);
    dsp_tx_valid = 0;
  endtask

  task automatic push_input();
    int k;
    k = 0;
    while (k < N) begin
      @(negedge clk);
      in_valid = 1; in_data = x[k];
      @(posedge clk);
      if (in_ready) k++;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // compare got with DFT(src) (+ add) within TOL; inverse uses +j and 1/N
  task automatic compare_dft(input word_t src [NFFT], input word_t add [NFFT], input bit inverse, input string what);
    int bad = 0;
    for (int m = 0; m < N; m++) begin
      real re, im, a;
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        a = (inverse ? 2.0 : -2.0) * PI * n * m / N;
        re += s16(src[n][31:16]) * $cos(a) - s16(src[n][15:0]) * $sin(a);
        im += s16(src[n][31:16]) * $sin(a) + s16(src[n][15:0]) * $cos(a);
      end
      if (inverse) begin re = re / N; im = im / N; end
      re += s16(add[m][31:16]);
      im += s16(add[m][15:0]);
      if ((s16(got[m][31:16]) - $rtoi(re)) > TOL || ($rtoi(re) - s16(got[m][31:16])) > TOL ||
          (s16(got[m][15:0]) - $rtoi(im)) > TOL || ($rtoi(im) - s16(got[m][15:0])) > TOL)
        bad++;
    end
    check(bad == 0, what);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t zero [NFFT];
    int t0, ov;
    for (int u = 0; u < 6; u++) begin ends[u] = 0; wraps[u] = 0; end
    rst_n = 0; run = 0; prog_we = 0; prog_unit = 0; prog_addr = 0; prog_instr = '0;
    seg_last = '{default: '0};
    in_valid = 0; in_data = '0;
    dsp_tx_valid = 0; dsp_tx_bus = 0; dsp_tx_dst = 0; dsp_tx_data = '0;
    for (int p = 0; p < N_IN; p++) begin dsp_rx_ready[p] = 0; dsp_rx_bus[p] = 0; dsp_rx_src[p] = 0; end
    for (int n = 0; n < N; n++) begin
      zero[n] = '0;
      h[n] = cplx($urandom_range(0, 4000) - 2000, $urandom_range(0, 4000) - 2000);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_programs();
    @(negedge clk);
    run = 1;
    for (int it = 0; it < ITER; it++) begin
      t0 = $time;
      for (int n = 0; n < N; n++) begin
        x[n] = cplx($urandom_range(0, 600) - 300, $urandom_range(0, 600) - 300);
        e[n] = cplx($urandom_range(0, 400) - 200, $urandom_range(0, 400) - 200);
        w[n] = $urandom;
      end
      // 1, 2, 3: H to Hr, then the input block to In (both use bus 0, so
      // one after the other); the DSP already listens to the FFT
      // On the FIFO crossbar the two may overlap: each has its own
      // crosspoints, which buffer.
      if (NET_FIFO || MIXED)
        fork
          dsp_send(B_H, U_HR * N_IN, h);
          push_input();
          dsp_recv(0, 0, U_FFT, 1'b1);
        join
      else
        fork
          begin
            dsp_send(0, U_HR * N_IN, h);
            push_input();
          end
          dsp_recv(0, 0, U_FFT, 1'b1);
        join
      compare_dft(x, zero, 1'b0, "FFT of the input block");
      hx = got;
      // 4: inverse transform of the spectrum
      fork
        dsp_send(0, U_FFT * N_IN, hx);
        dsp_recv(0, 0, U_FFT, 1'b0);
      join
      compare_dft(hx, zero, 1'b1, "FFT^-1 returns the input block");
      for (int n = 0; n < N; n++) begin
        int dr, di;
        dr = s16(got[n][31:16]) - s16(x[n][31:16]);
        di = s16(got[n][15:0]) - s16(x[n][15:0]);
        if (dr < -TOL || dr > TOL || di < -TOL || di > TOL) check(0, "round trip sample");
      end
      // 5, 6: coefficient update H + FFT(e) through FFT, Add and Hr
      // the DSP may listen to Hr only once Hr has stored the sum, or it
      // would take the block Hr sends to the adder
      dsp_send(0, U_FFT * N_IN, e);
      wait (ends[U_HR] == 4 * it + 3);
      dsp_recv(1, 0, U_HR, 1'b0);
      compare_dft(e, h, 1'b0, "updated coefficients H + FFT(e)");
      h = got;
      // 7: Hi round trip
      fork
        dsp_send(1, U_HI * N_IN, w);
        dsp_recv(1, 1, U_HI, 1'b0);
      join
      check(got == w, "Hi returns its block");
      $display("iteration %0d: %0d cycles", it, ($time - t0) / 10);
    end
    repeat (20) @(negedge clk);
    // instruction ends and global loops
    check(ends[U_IN] == ITER && ends[U_FFT] == 3 * ITER && ends[U_ADD] == ITER &&
          ends[U_HR] == 4 * ITER && ends[U_HI] == 2 * ITER, "instruction ends per unit");
    check(wraps[U_IN] == ITER && wraps[U_FFT] == ITER && wraps[U_ADD] == ITER &&
          wraps[U_HR] == ITER && wraps[U_HI] == ITER, "one global loop per iteration");
    n_input = ends[U_IN]; n_add = ends[U_ADD];
    // the FFT unit runs forward, inverse, forward; Hr and Hi alternate
    // store and load: split the observed instruction ends accordingly
    n_ifft = ends[U_FFT] / 3; n_fft = ends[U_FFT] - n_ifft;
    n_store = ends[U_HR] / 2 + ends[U_HI] / 2;
    n_load = (ends[U_HR] + 1) / 2 + (ends[U_HI] + 1) / 2;
    check(!in_overflow && !xbar_overflow, "no overflow");
    if (!NET_FIFO) begin
      check(bus_conflict == 0, "no bus conflict");
      check(bus_xfers[0] == 32'((MIXED ? 7 : 8) * N * ITER), "words on bus 0");
      check(bus_xfers[1] == 32'(4 * N * ITER), "words on bus 1");
    end
    $display("mechanisms: fft=%0d ifft=%0d add=%0d store=%0d load=%0d input=%0d",
             n_fft, n_ifft, n_add, n_store, n_load, n_input);
    $display("mechanisms: blocking-wait cycles=%0d non-blocking words=%0d loop wraps=%0d bus0=%0d bus1=%0d",
             stall_cycles, nb_words, wraps[U_HR], bus_xfers[0], bus_xfers[1]);
    check(n_fft > 0 && n_ifft > 0 && n_add > 0 && n_store > 0 && n_load > 0 && n_input > 0,
          "every operation ran");
    check(stall_cycles > 0, "a blocking transfer waited");
    check(nb_words == N * ITER, "non blocking transfers happened");
    check(wraps[U_FFT] > 0, "global loop wrapped");
    if (!NET_FIFO) check(bus_xfers[0] > 0 && bus_xfers[1] > 0, "both buses carried words");
    ov = overlap_cycles;
    // a schedule error made on purpose, after all the checks above: the
    // network must flag it. FIFO crossbar: 40 non blocking words into the
    // crosspoint of Hi input 1, which no instruction reads, overflow it.
    // Buses: the DSP drives bus 0 non blocking while In sends an input
    // block to the FFT on the same bus (the bus assertion is switched off).
    if (NET_FIFO) begin
      dsp_burst(0, U_HI * N_IN + 1, 40);
      repeat (2) @(negedge clk);
      check(xbar_overflow, "FIFO crosspoint overflow flagged");
    end else begin
      $assertoff;
      fork
        dsp_burst(0, U_HR * N_IN, 2 * N);
        push_input();
      join
      repeat (2) @(negedge clk);
      check(bus_conflict[0] && !bus_conflict[1], "bus 0 conflict flagged");
    end
    $display("mechanisms: overflow=%0d bus conflict=%0d", xbar_overflow, bus_conflict);
    $display("mechanisms: overlapped DSP and input transfers=%0d", ov);
    if (NET_FIFO || MIXED) check(ov > 0, "asynchronous transfers overlapped");
    else check(ov == 0, "bus schedule kept the two apart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
