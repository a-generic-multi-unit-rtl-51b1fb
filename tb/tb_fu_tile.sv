// tb_fu_tile: self-checking test of a complete unit (memory cell, specific
// controller, main controller, instruction memory). The testbench loads a
// three-instruction segment and plays the network:
//   0: STORE 8 words at 16, input 0 blocking, from unit 2 on bus 1
//   1: LOAD 8 words from 16, output non blocking on bus 0
//   2: LOAD 4 words from 20, output blocking on bus 1
// and runs the global loop twice with new data each time. Checks every word
// that leaves the unit, the crosspoint fields it shows, the end and loop_wrap
// pulses, that a blocking output waits for the receiver (stall) and that the
// unit stays quiet when run is low.
module tb_fu_tile;
  import dspa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic run, prog_we, tx_valid, tx_ready, ext_valid, ext_ready, end_o, loop_wrap, stall, busy;
  logic [3:0] last_addr, prog_addr;
  instr_t prog_data;
  logic             rx_ready [N_IN];
  logic [SEL_W-1:0] rx_bus [N_IN], rx_src [N_IN];
  logic             rx_valid [N_IN];
  word_t            rx_data [N_IN];
  logic [SEL_W-1:0] tx_bus, tx_dst;
  word_t            tx_data, ext_data;
  int checks = 0, failures = 0;
  int ends = 0, wraps = 0, stalls = 0;
  word_t blk [8];

  fu_tile #(.CELL(CELL_MEM), .IM_DEPTH(16), .MEM_DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (rst_n && end_o) ends++;
    if (rst_n && loop_wrap) wraps++;
    if (rst_n && stall) stalls++;
  end

  task automatic load(input int a, input instr_t i);
    @(negedge clk);
    prog_we = 1; prog_addr = 4'(a); prog_data = i;
    @(negedge clk);
    prog_we = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t i0, i1, i2;
    run = 0; prog_we = 0; prog_addr = 0; prog_data = '0; last_addr = 4'd2;
    tx_ready = 0; ext_valid = 0; ext_data = '0;
    for (int p = 0; p < N_IN; p++) begin rx_valid[p] = 0; rx_data[p] = '0; end
    i0 = '0; i0.op = OP_STORE; i0.len = 12'd8; i0.base = 12'd16;
    i0.in[0] = '{en: 1'b1, prot: PROT_BLOCK, bus: 4'd1, src: 4'd2};
    i1 = '0; i1.op = OP_LOAD; i1.len = 12'd8; i1.base = 12'd16;
    i1.out = '{en: 1'b1, prot: PROT_NONBLOCK, bus: 4'd0, dst: 4'd3};
    i2 = '0; i2.op = OP_LOAD; i2.len = 12'd4; i2.base = 12'd20;
    i2.out = '{en: 1'b1, prot: PROT_BLOCK, bus: 4'd1, dst: 4'd7};
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(0, i0); load(1, i1); load(2, i2);
    repeat (5) @(negedge clk);
    check(!busy && !rx_ready[0] && !tx_valid, "quiet while run is low");
    run = 1;
    for (int it = 0; it < 2; it++) begin
      int k;
      // instruction 0: the network offers 8 words from unit 2 on bus 1
      for (int n = 0; n < 8; n++) blk[n] = $urandom;
      k = 0;
      while (k < 8) begin
        @(negedge clk);
        rx_valid[0] = ($urandom_range(0, 1) == 1) && rx_bus[0] == 1 && rx_src[0] == 2;
        rx_data[0]  = blk[k];
        @(posedge clk);
        if (rx_valid[0] && rx_ready[0]) k++;
      end
      @(negedge clk);
      rx_valid[0] = 0;
      // instruction 1: 8 words leave without waiting
      k = 0;
      while (k < 8) begin
        @(posedge clk);
        if (tx_valid) begin
          check(tx_bus == 0 && tx_dst == 3 && tx_data == blk[k], "non blocking load word");
          k++;
        end
      end
      // instruction 2: blocking, the receiver is late
      @(negedge clk);
      tx_ready = 0;
      repeat (6) @(negedge clk);
      check(!tx_valid && stall, "blocking load waits for the receiver");
      k = 0;
      while (k < 4) begin
        @(negedge clk);
        tx_ready = ($urandom_range(0, 1) == 1);
        @(posedge clk);
        if (tx_valid) begin
          check(tx_ready && tx_bus == 1 && tx_data == blk[4 + k], "blocking load word");
          k++;
        end
      end
      @(negedge clk);
      tx_ready = 0;
      repeat (4) @(negedge clk);
    end
    $display("ends %0d wraps %0d", ends, wraps);
    check(ends == 6, "six instruction ends");
    check(wraps == 2, "two global loops");
    check(stalls > 0, "stalls seen");
    run = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
