// tb_specific_controller: self-checking test of the specific controller. The
// testbench plays both the computation cell and the network and checks, for a
// blocking and then a non blocking instruction, the latched crosspoint
// locations, the cell start pulse with op-code/length/base, the gating of
// every valid/ready by the protocol, the stall flag, unused ports, that a
// start during an instruction is ignored and the end pulse one cycle after
// the cell is done.
module tb_specific_controller;
  import dspa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, end_o, tx_valid, tx_ready, cell_start, c_out_valid, c_out_ready, cell_done, busy, stall;
  instr_t instr;
  logic             rx_ready [N_IN];
  logic [SEL_W-1:0] rx_bus [N_IN], rx_src [N_IN];
  logic             rx_valid [N_IN];
  word_t            rx_data [N_IN];
  logic [SEL_W-1:0] tx_bus, tx_dst;
  word_t            tx_data, c_out_data;
  opcode_e          cell_op;
  logic [LEN_W-1:0] cell_len;
  logic [ADDR_W-1:0] cell_base;
  logic             c_in_valid [N_IN];
  word_t            c_in_data [N_IN];
  logic             c_in_ready [N_IN];
  int checks = 0, failures = 0;

  specific_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t i1, i2;
    start = 0; instr = '0; tx_ready = 0; c_out_valid = 0; c_out_data = '0; cell_done = 0;
    for (int p = 0; p < N_IN; p++) begin rx_valid[p] = 0; rx_data[p] = '0; c_in_ready[p] = 0; end
    // blocking instruction: in0 from unit 3 on bus 1, in1 unused, out to bus 0 / port 5
    i1 = '0;
    i1.op = OP_ADD; i1.len = 12'd7; i1.base = 12'h123;
    i1.in[0] = '{en: 1'b1, prot: PROT_BLOCK, bus: 4'd1, src: 4'd3};
    i1.out   = '{en: 1'b1, prot: PROT_BLOCK, bus: 4'd0, dst: 4'd5};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !tx_valid && !rx_ready[0], "idle after reset");
    start = 1; instr = i1;
    @(negedge clk);
    start = 0; instr = '0;
    check(cell_start && cell_op == OP_ADD && cell_len == 7 && cell_base == 12'h123, "cell start and fields");
    check(rx_bus[0] == 1 && rx_src[0] == 3 && tx_bus == 0 && tx_dst == 5, "crosspoint locations");
    @(negedge clk);
    check(!cell_start, "cell start is one pulse");
    // blocking input waits for data
    c_in_ready[0] = 1; c_in_ready[1] = 1; rx_valid[0] = 0; rx_valid[1] = 1;
    #1 check(rx_ready[0] && !c_in_valid[0] && stall, "blocking read waits");
    check(!rx_ready[1] && !c_in_valid[1], "unused input stays quiet");
    rx_valid[0] = 1; rx_data[0] = 32'hCAFE_0001;
    #1 check(c_in_valid[0] && c_in_data[0] == 32'hCAFE_0001 && !stall, "blocking read passes data");
    // blocking output waits for the receiver
    c_in_ready[0] = 0; c_in_ready[1] = 0; rx_valid[0] = 0; rx_valid[1] = 0;
    c_out_valid = 1; c_out_data = 32'hBEEF_0002; tx_ready = 0;
    #1 check(!tx_valid && !c_out_ready && stall, "blocking write waits, bus not driven");
    tx_ready = 1;
    #1 check(tx_valid && c_out_ready && tx_data == 32'hBEEF_0002 && !stall, "blocking write goes");
    // a start while busy is ignored
    @(negedge clk);
    start = 1; instr = '0;
    @(negedge clk);
    start = 0;
    check(!cell_start && tx_bus == 0 && tx_dst == 5 && cell_len == 7, "start ignored while busy");
    // end
    c_out_valid = 0; tx_ready = 0;
    cell_done = 1;
    @(negedge clk);
    cell_done = 0;
    check(end_o && !busy, "end pulse after done");
    @(negedge clk);
    check(!end_o, "end is one pulse");
    // non blocking instruction, output unused
    i2 = '0;
    i2.op = OP_FFT; i2.len = 12'd1;
    i2.in[0] = '{en: 1'b1, prot: PROT_NONBLOCK, bus: 4'd0, src: 4'd2};
    i2.in[1] = '{en: 1'b1, prot: PROT_NONBLOCK, bus: 4'd1, src: 4'd4};
    i2.out   = '{en: 1'b1, prot: PROT_NONBLOCK, bus: 4'd1, dst: 4'd0};
    start = 1; instr = i2;
    @(negedge clk);
    start = 0;
    check(cell_start && cell_op == OP_FFT, "second instruction starts");
    c_in_ready[0] = 1; c_in_ready[1] = 0; rx_valid[0] = 0;
    #1 check(c_in_valid[0] && rx_ready[0] && !stall, "non blocking read does not check");
    check(!c_in_valid[1] || !c_in_ready[1], "input 1 not taken while cell not ready");
    check(!rx_ready[1], "rx_ready follows the cell");
    c_out_valid = 1; tx_ready = 0;
    #1 check(tx_valid && c_out_ready && !stall, "non blocking write does not check");
    cell_done = 1;
    @(negedge clk);
    cell_done = 0;
    check(end_o, "second end");
    // output unused: words are dropped, never on the network
    i2.out.en = 1'b0;
    start = 1; instr = i2;
    @(negedge clk);
    start = 0;
    c_out_valid = 1; tx_ready = 0;
    #1 check(!tx_valid && c_out_ready, "unused output drops words");
    cell_done = 1;
    @(negedge clk);
    cell_done = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
