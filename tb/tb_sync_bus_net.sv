// tb_sync_bus_net: self-checking test of the synchronous bus network (2 buses,
// 3 senders, 4 receivers). Checks: a rendez-vous moves a word only when both
// sides are there, a receiver ignores a sender it does not expect, a sender
// waiting for a receiver on a bus does not disturb a transfer between two
// other units on that bus, broadcast to two receivers, two buses carrying
// words at once, the transfer counters and the conflict flag.
module tb_sync_bus_net;
  import dspa_pkg::*;
  localparam int unsigned NBUS = 2, NS = 3, NR = 4;
  logic clk = 0, rst_n = 0;
  logic             tx_valid [NS];
  logic [SEL_W-1:0] tx_bus   [NS];
  word_t            tx_data  [NS];
  logic             tx_ready [NS];
  logic             rx_ready [NR];
  logic [SEL_W-1:0] rx_bus   [NR];
  logic [SEL_W-1:0] rx_src   [NR];
  logic             rx_valid [NR];
  word_t            rx_data  [NR];
  logic [NBUS-1:0]  conflict;
  logic [31:0]      xfer_count [NBUS];
  int checks = 0, failures = 0;

  sync_bus_net #(.NBUS(NBUS), .NS(NS), .NR(NR), .CW(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle();
    for (int s = 0; s < NS; s++) begin tx_valid[s] = 0; tx_bus[s] = 0; tx_data[s] = 0; end
    for (int r = 0; r < NR; r++) begin rx_ready[r] = 0; rx_bus[r] = 0; rx_src[r] = 0; end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1: sender 0 on bus 1, nobody listening
    tx_valid[0] = 1; tx_bus[0] = 1; tx_data[0] = 32'hA0A0_0001;
    #1 check(!tx_ready[0], "no listener, not ready");
    // receiver 2 listens on bus 1 for sender 1: still not for sender 0
    rx_ready[2] = 1; rx_bus[2] = 1; rx_src[2] = 1;
    #1 check(!tx_ready[0], "wrong source, not ready");
    check(!rx_valid[2], "wrong source, no data");
    // now for sender 0
    rx_src[2] = 0;
    #1 check(tx_ready[0], "rendez-vous ready");
    check(rx_valid[2] && rx_data[2] == 32'hA0A0_0001, "rendez-vous data");
    @(negedge clk);
    check(xfer_count[1] == 1 && xfer_count[0] == 0, "count after one word");
    idle();
    // 2: broadcast sender 1 -> receivers 0 and 3 on bus 0; in parallel
    //    sender 2 -> receiver 1 on bus 1
    tx_valid[1] = 1; tx_bus[1] = 0; tx_data[1] = 32'h1111_2222;
    rx_ready[0] = 1; rx_bus[0] = 0; rx_src[0] = 1;
    rx_ready[3] = 1; rx_bus[3] = 0; rx_src[3] = 1;
    tx_valid[2] = 1; tx_bus[2] = 1; tx_data[2] = 32'h3333_4444;
    rx_ready[1] = 1; rx_bus[1] = 1; rx_src[1] = 2;
    #1 check(tx_ready[1] && tx_ready[2], "both buses ready");
    check(rx_valid[0] && rx_data[0] == 32'h1111_2222, "broadcast r0");
    check(rx_valid[3] && rx_data[3] == 32'h1111_2222, "broadcast r3");
    check(rx_valid[1] && rx_data[1] == 32'h3333_4444, "parallel bus 1");
    @(negedge clk);
    check(xfer_count[0] == 1 && xfer_count[1] == 2, "counts after parallel");
    check(conflict == 0, "no conflict yet");
    idle();
    // 3: two senders on bus 0 at once: conflict, no data (the network's
    //    own assertion would stop the run, so it is switched off here)
    $assertoff(0, dut);
    tx_valid[0] = 1; tx_bus[0] = 0; tx_data[0] = 1;
    tx_valid[1] = 1; tx_bus[1] = 0; tx_data[1] = 2;
    rx_ready[0] = 1; rx_bus[0] = 0; rx_src[0] = 0;
    #1 check(!rx_valid[0], "conflict: no data");
    @(negedge clk);
    check(conflict == 2'b01, "conflict flag");
    check(xfer_count[0] == 1, "conflict moved nothing");
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
