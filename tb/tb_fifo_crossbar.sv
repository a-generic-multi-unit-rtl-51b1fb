// tb_fifo_crossbar: self-checking test of the FIFO crossbar network with 3
// senders, 4 receivers and crosspoint (2,3) left out. Each sender writes a
// numbered stream to a receiver while no one reads (asynchronous transfer:
// the words wait in the crosspoints), then the receivers read them back and
// the order and content are checked per crosspoint. Also checks that a
// receiver only sees the crosspoint it selects, that a missing crosspoint
// never accepts a word, and the overflow flag after a write into a full
// crosspoint.
module tb_fifo_crossbar;
  import dspa_pkg::*;
  localparam int unsigned NS = 3, NR = 4, DEPTH = 4;
  localparam logic [NS*NR-1:0] CONNECT = ~(12'(1) << (2*NR+3));
  logic clk = 0, rst_n = 0;
  logic             tx_valid [NS];
  logic [SEL_W-1:0] tx_dst   [NS];
  word_t            tx_data  [NS];
  logic             tx_ready [NS];
  logic             rx_ready [NR];
  logic [SEL_W-1:0] rx_src   [NR];
  logic             rx_valid [NR];
  word_t            rx_data  [NR];
  logic [NS*NR-1:0] overflow;
  int checks = 0, failures = 0;

  fifo_crossbar #(.NS(NS), .NR(NR), .DEPTH(DEPTH), .CONNECT(CONNECT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NS; s++) begin tx_valid[s] = 0; tx_dst[s] = 0; tx_data[s] = 0; end
    for (int r = 0; r < NR; r++) begin rx_ready[r] = 0; rx_src[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // every existing crosspoint gets 3 words {s, r, k}
    for (int s = 0; s < NS; s++)
      for (int r = 0; r < NR; r++) begin
        @(negedge clk);
        for (int k = 0; k < 3; k++) begin
          tx_valid[s] = 1; tx_dst[s] = SEL_W'(r); tx_data[s] = {8'(s), 8'(r), 16'(k)};
          #1 check(tx_ready[s] == CONNECT[s*NR+r], "write ready matches crosspoint");
          @(negedge clk);
        end
        tx_valid[s] = 0;
      end
    // a receiver only sees the crosspoint it names
    rx_src[1] = 2;
    #1 check(rx_valid[1] && rx_data[1] == {8'd2, 8'd1, 16'd0}, "select crosspoint (2,1)");
    rx_src[3] = 2;
    #1 check(!rx_valid[3], "missing crosspoint (2,3) is empty");
    // read back in order
    for (int r = 0; r < NR; r++)
      for (int s = 0; s < NS; s++) begin
        if (!CONNECT[s*NR+r]) continue;
        rx_src[r] = SEL_W'(s);
        for (int k = 0; k < 3; k++) begin
          rx_ready[r] = 1;
          #1 check(rx_valid[r] && rx_data[r] == {8'(s), 8'(r), 16'(k)}, "read back order");
          @(negedge clk);
        end
        rx_ready[r] = 0;
        #1 check(!rx_valid[r], "crosspoint drained");
      end
    check(overflow == '0, "no overflow yet");
    // overflow: 5 non blocking writes into a depth-4 crosspoint
    for (int k = 0; k < DEPTH + 1; k++) begin
      tx_valid[0] = 1; tx_dst[0] = 1; tx_data[0] = 32'(k);
      @(negedge clk);
    end
    tx_valid[0] = 0;
    check(overflow == (12'(1) << 1), "overflow flag of crosspoint (0,1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
