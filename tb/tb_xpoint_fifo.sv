// tb_xpoint_fifo: self-checking test of the FIFO crosspoint. Random writes
// and reads (including writes into a full queue) are compared, cycle by
// cycle, with a queue model: head word, empty/full flags, fill count and the
// sticky overflow flag. Uses a depth of 5 so that the pointer wrap at a
// non-power-of-two depth is exercised.
module tb_xpoint_fifo;
  localparam int unsigned W = 16, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_ready, rd_valid, overflow;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  bit model_ovf;

  xpoint_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_valid = ($urandom_range(0, 99) < (i < 1500 ? 70 : 35));
      rd_ready = ($urandom_range(0, 99) < (i < 1500 ? 35 : 70));
      wr_data  = W'($urandom);
      #1;
      check(rd_valid == (model.size() != 0), "rd_valid");
      check(wr_ready == (model.size() < DEPTH || rd_ready), "wr_ready");
      check(32'(count) == model.size(), "count");
      check(overflow == model_ovf, "overflow");
      if (model.size() != 0) check(rd_data == model[0], "rd_data");
      @(posedge clk);
      begin
        bit do_rd;
        do_rd = rd_ready && model.size() != 0;
        if (wr_valid && !(model.size() < DEPTH || do_rd)) model_ovf = 1;
        if (do_rd) void'(model.pop_front());
        if (wr_valid && model.size() < DEPTH) model.push_back(wr_data);
      end
    end
    check(model_ovf, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
