// tb_main_controller: self-checking test of the main controller. A model unit
// answers each start pulse with an end pulse after a random delay. Checks the
// fetch order 0,1,..,last,0,1,.. (global loop), that read comes one cycle
// before start, that a new start waits for the end of the previous
// instruction, the loop_wrap pulse, the three-cycle minimum per instruction
// and that dropping run stops after the running instruction.
module tb_main_controller;
  localparam int unsigned AW = 4;
  logic clk = 0, rst_n = 0;
  logic run, read, start, end_i, loop_wrap;
  logic [AW-1:0] last_addr, addr;
  int checks = 0, failures = 0;
  bit fast = 0;
  int expect_addr = 0, starts = 0, wraps = 0, busy = 0, delay = 0;
  bit prev_read = 0;
  logic [AW-1:0] read_addr;

  main_controller #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model of the unit: end after 'delay' cycles (0 = next cycle)
  always @(posedge clk) begin
    if (!rst_n) begin
      end_i <= 0; busy <= 0;
    end else begin
      end_i <= 0;
      if (start) begin
        check(busy == 0, "start only when unit idle");
        check(prev_read, "read precedes start");
        check(read_addr == AW'(expect_addr), "fetch order");
        expect_addr = (expect_addr == 32'(last_addr)) ? 0 : expect_addr + 1;
        starts++;
        busy  <= 1;
        delay = fast ? 0 : $urandom_range(0, 6);
        if (delay == 0) begin end_i <= 1; busy <= 0; end
      end else if (busy) begin
        if (delay <= 1) begin end_i <= 1; busy <= 0; end
        delay--;
      end
      prev_read <= read;
      if (read) read_addr <= addr;
      if (loop_wrap) wraps++;
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n;
    run = 0; last_addr = 4'd4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(starts == 0 && !read, "idle without run");
    run = 1;
    wait (starts == 12);
    @(negedge clk);
    check(wraps == 2, "two global loops after 12 instructions of 5");
    run = 0;
    n = starts;
    repeat (40) @(posedge clk);
    check(starts == n, "stops when run is low");
    // minimum instruction time: the unit ends at once
    @(negedge clk);
    run = 1; fast = 1;
    t0 = $time;
    wait (starts == n + 10);
    @(posedge clk);
    $display("10 instructions in %0d cycles", ($time - t0) / 10);
    check(($time - t0) / 10 == 30, "three cycles per instruction when the unit ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
