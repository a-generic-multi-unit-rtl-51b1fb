// tb_instr_mem: self-checking test of the instruction memory. Writes random
// instructions at every address, reads them back in a random order and
// checks the one-cycle read latency and that the output holds between reads.
module tb_instr_mem;
  import dspa_pkg::*;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic we, read;
  logic [$clog2(DEPTH)-1:0] waddr, addr;
  instr_t wdata, instr;
  instr_t model [DEPTH];
  int checks = 0, failures = 0;

  instr_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic instr_t rnd();
    logic [63:0] v;
    v = {$urandom, $urandom};
    return instr_t'(v);
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; read = 0; waddr = 0; addr = 0; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(instr == '0, "reset clears output");
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 4'(a); wdata = rnd(); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 40; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      read = 1; addr = 4'(a);
      @(negedge clk);
      read = 0; addr = 4'($urandom);
      check(instr == model[a], "read data after one cycle");
      @(negedge clk);
      check(instr == model[a], "output holds without read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
