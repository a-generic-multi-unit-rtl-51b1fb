// instr_mem: the local instruction memory of one unit. It holds the unit's
// segment of coarse grain instructions, produced off line by partitioning and
// scheduling the application's data flow graph.
//
// The main controller reads it: with read high in one cycle, instr shows the
// word at addr from the next clock edge on and holds it until the next read.
// A write port (we, waddr, wdata) loads the segment before the unit runs.
// The memory itself follows the architecture; its depth, the one-cycle
// registered read and the load port are this design's choices. Contents are
// not reset; instr is cleared by reset.
module instr_mem
  import dspa_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  instr_t                   wdata,
  input  logic                     read,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output instr_t                   instr
);
  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    instr <= '0;
    else if (read) instr <= mem[addr];
  end
endmodule
