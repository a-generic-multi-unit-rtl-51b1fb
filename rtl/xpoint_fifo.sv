// xpoint_fifo: one asynchronous crosspoint of the communication network, a
// FIFO queue from one unit output to one unit input.
//
// A word is written when wr_valid is high and read when rd_ready is high and
// the queue is not empty. wr_ready (not full) and rd_valid (not empty) are the
// "data availability" a blocking transfer checks; a non blocking writer writes
// without looking, and a word written into a full queue is dropped and raises
// the sticky overflow flag. Storage is a circular buffer of DEPTH words with
// read and write pointers one bit wider than the address. Reads are
// first-word-fall-through: rd_data shows the head of the queue combinationally.
// A word written in a cycle can be read in the next one; a read and a write in
// the same cycle are allowed, also when full (the read frees the place).
// That crosspoints are FIFOs follows the architecture; the depth, the
// dropping of words on overflow and the reset behaviour (synchronous clear,
// active-low reset) are this design's choices.
module xpoint_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  output logic         wr_ready,
  input  logic         rd_ready,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic         overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic         full, empty, do_wr, do_rd;

  assign empty    = (wptr == rptr);
  assign full     = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_rd    = rd_ready && !empty;
  assign do_wr    = wr_valid && (!full || do_rd);
  assign wr_ready = !full || do_rd;
  assign rd_valid = !empty;
  assign rd_data  = mem[rptr[AW-1:0]];
  always_comb begin
    if (wptr[AW] == rptr[AW]) count = ($clog2(DEPTH+1))'(wptr[AW-1:0] - rptr[AW-1:0]);
    else count = ($clog2(DEPTH+1))'(DEPTH - 32'(rptr[AW-1:0]) + 32'(wptr[AW-1:0]));
  end

  function automatic logic [AW:0] bump(input logic [AW:0] p);
    // advance a pointer, wrapping the address part at DEPTH
    if (p[AW-1:0] == AW'(DEPTH-1)) return {~p[AW], {AW{1'b0}}};
    return p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= bump(wptr);
      if (do_rd) rptr <= bump(rptr);
      if (wr_valid && !do_wr) overflow <= 1'b1;
    end
  end
endmodule
