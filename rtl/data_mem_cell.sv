// data_mem_cell: a data memory unit, used for the filter coefficient memories
// (real parts in one unit, imaginary parts in another) and, in general, for a
// memory unit on the network.
//
// OP_STORE reads len words from input 0 and writes them at addresses base,
// base+1, ... ; OP_LOAD sends the len words found from address base on its
// output. Addresses wrap at DEPTH. One word moves per cycle when the stream is
// ready, so either operation takes len cycles plus one, and done is pulsed
// after the last word. Any other op-code, or len = 0, finishes at once. The
// memory unit itself follows the architecture; the depth, the operations and
// their encoding are this design's choices. The array has a combinational
// read port and one write port; it is not reset.
module data_mem_cell
  import dspa_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  opcode_e          op,
  input  logic [LEN_W-1:0] len,
  input  logic [ADDR_W-1:0] base,
  input  logic             in_valid [N_IN],
  input  word_t            in_data  [N_IN],
  output logic             in_ready [N_IN],
  output logic             out_valid,
  output word_t            out_data,
  input  logic             out_ready,
  output logic             done
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef enum logic [1:0] {S_IDLE, S_STORE, S_LOAD} state_e;

  state_e           state;
  word_t            mem [DEPTH];
  logic [AW-1:0]    ptr;
  logic [LEN_W-1:0] left;

  assign in_ready[0] = (state == S_STORE);
  assign in_ready[1] = 1'b0;
  assign out_valid   = (state == S_LOAD);
  assign out_data    = mem[ptr];

  always_ff @(posedge clk) begin
    if (state == S_STORE && in_valid[0]) mem[ptr] <= in_data[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ptr   <= '0;
      left  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            ptr  <= AW'(base);
            left <= len;
            if (len == '0)           done  <= 1'b1;
            else if (op == OP_STORE) state <= S_STORE;
            else if (op == OP_LOAD)  state <= S_LOAD;
            else                     done  <= 1'b1;
          end
        S_STORE, S_LOAD:
          if ((state == S_STORE) ? in_valid[0] : out_ready) begin
            ptr  <= ptr + 1'b1;
            left <= left - 1'b1;
            if (left == LEN_W'(1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
