// input_cell: the input communication unit. It takes samples from the
// application's input data queue and puts them on the network, so the
// outside world is one more unit, controlled like the others.
//
// After cell_start with OP_INPUT and a length len it passes len words from
// the queue side (ext_valid / ext_data / ext_ready) to its output stream, one
// per cycle when both sides are ready, with no storage (the word goes straight
// from the head of the queue to the network), and pulses done after the last.
// Any other op-code, or len = 0, finishes at once. The network inputs of the
// unit are not used. An input unit fed by an input data queue follows the
// architecture; the operation and its word counting are this design's
// choices.
module input_cell
  import dspa_pkg::*;
(
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
  output logic             done,
  input  logic             ext_valid,
  input  word_t            ext_data,
  output logic             ext_ready
);
  logic             active;
  logic [LEN_W-1:0] left;

  assign in_ready[0] = 1'b0;
  assign in_ready[1] = 1'b0;
  assign out_valid   = active && ext_valid;
  assign out_data    = ext_data;
  assign ext_ready   = active && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      left   <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          if (op == OP_INPUT && len != '0) begin
            active <= 1'b1;
            left   <= len;
          end else begin
            done <= 1'b1;
          end
        end
      end else if (ext_valid && out_ready) begin
        left <= left - 1'b1;
        if (left == LEN_W'(1)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule
