// fifo_crossbar: the raw communication network of the architecture, an
// (in)complete crossbar whose every crosspoint is a FIFO queue.
//
// There are NS sending unit outputs and NR receiving unit inputs. Crosspoint
// (s, r) exists when bit s*NR+r of CONNECT is set and is then an xpoint_fifo.
// A sender picks the crosspoint with tx_dst (the receiving input's index) and a
// receiver picks it with rx_src (the sending unit's index), both taken from the
// instruction a unit is running. Because every crosspoint buffers, sender and
// receiver need not be active at the same time: this is the asynchronous
// transfer mode. tx_ready / rx_valid show the not-full / not-empty state of
// the selected crosspoint and are what a blocking transfer waits on. A sender
// that selects a missing crosspoint never sees tx_ready, and a receiver that
// selects a missing one never sees rx_valid. overflow[s*NR+r] is the sticky
// flag of crosspoint (s, r), set when a non blocking writer wrote into it
// while it was full. The FIFO crosspoints and the crossbar follow the
// architecture; the depth and the all-present default of CONNECT are choices
// of this design.
module fifo_crossbar
  import dspa_pkg::*;
#(
  parameter int unsigned NS    = 6,
  parameter int unsigned NR    = 12,
  parameter int unsigned DEPTH = 16,
  parameter logic [NS*NR-1:0] CONNECT = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_valid [NS],
  input  logic [SEL_W-1:0] tx_dst   [NS],
  input  word_t            tx_data  [NS],
  output logic             tx_ready [NS],
  input  logic             rx_ready [NR],
  input  logic [SEL_W-1:0] rx_src   [NR],
  output logic             rx_valid [NR],
  output word_t            rx_data  [NR],
  output logic [NS*NR-1:0] overflow
);
  logic  x_wr_valid [NS][NR];
  logic  x_wr_ready [NS][NR];
  logic  x_rd_ready [NS][NR];
  logic  x_rd_valid [NS][NR];
  word_t x_rd_data  [NS][NR];

  for (genvar s = 0; s < NS; s++) begin : g_s
    for (genvar r = 0; r < NR; r++) begin : g_r
      if (CONNECT[s*NR+r]) begin : g_xp
        assign x_wr_valid[s][r] = tx_valid[s] && (32'(tx_dst[s]) == r);
        assign x_rd_ready[s][r] = rx_ready[r] && (32'(rx_src[r]) == s);
        xpoint_fifo #(.W(DATA_W), .DEPTH(DEPTH)) u_xp (
          .clk, .rst_n,
          .wr_valid (x_wr_valid[s][r]),
          .wr_data  (tx_data[s]),
          .wr_ready (x_wr_ready[s][r]),
          .rd_ready (x_rd_ready[s][r]),
          .rd_valid (x_rd_valid[s][r]),
          .rd_data  (x_rd_data[s][r]),
          .count    (),
          .overflow (overflow[s*NR+r])
        );
      end else begin : g_none
        assign x_wr_valid[s][r] = 1'b0;
        assign x_rd_ready[s][r] = 1'b0;
        assign x_wr_ready[s][r] = 1'b0;
        assign x_rd_valid[s][r] = 1'b0;
        assign x_rd_data[s][r]  = '0;
        assign overflow[s*NR+r] = 1'b0;
      end
    end
  end

  // Per-port selection of the crosspoint named by the running instruction.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      tx_ready[s] = 1'b0;
      for (int r = 0; r < NR; r++)
        if (32'(tx_dst[s]) == r) tx_ready[s] = x_wr_ready[s][r];
    end
    for (int r = 0; r < NR; r++) begin
      rx_valid[r] = 1'b0;
      rx_data[r]  = '0;
      for (int s = 0; s < NS; s++)
        if (32'(rx_src[r]) == s) begin
          rx_valid[r] = x_rd_valid[s][r];
          rx_data[r]  = x_rd_data[s][r];
        end
    end
  end
endmodule
