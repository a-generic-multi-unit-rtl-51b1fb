// sync_bus_net: the communication network after communication synthesis, a
// few shared buses whose crosspoints use the synchronous (rendez-vous)
// transfer mode and hold no data.
//
// NS unit outputs and NR unit inputs sit on NBUS buses. A sender names the bus
// it drives (tx_bus); a receiver names the bus it listens on and the unit it
// expects data from (rx_bus, rx_src); together these are the crosspoint
// locations an instruction carries. A word moves in the cycle in which the
// sender offers it (tx_valid) and a receiver listening on that bus for that
// sender is ready (rx_ready): both sides meet, nothing is stored. tx_ready
// tells a sender that such a receiver is ready now. Several receivers may
// listen to one sender (broadcast); the word goes to all of them that are
// ready. Two senders that drive one bus in the same cycle are a schedule error:
// the bus then carries neither, and the sticky conflict flag of that bus is
// set. xfer_count counts the words each bus carried. Shared buses with
// synchronous crosspoints follow the architecture; naming the sender at the
// receiver, the broadcast rule and the conflict flag are this design's
// choices. A blocking sender drives the bus only once a receiver is ready for
// it (see specific_controller), so senders waiting on the same bus for
// different receivers do not collide.
module sync_bus_net
  import dspa_pkg::*;
#(
  parameter int unsigned NBUS = 2,
  parameter int unsigned NS   = 6,
  parameter int unsigned NR   = 12,
  parameter int unsigned CW   = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_valid [NS],
  input  logic [SEL_W-1:0] tx_bus   [NS],
  input  word_t            tx_data  [NS],
  output logic             tx_ready [NS],
  input  logic             rx_ready [NR],
  input  logic [SEL_W-1:0] rx_bus   [NR],
  input  logic [SEL_W-1:0] rx_src   [NR],
  output logic             rx_valid [NR],
  output word_t            rx_data  [NR],
  output logic [NBUS-1:0]  conflict,
  output logic [CW-1:0]    xfer_count [NBUS]
);
  logic             bus_valid [NBUS];
  logic [SEL_W-1:0] bus_src   [NBUS];
  word_t            bus_data  [NBUS];
  logic [NBUS-1:0]  bus_multi;
  logic [NBUS-1:0]  bus_taken;

  // Bus drive: the one sender offering a word on each bus.
  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      int unsigned n;
      n            = 0;
      bus_valid[b] = 1'b0;
      bus_src[b]   = '0;
      bus_data[b]  = '0;
      for (int s = 0; s < NS; s++)
        if (tx_valid[s] && 32'(tx_bus[s]) == b) begin
          n++;
          bus_src[b]  = SEL_W'(s);
          bus_data[b] = tx_data[s];
        end
      bus_multi[b] = (n > 1);
      bus_valid[b] = (n == 1);
    end
  end

  // Receivers see the word of their bus when it comes from the expected unit.
  always_comb begin
    for (int b = 0; b < NBUS; b++) bus_taken[b] = 1'b0;
    for (int r = 0; r < NR; r++) begin
      rx_valid[r] = 1'b0;
      rx_data[r]  = '0;
      for (int b = 0; b < NBUS; b++)
        if (32'(rx_bus[r]) == b) begin
          rx_valid[r] = bus_valid[b] && (bus_src[b] == rx_src[r]);
          rx_data[r]  = bus_data[b];
          if (rx_valid[r] && rx_ready[r]) bus_taken[b] = 1'b1;
        end
    end
  end

  // A sender is ready when some receiver on its bus waits for it.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      tx_ready[s] = 1'b0;
      for (int r = 0; r < NR; r++)
        if (rx_ready[r] && rx_bus[r] == tx_bus[s] && 32'(rx_src[r]) == s)
          tx_ready[s] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      conflict <= '0;
      for (int b = 0; b < NBUS; b++) xfer_count[b] <= '0;
    end else begin
      conflict <= conflict | bus_multi;
      for (int b = 0; b < NBUS; b++)
        if (bus_taken[b]) xfer_count[b] <= xfer_count[b] + 1'b1;
    end
  end

  // A correct static schedule never drives one bus twice at once.
  always_ff @(posedge clk)
    if (rst_n) assert (bus_multi == '0)
      else $error("sync_bus_net: two senders on one bus");

endmodule
