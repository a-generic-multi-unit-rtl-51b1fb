// specific_controller: the controller inside every hardware unit that carries
// out one coarse grain instruction. It is the unit's common interface to the
// network and to the main controller.
//
// On start it latches the instruction, pulses cell_start with the op-code,
// length and base address, and then connects the computation cell's two input
// streams and its output stream to the network crosspoints the instruction
// names. Each port follows the instruction's protocol. Blocking: a word is
// read only when the crosspoint shows one (rx_valid), and a word is offered
// only when the crosspoint can take it (tx_ready); that check comes first, so
// a waiting sender does not drive a shared bus. Non blocking: nothing is
// checked, the cell reads whatever the crosspoint holds and writes whenever it
// has a word, relying on the static schedule. An unused input never delivers
// data; the words of an unused output are thrown away. When the cell pulses
// cell_done, the controller pulses end_o to the main controller one cycle
// later and waits for the next start. stall is high in every cycle a blocking
// port waits. The roles (protocols, network, cell control, start/end) follow
// the architecture; the valid/ready streams between controller and cell and
// the cycle timing are this design's choices.
module specific_controller
  import dspa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // main controller and instruction memory
  input  logic             start,
  input  instr_t           instr,
  output logic             end_o,
  // network, inputs
  output logic             rx_ready [N_IN],
  output logic [SEL_W-1:0] rx_bus   [N_IN],
  output logic [SEL_W-1:0] rx_src   [N_IN],
  input  logic             rx_valid [N_IN],
  input  word_t            rx_data  [N_IN],
  // network, output
  output logic             tx_valid,
  output logic [SEL_W-1:0] tx_bus,
  output logic [SEL_W-1:0] tx_dst,
  output word_t            tx_data,
  input  logic             tx_ready,
  // computation cell
  output logic             cell_start,
  output opcode_e          cell_op,
  output logic [LEN_W-1:0] cell_len,
  output logic [ADDR_W-1:0] cell_base,
  output logic             c_in_valid [N_IN],
  output word_t            c_in_data  [N_IN],
  input  logic             c_in_ready [N_IN],
  input  logic             c_out_valid,
  input  word_t            c_out_data,
  output logic             c_out_ready,
  input  logic             cell_done,
  output logic             busy,
  output logic             stall
);
  instr_t ins;
  logic   active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ins        <= '0;
      active     <= 1'b0;
      cell_start <= 1'b0;
      end_o      <= 1'b0;
    end else begin
      cell_start <= 1'b0;
      end_o      <= 1'b0;
      if (!active && start) begin
        ins        <= instr;
        active     <= 1'b1;
        cell_start <= 1'b1;
      end else if (active && cell_done) begin
        active <= 1'b0;
        end_o  <= 1'b1;
      end
    end
  end

  assign busy      = active;
  assign cell_op   = ins.op;
  assign cell_len  = ins.len;
  assign cell_base = ins.base;

  always_comb begin
    stall = 1'b0;
    for (int p = 0; p < N_IN; p++) begin
      rx_bus[p]     = ins.in[p].bus;
      rx_src[p]     = ins.in[p].src;
      rx_ready[p]   = active && ins.in[p].en && c_in_ready[p];
      c_in_data[p]  = rx_data[p];
      c_in_valid[p] = active && ins.in[p].en &&
                      ((ins.in[p].prot == PROT_BLOCK) ? rx_valid[p] : 1'b1);
      if (active && ins.in[p].en && ins.in[p].prot == PROT_BLOCK &&
          c_in_ready[p] && !rx_valid[p])
        stall = 1'b1;
    end
    tx_bus  = ins.out.bus;
    tx_dst  = ins.out.dst;
    tx_data = c_out_data;
    if (ins.out.prot == PROT_BLOCK) begin
      tx_valid    = active && ins.out.en && c_out_valid && tx_ready;
      c_out_ready = active && (!ins.out.en || tx_ready);
    end else begin
      tx_valid    = active && ins.out.en && c_out_valid;
      c_out_ready = active;
    end
    if (active && ins.out.en && ins.out.prot == PROT_BLOCK && c_out_valid && !tx_ready)
      stall = 1'b1;
  end

  // A cell finishes only an instruction it was given, and a blocking output
  // never offers a word the crosspoint cannot take.
  a_done_active: assert property (@(posedge clk) disable iff (!rst_n)
    cell_done |-> active)
    else $error("specific_controller: cell done while idle");
  a_block_tx: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && ins.out.prot == PROT_BLOCK) |-> tx_ready)
    else $error("specific_controller: blocking word offered without room");
endmodule
