// fu_tile: one hardware unit of the architecture with everything that makes it
// a member of the template: its computation cell, its specific controller, its
// main controller and its local instruction memory.
//
// The main controller loops over the instructions in the instruction memory;
// the specific controller runs each one, moving the cell's data through the
// network crosspoints the instruction names and reporting its end. All units
// share this interface to the network (two inputs, one output) and to their
// control, whatever their cell, which is what lets heterogeneous units be
// mixed. CELL picks the cell: the FFT operator, the adder, a data memory or
// the input unit (whose queue-side port ext_* is unused by the others). The
// program is loaded through prog_* and runs while run is high; last_addr is
// the address of the segment's last instruction. end_o pulses when an
// instruction ends, loop_wrap when the segment starts over, stall is high
// while a blocking port waits. Timing is that of the parts. The structure
// follows the architecture's description of a unit; the two-input,
// one-output shape is taken from its figure of a unit and the rest are this
// design's choices.
module fu_tile
  import dspa_pkg::*;
#(
  parameter cell_e       CELL      = CELL_FFT,
  parameter int unsigned IM_DEPTH  = 16,
  parameter int unsigned NFFT      = 64,
  parameter int unsigned MAXLEN    = 64,
  parameter int unsigned MEM_DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [$clog2(IM_DEPTH)-1:0] last_addr,
  input  logic             prog_we,
  input  logic [$clog2(IM_DEPTH)-1:0] prog_addr,
  input  instr_t           prog_data,
  output logic             rx_ready [N_IN],
  output logic [SEL_W-1:0] rx_bus   [N_IN],
  output logic [SEL_W-1:0] rx_src   [N_IN],
  input  logic             rx_valid [N_IN],
  input  word_t            rx_data  [N_IN],
  output logic             tx_valid,
  output logic [SEL_W-1:0] tx_bus,
  output logic [SEL_W-1:0] tx_dst,
  output word_t            tx_data,
  input  logic             tx_ready,
  input  logic             ext_valid,
  input  word_t            ext_data,
  output logic             ext_ready,
  output logic             end_o,
  output logic             loop_wrap,
  output logic             stall,
  output logic             busy
);
  localparam int unsigned AW = $clog2(IM_DEPTH);

  logic          im_read, mc_start;
  logic [AW-1:0] im_addr;
  instr_t        instr;

  logic             cell_start, cell_done;
  opcode_e          cell_op;
  logic [LEN_W-1:0] cell_len;
  logic [ADDR_W-1:0] cell_base;
  logic             c_in_valid [N_IN];
  word_t            c_in_data  [N_IN];
  logic             c_in_ready [N_IN];
  logic             c_out_valid, c_out_ready;
  word_t            c_out_data;

  instr_mem #(.DEPTH(IM_DEPTH)) u_im (
    .clk, .rst_n,
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .read(im_read), .addr(im_addr), .instr(instr)
  );

  main_controller #(.AW(AW)) u_mc (
    .clk, .rst_n, .run, .last_addr,
    .read(im_read), .addr(im_addr), .start(mc_start),
    .end_i(end_o), .loop_wrap
  );

  specific_controller u_sc (
    .clk, .rst_n,
    .start(mc_start), .instr, .end_o,
    .rx_ready, .rx_bus, .rx_src, .rx_valid, .rx_data,
    .tx_valid, .tx_bus, .tx_dst, .tx_data, .tx_ready,
    .cell_start, .cell_op, .cell_len, .cell_base,
    .c_in_valid, .c_in_data, .c_in_ready,
    .c_out_valid, .c_out_data, .c_out_ready,
    .cell_done, .busy, .stall
  );

  if (CELL == CELL_FFT) begin : g_fft
    fft_cell #(.NFFT(NFFT)) u_cell (
      .clk, .rst_n, .start(cell_start), .op(cell_op), .len(cell_len), .base(cell_base),
      .in_valid(c_in_valid), .in_data(c_in_data), .in_ready(c_in_ready),
      .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready),
      .done(cell_done)
    );
  end else if (CELL == CELL_ADD) begin : g_add
    adder_cell #(.MAXLEN(MAXLEN)) u_cell (
      .clk, .rst_n, .start(cell_start), .op(cell_op), .len(cell_len), .base(cell_base),
      .in_valid(c_in_valid), .in_data(c_in_data), .in_ready(c_in_ready),
      .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready),
      .done(cell_done)
    );
  end else if (CELL == CELL_MEM) begin : g_mem
    data_mem_cell #(.DEPTH(MEM_DEPTH)) u_cell (
      .clk, .rst_n, .start(cell_start), .op(cell_op), .len(cell_len), .base(cell_base),
      .in_valid(c_in_valid), .in_data(c_in_data), .in_ready(c_in_ready),
      .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready),
      .done(cell_done)
    );
  end else begin : g_in
    input_cell u_cell (
      .clk, .rst_n, .start(cell_start), .op(cell_op), .len(cell_len), .base(cell_base),
      .in_valid(c_in_valid), .in_data(c_in_data), .in_ready(c_in_ready),
      .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(c_out_ready),
      .done(cell_done),
      .ext_valid, .ext_data, .ext_ready
    );
  end

  if (CELL != CELL_IN) begin : g_no_ext
    assign ext_ready = 1'b0;
  end
endmodule
