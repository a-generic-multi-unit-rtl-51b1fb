// gmdf_arch: the hardware/software architecture for the GMDF-alpha acoustic
// echo canceller, an instance of the multi-unit template.
//
// Six units share one communication network. Their network indices are
//   0 In  (input unit, fed by the input data queue)
//   1 FFT (FFT / FFT^-1 operator)
//   2 DSP (the programmable signal processor: not in this RTL, its network
//          ports are the dsp_* ports of this module)
//   3 Add (adder)
//   4 Hr  (memory of the real parts of the filter coefficients)
//   5 Hi  (memory of the imaginary parts)
// Every unit has two network inputs, numbered unit*2 and unit*2+1, and one
// output. The five hardware units are fu_tile instances, each with its own
// main controller and instruction memory, loaded through prog_* (prog_unit
// picks the unit) and run while run is high; seg_last[u] is the last address
// of unit u's segment.
// NET_FIFO selects the network. 0 (default): the network after communication
// synthesis, NBUS shared buses with synchronous crosspoints; all transfers of
// the application are then synchronous. 1: the raw template network, a
// crossbar whose crosspoints are FIFOs of FIFO_DEPTH words, one line per unit
// output. The same programs run on both, as long as each instruction names
// the bus for the first and the destination input for the second.
// NET_MIXED = 1 (with NET_FIFO = 0) builds both: the network a communication
// synthesis leaves when some transfers must stay asynchronous. A port whose
// instruction names bus BUS_ASYNC then uses its FIFO crosspoint, any other
// bus number uses that bus. FIFO_CONNECT picks which crosspoints exist (bit
// s*12+r: unit s to input r), so the crossbar can be kept to the edges that
// need it.
// The set of units, the two networks and the two buses come from the
// architecture; word format, sizes, port shapes and status outputs are this
// design's choices. Status: unit_end / loop_wrap / unit_stall per unit index
// (DSP bit tied low), bus_conflict and bus_xfers of the buses (zero with the
// FIFO crossbar alone), xbar_overflow of the FIFO crosspoints (zero with the
// buses alone) and in_overflow of the input queue. Selecting the network per
// port by a reserved bus number is this design's choice.
module gmdf_arch
  import dspa_pkg::*;
#(
  parameter bit          NET_FIFO   = 1'b0,
  parameter bit          NET_MIXED  = 1'b0,
  parameter logic [71:0] FIFO_CONNECT = '1,
  parameter int unsigned NBUS       = 2,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned NFFT       = 64,
  parameter int unsigned MEM_DEPTH  = 1024,
  parameter int unsigned IN_DEPTH   = 64,
  parameter int unsigned IM_DEPTH   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // program loading
  input  logic             prog_we,
  input  logic [SEL_W-1:0] prog_unit,
  input  logic [$clog2(IM_DEPTH)-1:0] prog_addr,
  input  instr_t           prog_instr,
  input  logic [$clog2(IM_DEPTH)-1:0] seg_last [6],
  // input data queue
  input  logic             in_valid,
  input  word_t            in_data,
  output logic             in_ready,
  // network ports of the DSP unit (index 2)
  input  logic             dsp_tx_valid,
  input  logic [SEL_W-1:0] dsp_tx_bus,
  input  logic [SEL_W-1:0] dsp_tx_dst,
  input  word_t            dsp_tx_data,
  output logic             dsp_tx_ready,
  input  logic             dsp_rx_ready [N_IN],
  input  logic [SEL_W-1:0] dsp_rx_bus   [N_IN],
  input  logic [SEL_W-1:0] dsp_rx_src   [N_IN],
  output logic             dsp_rx_valid [N_IN],
  output word_t            dsp_rx_data  [N_IN],
  // status
  output logic [5:0]       unit_end,
  output logic [5:0]       loop_wrap,
  output logic [5:0]       unit_stall,
  output logic [NBUS-1:0]  bus_conflict,
  output logic [31:0]      bus_xfers [NBUS],
  output logic             xbar_overflow,
  output logic             in_overflow
);
  localparam int unsigned NU = 6;
  localparam int unsigned NR = NU * N_IN;
  localparam int unsigned DSP = 2;
  localparam cell_e CELLS [NU] = '{CELL_IN, CELL_FFT, CELL_FFT, CELL_ADD, CELL_MEM, CELL_MEM};

  // network side of every unit
  logic             tx_valid [NU];
  logic [SEL_W-1:0] tx_bus   [NU];
  logic [SEL_W-1:0] tx_dst   [NU];
  word_t            tx_data  [NU];
  logic             tx_ready [NU];
  logic             rx_ready [NR];
  logic [SEL_W-1:0] rx_bus   [NR];
  logic [SEL_W-1:0] rx_src   [NR];
  logic             rx_valid [NR];
  word_t            rx_data  [NR];

  // input data queue
  logic  q_valid, q_ready;
  word_t q_data;

  xpoint_fifo #(.W(DATA_W), .DEPTH(IN_DEPTH)) u_in_queue (
    .clk, .rst_n,
    .wr_valid(in_valid), .wr_data(in_data), .wr_ready(in_ready),
    .rd_ready(q_ready), .rd_valid(q_valid), .rd_data(q_data),
    .count(), .overflow(in_overflow)
  );

  for (genvar u = 0; u < NU; u++) begin : g_unit
    if (u == DSP) begin : g_dsp
      assign tx_valid[u]     = dsp_tx_valid;
      assign tx_bus[u]       = dsp_tx_bus;
      assign tx_dst[u]       = dsp_tx_dst;
      assign tx_data[u]      = dsp_tx_data;
      assign dsp_tx_ready    = tx_ready[u];
      for (genvar p = 0; p < N_IN; p++) begin : g_p
        assign rx_ready[u*N_IN+p] = dsp_rx_ready[p];
        assign rx_bus[u*N_IN+p]   = dsp_rx_bus[p];
        assign rx_src[u*N_IN+p]   = dsp_rx_src[p];
        assign dsp_rx_valid[p]    = rx_valid[u*N_IN+p];
        assign dsp_rx_data[p]     = rx_data[u*N_IN+p];
      end
      assign unit_end[u]   = 1'b0;
      assign loop_wrap[u]  = 1'b0;
      assign unit_stall[u] = 1'b0;
    end else begin : g_hw
      logic             t_rx_ready [N_IN];
      logic [SEL_W-1:0] t_rx_bus   [N_IN];
      logic [SEL_W-1:0] t_rx_src   [N_IN];
      logic             t_rx_valid [N_IN];
      word_t            t_rx_data  [N_IN];
      logic             t_ext_ready;

      for (genvar p = 0; p < N_IN; p++) begin : g_p
        assign rx_ready[u*N_IN+p] = t_rx_ready[p];
        assign rx_bus[u*N_IN+p]   = t_rx_bus[p];
        assign rx_src[u*N_IN+p]   = t_rx_src[p];
        assign t_rx_valid[p]      = rx_valid[u*N_IN+p];
        assign t_rx_data[p]       = rx_data[u*N_IN+p];
      end

      fu_tile #(
        .CELL(CELLS[u]), .IM_DEPTH(IM_DEPTH), .NFFT(NFFT),
        .MAXLEN(NFFT), .MEM_DEPTH(MEM_DEPTH)
      ) u_tile (
        .clk, .rst_n, .run,
        .last_addr(seg_last[u]),
        .prog_we(prog_we && 32'(prog_unit) == u),
        .prog_addr, .prog_data(prog_instr),
        .rx_ready(t_rx_ready), .rx_bus(t_rx_bus), .rx_src(t_rx_src),
        .rx_valid(t_rx_valid), .rx_data(t_rx_data),
        .tx_valid(tx_valid[u]), .tx_bus(tx_bus[u]), .tx_dst(tx_dst[u]),
        .tx_data(tx_data[u]), .tx_ready(tx_ready[u]),
        .ext_valid(u == 0 ? q_valid : 1'b0),
        .ext_data(u == 0 ? q_data : '0),
        .ext_ready(t_ext_ready),
        .end_o(unit_end[u]), .loop_wrap(loop_wrap[u]),
        .stall(unit_stall[u]), .busy()
      );
      if (u == 0) begin : g_q
        assign q_ready = t_ext_ready;
      end
    end
  end

  if (NET_MIXED && !NET_FIFO) begin : g_mixed_net
    // split every port between the two networks by its bus number
    logic             f_tx_valid [NU], b_tx_valid [NU];
    logic             f_tx_ready [NU], b_tx_ready [NU];
    logic             f_rx_ready [NR], b_rx_ready [NR];
    logic             f_rx_valid [NR], b_rx_valid [NR];
    word_t            f_rx_data  [NR], b_rx_data  [NR];
    logic [NU*NR-1:0] ovf;

    always_comb begin
      for (int u = 0; u < NU; u++) begin
        f_tx_valid[u] = tx_valid[u] && tx_bus[u] == BUS_ASYNC;
        b_tx_valid[u] = tx_valid[u] && tx_bus[u] != BUS_ASYNC;
        tx_ready[u]   = (tx_bus[u] == BUS_ASYNC) ? f_tx_ready[u] : b_tx_ready[u];
      end
      for (int r = 0; r < NR; r++) begin
        f_rx_ready[r] = rx_ready[r] && rx_bus[r] == BUS_ASYNC;
        b_rx_ready[r] = rx_ready[r] && rx_bus[r] != BUS_ASYNC;
        rx_valid[r]   = (rx_bus[r] == BUS_ASYNC) ? f_rx_valid[r] : b_rx_valid[r];
        rx_data[r]    = (rx_bus[r] == BUS_ASYNC) ? f_rx_data[r]  : b_rx_data[r];
      end
    end

    fifo_crossbar #(.NS(NU), .NR(NR), .DEPTH(FIFO_DEPTH), .CONNECT(FIFO_CONNECT)) u_fifo (
      .clk, .rst_n,
      .tx_valid(f_tx_valid), .tx_dst, .tx_data, .tx_ready(f_tx_ready),
      .rx_ready(f_rx_ready), .rx_src, .rx_valid(f_rx_valid), .rx_data(f_rx_data),
      .overflow(ovf)
    );
    sync_bus_net #(.NBUS(NBUS), .NS(NU), .NR(NR), .CW(32)) u_bus (
      .clk, .rst_n,
      .tx_valid(b_tx_valid), .tx_bus, .tx_data, .tx_ready(b_tx_ready),
      .rx_ready(b_rx_ready), .rx_bus, .rx_src, .rx_valid(b_rx_valid), .rx_data(b_rx_data),
      .conflict(bus_conflict), .xfer_count(bus_xfers)
    );
    assign xbar_overflow = |ovf;
  end else if (NET_FIFO) begin : g_fifo_net
    logic [NU*NR-1:0] ovf;
    fifo_crossbar #(.NS(NU), .NR(NR), .DEPTH(FIFO_DEPTH), .CONNECT(FIFO_CONNECT)) u_net (
      .clk, .rst_n,
      .tx_valid, .tx_dst, .tx_data, .tx_ready,
      .rx_ready, .rx_src, .rx_valid, .rx_data,
      .overflow(ovf)
    );
    assign xbar_overflow = |ovf;
    assign bus_conflict  = '0;
    for (genvar b = 0; b < NBUS; b++) begin : g_b
      assign bus_xfers[b] = '0;
    end
  end else begin : g_bus_net
    sync_bus_net #(.NBUS(NBUS), .NS(NU), .NR(NR), .CW(32)) u_net (
      .clk, .rst_n,
      .tx_valid, .tx_bus, .tx_data, .tx_ready,
      .rx_ready, .rx_bus, .rx_src, .rx_valid, .rx_data,
      .conflict(bus_conflict), .xfer_count(bus_xfers)
    );
    assign xbar_overflow = 1'b0;
  end
endmodule
