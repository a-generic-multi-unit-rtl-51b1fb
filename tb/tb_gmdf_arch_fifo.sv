// tb_gmdf_arch_fifo: end-to-end test of the GMDF-alpha architecture on the raw
// template network, the crossbar of FIFO crosspoints (NET_FIFO = 1), with the
// same programs and scenario as the bus network test. The
// gmdf_host model drives and checks it; see that file for the scenario.
module tb_gmdf_arch_fifo;
  import dspa_pkg::*;
  logic             clk, rst_n, run, prog_we;
  logic [SEL_W-1:0] prog_unit;
  logic [3:0]       prog_addr;
  instr_t           prog_instr;
  logic [3:0]       seg_last [6];
  logic             in_valid, in_ready;
  word_t            in_data;
  logic             dsp_tx_valid, dsp_tx_ready;
  logic [SEL_W-1:0] dsp_tx_bus, dsp_tx_dst;
  word_t            dsp_tx_data;
  logic             dsp_rx_ready [N_IN];
  logic [SEL_W-1:0] dsp_rx_bus [N_IN], dsp_rx_src [N_IN];
  logic             dsp_rx_valid [N_IN];
  word_t            dsp_rx_data [N_IN];
  logic [5:0]       unit_end, loop_wrap, unit_stall;
  logic [1:0]       bus_conflict;
  logic [31:0]      bus_xfers [2];
  logic             xbar_overflow, in_overflow;

  gmdf_arch #(.NET_FIFO(1'b1)) dut (.*);
  // outer watchdog, behind the host's own: ends a run the host never ends
  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", host.checks, host.failures + 1);
    $finish;
  end

  gmdf_host #(.NET_FIFO(1'b1)) host (.*);
endmodule
