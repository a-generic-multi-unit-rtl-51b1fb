// adder_cell: the adder hardware operator. It adds two vectors of complex
// words, component by component (real with real, imaginary with imaginary,
// signed 16-bit, saturating).
//
// After cell_start with OP_ADD and a length len (1..MAXLEN) it works in three
// phases: it reads len words from input 0 into a local buffer, then reads len
// words from input 1 and adds each to the buffered word of the same index,
// then sends the len sums on its output and pulses done after the last one.
// Using one stream at a time lets the unit sit on a network of only two buses
// and lets one memory unit both feed it and, with its next instruction, take
// its result. With all streams ready an addition of len words takes 3*len
// cycles plus one. Any other op-code finishes at once. That the unit adds
// follows the architecture; the complex word format, saturation, the buffer
// and the three phases are this design's choices.
module adder_cell
  import dspa_pkg::*;
#(
  parameter int unsigned MAXLEN = 64
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
  localparam int unsigned AW = $clog2(MAXLEN);
  typedef logic signed [15:0] s16_t;
  typedef enum logic [1:0] {S_IDLE, S_A, S_B, S_OUT} state_e;

  state_e           state;
  word_t            buffer [MAXLEN];
  logic [LEN_W-1:0] n, cnt;

  function automatic s16_t sat_add(input s16_t a, input s16_t b);
    logic signed [16:0] s;
    s = 17'(a) + 17'(b);
    if (s > 17'sd32767)  return 16'sh7fff;
    if (s < -17'sd32768) return 16'sh8000;
    return s[15:0];
  endfunction

  word_t cur, sum;
  assign cur = buffer[cnt[AW-1:0]];
  assign sum = {sat_add(cur[31:16], in_data[1][31:16]),
                sat_add(cur[15:0],  in_data[1][15:0])};

  assign in_ready[0] = (state == S_A);
  assign in_ready[1] = (state == S_B);
  assign out_valid   = (state == S_OUT);
  assign out_data    = cur;

  always_ff @(posedge clk) begin
    if (state == S_A && in_valid[0]) buffer[cnt[AW-1:0]] <= in_data[0];
    if (state == S_B && in_valid[1]) buffer[cnt[AW-1:0]] <= sum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n     <= '0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            if (op == OP_ADD && len != '0 && 32'(len) <= MAXLEN) begin
              n     <= len;
              cnt   <= '0;
              state <= S_A;
            end else begin
              done <= 1'b1;
            end
          end
        S_A:
          if (in_valid[0]) begin
            cnt <= cnt + 1'b1;
            if (cnt == n - 1'b1) begin
              cnt   <= '0;
              state <= S_B;
            end
          end
        S_B:
          if (in_valid[1]) begin
            cnt <= cnt + 1'b1;
            if (cnt == n - 1'b1) begin
              cnt   <= '0;
              state <= S_OUT;
            end
          end
        S_OUT:
          if (out_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == n - 1'b1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
