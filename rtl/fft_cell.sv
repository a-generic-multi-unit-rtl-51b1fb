// fft_cell: the FFT hardware operator, computing either the FFT or the
// inverse FFT (FFT^-1) of NFFT complex samples, chosen by the op-code.
//
// Words are complex: real part in bits 31:16, imaginary part in bits 15:0,
// both signed 16-bit. After cell_start with OP_FFT or OP_IFFT the cell
// 1) reads NFFT words from input 0, storing word n at the bit-reversed address
//    of n;
// 2) runs log2(NFFT) radix-2 decimation-in-time stages in place, one butterfly
//    per cycle ((NFFT/2)*log2(NFFT) cycles); twiddles are Q1.14 constants
//    computed at elaboration, W^k = cos(2*pi*k/NFFT) -/+ j sin(2*pi*k/NFFT)
//    for the forward/inverse transform;
// 3) sends the NFFT results in natural order on the output and pulses done
//    after the last one.
// The forward transform is not scaled and saturates each butterfly output to
// 16 bits; the inverse one halves every stage, so IFFT(FFT(x)) returns x up to
// rounding. Products are truncated (arithmetic shift). With every stream
// ready the whole operation takes NFFT + (NFFT/2)*log2(NFFT) + NFFT cycles
// plus one (from the clock edge that takes start to the one that raises
// done). Any other op-code finishes at once with no data moved; the length
// and base fields are not used. That the operator does FFT and FFT^-1 follows
// the architecture; the transform size, the number format, the scaling and
// the in-place radix-2 structure are this design's choices.
module fft_cell
  import dspa_pkg::*;
#(
  parameter int unsigned NFFT = 64
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
  localparam int unsigned LG  = $clog2(NFFT);
  localparam int unsigned TWF = 14;
  typedef logic signed [15:0] s16_t;
  typedef s16_t tw_t [NFFT/2];

  function automatic tw_t mk_tw(input bit use_sin);
    tw_t t;
    for (int k = 0; k < NFFT/2; k++) begin
      real a;
      a = 2.0 * 3.14159265358979323846 * k / NFFT;
      t[k] = s16_t'($rtoi((use_sin ? $sin(a) : $cos(a)) * 16384.0 + (use_sin ? ($sin(a) >= 0 ? 0.5 : -0.5) : ($cos(a) >= 0 ? 0.5 : -0.5))));
    end
    return t;
  endfunction

  localparam tw_t TW_COS = mk_tw(1'b0);
  localparam tw_t TW_SIN = mk_tw(1'b1);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_CALC, S_OUT} state_e;
  state_e state;

  word_t           mem [NFFT];
  logic [LG-1:0]   cnt;
  logic [LG-1:0]   bf;                 // butterfly index, NFFT/2 per stage
  logic [$clog2(LG+1)-1:0] stage;
  logic            inv;

  function automatic logic [LG-1:0] bitrev(input logic [LG-1:0] v);
    for (int i = 0; i < LG; i++) bitrev[i] = v[LG-1-i];
  endfunction

  function automatic s16_t sat16(input logic signed [17:0] v);
    if (v > 18'sd32767)  return 16'sh7fff;
    if (v < -18'sd32768) return 16'sh8000;
    return v[15:0];
  endfunction

  // Butterfly addressing and arithmetic.
  logic [LG-1:0]  i0, i1, half, kidx;
  s16_t           ar, ai, br, bi, wr, wi, tr, ti;
  logic signed [31:0] m_rr, m_ii, m_ri, m_ir;
  logic signed [32:0] pr, pi;
  logic signed [17:0] sr0, si0, sr1, si1;
  word_t          y0, y1;

  always_comb begin
    half = LG'(1) << stage;
    i0   = ((bf >> stage) << (stage + 1)) | (bf & (half - 1'b1));
    i1   = i0 | half;
    kidx = (bf & (half - 1'b1)) << (LG - 1 - 32'(stage));
    {ar, ai} = mem[i0];
    {br, bi} = mem[i1];
    wr = TW_COS[kidx[LG-2:0]];
    wi = inv ? TW_SIN[kidx[LG-2:0]] : -TW_SIN[kidx[LG-2:0]];
    m_rr = br * wr;
    m_ii = bi * wi;
    m_ri = br * wi;
    m_ir = bi * wr;
    pr = 33'(m_rr) - 33'(m_ii);
    pi = 33'(m_ri) + 33'(m_ir);
    tr = s16_t'(pr >>> TWF);
    ti = s16_t'(pi >>> TWF);
    sr0 = 18'(ar) + 18'(tr);
    si0 = 18'(ai) + 18'(ti);
    sr1 = 18'(ar) - 18'(tr);
    si1 = 18'(ai) - 18'(ti);
    if (inv) begin
      y0 = {s16_t'(sr0 >>> 1), s16_t'(si0 >>> 1)};
      y1 = {s16_t'(sr1 >>> 1), s16_t'(si1 >>> 1)};
    end else begin
      y0 = {sat16(sr0), sat16(si0)};
      y1 = {sat16(sr1), sat16(si1)};
    end
  end

  assign in_ready[0] = (state == S_LOAD);
  assign in_ready[1] = 1'b0;
  assign out_valid   = (state == S_OUT);
  assign out_data    = mem[cnt];

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid[0]) mem[bitrev(cnt)] <= in_data[0];
    else if (state == S_CALC) begin
      mem[i0] <= y0;
      mem[i1] <= y1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      bf    <= '0;
      stage <= '0;
      inv   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            if (op == OP_FFT || op == OP_IFFT) begin
              inv   <= (op == OP_IFFT);
              cnt   <= '0;
              state <= S_LOAD;
            end else begin
              done <= 1'b1;
            end
          end
        S_LOAD:
          if (in_valid[0]) begin
            cnt <= cnt + 1'b1;
            if (cnt == LG'(NFFT-1)) begin
              state <= S_CALC;
              stage <= '0;
              bf    <= '0;
            end
          end
        S_CALC: begin
          bf <= bf + 1'b1;
          if (bf == LG'(NFFT/2-1)) begin
            bf <= '0;
            if (32'(stage) == LG-1) begin
              state <= S_OUT;
              cnt   <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUT:
          if (out_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == LG'(NFFT-1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
