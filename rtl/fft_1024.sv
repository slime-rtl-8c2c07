// fft_1024: N-point (default 1024) radix-2 FFT of a real input stream, one
// butterfly per clock, with AXI-Stream style input and output.
//
// How it works: three phases repeat.
//   LOAD     s_ready is high; N input samples are written to a complex work
//            memory at bit-reversed addresses (imaginary parts zero).
//   COMPUTE  log2(N) decimation-in-time stages of N/2 butterflies each, one
//            per clock (N/2*log2(N) = 5120 clocks for N = 1024). Butterfly
//            (a, b) with twiddle W = exp(-2*pi*i*t/N) gives (a + bW)/2 and
//            (a - bW)/2; halving at each stage keeps the data within its
//            width, so the result is X[k]/N.
//   UNLOAD   the N results leave in natural order, bin 0 first, as
//            {re[15:0], im[15:0]} words with m_last on bin N-1.
// Twiddles are Q1.15 cosine/sine tables computed at elaboration. Internal
// words carry two guard bits beyond the 16-bit data.
//
// The document uses a vendor FFT core (Cooley-Tukey, 1024 points, real and
// imaginary parts in one output word) and publishes only its ports; this
// single-butterfly in-place structure and the 1/N scaling are this design's
// choices.
module fft_1024 #(
  parameter int N  = 1024,
  parameter int DW = 16,
  localparam int LOGN = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic signed [DW-1:0] s_data,
  input  logic              s_valid,
  output logic              s_ready,
  output logic [2*DW-1:0]   m_data,
  output logic              m_valid,
  input  logic              m_ready,
  output logic              m_last
);
  localparam int IW = DW + 2;          // internal word
  localparam int TW = 16;              // twiddle width, Q1.15
  typedef logic signed [IW-1:0] word_t;
  typedef logic signed [TW-1:0] tw_t;
  typedef tw_t tw_tab_t [N/2];

  function automatic tw_tab_t make_tw(input bit sine);
    tw_tab_t t;
    real a;
    for (int k = 0; k < N / 2; k++) begin
      a    = 2.0 * 3.14159265358979323846 * k / N;
      t[k] = tw_t'($rtoi((sine ? $sin(a) : $cos(a)) * 32767.0 + 32768.5) - 32768);
    end
    return t;
  endfunction

  localparam tw_tab_t COS_T = make_tw(1'b0);
  localparam tw_tab_t SIN_T = make_tw(1'b1);

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) bitrev[i] = v[LOGN-1-i];
  endfunction

  typedef enum logic [1:0] {LOAD, COMPUTE, UNLOAD} phase_e;

  phase_e              phase;
  word_t               mem_re [N], mem_im [N];
  logic [LOGN-1:0]     cnt;          // load / unload index
  logic [LOGN-2:0]     bf;           // butterfly within stage
  logic [$clog2(LOGN)-1:0] stage;

  // Butterfly addressing for the current stage (half span h = 2^stage).
  logic [LOGN-1:0] top, bot, k_in_grp, grp;
  logic [LOGN-2:0] tw_idx;
  always_comb begin
    k_in_grp = LOGN'(bf) & ((LOGN'(1) << stage) - 1'b1);
    grp      = LOGN'(bf) >> stage;
    top      = (grp << (stage + 1)) | k_in_grp;
    bot      = top | (LOGN'(1) << stage);
    tw_idx   = (LOGN-1)'(k_in_grp << (($clog2(LOGN))'(LOGN - 1) - stage));
  end

  // (a + bW)/2 and (a - bW)/2 with W = cos - i*sin.
  localparam int PW = IW + TW + 1;
  logic signed [PW-1:0] pr, pi;       // b*W, scaled by 2^15
  word_t ar, ai, br, bi, wr_top_re, wr_top_im, wr_bot_re, wr_bot_im;
  tw_t   c, s;
  logic signed [IW+1:0] bwr, bwi;
  always_comb begin
    ar = mem_re[top]; ai = mem_im[top];
    br = mem_re[bot]; bi = mem_im[bot];
    c  = COS_T[tw_idx];
    s  = SIN_T[tw_idx];
    pr = PW'(br * c) + PW'(bi * s);   // re(b * (c - i s))
    pi = PW'(bi * c) - PW'(br * s);   // im(b * (c - i s))
    bwr = (IW+2)'(pr >>> (TW - 1));
    bwi = (IW+2)'(pi >>> (TW - 1));
    wr_top_re = word_t'(((IW+2)'(ar) + bwr) >>> 1);
    wr_top_im = word_t'(((IW+2)'(ai) + bwi) >>> 1);
    wr_bot_re = word_t'(((IW+2)'(ar) - bwr) >>> 1);
    wr_bot_im = word_t'(((IW+2)'(ai) - bwi) >>> 1);
  end

  function automatic logic [DW-1:0] clip(input word_t v);
    if (v > word_t'((1 <<< (DW - 1)) - 1)) return {1'b0, {(DW-1){1'b1}}};
    if (v < -word_t'(1 <<< (DW - 1)))      return {1'b1, {(DW-1){1'b0}}};
    return v[DW-1:0];
  endfunction

  assign s_ready = (phase == LOAD);
  assign m_valid = (phase == UNLOAD);
  assign m_last  = (phase == UNLOAD) && (cnt == LOGN'(N - 1));
  assign m_data  = {clip(mem_re[cnt]), clip(mem_im[cnt])};

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= LOAD;
      cnt   <= '0;
      bf    <= '0;
      stage <= '0;
    end else begin
      unique case (phase)
        LOAD: if (s_valid) begin
          mem_re[bitrev(cnt)] <= word_t'(s_data);
          mem_im[bitrev(cnt)] <= '0;
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            phase <= COMPUTE;
            bf    <= '0;
            stage <= '0;
          end
        end
        COMPUTE: begin
          mem_re[top] <= wr_top_re;
          mem_im[top] <= wr_top_im;
          mem_re[bot] <= wr_bot_re;
          mem_im[bot] <= wr_bot_im;
          bf <= bf + 1'b1;
          if (bf == '1) begin
            stage <= stage + 1'b1;
            if (stage == ($clog2(LOGN))'(LOGN - 1)) begin
              phase <= UNLOAD;
              cnt   <= '0;
            end
          end
        end
        UNLOAD: if (m_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) phase <= LOAD;
        end
        default: phase <= LOAD;
      endcase
    end
  end
endmodule
