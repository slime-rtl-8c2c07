// fir_filter: stereo FIR filter with constant taps, computed one tap per clock.
//
// How it works: each channel keeps the last FIR_TAPS samples in a circular
// register file (cleared at reset). On valid_in (accepted only while idle) the
// new stereo sample overwrites the oldest entry, then FIR_TAPS clock cycles
// each perform one multiply-accumulate per channel,
//   acc += COEFS[i] * x[n-i],   i = 0 .. FIR_TAPS-1,
// and the sums, shifted right by COEF_FRAC and saturated to 24 bits, appear on
// audio_out with a one-cycle valid_out pulse FIR_TAPS clocks after the clock
// that took valid_in. At 512 clocks per audio frame one multiplier per channel
// is plenty. Coefficients are signed Q3.14 (slime_pkg::coef_t).
//
// The document builds its filters with a vendor FIR generator; this serial
// multiply-accumulate structure is this design's own, simplest choice.
module fir_filter
  import slime_pkg::*;
#(
  parameter coef_tab_t COEFS = lowpass_taps(500.0)
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  stereo_t audio_in,
  output stereo_t audio_out,
  output logic    valid_out
);
  localparam int N   = FIR_TAPS;
  localparam int IW  = $clog2(N);
  localparam int ACC = SAMPLE_W + COEF_W + IW + 1;

  sample_t  dl_l [N], dl_r [N];
  logic [IW-1:0] wp, rp, i;
  logic          busy;
  logic signed [ACC-1:0] acc_l, acc_r;
  coef_t         c;

  logic signed [ACC-1:0] sum_l, sum_r;

  assign c     = COEFS[i];
  assign sum_l = acc_l + ACC'(c * dl_l[rp]);
  assign sum_r = acc_r + ACC'(c * dl_r[rp]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) begin
        dl_l[k] <= '0;
        dl_r[k] <= '0;
      end
      wp        <= '0;
      rp        <= '0;
      i         <= '0;
      busy      <= 1'b0;
      acc_l     <= '0;
      acc_r     <= '0;
      audio_out <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      if (!busy) begin
        if (valid_in) begin
          dl_l[wp] <= audio_in.l;
          dl_r[wp] <= audio_in.r;
          rp       <= wp;
          wp       <= (wp == IW'(N - 1)) ? '0 : wp + 1'b1;
          i        <= '0;
          acc_l    <= '0;
          acc_r    <= '0;
          busy     <= 1'b1;
        end
      end else begin
        acc_l <= sum_l;
        acc_r <= sum_r;
        rp    <= (rp == '0) ? IW'(N - 1) : rp - 1'b1;
        i     <= i + 1'b1;
        if (i == IW'(N - 1)) begin
          busy <= 1'b0;
        end
      end
      if (busy && i == IW'(N - 1)) begin
        audio_out.l <= sat_sample(64'(sum_l >>> COEF_FRAC));
        audio_out.r <= sat_sample(64'(sum_r >>> COEF_FRAC));
        valid_out   <= 1'b1;
      end
    end
  end
endmodule
