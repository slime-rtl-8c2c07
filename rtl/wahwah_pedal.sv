// wahwah_pedal: a bank of NUM_FILTERS FIR peak filters with centre frequencies
// spread over the middle of the guitar range; the effect magnitude picks one,
// so sweeping the encoder back and forth sweeps the resonance ("wah").
//
// Filter k (k = 0..7) peaks at f_k = F_LO * (F_HI/F_LO)^(k/7), i.e. 400 Hz to
// 2200 Hz in equal ratios, with a pass band of BW_HZ and a peak gain of
// PEAK_GAIN (x8, about +18 dB) over a unity response elsewhere; taps come from
// slime_pkg::peak_taps at elaboration. All filters run on every sample; the
// top three bits of mag_in, latched with valid_in, select the output, i.e. 32
// encoder steps per filter. Latency: 127 clocks.
//
// The filter bank, the 8 filters and the 32-step selection follow the
// document (its published source); the taps are not published, so the centre
// frequencies, width and gain are this design's choices, the gain and width
// read from the document's example response (peak near 0.065*pi rad/sample,
// about +18 dB).
module wahwah_pedal
  import slime_pkg::*;
#(
  parameter int  NUM_FILTERS = 8,
  parameter real F_LO        = 400.0,
  parameter real F_HI        = 2200.0,
  parameter real BW_HZ       = 800.0,
  parameter real PEAK_GAIN   = 8.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  mag_t    mag_in,
  input  stereo_t audio_in,
  output stereo_t audio_out,
  output logic    valid_out
);
  localparam int SW = $clog2(NUM_FILTERS);

  stereo_t          f_out [NUM_FILTERS];
  logic [NUM_FILTERS-1:0] f_valid;
  logic [SW-1:0]    sel;

  for (genvar k = 0; k < NUM_FILTERS; k++) begin : g_peak
    localparam real F0 = F_LO * ((F_HI / F_LO) ** (real'(k) / real'(NUM_FILTERS - 1)));
    fir_filter #(.COEFS(peak_taps(F0, BW_HZ, PEAK_GAIN))) u_fir (
      .clk, .rst, .valid_in, .audio_in, .audio_out(f_out[k]), .valid_out(f_valid[k]));
  end

  always_ff @(posedge clk) begin
    if (rst)           sel <= '0;
    else if (valid_in) sel <= mag_in[MAG_W-1 -: SW];
  end

  assign audio_out = f_out[sel];
  assign valid_out = f_valid[sel];
endmodule
