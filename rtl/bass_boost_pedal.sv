// bass_boost_pedal: keeps the bass of the stereo signal with a low-pass FIR.
//
// A Hamming-windowed-sinc low-pass of FIR_TAPS (127) taps with its cutoff at
// CUTOFF_HZ (500 Hz at the 44.1 kHz sample rate) and unity pass-band gain,
// computed at elaboration by slime_pkg::lowpass_taps and run by fir_filter.
// Latency: 127 clocks from valid_in to valid_out.
//
// That this pedal is a low-pass, bass-isolating FIR filter is the document's;
// its taps were produced by an outside program and are not published, so the
// window, length and cutoff are this design's choices.
module bass_boost_pedal
  import slime_pkg::*;
#(
  parameter real CUTOFF_HZ = 500.0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  stereo_t audio_in,
  output stereo_t audio_out,
  output logic    valid_out
);
  fir_filter #(.COEFS(lowpass_taps(CUTOFF_HZ))) u_fir (
    .clk, .rst, .valid_in, .audio_in, .audio_out, .valid_out);
endmodule
