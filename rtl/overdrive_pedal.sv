// overdrive_pedal: hard clipping of one audio channel. With threshold
// T = mag_in * THRESH_STEP, samples above +T are replaced by +T and samples
// below -T by -T; samples in between pass unchanged. A sine wave turns towards
// a square wave as T falls.
//
// The clipping rule and the threshold as a multiple of the encoder magnitude
// follow the document; the factor 5000 comes from its published source. The
// result is registered: valid_out and sample_out follow valid_in and sample_in
// by one clock (the document's version is purely combinational).
module overdrive_pedal
  import slime_pkg::*;
#(
  parameter int THRESH_STEP = 5000
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  mag_t    mag_in,
  input  sample_t sample_in,
  output sample_t sample_out,
  output logic    valid_out
);
  logic signed [SAMPLE_W+1:0] t;   // 0 .. 255*5000 fits in 22 bits

  assign t = (SAMPLE_W+2)'(int'(mag_in) * THRESH_STEP);

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_out <= '0;
      valid_out  <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if ((SAMPLE_W+2)'(sample_in) > t)       sample_out <= sample_t'(t);
      else if ((SAMPLE_W+2)'(sample_in) < -t) sample_out <= sample_t'(-t);
      else                                    sample_out <= sample_in;
    end
  end
endmodule
