// distortion_pedal: soft clipping of one audio channel. With threshold
// T = mag_in * THRESH_STEP, the part of a sample that lies beyond +T or -T is
// scaled down by 4 (an arithmetic shift by SOFT_SHIFT) instead of being cut:
//   y = x                      for |x| <= T
//   y = +T + ((x - T) >>> 2)   for x > T
//   y = -T + ((x + T) >>> 2)   for x < -T
// Peaks are flattened but the waveform keeps its shape.
//
// The idea (scale down what exceeds a magnitude-controlled threshold) is the
// document's, as is the factor 5000 and the shift of 2 from its published
// source. Scaling only the excess, so the curve is continuous at +-T, is this
// design's reading. Output is registered, one clock after valid_in.
module distortion_pedal
  import slime_pkg::*;
#(
  parameter int THRESH_STEP = 5000,
  parameter int SOFT_SHIFT  = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  mag_t    mag_in,
  input  sample_t sample_in,
  output sample_t sample_out,
  output logic    valid_out
);
  logic signed [SAMPLE_W+1:0] t, x;

  assign t = (SAMPLE_W+2)'(int'(mag_in) * THRESH_STEP);
  assign x = (SAMPLE_W+2)'(sample_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_out <= '0;
      valid_out  <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (x > t)       sample_out <= sample_t'(t + ((x - t) >>> SOFT_SHIFT));
      else if (x < -t) sample_out <= sample_t'(-t + ((x + t) >>> SOFT_SHIFT));
      else             sample_out <= sample_in;
    end
  end
endmodule
