// tremolo_pedal: amplitude modulation of one audio channel by a triangle wave.
//
// The triangle (tri_wave) advances once per valid_in and turns around every
// HALF_BASE + mag_in * HALF_STEP clock cycles, so the encoder sets the
// tremolo rate. Each valid sample is multiplied by the wave value and shifted
// right by WAVE_SHIFT: y = (x * wave) >>> 13, saturated to 24 bits. With one
// packet per 512 clocks the wave peaks at 2048..6128 steps, i.e. a peak gain of
// 0.25..0.75. The output is registered one clock after valid_in.
//
// The modulation scheme and the half-period constants 1048576 and 8192 follow
// the document (the constants from its published source); the gain shift of
// 13 is this design's choice, made so the peak gain stays below one.
module tremolo_pedal
  import slime_pkg::*;
#(
  parameter int HALF_BASE  = 1048576,
  parameter int HALF_STEP  = 8192,
  parameter int WAVE_SHIFT = 13
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  mag_t    mag_in,
  input  sample_t sample_in,
  output sample_t sample_out,
  output logic    valid_out
);
  localparam int HP_W = 22, WAVE_W = 16;

  logic [HP_W-1:0]   half_period;
  logic [WAVE_W-1:0] wave;
  logic signed [SAMPLE_W+WAVE_W:0] prod;

  assign half_period = HP_W'(HALF_BASE + int'(mag_in) * HALF_STEP);

  tri_wave #(.HP_W(HP_W), .WAVE_W(WAVE_W)) u_wave (
    .clk, .rst, .step(valid_in), .half_period, .wave);

  assign prod = sample_in * $signed({1'b0, wave});

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_out <= '0;
      valid_out  <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) sample_out <= sat_sample(64'(prod >>> WAVE_SHIFT));
    end
  end
endmodule
