// harmonizer: adds pitch-shifted copies of the input a major third, a perfect
// fourth and a perfect fifth above it, each enabled by its own switch, so a
// single voice or guitar line becomes a chord.
//
// How it works: six pitch_shifter instances (third, fourth, fifth for each of
// the two channels) are fed every stereo sample. Their playback rates are
// 2^(4/12), 2^(5/12) and 2^(7/12) in 3.29 fixed point, computed at elaboration
// (slime_pkg::interval_rate). When the shifters finish, each channel's output
// is the input plus every enabled shifted copy, saturated to 24 bits.
//
// Interface: enable_in[2] = major third, [1] = perfect fourth, [0] = perfect
// fifth. Timing: valid_out pulses 4 clocks after the clock that took valid_in.
// The structure, intervals and switch-per-interval control follow the
// document; saturation of the sum is this design's choice.
module harmonizer
  import slime_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  logic [2:0] enable_in,
  input  stereo_t    audio_in,
  output stereo_t    audio_out,
  output logic       valid_out
);
  localparam int SEMITONES [3] = '{4, 5, 7};   // third, fourth, fifth

  sample_t ps_out [3][2];
  logic    ps_valid [3][2];
  stereo_t x;

  always_ff @(posedge clk) begin
    if (rst)           x <= '0;
    else if (valid_in) x <= audio_in;
  end

  for (genvar h = 0; h < 3; h++) begin : g_interval
    for (genvar c = 0; c < 2; c++) begin : g_channel
      pitch_shifter #(.DEPTH(DEPTH)) u_ps (
        .clk, .rst,
        .rate_in(interval_rate(SEMITONES[h])),
        .valid_in,
        .sample_in(c == 0 ? audio_in.l : audio_in.r),
        .sample_out(ps_out[h][c]),
        .valid_out(ps_valid[h][c]));
    end
  end

  // enable_in[2] = third (h = 0), [1] = fourth (h = 1), [0] = fifth (h = 2)
  function automatic sample_t mix(input sample_t dry, input sample_t s3,
                                  input sample_t s4, input sample_t s5,
                                  input logic [2:0] en);
    logic signed [63:0] acc;
    acc = 64'(dry);
    if (en[2]) acc += 64'(s3);
    if (en[1]) acc += 64'(s4);
    if (en[0]) acc += 64'(s5);
    return sat_sample(acc);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      audio_out <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= ps_valid[0][0];
      if (ps_valid[0][0]) begin
        audio_out.l <= mix(x.l, ps_out[0][0], ps_out[1][0], ps_out[2][0], enable_in);
        audio_out.r <= mix(x.r, ps_out[0][1], ps_out[1][1], ps_out[2][1], enable_in);
      end
    end
  end
endmodule
