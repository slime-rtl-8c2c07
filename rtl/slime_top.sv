// slime_top: top level of the guitar/vocal effects processor. It ties the
// four rotary-encoder decoders, the I2S codec interface and the audio
// controller (effect pedals, volume, spectrum display) together.
//
// Interface:
//   axis_clk    22.591 MHz audio clock (512 clocks per 44.1 kHz frame). On
//               the board this comes from a clock-synthesiser block fed by
//               the 100 MHz oscillator; here it is an input.
//   pixel_clk   65 MHz pixel clock for the 1024 x 768 display, also from the
//               clock synthesiser.
//   btnd        reset, active high.
//   sw[15:0]    pedal, harmonizer and display-scale switches (see
//               audio_controller).
//   A_1/B_1, A_2/B_2, A_3/B_3, A_v/B_v
//               quadrature pins of the three effect-magnitude encoders and
//               the volume encoder.
//   rx_data     serial data from the codec's ADC.
//   tx_*, rx_*  codec clocks and DAC serial data.
//   vga_*       12-bit VGA colour and active-low syncs.
//
// How it works: each decoder turns its encoder into an 8-bit magnitude
// (reset to mid-scale). The I2S module receives left/right words from the
// codec and presents them as a stream; the audio controller processes each
// packet and streams it back to the I2S module for output.
//
// Timing: everything except the VGA pixel side runs on axis_clk. The encoder
// pins are synchronised inside the decoders; the switches inside the audio
// controller.
//
// Follows the document: the module set and their connections, the active-high
// reset on btnd, and the intentional A/B swap on encoders 1 and 2. This
// design's own choices: the clocks are inputs rather than generated here,
// the decoders run on the audio clock instead of the 100 MHz clock, the
// volume encoder is 8 bits like the other three, and the encoder push
// switches and the spare buttons and LEDs are left out.
module slime_top
  import slime_pkg::*;
(
  input  logic        axis_clk,
  input  logic        pixel_clk,
  input  logic        btnd,
  input  logic [15:0] sw,
  input  logic        A_1,
  input  logic        B_1,
  input  logic        A_2,
  input  logic        B_2,
  input  logic        A_3,
  input  logic        B_3,
  input  logic        A_v,
  input  logic        B_v,
  input  logic        rx_data,
  output logic        tx_mclk,
  output logic        tx_lrck,
  output logic        tx_sclk,
  output logic        tx_data,
  output logic        rx_mclk,
  output logic        rx_lrck,
  output logic        rx_sclk,
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs
);

  mag_t vol, mag1, mag2, mag3;

  rotary_decoder u_vol  (.clk(axis_clk), .rst(btnd), .a(A_v), .b(B_v), .magnitude(vol));
  // encoders 1 and 2 are wired with A and B swapped, as on the board
  rotary_decoder u_mag1 (.clk(axis_clk), .rst(btnd), .a(B_1), .b(A_1), .magnitude(mag1));
  rotary_decoder u_mag2 (.clk(axis_clk), .rst(btnd), .a(B_2), .b(A_2), .magnitude(mag2));
  rotary_decoder u_mag3 (.clk(axis_clk), .rst(btnd), .a(A_3), .b(B_3), .magnitude(mag3));

  sample_t tx_d, rx_d;
  logic    tx_v, tx_r, tx_l, rx_v, rx_r, rx_l;

  axis_i2s2 u_i2s (
    .axis_clk, .axis_resetn(!btnd),
    .tx_axis_s_data(tx_d), .tx_axis_s_valid(tx_v), .tx_axis_s_ready(tx_r),
    .tx_axis_s_last(tx_l),
    .rx_axis_m_data(rx_d), .rx_axis_m_valid(rx_v), .rx_axis_m_ready(rx_r),
    .rx_axis_m_last(rx_l),
    .tx_mclk, .tx_lrck, .tx_sclk, .tx_sdout(tx_data),
    .rx_mclk, .rx_lrck, .rx_sclk, .rx_sdin(rx_data)
  );

  audio_controller u_ctrl (
    .clk(axis_clk), .pixel_clk, .rst(btnd), .sw, .vol, .mag1, .mag2, .mag3,
    .s_axis_data(rx_d), .s_axis_valid(rx_v), .s_axis_ready(rx_r), .s_axis_last(rx_l),
    .m_axis_data(tx_d), .m_axis_valid(tx_v), .m_axis_ready(tx_r), .m_axis_last(tx_l),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs
  );

endmodule
