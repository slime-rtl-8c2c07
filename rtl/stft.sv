// stft: live spectrum display. Blocks of 1024 audio samples are transformed
// and the magnitude of the lower 512 frequency bins is drawn as a bar graph on
// a 1024 x 768 VGA screen, two pixels per bin.
//
// Audio clock domain: each sample_valid offers the top 16 bits of the 24-bit
// sample to fft_1024 (samples arriving while the FFT is busy are skipped, so
// each transform covers 1024 consecutive accepted samples). The FFT output
// passes square_and_sum (re^2 + im^2), a 16-word axis_fifo, and isqrt (the
// magnitude); magnitude k is written to word k of spectrum_ram, the bin
// counter restarting after the word marked last.
//
// Pixel clock domain: xvga produces the scan position; the magnitude of bin
// hcount/2 is read (one clock), and the pixel is lit with BAR_COLOUR when
// (magnitude >> scale_in) >= 768 - vcount, i.e. the bar grows up from the
// bottom edge. Sync and blanking are delayed to stay aligned with the pixel
// (two pixel clocks in all). The reset is synchronised into the pixel domain.
//
// The chain (FFT, square and sum, FIFO, square root, dual-clock RAM, bar test
// against 768 - vcount with a switch-set shift, hcount/2 addressing) follows
// the document. The fixed bar colour and the alignment delays are this
// design's choices (the document took the colour from switches). With the
// default green, vga_r and vga_b are constant zero; they are kept as ports
// so another BAR_COLOUR drives them.
module stft
  import slime_pkg::*;
#(
  parameter int           N          = 1024,
  parameter logic [11:0]  BAR_COLOUR = 12'h0F0
) (
  input  logic       clk,
  input  logic       pixel_clk,
  input  logic       rst,
  input  logic       sample_valid,
  input  sample_t    sample_in,
  input  logic [3:0] scale_in,
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs
);
  localparam int AW = $clog2(N);

  // ------------------------------------------------------ audio clock side
  logic signed [15:0] fft_in;
  logic        fft_in_valid, fft_in_ready;
  logic [31:0] fft_out;
  logic        fft_out_valid, fft_out_ready, fft_out_last;
  logic [31:0] pw_data;
  logic        pw_valid, pw_ready, pw_last;
  logic [32:0] fifo_out;
  logic        fifo_valid, fifo_ready;
  logic [15:0] mag;
  logic        mag_valid, mag_last;
  logic [AW-1:0] bin;

  always_ff @(posedge clk) begin
    if (rst) begin
      fft_in       <= '0;
      fft_in_valid <= 1'b0;
    end else begin
      fft_in_valid <= sample_valid;
      if (sample_valid) fft_in <= sample_in[SAMPLE_W-1 -: 16];
    end
  end

  fft_1024 #(.N(N), .DW(16)) u_fft (
    .clk, .rst,
    .s_data(fft_in), .s_valid(fft_in_valid), .s_ready(fft_in_ready),
    .m_data(fft_out), .m_valid(fft_out_valid), .m_ready(fft_out_ready), .m_last(fft_out_last));

  square_and_sum u_sq (
    .clk, .resetn(!rst),
    .s_data(fft_out), .s_valid(fft_out_valid), .s_ready(fft_out_ready), .s_last(fft_out_last),
    .m_data(pw_data), .m_valid(pw_valid), .m_ready(pw_ready), .m_last(pw_last));

  axis_fifo #(.WIDTH(33), .DEPTH(16)) u_fifo (
    .clk, .resetn(!rst),
    .s_data({pw_last, pw_data}), .s_valid(pw_valid), .s_ready(pw_ready),
    .m_data(fifo_out), .m_valid(fifo_valid), .m_ready(fifo_ready));

  isqrt u_sqrt (
    .clk, .resetn(!rst),
    .s_data(fifo_out[31:0]), .s_valid(fifo_valid), .s_ready(fifo_ready), .s_last(fifo_out[32]),
    .m_data(mag), .m_valid(mag_valid), .m_ready(1'b1), .m_last(mag_last));

  always_ff @(posedge clk) begin
    if (rst)            bin <= '0;
    else if (mag_valid) bin <= mag_last ? '0 : bin + 1'b1;
  end

  // ------------------------------------------------------ pixel clock side
  logic [1:0]  prst_sync;
  logic        prst;
  logic [10:0] hcount;
  logic [9:0]  vcount, v1;
  logic        hs0, vs0, blank0, hs1, vs1, blank1;
  logic [15:0] amp;

  always_ff @(posedge pixel_clk) prst_sync <= {prst_sync[0], rst};
  assign prst = prst_sync[1];

  spectrum_ram #(.WIDTH(16), .DEPTH(N)) u_ram (
    .wclk(clk), .we(mag_valid), .waddr(bin), .wdata(mag),
    .rclk(pixel_clk), .raddr(AW'(hcount[10:1])), .rdata(amp));

  xvga u_vga (
    .clk(pixel_clk), .rst(prst),
    .hcount, .vcount, .hsync(hs0), .vsync(vs0), .blank(blank0));

  always_ff @(posedge pixel_clk) begin
    if (prst) begin
      {hs1, vs1, blank1, v1} <= {1'b1, 1'b1, 1'b1, 10'd0};
      {vga_hs, vga_vs}       <= 2'b11;
      {vga_r, vga_g, vga_b}  <= '0;
    end else begin
      hs1    <= hs0;
      vs1    <= vs0;
      blank1 <= blank0;
      v1     <= vcount;
      vga_hs <= hs1;
      vga_vs <= vs1;
      if (!blank1 && 32'(amp >> scale_in) >= 32'(11'd768 - 11'(v1)))
        {vga_r, vga_g, vga_b} <= BAR_COLOUR;
      else
        {vga_r, vga_g, vga_b} <= '0;
    end
  end
endmodule
