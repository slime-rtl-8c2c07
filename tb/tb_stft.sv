// Testbench for stft: plays 1024 samples of two sines exactly on bins 64 and
// 200 (16-bit amplitudes 8000 and 4000, so the 1/N-scaled FFT gives
// magnitudes of 4000 and 2000), waits for the spectrum to be computed and
// stored, then watches one whole VGA frame. With scale 3 the bar of bin 64
// (pixel columns 128 and 129) must be 4000 >> 3 = 500 rows tall and that of
// bin 200 (columns 400 and 401) 250 rows, within 3 rows. Every other column
// (checked one by one) may show at most 2 lit rows of rounding noise, the
// tall bar must stand on the bottom line (lines 268..767), a frame
// must have 806 lines of 1344 pixels, and nothing may be lit in the blanking
// interval.
module tb_stft;
  import slime_pkg::*;
  logic clk = 0, pclk = 0, rst = 1, sample_valid = 0;
  sample_t sample = 0;
  logic [3:0] r, g, b;
  logic hs, vs;
  int checks = 0, failures = 0;

  stft dut (.clk, .pixel_clk(pclk), .rst, .sample_valid, .sample_in(sample), .scale_in(4'd3),
            .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs));

  always #22 clk = ~clk;
  always #7.5 pclk = ~pclk;
  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pixel position, counted by the bench from the sync pulses: a line starts
  // 160 pixels (back porch) after the end of hsync, a frame 29 lines after the
  // end of vsync.
  int px = 0, line = 0, lit_blank = 0;
  int col [1024];
  int top128 = 9999, bot128 = -1;      // first and last lit line of column 128
  initial foreach (col[c]) col[c] = 0;
  int lines_in_frame = 0, pix_in_line = 0, frames = 0, line_len = 0;
  logic hs_d = 1, vs_d = 1;
  bit measuring = 0, armed = 0;
  always @(posedge pclk) begin
    if (hs && !hs_d) px = -160; else px++;
    if (!hs && hs_d) begin
      line_len = pix_in_line; pix_in_line = 0;
      line++; lines_in_frame++;
    end
    pix_in_line++;
    if (vs && !vs_d) line = -29;
    if (!vs && vs_d) begin
      if (measuring && armed) begin
        frames++;
        checks += 4;
        // the bar stands on the bottom line: 500 rows tall is lines 268..767
        if (top128 < 265 || top128 > 271 || bot128 != 767) begin
          failures++; $display("FAIL bar of column 128 spans lines %0d..%0d", top128, bot128);
        end
        if (lines_in_frame != 806) begin failures++; $display("FAIL lines %0d", lines_in_frame); end
        if (line_len != 1344) begin failures++; $display("FAIL line length %0d", line_len); end
        if (lit_blank != 0) begin failures++; $display("FAIL lit in blanking %0d", lit_blank); end
        for (int c = 0; c < 1024; c++) begin
          automatic int lo = 0, hi = 2;
          if (c == 128 || c == 129) begin lo = 497; hi = 503; end
          if (c == 400 || c == 401) begin lo = 247; hi = 253; end
          checks++;
          if (col[c] < lo || col[c] > hi) begin
            failures++;
            $display("FAIL column %0d: %0d rows lit, expected %0d..%0d", c, col[c], lo, hi);
          end
        end
      end
      armed = measuring;
      lines_in_frame = 0; lit_blank = 0; top128 = 9999; bot128 = -1;
      foreach (col[c]) col[c] = 0;
    end
    hs_d = hs; vs_d = vs;
    if (g != 0 || r != 0 || b != 0) begin
      if (px < 0 || px >= 1024 || line < 0 || line >= 768) lit_blank++;
      else begin
        col[px]++;
        if (px == 128 && line < top128) top128 = line;
        if (px == 128 && line > bot128) bot128 = line;
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 1024; n++) begin
      sample <= sample_t'($rtoi(256.0 * (8000.0 * $sin(2.0 * 3.14159265358979 * 64.0 * n / 1024.0) +
                                         4000.0 * $sin(2.0 * 3.14159265358979 * 200.0 * n / 1024.0))));
      sample_valid <= 1;
      @(posedge clk);
      sample_valid <= 0;
      repeat (3) @(posedge clk);
    end
    repeat (40000) @(posedge clk);   // FFT, squares, roots and stores
    measuring = 1;
    wait (frames == 1);
    #1us;
    checks++;
    if (frames != 1) begin failures++; $display("FAIL frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
