// Testbench for wahwah_pedal. Random stereo input with the magnitude changed
// every 40 samples: each output must equal the convolution of the bench's
// input history with the taps of the filter the magnitude selects (top three
// bits). Then a sine at the centre of filter 3 is played through filter 3 and
// through filter 7: the first must come out amplified (peak gain about 8), the
// second close to unity. Latency is checked to be 127 clocks.
module tb_wahwah_pedal;
  import slime_pkg::*;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  stereo_t din = '0, dout;
  mag_t mag = 0;
  int checks = 0, failures = 0;
  sample_t hl [$], hr [$];

  wahwah_pedal dut (.clk, .rst, .valid_in, .mag_in(mag), .audio_in(din), .audio_out(dout), .valid_out);

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fc(input int k);
    return 400.0 * ((2200.0 / 400.0) ** (real'(k) / 7.0));
  endfunction

  function automatic sample_t conv(ref sample_t h [$], input int k);
    coef_tab_t c;
    longint acc = 0;
    int n = h.size() - 1;
    c = peak_taps(fc(k), 800.0, 8.0);
    for (int i = 0; i < FIR_TAPS; i++)
      if (n - i >= 0) acc += longint'(c[i]) * longint'(h[n-i]);
    acc = acc >>> COEF_FRAC;
    if (acc > 8388607) acc = 8388607;
    if (acc < -8388608) acc = -8388608;
    return sample_t'(acc);
  endfunction

  task automatic send(input sample_t l, input sample_t r, input bit compare);
    int lat;
    din.l = l; din.r = r;
    hl.push_back(l); hr.push_back(r);
    @(posedge clk); valid_in <= 1;
    @(posedge clk); valid_in <= 0;
    lat = 0;
    while (!valid_out) begin @(posedge clk); lat++; end
    if (compare) begin
      checks += 2;
      if (dout.l !== conv(hl, mag[7:5]) || dout.r !== conv(hr, mag[7:5])) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d mag=%0d got %0d exp %0d", hl.size(), mag, dout.l, conv(hl, mag[7:5]));
      end
      // 127-clock latency; the bench sees the registered pulse one edge late.
      if (lat != FIR_TAPS + 1) begin failures++; $display("FAIL latency %0d", lat); end
    end
  endtask

  int peak;
  task automatic tone(input int k_sel, input int k_tone);
    real ph;
    mag = mag_t'(k_sel * 32 + 5);
    peak = 0;
    for (int n = 0; n < 400; n++) begin
      ph = 2.0 * 3.14159265358979 * fc(k_tone) * n / 44100.0;
      send(sample_t'($rtoi(100000.0 * $sin(ph))), 24'sd0, 1'b0);
      if (n > 250 && int'(dout.l) > peak) peak = int'(dout.l);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 320; k++) begin
      if (k % 40 == 0) mag = mag_t'($urandom);
      send(sample_t'($urandom_range(0, 400000) - 200000), sample_t'($urandom), 1'b1);
    end
    tone(3, 3);
    checks++;
    if (peak < 500000 || peak > 900000) begin failures++; $display("FAIL peak gain at own centre: %0d", peak); end
    tone(7, 3);
    checks++;
    if (peak > 250000) begin failures++; $display("FAIL gain off centre: %0d", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
