// Testbench for bass_boost_pedal. Three kinds of check:
//  * every output equals the direct-form convolution of the bench's own input
//    history with the 127 low-pass taps (>>> 14, saturated);
//  * the latency is 127 clocks;
//  * the response is a low-pass: a constant input comes out at its own level
//    (within 1%) and an alternating +-A input (half the sample rate) comes out
//    below A/100.
module tb_bass_boost_pedal;
  import slime_pkg::*;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  stereo_t din = '0, dout;
  int checks = 0, failures = 0;
  localparam coef_tab_t H = lowpass_taps(500.0);
  sample_t hl [$], hr [$];

  bass_boost_pedal dut (.clk, .rst, .valid_in, .audio_in(din), .audio_out(dout), .valid_out);

  always #5 clk = ~clk;
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t conv(ref sample_t h [$]);
    longint acc = 0;
    int n = h.size() - 1;
    for (int i = 0; i < FIR_TAPS; i++)
      if (n - i >= 0) acc += longint'(H[i]) * longint'(h[n-i]);
    acc = acc >>> COEF_FRAC;
    if (acc > 8388607) acc = 8388607;
    if (acc < -8388608) acc = -8388608;
    return sample_t'(acc);
  endfunction

  task automatic send(input sample_t l, input sample_t r, output int lat);
    din.l = l; din.r = r;
    hl.push_back(l); hr.push_back(r);
    @(posedge clk); valid_in <= 1;
    @(posedge clk); valid_in <= 0;
    lat = 0;
    while (!valid_out) begin @(posedge clk); lat++; end
    checks += 2;
    if (dout.l !== conv(hl) || dout.r !== conv(hr)) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d got %0d/%0d exp %0d/%0d", hl.size(), dout.l, dout.r, conv(hl), conv(hr));
    end
    // lat counts edges after the one that samples valid_in, and the bench
    // sees a registered output one edge late: 127-clock latency reads 128.
    if (lat != FIR_TAPS + 1) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 300; k++)
      send(sample_t'($urandom), sample_t'($urandom_range(0, 2000) - 1000), lat);
    for (int k = 0; k < 130; k++) send(24'sd1000000, -24'sd1000000, lat);
    checks++;
    if (dout.l < 990000 || dout.l > 1010000 || dout.r > -990000) begin
      failures++; $display("FAIL DC gain: %0d %0d", int'(dout.l), int'(dout.r));
    end
    for (int k = 0; k < 130; k++)
      send((k % 2 != 0) ? 24'sd1000000 : -24'sd1000000, 24'sd0, lat);
    checks++;
    if (dout.l > 10000 || dout.l < -10000) begin
      failures++; $display("FAIL Nyquist attenuation: %0d", dout.l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
