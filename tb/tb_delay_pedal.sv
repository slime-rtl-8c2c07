// Testbench for delay_pedal: feeds random stereo samples and compares each
// output with x[n] + x[n-D]>>>1 + x[n-2D]>>>2 + x[n-3D]>>>3 (saturated) computed
// from a sample history kept by the bench, for several magnitudes. Also checks
// the 13-cycle latency. Small delay constants keep the run short.
module tb_delay_pedal;
  import slime_pkg::*;
  localparam int DEPTH = 256, BASE = 5, STEP = 2;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  mag_t mag = 0;
  stereo_t din, dout;
  int checks = 0, failures = 0;
  sample_t hist_l [$], hist_r [$];

  delay_pedal #(.DEPTH(DEPTH), .DELAY_BASE(BASE), .DELAY_STEP(STEP)) dut (
    .clk, .rst, .valid_in, .mag_in(mag), .audio_in(din), .audio_out(dout), .valid_out);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t model(ref sample_t h [$], input int n, input int d);
    longint s;
    s = longint'(h[n]) + longint'(h[n-d] >>> 1) + longint'(h[n-2*d] >>> 2) + longint'(h[n-3*d] >>> 3);
    if (s > 8388607) s = 8388607;
    if (s < -8388608) s = -8388608;
    return sample_t'(s);
  endfunction

  initial begin
    automatic int n = 0;
    int d, lat;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int m = 0; m < 4; m++) begin
      mag = mag_t'(m * 7);
      d = BASE + m * 7 * STEP;
      for (int k = 0; k < 200; k++) begin
        din.l = sample_t'($urandom);
        din.r = sample_t'($urandom);
        if (k % 50 == 3) din.l = 24'sh7ffff0;   // push the sum into saturation
        hist_l.push_back(din.l);
        hist_r.push_back(din.r);
        @(posedge clk); valid_in <= 1;
        @(posedge clk); valid_in <= 0;
        lat = 1;
        while (!valid_out) begin @(posedge clk); lat++; end
        if (n >= 3 * (BASE + 21 * STEP)) begin
          checks += 3;
          if (dout.l !== model(hist_l, n, d) || dout.r !== model(hist_r, n, d)) begin
            failures++;
            $display("FAIL n=%0d d=%0d got %h/%h exp %h/%h", n, d, dout.l, dout.r,
                     model(hist_l, n, d), model(hist_r, n, d));
          end
          // lat counts from the edge that samples valid_in, plus one edge for
          // the bench to see the registered output: 13 pipeline cycles + 2.
          if (lat != 15) begin failures++; $display("FAIL latency %0d", lat); end
        end
        n++;
        repeat ($urandom_range(0, 5)) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
