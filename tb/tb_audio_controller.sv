// Testbench for audio_controller at the stream level, without the codec
// interface: the bench sends two-word packets (left, then right with last)
// on the receive stream, takes them from the transmit stream with a random
// ready, and checks each returned packet against a model worked out here.
//
// Covered: clean at volumes 255, 128 and 0 (gain vol/255 in 0.24 fixed
// point, saturated), overdrive (hard clip at mag1 * 5000), distortion (soft
// clip at mag2 * 5000, excess divided by 4), pedal patterns that must fall
// back to clean (all off, two on, switch 8 alone), the ready rule (no new
// packet is accepted until the processed one has left), the packet format
// (last on the second word only) and, for the clean pedal, the latency from
// the accepted last word to the first output word (4 clocks, see the
// controller's timing note). Switches are changed only between packets and
// then given 3 clocks to pass the synchroniser. The pedals with state (delay,
// filters, tremolo, harmonizer) are covered end to end by the top-level bench.
module tb_audio_controller;
  import slime_pkg::*;
  logic clk = 0, pclk = 0, rst = 1;
  logic [15:0] sw = '0;
  mag_t vol = 8'd255, mag1 = 8'd100, mag2 = 8'd40, mag3 = 8'd0;
  sample_t s_data = '0, m_data;
  logic s_valid = 0, s_ready, s_last = 0, m_valid, m_ready = 0, m_last;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs;
  int checks = 0, failures = 0;

  audio_controller dut (.clk, .pixel_clk(pclk), .rst, .sw, .vol, .mag1, .mag2, .mag3,
    .s_axis_data(s_data), .s_axis_valid(s_valid), .s_axis_ready(s_ready),
    .s_axis_last(s_last), .m_axis_data(m_data), .m_axis_valid(m_valid),
    .m_axis_ready(m_ready), .m_axis_last(m_last),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  always #5 clk = ~clk;
  always #3 pclk = ~pclk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic sample_t volume(input sample_t y, input int v);
    longint gain = (longint'(v) << 24) / 255;
    return sat_sample((64'(y) * gain) >>> 24);
  endfunction

  function automatic sample_t model(input logic [15:0] s, input sample_t x);
    longint t;
    case (s[15:7])
      9'b001000000: begin                       // overdrive
        t = longint'(mag1) * 5000;
        return volume(sample_t'(x > t ? t : (x < -t ? -t : x)), int'(vol));
      end
      9'b010000000: begin                       // distortion
        t = longint'(mag2) * 5000;
        if (x > t)       return volume(sample_t'(t + ((x - t) >>> 2)), int'(vol));
        else if (x < -t) return volume(sample_t'(-t + ((x + t) >>> 2)), int'(vol));
        return volume(x, int'(vol));
      end
      default: return volume(x, int'(vol));     // clean
    endcase
  endfunction

  // A word accepted while a packet is in flight (last word in, last word not
  // yet out) is a failure.
  bit in_flight = 0;
  always @(posedge clk)
    if (!rst) begin
      if (s_valid && s_ready && in_flight) begin
        failures++;
        $display("FAIL packet accepted while another is in flight");
      end
      if (s_valid && s_ready && s_last) in_flight = 1;
      if (m_valid && m_ready && m_last) in_flight = 0;
    end

  task automatic packet(input sample_t l, input sample_t r, input bit check_lat);
    sample_t el, er;
    int t_last, t_first;
    el = model(sw, l);
    er = model(sw, r);
    s_valid <= 1; s_last <= 0; s_data <= l;
    do @(posedge clk); while (!s_ready);
    s_last <= 1; s_data <= r;
    do @(posedge clk); while (!s_ready);
    s_valid <= 0; s_last <= 0;
    t_last = $time / 10;
    // left word
    do begin
      m_ready <= check_lat || ($urandom_range(0, 3) != 0);
      @(posedge clk);
    end while (!(m_valid && m_ready));
    t_first = $time / 10;
    expect_true(m_data === el && !m_last, "left word / last low");
    if (m_data !== el) $display("  left %h expected %h (in %h, sw %h)", m_data, el, l, sw);
    if (check_lat) expect_true(t_first - t_last == 4, "clean latency 4 clocks");
    if (check_lat) $display("clean latency %0d clocks", t_first - t_last);
    do begin
      m_ready <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
    end while (!(m_valid && m_ready));
    expect_true(m_data === er && m_last, "right word / last high");
    if (m_data !== er) $display("  right %h expected %h (in %h, sw %h)", m_data, er, r, sw);
    m_ready <= 0;
  endtask

  task automatic set_sw(input logic [15:0] s);
    sw = s;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    foreach (vol_list[i]) begin
      vol = vol_list[i];
      repeat (2) @(posedge clk);
      foreach (sw_list[k]) begin
        set_sw(sw_list[k]);
        for (int n = 0; n < 40; n++) begin
          automatic sample_t l = sample_t'($urandom);
          automatic sample_t r = sample_t'($urandom);
          if (n == 0) begin l = 24'sh7fffff; r = -24'sh800000; end
          // Only the first packet after a quiet spell sees the input-to-output
          // latency undisturbed by ready.
          packet(l, r, sw_list[k] == 16'h0000 && n == 0 && i == 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mag_t vol_list [3] = '{8'd255, 8'd128, 8'd0};
  logic [15:0] sw_list [5] = '{16'h0000, 16'h2000, 16'h4000, 16'hC000, 16'h0100};
endmodule
