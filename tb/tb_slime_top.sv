// End-to-end testbench for slime_top at its default parameters (the top has
// none of its own, so every block runs at full size).
//
// A behavioural model of the I2S audio codec drives a random stereo word onto
// the serial input every 44.1 kHz frame and decodes the words that come back
// on the serial output. The bench turns the four rotary encoders through
// their quadrature pins and sets the switches, walking through every pedal:
// clean at two volumes, overdrive, distortion, tremolo, overdrive after
// tremolo, bass boost, wah-wah at two filter positions, harmonizer with no,
// one and all intervals on, two invalid switch patterns (clean), and delay.
// Each phase lets the switches settle, then records which codec frames it
// covers and the encoder values the bench expects (it counts the detents it
// turns, saturating at 0 and 255 from the reset value 127), and checks them
// against the decoders' outputs.
//
// At the end, every phase is checked against a model worked out here from the
// codec input history: exact for clean, volume, overdrive, distortion, bass
// boost and wah-wah (a direct convolution with the filter taps), harmonizer
// off, and delay (three echoes of 2000 + 20 * mag3 frames, memory silent
// before filled). Tremolo, overdrive-after-tremolo and harmonizer-on are
// checked by their bounds and by the output differing from the input. The
// output trails the input by a whole number of frames that depends on the
// pedal's latency; for each exact phase the bench finds that lag (0..5
// frames) and counts every frame that disagrees at the best lag. Phases
// checked by bounds use the lag of the exact phase before them. (The lag
// grows by one frame once a slow FIR pedal has pushed the controller past
// the transmit window, and stays there.)
//
// Mechanisms counted (a failure for any that never happens): each pedal
// heard, volume change, each encoder turned, each harmonizer interval, wah
// filter change, invalid switch pattern, receive-stream stall (codec word
// waiting for the controller), transmit wait (controller waiting for the
// codec frame), FFT frames finished, display frames (vsync) and lit bar
// pixels on the display.
module tb_slime_top;
  import slime_pkg::*;

  localparam int DELAY_FRAMES = 6400;    // run the delay phase up to this frame

  logic clk = 0, pclk = 0, btnd = 1;
  logic [15:0] sw = '0;
  logic A_1 = 0, B_1 = 0, A_2 = 0, B_2 = 0, A_3 = 0, B_3 = 0, A_v = 0, B_v = 0;
  logic rx_data = 0;
  logic tx_mclk, tx_lrck, tx_sclk, tx_data, rx_mclk, rx_lrck, rx_sclk;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs;
  int checks = 0, failures = 0;

  slime_top dut (.axis_clk(clk), .pixel_clk(pclk), .btnd, .sw,
                 .A_1, .B_1, .A_2, .B_2, .A_3, .B_3, .A_v, .B_v,
                 .rx_data, .tx_mclk, .tx_lrck, .tx_sclk, .tx_data,
                 .rx_mclk, .rx_lrck, .rx_sclk,
                 .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

  always #22 clk = ~clk;     // ~22.6 MHz audio clock
  always #8  pclk = ~pclk;   // ~62.5 MHz pixel clock

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ codec model, ADC side
  sample_t adc_l [$], adc_r [$];
  sample_t cur_l, cur_r;
  int      rx_idx = 0;
  logic    last_lrck = 0;
  always @(negedge rx_sclk) begin
    #1;
    if (rx_lrck != last_lrck) begin
      last_lrck = rx_lrck;
      rx_idx = 0;
      if (!rx_lrck) begin
        cur_l = sample_t'($urandom);
        cur_r = sample_t'($urandom);
        adc_l.push_back(cur_l);
        adc_r.push_back(cur_r);
      end
      rx_data = 0;
    end else begin
      rx_idx++;
      rx_data = (rx_idx >= 1 && rx_idx <= 24) ? (rx_lrck ? cur_r[24-rx_idx] : cur_l[24-rx_idx]) : 1'b0;
    end
  end

  // ------------------------------------------------ codec model, DAC side
  sample_t dac_l [$], dac_r [$];
  sample_t sh;
  int      tx_idx = 0;
  logic    tx_last_lrck = 0;
  always @(posedge tx_sclk) begin
    if (tx_lrck != tx_last_lrck) begin
      tx_last_lrck = tx_lrck;
      tx_idx = 0;
    end
    if (tx_idx >= 1 && tx_idx <= 24) sh = {sh[22:0], tx_data};
    if (tx_idx == 24) begin
      if (tx_lrck) dac_r.push_back(sh); else dac_l.push_back(sh);
    end
    tx_idx++;
  end

  // ------------------------------------------------ mechanism counters
  int n_rx_stall = 0, n_tx_wait = 0, n_fft = 0, n_vsync = 0, n_lit = 0;
  always @(posedge clk) begin
    if (dut.rx_v && !dut.rx_r) n_rx_stall++;
    if (dut.tx_v && !dut.tx_r) n_tx_wait++;
    if (dut.u_ctrl.u_stft.fft_out_valid && dut.u_ctrl.u_stft.fft_out_ready &&
        dut.u_ctrl.u_stft.fft_out_last) n_fft++;
  end
  always @(negedge vga_vs) n_vsync++;
  always @(posedge pclk) if (vga_g != 0) n_lit++;

  // ------------------------------------------------ encoders
  // One detent step on encoder e: A leads B when turning up. Encoders 1
  // and 2 are wired with A and B swapped on the board, so their pins are
  // driven the other way round.
  int qphase [4] = '{0, 0, 0, 0};
  int n_turns [4] = '{0, 0, 0, 0};
  int enc [4] = '{127, 127, 127, 127};   // expected magnitudes: vol, mag1..3
  task automatic quad_step(input int e, input bit up);
    logic a, b;
    qphase[e] = up ? (qphase[e] + 1) % 4 : (qphase[e] + 3) % 4;
    case (qphase[e])
      0: begin a = 0; b = 0; end
      1: begin a = 1; b = 0; end
      2: begin a = 1; b = 1; end
      default: begin a = 0; b = 1; end
    endcase
    case (e)
      0: begin A_v = a; B_v = b; end
      1: begin B_1 = a; A_1 = b; end
      2: begin B_2 = a; A_2 = b; end
      default: begin A_3 = a; B_3 = b; end
    endcase
    repeat (6) @(posedge clk);
    enc[e] = up ? (enc[e] < 255 ? enc[e] + 1 : 255) : (enc[e] > 0 ? enc[e] - 1 : 0);
  endtask

  task automatic turn(input int e, input int steps, input bit up);
    for (int i = 0; i < steps; i++) quad_step(e, up);
    n_turns[e]++;
  endtask

  // ------------------------------------------------ phases
  typedef enum int {M_CLEAN, M_OD, M_DIST, M_TREM, M_OTREM, M_BASS, M_WAH,
                    M_HARM_OFF, M_HARM_ON, M_DELAY} model_e;
  typedef struct {
    string  name;
    model_e model;
    int     j0, j1;           // codec frames covered [j0, j1)
    int     vol, mag1, mag2, mag3;
  } phase_t;
  phase_t phases [$];

  task automatic run_phase(input string name, input model_e m, input logic [15:0] s,
                           input int frames);
    phase_t p;
    int t;
    sw = s;
    t = adc_l.size() + 4;                 // let switches and pipeline settle
    wait (adc_l.size() >= t);
    p.name = name;
    p.model = m;
    p.j0 = adc_l.size();
    // The models use the bench's own encoder counts; the decoders' values
    // are read back only to check them.
    p.vol = enc[0];
    p.mag1 = enc[1];
    p.mag2 = enc[2];
    p.mag3 = enc[3];
    checks++;
    if (int'(dut.vol) != enc[0] || int'(dut.mag1) != enc[1] ||
        int'(dut.mag2) != enc[2] || int'(dut.mag3) != enc[3]) begin
      failures++;
      $display("FAIL %s: decoders read %0d %0d %0d %0d, expected %0d %0d %0d %0d", name,
               dut.vol, dut.mag1, dut.mag2, dut.mag3, enc[0], enc[1], enc[2], enc[3]);
    end
    wait (adc_l.size() >= p.j0 + frames);
    // The newest frame is still being shifted in; it is processed after the
    // next phase has already changed the switches, so it is not counted.
    p.j1 = adc_l.size() - 1;
    phases.push_back(p);
  endtask

  // ------------------------------------------------ models
  function automatic sample_t hist(input int j, input bit right);
    if (j < 0) return '0;
    return right ? adc_r[j] : adc_l[j];
  endfunction

  function automatic sample_t conv(input coef_tab_t c, input int j, input bit right);
    logic signed [63:0] acc = 0;
    for (int i = 0; i < FIR_TAPS; i++) acc += 64'(c[i]) * 64'(hist(j - i, right));
    return sat_sample(acc >>> COEF_FRAC);
  endfunction

  function automatic sample_t volume(input sample_t y, input int vol);
    longint gain = (longint'(vol) << 24) / 255;
    return sat_sample((64'(y) * gain) >>> 24);
  endfunction

  function automatic sample_t model(input phase_t p, input int j, input bit right);
    sample_t x = hist(j, right);
    longint  t;
    int      d;
    real     f0;
    case (p.model)
      M_OD: begin
        t = longint'(p.mag1) * 5000;
        return volume(sample_t'(x > t ? t : (x < -t ? -t : x)), p.vol);
      end
      M_DIST: begin
        t = longint'(p.mag2) * 5000;
        if (x > t)       return volume(sample_t'(t + ((x - t) >>> 2)), p.vol);
        else if (x < -t) return volume(sample_t'(-t + ((x + t) >>> 2)), p.vol);
        return volume(x, p.vol);
      end
      M_BASS: return volume(conv(lowpass_taps(500.0), j, right), p.vol);
      M_WAH: begin
        f0 = 400.0 * ((2200.0 / 400.0) ** ((p.mag2 >> 5) / 7.0));
        return volume(conv(peak_taps(f0, 800.0, 8.0), j, right), p.vol);
      end
      M_DELAY: begin
        d = 2000 + 20 * p.mag3;
        return volume(sat_sample(64'(x) + 64'(hist(j - d, right) >>> 1) +
                                 64'(hist(j - 2 * d, right) >>> 2) +
                                 64'(hist(j - 3 * d, right) >>> 3)), p.vol);
      end
      default: return volume(x, p.vol);     // clean, harmonizer off
    endcase
  endfunction

  // The first packet after reset holds whatever the receiver shifted in
  // during the partial first codec frame; an echo of it is not modelled.
  function automatic bit skip(input phase_t p, input int j);
    int d = 2000 + 20 * p.mag3;
    return p.model == M_DELAY && (j - d == -1 || j - 2 * d == -1 || j - 3 * d == -1);
  endfunction

  function automatic bit exact(input model_e m);
    return !(m inside {M_TREM, M_OTREM, M_HARM_ON});
  endfunction

  function automatic int absv(input sample_t v);
    return v < 0 ? -int'(v) : int'(v);
  endfunction

  // ------------------------------------------------ stimulus
  initial begin
    automatic int fast_lag = -1;
    repeat (10) @(posedge clk);
    btnd = 0;
    wait (adc_l.size() >= 3);

    run_phase("clean vol 127", M_CLEAN, 16'h0000, 20);
    turn(0, 140, 1);                                   // volume to 255
    run_phase("clean vol 255", M_CLEAN, 16'h0000, 20);
    turn(1, 60, 0);                                    // mag1 127 -> 67
    run_phase("overdrive", M_OD, 16'h2000, 30);
    turn(2, 80, 0);                                    // mag2 127 -> 47
    run_phase("distortion", M_DIST, 16'h4000, 30);
    run_phase("tremolo", M_TREM, 16'h0400, 100);
    run_phase("overdrive after tremolo", M_OTREM, 16'h0080, 100);
    run_phase("bass boost", M_BASS, 16'h0800, 150);
    run_phase("wah-wah low", M_WAH, 16'h1000, 150);
    turn(2, 153, 1);                                   // mag2 47 -> 200
    run_phase("wah-wah high", M_WAH, 16'h1000, 150);
    run_phase("harmonizer off", M_HARM_OFF, 16'h0200, 40);
    run_phase("harmonizer third", M_HARM_ON, 16'h0204, 60);
    run_phase("harmonizer fourth", M_HARM_ON, 16'h0202, 60);
    run_phase("harmonizer fifth", M_HARM_ON, 16'h0201, 60);
    run_phase("harmonizer all", M_HARM_ON, 16'h0207, 60);
    run_phase("two pedals on", M_CLEAN, 16'hC000, 20);
    run_phase("switch 8 only", M_CLEAN, 16'h0100, 20);
    turn(3, 140, 0);                                   // mag3 127 -> 0
    run_phase("delay", M_DELAY, 16'h8000, DELAY_FRAMES - adc_l.size() - 4);
    sw = '0;
    wait (adc_l.size() >= phases[$].j1 + 8);

    // -------------------------------------------- evaluate
    foreach (phases[i]) begin
      automatic phase_t p = phases[i];
      automatic int best_k = -1, best_bad = 1 << 30, bad = 0, changed = 0;
      if (exact(p.model)) begin
        for (int k = 0; k <= 5; k++) begin
          bad = 0;
          for (int j = p.j0; j < p.j1; j++)
            if (!skip(p, j) && (j + k >= dac_l.size() || dac_l[j + k] !== model(p, j, 0) ||
                                dac_r[j + k] !== model(p, j, 1))) bad++;
          if (bad < best_bad) begin best_bad = bad; best_k = k; end
        end
        checks += p.j1 - p.j0;
        failures += best_bad;
        bad = 0;
        for (int j = p.j0; j < p.j1 && best_bad > 0; j++)
          if (!skip(p, j) && dac_l[j + best_k] !== model(p, j, 0) || dac_r[j + best_k] !== model(p, j, 1)) begin
            bad++;
            if (bad <= 3)
              $display("FAIL %s frame %0d: out %h/%h expected %h/%h (input %h/%h)", p.name, j,
                       dac_l[j + best_k], dac_r[j + best_k], model(p, j, 0), model(p, j, 1),
                       hist(j, 0), hist(j, 1));
          end
        fast_lag = best_k;
        $display("%-24s frames %0d..%0d lag %0d mismatches %0d", p.name, p.j0, p.j1 - 1,
                 best_k, best_bad);
      end else begin
        bad = 0;
        changed = 0;
        for (int j = p.j0; j < p.j1; j++)
          for (int c = 0; c < 2; c++) begin
            automatic sample_t x = hist(j, c[0]);
            automatic sample_t y = (fast_lag < 0 || j + fast_lag >= dac_l.size()) ? '0 :
                         (c ? dac_r[j + fast_lag] : dac_l[j + fast_lag]);
            if (y != x) changed++;
            if (p.model != M_HARM_ON && absv(y) > absv(x)) bad++;
            if (p.model == M_OTREM && absv(y) > p.mag2 * 5000) bad++;
          end
        checks += p.j1 - p.j0;
        failures += bad;
        checks++;
        if (changed < (p.j1 - p.j0)) begin
          failures++;
          $display("FAIL %s: output equals input in %0d of %0d words", p.name,
                   2 * (p.j1 - p.j0) - changed, 2 * (p.j1 - p.j0));
        end
        $display("%-24s frames %0d..%0d bound violations %0d changed %0d", p.name,
                 p.j0, p.j1 - 1, bad, changed);
      end
    end

    // -------------------------------------------- mechanisms
    begin
      automatic int n_vol_change = 0, n_wah_change = 0, n_delay_echo = 0;
      foreach (phases[i]) begin
        if (i > 0 && phases[i].vol != phases[i-1].vol) n_vol_change++;
        if (phases[i].model == M_WAH && i > 0 && phases[i-1].model == M_WAH &&
            (phases[i].mag2 >> 5) != (phases[i-1].mag2 >> 5)) n_wah_change++;
        if (phases[i].model == M_DELAY)
          n_delay_echo = phases[i].j1 - 3 * (2000 + 20 * phases[i].mag3);
      end
      mech("volume change", n_vol_change);
      mech("volume encoder turned", n_turns[0]);
      mech("encoder 1 turned", n_turns[1]);
      mech("encoder 2 turned", n_turns[2]);
      mech("encoder 3 turned", n_turns[3]);
      mech("wah-wah filter change", n_wah_change);
      mech("delay frames with all 3 echoes", n_delay_echo);
      mech("receive stream stalls", n_rx_stall);
      mech("transmit waits", n_tx_wait);
      mech("FFT frames", n_fft);
      mech("display frames", n_vsync);
      mech("lit display pixels", n_lit);
      // decoder read-back after the turns
      checks++;
      if (phases[1].vol != 255 || phases[2].mag1 != 67 || phases[3].mag2 != 47 ||
          phases[9].mag2 != 200 || phases[$].mag3 != 0) begin
        failures++;
        $display("FAIL encoder values %0d %0d %0d %0d %0d", phases[1].vol, phases[2].mag1,
                 phases[3].mag2, phases[9].mag2, phases[$].mag3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(input string what, input int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n <= 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask
endmodule
