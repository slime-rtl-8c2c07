// Testbench for axis_i2s2: a behavioural codec drives random stereo words onto
// the serial input in I2S format; the bench takes each received 2-word packet
// from the stream, checks it against what the codec sent, loops it back into
// the transmit stream, and decodes the serial output of the next frame to check
// the same words come out. It also checks the LRCK period (512 clocks) and the
// SCLK period (8 clocks).
module tb_axis_i2s2;
  import slime_pkg::*;
  logic clk = 0, resetn = 0;
  sample_t tx_data, rx_data;
  logic tx_valid = 0, tx_ready, tx_last = 0;
  logic rx_valid, rx_ready = 0, rx_last;
  logic tx_mclk, tx_lrck, tx_sclk, tx_sdout, rx_mclk, rx_lrck, rx_sclk, rx_sdin = 0;
  int checks = 0, failures = 0;

  axis_i2s2 dut (
    .axis_clk(clk), .axis_resetn(resetn),
    .tx_axis_s_data(tx_data), .tx_axis_s_valid(tx_valid), .tx_axis_s_ready(tx_ready),
    .tx_axis_s_last(tx_last),
    .rx_axis_m_data(rx_data), .rx_axis_m_valid(rx_valid), .rx_axis_m_ready(rx_ready),
    .rx_axis_m_last(rx_last),
    .tx_mclk, .tx_lrck, .tx_sclk, .tx_sdout, .rx_mclk, .rx_lrck, .rx_sclk, .rx_sdin);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- codec model: ADC side (drives rx_sdin)
  sample_t adc_l [$], adc_r [$];     // words sent, per frame
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
      rx_sdin = 0;
    end else begin
      rx_idx++;
      if (rx_idx >= 1 && rx_idx <= 24)
        rx_sdin = rx_lrck ? cur_r[24-rx_idx] : cur_l[24-rx_idx];
      else
        rx_sdin = 0;
    end
  end

  // ---------------- codec model: DAC side (decodes tx_sdout)
  sample_t dac_l [$], dac_r [$];
  sample_t sh;
  int      tx_idx = 0;
  logic    tx_last_lrck = 0;
  always @(posedge tx_sclk) begin
    if (tx_lrck != tx_last_lrck) begin
      tx_last_lrck = tx_lrck;
      tx_idx = 0;
    end
    if (tx_idx >= 1 && tx_idx <= 24) sh = {sh[22:0], tx_sdout};
    if (tx_idx == 24) begin
      if (tx_lrck) dac_r.push_back(sh); else dac_l.push_back(sh);
    end
    tx_idx++;
  end

  // ---------------- timing checks
  int last_rise = -1, cyc = 0, last_sclk = -1;
  always @(posedge clk) cyc++;
  always @(posedge rx_lrck) begin
    if (last_rise >= 0) begin
      checks++;
      if (cyc - last_rise != 512) begin
        failures++; $display("FAIL LRCK period %0d", cyc - last_rise);
      end
    end
    last_rise = cyc;
  end
  always @(posedge tx_sclk) begin
    if (last_sclk >= 0 && cyc - last_sclk != 8) begin
      failures++; $display("FAIL SCLK period %0d", cyc - last_sclk);
    end
    last_sclk = cyc;
  end

  // ---------------- stream side: receive, compare, loop back
  sample_t got_l [$], got_r [$];
  initial begin
    sample_t l, r;
    repeat (5) @(posedge clk);
    resetn = 1;
    for (int f = 0; f < 40; f++) begin
      rx_ready <= 1;
      do @(posedge clk); while (!(rx_valid && !rx_last));
      l = rx_data;
      do @(posedge clk); while (!(rx_valid && rx_last));
      r = rx_data;
      rx_ready <= 0;
      got_l.push_back(l);
      got_r.push_back(r);
      // loop back into the transmitter
      tx_valid <= 1; tx_last <= 0; tx_data <= l;
      do @(posedge clk); while (!tx_ready);
      tx_last <= 1; tx_data <= r;
      do @(posedge clk); while (!tx_ready);
      tx_valid <= 0; tx_last <= 0;
    end
    repeat (1100) @(posedge clk);
    // The codec model starts its first word list at the first full frame (1).
    for (int f = 1; f < 40; f++) begin
      checks += 2;
      if (got_l[f] !== adc_l[f-1] || got_r[f] !== adc_r[f-1]) begin
        failures++;
        $display("FAIL rx frame %0d got %h/%h sent %h/%h", f, got_l[f], got_r[f], adc_l[f-1], adc_r[f-1]);
      end
    end
    // Word looped back after receive frame f is serialised in frame f+1.
    for (int f = 1; f < 39; f++) begin
      checks += 2;
      if (dac_l[f+1] !== got_l[f] || dac_r[f+1] !== got_r[f]) begin
        failures++;
        $display("FAIL tx frame %0d out %h/%h expected %h/%h", f, dac_l[f+1], dac_r[f+1], got_l[f], got_r[f]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
