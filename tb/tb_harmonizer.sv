// Testbench for harmonizer: models the three pitch shifters per channel
// (circular buffer, fractional read index at 2^(4/12), 2^(5/12), 2^(7/12)
// computed here independently) and checks each output sample equals the input
// plus the enabled shifted samples, saturated, for random switch settings.
// Also checks the 4-clock latency. A 64-entry buffer shortens the warm-up.
module tb_harmonizer;
  import slime_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  logic [2:0] en = 0;
  stereo_t din = '0, dout;
  int checks = 0, failures = 0;
  int en_seen [8];

  harmonizer #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .valid_in, .enable_in(en), .audio_in(din), .audio_out(dout), .valid_out);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t mem [2][DEPTH];
  int      wp = 0;
  longint  idx [3] = '{0, 0, 0};
  longint  rate [3];

  function automatic sample_t sat(input longint v);
    if (v > 8388607) return 24'sh7fffff;
    if (v < -8388608) return 24'sh800000;
    return sample_t'(v);
  endfunction

  initial begin
    int lat, ra [3];
    longint el, er;
    static int semis [3] = '{4, 5, 7};
    foreach (rate[h]) rate[h] = longint'($rtoi((2.0 ** (semis[h] / 12.0)) * (2.0 ** 29) + 0.5));
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 1200; k++) begin
      din.l = sample_t'($urandom_range(0, 4000000) - 2000000);
      din.r = sample_t'($urandom);
      en = 3'($urandom);
      mem[0][wp] = din.l; mem[1][wp] = din.r; wp = (wp + 1) % DEPTH;
      foreach (idx[h]) begin
        idx[h] = (idx[h] + rate[h]) % (longint'(DEPTH) << 29);
        ra[h] = int'(idx[h] >> 29);
      end
      @(posedge clk); valid_in <= 1;
      @(posedge clk); valid_in <= 0;
      lat = 0;
      while (!valid_out) begin @(posedge clk); lat++; end
      el = longint'(din.l); er = longint'(din.r);
      if (en[2]) begin el += mem[0][ra[0]]; er += mem[1][ra[0]]; end
      if (en[1]) begin el += mem[0][ra[1]]; er += mem[1][ra[1]]; end
      if (en[0]) begin el += mem[0][ra[2]]; er += mem[1][ra[2]]; end
      if (k >= DEPTH) begin
        checks += 3;
        en_seen[en]++;
        if (dout.l !== sat(el) || dout.r !== sat(er)) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d en=%b got %0d/%0d exp %0d/%0d", k, en, dout.l, dout.r, sat(el), sat(er));
        end
        // 4-clock latency; the bench sees the registered pulse one edge late.
        if (lat != 4 + 1) begin failures++; $display("FAIL latency %0d", lat); end
      end
    end
    foreach (en_seen[e]) begin
      checks++;
      if (en_seen[e] == 0) begin failures++; $display("FAIL switch setting %0d never tried", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
