// Testbench for pitch_shifter: keeps its own copy of the circular buffer and
// of the fractional read index, feeds random samples at several playback
// rates (1.0, a major third, a fifth, an octave) and checks every output word
// against the model wherever the model's buffer entry has been written. Also
// checks the 3-clock latency and that the read index really advances faster
// than the write pointer (the read address laps it).
module tb_pitch_shifter;
  import slime_pkg::*;
  localparam int DEPTH = 64;          // small buffer: laps happen quickly
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  rate_t rate = 0;
  sample_t x = 0, y;
  int checks = 0, failures = 0;

  pitch_shifter #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .rate_in(rate), .valid_in, .sample_in(x), .sample_out(y), .valid_out);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t mem [DEPTH];
  bit      written [DEPTH];
  int      wp = 0, laps = 0, last_ra = 0;
  longint  idx = 0;    // fixed point, 29 fraction bits, modulo DEPTH

  initial begin
    int ra, lat;
    static real ratios [4] = '{1.0, 1.2599210498948732, 1.4983070768766815, 2.0};
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (ratios[r]) begin
      rate = rate_t'($rtoi(ratios[r] * (2.0 ** 29) + 0.5));
      for (int k = 0; k < 300; k++) begin
        x = sample_t'($urandom);
        mem[wp] = x; written[wp] = 1; wp = (wp + 1) % DEPTH;
        idx = (idx + longint'(rate)) % (longint'(DEPTH) << 29);
        ra = int'(idx >> 29);
        if (ra < last_ra) laps++;
        last_ra = ra;
        @(posedge clk); valid_in <= 1;
        @(posedge clk); valid_in <= 0;
        lat = 0;
        while (!valid_out) begin @(posedge clk); lat++; end
        if (written[ra]) begin
          checks++;
          if (y !== mem[ra]) begin
            failures++;
            if (failures < 10) $display("FAIL rate %0d k=%0d addr %0d got %h exp %h", r, k, ra, y, mem[ra]);
          end
        end
        checks++;
        // 3-clock latency; the bench sees the registered pulse one edge late.
        if (lat != 3 + 1) begin failures++; $display("FAIL latency %0d", lat); end
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
    end
    checks++;
    if (laps < 4 * 300 / DEPTH + 2) begin failures++; $display("FAIL laps %0d", laps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
