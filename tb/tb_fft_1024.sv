// Testbench for fft_1024: streams two frames of 1024 samples (two sines plus
// noise, then random noise), computes the DFT of each frame in the bench with
// real arithmetic, and checks every output bin, real and imaginary part,
// against X[k]/1024 within 12 LSB. Also checks the compute time between the
// last input and the first output (5120 butterfly clocks) and the m_last
// position, with random back-pressure on the output.
module tb_fft_1024;
  localparam int N = 1024;
  logic clk = 0, rst = 1;
  logic signed [15:0] s_data = 0;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0, m_last;
  logic [31:0] m_data;
  int checks = 0, failures = 0;

  fft_1024 dut (.clk, .rst, .s_data, .s_valid, .s_ready, .m_data, .m_valid, .m_ready, .m_last);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [N];
  real er [N], ei [N];

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic dft();
    real a;
    for (int k = 0; k < N; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        a = -2.0 * 3.14159265358979323846 * real'((k * n) % N) / N;
        er[k] += x[n] * $cos(a);
        ei[k] += x[n] * $sin(a);
      end
      er[k] /= N; ei[k] /= N;
    end
  endtask

  initial begin
    int t_last, t_first, cyc, re, im;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++) begin
      for (int n = 0; n < N; n++) begin
        if (f == 0)
          x[n] = $rtoi(12000.0 * $sin(2.0 * 3.14159265 * 64 * n / N)
                     + 6000.0 * $cos(2.0 * 3.14159265 * 200 * n / N))
                 + int'($urandom_range(0, 2000)) - 1000;
        else
          x[n] = int'($urandom_range(0, 60000)) - 30000;
      end
      dft();
      for (int n = 0; n < N; n++) begin
        s_data <= 16'(x[n]); s_valid <= 1;
        @(posedge clk);
        while (!s_ready) @(posedge clk);
      end
      s_valid <= 0;
      cyc = 0;
      while (!m_valid) begin @(posedge clk); cyc++; end
      checks++;
      // N/2*log2(N) butterfly clocks; the bench sees the change one edge late.
      if (cyc != N / 2 * 10 + 1) begin failures++; $display("FAIL compute clocks %0d", cyc); end
      for (int k = 0; k < N; k++) begin
        m_ready <= ($urandom_range(0, 3) != 0);
        @(posedge clk);
        while (!(m_valid && m_ready)) begin
          m_ready <= ($urandom_range(0, 3) != 0);
          @(posedge clk);
        end
        re = int'($signed(m_data[31:16]));
        im = int'($signed(m_data[15:0]));
        checks++;
        if (absr(real'(re) - er[k]) > 12.0 || absr(real'(im) - ei[k]) > 12.0 || m_last != (k == N - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d bin %0d got %0d,%0d exp %f,%f last=%b", f, k, re, im, er[k], ei[k], m_last);
        end
      end
      m_ready <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
