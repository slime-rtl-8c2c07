// Testbench for square_and_sum: streams random {re, im} words with random
// input gaps and random output stalls, and checks that every word comes out
// once, in order, as re^2 + im^2 with its tlast, none lost or duplicated.
module tb_square_and_sum;
  logic clk = 0, resetn = 0;
  logic [31:0] s_data = 0, m_data;
  logic s_valid = 0, s_ready, s_last = 0, m_valid, m_ready = 0, m_last;
  int checks = 0, failures = 0;
  logic [32:0] expq [$];

  square_and_sum dut (.clk, .resetn, .s_data, .s_valid, .s_ready, .s_last,
                      .m_data, .m_valid, .m_ready, .m_last);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  int got = 0;
  always @(posedge clk) begin
    if (resetn && m_valid && m_ready) begin
      logic [32:0] e;
      e = expq.pop_front();
      checks++;
      got++;
      if ({m_last, m_data} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL got %h/%b exp %h/%b", m_data, m_last, e[31:0], e[32]);
      end
    end
    m_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    int re, im;
    repeat (3) @(posedge clk);
    resetn <= 1;
    for (int k = 0; k < 2000; k++) begin
      re = int'($signed(16'($urandom)));
      im = int'($signed(16'($urandom)));
      if (k == 5) begin re = -32768; im = -32768; end
      s_data <= {16'(re), 16'(im)};
      s_last <= (k % 16 == 15);
      s_valid <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      while (!(s_valid && s_ready)) begin
        s_valid <= 1;
        @(posedge clk);
      end
      expq.push_back({1'(k % 16 == 15), 32'(re * re + im * im)});
      s_valid <= 0;
    end
    repeat (50) @(posedge clk);
    checks++;
    if (got != 2000) begin failures++; $display("FAIL %0d words out", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
