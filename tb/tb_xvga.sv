// Testbench for xvga: runs two full frames and checks, against counts kept by
// the bench, the line length (1344), the hsync pulse width (136) and position
// (after 1024 visible + 24 porch pixels), the frame length (806 lines), the
// vsync width (6 lines), and that blank is low exactly on the 1024 x 768
// visible pixels.
module tb_xvga;
  logic clk = 0, rst = 1;
  logic [10:0] h;
  logic [9:0] v;
  logic hs, vs, blank;
  int checks = 0, failures = 0;

  xvga dut (.clk, .rst, .hcount(h), .vcount(v), .hsync(hs), .vsync(vs), .blank);

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int a, input int b, input string what);
    checks++;
    if (a != b) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d vs %0d at h=%0d v=%0d", what, a, b, h, v);
    end
  endtask

  initial begin
    automatic int eh = 0, ev = 0, visible = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    eh = int'(h);                // start from wherever the counter is after reset
    ev = int'(v);
    checks++;
    if (v != 0 || h > 2) failures++;   // must restart at the top-left
    for (int n = 0; n < 2 * 1344 * 806; n++) begin
      expect_eq(int'(h), eh, "hcount");
      expect_eq(int'(v), ev, "vcount");
      expect_eq(int'(hs), int'(!(eh >= 1048 && eh < 1184)), "hsync");
      expect_eq(int'(vs), int'(!(ev >= 771 && ev < 777)), "vsync");
      expect_eq(int'(blank), int'(!(eh < 1024 && ev < 768)), "blank");
      if (!blank) visible++;
      @(posedge clk); #1;
      eh++;
      if (eh == 1344) begin eh = 0; ev = (ev == 805) ? 0 : ev + 1; end
    end
    expect_eq(visible, 2 * 1024 * 768, "visible pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
