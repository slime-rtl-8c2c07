// Testbench for tremolo_pedal: sends a packet every PKT clocks with a reduced
// half period, keeps its own model of the triangle (direction flipping every
// half period of clock cycles, one step per packet) and checks every output
// sample against (x * wave) >>> 13. It also checks that the wave actually
// rises and falls (peak and trough reached) and that the period follows the
// magnitude.
module tb_tremolo_pedal;
  import slime_pkg::*;
  localparam int BASE = 400, STEP = 4, PKT = 8;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  mag_t mag = 0;
  sample_t x = 0, y;
  int checks = 0, failures = 0;

  tremolo_pedal #(.HALF_BASE(BASE), .HALF_STEP(STEP)) dut (
    .clk, .rst, .valid_in, .mag_in(mag), .sample_in(x), .sample_out(y), .valid_out);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model of the triangle, updated at every clock edge like the hardware.
  int cyc = 0, wave = 0, peak = 0, turns = 0;
  bit fall = 0;
  int hp;
  always @(posedge clk) begin
    if (rst) begin
      cyc = 0; wave = 0; fall = 0;
    end else begin
      hp = BASE + int'(mag) * STEP;
      if (valid_in) begin
        if (!fall && wave != 65535) wave++;
        else if (fall && wave != 0) wave--;
      end
      if (cyc >= hp - 1) begin cyc = 0; fall = !fall; turns++; end
      else cyc++;
      if (wave > peak) peak = wave;
    end
  end

  initial begin
    int w, e;
    longint p;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 6000; k++) begin
      if (k == 3000) mag <= 8'd100;
      x <= sample_t'($urandom);
      valid_in <= 1;
      #1;
      w = wave;            // model value before the packet's edge
      @(posedge clk);      // the DUT samples valid_in here
      valid_in <= 0;
      p = longint'(x) * longint'(w);
      p = p >>> 13;
      if (p > 8388607) p = 8388607;
      if (p < -8388608) p = -8388608;
      e = int'(p);
      #1;
      checks++;
      if (!valid_out || int'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d x=%0d wave=%0d y=%0d exp=%0d", k, x, w, y, e);
      end
      @(posedge clk);
      repeat (PKT - 2) @(posedge clk);
    end
    // Packets per half period at mag 0: BASE/PKT = 50; at mag 100: 100.
    checks++;
    if (peak < 90 || peak > 101) begin failures++; $display("FAIL peak %0d", peak); end
    checks++;
    if (turns < 80) begin failures++; $display("FAIL turns %0d", turns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
