// Testbench for rotary_decoder: drives clockwise and counter-clockwise
// quadrature sequences and checks the magnitude against a model count,
// including saturation at both ends and the mid-scale reset value.
module tb_rotary_decoder;
  logic clk = 0, rst = 1, a = 0, b = 0;
  logic [7:0] mag;
  int checks = 0, failures = 0;
  int model;

  rotary_decoder #(.WIDTH(8)) dut (.clk, .rst, .a, .b, .magnitude(mag));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp, input string what);
    checks++;
    if (mag !== 8'(exp)) begin
      failures++;
      $display("FAIL %s: magnitude=%0d expected=%0d", what, mag, exp);
    end
  endtask

  // One quadrature phase step: cw means A leads B.
  int phase = 0;
  task automatic quad_step(input bit cw);
    phase = cw ? (phase + 1) % 4 : (phase + 3) % 4;
    case (phase)
      0: begin a = 0; b = 0; end
      1: begin a = 1; b = 0; end
      2: begin a = 1; b = 1; end
      3: begin a = 0; b = 1; end
    endcase
    repeat (6) @(posedge clk);
    if (cw) model = (model < 255) ? model + 1 : 255;
    else    model = (model > 0)   ? model - 1 : 0;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    model = 127;
    @(posedge clk); #1;
    check(127, "reset value");
    for (int i = 0; i < 20; i++) quad_step(1);
    #1 check(model, "after 20 cw steps");
    if (model != 147) begin failures++; $display("model mismatch"); end
    for (int i = 0; i < 50; i++) quad_step(0);
    #1 check(model, "after 50 ccw steps");
    for (int i = 0; i < 200; i++) quad_step(1);
    #1 check(255, "saturated high");
    for (int i = 0; i < 300; i++) quad_step(0);
    #1 check(0, "saturated low");
    for (int k = 0; k < 200; k++) begin
      quad_step($urandom_range(0, 2) != 0);
      #1 check(model, "random walk");
    end
    // Steady lines: no movement.
    repeat (50) @(posedge clk);
    #1 check(model, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
