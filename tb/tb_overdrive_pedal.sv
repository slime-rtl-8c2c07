// Testbench for overdrive_pedal: random samples at random magnitudes, including
// values at and around the threshold and the extremes of the sample range;
// every output is compared with the clipping rule computed in the bench, and
// valid_out is checked to follow valid_in by one clock.
module tb_overdrive_pedal;
  import slime_pkg::*;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  mag_t mag = 0;
  sample_t x = 0, y;
  int checks = 0, failures = 0;

  overdrive_pedal dut (.clk, .rst, .valid_in, .mag_in(mag), .sample_in(x), .sample_out(y), .valid_out);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(input int xi, input int m);
    automatic int t = m * 5000;
    if (xi > t) return t;
    if (xi < -t) return -t;
    return xi;
  endfunction

  initial begin
    int xi, m, e;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 3000; k++) begin
      m = $urandom_range(0, 255);
      case (k % 4)
        0: xi = $signed(24'($urandom));
        1: xi = m * 5000 + $urandom_range(0, 8) - 4;
        2: xi = -(m * 5000) + $urandom_range(0, 8) - 4;
        default: xi = (k % 8 == 3) ? 8388607 : -8388608;
      endcase
      @(posedge clk);
      mag <= mag_t'(m); x <= sample_t'(xi); valid_in <= (k % 3 == 0);
      @(posedge clk); #1;
      e = model(xi, m);
      checks++;
      if (int'(y) != e || valid_out !== (k % 3 == 0)) begin
        failures++;
        $display("FAIL x=%0d mag=%0d y=%0d expected %0d valid=%b", xi, m, y, e, valid_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
