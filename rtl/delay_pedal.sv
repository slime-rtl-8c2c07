// delay_pedal: stereo echo effect. The output is the input plus three earlier
// samples, delayed by D, 2D and 3D samples and attenuated by 1/2, 1/4 and 1/8
// (arithmetic right shifts of 1, 2 and 3 bits).
//
// How it works: each channel has a circular sample memory (delay_ram, read
// latency 2). On valid_in the stereo input is latched and a 13-cycle sequence
// runs, three cycles per memory access, as the document describes:
//   cycles 0-2  write the new sample at the write pointer
//   cycles 3-5  read pointer-D,   take it >>>1
//   cycles 6-8  read pointer-2D,  take it >>>2
//   cycles 9-11 read pointer-3D,  take it >>>3
//   cycle  12   add the three echoes to the input, advance the pointer
// valid_out pulses one cycle later, 13 cycles after valid_in.
// D = DELAY_BASE + mag_in * DELAY_STEP samples. The factor 20 is the
// document's; the 2000-sample base is taken from its published source. The
// sum saturates to 24 bits, which is this design's choice.
module delay_pedal
  import slime_pkg::*;
#(
  parameter int DEPTH      = 65536,
  parameter int DELAY_BASE = 2000,
  parameter int DELAY_STEP = 20,
  localparam int AW        = $clog2(DEPTH)
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  mag_t    mag_in,
  input  stereo_t audio_in,
  output stereo_t audio_out,
  output logic    valid_out
);
  localparam int LAST = 12;

  logic [AW-1:0] wr_ptr, addr, d1, d2, d3;
  logic [3:0]    phase;
  logic          busy, we;
  stereo_t       x;
  sample_t       rd [2];
  sample_t       e1 [2], e2 [2], e3 [2];

  assign d1 = AW'(DELAY_BASE + int'(mag_in) * DELAY_STEP);
  assign d2 = AW'(2 * (DELAY_BASE + int'(mag_in) * DELAY_STEP));
  assign d3 = AW'(3 * (DELAY_BASE + int'(mag_in) * DELAY_STEP));

  always_comb begin
    we = busy && phase <= 4'd2;
    if (phase <= 4'd2)      addr = wr_ptr;
    else if (phase <= 4'd5) addr = wr_ptr - d1;
    else if (phase <= 4'd8) addr = wr_ptr - d2;
    else                    addr = wr_ptr - d3;
  end

  delay_ram #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) ram_l (
    .clk, .addr, .we, .din(x.l), .dout(rd[0]));
  delay_ram #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) ram_r (
    .clk, .addr, .we, .din(x.r), .dout(rd[1]));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      phase     <= '0;
      wr_ptr    <= '0;
      valid_out <= 1'b0;
      audio_out <= '0;
      x         <= '0;
    end else begin
      valid_out <= 1'b0;
      if (!busy) begin
        if (valid_in) begin
          x     <= audio_in;
          busy  <= 1'b1;
          phase <= '0;
        end
      end else begin
        phase <= phase + 1'b1;
        for (int c = 0; c < 2; c++) begin
          if (phase == 4'd5)  e1[c] <= rd[c] >>> 1;
          if (phase == 4'd8)  e2[c] <= rd[c] >>> 2;
          if (phase == 4'd11) e3[c] <= rd[c] >>> 3;
        end
        if (phase == 4'(LAST)) begin
          audio_out.l <= sat_sample(64'(x.l) + 64'(e1[0]) + 64'(e2[0]) + 64'(e3[0]));
          audio_out.r <= sat_sample(64'(x.r) + 64'(e1[1]) + 64'(e2[1]) + 64'(e3[1]));
          valid_out   <= 1'b1;
          wr_ptr      <= wr_ptr + 1'b1;
          busy        <= 1'b0;
        end
      end
    end
  end
endmodule
