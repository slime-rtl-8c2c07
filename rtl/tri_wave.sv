// tri_wave: triangle-wave generator for the tremolo pedal.
//
// A clock-cycle counter measures half periods: when it reaches half_period-1
// it restarts and the direction bit flips. Independently, the wave value
// moves one step in the current direction on every step pulse (one per audio
// packet). The wave therefore rises for half_period clocks and falls for the
// next half_period clocks; its peak is the number of packets in a half period.
// The value is held between 0 and 2^WAVE_W-1. This follows the document's
// description; the saturation limits and widths are this design's choice.
module tri_wave #(
  parameter int HP_W   = 22,   // half-period counter width (clock cycles)
  parameter int WAVE_W = 16    // wave value width
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              step,
  input  logic [HP_W-1:0]   half_period,
  output logic [WAVE_W-1:0] wave
);
  logic [HP_W-1:0] cyc;
  logic            falling;   // current direction of the wave

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc     <= '0;
      falling <= 1'b0;
      wave    <= '0;
    end else begin
      if (cyc >= half_period - 1'b1) begin
        cyc     <= '0;
        falling <= ~falling;
      end else begin
        cyc <= cyc + 1'b1;
      end
      if (step) begin
        if (!falling && wave != '1)     wave <= wave + 1'b1;
        else if (falling && wave != '0) wave <= wave - 1'b1;
      end
    end
  end
endmodule
