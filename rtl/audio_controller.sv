// audio_controller: the hub of the effects processor. It takes each stereo
// packet from the I2S receiver, runs it through every effect pedal, picks
// the output of the pedal chosen on the switches, applies the volume, and
// returns the packet to the I2S transmitter. It also feeds the guitar
// channel to the spectrum display.
//
// Interface (all on clk, except the VGA outputs, which are on pixel_clk):
//   s_axis_*   receive stream: two 24-bit words per frame, left (guitar) then
//              right (vocal), with s_axis_last on the right word.
//   m_axis_*   transmit stream, same format.
//   sw[15:7]   one-hot pedal choice: 15 delay, 14 distortion, 13 overdrive,
//              12 wah-wah, 11 bass boost (low-pass), 10 tremolo, 9 harmonizer,
//              7 overdrive-after-tremolo. All-zero, sw[8] alone or any
//              pattern with more than one of these bits set gives the clean
//              signal.
//   sw[3]      unused.
//   sw[7:4]    spectrum-display scale: bar height is |X| >> sw[7:4].
//   sw[2:0]    harmonizer intervals: 2 third, 1 fourth, 0 fifth.
//   vol        volume, gain = vol / 255.
//   mag1       overdrive threshold, tremolo rate.
//   mag2       distortion threshold, wah-wah filter choice, overdrive
//              threshold of the overdrive-after-tremolo pedal.
//   mag3       delay time.
//
// How it works: a small FSM
//   S_RX    s_axis_ready is high; the left word and then the right word
//           (the one with last) are stored. The right word ends the packet.
//   S_START one-clock start pulse to every pedal, so that all of them keep
//           their state (delay memory, tremolo wave, filter history, pitch
//           buffers) up to date whichever one is heard. The pedal choice is
//           latched here so that a switch change never mixes two pedals in
//           one packet.
//   S_WAIT  wait for the chosen pedal's valid and store its stereo output.
//           The slowest pedal (the 127-tap FIRs) needs 128 clocks; a frame
//           is 512 clocks, so every pedal finishes before the next packet.
//   S_VOL   one clock to multiply by the volume gain and saturate.
//   S_TXL/R send left then right (with last), then return to S_RX.
// The switches are brought in through a two-flop synchroniser. The volume
// gain is (vol << 24) / 255 in 0.24 fixed point, registered every clock,
// so vol = 255 gives exactly unity gain.
//
// Timing: a packet leaves, at the earliest, 4 clocks + the chosen pedal's
// latency after its last word arrives (clean: 4 clocks). No packet is
// accepted while one is being processed; the I2S receiver holds its words
// until s_axis_ready returns, and at 512 clocks per frame that is never
// long.
//
// Follows the document: the pedal set and which pedals are stereo or per
// channel, the one-hot switch codes and the encoder-to-pedal mapping (taken
// from the listing), the volume multiplier formula, the two-flop switch
// synchroniser, and the spectrum display inside the controller fed with the
// guitar channel. This design's own choices: the explicit FSM that waits for
// the chosen pedal's valid instead of sending a fixed one clock after the
// packet, the clean fallback for invalid switch patterns, no "overdelay"
// pedal (sw[8]; the document does not describe it), and saturation after
// the volume multiply.
module audio_controller
  import slime_pkg::*;
#(
  // Delay pedal memory and timing, passed down (see delay_pedal).
  parameter int DELAY_DEPTH = 65536,
  parameter int DELAY_BASE  = 2000,
  parameter int DELAY_STEP  = 20,
  // Tremolo half-period, passed down (see tremolo_pedal).
  parameter int TREM_HALF_BASE = 1048576,
  parameter int TREM_HALF_STEP = 8192,
  // Harmonizer pitch-buffer depth (see pitch_shifter).
  parameter int HARM_DEPTH  = 1024,
  // Spectrum-display FFT size (see stft).
  parameter int FFT_N       = 1024
) (
  input  logic        clk,
  input  logic        pixel_clk,
  input  logic        rst,
  input  logic [15:0] sw,
  input  mag_t        vol,
  input  mag_t        mag1,
  input  mag_t        mag2,
  input  mag_t        mag3,
  // receive stream from the I2S module
  input  sample_t     s_axis_data,
  input  logic        s_axis_valid,
  output logic        s_axis_ready,
  input  logic        s_axis_last,
  // transmit stream to the I2S module
  output sample_t     m_axis_data,
  output logic        m_axis_valid,
  input  logic        m_axis_ready,
  output logic        m_axis_last,
  // spectrum display
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs
);

  // ------------------------------------------------------------ switches
  logic [15:0] sw_r1, sw_s;
  always_ff @(posedge clk) begin
    sw_r1 <= sw;
    sw_s  <= sw_r1;
  end

  function automatic pedal_e decode_pedal(input logic [8:0] p);
    case (p)
      9'b100000000: return P_DELAY;
      9'b010000000: return P_DISTORTION;
      9'b001000000: return P_OVERDRIVE;
      9'b000100000: return P_WAHWAH;
      9'b000010000: return P_BASS;
      9'b000001000: return P_TREMOLO;
      9'b000000100: return P_HARMONIZER;
      9'b000000001: return P_OVERTREMOLO;
      default:      return P_CLEAN;
    endcase
  endfunction

  // ------------------------------------------------------------ volume
  logic [32:0] gain;                 // 0.24 fixed point, up to 1.0
  always_ff @(posedge clk) gain <= 33'((33'(vol) << 24) / 33'd255);

  // ------------------------------------------------------------ FSM
  typedef enum logic [2:0] {S_RX, S_START, S_WAIT, S_VOL, S_TXL, S_TXR} state_e;
  state_e  state;
  pedal_e  pedal;
  stereo_t in_r, fx_r, out_r;
  logic    start;
  stereo_t fx_out;
  logic    fx_valid;

  wire s_word = s_axis_valid && s_axis_ready;
  wire m_word = m_axis_valid && m_axis_ready;

  assign s_axis_ready = (state == S_RX);
  assign start        = (state == S_START);
  assign m_axis_valid = (state == S_TXL) || (state == S_TXR);
  assign m_axis_last  = (state == S_TXR);
  assign m_axis_data  = (state == S_TXR) ? out_r.r : out_r.l;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RX;
      pedal <= P_CLEAN;
      in_r  <= '0;
      fx_r  <= '0;
      out_r <= '0;
    end else begin
      case (state)
        S_RX: if (s_word) begin
          if (s_axis_last) begin
            in_r.r <= s_axis_data;
            state  <= S_START;
          end else begin
            in_r.l <= s_axis_data;
          end
        end
        S_START: begin
          pedal <= decode_pedal(sw_s[15:7]);
          state <= S_WAIT;
        end
        S_WAIT: if (fx_valid) begin
          fx_r  <= fx_out;
          state <= S_VOL;
        end
        S_VOL: begin
          out_r.l <= sat_sample((64'(fx_r.l) * $signed({31'd0, gain})) >>> 24);
          out_r.r <= sat_sample((64'(fx_r.r) * $signed({31'd0, gain})) >>> 24);
          state   <= S_TXL;
        end
        S_TXL: if (m_word) state <= S_TXR;
        S_TXR: if (m_word) state <= S_RX;
        default: state <= S_RX;
      endcase
    end
  end

  // ------------------------------------------------------------ pedals
  stereo_t delay_out, wah_out, bass_out, harm_out;
  stereo_t dist_out, od_out, trem_out, otrem_out;
  logic    delay_v, wah_v, bass_v, harm_v;
  logic [1:0] dist_v, od_v, trem_v, otrem_v;

  delay_pedal #(.DEPTH(DELAY_DEPTH), .DELAY_BASE(DELAY_BASE), .DELAY_STEP(DELAY_STEP))
  u_delay (.clk, .rst, .valid_in(start), .mag_in(mag3), .audio_in(in_r),
           .audio_out(delay_out), .valid_out(delay_v));

  wahwah_pedal u_wah (.clk, .rst, .valid_in(start), .mag_in(mag2), .audio_in(in_r),
                      .audio_out(wah_out), .valid_out(wah_v));

  bass_boost_pedal u_bass (.clk, .rst, .valid_in(start), .audio_in(in_r),
                           .audio_out(bass_out), .valid_out(bass_v));

  harmonizer #(.DEPTH(HARM_DEPTH))
  u_harm (.clk, .rst, .valid_in(start), .enable_in(sw_s[2:0]), .audio_in(in_r),
          .audio_out(harm_out), .valid_out(harm_v));

  for (genvar c = 0; c < 2; c++) begin : g_chan
    sample_t x;
    assign x = c ? in_r.r : in_r.l;

    sample_t dist_y, od_y, trem_y, otrem_y;

    distortion_pedal u_dist (.clk, .rst, .valid_in(start), .mag_in(mag2),
                             .sample_in(x), .sample_out(dist_y), .valid_out(dist_v[c]));
    overdrive_pedal u_od (.clk, .rst, .valid_in(start), .mag_in(mag1),
                          .sample_in(x), .sample_out(od_y), .valid_out(od_v[c]));
    tremolo_pedal #(.HALF_BASE(TREM_HALF_BASE), .HALF_STEP(TREM_HALF_STEP))
    u_trem (.clk, .rst, .valid_in(start), .mag_in(mag1),
            .sample_in(x), .sample_out(trem_y), .valid_out(trem_v[c]));
    // overdrive-after-tremolo: a second overdrive fed by the tremolo output
    overdrive_pedal u_otrem (.clk, .rst, .valid_in(trem_v[c]), .mag_in(mag2),
                             .sample_in(trem_y), .sample_out(otrem_y),
                             .valid_out(otrem_v[c]));

    if (c == 0) begin : g_l
      assign dist_out.l  = dist_y;
      assign od_out.l    = od_y;
      assign trem_out.l  = trem_y;
      assign otrem_out.l = otrem_y;
    end else begin : g_r
      assign dist_out.r  = dist_y;
      assign od_out.r    = od_y;
      assign trem_out.r  = trem_y;
      assign otrem_out.r = otrem_y;
    end
  end

  // Output and valid of the latched pedal. The per-channel pedals run in
  // lock step; their two valids are ANDed.
  always_comb begin
    case (pedal)
      P_DELAY:       begin fx_out = delay_out; fx_valid = delay_v;    end
      P_DISTORTION:  begin fx_out = dist_out;  fx_valid = &dist_v;   end
      P_OVERDRIVE:   begin fx_out = od_out;    fx_valid = &od_v;     end
      P_WAHWAH:      begin fx_out = wah_out;   fx_valid = wah_v;      end
      P_BASS:        begin fx_out = bass_out;  fx_valid = bass_v;     end
      P_TREMOLO:     begin fx_out = trem_out;  fx_valid = &trem_v;   end
      P_HARMONIZER:  begin fx_out = harm_out;  fx_valid = harm_v;     end
      P_OVERTREMOLO: begin fx_out = otrem_out; fx_valid = &otrem_v; end
      default:       begin fx_out = in_r;      fx_valid = 1'b1;       end
    endcase
  end

  // ------------------------------------------------------------ spectrum
  stft #(.N(FFT_N))
  u_stft (.clk, .pixel_clk, .rst, .sample_valid(s_word && !s_axis_last),
          .sample_in(s_axis_data), .scale_in(sw_s[7:4]),
          .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs);

endmodule
