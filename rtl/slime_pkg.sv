// slime_pkg: types, constants and elaboration-time helper functions shared by
// the SLIME guitar/vocal effects processor.
//
// Audio travels through the design as signed 24-bit samples (the I2S word
// size of the audio converter board). Effect and volume controls are 8-bit
// magnitudes from quadrature rotary encoders. The pedal chosen by the
// front-panel switches is carried as the pedal_e enum.
//
// The FIR tap functions below are evaluated only at elaboration, to fill
// constant coefficient tables; they never become hardware. The low-pass and
// peak-filter formulas and the fixed-point formats are this design's own
// choices (the filters' taps are not published), while the 3.29 playback-rate
// format and the 2^(n/12) interval ratios follow the harmonizer description.
package slime_pkg;

  localparam int SAMPLE_W = 24;   // audio sample width
  localparam int MAG_W    = 8;    // rotary-encoder magnitude width

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [MAG_W-1:0]           mag_t;

  // Stereo pair; channel 0 = left (guitar), channel 1 = right (vocal).
  typedef struct packed {
    sample_t r;
    sample_t l;
  } stereo_t;

  // Pedal selected by the one-hot pedal switches (sw[15:7]).
  typedef enum logic [3:0] {
    P_CLEAN, P_DELAY, P_DISTORTION, P_OVERDRIVE, P_WAHWAH,
    P_BASS, P_TREMOLO, P_HARMONIZER, P_OVERTREMOLO
  } pedal_e;

  // Saturate a wide signed value into one sample.
  function automatic sample_t sat_sample(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (SAMPLE_W-1)) - 1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (SAMPLE_W-1));
    if (v > MAXV)      return sample_t'(MAXV);
    else if (v < MINV) return sample_t'(MINV);
    else               return sample_t'(v);
  endfunction

  // ---------------------------------------------------------------- FIR taps
  localparam int    FIR_TAPS   = 127;    // taps of every FIR in the design
  localparam int    COEF_W     = 18;     // signed coefficient width
  localparam int    COEF_FRAC  = 14;     // fraction bits of a coefficient
  localparam real   FS_HZ      = 44100.0;
  localparam real   PI         = 3.14159265358979323846;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_tab_t [FIR_TAPS];

  function automatic real sinc_lp(input int n, input real fc_hz);
    // Ideal low-pass impulse response, cutoff fc, tap n centred on 0.
    real wc;
    wc = 2.0 * PI * fc_hz / FS_HZ;
    if (n == 0) return wc / PI;
    return $sin(wc * n) / (PI * n);
  endfunction

  function automatic real hamming(input int i);
    return 0.54 - 0.46 * $cos(2.0 * PI * i / (FIR_TAPS - 1));
  endfunction

  function automatic coef_t to_coef(input real x);
    real s;
    s = x * (1 << COEF_FRAC);
    return coef_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  // Hamming-windowed low-pass, normalised to unity gain at DC:
  //   h[i] = w[i] * sinc_lp(i - M, fc) / sum_j(w[j] * sinc_lp(j - M, fc)).
  function automatic coef_tab_t lowpass_taps(input real fc_hz);
    coef_tab_t t;
    real       sum;
    sum = 0.0;
    for (int i = 0; i < FIR_TAPS; i++)
      sum += hamming(i) * sinc_lp(i - (FIR_TAPS - 1) / 2, fc_hz);
    for (int i = 0; i < FIR_TAPS; i++)
      t[i] = to_coef(hamming(i) * sinc_lp(i - (FIR_TAPS - 1) / 2, fc_hz) / sum);
    return t;
  endfunction

  // Peak filter: unit impulse at the centre tap plus (gain-1) times a
  // Hamming-windowed band-pass of width bw_hz centred on f0_hz:
  //   h[i] = d[i-M] + (g-1) * w[i] * 2 cos(2 pi f0 (i-M)/fs) * sinc_lp(i-M, bw/2)
  function automatic coef_tab_t peak_taps(input real f0_hz, input real bw_hz, input real gain);
    coef_tab_t t;
    int  m;
    real bp;
    for (int i = 0; i < FIR_TAPS; i++) begin
      m  = i - (FIR_TAPS - 1) / 2;
      bp = 2.0 * $cos(2.0 * PI * f0_hz * m / FS_HZ) * sinc_lp(m, bw_hz / 2.0);
      t[i] = to_coef((m == 0 ? 1.0 : 0.0) + (gain - 1.0) * hamming(i) * bp);
    end
    return t;
  endfunction

  // ------------------------------------------------------- harmonizer rates
  localparam int RATE_W    = 32;   // 3.29 unsigned fixed point
  localparam int RATE_FRAC = 29;
  typedef logic [RATE_W-1:0] rate_t;

  // Playback rate for an interval of n semitones: round(2^(n/12) * 2^29).
  function automatic rate_t interval_rate(input int semitones);
    real r;
    r = (2.0 ** (semitones / 12.0)) * (2.0 ** RATE_FRAC);
    return rate_t'($rtoi(r + 0.5));
  endfunction

endpackage
