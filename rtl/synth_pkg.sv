// synth_pkg: constants, types and elaboration-time table generators shared by
// the MIDI synthesizer / vocoder.
//
// Every table the hardware needs is computed here from its formula when the
// design is elaborated, so no data files are read:
//   * note_freq_hz(i): frequency in Hz of MIDI note 21+i (A0 = index 0),
//     floor(440 * 2^((i-48)/12)), for the 85 keys the decoder accepts.
//   * sine_value(i):   one period of a sine over TABLE_DEPTH entries,
//     trunc((2^20-1) * sin(2*pi*i/TABLE_DEPTH)), a 24-bit two's complement word.
//   * noise_table():   a fixed 256-entry table of pseudo-random words from a
//     24-bit Galois LFSR (this design's choice; the original values are random).
//   * bpf_coef():      second-order band-pass coefficients from the centre
//     frequency fc, bandwidth b and sample rate fs:
//        wc = 2*pi*fc/fs, B = 2*pi*b/fs, beta = cos(wc),
//        alpha = 1/cos(B) - sqrt(1/cos(B)^2 - 1)   (root of x^2 - 2x/cos(B) + 1
//        inside (0,1)), k = (1-alpha)/2,
//        H(z) = k (1 - z^-2) / (1 - beta(1+alpha) z^-1 + alpha z^-2),
//     each scaled by 2^COEF_FRAC and rounded to the nearest integer.
//   * lpf_coef():      first-order low-pass, alpha = (1 - sin wc)/cos wc,
//     k = (1-alpha)/2, H(z) = k (1 + z^-1) / (1 - alpha z^-1), same scaling.
// With fs = 48 kHz and 2^13 scaling these reproduce the integer coefficients
// the original filter bank used (for example 5187 Hz / 1000 Hz gives
// a2 = -11966, a3 = 7184, b1 = 504; the 440 Hz low-pass gives 7733 and 229).
package synth_pkg;

  // ---- system ---------------------------------------------------------------
  localparam int unsigned CLK_HZ     = 50_000_000;
  localparam int unsigned MIDI_BAUD  = 31_250;
  localparam int unsigned OVERSAMPLE = 16;
  localparam int unsigned TICK_DIV   = CLK_HZ / (MIDI_BAUD * OVERSAMPLE);  // 100

  // ---- synthesizer ------------------------------------------------------------
  localparam int unsigned SAMPLE_W    = 24;
  localparam int unsigned NUM_VOICES  = 5;
  localparam int unsigned TABLE_DEPTH = 512;
  localparam int unsigned PHASE_W     = $clog2(TABLE_DEPTH);
  localparam int unsigned FREQ_W      = 16;
  localparam real         SINE_AMP    = 1048575.0;  // 2^20 - 1

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [FREQ_W-1:0]          freq_t;

  typedef enum logic [1:0] {
    OSC_SINE   = 2'd0,
    OSC_SAW    = 2'd1,
    OSC_SQUARE = 2'd2,
    OSC_NOISE  = 2'd3
  } osc_sel_e;

  // ---- MIDI -------------------------------------------------------------------
  localparam logic [3:0] MIDI_NOTE_OFF = 4'h8;
  localparam logic [3:0] MIDI_NOTE_ON  = 4'h9;
  localparam int unsigned LOW_NOTE  = 21;   // A0, lowest key of an 88-key keyboard
  localparam int unsigned NUM_NOTES = 85;

  // ---- vocoder ----------------------------------------------------------------
  localparam int unsigned NUM_BANDS = 10;
  localparam int unsigned FS_HZ     = 48_000;
  localparam int unsigned COEF_FRAC = 13;
  localparam int unsigned LPF_FC_HZ = 440;
  localparam int unsigned FILT_W    = 32;

  typedef int unsigned band_tab_t [NUM_BANDS];
  // Centre frequencies and bandwidths of the ten analysis bands (Hz).
  localparam band_tab_t BAND_FC = '{111, 250, 354, 500, 707, 1000, 1414, 2000, 2828, 5187};
  localparam band_tab_t BAND_BW = '{ 40,  50,  60,  70,  80,   90,  150,  250,  500, 1000};

  typedef struct packed {
    logic signed [31:0] a2;  // z^-1 feedback coefficient (as in 1 + a2 z^-1 + a3 z^-2)
    logic signed [31:0] a3;  // z^-2 feedback coefficient
    logic signed [31:0] b1;  // feed-forward gain k; z^-2 term is -b1
  } bpf_coef_t;

  typedef struct packed {
    logic signed [31:0] alpha;  // feedback coefficient
    logic signed [31:0] k;      // feed-forward gain for x[n] and x[n-1]
  } lpf_coef_t;

  localparam real PI = 3.14159265358979323846;

  function automatic int round_int(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

  function automatic bpf_coef_t bpf_coef(int unsigned fc, int unsigned bw, int unsigned fs,
                                         int unsigned frac);
    real wc, bb, beta, cb, alpha, k, sc;
    bpf_coef_t c;
    sc    = real'(1 << frac);
    wc    = 2.0 * PI * real'(fc) / real'(fs);
    bb    = 2.0 * PI * real'(bw) / real'(fs);
    beta  = $cos(wc);
    cb    = 1.0 / $cos(bb);
    alpha = cb - $sqrt(cb * cb - 1.0);
    k     = (1.0 - alpha) / 2.0;
    c.a2  = 32'(round_int(-beta * (1.0 + alpha) * sc));
    c.a3  = 32'(round_int(alpha * sc));
    c.b1  = 32'(round_int(k * sc));
    return c;
  endfunction

  function automatic lpf_coef_t lpf_coef(int unsigned fc, int unsigned fs, int unsigned frac);
    real wc, alpha, sc;
    lpf_coef_t c;
    sc      = real'(1 << frac);
    wc      = 2.0 * PI * real'(fc) / real'(fs);
    alpha   = (1.0 - $sin(wc)) / $cos(wc);
    c.alpha = 32'(round_int(alpha * sc));
    c.k     = 32'(round_int((1.0 - alpha) / 2.0 * sc));
    return c;
  endfunction

  function automatic freq_t note_freq_hz(int unsigned idx);
    return FREQ_W'($rtoi($floor(440.0 * (2.0 ** ((real'(idx) - 48.0) / 12.0)))));
  endfunction

  function automatic sample_t sine_value(int unsigned idx, int unsigned depth);
    return SAMPLE_W'($rtoi(SINE_AMP * $sin(2.0 * PI * real'(idx) / real'(depth))));
  endfunction

  localparam int unsigned NOISE_DEPTH = 256;
  typedef sample_t noise_tab_t [NOISE_DEPTH];

  function automatic noise_tab_t noise_table();
    noise_tab_t t;
    logic [23:0] s;
    s = 24'h5A5A5A;
    for (int unsigned n = 0; n < NOISE_DEPTH; n++) begin
      for (int b = 0; b < 24; b++) s = s[0] ? ((s >> 1) ^ 24'hE10000) : (s >> 1);
      t[n] = sample_t'(s);
    end
    return t;
  endfunction

endpackage
