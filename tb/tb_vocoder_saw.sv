// tb_vocoder_saw: the vocoder at its default size and rates, with a 100 Hz
// sawtooth carrier made by an fm_operator and a synthetic "voice".
//
// The clock is 50 MHz and the vocoder takes one sample every 1024 clocks
// (48 828 Hz), as the codec port strobes it. The carrier is fm_operator in
// sawtooth mode at 100 Hz: 977 clocks per table step, 512 steps, so its
// harmonics lie at multiples of 50e6 / 500224 = 99.955 Hz. The modulator
// stands in for a voice with two formants: sines at 500 Hz and 2000 Hz,
// each at amplitude 2^21. Alongside the RTL the testbench runs its own
// floating-point vocoder: the same band plan, filters designed from the
// formulas with coefficients rounded to 13 fractional bits, squaring scaled
// by 2^-32, the 440 Hz envelope low-pass, products scaled by 2^-14, and the
// envelope one sample behind the carrier band as in the RTL. After 0.2 s of
// settling it measures the amplitude of several carrier harmonics in both
// outputs by correlation over 0.25 s with a Hann window. Checks:
//   * the RTL matches the real-valued model within 15% (+20) at each
//     harmonic: the 5th and 20th (about 500 Hz and 2000 Hz, where the voice
//     has its energy) and the 2nd, 10th, 14th and 40th;
//   * the formant harmonics come through: the 5th is at least ten times the
//     10th, 14th and 40th, the 20th at least five times;
//   * the output never clips.
module tb_vocoder_saw;
  import synth_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real F0 = 50.0e6 / 500224.0;   // sawtooth fundamental
  localparam real FS = 50.0e6 / 1024.0;     // sample rate

  logic clk = 0, rst = 1, ce = 0, sat;
  sample_t saw, mic = 0, voc;
  int checks = 0, failures = 0;

  fm_operator u_saw (
    .clk, .rst, .mute(1'b0), .osc_select(OSC_SAW), .osc_freq(16'd100),
    .modulator(24'd0), .mod_factor(5'd0), .fm_out(saw));
  vocoder dut (
    .clk, .rst, .ce, .modulator(mic), .carrier(saw), .vocoded(voc), .saturated(sat));

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int NH = 6;
  localparam int HARM [NH] = '{5, 20, 2, 10, 14, 40};
  real si [NH], co [NH], msi [NH], mco [NH];
  real wsum = 0.0, dc = 0.0;

  // floating-point reference vocoder
  real ba [NUM_BANDS], bb [NUM_BANDS], bk [NUM_BANDS];
  real mx1 [NUM_BANDS], mx2 [NUM_BANDS], my1 [NUM_BANDS], my2 [NUM_BANDS];
  real cx1 [NUM_BANDS], cx2 [NUM_BANDS], cy1 [NUM_BANDS], cy2 [NUM_BANDS];
  real es1 [NUM_BANDS], ey1 [NUM_BANDS];
  real la, lk;

  // coefficients rounded to the 2^-13 grid the hardware uses
  function automatic real q13(real v);
    return real'($rtoi(v * 8192.0 + (v >= 0.0 ? 0.5 : -0.5))) / 8192.0;
  endfunction

  task automatic model_init();
    real wc, bw, cb;
    for (int i = 0; i < NUM_BANDS; i++) begin
      wc = 2.0 * PI * real'(BAND_FC[i]) / 48000.0;
      bw = 2.0 * PI * real'(BAND_BW[i]) / 48000.0;
      cb = 1.0 / $cos(bw);
      ba[i] = cb - $sqrt(cb * cb - 1.0);
      bk[i] = q13((1.0 - ba[i]) / 2.0);
      bb[i] = q13($cos(wc) * (1.0 + ba[i]));   // holds beta(1+alpha)
      ba[i] = q13(ba[i]);
      mx1[i] = 0.0; mx2[i] = 0.0; my1[i] = 0.0; my2[i] = 0.0;
      cx1[i] = 0.0; cx2[i] = 0.0; cy1[i] = 0.0; cy2[i] = 0.0;
      es1[i] = 0.0; ey1[i] = 0.0;
    end
    wc = 2.0 * PI * 440.0 / 48000.0;
    la = (1.0 - $sin(wc)) / $cos(wc);
    lk = q13((1.0 - la) / 2.0);
    la = q13(la);
  endtask

  function automatic real model_step(real m, real c);
    real ym, yc, sq, e, acc;
    acc = 0.0;
    for (int i = 0; i < NUM_BANDS; i++) begin
      ym = bk[i] * (m - mx2[i]) + bb[i] * my1[i] - ba[i] * my2[i];
      yc = bk[i] * (c - cx2[i]) + bb[i] * cy1[i] - ba[i] * cy2[i];
      mx2[i] = mx1[i]; mx1[i] = m; my2[i] = my1[i]; my1[i] = ym;
      cx2[i] = cx1[i]; cx1[i] = c; cy2[i] = cy1[i]; cy1[i] = yc;
      sq = ym * ym / 4294967296.0;
      e  = lk * (sq + es1[i]) + la * ey1[i];
      // as in the RTL, the envelope register lags the carrier band by one sample
      acc += ey1[i] * yc / 16384.0;
      es1[i] = sq; ey1[i] = e;
    end
    return acc;
  endfunction
  int clipped = 0;

  initial begin
    int n;
    real t, w, mo, amp [NH], mamp [NH];
    foreach (si[i]) begin si[i] = 0.0; co[i] = 0.0; msi[i] = 0.0; mco[i] = 0.0; end
    model_init();
    repeat (3) @(posedge clk); rst <= 0;
    for (n = 0; n < 22000; n++) begin
      // one sample period of 1024 clocks; strobe on the last one
      t = real'(n) / FS;
      mic <= sample_t'($rtoi(2097152.0 * ($sin(2.0 * PI * 500.0 * t) + $sin(2.0 * PI * 2000.0 * t))));
      repeat (1023) @(posedge clk);
      ce <= 1; @(posedge clk); ce <= 0;
      mo = model_step(real'(mic), real'(saw));
      if (sat) clipped++;
      if (n >= 9766) begin
        // Hann window over the measurement span, so that the DC level and
        // the strong harmonics do not leak into the weak ones
        w = 0.5 - 0.5 * $cos(2.0 * PI * real'(n - 9766) / real'(22000 - 9766));
        wsum += w;
        dc   += w * real'(voc);
        foreach (HARM[h]) begin
          si[h] += w * real'(voc) * $sin(2.0 * PI * HARM[h] * F0 * t);
          co[h] += w * real'(voc) * $cos(2.0 * PI * HARM[h] * F0 * t);
          msi[h] += w * mo * $sin(2.0 * PI * HARM[h] * F0 * t);
          mco[h] += w * mo * $cos(2.0 * PI * HARM[h] * F0 * t);
        end
      end
    end
    foreach (HARM[h]) begin
      amp[h]  = 2.0 / wsum * $sqrt(si[h] * si[h] + co[h] * co[h]);
      mamp[h] = 2.0 / wsum * $sqrt(msi[h] * msi[h] + mco[h] * mco[h]);
      $display("INFO harmonic %0d (%0.0f Hz): amplitude %0.0f, model %0.0f", HARM[h], HARM[h] * F0, amp[h], mamp[h]);
      check(amp[h] > 0.85 * mamp[h] - 20.0 && amp[h] < 1.15 * mamp[h] + 20.0,
            $sformatf("harmonic %0d matches the real-valued model", HARM[h]));
    end
    $display("INFO mean level %0.0f", dc / wsum);
    check(amp[0] > 500.0 && amp[1] > 500.0, "formant harmonics present");
    for (int h = 3; h < NH; h++) begin
      check(amp[0] > 10.0 * amp[h], $sformatf("500 Hz harmonic dominates harmonic %0d", HARM[h]));
      check(amp[1] > 5.0 * amp[h], $sformatf("2000 Hz harmonic dominates harmonic %0d", HARM[h]));
    end
    check(clipped == 0, $sformatf("no clipping (%0d clipped)", clipped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
