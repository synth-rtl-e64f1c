// tb_vocoder: checks the ten-band vocoder against a bit-exact integer model
// (the same band-pass, square/low-pass and product-sum arithmetic, with the
// pipeline: carrier bands and envelopes registered, sum registered), and
// checks its behaviour:
//   * voice and carrier in the same band (1 kHz) give a loud output,
//   * voice at 111 Hz with the carrier at 5187 Hz gives a much quieter one,
//   * silence on the voice input decays the output to zero,
//   * a second instance with OUT_SHIFT = 8 clips, and reports it.
module tb_vocoder;
  import synth_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  sample_t modulator = 0, carrier = 0, vocoded, vocoded8;
  logic saturated, saturated8;
  int checks = 0, failures = 0;

  vocoder dut (.clk, .rst, .ce, .modulator, .carrier, .vocoded, .saturated);
  vocoder #(.OUT_SHIFT(8)) dut8 (.clk, .rst, .ce, .modulator, .carrier,
                                 .vocoded(vocoded8), .saturated(saturated8));
  always #10 clk = ~clk;

  // ---- reference model ----
  longint a2 [10], a3 [10], b1 [10];
  longint mx1 [10], mx2 [10], my1 [10], my2 [10];
  longint cx1 [10], cx2 [10], cy1 [10], cy2 [10];
  longint es1 [10], ey [10];
  longint ref_out = 0;
  int mism = 0, sat_seen = 0;

  function automatic longint rd(longint a);
    return (a + 4096) >>> 13;
  endfunction

  task automatic model(input longint m, input longint c);
    longint s, sq, ny;
    s = 0;
    for (int b = 0; b < 10; b++) s += (ey[b] * cy1[b]) >>> 14;
    ref_out = (s > 8388607) ? 8388607 : (s < -8388608) ? -8388608 : s;
    for (int b = 0; b < 10; b++) begin
      sq = (my1[b] * my1[b]) >>> 32;
      ey[b] = (229 * sq + 229 * es1[b] + 7733 * ey[b]) >>> 13;
      es1[b] = sq;
      ny = rd(b1[b] * m - b1[b] * mx2[b] - a2[b] * my1[b] - a3[b] * my2[b]);
      mx2[b] = mx1[b]; mx1[b] = m; my2[b] = my1[b]; my1[b] = ny;
      ny = rd(b1[b] * c - b1[b] * cx2[b] - a2[b] * cy1[b] - a3[b] * cy2[b]);
      cx2[b] = cx1[b]; cx1[b] = c; cy2[b] = cy1[b]; cy1[b] = ny;
    end
  endtask

  task automatic sample(input int m, input int c);
    modulator <= sample_t'(m); carrier <= sample_t'(c); ce <= 1;
    @(posedge clk); ce <= 0;
    model(m, c);
    @(posedge clk);
    if (longint'(vocoded) != ref_out) mism++;
    if (saturated8) sat_seen++;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int sine(real f, int n, real amp);
    return $rtoi(amp * $sin(2.0 * 3.14159265358979 * f * n / 48000.0));
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bpf_coef_t cf;
    longint pk_match, pk_far;
    for (int b = 0; b < 10; b++) begin
      cf = bpf_coef(BAND_FC[b], BAND_BW[b], FS_HZ, COEF_FRAC);
      a2[b] = cf.a2; a3[b] = cf.a3; b1[b] = cf.b1;
      mx1[b] = 0; mx2[b] = 0; my1[b] = 0; my2[b] = 0;
      cx1[b] = 0; cx2[b] = 0; cy1[b] = 0; cy2[b] = 0; es1[b] = 0; ey[b] = 0;
    end
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    // random signals
    for (int i = 0; i < 1500; i++)
      sample($signed($urandom_range(0, 1 << 24)) - (1 << 23), $signed($urandom_range(0, 1 << 24)) - (1 << 23));
    check(mism == 0, $sformatf("random: %0d mismatches", mism));
    // matched band
    pk_match = 0;
    for (int n = 0; n < 6000; n++) begin
      sample(sine(1000.0, n, 8388607.0), sine(1000.0, n, 4194304.0));
      if (n > 4000 && vocoded > pk_match) pk_match = vocoded;
    end
    pk_far = 0;
    for (int n = 0; n < 6000; n++) begin
      sample(sine(111.0, n, 8388607.0), sine(5187.0, n, 4194304.0));
      if (n > 4000 && vocoded > pk_far) pk_far = vocoded;
    end
    $display("INFO matched peak %0d, mismatched peak %0d", pk_match, pk_far);
    check(pk_match > 1000000, "matched band is loud");
    check(pk_far * 20 < pk_match, "mismatched bands are quiet");
    for (int n = 0; n < 8000; n++) sample(0, sine(1000.0, n, 4194304.0));
    check(vocoded == 0, $sformatf("silent voice decays to zero (%0d)", vocoded));
    check(mism == 0, $sformatf("total mismatches %0d", mism));
    check(sat_seen > 0, "OUT_SHIFT=8 instance clipped");
    check(vocoded8 <= 8388607 && vocoded8 >= -8388608, "clipped range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
