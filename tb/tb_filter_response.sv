// tb_filter_response: frequency response of the band-pass section against
// the analytic transfer function.
//
// Two filters are measured. u_plot is the section whose response is plotted
// with its coefficients printed beside the plot: 0.01926 (1 - z^-2) /
// (1 - 1.73 z^-1 + 0.9615 z^-2), which is the design formula evaluated for a
// 2500 Hz centre and 200 Hz bandwidth at 32 kHz. u_b10 is the top band of the
// vocoder bank at its default parameters (5187 Hz, 1000 Hz, 48 kHz).
// The testbench computes alpha, beta and k itself with real arithmetic,
// checks that they reproduce the printed numbers, then drives each filter
// with sines (one sample per clock), lets it settle and measures the output
// amplitude by correlating with sine and cosine over several thousand
// samples. The measured gain must match |H(e^jw)| of the real-valued
// coefficients within 3% plus 0.01 at the centre, at both band edges and
// well outside the band.
module tb_filter_response;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 4194304.0;  // 2^22

  logic clk = 0, rst = 1, ce = 1;
  logic signed [31:0] x_plot = 0, y_plot, x_b10 = 0, y_b10;
  int checks = 0, failures = 0;

  bandpass_filter #(.FC_HZ(2500), .BW_HZ(200), .FS_HZ(32000)) u_plot (
    .clk, .rst, .ce, .x(x_plot), .y(y_plot));
  bandpass_filter #(.FC_HZ(5187), .BW_HZ(1000)) u_b10 (
    .clk, .rst, .ce, .x(x_b10), .y(y_b10));

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Design formula, written out independently of the RTL package.
  task automatic coef_design(input real fc, bw, fs, output real a, b, k);
    real wc, bb, cb;
    wc = 2.0 * PI * fc / fs;
    bb = 2.0 * PI * bw / fs;
    cb = 1.0 / $cos(bb);
    a  = cb - $sqrt(cb * cb - 1.0);
    b  = $cos(wc);
    k  = (1.0 - a) / 2.0;
  endtask

  // |H(e^jw)| for H = k (1 - z^-2) / (1 - b(1+a) z^-1 + a z^-2).
  function automatic real gain(real a, b, k, w);
    real nr, ni, dr, di;
    nr = k * (1.0 - $cos(2.0 * w));
    ni = k * $sin(2.0 * w);
    dr = 1.0 - b * (1.0 + a) * $cos(w) + a * $cos(2.0 * w);
    di = b * (1.0 + a) * $sin(w) - a * $sin(2.0 * w);
    return $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
  endfunction

  task automatic measure(input bit plot, input real f, fs, output real g);
    real w, si, co, v;
    int n;
    w = 2.0 * PI * f / fs;
    si = 0.0; co = 0.0;
    for (n = 0; n < 7000; n++) begin
      if (plot) x_plot <= 32'($rtoi(AMP * $sin(w * n)));
      else      x_b10  <= 32'($rtoi(AMP * $sin(w * n)));
      @(posedge clk);
      // y now holds the output for the sample taken one clock earlier
      if (n >= 3001) begin
        v  = plot ? real'(y_plot) : real'(y_b10);
        si += v * $sin(w * (n - 1));
        co += v * $cos(w * (n - 1));
      end
    end
    g = 2.0 / 3999.0 * $sqrt(si * si + co * co) / AMP;
  endtask

  task automatic sweep(input bit plot, input real fc, bw, fs, a, b, k);
    real fr [6];
    real g, e;
    fr = '{fc, fc - bw / 2.0, fc + bw / 2.0, fc / 2.0, fc * 1.6, fc / 10.0};
    foreach (fr[i]) begin
      measure(plot, fr[i], fs, g);
      e = gain(a, b, k, 2.0 * PI * fr[i] / fs);
      $display("INFO %s %0.1f Hz: gain %0.4f expected %0.4f", plot ? "plot" : "band10", fr[i], g, e);
      check(g > e * 0.97 - 0.01 && g < e * 1.03 + 0.01,
            $sformatf("%s gain at %0.1f Hz", plot ? "plot" : "band10", fr[i]));
    end
  endtask

  initial begin
    real a, b, k;
    repeat (3) @(posedge clk); rst <= 0;

    coef_design(2500.0, 200.0, 32000.0, a, b, k);
    check(k > 0.019255 && k < 0.019265, $sformatf("plotted k %0.6f prints as 0.01926", k));
    check(b * (1.0 + a) > 1.725 && b * (1.0 + a) < 1.735, $sformatf("plotted z^-1 term %0.5f prints as 1.73", b * (1.0 + a)));
    check(a > 0.96145 && a < 0.96155, $sformatf("plotted z^-2 term %0.6f prints as 0.9615", a));
    sweep(1'b1, 2500.0, 200.0, 32000.0, a, b, k);

    coef_design(5187.0, 1000.0, 48000.0, a, b, k);
    check($rtoi(a * 8192.0 + 0.5) == 7184, "band 10 a3 = 7184");
    sweep(1'b0, 5187.0, 1000.0, 48000.0, a, b, k);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
