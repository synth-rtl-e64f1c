// tb_square_lowpass: bit-exact integer model of the envelope follower
// (square keeps bits 63:32; y = (229 s + 229 s1 + 7733 y1) >> 13) for
// random inputs; a constant input of 2^22 must settle at its square / 2^32 =
// 4096; a 1 kHz sine of amplitude 2^23 must give a mean envelope near
// (2^23)^2 / 2 / 2^32 = 8192, with a ripple at 2 kHz that the 440 Hz
// low-pass leaves at roughly +/-22 %.
module tb_square_lowpass;
  logic clk = 0, rst = 1, ce = 0;
  logic signed [31:0] x = 0, y;
  int checks = 0, failures = 0;

  square_lowpass dut (.*);
  always #10 clk = ~clk;

  longint ms1 = 0, my1 = 0;
  int mism = 0;

  task automatic sample(input int v);
    longint s, yn;
    x <= v; ce <= 1; @(posedge clk); ce <= 0;
    s = (longint'(v) * longint'(v)) >>> 32;
    yn = (229 * s + 229 * ms1 + 7733 * my1) >>> 13;
    ms1 = s; my1 = yn;
    @(posedge clk);
    if (longint'(y) != yn) mism++;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint lo, hi, sum;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int i = 0; i < 3000; i++) sample($signed($urandom_range(0, 1 << 24)) - (1 << 23));
    check(mism == 0, $sformatf("random: %0d mismatches", mism));
    for (int i = 0; i < 2000; i++) sample(1 << 22);
    check(y >= 4080 && y <= 4100, $sformatf("constant settles at %0d", y));
    lo = 1 << 30; hi = 0; sum = 0;
    for (int n = 0; n < 4000; n++) begin
      sample($rtoi(8388607.0 * $sin(2.0 * 3.14159265358979 * 1000.0 * n / 48000.0)));
      if (n >= 2000) begin if (y < lo) lo = y; if (y > hi) hi = y; sum += y; end
    end
    check(lo > 6000 && hi < 10500, $sformatf("sine envelope %0d..%0d", lo, hi));
    check(sum / 2000 > 7900 && sum / 2000 < 8500, $sformatf("mean envelope %0d", sum / 2000));
    check(mism == 0, "all samples bit-exact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
