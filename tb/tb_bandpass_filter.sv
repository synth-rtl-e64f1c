// tb_bandpass_filter: the 250 Hz / 50 Hz band at 48 kHz. Its integer
// coefficients are a2 = -16322, a3 = 8139, b1 = 27 (scale 2^13). A bit-exact
// integer model with those numbers must match every output for random and
// sine inputs. Gain: a 250 Hz sine must come out with 0.9..1.05 of its input
// amplitude, a 2 kHz sine below 0.1 of it. The output must update only on
// the strobe.
module tb_bandpass_filter;
  logic clk = 0, rst = 1, ce = 0;
  logic signed [31:0] x = 0, y;
  int checks = 0, failures = 0;

  bandpass_filter #(.FC_HZ(250), .BW_HZ(50)) dut (.*);
  always #10 clk = ~clk;

  longint mx1 = 0, mx2 = 0, my1 = 0, my2 = 0;
  int mism = 0;

  function automatic longint rdiv(longint a);
    return (a + 4096) >>> 13;
  endfunction

  task automatic sample(input int v);
    longint yn;
    x <= v; ce <= 1; @(posedge clk); ce <= 0; x <= 0;
    yn = rdiv(27 * longint'(v) - 27 * mx2 + 16322 * my1 - 8139 * my2);
    mx2 = mx1; mx1 = v; my2 = my1; my1 = yn;
    @(posedge clk);
    if (longint'(y) != yn) mism++;
    @(posedge clk);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int sine(real f, int n, real amp);
    return $rtoi(amp * $sin(2.0 * 3.14159265358979 * f * n / 48000.0));
  endfunction

  initial begin
    longint peak;
    logic signed [31:0] held;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int i = 0; i < 2000; i++) sample($signed($urandom_range(0, 1 << 24)) - (1 << 23));
    check(mism == 0, $sformatf("random input: %0d mismatches", mism));
    // in-band sine
    peak = 0;
    for (int n = 0; n < 6000; n++) begin
      sample(sine(250.0, n, 4194304.0));
      if (n > 3000 && (y > peak)) peak = y;
    end
    check(mism == 0, $sformatf("sine input: %0d mismatches", mism));
    check(peak > 3774873 && peak < 4404019, $sformatf("250 Hz gain: peak %0d", peak));
    peak = 0;
    for (int n = 0; n < 4000; n++) begin
      sample(sine(2000.0, n, 4194304.0));
      if (n > 2000 && (y > peak)) peak = y;
    end
    check(peak < 419430, $sformatf("2 kHz rejection: peak %0d", peak));
    held = y;
    x <= 32'sd1000000; repeat (5) @(posedge clk);
    check(y == held, "no update without strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
