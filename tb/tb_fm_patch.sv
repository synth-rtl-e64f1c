// tb_fm_patch: checks the four patches of a voice by their periods.
// At 1000 Hz an operator steps every floor(97656/1000)+1 = 98 clocks, so one
// period is 512*98 = 50 176 clocks; patch 3 runs at 3000 Hz: 33*512 = 16 896.
// Patch 2 (FM) must differ from patch 0 and have an unsteady period. Modes
// above 3 and a disabled voice must be silent. Patch outputs are the operator
// outputs delayed by one clock.
module tb_fm_patch;
  import synth_pkg::*;
  logic clk = 0, rst = 1, enable = 1;
  logic [4:0] mode = 0;
  freq_t pitch = 1000;
  sample_t fm_out;
  int checks = 0, failures = 0;

  fm_patch dut (.*);
  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // clocks between two upward zero crossings (sine) or wraps (saw)
  task automatic period(input bit saw, output int n);
    sample_t prev;
    int k;
    prev = fm_out; k = 0;
    while (1) begin
      @(posedge clk); #1;
      if (saw ? (fm_out < prev) : (prev < 0 && fm_out >= 0)) break;
      prev = fm_out;
    end
    prev = fm_out;
    n = 0;
    while (1) begin
      @(posedge clk); #1; n++;
      if (saw ? (fm_out < prev) : (prev < 0 && fm_out >= 0)) break;
      prev = fm_out;
    end
  endtask

  initial begin
    int n, n2, diff;
    sample_t op0_d;
    repeat (3) @(posedge clk); rst <= 0;
    mode = 0; period(0, n); check(n == 50176, $sformatf("sine period %0d", n));
    // one-clock delay from operator 0
    @(posedge clk); #1 op0_d = dut.op_out[0];
    @(posedge clk); #1 check(fm_out == op0_d, "patch register delay");
    mode = 1; period(1, n); check(n == 50176, $sformatf("saw period %0d", n));
    mode = 3; period(0, n); check(n == 16896, $sformatf("3x period %0d", n));
    mode = 2; period(0, n); period(0, n2);
    check(n != 50176 || n2 != 50176, $sformatf("FM periods %0d %0d", n, n2));
    diff = 0;
    for (int i = 0; i < 20000; i++) begin @(posedge clk); #1; if (fm_out != dut.patch[0]) diff++; end
    check(diff > 1000, "FM differs from plain sine");
    mode = 5; diff = 0;
    for (int i = 0; i < 1000; i++) begin @(posedge clk); #1; if (fm_out != 0) diff++; end
    check(diff == 0, "mode 5 silent");
    mode = 0; enable = 0; @(posedge clk); @(posedge clk); diff = 0;
    for (int i = 0; i < 1000; i++) begin @(posedge clk); #1; if (fm_out != 0) diff++; end
    check(diff == 0, "disabled voice silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
