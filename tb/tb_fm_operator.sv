// tb_fm_operator: checks the oscillator's step rate and waveforms.
//  * 440 Hz, no modulation: one table step every floor(97656/440)+1 = 222
//    clocks, so a full period takes 512*222 = 113 664 clocks (~440 Hz).
//  * modulation 0x000200 >> 1 adds 256 Hz: 97656/696 = 140, 141 clocks/step.
//  * sine words equal trunc((2^20-1) sin(2 pi p/512)) at every step of a period,
//    including table words known from the original design.
//  * saw = phase << 12, square = 0x011111 for the first half period, noise
//    follows a fixed table (repeats every 256 steps), mute gives zero.
module tb_fm_operator;
  import synth_pkg::*;
  logic clk = 0, rst = 1, mute = 0;
  osc_sel_e osc_select = OSC_SINE;
  freq_t osc_freq = 440;
  logic [23:0] modulator = 0;
  logic [4:0] mod_factor = 0;
  sample_t fm_out;
  int checks = 0, failures = 0;

  fm_operator dut (.*);
  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic sample_t sine_ref(int p);
    return sample_t'($rtoi(1048575.0 * $sin(2.0 * 3.14159265358979 * p / 512.0)));
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // count clocks between phase steps
  task automatic step_len(output int n);
    logic [8:0] p;
    p = dut.phase;
    n = 0;
    while (dut.phase == p) begin @(posedge clk); n++; end
  endtask

  initial begin
    int n, errs;
    sample_t first [256];
    repeat (3) @(posedge clk); rst <= 0;
    // align to a step
    step_len(n);
    for (int i = 0; i < 5; i++) begin step_len(n); check(n == 222, $sformatf("440 Hz step %0d", n)); end
    // one full period of sine, step by step
    while (dut.phase != 0) @(posedge clk);
    errs = 0;
    for (int p = 0; p < 512; p++) begin
      #1;
      if (fm_out !== sine_ref(p)) errs++;
      if (p == 1)   check(fm_out == sample_t'(24'h003243), "sine word 1");
      if (p == 69)  check(fm_out == sample_t'(24'h0bfc75), "sine word 69");
      if (p == 379) check(fm_out == sample_t'(24'hf007b7), "sine word 379");
      step_len(n);
    end
    check(errs == 0, $sformatf("sine period mismatches %0d", errs));
    // saw / square / noise
    osc_select = OSC_SAW; #1;
    check(fm_out == sample_t'({3'b0, dut.phase, 12'h0}), "saw");
    errs = 0;
    osc_select = OSC_SQUARE;
    for (int i = 0; i < 512; i++) begin
      #1;
      if (fm_out != (dut.phase < 256 ? sample_t'(24'h011111) : '0)) errs++;
      step_len(n);
    end
    check(errs == 0, "square wave");
    osc_select = OSC_NOISE;
    osc_freq = 16'd4000;   // 24 + 1 clocks per step
    for (int i = 0; i < 256; i++) begin #1; first[dut.phase[7:0]] = fm_out; step_len(n); end
    errs = 0;
    for (int i = 0; i < 256; i++) begin #1; if (fm_out != first[dut.phase[7:0]]) errs++; step_len(n); end
    check(errs == 0, "noise repeats every 256 steps");
    check(first[0] != first[1] && first[1] != first[2], "noise varies");
    check(n == 25, $sformatf("4000 Hz step %0d", n));
    // modulation
    osc_select = OSC_SINE;
    osc_freq = 440; modulator = 24'h000200; mod_factor = 5'd1;
    step_len(n);
    for (int i = 0; i < 3; i++) begin step_len(n); check(n == 141, $sformatf("modulated step %0d", n)); end
    // mute
    mute = 1;
    for (int i = 0; i < 50; i++) begin @(posedge clk); #1; if (fm_out != 0) errs++; end
    check(errs == 0, "mute");
    mute = 0; modulator = 0;
    // period of a full cycle at 440 Hz
    step_len(n);
    begin
      int total = 0;
      for (int i = 0; i < 512; i++) begin step_len(n); total += n; end
      check(total == 113664, $sformatf("period %0d clocks", total));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
