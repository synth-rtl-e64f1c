// tb_codec_serial: the testbench plays the codec. It drives random 24-bit
// words MSB first on the left ADC channel (changing the line while BCLK is
// low), and reads the DAC line on rising BCLK edges. Checks: bit clock period
// 16 clocks, frame (strobe) period 1024 clocks, LRCK high for the left half,
// the left and right DAC words equal the sample latched at the frame start
// with zeros in slots 24..31, and adc_sample equals the word sent in the
// previous frame.
module tb_codec_serial;
  import synth_pkg::sample_t;
  logic clk = 0, rst = 1, sample_strobe, aud_bclk, aud_daclrck, aud_adclrck, aud_dacdat, aud_adcdat = 0;
  sample_t dac_sample = 0, adc_sample;
  int checks = 0, failures = 0;

  codec_serial dut (.*);
  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [23:0] adc_words [$];
  logic [23:0] dac_sent  [$];
  longint cyc = 0, last_strobe = -1, last_rise = -1;
  int bad_bclk = 0, bad_frame = 0, frames = 0;
  logic prev_bclk = 0;
  always @(posedge clk) begin
    cyc++;
    if (aud_bclk && !prev_bclk && !rst) begin
      if (last_rise >= 0 && cyc - last_rise != 16) bad_bclk++;
      last_rise = cyc;
    end
    prev_bclk = aud_bclk;
    if (sample_strobe && !rst) begin
      if (last_strobe >= 0 && cyc - last_strobe != 1024) bad_frame++;
      last_strobe = cyc;
      frames++;
    end
  end

  initial begin
    logic [23:0] w, prev_w, dl, dr, latched;
    logic [31:0] left, right;
    logic lr_ok;
    repeat (3) @(posedge clk); rst <= 0;
    prev_w = 0;
    @(posedge sample_strobe);   // frame boundary
    for (int f = 0; f < 40; f++) begin
      w = 24'($urandom);
      latched = dut.dac_word;
      dac_sample <= sample_t'($urandom);   // next frame's sample
      lr_ok = 1;
      for (int s = 0; s < 64; s++) begin
        // drive ADC bit while BCLK low
        if (s < 24) aud_adcdat <= w[23 - s]; else aud_adcdat <= 0;
        @(posedge aud_bclk);
        if (s < 32) begin left[31 - s] = aud_dacdat; if (!aud_daclrck) lr_ok = 0; end
        else begin right[63 - s] = aud_dacdat; if (aud_daclrck) lr_ok = 0; end
        @(negedge aud_bclk);
      end
      @(posedge clk); @(posedge clk);
      check(lr_ok, "LRCK high for left half only");
      check(left == {latched, 8'h00} && right == {latched, 8'h00},
            $sformatf("frame %0d DAC words %h %h expected %h", f, left, right, latched));
      check(adc_sample == sample_t'(w), $sformatf("ADC word %h expected %h", adc_sample, w));
    end
    check(bad_bclk == 0, "BCLK period 16");
    check(bad_frame == 0 && frames >= 40, "frame period 1024");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
