// tb_synthesizer: five voices, carrier sum, selector, vocoder and codec port.
//  * one voice at 1000 Hz, patch 0: carrier period 50 176 clocks;
//  * three voices on: carrier = sum of the voice outputs, one clock later;
//  * disabled voices contribute nothing;
//  * the codec port sends the selected signal: carrier (select 0) or the
//    vocoder output (select 1), latched at each frame start;
//  * with a 1 kHz microphone tone from a codec model and a 1 kHz carrier the
//    vocoded signal becomes loud;
//  * aud_xck = clk / 4.
module tb_synthesizer;
  import synth_pkg::*;
  logic clk = 0, rst = 1, select_out = 0;
  freq_t fm_dat [5] = '{1000, 0, 0, 0, 0};
  logic [4:0] fm_en = 5'b00001, mode = 0;
  sample_t carrier, vocoded;
  logic sample_strobe, voc_saturated, aud_xck, aud_bclk, aud_daclrck, aud_adclrck, aud_dacdat;
  logic aud_adcdat = 0;
  int checks = 0, failures = 0;

  synthesizer dut (.*);
  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // codec model: a 1 kHz tone at 48.83 kHz frames on the left ADC channel
  int frame_n = 0;
  initial begin
    logic [23:0] w;
    forever begin
      @(posedge sample_strobe);
      w = 24'($rtoi(8000000.0 * $sin(2.0 * 3.14159265358979 * 1000.0 * frame_n / 48828.125)));
      frame_n++;
      for (int s = 0; s < 24; s++) begin
        aud_adcdat <= w[23 - s];
        @(negedge aud_bclk);
      end
      aud_adcdat <= 0;
    end
  end

  // DAC word latched at each frame start must be the selected sample
  int dac_bad = 0, dac_frames = 0;
  sample_t sel_prev;
  always @(posedge clk) begin
    sel_prev <= select_out ? vocoded : carrier;
    if (sample_strobe && !rst) begin
      dac_frames++;
      if (dut.u_codec.dac_word != sel_prev) dac_bad++;
    end
  end

  task automatic period(output int n);
    sample_t prev;
    int guard;
    // each wait gives up after 200 000 clocks (a silent carrier) with n = -1
    prev = carrier; guard = 0;
    while (!(prev < 0 && carrier >= 0) && guard < 200_000) begin
      prev = carrier; @(posedge clk); #1; guard++;
    end
    n = 0; prev = carrier;
    do begin prev = carrier; @(posedge clk); #1; n++; end
    while (!(prev < 0 && carrier >= 0) && n < 200_000);
    if (guard >= 200_000 || n >= 200_000) n = -1;
  endtask

  initial begin
    int n, bad, xr;
    sample_t s;
    longint pk;
    logic px;
    repeat (3) @(posedge clk); rst <= 0;
    period(n); period(n);
    check(n == 50176, $sformatf("carrier period %0d", n));
    fm_dat = '{1000, 440, 0, 3520, 0}; fm_en = 5'b01011;
    bad = 0;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      s = dut.voice[0] + dut.voice[1] + dut.voice[3];
      @(posedge clk); #1;
      if (carrier != s) bad++;
      if (dut.voice[2] != 0 || dut.voice[4] != 0) bad++;
    end
    check(bad == 0, $sformatf("carrier = sum of voices (%0d bad)", bad));
    // aud_xck: rising edges every 4 clocks
    xr = 0; px = aud_xck;
    for (int i = 0; i < 400; i++) begin @(posedge clk); #1; if (aud_xck && !px) xr++; px = aud_xck; end
    check(xr == 100, $sformatf("aud_xck edges %0d", xr));
    // vocoder path
    fm_dat = '{1000, 0, 0, 0, 0}; fm_en = 5'b00001;
    select_out = 1;
    pk = 0;
    repeat (200) @(posedge sample_strobe);
    for (int i = 0; i < 200; i++) begin @(posedge sample_strobe); if (vocoded > pk) pk = vocoded; end
    $display("INFO vocoded peak %0d", pk);
    check(pk > 200000, "1 kHz voice on 1 kHz carrier is loud");
    check(dac_bad == 0 && dac_frames > 400, $sformatf("DAC gets selected sample (%0d bad of %0d)", dac_bad, dac_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
