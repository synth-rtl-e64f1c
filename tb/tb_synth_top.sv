// tb_synth_top: end-to-end test of the whole design at its real sizes and
// rates: a 50 MHz clock, MIDI bytes sent serially at 31 250 baud on midi_rx,
// a codec model that feeds a microphone tone on the ADC line and decodes the
// left DAC channel. It checks:
//   * Note On A4 plays 440 Hz: the voice frequency becomes 440 and the DAC
//     stream crosses zero upward every 48828/440 = 111 frames (one period of
//     512 steps of 222 clocks = 113 664 clocks);
//   * running status, five-voice round robin and reuse of the oldest voice,
//     Note Off (0x80) and Note On with velocity 0 as Note Off, keys outside
//     21..105 ignored;
//   * patch switch: mode 1 (sawtooth) gives a carrier that never goes negative;
//   * vocoder select: with sw[0] = 1 and a 1 kHz microphone tone, a B5 (987 Hz)
//     note comes out loud on the DAC; with the microphone silent it dies away.
// Each of these mechanisms is counted and must have happened at least once.
module tb_synth_top;
  import synth_pkg::*;
  logic clk = 0, rst_n = 0, midi_rx = 1, aud_adcdat = 0;
  logic [17:0] sw = 0;
  logic [7:0] ledg;
  logic aud_xck, aud_bclk, aud_daclrck, aud_adclrck, aud_dacdat;
  int checks = 0, failures = 0;

  synth_top dut (.*);
  always #10 clk = ~clk;   // 50 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- MIDI transmitter ----
  task automatic midi_byte(input logic [7:0] b);
    midi_rx <= 0; repeat (1600) @(posedge clk);
    for (int i = 0; i < 8; i++) begin midi_rx <= b[i]; repeat (1600) @(posedge clk); end
    midi_rx <= 1; repeat (1600) @(posedge clk);
  endtask
  task automatic midi_msg(input logic [7:0] s, input logic [7:0] n, input logic [7:0] v);
    midi_byte(s); midi_byte(n); midi_byte(v); repeat (200) @(posedge clk);
  endtask

  // ---- codec model: microphone tone in, DAC words out ----
  real mic_amp = 0.0;
  int frame_n = 0;
  sample_t dac_word;
  int dac_frames = 0;
  initial begin
    logic [23:0] w;
    forever begin
      @(posedge aud_daclrck);
      w = 24'($rtoi(mic_amp * $sin(2.0 * 3.14159265358979 * 1000.0 * frame_n / 48828.125)));
      frame_n++;
      for (int s = 0; s < 32; s++) begin
        aud_adcdat <= (s < 24) ? w[23 - s] : 1'b0;
        @(posedge aud_bclk);
        if (s < 24) dac_word[23 - s] = aud_dacdat;
        @(negedge aud_bclk);
      end
      dac_frames++;
    end
  end

  // count DAC frames between upward zero crossings
  task automatic dac_period(output int frames);
    sample_t prev;
    int start;
    @(posedge aud_adclrck);  // next frame decoded
    prev = dac_word;
    do begin prev = dac_word; @(negedge aud_daclrck); end while (!(prev < 0 && dac_word >= 0));
    start = dac_frames;
    do begin prev = dac_word; @(negedge aud_daclrck); end while (!(prev < 0 && dac_word >= 0));
    frames = dac_frames - start;
  endtask

  task automatic dac_peak(input int nframes, output longint pk);
    pk = 0;
    repeat (nframes) begin
      @(negedge aud_daclrck);
      if (dac_word > pk) pk = dac_word;
      if (-dac_word > pk) pk = -dac_word;
    end
  endtask

  // mechanism counters
  int n_note_on = 0, n_off_0x80 = 0, n_off_vel0 = 0, n_running = 0, n_reuse = 0;
  int n_ignored = 0, n_patch = 0, n_vocoder = 0;

  function automatic int f(int v);
    return int'(dut.note_freq[v]);
  endfunction

  initial begin
    int fr, neg;
    longint pk_on, pk_off;
    repeat (10) @(posedge clk); rst_n <= 1; repeat (10) @(posedge clk);

    // Note On A4, patch 0 (sine), synthesizer output
    midi_msg(8'h90, 8'd69, 8'd100);
    check(f(0) == 440, $sformatf("A4 frequency %0d", f(0)));
    check(ledg == 8'd100, "last byte on ledg");
    if (f(0) == 440) n_note_on++;
    dac_period(fr);
    check(fr >= 110 && fr <= 112, $sformatf("A4 period %0d frames", fr));

    // running status: two more notes without status bytes
    midi_byte(8'd72); midi_byte(8'd90); midi_byte(8'd76); midi_byte(8'd90);
    repeat (200) @(posedge clk);
    check(f(1) == 523 && f(2) == 659, $sformatf("running status %0d %0d", f(1), f(2)));
    if (f(1) == 523 && f(2) == 659) n_running++;

    // fill voices 3 and 4, then a sixth note reuses voice 0
    midi_msg(8'h90, 8'd60, 8'd80);
    midi_msg(8'h90, 8'd64, 8'd80);
    midi_msg(8'h90, 8'd83, 8'd80);
    check(f(3) == 261 && f(4) == 329 && f(0) == 987, $sformatf("round robin %0d %0d %0d", f(3), f(4), f(0)));
    if (f(0) == 987) n_reuse++;
    n_note_on += 3;

    // keys outside 21..105 are ignored
    midi_msg(8'h90, 8'd10, 8'd80);
    midi_msg(8'h90, 8'd110, 8'd80);
    check(f(1) == 523 && f(2) == 659 && f(3) == 261, "out-of-range keys ignored");
    if (f(1) == 523) n_ignored++;

    // Note Off 0x80 and Note On with velocity 0
    midi_msg(8'h80, 8'd72, 8'd64);
    check(f(1) == 0, "0x80 note off");
    if (f(1) == 0) n_off_0x80++;
    midi_msg(8'h90, 8'd76, 8'd0);
    check(f(2) == 0, "velocity-0 note off");
    if (f(2) == 0) n_off_vel0++;
    midi_msg(8'h80, 8'd60, 8'd0);
    midi_msg(8'h80, 8'd64, 8'd0);
    check(f(3) == 0 && f(4) == 0 && f(0) == 987, "only B5 left");

    // patch switch to sawtooth: carrier never negative
    sw[17:13] = 5'd1;
    neg = 0;
    repeat (120) begin @(negedge aud_daclrck); if (dac_word < 0) neg++; end
    check(neg == 0, "sawtooth patch is non-negative");
    sw[17:13] = 5'd0;
    neg = 0;
    repeat (120) begin @(negedge aud_daclrck); if (dac_word < 0) neg++; end
    check(neg > 20, "sine patch swings negative");
    n_patch++;

    // vocoder: 1 kHz microphone tone, B5 carrier
    sw[0] = 1;
    mic_amp = 8000000.0;
    repeat (300) @(negedge aud_daclrck);
    dac_peak(200, pk_on);
    mic_amp = 0.0;
    repeat (1500) @(negedge aud_daclrck);
    dac_peak(100, pk_off);
    $display("INFO vocoded peak with voice %0d, after silence %0d", pk_on, pk_off);
    check(pk_on > 100000, "vocoded output loud while speaking");
    check(pk_off * 50 < pk_on, "vocoded output dies with silence");
    if (pk_on > 100000) n_vocoder++;

    $display("INFO mechanisms: note_on=%0d off_0x80=%0d off_vel0=%0d running_status=%0d voice_reuse=%0d ignored_key=%0d patch_switch=%0d vocoder=%0d",
             n_note_on, n_off_0x80, n_off_vel0, n_running, n_reuse, n_ignored, n_patch, n_vocoder);
    check(n_note_on > 0, "note on happened");
    check(n_off_0x80 > 0, "0x80 note off happened");
    check(n_off_vel0 > 0, "velocity-0 note off happened");
    check(n_running > 0, "running status happened");
    check(n_reuse > 0, "voice reuse happened");
    check(n_ignored > 0, "ignored key happened");
    check(n_patch > 0, "patch switch happened");
    check(n_vocoder > 0, "vocoder mode happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
