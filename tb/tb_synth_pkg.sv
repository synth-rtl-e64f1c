// tb_synth_pkg: checks the package's table generators against reference
// numbers: note frequencies of the standard equal-tempered keyboard (A0 = 27,
// A4 = 440 Hz, floor), known sine-table words, and the integer filter
// coefficients of the ten-band filter bank at 48 kHz (within one LSB).
module tb_synth_pkg;
  import synth_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int note_ref [13] = '{27, 29, 30, 32, 34, 36, 38, 41, 43, 46, 48, 51, 55};
  int sine_idx [6]  = '{1, 2, 8, 69, 379, 493};
  int sine_ref [6]  = '{24'h003243, 24'h006485, 24'h01917a, 24'h0bfc75, 24'hf007b7, 24'hfc4d97};
  int bpf_ref [10][3] = '{'{-16340, 8149, 21}, '{-16322, 8139, 27}, '{-16302, 8128, 32},
                          '{-16274, 8117, 38}, '{-16229, 8107, 43}, '{-16149, 8096, 48},
                          '{-15947, 8033, 79}, '{-15571, 7928, 132}, '{-14790, 7673, 260},
                          '{-11966, 7184, 504}};

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    bpf_coef_t c;
    lpf_coef_t l;
    noise_tab_t nt;
    int distinct;
    for (int i = 0; i < 13; i++)
      check(int'(note_freq_hz(i)) == note_ref[i], $sformatf("note %0d = %0d", i, note_freq_hz(i)));
    check(note_freq_hz(48) == 440, "A4");
    check(note_freq_hz(60) == 880, "A5");
    check(note_freq_hz(84) == 3520, "A7");
    for (int i = 0; i < 6; i++)
      check(sine_value(sine_idx[i], 512) == sample_t'(sine_ref[i]),
            $sformatf("sine[%0d] = %h", sine_idx[i], sine_value(sine_idx[i], 512)));
    check(sine_value(128, 512) == sample_t'(1048575), "sine peak");
    check(sine_value(0, 512) == '0, "sine zero");
    for (int b = 0; b < 10; b++) begin
      c = bpf_coef(BAND_FC[b], BAND_BW[b], FS_HZ, COEF_FRAC);
      check(absd(int'(c.a2), bpf_ref[b][0]) <= 1, $sformatf("band %0d a2 %0d", b, c.a2));
      check(absd(int'(c.a3), bpf_ref[b][1]) <= 1, $sformatf("band %0d a3 %0d", b, c.a3));
      check(absd(int'(c.b1), bpf_ref[b][2]) <= 1, $sformatf("band %0d b1 %0d", b, c.b1));
    end
    l = lpf_coef(LPF_FC_HZ, FS_HZ, COEF_FRAC);
    check(l.alpha == 7733, "lpf alpha");
    check(l.k == 229, "lpf k");
    nt = noise_table();
    distinct = 0;
    for (int i = 1; i < NOISE_DEPTH; i++) if (nt[i] != nt[i-1]) distinct++;
    check(distinct > 250, "noise table varies");
    check(TICK_DIV == 100, "tick divider");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
