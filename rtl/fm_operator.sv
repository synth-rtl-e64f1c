// fm_operator: wavetable oscillator with frequency modulation.
//
// A 9-bit phase walks through one period of a 512-entry sine table. The phase
// advances by one entry every (step_len + 1) clocks, where
//     step_len = CONV / (osc_freq + (modulator >> mod_factor))
// and CONV = clock / table size = 50 MHz / 512 = 97 656. With no modulation a
// note of f Hz therefore takes about 50 MHz / f clocks per period; adding the
// shifted modulating signal to the frequency bends the pitch sample by sample,
// which is the FM. The divider is combinational, as in the original design.
// Waveforms (osc_select):
//   0 sine   - trunc((2^20-1) sin(2 pi phase/512)), two's complement
//   1 saw    - the phase itself placed at bits 20:12 (0 .. 2^21 - 4096)
//   2 square - SQUARE_HIGH for the first half of the period, 0 for the second
//   3 noise  - a fixed table of 256 pseudo-random words, indexed by phase[7:0]
// `mute` forces the output to zero but the oscillator keeps running.
// The step formula, sine and saw follow the original operator. The square is
// taken from the phase MSB so it sounds at the note's pitch (the original
// toggled it at every table step); the guard that holds the phase when the
// divisor is zero, and the ">=" end-of-step compare that lets a falling
// step length take effect at once, are this design's choices.
//
// Timing: fm_out is combinational from the registered phase; the phase
// changes one clock after the step counter reaches step_len.
module fm_operator #(
  parameter int unsigned CONV        = synth_pkg::CLK_HZ / synth_pkg::TABLE_DEPTH,
  parameter int unsigned TABLE_DEPTH = synth_pkg::TABLE_DEPTH,
  parameter logic [23:0] SQUARE_HIGH = 24'h011111
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    mute,
  input  synth_pkg::osc_sel_e     osc_select,
  input  synth_pkg::freq_t        osc_freq,
  input  logic [23:0]             modulator,
  input  logic [4:0]              mod_factor,
  output synth_pkg::sample_t      fm_out
);
  import synth_pkg::sample_t;

  localparam int unsigned PW = $clog2(TABLE_DEPTH);
  localparam int unsigned CW = $clog2(CONV + 1);

  typedef sample_t sine_tab_t [TABLE_DEPTH];

  function automatic sine_tab_t make_sine_tab();
    sine_tab_t t;
    for (int unsigned i = 0; i < TABLE_DEPTH; i++) t[i] = synth_pkg::sine_value(i, TABLE_DEPTH);
    return t;
  endfunction

  localparam sine_tab_t             SINE_TAB  = make_sine_tab();
  localparam synth_pkg::noise_tab_t NOISE_TAB = synth_pkg::noise_table();

  logic [PW-1:0] phase;
  logic [CW-1:0] step_cnt;
  logic [24:0]   divisor;
  logic [CW-1:0] step_len;

  assign divisor  = 25'(osc_freq) + 25'(modulator >> mod_factor);
  assign step_len = (divisor == '0) ? '0 : CW'(25'(CONV) / divisor);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= '0;
      step_cnt <= '0;
    end else if (divisor != '0) begin
      if (step_cnt >= step_len) begin
        step_cnt <= '0;
        phase    <= phase + 1'b1;
      end else begin
        step_cnt <= step_cnt + 1'b1;
      end
    end
  end

  sample_t wave;
  always_comb begin
    unique case (osc_select)
      synth_pkg::OSC_SINE:   wave = SINE_TAB[phase];
      synth_pkg::OSC_SAW:    wave = sample_t'({3'b000, phase, 12'h000});
      synth_pkg::OSC_SQUARE: wave = phase[PW-1] ? '0 : sample_t'(SQUARE_HIGH);
      synth_pkg::OSC_NOISE:  wave = NOISE_TAB[phase[7:0]];
      default:               wave = SINE_TAB[phase];
    endcase
  end

  assign fm_out = mute ? '0 : wave;
endmodule
