// synth_top: MIDI-controlled synthesizer / vocoder, complete.
//
// Data flow: the MIDI line (opto-isolated onto an input pin) enters
// midi_interface, which delivers bytes with a "new byte" flag. midi_decoder
// reads them, tracks Note On / Note Off and writes a frequency in Hz to each
// of five voices (0 = silent); a voice is enabled whenever its frequency is
// non-zero. The synthesizer turns the voices into a carrier, optionally
// vocodes it with the microphone, and plays the result through the codec port.
// Switches: sw[0] = 1 plays the vocoded signal, sw[17:13] pick the patch
// (0 sine, 1 saw, 2 FM, 3 sine at 3x pitch). ledg shows the last MIDI byte.
// The decoder takes the place of the processor and bus of the original system;
// the codec's I2C set-up is not part of this design.
//
// Reset: rst_n is active low and is registered into a synchronous reset.
module synth_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        midi_rx,
  input  logic [17:0] sw,
  output logic [7:0]  ledg,
  output logic        aud_xck,
  output logic        aud_bclk,
  output logic        aud_daclrck,
  output logic        aud_adclrck,
  output logic        aud_dacdat,
  input  logic        aud_adcdat
);
  import synth_pkg::*;

  logic       rst;
  logic [7:0] data_byte;
  logic [7:0] status_byte;
  logic       clr_flag;
  freq_t      note_freq [NUM_VOICES];
  logic [NUM_VOICES-1:0] note_en;
  logic [15:0] note_on_count, note_off_count;
  sample_t    carrier, vocoded;
  logic       sample_strobe, voc_saturated;

  always_ff @(posedge clk) rst <= !rst_n;

  midi_interface u_midi (
    .clk (clk), .rst (rst), .rx (midi_rx), .clr_flag (clr_flag),
    .data_out (data_byte), .status_out (status_byte)
  );

  midi_decoder u_decoder (
    .clk (clk), .rst (rst), .byte_in (data_byte), .byte_valid (status_byte[0]),
    .clr_flag (clr_flag), .note_freq (note_freq),
    .note_on_count (note_on_count), .note_off_count (note_off_count)
  );

  always_comb
    for (int v = 0; v < NUM_VOICES; v++) note_en[v] = (note_freq[v] != '0);

  synthesizer u_synth (
    .clk (clk), .rst (rst), .fm_dat (note_freq), .fm_en (note_en),
    .select_out (sw[0]), .mode (sw[17:13]),
    .carrier (carrier), .vocoded (vocoded), .sample_strobe (sample_strobe),
    .voc_saturated (voc_saturated),
    .aud_xck (aud_xck), .aud_bclk (aud_bclk), .aud_daclrck (aud_daclrck),
    .aud_adclrck (aud_adclrck), .aud_dacdat (aud_dacdat), .aud_adcdat (aud_adcdat)
  );

  assign ledg = data_byte;
endmodule
