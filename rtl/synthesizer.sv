// synthesizer: the five-voice FM synthesizer with its vocoder and codec port.
//
// Each voice is an fm_patch driven by its frequency (Hz) and enable; all
// voices use the same patch `mode`. The voice outputs are summed, with 24-bit
// wrap-around, into the carrier. The vocoder takes the microphone sample from
// the codec as modulator and the carrier, and `select_out` chooses what is
// played: 0 = the carrier itself, 1 = the vocoded signal. The codec master
// clock aud_xck is clk/4 (12.5 MHz from 50 MHz).
// Structure, sum and selector follow the original synthesizer; the vocoder
// here advances on the codec's sample strobe rather than on every clock.
//
// Timing: the carrier sum is registered (1 clock after the patch outputs);
// the codec port sends whatever is selected at each frame start.
module synthesizer #(
  parameter int unsigned NUM_VOICES = synth_pkg::NUM_VOICES,
  parameter int unsigned BCLK_DIV   = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  synth_pkg::freq_t   fm_dat [NUM_VOICES],
  input  logic [NUM_VOICES-1:0] fm_en,
  input  logic               select_out,
  input  logic [4:0]         mode,
  output synth_pkg::sample_t carrier,
  output synth_pkg::sample_t vocoded,
  output logic               sample_strobe,
  output logic               voc_saturated,
  output logic               aud_xck,
  output logic               aud_bclk,
  output logic               aud_daclrck,
  output logic               aud_adclrck,
  output logic               aud_dacdat,
  input  logic               aud_adcdat
);
  import synth_pkg::sample_t;

  sample_t voice [NUM_VOICES];
  sample_t mic_sample;
  sample_t out_sample;
  logic [1:0] xck_div;

  for (genvar v = 0; v < NUM_VOICES; v++) begin : g_voice
    fm_patch u_patch (
      .clk (clk), .rst (rst), .enable (fm_en[v]), .mode (mode),
      .pitch (fm_dat[v]), .fm_out (voice[v])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      carrier <= '0;
    end else begin
      sample_t s;
      s = '0;
      for (int v = 0; v < NUM_VOICES; v++) s = s + voice[v];
      carrier <= s;
    end
  end

  vocoder u_vocoder (
    .clk (clk), .rst (rst), .ce (sample_strobe),
    .modulator (mic_sample), .carrier (carrier),
    .vocoded (vocoded), .saturated (voc_saturated)
  );

  assign out_sample = select_out ? vocoded : carrier;

  codec_serial #(.BCLK_DIV(BCLK_DIV)) u_codec (
    .clk (clk), .rst (rst),
    .dac_sample (out_sample), .adc_sample (mic_sample), .sample_strobe (sample_strobe),
    .aud_bclk (aud_bclk), .aud_daclrck (aud_daclrck), .aud_adclrck (aud_adclrck),
    .aud_dacdat (aud_dacdat), .aud_adcdat (aud_adcdat)
  );

  always_ff @(posedge clk) begin
    if (rst) xck_div <= '0;
    else     xck_div <= xck_div + 1'b1;
  end
  assign aud_xck = xck_div[1];
endmodule
