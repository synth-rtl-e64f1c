// codec_serial: serial audio port for a codec in slave mode.
//
// The FPGA generates the bit clock (aud_bclk = clk / BCLK_DIV) and one
// left/right clock shared by DAC and ADC. A frame has 2 x BITS_PER_CH bit
// slots: the first half (LRCK high) is the left channel, the second the right.
// Data are left-justified: the MSB of a SAMPLE_W-bit word sits in the first
// slot after an LRCK edge, and the remaining slots of the half carry zeros.
// The same output sample is sent on both channels; the microphone is taken
// from the left ADC channel. Outgoing bits change while BCLK is low (after its
// falling edge); the ADC line is sampled at the rising edge.
// At every frame start `dac_sample` is latched for transmission, `adc_sample`
// is updated with the word captured in the frame that just ended, and
// `sample_strobe` pulses for one clock: it is the audio sample clock for the
// rest of the design. With clk = 50 MHz, BCLK_DIV = 16 and 32 slots per
// channel the sample rate is 50e6 / (16*64) = 48 828 Hz.
// The document only names this block and what it does (24-bit samples at
// 48 kHz out to the speaker and in from the microphone); the frame format,
// master/slave choice and clock ratios here are this design's.
//
// Timing: sample_strobe every 2*BITS_PER_CH*BCLK_DIV clocks; a sample written
// to dac_sample before a strobe is on the line during the following frame.
module codec_serial #(
  parameter int unsigned BCLK_DIV    = 16,
  parameter int unsigned BITS_PER_CH = 32,
  parameter int unsigned SAMPLE_W    = synth_pkg::SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [SAMPLE_W-1:0] dac_sample,
  output logic signed [SAMPLE_W-1:0] adc_sample,
  output logic                       sample_strobe,
  output logic                       aud_bclk,
  output logic                       aud_daclrck,
  output logic                       aud_adclrck,
  output logic                       aud_dacdat,
  input  logic                       aud_adcdat
);
  localparam int unsigned SLOTS = 2 * BITS_PER_CH;
  localparam int unsigned DW    = $clog2(BCLK_DIV);
  localparam int unsigned SW    = $clog2(SLOTS);
  localparam int unsigned CHW   = $clog2(BITS_PER_CH);

  logic [DW-1:0]         div_cnt;
  logic [SW-1:0]         slot;
  logic [CHW-1:0]        ch_slot;
  logic [SAMPLE_W-1:0]   dac_word;
  logic [SAMPLE_W-1:0]   adc_shift;
  logic                  rise, fall;

  assign rise    = (div_cnt == DW'(BCLK_DIV / 2 - 1));
  assign fall    = (div_cnt == DW'(BCLK_DIV - 1));
  assign ch_slot = slot[CHW-1:0];

  always_ff @(posedge clk) begin
    sample_strobe <= 1'b0;
    if (rst) begin
      div_cnt    <= '0;
      slot       <= '0;
      dac_word   <= '0;
      adc_shift  <= '0;
      adc_sample <= '0;
    end else begin
      div_cnt <= fall ? '0 : div_cnt + 1'b1;
      if (rise && slot < SW'(SAMPLE_W))
        adc_shift <= {adc_shift[SAMPLE_W-2:0], aud_adcdat};
      if (fall) begin
        if (slot == SW'(SLOTS - 1)) begin
          slot          <= '0;
          dac_word      <= dac_sample;
          adc_sample    <= adc_shift;
          sample_strobe <= 1'b1;
        end else begin
          slot <= slot + 1'b1;
        end
      end
    end
  end

  assign aud_bclk    = (div_cnt >= DW'(BCLK_DIV / 2));
  assign aud_daclrck = (slot < SW'(BITS_PER_CH));
  assign aud_adclrck = aud_daclrck;
  assign aud_dacdat  = (32'(ch_slot) < SAMPLE_W) ? dac_word[SAMPLE_W - 1 - 32'(ch_slot)] : 1'b0;
endmodule
