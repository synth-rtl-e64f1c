// vocoder: ten-band channel vocoder.
//
// The modulator (microphone) and the carrier (synthesizer) each pass through
// an identical bank of NUM_BANDS band-pass filters whose centres and widths
// grow with frequency (111/40, 250/50, 354/60, 500/70, 707/80, 1000/90,
// 1414/150, 2000/250, 2828/500 and 5187/1000 Hz). For every band the modulator
// component is squared and low-pass filtered into an envelope, which scales
// the carrier component of the same band; the ten products are summed into the
// output. The voice's spectral shape is thus imposed on the carrier.
// Scaling: envelope (about 2^13 for a full-scale band) times carrier band
// (up to 2^23) is shifted right by OUT_SHIFT before the sum, and the sum is
// clipped to IN_W bits; `saturated` is high for a sample that was clipped.
// The band plan and the filter structure follow the original design; the
// carrier bank, products, sum, output scaling and clipping are this design's
// completion of it.
//
// Timing: everything advances on the sample strobe `ce`. The output register
// shows the sum of the bands two strobes after a carrier sample and three
// strobes after a modulator sample.
module vocoder #(
  parameter int unsigned NUM_BANDS = synth_pkg::NUM_BANDS,
  parameter int unsigned IN_W      = synth_pkg::SAMPLE_W,
  parameter int unsigned OUT_SHIFT = 14,
  parameter int unsigned FS_HZ     = synth_pkg::FS_HZ
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic signed [IN_W-1:0] modulator,
  input  logic signed [IN_W-1:0] carrier,
  output logic signed [IN_W-1:0] vocoded,
  output logic                   saturated
);
  localparam int unsigned W = synth_pkg::FILT_W;
  localparam logic signed [63:0] MAXV = (64'(1) <<< (IN_W - 1)) - 1;
  localparam logic signed [63:0] MINV = -(64'(1) <<< (IN_W - 1));

  logic signed [W-1:0] mod_w, car_w;
  logic signed [W-1:0] mod_band [NUM_BANDS];
  logic signed [W-1:0] car_band [NUM_BANDS];
  logic signed [W-1:0] env      [NUM_BANDS];

  assign mod_w = W'(modulator);
  assign car_w = W'(carrier);

  for (genvar b = 0; b < NUM_BANDS; b++) begin : g_band
    localparam int unsigned FC = synth_pkg::BAND_FC[b];
    localparam int unsigned BW = synth_pkg::BAND_BW[b];

    bandpass_filter #(.FC_HZ(FC), .BW_HZ(BW), .FS_HZ(FS_HZ)) u_mod_bpf (
      .clk (clk), .rst (rst), .ce (ce), .x (mod_w), .y (mod_band[b])
    );
    bandpass_filter #(.FC_HZ(FC), .BW_HZ(BW), .FS_HZ(FS_HZ)) u_car_bpf (
      .clk (clk), .rst (rst), .ce (ce), .x (car_w), .y (car_band[b])
    );
    square_lowpass #(.FS_HZ(FS_HZ)) u_env (
      .clk (clk), .rst (rst), .ce (ce), .x (mod_band[b]), .y (env[b])
    );
  end

  logic signed [63:0] sum;
  always_comb begin
    sum = '0;
    for (int b = 0; b < NUM_BANDS; b++) sum += (64'(env[b]) * 64'(car_band[b])) >>> OUT_SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vocoded   <= '0;
      saturated <= 1'b0;
    end else if (ce) begin
      saturated <= (sum > MAXV) || (sum < MINV);
      if (sum > MAXV)      vocoded <= IN_W'(MAXV);
      else if (sum < MINV) vocoded <= IN_W'(MINV);
      else                 vocoded <= IN_W'(sum);
    end
  end
endmodule
