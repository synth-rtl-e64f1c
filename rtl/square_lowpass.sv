// square_lowpass: envelope follower for one vocoder band.
//
// Squares its input and smooths the square with a first-order IIR low-pass:
//     s[n] = x[n]^2 / 2^SQ_SHIFT
//     y[n] = (k*s[n] + k*s[n-1] + alpha*y[n-1]) / 2^FRAC
// i.e. H(z) = k (1 + z^-1) / (1 - alpha z^-1) with alpha = (1 - sin wc)/cos wc,
// k = (1 - alpha)/2, wc = 2 pi FC_HZ / FS_HZ (see synth_pkg::lpf_coef). At the
// defaults (440 Hz at 48 kHz, 2^13 scale) k = 229 and alpha = 7733, and the
// square keeps bits 63:32 of the 64-bit product, as in the original envelope
// filter. A full-scale 24-bit sine gives an envelope of about 2^13.
// The division truncates (arithmetic shift), as in the original filter: for
// this always-positive signal it lets the envelope decay to exactly zero,
// where rounding to nearest would leave it stuck at up to
// 2^(FRAC-1) / (2^FRAC - alpha) = 8 counts. This design feeds the previous
// *squared* input into the filter, and steps only on the sample strobe `ce`.
//
// Timing: y is registered; it holds y[n] from the clock after the strobe that
// took x[n].
module square_lowpass #(
  parameter int unsigned FC_HZ    = synth_pkg::LPF_FC_HZ,
  parameter int unsigned FS_HZ    = synth_pkg::FS_HZ,
  parameter int unsigned FRAC     = synth_pkg::COEF_FRAC,
  parameter int unsigned SQ_SHIFT = 32,
  parameter int unsigned W        = synth_pkg::FILT_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  localparam synth_pkg::lpf_coef_t C = synth_pkg::lpf_coef(FC_HZ, FS_HZ, FRAC);
  localparam logic signed [63:0] ALPHA = 64'(C.alpha);
  localparam logic signed [63:0] K     = 64'(C.k);

  logic signed [63:0]  prod;
  logic signed [W-1:0] sq;
  logic signed [W-1:0] sq1;
  logic signed [63:0]  acc;
  logic signed [63:0]  shifted;

  always_comb begin
    prod    = 64'(x) * 64'(x);
    sq      = W'(prod >>> SQ_SHIFT);
    acc     = K * 64'(sq) + K * 64'(sq1) + ALPHA * 64'(y);
    shifted = acc >>> FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sq1 <= '0;
      y   <= '0;
    end else if (ce) begin
      sq1 <= sq;
      y   <= W'(shifted);
    end
  end
endmodule
