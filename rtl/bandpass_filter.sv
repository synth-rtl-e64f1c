// bandpass_filter: second-order IIR band-pass section in fixed point.
//
// Implements, once per sample strobe `ce`,
//     y[n] = (b1*x[n] - b1*x[n-2] - a2*y[n-1] - a3*y[n-2]) / 2^FRAC
// which is H(z) = k (1 - z^-2) / (1 - beta(1+alpha) z^-1 + alpha z^-2) with
// every coefficient scaled by 2^FRAC (see synth_pkg::bpf_coef). The centre
// frequency FC_HZ, the bandwidth BW_HZ and the sample rate FS_HZ are
// parameters, and the coefficients are computed from them at elaboration.
// Peak gain is one, so a 24-bit input stays within 24 bits at the output.
// Products and the sum are 64 bits wide. The division rounds to nearest
// (adds 2^(FRAC-1) before the arithmetic shift); this, and stepping only on
// `ce`, are this design's choices, the filter form and the 2^13 scale follow
// the original filter bank.
//
// Timing: y is registered and holds y[n] from the clock after the strobe
// that took x[n].
module bandpass_filter #(
  parameter int unsigned FC_HZ = 111,
  parameter int unsigned BW_HZ = 40,
  parameter int unsigned FS_HZ = synth_pkg::FS_HZ,
  parameter int unsigned FRAC  = synth_pkg::COEF_FRAC,
  parameter int unsigned W     = synth_pkg::FILT_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  localparam synth_pkg::bpf_coef_t C = synth_pkg::bpf_coef(FC_HZ, BW_HZ, FS_HZ, FRAC);
  localparam logic signed [63:0] A2   = 64'(C.a2);
  localparam logic signed [63:0] A3   = 64'(C.a3);
  localparam logic signed [63:0] B1   = 64'(C.b1);
  localparam logic signed [63:0] HALF = 64'(1) <<< (FRAC - 1);

  logic signed [W-1:0]  x1, x2, y2;
  logic signed [63:0]   acc;
  logic signed [63:0]   rounded;

  always_comb begin
    acc     = B1 * 64'(x) - B1 * 64'(x2) - A2 * 64'(y) - A3 * 64'(y2);
    rounded = (acc + HALF) >>> FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x1 <= '0;
      x2 <= '0;
      y  <= '0;
      y2 <= '0;
    end else if (ce) begin
      x1 <= x;
      x2 <= x1;
      y  <= W'(rounded);
      y2 <= y;
    end
  end
endmodule
