// fm_patch: one synthesizer voice built from four FM operators.
//
// All four operators share the voice's pitch and are muted while the voice is
// not enabled:
//   op0  sine at the pitch                         -> patch 0
//   op1  sawtooth at the pitch                     -> patch 1
//   op2  sine at the pitch, frequency-modulated by op3's output shifted
//        right by 15 (up to +511 Hz of deviation)  -> patch 2
//   op3  sine at three times the pitch             -> patch 3
// (op0 and op1 carry a zero modulator; the listed shift amounts 8 and 2 are
// kept for them.) The four outputs are registered, and `mode` picks which one
// leaves the voice; modes 4..31 give silence. The operator settings, the 3x
// pitch and the mode map follow the original patch; the 3x pitch keeps the low
// 16 bits of the product as the original did.
//
// Timing: fm_out is registered, one clock after the operators' outputs.
module fm_patch (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic [4:0]         mode,
  input  synth_pkg::freq_t   pitch,
  output synth_pkg::sample_t fm_out
);
  import synth_pkg::*;

  sample_t op_out [4];
  sample_t patch  [4];
  freq_t   pitch3;

  assign pitch3 = freq_t'(18'(pitch) * 18'd3);

  fm_operator u_op0 (
    .clk (clk), .rst (rst), .mute (!enable), .osc_select (OSC_SINE),
    .osc_freq (pitch), .modulator ('0), .mod_factor (5'd8), .fm_out (op_out[0])
  );

  fm_operator u_op1 (
    .clk (clk), .rst (rst), .mute (!enable), .osc_select (OSC_SAW),
    .osc_freq (pitch), .modulator ('0), .mod_factor (5'd2), .fm_out (op_out[1])
  );

  fm_operator u_op2 (
    .clk (clk), .rst (rst), .mute (!enable), .osc_select (OSC_SINE),
    .osc_freq (pitch), .modulator (op_out[3]), .mod_factor (5'd15), .fm_out (op_out[2])
  );

  fm_operator u_op3 (
    .clk (clk), .rst (rst), .mute (!enable), .osc_select (OSC_SINE),
    .osc_freq (pitch3), .modulator ('0), .mod_factor (5'd2), .fm_out (op_out[3])
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) patch[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++) patch[i] <= op_out[i];
    end
  end

  always_comb begin
    unique case (mode)
      5'd0:    fm_out = patch[0];
      5'd1:    fm_out = patch[1];
      5'd2:    fm_out = patch[2];
      5'd3:    fm_out = patch[3];
      default: fm_out = '0;
    endcase
  end
endmodule
