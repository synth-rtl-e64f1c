// byte_reg: one-byte mailbox between the MIDI receiver and its reader.
//
// When `set_flag` pulses, `data_in` is stored and `flag` is raised. The reader
// lowers `flag` with `clr_flag` after taking the byte. A set and a clear in the
// same clock keep the flag raised, so a new byte is never lost to a late clear.
// This behaviour follows the original register.
//
// Timing: data_out and flag change on the clock after set_flag / clr_flag.
module byte_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       set_flag,
  input  logic       clr_flag,
  input  logic [7:0] data_in,
  output logic [7:0] data_out,
  output logic       flag
);
  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= '0;
      flag     <= 1'b0;
    end else if (set_flag) begin
      data_out <= data_in;
      flag     <= 1'b1;
    end else if (clr_flag) begin
      flag     <= 1'b0;
    end
  end
endmodule
