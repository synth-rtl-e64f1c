// midi_interface: the complete MIDI input port.
//
// baud_tick makes the 16x sampling tick, midi_uart_rx assembles bytes from the
// serial line and byte_reg holds the latest byte with a "new byte" flag. The
// byte and a status word (bit 0 = flag, other bits zero) are registered once
// more before they leave, as two read-only registers for the reader, which
// clears the flag through `clr_flag`. The structure follows the original design.
//
// Timing: status_out[0] rises 2 clocks after the receiver's data_ready pulse
// and falls 2 clocks after clr_flag.
module midi_interface #(
  parameter int unsigned TICK_DIV = synth_pkg::TICK_DIV
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  input  logic       clr_flag,
  output logic [7:0] data_out,
  output logic [7:0] status_out
);
  logic       tick;
  logic       done;
  logic [7:0] rx_byte;
  logic [7:0] held_byte;
  logic       flag;

  baud_tick #(.DIV(TICK_DIV)) u_tick (
    .clk (clk), .rst (rst), .tick (tick)
  );

  midi_uart_rx #(.OVERSAMPLE(synth_pkg::OVERSAMPLE)) u_rx (
    .clk (clk), .rst (rst), .rx (rx), .tick (tick),
    .data_ready (done), .data (rx_byte)
  );

  byte_reg u_reg (
    .clk (clk), .rst (rst), .set_flag (done), .clr_flag (clr_flag),
    .data_in (rx_byte), .data_out (held_byte), .flag (flag)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out   <= '0;
      status_out <= '0;
    end else begin
      data_out   <= held_byte;
      status_out <= {7'b0, flag};
    end
  end
endmodule
