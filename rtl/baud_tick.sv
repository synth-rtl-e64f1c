// baud_tick: oversampling tick generator for the MIDI receiver.
//
// A free-running counter counts 0 .. DIV-1 and wraps; `tick` is high for the
// one clock in which the counter holds DIV-1. With the 50 MHz system clock and
// DIV = 100 this gives 500 kHz, i.e. 16 ticks per bit at the MIDI rate of
// 31 250 baud. The divider value and the tick position follow the original
// design; the counter width is derived from DIV.
//
// Interface: clk, synchronous active-high rst, tick (one-cycle pulse).
// Timing: the first tick comes DIV clocks after reset is released.
module baud_tick #(
  parameter int unsigned DIV = 100
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst)                          count <= '0;
    else if (count == CW'(DIV - 1))   count <= '0;
    else                              count <= count + 1'b1;
  end

  assign tick = (count == CW'(DIV - 1));
endmodule
