// midi_uart_rx: 8N1 serial receiver for the MIDI input, oversampled 16x.
//
// The line idles high. A low level in IDLE starts a byte. The FSM then counts
// ticks of the 16x baud clock: 8 ticks (counter 0..7) bring it to the middle of
// the start bit; from there every 16th tick lands in the middle of the next data
// bit, which is shifted in from the top so the first bit (the LSB) ends up in
// bit 0. After the 8th data bit it waits 16 more ticks, to the middle of the stop
// bit, pulses `data_ready` for one clock and returns to IDLE. Sampling mid-bit
// tolerates a small baud-rate error. The stop bit's level is not checked.
// These steps follow the original receiver; the two-flop input synchroniser is
// this design's addition.
//
// Interface: rx (serial line), tick (from baud_tick), data_ready (1-cycle
// pulse), data (the byte, valid from data_ready until the next start bit).
// Timing: data_ready comes 8 + 8*16 + 16 = 152 ticks after the first tick that
// sees the start bit (plus 2 clocks of synchroniser delay), i.e. about 15 200
// clocks at 50 MHz.
module midi_uart_rx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  input  logic       tick,
  output logic       data_ready,
  output logic [7:0] data
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  localparam int unsigned SW = $clog2(OVERSAMPLE);

  state_e        state;
  logic [SW-1:0] count;
  logic [2:0]    bits;
  logic [1:0]    sync;
  logic          rx_s;

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rx};
  end
  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    data_ready <= 1'b0;
    if (rst) begin
      state <= S_IDLE;
      count <= '0;
      bits  <= '0;
      data  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!rx_s) begin
          state <= S_START;
          count <= '0;
        end
        S_START: if (tick) begin
          if (count == SW'(OVERSAMPLE / 2 - 1)) begin
            state <= S_DATA;
            count <= '0;
            bits  <= '0;
            data  <= '0;
          end else count <= count + 1'b1;
        end
        S_DATA: if (tick) begin
          if (count == SW'(OVERSAMPLE - 1)) begin
            count <= '0;
            data  <= {rx_s, data[7:1]};
            if (bits == 3'd7) state <= S_STOP;
            else              bits  <= bits + 1'b1;
          end else count <= count + 1'b1;
        end
        S_STOP: if (tick) begin
          if (count == SW'(OVERSAMPLE - 1)) begin
            state      <= S_IDLE;
            count      <= '0;
            data_ready <= 1'b1;
          end else count <= count + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
