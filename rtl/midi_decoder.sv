// midi_decoder: turns the MIDI byte stream into frequencies for five voices.
//
// This is a small FSM that does, in hardware, the job the original design gave
// to a program on a soft processor. It polls the receiver's "new byte" flag,
// takes the byte and holds `clr_flag` until the flag drops. A byte with its MSB
// set is a status byte: its upper nibble is kept as the current status and the
// data-byte count restarts (the channel nibble is ignored). Other bytes are
// data; every second data byte completes a message (note, velocity), so a
// repeated status byte may be omitted ("running status").
//   * Note On (0x9n) with velocity > 0 for a key 21..105: the key goes to the
//     next voice in round-robin order, overwriting whatever that voice played,
//     and the voice's frequency becomes floor(440 * 2^((key-69)/12)) Hz.
//   * Note Off (0x8n), or Note On with velocity 0: the first voice holding that
//     key is silenced (frequency 0).
//   * Anything else is ignored.
// The message handling follows the original program; the FSM is this design's.
//
// Interface: byte_in/byte_valid are the receiver's data register and status
// bit 0, clr_flag clears the flag. note_freq[v] is voice v's frequency in Hz,
// 0 when silent. note_on_count / note_off_count count accepted Note On events
// and silenced voices (wrapping), for observation.
// Timing: a completed message updates note_freq 4 clocks after the flag of its
// last byte is seen; the flag must then drop before the next byte is polled.
module midi_decoder
  import synth_pkg::freq_t, synth_pkg::note_freq_hz, synth_pkg::MIDI_NOTE_ON, synth_pkg::MIDI_NOTE_OFF;
#(
  parameter int unsigned NUM_VOICES = synth_pkg::NUM_VOICES,
  parameter int unsigned LOW_NOTE   = synth_pkg::LOW_NOTE,
  parameter int unsigned NUM_NOTES  = synth_pkg::NUM_NOTES
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] byte_in,
  input  logic       byte_valid,
  output logic       clr_flag,
  output freq_t      note_freq [NUM_VOICES],
  output logic [15:0] note_on_count,
  output logic [15:0] note_off_count
);
  typedef freq_t note_tab_t [NUM_NOTES];

  function automatic note_tab_t make_note_tab();
    note_tab_t t;
    for (int unsigned i = 0; i < NUM_NOTES; i++) t[i] = note_freq_hz(i);
    return t;
  endfunction

  localparam note_tab_t NOTE_TAB = make_note_tab();
  localparam int unsigned VW = (NUM_VOICES > 1) ? $clog2(NUM_VOICES) : 1;

  typedef enum logic [1:0] {S_POLL, S_WAIT, S_PARSE, S_EXEC} state_e;

  state_e          state;
  logic [7:0]      cur_byte;
  logic [3:0]      status;
  logic            have_first;   // one data byte of the current message held
  logic [6:0]      note;
  logic [6:0]      vel;
  logic [6:0]      voice_note [NUM_VOICES];  // key held by each voice, 0 = free
  logic [VW-1:0]   next_voice;

  // Key range check and table index.
  logic            in_range;
  logic [6:0]      note_idx;
  assign in_range = (32'(note) >= LOW_NOTE) && (32'(note) < LOW_NOTE + NUM_NOTES);
  assign note_idx = note - 7'(LOW_NOTE);

  // First voice holding the released key.
  logic            hit;
  logic [VW-1:0]   hit_voice;
  always_comb begin
    hit       = 1'b0;
    hit_voice = '0;
    for (int v = NUM_VOICES - 1; v >= 0; v--) begin
      if (voice_note[v] == note) begin
        hit       = 1'b1;
        hit_voice = VW'(v);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_POLL;
      cur_byte       <= '0;
      status         <= '0;
      have_first     <= 1'b0;
      note           <= '0;
      vel            <= '0;
      next_voice     <= '0;
      clr_flag       <= 1'b0;
      note_on_count  <= '0;
      note_off_count <= '0;
      for (int v = 0; v < NUM_VOICES; v++) begin
        voice_note[v] <= '0;
        note_freq[v]  <= '0;
      end
    end else begin
      unique case (state)
        S_POLL: if (byte_valid) begin
          cur_byte <= byte_in;
          clr_flag <= 1'b1;
          state    <= S_WAIT;
        end
        S_WAIT: if (!byte_valid) begin
          clr_flag <= 1'b0;
          state    <= S_PARSE;
        end
        S_PARSE: begin
          state <= S_POLL;
          if (cur_byte[7]) begin
            status     <= cur_byte[7:4];
            have_first <= 1'b0;
          end else if (!have_first) begin
            note       <= cur_byte[6:0];
            have_first <= 1'b1;
          end else begin
            vel        <= cur_byte[6:0];
            have_first <= 1'b0;
            state      <= S_EXEC;
          end
        end
        S_EXEC: begin
          state <= S_POLL;
          if (in_range) begin
            if (status == MIDI_NOTE_ON && vel != 7'd0) begin
              voice_note[next_voice] <= note;
              note_freq[next_voice]  <= NOTE_TAB[note_idx];
              next_voice    <= (32'(next_voice) == NUM_VOICES - 1) ? '0 : next_voice + 1'b1;
              note_on_count <= note_on_count + 1'b1;
            end else if ((status == MIDI_NOTE_ON || status == MIDI_NOTE_OFF) && hit) begin
              voice_note[hit_voice] <= '0;
              note_freq[hit_voice]  <= '0;
              note_off_count <= note_off_count + 1'b1;
            end
          end
        end
        default: state <= S_POLL;
      endcase
    end
  end
endmodule
