// tb_midi_decoder: plays MIDI byte streams into the decoder through a model
// of the receiver's flag register (flag drops two clocks after clr_flag) and
// compares the five voice frequencies with a reference model after every
// message. The streams cover Note On, Note Off, Note On with velocity 0,
// running status, round-robin voice reuse, keys outside 21..105 and other
// status bytes. Frequencies are checked against equal temperament directly
// (A4 = 440 Hz etc.) for a few keys.
module tb_midi_decoder;
  import synth_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] byte_in = 0;
  logic byte_valid = 0, clr_flag;
  freq_t note_freq [5];
  logic [15:0] note_on_count, note_off_count;
  int checks = 0, failures = 0;

  midi_decoder dut (.*);
  always #10 clk = ~clk;

  // Reference model state
  int ref_note [5];
  int ref_freq [5];
  int ref_next = 0, ref_status = 0, ref_cnt = 0, ref_d0 = 0;
  int ref_on = 0, ref_off = 0;

  function automatic int hz(int key);
    return int'($floor(440.0 * (2.0 ** ((real'(key) - 69.0) / 12.0))));
  endfunction

  task automatic model(input logic [7:0] b);
    if (b[7]) begin ref_status = b[7:4]; ref_cnt = 0; end
    else if (ref_cnt == 0) begin ref_d0 = b; ref_cnt = 1; end
    else begin
      ref_cnt = 0;
      if (ref_d0 >= 21 && ref_d0 <= 105) begin
        if (ref_status == 9 && b != 0) begin
          ref_note[ref_next] = ref_d0; ref_freq[ref_next] = hz(ref_d0);
          ref_next = (ref_next + 1) % 5; ref_on++;
        end else if (ref_status == 9 || ref_status == 8) begin
          for (int v = 0; v < 5; v++) if (ref_note[v] == ref_d0) begin
            ref_note[v] = 0; ref_freq[v] = 0; ref_off++; break;
          end
        end
      end
    end
  endtask

  task automatic put(input logic [7:0] b);
    int w = 0;
    byte_in <= b; byte_valid <= 1;
    while (!clr_flag) begin @(posedge clk); w++; if (w > 100) break; end
    repeat (2) @(posedge clk);
    byte_valid <= 0;
    repeat (8) @(posedge clk);
    model(b);
  endtask

  task automatic compare(string what);
    checks++;
    for (int v = 0; v < 5; v++) if (int'(note_freq[v]) != ref_freq[v]) begin
      failures++;
      $display("FAIL %s voice %0d: %0d expected %0d", what, v, note_freq[v], ref_freq[v]);
      break;
    end
  endtask

  task automatic msg(input logic [7:0] s, input logic [7:0] n, input logic [7:0] vel, string what);
    put(s); put(n); put(vel); compare(what);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 5; v++) begin ref_note[v] = 0; ref_freq[v] = 0; end
    repeat (4) @(posedge clk); rst <= 0; repeat (4) @(posedge clk);
    msg(8'h90, 8'd69, 8'd100, "A4 on");
    checks++; if (note_freq[0] != 440) begin failures++; $display("FAIL A4 = %0d", note_freq[0]); end
    msg(8'h91, 8'd60, 8'd64, "C4 on (channel 1)");
    checks++; if (note_freq[1] != 261) begin failures++; $display("FAIL C4 = %0d", note_freq[1]); end
    msg(8'h90, 8'd21, 8'd1, "A0 on");
    checks++; if (note_freq[2] != 27) begin failures++; $display("FAIL A0 = %0d", note_freq[2]); end
    put(8'd72); put(8'd90); compare("running status C5");
    put(8'd105); put(8'd90); compare("running status A7");
    checks++; if (note_freq[4] != 3520) begin failures++; $display("FAIL A7 = %0d", note_freq[4]); end
    msg(8'h90, 8'd76, 8'd90, "sixth note reuses voice 0");
    msg(8'h90, 8'd20, 8'd90, "key 20 ignored");
    msg(8'h90, 8'd106, 8'd90, "key 106 ignored");
    msg(8'h80, 8'd60, 8'd0, "note off C4");
    msg(8'h90, 8'd72, 8'd0, "velocity 0 = off C5");
    msg(8'h80, 8'd69, 8'd0, "off of overwritten A4 does nothing");
    msg(8'hB0, 8'd7, 8'd100, "controller ignored");
    put(8'd21); put(8'd5); compare("running status after 0xB0 ignored");
    msg(8'h80, 8'd21, 8'd64, "off A0");
    // random stream
    for (int i = 0; i < 150; i++) begin
      logic [7:0] k;
      k = 8'($urandom_range(18, 108));
      case ($urandom_range(0, 3))
        0, 1: msg(8'h90, k, 8'($urandom_range(1, 127)), "random on");
        2:    msg(8'h80, 8'(ref_note[$urandom_range(0, 4)]), 8'd0, "random off");
        3:    msg(8'h90, 8'(ref_note[$urandom_range(0, 4)]), 8'd0, "random vel-0 off");
      endcase
    end
    checks++;
    if (note_on_count != 16'(ref_on) || note_off_count != 16'(ref_off)) begin
      failures++; $display("FAIL counts %0d/%0d expected %0d/%0d", note_on_count, note_off_count, ref_on, ref_off);
    end
    $display("INFO note on %0d, voices silenced %0d", ref_on, ref_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
