// music_player_tb: the music player with a fast codec model (a frame every
// 6 clocks) and BEAT_FRAMES = 100. Plays song 0 to its end, pausing and
// resuming in the middle of a note, then checks the restart at the end of
// the song, uses next to reach song 1 and plays part of it, and steps through
// the songs to see the wrap from 3 to 0. Every completed note is judged by
// note_checker (duration, pitch, silent rests, 0-length padding); pauses
// must freeze the output.
module music_player_tb;
  import music_pkg::*;
  localparam int BEAT_FRAMES = 100;
  logic clk = 0, reset = 1;
  logic play_button = 0, next_button = 0;
  logic new_frame, new_sample;
  sample_t sample_out, heard;
  logic [6:0] current_note_and_song;
  logic [1:0] mcu_state;
  logic [2:0] song_reader_state;
  logic [5:0] note_player_state;
  int frames;
  int checks = 0, failures = 0;
  int c_checks, c_failures, notes_judged, rests_judged, zero_len_judged, paused_frames;

  music_player #(.BEAT_FRAMES(BEAT_FRAMES)) dut (.*);
  codec_sim #(.PERIOD(6)) u_codec (.clk, .reset, .sample(sample_out), .new_frame, .last_sample(heard), .frames);
  note_checker #(.BEAT_FRAMES(BEAT_FRAMES)) u_checker (
    .clk, .reset, .playing(mcu_state == MCU_PLAYING), .new_frame, .sample(sample_out),
    .note_id(current_note_and_song), .checks(c_checks), .failures(c_failures),
    .notes_judged, .rests_judged, .zero_len_judged, .paused_frames);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(ref logic b);
    @(negedge clk) b = 1; @(negedge clk) b = 0;
  endtask

  task automatic finish();
    checks += c_checks; failures += c_failures;
    $display("notes judged %0d, rests %0d, 0-length %0d, paused frames %0d",
             notes_judged, rests_judged, zero_len_judged, paused_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    finish();
  end

  initial begin
    int t;
    repeat (5) @(negedge clk); reset = 0;
    repeat (200) @(negedge clk);
    check(sample_out == 0 && mcu_state == MCU_PAUSED, "silent and paused after reset");
    press(play_button);
    // pause in the middle of note 2 of song 0
    wait (current_note_and_song == 7'd2);
    repeat (BEAT_FRAMES * 6 * 2) @(negedge clk);
    press(play_button);
    check(mcu_state == MCU_PAUSED, "paused mid-note");
    begin
      sample_t held;
      repeat (20) @(negedge clk);
      held = sample_out;
      repeat (3000) begin @(negedge clk); if (sample_out != held) break; end
      check(sample_out == held, "output frozen while paused");
    end
    press(play_button);
    check(mcu_state == MCU_PLAYING, "resumed");
    // song end: the MCU restarts the song and pauses
    t = 0;
    while (mcu_state != MCU_RESTART && t < 1_000_000) begin @(negedge clk); t++; end
    check(mcu_state == MCU_RESTART, "song 0 finished");
    repeat (3) @(negedge clk);
    check(mcu_state == MCU_PAUSED && current_note_and_song == 7'd0, "back at the start of song 0, paused");
    check(zero_len_judged > 0 && rests_judged > 0 && notes_judged >= 8, "song 0 notes, rest and padding judged");
    // next song, play a few notes
    press(next_button);
    repeat (3) @(negedge clk);
    check(current_note_and_song == 7'd32 && mcu_state == MCU_PAUSED, "next: song 1 note 0, paused");
    press(play_button);
    wait (current_note_and_song == 7'd35);
    // next while playing
    press(next_button);
    repeat (3) @(negedge clk);
    check(current_note_and_song == 7'd64 && mcu_state == MCU_PAUSED, "next while playing: song 2, paused");
    press(next_button); repeat (3) @(negedge clk);
    press(next_button); repeat (3) @(negedge clk);
    check(current_note_and_song == 7'd0, "wrap from song 3 to song 0");
    finish();
  end
endmodule
