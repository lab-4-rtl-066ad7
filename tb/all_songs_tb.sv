// all_songs_tb: plays each of the four songs of the song ROM from start to
// end through the music player (a frame every 6 clocks, 100 frames per
// beat), using next to move between songs. note_checker judges every note of
// every song: its length in frames against its duration, its pitch against
// equal temperament, rests silent and the 0-length padding short. Each song
// must end with the MCU restarting it and waiting paused at its first note.
module all_songs_tb;
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
  logic [11:0] rom [128];

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
    $display("notes judged %0d, rests %0d, 0-length %0d", notes_judged, rests_judged, zero_len_judged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    finish();
  end

  initial begin
    int expect_notes, expect_rests, expect_zero, prev_notes, prev_rests, prev_zero;
    $readmemh("rtl/song_rom.hex", rom);
    repeat (5) @(negedge clk); reset = 0;
    for (int s = 0; s < 4; s++) begin
      int t;
      // entries 0..30 are judged (the last one ends with the song)
      expect_notes = 0; expect_rests = 0; expect_zero = 0;
      for (int n = 0; n < 31; n++) begin
        if (rom[s*32+n][5:0] == 0) expect_zero++;
        else if (rom[s*32+n][11:6] == 0) expect_rests++;
        else expect_notes++;
      end
      prev_notes = notes_judged; prev_rests = rests_judged; prev_zero = zero_len_judged;
      check(current_note_and_song == 7'(s * 32) && mcu_state == MCU_PAUSED,
            $sformatf("song %0d: waiting paused at its first note", s));
      press(play_button);
      t = 0;
      while (mcu_state != MCU_RESTART && t < 5_000_000) begin @(negedge clk); t++; end
      check(mcu_state == MCU_RESTART, $sformatf("song %0d played to its end", s));
      repeat (3) @(negedge clk);
      check(mcu_state == MCU_PAUSED && current_note_and_song == 7'(s * 32),
            $sformatf("song %0d: restarted and paused", s));
      check(notes_judged - prev_notes == expect_notes && rests_judged - prev_rests == expect_rests &&
            zero_len_judged - prev_zero == expect_zero,
            $sformatf("song %0d: judged %0d notes, %0d rests, %0d padding; expected %0d, %0d, %0d", s,
                      notes_judged - prev_notes, rests_judged - prev_rests, zero_len_judged - prev_zero,
                      expect_notes, expect_rests, expect_zero));
      press(next_button);
      repeat (3) @(negedge clk);
    end
    finish();
  end
endmodule
