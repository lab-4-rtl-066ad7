// lab4_top_full_tb: the board-level design at its default sizes: 100 MHz
// clock, a codec frame every 2083 clocks (48 kHz), 1000 frames per beat
// (48 Hz) and a 2,000,000-clock (20 ms) debouncer. A bouncing press of the
// play button starts song 0, which is played to its end (nine notes of 6/48 s
// and the 0-length padding, about 1.1 s of audio, some 120 million clocks).
// note_checker judges every note's length and pitch, the rest and the
// padding; the MCU must then restart the song and wait paused, and the
// display must show song 0, note 0.
module lab4_top_full_tb;
  import music_pkg::*;
  logic clk = 0, reset = 1;
  logic play_button_raw = 0, next_button_raw = 0;
  logic new_frame, new_sample;
  sample_t sample_out, heard;
  logic [6:0] seg_n;
  logic [3:0] an_n;
  logic [1:0] mcu_state;
  logic [2:0] song_reader_state;
  logic [5:0] note_player_state;
  logic scan_start = 0;
  logic [4:0] scan_address, scan_value;
  logic scan_busy;
  logic [6:0] note_id;
  int frames;
  int checks = 0, failures = 0;
  int c_checks, c_failures, notes_judged, rests_judged, zero_len_judged, paused_frames;

  lab4_top dut (.*);
  codec_sim #(.PERIOD(2083)) u_codec (.clk, .reset, .sample(sample_out), .new_frame, .last_sample(heard), .frames);

  // The note address is taken from inside the design here; the display path
  // is covered by lab4_top_tb.
  assign note_id = dut.u_music_player.current_note_and_song;

  note_checker #(.BEAT_FRAMES(1000)) u_checker (
    .clk, .reset, .playing(mcu_state == MCU_PLAYING), .new_frame, .sample(sample_out),
    .note_id, .checks(c_checks), .failures(c_failures),
    .notes_judged, .rests_judged, .zero_len_judged, .paused_frames);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic finish();
    checks += c_checks; failures += c_failures;
    $display("frames %0d, notes at pitch %0d, rests %0d, 0-length %0d", frames, notes_judged, rests_judged, zero_len_judged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (150_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    finish();
  end

  initial begin
    int t;
    repeat (5) @(negedge clk); reset = 0;
    // bouncing press, then held for 25 ms, then released
    for (int i = 0; i < 6; i++) begin
      @(negedge clk) play_button_raw = ~play_button_raw;
      repeat ($urandom_range(10_000, 300_000)) @(negedge clk);
    end
    @(negedge clk) play_button_raw = 1;
    t = 0;
    while (mcu_state != MCU_PLAYING && t < 3_000_000) begin @(negedge clk); t++; end
    // synchroniser (2) + debounce count + one_pulse and MCU registers
    check(t == 2_000_003, $sformatf("play starts 20 ms after the button settles (%0d clocks)", t));
    repeat (500_000) @(negedge clk);
    @(negedge clk) play_button_raw = 0;
    // play to the end of the song
    t = 0;
    while (mcu_state != MCU_RESTART && t < 140_000_000) begin @(negedge clk); t++; end
    check(mcu_state == MCU_RESTART, "song 0 played to its end");
    check(frames > 54 * 1000 - 1000 && frames < 54 * 1000 + 2000,
          $sformatf("song 0 lasted %0d frames, expected about 54 beats of 1000", frames));
    repeat (5) @(negedge clk);
    check(mcu_state == MCU_PAUSED && note_id == 0, "paused at the start of song 0");
    check(notes_judged == 8 && rests_judged == 1 && zero_len_judged > 0, "all notes of song 0 judged");
    finish();
  end
endmodule
