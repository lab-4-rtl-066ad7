// note_checker: simulation-only monitor of the player's audio output.
// It follows the current {song, note address}; when the address steps to the
// next note of the same song, it judges the note just finished against the
// song data file:
//   * duration: the frames heard while playing must be within the beat
//     granularity of duration * BEAT_FRAMES (a 0-length note: at most 2 frames,
//     which only a very fast codec model can reach);
//   * pitch: the sign changes of the samples must match 2 * f / 48 kHz per
//     frame (equal temperament, A4 = note 49 = 440 Hz) within 3;
//   * a rest (note 0) must hold one sample value throughout.
// Notes interrupted by a song change are not judged. While paused, the output
// must not change, apart from the two samples already on their way (the one
// in the buffer and one whose request was issued before the pause).
module note_checker #(
  parameter int BEAT_FRAMES = 1000
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               playing,
  input  logic               new_frame,
  input  logic signed [15:0] sample,        // value the codec receives at new_frame
  input  logic [6:0]         note_id,       // {song, note address}
  output int                 checks,
  output int                 failures,
  output int                 notes_judged,
  output int                 rests_judged,
  output int                 zero_len_judged,
  output int                 paused_frames
);
  logic [11:0] rom [128];
  logic [6:0]  id_q;
  int          frames, crossings, pause_segments, changes_in_pause;
  logic signed [15:0] prev_sample, first_sample;
  logic        was_playing, have_prev, rest_changed;

  initial $readmemh("rtl/song_rom.hex", rom);

  task automatic judge(input logic [6:0] id);
    int n, d, lo, hi;
    real f, expect_x;
    n = int'(rom[id][11:6]);
    d = int'(rom[id][5:0]);
    if (d == 0) begin
      checks++; zero_len_judged++;
      if (frames > 2) begin failures++; $display("FAIL: note %0d: 0-length note lasted %0d frames", id, frames); end
      return;
    end
    lo = (d - 1 - pause_segments) * BEAT_FRAMES;
    hi = (d + pause_segments) * BEAT_FRAMES + 2;
    checks++;
    if (frames < lo || frames > hi) begin
      failures++; $display("FAIL: note %0d: %0d frames, expected %0d..%0d (duration %0d)", id, frames, lo, hi, d);
    end
    if (n == 0) begin
      checks++; rests_judged++;
      if (rest_changed) begin failures++; $display("FAIL: note %0d: rest is not silent", id); end
    end else begin
      f = 440.0 * $pow(2.0, (n - 49) / 12.0);
      expect_x = 2.0 * f * frames / 48000.0;
      checks++; notes_judged++;
      if ($itor(crossings) < expect_x - 3.0 || $itor(crossings) > expect_x + 3.0) begin
        failures++; $display("FAIL: note %0d (key %0d): %0d sign changes in %0d frames, expected %f", id, n, crossings, frames, expect_x);
      end
    end
  endtask

  always @(posedge clk) begin
    if (reset) begin
      checks = 0; failures = 0; notes_judged = 0; rests_judged = 0; zero_len_judged = 0;
      paused_frames = 0;
      id_q = note_id; frames = 0; crossings = 0; pause_segments = 0; was_playing = 0;
      have_prev = 0; rest_changed = 0; changes_in_pause = 0;
    end else begin
      if (note_id != id_q) begin
        if (note_id == id_q + 7'd1 && note_id[4:0] != 0) judge(id_q);
        id_q = note_id; frames = 0; crossings = 0; pause_segments = 0; rest_changed = 0;
        have_prev = 0;
      end
      if (new_frame) begin
        if (playing) begin
          if (have_prev && ((sample < 0) != (prev_sample < 0))) crossings++;
          if (have_prev && sample != prev_sample && frames > 2) rest_changed = 1;
          frames++;
          changes_in_pause = 0;
        end else begin
          paused_frames++;
          if (have_prev && sample != prev_sample) changes_in_pause++;
          if (changes_in_pause > 2) begin
            checks++; failures++; changes_in_pause = 0;
            $display("FAIL: output changes while paused (t=%0t id=%0d)", $time, note_id);
          end
        end
        prev_sample = sample; have_prev = 1;
      end
      if (playing && !was_playing && frames > 0) pause_segments++;
      was_playing = playing;
    end
  end
endmodule
