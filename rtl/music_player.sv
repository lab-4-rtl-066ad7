// music_player: the music player proper, without board I/O.
//
// Two kinds of event drive it. Button pulses (play_button, next_button) go to
// the MCU, which decides whether the player runs and which song it plays. The
// codec's new_frame (48 kHz) goes to the codec conditioner, which presents the
// buffered sample on sample_out and asks the note player for the next one,
// and to the beat generator, which turns every BEAT_FRAMES frames into a beat.
// In between, the song reader feeds notes from the song ROM to the note
// player and the note player reports each finished note; after 32 notes the
// song reader reports song_done to the MCU.
//
// reset_player from the MCU (next song, or song finished) is ORed into the
// reset of the song reader and note player so they restart at the beginning
// of the song; the MCU, codec conditioner and beat generator see only the
// system reset. The partitioning and the interfaces between the blocks follow
// the lab. new_sample pulses when the note player hands over a sample.
module music_player
  import music_pkg::*;
#(
  parameter int unsigned BEAT_FRAMES = 1000
) (
  input  logic      clk,
  input  logic      reset,
  input  logic      play_button,
  input  logic      next_button,
  input  logic      new_frame,
  output sample_t   sample_out,
  output logic      new_sample,
  output logic [6:0] current_note_and_song,
  output logic [1:0] mcu_state,
  output logic [2:0] song_reader_state,
  output logic [5:0] note_player_state
);

  logic      play, reset_player, song_done, player_reset;
  song_t     song;
  note_t     note;
  duration_t duration;
  logic      new_note, note_done, beat, generate_next;
  sample_t   note_sample;

  assign player_reset = reset || reset_player;

  mcu u_mcu (
    .clk          (clk),
    .reset        (reset),
    .play_button  (play_button),
    .next_button  (next_button),
    .song_done    (song_done),
    .play         (play),
    .reset_player (reset_player),
    .state        (mcu_state),
    .song         (song)
  );

  song_reader u_song_reader (
    .clk                   (clk),
    .reset                 (player_reset),
    .play                  (play),
    .song                  (song),
    .note_done             (note_done),
    .song_done             (song_done),
    .note                  (note),
    .duration              (duration),
    .new_note              (new_note),
    .current_note_and_song (current_note_and_song),
    .state                 (song_reader_state)
  );

  note_player u_note_player (
    .clk                  (clk),
    .reset                (player_reset),
    .play_enable          (play),
    .note_to_load         (note),
    .duration_to_load     (duration),
    .load_new_note        (new_note),
    .done_with_note       (note_done),
    .beat                 (beat),
    .generate_next_sample (generate_next),
    .sample_out           (note_sample),
    .new_sample_ready     (new_sample),
    .state                (note_player_state)
  );

  codec_conditioner u_codec_conditioner (
    .clk                  (clk),
    .reset                (reset),
    .new_sample_in        (note_sample),
    .latch_new_sample_in  (new_sample),
    .valid_sample         (sample_out),
    .new_frame            (new_frame),
    .generate_next_sample (generate_next)
  );

  beat_generator #(.DIVIDE(BEAT_FRAMES)) u_beat_generator (
    .clk    (clk),
    .reset  (reset),
    .enable (new_frame),
    .beat   (beat)
  );

endmodule
