// lab4_top: board-level top of the music player.
//
// Brings the raw play and next push buttons through a button_press_unit each
// (synchronise, debounce, one-pulse), runs the music_player, and shows
// {song, note address} on the four 7-segment digits: the song on the left
// digit, the note address (0..31, two hex digits) on the right two, the
// third digit blank-as-zero. The AC97 codec interface is outside this RTL:
// its new_frame strobe (48 kHz) enters as a port and the held sample leaves on
// sample_out. Clock 100 MHz; reset synchronous and active high.
// The structure follows the lab's top level; the digit layout is this
// design's choice. Debug states of the three FSMs are brought out as ports.
// Beside the player, and unconnected to it, sits rom_scan_example, the small
// ROM-scanning controller that illustrates synchronous-ROM timing; its start
// input and results have ports of their own (scan_*).
module lab4_top
  import music_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 2_000_000,
  parameter int unsigned BEAT_FRAMES     = 1000,
  parameter int          REFRESH_BITS    = 17
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       play_button_raw,
  input  logic       next_button_raw,
  input  logic       new_frame,
  output sample_t    sample_out,
  output logic       new_sample,
  output logic [6:0] seg_n,
  output logic [3:0] an_n,
  output logic [1:0] mcu_state,
  output logic [2:0] song_reader_state,
  output logic [5:0] note_player_state,
  input  logic       scan_start,
  output logic [4:0] scan_address,
  output logic [4:0] scan_value,
  output logic       scan_busy
);

  logic       play_pulse, next_pulse;
  logic [6:0] current_note_and_song;

  button_press_unit #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_play_button (
    .clk (clk), .reset (reset), .button_in (play_button_raw), .pulse_out (play_pulse)
  );

  button_press_unit #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_next_button (
    .clk (clk), .reset (reset), .button_in (next_button_raw), .pulse_out (next_pulse)
  );

  music_player #(.BEAT_FRAMES(BEAT_FRAMES)) u_music_player (
    .clk                   (clk),
    .reset                 (reset),
    .play_button           (play_pulse),
    .next_button           (next_pulse),
    .new_frame             (new_frame),
    .sample_out            (sample_out),
    .new_sample            (new_sample),
    .current_note_and_song (current_note_and_song),
    .mcu_state             (mcu_state),
    .song_reader_state     (song_reader_state),
    .note_player_state     (note_player_state)
  );

  led_display_driver #(.REFRESH_BITS(REFRESH_BITS)) u_led_display_driver (
    .clk    (clk),
    .reset  (reset),
    .digits ({2'b00, current_note_and_song[6:5],
              4'h0,
              3'b000, current_note_and_song[4],
              current_note_and_song[3:0]}),
    .seg_n  (seg_n),
    .an_n   (an_n)
  );

  rom_scan_example u_rom_scan_example (
    .clk     (clk),
    .reset   (reset),
    .start   (scan_start),
    .address (scan_address),
    .value   (scan_value),
    .busy    (scan_busy)
  );

endmodule
