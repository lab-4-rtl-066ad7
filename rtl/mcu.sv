// mcu: master control unit of the music player.
//
// Keeps the play/pause state and the number of the song being played.
// After reset it is paused at the start of song 0. A play_button pulse toggles
// between paused and playing; pausing freezes the song reader and note player
// where they are, so play resumes at the same point. When the song reader
// reports song_done the MCU spends one cycle in MCU_RESTART, pulsing
// reset_player so the player returns to the start of the same song, and then
// waits paused. A next_button pulse, in any state, passes through
// MCU_NEXT_SONG: reset_player pulses for one cycle, the song number advances
// (wrapping from 3 to 0) and the MCU waits paused at the start of the new song.
// next_button takes priority over play_button in the same cycle.
//
// Timing: play, reset_player, song and state are registered; each responds one
// clock after the input pulse. reset_player is high for exactly one cycle.
// The behaviour follows the lab's description; the four-state encoding, the
// restart state and the button priority are this design's own choices.
module mcu
  import music_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   play_button,
  input  logic   next_button,
  input  logic   song_done,
  output logic   play,
  output logic   reset_player,
  output logic [1:0] state,
  output song_t  song
);

  mcu_state_e state_q, state_d;
  song_t      song_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      MCU_PAUSED:    if (next_button)      state_d = MCU_NEXT_SONG;
                     else if (play_button) state_d = MCU_PLAYING;
      MCU_PLAYING:   if (next_button)      state_d = MCU_NEXT_SONG;
                     else if (song_done)   state_d = MCU_RESTART;
                     else if (play_button) state_d = MCU_PAUSED;
      MCU_NEXT_SONG:                       state_d = MCU_PAUSED;
      MCU_RESTART:   if (next_button)      state_d = MCU_NEXT_SONG;
                     else                  state_d = MCU_PAUSED;
      default:                             state_d = MCU_PAUSED;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= MCU_PAUSED;
      song_q  <= '0;
    end else begin
      state_q <= state_d;
      if (state_d == MCU_NEXT_SONG) song_q <= song_q + 1'b1;  // wraps 3 -> 0
    end
  end

  assign play         = (state_q == MCU_PLAYING);
  assign reset_player = (state_q == MCU_NEXT_SONG) || (state_q == MCU_RESTART);
  assign state        = state_q;
  assign song         = song_q;

endmodule
