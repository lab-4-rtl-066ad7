// song_reader: walks through the 32 notes of one song in the song ROM.
//
// The song ROM (instantiated here) is read at {song, note_address}. Because the
// ROM answers one clock after its address, each note takes the path
// SR_FETCH (address stable) -> SR_ROM_WAIT (ROM output updating) ->
// SR_NEW_NOTE (data valid: latch note and duration, pulse new_note). The
// reader then sits in SR_WAIT_DONE until the note player's note_done pulse, and
// either moves to the next address or, after the 32nd note, enters
// SR_SONG_DONE and holds song_done high until it is reset (the MCU resets it
// through reset_player). A new note is only fetched while play is high, so a
// pause between notes stops the reader too; a pause in the middle of a note is
// handled by the note player, which stops counting.
//
// Interface: note and duration are registered and stay stable until the next
// new_note. current_note_and_song = {song, note_address}. state is the FSM
// state (music_pkg::song_reader_state_e) for debugging.
// Timing: while playing, new_note pulses 5 clocks after a note_done pulse
// (and 4 clocks after play rises in SR_IDLE). The FSM structure follows the lab's description and its
// timing-diagram advice; the state encoding and the gating on play are this
// design's choices.
module song_reader
  import music_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  logic      play,
  input  song_t     song,
  input  logic      note_done,
  output logic      song_done,
  output note_t     note,
  output duration_t duration,
  output logic      new_note,
  output logic [6:0] current_note_and_song,
  output logic [2:0] state
);

  song_reader_state_e state_q, state_d;
  note_addr_t         addr_q;
  song_entry_t        rom_word;

  song_rom u_song_rom (
    .clk  (clk),
    .addr ({song, addr_q}),
    .dout (rom_word)
  );

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      SR_IDLE:      if (play) state_d = SR_FETCH;
      SR_FETCH:     state_d = SR_ROM_WAIT;
      SR_ROM_WAIT:  state_d = SR_NEW_NOTE;
      SR_NEW_NOTE:  state_d = SR_WAIT_DONE;
      SR_WAIT_DONE: if (note_done)
                      state_d = (addr_q == note_addr_t'(NOTES_PER_SONG - 1)) ? SR_SONG_DONE
                                                                             : SR_IDLE;
      SR_SONG_DONE: state_d = SR_SONG_DONE;
      default:      state_d = SR_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q  <= SR_IDLE;
      addr_q   <= '0;
      note     <= '0;
      duration <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == SR_NEW_NOTE) begin
        note     <= rom_word.note;
        duration <= rom_word.duration;
      end
      if (state_q == SR_WAIT_DONE && note_done && state_d == SR_IDLE)
        addr_q <= addr_q + 1'b1;
    end
  end

  // new_note is registered with note/duration so they arrive together.
  always_ff @(posedge clk) begin
    if (reset) new_note <= 1'b0;
    else       new_note <= (state_q == SR_NEW_NOTE);
  end

  assign song_done             = (state_q == SR_SONG_DONE);
  assign current_note_and_song = {song, addr_q};
  assign state                 = state_q;

endmodule
