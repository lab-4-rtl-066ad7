// music_pkg: types and constants shared by the music player.
//
// A song lives in a 128 x 12-bit ROM as four songs of 32 notes; each entry is
// {note[5:0], duration[5:0]}. Note numbers follow the piano-key numbering
// (49 = A4 = 440 Hz, 44 = E4), with note 0 a rest. Durations are in beats of
// 1/48 s. Samples are 16-bit two's complement at 48 kHz. The sine reader's
// phase is 22 bits: 2 quadrant bits, then a 10.10 fixed-point position
// within a quarter-wave table of 1024 samples. The state encodings are this
// design's own; they are only brought out for debugging.
package music_pkg;

  localparam int NOTES_PER_SONG = 32;
  localparam int SONG_BITS      = 2;
  localparam int NOTE_ADDR_BITS = 5;
  localparam int NOTE_BITS      = 6;
  localparam int DUR_BITS       = 6;
  localparam int STEP_BITS      = 20;   // 10.10 fixed point
  localparam int PHASE_BITS     = 22;   // 2 quadrant bits + STEP_BITS
  localparam int SINE_ADDR_BITS = 10;   // 1024-entry quarter wave
  localparam int SAMPLE_BITS    = 16;

  typedef logic [SONG_BITS-1:0]      song_t;
  typedef logic [NOTE_ADDR_BITS-1:0] note_addr_t;
  typedef logic [NOTE_BITS-1:0]      note_t;
  typedef logic [DUR_BITS-1:0]       duration_t;
  typedef logic [STEP_BITS-1:0]      step_t;
  typedef logic [PHASE_BITS-1:0]     phase_t;
  typedef logic signed [SAMPLE_BITS-1:0] sample_t;

  // One song ROM entry.
  typedef struct packed {
    note_t     note;
    duration_t duration;
  } song_entry_t;

  typedef enum logic [1:0] {
    MCU_PAUSED    = 2'd0,
    MCU_PLAYING   = 2'd1,
    MCU_NEXT_SONG = 2'd2,   // one cycle: reset the player, advance the song
    MCU_RESTART   = 2'd3    // one cycle: song finished, reset the player
  } mcu_state_e;

  typedef enum logic [2:0] {
    SR_IDLE      = 3'd0,    // waiting for play before fetching a note
    SR_FETCH     = 3'd1,    // song ROM address presented
    SR_ROM_WAIT  = 3'd2,    // ROM data becomes valid at the end of this cycle
    SR_NEW_NOTE  = 3'd3,    // hand the note to the note player
    SR_WAIT_DONE = 3'd4,    // note player busy with the note
    SR_SONG_DONE = 3'd5     // all 32 notes played
  } song_reader_state_e;

  typedef enum logic [1:0] {
    NP_IDLE    = 2'd0,      // no note loaded (samples still follow the last step)
    NP_PLAYING = 2'd1,      // counting the duration down
    NP_DONE    = 2'd2       // one cycle: report the note finished
  } note_player_state_e;

endpackage
