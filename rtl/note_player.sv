// note_player: plays one note for its duration and supplies its samples.
//
// On load_new_note it latches note_to_load and duration_to_load and enters
// NP_PLAYING. The latched note addresses the frequency ROM, whose step size
// (valid two clocks after the load) drives the sine reader. While play_enable
// is high, each beat (48 Hz) counts the remaining duration down; when it
// reaches zero the player spends one cycle in NP_DONE with done_with_note high
// and returns to NP_IDLE. A note of duration 0 therefore finishes two clocks
// after it is loaded; a note of duration d lasts d beats, the first of which
// may be partial. Pausing (play_enable low) stops both the countdown and the
// sample generation.
//
// Samples: generate_next_sample (from the codec conditioner) is forwarded to
// the sine reader only while play_enable is high; the sine reader's sample and
// sample_ready become sample_out and new_sample_ready, 3 clocks later. The
// sine reader keeps running between notes and during rests (step 0 holds the
// phase, so the output is constant, i.e. silent).
//
// state = {2'b0, play_enable, load pending, fsm[1:0]} for debugging.
// The behaviour follows the lab; the exact countdown rule (done when the count
// is zero), the 0-length handling and the debug encoding are this design's.
module note_player
  import music_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  logic      play_enable,
  input  note_t     note_to_load,
  input  duration_t duration_to_load,
  input  logic      load_new_note,
  output logic      done_with_note,
  input  logic      beat,
  input  logic      generate_next_sample,
  output sample_t   sample_out,
  output logic      new_sample_ready,
  output logic [5:0] state
);

  note_player_state_e state_q;
  note_t              note_q;
  duration_t          count_q;
  step_t              step;

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= NP_IDLE;
      note_q  <= '0;
      count_q <= '0;
    end else if (load_new_note) begin
      state_q <= NP_PLAYING;
      note_q  <= note_to_load;
      count_q <= duration_to_load;
    end else begin
      unique case (state_q)
        NP_IDLE: ;
        NP_PLAYING:
          if (count_q == '0)             state_q <= NP_DONE;
          else if (beat && play_enable)  count_q <= count_q - 1'b1;
        NP_DONE:                         state_q <= NP_IDLE;
        default:                         state_q <= NP_IDLE;
      endcase
    end
  end

  assign done_with_note = (state_q == NP_DONE);

  frequency_rom u_frequency_rom (
    .clk  (clk),
    .addr (note_q),
    .dout (step)
  );

  sine_reader u_sine_reader (
    .clk           (clk),
    .reset         (reset),
    .step_size     (step),
    .generate_next (generate_next_sample && play_enable),
    .sample_ready  (new_sample_ready),
    .sample        (sample_out)
  );

  assign state = {2'b00, play_enable, load_new_note, state_q};

endmodule
