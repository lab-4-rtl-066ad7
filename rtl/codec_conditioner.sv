// codec_conditioner: double buffer between the note player and the codec.
//
// The codec wants a new sample the moment new_frame rises and the same sample
// held until the next new_frame, while the note player needs a few clocks to
// compute one. Two registers solve this: next_sample is written whenever the
// note player delivers (latch_new_sample_in), and valid_sample, which the
// codec reads, is loaded from next_sample on new_frame. The same new_frame
// raises generate_next_sample for one cycle (one clock later), asking the note
// player for the following sample, which it must deliver before the next
// frame (2083 clocks at 100 MHz and 48 kHz). If no new sample arrives (the
// player is paused) the same value is presented again, so the output holds.
// Both registers reset to 0. The two-register scheme and the handshake follow
// the lab; the one-cycle registered request is this design's choice.
// An assertion checks the handshake: a sample is only latched while a request
// is outstanding.
module codec_conditioner
  import music_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  sample_t new_sample_in,
  input  logic    latch_new_sample_in,
  output sample_t valid_sample,
  input  logic    new_frame,
  output logic    generate_next_sample
);

  sample_t next_sample_q;
  logic    outstanding_q;   // a request has been made and not yet answered

  always_ff @(posedge clk) begin
    if (reset) begin
      next_sample_q        <= '0;
      valid_sample         <= '0;
      generate_next_sample <= 1'b0;
      outstanding_q        <= 1'b0;
    end else begin
      if (latch_new_sample_in) next_sample_q <= new_sample_in;
      if (new_frame)           valid_sample  <= next_sample_q;
      generate_next_sample <= new_frame;
      if (generate_next_sample)     outstanding_q <= 1'b1;
      else if (latch_new_sample_in) outstanding_q <= 1'b0;
    end
  end

  a_latch_only_on_request: assert property (
    @(posedge clk) disable iff (reset)
      latch_new_sample_in |-> (outstanding_q || generate_next_sample))
    else $error("codec_conditioner: sample latched without a request");

endmodule
