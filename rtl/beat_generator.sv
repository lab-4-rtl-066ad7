// beat_generator: divides the 48 kHz frame strobe down to a 48 Hz beat.
//
// Counts enable pulses (new_frame from the codec); on every DIVIDE-th pulse
// it raises beat for that same cycle and restarts the count. With the codec at
// 48 kHz and DIVIDE = 1000 the beat is 48 Hz, the unit of note durations.
// Deriving the beat from the codec's frame strobe rather than the system clock
// keeps note timing locked to the audio clock. Dividing the frame strobe
// follows the lab; the counter itself is this design's (the lab supplies the
// module without describing it). beat is combinational from the count and
// enable, so it coincides with the enable pulse that completes the period.
module beat_generator #(
  parameter int unsigned DIVIDE = 1000
) (
  input  logic clk,
  input  logic reset,
  input  logic enable,
  output logic beat
);

  localparam int W = (DIVIDE > 1) ? $clog2(DIVIDE) : 1;
  logic [W-1:0] count_q;
  logic         last;

  assign last = (count_q == W'(DIVIDE - 1));
  assign beat = enable && last;

  always_ff @(posedge clk) begin
    if (reset)       count_q <= '0;
    else if (enable) count_q <= last ? '0 : count_q + 1'b1;
  end

endmodule
