// one_pulse: turns a level into a single-cycle pulse.
//
// out is high for exactly one clock, the first clock in which in is seen high
// after having been low; holding the button down gives no further pulses.
// out is combinational from in and a one-clock delayed copy of in. The lab
// names the module; the edge-detect form is this design's.
module one_pulse (
  input  logic clk,
  input  logic reset,
  input  logic in,
  output logic out
);

  logic in_q;

  always_ff @(posedge clk) begin
    if (reset) in_q <= 1'b0;
    else       in_q <= in;
  end

  assign out = in && !in_q;

endmodule
