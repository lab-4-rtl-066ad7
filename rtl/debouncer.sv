// debouncer: filters the bounce of a mechanical button.
//
// out only takes the value of in after in has differed from out for
// DEBOUNCE_CYCLES consecutive clocks; any return to the old level restarts
// the count. A button bounces for about 20 ms, which at the 100 MHz clock is
// 2,000,000 clocks, the default. (The lab also quotes "2,000 clocks" for
// those 20 ms; the default follows the 20 ms figure.) The counting scheme is
// this design's; the lab supplies the module without describing it.
// Timing: out changes DEBOUNCE_CYCLES clocks after in settles at a new level.
module debouncer #(
  parameter int unsigned DEBOUNCE_CYCLES = 2_000_000
) (
  input  logic clk,
  input  logic reset,
  input  logic in,
  output logic out
);

  localparam int W = $clog2(DEBOUNCE_CYCLES + 1);
  logic [W-1:0] count_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      out     <= 1'b0;
      count_q <= '0;
    end else if (in == out) begin
      count_q <= '0;
    end else if (count_q == W'(DEBOUNCE_CYCLES - 1)) begin
      out     <= in;
      count_q <= '0;
    end else begin
      count_q <= count_q + 1'b1;
    end
  end

endmodule
