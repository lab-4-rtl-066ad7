// brute_force_synchronizer: two flip-flops in series that bring an
// asynchronous input (a push button) into the clock domain, giving a
// metastable first stage a full cycle to settle. out follows in after two
// clocks. Both flops reset to 0. The lab names this module without describing
// it; the two-stage depth is this design's choice.
module brute_force_synchronizer (
  input  logic clk,
  input  logic reset,
  input  logic in,
  output logic out
);

  logic meta_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      meta_q <= 1'b0;
      out    <= 1'b0;
    end else begin
      meta_q <= in;
      out    <= meta_q;
    end
  end

endmodule
