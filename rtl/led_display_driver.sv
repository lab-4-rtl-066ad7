// led_display_driver: shows four hex digits on a four-digit, multiplexed
// 7-segment display.
//
// The four digits share one set of segment lines; a free-running
// REFRESH_BITS-bit counter selects which digit is lit, its top two bits
// naming the digit, so each digit is on for 2^(REFRESH_BITS-2) clocks in turn
// (about 1.3 ms at 100 MHz with the default 17, a 760 Hz refresh: no flicker).
// digits[15:12] goes to the leftmost digit (an_n[3]). Segments and digit
// enables are active low, seg_n = {g,f,e,d,c,b,a}. The lab only says the
// module shows four 4-bit numbers; the multiplexing, refresh rate and
// polarities are this design's, typical for FPGA boards of that kind.
// Outputs are registered.
module led_display_driver #(
  parameter int REFRESH_BITS = 17
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] digits,
  output logic [6:0]  seg_n,
  output logic [3:0]  an_n
);

  logic [REFRESH_BITS-1:0] refresh_q;
  logic [1:0]              sel;
  logic [3:0]              hex;
  logic [6:0]              seg;   // active high {g,f,e,d,c,b,a}

  always_ff @(posedge clk) begin
    if (reset) refresh_q <= '0;
    else       refresh_q <= refresh_q + 1'b1;
  end

  assign sel = refresh_q[REFRESH_BITS-1 -: 2];
  assign hex = digits[sel*4 +: 4];

  always_comb begin
    unique case (hex)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      default: seg = 7'b1110001;  // F
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      seg_n <= '1;
      an_n  <= '1;
    end else begin
      seg_n <= ~seg;
      an_n  <= ~(4'b0001 << sel);
    end
  end

endmodule
