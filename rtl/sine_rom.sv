// sine_rom: 1024 x 16-bit synchronous ROM holding a quarter period of a sine.
//
// Entry i = round(32767 * sin(pi/2 * (i + 0.5) / 1024)). The half-sample offset
// makes the table symmetric under the mirroring the sine reader does in the
// second and fourth quadrants (index 1023-i), so no sample repeats at the
// quadrant joins. The 1024-entry quarter wave, 16-bit samples and one-cycle
// read follow the lab; the half-sample offset and the 32767 amplitude are this
// design's choice. The table is computed at elaboration with a Taylor series
// for sin (to x^23, error far below one LSB on [0, pi/2]). dout is valid one
// clock after addr.
module sine_rom #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         dout
);

  typedef logic [WIDTH-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    real    x, s, term, amp;
    amp = 2.0 ** (WIDTH - 1) - 1.0;
    for (int i = 0; i < DEPTH; i++) begin
      x    = 3.14159265358979323846 / 2.0 * (real'(i) + 0.5) / real'(DEPTH);
      s    = 0.0;
      term = x;
      for (int k = 1; k <= 12; k++) begin
        s    = s + term;
        term = -term * x * x / real'((2 * k) * (2 * k + 1));
      end
      t[i] = WIDTH'($rtoi(s * amp + 0.5));
    end
    return t;
  endfunction

  localparam table_t SINE = make_table();

  always_ff @(posedge clk) dout <= SINE[addr];

endmodule
