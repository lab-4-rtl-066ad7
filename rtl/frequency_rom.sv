// frequency_rom: 64 x 20-bit synchronous ROM of phase steps, one per note.
//
// Entry n is the amount the sine reader adds to its 22-bit phase per sample
// so that the sine repeats at the frequency of piano key n:
//   f(n)    = 440 Hz * 2^((n-49)/12)       (n = 49 is A4, n = 44 is E4)
//   step(n) = round(f(n) / SAMPLE_RATE_HZ * 2^PHASE_BITS)
// and entry 0 is 0 (a rest: the phase stops moving). A full period is
// 2^PHASE_BITS phase units, i.e. 4 quadrants x 1024 samples x 2^10 fraction.
// The 10.10 step format and the one-cycle read follow the lab; the table is
// computed at elaboration rather than loaded, which is this design's choice.
// dout is valid one clock after addr.
module frequency_rom #(
  parameter int SAMPLE_RATE_HZ = 48000,
  parameter int PHASE_BITS     = 22
) (
  input  logic        clk,
  input  logic [5:0]  addr,
  output logic [19:0] dout
);

  typedef logic [19:0] table_t [64];

  function automatic table_t make_table();
    table_t t;
    real    f;
    t[0] = '0;
    for (int n = 1; n < 64; n++) begin
      f    = 440.0 * 2.0 ** ((real'(n) - 49.0) / 12.0);
      t[n] = 20'($rtoi(f / real'(SAMPLE_RATE_HZ) * (2.0 ** PHASE_BITS) + 0.5));
    end
    return t;
  endfunction

  localparam table_t STEPS = make_table();

  always_ff @(posedge clk) dout <= STEPS[addr];

endmodule
