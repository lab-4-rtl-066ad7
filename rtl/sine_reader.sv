// sine_reader: direct digital synthesis of a sine from a quarter-wave table.
//
// A 22-bit phase accumulator advances by step_size (a 10.10 fixed-point
// number of table samples) on each generate_next. Its top two bits select the
// quadrant and the next ten the table index; the lowest ten are fraction and
// only carry into the index. In quadrants 1 and 3 (phase[20] set) the index is
// mirrored (1023 - index) to walk the quarter wave backwards, and in quadrants
// 2 and 3 (phase[21] set) the table value is negated. The phase wraps
// naturally at 2^22, one full period.
//
// Pipeline (one generate_next pulse):
//   cycle 0  generate_next         phase <= phase + step_size
//   cycle 1  mirrored index -> ROM, sign bit registered alongside
//   cycle 2  ROM data valid
//   cycle 3  sample (negated if needed) registered, sample_ready high 1 cycle
// generate_next may be asserted at most once every 3 cycles for every pulse
// to yield a sample (in the music player it comes once per audio frame).
// The 22-bit phase, 10.10 step, quarter-wave folding and one-cycle ROM follow
// the lab; the three-stage pipeline is this design's choice.
module sine_reader
  import music_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  step_t   step_size,
  input  logic    generate_next,
  output logic    sample_ready,
  output sample_t sample
);

  phase_t                     phase_q;
  logic                       pending_q, valid_q;  // pipeline stage valids
  logic                       negate_q;            // quadrant 2/3, aligned with rom_data
  logic [SINE_ADDR_BITS-1:0]  index, rom_addr;
  logic [SAMPLE_BITS-1:0]     rom_data;

  always_ff @(posedge clk) begin
    if (reset) phase_q <= '0;
    else if (generate_next) phase_q <= phase_q + PHASE_BITS'(step_size);
  end

  assign index    = phase_q[STEP_BITS-1 -: SINE_ADDR_BITS];
  assign rom_addr = phase_q[PHASE_BITS-2] ? ~index : index;

  sine_rom u_sine_rom (
    .clk  (clk),
    .addr (rom_addr),
    .dout (rom_data)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      pending_q    <= 1'b0;
      valid_q      <= 1'b0;
      negate_q     <= 1'b0;
      sample_ready <= 1'b0;
      sample       <= '0;
    end else begin
      pending_q    <= generate_next;
      valid_q      <= pending_q;
      negate_q     <= phase_q[PHASE_BITS-1];
      sample_ready <= valid_q;
      if (valid_q) sample <= negate_q ? -sample_t'(rom_data) : sample_t'(rom_data);
    end
  end

endmodule
