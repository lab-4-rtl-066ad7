// button_press_unit: one clean single-cycle pulse per press of a bouncing,
// asynchronous push button.
//
// Chains the three stages the lab prescribes: brute_force_synchronizer (two
// flops), debouncer (level must hold for DEBOUNCE_CYCLES) and one_pulse
// (rising-edge detect). From a clean press, pulse_out is high for one clock
// DEBOUNCE_CYCLES + 2 clocks after the press; bounces shorter than
// DEBOUNCE_CYCLES produce nothing.
module button_press_unit #(
  parameter int unsigned DEBOUNCE_CYCLES = 2_000_000
) (
  input  logic clk,
  input  logic reset,
  input  logic button_in,
  output logic pulse_out
);

  logic synced, debounced;

  brute_force_synchronizer u_sync (
    .clk (clk), .reset (reset), .in (button_in), .out (synced)
  );

  debouncer #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_debounce (
    .clk (clk), .reset (reset), .in (synced), .out (debounced)
  );

  one_pulse u_one_pulse (
    .clk (clk), .reset (reset), .in (debounced), .out (pulse_out)
  );

endmodule
