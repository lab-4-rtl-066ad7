// rom_scan_example: scan a ROM until an entry's done flag is set.
//
// An address counter feeds a synchronous ROM whose 6-bit words are
// {done, value[4:0]}. On a start pulse the controller increments the address
// and examines the ROM output, repeating until it sees done = 1; it then keeps
// that value on `value` and returns to waiting. The counter takes one clock to
// advance and the ROM one more to answer, so after each increment the FSM
// passes through SCAN_SETTLE before SCAN_CHECK: it tests the word of the new
// address, not the stale word of the old one. Without that state (increment,
// then check at once) the controller would act on the previous address's
// data, which is the failure this example exists to show.
// The ROM's first three words ({0,00001}, {1,01011}, {0,00110}) are the
// worked example's; the remaining words are this design's (0, not done), so
// a scan that starts past address 1 wraps around the 32 addresses.
// Timing: from the start pulse, each examined address costs 3 clocks
// (increment, settle, check); busy is high from the clock after start until
// the clock after the check that finds done.
module rom_scan_example #(
  parameter int ADDR_BITS = 5
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 start,
  output logic [ADDR_BITS-1:0] address,
  output logic [4:0]           value,
  output logic                 busy
);

  typedef enum logic [1:0] {
    SCAN_WAIT   = 2'd0,
    SCAN_INC    = 2'd1,   // increment_address asserted
    SCAN_SETTLE = 2'd2,   // address has moved; ROM output updating
    SCAN_CHECK  = 2'd3    // ROM output belongs to the current address
  } scan_state_e;

  scan_state_e state_q;
  logic [5:0]  rom_q;     // {done, value}
  logic [5:0]  word;

  always_comb begin
    unique case (address)
      ADDR_BITS'(0): word = {1'b0, 5'b00001};
      ADDR_BITS'(1): word = {1'b1, 5'b01011};
      ADDR_BITS'(2): word = {1'b0, 5'b00110};
      default:       word = 6'b0;
    endcase
  end

  always_ff @(posedge clk) rom_q <= word;

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= SCAN_WAIT;
      address <= '0;
      value   <= '0;
    end else begin
      unique case (state_q)
        SCAN_WAIT:   if (start) state_q <= SCAN_INC;
        SCAN_INC:    begin address <= address + 1'b1; state_q <= SCAN_SETTLE; end
        SCAN_SETTLE: state_q <= SCAN_CHECK;
        SCAN_CHECK:  if (rom_q[5]) begin value <= rom_q[4:0]; state_q <= SCAN_WAIT; end
                     else state_q <= SCAN_INC;
        default:     state_q <= SCAN_WAIT;
      endcase
    end
  end

  assign busy = (state_q != SCAN_WAIT);

endmodule
