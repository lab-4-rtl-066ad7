// button_press_unit_tb: with DEBOUNCE_CYCLES = 50, each press of a bouncing
// button (bounces under 50 clocks, then held) must give exactly one pulse,
// one clock wide, and high in the cycle that follows the (DEBOUNCE_CYCLES+2)th
// clock edge after the button settles (sampled at edge DEBOUNCE_CYCLES+3);
// holding the button and the bouncing release must give none.
module button_press_unit_tb;
  localparam int N = 50;
  logic clk = 0, reset = 1, button_in = 0;
  logic pulse_out;
  int checks = 0, failures = 0, pulses = 0;
  int settle_time, pulse_time;
  int cycle = 0;

  button_press_unit #(.DEBOUNCE_CYCLES(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (pulse_out) begin pulses++; pulse_time = cycle; end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bounce_to(input logic level);
    for (int b = 0; b < 12; b++) begin
      @(negedge clk) button_in = ~button_in;
      repeat ($urandom_range(0, N - 10)) @(negedge clk);
    end
    @(negedge clk) button_in = level;
    settle_time = cycle;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int p0;
    repeat (3) @(negedge clk); reset = 0;
    for (int k = 0; k < 8; k++) begin
      p0 = pulses;
      bounce_to(1'b1);
      repeat (4 * N) @(negedge clk);
      check(pulses == p0 + 1, $sformatf("press %0d: exactly one pulse (%0d)", k, pulses - p0));
      check(pulse_time - settle_time == N + 3,
            $sformatf("press %0d: pulse %0d clocks after settling, expected %0d", k, pulse_time - settle_time, N + 3));
      bounce_to(1'b0);
      repeat (4 * N) @(negedge clk);
      check(pulses == p0 + 1, $sformatf("release %0d: no pulse", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
