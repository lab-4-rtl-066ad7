// debouncer_tb: with DEBOUNCE_CYCLES = 20, bursts of bounces shorter than 20
// clocks must not change the output; a level held for 20 clocks must appear
// on out exactly 20 clocks after it settles; release is filtered the same way.
module debouncer_tb;
  localparam int N = 20;
  logic clk = 0, reset = 1, in = 0;
  logic out;
  int checks = 0, failures = 0;

  debouncer #(.DEBOUNCE_CYCLES(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic settle_to(input logic level, input string what);
    int t;
    // bounce: random levels, never stable for N clocks
    for (int b = 0; b < 30; b++) begin
      int len;
      len = $urandom_range(1, N - 2);
      @(negedge clk) in = ~in;
      repeat (len - 1) begin
        @(negedge clk);
        check(out == ~level, {what, ": output unchanged while bouncing"});
      end
    end
    @(negedge clk) in = level;
    t = 0;
    while (out != level && t < 3 * N) begin @(negedge clk); t++; end
    check(t == N, $sformatf("%s: out follows %0d clocks after settling (expected %0d)", what, t, N));
  endtask

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    check(out == 0, "reset value");
    for (int k = 0; k < 10; k++) begin
      settle_to(1'b1, "press");
      repeat (5) @(negedge clk);
      settle_to(1'b0, "release");
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
