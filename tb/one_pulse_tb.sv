// one_pulse_tb: random level input; out must be high exactly in the cycles
// where in is high and was low the cycle before.
module one_pulse_tb;
  logic clk = 0, reset = 1, in = 0;
  logic out, prev = 0;
  int checks = 0, failures = 0, pulses = 0;

  one_pulse dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      prev = in;
      in = ($urandom_range(0, 3) == 0) ? ~in : in;
      #1;
      checks++;
      if (out !== (in && !prev)) begin failures++; $display("FAIL: cycle %0d in=%0b prev=%0b out=%0b", i, in, prev, out); end
      if (out) pulses++;
    end
    checks++; if (pulses == 0) begin failures++; $display("FAIL: no pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
