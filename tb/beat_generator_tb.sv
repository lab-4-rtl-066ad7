// beat_generator_tb: at the default DIVIDE of 1000, feeds frame pulses with
// random gaps and checks that beat coincides with exactly every 1000th pulse
// and with no cycle without a pulse.
module beat_generator_tb;
  logic clk = 0, reset = 1, enable = 0;
  logic beat;
  int checks = 0, failures = 0;
  int pulses = 0, beats = 0;

  beat_generator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk) enable = ($urandom_range(0, 2) != 0);
      #1;
      if (enable) pulses++;
      checks++;
      if (beat !== (enable && (pulses % 1000 == 0))) begin
        failures++; $display("FAIL: pulse %0d enable %0b beat %0b", pulses, enable, beat);
      end
      if (beat) beats++;
    end
    checks++;
    if (beats != pulses / 1000) begin failures++; $display("FAIL: %0d beats for %0d pulses", beats, pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
