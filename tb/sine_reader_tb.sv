// sine_reader_tb: drives the sine reader with several step sizes and checks
// every sample against an ideal sine of the accumulated phase,
//   32767 * sin(2*pi * (floor(phase / 2^10) + 0.5) / 4096),
// computed with $sin from a phase the testbench accumulates itself (so the
// quadrant folding in the design is checked against plain trigonometry).
// Also checks the 3-clock latency from generate_next to sample_ready, that
// sample_ready is a one-cycle pulse, the 10.5 step example (table index 10,
// then 21), and that step 0 holds the output.
module sine_reader_tb;
  import music_pkg::*;
  logic clk = 0, reset = 1;
  step_t step_size = '0;
  logic generate_next = 0;
  logic sample_ready;
  sample_t sample;
  int checks = 0, failures = 0;
  longint phase = 0;

  sine_reader dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real ideal(input longint ph);
    longint s = (ph % 4194304) / 1024;
    return 32767.0 * $sin(2.0 * 3.14159265358979 * ($itor(s) + 0.5) / 4096.0);
  endfunction

  // one request; check latency and value
  task automatic request(input string what);
    int lat;
    real r;
    @(negedge clk) generate_next = 1;
    @(negedge clk) generate_next = 0;
    phase = (phase + longint'(step_size)) % 4194304;
    lat = 1;
    while (!sample_ready && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("%s: latency %0d clocks, expected 3", what, lat));
    r = ideal(phase);
    check(($itor(sample) - r) < 1.01 && (r - $itor(sample)) < 1.01,
          $sformatf("%s: sample %0d vs ideal %f (phase %0d)", what, sample, r, phase));
    @(negedge clk);
    check(!sample_ready, {what, ": sample_ready is one cycle"});
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    // the 10.5 example: 0000001010.1000000000
    step_size = 20'b0000001010_1000000000;
    request("10.5 step #1");
    check(dut.phase_q[19:10] == 10, "10.5 example: first table index is 10");
    request("10.5 step #2");
    check(dut.phase_q[19:10] == 21, "10.5 example: second table index is 21");
    // A4 at 48 kHz: several full periods, through all four quadrants
    step_size = 20'd38448;
    for (int i = 0; i < 300; i++) request("A4");
    // a high note, large step
    step_size = 20'd500000;
    for (int i = 0; i < 60; i++) request("large step");
    // a tiny step: index only moves every few samples
    step_size = 20'd300;
    for (int i = 0; i < 40; i++) request("small step");
    // step 0: the output holds
    step_size = 20'd0;
    request("rest 1");
    begin
      sample_t held;
      held = sample;
      request("rest 2");
      check(sample == held, "step 0 holds the sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
