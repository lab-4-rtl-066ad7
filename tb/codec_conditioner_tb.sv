// codec_conditioner_tb: checks the double buffer. A latched sample must not
// reach valid_sample before new_frame, must appear on it right after
// new_frame and stay until the next new_frame; each new_frame must raise
// generate_next_sample for exactly one cycle, one clock later; with no new
// sample the old one is presented again. A small responder plays the note
// player's part with a fixed delay and random samples.
module codec_conditioner_tb;
  import music_pkg::*;
  logic clk = 0, reset = 1;
  sample_t new_sample_in = '0;
  logic latch_new_sample_in = 0;
  sample_t valid_sample;
  logic new_frame = 0;
  logic generate_next_sample;
  logic respond = 1;
  int checks = 0, failures = 0;

  codec_conditioner dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // responder: answers each request after 4 clocks, if enabled
  sample_t last_sent = '0;
  initial begin
    forever begin
      @(posedge clk);
      if (generate_next_sample && respond) begin
        repeat (3) @(negedge clk);
        new_sample_in = sample_t'($urandom);
        latch_new_sample_in = 1;
        last_sent = new_sample_in;
        @(negedge clk) latch_new_sample_in = 0;
      end
    end
  end

  initial begin
    sample_t expect_next;
    repeat (3) @(negedge clk); reset = 0;
    @(negedge clk);
    check(valid_sample == 0 && !generate_next_sample, "reset state");
    expect_next = '0;
    for (int f = 0; f < 200; f++) begin
      if (f == 100) respond = 0;   // player paused: no new samples
      if (f == 150) respond = 1;
      @(negedge clk) new_frame = 1;
      @(negedge clk) new_frame = 0;
      check(valid_sample == expect_next, $sformatf("frame %0d: buffered sample presented", f));
      check(generate_next_sample, $sformatf("frame %0d: request raised one clock after new_frame", f));
      @(negedge clk);
      check(!generate_next_sample, $sformatf("frame %0d: request is one cycle", f));
      repeat (10) begin
        @(negedge clk);
        check(valid_sample == expect_next, $sformatf("frame %0d: output held between frames", f));
      end
      if (respond) expect_next = last_sent;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
