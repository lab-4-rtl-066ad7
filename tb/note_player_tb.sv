// note_player_tb: checks the note player's duration countdown and sample path.
// A note of duration d must report done_with_note (one cycle) after exactly d
// beats; beats while play_enable is low must not count; a 0-length note must
// finish 2 clocks after loading; a new load restarts the count. Samples
// requested with generate_next_sample must come back 3 clocks later, follow a
// sine at the note's step (A4: 38448 phase units per sample), and no sample
// may be produced while paused.
module note_player_tb;
  import music_pkg::*;
  logic clk = 0, reset = 1;
  logic play_enable = 0;
  note_t note_to_load = '0;
  duration_t duration_to_load = '0;
  logic load_new_note = 0, beat = 0, generate_next_sample = 0;
  logic done_with_note, new_sample_ready;
  sample_t sample_out;
  logic [5:0] state;
  int checks = 0, failures = 0;
  int done_count = 0;
  longint phase = 0;

  note_player dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (done_with_note) done_count++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input int n, input int d);
    @(negedge clk) begin note_to_load = 6'(n); duration_to_load = 6'(d); load_new_note = 1; end
    @(negedge clk) load_new_note = 0;
  endtask

  task automatic give_beat();
    @(negedge clk) beat = 1;
    @(negedge clk) beat = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev;
    repeat (3) @(negedge clk); reset = 0;
    play_enable = 1;
    // duration 3: done after the third beat, not prev
    load(49, 3);
    repeat (5) @(negedge clk);
    prev = done_count;
    give_beat(); give_beat();
    check(done_count == prev, "duration 3: not done after 2 beats");
    // pause: beats must not count
    play_enable = 0;
    give_beat(); give_beat(); give_beat();
    check(done_count == prev, "paused: beats do not count down");
    play_enable = 1;
    give_beat();
    check(done_count == prev + 1, "duration 3: done after the third beat");
    repeat (5) @(negedge clk);
    check(done_count == prev + 1, "done_with_note reported once");
    // zero-length note
    prev = done_count;
    load(0, 0);
    @(negedge clk);
    check(done_with_note && done_count == prev, "0-length note done 2 clocks after load");
    @(negedge clk);
    check(!done_with_note && done_count == prev + 1, "done_with_note is a single cycle");
    // reload in the middle of a note restarts the count
    load(44, 2);
    give_beat();
    load(49, 2);
    give_beat();
    check(done_count == prev + 1, "reload restarts the countdown");
    give_beat();
    check(done_count == prev + 2, "reloaded note done after its own 2 beats");
    // samples at A4
    load(49, 60);
    repeat (3) @(negedge clk);
    phase = 0;  // no sample has been requested since reset
    for (int i = 0; i < 150; i++) begin
      int lat;
      real r;
      longint s;
      @(negedge clk) generate_next_sample = 1;
      @(negedge clk) generate_next_sample = 0;
      phase = (phase + 38448) % 4194304;
      lat = 1;
      while (!new_sample_ready && lat < 10) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("sample %0d latency %0d, expected 3", i, lat));
      s = phase / 1024;
      r = 32767.0 * $sin(2.0 * 3.14159265358979 * ($itor(s) + 0.5) / 4096.0);
      check(($itor(sample_out) - r) < 1.01 && (r - $itor(sample_out)) < 1.01,
            $sformatf("sample %0d = %0d vs %f", i, sample_out, r));
      repeat (2) @(negedge clk);
    end
    // paused: requests give no sample
    play_enable = 0;
    begin
      int got;
      got = 0;
      for (int i = 0; i < 5; i++) begin
        @(negedge clk) generate_next_sample = 1;
        @(negedge clk) generate_next_sample = 0;
        repeat (5) begin @(negedge clk); if (new_sample_ready) got++; end
      end
      check(got == 0, "no samples while paused");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
