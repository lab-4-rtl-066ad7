// mcu_tb: self-checking test of the master control unit.
// Walks the MCU through play, pause, resume, song completion (restart of the
// same song), next song from paused and from playing, and the wrap from song
// 3 to song 0, checking play, song, state and that reset_player is a single
// one-cycle pulse exactly when a song is changed or restarted.
module mcu_tb;
  import music_pkg::*;
  logic clk = 0, reset = 1;
  logic play_button = 0, next_button = 0, song_done = 0;
  logic play, reset_player;
  logic [1:0] state;
  song_t song;
  int checks = 0, failures = 0;

  mcu dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (play=%0b song=%0d state=%0d rp=%0b)", what, play, song, state, reset_player); end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1; @(negedge clk) sig = 0;
  endtask

  // After a pulse that changes the song, reset_player must be high for exactly one cycle.
  task automatic expect_reset_pulse(input string what);
    // sampled at the negedge right after the input pulse was removed
    check(reset_player === 1'b1, {what, ": reset_player high"});
    check(play === 1'b0, {what, ": not playing during reset"});
    @(negedge clk);
    check(reset_player === 1'b0, {what, ": reset_player only one cycle"});
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    @(negedge clk);
    check(play == 0 && song == 0 && state == MCU_PAUSED && !reset_player, "starts paused at song 0");
    pulse(play_button);
    check(play == 1 && state == MCU_PLAYING, "play starts playing");
    repeat (5) @(negedge clk);
    check(play == 1, "keeps playing");
    pulse(play_button);
    check(play == 0 && state == MCU_PAUSED && song == 0, "play again pauses");
    check(reset_player == 0, "pause does not reset the player");
    pulse(play_button);
    check(play == 1, "resume");
    // song finishes
    @(negedge clk) song_done = 1;
    @(negedge clk) song_done = 0;
    check(state == MCU_RESTART, "song done -> restart state");
    expect_reset_pulse("song done");
    check(play == 0 && song == 0, "after song done: paused on the same song");
    // next while paused
    pulse(next_button);
    expect_reset_pulse("next while paused");
    check(song == 1 && play == 0, "next -> song 1, paused");
    // next while playing
    pulse(play_button);
    check(play == 1, "playing song 1");
    pulse(next_button);
    expect_reset_pulse("next while playing");
    check(song == 2 && play == 0, "next while playing -> song 2, paused");
    pulse(next_button); @(negedge clk);
    check(song == 3, "song 3");
    pulse(next_button); @(negedge clk);
    check(song == 0 && play == 0, "wrap 3 -> 0");
    // next and play together: next wins
    @(negedge clk) begin next_button = 1; play_button = 1; end
    @(negedge clk) begin next_button = 0; play_button = 0; end
    check(state == MCU_NEXT_SONG && song == 1, "next has priority over play");
    @(negedge clk);
    check(play == 0, "paused after simultaneous next and play");
    // song_done while paused is ignored
    @(negedge clk) song_done = 1;
    @(negedge clk) song_done = 0;
    check(state == MCU_PAUSED && reset_player == 0, "song_done ignored while paused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
