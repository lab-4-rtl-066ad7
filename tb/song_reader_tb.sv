// song_reader_tb: plays each of the four songs through the song reader with
// a simple note-player model that answers each new_note with note_done after
// a random delay. Checks that the 32 notes arrive in address order with the
// note and duration of the song data file, with the lab's example entries
// (song 2, notes 26..28 = {43,6}, {44,14}, {0,28}) hard-coded as well; that
// current_note_and_song = {song, address} while a note plays; that new_note
// comes 5 clocks after note_done; that song_done rises only after the 32nd
// note and holds; that no note is fetched while play is low; and that reset
// returns the reader to note 0.
module song_reader_tb;
  import music_pkg::*;
  logic clk = 0, reset = 1, play = 0, note_done = 0;
  song_t song = '0;
  logic song_done, new_note;
  note_t note;
  duration_t duration;
  logic [6:0] current_note_and_song;
  logic [2:0] state;
  logic [11:0] rom [128];
  int checks = 0, failures = 0;
  int cycle = 0, done_cycle = 0;

  song_reader dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_new_note(output int waited);
    waited = 0;
    while (!new_note && waited < 50) begin @(negedge clk); waited++; end
  endtask

  task automatic play_song(input int s);
    int w;
    @(negedge clk) reset = 1; song = song_t'(s);
    @(negedge clk) reset = 0; play = 1;
    for (int n = 0; n < 32; n++) begin
      wait_new_note(w);
      check(new_note, $sformatf("song %0d note %0d: new_note arrives", s, n));
      if (n > 0) check(cycle - done_cycle == 5,
                       $sformatf("song %0d note %0d: new_note %0d clocks after note_done", s, n, cycle - done_cycle));
      check({note, duration} == rom[s*32+n],
            $sformatf("song %0d note %0d: got {%0d,%0d} expected %h", s, n, note, duration, rom[s*32+n]));
      check(current_note_and_song == 7'(s*32+n), $sformatf("song %0d note %0d: current_note_and_song", s, n));
      check(!song_done, "song_done low while notes remain");
      if (s == 2 && n == 26) check(note == 43 && duration == 6, "example entry: D#4 for 6/48");
      if (s == 2 && n == 27) check(note == 44 && duration == 14, "example entry: E4 for 14/48");
      if (s == 2 && n == 28) check(note == 0 && duration == 28, "example entry: rest for 28/48");
      // model note player: busy for a random while
      @(negedge clk);
      check(!new_note, "new_note is one cycle");
      if (n == 3) begin
        // pause between notes: nothing fetched while play is low
        play = 0;
        @(negedge clk) note_done = 1; done_cycle = cycle;
        @(negedge clk) note_done = 0;
        repeat (30) begin @(negedge clk); check(!new_note, "no new note while paused"); end
        play = 1;
        done_cycle = cycle - 5 + 4;   // resuming from idle takes 4 clocks
      end else begin
        repeat ($urandom_range(0, 20)) @(negedge clk);
        note_done = 1; done_cycle = cycle;
        @(negedge clk) note_done = 0;
      end
    end
    repeat (10) @(negedge clk);
    check(song_done, $sformatf("song %0d: song_done after 32 notes", s));
    repeat (20) @(negedge clk);
    check(song_done && !new_note, $sformatf("song %0d: song_done holds", s));
  endtask

  initial begin
    $readmemh("rtl/song_rom.hex", rom);
    repeat (3) @(negedge clk); reset = 0;
    repeat (10) @(negedge clk);
    check(!new_note && current_note_and_song == 0, "idle until play");
    for (int s = 0; s < 4; s++) play_song((s + 2) % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
