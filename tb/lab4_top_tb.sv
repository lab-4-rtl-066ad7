// lab4_top_tb: end-to-end test of the board-level design at reduced sizes
// (DEBOUNCE_CYCLES = 40, BEAT_FRAMES = 40, REFRESH_BITS = 4, a codec frame
// every 8 clocks). The buttons are driven raw, with contact bounce. The song
// and note address are read back from the 7-segment outputs, decoded with an
// independent segment table, and compared with the player's debug state.
// Every completed note is judged by note_checker. Each mechanism of the
// design is counted and must occur at least once:
//   bounced presses giving one command, play, pause mid-note, resume,
//   notes at pitch, a rest, 0-length padding notes, end of song with restart,
//   next song while paused and while playing, wrap from song 3 to 0,
//   output held while paused, and display digits matching the state.
// The side-by-side ROM-scan example is started once and must stop at
// address 1 with value 01011 after 4 clocks.
module lab4_top_tb;
  import music_pkg::*;
  localparam int DEB = 40, BEAT = 40;
  logic clk = 0, reset = 1;
  logic play_button_raw = 0, next_button_raw = 0;
  logic new_frame, new_sample;
  sample_t sample_out, heard;
  logic [6:0] seg_n;
  logic [3:0] an_n;
  logic [1:0] mcu_state;
  logic [2:0] song_reader_state;
  logic [5:0] note_player_state;
  logic scan_start = 0;
  logic [4:0] scan_address, scan_value;
  logic scan_busy;
  int frames;
  int checks = 0, failures = 0;
  int c_checks, c_failures, notes_judged, rests_judged, zero_len_judged, paused_frames;
  // mechanism counters
  int n_press = 0, n_play = 0, n_pause = 0, n_resume = 0, n_restart = 0;
  int n_next_paused = 0, n_next_playing = 0, n_wrap = 0, n_display = 0, n_scan = 0;
  logic [3:0] shown [4];   // digits decoded from the display
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  lab4_top #(.DEBOUNCE_CYCLES(DEB), .BEAT_FRAMES(BEAT), .REFRESH_BITS(4)) dut (.*);
  codec_sim #(.PERIOD(8)) u_codec (.clk, .reset, .sample(sample_out), .new_frame, .last_sample(heard), .frames);

  // note address as seen on the display: {song digit[1:0], note digits}
  logic [6:0] shown_id;
  assign shown_id = {shown[3][1:0], shown[1][0], shown[0]};

  note_checker #(.BEAT_FRAMES(BEAT)) u_checker (
    .clk, .reset, .playing(mcu_state == MCU_PLAYING), .new_frame, .sample(sample_out),
    .note_id(shown_id), .checks(c_checks), .failures(c_failures),
    .notes_judged, .rests_judged, .zero_len_judged, .paused_frames);

  always #5 clk = ~clk;

  function automatic int decode(input logic [6:0] s_n);
    for (int h = 0; h < 16; h++) begin
      logic [6:0] p;
      p = 7'h7f;
      for (int i = 0; i < lit[h].len(); i++) p[3'(lit[h][i] - 8'd97)] = 1'b0;
      if (p == s_n) return h;
    end
    return -1;
  endfunction

  always @(posedge clk) if (!reset) begin
    for (int d = 0; d < 4; d++) if (an_n == ~(4'b1 << d)) begin
      int v;
      v = decode(seg_n);
      if (v < 0) begin
        checks++; failures++;
        if (failures < 5) $display("FAIL: undecodable segments %b", seg_n);
      end
      else shown[d] = 4'(v);
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // a bouncy press and release of a raw button
  task automatic press(ref logic b);
    for (int i = 0; i < 7; i++) begin
      @(negedge clk) b = ~b;
      repeat ($urandom_range(1, DEB / 2)) @(negedge clk);
    end
    @(negedge clk) b = 1;
    repeat (DEB + 10) @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) b = ~b;
      repeat ($urandom_range(1, DEB / 2)) @(negedge clk);
    end
    @(negedge clk) b = 0;
    repeat (DEB + 10) @(negedge clk);
    n_press++;
  endtask

  task automatic display_matches(input int song, input int note_addr, input string what);
    repeat (80) @(negedge clk);   // a few refresh periods
    check(shown[3] == 4'(song) && shown[2] == 0 && {shown[1][0], shown[0]} == 5'(note_addr),
          $sformatf("%s: display shows %h%h%h%h, expected song %0d note %0d", what,
                    shown[3], shown[2], shown[1], shown[0], song, note_addr));
    n_display++;
  endtask

  task automatic finish();
    checks += c_checks; failures += c_failures;
    $display("presses %0d play %0d pause %0d resume %0d restart %0d next(paused) %0d next(playing) %0d wrap %0d display %0d scan %0d",
             n_press, n_play, n_pause, n_resume, n_restart, n_next_paused, n_next_playing, n_wrap, n_display, n_scan);
    $display("notes at pitch %0d, rests %0d, 0-length %0d, paused frames %0d",
             notes_judged, rests_judged, zero_len_judged, paused_frames);
    check(n_play > 0,  "mechanism: play");
    check(n_pause > 0, "mechanism: pause mid-note");
    check(n_resume > 0, "mechanism: resume");
    check(n_restart > 0, "mechanism: end of song, restart");
    check(n_next_paused > 0, "mechanism: next while paused");
    check(n_next_playing > 0, "mechanism: next while playing");
    check(n_wrap > 0, "mechanism: wrap from song 3 to 0");
    check(n_display > 0, "mechanism: display");
    check(n_scan > 0, "mechanism: ROM scan example");
    check(notes_judged > 0, "mechanism: notes at pitch");
    check(rests_judged > 0, "mechanism: rest");
    check(zero_len_judged > 0, "mechanism: 0-length padding");
    check(paused_frames > 0, "mechanism: output held while paused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    finish();
  end

  initial begin
    int t;
    repeat (5) @(negedge clk); reset = 0;
    repeat (100) @(negedge clk);
    check(mcu_state == MCU_PAUSED && sample_out == 0, "paused and silent after reset");
    display_matches(0, 0, "after reset");
    // the ROM-scan example beside the player
    begin
      int t;
      @(negedge clk) scan_start = 1;
      @(negedge clk) scan_start = 0;
      t = 1;
      while (scan_busy && t < 100) begin @(negedge clk); t++; end
      check(t == 4 && scan_address == 1 && scan_value == 5'b01011, "ROM scan example stops at address 1");
      n_scan++;
    end
    press(play_button_raw);
    check(mcu_state == MCU_PLAYING, "bounced play press starts playing");
    n_play++;
    wait (shown_id == 7'd3);
    repeat (BEAT * 8 * 3) @(negedge clk);
    press(play_button_raw);
    check(mcu_state == MCU_PAUSED, "second press pauses");
    n_pause++;
    display_matches(0, 3, "paused on note 3");
    begin
      sample_t held;
      repeat (BEAT * 8) @(negedge clk);
      held = sample_out;
      repeat (BEAT * 8 * 4) @(negedge clk);
      check(sample_out == held, "output held while paused");
    end
    press(play_button_raw);
    check(mcu_state == MCU_PLAYING, "third press resumes");
    n_resume++;
    t = 0;
    while (mcu_state != MCU_RESTART && t < 2_000_000) begin @(negedge clk); t++; end
    check(mcu_state == MCU_RESTART, "song 0 ends");
    repeat (2) @(negedge clk);
    check(mcu_state == MCU_PAUSED, "paused after the song ends");
    n_restart++;
    display_matches(0, 0, "back at song 0 note 0");
    press(next_button_raw);
    n_next_paused++;
    display_matches(1, 0, "next while paused: song 1");
    press(play_button_raw);
    n_play++;
    wait (shown_id == 7'(32 + 2));
    press(next_button_raw);
    check(mcu_state == MCU_PAUSED, "next while playing pauses");
    n_next_playing++;
    display_matches(2, 0, "next while playing: song 2");
    press(next_button_raw);
    display_matches(3, 0, "song 3");
    press(next_button_raw);
    display_matches(0, 0, "wrap to song 0");
    n_wrap++;
    finish();
  end
endmodule
