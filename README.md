# Music player: songs from ROM to a 48 kHz sine tone

This is a small FPGA music player. Songs are stored as lists of notes in a ROM.
Each entry gives a note and a duration. The player looks up each note's
frequency and synthesises a pure sine tone at that frequency. It does this with
direct digital synthesis from a quarter-wave sine table, and hands one 16-bit
sample to an AC97 audio codec every 48 kHz frame. Two push buttons control it:
*play* toggles play/pause, and *next* moves to the next of four songs.

The design splits cleanly along the two events that drive it:

* **Button presses** change the control state. The MCU decides whether the
  player runs and which song it plays.
* **Codec frames** (`new_frame`, 48 kHz) pull audio through the system. Each
  frame presents one sample and asks for the next. Every 1000 frames make a
  48 Hz *beat*, the unit of note durations.

Between the two sits a chain of request/acknowledge handshakes. The song reader
gives a note to the note player. The note player plays it for its duration and
reports it done. After 32 notes the song reader reports the song done to the MCU.

```
            play/next (raw)
                 |
        button_press_unit x2 (sync -> debounce -> one-pulse)
                 |
   +-------------v------------------------------------------------------+
   | music_player                                                       |
   |   mcu --play/song--> song_reader --note,duration,new_note--> note_player
   |    ^  <--song_done--  (song_rom)  <------note_done---------  (frequency_rom,
   |    |                                                          sine_reader
   |    +-- reset_player resets song_reader and note_player        (sine_rom))
   |                                                       ^  |            |
   |   beat_generator <-- new_frame           generate_next|  |sample, ready
   |        | beat ----------------------------> note_player  v            |
   |   codec_conditioner <-- new_frame ;  sample_out --> codec             |
   +--------------------------------------------------------------------+
                 |
        led_display_driver: {song, note address} on four 7-segment digits
```

`lab4_top` is the board-level top. The AC97 codec interface itself is a vendor
netlist and is not part of this RTL. Its `new_frame` strobe enters as an input
port, and the held sample leaves on `sample_out`.

## Data formats

| Item | Format |
|---|---|
| Song ROM | 128 x 12 bits, address `{song[1:0], note_index[4:0]}`, word `{note[5:0], duration[5:0]}` |
| Note number | piano-key numbering: 49 = A4 = 440 Hz, 44 = E4, 43 = D#4; 0 = rest |
| Duration | beats of 1/48 s (0..63); a song shorter than 32 notes is padded with 0-length notes |
| Step size | 20 bits, 10.10 fixed point, in sine-table samples per audio sample |
| Phase | 22 bits: `[21:20]` quadrant, `[19:10]` table index, `[9:0]` fraction |
| Sample | 16-bit two's complement |

The types and constants are in `rtl/music_pkg.sv`.

## Tone synthesis: the hardest part

`sine_reader` is a phase accumulator. Each time a sample is requested it adds
the note's step to a 22-bit phase. One full sine period is 2^22 phase units:
four quadrants of 1024 table samples, each with 10 fractional bits. The
fraction lets the step be non-integer. For example, a step of 10.5 (binary
`0000001010.1000000000`) gives table indices 10, 21, 31, ..., and a tiny step
such as 0.01 moves to the next table entry only about every 100 samples.

Only a quarter period is stored (`sine_rom`, 1024 entries). The two quadrant
bits fold the rest onto it:

| phase[21:20] | table index | value |
|---|---|---|
| 0 | i | +T[i] |
| 1 | 1023 - i (bitwise NOT) | +T[1023-i] |
| 2 | i | -T[i] |
| 3 | 1023 - i | -T[1023-i] |

The table holds `T[i] = round(32767 * sin(pi/2 * (i + 0.5) / 1024))`. It is
sampled at the *centres* of the 1024 intervals. This makes the mirrored
quadrants continue the curve smoothly, with no sample repeated at a quadrant
join. The output of quadrant q, index i is then exactly
`32767 * sin(2*pi * (1024*q + i + 0.5) / 4096)`. The testbenches check against
that formula, so they do not depend on the folding logic.

The step of note n (`frequency_rom`) is

    f(n)    = 440 Hz * 2^((n - 49) / 12)
    step(n) = round(f(n) / 48000 * 2^22),   step(0) = 0

For example, A4 is 38,448 and E4 is 28,803. The highest note (63, 988 Hz) needs
86,315, well inside the 20-bit step. Both tables are computed by constant
functions at elaboration, so there are no data files for them. A rest has step
0: the phase stops and the output holds one value, which is inaudible.
Samples are computed only on request, once per frame. A newly loaded note is
first heard in the sample requested after its step is ready. Nothing is
computed ahead when the note loads, and the phase runs on unbroken from the
previous note.

Pipeline of one sample request, in clocks:

```
0  generate_next        phase <= phase + step
1  fold index -> ROM    quadrant sign registered alongside
2  ROM word valid
3  sample (negated if needed) registered; sample_ready high for one clock
```

## Timing between the blocks

All ROMs are synchronous: the data arrives one clock after the address. Every
controller is built around that.

* **song_reader**: `IDLE -> FETCH -> ROM_WAIT -> NEW_NOTE -> WAIT_DONE`.
  NEW_NOTE latches the ROM word, two states after the address settled. Then
  `new_note` pulses with the note and duration. From `note_done` to the next
  `new_note` takes 5 clocks. A note is only fetched while *play* is high.
  After the 32nd note the reader enters SONG_DONE and holds `song_done` until
  it is reset.
* **note_player**: latches the note and duration on `new_note`. The frequency
  ROM gives the step 2 clocks later. On each beat while playing, the player
  counts the duration down. At zero it pulses `done_with_note` for one clock.
  A 0-length note is therefore done 2 clocks after it is loaded. A note of
  duration d lasts d beats, and the first of those beats may be partial.
* **codec_conditioner**: the codec needs a sample the moment `new_frame`
  rises, but a sample takes a few clocks to make. Two registers fix this.
  `next_sample` is written whenever the note player delivers a sample.
  `valid_sample`, which the codec reads, copies `next_sample` on `new_frame`.
  The same frame raises `generate_next_sample` for one clock, one clock later.
  The note player answers 3 clocks after that, far inside the 2083 clocks
  between frames at 100 MHz. An assertion checks that samples only arrive
  while a request is outstanding.
* **beat_generator**: counts frames and pulses `beat` on every 1000th. Note
  timing is therefore locked to the codec clock, not the system clock.

### Pause, next and the end of a song

The MCU has four states: PAUSED, PLAYING, NEXT_SONG and RESTART. It starts
paused at song 0. *play* toggles between PAUSED and PLAYING.

While paused, the note player ignores beats and sample requests. The song
reader fetches no new note. The codec conditioner re-presents the last buffered
sample, so the output freezes. At most two samples that were already under
way still reach the output. Pressing play again resumes at the same point.

*next*, in any state, passes through NEXT_SONG for one clock. On the same
clock the song number advances, wrapping from 3 to 0. On the next clock the
MCU is back in PAUSED. During that one NEXT_SONG clock `reset_player` is high.
It resets the song reader and the note player, so the new song waits paused
at note 0.

When the song reader reports `song_done`, the MCU spends one clock in RESTART.
That clock also pulses `reset_player`, and the MCU then waits paused at the
start of the *same* song. If *next* and *play* arrive together, *next* wins.

## Buttons and display

Each raw button goes through a `button_press_unit`. This chains three blocks:
a two-flop `brute_force_synchronizer`, a `debouncer`, and a `one_pulse` edge
detector. The debouncer passes a new level only after it has held for
`DEBOUNCE_CYCLES` consecutive clocks. The default is 2,000,000: 20 ms of
contact bounce at 100 MHz. Measured from the clock edge after the button
settles, the single-clock command pulse is sampled high at edge
`DEBOUNCE_CYCLES + 3`.

`led_display_driver` multiplexes four hex digits onto a shared set of
active-low segments (`seg_n = {g,f,e,d,c,b,a}`) with active-low digit enables.
It switches digit every 2^15 clocks (a 760 Hz refresh). `lab4_top` shows the
song on the left digit, 0 on the next, and the note address (00..1F) on the
right two.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `lab4_top` | `DEBOUNCE_CYCLES` | 2,000,000 | button debounce time in clocks (20 ms at 100 MHz) |
| `lab4_top`, `music_player` | `BEAT_FRAMES` | 1000 | codec frames per beat (48 kHz / 48 Hz) |
| `lab4_top`, `led_display_driver` | `REFRESH_BITS` | 17 | display refresh counter width |
| `frequency_rom` | `SAMPLE_RATE_HZ`, `PHASE_BITS` | 48000, 22 | used to compute the step table |
| `song_rom` | `INIT_FILE` | `"rtl/song_rom.hex"` | song data, read relative to the simulation's working directory |

The clock is assumed to be 100 MHz. Reset is synchronous and active high.

## Songs

`rtl/song_rom.hex` holds four songs, one hex word `{note, duration}` per line:

* song 0: a C-major scale in eighth-beats (6/48 s), then a rest;
* song 1: "Twinkle, twinkle";
* song 2: an "Ode to joy" phrase. Entries 26..28 are D#4 for 6/48 s, E4 for
  14/48 s, then a rest for 28/48 s;
* song 3: a short arpeggio.

To change the music, edit the file. Keep 32 entries per song, and pad with
`000` (0-length notes).

## What is the original design and what is this implementation's own

The block partitioning, every interface signal, the formats, the quarter-wave
folding, the 10.10 step, the two-register codec buffer, the frame-derived beat
and the MCU's play/pause/next behaviour follow the original lab design. The
following were chosen here:

* the state encodings;
* the RESTART state;
* *next* winning over *play*;
* the sine table's half-sample offset and its 32767 amplitude;
* the exact countdown rule for note durations;
* the sine reader's output register;
* the debouncer's counting scheme;
* the display layout and multiplexing;
* the song contents, except entries 26..28 of song 2.

The original lab gives its button bounce time both as "about 20 ms" and as
"2,000 clocks". These disagree at 100 MHz, and this design follows 20 ms.

Not included:

* the AC97 codec interface (a vendor netlist);
* the on-chip logic-analyser cores used for debugging.

`rom_scan_example` is a separate teaching example, not part of the player.
It sits beside the player in `lab4_top`, unconnected to it, with its own
`scan_start`, `scan_address`, `scan_value` and `scan_busy` ports. An
address counter scans a ROM until a word's done bit is set. It shows why a
controller must wait one extra state for a counter and a synchronous ROM to
settle before testing the ROM's output.

## Verification

Every module has a self-checking testbench in `tb/` named `<module>_tb`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. The expected values
come from independent models:

* `$sin` and `$pow` for the tables, the sine reader and the note player;
* the song data file for the song reader;
* a separate segment table for the display.

Latencies are checked to the clock.

Three helpers in `tb/` are simulation-only:

* `codec_sim` issues `new_frame` every `PERIOD` clocks;
* `note_checker` follows the playing note and judges each completed note. It
  checks the frames the note lasted against its duration, and the sign changes
  of the output against 2f/48 kHz per frame. It also checks that rests are
  constant, that 0-length notes take at most two frames, and that the output
  is frozen while paused.
* `codec_sim` and `note_checker` are used by the three system-level benches:
  * `music_player_tb`: frame every 6 clocks, 100 frames per beat.
  * `lab4_top_tb`: the end-to-end test, at reduced sizes (debounce 40 clocks,
    40 frames per beat, frame every 8 clocks). It drives bouncing raw buttons,
    reads the song and note back from the 7-segment outputs, and counts each
    mechanism: bounced press, play, pause mid-note, resume, notes at pitch,
    rest, 0-length padding, end-of-song restart, next while paused and while
    playing, wrap from song 3 to 0, and output held while paused. A mechanism
    that never occurs counts as a failure.
  * `all_songs_tb`: plays all four songs from start to end through
    `music_player` (frame every 6 clocks, 100 frames per beat) and judges all
    their notes.
  * `lab4_top_full_tb`: all defaults (100 MHz, a frame every 2083 clocks, 1000
    frames per beat, 20 ms debounce). It plays song 0 through, about 120
    million clocks, in roughly a minute of Verilator time.

To run one bench with Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/music_pkg.sv tb/lab4_top_tb.sv --top-module lab4_top_tb
./obj_dir/Vlab4_top_tb
```

All files in `rtl/` pass `verilator --lint-only -Wall`, and slang elaborates
them. They are written as synthesizable SystemVerilog: the ROMs are
registered-read arrays. Only the song ROM reads a file, with `$readmemh`. The
design has not been run on an FPGA.
