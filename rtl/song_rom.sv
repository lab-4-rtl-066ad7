// song_rom: 128 x 12-bit synchronous ROM holding four songs of 32 notes.
//
// Address is {song[1:0], note_index[4:0]}; the word is {note[5:0],
// duration[5:0]} (see music_pkg::song_entry_t). The data appears on dout one
// clock after addr is presented, as with a block RAM. Sizes, the entry format
// and the one-cycle latency follow the lab; the contents are loaded from
// INIT_FILE with $readmemh. The songs in the default file are this design's
// own, except entries 90..92 ({43,6}, {44,14}, {0,28}), which reproduce the
// lab's example. Songs shorter than 32 notes are padded with 0-length notes.
module song_rom #(
  parameter int    DEPTH     = 128,
  parameter int    WIDTH     = 12,
  parameter string INIT_FILE = "rtl/song_rom.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) dout <= mem[addr];

endmodule
