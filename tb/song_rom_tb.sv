// song_rom_tb: checks the song ROM's one-cycle read latency, the three
// example entries at addresses 90..92 ({43,6}, {44,14}, {0,28}), that every
// entry matches the data file, and that every song is padded with 0-length
// notes to 32 entries (no non-zero entry after the first 0-length one).
module song_rom_tb;
  logic clk = 0;
  logic [6:0] addr = '0;
  logic [11:0] dout;
  logic [11:0] expected [128];
  int checks = 0, failures = 0;

  song_rom dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    $readmemh("rtl/song_rom.hex", expected);
    // latency: address applied, data one clock later, not before
    @(negedge clk) addr = 7'd90;
    @(posedge clk); #1;
    check(dout == {6'd43, 6'd6}, "entry 90 = {43,6} one clock after the address");
    @(negedge clk) addr = 7'd91;
    #1 check(dout == {6'd43, 6'd6}, "data does not change before the clock edge");
    @(posedge clk); #1;
    check(dout == {6'd44, 6'd14}, "entry 91 = {44,14}");
    @(negedge clk) addr = 7'd92;
    @(posedge clk); #1;
    check(dout == {6'd0, 6'd28}, "entry 92 = {0,28} (rest)");
    for (int a = 0; a < 128; a++) begin
      @(negedge clk) addr = 7'(a);
      @(posedge clk); #1;
      check(dout == expected[a], $sformatf("entry %0d matches the data file", a));
    end
    for (int s = 0; s < 4; s++) begin
      bit seen_zero;
      seen_zero = 0;
      for (int n = 0; n < 32; n++) begin
        if (expected[s*32+n][5:0] == 0 && expected[s*32+n][11:6] == 0) seen_zero = 1;
        else if (seen_zero) begin
          checks++; failures++; $display("FAIL: song %0d note %0d after padding", s, n);
        end
      end
      check(expected[s*32+31] == 12'h000, $sformatf("song %0d ends in a 0-length note", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
