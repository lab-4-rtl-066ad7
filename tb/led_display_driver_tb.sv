// led_display_driver_tb: with REFRESH_BITS = 4 (each digit lit for 4 clocks),
// shows random hex values and checks that exactly one digit enable is active
// at a time, every digit is visited in each refresh period, and each lit
// digit shows the right pattern from an independent segment table
// (active-low {g,f,e,d,c,b,a}).
module led_display_driver_tb;
  logic clk = 0, reset = 1;
  logic [15:0] digits = '0;
  logic [6:0] seg_n;
  logic [3:0] an_n;
  int checks = 0, failures = 0;
  // segments a..g lit for 0..F, listed as strings of lit segment letters
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  led_display_driver #(.REFRESH_BITS(4)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [6:0] pattern_n(input int h);
    logic [6:0] p;
    p = 7'h7f;
    for (int i = 0; i < lit[h].len(); i++) p[3'(lit[h][i] - 8'd97)] = 1'b0;
    return p;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    for (int v = 0; v < 40; v++) begin
      logic [3:0] seen;
      seen = '0;
      digits = (v < 16) ? {4{4'(v)}} : 16'($urandom);
      repeat (2) @(negedge clk);   // let the registered outputs follow
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        checks++;
        if (!$onehot(~an_n)) begin failures++; $display("FAIL: enables %b", an_n); end
        else begin
          int d;
          d = 0;
          for (int i = 0; i < 4; i++) if (!an_n[i]) d = i;
          seen[d] = 1'b1;
          checks++;
          if (seg_n !== pattern_n(int'(digits[d*4 +: 4]))) begin
            failures++; $display("FAIL: digit %0d value %h shows %b", d, digits[d*4 +: 4], seg_n);
          end
        end
      end
      checks++;
      if (seen != 4'hF) begin failures++; $display("FAIL: digits visited %b", seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
