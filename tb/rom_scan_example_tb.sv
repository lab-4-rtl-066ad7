// rom_scan_example_tb: the worked example. After reset (address 0), a start
// pulse must stop at address 1 with value 01011 after one increment; a second
// start must skip address 2 ({0,00110}) and the zero words, wrap round the
// 32 addresses and stop at address 1 again after 32 increments. Each
// examined address must cost exactly 3 clocks.
module rom_scan_example_tb;
  logic clk = 0, reset = 1, start = 0;
  logic [4:0] address, value;
  logic busy;
  int checks = 0, failures = 0;

  rom_scan_example dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan(input int increments, input string what);
    int t;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t = 1;
    while (busy && t < 1000) begin @(negedge clk); t++; end
    check(t == 3 * increments + 1, $sformatf("%s: took %0d clocks, expected %0d", what, t, 3 * increments + 1));
    check(address == 5'd1 && value == 5'b01011, $sformatf("%s: stopped at address %0d value %b", what, address, value));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); reset = 0;
    check(!busy && address == 0 && value == 0, "waiting after reset");
    scan(1, "first scan");
    repeat (5) @(negedge clk);
    check(!busy && value == 5'b01011, "value kept while waiting");
    scan(32, "second scan wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
