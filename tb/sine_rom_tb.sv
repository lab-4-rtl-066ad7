// sine_rom_tb: checks all 1024 quarter-wave entries against $sin
// (32767 * sin(pi/2 * (i + 0.5) / 1024), within one LSB), the mirror symmetry
// needed at the quadrant joins, and the one-cycle read latency.
module sine_rom_tb;
  logic clk = 0;
  logic [9:0] addr = '0;
  logic [15:0] dout;
  int checks = 0, failures = 0;
  real ref_v;

  sine_rom dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (dout=%0d)", what, dout); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk) addr = 10'd1023;
    @(posedge clk); #1;
    check(dout == 16'd32767, "last entry is full scale");
    @(negedge clk) addr = 10'd0;
    #1 check(dout == 16'd32767, "output holds until the clock edge");
    @(posedge clk); #1;
    check(dout == 16'd25, "first entry = round(32767*sin(pi/4096)) = 25");
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk) addr = 10'(i);
      @(posedge clk); #1;
      ref_v = 32767.0 * $sin(3.14159265358979 / 2.0 * (i + 0.5) / 1024.0);
      check(($itor(dout) - ref_v) < 1.0 && (ref_v - $itor(dout)) < 1.0,
            $sformatf("entry %0d = %0d vs %f", i, dout, ref_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
