// frequency_rom_tb: checks each of the 64 phase steps against an independent
// equal-temperament computation (A4 = note 49 = 440 Hz, 48 kHz samples,
// 2^22 phase units per period), a few hand-computed entries, the rest at
// entry 0, and the one-cycle read latency.
module frequency_rom_tb;
  logic clk = 0;
  logic [5:0] addr = '0;
  logic [19:0] dout;
  int checks = 0, failures = 0;

  frequency_rom dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (dout=%0d)", what, dout); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real f, step;
    @(negedge clk) addr = 6'd49;
    @(posedge clk); #1;
    check(dout == 20'd38448, "A4 (440 Hz): 440/48000*2^22 = 38447.8");
    @(negedge clk) addr = 6'd44;
    #1 check(dout == 20'd38448, "output holds until the clock edge");
    @(posedge clk); #1;
    check(dout == 20'd28803, "E4 (329.63 Hz) = 28803.3");
    @(negedge clk) addr = 6'd0;
    @(posedge clk); #1;
    check(dout == 20'd0, "note 0 is a rest: step 0");
    for (int n = 1; n < 64; n++) begin
      @(negedge clk) addr = 6'(n);
      @(posedge clk); #1;
      f    = 440.0 * $pow(2.0, (n - 49) / 12.0);
      step = f * 4194304.0 / 48000.0;
      check(($itor(dout) - step) < 0.51 && (step - $itor(dout)) < 0.51,
            $sformatf("note %0d step %0d vs %f", n, dout, step));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
