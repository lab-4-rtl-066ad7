// brute_force_synchronizer_tb: random input; out must equal in delayed by
// exactly two clocks, and be 0 out of reset.
module brute_force_synchronizer_tb;
  logic clk = 0, reset = 1, in = 0;
  logic out;
  logic [1:0] hist = '0;
  int checks = 0, failures = 0;

  brute_force_synchronizer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL: reset value"); end
    reset = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (out !== hist[0]) begin failures++; $display("FAIL: cycle %0d out=%0b expected %0b", i, out, hist[0]); end
      end
      hist = {hist[0], in};
      in = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
