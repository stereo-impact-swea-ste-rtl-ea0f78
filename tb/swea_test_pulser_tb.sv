// swea_test_pulser_tb: with SAMPLECNT = n the pulse period must be n+1
// clocks; SAMPLECLK restarts the counter with the new value; disabled -> 0.
module swea_test_pulser_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic enable, sampleclk, pulse;
  logic [8:0] samplecnt;
  swea_test_pulser dut (.*);
  task automatic measure(input int n);
    int last, cnt, c;
    samplecnt = 9'(n); sampleclk = 1; @(posedge clk); #1; sampleclk = 0;
    last = -1; cnt = 0; c = 0;
    for (int i = 0; i < 20 * (n + 1) + 5; i++) begin
      @(posedge clk); #1; c++;
      if (pulse) begin
        if (last >= 0) check(c - last == n + 1, $sformatf("n=%0d period %0d", n, c - last));
        last = c; cnt++;
      end
    end
    check(cnt >= 19, $sformatf("n=%0d only %0d pulses", n, cnt));
  endtask
  initial begin
    enable = 1; sampleclk = 0; samplecnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    measure(0); measure(1); measure(5); measure(17); measure(335);
    enable = 0;
    for (int i = 0; i < 100; i++) begin @(posedge clk); #1; check(!pulse, "pulse while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
