// heater_pwm_tb: for every level 0..10 (and 15) the heater output must be
// high for exactly min(level,10) of each 10 clocks, in one block per period.
module heater_pwm_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [3:0] level;
  logic       heater_on;
  heater_pwm dut (.*);
  initial begin
    level = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l <= 11; l++) begin
      int hi, edges;
      logic prev;
      level = (l == 11) ? 4'd15 : 4'(l);
      repeat (20) @(posedge clk);
      #1;
      hi = 0; edges = 0; prev = heater_on;
      for (int i = 0; i < 50; i++) begin
        @(posedge clk); #1;
        if (heater_on) hi++;
        if (heater_on && !prev) edges++;
        prev = heater_on;
      end
      check(hi == 5 * ((l > 10) ? 10 : l), $sformatf("level %0d: %0d high of 50", l, hi));
      if (l > 0 && l < 10) check(edges == 5, $sformatf("level %0d: %0d pulses in 5 periods", l, edges));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
