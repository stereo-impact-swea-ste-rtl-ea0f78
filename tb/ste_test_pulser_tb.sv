// ste_test_pulser_tb: with a 4-bit DAC ramp (16 pulses) checks the 10-clock
// active-low pulses every 100 clocks, the DAC value during each pulse
// (0,1,2,..,15), the stop and return to 0 after the top value, and pulse_n
// high when disabled. A bus model acknowledges DAC writes after 3 clocks.
module ste_test_pulser_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic enable, testcycleclk, pulse_n, dac_req, dac_ack, ramp_done;
  logic [15:0] dac_value, dac_out;
  ste_test_pulser #(.DAC_BITS(4)) dut (.*);
  // DAC bus model: takes the value after 3 clocks
  int dly = 0;
  always @(posedge clk) begin
    dac_ack <= 1'b0;
    if (dac_req && !dac_ack) begin
      if (dly == 3) begin dac_out <= dac_value; dac_ack <= 1'b1; dly <= 0; end
      else dly <= dly + 1;
    end
  end
  int npulse = 0, lowlen = 0, last_fall = -1, c = 0, ndone = 0;
  logic prev = 1'b1;
  always @(posedge clk) begin
    c <= c + 1;
    if (ramp_done) ndone <= ndone + 1;
    if (!pulse_n) lowlen <= lowlen + 1;
    if (!pulse_n && prev) begin
      if (last_fall >= 0 && npulse % 16 != 0) check(c - last_fall == 100, $sformatf("pulse spacing %0d", c - last_fall));
      last_fall <= c;
    end
    if (pulse_n && !prev) begin
      check(lowlen == 10, $sformatf("pulse width %0d", lowlen));
      check(dac_out == 16'(npulse % 16), $sformatf("DAC %0d during pulse %0d", dac_out, npulse));
      npulse <= npulse + 1; lowlen <= 0;
    end
    prev <= pulse_n;
  end
  initial begin
    enable = 1; testcycleclk = 0; dac_ack = 0; dac_out = 16'hFFFF;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (50) @(posedge clk); #1;
    check(pulse_n, "no pulses before TESTCYCLECLK");
    testcycleclk = 1; @(posedge clk); #1; testcycleclk = 0;
    repeat (1700) @(posedge clk); #1;
    check(npulse == 16, $sformatf("%0d pulses in the ramp", npulse));
    check(ndone == 1, "ramp_done once");
    check(dac_out == 0, "DAC back to 0 after the ramp");
    repeat (300) @(posedge clk); #1;
    check(npulse == 16 && pulse_n, "stopped until next TESTCYCLECLK");
    testcycleclk = 1; @(posedge clk); #1; testcycleclk = 0;
    repeat (350) @(posedge clk); #1;
    check(npulse == 20, $sformatf("restart: %0d pulses", npulse));
    enable = 0; repeat (20) @(posedge clk); #1;
    check(pulse_n && dac_out == 0, "disabled: pulse high, DAC 0");
    repeat (200) @(posedge clk); #1;
    check(npulse == 20, "no pulses while disabled");
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
