// hv_sync_tb: checks that the two HV sync outputs are complementary 100 kHz
// square waves (period 10 clocks, 5 high / 5 low).
module hv_sync_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic hvsync_p, hvsync_n;
  hv_sync dut (.*);
  initial begin
    int hi, rises, last_rise, c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    hi = 0; rises = 0; last_rise = -1; c = 0;
    for (int i = 0; i < 200; i++) begin
      logic prev;
      prev = hvsync_p;
      @(posedge clk); #1; c++;
      check(hvsync_p == !hvsync_n, "outputs not opposite");
      if (hvsync_p) hi++;
      if (hvsync_p && !prev) begin
        if (last_rise >= 0) check(c - last_rise == 10, $sformatf("period %0d", c - last_rise));
        last_rise = c; rises++;
      end
    end
    check(hi == 100, $sformatf("duty %0d/200", hi));
    check(rises == 20, $sformatf("rises %0d", rises));
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
