// sif_timing_tb: checks the accumulation clocks at their full size.
// Two 2 s cycles are run with 1-second tics every 1 000 000 clocks and the
// seconds value counting up from 7 (so the first tic, at an odd second, must
// not start a cycle). Checked: CYCLECLK only on even seconds, 1344 STEPCLKs
// per cycle 1450 clocks apart, 336 SAMPLECLKs every 4th step, SAMPLECNT
// running 0..335, the 51.2 ms tail, and TESTCYCLECLK on seconds divisible by 10.
module sif_timing_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        sec_tic;
  logic [15:0] sec_value;
  logic        cycleclk, stepclk, sampleclk, testcycleclk;
  logic [8:0]  samplecnt;
  logic [10:0] stepcnt;

  sif_timing dut (.*);

  longint cyc = 0, last_step = -1, last_cycle = -1;
  int nstep = 0, nsample = 0, ncycle = 0, ntest = 0, max_sc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (cycleclk) begin
        ncycle++;
        check(samplecnt == 0 && stepcnt == 0, "CYCLECLK does not restart counters");
        if (last_cycle >= 0) begin
          check(cyc - last_cycle == 2_000_000, "cycle length");
          check(nstep == 1344, $sformatf("steps per cycle %0d", nstep));
          check(nsample == 336, $sformatf("samples per cycle %0d", nsample));
          check(max_sc == 335, $sformatf("max SAMPLECNT %0d", max_sc));
          // last step ends 1344*1450 clocks after CYCLECLK, then the tail
          check(last_step - last_cycle == 1343 * 1450, "last step position");
        end
        last_cycle = cyc; nstep = 0; nsample = 0; max_sc = 0;
      end
      if (stepclk) begin
        if (!cycleclk) check(cyc - last_step == 1450, $sformatf("step spacing %0d", cyc - last_step));
        last_step = cyc; nstep++;
      end
      if (sampleclk) begin
        nsample++;
        check(stepclk, "SAMPLECLK without STEPCLK");
        check(stepcnt % 4 == 0, "SAMPLECLK not on every 4th step");
        if (samplecnt > max_sc) max_sc = samplecnt;
      end
      if (testcycleclk) ntest++;
    end
  end

  initial begin
    sec_tic = 0; sec_value = 7;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 6; s++) begin
      repeat (999_998) @(posedge clk);
      sec_tic <= 1'b1; sec_value <= 16'(7 + s);
      @(posedge clk);
      sec_tic <= 1'b0;
      @(posedge clk);
      if ((7 + s) % 2 == 1) check(!cycleclk, "CYCLECLK on odd second");
      else                  check(cycleclk, "no CYCLECLK on even second");
      check(testcycleclk == ((7 + s) % 10 == 0), "TESTCYCLECLK");
    end
    repeat (2) @(posedge clk);
    check(ncycle == 3, $sformatf("cycles %0d", ncycle));
    check(ntest == 1, "one TESTCYCLECLK (second 10)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #70_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
