// pha_channel_tb: plays the PHA interface waveforms: noise PEAKs before LLD,
// a PEAK falling inside the pile-up window (start expected, /CVST falling in
// the same instant as PEAK and lasting less than 1 us), PEAK falling too
// early or more than 4 us after the LLD edge, ULD or PULSERESET high, and AFE
// power off (no start). A converter model raises BUSY for 2 us after /CVST;
// the channel must then request the bus read and release it on the grant.
module pha_channel_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic enable, lld, uld, peak, pulsereset, busy, cvst_n, rd_req, rd_grant, started;
  pha_channel dut (.*);
  int nstart = 0, nfall = 0;
  always @(posedge clk) if (started) nstart++;
  always @(negedge cvst_n) if (rst_n) begin
    nfall++;
    busy <= #1 1'b1;
    busy <= #21 1'b0;
  end
  // bus: grant a read two clocks after the request
  int nread = 0;
  always @(posedge clk) begin
    rd_grant <= 1'b0;
    if (rd_req && !rd_grant) begin rd_grant <= 1'b1; nread++; end
  end
  // one event: LLD rises 1 unit after a clock edge, PEAK falls at fall_at units after it
  task automatic event_at(input int fall_at, input logic u, input logic pr, input logic exp, input string m);
    int f0, s0;
    f0 = nfall; s0 = nstart;
    @(posedge clk); #1;
    uld = u; pulsereset = pr;
    lld = 1;
    #(fall_at - 8);
    peak = 1;
    #8;
    peak = 0;
    #1;
    if (exp) check(!cvst_n, {m, ": /CVST low right after PEAK fall"});
    #20;
    lld = 0; uld = 0; pulsereset = 0;
    #60;
    check((nfall - f0 == (exp ? 1 : 0)) && (nstart - s0 == (exp ? 1 : 0)), {m, ": start count"});
    check(cvst_n, {m, ": /CVST back high"});
  endtask
  realtime tfall, trise;
  always @(negedge cvst_n) tfall = $realtime;
  always @(posedge cvst_n) if (rst_n) begin
    trise = $realtime;
    check(trise - tfall > 0 && trise - tfall <= 10, "/CVST width under 1 us");
  end
  initial begin
    enable = 1; lld = 0; uld = 0; peak = 0; pulsereset = 0; busy = 0; rd_grant = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk); #3;
    // noise PEAKs with LLD low
    repeat (2) begin peak = 1; #12; peak = 0; #13; end
    check(cvst_n && nfall == 0, "no start on PEAK without LLD");
    event_at(35, 0, 0, 1, "PEAK 3.4 us after LLD");
    check(nread == 1, "read requested after BUSY");
    event_at(15, 0, 0, 0, "PEAK 1.4 us after LLD (too early)");
    event_at(50, 0, 0, 0, "PEAK 4.9 us after LLD (pile-up)");
    event_at(35, 1, 0, 0, "ULD high");
    event_at(35, 0, 1, 0, "PULSERESET high");
    event_at(33, 0, 0, 1, "PEAK 3.2 us after LLD");
    enable = 0;
    event_at(35, 0, 0, 0, "AFE power off");
    enable = 1;
    check(nread == 2, $sformatf("%0d bus reads", nread));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
