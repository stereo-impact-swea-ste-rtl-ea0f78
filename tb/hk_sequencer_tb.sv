// hk_sequencer_tb: runs the housekeeping sequencer with a shortened cycle
// (16 x 200 clocks, 80 steps of 40 clocks) against an ADC model that returns
// 0x100 + 0x11*address of the input selected when /HKPCVST fell. Checked over
// a cycling-mode and a sweep-mode cycle: 16 messages per cycle, the address
// and sample in each, the mux advanced right after each conversion and left
// to settle before the next, in sweep mode the mux fixed at the commanded
// address, one sweep sample offered in every SAMPLECLK interval, and no
// conversion while AFE power is off.
module hk_sequencer_tb;
  import sif_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        enable, cycleclk, stepclk, sampleclk, hkpcvst_n, rd_req, rd_grant, sweep_mode, sweep_valid;
  logic        out_valid, out_last, out_ready;
  logic [10:0] stepcnt;
  logic [3:0]  sweep_addr, hkpa;
  logic [15:0] status, out_data;
  logic [11:0] rd_data, sweep_value;
  hk_sequencer #(.HK_INTERVAL(200), .CONV_OFFSET(20), .CONV_WAIT(3)) dut (.*);
  // ADC model
  logic [3:0] conv_addr;
  int nconv = 0, last_mux_change = 0, c = 0;
  logic [3:0] hkpa_q;
  always @(posedge clk) begin
    c <= c + 1;
    hkpa_q <= hkpa;
    if (hkpa != hkpa_q) last_mux_change <= c;
    if (!hkpcvst_n) begin
      conv_addr <= hkpa; nconv <= nconv + 1;
      check(c - last_mux_change >= 10, "mux settled before conversion");
    end
    rd_grant <= rd_req && !rd_grant;
    rd_data  <= 12'h100 + 12'h11 * conv_addr;
  end
  logic [15:0] words [$];
  always @(posedge clk) if (out_valid && out_ready) words.push_back(out_data);
  int nsweep = 0;
  always @(posedge clk) if (sampleclk && rst_n) begin
    if (sweep_mode && stepcnt != 0) begin
      check(sweep_valid && sweep_value == 12'h100 + 12'h11 * sweep_addr, "sweep sample offered each SAMPLECLK");
      nsweep++;
    end
    if (!sweep_mode) check(!sweep_valid, "no sweep sample in cycling mode");
  end
  task automatic run_cycle();
    for (int s = 0; s < 80; s++) begin
      stepclk = 1; cycleclk = (s == 0); sampleclk = (s % 4 == 0); stepcnt = 11'(s);
      @(posedge clk); #1; stepclk = 0; cycleclk = 0; sampleclk = 0;
      repeat (39) @(posedge clk); #1;
    end
  endtask
  initial begin
    int n0;
    enable = 1; cycleclk = 0; stepclk = 0; sampleclk = 0; stepcnt = 0; sweep_addr = 4'd9;
    status = 16'hC0DE; out_ready = 1; rd_grant = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk); #1;
    // cycle 1: cycling mode
    words.delete(); n0 = nconv;
    run_cycle();
    check(nconv - n0 == 16, $sformatf("cycling: %0d conversions", nconv - n0));
    check(words.size() == 48, $sformatf("cycling: %0d words", words.size()));
    for (int m = 0; m < 16 && 3 * m + 2 < words.size(); m++) begin
      check(words[3 * m] == {MSG_HK, 1'b0, 3'b000, 4'(m)}, $sformatf("cycling header %0d: %h", m, words[3 * m]));
      check(words[3 * m + 1] == 16'h100 + 16'h11 * m, $sformatf("cycling sample %0d", m));
      check(words[3 * m + 2] == 16'hC0DE, "status word");
    end
    // cycle 2: sweep mode
    words.delete(); n0 = nconv;
    run_cycle();
    check(nconv - n0 == 20, $sformatf("sweep: %0d conversions", nconv - n0));
    check(nsweep == 19, $sformatf("sweep samples at %0d SAMPLECLKs", nsweep));
    check(words.size() == 48, $sformatf("sweep: %0d words", words.size()));
    for (int m = 1; m < 16 && 3 * m + 2 < words.size(); m++) begin
      check(words[3 * m] == {MSG_HK, 1'b1, 3'b000, 4'd9}, "sweep header");
      check(words[3 * m + 1] == 16'h100 + 16'h11 * 9, "sweep sample in message");
    end
    // AFE power off: messages continue, no conversions
    enable = 0; n0 = nconv; words.delete();
    run_cycle();
    check(nconv == n0, "no conversion with AFE power off");
    check(words.size() == 0, "cycling mode sends only converted samples");
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
