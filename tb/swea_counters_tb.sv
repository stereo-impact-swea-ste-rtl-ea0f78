// swea_counters_tb: drives each anode with a known number of pulses per
// SAMPLECLK interval (different per anode and interval), and checks every
// message: header ID with and without the sweep housekeeping word, the
// SAMPLECNT of the interval that ended, the 16 counts, the appended sample,
// and that no message is sent while SWEA is disabled.
module swea_counters_tb;
  import sif_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        enable, sampleclk, hk_valid, out_valid, out_last, out_ready;
  logic [15:0] anode, out_data;
  logic [8:0]  samplecnt;
  logic [11:0] hk_value;
  swea_counters dut (.*);
  logic [15:0] words [$];
  int nmsg = 0;
  always @(posedge clk) if (out_valid && out_ready) begin
    words.push_back(out_data); if (out_last) nmsg++;
  end
  // interval k: anode a gets (a + 3*k) % 40 pulses, each 2 high / 2 low clocks
  task automatic interval(input int k);
    for (int p = 0; p < 40; p++) begin
      for (int a = 0; a < 16; a++) anode[a] = (p < (a + 3 * k) % 40);
      repeat (2) @(posedge clk); #1;
      anode = 0;
      repeat (2) @(posedge clk); #1;
    end
    repeat (5) @(posedge clk); #1;
  endtask
  task automatic tic(input int sc, input logic hv, input logic [11:0] hval);
    hk_valid = hv; hk_value = hval;
    samplecnt = 9'(sc); sampleclk = 1; @(posedge clk); #1; sampleclk = 0; hk_valid = 0;
  endtask
  initial begin
    enable = 1; sampleclk = 0; hk_valid = 0; hk_value = 0; anode = 0; samplecnt = 0; out_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk); #1;
    tic(0, 0, 0);                                 // start of interval 0
    repeat (30) @(posedge clk); #1;
    for (int k = 0; k < 6; k++) begin
      words.delete();
      interval(k);
      tic(k + 1, k % 2, 12'(k * 100 + 7));       // end of interval k
      repeat (30) @(posedge clk); #1;
      check(words.size() == 18 + k % 2, $sformatf("interval %0d: %0d words", k, words.size()));
      if (words.size() >= 18) begin
        check(words[0] == {(k % 2) ? MSG_SWEA_HK : MSG_SWEA, 8'h00}, "header ID");
        check(words[1] == 16'(k), $sformatf("SAMPLECNT %0d", words[1]));
        for (int a = 0; a < 16; a++)
          check(words[2 + a] == 16'((a + 3 * k) % 40), $sformatf("interval %0d anode %0d = %0d", k, a, words[2 + a]));
        if (k % 2) check(words[18] == 16'(k * 100 + 7), "sweep housekeeping word");
      end
    end
    enable = 0; words.delete();
    interval(0); tic(7, 0, 0); repeat (30) @(posedge clk);
    check(words.size() == 0, "no message while disabled");
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
