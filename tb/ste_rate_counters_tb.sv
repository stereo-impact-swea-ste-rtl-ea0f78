// ste_rate_counters_tb: gives each of the 12 monitor lines a different number
// of pulses per CYCLECLK interval and checks the 13-word message (header,
// then LLD, ULD, PULSERESET per detector). The widths are shortened to 6, 4
// and 3 bits so that saturation at the top value is reached and checked.
module ste_rate_counters_tb;
  import sif_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [3:0]  lld, uld, pulsereset;
  logic        cycleclk, out_valid, out_last, out_ready;
  logic [15:0] out_data;
  ste_rate_counters #(.LLD_W(6), .ULD_W(4), .PR_W(3)) dut (.*);
  logic [15:0] words [$];
  always @(posedge clk) if (out_valid && out_ready) words.push_back(out_data);
  function automatic int npulse(input int d, input int kind, input int k);
    return (5 * d + 7 * kind + 11 * k) % 70;
  endfunction
  function automatic int sat(input int n, input int w);
    return (n > (1 << w) - 1) ? (1 << w) - 1 : n;
  endfunction
  initial begin
    lld = 0; uld = 0; pulsereset = 0; cycleclk = 0; out_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk); #1;
    cycleclk = 1; @(posedge clk); #1; cycleclk = 0;
    repeat (20) @(posedge clk); #1;
    for (int k = 0; k < 4; k++) begin
      for (int p = 0; p < 70; p++) begin
        for (int d = 0; d < 4; d++) begin
          lld[d] = p < npulse(d, 0, k); uld[d] = p < npulse(d, 1, k); pulsereset[d] = p < npulse(d, 2, k);
        end
        repeat (2) @(posedge clk); #1;
        lld = 0; uld = 0; pulsereset = 0;
        repeat (2) @(posedge clk); #1;
      end
      repeat (3) @(posedge clk); #1;
      words.delete();
      cycleclk = 1; @(posedge clk); #1; cycleclk = 0;
      repeat (20) @(posedge clk); #1;
      check(words.size() == 13, $sformatf("%0d words", words.size()));
      if (words.size() == 13) begin
        check(words[0] == {MSG_STE_RATE, 8'h00}, "header");
        for (int d = 0; d < 4; d++) begin
          check(words[1 + 3 * d] == 16'(sat(npulse(d, 0, k), 6)), $sformatf("k%0d LLD%0d", k, d));
          check(words[2 + 3 * d] == 16'(sat(npulse(d, 1, k), 4)), $sformatf("k%0d ULD%0d", k, d));
          check(words[3 + 3 * d] == 16'(sat(npulse(d, 2, k), 3)), $sformatf("k%0d PR%0d", k, d));
        end
      end
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
