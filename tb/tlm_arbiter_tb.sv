// tlm_arbiter_tb: four sources each send messages of different lengths; the
// output must carry every message whole (no interleaving), in the order each
// source produced them, with sources served round-robin, under a ready signal
// that is low one clock in three.
module tlm_arbiter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [3:0]       src_valid, src_last, src_ready;
  logic [3:0][15:0] src_data;
  logic tlm_valid, tlm_last, tlm_ready;
  logic [15:0] tlm_data;
  tlm_arbiter dut (.*);
  // source s sends NMSG messages of (s+2) words: {s, msg, word}
  localparam int NMSG = 5;
  int msg [4], wrd [4];
  always_comb for (int s = 0; s < 4; s++) begin
    src_valid[s] = rst_n && msg[s] < NMSG;
    src_data[s]  = {4'(s), 4'(msg[s]), 8'(wrd[s])};
    src_last[s]  = (wrd[s] == s + 1);
  end
  always @(posedge clk) for (int s = 0; s < 4; s++)
    if (src_valid[s] && src_ready[s]) begin
      if (src_last[s]) begin msg[s] <= msg[s] + 1; wrd[s] <= 0; end
      else wrd[s] <= wrd[s] + 1;
    end
  int c = 0, cur = -1, exp_w = 0, nmsgs = 0, last_src = -1, got [4];
  always @(posedge clk) begin
    c <= c + 1;
    tlm_ready <= (c % 3 != 2);
    if (tlm_valid && tlm_ready) begin
      int s, m, w;
      s = tlm_data[15:12]; m = tlm_data[11:8]; w = tlm_data[7:0];
      if (cur < 0) begin
        cur = s; exp_w = 0;
        check(m == got[s], $sformatf("src %0d message order", s));
      end
      check(s == cur, "interleaved message");
      check(w == exp_w, $sformatf("src %0d word %0d expected %0d", s, w, exp_w));
      check(tlm_last == (w == s + 1), "last flag");
      exp_w++;
      if (tlm_last) begin
        got[s]++; nmsgs++;
        if (last_src >= 0 && nmsgs <= 12) check(s == (last_src + 1) % 4, "round-robin order");
        last_src = s; cur = -1;
      end
    end
  end
  initial begin
    for (int s = 0; s < 4; s++) begin msg[s] = 0; wrd[s] = 0; got[s] = 0; end
    tlm_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (400) @(posedge clk);
    check(nmsgs == 4 * NMSG, $sformatf("%0d messages delivered", nmsgs));
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
