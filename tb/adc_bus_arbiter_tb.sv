// adc_bus_arbiter_tb: five ADC models put (source, sample) on the shared bus
// while their read strobe is low. Checks that only one strobe is low at a
// time, that each result carries the data of the ADC that was read, that
// with all five requesting they are served round-robin, and that a read
// takes two clocks.
module adc_bus_arbiter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [4:0]  req, grant, rd_n;
  logic [11:0] phad;
  logic        out_valid;
  logic [2:0]  out_src;
  logic [11:0] out_data;
  adc_bus_arbiter dut (.*);
  logic [11:0] sample [5];
  always_comb begin
    phad = 12'hFFF;
    for (int i = 0; i < 5; i++) if (!rd_n[i]) phad = sample[i];
  end
  int order [$];
  always @(posedge clk) if (rst_n) begin
    check($countones(~rd_n) <= 1, "two read strobes at once");
    if (out_valid) begin
      check(out_data == sample[out_src], $sformatf("data of ADC %0d", out_src));
      check(grant[out_src] && $countones(grant) == 1, "grant matches result");
      order.push_back(out_src);
    end
  end
  always @(posedge clk) for (int i = 0; i < 5; i++) if (grant[i]) begin
    req[i] <= 1'b0; sample[i] <= sample[i] + 12'd7;
  end
  initial begin
    for (int i = 0; i < 5; i++) sample[i] = 12'(100 * i + 3);
    req = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    req = 5'b11111;
    repeat (11) @(posedge clk); #1;
    check(req == 0, "five reads in ten clocks");
    check(order.size() == 5, "five results");
    for (int i = 0; i < order.size(); i++) check(order[i] == i, $sformatf("round-robin %0d", i));
    // 0 just served last time? serve 3, then 1 and 4 together: 4 comes before 1 (after 3)
    order.delete();
    req = 5'b01000; repeat (3) @(posedge clk); #1;
    req = 5'b10010; repeat (5) @(posedge clk); #1;
    check(order.size() == 3 && order[0] == 3 && order[1] == 4 && order[2] == 1, "rotation after 3");
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
