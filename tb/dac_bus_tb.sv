// dac_bus_tb: models the six double-buffered DACs (byte taken on the rising
// edge of /WR according to MLBYTE, output updated by /LD) and checks that
// sweep, MCP and PULSE writes reach the right DAC, that sweep values appear
// only at sweep_load, that MCP and PULSE load themselves, that requests
// raised together are all served, and that /DACCLR follows reset.
module dac_bus_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        sw_req, sw_ack, sweep_load, pulse_req, pulse_ack, mcp_req, mcp_ack;
  logic [1:0]  sw_dac;
  logic [15:0] sw_value, pulse_value, mcp_value;
  logic [7:0]  dacd;
  logic        mlbyte, dacclr_n;
  logic [5:0]  wr_n, ld_n;
  dac_bus dut (.*);

  logic [15:0] inreg [6], outreg [6];
  logic [5:0]  wr_q;
  int          wr_strobes = 0;
  always @(posedge clk) begin
    wr_q <= wr_n;
    for (int i = 0; i < 6; i++) begin
      if (wr_n[i] && !wr_q[i] && rst_n) begin   // rising edge of /WR, seen one clock late
        if (mlbyte_q) inreg[i][15:8] = dacd_q; else inreg[i][7:0] = dacd_q;
      end
      if (!ld_n[i]) outreg[i] = inreg[i];
      if (!dacclr_n) begin inreg[i] = 0; outreg[i] = 0; end
    end
  end
  logic [7:0] dacd_q; logic mlbyte_q;
  logic [5:0] wr_neg = '1;
  always @(negedge clk) begin
    wr_strobes <= wr_strobes + $countones(wr_neg & ~wr_n);
    wr_neg <= wr_n;
  end
  always @(posedge clk) begin dacd_q <= dacd; mlbyte_q <= mlbyte; end

  task automatic tick(input int n = 1); repeat (n) @(posedge clk); #1; endtask
  task automatic sweep_write(input int d, input logic [15:0] v);
    sw_dac = 2'(d); sw_value = v; sw_req = 1;
    while (!sw_ack) tick();
    tick(); sw_req = 0;
    tick(6);
  endtask

  initial begin
    sw_req = 0; sweep_load = 0; pulse_req = 0; mcp_req = 0; sw_dac = 0;
    sw_value = 0; pulse_value = 0; mcp_value = 0;
    for (int i = 0; i < 6; i++) begin inreg[i] = 16'hDEAD; outreg[i] = 16'hDEAD; end
    tick(2);
    check(!dacclr_n, "DACCLR low in reset");
    rst_n = 1; tick();
    check(dacclr_n && outreg[0] == 0, "DACs cleared");
    sweep_write(0, 16'h1234); sweep_write(1, 16'hAB00); sweep_write(2, 16'h5600); sweep_write(3, 16'h9A00);
    check(inreg[0] == 16'h1234 && inreg[3] == 16'h9A00, "sweep input registers");
    check(outreg[0] == 0 && outreg[1] == 0, "outputs unchanged before load");
    sweep_load = 1; tick(); sweep_load = 0; tick(2);
    check(outreg[0] == 16'h1234 && outreg[1] == 16'hAB00 && outreg[2] == 16'h5600 && outreg[3] == 16'h9A00,
          "sweep outputs after common load");
    check(wr_strobes == 8, $sformatf("%0d write strobes for 4 words", wr_strobes));
    // MCP and PULSE together with a sweep write
    mcp_value = 16'h7700; pulse_value = 16'h0042; mcp_req = 1; pulse_req = 1;
    sw_dac = 1; sw_value = 16'h1100; sw_req = 1;
    fork
      begin while (!sw_ack) tick(); tick(); sw_req = 0; end
      begin while (!mcp_ack) tick(); tick(); mcp_req = 0; end
      begin while (!pulse_ack) tick(); tick(); pulse_req = 0; end
    join
    tick(8);
    check(outreg[4] == 16'h7700, "MCP DAC written and loaded");
    check(outreg[5] == 16'h0042, "PULSE DAC written and loaded");
    check(outreg[1] == 16'hAB00 && inreg[1] == 16'h1100, "sweep DAC waits for the common load");
    check(outreg[0] == 16'h1234, "other DACs untouched");
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
