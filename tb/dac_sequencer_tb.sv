// dac_sequencer_tb: runs the sweep with N_STEPS = 6 and STEPCLK every 300
// clocks against the SRAM model, the DAC bus and a DAC model. Each bank of
// the table holds a distinct pattern. Checked: after every STEPCLK (from the
// second one) the four sweep DAC outputs hold that step's table values, they
// change only at the common load, a swap request switches tables exactly at
// the next CYCLECLK, and with SWEA disabled nothing is loaded.
module dac_sequencer_tb;
  import sif_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  ram_req_t   pha_req, sweep_req, rdo_req, lut_req;
  logic [2:0] nxt_slot, cur_slot;
  logic [RAM_AW-1:0] ram_addr;
  logic [7:0] ram_dout, ram_din;
  logic ram_ce_n, ram_oe_n, ram_we_n;
  ram_sequencer u_seq (.clk, .rst_n, .pha_req, .sweep_req, .rdo_req, .lut_req, .nxt_slot, .cur_slot,
                       .cur_valid(), .ram_addr, .ram_dout, .ram_ce_n, .ram_oe_n, .ram_we_n);
  sram_model mem (.addr(ram_addr), .din(ram_dout), .dout(ram_din), .ce_n(ram_ce_n), .oe_n(ram_oe_n), .we_n(ram_we_n));
  localparam int NS = 6;
  logic enable, stepclk, cycleclk, swap_req, bank, sw_req, sw_ack, sweep_load;
  logic [10:0] stepcnt;
  logic [1:0]  sw_dac;
  logic [15:0] sw_value;
  logic [7:0]  dacd;
  logic        mlbyte, dacclr_n;
  logic [5:0]  wr_n, ld_n;
  dac_sequencer #(.N_STEPS(NS)) dut (.clk, .rst_n, .enable, .stepclk, .cycleclk, .stepcnt, .swap_req, .bank,
      .nxt_slot, .cur_slot, .ram_din, .req(sweep_req), .sw_req, .sw_dac, .sw_value, .sw_ack, .sweep_load);
  dac_bus u_bus (.clk, .rst_n, .sw_req, .sw_dac, .sw_value, .sw_ack, .sweep_load,
      .pulse_req(1'b0), .pulse_value(16'h0), .pulse_ack(), .mcp_req(1'b0), .mcp_value(16'h0), .mcp_ack(),
      .dacd, .mlbyte, .wr_n, .ld_n, .dacclr_n);
  assign pha_req = '0; assign rdo_req = '0; assign lut_req = '0;
  // DAC model
  logic [15:0] inreg [4], outreg [4];
  logic [5:0] wr_q; logic [7:0] d_q; logic ml_q;
  int nload = 0;
  always @(posedge clk) begin
    wr_q <= wr_n; d_q <= dacd; ml_q <= mlbyte;
    for (int i = 0; i < 4; i++) begin
      if (wr_n[i] && !wr_q[i] && rst_n) begin if (ml_q) inreg[i][15:8] = d_q; else inreg[i][7:0] = d_q; end
      if (!ld_n[i]) outreg[i] = inreg[i];
    end
    if (!ld_n[0]) nload++;
  end
  function automatic logic [15:0] tv(input int b, input int s, input int d);
    return 16'((b + 1) * 16'h1000 + s * 16'h10 + d);
  endfunction
  int step = 0;
  task automatic do_step(input bit cyc);
    stepclk = 1; cycleclk = cyc; stepcnt = 11'(step);
    @(posedge clk); #1; stepclk = 0; cycleclk = 0;
    repeat (299) @(posedge clk); #1;
  endtask
  initial begin
    int b;
    for (b = 0; b < 2; b++) for (int s = 0; s < NS; s++) for (int d = 0; d < 4; d++) begin
      mem.mem['h8000 + b * 'h4000 + 8 * s + 2 * d]     = tv(b, s, d) & 8'hFF;
      mem.mem['h8000 + b * 'h4000 + 8 * s + 2 * d + 1] = tv(b, s, d) >> 8;
    end
    for (int i = 0; i < 4; i++) begin inreg[i] = 0; outreg[i] = 0; end
    enable = 1; stepclk = 0; cycleclk = 0; swap_req = 0; stepcnt = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk); #1;
    b = 0;
    for (int c = 0; c < 4; c++) begin
      if (c == 1) b = 1;
      for (step = 0; step < NS; step++) begin
        do_step(step == 0);
        if (c == 0 && step == 2) begin swap_req = 1; @(posedge clk); #1; swap_req = 0; end
        if (!(c == 0 && step == 0))
          for (int d = 0; d < 4; d++)
            check(outreg[d] == tv(b, step, d), $sformatf("cycle %0d step %0d DAC %0d = %h, want %h", c, step, d, outreg[d], tv(b, step, d)));
      end
      check(bank == 1'(b), "bank in use");
    end
    check(nload == 4 * NS - 1, $sformatf("%0d loads", nload));
    enable = 0;
    step = 0; do_step(1); step = 1; do_step(0);
    check(nload == 4 * NS - 1, "no load while disabled");
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
