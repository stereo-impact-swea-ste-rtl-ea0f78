// pha_accumulator_tb: fills the energy LUT (both banks, different mappings)
// in the SRAM model, sends events (detector, energy) at random times and
// checks the 256 16-bit counters of the accumulator bank against a reference
// count made in the testbench: the LUT bin must be used, the increment must
// carry into the high byte (a counter preset to 0x00FF), events must go to
// the accumulator bank selected when they are taken, and a burst that
// overflows the FIFO must be split exactly into counted and dropped events.
// The event rate is also checked: one event per 8-clock frame.
module pha_accumulator_tb;
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
  logic        evt_valid, elut_bank, acc_bank, done;
  logic [1:0]  evt_det;
  logic [11:0] evt_energy;
  logic [15:0] dropped;
  pha_accumulator dut (.clk, .rst_n, .evt_valid, .evt_det, .evt_energy, .elut_bank, .acc_bank,
                       .nxt_slot, .ram_din, .req(pha_req), .dropped, .done);
  assign sweep_req = '0; assign rdo_req = '0; assign lut_req = '0;
  function automatic int lutv(input int b, input int det, input int e);
    return b ? ((255 - det * 64 - e / 64) & 255) : (det * 64 + e / 64);
  endfunction
  int ref_cnt [2][256];
  int ndone = 0, last_done = -1, c = 0;
  always @(posedge clk) begin
    c <= c + 1;
    if (done) begin
      if (last_done >= 0) check(c - last_done >= 8, "more than one event per frame");
      last_done <= c; ndone <= ndone + 1;
    end
  end
  function automatic int acc(input int b, input int bin);
    return {mem.mem['hF000 + b * 'h200 + 2 * bin + 1], mem.mem['hF000 + b * 'h200 + 2 * bin]};
  endfunction
  task automatic send(input int det, input int e);
    evt_det = 2'(det); evt_energy = 12'(e); evt_valid = 1;
    @(posedge clk); #1; evt_valid = 0;
  endtask
  initial begin
    int det, e, n0, tot;
    for (int b = 0; b < 2; b++) for (det = 0; det < 4; det++) for (e = 0; e < 4096; e++)
      mem.mem[b * 'h4000 + det * 4096 + e] = 8'(lutv(b, det, e));
    for (int b = 0; b < 2; b++) for (int i = 0; i < 256; i++) ref_cnt[b][i] = 0;
    mem.mem['hF000 + 2 * 5] = 8'hFF; ref_cnt[0][5] = 255;       // carry test: det 0, energy 320..383
    evt_valid = 0; evt_det = 0; evt_energy = 0; elut_bank = 0; acc_bank = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk); #1;
    for (int i = 0; i < 300; i++) begin
      det = $urandom_range(0, 3); e = (i % 7 == 0) ? 330 : $urandom_range(0, 4095);
      if (i % 7 == 0) det = 0;
      if (i == 150) begin elut_bank = 1; repeat (20) @(posedge clk); #1; acc_bank = 1; repeat (20) @(posedge clk); #1; end
      send(det, e);
      ref_cnt[acc_bank][lutv(elut_bank, det, e)]++;
      repeat ($urandom_range(9, 30)) @(posedge clk); #1;
    end
    repeat (50) @(posedge clk); #1;
    check(dropped == 0, "no drops at low rate");
    check(ndone == 300, $sformatf("%0d increments", ndone));
    for (int b = 0; b < 2; b++) for (int i = 0; i < 256; i++)
      check(acc(b, i) == ref_cnt[b][i], $sformatf("bank %0d bin %0d = %0d, want %0d", b, i, acc(b, i), ref_cnt[b][i]));
    check(acc(0, 5) > 255, "carry into the high byte");
    // burst: 20 events on consecutive clocks, all to bin lutv(1,3,4095)
    n0 = acc(1, lutv(1, 3, 4095));
    for (int i = 0; i < 20; i++) send(3, 4095);
    repeat (300) @(posedge clk); #1;
    tot = acc(1, lutv(1, 3, 4095)) - n0;
    check(dropped > 0, "FIFO overflow drops events");
    check(tot + dropped == 20, $sformatf("burst: %0d counted + %0d dropped", tot, dropped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
