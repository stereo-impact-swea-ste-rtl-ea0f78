// ste_accum_readout_tb: presets both accumulator banks with known values,
// gives CYCLECLK and checks the message (header with the bank read, then the
// 256 counts of the idle bank in order, last flag on the final word), that the
// idle bank is cleared afterwards while the active bank is untouched, and
// that back-pressure from the telemetry side (ready low 3 clocks in 4) stalls
// without losing words. It also checks the read-out time: 4 frames per counter.
module ste_accum_readout_tb;
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
  logic cycleclk, acc_bank, out_valid, out_last, out_ready, busy;
  logic [15:0] out_data;
  ste_accum_readout dut (.clk, .rst_n, .cycleclk, .acc_bank, .nxt_slot, .spare_slot(!lut_req.valid), .cur_slot, .ram_din, .req(rdo_req),
                         .out_valid, .out_data, .out_last, .out_ready, .busy);
  assign sweep_req = '0; assign pha_req = '0; assign lut_req = '0;
  function automatic logic [15:0] pv(input int b, input int i);
    return 16'(b * 16'h8000 + i * 16'h0101 + 3);
  endfunction
  logic [15:0] words [$];
  int nlast = 0, c = 0, throttle = 0;
  always @(posedge clk) begin
    c <= c + 1;
    out_ready <= throttle ? (c % 4 == 0) : 1'b1;
    if (out_valid && out_ready) begin words.push_back(out_data); if (out_last) nlast++; end
  end
  task automatic run(input int b_active, input int thr);
    int t0;
    words.delete(); nlast = 0; throttle = thr;
    for (int b = 0; b < 2; b++) for (int i = 0; i < 256; i++) begin
      mem.mem['hF000 + b * 'h200 + 2 * i] = pv(b, i) & 8'hFF;
      mem.mem['hF000 + b * 'h200 + 2 * i + 1] = pv(b, i) >> 8;
    end
    acc_bank = 1'(b_active);
    cycleclk = 1; @(posedge clk); #1; cycleclk = 0;
    t0 = c;
    while (busy) begin @(posedge clk); #1; end
    if (!thr) check(c - t0 >= 256 * 16 - 8 && c - t0 <= 256 * 16 + 40, $sformatf("read-out took %0d clocks", c - t0));
    repeat (3) @(posedge clk); #1;
    check(words.size() == 257 && nlast == 1, $sformatf("%0d words, %0d last", words.size(), nlast));
    if (words.size() == 257) begin
      check(words[0] == {MSG_STE_ACC, 7'b0, 1'(1 - b_active)}, "header");
      for (int i = 0; i < 256; i++) check(words[i + 1] == pv(1 - b_active, i), $sformatf("count %0d", i));
    end
    for (int i = 0; i < 256; i++) begin
      check(mem.mem['hF000 + (1 - b_active) * 'h200 + 2 * i] == 0 && mem.mem['hF000 + (1 - b_active) * 'h200 + 2 * i + 1] == 0, "idle bank cleared");
      check({mem.mem['hF000 + b_active * 'h200 + 2 * i + 1], mem.mem['hF000 + b_active * 'h200 + 2 * i]} == pv(b_active, i), "active bank untouched");
    end
  endtask
  initial begin
    cycleclk = 0; acc_bank = 0; out_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk); #1;
    run(1, 0);
    run(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
