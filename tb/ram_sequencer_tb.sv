// ram_sequencer_tb: four clients (PHA, sweep, read-out, LUT loader) issue
// random reads and writes, each in its own address range, against the SRAM
// model. Checked: a client's request is executed only in its own slots (the
// read-out also in slot 7 when the loader does not use it), in
// the frame order 0..7; reads return what the client last wrote there; the
// write strobe is low only in the low clock phase; an idle slot leaves the
// chip deselected; and every client gets one transfer per 8-clock frame
// (five for the PHA).
module ram_sequencer_tb;
  import sif_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  ram_req_t   pha_req, sweep_req, rdo_req, lut_req;
  logic [2:0] nxt_slot, cur_slot;
  logic       cur_valid;
  logic [RAM_AW-1:0] ram_addr;
  logic [7:0] ram_dout, ram_din;
  logic ram_ce_n, ram_oe_n, ram_we_n;
  ram_sequencer dut (.*);
  sram_model mem (.addr(ram_addr), .din(ram_dout), .dout(ram_din), .ce_n(ram_ce_n), .oe_n(ram_oe_n), .we_n(ram_we_n));

  ram_req_t   rq [4];
  logic [7:0] shadow [4][16];
  logic       active [4];
  assign pha_req = rq[0]; assign sweep_req = rq[1]; assign rdo_req = rq[2]; assign lut_req = rq[3];
  function automatic int owner(input logic [2:0] s);
    return (s <= 3'd4) ? 0 : (s == 3'd5) ? 1 : (s == 3'd6) ? 2 : 3;
  endfunction
  function automatic ram_req_t rnd(input int k);
    ram_req_t r;
    r.valid = active[k] && ($urandom_range(0, 3) != 0);
    r.we    = $urandom_range(0, 1);
    r.addr  = RAM_AW'(k * 'h1000 + $urandom_range(0, 15));
    r.wdata = 8'($urandom);
    return r;
  endfunction
  int ntr [4], nwr = 0, nrd = 0;
  logic [2:0] exp_slot = '0;
  ram_req_t   pend;      // request on the pins
  int         pend_k = -1;
  always @(posedge clk) if (rst_n) begin
    // the transfer of this clock (set up in the previous one) has completed
    if (pend_k >= 0) begin
      if (pend.we) shadow[pend_k][pend.addr[3:0]] = pend.wdata;
      else begin
        check(ram_din == shadow[pend_k][pend.addr[3:0]], $sformatf("read client %0d addr %h", pend_k, pend.addr));
        nrd++;
      end
    end
    check(nxt_slot == exp_slot, "slot order");
    exp_slot = exp_slot + 3'd1;
    pend_k = -1;
    if (rq[owner(nxt_slot)].valid) begin
      pend = rq[owner(nxt_slot)]; pend_k = owner(nxt_slot); ntr[pend_k]++;
      if (pend.we) nwr++;
    end else if (nxt_slot == SLOT_LUT && rq[2].valid) begin   // spare slot 7 to the read-out
      pend = rq[2]; pend_k = 2; ntr[2]++;
      if (pend.we) nwr++;
    end
    for (int k = 0; k < 4; k++) rq[k] <= rnd(k);
  end
  // strobe and select checks in mid-cycle
  always @(negedge clk) if (rst_n) begin
    #2;
    check(ram_ce_n == (pend_k < 0), "chip select follows slot use");
    if (pend_k >= 0) begin
      check(ram_addr == pend.addr, "address on pins");
      check(ram_we_n == !pend.we, "write strobe in the low phase");
      check(ram_oe_n == pend.we, "output enable for reads");
    end
  end
  always @(posedge clk) if (rst_n) begin #2; check(ram_we_n, "write strobe high in the high phase"); end
  initial begin
    for (int k = 0; k < 4; k++) begin
      ntr[k] = 0; active[k] = 1; rq[k] = '0;
      for (int a = 0; a < 16; a++) shadow[k][a] = 8'h00;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (800) @(posedge clk);
    check(nwr > 100 && nrd > 100, $sformatf("%0d writes, %0d reads", nwr, nrd));
    // all clients always busy: PHA gets 5 of 8 clocks, the others one each
    for (int k = 0; k < 4; k++) ntr[k] = 0;
    force_busy = 1;
    repeat (80) @(posedge clk);
    check(ntr[0] == 50 && ntr[1] == 10 && ntr[2] == 10 && ntr[3] == 10,
          $sformatf("frame share %0d/%0d/%0d/%0d", ntr[0], ntr[1], ntr[2], ntr[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic force_busy = 0;
  always @(posedge clk) if (force_busy) for (int k = 0; k < 4; k++) rq[k].valid <= 1'b1;
  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
