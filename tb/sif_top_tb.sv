// sif_top_tb: end-to-end test of the SIF at full size (1 MHz clock, 2 s
// cycles, 1344 steps, 256 accumulators, 16K-entry energy LUTs).
//
// Around the FPGA: the SRAM model, a model of the six DACs, four PHA
// front-end/ADC models and the housekeeping ADC on the shared data bus, cover
// sense switches, and an IDPU model that sends the 1-second tics and commands
// and collects the telemetry. The IDPU loads a full sweep table and a full
// energy LUT into the idle banks with pointer/data commands, swaps both at
// the next CYCLECLK, and then the test follows three 2 s cycles:
//  * sweep DAC outputs compared with the loaded table at every step,
//  * PHA events on all four channels; the accumulator message of the next
//    cycle must hold exactly the expected bin counts; the rate counter message
//    the number of LLD/ULD/PULSERESET pulses sent,
//  * SWEA anode pulse trains; the SWEA messages must carry the counts, the
//    SAMPLECNT and (on sweep-housekeeping cycles) the housekeeping word,
//  * 16 housekeeping messages per cycle, alternating cycling / sweep mode,
//  * an event burst on all four channels that overflows the PHA FIFO: fewer
//    events counted than converted, all in the burst bins,
//  * the STE test pulser ramp from TESTCYCLECLK (DAC = pulse index),
//  * MCP DAC, heater PWM, HV sync, both cover control paths (request and
//    armed force), SWEA disable, and an AFESHDN trip that zeroes the PHA and
//    housekeeping outputs.
// Each mechanism is counted and must have happened at least once. The test
// looks only at the top's ports; the expected CYCLECLK/STEPCLK/SAMPLECLK
// times are worked out here from the tics it sends.
module sif_top_tb;
  import sif_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  // ---------------- DUT ----------------
  logic sec_tic, cmd_valid, tlm_valid, tlm_last, tlm_ready, swea_present;
  logic [15:0] sec_value, cmd_data, tlm_data;
  logic [7:0]  cmd_id, dacd;
  logic mlbyte, dacclr_n, mcphvebl, nrhvebl, swea_cover, heater, hvsync_p, hvsync_n, swea_testpulse;
  logic [5:0] dac_wr_n, dac_ld_n;
  logic [15:0] anode;
  logic [3:0][5:0] ste_thresh;
  logic [3:0] lld, uld, peak, pulsereset, busy, cvst_n, phard_n;
  logic [11:0] phad;
  logic adreset, ste_pulse_n, cover_is_open, cover_is_closed, cover_act_open, cover_act_close;
  logic [3:0] hkpa;
  logic hkprd_n, hkpcvst_n, afeshdn, afepwr;
  logic [RAM_AW-1:0] ram_addr;
  logic [7:0] ram_dout, ram_din;
  logic ram_ce_n, ram_oe_n, ram_we_n;
  sif_top dut (.*);
  sram_model mem (.addr(ram_addr), .din(ram_dout), .dout(ram_din), .ce_n(ram_ce_n), .oe_n(ram_oe_n), .we_n(ram_we_n));

  // ---------------- mechanism counters ----------------
  int m_sweep_load = 0, m_sweep_ok = 0, m_mcp = 0, m_events = 0, m_drop = 0, m_acc_msg = 0, m_swea_hk = 0,
      m_swea = 0, m_rate_msg = 0, m_hk_cyc = 0, m_hk_sweep = 0, m_tp_pulse = 0, m_swtp = 0, m_cover = 0,
      m_force = 0, m_afe_trip = 0, m_contention = 0, m_bank_swap = 0, m_heater = 0, m_hvsync = 0;

  // ---------------- DAC model ----------------
  logic [15:0] inreg [6], outreg [6];
  logic [5:0] wr_q; logic [7:0] d_q; logic ml_q;
  always @(posedge clk) begin
    wr_q <= dac_wr_n; d_q <= dacd; ml_q <= mlbyte;
    for (int i = 0; i < 6; i++) begin
      if (dac_wr_n[i] && !wr_q[i] && rst_n) begin if (ml_q) inreg[i][15:8] = d_q; else inreg[i][7:0] = d_q; end
      if (!dac_ld_n[i]) outreg[i] = inreg[i];
      if (!dacclr_n) begin inreg[i] = 0; outreg[i] = 0; end
    end
    if (!dac_ld_n[0]) m_sweep_load++;
  end
  function automatic logic [15:0] tv(input int s, input int d);
    return 16'((d << 14) | (s << 2) | d);
  endfunction

  // ---------------- PHA front end + ADC models, housekeeping ADC ----------------
  logic [11:0] pha_val [4], pha_next [4], hk_val;
  int n_conv = 0;             // conversions started by the PHA channels
  always_comb begin
    phad = 12'h000;
    for (int ch = 0; ch < 4; ch++) if (!phard_n[ch] && afepwr) phad = pha_val[ch];
    if (!hkprd_n && afepwr) phad = hk_val;
  end
  for (genvar ch = 0; ch < 4; ch++) begin : g_adc
    always @(negedge cvst_n[ch]) if (afepwr) begin
      n_conv++;
      pha_val[ch] = pha_next[ch];
      busy[ch] <= #1 1'b1;
      busy[ch] <= #20 1'b0;
    end
  end
  always @(negedge hkpcvst_n) if (afepwr) hk_val = 12'h100 + 12'h11 * hkpa;

  int exp_bin [2][256];       // expected counts per accumulation cycle parity
  int exp_lld [4], exp_uld [4], exp_pr [4];   // pulses sent in this cycle
  int cyc_lld [4], cyc_uld [4], cyc_pr [4];   // ... in the cycle just ended
  int cyc_idx = 0;            // number of CYCLECLKs seen
  // one PHA event on channel ch; the event is expected to be counted (no ULD / PR)
  task automatic pha_event(input int ch, input int e, input bit uldh, input bit prh);
    @(posedge clk); #1;
    pha_next[ch] = 12'(e);
    lld[ch] = 1; uld[ch] = uldh; pulsereset[ch] = prh;
    #22; peak[ch] = 1; #13; peak[ch] = 0;
    #25; lld[ch] = 0; uld[ch] = 0; pulsereset[ch] = 0;
  endtask
  function automatic int lut_bin(input int ch, input int e);
    return (ch * 64 + e / 64) & 255;
  endfunction

  // ---------------- IDPU model ----------------
  task automatic send(input logic [7:0] id, input logic [15:0] d);
    @(posedge clk); #1;
    cmd_id = id; cmd_data = d; cmd_valid = 1;
    @(posedge clk); #1; cmd_valid = 0;
    repeat (28) @(posedge clk);
  endtask
  longint c = 0;
  always @(posedge clk) c <= c + 1;
  // 1-second tics: first at clock 1 000 000 with seconds value 8
  initial begin
    sec_tic = 0; sec_value = 0;
    for (int s = 8; s < 30; s++) begin
      while (c < longint'(s - 7) * 1_000_000) @(posedge clk);
      #1; sec_tic = 1; sec_value = 16'(s);
      @(posedge clk); #1; sec_tic = 0;
    end
  end
  // Reference timing, worked out from the tics: CYCLECLK one clock after an
  // even tic, STEPCLK every 1450 clocks for 1344 steps, SAMPLECLK every 4th.
  logic cyc_t = 0, step_t = 0, samp_t = 0, tcyc_t = 0;
  int   stepcnt_t = 1344, tick_t = 0;
  always @(posedge clk) begin
    cyc_t  <= rst_n && sec_tic && !sec_value[0];
    tcyc_t <= rst_n && sec_tic && (sec_value % 10 == 0);
    step_t <= 0; samp_t <= 0;
    if (rst_n && sec_tic && !sec_value[0]) begin
      stepcnt_t <= 0; tick_t <= 0; step_t <= 1; samp_t <= 1;
    end else if (stepcnt_t < 1344) begin
      if (tick_t == 1449) begin
        tick_t <= 0; stepcnt_t <= stepcnt_t + 1;
        if (stepcnt_t + 1 < 1344) begin step_t <= 1; samp_t <= ((stepcnt_t + 1) % 4 == 0); end
      end else tick_t <= tick_t + 1;
    end
  end
  always @(posedge clk) if (cyc_t) begin
    cyc_idx <= cyc_idx + 1;
    for (int d = 0; d < 4; d++) begin
      cyc_lld[d] = exp_lld[d]; cyc_uld[d] = exp_uld[d]; cyc_pr[d] = exp_pr[d];
      exp_lld[d] = 0; exp_uld[d] = 0; exp_pr[d] = 0;
    end end

  // ---------------- telemetry collector ----------------
  logic [15:0] msg [$];
  longint t_first = 0, t_samp = 0;   // first word of this message; last SAMPLECLK
  int sc_expect = 0;
  always @(posedge clk) begin
    if (samp_t) t_samp = c;
    if (rst_n && tlm_valid && tlm_ready) begin
      if (msg.size() == 0) t_first = c;
      msg.push_back(tlm_data);
      if (tlm_last) begin
        check_message();
        msg.delete();
      end
    end
  end
  int acc_cycle_checked = 0;
  int burst_expect = -1;      // events counted in the burst cycle (sent - dropped)
  task automatic check_message();
    logic [7:0] id;
    id = msg[0][15:8];
    case (id)
      MSG_STE_ACC: begin
        int par;
        m_acc_msg++;
        check(msg.size() == 257, "accumulator message length");
        // read-out at CYCLECLK k covers events of cycle k-1
        par = (cyc_idx - 1) % 2;
        if (cyc_idx >= 2 && cyc_idx <= 3) begin
          for (int i = 0; i < 256; i++)
            check(msg[i + 1] == 16'(exp_bin[par][i]), $sformatf("cycle %0d bin %0d = %0d, want %0d", cyc_idx - 1, i, msg[i + 1], exp_bin[par][i]));
          acc_cycle_checked++;
        end
        if (cyc_idx == 4) begin
          int sum;
          sum = 0;
          for (int i = 0; i < 256; i++) sum += msg[i + 1];
          // one event per 8-clock frame at most: the burst must overflow the
          // FIFO, and all counted events are in the four burst bins
          check(sum < burst_expect && sum >= 90, $sformatf("burst cycle: %0d counted of %0d converted", sum, burst_expect));
          for (int q = 0; q < 4; q++) check(msg[1 + lut_bin(q, 4000)] > 0, "burst bin");
          m_events += sum; m_drop = burst_expect - sum;
        end
        for (int i = 0; i < 256; i++) exp_bin[par][i] = 0;
      end
      MSG_STE_RATE: begin
        m_rate_msg++;
        check(msg.size() == 13, "rate message length");
        if (cyc_idx >= 2 && cyc_idx <= 3)
          for (int d = 0; d < 4; d++) begin
            check(msg[1 + 3 * d] == 16'(cyc_lld[d]), $sformatf("LLD rate det %0d: %0d want %0d", d, msg[1 + 3 * d], cyc_lld[d]));
            check(msg[2 + 3 * d] == 16'(cyc_uld[d]), $sformatf("ULD rate det %0d", d));
            check(msg[3 + 3 * d] == 16'(cyc_pr[d]),  $sformatf("PR rate det %0d", d));
          end
      end
      MSG_SWEA, MSG_SWEA_HK: begin
        if (id == MSG_SWEA_HK) begin
          m_swea_hk++;
          check(msg.size() == 19 && msg[18] == 16'h100 + 16'h11 * 3, "sweep housekeeping word");
        end else begin
          m_swea++;
          check(msg.size() == 18, "SWEA message length");
        end
        // the first message closes the idle interval before the first cycle
        // a SWEA message that waited for another source's message
        if (t_first - t_samp > 40) m_contention++;
        if (m_swea + m_swea_hk > 1) check(msg[1] == 16'(sc_expect), $sformatf("SAMPLECNT %0d want %0d", msg[1], sc_expect));
        sc_expect = (msg[1] == 335 || m_swea + m_swea_hk == 1) ? 0 : msg[1] + 1;
        // anode a pulses every 20+4a clocks: 5800-clock interval (tail intervals are longer)
        if (msg[1] != 335 && swea_chk)
          for (int a = 0; a < 16; a++) begin
            int n;
            n = 5800 / (20 + 4 * a);
            check(msg[2 + a] >= 16'(n - 1) && msg[2 + a] <= 16'(n + 1), $sformatf("anode %0d count %0d want ~%0d", a, msg[2 + a], n));
          end
      end
      MSG_HK: begin
        check(msg.size() == 3, "housekeeping message length");
        if (msg[0][7]) begin
          m_hk_sweep++;
          check(msg[0][3:0] == 4'd3, "sweep housekeeping address");
        end else begin
          m_hk_cyc++;
          // status bits 2:1 are the sweep and energy LUT banks: 1 after the swap
          if (c > 1_000_100 && c < 6_400_000) begin
            check(msg[2][2:1] == 2'b11, "both LUT banks swapped at CYCLECLK");
            if (msg[2][2:1] == 2'b11) m_bank_swap++;
          end
          check(msg[1] == 16'h100 + 16'h11 * msg[0][3:0], $sformatf("housekeeping input %0d sample %h", msg[0][3:0], msg[1]));
        end
      end
      default: check(0, $sformatf("unknown message ID %h", id));
    endcase
  endtask

  // ---------------- anode pulse trains ----------------
  logic swea_pulsing = 0, swea_chk = 0;   // swea_chk: a whole interval has been pulsed
  logic swea_chk1 = 0;
  always @(posedge clk) if (samp_t) begin swea_chk1 <= swea_pulsing; swea_chk <= swea_chk1; end
  for (genvar a = 0; a < 16; a++) begin : g_anode
    initial begin
      anode[a] = 0;
      forever begin
        @(posedge clk);
        if (swea_pulsing && (c % (20 + 4 * a) == 0)) begin #1; anode[a] = 1; repeat (2) @(posedge clk); #1; anode[a] = 0; end
      end
    end
  end

  // ---------------- sweep check at every step ----------------
  int active_tbl = 0;   // 1 once the loaded table is in use
  always @(posedge clk) if (step_t && active_tbl) begin
    // the values loaded at this STEPCLK appear in the DAC model two clocks later
    fork begin
      int s;
      s = stepcnt_t;
      repeat (2) @(posedge clk); #1;
      for (int d = 0; d < 4; d++) check(outreg[d] == tv(s, d), $sformatf("step %0d DAC %0d = %h want %h", s, d, outreg[d], tv(s, d)));
      m_sweep_ok++;
    end join_none
  end

  // ---------------- STE test pulser ----------------
  int tp_index = 0;
  longint t_last_tp = 0;
  always @(posedge clk) if (tcyc_t) tp_index = 0;   // ramp restarts at TESTCYCLECLK
  always @(negedge ste_pulse_n) if (rst_n) begin
    t_last_tp = c;
    #1;
    check(outreg[5] == 16'(tp_index), $sformatf("PULSE DAC %0d during pulse %0d", outreg[5], tp_index));
    tp_index++; m_tp_pulse++;
  end
  always @(posedge clk) begin
    if (swea_testpulse) m_swtp++;
    if (heater) m_heater++;
    if (rst_n) begin if (hvsync_p != hvsync_n) m_hvsync++; else check(0, "HV sync not complementary"); end
  end

  // ---------------- main sequence ----------------
  initial begin
    int nsent, ch, e;
    cmd_valid = 0; cmd_id = 0; cmd_data = 0; tlm_ready = 1; swea_present = 1;
    lld = 0; uld = 0; peak = 0; pulsereset = 0; busy = 0; afeshdn = 0;
    cover_is_open = 0; cover_is_closed = 1;
    for (int i = 0; i < 4; i++) begin pha_next[i] = 0; pha_val[i] = 0; exp_lld[i] = 0; exp_uld[i] = 0; exp_pr[i] = 0; end
    for (int i = 0; i < 256; i++) begin exp_bin[0][i] = 0; exp_bin[1][i] = 0; end
    for (int i = 0; i < 6; i++) begin inreg[i] = 0; outreg[i] = 0; end
    hk_val = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    check(!mcphvebl && !nrhvebl && !afepwr, "power-on state");
    send(CMD_AFE_PWR, 16'h0001);
    check(afepwr, "AFE power on");
    send(CMD_ENABLES, 16'h003B);   // MCP HV, NR HV, SWEA on, SWEA pulser, STE pulser
    send(CMD_MCP_DAC, 16'h0080);
    send(CMD_HEATER, 16'h0005);
    send(CMD_THRESH01, 16'h0A05); send(CMD_THRESH23, 16'h140F);
    send(CMD_HK_SWEEP, 16'h0003);
    check(outreg[4] == 16'h8000, "MCP DAC set"); if (outreg[4] == 16'h8000) m_mcp++;
    check(mcphvebl && nrhvebl && ste_thresh[3] == 6'h14 && ste_thresh[0] == 6'h05, "static controls");
    // sweep table into bank 1, energy LUT into bank 1
    send(CMD_SWEEP_PTR, 16'h0000);
    for (int s = 0; s < 1344; s++) for (int d = 0; d < 4; d++) send(CMD_SWEEP_DATA, tv(s, d));
    send(CMD_ELUT_PTR, 16'h0000);
    for (int w = 0; w < 8192; w++) begin
      int i0, i1;
      i0 = 2 * w; i1 = 2 * w + 1;
      send(CMD_ELUT_DATA, {8'(lut_bin(i1 / 4096, i1 % 4096)), 8'(lut_bin(i0 / 4096, i0 % 4096))});
    end
    check(c < 1_000_000, "tables loaded before the first cycle");
    send(CMD_SWAP, 16'h0003);
    // cover: open request, switch made after 2 ms
    send(CMD_COVER_REQ, 16'h0001);
    check(cover_act_open && !cover_act_close, "cover open actuator on");
    while (c < 1_000_010) @(posedge clk);
    // ---- cycle 1 (first CYCLECLK): tables swapped ----
    check(cyc_idx == 1, "first CYCLECLK");
    active_tbl = 1;
    cover_is_closed = 0; repeat (1000) @(posedge clk); cover_is_open = 1; repeat (3) @(posedge clk); #1;
    check(!cover_act_open, "cover actuator off at the open switch"); m_cover++;
    swea_pulsing = 1;
    // PHA events, spread over the cycle, away from its ends
    while (c < 1_050_000) @(posedge clk);
    for (int k = 0; k < 400; k++) begin
      ch = k % 4; e = $urandom_range(0, 4095);
      fork pha_event(ch, e, 0, 0); join_none
      exp_bin[cyc_idx % 2][lut_bin(ch, e)]++; exp_lld[ch]++;
      repeat ($urandom_range(30, 60)) @(posedge clk);
      if (k % 50 == 7) begin       // rejected events: ULD or PULSERESET
        fork pha_event(ch, 100, 1, 0); join_none
        exp_lld[ch]++; exp_uld[ch]++;
        repeat (40) @(posedge clk);
        fork pha_event(ch, 100, 0, 1); join_none
        exp_lld[ch]++; exp_pr[ch]++;
        repeat (40) @(posedge clk);
      end
    end
    // ---- cycle 2: armed force of the close actuator ----
    while (c < 3_000_100) @(posedge clk);
    send(CMD_COVER_FRC, 16'h0002);
    check(!cover_act_close, "force refused without arming");
    send(CMD_COVER_ARM, COVER_ARM_KEY); send(CMD_COVER_FRC, 16'h0002);
    check(cover_act_close, "armed force on"); if (cover_act_close) m_force++;
    send(CMD_COVER_FRC, 16'h0000);
    check(!cover_act_close, "force cleared");
    // events in cycle 2 for the second accumulator check
    for (int k = 0; k < 200; k++) begin
      ch = $urandom_range(0, 3); e = $urandom_range(0, 4095);
      fork pha_event(ch, e, 0, 0); join_none
      exp_bin[cyc_idx % 2][lut_bin(ch, e)]++; exp_lld[ch]++;
      repeat ($urandom_range(40, 80)) @(posedge clk);
    end
    // ---- cycle 3: burst on all channels to overflow the FIFO ----
    while (c < 5_000_100) @(posedge clk);
    nsent = 0; n_conv = 0;
    for (int k = 0; k < 100; k++) begin
      for (int q = 0; q < 4; q++) fork pha_event(q, 4000, 0, 0); join_none
      nsent += 4;
      repeat (8) @(posedge clk);
    end
    repeat (2000) @(posedge clk);
    // events missed while a channel is still busy are dead time, not drops
    check(n_conv > 0 && n_conv < nsent, $sformatf("%0d of %0d burst events converted", n_conv, nsent));
    burst_expect = n_conv;
    // ---- SWEA disable, then AFE trip ----
    while (c < 6_500_000) @(posedge clk);
    swea_pulsing = 0; active_tbl = 0;
    send(CMD_ENABLES, 16'h0033);   // SWEA off
    begin
      int l0, n0;
      l0 = m_sweep_load; n0 = m_swea + m_swea_hk;
      repeat (20000) @(posedge clk);
      check(m_sweep_load == l0 && m_swea + m_swea_hk == n0, "SWEA disabled: no sweep, no counter messages");
    end
    afeshdn = 1; @(posedge clk); @(posedge clk); #1; afeshdn = 0;
    check(!afepwr, "AFESHDN turns AFE power off"); if (!afepwr) m_afe_trip++;
    check(cvst_n == 0 && phard_n == 0 && hkpa == 0 && !hkprd_n && !hkpcvst_n, "PHA/HK outputs zero with AFE off");
    // let the STE pulser ramp finish (started at second 10, about 6.55 s)
    while (c < 9_700_000) @(posedge clk);
    check(c - t_last_tp > 100_000 && outreg[5] == 0, "pulser ramp stopped and DAC back to 0");
    check(tp_index == 65536, $sformatf("%0d pulses in the ramp", tp_index));
    // ---- mechanism summary ----
    $display("mechanisms: burst_counted=%0d sweep_load=%0d sweep_checked=%0d swap=%0d mcp=%0d acc_msg=%0d acc_checked=%0d drops=%0d swea_hk=%0d swea=%0d rate=%0d hk_cyc=%0d hk_sweep=%0d tp_pulses=%0d swea_tp=%0d cover=%0d force=%0d afe_trip=%0d contention=%0d heater=%0d hvsync=%0d",
      m_events, m_sweep_load, m_sweep_ok, m_bank_swap, m_mcp, m_acc_msg, acc_cycle_checked, m_drop, m_swea_hk, m_swea, m_rate_msg,
      m_hk_cyc, m_hk_sweep, m_tp_pulse, m_swtp, m_cover, m_force, m_afe_trip, m_contention, m_heater, m_hvsync);
    check(m_sweep_load > 0, "sweep loads"); check(m_sweep_ok > 2000, "sweep steps checked");
    check(m_bank_swap > 0, "table swap"); check(m_mcp > 0, "MCP write"); check(m_acc_msg >= 3, "accumulator read-outs");
    check(acc_cycle_checked == 2, "accumulator contents checked");
    check(m_drop > 0, "FIFO overflow"); check(m_events > 0, "burst events counted"); check(m_swea_hk > 0, "SWEA messages with sweep housekeeping");
    check(m_swea > 0, "SWEA messages without housekeeping"); check(m_rate_msg >= 3, "rate messages");
    check(m_hk_cyc > 0, "cycling housekeeping"); check(m_hk_sweep > 0, "sweep housekeeping");
    check(m_tp_pulse > 0, "STE test pulses"); check(m_swtp > 0, "SWEA test pulses"); check(m_cover > 0, "cover request");
    check(m_force > 0, "cover force"); check(m_afe_trip > 0, "AFE trip"); check(m_contention > 0, "telemetry contention");
    check(m_heater > 0, "heater PWM"); check(m_hvsync > 0, "HV sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
