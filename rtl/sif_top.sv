// sif_top: the SWEA/STE Interface FPGA (SIF).
//
// The SIF sits between the SWEA electron analyser and the four STE detector
// channels on one side and the IDPU on the other, and runs everything from the
// IDPU's 1 MHz interface clock. It
//  * derives the 2 s CYCLECLK, the 1344-step STEPCLK, SAMPLECLK/SAMPLECNT and
//    the 10 s TESTCYCLECLK from the IDPU 1-second tic and time code,
//  * plays the SWEA sweep waveform from a double-buffered table in external
//    SRAM onto four 16-bit DACs, and writes the MCP and STE test-pulse DACs on
//    the same 8-bit DAC bus,
//  * counts the 16 SWEA anodes per SAMPLECLK and the 12 STE monitor rates
//    per CYCLECLK,
//  * triggers and reads the 4 STE pulse-height ADCs (with pile-up
//    rejection), bins each event through an energy look-up table and
//    increments one of 256 16-bit counters in SRAM (double-buffered, read out
//    and cleared every 2 s),
//  * runs the housekeeping multiplexer/ADC, the heater PWM, the HV enables and
//    sync clocks, both test pulsers, the STE cover actuators and the analog
//    front end power latch,
//  * decodes IDPU commands and merges all telemetry messages into one stream.
// The external SRAM is shared in a fixed 8 us frame (ram_sequencer).
//
// The serial bit-level link to the IDPU is outside this design: commands enter
// as a decoded (id, data) strobe, the time code as sec_tic/sec_value, and the
// telemetry leaves as a 16-bit word stream with valid/ready/last.
// swea_present is the board strap that enables the SWEA functions (tied low on
// the STE-U board); SWEA runs only when it and the SWEA enable command bit are
// both set. While AFEPWR is off, all PHA and housekeeping interface outputs are
// forced to 0 and no conversions are started.
module sif_top
  import sif_pkg::*;
(
  input  logic             clk,          // 1 MHz
  input  logic             rst_n,
  // IDPU side (decoded serial link)
  input  logic             sec_tic,
  input  logic [15:0]      sec_value,
  input  logic             cmd_valid,
  input  logic [7:0]       cmd_id,
  input  logic [15:0]      cmd_data,
  output logic             tlm_valid,
  output logic [15:0]      tlm_data,
  output logic             tlm_last,
  input  logic             tlm_ready,
  input  logic             swea_present,
  // DAC bus
  output logic [7:0]       dacd,
  output logic             mlbyte,
  output logic [5:0]       dac_wr_n,     // ANAL, DEFL1, DEFL2, VO, MCP, PULSE
  output logic [5:0]       dac_ld_n,
  output logic             dacclr_n,
  // SWEA
  output logic             mcphvebl,
  output logic             nrhvebl,
  output logic             swea_cover,
  output logic             heater,
  output logic             hvsync_p,
  output logic             hvsync_n,
  output logic             swea_testpulse,
  input  logic [15:0]      anode,
  // STE
  output logic [3:0][5:0]  ste_thresh,
  input  logic [3:0]       lld,
  input  logic [3:0]       uld,
  input  logic [3:0]       peak,
  input  logic [3:0]       pulsereset,
  input  logic [3:0]       busy,
  output logic [3:0]       cvst_n,
  output logic [3:0]       phard_n,
  input  logic [11:0]      phad,
  output logic             adreset,
  output logic             ste_pulse_n,
  input  logic             cover_is_open,
  input  logic             cover_is_closed,
  output logic             cover_act_open,
  output logic             cover_act_close,
  // housekeeping
  output logic [3:0]       hkpa,
  output logic             hkprd_n,
  output logic             hkpcvst_n,
  // latch-up protection
  input  logic             afeshdn,
  output logic             afepwr,
  // external SRAM
  output logic [RAM_AW-1:0] ram_addr,
  output logic [7:0]       ram_dout,
  input  logic [7:0]       ram_din,
  output logic             ram_ce_n,
  output logic             ram_oe_n,
  output logic             ram_we_n
);
  // ---------------- timing ----------------
  logic        cycleclk, stepclk, sampleclk, testcycleclk;
  logic [8:0]  samplecnt;
  logic [10:0] stepcnt;

  sif_timing u_timing (
    .clk, .rst_n, .sec_tic, .sec_value,
    .cycleclk, .stepclk, .sampleclk, .samplecnt, .stepcnt, .testcycleclk
  );

  // ---------------- commands ----------------
  sif_regs_t regs;
  sif_strb_t strb;
  logic      swea_on;

  sif_cmd_decoder u_cmd (.clk, .rst_n, .cmd_valid, .cmd_id, .cmd_data, .regs, .strb);

  assign swea_on    = regs.swea_en && swea_present;
  assign mcphvebl   = regs.mcphv_en;
  assign nrhvebl    = regs.nrhv_en;
  assign swea_cover = regs.swea_cover;
  assign ste_thresh = regs.thresh;
  assign adreset    = regs.adreset;

  afe_power u_afe (.clk, .rst_n, .force_on(strb.afe_on), .force_off(strb.afe_off), .afeshdn, .afepwr);

  heater_pwm u_heater (.clk, .rst_n, .level(regs.heater), .heater_on(heater));

  hv_sync u_hvsync (.clk, .rst_n, .hvsync_p, .hvsync_n);

  swea_test_pulser u_swtp (
    .clk, .rst_n, .enable(regs.swea_tp_en), .sampleclk, .samplecnt, .pulse(swea_testpulse)
  );

  logic [1:0] cover_force;
  ste_cover u_cover (
    .clk, .rst_n, .open_req(regs.cover_open_req), .close_req(regs.cover_close_req),
    .arm(strb.cover_arm), .force_wr(strb.cover_force_wr), .force_val(strb.cover_force),
    .is_open(cover_is_open), .is_closed(cover_is_closed),
    .act_open(cover_act_open), .act_close(cover_act_close), .force_q(cover_force)
  );

  // ---------------- DAC bus ----------------
  logic        sw_req, sw_ack, sweep_load, tp_req, tp_ack, mcp_ack, mcp_pending;
  logic [1:0]  sw_dac;
  logic [15:0] sw_value, tp_value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           mcp_pending <= 1'b0;
    else if (strb.mcp_wr) mcp_pending <= 1'b1;
    else if (mcp_ack)     mcp_pending <= 1'b0;
  end

  ste_test_pulser u_stetp (
    .clk, .rst_n, .enable(regs.ste_tp_en), .testcycleclk, .pulse_n(ste_pulse_n),
    .dac_req(tp_req), .dac_value(tp_value), .dac_ack(tp_ack), .ramp_done()
  );

  dac_bus u_dacbus (
    .clk, .rst_n,
    .sw_req, .sw_dac, .sw_value, .sw_ack, .sweep_load,
    .pulse_req(tp_req), .pulse_value(tp_value), .pulse_ack(tp_ack),
    .mcp_req(mcp_pending), .mcp_value({regs.mcp_dac, 8'h00}), .mcp_ack,
    .dacd, .mlbyte, .wr_n(dac_wr_n), .ld_n(dac_ld_n), .dacclr_n
  );

  // ---------------- SRAM ----------------
  ram_req_t   pha_req, sweep_req, rdo_req, lut_req;
  logic [2:0] nxt_slot, cur_slot;
  logic       sweep_bank, elut_bank, acc_bank, elut_swap_pending;

  ram_sequencer u_ramseq (
    .clk, .rst_n, .pha_req, .sweep_req, .rdo_req, .lut_req,
    .nxt_slot, .cur_slot, .cur_valid(),
    .ram_addr, .ram_dout, .ram_ce_n, .ram_oe_n, .ram_we_n
  );

  dac_sequencer u_dacseq (
    .clk, .rst_n, .enable(swea_on), .stepclk, .cycleclk, .stepcnt,
    .swap_req(strb.swap_sweep), .bank(sweep_bank),
    .nxt_slot, .cur_slot, .ram_din, .req(sweep_req),
    .sw_req, .sw_dac, .sw_value, .sw_ack, .sweep_load
  );

  lut_loader u_lut (
    .clk, .rst_n,
    .sweep_ptr_wr(strb.sweep_ptr_wr), .sweep_data_wr(strb.sweep_data_wr),
    .elut_ptr_wr(strb.elut_ptr_wr), .elut_data_wr(strb.elut_data_wr), .data(strb.data),
    .sweep_bank, .elut_bank, .nxt_slot, .req(lut_req), .busy()
  );

  // energy LUT swap at CYCLECLK on request; accumulator banks swap every CYCLECLK
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elut_bank <= 1'b0; elut_swap_pending <= 1'b0; acc_bank <= 1'b0;
    end else begin
      if (cycleclk) begin
        acc_bank <= !acc_bank;
        if (elut_swap_pending) begin elut_bank <= !elut_bank; elut_swap_pending <= 1'b0; end
      end
      if (strb.swap_elut) elut_swap_pending <= 1'b1;
    end
  end

  // ---------------- STE PHA ----------------
  logic [4:0]  adc_req, adc_grant, adc_rd_n;
  logic        adc_valid;
  logic [2:0]  adc_src;
  logic [11:0] adc_data;
  logic [3:0]  cvst_raw;

  for (genvar c = 0; c < 4; c++) begin : g_pha
    pha_channel u_ch (
      .clk, .rst_n, .enable(afepwr),
      .lld(lld[c]), .uld(uld[c]), .peak(peak[c]), .pulsereset(pulsereset[c]), .busy(busy[c]),
      .cvst_n(cvst_raw[c]), .rd_req(adc_req[c]), .rd_grant(adc_grant[c]), .started()
    );
  end

  adc_bus_arbiter #(.N(5)) u_adcarb (
    .clk, .rst_n, .req(adc_req), .grant(adc_grant), .rd_n(adc_rd_n), .phad,
    .out_valid(adc_valid), .out_src(adc_src), .out_data(adc_data)
  );

  // AFEPWR off: PHA and housekeeping interface signals held at 0
  assign cvst_n  = afepwr ? cvst_raw      : 4'b0;
  assign phard_n = afepwr ? adc_rd_n[3:0] : 4'b0;

  pha_accumulator u_acc (
    .clk, .rst_n,
    .evt_valid(adc_valid && adc_src != 3'd4), .evt_det(adc_src[1:0]), .evt_energy(adc_data),
    .elut_bank, .acc_bank, .nxt_slot, .ram_din, .req(pha_req), .dropped(), .done()
  );

  // ---------------- telemetry sources ----------------
  logic [3:0]       src_valid, src_last, src_ready;
  logic [3:0][15:0] src_data;

  ste_accum_readout u_rdo (
    .clk, .rst_n, .cycleclk, .acc_bank(cycleclk ? !acc_bank : acc_bank), .nxt_slot, .spare_slot(!lut_req.valid), .cur_slot, .ram_din, .req(rdo_req),
    .out_valid(src_valid[1]), .out_data(src_data[1]), .out_last(src_last[1]),
    .out_ready(src_ready[1]), .busy()
  );

  ste_rate_counters u_rates (
    .clk, .rst_n, .lld, .uld, .pulsereset, .cycleclk,
    .out_valid(src_valid[2]), .out_data(src_data[2]), .out_last(src_last[2]),
    .out_ready(src_ready[2])
  );

  logic        hk_sweep_mode, hk_sweep_valid, hk_cvst_raw;
  logic [11:0] hk_sweep_value;
  logic [3:0]  hkpa_raw;
  logic [15:0] status;

  assign status = {swea_cover, mcphvebl, nrhvebl, swea_on,
                   cover_is_open, cover_is_closed, cover_act_open, cover_act_close,
                   cover_force, afepwr, afeshdn,
                   hk_sweep_mode, sweep_bank, elut_bank, acc_bank};

  hk_sequencer u_hk (
    .clk, .rst_n, .enable(afepwr), .cycleclk, .stepclk, .stepcnt, .sampleclk,
    .sweep_addr(regs.hk_sweep_addr), .status,
    .hkpa(hkpa_raw), .hkpcvst_n(hk_cvst_raw), .rd_req(adc_req[4]), .rd_grant(adc_grant[4]),
    .rd_data(adc_data), .sweep_mode(hk_sweep_mode), .sweep_valid(hk_sweep_valid),
    .sweep_value(hk_sweep_value),
    .out_valid(src_valid[3]), .out_data(src_data[3]), .out_last(src_last[3]),
    .out_ready(src_ready[3])
  );

  assign hkpa      = afepwr ? hkpa_raw    : 4'b0;
  assign hkpcvst_n = afepwr ? hk_cvst_raw : 1'b0;
  assign hkprd_n   = afepwr ? adc_rd_n[4] : 1'b0;

  swea_counters u_swea (
    .clk, .rst_n, .enable(swea_on), .anode, .sampleclk, .samplecnt,
    .hk_valid(hk_sweep_valid), .hk_value(hk_sweep_value),
    .out_valid(src_valid[0]), .out_data(src_data[0]), .out_last(src_last[0]),
    .out_ready(src_ready[0])
  );

  tlm_arbiter #(.N_SRC(4)) u_tlm (
    .clk, .rst_n, .src_valid, .src_data, .src_last, .src_ready,
    .tlm_valid, .tlm_data, .tlm_last, .tlm_ready
  );
endmodule
