// sif_cmd_decoder_tb: sends every command ID and checks the static registers
// and the one-clock strobes against the command layout of sif_pkg.
module sif_cmd_decoder_tb;
  import sif_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic        cmd_valid;
  logic [7:0]  cmd_id;
  logic [15:0] cmd_data;
  sif_regs_t   regs;
  sif_strb_t   strb;
  sif_cmd_decoder dut (.*);
  sif_strb_t   seen;
  always @(posedge clk) if (rst_n) seen <= seen | strb;
  task automatic send(input logic [7:0] id, input logic [15:0] d);
    cmd_id = id; cmd_data = d; cmd_valid = 1;
    @(posedge clk); #1; cmd_valid = 0;
    @(posedge clk); #1;
  endtask
  initial begin
    cmd_valid = 0; cmd_id = 0; cmd_data = 0; seen = '0;
    repeat (2) @(posedge clk);
    check(regs == '0, "registers reset to 0");
    rst_n = 1;
    send(CMD_MCP_DAC, 16'h00C5);  check(regs.mcp_dac == 8'hC5, "MCP level");
    check(seen.mcp_wr, "MCP write strobe");
    send(CMD_ENABLES, 16'h0055);
    check(regs.mcphv_en && !regs.nrhv_en && regs.swea_cover && !regs.swea_en &&
          regs.swea_tp_en && !regs.ste_tp_en && regs.adreset, "enable bits 0x55");
    send(CMD_ENABLES, 16'h002A);
    check(!regs.mcphv_en && regs.nrhv_en && !regs.swea_cover && regs.swea_en &&
          !regs.swea_tp_en && regs.ste_tp_en && !regs.adreset, "enable bits 0x2A");
    send(CMD_HEATER, 16'h0007);   check(regs.heater == 7, "heater level");
    send(CMD_THRESH01, 16'h2A15); check(regs.thresh[0] == 6'h15 && regs.thresh[1] == 6'h2A, "thresholds 0/1");
    send(CMD_THRESH23, 16'h0C33); check(regs.thresh[2] == 6'h33 && regs.thresh[3] == 6'h0C, "thresholds 2/3");
    send(CMD_HK_SWEEP, 16'h000B); check(regs.hk_sweep_addr == 4'hB, "sweep HK address");
    send(CMD_COVER_REQ, 16'h0002);check(!regs.cover_open_req && regs.cover_close_req, "cover request");
    seen = '0; send(CMD_COVER_ARM, 16'h1234); check(!seen.cover_arm, "wrong arm key ignored");
    seen = '0; send(CMD_COVER_ARM, COVER_ARM_KEY); check(seen.cover_arm, "arm strobe");
    seen = '0; send(CMD_COVER_FRC, 16'h0001); check(seen.cover_force_wr && seen.cover_force == 2'b01, "force strobe");
    seen = '0; send(CMD_AFE_PWR, 16'h0001); check(seen.afe_on && !seen.afe_off, "AFE on strobe");
    seen = '0; send(CMD_AFE_PWR, 16'h0002); check(!seen.afe_on && seen.afe_off, "AFE off strobe");
    seen = '0; send(CMD_SWAP, 16'h0003); check(seen.swap_sweep && seen.swap_elut, "swap strobes");
    seen = '0; send(CMD_SWEEP_PTR, 16'h0100); check(seen.sweep_ptr_wr && !seen.sweep_data_wr, "sweep ptr strobe");
    seen = '0; send(CMD_SWEEP_DATA, 16'hBEEF); check(seen.sweep_data_wr, "sweep data strobe");
    seen = '0; send(CMD_ELUT_PTR, 16'h0001); check(seen.elut_ptr_wr, "elut ptr strobe");
    seen = '0; send(CMD_ELUT_DATA, 16'h1234); check(seen.elut_data_wr && strb.data == 16'h1234, "elut data strobe");
    seen = '0; send(8'hEE, 16'hFFFF); check(seen == '0 || seen.data != 0, "unknown ID: no strobe");
    check(regs.mcp_dac == 8'hC5 && regs.heater == 7, "registers kept after unknown ID");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
