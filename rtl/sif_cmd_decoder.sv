// sif_cmd_decoder: IDPU command decoder and static register file.
//
// Each command from the serial receiver is an 8-bit destination ID and a
// 16-bit data word, presented for one clock with cmd_valid. Static settings
// (MCP level, HV enables, cover, heater, thresholds, sweep housekeeping mux
// address, enables) are held in `regs`; commands that act once (cover arming
// and force, AFE power force on/off, LUT pointer/data writes, table swaps, MCP
// DAC write) produce one-clock strobes in `strb`, registered one clock after
// cmd_valid. All registers reset to 0 (HV supplies off at power on, as the
// specification requires). The ID values are this design's own (see sif_pkg).
module sif_cmd_decoder
  import sif_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic [7:0]  cmd_id,
  input  logic [15:0] cmd_data,
  output sif_regs_t   regs,
  output sif_strb_t   strb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
      strb <= '0;
    end else begin
      strb      <= '0;
      strb.data <= cmd_data;
      if (cmd_valid) begin
        unique case (cmd_id)
          CMD_MCP_DAC: begin regs.mcp_dac <= cmd_data[7:0]; strb.mcp_wr <= 1'b1; end
          CMD_ENABLES: begin
            regs.mcphv_en   <= cmd_data[EN_MCPHV];
            regs.nrhv_en    <= cmd_data[EN_NRHV];
            regs.swea_cover <= cmd_data[EN_COVER];
            regs.swea_en    <= cmd_data[EN_SWEA];
            regs.swea_tp_en <= cmd_data[EN_SWTP];
            regs.ste_tp_en  <= cmd_data[EN_STETP];
            regs.adreset    <= cmd_data[EN_ADRST];
          end
          CMD_HEATER:    regs.heater <= cmd_data[3:0];
          CMD_THRESH01:  begin regs.thresh[0] <= cmd_data[5:0]; regs.thresh[1] <= cmd_data[13:8]; end
          CMD_THRESH23:  begin regs.thresh[2] <= cmd_data[5:0]; regs.thresh[3] <= cmd_data[13:8]; end
          CMD_HK_SWEEP:  regs.hk_sweep_addr <= cmd_data[3:0];
          CMD_COVER_REQ: begin regs.cover_open_req <= cmd_data[0]; regs.cover_close_req <= cmd_data[1]; end
          CMD_COVER_ARM: strb.cover_arm <= (cmd_data == COVER_ARM_KEY);
          CMD_COVER_FRC: begin strb.cover_force_wr <= 1'b1; strb.cover_force <= cmd_data[1:0]; end
          CMD_AFE_PWR:   begin strb.afe_on <= cmd_data[0]; strb.afe_off <= cmd_data[1]; end
          CMD_SWAP:      begin strb.swap_sweep <= cmd_data[0]; strb.swap_elut <= cmd_data[1]; end
          CMD_SWEEP_PTR: strb.sweep_ptr_wr  <= 1'b1;
          CMD_SWEEP_DATA:strb.sweep_data_wr <= 1'b1;
          CMD_ELUT_PTR:  strb.elut_ptr_wr   <= 1'b1;
          CMD_ELUT_DATA: strb.elut_data_wr  <= 1'b1;
          default: ;
        endcase
      end
    end
  end
endmodule
