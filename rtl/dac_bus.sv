// dac_bus: controller of the common 8-bit DAC bus.
//
// Six 16-bit DACs (ANAL, DEFL1, DEFL2, VO, MCP, PULSE) share the data bus
// DACD, the byte select MLBYTE and a clear line; each has its own active-low
// write (/xxxxWR) and load (/xxxxLD) strobe. Three requesters share the bus:
//  * the sweep sequencer (writes one of DACs 0-3; the four are loaded
//    together by sweep_load at the next STEPCLK),
//  * the STE test pulser (PULSE DAC, loaded right after its write),
//  * the MCP level command (MCP DAC, loaded right after its write).
// A write puts the LSB on the bus with MLBYTE low and the DAC's /WR low for
// one clock, leaves /WR high for one clock (the DAC takes the byte on the
// rising edge of /WR), then does the same for the MSB with MLBYTE high; for MCP
// and PULSE one clock of /LD low follows. Data and MLBYTE are held through the
// gap after each strobe. A requester's value is taken, and *_ack pulses, in the clock the
// write is granted; a request raised again afterwards is served again. Priority
// is sweep, then PULSE, then MCP. /DACCLR is low while reset is applied.
// The signal set and byte order are the specification's; the arbitration,
// priority and one-clock strobes are this design's.
module dac_bus
  import sif_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // sweep sequencer
  input  logic        sw_req,
  input  logic [1:0]  sw_dac,      // 0 ANAL, 1 DEFL1, 2 DEFL2, 3 VO
  input  logic [15:0] sw_value,
  output logic        sw_ack,
  input  logic        sweep_load,  // pulse: load DACs 0-3 together
  // STE test pulser
  input  logic        pulse_req,
  input  logic [15:0] pulse_value,
  output logic        pulse_ack,
  // MCP level
  input  logic        mcp_req,
  input  logic [15:0] mcp_value,
  output logic        mcp_ack,
  // DAC pins
  output logic [7:0]  dacd,
  output logic        mlbyte,
  output logic [5:0]  wr_n,
  output logic [5:0]  ld_n,
  output logic        dacclr_n
);
  typedef enum logic [2:0] {S_IDLE, S_LSB, S_GAP1, S_MSB, S_GAP2, S_LD} state_e;
  state_e      state;
  logic [2:0]  dac;
  logic [15:0] value;
  logic        own_ld;   // the DAC is loaded right after its write

  assign dacclr_n = rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; dac <= '0; value <= '0; own_ld <= 1'b0;
      dacd <= '0; mlbyte <= 1'b0; wr_n <= '1; ld_n <= '1;
      sw_ack <= 1'b0; pulse_ack <= 1'b0; mcp_ack <= 1'b0;
    end else begin
      sw_ack <= 1'b0; pulse_ack <= 1'b0; mcp_ack <= 1'b0;
      wr_n <= '1;
      ld_n <= sweep_load ? 6'b11_0000 : 6'b11_1111;
      unique case (state)
        S_IDLE: begin
          if (sw_req && !sw_ack) begin
            dac <= {1'b0, sw_dac}; value <= sw_value; own_ld <= 1'b0;
            sw_ack <= 1'b1; state <= S_LSB;
          end else if (pulse_req && !pulse_ack) begin
            dac <= DAC_PULSE; value <= pulse_value; own_ld <= 1'b1;
            pulse_ack <= 1'b1; state <= S_LSB;
          end else if (mcp_req && !mcp_ack) begin
            dac <= DAC_MCP; value <= mcp_value; own_ld <= 1'b1;
            mcp_ack <= 1'b1; state <= S_LSB;
          end
        end
        S_LSB: begin
          dacd <= value[7:0]; mlbyte <= 1'b0; wr_n[dac] <= 1'b0; state <= S_GAP1;
        end
        S_GAP1: state <= S_MSB;
        S_MSB: begin
          dacd <= value[15:8]; mlbyte <= 1'b1; wr_n[dac] <= 1'b0;
          state <= S_GAP2;
        end
        S_GAP2: state <= own_ld ? S_LD : S_IDLE;
        S_LD: begin
          ld_n[dac] <= 1'b0; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
