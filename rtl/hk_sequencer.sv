// hk_sequencer: analog housekeeping sequencer.
//
// Drives the 16-input housekeeping multiplexer address (HKPA3..0) and the
// housekeeping ADC (/HKPCVST start, read through the shared ADC bus) and
// builds the housekeeping messages. The mode alternates at every CYCLECLK:
//  * cycling mode: the 2 s cycle is cut into 16 intervals of HK_INTERVAL
//    clocks (125 ms). CONV_OFFSET clocks into interval k the input selected
//    (k) is converted; right after the conversion the mux moves on to input
//    k+1, leaving it the rest of the interval to settle. Each sample goes out
//    in a message.
//  * sweep mode: the mux stays on the address set by the IDPU and a
//    conversion is made at the last STEPCLK of each SAMPLECLK interval; the
//    value is offered to the SWEA counter message of that interval
//    (sweep_valid/sweep_value, cleared at SAMPLECLK). The 16 housekeeping
//    messages per cycle continue, carrying the latest sweep sample.
// A conversion: /HKPCVST low for one clock, CONV_WAIT clocks (> 2 us), then a
// read request to the ADC bus arbiter held until rd_grant, with the data on
// rd_data in that clock. Message: {MSG_HK, mode, 3'b0, mux address},
// {4'b0, sample}, digital status word. `enable` (AFE power) gates the
// conversions. The two modes, 16 samples per cycle, the switching just after
// a conversion and the message rate are the specification's; the offsets,
// which mode comes first after reset (cycling mode is entered at the first
// CYCLECLK) and the message layout are this design's.
module hk_sequencer
  import sif_pkg::*;
#(
  parameter int unsigned HK_INTERVAL = 125_000,
  parameter int unsigned CONV_OFFSET = 1000,
  parameter int unsigned CONV_WAIT   = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        cycleclk,
  input  logic        stepclk,
  input  logic [10:0] stepcnt,
  input  logic        sampleclk,
  input  logic [3:0]  sweep_addr,
  input  logic [15:0] status,
  output logic [3:0]  hkpa,
  output logic        hkpcvst_n,
  output logic        rd_req,
  input  logic        rd_grant,
  input  logic [11:0] rd_data,
  output logic        sweep_mode,
  output logic        sweep_valid,
  output logic [11:0] sweep_value,
  output logic        out_valid,
  output logic [15:0] out_data,
  output logic        out_last,
  input  logic        out_ready
);
  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_READ} conv_e;
  conv_e       cstate;
  logic [$clog2(HK_INTERVAL)-1:0] tcount;
  logic [3:0]  wcnt;
  logic        conv_is_sweep;
  logic [11:0] sample;
  logic        sending;
  logic [1:0]  widx;
  logic [3:0]  msg_addr;
  logic [11:0] msg_data;
  logic [15:0] msg_status;
  logic        msg_mode;
  logic        start_cyc, start_sweep, start_msg;

  assign start_cyc   = !sweep_mode && (tcount == $bits(tcount)'(CONV_OFFSET)) && enable;
  assign start_sweep = sweep_mode && stepclk && (stepcnt[1:0] == 2'd3) && enable;
  assign start_msg   = sweep_mode && (tcount == $bits(tcount)'(CONV_OFFSET));
  assign rd_req      = (cstate == C_READ);

  assign out_valid = sending;
  assign out_last  = sending && (widx == 2'd2);
  always_comb begin
    unique case (widx)
      2'd0:    out_data = {MSG_HK, msg_mode, 3'b000, msg_addr};
      2'd1:    out_data = {4'b0, msg_data};
      default: out_data = msg_status;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate <= C_IDLE; tcount <= '0; wcnt <= '0; conv_is_sweep <= 1'b0; sample <= '0;
      hkpa <= '0; hkpcvst_n <= 1'b1; sweep_mode <= 1'b1; sweep_valid <= 1'b0; sweep_value <= '0;
      sending <= 1'b0; widx <= '0; msg_addr <= '0; msg_data <= '0; msg_status <= '0; msg_mode <= 1'b0;
    end else begin
      hkpcvst_n <= 1'b1;
      // interval timer, restarted by CYCLECLK
      if (cycleclk) begin
        tcount     <= '0;
        sweep_mode <= !sweep_mode;
        hkpa       <= sweep_mode ? 4'd0 : sweep_addr;   // mux for the new mode
      end else begin
        tcount <= (tcount == $bits(tcount)'(HK_INTERVAL - 1)) ? '0 : tcount + 1'b1;
        if (sweep_mode) hkpa <= sweep_addr;
      end
      if (sampleclk) sweep_valid <= 1'b0;

      // conversion
      unique case (cstate)
        C_IDLE: if (!cycleclk && (start_cyc || start_sweep)) begin
          hkpcvst_n <= 1'b0; wcnt <= '0; conv_is_sweep <= sweep_mode; cstate <= C_WAIT;
        end
        C_WAIT: begin
          wcnt <= wcnt + 4'd1;
          if (wcnt == 4'(CONV_WAIT - 1)) cstate <= C_READ;
        end
        C_READ: if (rd_grant) begin
          cstate <= C_IDLE;
          sample <= rd_data;
          if (conv_is_sweep) begin
            sweep_valid <= 1'b1; sweep_value <= rd_data;
          end else begin
            // message for this input, then move the mux on
            sending <= 1'b1; widx <= '0; msg_mode <= 1'b0;
            msg_addr <= hkpa; msg_data <= rd_data; msg_status <= status;
            if (!cycleclk) hkpa <= hkpa + 4'd1;
          end
        end
        default: cstate <= C_IDLE;
      endcase

      // sweep mode: message with the latest sweep sample
      if (start_msg && !cycleclk) begin
        sending <= 1'b1; widx <= '0; msg_mode <= 1'b1;
        msg_addr <= sweep_addr; msg_data <= sample; msg_status <= status;
      end else if (sending && out_ready) begin
        widx <= widx + 2'd1;
        if (out_last) sending <= 1'b0;
      end
    end
  end
endmodule
