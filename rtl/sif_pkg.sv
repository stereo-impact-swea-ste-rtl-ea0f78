// sif_pkg: types and constants shared by the SWEA/STE interface FPGA (SIF).
//
// The SIF runs from the 1 MHz IDPU interface clock. It holds:
//  * the IDPU command destination IDs (8-bit ID, 16-bit data),
//  * the telemetry message IDs,
//  * the external SRAM memory map (energy LUT, sweep LUT, PHA accumulators,
//    each double-buffered),
//  * the request bundle a client presents to the SRAM slot sequencer,
//  * the static register set written by IDPU commands.
// The kinds of data (registers, LUTs, messages) follow the specification;
// every numeric ID and the memory layout are this design's own choice, since
// the instrument ICD that would fix them is not part of the specification.
package sif_pkg;

  // ---------------- IDPU command destination IDs ----------------
  localparam logic [7:0] CMD_MCP_DAC    = 8'h01; // data[7:0]: MCP DAC level
  localparam logic [7:0] CMD_ENABLES    = 8'h02; // see enable bit positions below
  localparam logic [7:0] CMD_HEATER     = 8'h03; // data[3:0]: PWM level 0..10
  localparam logic [7:0] CMD_THRESH01   = 8'h04; // data[5:0] det0, data[13:8] det1
  localparam logic [7:0] CMD_THRESH23   = 8'h05; // data[5:0] det2, data[13:8] det3
  localparam logic [7:0] CMD_HK_SWEEP   = 8'h06; // data[3:0]: sweep housekeeping mux address
  localparam logic [7:0] CMD_COVER_REQ  = 8'h07; // data[0] open request, data[1] close request
  localparam logic [7:0] CMD_COVER_ARM  = 8'h08; // data must equal COVER_ARM_KEY
  localparam logic [7:0] CMD_COVER_FRC  = 8'h09; // data[0] force open, data[1] force close
  localparam logic [7:0] CMD_AFE_PWR    = 8'h0A; // data[0] force on, data[1] force off
  localparam logic [7:0] CMD_SWAP       = 8'h0B; // data[0] swap sweep LUT, data[1] swap energy LUT
  localparam logic [7:0] CMD_SWEEP_PTR  = 8'h10; // sweep LUT word pointer
  localparam logic [7:0] CMD_SWEEP_DATA = 8'h11; // sweep LUT data word
  localparam logic [7:0] CMD_ELUT_PTR   = 8'h12; // energy LUT word pointer
  localparam logic [7:0] CMD_ELUT_DATA  = 8'h13; // energy LUT data word

  localparam logic [15:0] COVER_ARM_KEY = 16'hA5C3;

  // bit positions in CMD_ENABLES
  localparam int EN_MCPHV  = 0;
  localparam int EN_NRHV   = 1;
  localparam int EN_COVER  = 2;  // SWEA cover actuator
  localparam int EN_SWEA   = 3;  // SWEA logic enable
  localparam int EN_SWTP   = 4;  // SWEA anode test pulser
  localparam int EN_STETP  = 5;  // STE test pulser
  localparam int EN_ADRST  = 6;  // A/DRESET

  // ---------------- telemetry message IDs ----------------
  localparam logic [7:0] MSG_SWEA_HK = 8'h40; // SWEA counters + sweep housekeeping
  localparam logic [7:0] MSG_SWEA    = 8'h41; // SWEA counters alone
  localparam logic [7:0] MSG_STE_ACC = 8'h50; // STE PHA accumulators
  localparam logic [7:0] MSG_STE_RATE= 8'h51; // STE monitor rate counters
  localparam logic [7:0] MSG_HK      = 8'h60; // housekeeping

  // ---------------- external SRAM map (byte addresses) ----------------
  localparam int RAM_AW = 19;                    // 512K x 8
  localparam logic [RAM_AW-1:0] ELUT_BASE  = 19'h00000; // 2 banks x 16 KB: {bank,det,energy}
  localparam logic [RAM_AW-1:0] SWEEP_BASE = 19'h08000; // 2 banks x 16 KB (10752 B used)
  localparam logic [RAM_AW-1:0] ACC_BASE   = 19'h0F000; // 2 banks x 512 B: {bank,bin,byte}
  localparam int BANK_STRIDE_LUT = 'h4000;
  localparam int BANK_STRIDE_ACC = 'h200;

  // ---------------- SRAM slot sequencer ----------------
  // Slots of the 8 us frame: 0..4 PHA, 5 sweep, 6 accumulator readout, 7 LUT load.
  localparam logic [2:0] SLOT_PHA0  = 3'd0;
  localparam logic [2:0] SLOT_SWEEP = 3'd5;
  localparam logic [2:0] SLOT_RDO   = 3'd6;
  localparam logic [2:0] SLOT_LUT   = 3'd7;

  typedef struct packed {
    logic              valid;  // a transfer is wanted in the client's slot
    logic              we;     // 1 = write
    logic [RAM_AW-1:0] addr;
    logic [7:0]        wdata;
  } ram_req_t;

  // ---------------- DAC indices on the common DAC bus ----------------
  typedef enum logic [2:0] {
    DAC_ANAL = 3'd0, DAC_DEFL1 = 3'd1, DAC_DEFL2 = 3'd2, DAC_VO = 3'd3,
    DAC_MCP = 3'd4, DAC_PULSE = 3'd5
  } dac_id_e;

  // ---------------- static registers written by the IDPU ----------------
  typedef struct packed {
    logic [7:0]      mcp_dac;
    logic            mcphv_en;
    logic            nrhv_en;
    logic            swea_cover;
    logic            swea_en;
    logic            swea_tp_en;
    logic            ste_tp_en;
    logic            adreset;
    logic [3:0]      heater;
    logic [3:0][5:0] thresh;
    logic [3:0]      hk_sweep_addr;
    logic            cover_open_req;
    logic            cover_close_req;
  } sif_regs_t;

  // one-cycle strobes produced by commands
  typedef struct packed {
    logic        mcp_wr;
    logic        cover_arm;
    logic        cover_force_wr;
    logic [1:0]  cover_force;
    logic        afe_on;
    logic        afe_off;
    logic        swap_sweep;
    logic        swap_elut;
    logic        sweep_ptr_wr;
    logic        sweep_data_wr;
    logic        elut_ptr_wr;
    logic        elut_data_wr;
    logic [15:0] data;        // command data for the LUT strobes
  } sif_strb_t;

endpackage
