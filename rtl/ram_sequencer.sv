// ram_sequencer: time-slot sequencer of the external 512K x 8 SRAM.
//
// The SRAM makes one transfer per 1 MHz clock. A fixed frame of 8 slots
// (8 us) shares it: slots 0-4 belong to the STE PHA (energy LUT read and two
// read-modify-write halves of a counter increment), slot 5 to the sweep LUT
// read-out, slot 6 to the accumulator read-out/reset and slot 7 to the LUT
// loader; the read-out also takes slot 7 when the loader leaves it unused. A slot whose owner has no valid request is skipped (chip disabled).
//
// Timing: nxt_slot names the slot whose transfer is set up in this clock;
// its owner's request is registered onto the address/data/control pins at the
// clock edge, and the transfer happens in the following clock (cur_slot).
// Read data come back on ram_din during that clock, so the owner may use them
// combinationally to form its request for the very next slot (the PHA uses
// this to turn the LUT result into a counter address). Writes: the write
// strobe ram_we_n is low only in the low phase of the transfer clock, so
// address and data are stable around it (both clock phases are used, as the
// specification suggests; the board may add RC delays on the rising edge).
// The phase is found from a rising-edge toggle flop and a falling-edge copy
// of it, so no clock enters the logic. The slot allocation is the
// specification's; the pin timing is this design's.
module ram_sequencer
  import sif_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ram_req_t          pha_req,     // used in slots 0-4
  input  ram_req_t          sweep_req,   // slot 5
  input  ram_req_t          rdo_req,     // slot 6, and slot 7 when free
  input  ram_req_t          lut_req,     // slot 7 (else the read-out)
  output logic [2:0]        nxt_slot,
  output logic [2:0]        cur_slot,
  output logic              cur_valid,   // a transfer happens in this clock
  // SRAM pins
  output logic [RAM_AW-1:0] ram_addr,
  output logic [7:0]        ram_dout,
  output logic              ram_ce_n,
  output logic              ram_oe_n,
  output logic              ram_we_n
);
  ram_req_t sel;
  logic     wr_cycle;
  logic     tgl_p, tgl_n;

  always_comb begin
    unique case (nxt_slot)
      3'd0, 3'd1, 3'd2, 3'd3, 3'd4: sel = pha_req;
      SLOT_SWEEP:                   sel = sweep_req;
      SLOT_RDO:                     sel = rdo_req;
      default:                      sel = lut_req.valid ? lut_req : rdo_req;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt_slot <= '0; cur_slot <= '0; cur_valid <= 1'b0;
      ram_addr <= '0; ram_dout <= '0; ram_ce_n <= 1'b1; ram_oe_n <= 1'b1;
      wr_cycle <= 1'b0; tgl_p <= 1'b0;
    end else begin
      nxt_slot  <= nxt_slot + 3'd1;
      cur_slot  <= nxt_slot;
      cur_valid <= sel.valid;
      tgl_p     <= !tgl_p;
      ram_ce_n  <= !sel.valid;
      ram_oe_n  <= !(sel.valid && !sel.we);
      wr_cycle  <= sel.valid && sel.we;
      if (sel.valid) begin
        ram_addr <= sel.addr;
        ram_dout <= sel.wdata;
      end
    end
  end

  // falling-edge copy: tgl_p == tgl_n during the low clock phase
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) tgl_n <= 1'b0;
    else        tgl_n <= tgl_p;
  end

  assign ram_we_n = !(wr_cycle && (tgl_p == tgl_n));
endmodule
