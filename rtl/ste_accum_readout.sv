// ste_accum_readout: read-out and reset of the idle STE accumulator bank.
//
// The 256 16-bit PHA counters are double-buffered; at every CYCLECLK the
// banks change roles. This block then reads the bank just filled, counter by
// counter, through SRAM slot 6 and, when the LUT loader leaves it free
// (spare_slot), slot 7 (read low byte, read high byte, write 0, write 0: two
// 8 us frames per counter, about 4.1 ms for the bank), and sends the
// values as one telemetry message: a header word {MSG_STE_ACC, 7'b0, bank}
// followed by the 256 counts, the last flagged with out_last. The stream
// (out_valid/out_data/out_last, out_ready) stalls the read-out when the
// telemetry arbiter is busy. A CYCLECLK arriving before the read-out finishes
// is ignored. The read-out must end well within one 5.8 ms SAMPLECLK interval
// so that the SWEA counter message waiting behind it is not overwritten; using
// slot 7 as well is what makes it fast enough. Double-buffering with read-out and reset is the
// specification's; the access order and message layout are this design's.
module ste_accum_readout
  import sif_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cycleclk,
  input  logic        acc_bank,    // bank being filled (after the swap)
  input  logic [2:0]  nxt_slot,
  input  logic        spare_slot,  // slot 7 is not used by the LUT loader
  input  logic [2:0]  cur_slot,
  input  logic [7:0]  ram_din,
  output ram_req_t    req,
  output logic        out_valid,
  output logic [15:0] out_data,
  output logic        out_last,
  input  logic        out_ready,
  output logic        busy
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_RD_LO, S_RD_HI, S_EMIT, S_WR_LO, S_WR_HI} state_e;
  state_e     state;
  logic       rbank;
  logic [7:0] idx;
  logic [7:0] lo, hi;
  logic       pend;

  // A transfer completing in slot 6 is followed at once by the request of
  // the next state for slot 7, so the request is formed from the state (and
  // counter index) the block is about to enter.
  logic   use_slot, got_slot;
  state_e rstate;
  logic [7:0] ridx;
  assign use_slot = (nxt_slot == SLOT_RDO) || (nxt_slot == SLOT_LUT && spare_slot);
  assign got_slot = pend && (cur_slot == SLOT_RDO || cur_slot == SLOT_LUT);
  assign busy = (state != S_IDLE);

  always_comb begin
    rstate = state;
    ridx   = idx;
    if (got_slot) begin
      unique case (state)
        S_RD_LO: rstate = S_RD_HI;
        S_RD_HI: rstate = S_EMIT;
        S_WR_LO: rstate = S_WR_HI;
        S_WR_HI: begin rstate = (idx == 8'hFF) ? S_IDLE : S_RD_LO; ridx = idx + 8'd1; end
        default: rstate = state;
      endcase
    end
  end

  always_comb begin
    req       = '0;
    req.valid = (!pend || got_slot) && (rstate inside {S_RD_LO, S_RD_HI, S_WR_LO, S_WR_HI});
    req.we    = (rstate inside {S_WR_LO, S_WR_HI});
    req.addr  = ACC_BASE + (rbank ? RAM_AW'(BANK_STRIDE_ACC) : RAM_AW'(0))
                + RAM_AW'({ridx, (rstate == S_RD_HI || rstate == S_WR_HI)});
  end

  assign out_valid = (state == S_HDR) || (state == S_EMIT);
  assign out_data  = (state == S_HDR) ? {MSG_STE_ACC, 7'b0, rbank} : {hi, lo};
  assign out_last  = (state == S_EMIT) && (idx == 8'hFF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; rbank <= 1'b0; idx <= '0; lo <= '0; hi <= '0; pend <= 1'b0;
    end else begin
      pend  <= (pend && !got_slot) || (req.valid && use_slot);
      state <= rstate;
      idx   <= ridx;
      if (got_slot && state == S_RD_LO) lo <= ram_din;
      if (got_slot && state == S_RD_HI) hi <= ram_din;
      unique case (state)
        S_IDLE: if (cycleclk) begin state <= S_HDR; rbank <= !acc_bank; idx <= '0; end
        S_HDR:  if (out_ready) state <= S_RD_LO;
        S_EMIT: if (out_ready) state <= S_WR_LO;
        default: ;
      endcase
    end
  end
endmodule
