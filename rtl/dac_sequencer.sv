// dac_sequencer: SWEA sweep waveform generator.
//
// The sweep table in external SRAM holds, for each of the N_STEPS steps of
// the 2 s cycle, a 16-bit value for each of the four sweep DACs (ANAL, DEFL1,
// DEFL2, VO): byte address = bank base + 8*step + 2*dac + byte, low byte
// first; 10752 bytes per table. The table is double-buffered: a swap request
// takes effect at the next CYCLECLK.
//
// At each STEPCLK (step s starts) the sequencer pulses sweep_load, which loads
// the values written during step s-1 into all four DAC outputs at once, and
// then prepares step s+1: it reads its 8 bytes through the sweep SRAM slot
// (one byte per 8 us frame) and writes the four DAC input registers over the
// DAC bus. During the last step it prepares step 0 of the next cycle from the
// bank that will be in use after CYCLECLK (so a swap pending at that moment is
// committed at that CYCLECLK; one that comes later waits a cycle). When
// `enable` (SWEA enabled) is low nothing is read, written or loaded.
// The double-buffered full table and the common load at the next STEPCLK are
// the specification's; the table layout and the prefetch scheme are this
// design's.
module dac_sequencer
  import sif_pkg::*;
#(
  parameter int unsigned N_STEPS = 1344
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        stepclk,
  input  logic        cycleclk,
  input  logic [10:0] stepcnt,
  input  logic        swap_req,      // strobe from the IDPU
  output logic        bank,          // table in use
  // SRAM slot 5
  input  logic [2:0]  nxt_slot,
  input  logic [2:0]  cur_slot,
  input  logic [7:0]  ram_din,
  output ram_req_t    req,
  // DAC bus
  output logic        sw_req,
  output logic [1:0]  sw_dac,
  output logic [15:0] sw_value,
  input  logic        sw_ack,
  output logic        sweep_load
);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_WRITE} state_e;
  state_e      state;
  logic [7:0]  bytes [8];
  logic [2:0]  bidx;
  logic [1:0]  widx;
  logic        rd_pend;
  logic [10:0] tstep;
  logic        fbank;
  logic        prepared;
  logic        swap_pending, swap_taken, pf0;
  logic        apply_swap, bank_now;

  assign apply_swap = cycleclk && (pf0 ? swap_taken : swap_pending);
  assign bank_now   = bank ^ apply_swap;

  assign req.valid = (state == S_FETCH) && !rd_pend;
  assign req.we    = 1'b0;
  assign req.addr  = SWEEP_BASE + (fbank ? RAM_AW'(BANK_STRIDE_LUT) : RAM_AW'(0))
                     + RAM_AW'({tstep, 3'b000}) + RAM_AW'(bidx);
  assign req.wdata = '0;

  assign sw_req   = (state == S_WRITE);
  assign sw_dac   = widx;
  assign sw_value = {bytes[{widx, 1'b1}], bytes[{widx, 1'b0}]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; bidx <= '0; widx <= '0; rd_pend <= 1'b0; tstep <= '0;
      fbank <= 1'b0; prepared <= 1'b0; bank <= 1'b0; swap_pending <= 1'b0;
      swap_taken <= 1'b0; pf0 <= 1'b0; sweep_load <= 1'b0;
      for (int i = 0; i < 8; i++) bytes[i] <= '0;
    end else begin
      sweep_load <= 1'b0;
      if (cycleclk) begin
        bank <= bank_now;
        if (apply_swap) swap_pending <= 1'b0;
        swap_taken <= 1'b0;
        pf0 <= 1'b0;
      end
      if (swap_req) swap_pending <= 1'b1;

      if (!enable) begin
        state <= S_IDLE; prepared <= 1'b0; rd_pend <= 1'b0;
      end else if (stepclk) begin
        sweep_load <= prepared;
        prepared   <= 1'b0;
        state      <= S_FETCH; bidx <= '0; widx <= '0; rd_pend <= 1'b0;
        if (stepcnt == 11'(N_STEPS - 1)) begin
          tstep      <= '0;
          fbank      <= bank_now ^ swap_pending;
          swap_taken <= swap_pending;
          pf0        <= 1'b1;
        end else begin
          tstep <= stepcnt + 11'd1;
          fbank <= bank_now;
        end
      end else begin
        unique case (state)
          S_FETCH: begin
            if (req.valid && nxt_slot == SLOT_SWEEP) rd_pend <= 1'b1;
            if (rd_pend && cur_slot == SLOT_SWEEP) begin
              bytes[bidx] <= ram_din;
              rd_pend     <= 1'b0;
              bidx        <= bidx + 3'd1;
              if (bidx == 3'd7) state <= S_WRITE;
            end
          end
          S_WRITE: begin
            if (sw_ack) begin
              widx <= widx + 2'd1;
              if (widx == 2'd3) begin state <= S_IDLE; prepared <= 1'b1; end
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
