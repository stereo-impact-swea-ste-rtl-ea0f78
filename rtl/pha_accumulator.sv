// pha_accumulator: STE event sequencer and counter incrementer.
//
// Converted events (2-bit detector number, 12-bit energy) enter a small FIFO.
// In each 8 us SRAM frame one event is taken and handled in the five PHA
// slots (0-4), one SRAM transfer per slot:
//   slot 0  read the energy LUT at {bank, detector, energy}   -> 8-bit bin
//   slot 1  read the low byte of counter `bin` of the active accumulator bank
//   slot 2  write low byte + 1
//   slot 3  read the high byte
//   slot 4  write high byte + carry out of the low byte
// The LUT result and each read byte are used combinationally, in the clock
// they arrive on ram_din, to form the next slot's request (see ram_sequencer).
// Counters wrap at 65535. The accumulator bank is sampled at slot 0
// so a bank swap never splits an event. Events arriving with the FIFO full
// are dropped and counted in `dropped`. The LUT look-up, the 256 16-bit
// counters and the 4-cycle increment are the specification's; the FIFO and
// its depth are this design's.
module pha_accumulator
  import sif_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        evt_valid,
  input  logic [1:0]  evt_det,
  input  logic [11:0] evt_energy,
  input  logic        elut_bank,
  input  logic        acc_bank,
  input  logic [2:0]  nxt_slot,
  input  logic [7:0]  ram_din,
  output ram_req_t    req,
  output logic [15:0] dropped,
  output logic        done        // one clock per completed increment
);
  localparam int AW = $clog2(FIFO_DEPTH);
  logic [13:0]  fifo [FIFO_DEPTH];
  logic [AW:0]  count;
  logic [AW-1:0] rp, wp;
  logic         empty, full, pop, push;

  logic         active;        // an event is in slots 1-4
  logic         abank;
  logic [7:0]   bin;
  logic         carry;
  logic [RAM_AW-1:0] acc_addr;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(FIFO_DEPTH));
  assign pop   = !empty && (nxt_slot == SLOT_PHA0);
  assign push  = evt_valid && (!full || pop);

  assign acc_addr = ACC_BASE + (abank ? RAM_AW'(BANK_STRIDE_ACC) : RAM_AW'(0));

  always_comb begin
    req = '0;
    unique case (nxt_slot)
      3'd0: if (!empty) begin
        req.valid = 1'b1;
        req.addr  = ELUT_BASE + (elut_bank ? RAM_AW'(BANK_STRIDE_LUT) : RAM_AW'(0))
                    + RAM_AW'(fifo[rp]);
      end
      3'd1: if (active) begin   // ram_din holds the LUT result now
        req.valid = 1'b1;
        req.addr  = acc_addr + RAM_AW'({ram_din, 1'b0});
      end
      3'd2: if (active) begin   // ram_din holds the low byte now
        req.valid = 1'b1; req.we = 1'b1;
        req.addr  = acc_addr + RAM_AW'({bin, 1'b0});
        req.wdata = ram_din + 8'd1;
      end
      3'd3: if (active) begin
        req.valid = 1'b1;
        req.addr  = acc_addr + RAM_AW'({bin, 1'b1});
      end
      3'd4: if (active) begin   // ram_din holds the high byte now
        req.valid = 1'b1; req.we = 1'b1;
        req.addr  = acc_addr + RAM_AW'({bin, 1'b1});
        req.wdata = ram_din + 8'(carry);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0; rp <= '0; wp <= '0; active <= 1'b0; abank <= 1'b0;
      bin <= '0; carry <= 1'b0; dropped <= '0; done <= 1'b0;
      for (int i = 0; i < FIFO_DEPTH; i++) fifo[i] <= '0;
    end else begin
      done <= 1'b0;
      if (push) begin
        fifo[wp] <= {evt_det, evt_energy};
        wp <= (wp == AW'(FIFO_DEPTH - 1)) ? '0 : wp + 1'b1;
      end else if (evt_valid && dropped != 16'hFFFF) begin
        dropped <= dropped + 16'd1;
      end
      if (pop) rp <= (rp == AW'(FIFO_DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      unique case (nxt_slot)
        3'd0: if (pop) begin active <= 1'b1; abank <= acc_bank; end
        3'd1: if (active) bin   <= ram_din;
        3'd2: if (active) carry <= (ram_din == 8'hFF);
        3'd4: if (active) begin active <= 1'b0; done <= 1'b1; end
        default: ;
      endcase
    end
  end
endmodule
