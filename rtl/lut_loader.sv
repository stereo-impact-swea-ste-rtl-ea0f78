// lut_loader: IDPU access to the look-up tables in external SRAM.
//
// The sweep LUT and the STE energy LUT each have an address-pointer command
// and a data command. A data command carries 16 bits, written as two bytes
// (low byte at the even address, then the high byte) at byte address
// base + 2*pointer of the bank that is NOT in use; the pointer then advances
// by one. The two bytes use the loader's SRAM slot (slot 7) in two successive
// 8 us frames. `busy` is high while a word is waiting; a data command arriving
// while busy is ignored (commands on the serial link are further apart than
// the 16 us a word needs). The pointer/data scheme, auto-increment and
// double-buffering follow the specification; the byte order and the memory
// map (sif_pkg) are this design's. The pointer is taken modulo 8192 words
// (one 16 KB bank).
module lut_loader
  import sif_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sweep_ptr_wr,
  input  logic        sweep_data_wr,
  input  logic        elut_ptr_wr,
  input  logic        elut_data_wr,
  input  logic [15:0] data,
  input  logic        sweep_bank,   // bank in use by the sweep sequencer
  input  logic        elut_bank,    // bank in use by the PHA
  input  logic [2:0]  nxt_slot,
  output ram_req_t    req,
  output logic        busy
);
  logic [15:0]       sweep_ptr, elut_ptr;
  logic [RAM_AW-1:0] addr;
  logic [15:0]       word;
  logic              hi;            // next byte is the high byte

  assign req.valid = busy;
  assign req.we    = 1'b1;
  assign req.addr  = addr | RAM_AW'(hi);
  assign req.wdata = hi ? word[15:8] : word[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep_ptr <= '0; elut_ptr <= '0; addr <= '0; word <= '0; hi <= 1'b0; busy <= 1'b0;
    end else begin
      if (sweep_ptr_wr) sweep_ptr <= data;
      if (elut_ptr_wr)  elut_ptr  <= data;
      if (busy && nxt_slot == SLOT_LUT) begin
        hi <= !hi;
        if (hi) busy <= 1'b0;
      end else if (!busy && sweep_data_wr) begin
        addr <= SWEEP_BASE + (sweep_bank ? RAM_AW'(0) : RAM_AW'(BANK_STRIDE_LUT))
                + RAM_AW'({sweep_ptr[12:0], 1'b0});
        word <= data; hi <= 1'b0; busy <= 1'b1;
        sweep_ptr <= sweep_ptr + 16'd1;
      end else if (!busy && elut_data_wr) begin
        addr <= ELUT_BASE + (elut_bank ? RAM_AW'(0) : RAM_AW'(BANK_STRIDE_LUT))
                + RAM_AW'({elut_ptr[12:0], 1'b0});
        word <= data; hi <= 1'b0; busy <= 1'b1;
        elut_ptr <= elut_ptr + 16'd1;
      end
    end
  end
endmodule
