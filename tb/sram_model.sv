// sram_model: behavioural model of the external 512K x 8 asynchronous SRAM
// (simulation only, not synthesizable logic of the design).
//
// Read: while /CE and /OE are low, dout shows mem[addr] combinationally.
// Write: address and data are taken when /WE falls and stored when /WE rises,
// so the stored word is the one set up around the write strobe even though
// the address pins may change at the same instant /WE rises (the write strobe
// is only driven while the chip is selected). Memory starts at 0.
module sram_model #(
  parameter int AW = 19
) (
  input  logic [AW-1:0] addr,
  input  logic [7:0]    din,
  output logic [7:0]    dout,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);
  logic [7:0]    mem [2**AW];
  logic [AW-1:0] wa;
  logic [7:0]    wd;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 8'h00;

  assign dout = (!ce_n && !oe_n) ? mem[addr] : 8'hFF;

  always @(negedge we_n) begin wa = addr; wd = din; end
  always @(posedge we_n) mem[wa] = wd;
endmodule
