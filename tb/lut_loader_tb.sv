// lut_loader_tb: loads words into the sweep LUT and the energy LUT through
// pointer and data commands (with the SRAM slot sequencer and an SRAM model)
// and checks that they land, low byte first, at base + 2*pointer of the bank
// not in use, that the pointer auto-increments, and that the other bank and
// the other table are untouched.
module lut_loader_tb;
  import sif_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  ram_req_t   pha_req, sweep_req, rdo_req, lut_req;
  logic [2:0] nxt_slot, cur_slot;
  logic [RAM_AW-1:0] ram_addr;
  logic [7:0] ram_dout, ram_din;
  logic ram_ce_n, ram_oe_n, ram_we_n;
  ram_sequencer u_seq (.clk, .rst_n, .pha_req, .sweep_req, .rdo_req, .lut_req, .nxt_slot, .cur_slot,
                       .cur_valid(), .ram_addr, .ram_dout, .ram_ce_n, .ram_oe_n, .ram_we_n);
  sram_model mem (.addr(ram_addr), .din(ram_dout), .dout(ram_din), .ce_n(ram_ce_n), .oe_n(ram_oe_n), .we_n(ram_we_n));
  logic sweep_ptr_wr, sweep_data_wr, elut_ptr_wr, elut_data_wr, sweep_bank, elut_bank, busy;
  logic [15:0] data;
  lut_loader dut (.clk, .rst_n, .sweep_ptr_wr, .sweep_data_wr, .elut_ptr_wr, .elut_data_wr, .data,
                  .sweep_bank, .elut_bank, .nxt_slot, .req(lut_req), .busy);
  assign pha_req = '0; assign sweep_req = '0; assign rdo_req = '0;
  task automatic cmd(input int which, input logic [15:0] d);
    data = d;
    case (which) 0: sweep_ptr_wr = 1; 1: sweep_data_wr = 1; 2: elut_ptr_wr = 1; default: elut_data_wr = 1; endcase
    @(posedge clk); #1;
    sweep_ptr_wr = 0; sweep_data_wr = 0; elut_ptr_wr = 0; elut_data_wr = 0;
    repeat (24) @(posedge clk); #1;      // a serial command takes longer than this
  endtask
  function automatic logic [15:0] rd16(input int a);
    return {mem.mem[a + 1], mem.mem[a]};
  endfunction
  initial begin
    sweep_ptr_wr = 0; sweep_data_wr = 0; elut_ptr_wr = 0; elut_data_wr = 0; data = 0;
    sweep_bank = 0; elut_bank = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    cmd(0, 16'd100);
    for (int i = 0; i < 5; i++) cmd(1, 16'hA000 + 16'(i));
    for (int i = 0; i < 5; i++)
      check(rd16('h8000 + 'h4000 + 2 * (100 + i)) == 16'hA000 + 16'(i), $sformatf("sweep word %0d in bank 1", i));
    check(rd16('h8000 + 2 * 100) == 0, "sweep bank 0 untouched");
    check(mem.mem['h8000 + 'h4000 + 200] == 8'h00 && mem.mem['h8000 + 'h4000 + 201] == 8'hA0, "low byte first");
    cmd(2, 16'h0800);                       // energy LUT word 0x800 = entries 0x1000/0x1001 (detector 1)
    cmd(3, 16'h2211); cmd(3, 16'h4433);
    check(mem.mem['h1000] == 8'h11 && mem.mem['h1001] == 8'h22 && mem.mem['h1002] == 8'h33 && mem.mem['h1003] == 8'h44,
          "energy LUT bank 0 loaded (bank 1 in use)");
    check(mem.mem['h4000 + 'h1000] == 8'h00, "energy LUT bank 1 untouched");
    sweep_bank = 1;
    cmd(0, 16'd0); cmd(1, 16'h5A5A);
    check(rd16('h8000) == 16'h5A5A, "after swap the loader writes bank 0");
    check(!busy, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
