// ste_cover_tb: open/close requests power the actuator until the sense switch
// shows the position; dropping the request stops it; force-on works only
// right after an arm command (ARM_TIMEOUT shortened to 50 clocks).
module ste_cover_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic open_req, close_req, arm, force_wr, is_open, is_closed, act_open, act_close;
  logic [1:0] force_val, force_q;
  ste_cover #(.ARM_TIMEOUT(50)) dut (.*);
  task automatic tick(input int n = 1); repeat (n) @(posedge clk); #1; endtask
  task automatic pulse_force(input logic [1:0] v);
    force_val = v; force_wr = 1; tick(); force_wr = 0; tick();
  endtask
  initial begin
    open_req = 0; close_req = 0; arm = 0; force_wr = 0; force_val = 0; is_open = 0; is_closed = 1;
    tick(2); rst_n = 1; tick();
    check(!act_open && !act_close, "idle");
    open_req = 1; tick(2);
    check(act_open && !act_close, "open actuator powered");
    is_closed = 0; tick(5); check(act_open, "still powered while moving");
    is_open = 1; tick(2); check(!act_open, "off when open switch made");
    close_req = 1; open_req = 0; tick(2); check(act_close && !act_open, "close actuator powered");
    close_req = 0; tick(2); check(!act_close, "request dropped: off at once");
    close_req = 1; open_req = 1; tick(2); check(!act_close && !act_open, "both requests: none");
    close_req = 0; open_req = 0;
    pulse_force(2'b01); tick(2); check(!act_open && force_q == 0, "force without arm refused");
    arm = 1; tick(); arm = 0; tick(60);
    pulse_force(2'b01); tick(2); check(!act_open, "force after arm timeout refused");
    arm = 1; tick(); arm = 0; tick(10);
    pulse_force(2'b01); tick(2); check(act_open && force_q == 2'b01, "armed force on (switch ignored)");
    pulse_force(2'b10); tick(2); check(act_open, "second force needs a new arm");
    pulse_force(2'b00); tick(2); check(!act_open && force_q == 0, "force cleared without arm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
