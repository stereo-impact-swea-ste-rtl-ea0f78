// afe_power_tb: AFEPWR follows force on / force off, holds otherwise, and is
// turned off by AFESHDN (which also wins over force on).
module afe_power_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic force_on, force_off, afeshdn, afepwr;
  afe_power dut (.*);
  task automatic step(input logic on, input logic off, input logic sh, input logic exp, input string m);
    force_on = on; force_off = off; afeshdn = sh;
    @(posedge clk); #1;
    force_on = 0; force_off = 0; afeshdn = 0;
    check(afepwr == exp, m);
    repeat (3) @(posedge clk); #1;
    check(afepwr == exp, {m, " (held)"});
  endtask
  initial begin
    force_on = 0; force_off = 0; afeshdn = 0;
    repeat (2) @(posedge clk);
    check(afepwr == 0, "reset off");
    rst_n = 1;
    step(1, 0, 0, 1, "force on");
    step(0, 0, 0, 1, "hold on");
    step(0, 1, 0, 0, "force off");
    step(1, 0, 0, 1, "force on again");
    step(0, 0, 1, 0, "AFESHDN trips");
    step(1, 0, 1, 0, "AFESHDN wins over force on");
    step(1, 1, 0, 0, "force off wins");
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
