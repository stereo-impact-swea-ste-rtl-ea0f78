// afe_power: latch-up protection of the analog front end.
//
// AFEPWR is set by a force-on command and cleared by a force-off command or
// by AFESHDN (the power interface's over-current flag) going high; with
// neither command it keeps its state. Over-current and force-off win over
// force-on. The output is registered and resets to off. Behaviour follows the
// specification; the reset state and the priority are this design's choice.
module afe_power (
  input  logic clk,
  input  logic rst_n,
  input  logic force_on,
  input  logic force_off,
  input  logic afeshdn,
  output logic afepwr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    afepwr <= 1'b0;
    else if (afeshdn || force_off) afepwr <= 1'b0;
    else if (force_on)             afepwr <= 1'b1;
  end
endmodule
