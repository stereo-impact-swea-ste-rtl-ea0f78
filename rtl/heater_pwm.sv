// heater_pwm: operational heater pulse-width modulator.
//
// A PERIOD-clock (10 us at 1 MHz, i.e. 100 kHz) frame; heater_on is high for
// the first `level` clocks of each frame, so level 0 is always off and level
// 10 always on, in 1 us steps, as the specification asks. Levels above
// PERIOD act as PERIOD (this design's choice). The output is registered.
module heater_pwm #(
  parameter int unsigned PERIOD = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] level,
  output logic       heater_on
);
  logic [$clog2(PERIOD)-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; heater_on <= 1'b0;
    end else begin
      phase     <= (phase == $bits(phase)'(PERIOD - 1)) ? '0 : phase + 1'b1;
      heater_on <= (32'(phase) < 32'(level));
    end
  end
endmodule
