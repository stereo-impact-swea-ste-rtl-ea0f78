// ste_test_pulser: STE test pulser sequencing.
//
// At each TESTCYCLECLK tic (while enabled) the PULSE DAC is set to 0 and a
// ramp starts: every PULSE_PERIOD clocks (100 us, 10 kHz) the active-low
// logic pulse pulse_n goes low for PULSE_WIDTH clocks (10 us); after each pulse
// the DAC value is incremented by one and written. After the pulse made with
// the DAC at its maximum (2^DAC_BITS - 1, i.e. 65536 pulses, about 6.5 s) the
// pulses stop and the DAC is written back to 0 until the next TESTCYCLECLK.
// When disabled, pulse_n is high and the DAC is returned to 0.
// DAC writes are requested with dac_req/dac_value and held until dac_ack; the
// bus finishes a write in a few clocks, far inside the 90 us gap. The timing
// and ramp are the specification's; the write handshake is this design's.
module ste_test_pulser #(
  parameter int unsigned PULSE_PERIOD = 100,
  parameter int unsigned PULSE_WIDTH  = 10,
  parameter int unsigned DAC_BITS     = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        testcycleclk,
  output logic        pulse_n,
  output logic        dac_req,
  output logic [15:0] dac_value,
  input  logic        dac_ack,
  output logic        ramp_done     // one clock when the ramp reaches the top
);
  localparam logic [15:0] DAC_MAX = 16'((32'd1 << DAC_BITS) - 1);

  logic                             running;
  logic [$clog2(PULSE_PERIOD)-1:0]  phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; phase <= '0; pulse_n <= 1'b1;
      dac_req <= 1'b0; dac_value <= '0; ramp_done <= 1'b0;
    end else begin
      ramp_done <= 1'b0;
      if (dac_ack) dac_req <= 1'b0;
      if (!enable) begin
        running <= 1'b0; pulse_n <= 1'b1; phase <= '0;
        if (dac_value != 16'd0) begin dac_value <= '0; dac_req <= 1'b1; end
      end else if (testcycleclk) begin
        running <= 1'b1; phase <= '0; pulse_n <= 1'b0;
        dac_value <= '0; dac_req <= 1'b1;
      end else if (running) begin
        phase   <= (phase == $bits(phase)'(PULSE_PERIOD - 1)) ? '0 : phase + 1'b1;
        pulse_n <= !((phase == $bits(phase)'(PULSE_PERIOD - 1)) ||
                     (phase < $bits(phase)'(PULSE_WIDTH - 1)));
        if (phase == $bits(phase)'(PULSE_WIDTH - 1)) begin
          // end of a pulse: step the ramp, or stop at the top
          dac_req <= 1'b1;
          if (dac_value == DAC_MAX) begin
            dac_value <= '0; running <= 1'b0; ramp_done <= 1'b1;
          end else begin
            dac_value <= dac_value + 16'd1;
          end
        end
      end else begin
        pulse_n <= 1'b1;
      end
    end
  end
endmodule
