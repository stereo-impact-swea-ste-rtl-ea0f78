// swea_test_pulser: SWEA anode test pulse clock.
//
// A down-counter is loaded with SAMPLECNT; its carry-out (reaching zero)
// gives a one-clock high pulse and reloads it, so the pulse period is
// SAMPLECNT+1 clocks and the frequency steps at every SAMPLECLK and goes back
// to the start value at CYCLECLK (SAMPLECNT = 0). The counter is also reloaded
// at every SAMPLECLK so the new rate starts at once. When disabled the output
// is 0. The down-counter scheme is the specification's; the one-clock pulse
// width and the reload at SAMPLECLK are this design's choice.
module swea_test_pulser (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       sampleclk,   // also high at CYCLECLK
  input  logic [8:0] samplecnt,
  output logic       pulse
);
  logic [8:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; pulse <= 1'b0;
    end else if (!enable || sampleclk) begin
      cnt <= samplecnt; pulse <= 1'b0;
    end else if (cnt == 9'd0) begin
      cnt <= samplecnt; pulse <= 1'b1;
    end else begin
      cnt <= cnt - 9'd1; pulse <= 1'b0;
    end
  end
endmodule
