// hv_sync: SWEA high-voltage synchronisation signals.
//
// Divides the 1 MHz clock by DIV (10) into two 100 kHz square waves of
// opposite polarity, hvsync_p and hvsync_n. Both outputs are registered and
// change on the same clock edge; hvsync_p is high for the first DIV/2 clocks
// of each period. The division ratio is the specification's; the 50 % duty
// cycle is this design's reading of "square wave".
module hv_sync #(
  parameter int unsigned DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic hvsync_p,
  output logic hvsync_n
);
  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; hvsync_p <= 1'b0; hvsync_n <= 1'b1;
    end else begin
      cnt      <= (cnt == $bits(cnt)'(DIV - 1)) ? '0 : cnt + 1'b1;
      hvsync_p <= (cnt < $bits(cnt)'(DIV / 2));
      hvsync_n <= !(cnt < $bits(cnt)'(DIV / 2));
    end
  end
endmodule
