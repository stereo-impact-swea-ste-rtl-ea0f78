// ste_rate_counters: STE monitor rate counters.
//
// Each of the 4 STE detectors gives three event lines, LLD, ULD and
// PULSERESET; each line feeds a saturating counter of LLD_W, ULD_W or PR_W
// bits (16, 12, 11), so 12 counters in all. The lines are sampled with the
// 1 MHz clock and rising edges counted. At each CYCLECLK the counters are
// latched and restarted, and a message is sent: header {MSG_STE_RATE, 8'h00}
// followed by three words per detector (LLD, ULD, PULSERESET counts, zero
// extended to 16 bits), 13 words, on the out_* stream. Counter widths,
// saturation and the 2 s accumulation are the specification's; edge sampling
// and the message layout are this design's.
module ste_rate_counters
  import sif_pkg::*;
#(
  parameter int unsigned LLD_W = 16,
  parameter int unsigned ULD_W = 12,
  parameter int unsigned PR_W  = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  lld,
  input  logic [3:0]  uld,
  input  logic [3:0]  pulsereset,
  input  logic        cycleclk,
  output logic        out_valid,
  output logic [15:0] out_data,
  output logic        out_last,
  input  logic        out_ready
);
  localparam int unsigned W[3] = '{LLD_W, ULD_W, PR_W};

  logic [11:0] s_q, s_qq, rise;
  logic [15:0] cnt [12];     // index 3*det + kind (0 LLD, 1 ULD, 2 PR)
  logic [15:0] lat [12];
  logic        sending;
  logic [3:0]  widx;

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      rise[3*d]   = s_q[3*d]   && !s_qq[3*d];
      rise[3*d+1] = s_q[3*d+1] && !s_qq[3*d+1];
      rise[3*d+2] = s_q[3*d+2] && !s_qq[3*d+2];
    end
  end

  assign out_valid = sending;
  assign out_last  = sending && (widx == 4'd12);
  assign out_data  = (widx == 4'd0) ? {MSG_STE_RATE, 8'h00} : lat[widx - 4'd1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0; s_qq <= '0; sending <= 1'b0; widx <= '0;
      for (int i = 0; i < 12; i++) begin cnt[i] <= '0; lat[i] <= '0; end
    end else begin
      for (int d = 0; d < 4; d++) begin
        s_q[3*d]   <= lld[d];
        s_q[3*d+1] <= uld[d];
        s_q[3*d+2] <= pulsereset[d];
      end
      s_qq <= s_q;
      for (int i = 0; i < 12; i++) begin
        if (cycleclk) begin
          lat[i] <= cnt[i];
          cnt[i] <= 16'(rise[i]);
        end else if (rise[i] && cnt[i] != 16'((32'd1 << W[i % 3]) - 1)) begin
          cnt[i] <= cnt[i] + 16'd1;
        end
      end
      if (sending && out_ready) begin
        widx <= widx + 4'd1;
        if (out_last) sending <= 1'b0;
      end
      if (cycleclk) begin sending <= 1'b1; widx <= '0; end
    end
  end
endmodule
