// swea_counters: SWEA anode counters, latches and counter message.
//
// The 16 anode preamp lines are sampled with the 1 MHz clock and each rising
// edge increments that anode's CNT_W-bit (14-bit) counter. At every SAMPLECLK
// the counters are copied into latches and restarted (an edge in that very
// clock counts for the new interval). If SWEA is enabled a message is then
// sent: header {MSG_SWEA_HK or MSG_SWEA, 8'h00}, the SAMPLECNT of the interval
// that ended, the 16 counts and, when the housekeeping sequencer delivered a
// sweep sample during that interval (sweep housekeeping mode), that 12-bit
// value; the header ID tells the two forms apart. The message streams out
// on out_valid/out_data/out_last with out_ready; a SAMPLECLK that comes while
// a message is still going out restarts it with the new data. With SWEA
// disabled no message is sent. Counter count and width, the latching and the
// appended sweep sample are the specification's; sampling at 1 MHz (so at
// most one count per 2 us per anode) and the message layout are this design's.
module swea_counters
  import sif_pkg::*;
#(
  parameter int unsigned N_ANODE = 16,
  parameter int unsigned CNT_W   = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [N_ANODE-1:0] anode,
  input  logic               sampleclk,
  input  logic [8:0]         samplecnt,
  input  logic               hk_valid,   // sweep sample taken in this interval
  input  logic [11:0]        hk_value,
  output logic               out_valid,
  output logic [15:0]        out_data,
  output logic               out_last,
  input  logic               out_ready
);
  logic [N_ANODE-1:0] a_q, a_qq;
  logic [CNT_W-1:0]   cnt [N_ANODE];
  logic [CNT_W-1:0]   lat [N_ANODE];
  logic [8:0]         cur_sc, msg_sc;
  logic               msg_hk;
  logic [11:0]        msg_hk_val;
  logic               sending;
  logic [4:0]         widx;
  logic [4:0]         nwords;

  assign nwords    = 5'(N_ANODE + 2) + 5'(msg_hk);   // header, samplecnt, counts, [hk]
  assign out_valid = sending;
  assign out_last  = sending && (widx == nwords - 5'd1);

  always_comb begin
    if (widx == 5'd0)                     out_data = {(msg_hk ? MSG_SWEA_HK : MSG_SWEA), 8'h00};
    else if (widx == 5'd1)                out_data = {7'b0, msg_sc};
    else if (widx < 5'(N_ANODE + 2))      out_data = 16'(lat[4'(widx - 5'd2)]);
    else                                  out_data = {4'b0, msg_hk_val};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; a_qq <= '0; cur_sc <= '0; msg_sc <= '0; msg_hk <= 1'b0; msg_hk_val <= '0;
      sending <= 1'b0; widx <= '0;
      for (int i = 0; i < N_ANODE; i++) begin cnt[i] <= '0; lat[i] <= '0; end
    end else begin
      a_q  <= anode;
      a_qq <= a_q;
      for (int i = 0; i < N_ANODE; i++) begin
        if (sampleclk) begin
          lat[i] <= cnt[i];
          cnt[i] <= CNT_W'(a_q[i] && !a_qq[i]);
        end else if (a_q[i] && !a_qq[i]) begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
      if (sending && out_ready) begin
        widx <= widx + 5'd1;
        if (out_last) sending <= 1'b0;
      end
      if (sampleclk) begin
        cur_sc     <= samplecnt;
        msg_sc     <= cur_sc;
        msg_hk     <= hk_valid;
        msg_hk_val <= hk_value;
        sending    <= enable;
        widx       <= '0;
      end
    end
  end
endmodule
