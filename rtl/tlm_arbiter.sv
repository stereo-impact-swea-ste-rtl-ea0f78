// tlm_arbiter: telemetry channel arbiter.
//
// Several message sources (SWEA counters, STE accumulators, STE rate counters,
// housekeeping) each present a message as a stream of 16-bit words
// (src_valid, src_data, src_last; src_ready back). The arbiter picks a source
// with a word waiting, round-robin starting after the one served last, and
// passes that source's words to the telemetry output until its last word has
// been taken; only then is another source considered, so messages never
// interleave. tlm_ready comes from the serial transmitter. A source is chosen
// in one clock and its words pass through without added delay. Arbitration
// among the sources is the specification's; whole-message round-robin and the
// stream handshake are this design's.
module tlm_arbiter #(
  parameter int unsigned N_SRC = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_SRC-1:0]       src_valid,
  input  logic [N_SRC-1:0][15:0] src_data,
  input  logic [N_SRC-1:0]       src_last,
  output logic [N_SRC-1:0]       src_ready,
  output logic                   tlm_valid,
  output logic [15:0]            tlm_data,
  output logic                   tlm_last,
  input  logic                   tlm_ready
);
  localparam int SW = $clog2(N_SRC);
  logic          locked;
  logic [SW-1:0] sel, last, pick;
  logic          found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N_SRC; k++) begin
      automatic int idx = (int'(last) + k) % N_SRC;
      if (!found && src_valid[idx]) begin found = 1'b1; pick = SW'(idx); end
    end
  end

  assign tlm_valid = locked && src_valid[sel];
  assign tlm_data  = src_data[sel];
  assign tlm_last  = locked && src_last[sel];
  always_comb begin
    src_ready = '0;
    src_ready[sel] = locked && tlm_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0; sel <= '0; last <= SW'(N_SRC - 1);
    end else if (!locked) begin
      if (found) begin locked <= 1'b1; sel <= pick; end
    end else if (tlm_valid && tlm_ready && tlm_last) begin
      locked <= 1'b0; last <= sel;
    end
  end
endmodule
