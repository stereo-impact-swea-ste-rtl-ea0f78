// adc_bus_arbiter: arbiter of the common ADC data bus (PHAD0-PHAD11).
//
// The four STE pulse-height ADCs and the housekeeping ADC drive one 12-bit
// bus (the 4 LSBs of the 16-bit converters are not used). Requests (req[3:0]
// from the PHA channels, req[4] from the housekeeping sequencer) are served
// round-robin, starting after the last one served, so no channel is
// favoured. A read takes two clocks: the grant is chosen and, for the whole
// next clock, the chosen ADC's read strobe (rd_n) is low; at the end of that
// clock the bus is captured, grant[i] pulses and the result appears for one
// clock on out_valid/out_src/out_data. A source is not picked again in the
// clock its grant is out, which gives the requester time to drop its request,
// so back-to-back reads of different ADCs take two clocks each. The unbiased arbitration is the
// specification's; round-robin and the timing are this design's.
module adc_bus_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  output logic [N-1:0]         grant,
  output logic [N-1:0]         rd_n,
  input  logic [11:0]          phad,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_src,
  output logic [11:0]          out_data
);
  localparam int SW = $clog2(N);
  logic          reading;
  logic [SW-1:0] sel, last, pick;
  logic          found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N; k++) begin
      automatic int idx = (int'(last) + k) % N;
      if (!found && req[idx] && !grant[idx]) begin found = 1'b1; pick = SW'(idx); end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading <= 1'b0; sel <= '0; last <= SW'(N - 1); rd_n <= '1; grant <= '0;
      out_valid <= 1'b0; out_src <= '0; out_data <= '0;
    end else begin
      grant     <= '0;
      out_valid <= 1'b0;
      if (reading) begin
        reading   <= 1'b0;
        rd_n      <= '1;
        grant[sel] <= 1'b1;
        out_valid <= 1'b1;
        out_src   <= sel;
        out_data  <= phad;
        last      <= sel;
      end else if (found) begin
        reading   <= 1'b1;
        sel       <= pick;
        rd_n[pick] <= 1'b0;
      end
    end
  end
endmodule
