// ste_cover: STE reclosable cover actuator control.
//
// An open (close) request powers the open (close) actuator until the matching
// sense switch reports the cover there; power then goes off by itself, and
// dropping the request removes it at once (so the IDPU can impose a timeout).
// If both requests are set neither actuator is powered. Independent of the
// switches, a "force on" bit per actuator can be set, but only by a force
// command that follows an arm command within ARM_TIMEOUT clocks (1 s); a
// force command that clears both bits needs no arming. Outputs are registered.
// The request/sense behaviour and the two-command protection follow the
// specification; the 1 s window is its example value.
module ste_cover #(
  parameter int unsigned ARM_TIMEOUT = 1_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       open_req,
  input  logic       close_req,
  input  logic       arm,          // strobe: first command of the force sequence
  input  logic       force_wr,     // strobe: second command
  input  logic [1:0] force_val,    // [0] force open actuator, [1] force close actuator
  input  logic       is_open,      // sense switch: cover is open
  input  logic       is_closed,    // sense switch: cover is closed
  output logic       act_open,
  output logic       act_close,
  output logic [1:0] force_q       // force bits in effect (for housekeeping)
);
  logic                           armed;
  logic [$clog2(ARM_TIMEOUT)-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0; timer <= '0; force_q <= '0;
      act_open <= 1'b0; act_close <= 1'b0;
    end else begin
      if (arm) begin
        armed <= 1'b1; timer <= '0;
      end else if (force_wr) begin
        armed <= 1'b0;
        if (armed || force_val == 2'b00) force_q <= force_val;
      end else if (armed) begin
        if (timer == $bits(timer)'(ARM_TIMEOUT - 1)) armed <= 1'b0;
        else timer <= timer + 1'b1;
      end
      act_open  <= force_q[0] || (open_req && !close_req && !is_open);
      act_close <= force_q[1] || (close_req && !open_req && !is_closed);
    end
  end
endmodule
