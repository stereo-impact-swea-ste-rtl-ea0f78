// pha_channel: trigger and conversion control of one STE pulse-height channel.
//
// The A/D converter of the shaper is started with a short active-low /CVST
// pulse on the falling edge of PEAK, provided LLD is high, ULD is low and
// PULSERESET is low. Pile-up rejection: the start is allowed only between
// 2 us and 4 us after the leading edge of LLD. LLD is sampled with the 1 MHz
// clock: `age` counts clocks since a sample first saw it high (1 at that
// sample), and the trigger is armed in the clock period that follows a sample
// with age WIN_LO..WIN_HI. The edge lies up to 1 us before the first sample,
// so with age 3 the armed period lies 2..4 us after the edge whatever the
// phase: the default window (3..3) never opens outside 2-4 us, at the price of
// being 1 us wide.
//
// /CVST timing: a registered flag `armed` says that all conditions held at
// the last clock edge with PEAK high; /CVST = !(armed & !PEAK), so it falls
// within gate delays of PEAK falling and rises at the next clock edge (pulse
// shorter than 1 us). After the start the channel waits for BUSY to go high
// and then low (conversion done, about 2 us), then holds rd_req until the
// ADC bus arbiter answers with rd_grant. If BUSY does not rise within
// BUSY_TIMEOUT clocks the event is abandoned. `enable` (AFE power on) gates
// everything. The conditions and the window are the specification's; the
// sampling scheme, the abandon timeout and the handshake are this design's.
module pha_channel #(
  parameter int unsigned WIN_LO       = 3,
  parameter int unsigned WIN_HI       = 3,
  parameter int unsigned BUSY_TIMEOUT = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic lld,
  input  logic uld,
  input  logic peak,
  input  logic pulsereset,
  input  logic busy,
  output logic cvst_n,
  output logic rd_req,
  input  logic rd_grant,
  output logic started       // one clock after each /CVST pulse
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_BUSY, S_CONV, S_READ} state_e;
  state_e     state;
  logic [3:0] age, age_next;
  logic [3:0] tmo;
  logic       armed, in_window;

  assign age_next  = !lld ? 4'd0 : (age == 4'hF ? age : age + 4'd1);
  assign in_window = (age_next >= 4'(WIN_LO)) && (age_next <= 4'(WIN_HI));
  assign cvst_n    = !(armed && !peak);
  assign rd_req    = (state == S_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; age <= '0; tmo <= '0; armed <= 1'b0; started <= 1'b0;
    end else begin
      age     <= age_next;
      started <= 1'b0;
      armed   <= enable && (state == S_IDLE) && lld && !uld && !pulsereset && peak && in_window;
      if (!enable) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE:
            if (armed && !peak) begin state <= S_WAIT_BUSY; tmo <= '0; started <= 1'b1; armed <= 1'b0; end
          S_WAIT_BUSY: begin
            tmo <= tmo + 4'd1;
            if (busy) state <= S_CONV;
            else if (tmo == 4'(BUSY_TIMEOUT - 1)) state <= S_IDLE;
          end
          S_CONV:  if (!busy) state <= S_READ;
          S_READ:  if (rd_grant) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
