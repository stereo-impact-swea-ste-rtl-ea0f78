// sif_timing: accumulation clocks of the SIF.
//
// A 2-second cycle (CYCLECLK) starts on every 1-second tic whose sample-clock
// seconds value is even. Inside it the cycle is cut into N_STEPS steps of
// STEP_CYCLES clocks (STEPCLK), followed by a tail of TAIL_CYCLES clocks; with
// the defaults 1344 x 1450 + 51200 = 2 000 000 clocks of 1 MHz. Every
// STEPS_PER_SAMPLE-th step also gives a SAMPLECLK tic and advances SAMPLECNT
// (0..335), which CYCLECLK clears. TESTCYCLECLK tics on the 1-second tic whose
// seconds value is a multiple of 10.
//
// All outputs are registered; a tic is one clock high, one clock after the
// sec_tic that causes it. The CYCLECLK tic is also a STEPCLK and a SAMPLECLK
// tic (step 0). After the tail the generator waits for the next even tic;
// an even tic that comes early restarts the cycle at once. The interval
// lengths follow the specification; the restart and tail behaviour are this
// design's choice.
module sif_timing #(
  parameter int unsigned STEP_CYCLES      = 1450,
  parameter int unsigned N_STEPS          = 1344,
  parameter int unsigned TAIL_CYCLES      = 51200,
  parameter int unsigned STEPS_PER_SAMPLE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sec_tic,      // 1-second tic from the serial interface
  input  logic [15:0] sec_value,    // sample clock seconds, valid with sec_tic
  output logic        cycleclk,
  output logic        stepclk,
  output logic        sampleclk,
  output logic [8:0]  samplecnt,
  output logic [10:0] stepcnt,      // current step, N_STEPS during the tail
  output logic        testcycleclk
);
  localparam int unsigned TW = $clog2((TAIL_CYCLES > STEP_CYCLES ? TAIL_CYCLES : STEP_CYCLES) + 1);

  logic [TW-1:0] tick;
  logic          running;
  logic [10:0]   next_step;

  assign next_step = stepcnt + 11'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0; running <= 1'b0; stepcnt <= '0; samplecnt <= '0;
      cycleclk <= 1'b0; stepclk <= 1'b0; sampleclk <= 1'b0; testcycleclk <= 1'b0;
    end else begin
      cycleclk     <= 1'b0;
      stepclk      <= 1'b0;
      sampleclk    <= 1'b0;
      testcycleclk <= sec_tic && (sec_value % 16'd10 == 16'd0);
      if (sec_tic && !sec_value[0]) begin
        running   <= 1'b1;
        tick      <= '0;
        stepcnt   <= '0;
        samplecnt <= '0;
        cycleclk  <= 1'b1;
        stepclk   <= 1'b1;
        sampleclk <= 1'b1;
      end else if (running) begin
        if (stepcnt < 11'(N_STEPS)) begin
          if (tick == TW'(STEP_CYCLES - 1)) begin
            tick    <= '0;
            stepcnt <= next_step;
            if (next_step < 11'(N_STEPS)) begin
              stepclk <= 1'b1;
              if (next_step % 11'(STEPS_PER_SAMPLE) == 11'd0) begin
                sampleclk <= 1'b1;
                samplecnt <= samplecnt + 9'd1;
              end
            end
          end else begin
            tick <= tick + TW'(1);
          end
        end else if (tick == TW'(TAIL_CYCLES - 1)) begin
          running <= 1'b0;
        end else begin
          tick <= tick + TW'(1);
        end
      end
    end
  end
endmodule
