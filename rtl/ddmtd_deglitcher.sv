// ddmtd_deglitcher: removes jitter glitches from a DDMTD beat signal.
//
// When the offset clock edge sweeps slowly across the input clock edge, jitter
// makes the sampled beat toggle several times before it settles. This state
// machine keeps a clean copy of the beat and accepts a change only after the
// raw beat has held the new level for GLITCH_THR consecutive cycles. The change
// that is accepted is therefore the last transition of a burst; earlier
// transitions of the burst are counted as glitches and dropped.
//
// Outputs: clean is the deglitched level; rise is a one-cycle pulse when clean
// goes from 0 to 1. The pulse comes GLITCH_THR cycles after the last raw
// transition; the delay is the same in both channels and cancels in the phase
// difference. glitches counts rejected transitions (saturating) for monitoring.
// GLITCH_THR must stay well below half the beat period (n/2 cycles).
// The threshold scheme and its default are this design's choices.
module ddmtd_deglitcher #(
  parameter int unsigned GLITCH_THR = 64,
  parameter int unsigned GCNT_W     = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              beat,
  output logic              clean,
  output logic              rise,
  output logic [GCNT_W-1:0] glitches
);

  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {
    ST_LOW    = 2'd0,  // clean low, raw low
    ST_RISING = 2'd1,  // clean low, raw went high: qualifying
    ST_HIGH   = 2'd2,  // clean high, raw high
    ST_FALLING= 2'd3   // clean high, raw went low: qualifying
  } dg_state_t;

  localparam int unsigned RUN_W = $clog2(GLITCH_THR + 1);

  dg_state_t        state;
  logic [RUN_W-1:0] run;

  assign clean = (state == ST_HIGH) || (state == ST_FALLING);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_LOW;
      run      <= '0;
      rise     <= 1'b0;
      glitches <= '0;
    end else begin
      rise <= 1'b0;
      unique case (state)
        ST_LOW: if (beat) begin
          state <= ST_RISING;
          run   <= RUN_W'(1);
        end
        ST_RISING: begin
          if (!beat) begin
            state <= ST_LOW;
            if (glitches != '1) glitches <= glitches + 1'b1;
          end else if (run >= RUN_W'(GLITCH_THR - 1)) begin
            state <= ST_HIGH;
            rise  <= 1'b1;
          end else begin
            run <= run + 1'b1;
          end
        end
        ST_HIGH: if (!beat) begin
          state <= ST_FALLING;
          run   <= RUN_W'(1);
        end
        ST_FALLING: begin
          if (beat) begin
            state <= ST_HIGH;
            if (glitches != '1) glitches <= glitches + 1'b1;
          end else if (run >= RUN_W'(GLITCH_THR - 1)) begin
            state <= ST_LOW;
          end else begin
            run <= run + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
