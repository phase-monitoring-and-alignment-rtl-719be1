// ddmtd_sampler: the mixing stage of the DDMTD phase detector.
//
// The input clock is used as data and sampled on the rising edge of the offset
// clock clk_dmtd, whose frequency is n/(n+1) of the input's. The sampled value
// is a slow square wave, the beat, whose period is (n+1) input periods: the
// input's phase is magnified by n and can be measured with an ordinary counter
// in the clk_dmtd domain. The first flop is the actual mixer and can go
// metastable when the edges line up; the remaining SYNC_STAGES-1 flops give it
// time to resolve (a design choice; two stages by default). There is no reset:
// the output is meaningful after SYNC_STAGES clk_dmtd cycles.
//
// Timing: beat follows clk_in sampled SYNC_STAGES clk_dmtd edges earlier. Both
// DDMTD channels use identical samplers so this latency cancels.
module ddmtd_sampler #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk_dmtd,
  input  logic clk_in,
  output logic beat
);

  timeunit 1ns;
  timeprecision 1ps;

  logic [SYNC_STAGES-1:0] q;

  if (SYNC_STAGES < 2) begin : g_check
    $error("ddmtd_sampler: SYNC_STAGES must be at least 2");
  end

  always_ff @(posedge clk_dmtd) begin
    q <= {q[SYNC_STAGES-2:0], clk_in};
  end

  assign beat = q[SYNC_STAGES-1];

endmodule
