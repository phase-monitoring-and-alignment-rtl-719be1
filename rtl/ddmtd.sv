// ddmtd: Digital Dual Mixer Time Difference phase detector.
//
// Measures the phase of clk_b (XCLK) against clk_a (TxRef), two clocks of the
// same nominal frequency f_in, using an offset clock clk_dmtd at
// f_dmtd = n/(n+1) * f_in. Each input goes through its own sampler (the mixer,
// which turns it into a beat at f_in/(n+1)) and deglitcher; the counter counts
// offset-clock cycles from the reference edge to the measured edge, and the
// averager returns the mean of 2**AVG_LOG2 such counts. A count converts to
// time as count * T_in / n (see ddmtd_phase_conv).
//
// All logic runs in the clk_dmtd domain; rst is synchronous to it. The single
// raw samples (phase, period) are also brought out for monitoring. One sample
// takes one beat period, (n+1) input periods; an average takes 2**AVG_LOG2
// beat periods from avg_start.
module ddmtd #(
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned AVG_LOG2    = 4,
  parameter int unsigned GLITCH_THR  = 64,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned GCNT_W      = 16
) (
  input  logic              clk_dmtd,
  input  logic              rst,
  input  logic              clk_a,         // reference clock (TxRef)
  input  logic              clk_b,         // measured clock (XCLK)
  input  logic              avg_start,
  output logic [CNT_W-1:0]  phase,         // last raw phase count
  output logic              phase_valid,
  output logic [CNT_W-1:0]  period,        // last beat period, in counts (n)
  output logic              period_valid,
  output logic [CNT_W-1:0]  avg,           // averaged phase count
  output logic              avg_valid,
  output logic              avg_busy,
  output logic              unwrapped,
  output logic [GCNT_W-1:0] glitches_a,
  output logic [GCNT_W-1:0] glitches_b
);

  timeunit 1ns;
  timeprecision 1ps;

  logic beat_a, beat_b;
  logic clean_a, clean_b;
  logic rise_a, rise_b;

  ddmtd_sampler #(.SYNC_STAGES(SYNC_STAGES)) u_samp_a (
    .clk_dmtd(clk_dmtd), .clk_in(clk_a), .beat(beat_a));
  ddmtd_sampler #(.SYNC_STAGES(SYNC_STAGES)) u_samp_b (
    .clk_dmtd(clk_dmtd), .clk_in(clk_b), .beat(beat_b));

  ddmtd_deglitcher #(.GLITCH_THR(GLITCH_THR), .GCNT_W(GCNT_W)) u_dg_a (
    .clk(clk_dmtd), .rst(rst), .beat(beat_a),
    .clean(clean_a), .rise(rise_a), .glitches(glitches_a));
  ddmtd_deglitcher #(.GLITCH_THR(GLITCH_THR), .GCNT_W(GCNT_W)) u_dg_b (
    .clk(clk_dmtd), .rst(rst), .beat(beat_b),
    .clean(clean_b), .rise(rise_b), .glitches(glitches_b));

  ddmtd_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk(clk_dmtd), .rst(rst), .pulse_a(rise_a), .pulse_b(rise_b),
    .phase(phase), .phase_valid(phase_valid),
    .period(period), .period_valid(period_valid));

  ddmtd_averager #(.CNT_W(CNT_W), .AVG_LOG2(AVG_LOG2)) u_avg (
    .clk(clk_dmtd), .rst(rst), .start(avg_start),
    .sample(phase), .sample_valid(phase_valid), .sample_period(period),
    .avg(avg), .avg_valid(avg_valid), .busy(avg_busy), .unwrapped(unwrapped));

endmodule
