// ddmtd_averager: averages 2**AVG_LOG2 DDMTD phase samples.
//
// A single DDMTD sample is disturbed by metastability and jitter, so samples
// are averaged. Because the phase is circular (0 and period-1 are neighbours),
// each sample is first unwrapped against the first sample of the run: if it is
// more than half a beat period away, one period is added or subtracted. The
// rounded mean is folded back into [0, period). The period used is the latest
// one measured by the counter (sample_period input).
//
// Handshake: a one-cycle start clears the accumulator and begins a run (start
// while busy restarts it). Each sample_valid adds one sample. After the last
// sample, avg is updated and avg_valid pulses for one cycle, two cycles after
// the final sample_valid. Unwrapping and the default of 16 samples are this
// design's choices.
module ddmtd_averager #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned AVG_LOG2 = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [CNT_W-1:0] sample,
  input  logic             sample_valid,
  input  logic [CNT_W-1:0] sample_period,
  output logic [CNT_W-1:0] avg,
  output logic             avg_valid,
  output logic             busy,
  output logic             unwrapped    // pulse: a sample was unwrapped
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned SUM_W = CNT_W + AVG_LOG2 + 2;
  localparam int unsigned NUM_W = AVG_LOG2 + 1;
  localparam int unsigned HALF  = (1 << AVG_LOG2) / 2;

  logic signed [SUM_W-1:0] sum;
  logic        [NUM_W-1:0] num;
  logic        [CNT_W-1:0] first;
  logic                    finish;

  // Unwrap the incoming sample against the first one.
  logic signed [CNT_W+1:0] s_ext, f_ext, p_ext, diff, s_unw;
  logic                    wrap_hi, wrap_lo;
  always_comb begin
    s_ext   = $signed({2'b00, sample});
    f_ext   = $signed({2'b00, (num == '0) ? sample : first});
    p_ext   = $signed({2'b00, sample_period});
    diff    = s_ext - f_ext;
    wrap_hi = (diff <<< 1) >  p_ext;
    wrap_lo = (diff <<< 1) < -p_ext;
    s_unw   = wrap_hi ? s_ext - p_ext : (wrap_lo ? s_ext + p_ext : s_ext);
  end

  // Rounded mean, folded into one period.
  logic signed [SUM_W-1:0] mean, p_sum, folded;
  always_comb begin
    mean   = (sum + $signed(SUM_W'(HALF))) >>> AVG_LOG2;
    p_sum  = $signed(SUM_W'(sample_period));
    folded = mean;
    if (mean < 0)
      folded = mean + p_sum;
    else if (mean >= p_sum)
      folded = mean - p_sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sum       <= '0;
      num       <= '0;
      first     <= '0;
      busy      <= 1'b0;
      finish    <= 1'b0;
      avg       <= '0;
      avg_valid <= 1'b0;
      unwrapped <= 1'b0;
    end else begin
      avg_valid <= 1'b0;
      unwrapped <= 1'b0;
      finish    <= 1'b0;
      if (start) begin
        sum  <= '0;
        num  <= '0;
        busy <= 1'b1;
      end else if (busy && sample_valid) begin
        if (num == '0) first <= sample;
        sum       <= sum + SUM_W'(s_unw);
        unwrapped <= wrap_hi || wrap_lo;
        num       <= num + 1'b1;
        if (num == NUM_W'((1 << AVG_LOG2) - 1)) begin
          busy   <= 1'b0;
          finish <= 1'b1;
        end
      end
      if (finish) begin
        avg       <= CNT_W'(folded);
        avg_valid <= 1'b1;
      end
    end
  end

endmodule
