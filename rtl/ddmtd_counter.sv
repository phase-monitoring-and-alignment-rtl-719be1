// ddmtd_counter: the digital counter of the DDMTD phase detector.
//
// A free-running counter in the offset clock domain is captured on every edge
// pulse of the reference channel (pulse_a, TxRef) and of the measured channel
// (pulse_b, XCLK). The phase is the number of offset-clock cycles from the
// latest reference pulse to the measured pulse; the beat period is the number
// of cycles between two successive reference pulses, n for an offset clock at
// n/(n+1) of the input frequency. The counter wraps modulo 2**CNT_W, so the
// differences are correct as long as the beat period is below 2**CNT_W.
//
// Outputs (registered): phase with a one-cycle phase_valid per measured pulse
// that follows a reference pulse, and period with period_valid per reference
// pulse after the first. Coincident pulses give phase 0. Measuring the period
// as well as the phase is this design's addition: it lets the averager unwrap
// samples and the aligner convert counts to UI without knowing n.
module ddmtd_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pulse_a,
  input  logic             pulse_b,
  output logic [CNT_W-1:0] phase,
  output logic             phase_valid,
  output logic [CNT_W-1:0] period,
  output logic             period_valid
);

  timeunit 1ns;
  timeprecision 1ps;

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] t_a;
  logic             have_a;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt          <= '0;
      t_a          <= '0;
      have_a       <= 1'b0;
      phase        <= '0;
      phase_valid  <= 1'b0;
      period       <= '0;
      period_valid <= 1'b0;
    end else begin
      cnt          <= cnt + 1'b1;
      phase_valid  <= 1'b0;
      period_valid <= 1'b0;
      if (pulse_a) begin
        t_a    <= cnt;
        have_a <= 1'b1;
        if (have_a) begin
          period       <= cnt - t_a;
          period_valid <= 1'b1;
        end
      end
      if (pulse_b && (have_a || pulse_a)) begin
        phase       <= pulse_a ? '0 : cnt - t_a;
        phase_valid <= 1'b1;
      end
    end
  end

endmodule
