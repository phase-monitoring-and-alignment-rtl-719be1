// ddmtd_phase_conv: converts a DDMTD phase count into femtoseconds.
//
// One count of the DDMTD counter is one offset-clock cycle of the beat, which
// stands for T_dmtd - T_in = (f_in - f_dmtd) / (f_in * f_dmtd) of real time.
// The phase in time is therefore count * (f_in - f_dmtd) / (f_in * f_dmtd),
// the conversion given for the DDMTD; it equals count * T_in / n. The factor
// is worked out at elaboration from the two clock frequencies (real
// parameters) as an unsigned fixed-point constant with FRAC_W fraction bits,
// and applied with one multiplier.
//
// Timing: phase_fs and out_valid follow count and in_valid by one cycle.
// Defaults: 240 MHz input (the 9.6 Gb/s, 240 MHz example) and an offset clock
// with n = 16383; the value of n and the femtosecond output unit are this
// design's choices.
module ddmtd_phase_conv #(
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned OUT_W     = 32,
  parameter int unsigned FRAC_W    = 16,
  parameter real         F_IN_HZ   = 240.0e6,
  parameter real         F_DMTD_HZ = 240.0e6 * 16383.0 / 16384.0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] count,
  input  logic             in_valid,
  output logic [OUT_W-1:0] phase_fs,
  output logic             out_valid
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam real FS_PER_COUNT =
    1.0e15 * (F_IN_HZ - F_DMTD_HZ) / (F_IN_HZ * F_DMTD_HZ);
  localparam longint unsigned SCALE =
    longint'(FS_PER_COUNT * real'(longint'(1) << FRAC_W) + 0.5);
  localparam int unsigned PROD_W = CNT_W + 40;

  logic [PROD_W-1:0] prod;
  assign prod = PROD_W'(count) * PROD_W'(SCALE);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_fs  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) phase_fs <= OUT_W'(prod >> FRAC_W);
    end
  end

endmodule
