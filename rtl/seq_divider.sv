// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// start loads dividend and divisor; NUM_W cycles later done pulses for one
// cycle with quotient = dividend / divisor and remainder. busy is high in
// between. A zero divisor gives an all-ones quotient. Used by the aligner to
// turn a phase count into phase-interpolator steps.
module seq_divider #(
  parameter int unsigned NUM_W = 32,
  parameter int unsigned DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NUM_W-1:0] dividend,
  input  logic [DEN_W-1:0] divisor,
  output logic [NUM_W-1:0] quotient,
  output logic [DEN_W-1:0] remainder,
  output logic             busy,
  output logic             done
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IDX_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q;
  logic [DEN_W:0]   r;
  logic [DEN_W-1:0] d;
  logic [IDX_W-1:0] left;
  logic [DEN_W:0]   r_shift;

  assign r_shift = {r[DEN_W-1:0], q[NUM_W-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      q         <= '0;
      r         <= '0;
      d         <= '0;
      left      <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend;
        r    <= '0;
        d    <= divisor;
        left <= IDX_W'(NUM_W);
        busy <= 1'b1;
      end else if (busy) begin
        if (r_shift >= {1'b0, d}) begin
          r <= r_shift - {1'b0, d};
          q <= {q[NUM_W-2:0], 1'b1};
        end else begin
          r <= r_shift;
          q <= {q[NUM_W-2:0], 1'b0};
        end
        left <= left - 1'b1;
        if (left == IDX_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Results hold from done until the next start.
  assign quotient  = q;
  assign remainder = r[DEN_W-1:0];

endmodule
