// ui_aligner_fsm: the UI alignment controller of the TX phase aligner.
//
// After every transmitter reset the serializer's parallel clock XCLK, and
// with it the transmitted data, lands a whole number n of unit intervals (UI)
// away from where it was relative to the reference clock TxRef. This
// controller finds n and undoes it with the transmitter phase interpolator,
// which moves XCLK and the data in steps of UI/PI_STEPS_PER_UI.
//
// Sequence: when enabled and the transceiver reports TX reset done, the
// controller discards SETTLE_SAMPLES raw DDMTD samples, starts an averaged
// measurement, converts the averaged count into PI steps,
//   phase_steps = round(avg * XCLK_UI * PI_STEPS_PER_UI / period),
// takes the circular difference err to target_steps (within half an XCLK
// period), and rounds it to whole UI: n = round(err / PI_STEPS_PER_UI). If
// n = 0 the transmitter is aligned (LOCKED); otherwise it requests
// |n| * PI_STEPS_PER_UI single PI steps (down for a late XCLK, up for an early
// one) and measures again. In LOCKED the phase keeps being measured; a change
// of n then clears aligned and, if auto_realign is set, starts a new
// correction. After MAX_ITER corrections without reaching n = 0, fail is set
// and the controller waits for the next TX reset or a toggle of enable.
//
// Interface: all inputs are synchronous to clk (the DDMTD offset clock).
// target_steps is the wanted XCLK-TxRef phase in PI steps, 0 to
// XCLK_UI*PI_STEPS_PER_UI-1; it is a calibration value of the installation
// (e.g. the phase found at the first alignment). pi_step_req is a one-cycle
// request answered by a one-cycle pi_step_done.
// What follows the aligner concept: DDMTD measurement of XCLK against TxRef,
// correction by n x 64 PI steps. The settle count, rounding, the iteration
// limit, the monitoring behaviour and the step direction are choices of this
// design.
module ui_aligner_fsm
  import ui_aligner_pkg::*;
#(
  parameter int unsigned CNT_W           = 16,
  parameter int unsigned PI_STEPS_PER_UI = 64,
  parameter int unsigned XCLK_UI         = 40,
  parameter int unsigned SETTLE_SAMPLES  = 2,
  parameter int unsigned MAX_ITER        = 8,
  parameter int unsigned STAT_W          = 16,
  localparam int unsigned PERIOD_STEPS   = XCLK_UI * PI_STEPS_PER_UI,
  localparam int unsigned STEP_W         = $clog2(PERIOD_STEPS) + 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enable,
  input  logic                     tx_resetdone,
  input  logic                     auto_realign,
  input  logic [STEP_W-1:0]        target_steps,
  // DDMTD
  output logic                     avg_start,
  input  logic [CNT_W-1:0]         avg,
  input  logic                     avg_valid,
  input  logic [CNT_W-1:0]         period,
  input  logic                     phase_valid,
  // PI stepping
  output logic                     pi_step_req,
  output pi_dir_t                  pi_step_dir,
  input  logic                     pi_step_done,
  // status
  output align_state_t             state,
  output logic                     aligned,
  output logic                     fail,
  output logic [STEP_W-1:0]        phase_steps,
  output logic signed [STEP_W-1:0] ui_offset,
  output logic [STAT_W-1:0]        steps_done,
  output logic [STAT_W-1:0]        realigns,
  output logic [STAT_W-1:0]        corrections
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NUM_W  = CNT_W + STEP_W;
  localparam int unsigned SET_W  = $clog2(SETTLE_SAMPLES + 1);
  localparam int unsigned IT_W   = $clog2(MAX_ITER + 1);
  localparam int unsigned UI_SH  = $clog2(PI_STEPS_PER_UI);

  // Divider: avg * PERIOD_STEPS / period, rounded.
  logic             div_start, div_busy, div_done;
  logic [NUM_W-1:0] div_num, div_q;
  logic [CNT_W-1:0] div_rem;

  assign div_num = NUM_W'(avg) * NUM_W'(PERIOD_STEPS) + NUM_W'(period >> 1);

  seq_divider #(.NUM_W(NUM_W), .DEN_W(CNT_W)) u_div (
    .clk(clk), .rst(rst), .start(div_start), .dividend(div_num),
    .divisor(period), .quotient(div_q), .remainder(div_rem),
    .busy(div_busy), .done(div_done));

  // Phase in steps, folded into one period, and its whole-UI error.
  logic [STEP_W-1:0]        q_fold;
  logic signed [STEP_W:0]   err;
  logic signed [STEP_W:0]   n_ui;
  logic [STEP_W:0]          n_abs;
  always_comb begin
    q_fold = (div_q >= NUM_W'(PERIOD_STEPS)) ? STEP_W'(div_q - NUM_W'(PERIOD_STEPS))
                                             : STEP_W'(div_q);
    err = $signed({1'b0, q_fold}) - $signed({1'b0, target_steps});
    if (err >= $signed((STEP_W+1)'(PERIOD_STEPS / 2)))
      err = err - $signed((STEP_W+1)'(PERIOD_STEPS));
    else if (err < -$signed((STEP_W+1)'(PERIOD_STEPS / 2)))
      err = err + $signed((STEP_W+1)'(PERIOD_STEPS));
    n_ui  = (err + $signed((STEP_W+1)'(PI_STEPS_PER_UI / 2))) >>> UI_SH;
    n_abs = (n_ui < 0) ? (STEP_W+1)'(-n_ui) : (STEP_W+1)'(n_ui);
  end

  logic [SET_W-1:0]       settle_cnt;
  logic [IT_W-1:0]        iter;
  logic [STEP_W+UI_SH:0]  remaining;
  logic                   outstanding;
  logic                   monitoring;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= AL_IDLE;
      aligned     <= 1'b0;
      fail        <= 1'b0;
      phase_steps <= '0;
      ui_offset   <= '0;
      steps_done  <= '0;
      realigns    <= '0;
      corrections <= '0;
      settle_cnt  <= '0;
      iter        <= '0;
      remaining   <= '0;
      outstanding <= 1'b0;
      monitoring  <= 1'b0;
      avg_start   <= 1'b0;
      div_start   <= 1'b0;
      pi_step_req <= 1'b0;
      pi_step_dir <= PI_UP;
    end else begin
      avg_start   <= 1'b0;
      div_start   <= 1'b0;
      pi_step_req <= 1'b0;
      if (pi_step_done) outstanding <= 1'b0;

      if (!enable || !tx_resetdone) begin
        state      <= AL_IDLE;
        aligned    <= 1'b0;
        monitoring <= 1'b0;
        fail       <= 1'b0;
      end else begin
        unique case (state)
          AL_IDLE: if (!fail) begin
            iter       <= '0;
            settle_cnt <= '0;
            state      <= AL_SETTLE;
          end
          AL_SETTLE: begin
            if (settle_cnt == SET_W'(SETTLE_SAMPLES)) begin
              avg_start <= 1'b1;
              state     <= AL_MEASURE;
            end else if (phase_valid) begin
              settle_cnt <= settle_cnt + 1'b1;
            end
          end
          AL_MEASURE, AL_LOCKED: if (avg_valid) begin
            div_start <= 1'b1;
            state     <= AL_COMPUTE;
          end
          AL_COMPUTE: if (div_done) begin
            phase_steps <= q_fold;
            ui_offset   <= STEP_W'(n_ui);
            if (n_ui == 0) begin
              iter       <= '0;
              aligned    <= 1'b1;
              monitoring <= 1'b1;
              avg_start  <= 1'b1;
              state      <= AL_LOCKED;
            end else if (monitoring && !auto_realign) begin
              aligned   <= 1'b0;
              avg_start <= 1'b1;
              state     <= AL_LOCKED;
            end else if (iter == IT_W'(MAX_ITER)) begin
              aligned <= 1'b0;
              fail    <= 1'b1;
              state   <= AL_IDLE;
            end else begin
              if (monitoring) realigns <= realigns + 1'b1;
              monitoring  <= 1'b0;
              aligned     <= 1'b0;
              iter        <= iter + 1'b1;
              corrections <= corrections + 1'b1;
              remaining   <= (STEP_W+UI_SH+1)'(n_abs) << UI_SH;
              pi_step_dir <= (n_ui > 0) ? PI_DOWN : PI_UP;
              state       <= AL_SHIFT;
            end
          end
          AL_SHIFT: begin
            if (pi_step_done) begin
              steps_done <= steps_done + 1'b1;
              if (remaining == (STEP_W+UI_SH+1)'(1)) begin
                settle_cnt <= '0;
                state      <= AL_SETTLE;
              end
              remaining <= remaining - 1'b1;
            end else if (!outstanding && !pi_step_req) begin
              pi_step_req <= 1'b1;
              outstanding <= 1'b1;
            end
          end
          default: state <= AL_IDLE;
        endcase
      end
    end
  end

  // One PI step outstanding at a time: no new request until the last is done.
  a_step_handshake: assert property (@(posedge clk) disable iff (rst)
    (outstanding && !pi_step_done) |=> !pi_step_req);

endmodule
