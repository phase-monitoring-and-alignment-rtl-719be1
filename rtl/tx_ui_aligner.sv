// tx_ui_aligner: phase monitor and UI aligner for a transceiver transmitter.
//
// A transmitter's data is locked in phase to the serializer parallel clock
// XCLK, but after each TX reset XCLK, and so the data, can sit a different
// whole number of UI away from the reference clock TxRef. This block measures
// the XCLK-TxRef phase with a DDMTD (clocked by clk_dmtd, an offset clock at
// n/(n+1) of the TxRef frequency), and shifts the transmitter's phase
// interpolator through the DRP by n x 64 steps of UI/64 until the phase is
// back at target_steps. It also reports the measured phase in femtoseconds
// for monitoring.
//
// Structure: ddmtd (samplers, deglitchers, counter, averager) ->
// ui_aligner_fsm (conversion to PI steps, decision) -> drp_controller
// (read-modify-write of the PI code) -> DRP ports of the transceiver, plus
// ddmtd_phase_conv on the averaged count. Beside it, with its own clock and
// ports, rx_comma_aligner performs the word alignment a receiver of the link
// does on the comma (the receiver side of the same timing link).
//
// Clocking and reset: all logic, the DRP included, runs on clk_dmtd, with
// rst synchronous to it; clk_txref and clk_xclk are only sampled.
// tx_resetdone comes from the transceiver and is synchronised here with two
// flops. Running the DRP on the offset clock is a choice of this design; the
// DRP clock must then be within the transceiver's DRP frequency limit.
//
// Timing: an averaged measurement takes 2**AVG_LOG2 beat periods of
// (n+1) TxRef cycles each; a UI of correction costs PI_STEPS_PER_UI DRP
// read-modify-writes.
module tx_ui_aligner
  import ui_aligner_pkg::*;
#(
  parameter int unsigned           CNT_W           = 16,
  parameter int unsigned           AVG_LOG2        = 4,
  parameter int unsigned           GLITCH_THR      = 64,
  parameter int unsigned           PI_STEPS_PER_UI = 64,
  parameter int unsigned           XCLK_UI         = 40,
  parameter int unsigned           SETTLE_SAMPLES  = 2,
  parameter int unsigned           MAX_ITER        = 8,
  parameter logic [DRP_ADDR_W-1:0] PI_ADDR         = 10'h09C,
  parameter int unsigned           PI_LSB          = 0,
  parameter int unsigned           PI_W            = 7,
  parameter int unsigned           DRP_TIMEOUT     = 1024,
  parameter real                   F_IN_HZ         = 240.0e6,
  parameter real                   F_DMTD_HZ       = 240.0e6 * 16383.0 / 16384.0,
  localparam int unsigned          STEP_W          = $clog2(XCLK_UI * PI_STEPS_PER_UI) + 1,
  localparam int unsigned          STAT_W          = 16
) (
  input  logic                     clk_dmtd,
  input  logic                     rst,
  input  logic                     clk_txref,
  input  logic                     clk_xclk,
  input  logic                     tx_resetdone,
  input  logic                     enable,
  input  logic                     auto_realign,
  input  logic [STEP_W-1:0]        target_steps,
  // transceiver DRP
  output drp_req_t                 drp_req,
  input  drp_rsp_t                 drp_rsp,
  // status
  output align_state_t             state,
  output logic                     aligned,
  output logic                     fail,
  output logic                     drp_error,
  output logic [CNT_W-1:0]         phase_cnt,      // averaged DDMTD count
  output logic                     phase_cnt_valid,
  output logic [CNT_W-1:0]         period_cnt,     // beat period (n)
  output logic [31:0]              phase_fs,       // averaged phase in fs
  output logic                     phase_fs_valid,
  output logic [STEP_W-1:0]        phase_steps,    // phase in PI steps
  output logic signed [STEP_W-1:0] ui_offset,      // last n found
  output logic [PI_W-1:0]          pi_code,
  output logic [STAT_W-1:0]        steps_done,
  output logic [STAT_W-1:0]        realigns,
  output logic [STAT_W-1:0]        corrections,
  output logic [STAT_W-1:0]        glitches_ref,
  output logic [STAT_W-1:0]        glitches_xclk,
  output logic                     unwrapped,
  // receiver word alignment (independent of the transmitter side)
  input  logic                     clk_rx,
  input  logic                     rst_rx,
  input  logic [XCLK_UI-1:0]       rx_data_raw,
  output logic [XCLK_UI-1:0]       rx_data,
  output logic                     rx_aligned,
  output logic [$clog2(XCLK_UI)-1:0] rx_slip,
  output logic [STAT_W-1:0]        rx_slips
);

  timeunit 1ns;
  timeprecision 1ps;

  logic [1:0] rstdone_sync;
  always_ff @(posedge clk_dmtd) begin
    if (rst) rstdone_sync <= '0;
    else     rstdone_sync <= {rstdone_sync[0], tx_resetdone};
  end

  logic             avg_start, avg_busy;
  logic [CNT_W-1:0] raw_phase;
  logic             raw_phase_valid, period_valid;

  ddmtd #(
    .CNT_W(CNT_W), .AVG_LOG2(AVG_LOG2), .GLITCH_THR(GLITCH_THR),
    .SYNC_STAGES(2), .GCNT_W(STAT_W)
  ) u_ddmtd (
    .clk_dmtd(clk_dmtd), .rst(rst), .clk_a(clk_txref), .clk_b(clk_xclk),
    .avg_start(avg_start),
    .phase(raw_phase), .phase_valid(raw_phase_valid),
    .period(period_cnt), .period_valid(period_valid),
    .avg(phase_cnt), .avg_valid(phase_cnt_valid), .avg_busy(avg_busy),
    .unwrapped(unwrapped),
    .glitches_a(glitches_ref), .glitches_b(glitches_xclk));

  ddmtd_phase_conv #(
    .CNT_W(CNT_W), .OUT_W(32), .FRAC_W(16),
    .F_IN_HZ(F_IN_HZ), .F_DMTD_HZ(F_DMTD_HZ)
  ) u_conv (
    .clk(clk_dmtd), .rst(rst), .count(phase_cnt), .in_valid(phase_cnt_valid),
    .phase_fs(phase_fs), .out_valid(phase_fs_valid));

  logic    pi_step_req, pi_step_done, drp_busy;
  pi_dir_t pi_step_dir;

  ui_aligner_fsm #(
    .CNT_W(CNT_W), .PI_STEPS_PER_UI(PI_STEPS_PER_UI), .XCLK_UI(XCLK_UI),
    .SETTLE_SAMPLES(SETTLE_SAMPLES), .MAX_ITER(MAX_ITER), .STAT_W(STAT_W)
  ) u_fsm (
    .clk(clk_dmtd), .rst(rst), .enable(enable),
    .tx_resetdone(rstdone_sync[1]), .auto_realign(auto_realign),
    .target_steps(target_steps),
    .avg_start(avg_start), .avg(phase_cnt), .avg_valid(phase_cnt_valid),
    .period(period_cnt), .phase_valid(raw_phase_valid),
    .pi_step_req(pi_step_req), .pi_step_dir(pi_step_dir),
    .pi_step_done(pi_step_done),
    .state(state), .aligned(aligned), .fail(fail),
    .phase_steps(phase_steps), .ui_offset(ui_offset),
    .steps_done(steps_done), .realigns(realigns), .corrections(corrections));

  drp_controller #(
    .PI_ADDR(PI_ADDR), .PI_LSB(PI_LSB), .PI_W(PI_W), .STEP(1),
    .TIMEOUT(DRP_TIMEOUT)
  ) u_drp (
    .clk(clk_dmtd), .rst(rst), .step_req(pi_step_req), .step_dir(pi_step_dir),
    .step_done(pi_step_done), .busy(drp_busy), .pi_code(pi_code),
    .error(drp_error), .drp_req(drp_req), .drp_rsp(drp_rsp));

  // The receiving end of the same link aligns its parallel words on the
  // comma; its word width equals the XCLK division factor.
  rx_comma_aligner #(.W(XCLK_UI), .STAT_W(STAT_W)) u_rx_align (
    .clk(clk_rx), .rst(rst_rx), .data_in(rx_data_raw), .data_out(rx_data),
    .aligned(rx_aligned), .slip(rx_slip), .slips(rx_slips));

endmodule
