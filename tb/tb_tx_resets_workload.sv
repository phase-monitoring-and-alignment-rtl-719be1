// tb_tx_resets_workload: repeated TX resets through the whole aligner.
//
// The figure of merit of the method is the spread of the XCLK-TxRef phase
// over many TX resets. This testbench runs N_RESETS resets of the behavioural
// transceiver, each drawing a random UI offset, through tx_ui_aligner at its
// default parameters. To keep the run short the offset clock is set to
// n = 1024 (4.07 ps per count) instead of 16383. After every reset it checks
// that the aligner locks, that the true XCLK phase equals the one after the
// first lock exactly (zero spread in PI steps), and that the measured phase is
// within half a UI of the target. It reports the spread of the averaged
// phase readout (in counts; phase_fs assumes n = 16383 and is not used here),
// the offsets covered and the mean cycles per alignment.
module tb_tx_resets_workload;
  timeunit 1ps;
  timeprecision 1fs;
  import ui_aligner_pkg::*;

  localparam real TIN_PS   = 4167.68;
  localparam real TDMTD_PS = 4171.75;   // n = 1024
  localparam real UI_PS    = TIN_PS / 40.0;
  localparam int  P        = 40 * 64;
  localparam int  N_RESETS = 1000;
  // BASE_PS puts the sub-UI part of the XCLK phase at about 62 of 64 steps.
  // The target is placed on that sub-UI phase, as a phase read back at an
  // earlier lock would be. A target half a UI away would make the choice of
  // UI depend on the measurement noise.
  localparam logic [12:0] TARGET = 13'd1214;

  logic clk_dmtd = 1'b0, clk_txref = 1'b0, clk_xclk;
  logic rst = 1'b1, tx_reset = 1'b1, tx_resetdone;
  drp_req_t drp_req;
  drp_rsp_t drp_rsp;
  align_state_t state;
  logic aligned, fail, drp_error, phase_cnt_valid, phase_fs_valid, unwrapped;
  logic [15:0] phase_cnt, period_cnt, steps_done, realigns, corrections, g_ref, g_xclk;
  logic [31:0] phase_fs;
  logic [12:0] phase_steps;
  logic signed [12:0] ui_offset;
  logic [6:0] pi_code;
  logic [39:0] rx_data;
  logic rx_aligned;
  logic [5:0] rx_slip;
  logic [15:0] rx_slips;
  int checks = 0, failures = 0;

  always #(TDMTD_PS / 2.0) clk_dmtd = ~clk_dmtd;
  initial begin
    forever begin
      automatic real j = real'($urandom_range(2000)) / 1000.0 - 1.0;
      #(TIN_PS / 2.0 + j) clk_txref = 1'b1;
      #(TIN_PS / 2.0 - j) clk_txref = 1'b0;
    end
  end

  tx_ui_aligner dut (
    .clk_dmtd(clk_dmtd), .rst(rst), .clk_txref(clk_txref), .clk_xclk(clk_xclk),
    .tx_resetdone(tx_resetdone), .enable(1'b1), .auto_realign(1'b1),
    .target_steps(TARGET), .drp_req(drp_req), .drp_rsp(drp_rsp),
    .state(state), .aligned(aligned), .fail(fail), .drp_error(drp_error),
    .phase_cnt(phase_cnt), .phase_cnt_valid(phase_cnt_valid),
    .period_cnt(period_cnt), .phase_fs(phase_fs), .phase_fs_valid(phase_fs_valid),
    .phase_steps(phase_steps), .ui_offset(ui_offset), .pi_code(pi_code),
    .steps_done(steps_done), .realigns(realigns), .corrections(corrections),
    .glitches_ref(g_ref), .glitches_xclk(g_xclk), .unwrapped(unwrapped),
    .clk_rx(clk_txref), .rst_rx(rst), .rx_data_raw(40'h0), .rx_data(rx_data),
    .rx_aligned(rx_aligned), .rx_slip(rx_slip), .rx_slips(rx_slips));

  gt_tx_model #(.UI_PS(UI_PS), .XCLK_UI(40), .PI_STEPS_PER_UI(64), .BASE_PS(517.0),
                .JIT_PS(1.0), .DRP_LAT(3)) gt (
    .clk_txref(clk_txref), .tx_reset(tx_reset), .tx_resetdone(tx_resetdone),
    .clk_xclk(clk_xclk), .drp_clk(clk_dmtd), .drp_req(drp_req), .drp_rsp(drp_rsp),
    .drp_mute(1'b0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ref_steps = -1, d, n, covered = 0;
    longint cyc_sum = 0;
    int fs_min = 32'h7fffffff, fs_max = 0;
    bit seen [40];
    foreach (seen[i]) seen[i] = 1'b0;
    repeat (10) @(posedge clk_dmtd);
    rst = 1'b0;
    for (int r = 0; r < N_RESETS && failures == 0; r++) begin
      tx_reset = 1'b1;
      repeat (20) @(posedge clk_dmtd);
      tx_reset = 1'b0;
      if (!seen[gt.off_ui]) begin seen[gt.off_ui] = 1'b1; covered++; end
      n = 0;
      while (!aligned && n < 400_000) begin @(posedge clk_dmtd); n++; end
      cyc_sum += n;
      check(aligned && !fail, $sformatf("reset %0d (offset %0d UI): lock", r, gt.off_ui));
      if (ref_steps < 0) ref_steps = gt.phase_steps();
      check(gt.phase_steps() == ref_steps,
            $sformatf("reset %0d: true phase %0d steps, first lock %0d", r, gt.phase_steps(), ref_steps));
      d = int'(phase_steps) - int'(TARGET);
      check(d >= -32 && d <= 32, $sformatf("reset %0d: measured %0d steps", r, phase_steps));
      @(posedge clk_dmtd iff phase_fs_valid);
      if (int'(phase_cnt) < fs_min) fs_min = int'(phase_cnt);
      if (int'(phase_cnt) > fs_max) fs_max = int'(phase_cnt);
    end
    check(covered >= 30, $sformatf("%0d of 40 UI offsets covered", covered));
    $display("%0d resets: true phase spread 0 steps, readout spread %0d counts (%0.2f ps), %0d offsets, %0d cycles per alignment",
             N_RESETS, fs_max - fs_min, real'(fs_max - fs_min) * TIN_PS / 1024.0, covered,
             int'(cyc_sum / N_RESETS));
    check(fs_max - fs_min <= 2, "averaged readout spread within 2 counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150_000_000) @(posedge clk_dmtd);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
