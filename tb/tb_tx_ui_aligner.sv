// tb_tx_ui_aligner: end-to-end test of the TX UI aligner at its default
// parameters, against the behavioural transceiver model gt_tx_model.
//
// Clocks: TxRef at 240.31 MHz (period 4161.282 ps, UI = period/40) and the
// DDMTD offset clock 0.254 ps slower per cycle, which gives n = 16383 and a
// resolution of 0.254 ps per count. Both TxRef and XCLK edges carry +/-1 ps
// of uniform jitter, so the deglitchers see glitch bursts.
//
// Sequence: several TX resets, each of which moves XCLK by a random number of
// UI; after each the aligner must lock with the transceiver's true XCLK phase
// identical to the one of the first lock (determinism), the measured phase
// within half a UI of the target, every correction a multiple of 64 PI steps,
// and the femtosecond phase output matching the true delay. Then, while
// locked, whole-UI jumps are injected without a reset: one with automatic
// realignment on (must realign), one with it off (must drop aligned and hold),
// after which realignment is switched back on (must realign). Each mechanism
// (glitch rejection, phase unwrapping, PI steps up and down, correction,
// lock, realignment, monitoring drop) is counted and must have occurred.
// The receiver-side comma aligner, fed a comma-framed stream cut at a bit
// offset of 7, must slip to 33 and deliver the framed words.
module tb_tx_ui_aligner;
  timeunit 1ps;
  timeprecision 1fs;
  import ui_aligner_pkg::*;

  localparam real TIN_PS   = 4161.282;
  localparam real TDMTD_PS = 4161.536;
  localparam real UI_PS    = TIN_PS / 40.0;
  localparam real JIT_PS   = 1.0;
  localparam int  P        = 40 * 64;
  localparam int  N_RESETS = 4;
  localparam logic [12:0] TARGET = 13'(0);

  logic clk_dmtd = 1'b0, clk_txref = 1'b0, clk_xclk;
  logic rst = 1'b1, tx_reset = 1'b1, tx_resetdone;
  logic enable = 1'b0, auto_realign = 1'b1, drp_mute = 1'b0;
  drp_req_t drp_req;
  drp_rsp_t drp_rsp;

  align_state_t      state;
  logic              aligned, fail, drp_error;
  logic [15:0]       phase_cnt, period_cnt;
  logic              phase_cnt_valid, phase_fs_valid, unwrapped;
  logic [31:0]       phase_fs;
  logic [12:0]       phase_steps;
  logic signed [12:0] ui_offset;
  logic [6:0]        pi_code;
  logic [15:0]       steps_done, realigns, corrections, glitches_ref, glitches_xclk;

  int checks = 0, failures = 0;

  // Clocks.
  always #(TDMTD_PS / 2.0) clk_dmtd = ~clk_dmtd;
  initial begin
    forever begin
      automatic real j = JIT_PS * (real'($urandom_range(2000)) / 1000.0 - 1.0);
      #(TIN_PS / 2.0 + j) clk_txref = 1'b1;
      #(TIN_PS / 2.0 - j) clk_txref = 1'b0;
    end
  end

  tx_ui_aligner dut (
    .clk_dmtd(clk_dmtd), .rst(rst), .clk_txref(clk_txref), .clk_xclk(clk_xclk),
    .tx_resetdone(tx_resetdone), .enable(enable), .auto_realign(auto_realign),
    .target_steps(TARGET), .drp_req(drp_req), .drp_rsp(drp_rsp),
    .state(state), .aligned(aligned), .fail(fail), .drp_error(drp_error),
    .phase_cnt(phase_cnt), .phase_cnt_valid(phase_cnt_valid),
    .period_cnt(period_cnt), .phase_fs(phase_fs), .phase_fs_valid(phase_fs_valid),
    .phase_steps(phase_steps), .ui_offset(ui_offset), .pi_code(pi_code),
    .steps_done(steps_done), .realigns(realigns), .corrections(corrections),
    .glitches_ref(glitches_ref), .glitches_xclk(glitches_xclk),
    .unwrapped(unwrapped),
    .clk_rx(clk_txref), .rst_rx(rst), .rx_data_raw(rx_raw), .rx_data(rx_data),
    .rx_aligned(rx_aligned), .rx_slip(rx_slip), .rx_slips(rx_slips));

  // Receiver side: words with a K28.5 comma (alternating disparity) in bits
  // 0..9 and alternating 1010 data, which cannot form a false comma, cut at
  // bit offset 7.
  localparam logic [9:0] K285 = 10'b0101111100;
  logic [39:0] rx_raw = '0, rx_data;
  logic        rx_aligned;
  logic [5:0]  rx_slip;
  logic [15:0] rx_slips;
  logic [79:0] rx_pair;
  int rx_n = 0, rx_good = 0, rx_bad = 0;
  function automatic logic [39:0] rx_word(input int i);
    return {30'h2AAAAAAA, (i % 2) ? ~K285 : K285};
  endfunction
  always @(posedge clk_txref) begin
    rx_pair = {rx_word(rx_n + 1), rx_word(rx_n)};
    rx_raw <= rx_pair[7 +: 40];
    rx_n++;
    if (rx_aligned) begin
      if (rx_data == rx_word(0) || rx_data == rx_word(1)) rx_good++; else rx_bad++;
    end
  end

  gt_tx_model #(
    .UI_PS(UI_PS), .XCLK_UI(40), .PI_STEPS_PER_UI(64), .BASE_PS(3.0 * UI_PS + 0.3),
    .JIT_PS(JIT_PS), .PI_ADDR(10'h09C), .PI_LSB(0), .PI_W(7), .DRP_LAT(3)
  ) gt (
    .clk_txref(clk_txref), .tx_reset(tx_reset), .tx_resetdone(tx_resetdone),
    .clk_xclk(clk_xclk), .drp_clk(clk_dmtd), .drp_req(drp_req),
    .drp_rsp(drp_rsp), .drp_mute(drp_mute));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters.
  int n_unwrap = 0, n_up = 0, n_down = 0, n_lock = 0, n_drop = 0;
  logic aligned_q = 1'b0;
  always @(posedge clk_dmtd) begin
    n_up   = int'(gt.n_up);
    n_down = int'(gt.n_down);
    if (unwrapped) n_unwrap++;
    if (aligned && !aligned_q) n_lock++;
    if (!aligned && aligned_q && state == AL_LOCKED) n_drop++;
    aligned_q <= aligned;
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk_dmtd);
  endtask

  // Wait for aligned to drop after an injected jump.
  task automatic wait_unaligned();
    int n = 0;
    while (aligned && n < 2_000_000) begin @(posedge clk_dmtd); n++; end
    if (aligned) begin
      checks++;
      failures++;
      $display("FAIL: injected jump not detected");
      finish_now();
    end
  endtask

  task automatic finish_now();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // Wait for aligned; on a timeout there is no point in going on.
  task automatic wait_aligned(output bit ok);
    int n = 0;
    ok = 1'b0;
    while (n < 2_000_000) begin
      @(posedge clk_dmtd);
      n++;
      if (aligned) begin ok = 1'b1; break; end
    end
    if (!ok) begin
      checks++;
      failures++;
      $display("FAIL: no lock within 2000000 cycles (state %0d)", state);
      finish_now();
    end
  endtask

  function automatic int circ(input int d);
    int r = d % P;
    if (r >= P / 2) r -= P;
    if (r < -P / 2) r += P;
    return r;
  endfunction

  int ref_steps = -1;
  int acc_before;
  int steps_before;
  bit ok;

  task automatic check_lock(input string tag);
    real true_fs, err_fs;
    int d;
    check(!fail && !drp_error, {tag, ": no fail or DRP error"});
    // true phase determinism
    if (ref_steps < 0) ref_steps = gt.phase_steps();
    check(gt.phase_steps() == ref_steps,
          $sformatf("%s: true XCLK phase %0d steps, first lock %0d", tag,
                    gt.phase_steps(), ref_steps));
    // measured phase within half a UI of the target
    d = circ(int'(phase_steps) - int'(TARGET));
    check(d >= -32 && d <= 32,
          $sformatf("%s: measured %0d steps vs target %0d", tag, phase_steps, TARGET));
    // correction in whole UI, and PI steps == DRP writes
    check(((gt.pi_accum - acc_before) % 64) == 0,
          $sformatf("%s: PI moved %0d steps, not a multiple of 64", tag,
                    gt.pi_accum - acc_before));
    check(int'(steps_done) == int'(gt.n_writes),
          $sformatf("%s: steps_done %0d vs DRP writes %0d", tag, steps_done, gt.n_writes));
    check(int'(steps_done) - steps_before >= ((gt.pi_accum - acc_before) < 0 ?
          acc_before - gt.pi_accum : gt.pi_accum - acc_before),
          {tag, ": step count covers the PI movement"});
    // period measured as n (single sample, +/-2 ps of jitter is 8 counts)
    check(period_cnt >= 16373 && period_cnt <= 16393,
          $sformatf("%s: beat period %0d, expected 16383", tag, period_cnt));
    // femtosecond output against the true delay (one count ~ 254 fs)
    @(posedge clk_dmtd iff phase_fs_valid);
    true_fs = gt.phase_ps() * 1000.0;
    err_fs  = real'(phase_fs) - true_fs;
    if (err_fs >  TIN_PS * 500.0) err_fs -= TIN_PS * 1000.0;
    if (err_fs < -TIN_PS * 500.0) err_fs += TIN_PS * 1000.0;
    check(err_fs < 12000.0 && err_fs > -12000.0,
          $sformatf("%s: phase_fs %0d vs true %0.0f", tag, phase_fs, true_fs));
    $display("%s: locked, true steps %0d, measured %0d, phase %0d fs, PI code %0d, steps %0d",
             tag, gt.phase_steps(), phase_steps, phase_fs, pi_code, steps_done);
  endtask

  initial begin
    wait_cycles(10);
    rst = 1'b0;
    enable = 1'b1;
    for (int r = 0; r < N_RESETS; r++) begin
      tx_reset = 1'b1;
      wait_cycles(20);
      tx_reset = 1'b0;
      acc_before   = gt.pi_accum;
      steps_before = int'(steps_done);
      wait_aligned(ok);
      check(ok, $sformatf("reset %0d: aligned (off_ui %0d)", r, gt.off_ui));
      if (ok) check_lock($sformatf("reset %0d (off_ui %0d)", r, gt.off_ui));
    end

    // Jump of +3 UI while locked, automatic realignment on.
    begin
      automatic int ra = int'(realigns);
      acc_before   = gt.pi_accum;
      steps_before = int'(steps_done);
      gt.jump_ui(3);
      wait_unaligned();
      wait_aligned(ok);
      check(ok, "jump +3: realigned");
      check(int'(realigns) == ra + 1, "jump +3: realign counted");
      check(gt.pi_accum - acc_before == -3 * 64, "jump +3: PI moved down by 3 UI");
      if (ok) check_lock("jump +3");
    end

    // Jump of -2 UI with automatic realignment off: aligned must drop and
    // the PI must not move; then switching realignment on corrects it.
    begin
      automatic int sd = int'(steps_done);
      auto_realign = 1'b0;
      acc_before   = gt.pi_accum;
      steps_before = int'(steps_done);
      gt.jump_ui(-2);
      wait_unaligned();
      wait_cycles(2 * 16 * 16384);
      check(!aligned && state == AL_LOCKED, "jump -2, no realign: held unaligned");
      check(ui_offset == -13'sd2, $sformatf("jump -2: ui_offset %0d", ui_offset));
      check(int'(steps_done) == sd, "jump -2, no realign: PI untouched");
      auto_realign = 1'b1;
      wait_aligned(ok);
      check(ok, "jump -2: realigned after switching on");
      check(gt.pi_accum - acc_before == 2 * 64, "jump -2: PI moved up by 2 UI");
      if (ok) check_lock("jump -2");
    end

    $display("mechanisms: glitches ref %0d xclk %0d, unwraps %0d, PI up %0d, down %0d, corrections %0d, locks %0d, realigns %0d, drops %0d",
             glitches_ref, glitches_xclk, n_unwrap, n_up, n_down, corrections,
             n_lock, realigns, n_drop);
    check(glitches_ref > 0 && glitches_xclk > 0, "glitch rejection happened");
    check(n_unwrap > 0, "phase unwrapping happened");
    check(n_up > 0, "PI stepped up");
    check(n_down > 0, "PI stepped down");
    check(corrections > 0, "corrections happened");
    check(n_lock >= N_RESETS + 2, "locks happened");
    check(realigns >= 2, "realignments happened");
    check(n_drop > 0, "monitoring drop happened");
    check(rx_aligned && rx_slip == 6'd33, $sformatf("receiver aligned at slip %0d, expected 33", rx_slip));
    check(rx_slips > 0, "receiver bit slips happened");
    check(rx_good > 1000 && rx_bad == 0, $sformatf("receiver words: %0d good, %0d bad", rx_good, rx_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk_dmtd);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
