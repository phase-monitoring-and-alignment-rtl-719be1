// tb_ui_aligner_fsm: checks the alignment controller against a numeric plant.
//
// The plant stands in for DDMTD and transceiver: it holds the true XCLK phase
// in PI steps (0 to 2559 for 40 UI of 64 steps), emits a raw-sample strobe
// every 40 cycles, answers avg_start after 8 strobes with the phase as a
// DDMTD count for a beat period of 1000 counts (with +/-3 steps of noise),
// and answers each PI step request after two cycles by moving the phase one
// step. Scenarios: a 7 UI late start (448 steps down); a 13 UI early start
// across the phase wrap (832 steps up); a 5 UI jump while locked with
// automatic realignment; a 1 UI jump with realignment off (aligned must drop,
// PI untouched) then on; a PI that does not move (fail after MAX_ITER
// corrections, cleared by a new TX reset).
module tb_ui_aligner_fsm;
  timeunit 1ps;
  timeprecision 1fs;
  import ui_aligner_pkg::*;

  localparam int P   = 2560;
  localparam int PER = 1000;

  logic clk = 1'b0, rst = 1'b1, enable = 1'b0, resetdone = 1'b0, auto_realign = 1'b1;
  logic [12:0] target = '0;
  logic avg_start, avg_valid = 1'b0, phase_valid = 1'b0;
  logic [15:0] avg = '0;
  logic pi_req, pi_done = 1'b0;
  pi_dir_t pi_dir;
  align_state_t state;
  logic aligned, fail;
  logic [12:0] phase_steps;
  logic signed [12:0] ui_offset;
  logic [15:0] steps_done, realigns, corrections;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  ui_aligner_fsm #(.CNT_W(16), .PI_STEPS_PER_UI(64), .XCLK_UI(40),
                   .SETTLE_SAMPLES(2), .MAX_ITER(4)) dut (
    .clk(clk), .rst(rst), .enable(enable), .tx_resetdone(resetdone),
    .auto_realign(auto_realign), .target_steps(target),
    .avg_start(avg_start), .avg(avg), .avg_valid(avg_valid), .period(16'(PER)),
    .phase_valid(phase_valid), .pi_step_req(pi_req), .pi_step_dir(pi_dir),
    .pi_step_done(pi_done), .state(state), .aligned(aligned), .fail(fail),
    .phase_steps(phase_steps), .ui_offset(ui_offset), .steps_done(steps_done),
    .realigns(realigns), .corrections(corrections));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Plant.
  int ph = 0, n_up = 0, n_down = 0;
  bit stuck = 1'b0;
  int cyc = 0, strobes = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    phase_valid <= (cyc % 40 == 0);
    avg_valid   <= 1'b0;
    if (avg_start) strobes <= 8;
    else if (phase_valid && strobes > 0) strobes <= strobes - 1;
    else if (strobes == 0) begin
      automatic int m = ph + $urandom_range(6) - 3;
      m = ((m % P) + P) % P;
      avg       <= 16'((m * PER + P / 2) / P % PER);
      avg_valid <= 1'b1;
      strobes   <= -1;
    end
  end
  always @(posedge clk) begin
    pi_done <= 1'b0;
    if (pi_req && !rst) begin
      repeat (2) @(posedge clk);
      pi_done <= 1'b1;
      if (!stuck) begin
        if (pi_dir == PI_UP) begin ph = (ph + 1) % P; n_up++; end
        else begin ph = (ph + P - 1) % P; n_down++; end
      end
    end
  end

  function automatic int circ(input int d);
    int r = ((d % P) + P) % P;
    return (r >= P / 2) ? r - P : r;
  endfunction

  task automatic wait_aligned(input string tag);
    int n = 0;
    while (!aligned && n < 200000) begin @(negedge clk); n++; end
    check(aligned, {tag, ": aligned"});
    check(circ(ph - int'(target)) >= -32 && circ(ph - int'(target)) <= 32,
          $sformatf("%s: phase %0d vs target %0d", tag, ph, target));
    check(circ(int'(phase_steps) - ph) >= -4 && circ(int'(phase_steps) - ph) <= 4,
          $sformatf("%s: reported %0d vs true %0d", tag, phase_steps, ph));
    check(ui_offset == 0 && state == AL_LOCKED, {tag, ": locked with n = 0"});
  endtask

  initial begin
    int s0, u0, d0, c0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // 1: 7 UI late
    target = 13'd1000; ph = 1000 + 7 * 64 + 10;
    enable = 1'b1; resetdone = 1'b1;
    wait_aligned("late 7 UI");
    check(steps_done == 16'd448 && n_down == 448 && n_up == 0,
          $sformatf("late 7 UI: %0d steps (%0d down, %0d up), expected 448 down", steps_done, n_down, n_up));
    check(ph == 1010, $sformatf("late 7 UI: final phase %0d expected 1010", ph));
    check(corrections == 16'd1, "late 7 UI: one correction");
    // 2: TX reset, 13 UI early across the wrap
    resetdone = 1'b0;
    repeat (3) @(negedge clk);
    check(state == AL_IDLE && !aligned, "reset: idle and not aligned");
    target = 13'd50; ph = ((50 - 13 * 64 - 20) % P + P) % P;
    s0 = int'(steps_done); u0 = n_up;
    resetdone = 1'b1;
    wait_aligned("early 13 UI");
    check(int'(steps_done) - s0 == 832 && n_up - u0 == 832,
          $sformatf("early 13 UI: %0d steps, expected 832 up", int'(steps_done) - s0));
    check(ph == 30, $sformatf("early 13 UI: final phase %0d expected 30", ph));
    // 3: jump of +5 UI while locked, auto realign
    s0 = int'(steps_done); d0 = n_down;
    ph = (ph + 5 * 64) % P;
    while (aligned) @(negedge clk);
    wait_aligned("jump +5");
    check(realigns == 16'd1, "jump +5: realign counted");
    check(int'(steps_done) - s0 == 320 && n_down - d0 == 320, "jump +5: 320 steps down");
    // 4: jump of -1 UI, auto realign off
    auto_realign = 1'b0;
    s0 = int'(steps_done);
    ph = (ph + P - 64) % P;
    while (aligned) @(negedge clk);
    repeat (3 * 400) @(negedge clk);
    check(!aligned && state == AL_LOCKED && ui_offset == -13'sd1,
          $sformatf("jump -1, no realign: held, n = %0d", ui_offset));
    check(int'(steps_done) == s0, "jump -1, no realign: no steps");
    auto_realign = 1'b1;
    wait_aligned("jump -1");
    check(int'(steps_done) - s0 == 64, "jump -1: 64 steps");
    check(realigns == 16'd2, "jump -1: realign counted");
    // 5: PI stuck
    stuck = 1'b1;
    c0 = int'(corrections);
    ph = (ph + 3 * 64) % P;
    begin
      int n = 0;
      while (!fail && n < 200000) begin @(negedge clk); n++; end
    end
    check(fail && !aligned, "stuck PI: fail");
    check(int'(corrections) - c0 == 4, $sformatf("stuck PI: %0d corrections, expected 4",
                                                int'(corrections) - c0));
    repeat (50) @(negedge clk);
    check(fail && state == AL_IDLE, "stuck PI: waits in idle");
    stuck = 1'b0;
    resetdone = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(!fail, "fail cleared by TX reset");
    resetdone = 1'b1;
    wait_aligned("after fail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
