// tb_ddmtd: checks the complete DDMTD phase detector on real clocks.
//
// clk_a at 239.94 MHz, an offset clock with n = 1024 (4.07 ps per count), and
// clk_b a copy of clk_a delayed by D with +/-6 ps of uniform jitter on its
// edges, enough to make the samplers produce glitch bursts. For several
// delays, the ones next to the phase wrap included, the averaged count must
// be D * n / T_in within 2 counts (circularly), the measured beat period n
// within 2, and glitches must have been rejected.
module tb_ddmtd;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TIN_PS   = 4167.68;
  localparam real TDMTD_PS = 4171.75;
  localparam int  N        = 1024;
  localparam real JIT_PS   = 6.0;

  logic clk_dmtd = 1'b0, clk_a = 1'b0, clk_b = 1'b0, rst = 1'b1, avg_start = 1'b0;
  logic [15:0] phase, period, avg, ga, gb;
  logic phase_valid, period_valid, avg_valid, avg_busy, unwrapped;
  real D = 1000.0;
  int checks = 0, failures = 0, n_unwrapped = 0;

  always #(TDMTD_PS / 2.0) clk_dmtd = ~clk_dmtd;
  always #(TIN_PS / 2.0) clk_a = ~clk_a;
  always @(posedge clk_a) begin
    automatic real d = D + TIN_PS + JIT_PS * (real'($urandom_range(2000)) / 1000.0 - 1.0);
    fork
      begin
        #(d) clk_b = 1'b1;
        #(TIN_PS / 2.0) clk_b = 1'b0;
      end
    join_none
  end

  ddmtd #(.CNT_W(16), .AVG_LOG2(3), .GLITCH_THR(16)) dut (
    .clk_dmtd(clk_dmtd), .rst(rst), .clk_a(clk_a), .clk_b(clk_b),
    .avg_start(avg_start), .phase(phase), .phase_valid(phase_valid),
    .period(period), .period_valid(period_valid), .avg(avg),
    .avg_valid(avg_valid), .avg_busy(avg_busy), .unwrapped(unwrapped),
    .glitches_a(ga), .glitches_b(gb));

  always @(posedge clk_dmtd) if (unwrapped) n_unwrapped++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real delays[6] = '{1000.0, 2083.84, 3500.0, 4165.0, 2.0, 4160.0};
    repeat (5) @(posedge clk_dmtd);
    rst = 1'b0;
    foreach (delays[i]) begin
      real e, diff;
      D = delays[i];
      repeat (3) @(posedge clk_dmtd iff phase_valid);
      @(negedge clk_dmtd) avg_start = 1'b1;
      @(negedge clk_dmtd) avg_start = 1'b0;
      @(posedge clk_dmtd iff avg_valid);
      e    = D / TIN_PS * real'(N);
      diff = real'(avg) - e;
      if (diff >  N / 2) diff -= N;
      if (diff < -N / 2) diff += N;
      check(diff <= 2.0 && diff >= -2.0,
            $sformatf("D %0.2f ps: avg %0d, expected %0.1f", D, avg, e));
      check(period >= 16'(N - 2) && period <= 16'(N + 2),
            $sformatf("D %0.2f ps: period %0d, expected %0d", D, period, N));
      $display("D %0.2f ps: avg %0d (%0.1f expected), period %0d", D, avg, e, period);
    end
    check(gb > 0, "glitches rejected on the jittered channel");
    check(n_unwrapped > 0, "samples unwrapped next to the phase wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * N) @(posedge clk_dmtd);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
