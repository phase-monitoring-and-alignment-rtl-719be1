// tb_ddmtd_deglitcher: checks glitch removal on a synthetic beat.
//
// The stimulus is a slow square wave whose every edge is preceded by a burst
// of random short pulses (each shorter than GLITCH_THR cycles). Expected
// behaviour: exactly one rise pulse per rising edge of the wave, GLITCH_THR-1
// cycles after the last raw transition of the burst (the sample that
// completes GLITCH_THR equal samples), clean following the wave, and every
// short pulse counted as rejected.
module tb_ddmtd_deglitcher;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int THR  = 8;
  localparam int LEN  = 12000;

  logic clk = 1'b0, rst = 1'b1, beat = 1'b0;
  logic clean, rise;
  logic [15:0] glitches;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  ddmtd_deglitcher #(.GLITCH_THR(THR), .GCNT_W(16)) dut (
    .clk(clk), .rst(rst), .beat(beat), .clean(clean), .rise(rise), .glitches(glitches));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit stim   [LEN];
  bit exp_r  [LEN];   // rise expected after the edge sampling stim[i]
  bit exp_c  [LEN];   // clean expected after that edge
  int exp_glitches = 0, exp_rises = 0;

  // Build the stimulus: stable stretches of 100..300 cycles; before each
  // level change a burst of 1..4 pulses of 1..THR-1 cycles.
  initial begin
    int i = 0, lvl = 0;
    while (i < LEN) begin
      int stable = 100 + $urandom_range(200);
      for (int k = 0; k < stable && i < LEN; k++) begin
        stim[i] = bit'(lvl); exp_c[i] = bit'(lvl); exp_r[i] = 1'b0; i++;
      end
      // burst
      begin
        int np = 1 + $urandom_range(3);
        for (int p = 0; p < np; p++) begin
          int w  = 1 + $urandom_range(THR - 2);
          int gp = 1 + $urandom_range(THR - 2);
          for (int k = 0; k < w && i < LEN; k++) begin
            stim[i] = bit'(!lvl); exp_c[i] = bit'(lvl); exp_r[i] = 1'b0; i++;
          end
          for (int k = 0; k < gp && i < LEN; k++) begin
            stim[i] = bit'(lvl); exp_c[i] = bit'(lvl); exp_r[i] = 1'b0; i++;
          end
          if (i < LEN) exp_glitches++;
        end
      end
      lvl = 1 - lvl;
      // the new level: accepted on its THR-th sample
      for (int k = 0; k < THR && i < LEN; k++) begin
        stim[i]  = bit'(lvl);
        exp_c[i] = (k == THR - 1) ? bit'(lvl) : bit'(1 - lvl);
        exp_r[i] = (k == THR - 1) && (lvl == 1);
        if (exp_r[i]) exp_rises++;
        i++;
      end
    end
  end

  int idx = -1, rises = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < LEN; k++) begin
      beat = stim[k];
      @(posedge clk);
      @(negedge clk);
      check(rise == exp_r[k], $sformatf("sample %0d: rise %0b expected %0b", k, rise, exp_r[k]));
      check(clean == exp_c[k], $sformatf("sample %0d: clean %0b expected %0b", k, clean, exp_c[k]));
      if (rise) rises++;
    end
    check(rises == exp_rises, $sformatf("%0d rises, expected %0d", rises, exp_rises));
    check(int'(glitches) == exp_glitches,
          $sformatf("%0d glitches counted, expected %0d", glitches, exp_glitches));
    $display("rises %0d, glitches %0d", rises, glitches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LEN + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
