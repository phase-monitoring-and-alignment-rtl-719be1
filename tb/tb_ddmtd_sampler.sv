// tb_ddmtd_sampler: checks the DDMTD mixer stage.
//
// TxRef-like input at 239.94 MHz and an offset clock with n = 1024. Checks
// that the output equals the input as sampled SYNC_STAGES offset-clock edges
// earlier, and that the beat period is n offset-clock cycles ((n+1) input
// periods) with a duty cycle near one half.
module tb_ddmtd_sampler;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TIN_PS   = 4167.68;
  localparam real TDMTD_PS = 4171.75;  // TIN * 1025 / 1024
  localparam int  N        = 1024;

  logic clk_dmtd = 1'b0, clk_in = 1'b0, beat;
  int checks = 0, failures = 0;

  always #(TDMTD_PS / 2.0) clk_dmtd = ~clk_dmtd;
  initial begin
    #(1000.0);
    forever #(TIN_PS / 2.0) clk_in = ~clk_in;
  end

  ddmtd_sampler #(.SYNC_STAGES(2)) dut (.clk_dmtd(clk_dmtd), .clk_in(clk_in), .beat(beat));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: what the input was at each of the last offset-clock edges.
  logic [3:0] hist = '0;
  int cyc = 0, last_rise = -1, last_fall = -1, n_per = 0, n_lat = 0;
  logic beat_q = 1'b0;
  always @(posedge clk_dmtd) begin
    hist <= {hist[2:0], clk_in};
    cyc  <= cyc + 1;
  end
  always @(negedge clk_dmtd) begin
    if (cyc > 4 && n_lat < 4000) begin
      check(beat == hist[1], $sformatf("cycle %0d: beat %0b, input two edges ago %0b", cyc, beat, hist[1]));
      n_lat++;
    end
    if (beat && !beat_q) begin
      if (last_rise >= 0) begin
        check(cyc - last_rise >= N - 1 && cyc - last_rise <= N + 1,
              $sformatf("beat period %0d cycles, expected %0d", cyc - last_rise, N));
        n_per++;
      end
      last_rise = cyc;
    end
    if (!beat && beat_q && last_rise >= 0) begin
      check(cyc - last_rise >= N / 2 - 2 && cyc - last_rise <= N / 2 + 2,
            $sformatf("beat high for %0d cycles, expected %0d", cyc - last_rise, N / 2));
    end
    beat_q <= beat;
    if (n_per == 5) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (20 * N) @(posedge clk_dmtd);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
