// tb_ddmtd_counter: checks phase and period counting, with counter wrap.
//
// A 12-bit counter (wrapping every 4096 cycles) receives reference pulses
// every PER cycles and measured pulses at an offset d that changes every
// period, coincident pulses (d = 0) included. Each measured pulse must give
// phase = d one cycle later, and each reference pulse after the first must
// give period = PER.
module tb_ddmtd_counter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int PER = 1000;
  localparam int NP  = 30;

  logic clk = 1'b0, rst = 1'b1, pa = 1'b0, pb = 1'b0;
  logic [11:0] phase, period;
  logic phase_valid, period_valid;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  ddmtd_counter #(.CNT_W(12)) dut (
    .clk(clk), .rst(rst), .pulse_a(pa), .pulse_b(pb), .phase(phase),
    .phase_valid(phase_valid), .period(period), .period_valid(period_valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int d;
    int nper = 0, nph = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      d = (p % 5 == 0) ? 0 : 1 + $urandom_range(PER - 2);
      for (int c = 0; c < PER; c++) begin
        pa = (c == 0);
        pb = (c == d);
        @(negedge clk);
        pa = 1'b0;
        pb = 1'b0;
        if (c == 0) begin
          check(period_valid == (p > 0), $sformatf("period %0d: period_valid %0b", p, period_valid));
          if (p > 0) begin
            check(period == 12'(PER), $sformatf("period %0d: %0d expected %0d", p, period, PER));
            nper++;
          end
        end
        if (c == d) begin
          check(phase_valid, $sformatf("period %0d: phase_valid missing", p));
          check(phase == 12'(d), $sformatf("period %0d: phase %0d expected %0d", p, phase, d));
          nph++;
        end else begin
          check(!phase_valid, $sformatf("period %0d cycle %0d: stray phase_valid", p, c));
        end
      end
    end
    check(nper == NP - 1 && nph == NP, "all periods measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PER * NP + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
