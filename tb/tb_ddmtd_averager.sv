// tb_ddmtd_averager: checks averaging, rounding and wrap handling.
//
// Runs of 2**AVG_LOG2 = 8 samples with a beat period of 1000 counts: samples
// spread around a mid-range phase, samples straddling the 0/999 boundary
// (whose mean must be near 0, not near 500), and random runs. The expected
// mean is computed here from the circular distance of each sample to the
// first, rounded half up and folded into [0, 1000). A run whose first sample
// is just above 0 while the others are just below has a negative unwrapped
// mean, which must fold to just below 1000. avg_valid must come two
// cycles after the last sample and samples outside a run must be ignored.
module tb_ddmtd_averager;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int L   = 3;
  localparam int NS  = 1 << L;
  localparam int PER = 1000;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, sv = 1'b0;
  logic [15:0] sample = '0, avg;
  logic avg_valid, busy, unwrapped;
  int checks = 0, failures = 0, n_unwrapped = 0;

  always #2000 clk = ~clk;

  ddmtd_averager #(.CNT_W(16), .AVG_LOG2(L)) dut (
    .clk(clk), .rst(rst), .start(start), .sample(sample), .sample_valid(sv),
    .sample_period(16'(PER)), .avg(avg), .avg_valid(avg_valid), .busy(busy),
    .unwrapped(unwrapped));

  always @(posedge clk) if (unwrapped) n_unwrapped++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int s[NS], input string tag);
    int sum = 0, d, e;
    for (int k = 0; k < NS; k++) begin
      d = s[k] - s[0];
      if (d > PER / 2) d -= PER;
      if (d < -PER / 2) d += PER;
      sum += s[0] + d;
    end
    e = int'($floor(real'(sum) / real'(NS) + 0.5));
    e = ((e % PER) + PER) % PER;
    // a stray sample before start must be ignored
    sample = 16'(333); sv = 1'b1; @(negedge clk); sv = 1'b0;
    start = 1'b1; @(negedge clk); start = 1'b0;
    for (int k = 0; k < NS; k++) begin
      repeat ($urandom_range(3)) @(negedge clk);
      sample = 16'(s[k]); sv = 1'b1;
      @(negedge clk);
      sv = 1'b0;
      check(!avg_valid, {tag, ": early avg_valid"});
    end
    @(negedge clk);
    check(avg_valid, {tag, ": avg_valid two cycles after the last sample"});
    check(int'(avg) == e, $sformatf("%s: avg %0d expected %0d", tag, avg, e));
    @(negedge clk);
    check(!avg_valid && !busy, {tag, ": single avg_valid, not busy"});
  endtask

  initial begin
    int s[NS];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    s = '{500, 502, 497, 499, 503, 501, 498, 500};
    run(s, "mid");
    s = '{998, 2, 999, 1, 997, 3, 996, 0};
    run(s, "wrap low first");
    s = '{3, 998, 1, 997, 2, 999, 4, 996};
    run(s, "wrap high later");
    s = '{990, 995, 992, 996, 994, 991, 993, 997};
    run(s, "near top");
    s = '{1, 995, 996, 997, 998, 999, 0, 2};
    run(s, "negative mean");
    for (int r = 0; r < 40; r++) begin
      int c = $urandom_range(PER - 1);
      for (int k = 0; k < NS; k++) s[k] = (c + PER + $urandom_range(20) - 10) % PER;
      run(s, $sformatf("random %0d", r));
    end
    for (int r = 0; r < 20; r++) begin
      int c = (PER + $urandom_range(12) - 6) % PER;
      for (int k = 0; k < NS; k++) s[k] = (c + PER + $urandom_range(20) - 10) % PER;
      run(s, $sformatf("random at 0, %0d", r));
    end
    check(n_unwrapped > 0, "unwrapping happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
