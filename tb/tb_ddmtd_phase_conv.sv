// tb_ddmtd_phase_conv: checks the count-to-femtosecond conversion.
//
// With the default clocks (240 MHz input, offset clock at 16383/16384 of it)
// one count is 1e15 * (f_in - f_dmtd) / (f_in * f_dmtd) = 254.31 fs. Random
// counts and the extremes are converted and compared with that product
// computed here in real arithmetic (within 2 fs, the fixed-point error), and
// the output must follow the input by one cycle.
module tb_ddmtd_phase_conv;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real FIN  = 240.0e6;
  localparam real FD   = 240.0e6 * 16383.0 / 16384.0;
  localparam real FSPC = 1.0e15 * (FIN - FD) / (FIN * FD);

  logic clk = 1'b0, rst = 1'b1, iv = 1'b0;
  logic [15:0] count = '0;
  logic [31:0] phase_fs;
  logic ov;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  ddmtd_phase_conv dut (.clk(clk), .rst(rst), .count(count), .in_valid(iv),
                        .phase_fs(phase_fs), .out_valid(ov));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real e;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      count = (k == 0) ? 16'd0 : (k == 1) ? 16'd1 : (k == 2) ? 16'hFFFF : (k == 3) ? 16'd16383
                                                  : 16'($urandom_range(65535));
      iv = 1'b1;
      e  = real'(count) * FSPC;
      @(negedge clk);
      iv = 1'b0;
      check(ov, "out_valid one cycle after in_valid");
      check(real'(phase_fs) > e - 2.0 && real'(phase_fs) < e + 2.0,
            $sformatf("count %0d: %0d fs, expected %0.1f", count, phase_fs, e));
      @(negedge clk);
      check(!ov, "single out_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
