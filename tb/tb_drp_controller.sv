// tb_drp_controller: checks PI stepping by DRP read-modify-write.
//
// A DRP slave with a random 1..5 cycle latency holds the PI register, whose
// 7-bit field sits at bit 3 here (PI_LSB = 3) with other bits set. 300 random
// up/down steps are requested; after each, the field must have moved by one
// code (modulo 128), the other bits must be unchanged, pi_code must match,
// exactly one read and one write must have been made, no access may start
// while one is outstanding, and the step must take 2 * latency + 4 cycles
// (latency: cycles from the DRP strobe to rdy).
// Finally the slave stops answering: the step must end after TIMEOUT cycles
// with error set and the register untouched.
module tb_drp_controller;
  timeunit 1ps;
  timeprecision 1fs;
  import ui_aligner_pkg::*;

  localparam logic [9:0] ADDR = 10'h09C;
  localparam int TO = 16;

  logic clk = 1'b0, rst = 1'b1, req = 1'b0;
  pi_dir_t dir = PI_UP;
  logic done, busy, error;
  logic [6:0] pi_code;
  drp_req_t drp_req;
  drp_rsp_t drp_rsp;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  drp_controller #(.PI_ADDR(ADDR), .PI_LSB(3), .PI_W(7), .STEP(1), .TIMEOUT(TO)) dut (
    .clk(clk), .rst(rst), .step_req(req), .step_dir(dir), .step_done(done),
    .busy(busy), .pi_code(pi_code), .error(error), .drp_req(drp_req), .drp_rsp(drp_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DRP slave.
  logic [15:0] reg_pi = 16'hA000 | (16'h25 << 3) | 16'h0005;
  int lat = 2, pend = 0, n_rd = 0, n_wr = 0, bad = 0;
  logic mute = 1'b0;
  logic [15:0] rdata;
  always @(posedge clk) begin
    drp_rsp.rdy <= 1'b0;
    if (pend > 0) begin
      pend = pend - 1;
      if (pend == 0 && !mute) begin
        drp_rsp.rdy  <= 1'b1;
        drp_rsp.dout <= rdata;
      end
    end
    if (drp_req.en) begin
      if (pend > 0 || drp_req.addr != ADDR) bad++;
      pend = lat;
      if (drp_req.we) begin reg_pi = drp_req.di; n_wr++; end
      else begin rdata = reg_pi; n_rd++; end
    end
  end

  initial begin
    logic [6:0] ref_code;
    int t0, rd0, wr0;
    drp_rsp = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    ref_code = 7'h25;
    for (int k = 0; k < 300; k++) begin
      lat = 1 + $urandom_range(4);
      dir = (k < 80) ? PI_UP : (k < 160) ? PI_DOWN : pi_dir_t'($urandom_range(1));
      ref_code = (dir == PI_UP) ? ref_code + 7'd1 : ref_code - 7'd1;
      rd0 = n_rd; wr0 = n_wr;
      req = 1'b1; t0 = 0;
      @(negedge clk);
      req = 1'b0;
      while (!done && t0 < 100) begin @(negedge clk); t0++; end
      check(done, $sformatf("step %0d done", k));
      // slave answers lat+1 cycles after the strobe; controller adds 4
      check(t0 == 2 * (lat + 1) + 4, $sformatf("step %0d: done %0d cycles after request, expected %0d",
                                        k, t0, 2 * (lat + 1) + 4));
      check(reg_pi[9:3] == ref_code, $sformatf("step %0d: field %0h expected %0h", k, reg_pi[9:3], ref_code));
      check(reg_pi[15:10] == 6'b101000 && reg_pi[2:0] == 3'd5, $sformatf("step %0d: other bits %04h", k, reg_pi));
      check(pi_code == ref_code, $sformatf("step %0d: pi_code %0h", k, pi_code));
      check(n_rd == rd0 + 1 && n_wr == wr0 + 1, $sformatf("step %0d: one read and one write", k));
      check(!error, "no error");
      @(negedge clk);
    end
    check(bad == 0, $sformatf("%0d bad DRP accesses", bad));
    // timeout
    mute = 1'b1;
    begin
      automatic logic [15:0] reg_before = reg_pi;
      req = 1'b1; t0 = 0;
      @(negedge clk);
      req = 1'b0;
      while (!done && t0 < 200) begin @(negedge clk); t0++; end
      check(done && error, "timeout ends the step with error");
      check(t0 >= TO && t0 <= TO + 4, $sformatf("timeout after %0d cycles", t0));
      check(reg_pi == reg_before, "register untouched on timeout");
    end
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
