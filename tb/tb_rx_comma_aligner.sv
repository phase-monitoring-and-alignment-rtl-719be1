// tb_rx_comma_aligner: checks bit-by-bit comma alignment.
//
// A bit stream of 40-bit words is built with a K28.5 comma (alternating
// running disparity) in bits 0..9 of every word and random data elsewhere,
// filtered so that the comma pattern occurs nowhere else in the stream. The
// aligner receives the stream cut into words at a random bit offset. It must
// lock after at most one full sweep of slips, slip to the offset that puts the
// comma at bit 0 (40 - offset, modulo 40), and then output the original words.
// The offset is then changed (a link restart): the aligner must lose lock after
// LOSS_THR words, realign, and output the words again.
module tb_rx_comma_aligner;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int W = 40;
  localparam int NW = 3000;
  localparam logic [9:0] K285 = 10'b0101111100;

  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] din = '0, dout;
  logic aligned;
  logic [5:0] slip;
  logic [15:0] slips;
  int checks = 0, failures = 0;

  always #2000 clk = ~clk;

  rx_comma_aligner #(.W(W)) dut (
    .clk(clk), .rst(rst), .data_in(din), .data_out(dout), .aligned(aligned),
    .slip(slip), .slips(slips));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] words [NW];
  bit stream [NW * W];

  function automatic bit comma_at(input int b);
    logic [9:0] f;
    for (int k = 0; k < 10; k++) f[k] = stream[b + k];
    return (f == K285) || (f == ~K285);
  endfunction

  initial begin
    // build words
    for (int i = 0; i < NW; i++) begin
      words[i] = {$urandom, $urandom};
      words[i][9:0] = (i % 2) ? ~K285 : K285;
      for (int k = 0; k < W; k++) stream[i * W + k] = words[i][k];
    end
    // remove false commas: re-draw data bits that create one
    for (int pass = 0; pass < 20; pass++) begin
      int bad = 0;
      for (int b = 0; b + 10 <= NW * W; b++) begin
        if ((b % W) != 0 && comma_at(b)) begin
          int wi = b / W;
          bad++;
          words[wi][W-1:10] = {$urandom, $urandom};
          for (int k = 10; k < W; k++) stream[wi * W + k] = words[wi][k];
        end
      end
      if (bad == 0) break;
    end
  end

  // Feed the stream at bit offset off starting at word index start.
  int off = 0, widx = 0;
  task automatic feed_word();
    for (int k = 0; k < W; k++) din[k] = stream[widx * W + off + k];
    widx++;
  endtask

  task automatic align_and_check(input string tag, input int n_check);
    int n = 0, match = 0, first = -1;
    while (!aligned && n < 2 * W + 10) begin feed_word(); @(negedge clk); n++; end
    check(aligned, $sformatf("%s: locked after %0d words", tag, n));
    check(int'(slip) == (W - off) % W, $sformatf("%s: slip %0d expected %0d", tag, slip, (W - off) % W));
    // output words must be the original words, in order
    for (int i = 0; i < n_check; i++) begin
      feed_word();
      @(negedge clk);
      if (first < 0) begin
        for (int c = 0; c < NW; c++) if (words[c] == dout) begin first = c; break; end
        check(first >= 0, {tag, ": output word is a transmitted word"});
      end else begin
        first++;
        if (first < NW) check(dout == words[first], $sformatf("%s: word %0d", tag, first));
      end
    end
    check(aligned, {tag, ": still locked"});
  endtask

  initial begin
    int s0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    off = 13;
    align_and_check("offset 13", 200);
    // link restart with a new offset
    s0 = int'(slips);
    off = 31;
    widx = widx + 1;
    begin
      int n = 0;
      while (aligned && n < 20) begin feed_word(); @(negedge clk); n++; end
      check(!aligned && n >= 4 && n <= 6, $sformatf("lock lost after %0d words", n));
    end
    align_and_check("offset 31", 200);
    check(int'(slips) > s0, "slipped again after the restart");
    off = 0;
    widx = widx + 1;
    while (aligned) begin feed_word(); @(negedge clk); end
    align_and_check("offset 0", 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
