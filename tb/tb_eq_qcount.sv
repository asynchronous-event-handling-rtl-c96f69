// tb_eq_qcount: self-checking test of the EQ occupancy counter.
// Drives legal random mixes of write, pop, undo and hold, with the watermark
// changed now and then, and compares count, empty, full and wmark with a
// reference count kept in the testbench.
module tb_eq_qcount;
  localparam int unsigned QSIZE = 192;
  localparam int unsigned CNT_W = 8;

  logic clk = 0, reset, wr, rd, un, hold, empty, full, wmark;
  logic [CNT_W-1:0] watermark, qsize, count;
  int checks = 0, failures = 0;
  int model = 0;
  int n_wmark = 0, n_full = 0;

  eq_qcount #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  initial begin
    qsize = CNT_W'(QSIZE);
    watermark = CNT_W'(QSIZE - 32);
    reset = 1; wr = 0; rd = 0; un = 0; hold = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 20000; n++) begin
      int phase;
      @(negedge clk);
      // Compare the state reached so far.
      expect_eq("count", int'(count), model);
      expect_eq("empty", int'(empty), int'(model == 0));
      expect_eq("wmark", int'(wmark), int'(model >= int'(watermark)));
      // Choose a legal set of operations; bias towards filling, then draining.
      phase = (n / 2500) % 2;
      hold = ($urandom_range(1) == 0);
      #1;
      expect_eq("full", int'(full), int'(model + int'(hold) >= QSIZE));
      if (full) n_full++;
      if (wmark) n_wmark++;
      wr = !full && ($urandom_range(9) < (phase == 0 ? 8 : 3));
      rd = (model > 0) && ($urandom_range(9) < (phase == 0 ? 3 : 8));
      un = hold && !rd && ($urandom_range(3) == 0) && (model + int'(wr) < QSIZE);
      if ($urandom_range(499) == 0) watermark = CNT_W'($urandom_range(QSIZE));
      model = model + int'(wr) + int'(un) - int'(rd);
    end
    checks++;
    if (n_wmark == 0 || n_full == 0) begin
      failures++;
      $display("coverage: wmark %0d full %0d", n_wmark, n_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
