// tb_eq_progreg: self-checking test of the watermark and qsize registers.
// Checks the reset value, the constant qsize, and loading new watermark
// values through the diagnostic chain (LSB first), including the bits that
// come out on diag_so.
module tb_eq_progreg;
  localparam int unsigned QSIZE = 192;
  localparam int unsigned CNT_W = 8;

  logic clk = 0, reset, diag_shift, diag_si, diag_so;
  logic [CNT_W-1:0] watermark, qsize;
  int checks = 0, failures = 0;

  eq_progreg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    logic [CNT_W-1:0] old_val, new_val, shifted_out;
    reset = 1; diag_shift = 0; diag_si = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    expect_eq("reset watermark", int'(watermark), QSIZE - 32);
    expect_eq("qsize", int'(qsize), QSIZE);
    for (int n = 0; n < 20; n++) begin
      old_val = watermark;
      new_val = CNT_W'($urandom_range(QSIZE));
      for (int b = 0; b < CNT_W; b++) begin
        @(negedge clk);
        diag_shift = 1; diag_si = new_val[b];
        #1 shifted_out[b] = diag_so;
      end
      @(negedge clk);
      diag_shift = 0;
      expect_eq("shifted watermark", int'(watermark), int'(new_val));
      expect_eq("diag_so stream", int'(shifted_out), int'(old_val));
      // Holding diag_shift low keeps the value.
      repeat (3) @(negedge clk);
      expect_eq("held watermark", int'(watermark), int'(new_val));
      expect_eq("qsize constant", int'(qsize), QSIZE);
    end
    @(negedge clk); reset = 1;
    @(negedge clk); reset = 0;
    expect_eq("watermark after second reset", int'(watermark), QSIZE - 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
