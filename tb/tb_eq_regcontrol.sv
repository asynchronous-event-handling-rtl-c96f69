// tb_eq_regcontrol: self-checking test of the EQ pointer logic.
// Runs legal random writes, pops and undos long enough to wrap both pointers
// several times, and checks that write_addr and read_addr are exactly the
// one-hot codes of reference pointers (write_addr all zero without a write).
module tb_eq_regcontrol;
  localparam int unsigned DEPTH = 192;
  localparam int unsigned CNT_W = 8;

  logic clk = 0, reset, wr, rd, un;
  logic [CNT_W-1:0] qsize;
  logic [DEPTH-1:0] write_addr, read_addr;
  int checks = 0, failures = 0;
  int wptr = 0, rptr = 0, count = 0;
  int wraps_w = 0, wraps_r = 0, undos = 0, undo_wraps = 0;
  bit last_rd = 0;

  eq_regcontrol #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DEPTH-1:0] onehot(int p);
    logic [DEPTH-1:0] v = '0;
    v[p] = 1'b1;
    return v;
  endfunction

  initial begin
    qsize = CNT_W'(DEPTH);
    reset = 1; wr = 0; rd = 0; un = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      un = last_rd && ($urandom_range(2) == 0);
      rd = !un && (count > 0) && ($urandom_range(9) < 5);
      wr = (count + int'(un) < DEPTH - 1) && ($urandom_range(9) < 5);
      #1;
      checks++;
      if (read_addr !== onehot(rptr)) begin
        failures++;
        $display("%0t read_addr %h want pointer %0d", $time, read_addr, rptr);
      end
      checks++;
      if (write_addr !== (wr ? onehot(wptr) : '0)) begin
        failures++;
        $display("%0t write_addr %h want pointer %0d wr %0b", $time, write_addr, wptr, wr);
      end
      if (wr) begin
        wptr = (wptr == DEPTH - 1) ? 0 : wptr + 1;
        if (wptr == 0) wraps_w++;
      end
      if (un) begin
        undos++;
        if (rptr == 0) undo_wraps++;
        rptr = (rptr == 0) ? DEPTH - 1 : rptr - 1;
      end else if (rd) begin
        rptr = (rptr == DEPTH - 1) ? 0 : rptr + 1;
        if (rptr == 0) wraps_r++;
      end
      count = count + int'(wr) + int'(un) - int'(rd);
      last_rd = rd;
    end
    checks++;
    if (wraps_w == 0 || wraps_r == 0 || undos == 0) begin
      failures++;
      $display("coverage: wraps %0d/%0d undos %0d", wraps_w, wraps_r, undos);
    end
    $display("undo across wrap: %0d", undo_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
