// tb_eq_regfile: self-checking test of the Event Queue register file.
// Writes random words through one-hot addresses, including cycles with the
// null (all-zero) write address, and reads every entry back through one-hot
// read addresses, comparing with a reference array kept in the testbench.
module tb_eq_regfile;
  localparam int unsigned DEPTH = 192;
  localparam int unsigned WIDTH = 66;

  logic             clk = 0;
  logic [DEPTH-1:0] write_addr, read_addr;
  logic [WIDTH-1:0] data_in, data_out;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic             valid [DEPTH];
  int checks = 0, failures = 0;

  eq_regfile #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd_word();
    return {$urandom, $urandom, $urandom};
  endfunction

  task automatic check_read(int idx);
    read_addr = '0;
    read_addr[idx] = 1'b1;
    #1;
    checks++;
    if (data_out !== ref_mem[idx]) begin
      failures++;
      $display("read mismatch entry %0d: got %h want %h", idx, data_out, ref_mem[idx]);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) valid[i] = 0;
    write_addr = '0; read_addr = '0; data_in = '0;
    // Fill every entry once.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      write_addr = '0; write_addr[i] = 1'b1;
      data_in = rnd_word();
      ref_mem[i] = data_in; valid[i] = 1;
    end
    @(negedge clk);
    write_addr = '0;
    for (int i = 0; i < DEPTH; i++) check_read(i);
    // Random overwrites mixed with null-address cycles.
    for (int n = 0; n < 2000; n++) begin
      int idx;
      @(negedge clk);
      idx = $urandom_range(DEPTH - 1);
      data_in = rnd_word();
      write_addr = '0;
      if ($urandom_range(3) != 0) write_addr[idx] = 1'b1; // else null address
      // Read is combinational and sees the old value before the edge.
      check_read($urandom_range(DEPTH - 1));
      if (write_addr != '0) ref_mem[idx] = data_in;
    end
    @(negedge clk);
    write_addr = '0;
    for (int i = 0; i < DEPTH; i++) check_read(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
