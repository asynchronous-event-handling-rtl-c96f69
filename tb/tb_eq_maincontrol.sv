// tb_eq_maincontrol: self-checking test of the EQ main control.
// Drives random C-Switch control fields, pops, undos (only where the
// handshake allows them) and FIFO status, and checks wr, rd, un, hold and
// event_av against the acceptance and handshake rules.
module tb_eq_maincontrol;
  import eq_pkg::*;

  logic clk = 0, reset;
  logic csw_dav, pop, undo, empty, full;
  logic [TSLOT_W-1:0] csw_tslot;
  xfr_type_e csw_xfr_type;
  logic wr, rd, un, hold, event_av;
  int checks = 0, failures = 0;
  bit exp_hold = 0;
  int n_acc = 0, n_rej = 0, n_drop = 0, n_epop = 0, n_undo = 0;

  eq_maincontrol dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%0t %s: got %0b want %0b", $time, what, got, want);
    end
  endtask

  initial begin
    bit acc;
    reset = 1; csw_dav = 0; csw_tslot = '0; csw_xfr_type = XFR_REG;
    pop = 0; undo = 0; empty = 1; full = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      expect_eq("hold", hold, exp_hold);
      csw_dav = $urandom_range(1);
      csw_tslot = ($urandom_range(1) == 0) ? EQ_TSLOT : TSLOT_W'($urandom);
      csw_xfr_type = ($urandom_range(1) == 0) ? XFR_QUEUE : xfr_type_e'($urandom_range(3));
      empty = ($urandom_range(3) == 0);
      full = !empty && ($urandom_range(5) == 0);
      undo = exp_hold && ($urandom_range(2) == 0);
      pop = !undo && $urandom_range(1);
      #1;
      acc = csw_dav && (csw_tslot == 3'd6) && (csw_xfr_type == XFR_QUEUE);
      expect_eq("wr", wr, acc && !full);
      expect_eq("rd", rd, pop && !empty);
      expect_eq("un", un, undo);
      expect_eq("event_av", event_av, !empty);
      if (acc && !full) n_acc++;
      if (!acc && csw_dav) n_rej++;
      if (acc && full) n_drop++;
      if (pop && empty) n_epop++;
      if (undo) n_undo++;
      exp_hold = pop && !empty;
    end
    checks++;
    if (n_acc == 0 || n_rej == 0 || n_drop == 0 || n_epop == 0 || n_undo == 0) begin
      failures++;
      $display("coverage: acc %0d rej %0d drop %0d epop %0d undo %0d",
               n_acc, n_rej, n_drop, n_epop, n_undo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
