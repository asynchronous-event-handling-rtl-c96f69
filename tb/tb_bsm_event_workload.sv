// tb_bsm_event_workload: one block-status-miss (BSM) event through the whole
// event path, at default sizes, on the timeline of the reference measurement.
//
// Cycle 0 is the faulting store in EX. Hardware detects the miss at cycle 3
// and streams a four-word packet into the queue from cycle 6 (word 0 carries
// the event type, then address, data, target register). The test checks that
// event_av is high at cycle 7 and that the sleeping event thread on cluster 0
// issues and pops word 0 in that same cycle, then pops the other three words
// on consecutive cycles. The handler then runs until cycle 879 and, as in the
// measured BSM handler, has an instruction ready in only about 36% of its
// cycles; the faulting thread and three other user threads are always ready.
// The test checks that cluster 0 issues in every cycle of the handler's run
// (full utilisation), that the handler issues whenever it is ready, and that
// the remaining issue cycles are spread evenly over the four user threads.
module tb_bsm_event_workload;
  import eq_pkg::*;

  localparam int EV        = 4;
  localparam int T_ENQ     = 6;    // first packet word written at the end of this cycle
  localparam int T_AVAIL   = 7;    // event available, handler dequeues word 0
  localparam int T_DONE    = 879;  // handler finishes and stalls
  localparam int BSM_TYPE  = 4'd3; // four-word packet in this test's type table

  logic clk = 0, reset;
  csw_pkt_t csw;
  logic [NUM_CLUSTERS-1:0][NUM_SLOTS-1:0] thread_ready;
  logic [NUM_CLUSTERS-1:0][NUM_USER-1:0]  user_hipri;
  logic evt_reads_queue, undo, event_av, wmark, pop, diag_shift, diag_si, diag_so;
  logic [NUM_CLUSTERS-1:0] issue_valid;
  logic [NUM_CLUSTERS-1:0][SLOT_W-1:0] issue_slot;
  eq_word_t qdata;

  int checks = 0, failures = 0;
  eq_word_t pkt [4];
  int words_read = 0, handler_ready_cycles = 0, handler_issues = 0, busy_cycles = 0;
  int user_issues [NUM_USER];

  map_event_subsystem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    event_word0_t w0;
    reset = 1; csw = '0; csw.xfr_type = XFR_REG; thread_ready = '0; user_hipri = '0;
    evt_reads_queue = 0; undo = 0; diag_shift = 0; diag_si = 0;
    for (int u = 0; u < NUM_USER; u++) user_issues[u] = 0;
    w0.faulting_op = (DATA_W - EVTYPE_W)'({$urandom, $urandom});
    w0.event_type  = EVTYPE_W'(BSM_TYPE);
    pkt[0] = '0; pkt[0].data = w0;
    for (int k = 1; k < 4; k++) pkt[k] = eq_word_t'({$urandom, $urandom, $urandom});
    repeat (3) @(negedge clk);
    reset = 0;

    for (int cyc = 0; cyc <= T_DONE + 5; cyc++) begin
      bit handler_ready;
      @(negedge clk);
      // C-Switch: the packet streams in from cycle 6.
      csw = '0; csw.xfr_type = XFR_REG;
      if (cyc >= T_ENQ && cyc < T_ENQ + 4) begin
        csw.dav = 1; csw.tslot = EQ_TSLOT; csw.xfr_type = XFR_QUEUE; csw.word = pkt[cyc - T_ENQ];
      end
      // Four user threads with unlimited slack on every cluster.
      for (int c = 0; c < NUM_CLUSTERS; c++) thread_ready[c] = 6'b001111;
      // Event thread: waits on the queue until all four words are read,
      // then computes with an instruction ready in 36 of every 100 cycles.
      if (words_read < 4) begin
        evt_reads_queue = 1;
        handler_ready = 1;
      end else begin
        evt_reads_queue = 0;
        handler_ready = (cyc < T_DONE) && (((cyc * 36) % 100) < 36);
      end
      thread_ready[0][EV] = handler_ready;
      #1;
      if (cyc < T_AVAIL) begin
        check("no event available before cycle 7", !event_av && !pop);
      end
      if (cyc == T_AVAIL) begin
        check("event available at cycle 7", event_av);
        check("handler dequeues word 0 at cycle 7", pop && issue_valid[0] && issue_slot[0] == SLOT_W'(EV));
      end
      if (pop) begin
        check("packet word in order", words_read < 4 && qdata === pkt[words_read]);
        check("packet words on consecutive cycles", cyc == T_AVAIL + words_read);
        if (words_read == 0) begin
          w0 = event_word0_t'(qdata.data);
          check("event type of word 0", w0.event_type == EVTYPE_W'(BSM_TYPE));
        end
        words_read++;
      end
      if (cyc >= T_AVAIL && cyc < T_DONE) begin
        busy_cycles++;
        if (handler_ready && thread_ready[0][EV]) handler_ready_cycles++;
        check("cluster 0 issues every cycle", issue_valid[0]);
        if (handler_ready) check("handler issues when ready", issue_slot[0] == SLOT_W'(EV));
        if (issue_valid[0] && issue_slot[0] == SLOT_W'(EV)) handler_issues++;
        else if (issue_valid[0] && int'(issue_slot[0]) < NUM_USER) user_issues[issue_slot[0]]++;
      end
    end

    begin
      automatic int umin = user_issues[0];
      automatic int umax = user_issues[0];
      for (int u = 1; u < NUM_USER; u++) begin
        if (user_issues[u] < umin) umin = user_issues[u];
        if (user_issues[u] > umax) umax = user_issues[u];
      end
      $display("handler run %0d cycles: handler issued %0d (%0d%%), user threads %0d %0d %0d %0d",
               busy_cycles, handler_issues, (handler_issues * 100) / busy_cycles,
               user_issues[0], user_issues[1], user_issues[2], user_issues[3]);
      check("all four words read", words_read == 4);
      check("handler issues equal its ready cycles", handler_issues == handler_ready_cycles);
      check("handler share about 36%", handler_issues * 100 >= 34 * busy_cycles &&
                                       handler_issues * 100 <= 38 * busy_cycles);
      check("user issues fill the rest", handler_issues + user_issues[0] + user_issues[1] +
                                         user_issues[2] + user_issues[3] == busy_cycles);
      check("user issues spread evenly", umax - umin <= 1);
      check("queue empty after the event", !event_av && !wmark);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
