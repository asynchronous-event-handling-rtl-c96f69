// tb_map_event_subsystem: end-to-end test of the node's event path at the
// default sizes (192-entry queue, watermark 160).
//
// User threads on the four clusters issue; some issues raise an event, and a
// packet of one to four words (its length taken from the event type) reaches
// the C-Switch six cycles later and is streamed into the queue one word per
// cycle. A model of the event handler on cluster 0 reads word 0, takes the
// packet length from the event type, reads the remaining words, then runs a
// handler routine of random length in which it is ready only part of the time.
// Now and then it returns a popped word with undo. Every word the handler
// consumes is compared, in order, with the words sent. Each cycle the test
// also checks that no user thread issues while wmark is high, that the
// handler only pops when event_av is high, and that event_av rises one cycle
// after the first word enters an empty queue. A busy phase with many events
// and slow handling drives the queue up to the watermark; a quiet phase lets
// the handler sleep. Each mechanism is counted and must occur.
module tb_map_event_subsystem;
  import eq_pkg::*;

  localparam int EV = 4;
  localparam int CYCLES = 30000;

  typedef struct {
    int       t;
    int       len;
    eq_word_t w [4];
  } pkt_t;

  logic clk = 0, reset;
  csw_pkt_t csw;
  logic [NUM_CLUSTERS-1:0][NUM_SLOTS-1:0] thread_ready;
  logic [NUM_CLUSTERS-1:0][NUM_USER-1:0]  user_hipri;
  logic evt_reads_queue, undo, event_av, wmark, pop, diag_shift, diag_si, diag_so;
  logic [NUM_CLUSTERS-1:0] issue_valid;
  logic [NUM_CLUSTERS-1:0][SLOT_W-1:0] issue_slot;
  eq_word_t qdata;

  int checks = 0, failures = 0;
  pkt_t pend[$];
  pkt_t cur;
  int   cur_idx = -1;
  eq_word_t expect_q[$];
  int   in_queue = 0;      // words written and not consumed
  // Handler model state.
  typedef enum {H_READ, H_COMPUTE, H_UNDO} hstate_e;
  hstate_e hs = H_READ;
  int need = 0, compute_left = 0;
  // Mechanism counters.
  int n_events = 0, n_words_in = 0, n_consumed = 0, n_packets = 0, n_stall = 0;
  int n_sleep = 0, n_wake = 0, n_undo = 0, n_raised = 0, n_ignored = 0;
  int len_seen [5];
  bit was_empty_write = 0;

  map_event_subsystem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(CYCLES * 10 + 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t %s", $time, what);
    end
  endtask

  function automatic eq_word_t rnd_word();
    return eq_word_t'({$urandom, $urandom, $urandom});
  endfunction

  function automatic int pkt_len(eq_word_t w0);
    event_word0_t h = event_word0_t'(w0.data);
    return int'(h.event_type[1:0]) + 1;
  endfunction

  initial begin
    bit busy;
    reset = 1; csw = '0; csw.xfr_type = XFR_REG; thread_ready = '0; user_hipri = '0;
    evt_reads_queue = 0; undo = 0; diag_shift = 0; diag_si = 0;
    for (int i = 0; i < 5; i++) len_seen[i] = 0;
    repeat (3) @(negedge clk);
    reset = 0;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      // Busy and quiet phases of 3000 cycles each.
      busy = ((cyc / 3000) % 2 == 0);

      // C-Switch source: stream the next packet once it is due.
      csw = '0; csw.xfr_type = XFR_REG;
      if (cur_idx < 0 && pend.size() > 0 && pend[0].t <= cyc) begin
        cur = pend.pop_front();
        cur_idx = 0;
      end
      if (cur_idx >= 0) begin
        csw.dav = 1; csw.tslot = EQ_TSLOT; csw.xfr_type = XFR_QUEUE; csw.word = cur.w[cur_idx];
      end else if ($urandom_range(9) == 0) begin
        // Traffic for another C-Switch target; the queue must ignore it.
        csw.dav = 1; csw.tslot = 3'd2; csw.xfr_type = XFR_REG; csw.word = rnd_word();
        n_ignored++;
      end

      // Threads.
      for (int c = 0; c < NUM_CLUSTERS; c++) begin
        for (int s = 0; s < NUM_USER; s++) thread_ready[c][s] = ($urandom_range(9) < 8);
        thread_ready[c][5] = ($urandom_range(19) == 0);
        thread_ready[c][EV] = (c != 0) && ($urandom_range(19) == 0);
        user_hipri[c] = (busy == 0 && c == 0) ? 4'b0100 : 4'b0000;
      end
      undo = 0;
      evt_reads_queue = 0;
      case (hs)
        H_READ:    begin thread_ready[0][EV] = 1; evt_reads_queue = 1; end
        H_COMPUTE: thread_ready[0][EV] = ($urandom_range(99) < 36);
        H_UNDO:    begin undo = 1; thread_ready[0][EV] = 1; end
        default: ;
      endcase

      #1;
      // Per-cycle rules.
      if (wmark) begin
        automatic bit any_ready = 0;
        for (int c = 0; c < NUM_CLUSTERS; c++) begin
          check("user thread issued under wmark", !(issue_valid[c] && int'(issue_slot[c]) < NUM_USER));
          if (thread_ready[c][NUM_USER-1:0] != '0) any_ready = 1;
        end
        if (any_ready) n_stall++;
      end
      check("event_av matches occupancy", event_av == (in_queue > 0));
      check("wmark matches occupancy", wmark == (in_queue >= 160));
      if (pop) check("pop without event_av", event_av);
      if (was_empty_write) begin
        check("event_av one cycle after first word", event_av);
        n_wake++;
      end
      if (hs == H_READ && !event_av) n_sleep++;
      if (!busy && issue_valid[0] && issue_slot[0] == 2 && thread_ready[0][5]) n_raised++;

      // New events from user issues (none can issue under wmark).
      for (int c = 0; c < NUM_CLUSTERS; c++) begin
        if (issue_valid[c] && int'(issue_slot[c]) < NUM_USER &&
            $urandom_range(999) < (busy ? 60 : 4)) begin
          pkt_t p;
          event_word0_t h;
          p.t = cyc + 6;
          h.faulting_op = (DATA_W - EVTYPE_W)'({$urandom, $urandom, $urandom});
          h.event_type = EVTYPE_W'($urandom);
          p.w[0] = rnd_word();
          p.w[0].data = h;
          for (int k = 1; k < 4; k++) p.w[k] = rnd_word();
          p.len = pkt_len(p.w[0]);
          pend.push_back(p);
          n_events++;
        end
      end

      // Handler side, for what the next edge commits.
      begin
        automatic int in_next = in_queue;
        if (hs == H_UNDO) begin
          in_next++;
          hs = H_READ;
        end else if (pop) begin
          if ($urandom_range(19) == 0) begin
            hs = H_UNDO;        // not consumed; returned next cycle
            in_next--;
            n_undo++;
          end else begin
            check("consumed word order", expect_q.size() > 0 && qdata === expect_q[0]);
            if (expect_q.size() > 0) void'(expect_q.pop_front());
            in_next--;
            n_consumed++;
            if (need == 0) begin
              need = pkt_len(qdata) - 1;
              len_seen[need + 1]++;
            end else need--;
            if (need == 0) begin
              n_packets++;
              hs = H_COMPUTE;
              compute_left = busy ? $urandom_range(20, 40) : $urandom_range(2, 6);
            end
          end
        end else if (hs == H_COMPUTE && issue_valid[0] && int'(issue_slot[0]) == EV) begin
          compute_left--;
          if (compute_left == 0) hs = H_READ;
        end
        // Source word committed at this edge.
        was_empty_write = 0;
        if (cur_idx >= 0) begin
          expect_q.push_back(cur.w[cur_idx]);
          was_empty_write = (in_queue == 0) && !(hs == H_READ && in_next != in_queue);
          in_next++;
          n_words_in++;
          cur_idx++;
          if (cur_idx == cur.len) cur_idx = -1;
        end
        in_queue = in_next;
      end
    end

    // Drain: stop new events, let the handler finish.
    for (int cyc = 0; cyc < 3000 && (expect_q.size() > 0 || hs != H_READ); cyc++) begin
      @(negedge clk);
      csw = '0; csw.xfr_type = XFR_REG;
      thread_ready = '0;
      undo = 0; evt_reads_queue = 0;
      if (cur_idx >= 0) begin
        csw.dav = 1; csw.tslot = EQ_TSLOT; csw.xfr_type = XFR_QUEUE; csw.word = cur.w[cur_idx];
      end else if (pend.size() > 0) begin
        cur = pend.pop_front(); cur_idx = 0;
        csw.dav = 1; csw.tslot = EQ_TSLOT; csw.xfr_type = XFR_QUEUE; csw.word = cur.w[0];
      end
      case (hs)
        H_READ:    begin thread_ready[0][EV] = 1; evt_reads_queue = 1; end
        H_COMPUTE: thread_ready[0][EV] = 1;
        H_UNDO:    begin undo = 1; thread_ready[0][EV] = 1; end
        default: ;
      endcase
      #1;
      if (hs == H_UNDO) hs = H_READ;
      else if (pop) begin
        check("drain word order", expect_q.size() > 0 && qdata === expect_q[0]);
        if (expect_q.size() > 0) void'(expect_q.pop_front());
        n_consumed++;
        if (need == 0) need = pkt_len(qdata) - 1; else need--;
        if (need == 0) begin n_packets++; hs = H_COMPUTE; compute_left = 3; end
      end else if (hs == H_COMPUTE && issue_valid[0] && int'(issue_slot[0]) == EV) begin
        compute_left--;
        if (compute_left == 0) hs = H_READ;
      end
      if (cur_idx >= 0) begin
        expect_q.push_back(cur.w[cur_idx]);
        n_words_in++;
        cur_idx++;
        if (cur_idx == cur.len) cur_idx = -1;
      end
    end
    @(negedge clk);
    check("every word delivered", expect_q.size() == 0 && pend.size() == 0 && n_consumed == n_words_in);
    check("queue empty at the end", !event_av && !wmark);

    $display("events %0d words %0d consumed %0d packets %0d (len1 %0d len2 %0d len3 %0d len4 %0d)",
             n_events, n_words_in, n_consumed, n_packets, len_seen[1], len_seen[2], len_seen[3], len_seen[4]);
    $display("wmark-stall cycles %0d handler-sleep cycles %0d wakeups %0d undos %0d raised-user issues %0d ignored csw %0d",
             n_stall, n_sleep, n_wake, n_undo, n_raised, n_ignored);
    check("wmark stall happened", n_stall > 0);
    check("handler slept", n_sleep > 0);
    check("handler woken by event_av", n_wake > 0);
    check("undo happened", n_undo > 0);
    check("raised user thread issued against system thread", n_raised > 0);
    check("foreign C-Switch traffic ignored", n_ignored > 0);
    check("queue wrapped", n_words_in > 192);
    check("all packet lengths seen", len_seen[1] > 0 && len_seen[2] > 0 && len_seen[3] > 0 && len_seen[4] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
