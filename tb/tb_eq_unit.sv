// tb_eq_unit: self-checking test of the Event Queue Unit at full size
// (192 entries, watermark 160 after reset).
//
// Part 1 replays the read handshake cycle by cycle: two words arrive, event_av
// rises one cycle after the first is written, the first word is popped and
// consumed, the second is popped, returned with undo and popped again.
// Part 2 checks that words for another thread slot or transfer type and pops
// on an empty queue are ignored. Part 3 runs random traffic against a
// reference queue, filling the FIFO to the top (words dropped when no slot is
// free) and draining it, checking qdata, event_av and wmark every cycle.
// Part 4 loads a new watermark over the diagnostic chain and checks where
// wmark rises and falls.
module tb_eq_unit;
  import eq_pkg::*;

  localparam int unsigned DEPTH = 192;

  logic     clk = 0, reset;
  csw_pkt_t csw;
  logic     event_av, pop, undo, wmark, diag_shift, diag_si, diag_so;
  eq_word_t qdata;

  int checks = 0, failures = 0;
  eq_word_t q[$];
  eq_word_t last_popped;
  bit       popped_last = 0;
  int       watermark = DEPTH - 32;
  int n_wr = 0, n_rej = 0, n_pop = 0, n_epop = 0, n_undo = 0, n_drop = 0, n_wm = 0;

  eq_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic eq_word_t rnd_word();
    return eq_word_t'({$urandom, $urandom, $urandom});
  endfunction

  task automatic expect_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%0t %s: got %0b want %0b", $time, what, got, want);
    end
  endtask

  task automatic expect_word(string what, eq_word_t got, eq_word_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%0t %s: got %h want %h", $time, what, got, want);
    end
  endtask

  task automatic idle();
    csw = '0; csw.xfr_type = XFR_REG; pop = 0; undo = 0; diag_shift = 0; diag_si = 0;
  endtask

  task automatic put(eq_word_t w);
    csw.dav = 1; csw.tslot = EQ_TSLOT; csw.xfr_type = XFR_QUEUE; csw.word = w;
  endtask

  // One cycle of random traffic against the reference queue. Inputs are set
  // after a falling edge, outputs checked, and the model advanced to match
  // what the next rising edge does.
  task automatic random_cycle(int wr_pct, int pop_pct);
    bit acc, do_pop, do_undo;
    @(negedge clk);
    idle();
    expect_bit("event_av", event_av, q.size() > 0);
    expect_bit("wmark", wmark, q.size() >= watermark);
    if (q.size() > 0) expect_word("qdata", qdata, q[0]);
    if (wmark) n_wm++;
    do_undo = popped_last && ($urandom_range(4) == 0);
    do_pop  = !do_undo && ($urandom_range(99) < pop_pct);
    undo = do_undo;
    pop  = do_pop;
    if ($urandom_range(99) < wr_pct) begin
      put(rnd_word());
      case ($urandom_range(7))
        0: csw.tslot = TSLOT_W'($urandom_range(5));
        1: csw.xfr_type = XFR_MEM;
        default: ;
      endcase
    end
    acc = csw.dav && csw.tslot == EQ_TSLOT && csw.xfr_type == XFR_QUEUE;
    if (!acc && csw.dav) n_rej++;
    // Advance the model from the state before the edge.
    begin
      int  size_now = q.size();
      bit  pop_eff  = do_pop && size_now > 0;
      bit  wr_eff   = acc && (size_now + int'(popped_last) < DEPTH);
      if (do_pop && size_now == 0) n_epop++;
      if (acc && !wr_eff) n_drop++;
      if (pop_eff) begin
        last_popped = q.pop_front();
        n_pop++;
      end
      if (do_undo) begin
        q.push_front(last_popped);
        n_undo++;
      end
      if (wr_eff) begin
        q.push_back(csw.word);
        n_wr++;
      end
      popped_last = pop_eff;
    end
  endtask

  initial begin
    eq_word_t w0, w1;
    reset = 1; idle();
    repeat (2) @(negedge clk);
    reset = 0;

    // Part 1: the read handshake.
    w0 = rnd_word(); w1 = rnd_word();
    @(negedge clk); put(w0);
    #1 expect_bit("event_av before first write", event_av, 0);
    @(negedge clk); put(w1);
    #1 expect_bit("event_av one cycle after enqueue", event_av, 1);
    expect_word("qdata first word", qdata, w0);
    @(negedge clk); idle(); pop = 1;
    #1 expect_word("qdata popped word 0", qdata, w0);
    @(negedge clk); pop = 1;
    #1 expect_word("qdata popped word 1", qdata, w1);
    expect_bit("event_av with word 1", event_av, 1);
    @(negedge clk); pop = 0; undo = 1;
    #1 expect_bit("event_av empty during undo", event_av, 0);
    @(negedge clk); undo = 0;
    #1 expect_bit("event_av after undo", event_av, 1);
    expect_word("restored word", qdata, w1);
    pop = 1;
    @(negedge clk); pop = 0;
    #1 expect_bit("event_av drained", event_av, 0);

    // Part 2: ignored traffic.
    @(negedge clk); put(rnd_word()); csw.tslot = 3'd5;
    @(negedge clk); put(rnd_word()); csw.xfr_type = XFR_REG;
    @(negedge clk); idle(); csw.tslot = EQ_TSLOT; csw.xfr_type = XFR_QUEUE; // no dav
    @(negedge clk); idle(); pop = 1; // pop on empty queue
    @(negedge clk); idle();
    #1 expect_bit("event_av after ignored traffic", event_av, 0);
    w0 = rnd_word();
    put(w0);
    @(negedge clk); idle();
    #1 expect_bit("event_av after good word", event_av, 1);
    expect_word("qdata after empty pop", qdata, w0);
    pop = 1;
    @(negedge clk); idle();
    #1 expect_bit("event_av drained again", event_av, 0);

    // Part 3: random traffic, fill then drain, several times.
    for (int r = 0; r < 4; r++) begin
      for (int n = 0; n < 600; n++) random_cycle(90, 15);
      for (int n = 0; n < 600; n++) random_cycle(15, 90);
    end
    for (int n = 0; n < 400; n++) random_cycle(0, 100);

    // Part 4: watermark 20 through the diagnostic chain.
    @(negedge clk); idle();
    for (int b = 0; b < 8; b++) begin
      @(negedge clk); diag_shift = 1; diag_si = b < 8 ? ((20 >> b) & 1) : 0;
    end
    @(negedge clk); idle(); watermark = 20;
    #1 expect_bit("empty before watermark test", event_av, q.size() > 0);
    for (int k = 0; k < 22; k++) begin
      @(negedge clk); idle(); put(rnd_word()); q.push_back(csw.word);
      #1 expect_bit("wmark while filling", wmark, (q.size() - 1) >= 20);
    end
    @(negedge clk); idle();
    #1 expect_bit("wmark at 22 words", wmark, 1);
    for (int k = 0; k < 22; k++) begin
      @(negedge clk); idle(); pop = 1;
      #1 expect_word("qdata while draining", qdata, q[0]);
      expect_bit("wmark while draining", wmark, q.size() >= 20);
      void'(q.pop_front());
    end
    @(negedge clk); idle();
    #1 expect_bit("wmark released", wmark, 0);
    expect_bit("queue empty at end", event_av, 0);

    $display("writes %0d rejected %0d pops %0d empty-pops %0d undos %0d drops %0d wmark-cycles %0d",
             n_wr, n_rej, n_pop, n_epop, n_undo, n_drop, n_wm);
    checks++;
    if (n_wr < DEPTH || n_rej == 0 || n_pop == 0 || n_epop == 0 || n_undo == 0 ||
        n_drop == 0 || n_wm == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
