// tb_dynamic_scheduler: self-checking test of the cluster issue scheduler.
// Directed parts check the round-robin order among ready user threads, the
// hold of all user threads under wmark, the higher level of system threads
// and of raised user threads, the user rotation staying intact while the
// event thread issues in between, and the event thread sleeping until
// event_av when it waits on the queue (with pop only on such an issue). A random part
// compares every choice with a reference picker kept in the testbench and
// checks that over many cycles equally ready threads get equal shares.
module tb_dynamic_scheduler;
  import eq_pkg::*;

  localparam int EV = 4;

  logic clk = 0, reset;
  logic [NUM_SLOTS-1:0] thread_ready;
  logic evt_reads_queue, event_av, wmark;
  logic [NUM_USER-1:0] user_hipri;
  logic issue_valid, pop;
  logic [SLOT_W-1:0] issue_slot;
  int checks = 0, failures = 0;
  int ref_last_hi = NUM_SLOTS - 1;
  int ref_last_lo = NUM_SLOTS - 1;
  bit ref_hi;
  int share [NUM_SLOTS];

  dynamic_scheduler dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  // Reference: returns the slot to issue or -1.
  function automatic int ref_pick();
    bit elig [NUM_SLOTS];
    bit hi   [NUM_SLOTS];
    bit any_hi = 0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      elig[s] = thread_ready[s];
      if (s < NUM_USER && wmark) elig[s] = 0;
      if (s == EV && evt_reads_queue && !event_av) elig[s] = 0;
      hi[s] = (s >= NUM_USER) || user_hipri[s];
      if (elig[s] && hi[s]) any_hi = 1;
    end
    ref_hi = any_hi;
    for (int k = 1; k <= NUM_SLOTS; k++) begin
      int s = ((any_hi ? ref_last_hi : ref_last_lo) + k) % NUM_SLOTS;
      if (elig[s] && (!any_hi || hi[s])) return s;
    end
    return -1;
  endfunction

  // Set inputs already applied; check the choice and advance the reference.
  task automatic step_check(string what);
    int want;
    #1;
    want = ref_pick();
    expect_int({what, " valid"}, int'(issue_valid), int'(want >= 0));
    if (want >= 0) begin
      expect_int({what, " slot"}, int'(issue_slot), want);
      expect_int({what, " pop"}, int'(pop), int'(want == EV && evt_reads_queue));
      if (ref_hi) ref_last_hi = want; else ref_last_lo = want;
      share[want]++;
    end else expect_int({what, " pop idle"}, int'(pop), 0);
  endtask

  initial begin
    reset = 1; thread_ready = '0; evt_reads_queue = 0; event_av = 0; wmark = 0; user_hipri = '0;
    repeat (2) @(negedge clk);
    reset = 0;

    // Round robin among user threads: 0,1,2,3,0,...
    thread_ready = 6'b001111;
    for (int n = 0; n < 8; n++) begin
      #1 expect_int("user rotation", int'(issue_slot), n % 4);
      ref_last_lo = n % 4;
      @(negedge clk);
    end
    // wmark holds every user thread.
    wmark = 1;
    #1 expect_int("wmark stall", int'(issue_valid), 0);
    // System thread 5 still issues under wmark.
    @(negedge clk); thread_ready = 6'b101111;
    #1 expect_int("system under wmark", int'(issue_slot), 5);
    ref_last_hi = 5;
    @(negedge clk); wmark = 0; thread_ready = 6'b001111;
    step_check("resume");
    // Event thread waiting on the queue sleeps until event_av.
    @(negedge clk); thread_ready = 6'b011111; evt_reads_queue = 1; event_av = 0;
    step_check("sleeping handler");
    expect_int("sleeping handler not issued", int'(int'(issue_slot) == EV), 0);
    @(negedge clk); event_av = 1;
    step_check("woken handler");
    expect_int("woken handler issued", int'(issue_slot), EV);
    expect_int("woken handler pops", int'(pop), 1);
    // Handler busy with a non-queue op: issues without popping.
    @(negedge clk); evt_reads_queue = 0; event_av = 0;
    step_check("handler compute");
    expect_int("handler compute no pop", int'(pop), 0);
    // Raised user thread shares the top level with system threads.
    @(negedge clk); thread_ready = 6'b111111; user_hipri = 4'b0010;
    for (int n = 0; n < 9; n++) begin
      step_check("raised user");
      expect_int("raised user set", int'(issue_slot inside {1, 4, 5}), 1);
      @(negedge clk);
    end
    user_hipri = '0;

    // The event thread issuing every third cycle must not disturb the user
    // rotation: the users issue 0,1,2,3,0,... in the remaining cycles.
    begin
      automatic int next_user = (ref_last_lo + 1) % NUM_USER;
      evt_reads_queue = 0; wmark = 0;
      for (int n = 0; n < 24; n++) begin
        @(negedge clk);
        thread_ready = {1'b0, (n % 3 == 0), 4'b1111};
        step_check("interleave");
        if (n % 3 == 0) expect_int("interleave handler", int'(issue_slot), EV);
        else begin
          expect_int("interleave user order", int'(issue_slot), next_user);
          next_user = (next_user + 1) % NUM_USER;
        end
      end
    end

    // Random part.
    for (int s = 0; s < NUM_SLOTS; s++) share[s] = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      thread_ready    = NUM_SLOTS'($urandom);
      wmark           = ($urandom_range(7) == 0);
      evt_reads_queue = 1'($urandom_range(1));
      event_av        = 1'($urandom_range(1));
      user_hipri      = ($urandom_range(3) == 0) ? NUM_USER'($urandom) : '0;
      step_check("random");
    end
    // Fairness: all user threads always ready, system threads idle.
    for (int s = 0; s < NUM_SLOTS; s++) share[s] = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      thread_ready = 6'b001111; wmark = 0; user_hipri = '0; evt_reads_queue = 0;
      step_check("fair");
    end
    for (int s = 0; s < NUM_USER; s++) expect_int("equal share", share[s], 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
