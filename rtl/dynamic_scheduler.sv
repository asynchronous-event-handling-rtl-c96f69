// dynamic_scheduler: the issue scheduler in the SZ stage of one cluster.
//
// Each cycle it picks at most one of the six V-Thread slots on the cluster
// (slots 0-3 hold user threads, slots 4-5 system threads) and issues that
// slot's H-Thread instruction. A slot is eligible when its thread is ready,
// with two event-subsystem rules on top: user slots are held while wmark is
// asserted, so no new events are generated while the event queue is nearly
// full; and the event thread (slot EVENT_SLOT), when its next operation reads
// the event queue (evt_reads_queue), waits for event_av, so the handler simply
// sleeps while the queue is empty and issues as soon as a word arrives. When
// the event thread issues such an operation the scheduler sends pop to the
// Event Queue Unit.
//
// Among eligible slots the choice is round-robin, so every ready thread gets
// an equal share. System slots, and user slots whose user_hipri bit is set,
// form a higher priority level that is served first. Each level has its own
// round-robin pointer (the slot that last issued at that level), so the event
// thread's issues do not reset the rotation of the user threads and its idle
// cycles are spread evenly over them. Round-robin selection, the six slots, the wmark stall, the
// sleeping event thread and raising user threads to the event thread's
// priority follow the M-Machine description; slot numbering, the per-level
// pointers and the choice of slot 4 for the event thread are this design's own.
//
// Interface: clk, reset (synchronous), thread_ready[6], evt_reads_queue,
// event_av, wmark, user_hipri[4]; issue_valid, issue_slot, pop.
// Timing: the choice is combinational within the cycle; only the two round-robin
// pointers are registers.
module dynamic_scheduler
  import eq_pkg::*;
#(
  parameter int unsigned EVENT_SLOT = NUM_USER
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [NUM_SLOTS-1:0] thread_ready,
  input  logic                 evt_reads_queue,
  input  logic                 event_av,
  input  logic                 wmark,
  input  logic [NUM_USER-1:0]  user_hipri,
  output logic                 issue_valid,
  output logic [SLOT_W-1:0]    issue_slot,
  output logic                 pop
);

  logic [NUM_SLOTS-1:0] eligible, hi_level, cand;
  logic                 use_hi;
  logic [SLOT_W-1:0]    last_hi, last_lo, last_slot;

  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) begin
      if (s < NUM_USER) begin
        eligible[s] = thread_ready[s] && !wmark;
        hi_level[s] = user_hipri[s];
      end else begin
        eligible[s] = thread_ready[s];
        hi_level[s] = 1'b1;
      end
    end
    if (evt_reads_queue && !event_av) eligible[EVENT_SLOT] = 1'b0;
    use_hi    = (eligible & hi_level) != '0;
    cand      = use_hi ? (eligible & hi_level) : eligible;
    last_slot = use_hi ? last_hi : last_lo;
  end

  // Round-robin search from the slot after the level's last issue.
  always_comb begin
    logic [SLOT_W:0] idx;
    issue_valid = 1'b0;
    issue_slot  = '0;
    for (int k = 1; k <= NUM_SLOTS; k++) begin
      idx = {1'b0, last_slot} + (SLOT_W+1)'(k);
      if (idx >= (SLOT_W+1)'(NUM_SLOTS)) idx = idx - (SLOT_W+1)'(NUM_SLOTS);
      if (!issue_valid && cand[idx[SLOT_W-1:0]]) begin
        issue_valid = 1'b1;
        issue_slot  = idx[SLOT_W-1:0];
      end
    end
  end

  assign pop = issue_valid && (issue_slot == SLOT_W'(EVENT_SLOT)) && evt_reads_queue;

  // Each level keeps its own pointer, so issues at the upper level (the
  // handler) do not disturb the rotation among user threads.
  always_ff @(posedge clk) begin
    if (reset) begin
      last_hi <= SLOT_W'(NUM_SLOTS - 1);
      last_lo <= SLOT_W'(NUM_SLOTS - 1);
    end else if (issue_valid) begin
      if (use_hi) last_hi <= issue_slot;
      else        last_lo <= issue_slot;
    end
  end

endmodule
