// map_event_subsystem: the event path of one Multi-ALU Processor node.
//
// The Event Queue Unit sits beside cluster 0 and takes event words from the
// C-Switch. Its wmark output goes to the dynamic scheduler of all four
// clusters, which then hold their user threads. Its event_av output goes to
// the cluster 0 scheduler, which wakes the event handler thread; when that
// thread issues an operation reading the queue, the cluster 0 scheduler pops
// the front word, and the handler sees it on qdata. The cluster 0 EX stage
// may return an unconsumed word with undo. The clusters' pipelines, the
// C-Switch and the event sources are outside this block, so their signals are
// ports: csw in, per-cluster thread readiness and priority in, the issue
// choice of each cluster out, qdata out and undo in.
//
// Interface: clk, reset (synchronous); csw; thread_ready[4][6],
// user_hipri[4][4], evt_reads_queue (cluster 0 event thread's next operation
// reads the queue); issue_valid[4], issue_slot[4]; qdata, undo; event_av,
// wmark, pop (observation); diag_shift/diag_si/diag_so for the watermark.
// Timing: as for eq_unit and dynamic_scheduler; pop is combinational from the
// cluster 0 issue choice.
module map_event_subsystem
  import eq_pkg::*;
#(
  parameter int unsigned DEPTH = EQ_DEPTH
) (
  input  logic                                    clk,
  input  logic                                    reset,
  input  csw_pkt_t                                csw,
  input  logic [NUM_CLUSTERS-1:0][NUM_SLOTS-1:0]  thread_ready,
  input  logic [NUM_CLUSTERS-1:0][NUM_USER-1:0]   user_hipri,
  input  logic                                    evt_reads_queue,
  output logic [NUM_CLUSTERS-1:0]                 issue_valid,
  output logic [NUM_CLUSTERS-1:0][SLOT_W-1:0]     issue_slot,
  output eq_word_t                                qdata,
  input  logic                                    undo,
  output logic                                    event_av,
  output logic                                    wmark,
  output logic                                    pop,
  input  logic                                    diag_shift,
  input  logic                                    diag_si,
  output logic                                    diag_so
);

  logic [NUM_CLUSTERS-1:0] cl_pop;

  eq_unit #(.DEPTH(DEPTH)) u_eq (
    .clk, .reset, .csw, .event_av, .pop, .qdata, .undo, .wmark,
    .diag_shift, .diag_si, .diag_so
  );

  for (genvar c = 0; c < NUM_CLUSTERS; c++) begin : g_cluster
    // Only cluster 0 hosts the event handler H-Thread that reads the queue.
    dynamic_scheduler u_sched (
      .clk, .reset,
      .thread_ready    (thread_ready[c]),
      .evt_reads_queue ((c == 0) ? evt_reads_queue : 1'b0),
      .event_av        ((c == 0) ? event_av : 1'b0),
      .wmark,
      .user_hipri      (user_hipri[c]),
      .issue_valid     (issue_valid[c]),
      .issue_slot      (issue_slot[c]),
      .pop             (cl_pop[c])
    );
  end

  assign pop = cl_pop[0];

  // Clusters 1-3 have no queue-reading event thread and must never pop.
  a_pop_only_cluster0 : assert property (@(posedge clk) disable iff (reset)
                                         cl_pop[NUM_CLUSTERS-1:1] == '0)
    else $error("queue pop from a cluster other than cluster 0");

endmodule
