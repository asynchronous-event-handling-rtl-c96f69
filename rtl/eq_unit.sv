// eq_unit: the Event Queue (EQ) Unit of the Multi-ALU Processor.
//
// Hardware that detects an event builds an event packet of up to four words
// and sends it over the C-Switch to thread slot 6 with the Queue transfer
// type. The EQ buffers these words in a 192-entry FIFO and hands them, front
// first, to the event handler thread on cluster 0. The handler's SZ stage
// pops a word after reading it from qdata; if the EX stage then does not
// consume it, undo in the next cycle puts it back at the front. When the
// occupancy reaches the programmable watermark, wmark tells the SZ stage of
// every cluster to stop issuing user operations that could raise new events.
//
// Structure, as in the EQ architecture: a datapath (eq_regfile) and four
// control submodules - eq_maincontrol (packet decode, event_av, pop/undo
// qualification), eq_qcount (occupancy and wmark), eq_progreg (watermark and
// qsize registers) and eq_regcontrol (pointers and one-hot addresses).
//
// Interface: clk, reset (synchronous, active high); csw, one C-Switch word per
// cycle; event_av and wmark to the SZ stages; pop from the cluster 0 SZ stage;
// qdata and undo with the cluster 0 EX stage; diag_shift/diag_si/diag_so load
// the watermark. Timing: a word presented in cycle t is written at the end of
// t and event_av is high in t+1 with the word on qdata; qdata is
// combinational from the read pointer, so the next word appears in the cycle
// after a pop; a restored word is available again in the cycle after undo.
module eq_unit
  import eq_pkg::*;
#(
  parameter int unsigned DEPTH      = EQ_DEPTH,
  parameter int unsigned WMARK_INIT = DEPTH - 32
) (
  input  logic     clk,
  input  logic     reset,
  input  csw_pkt_t csw,
  output logic     event_av,
  input  logic     pop,
  output eq_word_t qdata,
  input  logic     undo,
  output logic     wmark,
  input  logic     diag_shift,
  input  logic     diag_si,
  output logic     diag_so
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic             wr, rd, un, hold, empty, full;
  logic [CW-1:0]    count, watermark, qsize;
  logic [DEPTH-1:0] write_addr, read_addr;

  eq_maincontrol u_main (
    .clk, .reset,
    .csw_dav      (csw.dav),
    .csw_tslot    (csw.tslot),
    .csw_xfr_type (csw.xfr_type),
    .pop, .undo, .empty, .full,
    .wr, .rd, .un, .hold, .event_av
  );

  eq_qcount #(.CNT_W(CW)) u_qcount (
    .clk, .reset, .wr, .rd, .un, .hold, .watermark, .qsize,
    .count, .empty, .full, .wmark
  );

  eq_progreg #(.QSIZE(DEPTH), .CNT_W(CW), .WMARK_INIT(WMARK_INIT)) u_progreg (
    .clk, .reset, .diag_shift, .diag_si, .diag_so, .watermark, .qsize
  );

  eq_regcontrol #(.DEPTH(DEPTH), .CNT_W(CW)) u_regctl (
    .clk, .reset, .wr, .rd, .un, .qsize, .write_addr, .read_addr
  );

  eq_regfile #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_rf (
    .clk, .write_addr,
    .data_in  (csw.word),
    .read_addr,
    .data_out (qdata)
  );

  a_count_in_range : assert property (@(posedge clk) disable iff (reset) count <= qsize)
    else $error("EQ occupancy beyond qsize");

endmodule
