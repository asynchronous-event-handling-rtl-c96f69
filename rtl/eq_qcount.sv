// eq_qcount: occupancy counter of the Event Queue FIFO.
//
// count holds the number of event words in the FIFO. It rises by one for each
// word written (wr), falls by one for each word popped (rd) and rises again by
// one when a popped word is restored (un); the three can combine in one cycle.
// wmark is asserted while count is at or above the watermark register and so
// drops as soon as the occupancy falls below it again. empty flags count == 0.
// full flags that no slot is free for a write: the slot of a word popped in
// the previous cycle (hold = 1) still counts as taken, because an undo may
// still restore that word. Counting and the watermark comparison follow the EQ
// control description; the hold rule and the choice of "at or above" are this
// design's own.
//
// Interface: clk, reset (synchronous), wr, rd, un, hold, watermark, qsize,
// count, empty, full, wmark. Timing: all outputs are derived from the count
// register, so they change right after the clock edge that moved a word.
module eq_qcount #(
  parameter int unsigned CNT_W = eq_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             wr,
  input  logic             rd,
  input  logic             un,
  input  logic             hold,
  input  logic [CNT_W-1:0] watermark,
  input  logic [CNT_W-1:0] qsize,
  output logic [CNT_W-1:0] count,
  output logic             empty,
  output logic             full,
  output logic             wmark
);

  always_ff @(posedge clk) begin
    if (reset) count <= '0;
    else       count <= count + CNT_W'(wr) + CNT_W'(un) - CNT_W'(rd);
  end

  assign empty = (count == '0);
  assign full  = ({1'b0, count} + {{CNT_W{1'b0}}, hold}) >= {1'b0, qsize};
  assign wmark = (count >= watermark);

endmodule
