// eq_maincontrol: main control of the Event Queue Unit.
//
// It decides, each cycle, which of the three queue operations take place.
// A C-Switch word is written (wr) when the C-Switch signals data available,
// addresses thread slot 6 and uses the Queue transfer type, and the FIFO has a
// free slot; a burst-mode packet is simply one such word per cycle. A pop from
// the SZ stage is taken (rd) only when the FIFO holds a word; a pop on an empty
// queue is ignored. An undo from the EX stage is taken (un) only in the cycle
// right after a taken pop and restores that word to the front. event_av is
// asserted while the FIFO holds at least one word, so it rises just after the
// clock edge that writes the first word.
//
// The acceptance rule, the ignored empty pop, the undo window and event_av
// follow the EQ description. These are this design's choices: a word arriving
// when no slot is free is dropped (the wmark stall is meant to keep that from
// happening); a pop in the same cycle as an undo is ignored, which the
// assertions flag as a protocol error; undo is sampled at the rising edge
// instead of before the falling edge of the two-phase original.
//
// Interface: clk, reset (synchronous), the C-Switch control fields, pop, undo,
// empty and full from the occupancy counter; wr, rd, un, hold (a pop was taken
// last cycle) and event_av. Timing: wr, rd, un are combinational; hold is a
// register.
module eq_maincontrol
  import eq_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic               csw_dav,
  input  logic [TSLOT_W-1:0] csw_tslot,
  input  xfr_type_e          csw_xfr_type,
  input  logic               pop,
  input  logic               undo,
  input  logic               empty,
  input  logic               full,
  output logic               wr,
  output logic               rd,
  output logic               un,
  output logic               hold,
  output logic               event_av
);

  logic accept;

  assign accept   = csw_dav && (csw_tslot == EQ_TSLOT) && (csw_xfr_type == XFR_QUEUE);
  assign wr       = accept && !full;
  assign rd       = pop && !empty && !undo;
  assign un       = undo && hold;
  assign event_av = !empty;

  always_ff @(posedge clk) begin
    if (reset) hold <= 1'b0;
    else       hold <= rd;
  end

  // Handshake rules: undo only in the cycle after a taken pop, never together
  // with a new pop.
  a_undo_after_pop : assert property (@(posedge clk) disable iff (reset) undo |-> hold)
    else $error("undo asserted without a pop in the previous cycle");
  a_no_pop_with_undo : assert property (@(posedge clk) disable iff (reset) !(undo && pop))
    else $error("pop and undo asserted in the same cycle");

endmodule
