// eq_regcontrol: read and write pointers of the Event Queue FIFO.
//
// The write pointer names the entry the next accepted word goes to; the read
// pointer names the front of the queue. Both count from 0 to qsize-1 and wrap
// to 0. A write (wr) advances the write pointer, a pop (rd) advances the read
// pointer, and an undo (un) steps the read pointer back by one, wrapping from 0
// to qsize-1, so the word popped in the previous cycle is again at the front.
// The pointers are one-hot encoded for the register file: read_addr always
// selects the front entry, write_addr selects the write entry only in a cycle
// with wr and is all zeroes otherwise (the null address). Pointer keeping,
// wrap-around at qsize, one-hot encoding and the null address follow the EQ
// control description; binary pointers with a decoder are this design's choice.
//
// Interface: clk, reset (synchronous), wr, rd, un, qsize, write_addr,
// read_addr. Timing: pointers move at the rising edge; write_addr is
// combinational from wr, read_addr from the read pointer register.
module eq_regcontrol #(
  parameter int unsigned DEPTH = eq_pkg::EQ_DEPTH,
  parameter int unsigned CNT_W = $clog2(DEPTH + 1),
  parameter int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             wr,
  input  logic             rd,
  input  logic             un,
  input  logic [CNT_W-1:0] qsize,
  output logic [DEPTH-1:0] write_addr,
  output logic [DEPTH-1:0] read_addr
);

  logic [PTR_W-1:0] wptr, rptr, last;

  assign last = PTR_W'(qsize - CNT_W'(1));

  always_ff @(posedge clk) begin
    if (reset) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr) wptr <= (wptr == last) ? '0 : wptr + PTR_W'(1);
      if (un)      rptr <= (rptr == '0) ? last : rptr - PTR_W'(1);
      else if (rd) rptr <= (rptr == last) ? '0 : rptr + PTR_W'(1);
    end
  end

  always_comb begin
    write_addr = '0;
    read_addr  = '0;
    write_addr[wptr] = wr;
    read_addr[rptr]  = 1'b1;
  end

endmodule
