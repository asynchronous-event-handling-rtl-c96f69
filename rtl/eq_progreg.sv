// eq_progreg: the programmable registers of the Event Queue control unit.
//
// It holds two values. The watermark register sets the FIFO occupancy at which
// the EQ raises wmark; it is loaded through the diagnostic scan chain. The
// qsize register is the FIFO length used for pointer wrap-around; it is
// hard-wired to QSIZE and cannot be changed. Both registers and their roles
// follow the EQ control description. The form of the diagnostic chain is this
// design's choice: while diag_shift is high, the watermark shifts one place per
// clock towards bit 0, diag_si enters at the top bit and diag_so is bit 0, so
// a new value is shifted in least significant bit first in CNT_W clocks. The
// reset value WMARK_INIT is also this design's choice: it leaves 32 free words
// (eight four-word packets) above the watermark in a 192-entry FIFO.
//
// Interface: clk, reset (synchronous, active high), diag_shift, diag_si,
// diag_so, watermark, qsize. Timing: watermark changes one clock after each
// shift; qsize is constant.
module eq_progreg #(
  parameter int unsigned QSIZE      = eq_pkg::EQ_DEPTH,
  parameter int unsigned CNT_W      = $clog2(QSIZE + 1),
  parameter int unsigned WMARK_INIT = QSIZE - 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             diag_shift,
  input  logic             diag_si,
  output logic             diag_so,
  output logic [CNT_W-1:0] watermark,
  output logic [CNT_W-1:0] qsize
);

  always_ff @(posedge clk) begin
    if (reset)           watermark <= CNT_W'(WMARK_INIT);
    else if (diag_shift) watermark <= {diag_si, watermark[CNT_W-1:1]};
  end

  assign diag_so = watermark[0];
  assign qsize   = CNT_W'(QSIZE);

endmodule
