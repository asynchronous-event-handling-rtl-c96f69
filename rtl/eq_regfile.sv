// eq_regfile: the Event Queue FIFO storage, a DEPTH-entry register file with
// one read port and one write port.
//
// Both addresses are one-hot. The read is combinational: data_out is the OR
// of every entry gated by its read_addr bit, so it follows read_addr after a
// gate delay. The write happens at the rising edge of clk into the entry whose
// write_addr bit is set; an all-zero write_addr writes nothing. Entry count,
// width, one-hot addressing, combinational read and synchronous write follow
// the EQ datapath description. The storage has no reset: an entry is only read
// after it has been written. In the original two-phase design the controller
// changes the addresses on the falling clock edge; here the controller
// registers them on the rising edge, which gives the same one-word-per-cycle
// behaviour in a single-edge design.
//
// Interface: clk, write_addr[DEPTH], data_in, read_addr[DEPTH], data_out.
// Timing: write latency one edge; read zero cycles (combinational).
module eq_regfile #(
  parameter int unsigned DEPTH = eq_pkg::EQ_DEPTH,
  parameter int unsigned WIDTH = eq_pkg::WORD_W
) (
  input  logic             clk,
  input  logic [DEPTH-1:0] write_addr,
  input  logic [WIDTH-1:0] data_in,
  input  logic [DEPTH-1:0] read_addr,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      if (write_addr[i]) mem[i] <= data_in;
    end
  end

  always_comb begin
    data_out = '0;
    for (int i = 0; i < DEPTH; i++) begin
      data_out |= mem[i] & {WIDTH{read_addr[i]}};
    end
  end

endmodule
