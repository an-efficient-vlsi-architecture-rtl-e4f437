// temporal_buffer: storage for lifting intermediates between visits.
//
// A small memory of DEPTH words of W bits with one combinational read port
// and one synchronous write port. A lifting step keeps here, per sequence
// (slot), the values it needs from its previous pair, in two memories per
// step: the column filter's steps use DEPTH = N (one entry per L/H column),
// the row filters' steps DEPTH = 1 (plain registers). Reading an address
// that is written in the same cycle returns the old word. The document sizes this buffer for the column filter; the
// single-port-read, single-port-write organisation is this design's choice.
// The contents are not reset: the lifting step writes an entry before it
// reads it.
module temporal_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
