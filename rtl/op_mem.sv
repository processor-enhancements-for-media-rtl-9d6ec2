// Embedded memory of the reconfigurable matrix (operand memory or result
// memory of one row).
//
// Each memory stays attached to one PE; only its contents are written.
// It has one write port and one read port, so the row can write results
// while it reads operands. Reads are synchronous: rdata holds the word at
// raddr one cycle after re=1 and keeps it until the next read. Contents
// are not reset. The depth is this design's choice (DEPTH words of W bits).
module op_mem #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
