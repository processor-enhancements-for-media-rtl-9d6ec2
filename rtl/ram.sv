// System RAM of the coprocessor system.
//
// Single-port synchronous memory, one 256-bit bus beat per word. A write
// stores wdata at addr at the clock edge; a read returns the word at addr
// in rdata one cycle after re. Contents are not reset. The depth (DEPTH
// beats, 32 KiB at the default) is this design's choice.
module ram #(
  parameter int unsigned W     = 256,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata <= mem[addr];
  end

endmodule
