// RAM interface: bus slave in front of the system RAM.
//
// Writes complete in the cycle they are presented (waitreq low). Reads take
// two cycles: the first reads the synchronous RAM with waitreq high, the
// second returns the word with waitreq low. The RAM sees the low AW bits of
// the bus word address. The RAM interface is named by the described
// design; this protocol is this design's choice.
module ram_if
  import coproc_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bus_req_t         s_req,
  output bus_rsp_t         s_rsp,
  output logic             ram_we,
  output logic             ram_re,
  output logic [AW-1:0]    ram_addr,
  output logic [BUS_W-1:0] ram_wdata,
  input  logic [BUS_W-1:0] ram_rdata
);

  logic pend;

  assign ram_addr  = s_req.addr[AW-1:0];
  assign ram_wdata = s_req.wdata;
  assign ram_we    = s_req.write && !pend;
  assign ram_re    = s_req.read && !pend;

  always_comb begin
    s_rsp.waitreq = s_req.read && !pend;
    s_rsp.rdata   = pend ? ram_rdata : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pend <= 1'b0;
    else if (pend) pend <= 1'b0;
    else           pend <= ram_re;
  end

  assert property (@(posedge clk) disable iff (!rst_n) pend |-> s_req.read);

endmodule
