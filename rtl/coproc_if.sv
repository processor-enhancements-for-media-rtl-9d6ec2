// Coprocessor interface: bus slave in front of the reconfigurable matrix.
//
// It turns bus transfers (see coproc_pkg: request held until waitreq is
// low) into the matrix's chipselect/read/write port. Writes complete in the
// cycle they are presented. Reads take two cycles: the first issues the
// read to the matrix with waitreq high, the second returns its data with
// waitreq low. While the matrix is busy every access stalls (waitreq held
// high) except a read of the status address, so a master can poll the
// status and a DMA transfer into the memories simply waits until the
// running instruction ends. Only the matrix's part of the bus address
// (the low CAW bits) is passed on.
//
// The coprocessor interface is named by the described design; this
// protocol and the stall rule are this design's choices.
module coproc_if
  import coproc_pkg::*;
#(
  parameter int unsigned AW  = 8,
  parameter int unsigned CAW = AW + 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bus_req_t         s_req,
  output bus_rsp_t         s_rsp,
  output logic             chipselect,
  output logic [CAW-1:0]   address,
  output logic             read,
  output logic             write,
  output logic [BUS_W-1:0] write_data,
  input  logic [BUS_W-1:0] read_data,
  input  logic             busy
);

  logic pend;
  logic status_rd;
  logic stall;

  assign address    = s_req.addr[CAW-1:0];
  assign write_data = s_req.wdata;
  assign status_rd  = s_req.read && s_req.addr[CAW-1 -: 4] == REG_CTRL &&
                      s_req.addr[AW-1:0] == AW'(CTRL_START);
  assign stall      = busy && !status_rd;

  always_comb begin
    chipselect    = 1'b0;
    read          = 1'b0;
    write         = 1'b0;
    s_rsp.waitreq = 1'b0;
    s_rsp.rdata   = '0;
    if (pend) begin
      s_rsp.rdata = read_data;
    end else if (s_req.write) begin
      s_rsp.waitreq = stall;
      chipselect    = !stall;
      write         = !stall;
    end else if (s_req.read) begin
      s_rsp.waitreq = 1'b1;
      chipselect    = !stall;
      read          = !stall;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pend <= 1'b0;
    else if (pend) pend <= 1'b0;
    else           pend <= read;
  end

  // A read in progress must be held by the master until it completes.
  assert property (@(posedge clk) disable iff (!rst_n) pend |-> s_req.read);

endmodule
