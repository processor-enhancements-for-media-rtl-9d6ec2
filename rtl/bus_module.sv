// Bus module: 256-bit interconnect of the coprocessor system.
//
// Four masters (CPU instruction, CPU data, DMA read, DMA write) reach three
// slaves (RAM interface, coprocessor interface, DMA control registers).
// Arbitration is per slave, so transfers of different masters to different
// slaves proceed in the same cycle: the DMA can read RAM while it writes the
// coprocessor, and the CPU can run from RAM while the DMA fills the matrix.
// A master whose slave is granted to another master sees waitreq high.
//
// Address decode: addr[15:14] selects the slave (coproc_pkg SEL_*); the
// fourth quarter is unmapped and answers at once with zero data. The bus
// carries 256 bits, eight 32-bit words, as in the described design; the
// crossbar structure, the map and round-robin arbitration are this design's
// choices.
module bus_module
  import coproc_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned NS = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [NM],
  output bus_rsp_t m_rsp [NM],
  output bus_req_t s_req [NS],
  input  bus_rsp_t s_rsp [NS]
);

  localparam int unsigned MIW = $clog2(NM);

  logic [1:0]    m_sel  [NM];
  logic          m_act  [NM];
  logic [NM-1:0] req    [NS];
  logic [NM-1:0] gnt    [NS];
  logic [MIW-1:0] gidx  [NS];
  logic          gvalid [NS];

  always_comb begin
    for (int m = 0; m < int'(NM); m++) begin
      m_sel[m] = m_req[m].addr[ADDR_W-1 -: 2];
      m_act[m] = m_req[m].read | m_req[m].write;
    end
    for (int s = 0; s < int'(NS); s++)
      for (int m = 0; m < int'(NM); m++)
        req[s][m] = m_act[m] && int'(m_sel[m]) == s;
  end

  for (genvar s = 0; s < int'(NS); s++) begin : g_slave
    bus_arbiter #(.N(NM)) u_arb (
      .clk, .rst_n, .req(req[s]), .done(gvalid[s] && !s_rsp[s].waitreq),
      .gnt(gnt[s]), .gnt_idx(gidx[s]), .gnt_valid(gvalid[s]));

    always_comb begin
      s_req[s] = '0;
      if (gvalid[s]) s_req[s] = m_req[gidx[s]];
    end
  end

  always_comb begin
    for (int m = 0; m < int'(NM); m++) begin
      m_rsp[m].waitreq = m_act[m];
      m_rsp[m].rdata   = '0;
      if (int'(m_sel[m]) >= int'(NS)) begin
        m_rsp[m].waitreq = 1'b0;
      end else begin
        for (int s = 0; s < int'(NS); s++)
          if (int'(m_sel[m]) == s && gnt[s][m]) m_rsp[m] = s_rsp[s];
      end
    end
  end

endmodule
