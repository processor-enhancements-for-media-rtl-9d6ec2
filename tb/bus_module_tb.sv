// Self-checking testbench of the bus module.
//
// Three model slaves (memories with 0, 1 and 2 read wait states) and four
// model masters issuing random reads and writes to random slaves and to the
// unmapped quarter. Each master uses its own address range, so it can
// check every read against its own reference copy: data must come from the
// addressed slave, never from another master's transfer. Unmapped accesses
// must complete at once with zero data. The testbench also counts cycles in
// which two slaves serve different masters at the same time, and cycles in
// which two masters compete for one slave; both must happen.
module bus_module_tb;
  import coproc_pkg::*;

  localparam int NM = 4, NS = 3;

  logic clk = 0, rst_n = 0;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  bus_req_t s_req [NS];
  bus_rsp_t s_rsp [NS];

  int checks = 0, failures = 0;
  int concurrent = 0, contention = 0;

  bus_module #(.NM(NM), .NS(NS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model slaves: 64-word memories, slave s has s read wait states.
  for (genvar s = 0; s < NS; s++) begin : g_slv
    logic [BUS_W-1:0] mem [64];
    int wcnt = 0;
    initial foreach (mem[i]) mem[i] = '0;
    always_comb begin
      s_rsp[s].waitreq = s_req[s].read && wcnt < s;
      s_rsp[s].rdata   = s_req[s].read ? mem[s_req[s].addr[5:0]] : '0;
    end
    always_ff @(posedge clk) begin
      if (s_req[s].write) mem[s_req[s].addr[5:0]] <= s_req[s].wdata;
      if (s_req[s].read && s_rsp[s].waitreq) wcnt <= wcnt + 1;
      else wcnt <= 0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    int act = 0;
    for (int s = 0; s < NS; s++) if (s_req[s].read || s_req[s].write) act++;
    if (act >= 2) concurrent++;
    for (int s = 0; s < NS; s++) begin
      int n = 0;
      for (int m = 0; m < NM; m++)
        if ((m_req[m].read || m_req[m].write) && int'(m_req[m].addr[15:14]) == s) n++;
      if (n >= 2) contention++;
    end
  end

  for (genvar m = 0; m < NM; m++) begin : g_mst
    logic [BUS_W-1:0] refm [NS][16];
    initial begin
      int s, i;
      logic [ADDR_W-1:0] ad;
      logic wr;
      logic [BUS_W-1:0] wd;
      int cyc;
      for (int a = 0; a < NS; a++) foreach (refm[a][k]) refm[a][k] = '0;
      m_req[m] = '0;
      wait (rst_n);
      for (int k = 0; k < 400; k++) begin
        @(negedge clk);
        s = $urandom_range(0, 3);
        i = $urandom_range(0, 15);
        ad = {2'(s), 8'h0, 2'(m), 4'(i)};
        wr = $urandom_range(0, 1);
        wd = {8{$urandom}};
        m_req[m].read = !wr; m_req[m].write = wr; m_req[m].addr = ad; m_req[m].wdata = wd;
        cyc = 1;
        #1;
        while (m_rsp[m].waitreq) begin
          @(negedge clk);
          #1 cyc++;
        end
        checks++;
        if (s == 3) begin
          if (cyc != 1 || m_rsp[m].rdata != '0) begin failures++; $display("FAIL unmapped"); end
        end else if (wr) begin
          refm[s][i] = wd;
        end else if (m_rsp[m].rdata !== refm[s][i]) begin
          failures++;
          $display("FAIL master %0d slave %0d idx %0d", m, s, i);
        end
        @(posedge clk);
        #1 m_req[m] = '0;
      end
    end
  end

  initial begin
    wait (rst_n);
    repeat (2) @(negedge clk);
    for (int m = 0; m < NM; m++) wait (m_req[m].read == 0 && m_req[m].write == 0);
    wait (checks == NM * 400);
    checks++;
    if (concurrent == 0) begin failures++; $display("FAIL no concurrent slave access"); end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no contention"); end
    $display("concurrent=%0d contention=%0d", concurrent, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

endmodule
