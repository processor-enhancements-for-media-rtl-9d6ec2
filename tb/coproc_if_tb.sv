// Self-checking testbench of the coprocessor bus interface.
//
// A small model of the matrix port records writes and answers reads one
// cycle later with a function of the address. The testbench checks that a
// write completes in one cycle and reaches the matrix with its address and
// data, that a read takes exactly two cycles and returns the matrix data,
// that every access stalls while the matrix is busy and completes once busy
// falls, and that a status read passes while busy.
module coproc_if_tb;
  import coproc_pkg::*;

  localparam int AW = 8, CAW = 12;

  logic clk = 0, rst_n = 0;
  bus_req_t s_req = '0;
  bus_rsp_t s_rsp;
  logic chipselect, read, write, busy = 0;
  logic [CAW-1:0] address;
  logic [BUS_W-1:0] write_data, read_data;

  int checks = 0, failures = 0;
  int n_writes = 0;
  logic [CAW-1:0] last_waddr;
  logic [BUS_W-1:0] last_wdata;

  coproc_if #(.AW(AW)) dut (.*);

  // matrix port model
  always_ff @(posedge clk) begin
    if (chipselect && read) read_data <= {16{4'hC, address}};
    if (chipselect && write) begin
      n_writes   <= n_writes + 1;
      last_waddr <= address;
      last_wdata <= write_data;
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // One bus transfer; returns the number of cycles until waitreq was low.
  task automatic xfer(logic is_wr, logic [ADDR_W-1:0] ad, logic [BUS_W-1:0] wd,
                      output logic [BUS_W-1:0] rdv, output int cyc);
    @(negedge clk);
    s_req.read = !is_wr; s_req.write = is_wr; s_req.addr = ad; s_req.wdata = wd;
    cyc = 1;
    #1;
    while (s_rsp.waitreq) begin
      @(negedge clk);
      #1 cyc++;
    end
    rdv = s_rsp.rdata;
    @(posedge clk);
    #1 s_req = '0;
  endtask

  initial begin
    logic [BUS_W-1:0] d, wd;
    int cyc, nw;
    logic [ADDR_W-1:0] ad;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      ad = {2'b01, 2'b00, 4'($urandom_range(0, 3)), 8'($urandom)};
      wd = {8{$urandom}};
      nw = n_writes;
      xfer(1, ad, wd, d, cyc);
      @(negedge clk);
      chk(cyc == 1, "write in one cycle");
      chk(n_writes == nw + 1 && last_waddr == ad[CAW-1:0] && last_wdata == wd, "write reaches matrix");
      xfer(0, ad, '0, d, cyc);
      chk(cyc == 2, $sformatf("read in two cycles (%0d)", cyc));
      chk(d == {16{4'hC, ad[CAW-1:0]}}, "read data");
    end
    // stall while busy
    busy = 1;
    fork
      begin
        nw = n_writes;
        xfer(1, 16'h4010, 256'h1234, d, cyc);
      end
      begin
        repeat (6) @(negedge clk);
        chk(n_writes == nw, "no write reaches matrix while busy");
        busy = 0;
      end
    join
    chk(cyc >= 6, $sformatf("write stalled while busy (%0d)", cyc));
    @(negedge clk);
    chk(n_writes == nw + 1, "stalled write completes after busy");
    busy = 1;
    fork
      xfer(0, 16'h4003, '0, d, cyc);
      begin repeat (4) @(negedge clk); busy = 0; end
    join
    chk(cyc >= 4 && d == {16{4'hC, 12'h003}}, "read stalled while busy");
    busy = 1;
    xfer(0, {2'b01, 2'b00, REG_CTRL, 8'(CTRL_START)}, '0, d, cyc);
    chk(cyc == 2, "status read passes while busy");
    busy = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
