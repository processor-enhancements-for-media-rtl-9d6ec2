// Self-checking testbench of the DMA controller.
//
// The read master is served by a model source memory with two-cycle reads;
// the write master by a model sink memory that can stall writes. After a
// control write (source, destination, length) the testbench checks that
// every beat arrives at its destination address in order, that irq pulses
// once at the end and the status shows busy then done, that a second start
// while busy is stalled, and that an unstalled transfer moves one beat per
// two cycles (the read rate). A transfer with long write stalls must fill
// the FIFO and stop the read master (counted), and still move all data.
module dma_ctrl_tb;
  import coproc_pkg::*;

  logic clk = 0, rst_n = 0;
  bus_req_t s_req = '0, rd_req, wr_req;
  bus_rsp_t s_rsp, rd_rsp, wr_rsp;
  logic irq;

  int checks = 0, failures = 0;
  int irqs = 0, fifo_full_cycles = 0;
  logic stall_wr = 0;

  logic [BUS_W-1:0] src [256];
  logic [BUS_W-1:0] dst [256];
  logic rpend = 0;
  int reads_done = 0, cur_len = 0;

  dma_ctrl #(.FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: two-cycle reads
  always_comb begin
    rd_rsp.waitreq = rd_req.read && !rpend;
    rd_rsp.rdata   = rpend ? src[rd_req.addr[7:0]] : '0;
  end
  always_ff @(posedge clk) rpend <= rd_req.read && !rpend;

  // sink: writes complete unless stalled
  assign wr_rsp.waitreq = wr_req.write && stall_wr;
  assign wr_rsp.rdata   = '0;
  always_ff @(posedge clk) begin
    if (wr_req.write && !stall_wr) dst[wr_req.addr[7:0]] <= wr_req.wdata;
    if (irq) irqs <= irqs + 1;
    if (rd_req.read && !rd_rsp.waitreq) reads_done <= reads_done + 1;
    // read master idle although beats remain to be read: the FIFO is full
    if (rst_n && s_rsp.rdata[0] && !rd_req.read && reads_done < cur_len)
      fifo_full_cycles <= fifo_full_cycles + 1;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic ctl_write(int s, int d, int n, output int cyc);
    @(negedge clk);
    s_req.write = 1;
    s_req.wdata = '0;
    s_req.wdata[15:0] = 16'(s);
    s_req.wdata[47:32] = 16'(d);
    s_req.wdata[80:64] = 17'(n);
    cyc = 1;
    #1;
    while (s_rsp.waitreq) begin @(negedge clk); #1 cyc++; end
    @(posedge clk);
    #1 s_req = '0;
  endtask

  function automatic logic [BUS_W-1:0] status();
    return s_rsp.rdata;
  endfunction

  task automatic transfer(int s, int d, int n, logic stalls, output int cycles);
    int cyc, i0;
    i0 = irqs;
    foreach (dst[i]) dst[i] = '0;
    reads_done = 0; cur_len = n;
    ctl_write(s, d, n, cyc);
    chk(cyc == 1, "start accepted at once");
    @(negedge clk);
    s_req.read = 1;
    #1 chk(status()[0] == 1'b1 && status()[1] == 1'b0, "busy status");
    s_req.read = 0;
    cycles = 1;
    while (status()[0]) begin
      if (stalls) stall_wr = ($urandom_range(0, 9) < 7);
      @(negedge clk);
      #1 cycles++;
      if (cycles > 5000) break;
    end
    stall_wr = 0;
    @(negedge clk);
    chk(irqs == i0 + 1, "one irq per transfer");
    chk(status()[1] == 1'b1, "done status");
    for (int k = 0; k < n; k++) chk(dst[d + k] === src[s + k], $sformatf("beat %0d", k));
    chk(dst[d + n] == '0 && (d == 0 || dst[d - 1] == '0), "no write outside range");
  endtask

  initial begin
    int cycles, cyc;
    foreach (src[i]) src[i] = {8{$urandom}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    transfer(10, 100, 64, 0, cycles);
    chk(cycles <= 2 * 64 + 4, $sformatf("rate: %0d cycles for 64 beats", cycles));
    transfer(0, 30, 120, 1, cycles);
    chk(fifo_full_cycles > 0, "FIFO filled under write stalls");
    // start while busy is stalled
    fork
      transfer(5, 0, 20, 0, cycles);
      begin
        repeat (4) @(negedge clk);
        s_req.write = 1; s_req.wdata = '0;
        #1 chk(s_rsp.waitreq == 1'b1, "start stalled while busy");
        s_req.write = 0;
      end
    join
    $display("fifo_full_cycles=%0d", fifo_full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
